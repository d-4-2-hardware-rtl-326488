// header_builder: turns a short coherence message into its two flits.
//
// The node hands over destination, address and command (req_valid_i /
// req_ready_o); the NI adds its own identifier as the source. The message
// is held in a register and sent as two flits on flit_o (flit_valid_o /
// flit_ready_i), one per accepted cycle:
//   flit 0: FT=11 (header), DST[29:23], SRC[22:16], ADDR[31:16] in [15:0]
//   flit 1: FT=01 (tail),   ADDR[15:0] in [29:14], COMMAND[13:9], zero pad
// The next message is accepted in the cycle the tail is taken, so
// back-to-back messages give one flit per cycle. Field positions and FT
// codes follow the short packet format; zero padding and the handshake are
// choices made here. For long messages the header is built by placing
// the fields in the slot layout (see long_injector).
module header_builder
  import noc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NODE_W-1:0] node_id_i,
  input  logic              req_valid_i,
  output logic              req_ready_o,
  input  logic [NODE_W-1:0] req_dst_i,
  input  logic [ADDR_W-1:0] req_addr_i,
  input  logic [CMD_W-1:0]  req_cmd_i,
  output flit_t             flit_o,
  output logic              flit_valid_o,
  input  logic              flit_ready_i
);
  short_msg_t msg_q;
  logic       busy_q, second_q;
  logic       take, last_out;

  assign flit_valid_o = busy_q;
  assign last_out     = busy_q && second_q && flit_ready_i;
  assign req_ready_o  = !busy_q || last_out;
  assign take         = req_valid_i && req_ready_o;

  always_comb begin
    if (!second_q)
      flit_o = '{ft: FT_HEADER,
                 body: {msg_q.dst, msg_q.src, msg_q.addr[ADDR_W-1 -: ADDR_HI_W]}};
    else
      flit_o = '{ft: FT_TAIL,
                 body: {msg_q.addr[ADDR_W-ADDR_HI_W-1:0], msg_q.cmd, {SHORT_PAD_W{1'b0}}}};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q   <= 1'b0;
      second_q <= 1'b0;
      msg_q    <= '0;
    end else begin
      if (busy_q && flit_ready_i) begin
        second_q <= !second_q;
        if (second_q) busy_q <= 1'b0;
      end
      if (take) begin
        busy_q   <= 1'b1;
        second_q <= 1'b0;
        msg_q    <= '{dst: req_dst_i, src: node_id_i, addr: req_addr_i, cmd: req_cmd_i};
      end
    end
  end
endmodule
