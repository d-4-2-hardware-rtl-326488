// baseline_long_ejector: ejection side of the NI for long messages
// without compression, the counterpart of baseline_long_injector.
//
// Flits arrive on flit_i / flit_valid_i in the uncompressed long format
// and are written straight into the ejection buffer slot being assembled,
// by arrival order: a header flit (FT=11) is stored as flit 0 and restarts
// the position count, every following flit goes to the next position. The
// tail flit (FT=01, flit 18) completes the message: the slot becomes
// readable by the node (msg_valid_o; msg_ready_i reads it) and the next
// free slot is used for the next message. Flits of different messages are
// assumed not to interleave. Stop&Go: stop_o is raised once all SLOTS
// slots hold complete messages. Timing: the message is readable the cycle
// after its tail flit arrives.
// The format follows the original baseline packet format; the handshake
// and the flow-control threshold are choices made here, the same as in
// the compressing ejector.
module baseline_long_ejector
  import noc_pkg::*;
#(
  parameter int SLOTS = 1,
  localparam int PW   = (SLOTS > 1) ? $clog2(SLOTS) : 1,
  localparam int CW   = $clog2(SLOTS + 1)
) (
  input  logic      clk,
  input  logic      rst_n,
  // network side
  input  flit_t     flit_i,
  input  logic      flit_valid_i,
  output logic      stop_o,
  // node side
  output base_msg_t msg_o,
  output logic      msg_valid_o,
  input  logic      msg_ready_i
);
  base_slot_t       mem [SLOTS];
  logic [BASE_FLITS*BODY_W-1:0] rd_slot;
  logic [PW-1:0]    wr_q, rd_q;
  logic [CW-1:0]    cnt_q, cnt_d;
  logic [SEL_W-1:0] pos_q;
  logic             is_head, done, rd;

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(SLOTS - 1)) ? '0 : p + 1'b1;
  endfunction

  assign is_head = flit_valid_i && (flit_i.ft == FT_HEADER);
  assign done    = flit_valid_i && (flit_i.ft == FT_TAIL);

  assign msg_valid_o = (cnt_q != '0);
  assign rd          = msg_valid_o && msg_ready_i;
  assign rd_slot     = mem[rd_q];
  // The message fields are the slot bits above the padding.
  assign msg_o       = rd_slot[BASE_FLITS*BODY_W-1 -: $bits(base_msg_t)];

  always_comb begin
    cnt_d = cnt_q;
    if (done && !rd) cnt_d = cnt_q + 1'b1;
    if (rd && !done) cnt_d = cnt_q - 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_q  <= '0;
      rd_q  <= '0;
      cnt_q <= '0;
      pos_q <= '0;
    end else begin
      cnt_q <= cnt_d;
      if (rd)   rd_q <= inc(rd_q);
      if (done) wr_q <= inc(wr_q);
      if (is_head)           pos_q <= SEL_W'(1);
      else if (flit_valid_i) pos_q <= pos_q + 1'b1;
    end
  end

  // Slot assembly: the header goes to position 0, later flits in order.
  always_ff @(posedge clk) begin
    if (is_head)
      mem[wr_q][BASE_FLITS-1] <= flit_i.body;
    else if (flit_valid_i && pos_q < SEL_W'(BASE_FLITS))
      mem[wr_q][SEL_W'(BASE_FLITS - 1) - pos_q] <= flit_i.body;
  end

  stopgo_rx #(.CW(CW), .STOP_LEVEL(0)) u_fc (
    .clk, .rst_n, .free_next_i(CW'(SLOTS) - cnt_d),
    .valid_i(flit_valid_i), .stop_o(stop_o));

  a_valid_ft : assert property (@(posedge clk) disable iff (!rst_n)
    flit_valid_i |-> flit_i.ft != FT_INVALID);
  a_tail_pos : assert property (@(posedge clk) disable iff (!rst_n)
    done |-> pos_q == SEL_W'(BASE_FLITS - 1));
endmodule
