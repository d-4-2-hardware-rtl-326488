// baseline_long_injector: injection side of the NI for long messages
// without compression, the reference point the compressing injector is
// measured against.
//
// The node writes a whole message (destination, address, 5-bit command,
// 512-bit block) in one cycle (req_valid_i / req_ready_o, ready meaning a
// slot is free); the NI adds its own identifier as source. The message is
// stored in one slot as 19 flit bodies in the uncompressed long format
// (see noc_pkg). A position counter walks the head slot: every cycle in
// which the network does not signal stop, body number pos goes out with
// FT 11 for flit 0, 01 for flit 18 and 10 otherwise; the last flit pops the
// slot. Timing: the header leaves one cycle after the message is written
// into an empty buffer, then one flit per cycle, so a message always holds
// the link for 19 cycles; a queued message follows its predecessor with no
// idle cycle. FT 00 is shown when nothing is sent.
// The flit format follows the original baseline packet format; the
// handshake and the 7 padding bits of flit 18 are choices made here.
module baseline_long_injector
  import noc_pkg::*;
#(
  parameter int SLOTS = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [NODE_W-1:0]  node_id_i,
  // node side
  input  logic               req_valid_i,
  output logic               req_ready_o,
  input  logic [NODE_W-1:0]  req_dst_i,
  input  logic [ADDR_W-1:0]  req_addr_i,
  input  logic [CMD_W-1:0]   req_cmd_i,
  input  logic [BLOCK_W-1:0] req_data_i,
  // network side
  output flit_t              flit_o,
  output logic               flit_valid_o,
  input  logic               stop_i
);
  base_msg_t        msg_in;
  base_slot_t       slot_in, head;
  logic             empty, full, send, last;
  logic [SEL_W-1:0] pos_q;
  ft_e              ft;

  assign msg_in  = '{dst: req_dst_i, src: node_id_i, addr: req_addr_i,
                     cmd: req_cmd_i, data: req_data_i};
  assign slot_in = base_slot_t'({msg_in, BASE_PAD_W'(0)});

  assign req_ready_o = !full;

  msg_fifo #(.T(base_slot_t), .SLOTS(SLOTS)) u_buf (
    .clk, .rst_n,
    .push_i(req_valid_i), .din_i(slot_in),
    .pop_i(send && last), .dout_o(head),
    .empty_o(empty), .full_o(full), .count_o(), .free_next_o());

  assign send = !empty && !stop_i;
  assign last = (pos_q == SEL_W'(BASE_FLITS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    pos_q <= '0;
    else if (send) pos_q <= last ? '0 : pos_q + 1'b1;
  end

  always_comb begin
    if (pos_q == '0) ft = FT_HEADER;
    else if (last)   ft = FT_TAIL;
    else             ft = FT_PAYLOAD;
  end

  assign flit_o       = '{ft: send ? ft : FT_INVALID,
                          body: head[SEL_W'(BASE_FLITS - 1) - pos_q]};
  assign flit_valid_o = send;

  a_pos_range : assert property (@(posedge clk) disable iff (!rst_n)
    pos_q < SEL_W'(BASE_FLITS));
endmodule
