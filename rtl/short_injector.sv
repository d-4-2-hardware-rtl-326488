// short_injector: injection side of the NI for short coherence messages,
// without compression.
//
// The header builder turns each accepted message into its two flits
// (header, tail), which are written one per cycle into a flit buffer of
// SLOTS 32-bit slots. The head flit is sent on the link whenever the
// downstream receiver does not signal stop. Timing: a message accepted in
// cycle t has its header in the buffer at t+2 and on the link from t+2,
// then one flit per cycle. Two 32-bit slots is the size the original
// description selects for short messages; the handshake is a choice made here.
module short_injector
  import noc_pkg::*;
#(
  parameter int SLOTS = 2
) (
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
  input  logic              stop_i
);
  flit_t hb_flit, head;
  logic  hb_valid, full, empty, send;

  header_builder u_hb (
    .clk, .rst_n, .node_id_i,
    .req_valid_i, .req_ready_o, .req_dst_i, .req_addr_i, .req_cmd_i,
    .flit_o(hb_flit), .flit_valid_o(hb_valid), .flit_ready_i(!full));

  msg_fifo #(.T(flit_t), .SLOTS(SLOTS)) u_buf (
    .clk, .rst_n,
    .push_i(hb_valid), .din_i(hb_flit),
    .pop_i(send), .dout_o(head),
    .empty_o(empty), .full_o(full), .count_o(), .free_next_o());

  assign send         = !empty && !stop_i;
  assign flit_valid_o = send;
  assign flit_o       = send ? head : '{ft: FT_INVALID, body: head.body};
endmodule
