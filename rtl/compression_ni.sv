// compression_ni: network interface with zero-chunk compression for a
// cache-coherent network-on-chip.
//
// Coherence traffic uses two physically separate networks, one per message
// class. Short messages (two 32-bit flits: command, addresses, source and
// destination) go through the short injector and short ejector, each a
// plain flit buffer of SHORT_SLOTS slots. Long messages carry a 512-bit
// memory block; they go through the long injector, which stores the whole
// message in one of LONG_SLOTS slots and sends only the header flits and
// the 25-bit chunks that are not all zero, and through the long ejector,
// which rebuilds the block into a zero-cleared slot from the chunk numbers
// carried by the flits. Every link uses Stop&Go flow control: each
// receiver drives a stop signal back to its sender.
//
// The split into four parts, the separate networks, Stop&Go and the
// defaults (one long slot, two short slots) follow the original
// description of the NI for a coherent system. The node-side ports are
// simple valid/ready handshakes chosen here to stand in for the node's bus
// protocol (AMBA, AXI or OCP), which is outside the NI. node_id_i is the
// NI's own network address, inserted as the source. Latency: see
// long_injector, long_ejector, short_injector and short_ejector; widths and
// formats are in noc_pkg.
module compression_ni
  import noc_pkg::*;
#(
  parameter int LONG_SLOTS  = 1,
  parameter int SHORT_SLOTS = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [NODE_W-1:0]  node_id_i,

  // node -> NI, long messages (memory blocks)
  input  logic               lreq_valid_i,
  output logic               lreq_ready_o,
  input  logic [NODE_W-1:0]  lreq_dst_i,
  input  logic [ADDR_W-1:0]  lreq_addr_i,
  input  logic [CM_W-1:0]    lreq_cm_i,
  input  logic [BLOCK_W-1:0] lreq_data_i,
  // long-message network, output link
  output flit_t              lnet_out_flit_o,
  output logic               lnet_out_valid_o,
  input  logic               lnet_out_stop_i,
  // long-message network, input link
  input  flit_t              lnet_in_flit_i,
  input  logic               lnet_in_valid_i,
  output logic               lnet_in_stop_o,
  // NI -> node, long messages
  output long_msg_t          lmsg_o,
  output logic               lmsg_valid_o,
  input  logic               lmsg_ready_i,

  // node -> NI, short messages
  input  logic               sreq_valid_i,
  output logic               sreq_ready_o,
  input  logic [NODE_W-1:0]  sreq_dst_i,
  input  logic [ADDR_W-1:0]  sreq_addr_i,
  input  logic [CMD_W-1:0]   sreq_cmd_i,
  // short-message network, output link
  output flit_t              snet_out_flit_o,
  output logic               snet_out_valid_o,
  input  logic               snet_out_stop_i,
  // short-message network, input link
  input  flit_t              snet_in_flit_i,
  input  logic               snet_in_valid_i,
  output logic               snet_in_stop_o,
  // NI -> node, short-message flits
  output flit_t              sflit_o,
  output logic               sflit_valid_o,
  input  logic               sflit_ready_i
);

  long_injector #(.SLOTS(LONG_SLOTS)) u_linj (
    .clk, .rst_n, .node_id_i,
    .req_valid_i(lreq_valid_i), .req_ready_o(lreq_ready_o),
    .req_dst_i(lreq_dst_i), .req_addr_i(lreq_addr_i),
    .req_cm_i(lreq_cm_i), .req_data_i(lreq_data_i),
    .flit_o(lnet_out_flit_o), .flit_valid_o(lnet_out_valid_o),
    .stop_i(lnet_out_stop_i));

  long_ejector #(.SLOTS(LONG_SLOTS)) u_lej (
    .clk, .rst_n,
    .flit_i(lnet_in_flit_i), .flit_valid_i(lnet_in_valid_i),
    .stop_o(lnet_in_stop_o),
    .msg_o(lmsg_o), .msg_valid_o(lmsg_valid_o), .msg_ready_i(lmsg_ready_i));

  short_injector #(.SLOTS(SHORT_SLOTS)) u_sinj (
    .clk, .rst_n, .node_id_i,
    .req_valid_i(sreq_valid_i), .req_ready_o(sreq_ready_o),
    .req_dst_i(sreq_dst_i), .req_addr_i(sreq_addr_i), .req_cmd_i(sreq_cmd_i),
    .flit_o(snet_out_flit_o), .flit_valid_o(snet_out_valid_o),
    .stop_i(snet_out_stop_i));

  short_ejector #(.SLOTS(SHORT_SLOTS)) u_sej (
    .clk, .rst_n,
    .flit_i(snet_in_flit_i), .flit_valid_i(snet_in_valid_i),
    .stop_o(snet_in_stop_o),
    .flit_o(sflit_o), .flit_valid_o(sflit_valid_o), .flit_ready_i(sflit_ready_i));

endmodule
