// short_ejector: ejection side of the NI for short coherence messages,
// without decompression.
//
// Incoming flits are written into a buffer of SLOTS 32-bit slots and
// handed to the node in order (flit_o / flit_valid_o, "data ready";
// flit_ready_i reads one flit). Stop&Go: stop_o is raised when the buffer
// will be full after the current edge, and dropped once a slot frees.
// A flit written in cycle t is readable from t+1. Two 32-bit slots is the
// size the original description selects; the node-side handshake is a
// choice made here, the node-side protocol logic being outside the NI.
module short_ejector
  import noc_pkg::*;
#(
  parameter int SLOTS = 2,
  localparam int CW   = $clog2(SLOTS + 1)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t flit_i,
  input  logic  flit_valid_i,
  output logic  stop_o,
  output flit_t flit_o,
  output logic  flit_valid_o,
  input  logic  flit_ready_i
);
  logic          empty;
  logic [CW-1:0] free_next;

  msg_fifo #(.T(flit_t), .SLOTS(SLOTS)) u_buf (
    .clk, .rst_n,
    .push_i(flit_valid_i), .din_i(flit_i),
    .pop_i(flit_ready_i), .dout_o(flit_o),
    .empty_o(empty), .full_o(), .count_o(), .free_next_o(free_next));

  assign flit_valid_o = !empty;

  stopgo_rx #(.CW(CW), .STOP_LEVEL(0)) u_fc (
    .clk, .rst_n, .free_next_i(free_next),
    .valid_i(flit_valid_i), .stop_o(stop_o));
endmodule
