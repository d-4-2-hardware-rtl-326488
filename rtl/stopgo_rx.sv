// stopgo_rx: receiving side of the Stop&Go link-level flow control.
//
// The receiver tells the upstream sender to stop when its buffer has no
// room left. free_next_i is the number of free places the buffer will have
// after the current clock edge (flits for a flit buffer, message slots for
// the long-message ejection buffer). stop_o is registered: it goes high in
// the cycle after the edge at which the free count falls to STOP_LEVEL or
// below, and low again once it rises above. A sender that sees stop_o high
// holds its flit in that same cycle, so with a link of zero latency no flit
// is lost; the assertion checks that no flit arrives while stop_o is high.
// The original description names Stop&Go only; the registered stop, the
// threshold and the zero-latency link are choices made here. Reset releases stop.
module stopgo_rx #(
  parameter int CW          = 4,
  parameter int STOP_LEVEL  = 0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [CW-1:0] free_next_i,
  input  logic          valid_i,
  output logic          stop_o
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) stop_o <= 1'b0;
    else        stop_o <= (free_next_i <= CW'(STOP_LEVEL));
  end

  a_no_flit_on_stop : assert property (@(posedge clk) disable iff (!rst_n)
    !(valid_i && stop_o))
    else $error("stopgo_rx: flit received while stop is asserted");
endmodule
