// tb_slot_configs: runs the back-to-back traffic test of ni_pair_check for
// the buffer depths of the original evaluation: 1, 2, 4 and 8 slots for
// both the long-message (560-bit) and short-message (32-bit) buffers, all
// four configurations side by side on one clock.
module tb_slot_configs;
  logic clk = 1'b0;
  logic done [4];
  int   c [4], f [4];
  int   checks, failures;

  always #5 clk = ~clk;

  ni_pair_check #(.LONG_SLOTS(1), .SHORT_SLOTS(1)) u_s1 (.clk, .done_o(done[0]), .checks_o(c[0]), .failures_o(f[0]));
  ni_pair_check #(.LONG_SLOTS(2), .SHORT_SLOTS(2)) u_s2 (.clk, .done_o(done[1]), .checks_o(c[1]), .failures_o(f[1]));
  ni_pair_check #(.LONG_SLOTS(4), .SHORT_SLOTS(4)) u_s4 (.clk, .done_o(done[2]), .checks_o(c[2]), .failures_o(f[2]));
  ni_pair_check #(.LONG_SLOTS(8), .SHORT_SLOTS(8)) u_s8 (.clk, .done_o(done[3]), .checks_o(c[3]), .failures_o(f[3]));

  always_comb begin
    checks = 0; failures = 0;
    for (int i = 0; i < 4; i++) begin checks += c[i]; failures += f[i]; end
  end

  initial begin
    #20000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done[0] && done[1] && done[2] && done[3]);
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
