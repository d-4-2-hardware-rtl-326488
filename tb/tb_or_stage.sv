// tb_or_stage: checks the Nz register of the OR stage.
// Loads random slots (chunks zero or non-zero at random), compares Nz with
// a bit-by-bit zero test of each chunk, then clears bits one at a time and
// checks that exactly the addressed bit drops and that load wins over clear.
module tb_or_stage;
  import noc_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        load, clr;
  slot_t       slot;
  logic [4:0]  clr_sel;
  logic [21:0] nz, exp_nz;
  int          checks = 0, failures = 0;

  or_stage dut (.clk, .rst_n, .load_i(load), .slot_i(slot),
                .clr_i(clr), .clr_sel_i(clr_sel), .nz_o(nz));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [21:0] e, input string what);
    checks++;
    if (nz !== e) begin
      failures++;
      $display("FAIL %s: nz=%h expected %h", what, nz, e);
    end
  endtask

  initial begin
    load = 0; clr = 0; clr_sel = '0; slot = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    check('0, "after reset");
    for (int it = 0; it < 200; it++) begin
      slot = '0;
      slot.f0 = 30'($urandom);
      slot.f1 = 30'($urandom);
      exp_nz = 22'b11;
      for (int k = 0; k < 20; k++) begin
        if ($urandom_range(1)) begin
          slot[475 - 25*k + int'($urandom_range(24))] = 1'b1;  // chunk k = slot bits 499-25k:475-25k
          exp_nz[k+2] = 1'b1;
        end
      end
      load = 1; clr = 1; clr_sel = 5'd0;   // load must win over clear
      @(posedge clk); #1;
      load = 0; clr = 0;
      check(exp_nz, "load");
      for (int j = 0; j < 4; j++) begin
        clr_sel = 5'($urandom_range(21));
        clr = 1;
        exp_nz[clr_sel] = 1'b0;
        @(posedge clk); #1;
        clr = 0;
        check(exp_nz, "selective reset");
      end
      @(posedge clk); #1;
      check(exp_nz, "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
