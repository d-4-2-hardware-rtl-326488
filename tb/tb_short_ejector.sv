// tb_short_ejector: a sender that obeys stop pushes random flits into the
// default 2-slot ejector while the node reads slowly, then quickly. Every
// flit must come out once and in order, stop must be raised while the
// node is slow, and a flit must be readable the cycle after it arrives.
module tb_short_ejector;
  import noc_pkg::*;
  import tb_ref_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  flit_t flit_in, flit_out;
  logic  vin, stop, vout, rdy;
  int    checks = 0, failures = 0, stop_cycles = 0, got = 0;
  word_t src_q[$], exp_q[$];
  logic  slow = 1, was_empty_write = 0;

  short_ejector dut (.clk, .rst_n, .flit_i(flit_in), .flit_valid_i(vin), .stop_o(stop),
    .flit_o(flit_out), .flit_valid_o(vout), .flit_ready_i(rdy));

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flit_in = '0; vin = 0;
    wait (rst_n);
    forever begin
      @(posedge clk); #1;
      if (src_q.size() > 0 && !stop && $urandom_range(3) != 0) begin
        flit_in = flit_t'(src_q.pop_front()); vin = 1;
      end else begin
        flit_in = '0; vin = 0;
      end
    end
  end

  always @(posedge clk) rdy <= slow ? ($urandom_range(4) == 0) : ($urandom_range(4) != 0);

  always @(posedge clk) if (rst_n) begin
    if (stop) stop_cycles++;
    if (was_empty_write) begin
      checks++;
      if (!vout) begin failures++; $display("FAIL flit not readable next cycle"); end
    end
    was_empty_write <= vin && !vout;
    if (vout && rdy) begin
      word_t e;
      checks++; got++;
      e = exp_q.pop_front();
      if (32'(flit_out) !== e) begin failures++; $display("FAIL got %h expected %h", flit_out, e); end
    end
  end

  initial begin
    rdy = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      word_t w;
      w = $urandom;
      if (w[31:30] == 2'b00) w[31] = 1'b1;
      src_q.push_back(w); exp_q.push_back(w);
      if (i == 200) begin
        wait (src_q.size() < 10);
        slow = 0;
      end
    end
    wait (exp_q.size() == 0);
    repeat (5) @(posedge clk);
    checks++;
    if (got != 400 || stop_cycles == 0) begin
      failures++; $display("FAIL got %0d flits, %0d stop cycles", got, stop_cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
