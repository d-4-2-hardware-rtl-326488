// tb_msg_fifo: random push/pop against a queue model, for a 3-slot FIFO of
// 32-bit words and a 1-slot FIFO of 560-bit slots. Checks order, empty,
// full and the free count after each edge.
module tb_msg_fifo;
  import noc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  int   checks = 0, failures = 0;

  logic        push_a, pop_a, empty_a, full_a;
  logic [31:0] din_a, dout_a;
  logic [1:0]  cnt_a, free_a;
  logic        push_b, pop_b, empty_b, full_b;
  slot_t       din_b, dout_b;
  logic [0:0]  cnt_b, free_b;

  msg_fifo #(.T(logic [31:0]), .SLOTS(3)) dut_a (
    .clk, .rst_n, .push_i(push_a), .din_i(din_a), .pop_i(pop_a), .dout_o(dout_a),
    .empty_o(empty_a), .full_o(full_a), .count_o(cnt_a), .free_next_o(free_a));
  msg_fifo #(.T(slot_t), .SLOTS(1)) dut_b (
    .clk, .rst_n, .push_i(push_b), .din_i(din_b), .pop_i(pop_b), .dout_o(dout_b),
    .empty_o(empty_b), .full_o(full_b), .count_o(cnt_b), .free_next_o(free_b));

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [31:0] qa[$];
  slot_t       qb[$];

  initial begin
    push_a = 0; pop_a = 0; din_a = '0; push_b = 0; pop_b = 0; din_b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      #1;
      push_a = $urandom_range(1); pop_a = $urandom_range(1); din_a = $urandom;
      push_b = $urandom_range(1); pop_b = $urandom_range(1);
      din_b = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
               $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
               $urandom, $urandom};
      #1;
      chk(empty_a == (qa.size() == 0), "a empty");
      chk(full_a == (qa.size() == 3), "a full");
      chk(cnt_a == 2'(qa.size()), "a count");
      if (qa.size() > 0) chk(dout_a == qa[0], "a order");
      chk(empty_b == (qb.size() == 0), "b empty");
      chk(full_b == (qb.size() == 1), "b full");
      if (qb.size() > 0) chk(dout_b == qb[0], "b data");
      begin
        int na, nb;
        logic pa, wa, pb, wb;
        na = qa.size(); nb = qb.size();
        pa = pop_a && na > 0; wa = push_a && na < 3;
        pb = pop_b && nb > 0; wb = push_b && nb < 1;
        chk(free_a == 2'(3 - (na + int'(wa) - int'(pa))), "a free_next");
        chk(free_b == 1'(1 - (nb + int'(wb) - int'(pb))), "b free_next");
        @(posedge clk);
        if (pa) void'(qa.pop_front());
        if (wa) qa.push_back(din_a);
        if (pb) void'(qb.pop_front());
        if (wb) qb.push_back(din_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
