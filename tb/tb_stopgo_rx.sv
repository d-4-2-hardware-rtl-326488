// tb_stopgo_rx: checks that stop follows the free count one edge later,
// for thresholds 0 and 2, and that a sender that obeys stop never trips
// the receiver's no-flit-on-stop assertion while a small buffer fills and
// drains at random.
module tb_stopgo_rx;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic [2:0] free_next, free_q;
  logic       valid0, valid2, stop0, stop2;
  int         checks = 0, failures = 0;
  int         level = 0, nlevel = 0, stops_seen = 0;

  stopgo_rx #(.CW(3), .STOP_LEVEL(0)) dut0 (.clk, .rst_n, .free_next_i(free_next),
                                            .valid_i(valid0), .stop_o(stop0));
  stopgo_rx #(.CW(3), .STOP_LEVEL(2)) dut2 (.clk, .rst_n, .free_next_i(free_next),
                                            .valid_i(valid2), .stop_o(stop2));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // A 4-place buffer: the sender offers a flit at random and sends it only
  // when stop0 is low; the node drains at random.
  logic offer, drain;
  always_comb begin
    valid0 = offer && !stop0;
    valid2 = 1'b0;
    free_next = 3'(4 - (level + int'(valid0) - int'(drain && level > 0)));
  end

  initial begin
    offer = 0; drain = 0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (stop0 || stop2) begin failures++; $display("FAIL stop during reset"); end
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      offer = ($urandom_range(3) != 0);
      drain = (it % 400 < 200) ? ($urandom_range(3) == 0) : ($urandom_range(3) != 0);
      #1;
      free_q = free_next;
      nlevel = level + int'(valid0) - int'(drain && level > 0);
      @(posedge clk);
      #1;
      level = nlevel;
      checks++;
      if (stop0 !== (free_q == 0) || stop2 !== (free_q <= 2)) begin
        failures++;
        $display("FAIL free=%0d stop0=%0b stop2=%0b", free_q, stop0, stop2);
      end
      checks++;
      if (level > 4) begin failures++; $display("FAIL overflow"); end
      if (stop0) stops_seen++;
      #3;
    end
    checks++;
    if (stops_seen == 0) begin failures++; $display("FAIL stop never raised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
