// tb_short_injector: short messages through the default 2-slot injector,
// first with the link always free (a message every two cycles must leave
// as one flit per cycle), then with random stop (flits held, not lost).
module tb_short_injector;
  import noc_pkg::*;
  import tb_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        req_valid, req_ready, flit_valid, stop;
  logic [6:0]  dst, node_id;
  logic [31:0] addr;
  logic [4:0]  cmd;
  flit_t       flit;
  int          checks = 0, failures = 0;
  word_t       exp_q[$], tmp[$];
  int          cyc = 0, first_cyc = -1, last_cyc = -1, nflits = 0, stop_cycles = 0;
  logic        random_stop = 0;

  short_injector dut (.clk, .rst_n, .node_id_i(node_id), .req_valid_i(req_valid),
    .req_ready_o(req_ready), .req_dst_i(dst), .req_addr_i(addr), .req_cmd_i(cmd),
    .flit_o(flit), .flit_valid_o(flit_valid), .stop_i(stop));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    stop <= random_stop ? ($urandom_range(1) == 0) : 1'b0;
    if (stop) stop_cycles++;
  end

  always @(posedge clk) if (rst_n && flit_valid) begin
    word_t e;
    checks++;
    if (stop) begin failures++; $display("FAIL flit during stop"); end
    if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected flit %h", flit); end
    else begin
      e = exp_q.pop_front();
      if (32'(flit) !== e) begin failures++; $display("FAIL flit %h expected %h", flit, e); end
    end
    if (first_cyc < 0) first_cyc = cyc;
    last_cyc = cyc;
    nflits++;
  end

  task automatic send_msgs(input int n);
    for (int i = 0; i < n; i++) begin
      dst = 7'($urandom); addr = $urandom; cmd = 5'($urandom);
      ref_short_flits(dst, node_id, addr, cmd, tmp);
      foreach (tmp[j]) exp_q.push_back(tmp[j]);
      req_valid = 1;
      #1;
      while (!req_ready) begin @(posedge clk); #1; end
      @(posedge clk); #1;
    end
    req_valid = 0;
  endtask

  initial begin
    req_valid = 0; dst = '0; addr = '0; cmd = '0; node_id = 7'h33; stop = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    send_msgs(25);
    repeat (6) @(posedge clk);
    checks++;
    if (nflits != 50 || last_cyc - first_cyc != 49) begin
      failures++;
      $display("FAIL rate: %0d flits over %0d cycles", nflits, last_cyc - first_cyc + 1);
    end
    #1 random_stop = 1;
    send_msgs(60);
    repeat (300) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || stop_cycles == 0) begin
      failures++; $display("FAIL %0d flits missing, %0d stop cycles", exp_q.size(), stop_cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
