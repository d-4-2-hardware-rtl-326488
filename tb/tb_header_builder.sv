// tb_header_builder: short messages go in, flit pairs come out. Compares
// each flit with the reference format and checks that back-to-back
// messages give one flit per cycle when the consumer is always ready, and
// that a stalled consumer holds the flit.
module tb_header_builder;
  import noc_pkg::*;
  import tb_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        req_valid, req_ready, flit_valid, flit_ready;
  logic [6:0]  dst, node_id;
  logic [31:0] addr;
  logic [4:0]  cmd;
  flit_t       flit;
  int          checks = 0, failures = 0;
  word_t       exp_q[$], tmp[$];
  int          cyc = 0, first_cyc = -1, last_cyc = -1, nflits = 0;
  logic        stall_mode = 0;

  header_builder dut (.clk, .rst_n, .node_id_i(node_id), .req_valid_i(req_valid),
    .req_ready_o(req_ready), .req_dst_i(dst), .req_addr_i(addr), .req_cmd_i(cmd),
    .flit_o(flit), .flit_valid_o(flit_valid), .flit_ready_i(flit_ready));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    flit_ready <= stall_mode ? 1'($urandom_range(1)) : 1'b1;
  end

  always @(posedge clk) if (rst_n && flit_valid && flit_ready) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected flit %h", flit); end
    else begin
      word_t e;
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
    req_valid = 0; dst = '0; addr = '0; cmd = '0; node_id = 7'h2a; flit_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    send_msgs(20);
    repeat (5) @(posedge clk);
    checks++;
    if (nflits != 40 || last_cyc - first_cyc != 39) begin
      failures++;
      $display("FAIL rate: %0d flits over %0d cycles", nflits, last_cyc - first_cyc + 1);
    end
    #1;
    stall_mode = 1;
    node_id = 7'h11;
    send_msgs(30);
    repeat (200) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d flits missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
