// tb_baseline_long_injector: sends long messages through a 2-slot
// uncompressed injector and compares every flit with the reference
// 19-flit stream. Checks the header latency of one cycle into an idle
// injector, that queued messages follow each other with no idle cycle
// when there is no stop, and that with random stop flits are held, never
// lost or reordered.
module tb_baseline_long_injector;
  import noc_pkg::*;
  import tb_ref_pkg::*;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         req_valid, req_ready, flit_valid, stop;
  logic [6:0]   dst, node_id;
  logic [31:0]  addr;
  logic [4:0]   cmd;
  logic [511:0] data;
  flit_t        flit;
  int           checks = 0, failures = 0;
  word_t        exp_q[$], tmp[$];
  int           cyc = 0, hdr_cyc = 0, sent_flits = 0, sent_msgs = 0;
  int           stop_cycles = 0, idle_between = 0;
  logic         random_stop = 0, stream = 0, streaming = 0;

  baseline_long_injector #(.SLOTS(2)) dut (.clk, .rst_n, .node_id_i(node_id),
    .req_valid_i(req_valid), .req_ready_o(req_ready), .req_dst_i(dst),
    .req_addr_i(addr), .req_cmd_i(cmd), .req_data_i(data),
    .flit_o(flit), .flit_valid_o(flit_valid), .stop_i(stop));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    stop <= random_stop ? ($urandom_range(2) == 0) : 1'b0;
    if (stop) stop_cycles++;
  end

  logic in_msg = 0;
  always @(posedge clk) if (rst_n) begin
    if (flit_valid) begin
      word_t e;
      checks++;
      if (stop) begin failures++; $display("FAIL flit sent during stop"); end
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected flit %h", flit); end
      else begin
        e = exp_q.pop_front();
        if (32'(flit) !== e) begin failures++; $display("FAIL flit %h expected %h", flit, e); end
      end
      sent_flits++;
      if (stream) streaming = 1;
      if (flit.ft == FT_HEADER) begin hdr_cyc = cyc; in_msg = 1; end
      if (flit.ft == FT_TAIL) begin in_msg = 0; sent_msgs++; end
    end else begin
      checks++;
      if (flit.ft != FT_INVALID) begin failures++; $display("FAIL FT not 00 when idle"); end
      if (in_msg && !stop) begin failures++; $display("FAIL gap inside a message"); end
      if (streaming && exp_q.size() != 0) idle_between++;
    end
  end

  task automatic send(input logic [511:0] d, input bit wait_idle);
    bmsg_s m;
    dst = 7'($urandom); addr = $urandom; cmd = 5'($urandom); data = d;
    m = '{dst: dst, src: node_id, addr: addr, cmd: cmd, data: d};
    ref_base_flits(m, tmp);
    foreach (tmp[j]) exp_q.push_back(tmp[j]);
    req_valid = 1;
    #1;
    while (!req_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    req_valid = 0;
    if (wait_idle) begin
      int t0 = cyc;
      wait (exp_q.size() == 0);
      @(posedge clk); #1;
      checks++;
      if (hdr_cyc - t0 != 1) begin
        failures++; $display("FAIL header latency %0d cycles", hdr_cyc - t0);
      end
    end
  endtask

  initial begin
    req_valid = 0; dst = '0; addr = '0; cmd = '0; data = '0; node_id = 7'h2a; stop = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    send('0, 1);
    send({512{1'b1}}, 1);
    for (int i = 0; i < 20; i++) send(gen_block($urandom_range(100)), 1);
    stream = 1;
    for (int i = 0; i < 40; i++) send(gen_block($urandom_range(100)), 0);
    wait (exp_q.size() == 0);
    @(posedge clk); #1;
    stream = 0; streaming = 0;
    checks++;
    if (idle_between != 0) begin
      failures++; $display("FAIL %0d idle cycles between queued messages", idle_between);
    end
    random_stop = 1;
    for (int i = 0; i < 60; i++) send(gen_block($urandom_range(100)), 0);
    repeat (400) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || sent_msgs != 122 || sent_flits != 122 * 19) begin
      failures++; $display("FAIL %0d flits left, %0d messages", exp_q.size(), sent_msgs);
    end
    checks++;
    if (stop_cycles == 0) begin failures++; $display("FAIL stop never applied"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
