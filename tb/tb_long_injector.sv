// tb_long_injector: sends long messages with blocks of varying zero
// density (all zero, all non-zero, random) through a 2-slot injector and
// compares every flit with the reference flit stream. Without stop, each
// message must leave as consecutive flits, and the header must appear one
// cycle after the message is written into an idle injector. With random
// stop, flits must be held, never lost or reordered.
module tb_long_injector;
  import noc_pkg::*;
  import tb_ref_pkg::*;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         req_valid, req_ready, flit_valid, stop;
  logic [6:0]   dst, node_id;
  logic [31:0]  addr;
  logic [1:0]   cm;
  logic [511:0] data;
  flit_t        flit;
  int           checks = 0, failures = 0;
  word_t        exp_q[$], tmp[$];
  int           cyc = 0, hdr_cyc = 0, sent_flits = 0, sent_msgs = 0, base_flits = 0;
  int           stop_cycles = 0;
  logic         random_stop = 0;

  long_injector #(.SLOTS(2)) dut (.clk, .rst_n, .node_id_i(node_id),
    .req_valid_i(req_valid), .req_ready_o(req_ready), .req_dst_i(dst),
    .req_addr_i(addr), .req_cm_i(cm), .req_data_i(data),
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
      if (flit.ft == FT_HEADER) begin hdr_cyc = cyc; in_msg = 1; end
      if (flit.ft == FT_TAIL) begin in_msg = 0; sent_msgs++; end
    end else begin
      checks++;
      if (flit.ft != FT_INVALID) begin failures++; $display("FAIL FT not 00 when idle"); end
      if (in_msg && !stop) begin failures++; $display("FAIL gap inside a message"); end
    end
  end

  task automatic send(input logic [511:0] d, input bit wait_idle);
    lmsg_s m;
    dst = 7'($urandom); addr = $urandom; cm = 2'($urandom); data = d;
    m = '{dst: dst, src: node_id, addr: addr, cm: cm, data: d};
    ref_long_flits(m, tmp);
    foreach (tmp[j]) exp_q.push_back(tmp[j]);
    base_flits += 19;
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
    req_valid = 0; dst = '0; addr = '0; cm = '0; data = '0; node_id = 7'h05; stop = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    send('0, 1);                                  // all chunks zero: 2 flits
    send({512{1'b1}}, 1);                         // nothing zero: 22 flits
    for (int i = 0; i < 40; i++) send(gen_block(i % 3 == 0 ? 90 : 60), 1);
    for (int i = 0; i < 60; i++) send(gen_block($urandom_range(100)), 0);
    random_stop = 1;
    for (int i = 0; i < 60; i++) send(gen_block($urandom_range(100)), 0);
    repeat (400) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || sent_msgs != 162) begin
      failures++; $display("FAIL %0d flits left, %0d messages", exp_q.size(), sent_msgs);
    end
    checks++;
    if (stop_cycles == 0) begin failures++; $display("FAIL stop never applied"); end
    $display("long_injector: %0d flits sent for %0d messages (uncompressed %0d)",
             sent_flits, sent_msgs, base_flits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
