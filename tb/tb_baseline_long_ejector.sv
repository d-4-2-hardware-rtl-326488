// tb_baseline_long_ejector: feeds reference 19-flit streams into a 2-slot
// uncompressed ejector, holding flits while stop is high and inserting
// random idle cycles, while the node reads at random. Every rebuilt message
// must equal the original. Also checks that a message is readable the
// cycle after its tail and that stop is raised.
module tb_baseline_long_ejector;
  import noc_pkg::*;
  import tb_ref_pkg::*;

  logic      clk = 1'b0, rst_n = 1'b0;
  flit_t     flit;
  logic      flit_valid, stop, msg_valid, msg_ready;
  base_msg_t msg;
  int        checks = 0, failures = 0;
  bmsg_s     sent_q[$];
  word_t     fq[$], tmp[$];
  int        received = 0, stop_cycles = 0;
  logic      tail_seen = 0;
  logic      random_read = 0;

  baseline_long_ejector #(.SLOTS(2)) dut (.clk, .rst_n, .flit_i(flit),
    .flit_valid_i(flit_valid), .stop_o(stop), .msg_o(msg), .msg_valid_o(msg_valid),
    .msg_ready_i(msg_ready));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flit = '0; flit_valid = 0;
    wait (rst_n);
    forever begin
      @(posedge clk); #1;
      if (fq.size() > 0 && !stop && $urandom_range(4) != 0) begin
        flit = flit_t'(fq.pop_front());
        flit_valid = 1;
      end else begin
        flit = '0; flit_valid = 0;
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (stop) stop_cycles++;
    if (tail_seen) begin
      checks++;
      if (!msg_valid) begin failures++; $display("FAIL message not ready after tail"); end
    end
    tail_seen <= flit_valid && flit.ft == FT_TAIL;
    if (msg_valid && msg_ready) begin
      bmsg_s e;
      checks++;
      received++;
      if (sent_q.size() == 0) begin failures++; $display("FAIL unexpected message"); end
      else begin
        e = sent_q.pop_front();
        if (msg.dst !== e.dst || msg.src !== e.src || msg.addr !== e.addr ||
            msg.cmd !== e.cmd || msg.data !== e.data) begin
          failures++;
          $display("FAIL message %0d: got addr %h data %h", received, msg.addr, msg.data);
          $display("                expected addr %h data %h", e.addr, e.data);
        end
      end
    end
  end

  always @(posedge clk) msg_ready <= random_read ? ($urandom_range(50) == 0) : 1'b1;

  task automatic queue_msg(input logic [511:0] d);
    bmsg_s m;
    m = '{dst: 7'($urandom), src: 7'($urandom), addr: $urandom, cmd: 5'($urandom), data: d};
    ref_base_flits(m, tmp);
    foreach (tmp[j]) fq.push_back(tmp[j]);
    sent_q.push_back(m);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 20; i++) queue_msg((i % 2 == 1) ? {512{1'b1}} : gen_block(50));
    queue_msg('0);
    wait (fq.size() == 0);
    repeat (50) @(posedge clk);
    #1 random_read = 1;
    for (int i = 0; i < 100; i++) queue_msg(gen_block($urandom_range(100)));
    wait (fq.size() == 0);
    repeat (2000) @(posedge clk);
    checks++;
    if (received != 121 || sent_q.size() != 0) begin
      failures++; $display("FAIL received %0d of 121", received);
    end
    checks++;
    if (stop_cycles == 0) begin failures++; $display("FAIL stop never raised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
