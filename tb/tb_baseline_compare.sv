// tb_baseline_compare: the same stream of long messages is sent over two
// point-to-point links, one built from the uncompressed injector and
// ejector, one from the compressing pair (1 slot at each end, the final
// configuration). Blocks come in classes of increasing share of all-zero
// 25-bit chunks. Both links must deliver every message intact; the flits
// and cycles each link needs are counted per class, and the compressed
// flit count must equal 2 plus the non-zero chunks of every block. The
// printed table is the flit-count comparison between the two formats.
module tb_baseline_compare;
  import noc_pkg::*;
  import tb_ref_pkg::*;

  localparam int NCLASS = 6;
  localparam int PER_CLASS = 60;
  localparam int PZERO [NCLASS] = '{0, 25, 50, 75, 90, 100};

  logic clk = 1'b0, rst_n = 1'b0;
  int   checks = 0, failures = 0;
  logic [6:0] node_id = 7'h11;

  // baseline link
  logic         b_req_valid, b_req_ready, b_fv, b_stop, b_mv;
  logic [6:0]   b_dst;
  logic [31:0]  b_addr;
  logic [4:0]   b_cmd;
  logic [511:0] b_data;
  flit_t        b_flit;
  base_msg_t    b_msg;

  baseline_long_injector #(.SLOTS(1)) u_binj (.clk, .rst_n, .node_id_i(node_id),
    .req_valid_i(b_req_valid), .req_ready_o(b_req_ready), .req_dst_i(b_dst),
    .req_addr_i(b_addr), .req_cmd_i(b_cmd), .req_data_i(b_data),
    .flit_o(b_flit), .flit_valid_o(b_fv), .stop_i(b_stop));
  baseline_long_ejector #(.SLOTS(1)) u_bej (.clk, .rst_n, .flit_i(b_flit),
    .flit_valid_i(b_fv), .stop_o(b_stop), .msg_o(b_msg), .msg_valid_o(b_mv),
    .msg_ready_i(1'b1));

  // compressing link
  logic         c_req_valid, c_req_ready, c_fv, c_stop, c_mv;
  logic [6:0]   c_dst;
  logic [31:0]  c_addr;
  logic [1:0]   c_cm;
  logic [511:0] c_data;
  flit_t        c_flit;
  long_msg_t    c_msg;

  long_injector #(.SLOTS(1)) u_cinj (.clk, .rst_n, .node_id_i(node_id),
    .req_valid_i(c_req_valid), .req_ready_o(c_req_ready), .req_dst_i(c_dst),
    .req_addr_i(c_addr), .req_cm_i(c_cm), .req_data_i(c_data),
    .flit_o(c_flit), .flit_valid_o(c_fv), .stop_i(c_stop));
  long_ejector #(.SLOTS(1)) u_cej (.clk, .rst_n, .flit_i(c_flit),
    .flit_valid_i(c_fv), .stop_o(c_stop), .msg_o(c_msg), .msg_valid_o(c_mv),
    .msg_ready_i(1'b1));

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bmsg_s b_q[$], b_exp[$];
  bmsg_s c_q[$], c_exp[$];
  int    b_flits = 0, c_flits = 0, b_got = 0, c_got = 0, exp_c_flits = 0;
  int    cyc = 0, b_done_cyc = 0, c_done_cyc = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (b_fv) b_flits++;
    if (c_fv) c_flits++;
    if (b_mv) begin
      bmsg_s e;
      checks++; b_got++; b_done_cyc = cyc;
      e = b_exp.pop_front();
      if (b_msg.dst !== e.dst || b_msg.src !== e.src || b_msg.addr !== e.addr ||
          b_msg.cmd !== e.cmd || b_msg.data !== e.data) begin
        failures++; $display("FAIL baseline message %0d", b_got);
      end
    end
    if (c_mv) begin
      bmsg_s e;
      checks++; c_got++; c_done_cyc = cyc;
      e = c_exp.pop_front();
      if (c_msg.dst !== e.dst || c_msg.src !== e.src || c_msg.addr !== e.addr ||
          c_msg.cm !== e.cmd[1:0] || c_msg.data !== e.data) begin
        failures++; $display("FAIL compressed message %0d", c_got);
      end
    end
  end

  // Node-side drivers: each writes its queue as fast as the link accepts.
  initial begin
    bmsg_s m;
    b_req_valid = 0; b_dst = '0; b_addr = '0; b_cmd = '0; b_data = '0;
    wait (rst_n);
    forever begin
      @(posedge clk); #1;
      if (b_req_valid && b_req_ready) b_req_valid = 0;
      if (!b_req_valid && b_q.size() > 0) begin
        m = b_q.pop_front();
        b_dst = m.dst; b_addr = m.addr; b_cmd = m.cmd; b_data = m.data;
        b_req_valid = 1;
      end
    end
  end

  initial begin
    bmsg_s m;
    c_req_valid = 0; c_dst = '0; c_addr = '0; c_cm = '0; c_data = '0;
    wait (rst_n);
    forever begin
      @(posedge clk); #1;
      if (c_req_valid && c_req_ready) c_req_valid = 0;
      if (!c_req_valid && c_q.size() > 0) begin
        m = c_q.pop_front();
        c_dst = m.dst; c_addr = m.addr; c_cm = m.cmd[1:0]; c_data = m.data;
        c_req_valid = 1;
      end
    end
  end

  initial begin
    int tb_flits, tc_flits, b0, c0, bc0, cc0, start;
    bmsg_s m;
    tb_flits = 0; tc_flits = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    $display(" zero chunks | baseline flits | compressed flits | ratio | baseline cycles | compressed cycles");
    for (int c = 0; c < NCLASS; c++) begin
      b0 = b_flits; c0 = c_flits; exp_c_flits = 0; start = cyc;
      for (int i = 0; i < PER_CLASS; i++) begin
        m = '{dst: 7'($urandom), src: node_id, addr: $urandom, cmd: 5'($urandom),
              data: gen_block(PZERO[c])};
        exp_c_flits += 2 + nonzero_chunks(m.data);
        b_q.push_back(m); b_exp.push_back(m);
        c_q.push_back(m); c_exp.push_back(m);
      end
      wait (b_exp.size() == 0 && c_exp.size() == 0);
      repeat (5) @(posedge clk);
      bc0 = b_done_cyc - start; cc0 = c_done_cyc - start;
      checks++;
      if (b_flits - b0 != 19 * PER_CLASS) begin
        failures++; $display("FAIL baseline sent %0d flits", b_flits - b0);
      end
      checks++;
      if (c_flits - c0 != exp_c_flits) begin
        failures++; $display("FAIL compressed sent %0d flits, expected %0d",
                             c_flits - c0, exp_c_flits);
      end
      $display("   %3d %%     | %14d | %16d | %5.2f | %15d | %17d", PZERO[c], b_flits - b0,
               c_flits - c0, real'(b_flits - b0) / real'(c_flits - c0), bc0, cc0);
      tb_flits += b_flits - b0; tc_flits += c_flits - c0;
    end
    $display("  all        | %14d | %16d | %5.2f |", tb_flits, tc_flits,
             real'(tb_flits) / real'(tc_flits));
    checks++;
    if (b_got != NCLASS * PER_CLASS || c_got != NCLASS * PER_CLASS) begin
      failures++; $display("FAIL delivered %0d / %0d messages", b_got, c_got);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
