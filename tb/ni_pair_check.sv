// ni_pair_check: testbench helper. Two compression_ni instances with the
// given buffer depths, wired back to back, exchange N_LONG long and N_SHORT
// short messages each way while both nodes read slowly, then quickly. It
// checks every message against the reference and counts the mechanisms
// (zero chunks dropped, header-only blocks, whole blocks, stop on each
// link). done_o rises when all traffic is delivered; checks_o and
// failures_o then hold the totals.
module ni_pair_check #(
  parameter int LONG_SLOTS  = 1,
  parameter int SHORT_SLOTS = 2,
  parameter int N_LONG      = 100,
  parameter int N_SHORT     = 100
) (
  input  logic clk,
  output logic done_o,
  output int   checks_o,
  output int   failures_o
);
  import noc_pkg::*;
  import tb_ref_pkg::*;

  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;

  // per-node signals, index 0 = A, 1 = B
  logic [6:0]   id [2];
  logic         lreq_valid [2], lreq_ready [2];
  logic [6:0]   lreq_dst [2];
  logic [31:0]  lreq_addr [2];
  logic [1:0]   lreq_cm [2];
  logic [511:0] lreq_data [2];
  flit_t        lout [2];
  logic         lout_v [2], lout_stop [2];
  long_msg_t    lmsg [2];
  logic         lmsg_v [2], lmsg_r [2];
  logic         sreq_valid [2], sreq_ready [2];
  logic [6:0]   sreq_dst [2];
  logic [31:0]  sreq_addr [2];
  logic [4:0]   sreq_cmd [2];
  flit_t        sout [2];
  logic         sout_v [2], sout_stop [2];
  flit_t        sflit [2];
  logic         sflit_v [2], sflit_r [2];

  for (genvar n = 0; n < 2; n++) begin : g_ni
    compression_ni #(.LONG_SLOTS(LONG_SLOTS), .SHORT_SLOTS(SHORT_SLOTS)) u_ni (
      .clk, .rst_n, .node_id_i(id[n]),
      .lreq_valid_i(lreq_valid[n]), .lreq_ready_o(lreq_ready[n]),
      .lreq_dst_i(lreq_dst[n]), .lreq_addr_i(lreq_addr[n]),
      .lreq_cm_i(lreq_cm[n]), .lreq_data_i(lreq_data[n]),
      .lnet_out_flit_o(lout[n]), .lnet_out_valid_o(lout_v[n]), .lnet_out_stop_i(lout_stop[n]),
      .lnet_in_flit_i(lout[1-n]), .lnet_in_valid_i(lout_v[1-n]), .lnet_in_stop_o(lout_stop[1-n]),
      .lmsg_o(lmsg[n]), .lmsg_valid_o(lmsg_v[n]), .lmsg_ready_i(lmsg_r[n]),
      .sreq_valid_i(sreq_valid[n]), .sreq_ready_o(sreq_ready[n]),
      .sreq_dst_i(sreq_dst[n]), .sreq_addr_i(sreq_addr[n]), .sreq_cmd_i(sreq_cmd[n]),
      .snet_out_flit_o(sout[n]), .snet_out_valid_o(sout_v[n]), .snet_out_stop_i(sout_stop[n]),
      .snet_in_flit_i(sout[1-n]), .snet_in_valid_i(sout_v[1-n]), .snet_in_stop_o(sout_stop[1-n]),
      .sflit_o(sflit[n]), .sflit_valid_o(sflit_v[n]), .sflit_ready_i(sflit_r[n]));
  end

  assign checks_o   = checks;
  assign failures_o = failures;

  // expectations, indexed by the receiving node
  lmsg_s lexp [2][$];
  word_t sexp [2][$];
  int    lrecv [2] = '{0, 0}, srecv [2] = '{0, 0};
  int    long_flits = 0, base_flits = 0;
  int    ev_dropped = 0, ev_hdr_only = 0, ev_full = 0, ev_lstop = 0, ev_sstop = 0;
  logic  slow_phase = 1'b1;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // long-message senders
  for (genvar n = 0; n < 2; n++) begin : g_lsend
    initial begin
      word_t tmp[$];
      lreq_valid[n] = 0; lreq_dst[n] = '0; lreq_addr[n] = '0; lreq_cm[n] = '0; lreq_data[n] = '0;
      wait (rst_n);
      for (int i = 0; i < N_LONG; i++) begin
        lmsg_s m;
        logic [511:0] d;
        int nz;
        case (i % 10)
          0:       d = '0;
          1:       d = {512{1'b1}};
          2, 3:    d = gen_block($urandom_range(100));
          default: d = gen_block(85);
        endcase
        nz = nonzero_chunks(d);
        if (nz == 0) ev_hdr_only++;
        if (nz == 20) ev_full++;
        ev_dropped += 20 - nz;
        base_flits += 19;
        m = '{dst: id[1-n], src: id[n], addr: $urandom, cm: 2'($urandom), data: d};
        lexp[1-n].push_back(m);
        lreq_dst[n] = m.dst; lreq_addr[n] = m.addr; lreq_cm[n] = m.cm; lreq_data[n] = d;
        lreq_valid[n] = 1;
        #1;
        while (!lreq_ready[n]) begin @(posedge clk); #1; end
        @(posedge clk); #1;
        lreq_valid[n] = 0;
        repeat ($urandom_range(3)) @(posedge clk);
        #1;
      end
    end
  end

  // short-message senders
  for (genvar n = 0; n < 2; n++) begin : g_ssend
    initial begin
      word_t tmp[$];
      sreq_valid[n] = 0; sreq_dst[n] = '0; sreq_addr[n] = '0; sreq_cmd[n] = '0;
      wait (rst_n);
      for (int i = 0; i < N_SHORT; i++) begin
        sreq_dst[n] = id[1-n]; sreq_addr[n] = $urandom; sreq_cmd[n] = 5'($urandom);
        ref_short_flits(sreq_dst[n], id[n], sreq_addr[n], sreq_cmd[n], tmp);
        foreach (tmp[j]) sexp[1-n].push_back(tmp[j]);
        sreq_valid[n] = 1;
        #1;
        while (!sreq_ready[n]) begin @(posedge clk); #1; end
        @(posedge clk); #1;
        sreq_valid[n] = 0;
        repeat ($urandom_range(2)) @(posedge clk);
        #1;
      end
    end
  end

  // receivers and monitors
  for (genvar n = 0; n < 2; n++) begin : g_recv
    always @(posedge clk) begin
      lmsg_r[n]  <= slow_phase ? ($urandom_range(15) == 0) : ($urandom_range(3) != 0);
      sflit_r[n] <= slow_phase ? ($urandom_range(7) == 0)  : ($urandom_range(3) != 0);
    end
    always @(posedge clk) if (rst_n) begin
      if (lout_v[n]) long_flits++;
      if (lout_stop[n]) ev_lstop++;
      if (sout_stop[n]) ev_sstop++;
      if (lmsg_v[n] && lmsg_r[n]) begin
        lmsg_s e;
        lrecv[n]++;
        if (lexp[n].size() == 0) chk(0, "unexpected long message");
        else begin
          e = lexp[n].pop_front();
          chk(lmsg[n].dst == e.dst && lmsg[n].src == e.src && lmsg[n].addr == e.addr &&
              lmsg[n].cm == e.cm && lmsg[n].data == e.data, "long message contents");
        end
      end
      if (sflit_v[n] && sflit_r[n]) begin
        word_t e;
        srecv[n]++;
        if (sexp[n].size() == 0) chk(0, "unexpected short flit");
        else begin
          e = sexp[n].pop_front();
          chk(32'(sflit[n]) == e, "short flit contents");
        end
      end
    end
  end

  initial begin
    done_o = 1'b0;
    id[0] = 7'h0c; id[1] = 7'h41;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (lrecv[0] + lrecv[1] >= N_LONG / 2);
    slow_phase = 0;
    wait (lrecv[0] == N_LONG && lrecv[1] == N_LONG &&
          srecv[0] == 2 * N_SHORT && srecv[1] == 2 * N_SHORT);
    repeat (20) @(posedge clk);
    chk(lexp[0].size() == 0 && lexp[1].size() == 0, "all long messages delivered");
    chk(sexp[0].size() == 0 && sexp[1].size() == 0, "all short flits delivered");
    chk(long_flits < base_flits, "compression reduced long-link flits");
    chk(ev_dropped > 0, "zero chunks left out");
    chk(ev_hdr_only > 0, "all-zero block sent as two flits");
    chk(ev_full > 0, "block with no zero chunk sent whole");
    chk(ev_lstop > 0, "stop on a long link");
    chk(ev_sstop > 0, "stop on a short link");
    $display("slots %0d/%0d: long links %0d flits for %0d messages, %0d uncompressed",
             LONG_SLOTS, SHORT_SLOTS, long_flits, 2 * N_LONG, base_flits);
    $display("  chunks dropped %0d, header-only %0d, full %0d, long stop %0d, short stop %0d",
             ev_dropped, ev_hdr_only, ev_full, ev_lstop, ev_sstop);
    done_o = 1'b1;
  end
endmodule
