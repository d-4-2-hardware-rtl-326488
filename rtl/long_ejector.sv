// long_ejector: ejection side of the NI for long messages, with
// decompression.
//
// Flits arrive on flit_i / flit_valid_i and are written straight into the
// ejection buffer slot being assembled. A header flit (FT=11) clears the
// whole slot to zero and stores its 30-bit body as flit position 0, so any
// chunk that never arrives reads as zero. The next flit is flit 1 and is
// stored as position 1. Every later flit is a chunk flit: its bits 29:25
// give the chunk number and bits 24:0 are written into that chunk. A tail
// flit (FT=01, which may be flit 1 when every chunk was zero) completes the
// message: the slot becomes readable by the node (msg_valid_o, "data
// ready"; msg_ready_i reads it) and the next free slot is used for the
// next message. Flits of different messages are assumed not to
// interleave, as on one physical link without virtual channels.
// Stop&Go: stop_o is raised once all SLOTS slots hold complete messages.
// Timing: the message is readable the cycle after its tail flit arrives.
// The placement by chunk id and the zero initialisation follow the original
// description;
// the "expect flit 1" state, the handshake and the flow-control threshold
// are choices made here.
module long_ejector
  import noc_pkg::*;
#(
  parameter int SLOTS = 1,
  localparam int PW   = (SLOTS > 1) ? $clog2(SLOTS) : 1,
  localparam int CW   = $clog2(SLOTS + 1)
) (
  input  logic      clk,
  input  logic      rst_n,
  // network side
  input  flit_t     flit_i,
  input  logic      flit_valid_i,
  output logic      stop_o,
  // node side
  output long_msg_t msg_o,
  output logic      msg_valid_o,
  input  logic      msg_ready_i
);
  slot_t         mem [SLOTS];
  logic [PW-1:0] wr_q, rd_q;
  logic [CW-1:0] cnt_q, cnt_d;
  logic          expect_f1_q;
  logic          is_head, is_tail, done, rd;
  logic [CID_W-1:0] cid;

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(SLOTS - 1)) ? '0 : p + 1'b1;
  endfunction

  assign is_head = flit_valid_i && (flit_i.ft == FT_HEADER);
  assign is_tail = flit_valid_i && (flit_i.ft == FT_TAIL);
  assign done    = is_tail && !is_head;
  assign cid     = flit_i.body[BODY_W-1 -: CID_W];

  assign msg_valid_o = (cnt_q != '0);
  assign rd          = msg_valid_o && msg_ready_i;
  assign msg_o       = long_msg_t'(mem[rd_q]);

  always_comb begin
    cnt_d = cnt_q;
    if (done && !rd) cnt_d = cnt_q + 1'b1;
    if (rd && !done) cnt_d = cnt_q - 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_q        <= '0;
      rd_q        <= '0;
      cnt_q       <= '0;
      expect_f1_q <= 1'b0;
    end else begin
      cnt_q <= cnt_d;
      if (rd)   rd_q <= inc(rd_q);
      if (done) wr_q <= inc(wr_q);
      if (is_head)           expect_f1_q <= 1'b1;
      else if (flit_valid_i) expect_f1_q <= 1'b0;
    end
  end

  // Slot assembly: the demultiplexer by flit position.
  always_ff @(posedge clk) begin
    if (is_head) begin
      mem[wr_q]    <= '0;
      mem[wr_q].f0 <= flit_i.body;
    end else if (flit_valid_i && expect_f1_q) begin
      mem[wr_q].f1 <= flit_i.body;
    end else if (flit_valid_i && (cid < CID_W'(NUM_CHUNKS))) begin
      mem[wr_q].chunk[chunk_idx(cid)] <= flit_i.body[CHUNK_W-1:0];
    end
  end

  stopgo_rx #(.CW(CW), .STOP_LEVEL(0)) u_fc (
    .clk, .rst_n, .free_next_i(CW'(SLOTS) - cnt_d),
    .valid_i(flit_valid_i), .stop_o(stop_o));

  a_valid_ft : assert property (@(posedge clk) disable iff (!rst_n)
    flit_valid_i |-> flit_i.ft != FT_INVALID);
  a_chunk_id : assert property (@(posedge clk) disable iff (!rst_n)
    (flit_valid_i && !is_head && !expect_f1_q) |-> cid < CID_W'(NUM_CHUNKS));
endmodule
