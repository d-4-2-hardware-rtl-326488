// msg_fifo: first-in first-out buffer of whole slots.
//
// Holds up to SLOTS entries of type T. push_i writes din_i at the tail when
// the buffer is not full; pop_i removes the head when it is not empty; both
// may happen in one cycle. dout_o shows the head entry (valid while
// empty_o is low) straight from the storage, without a read latency.
// free_next_o is the number of free slots after this cycle's push and pop,
// used by the Stop&Go flow control of the receiving side.
// Used as the long-message injection buffer (one 560-bit slot per message)
// and as the 32-bit flit buffers of the short-message path. Depth 1 to 8
// slots are the sizes the original evaluation covers; the default is 1.
module msg_fifo #(
  parameter type T     = logic [31:0],
  parameter int  SLOTS = 1,
  localparam int PW    = (SLOTS > 1) ? $clog2(SLOTS) : 1,
  localparam int CW    = $clog2(SLOTS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push_i,
  input  T              din_i,
  input  logic          pop_i,
  output T              dout_o,
  output logic          empty_o,
  output logic          full_o,
  output logic [CW-1:0] count_o,
  output logic [CW-1:0] free_next_o
);
  T              mem [SLOTS];
  logic [PW-1:0] rd_q, wr_q;
  logic [CW-1:0] cnt_q, cnt_d;
  logic          do_push, do_pop;

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(SLOTS - 1)) ? '0 : p + 1'b1;
  endfunction

  assign empty_o = (cnt_q == '0);
  assign full_o  = (cnt_q == CW'(SLOTS));
  assign do_pop  = pop_i && !empty_o;
  assign do_push = push_i && !full_o;
  assign count_o = cnt_q;
  assign dout_o  = mem[rd_q];

  always_comb begin
    cnt_d = cnt_q;
    if (do_push && !do_pop) cnt_d = cnt_q + 1'b1;
    if (do_pop && !do_push) cnt_d = cnt_q - 1'b1;
  end
  assign free_next_o = CW'(SLOTS) - cnt_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      cnt_q <= cnt_d;
      if (do_pop)  rd_q <= inc(rd_q);
      if (do_push) wr_q <= inc(wr_q);
    end
  end

  always_ff @(posedge clk)
    if (do_push) mem[wr_q] <= din_i;

endmodule
