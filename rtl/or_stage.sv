// or_stage: zero-chunk detection and the Nz register of the compressing
// injector.
//
// When load_i is high the 22-bit Nz register is written from the slot at the
// head of the injection buffer: Nz[0] and Nz[1] (the two header flits) are
// always one, and Nz[k+2] is the OR of the 25 bits of chunk k, so it is one
// exactly when that chunk has to be transmitted. While a message is being
// sent, clr_i clears the bit clr_sel_i (the flit injected in this cycle),
// so the next cycle selects the following flit. load_i wins over clr_i.
// Nz is cleared by reset. The OR gates and the selective reset follow the
// original description; the load-over-clear priority is a choice made here.
module or_stage
  import noc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load_i,
  input  slot_t                slot_i,
  input  logic                 clr_i,
  input  logic [SEL_W-1:0]     clr_sel_i,
  output logic [NUM_FLITS-1:0] nz_o
);
  logic [NUM_FLITS-1:0] nz_q, nz_d, nz_load;

  always_comb begin
    nz_load[0] = 1'b1;
    nz_load[1] = 1'b1;
    for (int k = 0; k < NUM_CHUNKS; k++)
      nz_load[k+2] = |slot_i.chunk[chunk_idx(CID_W'(k))];
  end

  always_comb begin
    nz_d = nz_q;
    if (load_i)
      nz_d = nz_load;
    else if (clr_i)
      nz_d[clr_sel_i] = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) nz_q <= '0;
    else        nz_q <= nz_d;
  end

  assign nz_o = nz_q;
endmodule
