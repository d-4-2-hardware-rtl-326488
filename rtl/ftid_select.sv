// ftid_select: flit type / flit id selection of the compressing injector.
//
// From the Nz bits it picks the next flit position to inject: a priority
// encoder returns the lowest set position (header first, then flit 1, then
// the non-zero chunks in increasing chunk order). A second priority encoder
// on the reversed Nz bits finds the last position still to be sent; when
// both agree, the flit is the tail. The flit type is
//   FT[1] = header OR NOT tail,  FT[0] = header OR tail,
// which gives 11 for the header, 10 for payload and 01 for the tail. A
// header cannot be a tail because Nz[1] is always set with Nz[0].
// Purely combinational; valid_o is low when no Nz bit is set.
// Structure and FT rule follow the original description; encoder direction (lowest
// position first) is how "first flit to inject" is read here.
module ftid_select
  import noc_pkg::*;
(
  input  logic [NUM_FLITS-1:0] nz_i,
  output logic [SEL_W-1:0]     sel_o,
  output logic                 valid_o,
  output logic                 tail_o,
  output ft_e                  ft_o
);
  logic [NUM_FLITS-1:0] nz_rev;
  logic [SEL_W-1:0]     rev_idx, last;
  logic                 rev_found, header;

  always_comb
    for (int i = 0; i < NUM_FLITS; i++) nz_rev[i] = nz_i[NUM_FLITS-1-i];

  prio_enc #(.N(NUM_FLITS), .IW(SEL_W)) u_first (
    .req_i(nz_i), .idx_o(sel_o), .found_o(valid_o));

  prio_enc #(.N(NUM_FLITS), .IW(SEL_W)) u_last (
    .req_i(nz_rev), .idx_o(rev_idx), .found_o(rev_found));

  assign last   = SEL_W'(NUM_FLITS - 1) - rev_idx;
  assign header = nz_i[0];
  assign tail_o = valid_o && rev_found && (sel_o == last) && !header;
  assign ft_o   = ft_e'({header | ~tail_o, header | tail_o});
endmodule
