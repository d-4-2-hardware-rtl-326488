// prio_enc: priority encoder. Returns the index of the lowest-numbered set
// bit of req_i and whether any bit is set. Purely combinational.
// Used twice by the FT/ID selection: once on the Nz bits in packet order
// (next flit to send) and once on the Nz bits reversed (last flit to send).
module prio_enc #(
  parameter int N  = 22,
  parameter int IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  req_i,
  output logic [IW-1:0] idx_o,
  output logic          found_o
);
  always_comb begin
    idx_o   = '0;
    found_o = 1'b0;
    for (int i = N - 1; i >= 0; i--) begin
      if (req_i[i]) begin
        idx_o   = IW'(i);
        found_o = 1'b1;
      end
    end
  end
endmodule
