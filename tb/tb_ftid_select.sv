// tb_ftid_select: checks next-flit selection and flit type generation
// against a direct scan of the Nz bits: next = lowest set bit, tail when no
// higher bit is set, FT = 11 for position 0, 01 for the tail, else 10.
module tb_ftid_select;
  import noc_pkg::*;

  logic [21:0] nz;
  logic [4:0]  sel;
  logic        valid, tail;
  ft_e         ft;
  int          checks = 0, failures = 0;

  ftid_select dut (.nz_i(nz), .sel_o(sel), .valid_o(valid), .tail_o(tail), .ft_o(ft));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    int first, last;
    logic [1:0] eft;
    first = -1; last = -1;
    for (int i = 0; i < 22; i++) if (nz[i]) begin
      if (first < 0) first = i;
      last = i;
    end
    #1;
    checks++;
    if (valid !== (first >= 0)) begin failures++; $display("FAIL valid nz=%h", nz); end
    if (first >= 0) begin
      eft = (first == 0) ? 2'b11 : (first == last) ? 2'b01 : 2'b10;
      checks++;
      if (sel !== 5'(first) || tail !== (first == last && first != 0) || ft !== ft_e'(eft)) begin
        failures++;
        $display("FAIL nz=%h sel=%0d tail=%0b ft=%b exp %0d %b", nz, sel, tail, ft, first, eft);
      end
    end
  endtask

  initial begin
    nz = '0; check_one();
    // walk a packet down: the bits an injector would clear in order
    for (int it = 0; it < 300; it++) begin
      nz = 22'($urandom & $urandom) | 22'b11;
      while (nz != '0) begin
        check_one();
        nz[sel] = 1'b0;
      end
    end
    for (int i = 0; i < 22; i++) begin nz = 22'(1) << i; check_one(); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
