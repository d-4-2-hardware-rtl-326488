// tb_ref_pkg: reference model and stimulus helpers for the testbenches.
//
// The expected flit stream of a long message is written here directly from
// the packet format (bit positions of every field), independently of the
// slot layout used by the RTL: flit 0 = {11, DST, SRC, ADDR[31:16]},
// flit 1 = {FT, ADDR[15:0], CM, BLOCK[511:500]}, then one flit
// {FT, k, BLOCK[499-25k -: 25]} for every chunk k that is not all zero.
// All flits but the first are FT=10 except the last, which is FT=01.
package tb_ref_pkg;

  typedef logic [31:0] word_t;

  typedef struct {
    logic [6:0]   dst;
    logic [6:0]   src;
    logic [31:0]  addr;
    logic [1:0]   cm;
    logic [511:0] data;
  } lmsg_s;

  function automatic logic [24:0] ref_chunk(input logic [511:0] d, input int k);
    logic [24:0] c;
    for (int b = 0; b < 25; b++) c[b] = d[475 - 25*k + b];
    return c;
  endfunction

  function automatic void ref_long_flits(input lmsg_s m, ref word_t q[$]);
    word_t w;
    q.delete();
    w = '0;
    w[31:30] = 2'b11; w[29:23] = m.dst; w[22:16] = m.src; w[15:0] = m.addr[31:16];
    q.push_back(w);
    w = '0;
    w[31:30] = 2'b10; w[29:14] = m.addr[15:0]; w[13:12] = m.cm; w[11:0] = m.data[511:500];
    q.push_back(w);
    for (int k = 0; k < 20; k++) begin
      logic [24:0] c;
      c = ref_chunk(m.data, k);
      if (c != '0) begin
        w = '0;
        w[31:30] = 2'b10; w[29:25] = 5'(k); w[24:0] = c;
        q.push_back(w);
      end
    end
    w = q[q.size()-1];
    w[31:30] = 2'b01;
    q[q.size()-1] = w;
  endfunction

  // Short message flits: {11, DST, SRC, ADDR[31:16]}, {01, ADDR[15:0], CMD, 0}.
  function automatic void ref_short_flits(input logic [6:0] dst, input logic [6:0] src,
                                          input logic [31:0] addr, input logic [4:0] cmd,
                                          ref word_t q[$]);
    word_t w;
    q.delete();
    w = '0; w[31:30] = 2'b11; w[29:23] = dst; w[22:16] = src; w[15:0] = addr[31:16];
    q.push_back(w);
    w = '0; w[31:30] = 2'b01; w[29:14] = addr[15:0]; w[13:9] = cmd;
    q.push_back(w);
  endfunction

  // Uncompressed long format: {11, DST, SRC, ADDR[31:16]},
  // {10, ADDR[15:0], CMD, BLOCK[511:503]}, sixteen flits {10, BLOCK[502-30j -: 30]}
  // and a last flit {01, BLOCK[22:0], seven zero bits}.
  typedef struct {
    logic [6:0]   dst;
    logic [6:0]   src;
    logic [31:0]  addr;
    logic [4:0]   cmd;
    logic [511:0] data;
  } bmsg_s;

  function automatic void ref_base_flits(input bmsg_s m, ref word_t q[$]);
    word_t w;
    q.delete();
    w = '0; w[31:30] = 2'b11; w[29:23] = m.dst; w[22:16] = m.src; w[15:0] = m.addr[31:16];
    q.push_back(w);
    w = '0; w[31:30] = 2'b10; w[29:14] = m.addr[15:0]; w[13:9] = m.cmd;
    w[8:0] = m.data[511:503];
    q.push_back(w);
    for (int j = 0; j < 16; j++) begin
      w = '0; w[31:30] = 2'b10;
      for (int b = 0; b < 30; b++) w[b] = m.data[473 - 30*j + b];
      q.push_back(w);
    end
    w = '0; w[31:30] = 2'b01; w[29:7] = m.data[22:0];
    q.push_back(w);
  endfunction

  // Random 512-bit block in which each 25-bit chunk is all zero with
  // probability pzero percent; the 12 remainder bits are random.
  function automatic logic [511:0] gen_block(input int pzero);
    logic [511:0] d;
    for (int i = 0; i < 16; i++) d[32*i +: 32] = $urandom;
    for (int k = 0; k < 20; k++) begin
      if (int'($urandom_range(99)) < pzero) begin
        for (int b = 0; b < 25; b++) d[475 - 25*k + b] = 1'b0;
      end else if (ref_chunk(d, k) == '0) begin
        d[475 - 25*k] = 1'b1;
      end
    end
    return d;
  endfunction

  function automatic int nonzero_chunks(input logic [511:0] d);
    int n = 0;
    for (int k = 0; k < 20; k++) if (ref_chunk(d, k) != '0) n++;
    return n;
  endfunction

endpackage
