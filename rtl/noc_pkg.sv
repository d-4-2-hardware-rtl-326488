// noc_pkg: shared widths, flit types and message layouts of the compressing
// network interface.
//
// A flit is 32 bits: a 2-bit flit type (FT) in bits 31:30 and a 30-bit body.
// Long messages carry a 512-bit memory block. For compression the block is
// cut into a 12-bit remainder (bits 511:500, never compressed) and twenty
// 25-bit chunks; chunk 0 is bits 499:475 and chunk 19 is bits 24:0. Flits 0
// and 1 carry the header and the remainder; a flit for chunk k carries k in
// bits 29:25 and the chunk in bits 24:0. All-zero chunks are not sent.
//
// The field positions and FT codes follow the original
// packet formats. Node identifiers are 7 bits (bits 29:23 and 22:16 of flit 0). The
// short message command is 5 bits; the long message command field ("CM") is
// 2 bits, as the compressed long format prints it.
package noc_pkg;

  localparam int FLIT_W      = 32;
  localparam int BODY_W      = 30;
  localparam int NODE_W      = 7;
  localparam int ADDR_W      = 32;
  localparam int ADDR_HI_W   = 16;
  localparam int CMD_W       = 5;   // short message command
  localparam int CM_W        = 2;   // long (compressed) message command
  localparam int BLOCK_W     = 512;
  localparam int REM_W       = 12;  // uncompressed block bits in flit 1
  localparam int CHUNK_W     = 25;
  localparam int NUM_CHUNKS  = 20;  // compressible chunks per block
  localparam int NUM_FLITS   = NUM_CHUNKS + 2;  // 22 flit positions per slot
  localparam int CID_W       = 5;   // chunk identifier in a chunk flit
  localparam int SEL_W       = 5;   // index of a flit position 0..21
  localparam int SHORT_PAD_W = 9;

  typedef enum logic [1:0] {
    FT_INVALID = 2'b00,
    FT_TAIL    = 2'b01,
    FT_PAYLOAD = 2'b10,
    FT_HEADER  = 2'b11
  } ft_e;

  typedef struct packed {
    ft_e               ft;
    logic [BODY_W-1:0] body;
  } flit_t;

  // A long message as the node hands it over (plus the NI's own source id).
  typedef struct packed {
    logic [NODE_W-1:0]  dst;
    logic [NODE_W-1:0]  src;
    logic [ADDR_W-1:0]  addr;
    logic [CM_W-1:0]    cm;
    logic [BLOCK_W-1:0] data;
  } long_msg_t;

  // A short (coherence command) message.
  typedef struct packed {
    logic [NODE_W-1:0] dst;
    logic [NODE_W-1:0] src;
    logic [ADDR_W-1:0] addr;
    logic [CMD_W-1:0]  cmd;
  } short_msg_t;

  // One buffer slot of the long-message path, seen as flit positions:
  // positions 0 and 1 are 30-bit flit bodies, positions 2..21 are chunks.
  // Chunk k (block bits 499-25k downto 475-25k) is stored in element
  // NUM_CHUNKS-1-k of the packed array; use chunk_idx() to address it.
  typedef struct packed {
    logic [BODY_W-1:0]                       f0;
    logic [BODY_W-1:0]                       f1;
    logic [NUM_CHUNKS-1:0][CHUNK_W-1:0]      chunk;
  } slot_t;

  localparam int SLOT_W = $bits(slot_t);  // 560

  // Uncompressed long format, used by the baseline path as the reference
  // point: 19 flits of 30-bit bodies. Flit 0 as above, flit 1 =
  // {ADDR[15:0], CMD (5 bits), BLOCK[511:503]}, flits 2..17 carry
  // BLOCK[502:23] thirty bits at a time, flit 18 = {BLOCK[22:0], 7 zero bits}.
  localparam int BASE_FLITS = 19;
  localparam int BASE_PAD_W = BASE_FLITS * BODY_W - (2 * NODE_W + ADDR_W + CMD_W + BLOCK_W);

  typedef struct packed {
    logic [NODE_W-1:0]  dst;
    logic [NODE_W-1:0]  src;
    logic [ADDR_W-1:0]  addr;
    logic [CMD_W-1:0]   cmd;
    logic [BLOCK_W-1:0] data;
  } base_msg_t;

  // Element BASE_FLITS-1-k is the body of flit k.
  typedef logic [BASE_FLITS-1:0][BODY_W-1:0] base_slot_t;

  // Array element that holds chunk number k.
  function automatic logic [CID_W-1:0] chunk_idx(input logic [CID_W-1:0] k);
    return CID_W'(NUM_CHUNKS - 1) - k;
  endfunction

  // Body of a chunk flit.
  function automatic logic [BODY_W-1:0] chunk_body(input logic [CID_W-1:0] id,
                                                   input logic [CHUNK_W-1:0] c);
    return {id, c};
  endfunction

endpackage
