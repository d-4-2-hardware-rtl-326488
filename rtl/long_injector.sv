// long_injector: injection side of the NI for long messages (memory
// blocks), with zero-chunk compression.
//
// The node writes a whole message (destination, address, 2-bit command,
// 512-bit block) in one cycle (req_valid_i / req_ready_o, ready meaning a
// slot is free); the NI adds its own identifier as source. The message is
// stored in one slot of the injection buffer, laid out as 22 flit positions
// (two 30-bit header bodies, then twenty 25-bit chunks): placing the fields
// in this layout is the header building of the long path.
//
// The OR stage loads the Nz register (one bit per flit position, set for
// both header flits and for every non-zero chunk) when the message becomes
// the head of the buffer: with the buffer write itself if the buffer was
// empty, otherwise as soon as the message before it is finished. Each following
// cycle in which the network does not signal stop, the FT/ID selection
// picks the lowest set Nz bit, the multiplexer puts that position on the
// link with its flit type (and chunk id for chunks), and the bit is
// cleared. The tail flit pops the buffer. Timing: one cycle after a message
// is written into an empty buffer its header leaves; then one flit per
// cycle; a message of n flits occupies the link n cycles. A message that
// waited behind another leaves after one idle cycle (its Nz load). An
// all-zero block leaves as two flits.
// Block structure and the Nz load with the buffer write follow the
// original description; the load from a queued head and the handshake are
// choices made here. Like the original, the sender is not pipelined (one
// register stage between the buffer and the link).
module long_injector
  import noc_pkg::*;
#(
  parameter int SLOTS = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [NODE_W-1:0]  node_id_i,
  // node side
  input  logic               req_valid_i,
  output logic               req_ready_o,
  input  logic [NODE_W-1:0]  req_dst_i,
  input  logic [ADDR_W-1:0]  req_addr_i,
  input  logic [CM_W-1:0]    req_cm_i,
  input  logic [BLOCK_W-1:0] req_data_i,
  // network side
  output flit_t              flit_o,
  output logic               flit_valid_o,
  input  logic               stop_i
);
  long_msg_t            msg_in;
  slot_t                slot_in, head, load_slot;
  logic                 empty, full;
  logic [NUM_FLITS-1:0] nz;
  logic [SEL_W-1:0]     sel;
  logic                 busy, tail, load, load_in, send;
  ft_e                  ft;
  logic [BODY_W-1:0]    body;
  logic [SEL_W-1:0]     cidx;

  // Header building: the message fields in flit order form the slot.
  assign msg_in  = '{dst: req_dst_i, src: node_id_i, addr: req_addr_i,
                     cm: req_cm_i, data: req_data_i};
  assign slot_in = slot_t'(msg_in);

  assign req_ready_o = !full;

  msg_fifo #(.T(slot_t), .SLOTS(SLOTS)) u_buf (
    .clk, .rst_n,
    .push_i(req_valid_i), .din_i(slot_in),
    .pop_i(send && tail), .dout_o(head),
    .empty_o(empty), .full_o(full), .count_o(), .free_next_o());

  // The Nz register is written together with the buffer when the message
  // goes into an empty buffer (it is then at the head at once), and from
  // the head otherwise, as soon as the previous message is finished.
  assign load_in   = req_valid_i && empty;
  assign load      = load_in || (!busy && !empty);
  assign load_slot = load_in ? slot_in : head;
  assign send      = busy && !stop_i;

  or_stage u_or (
    .clk, .rst_n, .load_i(load), .slot_i(load_slot),
    .clr_i(send), .clr_sel_i(sel), .nz_o(nz));

  ftid_select u_sel (
    .nz_i(nz), .sel_o(sel), .valid_o(busy), .tail_o(tail), .ft_o(ft));

  // Output multiplexer; positions 2..21 are chunks 0..19.
  assign cidx = sel - SEL_W'(2);

  always_comb begin
    case (sel)
      SEL_W'(0): body = head.f0;
      SEL_W'(1): body = head.f1;
      default:   body = chunk_body(CID_W'(cidx), head.chunk[chunk_idx(CID_W'(cidx))]);
    endcase
  end

  // FT 00 (non-valid) is shown whenever no flit is sent.
  assign flit_o       = '{ft: send ? ft : FT_INVALID, body: body};
  assign flit_valid_o = send;

  // The message being sent stays at the head until its tail leaves.
  a_busy_nonempty : assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !empty);
endmodule
