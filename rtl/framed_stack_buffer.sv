// framed_stack_buffer: the framed-stack buffer (FSB) of the semantic-based
// load/store scheme.
//
// The FSB holds NUM_FRAMES stack frames of FRAME_ENTRIES entries each. An
// entry records, for one displacement off BP, which operation last produced
// its value and, once that operation has executed, the address it accessed and
// the data it moved: {v, tag, dep uPC, addr, data}. The low bits of the
// displacement index the entry and the remaining bits are its tag, as the
// scheme lays out. This design adds one bit per entry, dval, that tells
// whether addr/data have arrived yet.
//
// Three ports, all acting on the rising clock edge, with a clear of a whole
// frame taking priority over an allocation, and an allocation over an update
// of the same entry:
//   * lookup (combinational read): frame + displacement -> hit, dval, dep,
//     addr, data of the indexed entry.
//   * alloc (decode stage): marks the indexed entry valid, stores the tag and
//     the operation's uPC as dep uPC, and marks its data as not yet present.
//   * update (execute stage): if the entry is valid and its dep uPC still is
//     upd_match_dep, writes address and data, sets dval and stores
//     upd_new_dep as dep uPC. An entry taken over meanwhile by a younger
//     operation is left alone (upd_applied = 0).
// clear_mask clears the valid bits of whole frames in one cycle.
module framed_stack_buffer #(
  parameter int unsigned NUM_FRAMES    = 2,
  parameter int unsigned FRAME_ENTRIES = 128,
  parameter int unsigned DISP_W        = 16,
  parameter int unsigned ADDR_W        = 32,
  parameter int unsigned DATA_W        = 32,
  parameter int unsigned UPC_W         = 16,
  localparam int unsigned FW    = (NUM_FRAMES > 1) ? $clog2(NUM_FRAMES) : 1,
  localparam int unsigned IDX_W = $clog2(FRAME_ENTRIES),
  localparam int unsigned TAG_W = DISP_W - IDX_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NUM_FRAMES-1:0] clear_mask,
  // lookup
  input  logic [FW-1:0]         lk_frame,
  input  logic [DISP_W-1:0]     lk_disp,
  output logic                  lk_hit,
  output logic                  lk_dval,
  output logic [UPC_W-1:0]      lk_dep,
  output logic [ADDR_W-1:0]     lk_addr,
  output logic [DATA_W-1:0]     lk_data,
  // allocation from decode
  input  logic                  al_valid,
  input  logic [FW-1:0]         al_frame,
  input  logic [DISP_W-1:0]     al_disp,
  input  logic [UPC_W-1:0]      al_upc,
  // data/address update from execute
  input  logic                  upd_valid,
  input  logic [FW-1:0]         upd_frame,
  input  logic [IDX_W-1:0]      upd_idx,
  input  logic [UPC_W-1:0]      upd_match_dep,
  input  logic [UPC_W-1:0]      upd_new_dep,
  input  logic [ADDR_W-1:0]     upd_addr,
  input  logic [DATA_W-1:0]     upd_data,
  output logic                  upd_applied
);
  localparam int unsigned N  = NUM_FRAMES * FRAME_ENTRIES;
  localparam int unsigned SW = $clog2(N);

  logic [NUM_FRAMES-1:0][FRAME_ENTRIES-1:0] v_q;
  logic [N-1:0]        dval_q;
  logic [TAG_W-1:0]    tag_q  [N];
  logic [UPC_W-1:0]    dep_q  [N];
  logic [ADDR_W-1:0]   addr_q [N];
  logic [DATA_W-1:0]   data_q [N];

  function automatic logic [SW-1:0] slot(input logic [FW-1:0] f, input logic [IDX_W-1:0] i);
    return SW'(int'(f) * FRAME_ENTRIES + int'(i));
  endfunction

  logic [IDX_W-1:0] lk_idx, al_idx;
  logic [TAG_W-1:0] lk_tag, al_tag;
  logic [SW-1:0]    lk_slot, al_slot, upd_slot;
  logic             al_ok, upd_ok;

  always_comb begin
    lk_idx   = lk_disp[IDX_W-1:0];
    lk_tag   = lk_disp[DISP_W-1:IDX_W];
    al_idx   = al_disp[IDX_W-1:0];
    al_tag   = al_disp[DISP_W-1:IDX_W];
    lk_slot  = slot(lk_frame, lk_idx);
    al_slot  = slot(al_frame, al_idx);
    upd_slot = slot(upd_frame, upd_idx);

    lk_hit  = v_q[lk_frame][lk_idx] && (tag_q[lk_slot] == lk_tag);
    lk_dval = dval_q[lk_slot];
    lk_dep  = dep_q[lk_slot];
    lk_addr = addr_q[lk_slot];
    lk_data = data_q[lk_slot];

    al_ok  = al_valid && !clear_mask[al_frame];
    upd_ok = upd_valid && !clear_mask[upd_frame] && v_q[upd_frame][upd_idx]
             && (dep_q[upd_slot] == upd_match_dep)
             && !(al_ok && (al_slot == upd_slot));
    upd_applied = upd_ok;
  end

  // valid bits: reset and frame clears
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= '0;
    end else begin
      for (int f = 0; f < NUM_FRAMES; f++)
        if (clear_mask[f]) v_q[f] <= '0;
      if (al_ok) v_q[al_frame][al_idx] <= 1'b1;
    end
  end

  // entry fields
  always_ff @(posedge clk) begin
    if (al_ok) begin
      tag_q[al_slot]  <= al_tag;
      dep_q[al_slot]  <= al_upc;
      dval_q[al_slot] <= 1'b0;
    end
    if (upd_ok) begin
      dep_q[upd_slot]  <= upd_new_dep;
      addr_q[upd_slot] <= upd_addr;
      data_q[upd_slot] <= upd_data;
      dval_q[upd_slot] <= 1'b1;
    end
  end

  initial assert (FRAME_ENTRIES == (1 << IDX_W) && DISP_W > IDX_W);
endmodule
