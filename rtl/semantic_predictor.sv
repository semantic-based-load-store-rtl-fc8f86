// semantic_predictor: decode-stage semantic-based load/store predictor.
//
// Holds the frame selector and the framed-stack buffer and makes the decision
// for each BP-based load or store, one per cycle, in program order:
//   * a store, or a load whose displacement is not found in the current frame,
//     takes over the indexed entry (tag and dep uPC = its own uPC) and gets a
//     PVB record in state "initial". It will write its address and data into
//     the entry when it executes.
//   * a load that is found, and whose entry already holds data, has that data
//     sent to the result bus. It gets a PVB record in state "predict" that
//     carries the producer's uPC and address for later verification.
//   * a load that is found but whose producer has not executed yet gets a
//     record in state DEPEND. This third case is this design's reading of the
//     "loaded data or dependency information" the buffer returns; the
//     document details only the first two.
// For every load that is found (predict or DEPEND) the producer's uPC is
// reported as dependence information (dep_*), so that the scheduler knows
// which operation the load waits for or was predicted from.
// CALL/RET (push/pop) move the frame selector and clear frames as described
// in frame_selector.
//
// Timing: the lookup is combinational; the PVB record (pvb_*) is presented in
// the same cycle as the request. The FSB allocation and frame changes happen
// on the next rising edge. Result-bus data and dependence information appear
// one cycle after the request, registered. The upd_* port (from the verify
// logic) writes the FSB on the rising edge.
module semantic_predictor
  import lsp_pkg::*;
#(
  parameter int unsigned NUM_FRAMES    = 2,
  parameter int unsigned FRAME_ENTRIES = 128,
  parameter int unsigned DISP_W        = 16,
  parameter int unsigned ADDR_W        = 32,
  parameter int unsigned DATA_W        = 32,
  parameter int unsigned UPC_W         = 16,
  localparam int unsigned FW    = (NUM_FRAMES > 1) ? $clog2(NUM_FRAMES) : 1,
  localparam int unsigned IDX_W = $clog2(FRAME_ENTRIES)
) (
  input  logic              clk,
  input  logic              rst_n,
  // decode side
  input  logic              req_valid,   // BP-based load/store accepted this cycle
  input  logic              req_store,   // 1: store, 0: load
  input  logic [DISP_W-1:0] req_disp,
  input  logic [UPC_W-1:0]  req_upc,
  input  logic              push,        // CALL
  input  logic              pop,         // RET
  // PVB record for the request (combinational)
  output logic              pvb_valid,
  output logic [UPC_W-1:0]  pvb_upc,
  output logic [UPC_W-1:0]  pvb_dep,
  output logic [ADDR_W-1:0] pvb_addr,
  output pvb_state_e        pvb_state,
  output logic [FW-1:0]     pvb_frame,
  output logic [IDX_W-1:0]  pvb_idx,
  // predicted data to the result bus (registered)
  output logic              rb_valid,
  output logic [UPC_W-1:0]  rb_upc,
  output logic [DATA_W-1:0] rb_data,
  // dependence information for a found load (registered)
  output logic              dep_valid,
  output logic [UPC_W-1:0]  dep_upc,
  output logic [UPC_W-1:0]  dep_on,
  // FSB update from the verify logic
  input  logic              upd_valid,
  input  logic [FW-1:0]     upd_frame,
  input  logic [IDX_W-1:0]  upd_idx,
  input  logic [UPC_W-1:0]  upd_match_dep,
  input  logic [UPC_W-1:0]  upd_new_dep,
  input  logic [ADDR_W-1:0] upd_addr,
  input  logic [DATA_W-1:0] upd_data,
  output logic              upd_applied,
  // status
  output logic [FW-1:0]     frame_sel,
  output logic              frame_overflow,
  output logic              frame_underflow
);
  logic [NUM_FRAMES-1:0] clear_mask;
  logic              lk_hit, lk_dval;
  logic [UPC_W-1:0]  lk_dep;
  logic [ADDR_W-1:0] lk_addr;
  logic [DATA_W-1:0] lk_data;
  logic              allocate, predict;

  frame_selector #(.NUM_FRAMES(NUM_FRAMES)) u_fsel (
    .clk, .rst_n, .push, .pop,
    .sel(frame_sel), .clear_mask,
    .overflow(frame_overflow), .underflow(frame_underflow)
  );

  framed_stack_buffer #(
    .NUM_FRAMES(NUM_FRAMES), .FRAME_ENTRIES(FRAME_ENTRIES), .DISP_W(DISP_W),
    .ADDR_W(ADDR_W), .DATA_W(DATA_W), .UPC_W(UPC_W)
  ) u_fsb (
    .clk, .rst_n, .clear_mask,
    .lk_frame(frame_sel), .lk_disp(req_disp),
    .lk_hit, .lk_dval, .lk_dep, .lk_addr, .lk_data,
    .al_valid(req_valid && allocate), .al_frame(frame_sel), .al_disp(req_disp),
    .al_upc(req_upc),
    .upd_valid, .upd_frame, .upd_idx, .upd_match_dep, .upd_new_dep,
    .upd_addr, .upd_data, .upd_applied
  );

  always_comb begin
    allocate = req_store || !lk_hit;
    predict  = !allocate && lk_dval;

    pvb_valid = req_valid;
    pvb_upc   = req_upc;
    pvb_frame = frame_sel;
    pvb_idx   = req_disp[IDX_W-1:0];
    pvb_dep   = allocate ? req_upc : lk_dep;
    pvb_addr  = predict ? lk_addr : '0;
    pvb_state = allocate ? ST_INIT : (predict ? ST_PREDICT : ST_DEPEND);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rb_valid  <= 1'b0;
      dep_valid <= 1'b0;
    end else begin
      rb_valid  <= req_valid && predict;
      dep_valid <= req_valid && !allocate;
    end
  end

  always_ff @(posedge clk) begin
    rb_upc  <= req_upc;
    rb_data <= lk_data;
    dep_upc <= req_upc;
    dep_on  <= lk_dep;
  end

  // A request and a frame change are never decoded in the same cycle.
  a_req_frame: assert property (@(posedge clk) disable iff (!rst_n) !(req_valid && (push || pop)));
endmodule
