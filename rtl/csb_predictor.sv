// csb_predictor: classified semantic-based load/store predictor for an x86
// superscalar core (top level).
//
// Sits beside the decode stage and the load/store unit of an out-of-order
// core. Each decoded micro-op (one per cycle) is classified: BP-based loads and
// stores go to the semantic-based predictor (frame selector + framed-stack
// buffer), other loads to the address predictor when csb_en = 1, CALL/RET
// switch stack frames. Every prediction leaves a record in the shared
// prediction valid buffer (PVB). When a tracked operation executes, the
// verify logic checks the record, writes produced data back into the FSB and
// asks for recovery of wrong predictions.
//
// With csb_en = 0 the unit is the plain semantic-based (SB) scheme; with
// csb_en = 1 it is the classified semantic-based (CSB) scheme.
//
// Decode interface: dec_valid/dec_ready handshake, dec_ready is low while the
// PVB is full (the decode stage must stall). Outputs produced for an accepted
// op appear one cycle later, registered:
//   rb_*   predicted load data for the result bus,
//   dep_*  dependence information (load dep_upc was predicted from, or waits
//          for, producer dep_on),
//   spec_* predicted address for a speculative data cache access.
// Execute interface: ex_valid with the operation's uPC, instruction address,
// kind, BP flag, computed address and the data it stored or loaded. ex_res_*
// reports the outcome one cycle later (see lsp_pkg::ex_result_e).
// flush empties the PVB when the pipeline squashes its in-flight operations.
//
// Defaults: two frames of 128 entries, the configuration the document
// recommends. Data width, uPC width, PVB depth and address predictor size are
// not given by it and are this design's choices.
module csb_predictor
  import lsp_pkg::*;
#(
  parameter int unsigned NUM_FRAMES    = 2,
  parameter int unsigned FRAME_ENTRIES = 128,
  parameter int unsigned PVB_DEPTH     = 32,
  parameter int unsigned AD_ENTRIES    = 256,
  parameter int unsigned DISP_W        = 16,
  parameter int unsigned ADDR_W        = 32,
  parameter int unsigned DATA_W        = 32,
  parameter int unsigned UPC_W         = 16,
  parameter int unsigned PC_W          = 32,
  localparam int unsigned FW    = (NUM_FRAMES > 1) ? $clog2(NUM_FRAMES) : 1,
  localparam int unsigned IDX_W = $clog2(FRAME_ENTRIES),
  localparam int unsigned PW    = $clog2(PVB_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              csb_en,
  input  logic              flush,
  // decode stage
  input  logic              dec_valid,
  output logic              dec_ready,
  input  uop_kind_e         dec_kind,
  input  logic              dec_base_bp,
  input  logic [DISP_W-1:0] dec_disp,
  input  logic [UPC_W-1:0]  dec_upc,
  input  logic [PC_W-1:0]   dec_pc,
  // result bus (predicted data)
  output logic              rb_valid,
  output logic [UPC_W-1:0]  rb_upc,
  output logic [DATA_W-1:0] rb_data,
  // dependence information
  output logic              dep_valid,
  output logic [UPC_W-1:0]  dep_upc,
  output logic [UPC_W-1:0]  dep_on,
  // speculative data cache access
  output logic              spec_valid,
  output logic [UPC_W-1:0]  spec_upc,
  output logic [ADDR_W-1:0] spec_addr,
  // load/store unit, execute stage
  input  logic              ex_valid,
  input  logic [UPC_W-1:0]  ex_upc,
  input  logic [PC_W-1:0]   ex_pc,
  input  uop_kind_e         ex_kind,
  input  logic              ex_base_bp,
  input  logic [ADDR_W-1:0] ex_addr,
  input  logic [DATA_W-1:0] ex_data,
  output logic              ex_res_valid,
  output logic [UPC_W-1:0]  ex_res_upc,
  output ex_result_e        ex_res,
  // status
  output logic [FW-1:0]     frame_sel,
  output logic              frame_overflow,
  output logic              frame_underflow,
  output logic [PW:0]       pvb_count,
  output logic              stat_ignored,   // a memory op was not handled (registered)
  output logic              stat_fsb_write, // an executed op wrote the FSB (registered)
  output logic              stat_ad_checked // an address prediction was checked (registered)
);
  // ---------------- decode side ----------------
  logic accept, to_sb, to_ad, push, pop, ignored;
  logic pvb_full;

  assign dec_ready = !pvb_full;
  assign accept    = dec_valid && dec_ready;

  op_classifier u_cls (
    .valid(accept), .kind(dec_kind), .base_bp(dec_base_bp), .csb_en,
    .to_sb, .to_ad, .push, .pop, .ignored
  );

  logic              sb_pvb_valid;
  logic [UPC_W-1:0]  sb_pvb_upc, sb_pvb_dep;
  logic [ADDR_W-1:0] sb_pvb_addr;
  pvb_state_e        sb_pvb_state;
  logic [FW-1:0]     sb_pvb_frame;
  logic [IDX_W-1:0]  sb_pvb_idx;

  // execute-side signals used by the predictors
  logic              upd_valid, upd_applied;
  logic [FW-1:0]     upd_frame;
  logic [IDX_W-1:0]  upd_idx;
  logic [UPC_W-1:0]  upd_match_dep, upd_new_dep;
  logic [ADDR_W-1:0] upd_addr;
  logic [DATA_W-1:0] upd_data;

  semantic_predictor #(
    .NUM_FRAMES(NUM_FRAMES), .FRAME_ENTRIES(FRAME_ENTRIES), .DISP_W(DISP_W),
    .ADDR_W(ADDR_W), .DATA_W(DATA_W), .UPC_W(UPC_W)
  ) u_sb (
    .clk, .rst_n,
    .req_valid(to_sb), .req_store(dec_kind == UOP_STORE), .req_disp(dec_disp),
    .req_upc(dec_upc), .push, .pop,
    .pvb_valid(sb_pvb_valid), .pvb_upc(sb_pvb_upc), .pvb_dep(sb_pvb_dep),
    .pvb_addr(sb_pvb_addr), .pvb_state(sb_pvb_state), .pvb_frame(sb_pvb_frame),
    .pvb_idx(sb_pvb_idx),
    .rb_valid, .rb_upc, .rb_data, .dep_valid, .dep_upc, .dep_on,
    .upd_valid, .upd_frame, .upd_idx, .upd_match_dep, .upd_new_dep,
    .upd_addr, .upd_data, .upd_applied,
    .frame_sel, .frame_overflow, .frame_underflow
  );

  logic              ad_hit, ad_pred;
  logic [ADDR_W-1:0] ad_addr;
  logic              ad_checked, ad_wrong;

  ad_predictor #(.AD_ENTRIES(AD_ENTRIES), .PC_W(PC_W), .ADDR_W(ADDR_W)) u_ad (
    .clk, .rst_n,
    .pr_pc(dec_pc), .pr_hit(ad_hit), .pr_addr(ad_addr),
    .tr_valid(ex_valid && ex_kind == UOP_LOAD && !ex_base_bp && csb_en),
    .tr_pc(ex_pc), .tr_addr(ex_addr), .tr_wrong(ad_wrong)
  );

  assign ad_pred = to_ad && ad_hit;

  // shared PVB: the classifier routes an op to one predictor at most
  logic              al_valid;
  logic [UPC_W-1:0]  al_upc, al_dep;
  logic [ADDR_W-1:0] al_addr;
  pvb_state_e        al_state;
  logic [FW-1:0]     al_frame;
  logic [IDX_W-1:0]  al_idx;

  always_comb begin
    al_valid = sb_pvb_valid || ad_pred;
    if (sb_pvb_valid) begin
      al_upc   = sb_pvb_upc;
      al_dep   = sb_pvb_dep;
      al_addr  = sb_pvb_addr;
      al_state = sb_pvb_state;
      al_frame = sb_pvb_frame;
      al_idx   = sb_pvb_idx;
    end else begin
      al_upc   = dec_upc;
      al_dep   = dec_upc;
      al_addr  = ad_addr;
      al_state = ST_ADDR_PRED;
      al_frame = '0;
      al_idx   = '0;
    end
  end

  // ---------------- execute side ----------------
  logic              rec_hit, rec_complete;
  logic [UPC_W-1:0]  rec_dep;
  logic [ADDR_W-1:0] rec_addr;
  pvb_state_e        rec_state;
  logic [FW-1:0]     rec_frame;
  logic [IDX_W-1:0]  rec_idx;
  ex_result_e        result;

  prediction_valid_buffer #(
    .PVB_DEPTH(PVB_DEPTH), .ADDR_W(ADDR_W), .UPC_W(UPC_W),
    .FRAME_W(FW), .IDX_W(IDX_W)
  ) u_pvb (
    .clk, .rst_n, .flush,
    .al_valid, .al_upc, .al_dep, .al_addr, .al_state, .al_frame, .al_idx,
    .full(pvb_full), .count(pvb_count),
    .lk_upc(ex_upc), .lk_hit(rec_hit), .lk_dep(rec_dep), .lk_addr(rec_addr),
    .lk_state(rec_state), .lk_frame(rec_frame), .lk_idx(rec_idx),
    .complete(rec_complete)
  );

  verify_logic #(
    .ADDR_W(ADDR_W), .DATA_W(DATA_W), .UPC_W(UPC_W), .FRAME_W(FW), .IDX_W(IDX_W)
  ) u_vfy (
    .ex_valid(ex_valid && !flush), .ex_upc, .ex_addr, .ex_data,
    .rec_hit, .rec_dep, .rec_addr, .rec_state, .rec_frame, .rec_idx,
    .result, .rec_complete, .ad_checked, .ad_wrong,
    .upd_valid, .upd_frame, .upd_idx, .upd_match_dep, .upd_new_dep,
    .upd_addr, .upd_data
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      spec_valid      <= 1'b0;
      ex_res_valid    <= 1'b0;
      stat_ignored    <= 1'b0;
      stat_fsb_write  <= 1'b0;
      stat_ad_checked <= 1'b0;
    end else begin
      spec_valid      <= ad_pred;
      ex_res_valid    <= ex_valid;
      stat_ignored    <= ignored;
      stat_fsb_write  <= upd_applied;
      stat_ad_checked <= ad_checked;
    end
  end

  always_ff @(posedge clk) begin
    spec_upc   <= dec_upc;
    spec_addr  <= ad_addr;
    ex_res_upc <= ex_upc;
    ex_res     <= result;
  end
endmodule
