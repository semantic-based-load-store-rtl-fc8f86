// verify_logic: checks a prediction when its memory operation executes.
//
// The load/store unit presents the executed operation (uPC, computed address
// and the data it stored or loaded). The operation's PVB record, found by uPC,
// decides what happens:
//   * "initial": the operation owns its FSB entry, so its address and data
//     are written there (the entry only accepts them while its dep uPC still
//     names this operation).
//   * "predict": the computed address is compared with the address recorded
//     at prediction time. Equal: the prediction stands and the load needs no
//     data cache access. Different: the load must be recovered, and the FSB
//     entry is rewritten with this load's address and data, the load becoming
//     its new producer.
//   * address-predicted (non-BP load): the same comparison; a mismatch asks
//     for recovery and is reported to the address predictor.
//   * dependence-only: nothing to verify.
// Only addresses are compared, as in the described scheme. Purely
// combinational; the caller registers what it reports.
module verify_logic
  import lsp_pkg::*;
#(
  parameter int unsigned ADDR_W  = 32,
  parameter int unsigned DATA_W  = 32,
  parameter int unsigned UPC_W   = 16,
  parameter int unsigned FRAME_W = 1,
  parameter int unsigned IDX_W   = 7
) (
  input  logic               ex_valid,
  input  logic [UPC_W-1:0]   ex_upc,
  input  logic [ADDR_W-1:0]  ex_addr,
  input  logic [DATA_W-1:0]  ex_data,
  // the operation's PVB record
  input  logic               rec_hit,
  input  logic [UPC_W-1:0]   rec_dep,
  input  logic [ADDR_W-1:0]  rec_addr,
  input  pvb_state_e         rec_state,
  input  logic [FRAME_W-1:0] rec_frame,
  input  logic [IDX_W-1:0]   rec_idx,
  // decisions
  output ex_result_e         result,
  output logic               rec_complete,
  output logic               ad_checked,     // an address prediction was checked
  output logic               ad_wrong,       // ... and it was wrong
  output logic               upd_valid,
  output logic [FRAME_W-1:0] upd_frame,
  output logic [IDX_W-1:0]   upd_idx,
  output logic [UPC_W-1:0]   upd_match_dep,
  output logic [UPC_W-1:0]   upd_new_dep,
  output logic [ADDR_W-1:0]  upd_addr,
  output logic [DATA_W-1:0]  upd_data
);
  logic addr_eq;

  always_comb begin
    addr_eq       = (ex_addr == rec_addr);
    result        = EX_UNTRACKED;
    rec_complete  = ex_valid && rec_hit;
    ad_checked    = 1'b0;
    ad_wrong      = 1'b0;
    upd_valid     = 1'b0;
    upd_frame     = rec_frame;
    upd_idx       = rec_idx;
    upd_match_dep = ex_upc;
    upd_new_dep   = ex_upc;
    upd_addr      = ex_addr;
    upd_data      = ex_data;
    if (ex_valid && rec_hit) begin
      unique case (rec_state)
        ST_INIT: begin
          result    = EX_INIT;
          upd_valid = 1'b1;
        end
        ST_PREDICT: begin
          if (addr_eq) begin
            result = EX_VERIFIED;
          end else begin
            result        = EX_RECOVER;
            upd_valid     = 1'b1;
            upd_match_dep = rec_dep;
          end
        end
        ST_DEPEND: result = EX_DEPEND;
        ST_ADDR_PRED: begin
          ad_checked = 1'b1;
          ad_wrong   = !addr_eq;
          result     = addr_eq ? EX_VERIFIED : EX_RECOVER;
        end
        default: result = EX_UNTRACKED;
      endcase
    end
  end
endmodule
