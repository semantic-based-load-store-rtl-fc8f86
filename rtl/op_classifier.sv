// op_classifier: sorts decoded micro-operations for the load/store predictor.
//
// BP-based loads and stores go to the semantic-based predictor. Loads that are
// not BP-based go to the address predictor, but only in the classified mode
// (csb_en = 1); with csb_en = 0 the unit behaves as the plain semantic-based
// scheme and predicts nothing for them. Stores that are not BP-based are
// ignored, as the scheme prescribes. CALL and RET are passed on as frame push
// and pop requests for the frame selector. Purely combinational.
module op_classifier
  import lsp_pkg::*;
(
  input  logic      valid,    // a micro-op is presented
  input  uop_kind_e kind,     // its kind
  input  logic      base_bp,  // its base register is BP
  input  logic      csb_en,   // 1: classified mode, 0: semantic-based only
  output logic      to_sb,    // send to the semantic-based predictor
  output logic      to_ad,    // send to the address predictor
  output logic      push,     // CALL: allocate a new stack frame
  output logic      pop,      // RET: return to the previous stack frame
  output logic      ignored   // a memory op that no predictor handles
);
  logic is_mem;

  always_comb begin
    is_mem  = (kind == UOP_LOAD) || (kind == UOP_STORE);
    to_sb   = valid && is_mem && base_bp;
    to_ad   = valid && (kind == UOP_LOAD) && !base_bp && csb_en;
    push    = valid && (kind == UOP_CALL);
    pop     = valid && (kind == UOP_RET);
    ignored = valid && is_mem && !to_sb && !to_ad;
  end
endmodule
