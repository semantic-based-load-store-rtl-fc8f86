// lsp_pkg: shared types for the classified semantic-based load/store predictor.
//
// A decoded micro-operation is described to the predictor by its kind (load,
// store, CALL, RET or anything else), a flag saying whether its base register
// is BP, and its displacement. The prediction valid buffer (PVB) keeps one
// record per predicted operation whose state says how the operation was
// handled at decode. The "initial" and "predict" states come from the
// described scheme. DEPEND (dependence known, data not yet available) and
// ADDR_PRED (address predicted for a non-BP load) are this design's own names
// for the two other cases the predictor can meet.
package lsp_pkg;

  typedef enum logic [2:0] {
    UOP_OTHER = 3'd0,
    UOP_LOAD  = 3'd1,
    UOP_STORE = 3'd2,
    UOP_CALL  = 3'd3,
    UOP_RET   = 3'd4
  } uop_kind_e;

  typedef enum logic [1:0] {
    ST_INIT      = 2'd0,  // entry owner: writes its address/data into the FSB at execute
    ST_PREDICT   = 2'd1,  // data sent to the result bus at decode, address to be verified
    ST_DEPEND    = 2'd2,  // dependence on an earlier op reported, no data predicted
    ST_ADDR_PRED = 2'd3   // address predicted by the address predictor, to be verified
  } pvb_state_e;

  // Outcome of an executed memory operation, reported to the pipeline.
  typedef enum logic [2:0] {
    EX_UNTRACKED = 3'd0,  // operation has no PVB record
    EX_INIT      = 3'd1,  // owner op: its address/data were written into the FSB
    EX_DEPEND    = 3'd2,  // dependence-only record, executes normally
    EX_VERIFIED  = 3'd3,  // prediction correct: the load needs no data cache access
    EX_RECOVER   = 3'd4   // prediction wrong: the load and its dependents must be recovered
  } ex_result_e;

endpackage
