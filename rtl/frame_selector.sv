// frame_selector: points at the stack frame of the framed-stack buffer in use.
//
// A CALL moves the selector to the next frame and a RET back to the previous
// one, as the scheme describes. The frames are used as a ring: when calls nest
// deeper than NUM_FRAMES, the oldest frame is reused. The design keeps a count
// of the frames that still hold the state of the current function and its
// callers (1..NUM_FRAMES) so that it knows when a RET lands on a frame that
// was reused, and asks for that frame to be cleared too. A frame that is
// entered by a CALL is always cleared, and so is a frame that is left by a
// RET. The ring, the live count and the clearing rules are this design's own
// choices; the document gives only the increment/decrement behaviour.
//
// Timing: push/pop are sampled on the rising clock edge; clear_mask is
// combinational and valid in the same cycle as the push/pop request, so the
// framed-stack buffer clears the frames on the same edge that moves the
// selector. push and pop must not both be high.
module frame_selector #(
  parameter int unsigned NUM_FRAMES = 2,
  localparam int unsigned FW = (NUM_FRAMES > 1) ? $clog2(NUM_FRAMES) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  push,       // CALL decoded
  input  logic                  pop,        // RET decoded
  output logic [FW-1:0]         sel,        // frame in use
  output logic [NUM_FRAMES-1:0] clear_mask, // frames to clear on this edge
  output logic                  overflow,   // this push reuses a live frame
  output logic                  underflow   // this pop lands on a reused frame
);
  logic [FW-1:0] live;   // live frames minus one
  logic [FW-1:0] sel_inc, sel_dec;

  always_comb begin
    sel_inc = (sel == FW'(NUM_FRAMES - 1)) ? '0 : sel + 1'b1;
    sel_dec = (sel == '0) ? FW'(NUM_FRAMES - 1) : sel - 1'b1;
    overflow  = push && (live == FW'(NUM_FRAMES - 1));
    underflow = pop && (live == '0);
    clear_mask = '0;
    if (push) begin
      clear_mask[sel_inc] = 1'b1;
    end else if (pop) begin
      clear_mask[sel] = 1'b1;
      if (live == '0) clear_mask[sel_dec] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel  <= '0;
      live <= '0;
    end else if (push) begin
      sel <= sel_inc;
      if (live != FW'(NUM_FRAMES - 1)) live <= live + 1'b1;
    end else if (pop) begin
      sel <= sel_dec;
      if (live != '0) live <= live - 1'b1;
    end
  end

  initial assert (NUM_FRAMES >= 1);
  a_push_pop: assert property (@(posedge clk) disable iff (!rst_n) !(push && pop));
endmodule
