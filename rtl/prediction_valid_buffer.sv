// prediction_valid_buffer: the prediction valid buffer (PVB), a FIFO of
// prediction records shared by the semantic-based and the address predictor.
//
// Records are written at the tail in decode order, one per cycle, and hold
// {uPC, dep uPC, addr, state} as in the described scheme. Two fields are this
// design's own additions: the stack frame and the entry index of the FSB
// entry the record refers to, so that the executed operation can write its
// address and data back into the right entry. A valid bit is implied by the
// head/tail pointers and a done bit marks records whose operation has
// executed.
//
// At execute, the operation's uPC is searched in all live records
// (combinational, first match from the head); complete marks that record done
// on the rising edge. Done records leave from the head, one per cycle, which
// keeps the FIFO in program order. flush empties the buffer (pipeline
// squash). full is high when no record can be taken; the decode stage must
// then stall. Depth is not given by the document; PVB_DEPTH is assumed.
module prediction_valid_buffer
  import lsp_pkg::*;
#(
  parameter int unsigned PVB_DEPTH = 32,
  parameter int unsigned ADDR_W    = 32,
  parameter int unsigned UPC_W     = 16,
  parameter int unsigned FRAME_W   = 1,
  parameter int unsigned IDX_W     = 7,
  localparam int unsigned PW = $clog2(PVB_DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               flush,
  // allocation
  input  logic               al_valid,
  input  logic [UPC_W-1:0]   al_upc,
  input  logic [UPC_W-1:0]   al_dep,
  input  logic [ADDR_W-1:0]  al_addr,
  input  pvb_state_e         al_state,
  input  logic [FRAME_W-1:0] al_frame,
  input  logic [IDX_W-1:0]   al_idx,
  output logic               full,
  output logic [PW:0]        count,
  // search at execute
  input  logic [UPC_W-1:0]   lk_upc,
  output logic               lk_hit,
  output logic [UPC_W-1:0]   lk_dep,
  output logic [ADDR_W-1:0]  lk_addr,
  output pvb_state_e         lk_state,
  output logic [FRAME_W-1:0] lk_frame,
  output logic [IDX_W-1:0]   lk_idx,
  input  logic               complete   // mark the found record done
);
  logic [UPC_W-1:0]   upc_q   [PVB_DEPTH];
  logic [UPC_W-1:0]   dep_q   [PVB_DEPTH];
  logic [ADDR_W-1:0]  addr_q  [PVB_DEPTH];
  pvb_state_e         state_q [PVB_DEPTH];
  logic [FRAME_W-1:0] frame_q [PVB_DEPTH];
  logic [IDX_W-1:0]   idx_q   [PVB_DEPTH];
  logic [PVB_DEPTH-1:0] done_q;
  logic [PW-1:0] head_q, tail_q;
  logic [PW:0]   count_q;

  logic [PW-1:0] hit_slot;
  logic          do_push, do_pop;

  always_comb begin
    full  = (count_q == (PW+1)'(PVB_DEPTH));
    count = count_q;
    // search from the head so that the oldest matching record wins
    lk_hit   = 1'b0;
    hit_slot = '0;
    for (int k = PVB_DEPTH - 1; k >= 0; k--) begin
      logic [PW-1:0] s;
      s = head_q + PW'(k);
      if ((PW+1)'(k) < count_q && !done_q[s] && upc_q[s] == lk_upc) begin
        lk_hit   = 1'b1;
        hit_slot = s;
      end
    end
    lk_dep   = dep_q[hit_slot];
    lk_addr  = addr_q[hit_slot];
    lk_state = state_q[hit_slot];
    lk_frame = frame_q[hit_slot];
    lk_idx   = idx_q[hit_slot];

    do_push = al_valid && !full;
    do_pop  = (count_q != '0) && done_q[head_q];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q  <= '0;
      tail_q  <= '0;
      count_q <= '0;
    end else if (flush) begin
      head_q  <= '0;
      tail_q  <= '0;
      count_q <= '0;
    end else begin
      if (do_push) tail_q <= tail_q + 1'b1;
      if (do_pop)  head_q <= head_q + 1'b1;
      count_q <= count_q + (PW+1)'(do_push) - (PW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (complete && lk_hit) done_q[hit_slot] <= 1'b1;
    if (do_push) begin
      upc_q[tail_q]   <= al_upc;
      dep_q[tail_q]   <= al_dep;
      addr_q[tail_q]  <= al_addr;
      state_q[tail_q] <= al_state;
      frame_q[tail_q] <= al_frame;
      idx_q[tail_q]   <= al_idx;
      done_q[tail_q]  <= 1'b0;
    end
  end

  initial assert (PVB_DEPTH == (1 << PW));
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) !(al_valid && full && !flush));
endmodule
