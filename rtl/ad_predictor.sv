// ad_predictor: address predictor for the loads that are not BP-based.
//
// In the classified scheme these loads are handed to an address/dependency
// predictor taken from earlier work, of which the document gives only the
// outline: address prediction refined by a set of 2-bit counters, with a
// second set of 2-bit counters filtering out predictions that tend to be
// wrong. This module is the simplest predictor with that outline; the table
// organisation, the update rules and the size are this design's own, and the
// dependence/forwarding part of that earlier predictor is not modelled.
//
// A direct-mapped table, indexed by the low bits of the load's instruction
// address and tagged with the rest, holds per load: the last address it
// accessed, a 2-bit confidence counter (up when the address repeats, down when
// it changes) and a 2-bit filter counter (up when an issued prediction was
// wrong, down when the address repeats). A prediction (the last address) is
// made when confidence is 3 and the filter counter is below 2.
//
// Timing: prediction is combinational; training happens on the rising edge
// for every executed non-BP load, whether it was predicted or not.
module ad_predictor #(
  parameter int unsigned AD_ENTRIES = 256,
  parameter int unsigned PC_W       = 32,
  parameter int unsigned ADDR_W     = 32,
  localparam int unsigned IW = $clog2(AD_ENTRIES),
  localparam int unsigned TW = PC_W - IW
) (
  input  logic              clk,
  input  logic              rst_n,
  // prediction (decode)
  input  logic [PC_W-1:0]   pr_pc,
  output logic              pr_hit,
  output logic [ADDR_W-1:0] pr_addr,
  // training (execute)
  input  logic              tr_valid,
  input  logic [PC_W-1:0]   tr_pc,
  input  logic [ADDR_W-1:0] tr_addr,
  input  logic              tr_wrong    // an issued prediction for it was wrong
);
  logic [AD_ENTRIES-1:0] v_q;
  logic [TW-1:0]     tag_q  [AD_ENTRIES];
  logic [ADDR_W-1:0] last_q [AD_ENTRIES];
  logic [1:0]        conf_q [AD_ENTRIES];
  logic [1:0]        filt_q [AD_ENTRIES];

  logic [IW-1:0] pi, ti;
  logic          tr_hit, same;

  always_comb begin
    pi      = pr_pc[IW-1:0];
    ti      = tr_pc[IW-1:0];
    pr_hit  = v_q[pi] && tag_q[pi] == pr_pc[PC_W-1:IW]
              && conf_q[pi] == 2'd3 && filt_q[pi] < 2'd2;
    pr_addr = last_q[pi];
    tr_hit  = v_q[ti] && tag_q[ti] == tr_pc[PC_W-1:IW];
    same    = last_q[ti] == tr_addr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_q <= '0;
    else if (tr_valid) v_q[ti] <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (tr_valid) begin
      last_q[ti] <= tr_addr;
      if (tr_hit) begin
        if (same && conf_q[ti] != 2'd3)      conf_q[ti] <= conf_q[ti] + 2'd1;
        else if (!same && conf_q[ti] != '0)  conf_q[ti] <= conf_q[ti] - 2'd1;
        if (tr_wrong && filt_q[ti] != 2'd3)  filt_q[ti] <= filt_q[ti] + 2'd1;
        else if (!tr_wrong && same && filt_q[ti] != '0) filt_q[ti] <= filt_q[ti] - 2'd1;
      end else begin
        tag_q[ti]  <= tr_pc[PC_W-1:IW];
        conf_q[ti] <= '0;
        filt_q[ti] <= '0;
      end
    end
  end
endmodule
