// tb_semantic_predictor: directed walk through the semantic-based predictor's
// cases at the default size (2 frames x 128 entries):
//   store / first load allocate (state initial), a load behind an executed
//   producer gets its data on the result bus (state predict) - both store-to-
//   load forwarding and load-to-load reuse -, a load behind a producer that
//   has not executed yet gets dependence information, tag conflicts, stale
//   updates, a recovery rewrite, CALL/RET frame switching including a call
//   depth beyond two frames. Result-bus and dependence outputs are checked one
//   cycle after the request.
module tb_semantic_predictor;
  import lsp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req_valid, req_store, push, pop;
  logic [15:0] req_disp, req_upc;
  logic pvb_valid;
  logic [15:0] pvb_upc, pvb_dep;
  logic [31:0] pvb_addr;
  pvb_state_e pvb_state;
  logic [0:0] pvb_frame, upd_frame, frame_sel;
  logic [6:0] pvb_idx, upd_idx;
  logic rb_valid, dep_valid;
  logic [15:0] rb_upc, dep_upc, dep_on;
  logic [31:0] rb_data;
  logic upd_valid, upd_applied, frame_overflow, frame_underflow;
  logic [15:0] upd_match_dep, upd_new_dep;
  logic [31:0] upd_addr, upd_data;
  int checks = 0, failures = 0;

  semantic_predictor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%0t %s: got %0h exp %0h", $time, what, got, exp);
    end
  endtask

  // present one BP-based op; check its PVB record, then its registered outputs
  task automatic op(bit st, bit [15:0] disp, bit [15:0] upc, pvb_state_e e_state,
                    bit [15:0] e_dep, bit [31:0] e_addr, bit [31:0] e_data);
    @(negedge clk);
    req_valid = 1; req_store = st; req_disp = disp; req_upc = upc;
    #1;
    check("pvb_valid", pvb_valid, 1);
    check("pvb_upc", pvb_upc, upc);
    check("pvb_state", pvb_state, e_state);
    check("pvb_dep", pvb_dep, e_dep);
    check("pvb_idx", pvb_idx, disp[6:0]);
    check("pvb_frame", pvb_frame, frame_sel);
    if (e_state == ST_PREDICT) check("pvb_addr", pvb_addr, e_addr);
    @(negedge clk);
    req_valid = 0;
    #1;
    check("rb_valid", rb_valid, e_state == ST_PREDICT);
    check("dep_valid", dep_valid, e_state != ST_INIT);
    if (e_state == ST_PREDICT) begin
      check("rb_upc", rb_upc, upc);
      check("rb_data", rb_data, e_data);
    end
    if (e_state != ST_INIT) begin
      check("dep_upc", dep_upc, upc);
      check("dep_on", dep_on, e_dep);
    end
  endtask

  // execute-side write into the FSB
  task automatic upd(bit fr, bit [15:0] disp, bit [15:0] match, bit [15:0] nw,
                     bit [31:0] a, bit [31:0] d, bit e_applied);
    @(negedge clk);
    upd_valid = 1; upd_frame = fr; upd_idx = disp[6:0];
    upd_match_dep = match; upd_new_dep = nw; upd_addr = a; upd_data = d;
    #1;
    check("upd_applied", upd_applied, e_applied);
    @(negedge clk);
    upd_valid = 0;
  endtask

  task automatic frame(bit call, bit e_ov, bit e_un);
    @(negedge clk);
    push = call; pop = !call;
    #1;
    check("overflow", frame_overflow, e_ov);
    check("underflow", frame_underflow, e_un);
    @(negedge clk);
    push = 0; pop = 0;
  endtask

  localparam bit [15:0] DA = 16'hFFF8;   // [BP-8]
  localparam bit [15:0] DB = 16'h000C;   // [BP+12]
  localparam bit [15:0] DC = 16'hFF78;   // same index as DA, other tag

  initial begin
    req_valid = 0; req_store = 0; req_disp = 0; req_upc = 0; push = 0; pop = 0;
    upd_valid = 0; upd_frame = 0; upd_idx = 0; upd_match_dep = 0; upd_new_dep = 0;
    upd_addr = 0; upd_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check("frame after reset", frame_sel, 0);
    // Fig. 6 case: store op1 allocates
    op(1, DA, 16'd1, ST_INIT, 16'd1, 0, 0);
    // load before op1 has executed: dependence on op1
    op(0, DA, 16'd2, ST_DEPEND, 16'd1, 0, 0);
    // op1 executes: address and data arrive
    upd(0, DA, 16'd1, 16'd1, 32'h7FF0_0FF8, 32'hCAFE_0001, 1);
    // Fig. 7 case: load op3 gets op1's data (store-to-load forwarding)
    op(0, DA, 16'd3, ST_PREDICT, 16'd1, 32'h7FF0_0FF8, 32'hCAFE_0001);
    // a store takes the entry over; op1's late update is now stale
    op(1, DA, 16'd4, ST_INIT, 16'd4, 0, 0);
    upd(0, DA, 16'd1, 16'd1, 32'h7FF0_0FF8, 32'hDEAD_0000, 0);
    upd(0, DA, 16'd4, 16'd4, 32'h7FF0_0FF8, 32'hCAFE_0004, 1);
    op(0, DA, 16'd5, ST_PREDICT, 16'd4, 32'h7FF0_0FF8, 32'hCAFE_0004);
    // tag conflict: same index, different displacement -> miss, allocate
    op(0, DC, 16'd6, ST_INIT, 16'd6, 0, 0);
    op(0, DA, 16'd7, ST_INIT, 16'd7, 0, 0);
    // load-to-load reuse: first load of DB owns the entry, the second reuses it
    op(0, DB, 16'd8, ST_INIT, 16'd8, 0, 0);
    upd(0, DB, 16'd8, 16'd8, 32'h7FF0_1014, 32'h0000_1234, 1);
    op(0, DB, 16'd9, ST_PREDICT, 16'd8, 32'h7FF0_1014, 32'h0000_1234);
    // recovery rewrite: op10 mispredicted from op8's entry, becomes producer
    op(0, DB, 16'd10, ST_PREDICT, 16'd8, 32'h7FF0_1014, 32'h0000_1234);
    upd(0, DB, 16'd8, 16'd10, 32'h7FF0_2014, 32'h0000_5678, 1);
    op(0, DB, 16'd11, ST_PREDICT, 16'd10, 32'h7FF0_2014, 32'h0000_5678);
    // CALL: new frame 1 is empty
    frame(1, 0, 0);
    check("frame after call", frame_sel, 1);
    op(0, DB, 16'd12, ST_INIT, 16'd12, 0, 0);
    // RET: back to frame 0 with its contents
    frame(0, 0, 0);
    check("frame after ret", frame_sel, 0);
    op(0, DB, 16'd13, ST_PREDICT, 16'd10, 32'h7FF0_2014, 32'h0000_5678);
    // two nested calls with two frames: the second reuses (and clears) frame 0
    frame(1, 0, 0);
    frame(1, 1, 0);
    check("frame after two calls", frame_sel, 0);
    op(0, DB, 16'd14, ST_INIT, 16'd14, 0, 0);
    frame(0, 0, 0);
    check("frame after ret", frame_sel, 1);
    // returning to the reused frame: it was lost, so it comes back empty
    frame(0, 0, 1);
    check("frame back at 0", frame_sel, 0);
    op(0, DB, 16'd15, ST_INIT, 16'd15, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
