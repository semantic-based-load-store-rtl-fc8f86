// tb_framed_stack_buffer: random allocations, execute-stage updates and frame
// clears against a reference model of the entries, at the default size
// (2 frames x 128 entries). Displacements are drawn from a few tags and a few
// indices so that tag conflicts, take-overs and stale updates all occur. The
// lookup port is checked every cycle.
module tb_framed_stack_buffer;
  localparam int NF = 2, NE = 128;
  logic clk = 0, rst_n = 0;
  logic [NF-1:0] clear_mask;
  logic [0:0] lk_frame, al_frame, upd_frame;
  logic [15:0] lk_disp, al_disp;
  logic lk_hit, lk_dval, al_valid, upd_valid, upd_applied;
  logic [15:0] lk_dep, al_upc, upd_match_dep, upd_new_dep;
  logic [31:0] lk_addr, lk_data, upd_addr, upd_data;
  logic [6:0] upd_idx;
  int checks = 0, failures = 0, n_applied = 0, n_stale = 0, n_hit = 0;

  framed_stack_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference entries
  bit        mv   [NF][NE];
  bit        mdv  [NF][NE];
  bit [8:0]  mtag [NF][NE];
  bit [15:0] mdep [NF][NE];
  bit [31:0] maddr[NF][NE];
  bit [31:0] mdata[NF][NE];

  function automatic logic [15:0] rdisp();
    return {7'($urandom_range(0, 2)), 2'b00, 7'($urandom_range(0, 7))};
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%0t %s: got %0h exp %0h", $time, what, got, exp);
    end
  endtask

  initial begin
    clear_mask = 0; al_valid = 0; upd_valid = 0;
    lk_frame = 0; lk_disp = 0; al_frame = 0; al_disp = 0; al_upc = 0;
    upd_frame = 0; upd_idx = 0; upd_match_dep = 0; upd_new_dep = 0; upd_addr = 0; upd_data = 0;
    foreach (mv[f, e]) mv[f][e] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      int f, e; bit exp_app;
      @(negedge clk);
      clear_mask = ($urandom_range(0, 99) < 2) ? NF'($urandom_range(1, 3)) : '0;
      al_valid   = $urandom_range(0, 2) == 0;
      al_frame   = 1'($urandom_range(0, 1));
      al_disp    = rdisp();
      al_upc     = 16'($urandom_range(0, 31));
      upd_valid  = $urandom_range(0, 1) == 0;
      upd_frame  = 1'($urandom_range(0, 1));
      upd_idx    = 7'($urandom_range(0, 7));
      upd_match_dep = 16'($urandom_range(0, 31));
      upd_new_dep   = 16'($urandom_range(0, 31));
      upd_addr   = $urandom;
      upd_data   = $urandom;
      lk_frame   = 1'($urandom_range(0, 1));
      lk_disp    = rdisp();
      #1;
      // lookup
      f = lk_frame; e = lk_disp[6:0];
      check("hit", lk_hit, mv[f][e] && mtag[f][e] == lk_disp[15:7]);
      if (lk_hit) begin
        n_hit++;
        check("dep", lk_dep, mdep[f][e]);
        check("dval", lk_dval, mdv[f][e]);
        if (mdv[f][e]) begin
          check("addr", lk_addr, maddr[f][e]);
          check("data", lk_data, mdata[f][e]);
        end
      end
      // expected update acceptance
      exp_app = upd_valid && !clear_mask[upd_frame] && mv[upd_frame][upd_idx]
                && mdep[upd_frame][upd_idx] == upd_match_dep
                && !(al_valid && !clear_mask[al_frame] && al_frame == upd_frame
                     && al_disp[6:0] == upd_idx);
      check("applied", upd_applied, exp_app);
      if (exp_app) n_applied++;
      else if (upd_valid) n_stale++;
      // model update, in the priority order clear > alloc > update
      if (exp_app) begin
        mdep[upd_frame][upd_idx] = upd_new_dep;
        maddr[upd_frame][upd_idx] = upd_addr;
        mdata[upd_frame][upd_idx] = upd_data;
        mdv[upd_frame][upd_idx] = 1;
      end
      if (al_valid && !clear_mask[al_frame]) begin
        mv[al_frame][al_disp[6:0]] = 1;
        mtag[al_frame][al_disp[6:0]] = al_disp[15:7];
        mdep[al_frame][al_disp[6:0]] = al_upc;
        mdv[al_frame][al_disp[6:0]] = 0;
      end
      for (int k = 0; k < NF; k++)
        if (clear_mask[k]) for (int j = 0; j < NE; j++) mv[k][j] = 0;
    end
    check("updates applied", n_applied > 100, 1);
    check("stale updates dropped", n_stale > 100, 1);
    check("lookup hits", n_hit > 100, 1);
    $display("applied=%0d stale=%0d hits=%0d", n_applied, n_stale, n_hit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
