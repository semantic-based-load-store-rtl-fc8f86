// tb_verify_logic: random executed operations and PVB records; each decision
// output is compared with the verification rules spelled out in the model
// below. Every record state is exercised with matching and differing
// addresses.
module tb_verify_logic;
  import lsp_pkg::*;
  logic ex_valid, rec_hit;
  logic [15:0] ex_upc, rec_dep, upd_match_dep, upd_new_dep;
  logic [31:0] ex_addr, ex_data, rec_addr, upd_addr, upd_data;
  pvb_state_e rec_state;
  logic [0:0] rec_frame, upd_frame;
  logic [6:0] rec_idx, upd_idx;
  ex_result_e result;
  logic rec_complete, ad_checked, ad_wrong, upd_valid;
  int checks = 0, failures = 0;
  int seen[5];

  verify_logic dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s: got %0h exp %0h (state %0d)", what, got, exp, rec_state);
    end
  endtask

  initial begin
    for (int i = 0; i < 4000; i++) begin
      ex_result_e e_res; bit e_upd, e_chk, e_wrong; bit [15:0] e_match;
      ex_valid  = $urandom_range(0, 7) != 0;
      rec_hit   = $urandom_range(0, 7) != 0;
      ex_upc    = 16'($urandom);
      ex_addr   = $urandom;
      ex_data   = $urandom;
      rec_dep   = 16'($urandom);
      rec_addr  = $urandom_range(0, 1) ? ex_addr : ex_addr ^ (32'd1 << $urandom_range(0, 31));
      rec_state = pvb_state_e'($urandom_range(0, 3));
      rec_frame = 1'($urandom);
      rec_idx   = 7'($urandom);
      #1;
      e_res = EX_UNTRACKED; e_upd = 0; e_chk = 0; e_wrong = 0; e_match = ex_upc;
      if (ex_valid && rec_hit) begin
        if (rec_state == ST_INIT) begin e_res = EX_INIT; e_upd = 1; end
        else if (rec_state == ST_DEPEND) e_res = EX_DEPEND;
        else if (rec_addr == ex_addr) e_res = EX_VERIFIED;
        else begin
          e_res = EX_RECOVER;
          if (rec_state == ST_PREDICT) begin e_upd = 1; e_match = rec_dep; end
        end
        if (rec_state == ST_ADDR_PRED) begin e_chk = 1; e_wrong = rec_addr != ex_addr; end
      end
      seen[e_res]++;
      check("result", result, e_res);
      check("complete", rec_complete, ex_valid && rec_hit);
      check("upd_valid", upd_valid, e_upd);
      check("ad_checked", ad_checked, e_chk);
      check("ad_wrong", ad_wrong, e_wrong);
      if (e_upd) begin
        check("match", upd_match_dep, e_match);
        check("new", upd_new_dep, ex_upc);
        check("addr", upd_addr, ex_addr);
        check("data", upd_data, ex_data);
        check("frame", upd_frame, rec_frame);
        check("idx", upd_idx, rec_idx);
      end
    end
    foreach (seen[k]) check("outcome seen", seen[k] > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
