// tb_op_classifier: exhaustive check of the micro-op classifier.
// Every combination of valid, kind, BP flag and mode is applied and the five
// outputs are compared with the routing rules written out below.
module tb_op_classifier;
  import lsp_pkg::*;
  logic valid, base_bp, csb_en;
  uop_kind_e kind;
  logic to_sb, to_ad, push, pop, ignored;
  int checks = 0, failures = 0;

  op_classifier dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2; v++)
      for (int k = 0; k < 5; k++)
        for (int b = 0; b < 2; b++)
          for (int c = 0; c < 2; c++) begin
            logic e_sb, e_ad, e_push, e_pop, e_ign;
            valid = v[0]; kind = uop_kind_e'(k); base_bp = b[0]; csb_en = c[0];
            #1;
            // expected, per kind
            e_sb   = v == 1 && b == 1 && (k == 1 || k == 2);
            e_ad   = v == 1 && b == 0 && k == 1 && c == 1;
            e_push = v == 1 && k == 3;
            e_pop  = v == 1 && k == 4;
            e_ign  = v == 1 && b == 0 && (k == 2 || (k == 1 && c == 0));
            checks++;
            if ({to_sb, to_ad, push, pop, ignored} !== {e_sb, e_ad, e_push, e_pop, e_ign}) begin
              failures++;
              $display("mismatch v=%0d k=%0d bp=%0d csb=%0d got %b exp %b", v, k, b, c,
                       {to_sb, to_ad, push, pop, ignored}, {e_sb, e_ad, e_push, e_pop, e_ign});
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
