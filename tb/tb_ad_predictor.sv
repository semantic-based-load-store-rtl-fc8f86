// tb_ad_predictor: trains the address predictor with a stream of loads from a
// set of instruction addresses, some always touching the same address, some
// striding, some switching, with table conflicts, and compares each
// prediction with a reference model of the tag, last address and the two
// 2-bit counters. Also checks that a constant-address load becomes predicted
// after three repeats and that two wrong predictions silence it.
module tb_ad_predictor;
  localparam int N = 256;
  logic clk = 0, rst_n = 0;
  logic [31:0] pr_pc, tr_pc, pr_addr, tr_addr;
  logic pr_hit, tr_valid, tr_wrong;
  int checks = 0, failures = 0, n_pred = 0;

  ad_predictor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit mv[N]; bit [23:0] mtag[N]; bit [31:0] mlast[N]; int mconf[N], mfilt[N];

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%0t %s: got %0h exp %0h", $time, what, got, exp);
    end
  endtask

  function automatic bit mpred(bit [31:0] pc);
    int i;
    i = pc[7:0];
    return mv[i] && mtag[i] == pc[31:8] && mconf[i] == 3 && mfilt[i] < 2;
  endfunction

  task automatic train(bit [31:0] pc, bit [31:0] a, bit wrong);
    int i;
    bit same;
    @(negedge clk);
    tr_valid = 1; tr_pc = pc; tr_addr = a; tr_wrong = wrong;
    i = pc[7:0];
    same = mlast[i] == a;
    if (mv[i] && mtag[i] == pc[31:8]) begin
      if (same && mconf[i] < 3) mconf[i]++;
      else if (!same && mconf[i] > 0) mconf[i]--;
      if (wrong && mfilt[i] < 3) mfilt[i]++;
      else if (!wrong && same && mfilt[i] > 0) mfilt[i]--;
    end else begin
      mv[i] = 1; mtag[i] = pc[31:8]; mconf[i] = 0; mfilt[i] = 0;
    end
    mlast[i] = a;
    @(negedge clk);
    tr_valid = 0;
  endtask

  task automatic probe(bit [31:0] pc);
    pr_pc = pc;
    #1;
    check("hit", pr_hit, mpred(pc));
    if (pr_hit) begin
      n_pred++;
      check("addr", pr_addr, mlast[pc[7:0]]);
    end
  endtask

  initial begin
    bit [31:0] pcs[8];
    tr_valid = 0; tr_pc = 0; tr_addr = 0; tr_wrong = 0; pr_pc = 0;
    foreach (mv[i]) mv[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // directed: constant address load
    for (int k = 0; k < 5; k++) begin
      probe(32'h1000);
      check("constant load predicted after 3 repeats", pr_hit, k == 4);
      train(32'h1000, 32'h8000_0040, 0);
    end
    probe(32'h1000);
    train(32'h1000, 32'h8000_0040, 1);
    train(32'h1000, 32'h8000_0040, 1);
    probe(32'h1000);
    check("filtered after two wrong predictions", pr_hit, 0);
    // random mix; pcs 0 and 4 share a table index
    foreach (pcs[k]) pcs[k] = {24'($urandom), 8'(k * 8)};
    pcs[4] = {pcs[0][31:8] + 24'd1, pcs[0][7:0]};
    for (int n = 0; n < 5000; n++) begin
      int k;
      bit [31:0] a;
      k = $urandom_range(0, 7);
      a = (k < 3) ? 32'h9000_0000 + k : (k < 5) ? $urandom_range(0, 3) : $urandom;
      probe(pcs[k]);
      train(pcs[k], a, pr_hit && pr_addr != a);
    end
    check("predictions made", n_pred > 500, 1);
    $display("predictions=%0d", n_pred);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
