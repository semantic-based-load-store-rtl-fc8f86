// tb_frame_selector: random CALL/RET sequences against a reference model.
// Three instances run side by side: the default two-frame selector, an
// eight-frame one (the count used in the frame-size study) and a single-frame
// one (the low-cost option, where every CALL and RET empties the frame). The model tracks
// the call depth exactly and derives from it which frames must be cleared.
module tb_frame_selector;
  logic clk = 0, rst_n = 0;
  logic push, pop;
  logic [0:0] sel2;  logic [1:0] clr2;  logic ov2, un2;
  logic [2:0] sel8;  logic [7:0] clr8;  logic ov8, un8;
  logic [0:0] sel1;  logic [0:0] clr1;  logic ov1, un1;
  int checks = 0, failures = 0;
  int n_ov = 0, n_un = 0;

  frame_selector #(.NUM_FRAMES(2)) dut2 (.clk, .rst_n, .push, .pop, .sel(sel2),
    .clear_mask(clr2), .overflow(ov2), .underflow(un2));
  frame_selector #(.NUM_FRAMES(8)) dut8 (.clk, .rst_n, .push, .pop, .sel(sel8),
    .clear_mask(clr8), .overflow(ov8), .underflow(un8));

  frame_selector #(.NUM_FRAMES(1)) dut1 (.clk, .rst_n, .push, .pop, .sel(sel1),
    .clear_mask(clr1), .overflow(ov1), .underflow(un1));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: position and number of frames holding live state
  class model;
    int nf, pos, live;
    function new(int n); nf = n; pos = 0; live = 1; endfunction
    function bit [7:0] clear(bit p, bit q);
      bit [7:0] m = 0;
      if (p) m[(pos + 1) % nf] = 1;
      else if (q) begin
        m[pos] = 1;
        if (live == 1) m[(pos + nf - 1) % nf] = 1;
      end
      return m;
    endfunction
    function void step(bit p, bit q);
      if (p) begin pos = (pos + 1) % nf; if (live < nf) live++; end
      else if (q) begin pos = (pos + nf - 1) % nf; if (live > 1) live--; end
    endfunction
  endclass

  model m2 = new(2), m8 = new(8), m1 = new(1);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    push = 0; pop = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      int r;
      @(negedge clk);
      r = $urandom_range(0, 9);
      // bias toward deep nesting in the first half, unwinding in the second
      push = (i < 2000) ? (r < 5) : (r < 3);
      pop  = !push && ((i < 2000) ? (r >= 7) : (r >= 5));
      #1;
      check("sel2", sel2, m2.pos);
      check("sel8", sel8, m8.pos);
      check("clr2", clr2, m2.clear(push, pop));
      check("clr8", clr8, m8.clear(push, pop));
      check("sel1", sel1, m1.pos);
      check("clr1", clr1, m1.clear(push, pop) & 8'h01);
      check("ov1", ov1, push && m1.live == 1);
      check("un1", un1, pop && m1.live == 1);
      check("ov2", ov2, push && m2.live == 2);
      check("un2", un2, pop && m2.live == 1);
      check("ov8", ov8, push && m8.live == 8);
      check("un8", un8, pop && m8.live == 1);
      if (ov8) n_ov++;
      if (un8) n_un++;
      m2.step(push, pop);
      m8.step(push, pop);
      m1.step(push, pop);
    end
    check("overflow seen", n_ov > 0, 1);
    check("underflow seen", n_un > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
