// tb_prediction_valid_buffer: random allocation, completion (in any order) and
// flushes against a queue model of the PVB at its default depth (32). Checks
// every cycle the fill count, the full flag and the record returned by the
// uPC search, and counts full phases, completions and flushes.
module tb_prediction_valid_buffer;
  import lsp_pkg::*;
  localparam int D = 32;
  logic clk = 0, rst_n = 0, flush;
  logic al_valid, full, lk_hit, complete;
  logic [15:0] al_upc, al_dep, lk_upc, lk_dep;
  logic [31:0] al_addr, lk_addr;
  pvb_state_e al_state, lk_state;
  logic [0:0] al_frame, lk_frame;
  logic [6:0] al_idx, lk_idx;
  logic [5:0] count;
  int checks = 0, failures = 0, n_full = 0, n_flush = 0, n_done = 0;

  prediction_valid_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    bit [15:0] upc, dep; bit [31:0] addr; pvb_state_e st; bit fr; bit [6:0] idx; bit done;
  } rec_t;
  rec_t q[$];

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%0t %s: got %0h exp %0h", $time, what, got, exp);
    end
  endtask

  initial begin
    bit [15:0] next_upc = 0;
    flush = 0; al_valid = 0; complete = 0; lk_upc = 0;
    al_upc = 0; al_dep = 0; al_addr = 0; al_state = ST_INIT; al_frame = 0; al_idx = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 30000; cyc++) begin
      int found; bit phase_fill;
      @(negedge clk);
      phase_fill = (cyc / 500) % 2 == 0;  // alternate fill-heavy and drain-heavy
      flush    = $urandom_range(0, 999) == 0;
      al_valid = $urandom_range(0, 99) < (phase_fill ? 80 : 30);
      al_upc   = next_upc;
      al_dep   = 16'($urandom);
      al_addr  = $urandom;
      al_state = pvb_state_e'($urandom_range(0, 3));
      al_frame = 1'($urandom_range(0, 1));
      al_idx   = 7'($urandom);
      // search for an outstanding record most of the time
      if (q.size() > 0 && $urandom_range(0, 9) < 8) lk_upc = q[$urandom_range(0, q.size() - 1)].upc;
      else lk_upc = 16'($urandom);
      complete = $urandom_range(0, 99) < (phase_fill ? 40 : 90);
      #1;
      check("count", count, q.size());
      check("full", full, q.size() == D);
      if (full) n_full++;
      al_valid = al_valid && !full;  // the decode stage stalls on full
      found = -1;
      foreach (q[i]) if (found < 0 && !q[i].done && q[i].upc == lk_upc) found = i;
      check("hit", lk_hit, found >= 0);
      if (found >= 0) begin
        check("dep", lk_dep, q[found].dep);
        check("addr", lk_addr, q[found].addr);
        check("state", lk_state, q[found].st);
        check("frame", lk_frame, q[found].fr);
        check("idx", lk_idx, q[found].idx);
      end
      // model the edge
      if (flush) begin
        q.delete(); n_flush++;
      end else begin
        bit pop;
        pop = q.size() > 0 && q[0].done;
        if (complete && found >= 0) begin q[found].done = 1; n_done++; end
        if (al_valid && !full) begin
          q.push_back('{al_upc, al_dep, al_addr, al_state, al_frame, al_idx, 0});
          next_upc++;
        end
        if (pop) void'(q.pop_front());
      end
    end
    check("full reached", n_full > 0, 1);
    check("flush seen", n_flush > 0, 1);
    check("completions", n_done > 1000, 1);
    $display("full=%0d flush=%0d done=%0d", n_full, n_flush, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
