// tb_csb_frame_study: the end-to-end program of tb_csb_predictor run on the
// largest configuration of the frame-size study: eight frames of 512 entries
// each. Calls nest up to ten deep so that frames are still reused.
//
// The testbench plays both the decode stage and the load/store unit of a
// core running a random program with nested function calls. It keeps the
// architectural BP (moved by CALL/RET and, now and then, by a BP update inside
// a function), a memory image, and a queue of decoded but not yet executed
// operations that it executes in program order at a varying rate. Every
// decode-side output is recorded per uPC and every execute-side outcome is
// checked against what the recorded prediction implies:
//   * a load predicted from producer P must name P as having the same
//     displacement in the same function activation, and P must have executed;
//     its predicted data must be P's data;
//   * it must be reported verified exactly when its address equals P's
//     address, and a verified load's predicted data must equal memory;
//   * a load reported as waiting for P must find P not yet executed;
//   * an address-predicted load must be verified exactly when the predicted
//     address is right; owners report "initial"; untracked ops "untracked";
//   * the frame selector follows the call depth.
// The second part runs in semantic-based-only mode (csb_en = 0). Each
// mechanism (frame switch, frame reuse, forwarding, load reuse, dependence,
// verification, recovery, address prediction, PVB-full stall, flush, ignored
// stores, SB-only mode) is counted and must occur.
module tb_csb_frame_study;
  import lsp_pkg::*;

  localparam int NOPS = 20000;
  localparam int NF   = 8;     // frames in the predictor under test
  localparam int MAXD = 10;    // deepest call nesting of the program

  logic clk = 0, rst_n = 0, csb_en, flush;
  logic dec_valid, dec_ready, dec_base_bp;
  uop_kind_e dec_kind, ex_kind;
  logic [15:0] dec_disp, dec_upc, ex_upc;
  logic [31:0] dec_pc, ex_pc, ex_addr, ex_data;
  logic rb_valid, dep_valid, spec_valid, ex_valid, ex_base_bp, ex_res_valid;
  logic [15:0] rb_upc, dep_upc, dep_on, spec_upc, ex_res_upc;
  logic [31:0] rb_data, spec_addr;
  ex_result_e ex_res;
  logic [$clog2(NF)-1:0] frame_sel;
  logic frame_overflow, frame_underflow;
  logic [5:0] pvb_count;
  logic stat_ignored, stat_fsb_write, stat_ad_checked;

  csb_predictor #(.NUM_FRAMES(NF), .FRAME_ENTRIES(512)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 30) $display("%0t %s: got %0h exp %0h", $time, what, got, exp);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- per-operation bookkeeping ----------------
  typedef struct {
    uop_kind_e kind;
    bit        bp;
    bit [15:0] disp;
    bit [31:0] addr;
    bit [31:0] pc;
    int        inst;       // function activation
    bit        csb;        // mode at decode
    bit        executed;
    longint    dec_cyc, ex_cyc;
    bit [31:0] xdata;      // data it stored / loaded
    bit [31:0] xaddr;
    bit        got_rb, got_dep, got_spec;
    bit [31:0] rb_data, spec_addr;
    bit [15:0] dep_on;
    bit        dep_exec_at_decode;
  } op_t;

  op_t ops[int];
  int  inflight[$];            // uPCs decoded, not yet executed
  bit [31:0] mem[bit [31:0]];

  // mechanisms
  int n_call, n_ret, n_ov, n_un, n_init, n_fwd, n_reuse, n_dep, n_ver_sb, n_rec_sb;
  int n_spec, n_ver_ad, n_rec_ad, n_stall, n_flush, n_ign, n_sbmode, n_fsbw;

  function automatic bit [31:0] memrd(bit [31:0] a);
    return mem.exists(a) ? mem[a] : a ^ 32'h5A5A_0000;
  endfunction

  // decode-side outputs of the previous cycle
  task automatic sample_decode();
    if (rb_valid) begin
      check("rb for known op", ops.exists(rb_upc), 1);
      ops[rb_upc].got_rb = 1;
      ops[rb_upc].rb_data = rb_data;
    end
    if (dep_valid) begin
      check("dep for known op", ops.exists(dep_upc), 1);
      check("dep producer known", ops.exists(dep_on), 1);
      ops[dep_upc].got_dep = 1;
      ops[dep_upc].dep_on = dep_on;
      // the producer's data reaches the FSB on the edge after it executes
      ops[dep_upc].dep_exec_at_decode = ops[dep_on].executed
                                        && ops[dep_on].ex_cyc < ops[dep_upc].dec_cyc;
      // producer: same displacement, same activation, a BP-based op
      check("producer same disp", ops[dep_on].disp, ops[dep_upc].disp);
      check("producer same activation", ops[dep_on].inst, ops[dep_upc].inst);
      check("producer BP-based", ops[dep_on].bp, 1);
    end
    if (spec_valid) begin
      check("spec for known op", ops.exists(spec_upc), 1);
      ops[spec_upc].got_spec = 1;
      ops[spec_upc].spec_addr = spec_addr;
    end
    if (stat_ignored) n_ign++;
  endtask

  // execute-side outcome of the previous cycle
  task automatic sample_exec();
    op_t o;
    ex_result_e e;
    if (!ex_res_valid) return;
    o = ops[ex_res_upc];
    e = EX_UNTRACKED;
    if (o.bp && (o.kind == UOP_LOAD || o.kind == UOP_STORE)) begin
      if (o.got_rb) begin
        op_t p;
        check("predicted load has a producer", o.got_dep, 1);
        p = ops[o.dep_on];
        check("producer had executed", o.dep_exec_at_decode, 1);
        check("predicted data = producer data", o.rb_data, p.xdata);
        e = (o.xaddr == p.xaddr) ? EX_VERIFIED : EX_RECOVER;
        if (e == EX_VERIFIED) begin
          n_ver_sb++;
          check("verified data = memory", o.rb_data, o.xdata);
          if (p.kind == UOP_STORE) n_fwd++; else n_reuse++;
        end else n_rec_sb++;
      end else if (o.got_dep) begin
        e = EX_DEPEND;
        n_dep++;
        check("waiting load's producer had not executed", o.dep_exec_at_decode, 0);
      end else begin
        e = EX_INIT;
        n_init++;
      end
    end else if (o.kind == UOP_LOAD && o.got_spec) begin
      check("spec only in CSB mode", o.csb, 1);
      e = (o.spec_addr == o.xaddr) ? EX_VERIFIED : EX_RECOVER;
      if (e == EX_VERIFIED) n_ver_ad++; else n_rec_ad++;
    end else if (o.kind == UOP_LOAD && !o.csb) begin
      n_sbmode++;
    end
    check("ex result", ex_res, e);
    if (stat_fsb_write) n_fsbw++;
  endtask

  // ---------------- program generator ----------------
  int        upc_ctr = 0, inst_ctr = 0, depth = 0;
  bit [31:0] bp = 32'h7FFF_0000;
  bit [31:0] bp_stack[$];
  int        inst_stack[$];
  int        cur_inst = 0;
  int        ad_cnt[4];
  int        exec_pct;
  longint    cyc = 0;

  function automatic bit [15:0] pick_disp();
    int r;
    r = $urandom_range(0, 13);
    return (r < 12) ? 16'(-4 * (r + 1)) : 16'(8 + 4 * (r - 12));
  endfunction

  task automatic gen_op(output op_t o, output bit bp_move);
    int r;
    o = '{kind: UOP_OTHER, default: 0};
    bp_move = 0;
    o.inst = cur_inst;
    o.csb  = csb_en;
    r = $urandom_range(0, 99);
    if (r < 5 && depth < MAXD) o.kind = UOP_CALL;
    else if (r < 10 && depth > 0) o.kind = UOP_RET;
    else if (r < 12) begin o.kind = UOP_OTHER; bp_move = 1; end
    else if (r < 37) begin o.kind = UOP_STORE; o.bp = 1; end
    else if (r < 72) begin o.kind = UOP_LOAD; o.bp = 1; end
    else if (r < 90) begin
      int k;
      o.kind = UOP_LOAD;
      k = $urandom_range(0, 3);
      o.pc = 32'h0040_1000 + 32'(k * 16);
      ad_cnt[k]++;
      case (k)
        0: o.addr = 32'h1000_0000;
        1: o.addr = 32'h1000_0040;
        2: o.addr = 32'h1000_0100 + ((ad_cnt[k] / 8) % 2) * 4;
        default: o.addr = 32'h1000_0000 + 32'($urandom_range(0, 255)) * 4;
      endcase
    end else if (r < 95) begin
      o.kind = UOP_STORE;
      o.addr = 32'h2000_0000 + 32'($urandom_range(0, 63)) * 4;
    end else o.kind = UOP_OTHER;
    if (o.bp) begin
      o.disp = pick_disp();
      o.addr = bp + {{16{o.disp[15]}}, o.disp};
      o.pc   = 32'h0040_2000 + 32'(o.disp);
    end
  endtask

  initial begin
    csb_en = 1; flush = 0;
    dec_valid = 0; dec_kind = UOP_OTHER; dec_base_bp = 0; dec_disp = 0; dec_upc = 0; dec_pc = 0;
    ex_valid = 0; ex_kind = UOP_OTHER; ex_base_bp = 0; ex_upc = 0; ex_pc = 0; ex_addr = 0; ex_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (upc_ctr < NOPS || inflight.size() > 0) begin
      bit do_flush;
      @(negedge clk);
      cyc++;
      sample_decode();
      sample_exec();
      check("frame selector follows depth", frame_sel, depth % NF);
      dec_valid = 0; ex_valid = 0; flush = 0;
      // phases: CSB, CSB with a slow load/store unit, then SB only
      csb_en   = upc_ctr < (NOPS * 3) / 4;
      exec_pct = (upc_ctr % 4000 < 800) ? 10 : 70;
      do_flush = upc_ctr > 0 && $urandom_range(0, 599) == 0;
      if (do_flush) begin
        flush = 1;
        n_flush++;
        inflight.delete();
        continue;
      end
      // load/store unit: execute the oldest operation
      if (inflight.size() > 0 && ($urandom_range(0, 99) < exec_pct || upc_ctr >= NOPS)) begin
        int u;
        u = inflight.pop_front();
        if (ops[u].kind == UOP_STORE) begin
          ops[u].xdata = $urandom;
          mem[ops[u].addr] = ops[u].xdata;
        end else ops[u].xdata = memrd(ops[u].addr);
        ops[u].xaddr = ops[u].addr;
        ops[u].executed = 1;
        ops[u].ex_cyc = cyc;
        ex_valid = 1; ex_upc = 16'(u); ex_pc = ops[u].pc; ex_kind = ops[u].kind;
        ex_base_bp = ops[u].bp; ex_addr = ops[u].xaddr; ex_data = ops[u].xdata;
      end
      // decode stage
      if (upc_ctr < NOPS && $urandom_range(0, 9) < 8) begin
        if (!dec_ready) begin
          n_stall++;
        end else begin
          op_t o; bit bpm;
          gen_op(o, bpm);
          dec_valid = 1; dec_kind = o.kind; dec_base_bp = o.bp; dec_disp = o.disp;
          dec_upc = 16'(upc_ctr); dec_pc = o.pc;
          o.dec_cyc = cyc;
          ops[upc_ctr] = o;
          if (o.kind == UOP_LOAD || o.kind == UOP_STORE) inflight.push_back(upc_ctr);
          upc_ctr++;
          // architectural effect of control ops, seen by later ops
          if (o.kind == UOP_CALL) begin
            #1;
            if (frame_overflow) n_ov++;
            n_call++; depth++;
            bp_stack.push_back(bp); inst_stack.push_back(cur_inst);
            bp = bp - 32'h1000; cur_inst = ++inst_ctr;
          end else if (o.kind == UOP_RET) begin
            #1;
            if (frame_underflow) n_un++;
            n_ret++; depth--;
            bp = bp_stack.pop_back(); cur_inst = inst_stack.pop_back();
          end else if (bpm) begin
            bp = bp + 32'h40;
          end
        end
      end
    end
    repeat (3) begin
      @(negedge clk);
      sample_decode();
      sample_exec();
      dec_valid = 0; ex_valid = 0;
    end
    $display("call=%0d ret=%0d frame_reuse=%0d lost_frame=%0d", n_call, n_ret, n_ov, n_un);
    $display("init=%0d forward=%0d reuse=%0d depend=%0d sb_verified=%0d sb_recover=%0d fsb_writes=%0d",
             n_init, n_fwd, n_reuse, n_dep, n_ver_sb, n_rec_sb, n_fsbw);
    $display("ad_spec_verified=%0d ad_recover=%0d stall=%0d flush=%0d ignored=%0d sb_mode_loads=%0d",
             n_ver_ad, n_rec_ad, n_stall, n_flush, n_ign, n_sbmode);
    check("CALL seen", n_call > 0, 1);
    check("RET seen", n_ret > 0, 1);
    check("frame reuse seen", n_ov > 0, 1);
    check("return to lost frame seen", n_un > 0, 1);
    check("owner (initial) seen", n_init > 0, 1);
    check("store-to-load forwarding seen", n_fwd > 0, 1);
    check("load-to-load reuse seen", n_reuse > 0, 1);
    check("dependence seen", n_dep > 0, 1);
    check("SB verification seen", n_ver_sb > 0, 1);
    check("SB recovery seen", n_rec_sb > 0, 1);
    check("FSB write seen", n_fsbw > 0, 1);
    check("address prediction verified", n_ver_ad > 0, 1);
    check("address prediction recovered", n_rec_ad > 0, 1);
    check("PVB-full stall seen", n_stall > 0, 1);
    check("flush seen", n_flush > 0, 1);
    check("ignored store seen", n_ign > 0, 1);
    check("SB-only mode seen", n_sbmode > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
