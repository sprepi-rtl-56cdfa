// tb_backend: behavioural out-of-order back end and program source used by
// the end-to-end testbenches of sprepi_top.
//
// It generates a dynamic instruction trace: a static loop body of 24
// instructions (unpredicated ALU operations, predicated operations on three
// condition pairs, flag-defining instructions, branches) repeated.  The
// flags each dynamic flag-defining instruction produces follow a fixed
// per-position pattern in "predictable" phases and are random in
// "unpredictable" phases, so that predicate prediction is good in some
// phases and bad in others.
//
// It feeds the trace to the front end, executes every micro-op as soon as
// it is received (in program order, with the renamed operands and the
// predicted kind, SELECTs using the real predicate), resolves group
// predicates after a random delay, re-executes replayed micro-ops only when
// flagged, and commits in order.  At commit each instruction is checked
// against a golden in-order interpreter of the trace: the kind must agree
// with the real predicate and the architectural value of the destination,
// read through the physical register file, must equal the golden value.
// A micro-op that should have been re-executed but was not shows up as a
// wrong value.  Occasionally a committed branch is reported as mispredicted
// and everything in flight is flushed and fetched again.
//
// Counters of every front-end mechanism are output for the testbench to
// check.  NPROG dynamic instructions are run; done rises when all have
// committed.
module tb_backend
  import sprepi_pkg::*;
#(
  parameter int  NPROG     = 4000,
  parameter bit  BRPRED    = 1'b1,
  parameter int  PHASE_LEN = 1200,   // dynamic instructions per phase
  parameter int  FLUSH_ODDS = 60,    // one committed branch in FLUSH_ODDS flushes
  parameter int  DEPTH     = ROB_SIZE // buffer slots of the front end
) (
  input  logic                   clk,
  input  logic                   rst_n,
  output logic [WIDTH-1:0]       in_valid,
  output inst_t [WIDTH-1:0]      in_inst,
  input  logic [2:0]             in_accept_n,
  output logic                   cur_flags_v,
  output flags_t                 cur_flags,
  input  logic [WIDTH-1:0]       out_valid,
  input  uop_t [WIDTH-1:0]       out_uop,
  output logic                   res_v,
  output grp_t                   res_grp,
  output flags_t                 res_flags,
  output logic [2:0]             commit_req_n,
  output logic [WIDTH-1:0]       cm_br_wrong,
  input  logic [2:0]             commit_ack_n,
  output logic                   flush_all,
  input  logic                   mode_on,
  input  logic                   drain_req,
  input  logic                   replaying,
  output logic                   done,
  output int                     checks,
  output int                     failures,
  output int                     cnt [16]
);
  // counter indices
  localparam int C_FRESH = 0, C_HEAD = 1, C_USED = 2, C_NOOP = 3, C_SELECT = 4,
                 C_REPLAY = 5, C_REEXEC = 6, C_KEPT = 7, C_SPLIT = 8, C_ACKLIM = 9,
                 C_FLUSH = 10, C_OFF = 11, C_ON = 12, C_DRAIN = 13, C_KNOWN = 14,
                 C_STALL = 15;
  localparam int BODY = 24;
  localparam int D    = DEPTH;

  // ---------------- program ----------------
  inst_t  body [BODY];
  inst_t  prog [NPROG];
  flags_t fl_before [NPROG];    // flags seen by each instruction
  flags_t fl_set [NPROG];       // flags produced (flag-defining instructions)
  int     kconst [NPROG];

  function automatic logic ev(input cond_t c, input flags_t f);
    case (c[3:1])
      0: return f.z ^ c[0];  1: return f.c ^ c[0];  2: return f.n ^ c[0];  3: return f.v ^ c[0];
      4: return (f.c & ~f.z) ^ c[0];  5: return (f.n == f.v) ^ c[0];
      6: return (~f.z & (f.n == f.v)) ^ c[0];  default: return 1;
    endcase
  endfunction

  function automatic logic [31:0] alu(input logic [31:0] a, b, input int k);
    return a * 3 + b + 32'(k);
  endfunction

  // ---------------- back-end state ----------------
  logic [31:0] pr [NUM_PHYS];       // physical register values
  logic [31:0] garch [NUM_ARCH];    // golden architectural state
  ptag_t       cmap [NUM_ARCH];     // committed map as seen from commits
  int          s_prog [D];          // slot -> program index
  uop_t        s_uop [D];
  logic [31:0] s_val [D];
  logic        s_seen [D];
  int          fetch_ptr, recv_ptr, commit_ptr;
  int          head_slot, inflight;
  int          pend_grp [$];        // groups whose head was seen, unresolved
  int          pend_prog [$];
  logic        g_res [NUM_GRP];     // group resolved (by group id)
  int          flush_pending;
  int          idle_cycles;
  logic        prev_mode, prev_replay;

  task automatic fail(input string m);
    failures++;
    if (failures < 20) $display("FAIL[%s] %s", BRPRED ? "BrPred" : "BrO", m);
  endtask

  function automatic logic [31:0] exec_val(input uop_t u, input int k);
    logic [31:0] a, b, v;
    a = u.form.ps1_v ? pr[u.form.ps1] : 32'd0;
    b = u.form.ps2_v ? pr[u.form.ps2] : 32'd0;
    v = alu(a, b, kconst[k]);
    if (u.form.kind == K_SELECT)
      v = ev(prog[k].cond, fl_before[k]) ? v : pr[u.form.ps3];
    return v;
  endfunction

  initial begin
    flags_t f;
    flags_t pat [BODY];
    // static body
    for (int i = 0; i < BODY; i++) begin
      inst_t x;
      int r;
      x = '0;
      x.pc = 32'h0001_0000 + 32'(i * 4);
      r = $urandom_range(0, 9);
      x.dst_v = 1; x.dst = areg_t'($urandom_range(0, 7));
      x.src1_v = 1; x.src1 = areg_t'($urandom_range(0, 7));
      x.src2_v = ($urandom_range(0, 2) != 0); x.src2 = areg_t'($urandom_range(0, 7));
      x.cond = C_AL;
      if (i == 7) r = 6;         // at least one branch and one flag setter
      if (i == 3) r = 4;
      if (r < 4) begin
        // predicated on one of three pairs
        case ($urandom_range(0, 2))
          0: x.cond = ($urandom_range(0, 1) != 0) ? C_EQ : C_NE;
          1: x.cond = ($urandom_range(0, 1) != 0) ? C_GT : C_LE;
          default: x.cond = ($urandom_range(0, 1) != 0) ? C_CS : C_CC;
        endcase
      end else if (r < 6) begin
        x.sets_flags = 1;
      end else if (r == 6) begin
        x.is_branch = 1; x.dst_v = 0; x.src2_v = 0;
        x.cond = ($urandom_range(0, 1) != 0) ? C_AL : C_NE;
      end
      // two predicated instructions of different pairs side by side: two
      // groups would open in one bundle
      if (i == 10 || i == 11) begin
        x.sets_flags = 0; x.is_branch = 0; x.dst_v = 1; x.src2_v = 1;
        x.cond = (i == 10) ? C_EQ : C_GT;
      end
      body[i] = x;
      pat[i] = flags_t'($urandom);
    end
    f = '0;
    for (int k = 0; k < NPROG; k++) begin
      prog[k] = body[k % BODY];
      if (prog[k].is_branch) prog[k].br_taken = 1'($urandom);
      kconst[k] = (k % BODY) * 17 + 5;
      fl_before[k] = f;
      if (prog[k].sets_flags) begin
        if ((k / PHASE_LEN) % 2 == 0) fl_set[k] = pat[k % BODY];
        else                          fl_set[k] = flags_t'($urandom);
        f = fl_set[k];
      end
    end
  end

  // ---------------- main loop ----------------
  initial begin
    checks = 0; failures = 0; done = 0;
    for (int i = 0; i < 16; i++) cnt[i] = 0;
    in_valid = '0; in_inst = '0; cur_flags_v = 0; cur_flags = '0;
    res_v = 0; res_grp = '0; res_flags = '0;
    commit_req_n = '0; cm_br_wrong = '0; flush_all = 0;
    for (int p = 0; p < NUM_PHYS; p++) pr[p] = 32'(p * 7 + 1);
    for (int r = 0; r < NUM_ARCH; r++) begin garch[r] = 32'(r * 7 + 1); cmap[r] = ptag_t'(r); end
    for (int g = 0; g < NUM_GRP; g++) g_res[g] = 0;
    for (int s = 0; s < D; s++) s_seen[s] = 0;
    fetch_ptr = 0; recv_ptr = 0; commit_ptr = 0; head_slot = 0; inflight = 0;
    flush_pending = 0; idle_cycles = 0; prev_mode = 1; prev_replay = 0;
    @(posedge rst_n);
    while (commit_ptr < NPROG) begin
      int nreq, offered;
      logic brw;
      @(negedge clk);
      // ---- status ----
      if (prev_mode && !mode_on) begin cnt[C_OFF]++; end
      if (!prev_mode && mode_on) begin cnt[C_ON]++; end
      if (!prev_replay && replaying) cnt[C_REPLAY]++;
      if (drain_req) cnt[C_DRAIN]++;
      prev_mode = mode_on; prev_replay = replaying;
      res_v = 0; flush_all = 0; commit_req_n = '0; cm_br_wrong = '0; in_valid = '0; cur_flags_v = 0;

      // ---- receive micro-ops ----
      if (flush_pending == 0)
        for (int i = 0; i < WIDTH; i++)
          if (out_valid[i]) begin
            uop_t u;
            int s, k;
            u = out_uop[i];
            s = int'(u.idx);
            if (!u.replay) begin
              k = recv_ptr++;
              s_prog[s] = k;
              s_seen[s] = 1;
              cnt[C_FRESH]++;
              if (u.in_grp && u.grp_head) begin
                cnt[C_HEAD]++;
                pend_grp.push_back(int'(u.grp));
                pend_prog.push_back(k);
                g_res[u.grp] = 0;
              end
              if (u.in_grp && u.form.kind != K_SELECT) begin
                cnt[C_USED]++;
                if (BRPRED && !mode_on) cnt[C_KNOWN]++;
              end
              if (u.form.kind == K_NOOP) cnt[C_NOOP]++;
              if (u.form.kind == K_SELECT) cnt[C_SELECT]++;
              checks++;
              if (prog[k].cond != u.cond) fail($sformatf("uop %0d out of order", k));
              s_uop[s] = u;
              if (u.form.kind != K_NOOP && u.pdst_v) begin
                s_val[s] = exec_val(u, k);
                pr[u.pdst] = s_val[s];
              end
            end else begin
              k = s_prog[s];
              s_uop[s] = u;
              if (u.reexec) begin
                cnt[C_REEXEC]++;
                if (u.form.kind != K_NOOP && u.pdst_v) begin
                  s_val[s] = exec_val(u, k);
                  pr[u.pdst] = s_val[s];
                end
              end else cnt[C_KEPT]++;
            end
          end

      if (flush_pending == 1) begin
        // ---- full flush after a mispredicted committed branch ----
        flush_all = 1;
        cnt[C_FLUSH]++;
        fetch_ptr = commit_ptr; recv_ptr = commit_ptr;
        inflight = 0; head_slot = 0;
        pend_grp.delete(); pend_prog.delete();
        for (int s = 0; s < D; s++) s_seen[s] = 0;
        flush_pending = 2;
        @(posedge clk);
        continue;
      end
      flush_pending = 0;

      // ---- resolve one pending group ----
      if (pend_grp.size() > 0 && $urandom_range(0, 2) != 0) begin
        int j;
        j = (pend_grp.size() > 1 && $urandom_range(0, 3) == 0) ? 1 : 0;
        res_v = 1;
        res_grp = grp_t'(pend_grp[j]);
        res_flags = fl_before[pend_prog[j]];
        g_res[pend_grp[j]] = 1;
        pend_grp.delete(j); pend_prog.delete(j);
      end

      // ---- commit ----
      nreq = 0; brw = 0;
      for (int i = 0; i < WIDTH; i++) begin
        int s, k;
        s = (head_slot + i) % D;
        if (nreq == i && commit_ptr + i < recv_ptr && s_seen[s] && !brw) begin
          k = s_prog[s];
          if (!s_uop[s].in_grp || g_res[s_uop[s].grp]) begin
            nreq++;
            if (prog[k].is_branch && $urandom_range(0, FLUSH_ODDS - 1) == 0) begin
              cm_br_wrong[i] = 1; brw = 1;
            end
          end
        end
      end
      if ($urandom_range(0, 4) == 0) nreq = 0;   // back-end hiccup
      if (nreq == 0) cm_br_wrong = '0;
      commit_req_n = 3'(nreq);

      // ---- fetch ----
      offered = 0;
      for (int i = 0; i < WIDTH; i++)
        if (fetch_ptr + i < NPROG) begin
          in_valid[i] = 1; in_inst[i] = prog[fetch_ptr + i]; offered++;
        end
      // the flags are offered only when every offered instruction reads them
      if (fetch_ptr < NPROG && $urandom_range(0, 7) == 0) begin
        cur_flags_v = 1; cur_flags = fl_before[fetch_ptr];
        for (int i = 0; i < offered - 1; i++)
          if (prog[fetch_ptr + i].sets_flags) cur_flags_v = 0;
      end
      #1;
      if (in_accept_n != 0 && int'(in_accept_n) < offered) cnt[C_SPLIT]++;
      if (in_accept_n == 0 && offered > 0) cnt[C_STALL]++;
      if (int'(commit_ack_n) < nreq) cnt[C_ACKLIM]++;
      // ---- commit checks against the golden interpreter ----
      for (int i = 0; i < int'(commit_ack_n); i++) begin
        int s, k;
        logic p;
        uop_t u;
        s = (head_slot + i) % D;
        k = s_prog[s];
        u = s_uop[s];
        checks++;
        if (k != commit_ptr) fail($sformatf("commit order %0d vs %0d", k, commit_ptr));
        p = (prog[k].cond >= C_AL || prog[k].is_branch) ? 1'b1 : ev(prog[k].cond, fl_before[k]);
        if (u.form.kind == K_NORMAL && !p) fail($sformatf("inst %0d executed with false predicate", k));
        if (u.form.kind == K_NOOP && p)    fail($sformatf("inst %0d dropped with true predicate", k));
        if (prog[k].dst_v) begin
          if (p) garch[prog[k].dst] = alu(prog[k].src1_v ? garch[prog[k].src1] : 0,
                                          prog[k].src2_v ? garch[prog[k].src2] : 0, kconst[k]);
          if (u.form.kind != K_NOOP) cmap[prog[k].dst] = u.pdst;
          checks++;
          if (pr[cmap[prog[k].dst]] !== garch[prog[k].dst])
            fail($sformatf("inst %0d r%0d = %h, expected %h", k, prog[k].dst, pr[cmap[prog[k].dst]], garch[prog[k].dst]));
        end
        s_seen[s] = 0;
        commit_ptr++;
        if (cm_br_wrong[i]) flush_pending = 1;
      end
      head_slot = (head_slot + int'(commit_ack_n)) % D;
      fetch_ptr += int'(in_accept_n);
      if (commit_ack_n == 0) idle_cycles++; else idle_cycles = 0;
      if (idle_cycles > 3000) begin
        fail($sformatf("no commit for 3000 cycles at %0d (recv %0d fetch %0d)", commit_ptr, recv_ptr, fetch_ptr));
        break;
      end
      @(posedge clk);
    end
    @(negedge clk);
    in_valid = '0; commit_req_n = '0; res_v = 0;
    done = 1;
  end
endmodule
