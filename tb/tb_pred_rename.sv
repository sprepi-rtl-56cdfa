// tb_pred_rename: checks the predicated rename stage in two parts.
//
// 1. The replay example: I1 R1<-R2,R3 (p), I2 R1<-R2,R4 (!p), I3 R5<-R1,R2,
//    I4 R6<-R5,R3 and an independent I5 R7<-R8,R9 are renamed with p
//    predicted false, the map is walked back and the five are replayed with
//    p true.  Expected: I3 reads I2's register first and I1's after the
//    replay; I1, I2, I3 (changed form) and I4 (reads I3's result) must be
//    re-executed, I5 must not; no register is allocated by the replay.
// 2. Random bundles (NORMAL, NOOP, SELECT mixed), random commits, and random
//    walk-back + replay passes that flip predicate values, against a
//    reference map, free list and rename-form model kept here.
module tb_pred_rename;
  import sprepi_pkg::*;
  localparam int W = 4, NP = 64;
  logic clk = 0, rst_n = 0, flush = 0, inv_clear = 0;
  ren_op_t op = R_IDLE;
  logic [W-1:0] slot_v = 0, in_grp = 0, pk_known = 0, pk_val = 0;
  inst_t [W-1:0] inst;
  rrec_t [W-1:0] prev_rec, out_rec;
  logic [W-1:0] out_reexec;
  logic [W-1:0] commit_v = 0;
  bent_t [W-1:0] commit_ent;
  logic [6:0] free_cnt;
  int checks = 0, failures = 0;

  pred_rename #(.W(W), .NPHYS(NP)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 15) $display("FAIL %s", msg); end
  endtask

  function automatic inst_t mk(input int d, input int s1, input int s2);
    inst_t x;
    x = '0; x.dst_v = (d >= 0); x.dst = areg_t'(d < 0 ? 0 : d);
    x.src1_v = 1; x.src1 = areg_t'(s1); x.src2_v = (s2 >= 0); x.src2 = areg_t'(s2 < 0 ? 0 : s2);
    return x;
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference for part 2 ----------------
  typedef struct {
    inst_t i; logic g; logic known; logic val;
    rrec_t rec; ptag_t snap [NUM_ARCH];
  } fl_t;
  fl_t   q [$];            // in flight, oldest first
  ptag_t rmap [NUM_ARCH];
  logic  rfree [NP];

  function automatic int popfree();
    int n = 0;
    for (int p = 0; p < NP; p++) n += rfree[p];
    return n;
  endfunction

  // rename one instruction in the reference; returns the record
  function automatic rrec_t ref_ren(input inst_t x, input logic g, known, val,
                                    input ptag_t pd);
    rrec_t r;
    r = '0;
    r.pdst_v = x.dst_v; r.pdst = x.dst_v ? pd : '0;
    r.old_pdst = x.dst_v ? rmap[x.dst] : '0;
    r.form.ps1_v = x.src1_v; r.form.ps1 = x.src1_v ? rmap[x.src1] : '0;
    r.form.ps2_v = x.src2_v; r.form.ps2 = x.src2_v ? rmap[x.src2] : '0;
    if (g && !known) begin
      r.form.kind = K_SELECT; r.form.ps3_v = x.dst_v; r.form.ps3 = x.dst_v ? rmap[x.dst] : '0;
      r.upd_map = x.dst_v;
    end else if (g && !val) begin
      r.form.kind = K_NOOP; r.upd_map = 0;
    end else begin
      r.form.kind = K_NORMAL; r.upd_map = x.dst_v;
    end
    if (r.upd_map) rmap[x.dst] = pd;
    return r;
  endfunction

  initial begin
    rrec_t r1 [5];
    rrec_t r2 [5];
    inst_t ex [5];
    int n_replays, n_reexec, n_keep, n_select, n_noop;
    n_replays = 0; n_reexec = 0; n_keep = 0; n_select = 0; n_noop = 0;
    inst = '0; prev_rec = '0; commit_ent = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ---------------- part 1 ----------------
    ex[0] = mk(1, 2, 3); ex[0].cond = C_EQ;
    ex[1] = mk(1, 2, 4); ex[1].cond = C_NE;
    ex[2] = mk(5, 1, 2);
    ex[3] = mk(6, 5, 3);
    ex[4] = mk(7, 8, 9);
    @(negedge clk);
    op = R_FRESH; slot_v = 4'b1111;
    for (int i = 0; i < 4; i++) inst[i] = ex[i];
    in_grp = 4'b0011; pk_known = 4'b0011; pk_val = 4'b0010;   // p predicted false
    #1;
    for (int i = 0; i < 4; i++) r1[i] = out_rec[i];
    chk(r1[0].form.kind == K_NOOP && r1[1].form.kind == K_NORMAL, "ex: kinds before");
    chk(r1[2].form.ps1 == r1[1].pdst, "ex: I3 reads I2 before replay");
    chk(r1[3].form.ps1 == r1[2].pdst, "ex: I4 reads I3");
    chk(r1[0].pdst != r1[1].pdst && r1[0].pdst_v, "ex: symmetric allocation");
    @(posedge clk);
    @(negedge clk);
    slot_v = 4'b0001; inst[0] = ex[4]; in_grp = 0; pk_known = 0; pk_val = 0;
    #1; r1[4] = out_rec[0];
    @(posedge clk);
    // walk back, youngest first
    @(negedge clk);
    op = R_WALK; slot_v = 4'b1111;
    inst[0] = ex[4]; prev_rec[0] = r1[4];
    inst[1] = ex[3]; prev_rec[1] = r1[3];
    inst[2] = ex[2]; prev_rec[2] = r1[2];
    inst[3] = ex[1]; prev_rec[3] = r1[1];
    @(posedge clk);
    @(negedge clk);
    slot_v = 4'b0001; inst[0] = ex[0]; prev_rec[0] = r1[0];
    @(posedge clk);
    // replay with p true
    @(negedge clk);
    op = R_REPLAY; inv_clear = 1; slot_v = 4'b1111;
    for (int i = 0; i < 4; i++) begin inst[i] = ex[i]; prev_rec[i] = r1[i]; end
    in_grp = 4'b0011; pk_known = 4'b0011; pk_val = 4'b0001;
    #1;
    for (int i = 0; i < 4; i++) r2[i] = out_rec[i];
    chk(r2[0].form.kind == K_NORMAL && r2[1].form.kind == K_NOOP, "ex: kinds after");
    chk(r2[2].form.ps1 == r1[0].pdst, "ex: I3 reads I1 after replay");
    chk(out_reexec[3:0] == 4'b1111, "ex: I1..I4 re-executed");
    for (int i = 0; i < 4; i++) chk(r2[i].pdst == r1[i].pdst, "ex: registers kept");
    @(posedge clk);
    @(negedge clk);
    inv_clear = 0; slot_v = 4'b0001; inst[0] = ex[4]; prev_rec[0] = r1[4]; in_grp = 0; pk_known = 0;
    #1;
    chk(out_reexec[0] == 1'b0 && out_rec[0].form == r1[4].form, "ex: independent I5 kept");
    @(posedge clk);
    // commit all five (final records) and flush to a clean state
    @(negedge clk);
    op = R_IDLE; slot_v = 0;
    commit_v = 4'b1111;
    for (int i = 0; i < 4; i++) begin commit_ent[i] = '0; commit_ent[i].inst = ex[i]; commit_ent[i].rec = r2[i]; end
    @(posedge clk);
    @(negedge clk);
    commit_v = 4'b0001; commit_ent[0].inst = ex[4]; commit_ent[0].rec = r1[4];
    @(posedge clk);
    @(negedge clk);
    commit_v = 0;
    #1;
    chk(free_cnt == 7'(NP - NUM_ARCH), "ex: all dead registers freed");

    // ---------------- part 2 ----------------
    // reference state after part 1: committed map
    for (int r = 0; r < NUM_ARCH; r++) rmap[r] = ptag_t'(r);
    rmap[1] = r2[0].pdst; rmap[5] = r2[2].pdst; rmap[6] = r2[3].pdst; rmap[7] = r1[4].pdst;
    for (int p = 0; p < NP; p++) rfree[p] = 1;
    for (int r = 0; r < NUM_ARCH; r++) rfree[rmap[r]] = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      op = R_IDLE; slot_v = 0; commit_v = 0; inv_clear = 0;
      chk(int'(free_cnt) == popfree(), $sformatf("free count %0d vs %0d", free_cnt, popfree()));
      if (q.size() > 8 && $urandom_range(0, 30) == 0) begin
        // ---- walk back to a random point, then replay with flipped values
        int pt, n;
        fl_t tmp;
        logic inv [NP];
        pt = $urandom_range(0, q.size() - 1);
        n = q.size() - pt;
        n_replays++;
        for (int k = 0; k < n; k += W) begin
          op = R_WALK; slot_v = 0;
          for (int i = 0; i < W; i++)
            if (k + i < n) begin
              slot_v[i] = 1; inst[i] = q[q.size() - 1 - k - i].i; prev_rec[i] = q[q.size() - 1 - k - i].rec;
            end
          @(posedge clk); @(negedge clk);
        end
        for (int r = 0; r < NUM_ARCH; r++) rmap[r] = q[pt].snap[r];
        for (int p = 0; p < NP; p++) inv[p] = 0;
        for (int k = 0; k < n; k += W) begin
          op = R_REPLAY; inv_clear = (k == 0); slot_v = 0;
          for (int i = 0; i < W; i++)
            if (k + i < n) begin
              tmp = q[pt + k + i];
              if (tmp.g && $urandom_range(0, 2) == 0) begin tmp.val = !tmp.val; tmp.known = 1; end
              slot_v[i] = 1; inst[i] = tmp.i; prev_rec[i] = tmp.rec;
              in_grp[i] = tmp.g; pk_known[i] = tmp.known; pk_val[i] = tmp.val;
              q[pt + k + i] = tmp;
            end
          #1;
          for (int i = 0; i < W; i++)
            if (k + i < n) begin
              rrec_t e; logic re;
              tmp = q[pt + k + i];
              for (int r = 0; r < NUM_ARCH; r++) tmp.snap[r] = rmap[r];
              e = ref_ren(tmp.i, tmp.g, tmp.known, tmp.val, tmp.rec.pdst);
              re = (e.form != tmp.rec.form) || (e.form.ps1_v && inv[e.form.ps1]) ||
                   (e.form.ps2_v && inv[e.form.ps2]) || (e.form.ps3_v && inv[e.form.ps3]);
              if (re && e.pdst_v) inv[e.pdst] = 1;
              chk(out_rec[i] == e, $sformatf("replay record t=%0d", t));
              chk(out_reexec[i] == re, $sformatf("replay reexec t=%0d", t));
              if (re) n_reexec++; else n_keep++;
              tmp.rec = e;
              q[pt + k + i] = tmp;
            end
          @(posedge clk); @(negedge clk);
        end
        op = R_IDLE; slot_v = 0; inv_clear = 0;
        continue;
      end
      // ---- commit some
      for (int i = 0; i < W; i++)
        if (i < q.size() && $urandom_range(0, 1) == 0 && commit_v == ((1 << i) - 1)) begin
          commit_v[i] = 1; commit_ent[i] = '0; commit_ent[i].inst = q[i].i; commit_ent[i].rec = q[i].rec;
        end
      // ---- rename a fresh bundle if the free list allows
      if (free_cnt >= W && q.size() < 40 && $urandom_range(0, 3) != 0) begin
        op = R_FRESH;
        for (int i = 0; i < W; i++) begin
          slot_v[i] = ($urandom_range(0, 4) != 0);
          inst[i] = mk($urandom_range(0, 5) == 0 ? -1 : $urandom_range(0, NUM_ARCH-1),
                       $urandom_range(0, NUM_ARCH-1), $urandom_range(0, 3) == 0 ? -1 : $urandom_range(0, NUM_ARCH-1));
          in_grp[i] = 1'($urandom); pk_known[i] = ($urandom_range(0, 3) != 0); pk_val[i] = 1'($urandom);
        end
        #1;
        for (int i = 0; i < W; i++)
          if (slot_v[i]) begin
            fl_t f; rrec_t e;
            f.i = inst[i]; f.g = in_grp[i]; f.known = pk_known[i]; f.val = pk_val[i];
            for (int r = 0; r < NUM_ARCH; r++) f.snap[r] = rmap[r];
            if (inst[i].dst_v) begin
              chk(rfree[out_rec[i].pdst] == 1, "allocated register was free");
              rfree[out_rec[i].pdst] = 0;
            end
            e = ref_ren(inst[i], in_grp[i], pk_known[i], pk_val[i], out_rec[i].pdst);
            chk(out_rec[i] == e, $sformatf("fresh record t=%0d slot %0d", t, i));
            if (e.form.kind == K_SELECT) n_select++;
            if (e.form.kind == K_NOOP) n_noop++;
            f.rec = e;
            q.push_back(f);
          end
      end
      @(posedge clk);
      for (int i = 0; i < W; i++)
        if (commit_v[i]) begin
          fl_t f;
          f = q.pop_front();
          if (f.rec.pdst_v) begin
            if (f.rec.upd_map) rfree[f.rec.old_pdst] = 1;
            else rfree[f.rec.pdst] = 1;
          end
        end
    end
    chk(n_replays > 0 && n_reexec > 0 && n_keep > 0 && n_select > 0 && n_noop > 0, "coverage");
    $display("replays=%0d reexec=%0d kept=%0d select=%0d noop=%0d", n_replays, n_reexec, n_keep, n_select, n_noop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
