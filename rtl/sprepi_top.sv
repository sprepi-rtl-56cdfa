// sprepi_top: front end of an out-of-order core that executes predicated
// (ARM-style) instructions with selective predicate prediction and selective
// replay.
//
// Fetched instructions (up to W = 4 per cycle) are split into predicated
// groups; the first instruction of each group gets one predicate prediction
// from a TAGE-style predictor.  When the prediction is used, predicated
// instructions are renamed as ordinary instructions (predicate true) or as
// no-ops (predicate false), which removes the multiple-definition problem;
// when it is not used, they are renamed as SELECT micro-ops that read the
// old destination value and are executed by pred_exec_unit.  Which
// predictions are used depends on the configuration parameter BRPRED:
//   BRPRED = 1  history holds branches and group predicates; use is
//               switched on and off every INTERVAL committed predicated
//               instructions by onoff_filter (switching on drains first);
//   BRPRED = 0  history holds branches only; a prediction is used when the
//               predictor reports high confidence.
// Every fetched instruction also enters inst_buffer.  When the back end
// resolves a group whose used prediction was wrong, the front end stops
// fetching, walks the map back to the group's first instruction (R_WALK,
// W entries per cycle, youngest first) and renames the buffered
// instructions again with the correct predicate (R_REPLAY, W per cycle),
// re-predicting later groups with the repaired history when BRPRED = 1.
// Replayed micro-ops carry the reexec bit when their result must be
// recomputed; all others keep their results and registers.
//
// Back-end interface: out_uop (registered, one cycle after acceptance or
// replay), res_* (flags of a group's predicate source), commit_req_n /
// commit_ack_n (at most one group head commits per cycle; the back end
// retries the rest), cm_br_wrong (a committing branch went the other way
// than fetched), flush_all (squash everything in flight, e.g. after a
// branch misprediction has committed), cur_flags_v/cur_flags (the flags the
// next fetched group reads are already computed, so the real predicate is
// used at rename).  The exec_* ports are one predicated ALU lane.
//
// Follows the document: one prediction per group, symmetric allocation,
// replay from a fetched-instruction buffer, history repair, the on/off
// and high-confidence filters and their constants.  This design's own
// choices: the back-end interface above, one new group per fetch cycle and
// per replay cycle, the walk-back map repair, and a single combinational
// front-end stage.  Also this design's own: commits stop at the first
// instruction of a walk or replay in progress; walk and replay lengths are
// counted (a full buffer has head == tail); and a replay waits one cycle
// when the group it is about to re-predict is resolved in that cycle.
// The reset is asynchronous for the flip-flops and also disables the
// group-head assertion, which is why lint reports rst_n as used both ways.
module sprepi_top
  import sprepi_pkg::*;
#(
  parameter bit BRPRED       = 1'b1,
  parameter int DEPTH        = ROB_SIZE,
  parameter int NGRP         = NUM_GRP,
  parameter int NPHYS        = NUM_PHYS,
  parameter int TLOG         = 10,
  parameter int BASE_ENTRIES = 3072,
  parameter int BLOG         = 12,
  parameter int INTERVAL     = 10000,
  parameter int THRESH       = 500
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // fetch
  input  logic [WIDTH-1:0]       in_valid,
  input  inst_t [WIDTH-1:0]      in_inst,
  output logic [$clog2(WIDTH+1)-1:0] in_accept_n,
  input  logic                   cur_flags_v,
  input  flags_t                 cur_flags,
  // renamed micro-ops
  output logic [WIDTH-1:0]       out_valid,
  output uop_t [WIDTH-1:0]       out_uop,
  // predicate resolution
  input  logic                   res_v,
  input  grp_t                   res_grp,
  input  flags_t                 res_flags,
  // commit
  input  logic [$clog2(WIDTH+1)-1:0] commit_req_n,
  input  logic [WIDTH-1:0]       cm_br_wrong,
  output logic [$clog2(WIDTH+1)-1:0] commit_ack_n,
  input  logic                   flush_all,
  // status
  output logic                   mode_on,
  output logic                   drain_req,
  output logic                   replaying,
  // predicated ALU lane
  input  logic                   exec_valid,
  input  kind_t                  exec_kind,
  input  logic [2:0]             exec_op,
  input  cond_t                  exec_cond,
  input  flags_t                 exec_flags,
  input  logic [31:0]            exec_a,
  input  logic [31:0]            exec_b,
  input  logic [31:0]            exec_old,
  output logic                   exec_out_valid,
  output logic [31:0]            exec_result,
  output logic                   exec_pred_true
);
  localparam int W  = WIDTH;
  localparam int NW = $clog2(W + 1);
  localparam int HL = TAGE_MAXHIST;

  typedef enum logic [1:0] {S_RUN, S_WALK, S_REPLAY} state_t;
  state_t state_q;
  idx_t   wk_ptr_q, target_q, rp_ptr_q;
  // entries still to undo in a walk (a full buffer has head == tail, so
  // lengths are counted rather than taken from pointer differences)
  logic [$clog2(DEPTH+1)-1:0] wk_rem_q;

  function automatic idx_t wrap(input int x);
    return idx_t'(x & (DEPTH - 1));
  endfunction

  // ---------------- sub-block signals ----------------
  logic [HL-1:0] spec_hist, commit_hist;
  logic [NW-1:0] h_spec_n, h_commit_n;
  logic [W-1:0]  h_spec_bits, h_commit_bits;
  logic          h_restore_v, h_restore_commit;
  logic [HL-1:0] h_restore_hist;

  logic [31:0]   tp_pc;
  logic [HL-1:0] tp_hist, tu_hist;
  logic          tp_pred, tp_conf, tu_v, tu_taken, tu_pred;

  logic          of_resync, of_decide;
  logic [NW-1:0] of_pred_n, of_misp_n;

  logic          tr_stall;
  logic [NW-1:0] tr_accept_n;
  logic [W-1:0]  tr_in_grp, tr_head;
  grp_t [W-1:0]  tr_grp;
  logic          tr_new;
  logic [$clog2(W)-1:0] tr_new_slot;
  cond_t         tr_new_cond;

  logic          gt_alloc_v, gt_alloc_known, gt_alloc_act, gt_alloc_closed, gt_avail;
  logic          gt_pred_v, gt_used_v;
  grp_t          gt_next;
  logic          gt_close_v;
  idx_t          gt_close_idx;
  grp_t [W-1:0]  gt_rd_grp;
  logic [W-1:0]  gt_rd_c0, gt_rd_known, gt_rd_val, gt_rd_res;
  logic          gt_rp_v, gt_rp_pred, gt_rp_used;
  logic          gt_res_misp, gt_res_act;
  idx_t          gt_res_head;
  logic [HL-1:0] gt_res_hist;
  grp_t          gt_cm_grp;
  logic [31:0]   gt_cm_pc;
  logic          gt_cm_act, gt_cm_res, gt_cm_pred, gt_cm_used;
  logic [W-1:0]  cm_v;
  idx_t [W-1:0]  cm_idx;
  logic [$clog2(NGRP+1)-1:0] gt_count;

  logic [NW-1:0] ib_alloc_n;
  bent_t [W-1:0] ib_alloc_ent, al_ent, ib_rd_ent, ib_cm_ent;
  idx_t          ib_tail, ib_head;
  logic [$clog2(DEPTH+1)-1:0] ib_count, ib_free;
  logic [W-1:0]  ib_wr_v;
  idx_t [W-1:0]  ib_wr_idx, ib_rd_idx;
  rrec_t [W-1:0] ib_wr_rec;

  ren_op_t       rn_op;
  logic          rn_inv_clear;
  logic [W-1:0]  rn_v, rn_in_grp, rn_known, rn_val, rn_reexec;
  inst_t [W-1:0] rn_inst;
  rrec_t [W-1:0] rn_prev, rn_rec;
  logic [$clog2(NPHYS+1)-1:0] rn_free;

  logic [NW-1:0]        rp_n, wk_n;
  logic [$clog2(W)-1:0] rp_head_slot;
  logic                 rp_has_head;
  logic          known_pass;

  // ---------------- blocks ----------------
  global_history #(.HLEN(HL), .W(W)) u_hist (
    .clk, .rst_n,
    .spec_n(h_spec_n), .spec_bits(h_spec_bits),
    .commit_n(h_commit_n), .commit_bits(h_commit_bits),
    .restore_commit(h_restore_commit), .restore_v(h_restore_v),
    .restore_hist(h_restore_hist),
    .spec_hist, .commit_hist);

  tage_predictor #(.TLOG(TLOG), .BASE_ENTRIES(BASE_ENTRIES), .BLOG(BLOG)) u_tage (
    .clk, .rst_n,
    .pc(tp_pc), .hist(tp_hist), .pred(tp_pred), .high_conf(tp_conf),
    .upd_v(tu_v), .upd_pc(gt_cm_pc), .upd_hist(tu_hist), .upd_taken(tu_taken),
    .upd_pred(tu_pred));

  generate
    if (BRPRED) begin : g_onoff
      onoff_filter #(.W(W), .INTERVAL(INTERVAL), .THRESH(THRESH)) u_onoff (
        .clk, .rst_n,
        .commit_pred_n(of_pred_n), .commit_mispred_n(of_misp_n),
        .drained(ib_count == 0 && state_q == S_RUN),
        .mode_on, .drain_req, .resync(of_resync), .decide(of_decide));
    end else begin : g_noonoff
      assign mode_on   = 1'b1;
      assign drain_req = 1'b0;
      assign of_resync = 1'b0;
      assign of_decide = 1'b0;
    end
  endgenerate

  pred_group_tracker #(.W(W)) u_track (
    .clk, .rst_n, .flush(flush_all), .stall(tr_stall),
    .valid(in_valid), .inst(in_inst), .next_grp(gt_next), .grp_avail(gt_avail),
    .accept_n(tr_accept_n), .in_grp(tr_in_grp), .grp_head(tr_head), .grp(tr_grp),
    .new_grp(tr_new), .new_slot(tr_new_slot), .new_cond(tr_new_cond));

  group_table #(.N(NGRP), .HLEN(HL), .W(W)) u_gt (
    .clk, .rst_n, .flush(flush_all),
    .alloc_v(gt_alloc_v), .alloc_cond(tr_new_cond), .alloc_pc(in_inst[tr_new_slot].pc),
    .alloc_pred(gt_pred_v), .alloc_used(gt_used_v), .alloc_known(gt_alloc_known),
    .alloc_actual(gt_alloc_act), .alloc_head_idx(wrap(int'(ib_tail) + int'(tr_new_slot))),
    .alloc_hist(tp_hist), .alloc_closed(gt_alloc_closed),
    .next_grp(gt_next), .avail(gt_avail),
    .close_v(gt_close_v), .close_idx(gt_close_idx),
    .rd_grp(gt_rd_grp), .rd_c0(gt_rd_c0), .rd_known(gt_rd_known), .rd_val(gt_rd_val),
    .rd_resolved(gt_rd_res),
    .repred_v(gt_rp_v), .repred_grp(gt_rd_grp[rp_head_slot]), .repred_pred(gt_rp_pred),
    .repred_used(gt_rp_used), .repred_hist(tp_hist),
    .res_v, .res_grp, .res_flags,
    .res_mispred(gt_res_misp), .res_actual(gt_res_act), .res_head_idx(gt_res_head),
    .res_hist(gt_res_hist),
    .cm_grp(gt_cm_grp), .cm_pc(gt_cm_pc), .cm_actual(gt_cm_act), .cm_resolved(gt_cm_res),
    .cm_pred(gt_cm_pred), .cm_used(gt_cm_used),
    .commit_v(cm_v), .commit_idx(cm_idx), .count(gt_count));

  inst_buffer #(.DEPTH(DEPTH), .W(W)) u_buf (
    .clk, .rst_n, .flush(flush_all),
    .alloc_n(ib_alloc_n), .alloc_ent(ib_alloc_ent),
    .tail(ib_tail), .head(ib_head), .count(ib_count), .free_n(ib_free),
    .wr_v(ib_wr_v), .wr_idx(ib_wr_idx), .wr_rec(ib_wr_rec),
    .rd_idx(ib_rd_idx), .rd_ent(ib_rd_ent), .cm_ent(ib_cm_ent),
    .commit_n(commit_ack_n));

  pred_rename #(.W(W), .NPHYS(NPHYS)) u_ren (
    .clk, .rst_n, .flush(flush_all), .inv_clear(rn_inv_clear), .op(rn_op),
    .slot_v(rn_v), .inst(rn_inst), .in_grp(rn_in_grp), .pk_known(rn_known),
    .pk_val(rn_val), .prev_rec(rn_prev), .out_rec(rn_rec), .out_reexec(rn_reexec),
    .commit_v(cm_v), .commit_ent(ib_cm_ent), .free_cnt(rn_free));

  pred_exec_unit #(.DW(32)) u_exec (
    .clk, .rst_n, .in_valid(exec_valid), .kind(exec_kind), .op(exec_op),
    .cond(exec_cond), .flags(exec_flags), .a(exec_a), .b(exec_b), .old(exec_old),
    .out_valid(exec_out_valid), .result(exec_result), .pred_true(exec_pred_true));

  // ---------------- misprediction handling ----------------
  function automatic int age(input idx_t x, input idx_t h);
    return int'(idx_t'(x - h)) & (DEPTH - 1);
  endfunction

  logic start_replay;   // a used prediction was wrong and needs a replay now
  always_comb begin
    start_replay = 1'b0;
    if (gt_res_misp && !flush_all) begin
      unique case (state_q)
        S_RUN:    start_replay = 1'b1;
        S_WALK:   start_replay = age(gt_res_head, ib_head) < age(target_q, ib_head);
        default:  start_replay = age(gt_res_head, ib_head) < age(rp_ptr_q, ib_head);
      endcase
    end
  end

  // ---------------- per-cycle slot selection ----------------

  always_comb begin
    int  avail_n;
    logic stop;
    avail_n      = 0;
    rp_n         = '0;
    rp_head_slot = '0;
    rp_has_head  = 1'b0;
    wk_n         = '0;
    stop         = 1'b0;
    for (int i = 0; i < W; i++) ib_rd_idx[i] = '0;
    if (state_q == S_WALK) begin
      avail_n = int'(wk_rem_q);
      for (int i = 0; i < W; i++) begin
        ib_rd_idx[i] = wrap(int'(wk_ptr_q) - 1 - i);
        if (i < avail_n) wk_n = wk_n + 1'b1;
      end
    end else if (state_q == S_REPLAY) begin
      avail_n = int'(ib_count) - age(rp_ptr_q, ib_head);
      for (int i = 0; i < W; i++) begin
        ib_rd_idx[i] = wrap(int'(rp_ptr_q) + i);
        if (i < avail_n && !stop) begin
          if (ib_rd_ent[i].grp_head) begin
            if (rp_has_head) stop = 1'b1;
            else begin
              rp_has_head  = 1'b1;
              rp_head_slot = ($clog2(W))'(i);
            end
          end
          if (!stop) rp_n = rp_n + 1'b1;
        end
      end
      // The group about to be re-predicted is being resolved this cycle:
      // wait one cycle and rename it with its real predicate instead.
      if (rp_has_head && res_v && res_grp == ib_rd_ent[rp_head_slot].grp) begin
        rp_n        = '0;
        rp_has_head = 1'b0;
      end
    end
  end

  // ---------------- predictor read port ----------------
  // The group head sees the speculative history plus the directions of the
  // branches ahead of it in the same bundle.
  always_comb begin
    logic [HL-1:0] h;
    h = spec_hist;
    if (state_q == S_RUN) begin
      for (int i = 0; i < W; i++)
        if (i < int'(tr_new_slot) && in_inst[i].is_branch)
          h = {h[HL-2:0], in_inst[i].br_taken};
      tp_pc = in_inst[tr_new_slot].pc;
    end else begin
      for (int i = 0; i < W; i++)
        if (i < int'(rp_head_slot) && ib_rd_ent[i].inst.is_branch)
          h = {h[HL-2:0], ib_rd_ent[i].inst.br_taken};
      tp_pc = ib_rd_ent[rp_head_slot].inst.pc;
    end
    tp_hist = h;
  end

  // rename records go back into the buffer
  always_comb
    for (int i = 0; i < W; i++) begin
      ib_alloc_ent[i]     = al_ent[i];
      ib_alloc_ent[i].rec = rn_rec[i];
      ib_wr_rec[i]        = rn_rec[i];
    end

  // ---------------- fetch / replay / walk datapath ----------------
  always_comb begin
    logic          any_setter;
    int            last_setter;
    logic          newv, newknown;
    logic [NW-1:0] sn;
    logic [W-1:0]  sb;
    logic          gval;

    tr_stall = (state_q != S_RUN) || drain_req || gt_res_misp || flush_all
               || (rn_free < ($clog2(NPHYS+1))'(W)) || (ib_free < ($clog2(DEPTH+1))'(W));
    in_accept_n = tr_accept_n;

    rn_op        = R_IDLE;
    rn_inv_clear = start_replay;
    rn_v = '0; rn_in_grp = '0; rn_known = '0; rn_val = '0;
    rn_inst = '0; rn_prev = '0;
    gt_rd_grp = '0; gt_rd_c0 = '0;
    gt_alloc_v = 1'b0; gt_alloc_known = 1'b0; gt_alloc_act = 1'b0; gt_alloc_closed = 1'b0;
    gt_pred_v = 1'b0; gt_used_v = 1'b0;
    gt_close_v = 1'b0; gt_close_idx = '0;
    gt_rp_v = 1'b0; gt_rp_pred = 1'b0; gt_rp_used = 1'b0;
    ib_alloc_n = '0;
    for (int i = 0; i < W; i++) begin
      al_ent[i] = '0;
    end
    ib_wr_v = '0; ib_wr_idx = '0;
    sn = '0; sb = '0;
    newknown = 1'b0; newv = 1'b0;
    gval = 1'b0;
    any_setter = 1'b0; last_setter = 0;

    if (state_q == S_RUN) begin
      for (int i = 0; i < W; i++)
        if (i < int'(tr_accept_n) && in_inst[i].sets_flags) begin
          any_setter  = 1'b1;
          last_setter = i;
        end
      // predicate already known at rename
      newknown = cur_flags_v;
      for (int i = 0; i < W; i++)
        if (i < int'(tr_new_slot) && in_inst[i].sets_flags) newknown = 1'b0;
      newv = known_pass;
      gt_pred_v      = tp_pred;
      gt_used_v      = BRPRED ? mode_on : tp_conf;
      gt_alloc_v     = tr_new && (int'(tr_accept_n) > int'(tr_new_slot));
      gt_alloc_known = newknown;
      gt_alloc_act   = newv;
      gt_alloc_closed = any_setter && (last_setter >= int'(tr_new_slot));
      gt_close_v     = any_setter;
      gt_close_idx   = wrap(int'(ib_tail) + last_setter);
      gval           = newknown ? newv : tp_pred;
      for (int i = 0; i < W; i++) begin
        gt_rd_grp[i] = tr_grp[i];
        gt_rd_c0[i]  = in_inst[i].cond[0];
        if (i < int'(tr_accept_n)) begin
          rn_v[i]      = 1'b1;
          rn_inst[i]   = in_inst[i];
          rn_in_grp[i] = tr_in_grp[i];
          if (gt_alloc_v && tr_grp[i] == gt_next) begin
            rn_known[i] = gt_used_v || newknown;
            rn_val[i]   = gval ^ (in_inst[i].cond[0] != tr_new_cond[0]);
          end else begin
            rn_known[i] = gt_rd_known[i];
            rn_val[i]   = gt_rd_val[i];
          end
          al_ent[i].inst     = in_inst[i];
          al_ent[i].in_grp   = tr_in_grp[i];
          al_ent[i].grp_head = tr_head[i];
          al_ent[i].grp      = tr_grp[i];
          if (in_inst[i].is_branch) begin
            sb[int'(sn)] = in_inst[i].br_taken; sn = sn + 1'b1;
          end else if (BRPRED && tr_head[i]) begin
            sb[int'(sn)] = gval; sn = sn + 1'b1;
          end
        end
      end
      if (tr_accept_n != 0) rn_op = R_FRESH;
      ib_alloc_n = tr_accept_n;
    end else if (state_q == S_WALK) begin
      rn_op = R_WALK;
      for (int i = 0; i < W; i++)
        if (i < int'(wk_n)) begin
          rn_v[i]    = 1'b1;
          rn_inst[i] = ib_rd_ent[i].inst;
          rn_prev[i] = ib_rd_ent[i].rec;
        end
    end else begin
      rn_op = (rp_n != 0) ? R_REPLAY : R_IDLE;
      // re-predict the group head with the repaired history (BRPRED only)
      gt_rp_v    = BRPRED && rp_has_head && !start_replay;
      gt_rp_pred = tp_pred;
      gt_rp_used = mode_on;
      for (int i = 0; i < W; i++) begin
        gt_rd_grp[i] = ib_rd_ent[i].grp;
        gt_rd_c0[i]  = ib_rd_ent[i].inst.cond[0];
      end
      for (int i = 0; i < W; i++)
        if (i < int'(rp_n)) begin
          rn_v[i]      = 1'b1;
          rn_inst[i]   = ib_rd_ent[i].inst;
          rn_in_grp[i] = ib_rd_ent[i].in_grp;
          rn_prev[i]   = ib_rd_ent[i].rec;
          if (BRPRED && rp_has_head && ib_rd_ent[i].grp == ib_rd_ent[rp_head_slot].grp
              && !gt_rd_res[i]) begin
            rn_known[i] = mode_on;
            rn_val[i]   = tp_pred ^ (ib_rd_ent[i].inst.cond[0]
                                     != ib_rd_ent[rp_head_slot].inst.cond[0]);
          end else begin
            rn_known[i] = gt_rd_known[i];
            rn_val[i]   = gt_rd_val[i];
          end
          ib_wr_v[i]   = !start_replay;
          ib_wr_idx[i] = ib_rd_idx[i];
          if (BRPRED) begin
            if (ib_rd_ent[i].inst.is_branch) begin
              sb[int'(sn)] = ib_rd_ent[i].inst.br_taken; sn = sn + 1'b1;
            end else if (ib_rd_ent[i].grp_head) begin
              // value of the head's own condition
              sb[int'(sn)] = gt_rd_res[i] ? gt_rd_val[i] : tp_pred; sn = sn + 1'b1;
            end
          end
        end
      if (start_replay) rn_op = R_IDLE;
    end
    h_spec_n    = sn;
    h_spec_bits = sb;
  end

  cond_eval u_known (.cond(tr_new_cond), .flags(cur_flags), .pass(known_pass));

  // history restore
  always_comb begin
    h_restore_v      = BRPRED && start_replay;
    h_restore_hist   = gt_res_hist;
    h_restore_commit = flush_all || of_resync;
  end

  // ---------------- commit ----------------
  // Instructions from the replay start onwards may still be re-executed, so
  // only older ones may commit while a walk or replay is under way (or about
  // to start).
  int cm_lim;
  always_comb begin
    unique case (state_q)
      S_RUN:   cm_lim = DEPTH;
      S_WALK:  cm_lim = age(target_q, ib_head);
      default: cm_lim = age(rp_ptr_q, ib_head);
    endcase
    if (gt_res_misp && age(gt_res_head, ib_head) < cm_lim) cm_lim = age(gt_res_head, ib_head);
  end

  always_comb begin
    logic          one_head;
    logic [HL-1:0] hc;
    logic [NW-1:0] cn;
    logic [W-1:0]  cb;
    logic [NW-1:0] pn;
    commit_ack_n = '0;
    cm_v         = '0;
    one_head     = 1'b0;
    gt_cm_grp    = '0;
    hc           = commit_hist;
    tu_hist      = commit_hist;
    cn = '0; cb = '0; pn = '0;
    tu_v = 1'b0;
    for (int i = 0; i < W; i++) begin
      cm_idx[i] = wrap(int'(ib_head) + i);
      if (i < int'(commit_req_n) && i < int'(ib_count) && i < cm_lim && !flush_all
          && !(ib_cm_ent[i].grp_head && one_head) && int'(commit_ack_n) == i) begin
        commit_ack_n = commit_ack_n + 1'b1;
        cm_v[i] = 1'b1;
        if (ib_cm_ent[i].in_grp) pn = pn + 1'b1;
        if (ib_cm_ent[i].inst.is_branch) begin
          cb[int'(cn)] = ib_cm_ent[i].inst.br_taken ^ cm_br_wrong[i];
          hc = {hc[HL-2:0], cb[int'(cn)]};
          cn = cn + 1'b1;
        end else if (ib_cm_ent[i].grp_head) begin
          one_head  = 1'b1;
          gt_cm_grp = ib_cm_ent[i].grp;
          tu_hist   = hc;
          tu_v      = gt_cm_res;
          if (BRPRED) begin
            cb[int'(cn)] = gt_cm_act;  // value of the head's own condition
            hc = {hc[HL-2:0], cb[int'(cn)]};
            cn = cn + 1'b1;
          end
        end
      end
    end
    tu_taken      = gt_cm_act;
    h_commit_n    = cn;
    h_commit_bits = cb;
    of_pred_n     = pn;
  end

  // committed mispredictions of the predictor, for the on/off filter
  assign of_misp_n = NW'(tu_v && (tu_pred != gt_cm_act));


  // ---------------- state ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_RUN;
      wk_ptr_q <= '0;
      target_q <= '0;
      rp_ptr_q <= '0;
      wk_rem_q <= '0;
    end else if (flush_all) begin
      state_q <= S_RUN;
    end else if (start_replay) begin
      state_q  <= S_WALK;
      target_q <= gt_res_head;
      wk_ptr_q <= (state_q == S_RUN)  ? ib_tail :
                  (state_q == S_WALK) ? wrap(int'(wk_ptr_q) - int'(wk_n)) : rp_ptr_q;
      wk_rem_q <= ($clog2(DEPTH+1))'(
                  (state_q == S_RUN)  ? int'(ib_count) - age(gt_res_head, ib_head) :
                  (state_q == S_WALK) ? int'(wk_rem_q) - int'(wk_n) + age(target_q, ib_head)
                                        - age(gt_res_head, ib_head) :
                                        age(rp_ptr_q, ib_head) - age(gt_res_head, ib_head));
    end else if (state_q == S_WALK) begin
      wk_ptr_q <= wrap(int'(wk_ptr_q) - int'(wk_n));
      wk_rem_q <= wk_rem_q - ($clog2(DEPTH+1))'(wk_n);
      if (int'(wk_n) == int'(wk_rem_q)) begin
        state_q  <= S_REPLAY;
        rp_ptr_q <= target_q;
      end
    end else if (state_q == S_REPLAY) begin
      rp_ptr_q <= wrap(int'(rp_ptr_q) + int'(rp_n));
      if (int'(rp_n) == int'(ib_count) - age(rp_ptr_q, ib_head)) state_q <= S_RUN;
    end
  end

  assign replaying = (state_q != S_RUN);

  // ---------------- micro-op output ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= '0;
      out_uop   <= '0;
    end else begin
      for (int i = 0; i < W; i++) begin
        out_valid[i] <= (rn_op == R_FRESH || rn_op == R_REPLAY) && rn_v[i] && !flush_all;
        out_uop[i].idx      <= (rn_op == R_FRESH) ? wrap(int'(ib_tail) + i) : ib_rd_idx[i];
        out_uop[i].grp      <= (rn_op == R_FRESH) ? tr_grp[i] : ib_rd_ent[i].grp;
        out_uop[i].in_grp   <= rn_in_grp[i];
        out_uop[i].grp_head <= (rn_op == R_FRESH) ? tr_head[i] : ib_rd_ent[i].grp_head;
        out_uop[i].cond     <= rn_inst[i].cond;
        out_uop[i].pdst_v   <= rn_rec[i].pdst_v;
        out_uop[i].pdst     <= rn_rec[i].pdst;
        out_uop[i].form     <= rn_rec[i].form;
        out_uop[i].replay   <= (rn_op == R_REPLAY);
        out_uop[i].reexec   <= (rn_op == R_REPLAY) && rn_reexec[i];
      end
    end
  end

  // Only one new group may open per fetch cycle.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(tr_head & ((W'(1) << tr_accept_n) - 1'b1)));
endmodule
