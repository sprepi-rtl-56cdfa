// tb_sprepi_top: end-to-end self-checking testbench of the SPREPI front end.
//
// Two reduced-size front ends run the same kind of generated program through
// the behavioural back end (tb_backend), which executes micro-ops, resolves
// predicates late, commits in order and checks every committed result
// against an in-order interpreter:
//   * BrPred environment: branch-and-predicate history, on/off filter with a
//     short interval (200 committed predicated instructions, 20 errors) so
//     that both switching directions happen within the run;
//   * BrO environment: branch-only history, high-confidence predictions.
// Smaller tables (32-entry buffer, 8 groups, 64 physical registers, small
// predictor) make replays, group-table and register stalls frequent.
// Each mechanism of the design is counted and a mechanism that never
// occurred counts as a failure, as does a run that does not finish.
module tb_sprepi_top;
  import sprepi_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks, failures;

  // ---------------- BrPred environment ----------------
  logic [WIDTH-1:0]  a_in_valid, a_out_valid, a_cm_br_wrong;
  inst_t [WIDTH-1:0] a_in_inst;
  uop_t [WIDTH-1:0]  a_out_uop;
  logic [2:0]        a_acc, a_creq, a_cack;
  logic              a_cfv, a_res_v, a_flush, a_mode, a_drain, a_repl, a_done;
  flags_t            a_cf, a_res_flags;
  grp_t              a_res_grp;
  int                a_checks, a_fail, a_cnt [16];

  sprepi_top #(.BRPRED(1'b1), .DEPTH(32), .NGRP(8), .NPHYS(64), .TLOG(6),
               .BASE_ENTRIES(48), .BLOG(6), .INTERVAL(200), .THRESH(20)) dut_a (
    .clk, .rst_n, .in_valid(a_in_valid), .in_inst(a_in_inst), .in_accept_n(a_acc),
    .cur_flags_v(a_cfv), .cur_flags(a_cf), .out_valid(a_out_valid), .out_uop(a_out_uop),
    .res_v(a_res_v), .res_grp(a_res_grp), .res_flags(a_res_flags),
    .commit_req_n(a_creq), .cm_br_wrong(a_cm_br_wrong), .commit_ack_n(a_cack),
    .flush_all(a_flush), .mode_on(a_mode), .drain_req(a_drain), .replaying(a_repl),
    .exec_valid(1'b0), .exec_kind(K_NORMAL), .exec_op(3'd0), .exec_cond(C_AL),
    .exec_flags('0), .exec_a('0), .exec_b('0), .exec_old('0),
    .exec_out_valid(), .exec_result(), .exec_pred_true());

  tb_backend #(.NPROG(6000), .BRPRED(1'b1), .PHASE_LEN(1500), .DEPTH(32)) be_a (
    .clk, .rst_n, .in_valid(a_in_valid), .in_inst(a_in_inst), .in_accept_n(a_acc),
    .cur_flags_v(a_cfv), .cur_flags(a_cf), .out_valid(a_out_valid), .out_uop(a_out_uop),
    .res_v(a_res_v), .res_grp(a_res_grp), .res_flags(a_res_flags),
    .commit_req_n(a_creq), .cm_br_wrong(a_cm_br_wrong), .commit_ack_n(a_cack),
    .flush_all(a_flush), .mode_on(a_mode), .drain_req(a_drain), .replaying(a_repl),
    .done(a_done), .checks(a_checks), .failures(a_fail), .cnt(a_cnt));

  // ---------------- BrO environment ----------------
  logic [WIDTH-1:0]  b_in_valid, b_out_valid, b_cm_br_wrong;
  inst_t [WIDTH-1:0] b_in_inst;
  uop_t [WIDTH-1:0]  b_out_uop;
  logic [2:0]        b_acc, b_creq, b_cack;
  logic              b_cfv, b_res_v, b_flush, b_mode, b_drain, b_repl, b_done;
  flags_t            b_cf, b_res_flags;
  grp_t              b_res_grp;
  int                b_checks, b_fail, b_cnt [16];

  sprepi_top #(.BRPRED(1'b0), .DEPTH(32), .NGRP(8), .NPHYS(64), .TLOG(6),
               .BASE_ENTRIES(48), .BLOG(6)) dut_b (
    .clk, .rst_n, .in_valid(b_in_valid), .in_inst(b_in_inst), .in_accept_n(b_acc),
    .cur_flags_v(b_cfv), .cur_flags(b_cf), .out_valid(b_out_valid), .out_uop(b_out_uop),
    .res_v(b_res_v), .res_grp(b_res_grp), .res_flags(b_res_flags),
    .commit_req_n(b_creq), .cm_br_wrong(b_cm_br_wrong), .commit_ack_n(b_cack),
    .flush_all(b_flush), .mode_on(b_mode), .drain_req(b_drain), .replaying(b_repl),
    .exec_valid(1'b0), .exec_kind(K_NORMAL), .exec_op(3'd0), .exec_cond(C_AL),
    .exec_flags('0), .exec_a('0), .exec_b('0), .exec_old('0),
    .exec_out_valid(), .exec_result(), .exec_pred_true());

  tb_backend #(.NPROG(4000), .BRPRED(1'b0), .PHASE_LEN(1000), .DEPTH(32)) be_b (
    .clk, .rst_n, .in_valid(b_in_valid), .in_inst(b_in_inst), .in_accept_n(b_acc),
    .cur_flags_v(b_cfv), .cur_flags(b_cf), .out_valid(b_out_valid), .out_uop(b_out_uop),
    .res_v(b_res_v), .res_grp(b_res_grp), .res_flags(b_res_flags),
    .commit_req_n(b_creq), .cm_br_wrong(b_cm_br_wrong), .commit_ack_n(b_cack),
    .flush_all(b_flush), .mode_on(b_mode), .drain_req(b_drain), .replaying(b_repl),
    .done(b_done), .checks(b_checks), .failures(b_fail), .cnt(b_cnt));

  localparam string NAMES [16] = '{"fresh rename", "group head", "used prediction",
    "noop", "select", "replay pass", "re-executed", "kept result", "one-new-group split",
    "one-head commit limit", "full flush", "mode off", "mode on", "drain", "known at rename",
    "fetch stall"};

  task automatic need(input string env, input int idx, input int v);
    checks++;
    if (v == 0) begin
      failures++;
      $display("FAIL %s: mechanism '%s' never happened", env, NAMES[idx]);
    end
  endtask

  initial begin
    #200000000;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  initial begin
    checks = 0; failures = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (a_done && b_done);
    repeat (2) @(posedge clk);
    checks += a_checks + b_checks;
    failures += a_fail + b_fail;
    for (int i = 0; i < 16; i++) $display("  %-22s BrPred %6d  BrO %6d", NAMES[i], a_cnt[i], b_cnt[i]);
    for (int i = 0; i < 16; i++) begin
      need("BrPred", i, a_cnt[i]);
      if (i != 11 && i != 12 && i != 13 && i != 14) need("BrO", i, b_cnt[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
