// tb_sprepi_full: the SPREPI front end at its default size (4-wide, 128-entry
// instruction buffer, 256 physical registers, 32 groups, 15K-entry TAGE
// predictor with 640-bit history, on/off decision every 10,000 committed
// predicated instructions with a 500-misprediction threshold), run through
// the behavioural back end for 30,000 dynamic instructions, enough for
// the on/off filter to make its decisions.  Every committed
// result is checked against an in-order interpreter; the mechanism counters
// are printed and the basic ones (renaming, prediction use, replay) must be
// non-zero.
module tb_sprepi_full;
  import sprepi_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [WIDTH-1:0]  in_valid, out_valid, cm_br_wrong;
  inst_t [WIDTH-1:0] in_inst;
  uop_t [WIDTH-1:0]  out_uop;
  logic [2:0]        acc, creq, cack;
  logic              cfv, res_v, flush, mode, drain, repl, done;
  flags_t            cf, res_flags;
  grp_t              res_grp;
  int                be_checks, be_fail, cnt [16];
  int                checks, failures;

  sprepi_top dut (
    .clk, .rst_n, .in_valid, .in_inst, .in_accept_n(acc),
    .cur_flags_v(cfv), .cur_flags(cf), .out_valid, .out_uop,
    .res_v, .res_grp, .res_flags,
    .commit_req_n(creq), .cm_br_wrong, .commit_ack_n(cack),
    .flush_all(flush), .mode_on(mode), .drain_req(drain), .replaying(repl),
    .exec_valid(1'b0), .exec_kind(K_NORMAL), .exec_op(3'd0), .exec_cond(C_AL),
    .exec_flags('0), .exec_a('0), .exec_b('0), .exec_old('0),
    .exec_out_valid(), .exec_result(), .exec_pred_true());

  tb_backend #(.NPROG(30000), .BRPRED(1'b1), .PHASE_LEN(6000), .DEPTH(ROB_SIZE),
               .FLUSH_ODDS(400)) be (
    .clk, .rst_n, .in_valid, .in_inst, .in_accept_n(acc),
    .cur_flags_v(cfv), .cur_flags(cf), .out_valid, .out_uop,
    .res_v, .res_grp, .res_flags,
    .commit_req_n(creq), .cm_br_wrong, .commit_ack_n(cack),
    .flush_all(flush), .mode_on(mode), .drain_req(drain), .replaying(repl),
    .done, .checks(be_checks), .failures(be_fail), .cnt);

  initial begin
    #20000000;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  initial begin
    checks = 0; failures = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done);
    repeat (2) @(posedge clk);
    checks = be_checks; failures = be_fail;
    $display("renamed %0d heads %0d used %0d noop %0d select %0d replays %0d reexec %0d kept %0d flush %0d off %0d on %0d",
             cnt[0], cnt[1], cnt[2], cnt[3], cnt[4], cnt[5], cnt[6], cnt[7], cnt[10], cnt[11], cnt[12]);
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (cnt[i] == 0) begin failures++; $display("FAIL counter %0d is zero", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
