// tb_onoff_filter: drives commit counts with phases of low and high
// misprediction rates, at INTERVAL = 200 and THRESH = 10 to keep the run
// short, and checks against a reference model: the decision cycle, the
// immediate switch off, drain_req until drained, then mode on with a
// one-cycle resync pulse.  One run is also made at the default interval
// of 10,000 to check the decision lands exactly there.
module tb_onoff_filter;
  localparam int W = 4;
  logic clk = 0, rst_n = 0;
  logic [2:0] pn = 0, mn = 0;
  logic drained = 0;
  logic mode_on, drain_req, resync, decide;
  logic mode_on2, drain_req2, resync2, decide2;
  int checks = 0, failures = 0;
  int cum, exp_full_at, icnt, mcnt, decisions, switches_off, switches_on, full_decide_at, cyc;
  logic rmode, rdrain;

  onoff_filter #(.W(W), .INTERVAL(200), .THRESH(10)) dut (
    .clk, .rst_n, .commit_pred_n(pn), .commit_mispred_n(mn), .drained,
    .mode_on, .drain_req, .resync, .decide);
  onoff_filter #(.W(W)) dut_full (
    .clk, .rst_n, .commit_pred_n(pn), .commit_mispred_n(3'd0), .drained,
    .mode_on(mode_on2), .drain_req(drain_req2), .resync(resync2), .decide(decide2));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_resync;
    icnt = 0; mcnt = 0; decisions = 0; switches_off = 0; switches_on = 0;
    rmode = 1; rdrain = 0; full_decide_at = -1; cyc = 0; cum = 0; exp_full_at = -1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 15000; t++) begin
      @(negedge clk);
      pn = 3'($urandom_range(0, W));
      // phases of 1000 cycles: good, near the threshold (intervals with
      // about THRESH mispredictions test the exact comparison), bad
      case ((t / 1000) % 3)
        0:       mn = 3'(($urandom_range(0, 100) == 0) ? 1 : 0);
        1:       mn = 3'(($urandom_range(0, 9) == 0) ? 1 : 0);
        default: mn = 3'($urandom_range(0, 1));
      endcase
      if (mn > pn) mn = pn;
      drained = ($urandom_range(0, 20) == 0);
      #1;
      // reference (state before the edge)
      exp_resync = 1'b0;
      if (icnt + pn >= 200) begin
        checks++;
        if (!decide) begin failures++; $display("FAIL no decide t=%0d", t); end
        decisions++;
        if (mcnt + mn >= 10) begin
          if (rmode) switches_off++;
          rmode = 0; rdrain = 0;
        end else if (!rmode) rdrain = 1;
        icnt = icnt + pn - 200; mcnt = 0;
      end else begin
        checks++;
        if (decide) begin failures++; $display("FAIL spurious decide t=%0d", t); end
        icnt += pn; mcnt += mn;
        if (rdrain && drained) begin rdrain = 0; rmode = 1; exp_resync = 1; switches_on++; end
      end
      cyc++;
      cum += pn;
      if (cum >= 10000 && exp_full_at < 0) exp_full_at = cyc;
      if (decide2 && full_decide_at < 0) full_decide_at = cyc;
      @(posedge clk); #1;
      checks++;
      if (mode_on !== rmode || drain_req !== rdrain || resync !== exp_resync) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d mode=%b/%b drain=%b/%b resync=%b/%b", t, mode_on, rmode, drain_req, rdrain, resync, exp_resync);
      end
    end
    checks++;
    if (switches_off == 0 || switches_on == 0) begin
      failures++; $display("FAIL mode never switched (off=%0d on=%0d)", switches_off, switches_on);
    end
    // default-size instance: must stay on (no mispredictions) and decide once
    // 10,000 predicated instructions have committed
    checks++;
    if (!mode_on2 || full_decide_at < 0 || full_decide_at != exp_full_at) begin failures++; $display("FAIL full-size filter"); end
    $display("decisions=%0d off=%0d on=%0d full_decide_cycle=%0d", decisions, switches_off, switches_on, full_decide_at);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
