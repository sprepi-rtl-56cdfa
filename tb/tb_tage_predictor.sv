// tb_tage_predictor: behavioural check of the predicate predictor on a
// reduced geometry (64-entry tagged tables, 48-entry base table so that the
// non-power-of-two base indexing is exercised, all 12 components).
// Four predicates at four PCs are trained through the update port with a
// running global history that records every outcome:
//   A always true, B equal to the previous outcome, C = h[2] xor h[5]
//   (needs the tagged components: the base table cannot learn it), D random.
// Checks: predict and update ports agree on identical inputs; A, B and C
// reach at least 95% accuracy in the second half; high-confidence
// predictions of A, B, C are at least 98% right; D gets high confidence on
// less than 40% of its predictions.  The default geometry is built too,
// and must learn A.
module tb_tage_predictor;
  import sprepi_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] pc = 0, upd_pc = 0;
  logic [TAGE_MAXHIST-1:0] hist = 0, upd_hist = 0;
  logic pred, high_conf, upd_v = 0, upd_taken = 0, upd_pred;
  logic f_pred, f_conf, f_upred;
  int checks = 0, failures = 0;

  tage_predictor #(.TLOG(6), .TAG_W(9), .BASE_ENTRIES(48), .BLOG(6)) dut (.*);
  tage_predictor dut_full (.clk, .rst_n, .pc, .hist, .pred(f_pred), .high_conf(f_conf),
    .upd_v, .upd_pc, .upd_hist, .upd_taken, .upd_pred(f_upred));
  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [TAGE_MAXHIST-1:0] h;
    logic o;
    int which;
    int n [4], ok [4], hc [4], hcok [4], fa_ok, fa_n;
    logic [31:0] pcs [4];
    pcs[0] = 32'h0000_1000; pcs[1] = 32'h0000_2344; pcs[2] = 32'h0000_0a58; pcs[3] = 32'h0000_7f0c;
    for (int k = 0; k < 4; k++) begin n[k] = 0; ok[k] = 0; hc[k] = 0; hcok[k] = 0; end
    fa_ok = 0; fa_n = 0;
    h = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 12000; t++) begin
      @(negedge clk);
      which = t % 4;
      case (which)
        0: o = 1'b1;
        1: o = h[0];
        2: o = h[2] ^ h[5];
        default: o = 1'($urandom);
      endcase
      pc = pcs[which]; hist = h;
      upd_pc = pcs[which]; upd_hist = h; upd_taken = o; upd_v = 1;
      #1;
      checks++;
      if (pred !== upd_pred || f_pred !== f_upred) begin
        failures++; if (failures < 10) $display("FAIL port mismatch t=%0d", t);
      end
      if (t >= 6000) begin
        n[which]++;
        if (pred == o) ok[which]++;
        if (high_conf) begin hc[which]++; if (pred == o) hcok[which]++; end
        if (which == 0) begin fa_n++; if (f_pred == o) fa_ok++; end
      end
      @(posedge clk);
      h = {h[TAGE_MAXHIST-2:0], o};
    end
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (ok[k] * 100 < n[k] * 95) begin failures++; $display("FAIL accuracy %0d: %0d/%0d", k, ok[k], n[k]); end
      checks++;
      if (hc[k] == 0 || hcok[k] * 100 < hc[k] * 98) begin failures++; $display("FAIL confidence %0d: %0d/%0d", k, hcok[k], hc[k]); end
    end
    checks++;
    if (hc[3] * 10 > n[3] * 4) begin failures++; $display("FAIL random predicate confident %0d/%0d", hc[3], n[3]); end
    checks++;
    if (fa_ok != fa_n) begin failures++; $display("FAIL default geometry %0d/%0d", fa_ok, fa_n); end
    for (int k = 0; k < 4; k++) $display("pc%0d acc %0d/%0d highconf %0d (right %0d)", k, ok[k], n[k], hc[k], hcok[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
