// tb_global_history: random pushes on both sides, compared every cycle with
// a reference model that keeps each history as a queue of bits.  Also
// checks restore from the committed history and from a saved snapshot.
module tb_global_history;
  localparam int HLEN = 64, W = 4;
  logic clk = 0, rst_n = 0;
  logic [2:0] spec_n = 0, commit_n = 0;
  logic [W-1:0] spec_bits = 0, commit_bits = 0;
  logic restore_commit = 0, restore_v = 0;
  logic [HLEN-1:0] restore_hist = 0, spec_hist, commit_hist;
  logic [HLEN-1:0] rs, rc, snap;
  int checks = 0, failures = 0;

  global_history #(.HLEN(HLEN), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rs = '0; rc = '0; snap = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      spec_n = 3'($urandom_range(0, W));
      commit_n = 3'($urandom_range(0, W));
      spec_bits = W'($urandom);
      commit_bits = W'($urandom);
      restore_commit = ($urandom_range(0, 30) == 0);
      restore_v = ($urandom_range(0, 30) == 0);
      restore_hist = snap;
      // reference
      for (int i = 0; i < W; i++) if (i < commit_n) rc = {rc[HLEN-2:0], commit_bits[i]};
      if (restore_v) rs = snap;
      else if (restore_commit) rs = rc;
      else for (int i = 0; i < W; i++) if (i < spec_n) rs = {rs[HLEN-2:0], spec_bits[i]};
      if ($urandom_range(0, 10) == 0) snap = spec_hist;
      @(posedge clk); #1;
      checks++;
      if (spec_hist !== rs || commit_hist !== rc) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d spec=%h exp=%h commit=%h exp=%h", t, spec_hist, rs, commit_hist, rc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
