// tb_inst_buffer: random allocation, commit and rename-record rewrites on a
// 16-entry buffer, with a reference array indexed by slot.  Checks the
// head/tail/count/free outputs, that entries read back at arbitrary slots
// and at the head hold what was written, and flush.  One run is made on the
// default 128-entry buffer to fill it completely.
module tb_inst_buffer;
  import sprepi_pkg::*;
  localparam int D = 16, W = 4;
  logic clk = 0, rst_n = 0, flush = 0;
  logic [2:0] alloc_n = 0, commit_n = 0;
  bent_t [W-1:0] alloc_ent;
  idx_t tail, head;
  logic [4:0] count, free_n;
  logic [W-1:0] wr_v = 0;
  idx_t [W-1:0] wr_idx, rd_idx;
  rrec_t [W-1:0] wr_rec;
  bent_t [W-1:0] rd_ent, cm_ent;
  // full-size instance
  logic [2:0] f_alloc_n = 0;
  idx_t f_tail, f_head;
  logic [7:0] f_count, f_free;
  bent_t [W-1:0] f_rd, f_cm;
  int checks = 0, failures = 0;

  inst_buffer #(.DEPTH(D), .W(W)) dut (.*);
  inst_buffer dut_full (.clk, .rst_n, .flush(1'b0), .alloc_n(f_alloc_n), .alloc_ent,
    .tail(f_tail), .head(f_head), .count(f_count), .free_n(f_free),
    .wr_v('0), .wr_idx, .wr_rec, .rd_idx, .rd_ent(f_rd), .cm_ent(f_cm), .commit_n(3'd0));
  always #5 clk = ~clk;

  bent_t r_mem [D];
  int r_h, r_t;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fr, cnt;
    r_h = 0; r_t = 0;
    for (int e = 0; e < D; e++) r_mem[e] = '0;
    alloc_ent = '0; wr_idx = '0; rd_idx = '0; wr_rec = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      cnt = r_t - r_h; fr = D - cnt;
      checks++;
      if (count != 5'(cnt) || free_n != 5'(fr) || head != idx_t'(r_h % D) || tail != idx_t'(r_t % D)) begin
        failures++; if (failures < 10) $display("FAIL pointers t=%0d", t);
      end
      for (int i = 0; i < W; i++) begin
        checks++;
        if (i < cnt && cm_ent[i] !== r_mem[(r_h + i) % D]) begin
          failures++; if (failures < 10) $display("FAIL head read t=%0d i=%0d", t, i);
        end
      end
      flush = ($urandom_range(0, 200) == 0);
      alloc_n = 3'($urandom_range(0, (fr < W) ? fr : W));
      commit_n = 3'($urandom_range(0, (cnt < W) ? cnt : W));
      for (int i = 0; i < W; i++) begin
        alloc_ent[i] = bent_t'({$urandom, $urandom, $urandom, $urandom});
        rd_idx[i] = idx_t'($urandom_range(0, D-1));
        wr_v[i] = (cnt > 0) && ($urandom_range(0, 2) == 0);
        wr_idx[i] = idx_t'((r_h + $urandom_range(0, (cnt > 0) ? cnt - 1 : 0)) % D);
        wr_rec[i] = rrec_t'({$urandom, $urandom});
      end
      // distinct write slots
      for (int i = 1; i < W; i++) for (int j = 0; j < i; j++) if (wr_idx[i] == wr_idx[j]) wr_v[i] = 0;
      #1;
      for (int i = 0; i < W; i++) begin
        checks++;
        if (rd_ent[i] !== r_mem[rd_idx[i]]) begin
          failures++; if (failures < 10) $display("FAIL rd t=%0d", t);
        end
      end
      @(posedge clk);
      if (flush) begin r_h = 0; r_t = 0; end
      else begin
        for (int i = 0; i < W; i++) if (i < alloc_n) r_mem[(r_t + i) % D] = alloc_ent[i];
        for (int i = 0; i < W; i++) if (wr_v[i]) r_mem[wr_idx[i]].rec = wr_rec[i];
        r_t += alloc_n; r_h += commit_n;
      end
    end
    // fill the default-size buffer: 128 entries, 4 per cycle
    @(negedge clk);
    flush = 0; alloc_n = 0; commit_n = 0; wr_v = '0;
    for (int c = 0; c < 32; c++) begin
      @(negedge clk);
      f_alloc_n = 3'd4;
      @(posedge clk);
    end
    @(negedge clk);
    f_alloc_n = 0;
    #1;
    checks++;
    if (f_count != 8'd128 || f_free != 8'd0) begin failures++; $display("FAIL full count %0d", f_count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
