// tb_group_table: random allocation, read, re-prediction, resolution,
// closing and commit traffic on an 8-entry table, against a reference
// model kept in the testbench.  Checks the free-entry handshake, the value
// seen by readers (real predicate once resolved, prediction otherwise,
// inverted for the opposite condition), misprediction detection on
// resolution, and that groups leave only after their closing instruction
// commits, oldest first.
module tb_group_table;
  import sprepi_pkg::*;
  localparam int N = 8, W = 4, HL = 16;
  logic clk = 0, rst_n = 0, flush = 0;
  logic alloc_v = 0, alloc_pred = 0, alloc_used = 0, alloc_known = 0, alloc_actual = 0, alloc_closed = 0;
  cond_t alloc_cond = C_EQ;
  logic [31:0] alloc_pc = 0;
  idx_t alloc_head_idx = 0;
  logic [HL-1:0] alloc_hist = 0;
  grp_t next_grp;
  logic avail;
  logic close_v = 0;
  idx_t close_idx = 0;
  grp_t [W-1:0] rd_grp;
  logic [W-1:0] rd_c0, rd_known, rd_val, rd_resolved;
  logic repred_v = 0, repred_pred = 0, repred_used = 0;
  grp_t repred_grp = 0;
  logic [HL-1:0] repred_hist = 0;
  logic res_v = 0;
  grp_t res_grp = 0;
  flags_t res_flags = 0;
  logic res_mispred, res_actual;
  idx_t res_head_idx;
  logic [HL-1:0] res_hist;
  grp_t cm_grp = 0;
  logic [31:0] cm_pc;
  logic cm_actual, cm_resolved, cm_pred, cm_used;
  logic [W-1:0] commit_v = 0;
  idx_t [W-1:0] commit_idx;
  logic [3:0] count;
  int checks = 0, failures = 0;

  group_table #(.N(N), .HLEN(HL), .W(W)) dut (.*);
  always #5 clk = ~clk;

  // reference
  cond_t r_cond [N]; logic r_pred [N], r_used [N], r_res [N], r_act [N], r_closed [N];
  idx_t r_cidx [N]; idx_t r_head [N]; logic [HL-1:0] r_hist [N];
  int r_h, r_t;      // head / tail counters
  int n_misp, n_freed;

  function automatic logic ev(input cond_t c, input flags_t f);
    case (c[3:1])
      0: return f.z ^ c[0];  1: return f.c ^ c[0];  2: return f.n ^ c[0];  3: return f.v ^ c[0];
      4: return (f.c & ~f.z) ^ c[0];  5: return (f.n == f.v) ^ c[0];
      6: return (~f.z & (f.n == f.v)) ^ c[0];  default: return 1;
    endcase
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int seq_idx;   // instruction slot counter for closing indices
  initial begin
    int g, e, nf;
    logic [W-1:0] done_mask;
    r_h = 0; r_t = 0; n_misp = 0; n_freed = 0; seq_idx = 0;
    rd_grp = '0; rd_c0 = '0; commit_idx = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      alloc_v = 0; close_v = 0; res_v = 0; repred_v = 0; commit_v = '0;
      // check free-entry flag
      checks++;
      if (avail != (r_t - r_h < N) || count != 4'(r_t - r_h) || next_grp != grp_t'(r_t % N)) begin
        failures++; if (failures < 10) $display("FAIL avail/count t=%0d", t);
      end
      // reads
      for (int i = 0; i < W; i++) begin
        rd_grp[i] = grp_t'($urandom_range(0, N-1));
        rd_c0[i] = 1'($urandom);
      end
      // resolution of a random live group
      if (r_t > r_h && $urandom_range(0, 2) == 0) begin
        g = $urandom_range(r_h, r_t - 1) % N;
        res_v = 1; res_grp = grp_t'(g); res_flags = flags_t'($urandom);
      end
      // commit the closing instruction of the oldest group sometimes
      if (r_t > r_h && r_closed[r_h % N] && $urandom_range(0, 3) == 0) begin
        commit_v[0] = 1; commit_idx[0] = r_cidx[r_h % N];
      end
      // allocation / close
      if ($urandom_range(0, 2) == 0) begin
        alloc_v = 1; alloc_cond = cond_t'($urandom_range(0, 13)); alloc_pc = $urandom;
        alloc_pred = 1'($urandom); alloc_used = 1'($urandom); alloc_known = ($urandom_range(0, 5) == 0);
        alloc_actual = 1'($urandom); alloc_head_idx = idx_t'(seq_idx); alloc_hist = HL'($urandom);
      end
      if ($urandom_range(0, 3) == 0) begin
        close_v = 1; close_idx = idx_t'(seq_idx + 1); alloc_closed = 1'($urandom);
      end
      if (r_t > r_h && $urandom_range(0, 4) == 0) begin
        repred_v = 1; repred_grp = grp_t'($urandom_range(r_h, r_t - 1) % N);
        repred_pred = 1'($urandom); repred_used = 1'($urandom); repred_hist = HL'($urandom);
      end
      #1;
      for (int i = 0; i < W; i++) begin
        e = rd_grp[i];
        checks++;
        if (rd_known[i] != (r_used[e] | r_res[e]) || rd_resolved[i] != r_res[e] ||
            rd_val[i] != ((r_res[e] ? r_act[e] : r_pred[e]) ^ (rd_c0[i] != r_cond[e][0]))) begin
          failures++; if (failures < 10) $display("FAIL read t=%0d g=%0d", t, e);
        end
      end
      if (res_v) begin
        checks++;
        if (res_mispred != (r_used[g] && !r_res[g] && r_pred[g] != ev(r_cond[g], res_flags)) ||
            res_actual != ev(r_cond[g], res_flags) || res_head_idx != r_head[g] || res_hist != r_hist[g]) begin
          failures++; if (failures < 10) $display("FAIL resolve t=%0d g=%0d", t, g);
        end
        if (res_mispred) n_misp++;
      end
      @(posedge clk);
      // reference update, in the same order as the hardware
      // every closed group sharing the committed closing slot finishes
      nf = 0;
      if (commit_v[0])
        while (r_h + nf < r_t && r_closed[(r_h + nf) % N] && r_cidx[(r_h + nf) % N] == commit_idx[0]) nf++;
      if (close_v)
        for (int k = r_h; k < r_t; k++)
          if (!r_closed[k % N]) begin r_closed[k % N] = 1; r_cidx[k % N] = close_idx; end
      if (repred_v) begin
        r_pred[repred_grp] = repred_pred; r_used[repred_grp] = repred_used; r_hist[repred_grp] = repred_hist;
      end
      if (res_v) begin r_res[g] = 1; r_act[g] = ev(r_cond[g], res_flags); end
      if (alloc_v && (r_t - r_h < N)) begin
        e = r_t % N;
        r_cond[e] = alloc_cond; r_pred[e] = alloc_pred; r_used[e] = alloc_used; r_res[e] = alloc_known;
        r_act[e] = alloc_actual; r_head[e] = alloc_head_idx; r_hist[e] = alloc_hist;
        r_closed[e] = close_v && alloc_closed; r_cidx[e] = close_idx;
        r_t++;
      end
      seq_idx += 2;
      // the hardware frees one cycle after the commit: hold the reference
      // the hardware frees up to W finished groups per cycle, from the next cycle
      if (commit_v[0]) begin
        @(negedge clk);
        alloc_v = 0; close_v = 0; res_v = 0; repred_v = 0; commit_v = '0;
        @(posedge clk);
        @(posedge clk);
        r_h += nf; n_freed += nf;
      end
    end
    checks++;
    if (n_misp == 0 || n_freed == 0) begin failures++; $display("FAIL coverage"); end
    $display("mispredictions=%0d freed=%0d", n_misp, n_freed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
