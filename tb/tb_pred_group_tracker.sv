// tb_pred_group_tracker: random instruction bundles (predicated, branch and
// flag-defining instructions mixed) are fed to the tracker; bundles are
// re-presented from the first slot it did not accept.  A reference model
// walks the same instructions one by one: a predicated non-branch
// instruction joins the open group of its condition pair or opens a new
// one; a flag-defining instruction closes all groups; at most one group
// opens per cycle and none when no group entry is free.  The accepted count,
// group numbers and head bits are compared.  The example of two interleaved
// groups closed by a flag-defining instruction is run first.
module tb_pred_group_tracker;
  import sprepi_pkg::*;
  localparam int W = 4;
  logic clk = 0, rst_n = 0, flush = 0, stall = 0;
  logic [W-1:0] valid;
  inst_t [W-1:0] inst;
  grp_t next_grp;
  logic grp_avail;
  logic [2:0] accept_n;
  logic [W-1:0] in_grp, grp_head;
  grp_t [W-1:0] grp;
  logic new_grp;
  logic [1:0] new_slot;
  cond_t new_cond;
  int checks = 0, failures = 0;

  pred_group_tracker #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  inst_t stream [$];
  logic  ref_v [7];
  grp_t  ref_g [7];
  int    gcount;
  int    n_heads, n_two_group_stops;

  function automatic inst_t rnd_inst();
    inst_t x;
    x = '0;
    x.pc = $urandom;
    x.cond = cond_t'(($urandom_range(0, 2) == 0) ? C_AL : $urandom_range(0, 13));
    x.is_branch = ($urandom_range(0, 7) == 0);
    x.sets_flags = ($urandom_range(0, 5) == 0);
    x.dst_v = 1;
    return x;
  endfunction

  function automatic inst_t mk(input cond_t c, input logic sf);
    inst_t x;
    x = '0; x.cond = c; x.sets_flags = sf; x.dst_v = 1;
    return x;
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_n;
    logic opened, stop;
    logic e_in [W]; logic e_head [W]; grp_t e_g [W];
    logic nv [7]; grp_t ng [7];
    // two groups on p1 (EQ/NE) and p2 (GT), closed by a flag-defining instruction
    stream.push_back(mk(C_EQ, 0)); stream.push_back(mk(C_NE, 0));
    stream.push_back(mk(C_GT, 0)); stream.push_back(mk(C_EQ, 0));
    stream.push_back(mk(C_GT, 0)); stream.push_back(mk(C_AL, 1));
    stream.push_back(mk(C_AL, 0)); stream.push_back(mk(C_EQ, 0));
    for (int i = 0; i < 4000; i++) stream.push_back(rnd_inst());
    for (int k = 0; k < 7; k++) ref_v[k] = 0;
    gcount = 0; n_heads = 0; n_two_group_stops = 0;
    valid = '0; inst = '0; grp_avail = 1; next_grp = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (stream.size() > 0) begin
      @(negedge clk);
      grp_avail = ($urandom_range(0, 9) != 0);
      next_grp  = grp_t'(gcount);
      stall     = ($urandom_range(0, 15) == 0);
      for (int i = 0; i < W; i++) begin
        valid[i] = (i < stream.size());
        inst[i]  = (i < stream.size()) ? stream[i] : '0;
      end
      // reference
      for (int k = 0; k < 7; k++) begin nv[k] = ref_v[k]; ng[k] = ref_g[k]; end
      exp_n = 0; opened = 0; stop = stall;
      for (int i = 0; i < W; i++) begin
        e_in[i] = 0; e_head[i] = 0; e_g[i] = '0;
        if (valid[i] && !stop) begin
          if (inst[i].cond < C_AL && !inst[i].is_branch) begin
            if (nv[inst[i].cond[3:1]]) begin
              e_in[i] = 1; e_g[i] = ng[inst[i].cond[3:1]];
            end else if (!opened && grp_avail) begin
              opened = 1; e_in[i] = 1; e_head[i] = 1; e_g[i] = grp_t'(gcount);
              nv[inst[i].cond[3:1]] = 1; ng[inst[i].cond[3:1]] = grp_t'(gcount);
            end else begin
              stop = 1;
              if (opened) n_two_group_stops++;
            end
          end
          if (!stop) begin
            if (inst[i].sets_flags) for (int k = 0; k < 7; k++) nv[k] = 0;
            exp_n++;
          end
        end else stop = 1;
      end
      #1;
      checks++;
      if (accept_n != exp_n) begin
        failures++;
        if (failures < 10) $display("FAIL accept %0d exp %0d", accept_n, exp_n);
      end
      for (int i = 0; i < W; i++)
        if (i < exp_n) begin
          checks++;
          if (in_grp[i] != e_in[i] || grp_head[i] != e_head[i] || (e_in[i] && grp[i] != e_g[i])) begin
            failures++;
            if (failures < 10) $display("FAIL slot %0d in=%b/%b head=%b/%b g=%0d/%0d", i, in_grp[i], e_in[i], grp_head[i], e_head[i], grp[i], e_g[i]);
          end
        end
      @(posedge clk);
      for (int k = 0; k < 7; k++) begin ref_v[k] = nv[k]; ref_g[k] = ng[k]; end
      if (opened && !stall) begin gcount++; n_heads++; end
      for (int i = 0; i < exp_n; i++) void'(stream.pop_front());
    end
    checks++;
    if (n_heads == 0 || n_two_group_stops == 0) begin failures++; $display("FAIL coverage"); end
    $display("groups=%0d second-group stops=%0d", n_heads, n_two_group_stops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
