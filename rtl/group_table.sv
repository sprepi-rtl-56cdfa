// group_table: state of every in-flight predicated group.
//
// A circular table of N entries allocated in program order, one per group.
// Each entry holds the group's condition, the PC of its first instruction
// (used to train the predictor at commit), the predicted predicate, whether
// that prediction is used, whether the real predicate is known and its
// value, the buffer slot of the first instruction (where a replay starts)
// and the speculative global history seen by that instruction (restored
// when a replay restarts prediction).
//
// Ports, all combinational reads with writes at the clock edge:
//  * alloc: writes the entry at tail (next_grp); avail says an entry is free.
//    alloc_known/alloc_actual record a predicate already known at rename.
//  * close: a flag-defining instruction at buffer slot close_idx closes all
//    open groups (alloc_closed: also the group allocated in the same cycle).
//  * rd: W read ports giving, per group, whether its predicate value is
//    usable at rename (prediction used, or real value known) and the value
//    (real value when known, prediction otherwise) of the reading
//    instruction's own condition, inverted when it uses the opposite one.
//  * repred: a replay pass overwrites prediction, use and history.
//  * res: the back end delivers the flags a group's predicate reads; the
//    predicate is evaluated here and res_mispred flags a used, wrong
//    prediction (start a replay at res_head_idx).  The caller never
//    re-predicts and resolves the same group in one cycle.
//  * cm: read port for the group whose first instruction commits.
//  * commit: buffer slots committing this cycle.  A closed group is finished
//    when its closing instruction commits; finished groups leave the table
//    in order, up to W per cycle.
// flush empties the table.  The table size (32) is this design's choice.
module group_table
  import sprepi_pkg::*;
#(
  parameter int N    = NUM_GRP,
  parameter int HLEN = TAGE_MAXHIST,
  parameter int W    = WIDTH
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flush,
  // allocation
  input  logic              alloc_v,
  input  cond_t             alloc_cond,
  input  logic [31:0]       alloc_pc,
  input  logic              alloc_pred,
  input  logic              alloc_used,
  input  logic              alloc_known,
  input  logic              alloc_actual,
  input  idx_t              alloc_head_idx,
  input  logic [HLEN-1:0]   alloc_hist,
  input  logic              alloc_closed,
  output grp_t              next_grp,
  output logic              avail,
  // close
  input  logic              close_v,
  input  idx_t              close_idx,
  // rename read ports
  input  grp_t [W-1:0]      rd_grp,
  input  logic [W-1:0]      rd_c0,     // bit 0 of the reading instruction's condition
  output logic [W-1:0]      rd_known,
  output logic [W-1:0]      rd_val,
  output logic [W-1:0]      rd_resolved,
  // re-prediction during replay
  input  logic              repred_v,
  input  grp_t              repred_grp,
  input  logic              repred_pred,
  input  logic              repred_used,
  input  logic [HLEN-1:0]   repred_hist,
  // resolution
  input  logic              res_v,
  input  grp_t              res_grp,
  input  flags_t            res_flags,
  output logic              res_mispred,
  output logic              res_actual,
  output idx_t              res_head_idx,
  output logic [HLEN-1:0]   res_hist,
  // commit-side read
  input  grp_t              cm_grp,
  output logic [31:0]       cm_pc,
  output logic              cm_actual,
  output logic              cm_resolved,
  output logic              cm_pred,
  output logic              cm_used,
  // commit
  input  logic [W-1:0]      commit_v,
  input  idx_t [W-1:0]      commit_idx,
  output logic [$clog2(N+1)-1:0] count
);
  localparam int GW = $clog2(N);

  cond_t           e_cond   [N];
  logic [31:0]     e_pc     [N];
  logic            e_pred   [N];
  logic            e_used   [N];
  logic            e_res    [N];
  logic            e_act    [N];
  idx_t            e_head   [N];
  logic [HLEN-1:0] e_hist   [N];
  idx_t            e_cidx   [N];
  logic [N-1:0]    e_valid, e_closed, e_done;

  logic [GW:0]     head_q, tail_q;   // extra wrap bit
  logic            res_pass;

  assign count    = ($clog2(N+1))'(tail_q - head_q);
  assign avail    = (tail_q - head_q) < (GW+1)'(N);
  assign next_grp = grp_t'(tail_q[GW-1:0]);

  always_comb begin
    for (int i = 0; i < W; i++) begin
      rd_resolved[i] = e_res[rd_grp[i][GW-1:0]];
      rd_known[i]    = e_used[rd_grp[i][GW-1:0]] || e_res[rd_grp[i][GW-1:0]];
      rd_val[i]      = (e_res[rd_grp[i][GW-1:0]] ? e_act[rd_grp[i][GW-1:0]]
                                                 : e_pred[rd_grp[i][GW-1:0]])
                       ^ (rd_c0[i] != e_cond[rd_grp[i][GW-1:0]][0]);
    end
  end

  cond_eval u_res_eval (.cond(e_cond[res_grp[GW-1:0]]), .flags(res_flags), .pass(res_pass));

  always_comb begin
    res_actual   = res_pass;
    res_mispred  = res_v && e_used[res_grp[GW-1:0]] && !e_res[res_grp[GW-1:0]]
                   && (e_pred[res_grp[GW-1:0]] != res_pass);
    res_head_idx = e_head[res_grp[GW-1:0]];
    res_hist     = e_hist[res_grp[GW-1:0]];
    cm_pc        = e_pc[cm_grp[GW-1:0]];
    cm_actual    = e_act[cm_grp[GW-1:0]];
    cm_resolved  = e_res[cm_grp[GW-1:0]];
    cm_pred      = e_pred[cm_grp[GW-1:0]];
    cm_used      = e_used[cm_grp[GW-1:0]];
  end

  // number of finished groups leaving from the head this cycle
  logic [GW:0] nfree;
  always_comb begin
    logic go;
    go    = 1'b1;
    nfree = '0;
    for (int k = 0; k < W; k++)
      if (go && (nfree < (tail_q - head_q)) && e_done[GW'(head_q + (GW+1)'(k))])
        nfree = nfree + 1'b1;
      else
        go = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q   <= '0;
      tail_q   <= '0;
      e_valid  <= '0;
      e_closed <= '0;
      e_done   <= '0;
      for (int i = 0; i < N; i++) begin
        e_cond[i] <= C_AL; e_pc[i] <= '0; e_pred[i] <= 1'b0; e_used[i] <= 1'b0;
        e_res[i]  <= 1'b0; e_act[i] <= 1'b0; e_head[i] <= '0; e_hist[i] <= '0;
        e_cidx[i] <= '0;
      end
    end else if (flush) begin
      head_q   <= '0;
      tail_q   <= '0;
      e_valid  <= '0;
      e_closed <= '0;
      e_done   <= '0;
    end else begin
      // finishing: closing instruction commits
      for (int i = 0; i < N; i++)
        for (int k = 0; k < W; k++)
          if (e_valid[i] && e_closed[i] && commit_v[k] && commit_idx[k] == e_cidx[i])
            e_done[i] <= 1'b1;
      // close open groups
      if (close_v)
        for (int i = 0; i < N; i++)
          if (e_valid[i] && !e_closed[i]) begin
            e_closed[i] <= 1'b1;
            e_cidx[i]   <= close_idx;
          end
      if (repred_v) begin
        e_pred[repred_grp[GW-1:0]] <= repred_pred;
        e_used[repred_grp[GW-1:0]] <= repred_used;
        e_hist[repred_grp[GW-1:0]] <= repred_hist;
      end
      if (res_v) begin
        e_res[res_grp[GW-1:0]] <= 1'b1;
        e_act[res_grp[GW-1:0]] <= res_pass;
      end
      // free from the head
      for (int k = 0; k < W; k++)
        if ((GW+1)'(k) < nfree) begin
          e_valid[GW'(head_q + (GW+1)'(k))] <= 1'b0;
          e_done[GW'(head_q + (GW+1)'(k))]  <= 1'b0;
          e_closed[GW'(head_q + (GW+1)'(k))] <= 1'b0;
        end
      head_q <= head_q + nfree;
      if (alloc_v && avail) begin
        e_cond[tail_q[GW-1:0]]   <= alloc_cond;
        e_pc[tail_q[GW-1:0]]     <= alloc_pc;
        e_pred[tail_q[GW-1:0]]   <= alloc_pred;
        e_used[tail_q[GW-1:0]]   <= alloc_used;
        e_res[tail_q[GW-1:0]]    <= alloc_known;
        e_act[tail_q[GW-1:0]]    <= alloc_actual;
        e_head[tail_q[GW-1:0]]   <= alloc_head_idx;
        e_hist[tail_q[GW-1:0]]   <= alloc_hist;
        e_valid[tail_q[GW-1:0]]  <= 1'b1;
        e_closed[tail_q[GW-1:0]] <= close_v && alloc_closed;
        e_done[tail_q[GW-1:0]]   <= 1'b0;
        e_cidx[tail_q[GW-1:0]]   <= close_idx;
        tail_q <= tail_q + 1'b1;
      end
    end
  end
endmodule
