// pred_group_tracker: splits the fetched instruction stream into predicated
// groups.
//
// A predicated group is the set of predicated instructions that use the same
// occurrence of a predicate or of its opposite (EQ/NE, CS/CC, ... : the two
// conditions share cond[3:1]).  A group starts at the first instruction that
// uses the predicate and ends at the next flag-defining instruction, which
// ends every open group.  Several groups on different predicates can be open
// at once, one per condition pair (seven slots).  One prediction is made per
// group, so the first instruction of a group (its head) is the only one that
// needs the predictor.  Conditional branches are predicted by the branch
// predictor and do not join groups (a choice of this design).  An
// instruction that is both predicated and flag-defining belongs to its group
// and then closes all groups.
//
// Interface: a bundle of up to W instructions (valid must be a prefix).  The
// tracker accepts the longest prefix that opens at most one new group and
// for which a group-table entry is free (grp_avail), reports it in
// accept_n, and tags each accepted slot with its group number and head bit.
// next_grp is the group-table entry the new group will get.  When stall is
// high nothing is accepted and the state holds.  flush closes all groups.
// Combinational outputs; the open-group state is updated at the clock edge.
module pred_group_tracker
  import sprepi_pkg::*;
#(
  parameter int W = WIDTH
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   flush,
  input  logic                   stall,
  input  logic [W-1:0]           valid,
  input  inst_t [W-1:0]          inst,
  input  grp_t                   next_grp,
  input  logic                   grp_avail,
  output logic [$clog2(W+1)-1:0] accept_n,
  output logic [W-1:0]           in_grp,
  output logic [W-1:0]           grp_head,
  output grp_t [W-1:0]           grp,
  output logic                   new_grp,      // a group opens in this bundle
  output logic [$clog2(W)-1:0]   new_slot,     // slot of its head
  output cond_t                  new_cond
);
  typedef struct packed {
    logic v;
    grp_t g;
  } slot_t;

  slot_t [6:0] open_q, open_d;

  always_comb begin
    slot_t [6:0] o;
    logic        stop;
    logic [2:0]  pair;
    o        = open_q;
    pair     = '0;
    open_d   = open_q;
    stop     = stall;
    accept_n = '0;
    in_grp   = '0;
    grp_head = '0;
    grp      = '0;
    new_grp  = 1'b0;
    new_slot = '0;
    new_cond = C_AL;
    for (int i = 0; i < W; i++) begin
      if (valid[i] && !stop) begin
        if (inst[i].cond < C_AL && !inst[i].is_branch) begin
          pair = inst[i].cond[3:1];
          if (o[pair].v) begin
            in_grp[i] = 1'b1;
            grp[i]    = o[pair].g;
          end else if (!new_grp && grp_avail) begin
            in_grp[i]   = 1'b1;
            grp_head[i] = 1'b1;
            grp[i]      = next_grp;
            o[pair]     = '{v: 1'b1, g: next_grp};
            new_grp     = 1'b1;
            new_slot    = ($clog2(W))'(i);
            new_cond    = inst[i].cond;
          end else begin
            stop = 1'b1;
          end
        end
        if (!stop) begin
          if (inst[i].sets_flags)
            for (int k = 0; k < 7; k++) o[k].v = 1'b0;
          accept_n = accept_n + 1'b1;
          open_d   = o;
        end
      end else begin
        stop = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     open_q <= '0;
    else if (flush) open_q <= '0;
    else            open_q <= open_d;
  end
endmodule
