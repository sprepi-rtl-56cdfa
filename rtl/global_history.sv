// global_history: speculative and non-speculative global history registers.
//
// The predicate predictor reads the speculative history at prediction time
// and is trained at commit with the non-speculative one, so read and update
// see the same information vector whenever the speculative history was not
// corrupted.  In branch-and-predicate mode the caller pushes one bit per
// branch (its direction) and one bit per predicated group (its predicate,
// once, at the first instruction of the group); in branch-only mode it
// pushes branch directions only.  Which bits are pushed is decided outside.
//
// Each side accepts up to W bits per cycle, given in program order in
// *_bits[0 .. *_n-1]; the newest bit ends up in bit 0 of the register.
// restore_commit copies the (updated) non-speculative history into the
// speculative one: used after a drain or a full flush.  restore_v loads a
// saved speculative history (the one seen by the first instruction of a
// mispredicted group): used when a replay restarts prediction.  Both take
// effect at the next clock edge and override that cycle's speculative pushes.
// Reset clears both registers (not specified; all-zero history chosen).
module global_history #(
  parameter int HLEN = 640,
  parameter int W    = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [$clog2(W+1)-1:0] spec_n,
  input  logic [W-1:0]         spec_bits,
  input  logic [$clog2(W+1)-1:0] commit_n,
  input  logic [W-1:0]         commit_bits,
  input  logic                 restore_commit,
  input  logic                 restore_v,
  input  logic [HLEN-1:0]      restore_hist,
  output logic [HLEN-1:0]      spec_hist,
  output logic [HLEN-1:0]      commit_hist
);
  logic [HLEN-1:0] spec_d, commit_d;

  always_comb begin
    commit_d = commit_hist;
    for (int i = 0; i < W; i++)
      if (i < int'(commit_n)) commit_d = {commit_d[HLEN-2:0], commit_bits[i]};
    spec_d = spec_hist;
    for (int i = 0; i < W; i++)
      if (i < int'(spec_n)) spec_d = {spec_d[HLEN-2:0], spec_bits[i]};
    if (restore_v)           spec_d = restore_hist;
    else if (restore_commit) spec_d = commit_d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      spec_hist   <= '0;
      commit_hist <= '0;
    end else begin
      spec_hist   <= spec_d;
      commit_hist <= commit_d;
    end
  end
endmodule
