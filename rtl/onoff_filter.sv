// onoff_filter: coarse-grain switch of predicate-prediction use for the
// predictor that runs on branch-and-predicate history.
//
// The predictor is trained and monitored at commit whatever the mode.  This
// block counts committed predicated instructions and committed predicate
// mispredictions (one prediction per predicated group, counted at the
// commit of the group's first instruction).  Each time INTERVAL predicated
// instructions have committed, the next mode is decided: use is on if fewer
// than THRESH mispredictions were seen in the interval.  The counters then
// restart (instructions of the deciding cycle beyond INTERVAL count toward
// the next interval).
//
// Switching on -> off is immediate.  Switching off -> on needs a drained
// pipeline, because the speculative history is not kept correct while
// predictions are not used: drain_req is raised until the caller reports
// drained (no instruction in flight); mode_on and a one-cycle resync pulse
// (copy the non-speculative history into the speculative one) follow.
// INTERVAL = 10,000 and THRESH = 500 are the document's values; the mode
// after reset (on) and the carry-over of counts are this design's choices.
module onoff_filter #(
  parameter int W        = 4,
  parameter int INTERVAL = 10000,
  parameter int THRESH   = 500
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [$clog2(W+1)-1:0] commit_pred_n,   // predicated instrs committed
  input  logic [$clog2(W+1)-1:0] commit_mispred_n, // group mispredictions committed
  input  logic                   drained,
  output logic                   mode_on,
  output logic                   drain_req,
  output logic                   resync,
  output logic                   decide            // pulse at each interval end
);
  localparam int CW = $clog2(INTERVAL + W + 1);

  logic [CW-1:0] inst_cnt;
  logic [CW-1:0] misp_cnt;
  logic [CW-1:0] inst_sum, misp_sum;
  logic          want_on;

  always_comb begin
    inst_sum = inst_cnt + CW'(commit_pred_n);
    misp_sum = misp_cnt + CW'(commit_mispred_n);
    decide   = (inst_sum >= CW'(INTERVAL));
    want_on  = (misp_sum < CW'(THRESH));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inst_cnt  <= '0;
      misp_cnt  <= '0;
      mode_on   <= 1'b1;
      drain_req <= 1'b0;
      resync    <= 1'b0;
    end else begin
      resync <= 1'b0;
      if (decide) begin
        inst_cnt <= inst_sum - CW'(INTERVAL);
        misp_cnt <= '0;
        if (!want_on) begin
          mode_on   <= 1'b0;
          drain_req <= 1'b0;
        end else if (!mode_on) begin
          drain_req <= 1'b1;
        end
      end else begin
        inst_cnt <= inst_sum;
        misp_cnt <= misp_sum;
        if (drain_req && drained) begin
          drain_req <= 1'b0;
          mode_on   <= 1'b1;
          resync    <= 1'b1;
        end
      end
    end
  end
endmodule
