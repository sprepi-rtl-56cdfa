// pred_exec_unit: integer ALU that executes a predicated instruction as one
// micro-op, the "aggressive" handling of the multiple-definition problem:
//
//     result = predicate(flags) ? op(a, b) : old
//
// where old is the value of the destination before the instruction, read as
// an extra third operand.  SPREPI uses this path for predicated instructions
// whose predicate prediction is not used (low confidence, or prediction use
// switched off).  Instructions renamed as NOOP (predicate predicted false)
// return old unchanged, so the value is correct however the destination was
// mapped; NORMAL ones always write op(a, b).
//
// Timing: one cycle.  in_valid with operands in cycle t gives out_valid and
// result in cycle t+1.  The operation set (ADD, SUB, AND, ORR, EOR, MOV, BIC,
// RSB, the ARM data-processing subset without flag setting) and the
// one-cycle latency (IntAlu latency of the processor configuration) are this
// design's choices for the "operation" that the selection wraps.
module pred_exec_unit
  import sprepi_pkg::*;
#(
  parameter int DW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  kind_t         kind,
  input  logic [2:0]    op,     // 0 ADD 1 SUB 2 AND 3 ORR 4 EOR 5 MOV 6 BIC 7 RSB
  input  cond_t         cond,
  input  flags_t        flags,
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  input  logic [DW-1:0] old,
  output logic          out_valid,
  output logic [DW-1:0] result,
  output logic          pred_true  // evaluated predicate, for the back end
);
  logic          pass;
  logic [DW-1:0] alu;
  logic [DW-1:0] res_d;

  cond_eval u_cond (.cond(cond), .flags(flags), .pass(pass));

  always_comb begin
    unique case (op)
      3'd0: alu = a + b;
      3'd1: alu = a - b;
      3'd2: alu = a & b;
      3'd3: alu = a | b;
      3'd4: alu = a ^ b;
      3'd5: alu = b;
      3'd6: alu = a & ~b;
      default: alu = b - a;
    endcase
    unique case (kind)
      K_NORMAL: res_d = alu;
      K_NOOP:   res_d = old;
      default:  res_d = pass ? alu : old;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      result    <= '0;
      pred_true <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        result    <= res_d;
        pred_true <= pass;
      end
    end
  end
endmodule
