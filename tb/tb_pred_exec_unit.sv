// tb_pred_exec_unit: random operations through the predicated ALU.  For
// each, the expected result is computed here: op(a, b) for NORMAL, the old
// value for NOOP, and for SELECT op(a, b) or old depending on the
// condition evaluated by a reference written from the predicate table.
// The result must appear exactly one cycle after the operands.
module tb_pred_exec_unit;
  import sprepi_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0;
  kind_t       kind = K_NORMAL;
  logic [2:0]  op = '0;
  cond_t       cond = C_AL;
  flags_t      flags = '0;
  logic [31:0] a = 0, b = 0, old = 0;
  logic        out_valid, pred_true;
  logic [31:0] result;
  int          checks = 0, failures = 0;

  pred_exec_unit dut (.*);

  always #5 clk = ~clk;

  function automatic logic ref_cond(input cond_t c, input flags_t f);
    case (c)
      C_EQ: return f.z;  C_NE: return !f.z;  C_CS: return f.c;  C_CC: return !f.c;
      C_MI: return f.n;  C_PL: return !f.n;  C_VS: return f.v;  C_VC: return !f.v;
      C_HI: return f.c && !f.z;  C_LS: return !f.c || f.z;
      C_GE: return f.n == f.v;   C_LT: return f.n != f.v;
      C_GT: return !f.z && f.n == f.v;  C_LE: return f.z || f.n != f.v;
      default: return 1'b1;
    endcase
  endfunction

  function automatic logic [31:0] ref_op(input logic [2:0] o, input logic [31:0] x, y);
    case (o)
      0: return x + y;  1: return x - y;  2: return x & y;  3: return x | y;
      4: return x ^ y;  5: return y;      6: return x & ~y; default: return y - x;
    endcase
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp;
    logic        pexp;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      in_valid = 1;
      kind  = kind_t'($urandom_range(0, 2));
      op    = 3'($urandom);
      cond  = cond_t'($urandom_range(0, 14));
      flags = flags_t'($urandom);
      a = $urandom; b = $urandom; old = $urandom;
      pexp = ref_cond(cond, flags);
      case (kind)
        K_NORMAL: exp = ref_op(op, a, b);
        K_NOOP:   exp = old;
        default:  exp = pexp ? ref_op(op, a, b) : old;
      endcase
      @(posedge clk);
      #1;
      checks++;
      if (!out_valid || result !== exp || pred_true !== pexp) begin
        failures++;
        if (failures < 10)
          $display("FAIL t=%0d kind=%0d op=%0d cond=%0d res=%h exp=%h", t, kind, op, cond, result, exp);
      end
    end
    @(negedge clk);
    in_valid = 0;
    @(posedge clk); #1;
    checks++;
    if (out_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
