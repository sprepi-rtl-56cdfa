// tb_cond_eval: exhaustive check of the condition evaluator.  Every one of
// the 16 condition encodings is applied with every one of the 16 flag
// combinations and compared with a reference built the other way round:
// the base test selected by cond[3:1], inverted by cond[0], with AL/NV true.
module tb_cond_eval;
  import sprepi_pkg::*;
  cond_t  cond;
  flags_t flags;
  logic   pass;
  int     checks = 0, failures = 0;

  cond_eval dut (.cond(cond), .flags(flags), .pass(pass));

  function automatic logic ref_pass(input logic [3:0] c, input flags_t f);
    logic b;
    case (c[3:1])
      3'd0: b = f.z;
      3'd1: b = f.c;
      3'd2: b = f.n;
      3'd3: b = f.v;
      3'd4: b = f.c & ~f.z;
      3'd5: b = ~(f.n ^ f.v);
      3'd6: b = ~f.z & ~(f.n ^ f.v);
      default: return 1'b1;
    endcase
    return b ^ c[0];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 16; c++)
      for (int f = 0; f < 16; f++) begin
        cond  = cond_t'(c);
        flags = flags_t'(f);
        #1;
        checks++;
        if (pass !== ref_pass(4'(c), flags_t'(f))) begin
          failures++;
          $display("FAIL cond=%0d flags=%b pass=%b", c, f, pass);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
