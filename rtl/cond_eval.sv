// cond_eval: evaluates an ARM condition code against the N, Z, C, V flags.
//
// Purely combinational.  The logical formula for each predicate mnemonic is
// the one of the architecture's predicate table (EQ: Z, NE: !Z, CS: C, CC: !C,
// MI: N, PL: !N, VS: V, VC: !V, HI: C & !Z, LS: !C | Z, GE: N == V,
// LT: N != V, GT: !Z & (N == V), LE: Z | (N != V), AL: true).  The 4-bit
// encoding of the condition field follows the ARM architecture; the reserved
// encoding 4'b1111 is treated as "always" like AL, a choice of this design.
module cond_eval
  import sprepi_pkg::*;
(
  input  cond_t  cond,
  input  flags_t flags,
  output logic   pass
);
  always_comb begin
    unique case (cond)
      C_EQ: pass =  flags.z;
      C_NE: pass = !flags.z;
      C_CS: pass =  flags.c;
      C_CC: pass = !flags.c;
      C_MI: pass =  flags.n;
      C_PL: pass = !flags.n;
      C_VS: pass =  flags.v;
      C_VC: pass = !flags.v;
      C_HI: pass =  flags.c && !flags.z;
      C_LS: pass = !flags.c ||  flags.z;
      C_GE: pass =  (flags.n == flags.v);
      C_LT: pass =  (flags.n != flags.v);
      C_GT: pass = !flags.z && (flags.n == flags.v);
      C_LE: pass =  flags.z || (flags.n != flags.v);
      default: pass = 1'b1;  // AL and NV
    endcase
  end
endmodule
