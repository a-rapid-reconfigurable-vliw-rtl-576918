// ternary_alu: one two-input / one-output ALU of the co-processor, working on
// ternary values {0, 1, X} held in two bits (0 = 00, 1 = 11, X = 01).
//
// AND and OR are done bit by bit on the two-bit codes, which is exactly
// three-valued logic for this encoding (X & 0 = 0, X & 1 = X, X | 1 = 1, ...).
// Complement is the special ternary NOT: 0 <-> 1, X -> X. XOR and the
// implication are built from those three, (A & !B) | (!A & B) and !A | B, so
// that X propagates correctly; a plain bitwise XOR of the codes would give
// the unused code 10 for X ^ 1. NAND, NOR and XNOR are the ternary complement
// of the base result. Inputs carrying the unused code 10 are read as X.
//
// The four base operations and the ternary NOT come from the design; which
// complemented forms get an opcode (and the NOP) is this implementation's
// choice, limited by the 3-bit function field of an instruction slot.
//
// Purely combinational. valid is low for F_NOP: the slot writes nothing.
module ternary_alu
  import vliw_pkg::*;
(
  input  alu_func_e func,
  input  tern_t     a,
  input  tern_t     b,
  output tern_t     y,
  output logic      valid
);

  tern_t an, bn, r_and, r_or, r_xor, r_imp;

  always_comb begin
    an    = tnorm(a);
    bn    = tnorm(b);
    r_and = an & bn;
    r_or  = an | bn;
    r_xor = (an & tnot(bn)) | (tnot(an) & bn);
    r_imp = tnot(an) | bn;
    valid = 1'b1;
    unique case (func)
      F_AND:   y = r_and;
      F_OR:    y = r_or;
      F_XOR:   y = r_xor;
      F_IMP:   y = r_imp;
      F_NAND:  y = tnot(r_and);
      F_NOR:   y = tnot(r_or);
      F_XNOR:  y = tnot(r_xor);
      default: begin
        y     = T_X;
        valid = 1'b0;
      end
    endcase
  end

endmodule
