// cond_unit: evaluates a jump condition against the flags.
//
// The 4-bit condition code from the R field of JCOND / JCNDF selects one of
// the seven tests of the instruction set:
//   0 Z/EQ  ZERO            1 NZ/NE  !ZERO
//   2 LT/NEG NEG & !ZERO    3 LE     NEG | ZERO
//   4 GT    !NEG & !ZERO    5 GE/POS !NEG
//   6 INTR  INTR
// Codes 7..15 are not defined by the instruction set; here they evaluate to
// false. Purely combinational.
module cond_unit
  import isa_pkg::*;
(
  input  logic [3:0] cond,
  input  flags_t     flags,
  output logic       holds
);
  always_comb begin
    unique case (cond)
      COND_Z:    holds = flags.zero;
      COND_NZ:   holds = !flags.zero;
      COND_LT:   holds = flags.neg && !flags.zero;
      COND_LE:   holds = flags.neg || flags.zero;
      COND_GT:   holds = !flags.neg && !flags.zero;
      COND_GE:   holds = !flags.neg;
      COND_INTR: holds = flags.intr;
      default:   holds = 1'b0;
    endcase
  end
endmodule
