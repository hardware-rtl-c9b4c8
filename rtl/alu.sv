// alu: the word arithmetic and logic of the instruction set.
//
// Operand a is register[R], operand b is the operand value OV. The result y
// covers ADD, SUB, RSUB, MUL (low 32 bits of the product), NEG, AND, OR,
// XOR, NOT, MIN, MAX, INCR and DECR. Alongside, the comparison outputs give
// what CMP (a against b), RCMP (b against a), CMPZ (b against 0) and ANDTF
// (a & b against 0) put in the ZERO and NEG flags. Comparisons, MIN and MAX
// treat words as signed two's complement, as N itself is signed. Purely
// combinational; the multiplier is a single combinational product. The
// operations follow the instruction set; signedness and the single-cycle
// multiplier are this design's.
module alu
  import isa_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y,
  output logic        eq_ab,    // a == b
  output logic        lt_ab,    // a < b  (signed)
  output logic        lt_ba,    // b < a  (signed)
  output logic        zero_b,   // b == 0
  output logic        neg_b,    // b < 0
  output logic        zero_and  // (a & b) == 0
);
  logic signed [31:0] sa, sb;
  assign sa = a;
  assign sb = b;

  assign eq_ab    = (a == b);
  assign lt_ab    = (sa < sb);
  assign lt_ba    = (sb < sa);
  assign zero_b   = (b == '0);
  assign neg_b    = b[31];
  assign zero_and = ((a & b) == '0);

  always_comb begin
    unique case (op)
      ALU_PASS_B: y = b;
      ALU_ADD:    y = a + b;
      ALU_SUB:    y = a - b;
      ALU_RSUB:   y = b - a;
      ALU_MUL:    y = a * b;
      ALU_NEG:    y = -b;
      ALU_AND:    y = a & b;
      ALU_OR:     y = a | b;
      ALU_XOR:    y = a ^ b;
      ALU_NOT:    y = ~b;
      ALU_MIN:    y = lt_ab ? a : b;
      ALU_MAX:    y = lt_ab ? b : a;
      ALU_INC:    y = a + 32'd1;
      ALU_DEC:    y = a - 32'd1;
      default:    y = b;
    endcase
  end
endmodule
