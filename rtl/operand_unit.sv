// operand_unit: first two steps of the effective address calculation.
//
// The 16-bit N field is sign-extended to 32 bits by copying its sign bit
// into the upper half, and if the A field is not zero the contents of
// register[A] are added. The result is the operand value OV before the
// optional indirection (S = 1), which needs a memory read and is done by the
// core. Purely combinational. The two steps are those of the instruction
// set; only the split into a block is this design's.
module operand_unit (
  input  logic [15:0] n,       // N field
  input  logic [3:0]  a,       // A field, 0 = no auxiliary register
  input  logic [31:0] reg_a,   // register[A]
  output logic [31:0] ov       // OV before indirection
);
  logic [31:0] n_ext;
  assign n_ext = {{16{n[15]}}, n};
  assign ov    = (a != 4'd0) ? n_ext + reg_a : n_ext;
endmodule
