// shifter: SHL, ASHL, ROTL, SHR, ASHR and ROTR with the "lost bits" flag.
//
// The word a (register[R]) is shifted by amt (OV) bit positions. amt is
// read as an unsigned number; any amount of 32 or more shifts every bit out
// (for ASHL, which keeps bit 31 in place, every bit of the 31-bit body).
// zero reports whether all the bits that left the word at the shifted-out
// end were 0, which is what the instruction set puts in the ZERO flag.
//   SHL / SHR   : logical shifts, zeros enter.
//   ASHL        : bits 30..0 shift left, bit 31 (sign) is kept unchanged.
//   ASHR        : bits shift right with copies of the sign entering; the
//                 sign bit therefore stays.
//   ROTL / ROTR : the bits leaving one end re-enter at the other; the result
//                 uses amt modulo 32, while an amount of 32 or more counts
//                 every bit as having passed the end once.
// Purely combinational. The operations and the flag rule follow the
// instruction set; the treatment of amounts of 32 and more is this
// design's.
module shifter
  import isa_pkg::*;
(
  input  shift_op_e   op,
  input  logic [31:0] a,
  input  logic [31:0] amt,
  output logic [31:0] y,
  output logic        zero
);
  logic        big;         // amt >= 32
  logic [5:0]  n;           // amt clamped to 32
  logic [4:0]  k;           // amt modulo 32
  logic [31:0] hi_mask;     // the n most significant bits
  logic [31:0] lo_mask;     // the n least significant bits
  logic [30:0] body_sh;
  logic [30:0] body_mask;   // the n most significant bits of bits 30..0

  assign big = (amt[31:5] != '0);
  assign n   = big ? 6'd32 : {1'b0, amt[4:0]};
  assign k   = amt[4:0];

  always_comb begin
    hi_mask   = big ? '1 : ~(32'hFFFF_FFFF >> n);
    lo_mask   = big ? '1 : ~(32'hFFFF_FFFF << n);
    body_mask = (n >= 6'd31) ? '1 : ~(31'h7FFF_FFFF >> n);
    body_sh   = (n >= 6'd31) ? '0 : (a[30:0] << n);
    y    = a;
    zero = 1'b1;
    unique case (op)
      SH_SHL: begin
        y    = big ? '0 : (a << n);
        zero = ((a & hi_mask) == '0);
      end
      SH_ASHL: begin
        y    = {a[31], body_sh};
        zero = ((a[30:0] & body_mask) == '0);
      end
      SH_ROTL: begin
        y    = (k == 5'd0) ? a : ((a << k) | (a >> (6'd32 - {1'b0, k})));
        zero = ((a & hi_mask) == '0);
      end
      SH_SHR: begin
        y    = big ? '0 : (a >> n);
        zero = ((a & lo_mask) == '0);
      end
      SH_ASHR: begin
        y    = big ? {32{a[31]}} : 32'($signed(a) >>> n);
        zero = ((a & lo_mask) == '0);
      end
      SH_ROTR: begin
        y    = (k == 5'd0) ? a : ((a >> k) | (a << (6'd32 - {1'b0, k})));
        zero = ((a & lo_mask) == '0);
      end
      default: begin
        y    = a;
        zero = 1'b1;
      end
    endcase
  end
endmodule
