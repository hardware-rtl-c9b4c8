// byte_unit: selectors and bit-field ("byte") access for MKSEL, GTBOF,
// PTBOF, GTBFR and PTBFR.
//
// A "byte" is any run of 0..32 consecutive bits. A selector word holds its
// length L (8 bits, upper) and its start S (24 bits, lower); the start
// counts bits from the most significant bit of the first word, so start 0
// is bit 31 of that word in the usual LSB-0 numbering.
//
//   MKSEL : mksel = {OV - register[R] + 1, register[R][23:0]}, i.e. a
//           selector from start register[R] to end position OV inclusive.
//   single = 1 (GTBOF / PTBOF): the field lies in one word, win[63:32];
//           win[31:0] must be 0. A field reaching past bit 31 of that word is
//           cut at the word's end, and a start of 32 or more selects nothing.
//   single = 0 (GTBFR / PTBFR): the field starts word_off = S / 32 words
//           after the base address, at bit S mod 32; win holds that word and
//           the next one, so a field may cross a word boundary.
//   field   : the selected bits, right-aligned, zero-extended.
//   new_win : win with the selected bits replaced by the low L bits of v.
// A length above 32 is treated as 32. Purely combinational; the core
// fetches and writes back the window words. The selector layout, MKSEL and
// the meaning of the four access instructions follow the instruction set;
// the 64-bit window is how this design realises them.
module byte_unit
  import isa_pkg::*;
(
  input  selector_t   sel,       // register[0]
  input  logic        single,
  input  logic [63:0] win,       // {first word, second word}
  input  logic [31:0] v,         // register[R], value to put
  input  logic [31:0] mk_start,  // MKSEL: register[R]
  input  logic [31:0] mk_end,    // MKSEL: OV
  output logic [31:0] mksel,
  output logic [31:0] word_off,  // word offset of the field's first word
  output logic [31:0] field,
  output logic [63:0] new_win
);
  logic [5:0]  len;
  logic [6:0]  off;              // bit offset into the window, MSB first
  logic [63:0] mask;
  logic [63:0] vpos;

  assign mksel    = {8'(mk_end - mk_start + 32'd1), mk_start[23:0]};
  assign word_off = {13'd0, sel.start[23:5]};

  always_comb begin
    len = (sel.len > 8'd32) ? 6'd32 : sel.len[5:0];
    if (single) off = (sel.start[23:5] != '0) ? 7'd64 : {2'b00, sel.start[4:0]};
    else        off = {2'b00, sel.start[4:0]};
    if (len == 6'd0 || off >= 7'd64) begin
      mask = '0;
      vpos = '0;
    end else begin
      mask = ({64{1'b1}} << (7'd64 - 7'(len))) >> off;
      vpos = ({32'd0, v} << (7'd64 - 7'(len))) >> off;
    end
    if (single) mask[31:0] = '0;
    field   = (len == 6'd0) ? '0
            : 32'(((win & mask) << off) >> (7'd64 - 7'(len)));
    new_win = (win & ~mask) | (vpos & mask);
  end
endmodule
