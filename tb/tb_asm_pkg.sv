// tb_asm_pkg: a tiny assembler for the testbenches. ins() packs one
// instruction word: opcode in bits 31..25, indirect flag S in bit 24, R in
// 23..20, A in 19..16 and the 16-bit N in 15..0.
package tb_asm_pkg;
  import isa_pkg::*;

  function automatic logic [31:0] ins(opcode_e op, int r = 0, int n = 0, int a = 0, bit s = 0);
    instr_t i;
    i.op   = op;
    i.star = s;
    i.r    = 4'(r);
    i.a    = 4'(a);
    i.n    = 16'(n);
    return i;
  endfunction

  // Pack a string, most significant byte first, into words; a zero byte ends it.
  function automatic int str_words(string s);
    return s.len() / 4 + 1;
  endfunction

  function automatic logic [31:0] str_word(string s, int k);
    logic [31:0] w = 0;
    for (int b = 0; b < 4; b++) begin
      int i = 4 * k + b;
      w[31 - 8*b -: 8] = (i < s.len()) ? s[i] : 8'd0;
    end
    return w;
  endfunction
endpackage
