// tb_byte_unit: selector construction and bit-field get / put. The reference
// walks the field one bit at a time, counting bit positions from the most
// significant end of the window, so it shares no shift arithmetic with the
// unit. Includes the worked example: 0x12345678 with an 8-bit field starting
// at bit 12 gives 0x45.
module tb_byte_unit;
  import isa_pkg::*;
  selector_t sel;
  logic single;
  logic [63:0] win, new_win;
  logic [31:0] v, mk_start, mk_end, mksel, word_off, field;
  int checks = 0, failures = 0;
  byte_unit dut (.*);

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (start=%0d len=%0d single=%b)",
               what, got, exp, sel.start, sel.len, single);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // worked example
    mk_start = 12; mk_end = 19; v = 0; single = 1; win = {32'h1234_5678, 32'd0};
    #1;
    check("mksel example", mksel, {8'd8, 24'd12});
    sel = selector_t'(mksel);
    #1;
    check("gtbof example", field, 32'h45);

    for (int t = 0; t < 5000; t++) begin
      int len, off, lim;
      logic [31:0] ef;
      logic [63:0] ew;
      single = $urandom % 2;
      len = (t % 97 == 0) ? 40 + $urandom % 20 : $urandom % 33;
      sel.len = 8'(len);
      sel.start = single ? ((t % 13 == 0) ? 24'(32 + $urandom % 100) : 24'($urandom % 32))
                         : 24'($urandom);
      win = single ? {32'($urandom), 32'd0} : {32'($urandom), 32'($urandom)};
      v = $urandom;
      mk_start = $urandom; mk_end = $urandom;
      #1;
      if (len > 32) len = 32;
      off = single ? int'(sel.start) : int'(sel.start % 32);
      lim = single ? 32 : 64;
      ef = 0;
      ew = win;
      for (int i = 0; i < len; i++) begin
        int p;
        p = off + i;             // bit position from the MSB of the window
        if (p < lim) begin
          ef[len - 1 - i] = win[63 - p];
          ew[63 - p] = v[len - 1 - i];
        end
      end
      check("field", field, ef);
      check("new_win", new_win, ew);
      check("word_off", word_off, single ? word_off : 32'(sel.start / 32));
      check("mksel", mksel, {8'(mk_end - mk_start + 1), mk_start[23:0]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
