// tb_cond_unit: all 16 condition codes against all 16 combinations of the
// four flags, compared with the instruction set's table of conditions.
module tb_cond_unit;
  import isa_pkg::*;
  logic [3:0] cond;
  flags_t flags;
  logic holds;
  int checks = 0, failures = 0;
  cond_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 16; c++)
      for (int f = 0; f < 16; f++) begin
        logic z, ng, it, exp;
        cond = 4'(c);
        flags = flags_t'({28'hABCDEF1, 4'(f)});
        z = f[1]; ng = f[2]; it = f[3];
        case (c)
          0: exp = z;
          1: exp = !z;
          2: exp = ng & !z;
          3: exp = ng | z;
          4: exp = !ng & !z;
          5: exp = !ng;
          6: exp = it;
          default: exp = 0;
        endcase
        #1;
        checks++;
        if (holds !== exp) begin
          failures++;
          $display("FAIL cond=%0d flags=%b got %b exp %b", c, 4'(f), holds, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
