// tb_operand_unit: checks OV = sign-extended N (+ register[A] when A != 0)
// on random and corner values against integer arithmetic.
module tb_operand_unit;
  logic [15:0] n;
  logic [3:0] a;
  logic [31:0] reg_a, ov;
  int checks = 0, failures = 0;
  operand_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int signed nn;
      longint exp;
      n = (t < 4) ? ((t == 0) ? 16'h8000 : (t == 1) ? 16'h7fff : (t == 2) ? 16'hffff : 16'h0) : 16'($urandom);
      a = 4'($urandom); reg_a = $urandom;
      #1;
      nn = int'($signed(n));
      exp = longint'(nn) + ((a != 0) ? longint'(reg_a) : 0);
      checks++;
      if (ov !== 32'(exp)) begin
        failures++;
        $display("FAIL n=%h a=%0d reg=%h ov=%h exp=%h", n, a, reg_a, ov, 32'(exp));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
