// tb_alu: random and corner operands for every ALU operation, results and
// comparison outputs checked against 64-bit integer arithmetic.
module tb_alu;
  import isa_pkg::*;
  alu_op_e op;
  logic [31:0] a, b, y;
  logic eq_ab, lt_ab, lt_ba, zero_b, neg_b, zero_and;
  int checks = 0, failures = 0;
  alu dut (.*);

  function automatic logic [31:0] pick();
    case ($urandom % 6)
      0: return 32'h8000_0000;
      1: return 32'h7fff_ffff;
      2: return 32'hffff_ffff;
      3: return 0;
      default: return $urandom;
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      longint sa, sb, r;
      a = pick(); b = pick();
      op = alu_op_e'($urandom % 14);
      #1;
      sa = longint'($signed(a)); sb = longint'($signed(b));
      case (op)
        ALU_PASS_B: r = sb;
        ALU_ADD:    r = sa + sb;
        ALU_SUB:    r = sa - sb;
        ALU_RSUB:   r = sb - sa;
        ALU_MUL:    r = sa * sb;
        ALU_NEG:    r = -sb;
        ALU_AND:    r = sa & sb;
        ALU_OR:     r = sa | sb;
        ALU_XOR:    r = sa ^ sb;
        ALU_NOT:    r = ~sb;
        ALU_MIN:    r = (sa < sb) ? sa : sb;
        ALU_MAX:    r = (sa > sb) ? sa : sb;
        ALU_INC:    r = sa + 1;
        ALU_DEC:    r = sa - 1;
        default:    r = 0;
      endcase
      checks++;
      if (y !== 32'(r)) begin
        failures++;
        $display("FAIL op=%s a=%h b=%h y=%h exp=%h", op.name(), a, b, y, 32'(r));
      end
      checks++;
      if ({eq_ab, lt_ab, lt_ba, zero_b, neg_b, zero_and} !==
          {sa == sb, sa < sb, sb < sa, sb == 0, sb < 0, (a & b) == 0}) begin
        failures++;
        $display("FAIL flags a=%h b=%h", a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
