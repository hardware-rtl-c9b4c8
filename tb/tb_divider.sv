// tb_divider: random signed divisions (non-zero divisor) compared with the
// language's truncating / and %, plus the latency from start to done, which
// must be 34 cycles.
module tb_divider;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [31:0] dividend, divisor, quotient, remainder;
  int checks = 0, failures = 0;
  divider dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] pick();
    case ($urandom % 8)
      0: return 32'h8000_0000;
      1: return 32'hffff_ffff;
      2: return 32'd1;
      3: return $urandom % 100;
      4: return -($urandom % 100);
      default: return $urandom;
    endcase
  endfunction

  initial begin
    dividend = 0; divisor = 1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      longint sd, sv, eq, er;
      int cycles;
      dividend = pick();
      do divisor = pick(); while (divisor == 0);
      start = 1;
      @(posedge clk); #1 start = 0;
      cycles = 1;
      while (!done) begin @(posedge clk); #1 cycles++; end
      sd = longint'($signed(dividend)); sv = longint'($signed(divisor));
      eq = sd / sv; er = sd % sv;
      checks++;
      if (quotient !== 32'(eq) || remainder !== 32'(er)) begin
        failures++;
        $display("FAIL %0d / %0d: q=%0d r=%0d exp %0d %0d", sd, sv,
                 $signed(quotient), $signed(remainder), eq, er);
      end
      checks++;
      if (cycles != 34) begin
        failures++;
        $display("FAIL latency %0d", cycles);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
