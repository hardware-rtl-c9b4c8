// tb_regfile: self-checking test of the register file. Writes random values
// through the general port, checks all three read ports and the $PC / $SP
// outputs against a shadow array, and checks that a dedicated $PC / $SP write
// wins over a general write to the same register in the same cycle.
module tb_regfile;
  import isa_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] ra_r, ra_a, wa;
  logic [31:0] rd_r, rd_a, rd_0, pc, sp, wd, pc_wd, sp_wd;
  logic we, pc_we, sp_we;
  int checks = 0, failures = 0;
  logic [31:0] shadow [16];

  regfile dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; pc_we = 0; sp_we = 0; wa = 0; wd = 0; pc_wd = 0; sp_wd = 0; ra_r = 0; ra_a = 0;
    @(posedge clk); @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      ra_r = 4'(i); #1 check("reset", rd_r, 0);
      shadow[i] = 0;
    end
    for (int t = 0; t < 300; t++) begin
      we = 1; wa = 4'($urandom); wd = $urandom;
      pc_we = ($urandom % 4) == 0; pc_wd = $urandom;
      sp_we = ($urandom % 4) == 0; sp_wd = $urandom;
      @(posedge clk); #1;
      shadow[wa] = wd;
      if (pc_we) shadow[15] = pc_wd;
      if (sp_we) shadow[14] = sp_wd;
      we = 0; pc_we = 0; sp_we = 0;
      ra_r = 4'($urandom); ra_a = 4'($urandom); #1;
      check("rd_r", rd_r, shadow[ra_r]);
      check("rd_a", rd_a, shadow[ra_a]);
      check("rd_0", rd_0, shadow[0]);
      check("pc", pc, shadow[15]);
      check("sp", sp, shadow[14]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
