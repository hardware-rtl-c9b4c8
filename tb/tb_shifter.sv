// tb_shifter: every shift kind with random words and amounts 0..40 plus
// some very large amounts. The reference moves the word one bit at a time
// and remembers every bit that left the word, so it is independent of the
// shifter's mask arithmetic.
module tb_shifter;
  import isa_pkg::*;
  shift_op_e op;
  logic [31:0] a, amt, y;
  logic zero;
  int checks = 0, failures = 0;
  shifter dut (.*);

  task automatic ref_model(input shift_op_e o, input logic [31:0] w, input logic [31:0] n,
                           output logic [31:0] ry, output logic rz);
    logic lost;
    int steps;
    lost = 0;
    ry = w;
    steps = (n > 100) ? 100 : int'(n);
    for (int i = 0; i < steps; i++) begin
      case (o)
        SH_SHL:  begin lost |= ry[31]; ry = {ry[30:0], 1'b0}; end
        SH_ASHL: begin if (i < 31) lost |= ry[30]; ry = {ry[31], ry[29:0], 1'b0}; end
        SH_ROTL: begin if (i < 32) lost |= ry[31]; ry = {ry[30:0], ry[31]}; end
        SH_SHR:  begin lost |= ry[0]; ry = {1'b0, ry[31:1]}; end
        SH_ASHR: begin lost |= ry[0]; ry = {ry[31], ry[31:1]}; end
        SH_ROTR: begin if (i < 32) lost |= ry[0]; ry = {ry[0], ry[31:1]}; end
        default: ;
      endcase
    end
    // rotation by a large amount: the result is the rotation by n mod 32
    if ((o == SH_ROTL || o == SH_ROTR) && n > 100) begin
      ry = w;
      for (int i = 0; i < int'(n % 32); i++)
        ry = (o == SH_ROTL) ? {ry[30:0], ry[31]} : {ry[0], ry[31:1]};
    end
    rz = !lost;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      logic [31:0] ey;
      logic ez;
      op  = shift_op_e'($urandom % 6);
      case ($urandom % 4)
        0: a = $urandom & $urandom & $urandom;
        1: a = 32'h8000_0001;
        default: a = $urandom;
      endcase
      amt = ((t % 50) == 0) ? ($urandom | 32'h100) : ($urandom % 41);
      #1;
      ref_model(op, a, amt, ey, ez);
      checks++;
      if (y !== ey || zero !== ez) begin
        failures++;
        $display("FAIL %s a=%h amt=%0d y=%h exp=%h zero=%b exp=%b", op.name(), a, amt, y, ey, zero, ez);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
