// regfile: the sixteen 32-bit registers $0..$12, $FP (13), $SP (14), $PC (15).
//
// Registers are addressed by the 4-bit numbers used in the R and A fields of
// an instruction. Three combinational read ports serve the R register, the A
// (auxiliary) register and register 0 (which holds the selector for the
// byte instructions); $PC and $SP are also always visible on their own
// outputs. Writes happen on the rising clock edge. Besides the general
// write port there are dedicated $PC and $SP write ports, so that one
// instruction (CALL, RET, POP) can update a general register and the stack
// pointer or program counter in the same cycle. When a dedicated port and
// the general port hit the same register in one cycle, the dedicated port
// wins. The register set follows the instruction set; the port structure,
// the write priority and the synchronous reset to zero are this design's.
module regfile
  import isa_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,     // synchronous, active low: all registers to 0
  input  logic [3:0]  ra_r,      // read port R
  output logic [31:0] rd_r,
  input  logic [3:0]  ra_a,      // read port A
  output logic [31:0] rd_a,
  output logic [31:0] rd_0,      // register 0
  output logic [31:0] pc,
  output logic [31:0] sp,
  input  logic        we,        // general write port
  input  logic [3:0]  wa,
  input  logic [31:0] wd,
  input  logic        pc_we,     // dedicated $PC write
  input  logic [31:0] pc_wd,
  input  logic        sp_we,     // dedicated $SP write
  input  logic [31:0] sp_wd
);
  logic [31:0] regs [16];

  assign rd_r = regs[ra_r];
  assign rd_a = regs[ra_a];
  assign rd_0 = regs[0];
  assign pc   = regs[REG_PC];
  assign sp   = regs[REG_SP];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) regs[i] <= '0;
    end else begin
      if (we) regs[wa] <= wd;
      if (pc_we) regs[REG_PC] <= pc_wd;
      if (sp_we) regs[REG_SP] <= sp_wd;
    end
  end
endmodule
