// memory: word-addressed main memory of 32-bit words.
//
// A single synchronous port: with en high, a write stores wdata at addr on
// the clock edge, and a read presents the word at addr on rdata after that
// edge (one cycle of latency). Addresses are 32-bit machine addresses taken
// modulo the memory size, so a stack pointer that wraps below 0 lands at the
// top of memory. Contents are not reset. The instruction set only speaks of
// memory[address] holding 32-bit words; its size (2^ADDR_W words), the
// single port and the latency are this design's.
module memory #(
  parameter int unsigned ADDR_W = 20
) (
  input  logic        clk,
  input  logic        en,
  input  logic        we,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata
);
  logic [31:0] mem [2**ADDR_W];
  logic [ADDR_W-1:0] a;
  assign a = addr[ADDR_W-1:0];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[a] <= wdata;
      else    rdata  <= mem[a];
    end
  end
endmodule
