// computer: the complete machine, a cpu_core on a word-addressed memory.
//
// While the core is stopped (RUN = 0) a host can read and write the memory
// through the host port, typically to load a program at address 0 and to
// read results back; a read returns data on host_rdata one cycle after the
// request. A pulse on start then sets RUN and the core executes from its
// PC (0 after reset) until an instruction stops it, which drops run. While
// the core runs, it owns the memory port; host requests are then ignored
// and flagged by an assertion.
// The console output and input channels of the core (OUTN, OUTCH, OUTS,
// OUT, INN, INCH) are brought out to a terminal outside the machine, as is
// the intr input that sets the INTR flag.
//
// The processor and its instruction set follow the document this design is
// built from; the host port, the console channels and the memory size
// (2^ADDR_W words, 1048576 by default: a 24-bit selector start spans
// 2^24 bits = 2^19 words, which then fit beside program and stack) are
// this design's.
module computer
  import isa_pkg::*;
#(
  parameter int unsigned ADDR_W = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        intr,
  output logic        run,
  output logic [31:0] flags_word,
  // host memory port, usable while run = 0
  input  logic        host_en,
  input  logic        host_we,
  input  logic [31:0] host_addr,
  input  logic [31:0] host_wdata,
  output logic [31:0] host_rdata,
  // console
  output logic        out_valid,
  input  logic        out_ready,
  output out_kind_e   out_kind,
  output logic [31:0] out_data,
  output logic        in_ready,
  output in_kind_e    in_kind,
  input  logic        in_valid,
  input  logic [31:0] in_data
);
  logic        c_en, c_we;
  logic [31:0] c_addr, c_wdata;
  logic        m_en, m_we;
  logic [31:0] m_addr, m_wdata, m_rdata;

  cpu_core u_core (
    .clk, .rst_n, .start, .intr, .run, .flags_word,
    .mem_en(c_en), .mem_we(c_we), .mem_addr(c_addr), .mem_wdata(c_wdata),
    .mem_rdata(m_rdata),
    .out_valid, .out_ready, .out_kind, .out_data,
    .in_ready, .in_kind, .in_valid, .in_data
  );

  always_comb begin
    if (run) begin
      m_en = c_en; m_we = c_we; m_addr = c_addr; m_wdata = c_wdata;
    end else begin
      m_en = host_en; m_we = host_we; m_addr = host_addr; m_wdata = host_wdata;
    end
  end

  memory #(.ADDR_W(ADDR_W)) u_mem (
    .clk, .en(m_en), .we(m_we), .addr(m_addr), .wdata(m_wdata), .rdata(m_rdata)
  );

  assign host_rdata = m_rdata;

  // The host may use the memory port only while the core is stopped.
  a_host_idle: assert property (@(posedge clk) disable iff (!rst_n) host_en |-> !run);
endmodule
