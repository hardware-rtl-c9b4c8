// tb_memory: writes random words to random addresses, reads them back with
// the one-cycle latency, fills a block of neighbouring words, and checks
// that addresses wrap modulo the size.
module tb_memory;
  localparam int AW = 20;   // the memory's default size
  logic clk = 0, en = 0, we = 0;
  logic [31:0] addr = 0, wdata = 0, rdata;
  int checks = 0, failures = 0;
  logic [31:0] shadow [int];
  memory dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    for (int t = 0; t < 500; t++) begin
      int k;
      k = $urandom % (2**AW);
      #1 en = 1; we = 1; addr = 32'(k); wdata = $urandom;
      shadow[k] = wdata;
      @(posedge clk);
    end
    // a block of neighbouring words, each holding a value derived from its address
    for (int k = 0; k < 256; k++) begin
      #1 en = 1; we = 1; addr = 32'('h8000 + k); wdata = 32'(k * 32'h9E37_79B9);
      shadow['h8000 + k] = wdata;
      @(posedge clk);
    end
    // write through a wrapped address: -1 is the top word
    #1 en = 1; we = 1; addr = 32'hffff_ffff; wdata = 32'hcafe_f00d;
    shadow[2**AW - 1] = wdata;
    @(posedge clk);
    foreach (shadow[k]) begin
      #1 en = 1; we = 0; addr = 32'(k) | ((t_hi() & 1) << AW);
      @(posedge clk); #1 en = 0;
      checks++;
      if (rdata !== shadow[k]) begin
        failures++;
        $display("FAIL addr %0d: %h expected %h", k, rdata, shadow[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] t_hi();
    return $urandom;
  endfunction
endmodule
