// divider: sequential signed 32-bit division for DIV, MOD, RDIV and RMOD.
//
// A start pulse loads the dividend and divisor. The magnitudes are divided
// by a restoring shift-and-subtract loop, one quotient bit per clock, and
// the signs are applied at the end: the quotient is truncated toward zero
// and the remainder takes the sign of the dividend (so that
// dividend = quotient * divisor + remainder). done is high for one cycle,
// 33 cycles after start, with quotient and remainder valid from then until
// the next start. The core never starts it with a zero divisor (the
// instruction set stops the machine instead); a zero divisor here gives an
// all-ones magnitude quotient and the dividend as remainder. The instruction
// set asks only for the quotient and remainder; the algorithm, the latency
// and the sign conventions are this design's.
module divider (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] dividend,
  input  logic [31:0] divisor,
  output logic        busy,
  output logic        done,
  output logic [31:0] quotient,
  output logic [31:0] remainder
);
  logic [31:0] q, d, r;        // quotient bits / divisor magnitude / partial remainder
  logic [5:0]  count;
  logic        neg_q, neg_r;
  logic [32:0] trial;

  assign trial = {r, q[31]} - {1'b0, d};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q <= '0; d <= '0; r <= '0; count <= '0;
      busy <= 1'b0; done <= 1'b0; neg_q <= 1'b0; neg_r <= 1'b0;
      quotient <= '0; remainder <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        q     <= dividend[31] ? -dividend : dividend;
        d     <= divisor[31]  ? -divisor  : divisor;
        r     <= '0;
        neg_q <= dividend[31] ^ divisor[31];
        neg_r <= dividend[31];
        count <= 6'd32;
        busy  <= 1'b1;
      end else if (busy) begin
        if (count != 6'd0) begin
          if (!trial[32]) begin
            r <= trial[31:0];
            q <= {q[30:0], 1'b1};
          end else begin
            r <= {r[30:0], q[31]};
            q <= {q[30:0], 1'b0};
          end
          count <= count - 6'd1;
        end else begin
          quotient  <= neg_q ? -q : q;
          remainder <= neg_r ? -r : r;
          busy      <= 1'b0;
          done      <= 1'b1;
        end
      end
    end
  end
endmodule
