// seq_divider: sequential restoring divider for the centroid defuzzifier.
//
// Divides a 16-bit numerator by an 8-bit denominator, producing an 8-bit
// quotient, truncated (the defuzzifier adds half the divisor to round). It
// relies on the quotient fitting in 8 bits, i.e. num < 256 * den, which
// always holds for a weighted mean of 8-bit values. The high numerator byte
// is the initial partial remainder; each iteration shifts in one low numerator
// bit, subtracts the denominator if possible and
// records one quotient bit. A zero denominator returns ZERO_RESULT.
//
// Timing: `start` is sampled at one clock edge, which loads the operands; the
// next QW edges each retire one quotient bit and `done` pulses for one clock
// after the last, with `quo` valid from then until the next start.
module seq_divider #(
  parameter int unsigned       QW          = 8,    // quotient / denominator width
  parameter logic [QW-1:0]     ZERO_RESULT = 8'd128
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [2*QW-1:0] num,
  input  logic [QW-1:0]   den,
  output logic            busy,
  output logic            done,
  output logic [QW-1:0]   quo
);

  logic [QW-1:0]         rem;      // partial remainder (< den)
  logic [QW-1:0]         bits;     // low numerator bits, shifted out MSB first
  logic [QW-1:0]         d;
  logic [$clog2(QW+1)-1:0] left;   // iterations still to do
  logic                  zero_den;
  logic [QW:0]           trial;

  always_comb trial = {rem, bits[QW-1]};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rem      <= '0;
      bits     <= '0;
      d        <= '0;
      left     <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      quo      <= '0;
      zero_den <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        rem      <= num[2*QW-1:QW];
        bits     <= num[QW-1:0];
        d        <= den;
        zero_den <= (den == '0);
        left     <= ($clog2(QW+1))'(QW);
        busy     <= 1'b1;
      end else if (busy) begin
        if (trial >= {1'b0, d}) begin
          rem  <= QW'(trial - {1'b0, d});
          bits <= {bits[QW-2:0], 1'b1};
        end else begin
          rem  <= trial[QW-1:0];
          bits <= {bits[QW-2:0], 1'b0};
        end
        left <= left - 1'b1;
        if (left == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
          if (zero_den)                   quo <= ZERO_RESULT;
          else if (trial >= {1'b0, d})    quo <= {bits[QW-2:0], 1'b1};
          else                            quo <= {bits[QW-2:0], 1'b0};
        end
      end
    end
  end

endmodule
