// gain_in: input gain block of a PD fuzzy controller.
//
// Holds the gain coefficient in an 8-bit latch (4 integer and 4 fraction bits,
// loaded from the gain port while `load` is high), multiplies the signed 8-bit
// controller variable by it and then shifts the result from [-128, 127] to the
// fuzzy inference system's range [0, 255] by adding 2^7, which is done by
// inverting the MSB. As in the design, the gain is applied before the shift.
//
// Design choices not fixed by the design description: the scaled value is
// rounded to the nearest integer, halves away from zero (so that rounding adds
// no bias that an integrating loop would accumulate), and saturated to the
// 8-bit range before the shift; the output is registered, so `out_valid`
// follows `in_valid` by one clock. Reset is synchronous, active low, and clears
// the latch and the output register.
module gain_in
  import pidflc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,       // latch k into the gain latch
  input  gain_t  k,          // gain coefficient port (unsigned 4.4)
  input  logic   in_valid,
  input  sdata_t x,          // controller variable, two's complement
  output logic   out_valid,
  output udata_t y           // shifted, scaled variable for the fuzzifier
);

  gain_t k_latch;
  gprod_t product;   // signed x times unsigned k
  sdata_t scaled;

  always_ff @(posedge clk) begin
    if (!rst_n)    k_latch <= '0;
    else if (load) k_latch <= k;
  end

  always_comb begin
    product = x * $signed({1'b0, k_latch});
    scaled  = gain_round_sat(product);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= {~scaled[DW-1], scaled[DW-2:0]};
    end
  end

endmodule
