// gain_out: output gain block of a PD fuzzy controller.
//
// Converts the fuzzy inference output from the range [0, 255] back to
// [-128, 127] by subtracting 2^7 (an MSB inversion), then multiplies by the
// output gain coefficient held in an 8-bit latch (4 integer and 4 fraction
// bits, loaded from the gain port while `load` is high). As in the design the
// shift comes before the gain here, the reverse of the input gain block.
//
// Design choices: the datapath is combinational (the enclosing controller
// registers the result); the product is rounded to the nearest integer,
// halves away from zero, and saturated to 8 bits. Unbiased rounding matters
// here because the PI part accumulates this block's output. Reset is
// synchronous, active low, and clears the latch.
module gain_out
  import pidflc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,       // latch k into the gain latch
  input  gain_t  k,          // output gain port (unsigned 4.4)
  input  udata_t z,          // fuzzy inference output, shifted range
  output sdata_t u           // scaled controller output, two's complement
);

  gain_t k_latch;
  sdata_t shifted;
  gprod_t product;

  always_ff @(posedge clk) begin
    if (!rst_n)    k_latch <= '0;
    else if (load) k_latch <= k;
  end

  always_comb begin
    shifted = sdata_t'({~z[DW-1], z[DW-2:0]});
    product = shifted * $signed({1'b0, k_latch});
    u       = gain_round_sat(product);
  end

endmodule
