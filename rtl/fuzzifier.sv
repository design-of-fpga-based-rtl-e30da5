// fuzzifier: turns one shifted 8-bit input into its two active fuzzy sets.
//
// The input fuzzy sets' memory returns the first active set i and the
// membership mu_i. An incrementer forms i+1 and an inverter forms the
// membership in the second set, 1 - mu_i: with 6-bit memberships whose "one"
// is 63, 1 - mu_i is exactly the bitwise inverse of mu_i, so the two
// memberships always add up to one.
//
// Timing: one clock of latency (the memory read); `out_valid` pulses one clock
// after `in_valid`, and the outputs then hold until the next input, so the
// inference engine can read them over its four rule cycles.
module fuzzifier
  import pidflc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  udata_t      x,
  output logic        out_valid,
  output active_set_t first,    // set i and mu_i
  output active_set_t second    // set i+1 and mu_(i+1) = 1 - mu_i
);

  mf_word_t word;

  input_set_memory u_mem (
    .clk   (clk),
    .rd_en (in_valid),
    .addr  (x),
    .data  (word)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_comb begin
    first.idx  = word.idx;
    first.mu   = word.mu;
    second.idx = word.idx + set_idx_t'(1);   // incrementer
    second.mu  = ~word.mu;                   // inverter
  end

endmodule
