// defuzzifier: centroid defuzzification of the four active rules.
//
//   z = sum(mu_k * beta_k) / sum(mu_k),  k over the four active rules
//
// A multiplier forms mu_k * beta_k (14 bits), Accumulator_1 sums the products
// (16 bits), Accumulator_2 sums the applicability degrees (8 bits) and a
// divider forms the crisp 8-bit output. The rule pairs arrive one per clock;
// the pair flagged `in_last` closes the sum and starts the division.
//
// Timing: the accumulators update at the edge that samples each pair; the
// divider is started one clock after the last pair, loads the sums at the next
// edge and takes 8 more clocks, so `out_valid` is high in the cycle after the
// ninth edge following the edge that sampled the last pair; `z` then holds
// until the next result. The divider is sequential (one quotient bit per
// clock), a choice of this design: the description names only "one divider".
module defuzzifier
  import pidflc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  logic   in_last,
  input  udata_t beta,
  input  mu_t    mu,
  output logic   out_valid,
  output udata_t z
);

  logic [DW+MUW-1:0] product;    // 14 bits
  logic [15:0]       acc1;       // Accumulator_1: sum of mu*beta
  logic [7:0]        acc2;       // Accumulator_2: sum of mu
  logic              fresh;      // next pair starts a new sum
  logic              div_start;
  logic              div_busy;

  always_comb product = beta * mu;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc1      <= '0;
      acc2      <= '0;
      fresh     <= 1'b1;
      div_start <= 1'b0;
    end else begin
      div_start <= in_valid & in_last;
      if (in_valid) begin
        acc1  <= (fresh ? 16'd0 : acc1) + 16'(product);
        acc2  <= (fresh ? 8'd0  : acc2) + 8'(mu);
        fresh <= in_last;
      end
    end
  end

  seq_divider #(.QW(DW)) u_div (
    .clk   (clk),
    .rst_n (rst_n),
    .start (div_start),
    .num   (acc1 + 16'(acc2 >> 1)),   // + half the divisor: rounded quotient
    .den   (acc2),
    .busy  (div_busy),
    .done  (out_valid),
    .quo   (z)
  );

  // A new division may only start once the previous one has finished.
  assert property (@(posedge clk) disable iff (!rst_n) div_start |-> !div_busy);

endmodule
