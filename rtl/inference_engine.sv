// inference_engine: active-rule inference for a two-input fuzzy system.
//
// The active rule selector walks the four active rules in four consecutive
// clocks. For each rule the rule memory returns the consequent beta_k (an
// output singleton position) and the minimum circuit returns the rule's
// applicability degree mu_k = min(membership in the input #1 set, membership
// in the input #2 set).
//
// Timing: `start` (one clock pulse, inputs stable from then for four clocks)
// is followed one clock later by four cycles with `out_valid` high and
// (beta, mu) of rules 0..3; `out_last` marks rule 3. The minimum is registered
// so that it lines up with the synchronous rule memory read.
module inference_engine
  import pidflc_pkg::*;
#(
  parameter rule_table_t RULES = RULE_TABLE   // rule table of this controller
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  active_set_t in1_first,
  input  active_set_t in1_second,
  input  active_set_t in2_first,
  input  active_set_t in2_second,
  output udata_t      beta,
  output mu_t         mu,
  output logic        out_valid,
  output logic        out_last
);

  active_set_t sel1, sel2;
  logic        sel_valid, sel_last;

  active_rule_selector u_sel (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .in1_first  (in1_first),
    .in1_second (in1_second),
    .in2_first  (in2_first),
    .in2_second (in2_second),
    .sel1       (sel1),
    .sel2       (sel2),
    .valid      (sel_valid),
    .last       (sel_last)
  );

  rule_memory #(.RULES(RULES)) u_rules (
    .clk   (clk),
    .rd_en (sel_valid),
    .addr  ({sel1.idx, sel2.idx}),
    .data  (beta)
  );

  // Minimum circuit.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mu        <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= sel_valid;
      out_last  <= sel_last;
      if (sel_valid) mu <= (sel1.mu < sel2.mu) ? sel1.mu : sel2.mu;
    end
  end

endmodule
