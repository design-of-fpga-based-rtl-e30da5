// active_rule_selector: launches only the rules whose premises are active.
//
// With two inputs and at most two overlapping fuzzy sets per input, exactly
// four rules are active. A 2-bit counter (b1 b0) steps through them, one per
// clock, and drives the select lines of two multiplexers: b0 picks the first
// or second active set of input #1 (error), b1 that of input #2 (rate). The
// selected set numbers address the rule memory; the selected memberships go
// to the minimum circuit.
//
// Timing: a `start` pulse presents rule 0 in the same cycle, and rules 1, 2
// and 3 in the next three cycles. `valid` is high in those four cycles and
// `last` marks rule 3. A `start` while a sequence is running restarts it.
module active_rule_selector
  import pidflc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  active_set_t in1_first,
  input  active_set_t in1_second,
  input  active_set_t in2_first,
  input  active_set_t in2_second,
  output active_set_t sel1,      // chosen set of input #1
  output active_set_t sel2,      // chosen set of input #2
  output logic        valid,
  output logic        last
);

  logic [1:0] count;      // next rule number while running
  logic       running;
  logic [1:0] b;          // select lines b1 b0 of the current cycle

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running <= 1'b0;
      count   <= '0;
    end else if (start) begin
      running <= 1'b1;
      count   <= 2'd1;
    end else if (running) begin
      count <= count + 2'd1;
      if (count == 2'd3) running <= 1'b0;
    end
  end

  always_comb begin
    b     = start ? 2'd0 : count;
    valid = start | running;
    last  = valid & (b == 2'd3);
    sel1  = b[0] ? in1_second : in1_first;
    sel2  = b[1] ? in2_second : in2_first;
  end

endmodule
