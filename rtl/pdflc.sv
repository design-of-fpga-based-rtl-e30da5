// pdflc: PD-like fuzzy logic controller, the basic block of the design.
//
//   u = Ko * FIS(K1 * x1, K2 * x2)
//
// Two input gain blocks scale and shift x1 (the "error" input of the rule
// table) and x2 (the "rate" input); two fuzzifiers find the two active fuzzy
// sets of each; the inference engine walks the four active rules; the
// centroid defuzzifier forms the crisp output and the output gain block
// shifts it back to a signed value and scales it. The same block serves as
// the PD part (x1 = e, x2 = r, K2 = Kd) and, with the inputs exchanged and
// K2 = Ki, as the incremental PI part of the PID-like controller. Each
// instance has its own gain latches and its own rule table (parameter RULES).
//
// Timing: `in_valid` is sampled at edge 0 and `out_valid` is high in the
// cycle after edge 15: the input gain register (edge 0), the fuzzifier memory
// read (1), the rule memory read of rules 0..3 (2..5), their accumulation
// (3..6), the divider load (7) and eight divider steps (8..15). `u` is valid
// whenever `out_valid` is.
// `load_gains` loads the three gain latches. A new input must not arrive
// before `out_valid`.
module pdflc
  import pidflc_pkg::*;
#(
  parameter rule_table_t RULES = RULE_TABLE   // rule table of this controller
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load_gains,
  input  gain_t  k1,          // gain of input 1 (Kp)
  input  gain_t  k2,          // gain of input 2 (Kd or Ki)
  input  gain_t  ko,          // output gain
  input  logic   in_valid,
  input  sdata_t x1,
  input  sdata_t x2,
  output logic   out_valid,
  output sdata_t u
);

  udata_t      s1, s2;
  logic        g_valid, g_valid2;
  logic        f_valid, f_valid2;
  active_set_t a1_first, a1_second, a2_first, a2_second;
  udata_t      beta;
  mu_t         mu;
  logic        r_valid, r_last;
  udata_t      z;

  gain_in u_gain1 (
    .clk (clk), .rst_n (rst_n), .load (load_gains), .k (k1),
    .in_valid (in_valid), .x (x1), .out_valid (g_valid), .y (s1)
  );

  gain_in u_gain2 (
    .clk (clk), .rst_n (rst_n), .load (load_gains), .k (k2),
    .in_valid (in_valid), .x (x2), .out_valid (g_valid2), .y (s2)
  );

  fuzzifier u_fuzz1 (
    .clk (clk), .rst_n (rst_n), .in_valid (g_valid), .x (s1),
    .out_valid (f_valid), .first (a1_first), .second (a1_second)
  );

  fuzzifier u_fuzz2 (
    .clk (clk), .rst_n (rst_n), .in_valid (g_valid2), .x (s2),
    .out_valid (f_valid2), .first (a2_first), .second (a2_second)
  );

  inference_engine #(.RULES(RULES)) u_inf (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (f_valid),
    .in1_first  (a1_first),
    .in1_second (a1_second),
    .in2_first  (a2_first),
    .in2_second (a2_second),
    .beta       (beta),
    .mu         (mu),
    .out_valid  (r_valid),
    .out_last   (r_last)
  );

  defuzzifier u_defuzz (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (r_valid),
    .in_last   (r_last),
    .beta      (beta),
    .mu        (mu),
    .out_valid (out_valid),
    .z         (z)
  );

  gain_out u_gain_o (
    .clk (clk), .rst_n (rst_n), .load (load_gains), .k (ko),
    .z (z), .u (u)
  );

  // Both input paths are identical, so their valid strobes must agree.
  assert property (@(posedge clk) disable iff (!rst_n) g_valid == g_valid2);
  assert property (@(posedge clk) disable iff (!rst_n) f_valid == f_valid2);

endmodule
