// pidflc_top: PID-like fuzzy logic controller.
//
// Each control action samples the desired output yd and the plant output yp,
// forms the error e(n) = yd - yp and its rate r(n) = e(n) - e(n-1), and runs
// two PD fuzzy controllers side by side:
//   * the PD part, inputs (e, r) with gains (Kp, Kd), output u_PD(n);
//   * the PI part, a PD fuzzy controller in incremental form: inputs
//     exchanged (r, e), gains (Kp, Ki), its output taken as du_PI(n) and
//     accumulated, u_PI(n) = u_PI(n-1) + du_PI(n).
// The selection lines choose the output: mi=1 gives the PID sum
// u_PD + u_PI, mi=0 mo=0 the PD output, mi=0 mo=1 the PI output.
//
// Interface: all data are 8-bit two's complement (1.0 = 128), gains are
// unsigned 4.4. A `start` pulse while not `busy` latches yd, yp, the selection
// lines and, for each PD fuzzy controller the selection lines enable, the gain
// ports; 17 clocks later `done` pulses with the new `u`, which then holds.
// `busy` falls together with the rise of `done`, so the next action may start
// in the cycle `done` is high; a `start` while busy is ignored.
//
// Following the original architecture: the parallel PD and incremental PI
// fuzzy controllers, the selection table, four 8-bit gain ports, a separate
// gain latch per gain block loaded according to the selection lines, a rule
// table per PD fuzzy controller (PD_RULES, PI_RULES, both defaulting to the
// 64-rule table) and 17 clocks per action.
//
// Choices of this implementation: the handshake and the split of the 17
// clocks among the stages; e, r, the PI accumulator and the PID sum saturate
// to 8 bits; the PI accumulator is updated only in PI and PID modes and holds
// otherwise; reset is synchronous, active low, and clears e(n-1), the
// accumulator, u and the gain latches.
module pidflc_top
  import pidflc_pkg::*;
#(
  parameter rule_table_t PD_RULES = RULE_TABLE,   // rule table of the PD part
  parameter rule_table_t PI_RULES = RULE_TABLE    // rule table of the PI part
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  sdata_t yd,
  input  sdata_t yp,
  input  gain_t  kp,
  input  gain_t  kd,
  input  gain_t  ki,
  input  gain_t  ko,
  input  logic   mi,
  input  logic   mo,
  output sdata_t u,
  output logic   done,
  output logic   busy
);

  mode_t  mode, mode_q;
  logic   accept;
  sdata_t e_q, r_q, e_prev;
  logic   pd_in_valid;
  logic   pd_valid, pi_valid;
  sdata_t u_pd, du_pi;
  sdata_t u_pi_acc, u_pi_next;
  logic   load_pd, load_pi;

  always_comb begin
    mode    = decode_mode(mi, mo);
    accept  = start & ~busy;
    load_pd = accept & (mode != MODE_PI);
    load_pi = accept & (mode != MODE_PD);
  end

  // Error and rate of change of error.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      e_q         <= '0;
      r_q         <= '0;
      e_prev      <= '0;
      pd_in_valid <= 1'b0;
      mode_q      <= MODE_PD;
      busy        <= 1'b0;
    end else begin
      pd_in_valid <= accept;
      if (accept) begin
        sdata_t e_new;
        e_new  = sat8(20'(yd) - 20'(yp));
        e_q    <= e_new;
        r_q    <= sat8(20'(e_new) - 20'(e_prev));
        e_prev <= e_new;
        mode_q <= mode;
        busy   <= 1'b1;
      end else if (pd_valid) begin
        busy <= 1'b0;
      end
    end
  end

  pdflc #(.RULES(PD_RULES)) u_pd_flc (
    .clk        (clk),
    .rst_n      (rst_n),
    .load_gains (load_pd),
    .k1         (kp),
    .k2         (kd),
    .ko         (ko),
    .in_valid   (pd_in_valid),
    .x1         (e_q),
    .x2         (r_q),
    .out_valid  (pd_valid),
    .u          (u_pd)
  );

  pdflc #(.RULES(PI_RULES)) u_pi_flc (
    .clk        (clk),
    .rst_n      (rst_n),
    .load_gains (load_pi),
    .k1         (kp),
    .k2         (ki),
    .ko         (ko),
    .in_valid   (pd_in_valid),
    .x1         (r_q),
    .x2         (e_q),
    .out_valid  (pi_valid),
    .u          (du_pi)
  );

  always_comb u_pi_next = sat8(20'(u_pi_acc) + 20'(du_pi));

  // PI accumulator and output selection.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      u_pi_acc <= '0;
      u        <= '0;
      done     <= 1'b0;
    end else begin
      done <= pd_valid;
      if (pd_valid) begin
        unique case (mode_q)
          MODE_PD:  u <= u_pd;
          MODE_PI:  begin u_pi_acc <= u_pi_next; u <= u_pi_next; end
          MODE_PID: begin u_pi_acc <= u_pi_next; u <= sat8(20'(u_pd) + 20'(u_pi_next)); end
          default:  u <= u_pd;
        endcase
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) pd_valid == pi_valid);

endmodule
