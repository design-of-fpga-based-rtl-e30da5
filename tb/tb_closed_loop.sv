// tb_closed_loop: the controller in a unity feedback loop with the two
// discrete plant models used to evaluate it, for each controller type.
//
//   G1(z) = 0.1903 z^-1 / (1 - 0.9048 z^-1)                      (T = 0.1 s)
//   G2(z) = z^-2 (0.02511 z^-1 + 0.01997 z^-2)
//                / (1 - 1.48 z^-1 + 0.5028 z^-2)                  (T = 0.25 s)
//
// Each sampling period the plant output is quantised to 8 bits (1.0 = 128, the
// A/D converter), the controller runs one action on it and on the desired
// output 0.5 (code 64), and its 8-bit action drives the plant (the D/A
// converter). Alongside, the same loop is run with a floating-point model of
// the fuzzy controller (same fuzzy sets, rules, gains and output selection,
// no quantisation), the "software" controller. For each of the six cases the
// test checks that every action takes 17 clocks, that the mean difference
// between the two step responses is below 0.01 and that the mean difference
// between the two control actions is below 0.02, and prints both means and
// the final plant output. With +sweep it first prints the PI results for a
// grid of Ki and Ko values.
module tb_closed_loop;
  import pidflc_pkg::*;

  logic   clk = 0, rst_n = 0, start = 0, mi = 0, mo = 0;
  sdata_t yd = '0, yp = '0, u;
  gain_t  kp = '0, kd = '0, ki = '0, ko = '0;
  logic   done, busy;
  int checks = 0, failures = 0;

  pidflc_top dut (.*);

  always #5 clk = ~clk;

  localparam int NSAMP = 100;

  initial begin
    repeat (40 * NSAMP * 25 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- floating-point fuzzy controller ----------------
  localparam int RT [8][8] = '{   // [rate][error], printed rule table
    '{0, 0, 0, 1, 1, 2, 3, 4}, '{0, 0, 1, 1, 2, 3, 4, 4},
    '{0, 1, 1, 2, 3, 4, 4, 5}, '{1, 1, 2, 3, 4, 4, 5, 6},
    '{1, 2, 3, 3, 4, 5, 6, 6}, '{2, 3, 3, 4, 5, 6, 6, 7},
    '{3, 3, 4, 5, 6, 6, 7, 7}, '{3, 4, 5, 6, 6, 7, 7, 7}};

  function automatic real clip(real v);
    if (v > 127.0 / 128.0) return 127.0 / 128.0;
    if (v < -1.0) return -1.0;
    return v;
  endfunction

  // membership of x in set k: triangles with peaks at -0.875 + 0.25 k
  function automatic real mf(real x, int k);
    real p, d;
    p = -0.875 + 0.25 * k;
    if (k == 0 && x <= p) return 1.0;
    if (k == 7 && x >= p) return 1.0;
    d = (x > p) ? x - p : p - x;
    return (d >= 0.25) ? 0.0 : 1.0 - d / 0.25;
  endfunction

  function automatic real sw_pdflc(real x1, real x2, real k1, real k2, real ko_);
    real a, b, w, num, den;
    a = clip(x1 * k1); b = clip(x2 * k2);
    num = 0.0; den = 0.0;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        w = (mf(a, i) < mf(b, j)) ? mf(a, i) : mf(b, j);
        num += w * (-1.0 + 2.0 * RT[j][i] / 7.0);
        den += w;
      end
    return clip(ko_ * num / den);
  endfunction

  // ---------------- plants ----------------
  function automatic real plant(int which, real y1, real y2, real u1, real u3, real u4);
    if (which == 1) return 0.9048 * y1 + 0.1903 * u1;
    return 1.48 * y1 - 0.5028 * y2 + 0.02511 * u3 + 0.01997 * u4;
  endfunction

  task automatic run_case(input int which, input int mode, input int kpv, input int kdv,
                          input int kiv, input int kov);
    // hardware loop state
    real hy [3], hu [5];
    // software loop state
    real sy [3], su [5], s_eprev, s_acc, s_e, s_r, s_pd, s_pi, s_u;
    real dy, du, fin;
    int lat, code;
    string nm;
    nm = (mode == 0) ? "PDFLC" : ((mode == 1) ? "PIFLC" : "PIDFLC");
    hy = '{0.0, 0.0, 0.0}; hu = '{0.0, 0.0, 0.0, 0.0, 0.0};
    sy = '{0.0, 0.0, 0.0}; su = '{0.0, 0.0, 0.0, 0.0, 0.0};
    s_eprev = 0.0; s_acc = 0.0;
    dy = 0.0; du = 0.0;
    // fresh controller state for each case
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < NSAMP; n++) begin
      // plant outputs for this sample
      hy[0] = plant(which, hy[1], hy[2], hu[1], hu[3], hu[4]);
      sy[0] = plant(which, sy[1], sy[2], su[1], su[3], su[4]);
      // hardware controller
      code = int'($floor(hy[0] * 128.0 + 0.5));
      code = (code > 127) ? 127 : ((code < -128) ? -128 : code);
      @(negedge clk);
      yd = 8'sd64; yp = sdata_t'(code);
      kp = gain_t'(kpv); kd = gain_t'(kdv); ki = gain_t'(kiv); ko = gain_t'(kov);
      mi = (mode == 2); mo = (mode == 1); start = 1;
      @(posedge clk); #1 start = 0;
      lat = 0;
      while (!done && lat < 40) begin @(posedge clk); #1 lat++; end
      checks++;
      if (lat != 17) begin failures++; $display("FAIL latency %0d", lat); end
      hu[0] = real'(u) / 128.0;
      // software controller
      s_e = clip(0.5 - sy[0]); s_r = clip(s_e - s_eprev); s_eprev = s_e;
      s_pd = sw_pdflc(s_e, s_r, kpv / 16.0, kdv / 16.0, kov / 16.0);
      if (mode != 0) s_acc = clip(s_acc + sw_pdflc(s_r, s_e, kpv / 16.0, kiv / 16.0, kov / 16.0));
      s_pi = s_acc;
      s_u = (mode == 0) ? s_pd : ((mode == 1) ? s_pi : clip(s_pd + s_pi));
      su[0] = s_u;
      dy += sy[0] - hy[0];
      du += su[0] - hu[0];
      // shift histories
      hy[2] = hy[1]; hy[1] = hy[0];
      sy[2] = sy[1]; sy[1] = sy[0];
      for (int k = 4; k > 0; k--) begin hu[k] = hu[k-1]; su[k] = su[k-1]; end
    end
    dy /= NSAMP; du /= NSAMP; fin = hy[1];
    $display("%-6s G%0d: mean diff step response %8.4f, control action %8.4f, final y %6.3f (software %6.3f)",
             nm, which, dy, du, fin, sy[1]);
    checks++;
    if (dy > 0.01 || dy < -0.01) begin failures++; $display("FAIL step response differs"); end
    checks++;
    if (du > 0.02 || du < -0.02) begin failures++; $display("FAIL control action differs"); end
  endtask

  // gain values tried by +sweep (unsigned 4.4)
  localparam int SWEEP [4] = '{4, 8, 16, 32};

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // gains (unsigned 4.4): Kp, Kd, Ki, Ko
    if ($test$plusargs("sweep")) begin
      for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++) begin
        $display("ki=%0d ko=%0d", SWEEP[a], SWEEP[b]);
        run_case(1, 1, 16, 16, SWEEP[a], SWEEP[b]);
        run_case(2, 1, 16, 16, SWEEP[a], SWEEP[b]);
      end
    end
    run_case(1, 0, 16, 16, 16, 16);
    run_case(2, 0, 16, 32, 16, 16);
    run_case(1, 1, 16, 16, 16, 16);
    run_case(2, 1, 16, 16, 16, 8);
    run_case(1, 2, 16, 16, 8, 8);
    run_case(2, 2, 16, 32, 4, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
