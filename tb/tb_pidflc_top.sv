// tb_pidflc_top: end-to-end test of the PID-like fuzzy controller at its
// default configuration.
//
// Runs long sequences of control actions with random samples, gains and
// selection lines and compares every u with a reference model of the whole
// controller (error and rate with saturation, the two PD fuzzy controllers
// from the bit-accurate reference, the PI accumulator and the output
// selection of the selection lines). Each action must take 17 clocks from the
// edge that accepts `start` to `done`. A `start` raised while busy must be
// ignored. The test counts how often each mechanism of the design was
// exercised and fails if one never was: each controller type, saturation of
// the error, of the rate, of an input gain, of an output gain, of the PI
// accumulator and of the PID sum, both shoulder regions of the input sets,
// a gain latch holding its value while its PD fuzzy controller is not
// selected, and a start ignored while busy.
module tb_pidflc_top;
  import pidflc_pkg::*;
  import tb_ref_pkg::*;

  logic   clk = 0, rst_n = 0, start = 0, mi = 0, mo = 0;
  sdata_t yd = '0, yp = '0, u;
  gain_t  kp = '0, kd = '0, ki = '0, ko = '0;
  logic   done, busy;
  int checks = 0, failures = 0;

  pidflc_top dut (.*);

  always #5 clk = ~clk;

  localparam int NACT = 3000;

  initial begin
    repeat (NACT * 30 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  int e_prev = 0, acc = 0;
  int pd_kp = 0, pd_kd = 0, pd_ko = 0, pi_kp = 0, pi_ki = 0, pi_ko = 0;

  // mechanism counters
  typedef enum int {
    M_PD, M_PI, M_PID, M_E_SAT, M_R_SAT, M_GIN_SAT, M_GOUT_SAT, M_ACC_SAT,
    M_PID_SAT, M_SHOULDER_LO, M_SHOULDER_HI, M_LATCH_HOLD, M_START_IGNORED, M_COUNT
  } mech_e;
  int mech [M_COUNT];
  string mech_name [M_COUNT] = '{"PD mode", "PI mode", "PID mode", "error saturation",
    "rate saturation", "input gain saturation", "output gain saturation",
    "PI accumulator saturation", "PID sum saturation", "lower shoulder",
    "upper shoulder", "gain latch hold", "start ignored while busy"};

  function automatic bit gin_sat(int x, int k);
    int v;
    v = round16(x * k);
    return (v > 127) || (v < -128);
  endfunction

  function automatic void note_inputs(int x1, int x2, int k1, int k2, int ko_);
    int s1, s2, z;
    if (gin_sat(x1, k1) || gin_sat(x2, k2)) mech[M_GIN_SAT]++;
    s1 = ref_gain_in(x1, k1); s2 = ref_gain_in(x2, k2);
    if (s1 < 16 || s2 < 16)    mech[M_SHOULDER_LO]++;
    if (s1 >= 240 || s2 >= 240) mech[M_SHOULDER_HI]++;
    z = ref_fis(s1, s2);
    if (round16((z - 128) * ko_) > 127 || round16((z - 128) * ko_) < -128) mech[M_GOUT_SAT]++;
  endfunction

  task automatic action(input int ydv, input int ypv, input int kpv, input int kdv,
                        input int kiv, input int kov, input bit miv, input bit mov,
                        input bit poke);
    int e, r, u_pd, du, exp, lat, raw, sum;
    mode_t m;
    @(negedge clk);
    yd = sdata_t'(ydv); yp = sdata_t'(ypv);
    kp = gain_t'(kpv); kd = gain_t'(kdv); ki = gain_t'(kiv); ko = gain_t'(kov);
    mi = miv; mo = mov; start = 1;
    // reference
    m = miv ? MODE_PID : (mov ? MODE_PI : MODE_PD);
    raw = ydv - ypv; e = clamp8(raw);
    if (raw != e) mech[M_E_SAT]++;
    raw = e - e_prev; r = clamp8(raw);
    if (raw != r) mech[M_R_SAT]++;
    e_prev = e;
    if (m != MODE_PI) begin pd_kp = kpv; pd_kd = kdv; pd_ko = kov; end
    else if (pd_kp != kpv || pd_kd != kdv || pd_ko != kov) mech[M_LATCH_HOLD]++;
    if (m != MODE_PD) begin pi_kp = kpv; pi_ki = kiv; pi_ko = kov; end
    else if (pi_kp != kpv || pi_ki != kiv || pi_ko != kov) mech[M_LATCH_HOLD]++;
    u_pd = ref_pdflc(e, r, pd_kp, pd_kd, pd_ko);
    du   = ref_pdflc(r, e, pi_kp, pi_ki, pi_ko);
    case (m)
      MODE_PD: begin
        mech[M_PD]++;
        note_inputs(e, r, pd_kp, pd_kd, pd_ko);
        exp = u_pd;
      end
      MODE_PI: begin
        mech[M_PI]++;
        note_inputs(r, e, pi_kp, pi_ki, pi_ko);
        sum = acc + du; acc = clamp8(sum);
        if (sum != acc) mech[M_ACC_SAT]++;
        exp = acc;
      end
      default: begin
        mech[M_PID]++;
        note_inputs(e, r, pd_kp, pd_kd, pd_ko);
        note_inputs(r, e, pi_kp, pi_ki, pi_ko);
        sum = acc + du; acc = clamp8(sum);
        if (sum != acc) mech[M_ACC_SAT]++;
        sum = u_pd + acc; exp = clamp8(sum);
        if (sum != exp) mech[M_PID_SAT]++;
      end
    endcase
    @(posedge clk);             // edge that accepts start
    #1 start = 0;
    // change every input: the controller must have latched what it needs
    yd = ~yd; yp = ~yp; kp = ~kp; kd = ~kd; ki = ~ki; ko = ~ko; mi = ~mi; mo = ~mo;
    lat = 0;
    while (!done && lat < 40) begin
      @(negedge clk);
      if (poke && lat == 5) begin start = 1; mech[M_START_IGNORED]++; end
      else start = 0;
      @(posedge clk); #1 lat++;
    end
    start = 0;
    checks++;
    if (lat != 17 || int'(u) != exp) begin
      failures++;
      $display("FAIL mode=%s yd=%0d yp=%0d lat=%0d u=%0d exp=%0d", m.name(), ydv, ypv, lat, u, exp);
    end
    checks++;
    if (busy) begin failures++; $display("FAIL busy together with done"); end
    @(posedge clk); #1;
    checks++;
    if (busy || done) begin failures++; $display("FAIL busy/done after action"); end
  endtask

  function automatic int rnd_s(int span);   // signed in [-span, span-1]
    return int'($urandom_range(2 * span - 1)) - span;
  endfunction

  initial begin
    int span, mode;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NACT; n++) begin
      span = (n % 5 == 0) ? 128 : ((n % 5 == 1) ? 64 : 24);
      mode = $urandom_range(3);
      action(rnd_s(span), rnd_s(span),
             (n % 7 == 0) ? $urandom_range(255) : $urandom_range(8, 40),
             (n % 7 == 0) ? $urandom_range(255) : $urandom_range(8, 40),
             (n % 7 == 0) ? $urandom_range(255) : $urandom_range(8, 40),
             (n % 11 == 0) ? $urandom_range(255) : $urandom_range(4, 32),
             mode[1], mode[0], (n % 13) == 0);
    end
    foreach (mech[i]) begin
      $display("mechanism %-28s %0d", mech_name[i], mech[i]);
      checks++;
      if (mech[i] == 0) begin failures++; $display("FAIL mechanism never exercised: %s", mech_name[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
