// tb_inference_engine: random pairs of active sets (as a fuzzifier would
// deliver them: i and i+1 with complementary memberships, plus fully random
// ones) are presented with a `start` pulse; the four (beta_k, mu_k) outputs
// must follow one clock later in four consecutive cycles, beta_k from the
// reference rule table and mu_k the minimum of the two memberships.
module tb_inference_engine;
  import pidflc_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, out_valid, out_last;
  active_set_t in1_first, in1_second, in2_first, in2_second;
  udata_t beta;
  mu_t mu;
  int checks = 0, failures = 0;

  inference_engine dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int i1, i2, m1, m2, eb, em;
    int idx1 [2], mu1 [2], idx2 [2], mu2 [2];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      if (n % 2 == 0) begin
        i1 = $urandom_range(6); i2 = $urandom_range(6);
        m1 = $urandom_range(63); m2 = $urandom_range(63);
        idx1 = '{i1, i1 + 1}; mu1 = '{m1, 63 - m1};
        idx2 = '{i2, i2 + 1}; mu2 = '{m2, 63 - m2};
      end else begin
        idx1 = '{$urandom_range(7), $urandom_range(7)}; mu1 = '{$urandom_range(63), $urandom_range(63)};
        idx2 = '{$urandom_range(7), $urandom_range(7)}; mu2 = '{$urandom_range(63), $urandom_range(63)};
      end
      @(negedge clk);
      in1_first  = '{idx: 3'(idx1[0]), mu: 6'(mu1[0])};
      in1_second = '{idx: 3'(idx1[1]), mu: 6'(mu1[1])};
      in2_first  = '{idx: 3'(idx2[0]), mu: 6'(mu2[0])};
      in2_second = '{idx: 3'(idx2[1]), mu: 6'(mu2[1])};
      start = 1;
      @(negedge clk);
      start = 0;
      for (int r = 0; r < 4; r++) begin
        eb = ref_beta(idx1[r % 2], idx2[r / 2]);
        em = imin(mu1[r % 2], mu2[r / 2]);
        checks++;
        if (!out_valid || out_last != (r == 3) || int'(beta) != eb || int'(mu) != em) begin
          failures++;
          $display("FAIL n=%0d rule %0d v=%0b l=%0b beta=%0d/%0d mu=%0d/%0d", n, r, out_valid, out_last, beta, eb, mu, em);
        end
        @(negedge clk);
      end
      checks++;
      if (out_valid) begin failures++; $display("FAIL valid after four rules"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
