// tb_defuzzifier: feeds groups of four (beta, mu) pairs, one per clock, and
// checks the centroid sum(mu*beta)/sum(mu) (rounded to nearest) against integer
// arithmetic, the latency (result valid nine clocks after the edge that takes
// the last pair), and the zero-weight case, which must give the zero code 128.
module tb_defuzzifier;
  import pidflc_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0, in_last = 0, out_valid;
  udata_t beta = '0, z;
  mu_t mu = '0;
  int checks = 0, failures = 0;

  defuzzifier dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int b [4], input int m [4]);
    int num, den, exp, lat;
    num = 0; den = 0;
    for (int k = 0; k < 4; k++) begin
      @(negedge clk);
      beta = udata_t'(b[k]); mu = mu_t'(m[k]); in_valid = 1; in_last = (k == 3);
      num += b[k] * m[k]; den += m[k];
    end
    exp = (den == 0) ? 128 : (num + den / 2) / den;
    @(posedge clk);   // edge that takes the last pair
    #1 in_valid = 0; in_last = 0;
    lat = 0;
    while (!out_valid && lat < 40) begin @(posedge clk); #1 lat++; end
    checks++;
    if (lat != 9 || int'(z) != exp) begin
      failures++;
      $display("FAIL lat=%0d z=%0d exp=%0d (num %0d den %0d)", lat, z, exp, num, den);
    end
  endtask

  initial begin
    int b [4], m [4];
    repeat (3) @(posedge clk);
    rst_n = 1;
    run('{255, 255, 255, 255}, '{63, 63, 63, 63});
    run('{0, 0, 0, 0}, '{63, 1, 5, 9});
    run('{10, 20, 30, 40}, '{0, 0, 0, 0});
    run('{0, 255, 0, 255}, '{1, 63, 1, 0});
    for (int n = 0; n < 1500; n++) begin
      foreach (b[k]) begin b[k] = $urandom_range(255); m[k] = $urandom_range(63); end
      run(b, m);
      repeat ($urandom_range(2)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
