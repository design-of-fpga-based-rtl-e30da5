// tb_fuzzifier: drives every input code through the fuzzifier and checks the
// two active sets (i, i+1), their memberships against the reference model,
// that the memberships add up to one (63), the one-clock latency of
// `out_valid`, and that the outputs hold afterwards.
module tb_fuzzifier;
  import pidflc_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  udata_t x = '0;
  active_set_t first, second;
  int checks = 0, failures = 0;

  fuzzifier dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int idx, mu;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); x = udata_t'(a); in_valid = 1;
      @(negedge clk); in_valid = 0;
      ref_mf(a, idx, mu);
      checks++;
      if (!out_valid || int'(first.idx) != idx || int'(first.mu) != mu ||
          int'(second.idx) != idx + 1 || int'(second.mu) != 63 - mu ||
          int'(first.mu) + int'(second.mu) != 63) begin
        failures++;
        $display("FAIL x=%0d v=%0b first=(%0d,%0d) second=(%0d,%0d) exp i=%0d mu=%0d",
                 a, out_valid, first.idx, first.mu, second.idx, second.mu, idx, mu);
      end
      x = ~x;
      @(negedge clk);
      checks++;
      if (out_valid || int'(first.idx) != idx || int'(first.mu) != mu) begin
        failures++;
        $display("FAIL x=%0d: output did not hold or valid stayed high", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
