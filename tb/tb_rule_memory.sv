// tb_rule_memory: reads all 64 rule consequents and compares each with the
// rule table and output singleton positions of the reference model; checks
// the one-clock synchronous read.
module tb_rule_memory;
  import pidflc_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rd_en = 0;
  logic [5:0] addr = '0;
  udata_t data;
  int checks = 0, failures = 0;

  rule_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    for (int e = 0; e < 8; e++)
      for (int r = 0; r < 8; r++) begin
        @(negedge clk); addr = 6'(e * 8 + r); rd_en = 1;
        @(negedge clk); rd_en = 0;
        exp = ref_beta(e, r);
        checks++;
        if (int'(data) != exp) begin
          failures++;
          $display("FAIL e=%0d r=%0d got %0d exp %0d", e, r, data, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
