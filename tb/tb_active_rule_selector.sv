// tb_active_rule_selector: pulses `start` with random active sets and checks
// that the four rules appear in four consecutive cycles in counter order
// (b0 picks the set of input #1, b1 that of input #2), with `valid` high and
// `last` on the fourth, and that nothing is selected afterwards.
module tb_active_rule_selector;
  import pidflc_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, valid, last;
  active_set_t in1_first, in1_second, in2_first, in2_second, sel1, sel2;
  int checks = 0, failures = 0;

  active_rule_selector dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    active_set_t e1, e2;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      in1_first  = active_set_t'($urandom); in1_second = active_set_t'($urandom);
      in2_first  = active_set_t'($urandom); in2_second = active_set_t'($urandom);
      start = 1;
      for (int r = 0; r < 4; r++) begin
        #1;
        e1 = r[0] ? in1_second : in1_first;
        e2 = r[1] ? in2_second : in2_first;
        checks++;
        if (!valid || last != (r == 3) || sel1 != e1 || sel2 != e2) begin
          failures++;
          $display("FAIL rule %0d valid=%0b last=%0b sel1=%h/%h sel2=%h/%h", r, valid, last, sel1, e1, sel2, e2);
        end
        @(negedge clk);
        start = 0;
      end
      #1;
      checks++;
      if (valid || last) begin failures++; $display("FAIL valid after four rules"); end
      repeat ($urandom_range(3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
