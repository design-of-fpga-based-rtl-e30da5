// tb_gain_in: self-checking test of the input gain block. Random inputs and
// gains are compared with the reference model one clock later; the gain latch
// must keep its value while `load` is low; saturation at both ends is forced.
module tb_gain_in;
  import pidflc_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, load = 0, in_valid = 0, out_valid;
  gain_t k = '0;
  sdata_t x = '0;
  udata_t y;
  int checks = 0, failures = 0;

  gain_in dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int xv, input int kv, input bit do_load, input int k_latched);
    // the latch loads one clock ahead of the data, as in the controller
    @(negedge clk);
    k = gain_t'(kv); load = do_load;
    @(negedge clk);
    load = 0; k = ~k;
    x = sdata_t'(xv); in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid || int'(y) != ref_gain_in(xv, k_latched)) begin
      failures++;
      $display("FAIL x=%0d k=%0d y=%0d exp=%0d valid=%0b", xv, k_latched, y, ref_gain_in(xv, k_latched), out_valid);
    end
  endtask

  initial begin
    int xv, kv, klast;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // unity gain, extremes and zero
    apply(0, 16, 1, 16);
    apply(127, 16, 1, 16);
    apply(-128, 16, 1, 16);
    // saturation at both ends
    apply(100, 240, 1, 240);
    apply(-100, 240, 1, 240);
    // gain 0.5 on negative odd values: halves round away from zero
    apply(-3, 8, 1, 8);
    apply(3, 8, 1, 8);
    klast = 8;
    for (int n = 0; n < 2000; n++) begin
      xv = int'($urandom_range(255)) - 128;
      kv = int'($urandom_range(255));
      if (n % 3 == 0) begin
        apply(xv, kv, 0, klast);        // latch must hold
      end else begin
        apply(xv, kv, 1, kv);
        klast = kv;
      end
    end
    // out_valid must be low when no input was given
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL spurious out_valid"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
