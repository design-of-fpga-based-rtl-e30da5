// tb_input_set_memory: reads every word of the input fuzzy sets' memory and
// compares it with the triangle/shoulder membership functions of the
// reference model; checks the one-clock synchronous read and that the output
// holds while no read is requested.
module tb_input_set_memory;
  import pidflc_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rd_en = 0;
  logic [7:0] addr = '0;
  mf_word_t data;
  int checks = 0, failures = 0;

  input_set_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int idx, mu;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); addr = 8'(a); rd_en = 1;
      @(negedge clk); rd_en = 0;
      ref_mf(a, idx, mu);
      checks++;
      if (int'(data.idx) != idx || int'(data.mu) != mu) begin
        failures++;
        $display("FAIL x=%0d got (%0d,%0d) exp (%0d,%0d)", a, data.idx, data.mu, idx, mu);
      end
      // change the address without a read: data must hold
      addr = 8'(a + 77);
      @(negedge clk);
      checks++;
      if (int'(data.idx) != idx || int'(data.mu) != mu) begin
        failures++;
        $display("FAIL x=%0d output did not hold", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
