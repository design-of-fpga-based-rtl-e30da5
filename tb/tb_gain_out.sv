// tb_gain_out: self-checking test of the output gain block: every fuzzy
// output code with a set of gains, plus random gains, compared with the
// reference model; the gain latch must hold while `load` is low.
module tb_gain_out;
  import pidflc_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, load = 0;
  gain_t k = '0;
  udata_t z = '0;
  sdata_t u;
  int checks = 0, failures = 0;

  gain_out dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_gain(input int kv);
    @(negedge clk); k = gain_t'(kv); load = 1;
    @(negedge clk); load = 0;
  endtask

  task automatic check(input int zv, input int kv);
    z = udata_t'(zv);
    #1;
    checks++;
    if (int'(u) != ref_gain_out(zv, kv)) begin
      failures++;
      $display("FAIL z=%0d k=%0d u=%0d exp=%0d", zv, kv, u, ref_gain_out(zv, kv));
    end
  endtask

  localparam int GAINS [5] = '{16, 8, 1, 40, 255};

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (GAINS[g]) begin
      set_gain(GAINS[g]);
      for (int zv = 0; zv < 256; zv++) check(zv, GAINS[g]);
    end
    for (int n = 0; n < 300; n++) begin
      int kv;
      kv = int'($urandom_range(255));
      set_gain(kv);
      // the gain port changes without load: output must not follow
      @(negedge clk); k = ~gain_t'(kv);
      check(int'($urandom_range(255)), kv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
