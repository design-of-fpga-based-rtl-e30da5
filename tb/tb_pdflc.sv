// tb_pdflc: drives the PD fuzzy controller with random inputs and gains and
// compares u with the bit-accurate reference model; checks that u is ready
// 15 clocks after the edge that samples `in_valid`, and that gains hold while
// `load_gains` is low. Directed cases cover both shoulder regions of the input
// sets and saturation of the output gain. A second instance holds a different
// rule table (every consequent set k replaced by 7-k) and must follow it.
module tb_pdflc;
  import pidflc_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, load_gains = 0, in_valid = 0, out_valid;
  gain_t k1 = '0, k2 = '0, ko = '0;
  sdata_t x1 = '0, x2 = '0, u;
  int checks = 0, failures = 0;

  pdflc dut (.*);

  // the printed rule table with every consequent set k replaced by 7-k
  localparam rule_table_t INV_TABLE = '{
    '{3'd7, 3'd7, 3'd7, 3'd6, 3'd6, 3'd5, 3'd4, 3'd3},
    '{3'd7, 3'd7, 3'd6, 3'd6, 3'd5, 3'd4, 3'd3, 3'd3},
    '{3'd7, 3'd6, 3'd6, 3'd5, 3'd4, 3'd3, 3'd3, 3'd2},
    '{3'd6, 3'd6, 3'd5, 3'd4, 3'd3, 3'd3, 3'd2, 3'd1},
    '{3'd6, 3'd5, 3'd4, 3'd4, 3'd3, 3'd2, 3'd1, 3'd1},
    '{3'd5, 3'd4, 3'd4, 3'd3, 3'd2, 3'd1, 3'd1, 3'd0},
    '{3'd4, 3'd4, 3'd3, 3'd2, 3'd1, 3'd1, 3'd0, 3'd0},
    '{3'd4, 3'd3, 3'd2, 3'd1, 3'd1, 3'd0, 3'd0, 3'd0}
  };

  sdata_t u_inv;
  logic   out_valid_inv;
  pdflc #(.RULES(INV_TABLE)) dut_inv (
    .clk (clk), .rst_n (rst_n), .load_gains (load_gains), .k1 (k1), .k2 (k2), .ko (ko),
    .in_valid (in_valid), .x1 (x1), .x2 (x2), .out_valid (out_valid_inv), .u (u_inv)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int g1 = 0, g2 = 0, go = 0;

  task automatic action(input int a, input int b, input int c1, input int c2, input int co, input bit ld);
    int exp, lat;
    // gains are loaded one clock ahead of the inputs, as in the controller
    @(negedge clk);
    k1 = gain_t'(c1); k2 = gain_t'(c2); ko = gain_t'(co);
    load_gains = ld;
    if (ld) begin g1 = c1; g2 = c2; go = co; end
    @(negedge clk);
    load_gains = 0;
    k1 = ~k1; k2 = ~k2; ko = ~ko;          // ports change, latches must not
    x1 = sdata_t'(a); x2 = sdata_t'(b); in_valid = 1;
    @(posedge clk);
    #1 in_valid = 0;
    lat = 0;
    while (!out_valid && lat < 40) begin @(posedge clk); #1 lat++; end
    exp = ref_pdflc(a, b, g1, g2, go);
    checks++;
    if (lat != 15 || int'(u) != exp) begin
      failures++;
      $display("FAIL x1=%0d x2=%0d k=%0d/%0d/%0d lat=%0d u=%0d exp=%0d", a, b, g1, g2, go, lat, u, exp);
    end
    exp = ref_pdflc(a, b, g1, g2, go, 1'b1);
    checks++;
    if (!out_valid_inv || int'(u_inv) != exp) begin
      failures++;
      $display("FAIL inverted table x1=%0d x2=%0d u=%0d exp=%0d", a, b, u_inv, exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    action(0, 0, 16, 16, 16, 1);
    action(-128, -128, 16, 16, 16, 1);     // lower shoulders
    action(127, 127, 16, 16, 16, 1);       // upper shoulders
    action(127, 127, 16, 16, 255, 1);      // output gain saturates
    action(-50, 30, 32, 8, 16, 1);
    for (int n = 0; n < 1500; n++)
      action(int'($urandom_range(255)) - 128, int'($urandom_range(255)) - 128,
             $urandom_range(255), $urandom_range(255), $urandom_range(255), (n % 4) != 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
