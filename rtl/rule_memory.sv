// rule_memory: rule consequent memory of the inference engine.
//
// 64 words, one per rule, addressed by the two 3-bit fuzzy set numbers
// {error set, rate set}; each word is the 8-bit position of the rule's output
// singleton in the shifted range [0, 255]. The content is built at
// elaboration time from the RULES parameter (by default the design's rule
// table, pidflc_pkg::RULE_TABLE) and the singleton positions
// pidflc_pkg::SINGLETON.
//
// Timing: synchronous read like a block RAM, data valid one clock after
// `rd_en`. No reset.
module rule_memory
  import pidflc_pkg::*;
#(
  parameter rule_table_t RULES = RULE_TABLE
) (
  input  logic            clk,
  input  logic            rd_en,
  input  logic [2*IDXW-1:0] addr,
  output udata_t          data
);

  localparam int unsigned DEPTH = 1 << (2 * IDXW);

  udata_t mem [DEPTH];

  initial begin
    for (int unsigned a = 0; a < DEPTH; a++) mem[a] = rule_word(RULES, (2*IDXW)'(a));
  end

  always_ff @(posedge clk) begin
    if (rd_en) data <= mem[addr];
  end

endmodule
