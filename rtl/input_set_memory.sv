// input_set_memory: the input fuzzy sets' memory of a fuzzifier.
//
// A 256-word read-only memory indexed by the shifted 8-bit input. Each 9-bit
// word holds the number of the first active fuzzy set (3 bits) and the input's
// membership in it (6 bits). Any membership shape can be stored, provided two
// neighbouring sets overlap with memberships that add up to one. The content
// is computed at elaboration time by pidflc_pkg::default_mf_word (eight
// symmetric triangles with shoulders at both ends).
//
// Timing: synchronous read like a block RAM; `data` is valid the clock after
// `rd_en` and holds until the next read. The memory has no reset.
module input_set_memory
  import pidflc_pkg::*;
#(
  parameter int unsigned DEPTH = 256   // one word per input code
) (
  input  logic                     clk,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output mf_word_t                 data
);

  mf_word_t mem [DEPTH];

  initial begin
    for (int unsigned a = 0; a < DEPTH; a++) mem[a] = default_mf_word(a);
  end

  always_ff @(posedge clk) begin
    if (rd_en) data <= mem[addr];
  end

endmodule
