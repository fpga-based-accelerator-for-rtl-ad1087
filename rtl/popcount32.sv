// popcount32: number of ones in a 32-bit word, built the way a 6-input-LUT
// FPGA implements it cheaply.
//
// Level 1 splits the word into six groups of at most six bits and counts each
// group into a 3-bit value (one 6-input LUT per output bit on the target
// device). Level 2 regroups those six 3-bit counts by bit weight: the six
// least significant bits form one 6-bit vector, the six middle bits a second
// and the six most significant bits a third. Each vector is counted again
// into C0, C1 and C2, and the result is C0 + 2*C1 + 4*C2. This two-level LUT
// scheme is the architecture's; the grouping of the 32 bits into five groups
// of six and one of two is this design's choice.
//
// Interface: purely combinational, `word` in, `count` (0..32) out. The CTU
// registers the result in its own pipeline stage.
module popcount32 (
  input  logic [31:0] word,
  output logic [5:0]  count
);

  // count of ones in a 6-bit vector (one LUT level)
  function automatic logic [2:0] pop6(input logic [5:0] v);
    logic [2:0] c = '0;
    for (int i = 0; i < 6; i++) c = c + 3'(v[i]);
    return c;
  endfunction

  logic [5:0][5:0] groups;   // level-1 inputs
  logic [5:0][2:0] lvl1;     // level-1 counts
  logic [2:0][5:0] by_bit;   // level-1 counts regrouped by bit weight
  logic [2:0][2:0] lvl2;     // C0, C1, C2

  always_comb begin
    groups = '0;
    for (int g = 0; g < 5; g++) groups[g] = word[g*6 +: 6];
    groups[5] = {4'd0, word[31:30]};
    for (int g = 0; g < 6; g++) lvl1[g] = pop6(groups[g]);
    for (int b = 0; b < 3; b++)
      for (int g = 0; g < 6; g++) by_bit[b][g] = lvl1[g][b];
    for (int b = 0; b < 3; b++) lvl2[b] = pop6(by_bit[b]);
    count = 6'(lvl2[0]) + (6'(lvl2[1]) << 1) + (6'(lvl2[2]) << 2);
  end

endmodule
