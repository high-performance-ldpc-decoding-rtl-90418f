// idx_flag: turns the row index of the smallest magnitude into one flag per
// edge of a tile.  Flag l is set when the row's minimum came from edge l of
// this tile, i.e. when that edge's CTV magnitude must be the second minimum.
// Decoding the index inside each tile, rather than centrally, keeps the wiring
// from the central CTV memory to a 9-bit bus per lane, as the document notes.
// Purely combinational.
module idx_flag
  import ldpc_pkg::*;
#(
  parameter int W    = 16,
  parameter int TILE = 0
) (
  input  logic [IDXW-1:0] idx,
  output logic [W-1:0]    flag
);
  always_comb
    for (int l = 0; l < W; l++)
      flag[l] = (idx == IDXW'(TILE * W + l));
endmodule
