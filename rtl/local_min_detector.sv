// local_min_detector: the per-tile, per-lane minimum finder of the decoder.
//
// Each cycle it takes the N a-posteriori LLRs a tile reads for one check node
// (7-bit sign-magnitude), scales their magnitudes by alpha = 1/4 (a right
// shift by two, done before the search so that only 4-bit values travel), and
// finds the smallest and second-smallest scaled magnitude, the index (0..N-1)
// of the smallest, and the XOR of the N sign bits.  The search is a tree:
// groups of four values are reduced to a (min1, min2) pair first, then pairs
// are merged, as the tile drawing of the document shows ("4to2" units feeding
// a final merge).  Scaling before the search follows the document's word-length
// optimisation; tie-breaking toward the lower index is this design's choice.
//
// Timing: combinational from app_in to the result, which is registered once
// (the first pipeline register of the decoder); outputs are valid one cycle
// after the inputs.
module local_min_detector
  import ldpc_pkg::*;
#(
  parameter int N = 16
) (
  input  logic              clk,
  input  app_t              app_in [N],
  output minpair_t          mp_q,        // registered result
  output logic              sign_xor_q   // registered XOR of the N signs
);
  localparam int P = (N <= 4) ? 4 : (1 << $clog2(N));   // padded width
  localparam int G = P / 4;                               // number of 4to2 units

  minpair_t lvl [G];
  minpair_t mp;
  logic     sx;

  always_comb begin
    minpair_t leaf [P];
    for (int k = 0; k < P; k++) begin
      if (k < N) begin
        leaf[k].m1  = cmag_t'(app_in[k][MAGW-1:2]);
        leaf[k].idx = IDXW'(k);
      end else begin
        leaf[k].m1  = '1;
        leaf[k].idx = '0;
      end
      leaf[k].m2 = '1;
    end
    // 4to2 units
    for (int g = 0; g < G; g++)
      lvl[g] = min_merge(min_merge(leaf[4*g], leaf[4*g+1]), min_merge(leaf[4*g+2], leaf[4*g+3]));
    // merge tree over the unit outputs
    for (int step = 1; step < G; step *= 2)
      for (int g = 0; g < G; g += 2 * step)
        lvl[g] = min_merge(lvl[g], lvl[g + step]);
    mp = lvl[0];
    sx = 1'b0;
    for (int k = 0; k < N; k++) sx ^= app_in[k][Q-1];
  end

  always_ff @(posedge clk) begin
    mp_q       <= mp;
    sign_xor_q <= sx;
  end
endmodule
