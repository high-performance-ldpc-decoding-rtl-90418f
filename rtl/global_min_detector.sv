// global_min_detector: combines the local minimum results of all tiles for one
// check node (one lane of the parallel decoder).
//
// Inputs are the NT registered (min1, min2, local index) pairs and sign XORs of
// the tiles.  The detector selects the smallest and second smallest magnitude
// over the whole row, forms the row index of the smallest as tile*W + local
// index, XORs the tile sign parities into the row sign product (which is also
// the parity-check result of the row under the current hard decisions), and
// compresses the second minimum to a 2-bit saturated offset from the first, as
// the document's CTV compression does.  The merge is a balanced tree.
//
// Timing: combinational, then one register (the decoder's second pipeline
// register).  Outputs are valid one cycle after the inputs.
module global_min_detector
  import ldpc_pkg::*;
#(
  parameter int NT = 17,
  parameter int W  = 16
) (
  input  logic     clk,
  input  minpair_t loc   [NT],
  input  logic     lsign [NT],
  output ctvrec_t  rec_q,       // {idx, min1, dmin} of the row
  output logic     stot_q       // product of all signs (1 = odd parity)
);
  localparam int P = 1 << $clog2(NT);

  ctvrec_t rec;
  logic    st;

  always_comb begin
    minpair_t t [P];
    for (int k = 0; k < P; k++) begin
      if (k < NT) begin
        t[k] = loc[k];
        t[k].idx = IDXW'(k * W) + loc[k].idx;
      end else begin
        t[k].m1 = '1; t[k].m2 = '1; t[k].idx = '0;
      end
    end
    for (int step = 1; step < P; step *= 2)
      for (int k = 0; k < P; k += 2 * step)
        t[k] = min_merge(t[k], t[k + step]);
    rec.idx  = t[0].idx;
    rec.m1   = t[0].m1;
    rec.dmin = quant_dmin(t[0].m1, t[0].m2);
    st = 1'b0;
    for (int k = 0; k < NT; k++) st ^= lsign[k];
  end

  always_ff @(posedge clk) begin
    rec_q  <= rec;
    stot_q <= st;
  end
endmodule
