// app_memory: the a-posteriori LLR store of one tile.
//
// Z registers of 7 bits (sign-magnitude) form a ring that rotates one place
// per cycle (V[x] <= V[x+1], V[Z-1] <= V[0]).  Because each sub-matrix of the
// parity-check matrix is circulant, rotating the ring brings the columns of
// successive rows under fixed taps, so the wiring between the registers and
// the node processing units never changes and no permutation network is
// needed.  Position x holds column (x + T) mod Z after T rotations.
//
//  * Read taps: lane j, edge l reads position (SEG*j + c_l) mod Z, where c_l
//    is the l-th column offset of row 0 of circulant TILE and SEG = (Z+1)/LP.
//    The ring is thereby split into LP segments of SEG registers (the last one
//    is one shorter), one per lane of the parallel schedule.
//  * Write taps: an updated value comes back D cycles after its read, when the
//    column has moved D places down; the updater reads the current value at
//    position (read - D) and the result is stored into the register that this
//    position feeds, i.e. position (read - D - 1).
//  * Loading: while load_en is high the top register of each segment takes a
//    new channel LLR instead of its neighbour's value; after SEG load cycles
//    the ring holds column x at position x (see ldpc_pkg::load_col).
//
// The tile decides which (lane, edge) owns a write tap when several read the
// same register in the same cycle; the others keep wen low.
// Timing: rd, wcur and signs are combinational reads of the registers; all
// changes happen at the clock edge while shift_en is high.
module app_memory
  import ldpc_pkg::*;
#(
  parameter code_e CODE = EG_4095,
  parameter int    TILE = 0,
  parameter int    LP   = 8,
  parameter int    D    = 4
) (
  input  logic clk,
  input  logic shift_en,
  input  logic load_en,
  input  app_t load_in [LP],
  output app_t rd      [LP][code_w(CODE)],
  output app_t wcur    [LP][code_w(CODE)],
  input  logic wen     [LP][code_w(CODE)],
  input  app_t wval    [LP][code_w(CODE)],
  output logic [code_z(CODE)-1:0] signs
);
  localparam int Z   = code_z(CODE);
  localparam int W   = code_w(CODE);
  localparam int SEG = (Z + 1) / LP;

  app_t v [Z];

  function automatic int seg_top(int j);
    return (j == LP - 1) ? Z - 1 : SEG * j + SEG - 1;
  endfunction
  function automatic int rpos(int j, int l);
    return read_pos(CODE, LP, TILE, j, l);
  endfunction
  function automatic int wpos(int j, int l);
    return (rpos(j, l) + Z - D) % Z;
  endfunction

  always_comb
    for (int j = 0; j < LP; j++)
      for (int l = 0; l < W; l++) begin
        rd[j][l]   = v[rpos(j, l)];
        wcur[j][l] = v[wpos(j, l)];
      end

  // one rotation step of the whole ring, and the sign of every position
  app_t shifted [Z];
  for (genvar x = 0; x < Z; x++) begin : g_pos
    assign shifted[x] = v[(x + 1) % Z];
    assign signs[x]   = v[x][Q-1];
  end

  always_ff @(posedge clk) begin
    if (shift_en) begin
      v <= shifted;
      if (load_en) begin
        for (int j = 0; j < LP; j++) v[seg_top(j)] <= load_in[j];
      end else begin
        for (int j = 0; j < LP; j++)
          for (int l = 0; l < W; l++)
            if (wen[j][l]) v[(wpos(j, l) + Z - 1) % Z] <= wval[j][l];
      end
    end
  end

  initial begin
    assert (LP * SEG == Z + 1) else $error("app_memory: Z+1 must be a multiple of LP");
    assert (D + 1 < SEG) else $error("app_memory: pipeline deeper than a segment");
  end
endmodule
