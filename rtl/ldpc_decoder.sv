// ldpc_decoder: pipelined, LP-way parallel decoder for quasi-cyclic
// Euclidean-geometry LDPC codes, by default the (68254, 65536) shortened
// EG-LDPC code of rate 0.96 for one 8-kB flash page.
//
// Algorithm: normalised a-posteriori-probability (APP) based decoding with
// the serial-C (row-by-row) schedule and conditional variable-node update.
// Every check node computes its CTV messages from the a-posteriori LLRs of
// its 272 variable nodes (min and second min of |Z|/4, sign product); every
// variable node adds the change of its CTV message to its LLR at once, and a
// node whose LLR reached +-63 is no longer updated.
//
// Structure: NT tiles (one per circulant sub-matrix), LP global minimum
// detectors (one per lane), the central part of the CTV memory (per lane: min
// index, min, 2-bit second-min offset; the sign bits stay in the tiles) and
// the controller.  LP check nodes are processed per cycle, so an iteration
// takes ceil(M/LP) = 512 cycles; the pipeline has five stages (see dec_tile).
//
// Interface: pulse `start`; the decoder then asserts load_en for SEG cycles
// and samples llr_in[t][j] (7-bit sign-magnitude channel LLR, positive = bit
// 0) of codeword bit t*Z + load_col(j, load_tau) in each.  When decoding ends
// the hard decisions stream out for SEG cycles: while out_valid, hd[t][j] is
// the bit of column (out_col0 + SEG*j) mod Z of tile t (lane LP-1 carries no
// bit when out_last).  `done` pulses after the last output cycle; success and
// iter_count then hold the result.  Nothing is accepted while busy.
// Latency: SEG (load) + k*SEG + 6 cycles to the first output when
// converging in iteration k, at most (IT_MAX + 2)*SEG + 10 when not.
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter code_e CODE    = EG_4095,
  parameter int    LP      = 8,
  parameter int    IT_MAX  = 8,
  parameter int    N_SHORT = 1361
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic busy,
  output logic load_en,
  output logic [$clog2((code_z(CODE)+1)/LP)-1:0] load_tau,
  input  app_t llr_in [code_nt(CODE)][LP],
  output logic out_valid,
  output logic out_last,
  output logic [$clog2(code_z(CODE))-1:0] out_col0,
  output logic [LP-1:0] hd [code_nt(CODE)],
  output logic done,
  output logic success,
  output logic [$clog2(IT_MAX+1)-1:0] iter_count,
  output logic ev_early,
  output logic ev_check,
  output logic [15:0] n_frozen [code_nt(CODE)]
);
  localparam int NT  = code_nt(CODE);
  localparam int Z   = code_z(CODE);
  localparam int W   = code_w(CODE);
  localparam int SEG = (Z + 1) / LP;
  localparam int AW  = $clog2(SEG);

  logic shift_en, ctv_re, ctv_we, wr_en, w_capture, w_shift, par_any, flip_any;
  logic [AW-1:0] raddr_n, raddr_w, waddr;
  logic old_valid [LP];

  minpair_t loc_mp [NT][LP];
  logic     loc_sx [NT][LP];
  ctvrec_t  rec [LP], rec_old [LP], crd [LP];
  logic     stot [LP];
  logic     flip_t [NT];

  dec_controller #(.Z(Z), .LP(LP), .IT_MAX(IT_MAX)) u_ctrl (
    .clk, .rst_n, .start, .busy, .load_en, .load_tau, .shift_en,
    .ctv_re, .raddr_n, .raddr_w, .ctv_we, .waddr, .old_valid, .par_any,
    .wr_en, .flip_any, .w_capture, .w_shift, .out_valid, .out_col0, .out_last,
    .done, .success, .iter_count, .ev_early, .ev_check
  );

  // ---- global minimum detectors and central CTV record memory, per lane
  for (genvar j = 0; j < LP; j++) begin : g_lane
    minpair_t lm [NT];
    logic     ls [NT];
    for (genvar t = 0; t < NT; t++) begin : g_t
      assign lm[t] = loc_mp[t][j];
      assign ls[t] = loc_sx[t][j];
    end
    global_min_detector #(.NT(NT), .W(W)) u_gmd (
      .clk, .loc(lm), .lsign(ls), .rec_q(rec[j]), .stot_q(stot[j])
    );
    ctv_bank #(.DEPTH(SEG), .WIDTH($bits(ctvrec_t))) u_rec (
      .clk, .we(ctv_we), .waddr(waddr), .wdata(rec[j]),
      .re(ctv_re), .raddr((j == 0) ? raddr_w : raddr_n), .rdata(crd[j])
    );
  end

  always_ff @(posedge clk)
    for (int j = 0; j < LP; j++) rec_old[j] <= crd[(j + 1) % LP];

  always_comb begin
    par_any = 1'b0;
    for (int j = 0; j < LP; j++) par_any |= stot[j];
    flip_any = 1'b0;
    for (int t = 0; t < NT; t++) flip_any |= flip_t[t];
  end

  // ---- tiles
  for (genvar t = 0; t < NT; t++) begin : g_tile
    dec_tile #(.CODE(CODE), .TILE(t), .LP(LP), .N_SHORT(N_SHORT)) u_tile (
      .clk, .shift_en, .load_en, .load_tau, .llr_in(llr_in[t]),
      .ctv_re, .raddr_n, .raddr_w, .loc_mp(loc_mp[t]), .loc_sx(loc_sx[t]),
      .rec, .stot, .rec_old, .old_valid, .ctv_we, .waddr,
      .wr_en, .flip(flip_t[t]), .n_frozen(n_frozen[t]),
      .w_capture, .w_shift, .hd(hd[t])
    );
  end
endmodule
