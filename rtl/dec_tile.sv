// dec_tile: the part of the decoder that serves one circulant sub-matrix.
//
// A tile holds the a-posteriori LLRs of its Z columns in a rotating shift
// register (app_memory), and for each of the LP lanes of the parallel
// schedule: W read taps, a local minimum detector, W node processing units,
// and one bank of the CTV sign memory.  It also holds the hard-decision output
// buffer and the conditional updaters at the write taps.
//
// Pipeline (one check node per lane per cycle):
//   S1  read W LLRs per lane at fixed taps, local min/min2/index/sign parity
//       (register P1); the lane's old CTV signs are read from the sign bank
//   S2  (global min detector, outside the tile; register P2)
//   S3  IDX-FLAG decode, new and old CTV message per edge, sign bits stored
//       (register P3 inside the NPU)
//   S4  CTV difference (register P4 inside the NPU)
//   S5  conditional update at the write tap, 4 places below the read tap
// When several (lane, edge) pairs read the same register in one cycle, the
// first of them owns the write tap and its updater adds all their
// differences (Eq. 4.3); the others do not write.  Which pairs collide is
// fixed by the code and is worked out at elaboration.
//
// Loading: in load cycle tau lane j supplies the LLR of column
// ldpc_pkg::load_col(CODE, LP, j, tau).  Columns of tile 0 below N_SHORT are
// the shortened bits of the code; they are forced to +63 (a known zero) and
// the supplied value is ignored.  A negative zero is stored as +0.
module dec_tile
  import ldpc_pkg::*;
#(
  parameter code_e CODE    = EG_4095,
  parameter int    TILE    = 0,
  parameter int    LP      = 8,
  parameter int    N_SHORT = 1361
) (
  input  logic clk,
  input  logic shift_en,
  input  logic load_en,
  input  logic [$clog2((code_z(CODE)+1)/LP)-1:0] load_tau,
  input  app_t llr_in [LP],
  // stage 1: CTV sign memory read
  input  logic ctv_re,
  input  logic [$clog2((code_z(CODE)+1)/LP)-1:0] raddr_n,
  input  logic [$clog2((code_z(CODE)+1)/LP)-1:0] raddr_w,
  output minpair_t loc_mp [LP],     // P1
  output logic     loc_sx [LP],     // P1
  // stage 3: row results from the global detectors and the central memory
  input  ctvrec_t  rec     [LP],
  input  logic     stot    [LP],
  input  ctvrec_t  rec_old [LP],
  input  logic     old_valid [LP],
  input  logic     ctv_we,
  input  logic [$clog2((code_z(CODE)+1)/LP)-1:0] waddr,
  // stage 5
  input  logic     wr_en,
  output logic     flip,
  output logic [15:0] n_frozen,     // edges skipped as saturated this cycle
  // output buffer
  input  logic     w_capture,
  input  logic     w_shift,
  output logic [LP-1:0] hd
);
  localparam int Z   = code_z(CODE);
  localparam int W   = code_w(CODE);
  localparam int SEG = (Z + 1) / LP;
  localparam int NE  = LP * W;
  localparam int D   = 4;

  // ---- collision bookkeeping (elaboration time)
  // For every edge e = j*W + l: the first edge reading the same register
  // (owner), how many edges read it, and the list of those edges.
  localparam int MAXK = 4;
  localparam int EW   = $clog2(NE) + 1;
  typedef logic [NE-1:0][EW-1:0]            etab_t;
  typedef logic [NE-1:0][MAXK-1:0][EW-1:0]  mtab_t;

  function automatic etab_t mk_owner();
    int pos [NE];
    etab_t r;
    for (int e = 0; e < NE; e++) pos[e] = read_pos(CODE, LP, TILE, e / W, e % W);
    for (int e = 0; e < NE; e++) begin
      r[e] = EW'(e);
      for (int k = NE - 1; k >= 0; k--) if (pos[k] == pos[e]) r[e] = EW'(k);
    end
    return r;
  endfunction
  function automatic etab_t mk_count();
    int pos [NE];
    etab_t r;
    for (int e = 0; e < NE; e++) pos[e] = read_pos(CODE, LP, TILE, e / W, e % W);
    for (int e = 0; e < NE; e++) begin
      r[e] = '0;
      for (int k = 0; k < NE; k++) if (pos[k] == pos[e]) r[e] = r[e] + 1'b1;
    end
    return r;
  endfunction
  function automatic mtab_t mk_members();
    int pos [NE];
    int n;
    mtab_t r;
    for (int e = 0; e < NE; e++) pos[e] = read_pos(CODE, LP, TILE, e / W, e % W);
    for (int e = 0; e < NE; e++) begin
      n = 0;
      r[e] = '0;
      for (int k = 0; k < NE; k++)
        if (pos[k] == pos[e] && n < MAXK) begin
          r[e][n] = EW'(k);
          n++;
        end
    end
    return r;
  endfunction
  localparam etab_t OWNER   = mk_owner();
  localparam etab_t NSAME   = mk_count();
  localparam mtab_t MEMBERS = mk_members();

  // ---- APP memory
  app_t rd   [LP][W];
  app_t wcur [LP][W];
  logic wen  [LP][W];
  app_t wval [LP][W];
  app_t load_v [LP];
  logic [Z-1:0] signs;

  always_comb
    for (int j = 0; j < LP; j++) begin
      automatic int col = load_col(CODE, LP, j, int'(load_tau));
      if (TILE == 0 && col >= 0 && col < N_SHORT)
        load_v[j] = {1'b0, {MAGW{1'b1}}};
      else if (llr_in[j][MAGW-1:0] == '0)
        load_v[j] = '0;
      else
        load_v[j] = llr_in[j];
    end

  app_memory #(.CODE(CODE), .TILE(TILE), .LP(LP), .D(D)) u_app (
    .clk, .shift_en, .load_en, .load_in(load_v),
    .rd, .wcur, .wen, .wval, .signs
  );

  output_buffer #(.Z(Z), .LP(LP)) u_obuf (
    .clk, .capture(w_capture), .shift(w_shift), .signs, .hd
  );

  // ---- per-lane S1/S2 registers of edge signs and saturation flags
  logic [W-1:0] sgn1 [LP], sgn2 [LP], sat1 [LP], sat2 [LP];
  always_ff @(posedge clk)
    for (int j = 0; j < LP; j++) begin
      for (int l = 0; l < W; l++) begin
        sgn1[j][l] <= rd[j][l][Q-1];
        sat1[j][l] <= (rd[j][l][MAGW-1:0] == MAGW'((1 << MAGW) - 1));
      end
      sgn2[j] <= sgn1[j];
      sat2[j] <= sat1[j];
    end

  // ---- sign memory: bank j holds lane j's signs, read by lane j-1
  logic [W-1:0] bank_rd [LP];
  logic [W-1:0] old_sgn [LP];
  logic [W-1:0] new_sgn [LP];

  for (genvar j = 0; j < LP; j++) begin : g_bank
    ctv_bank #(.DEPTH(SEG), .WIDTH(W)) u_sign (
      .clk, .we(ctv_we), .waddr(waddr), .wdata(new_sgn[j]),
      .re(ctv_re), .raddr((j == 0) ? raddr_w : raddr_n), .rdata(bank_rd[j])
    );
  end

  always_ff @(posedge clk)
    for (int j = 0; j < LP; j++) old_sgn[j] <= bank_rd[(j + 1) % LP];

  // ---- local minimum detectors, IDX-FLAG, NPUs
  delta_t delta [NE];

  for (genvar j = 0; j < LP; j++) begin : g_lane
    logic [W-1:0] fnew, fold;
    local_min_detector #(.N(W)) u_lmd (
      .clk, .app_in(rd[j]), .mp_q(loc_mp[j]), .sign_xor_q(loc_sx[j])
    );
    idx_flag #(.W(W), .TILE(TILE)) u_fnew (.idx(rec[j].idx),     .flag(fnew));
    idx_flag #(.W(W), .TILE(TILE)) u_fold (.idx(rec_old[j].idx), .flag(fold));
    for (genvar l = 0; l < W; l++) begin : g_npu
      npu u_npu (
        .clk,
        .min1(rec[j].m1), .dmin(rec[j].dmin), .flag_new(fnew[l]), .stot(stot[j]),
        .z_sign(sgn2[j][l]), .z_sat(sat2[j][l]),
        .old_valid(old_valid[j]), .min1_old(rec_old[j].m1), .dmin_old(rec_old[j].dmin),
        .flag_old(fold[l]), .sign_old(old_sgn[j][l]),
        .sign_new(new_sgn[j][l]), .delta_q(delta[j * W + l])
      );
    end
  end

  // ---- conditional updaters at the write taps
  logic flips [NE];
  for (genvar e = 0; e < NE; e++) begin : g_upd
    if (int'(OWNER[e]) == e) begin : g_own
      localparam int K = int'(NSAME[e]);
      delta_t dl [K];
      for (genvar m = 0; m < K; m++) begin : g_m
        assign dl[m] = delta[int'(MEMBERS[e][m])];
      end
      cond_updater #(.K(K)) u_cu (
        .en(wr_en), .z_cur(wcur[e / W][e % W]), .delta(dl),
        .z_new(wval[e / W][e % W]), .wen(wen[e / W][e % W]), .flip(flips[e])
      );
    end else begin : g_none
      assign wval[e / W][e % W] = '0;
      assign wen[e / W][e % W]  = 1'b0;
      assign flips[e]           = 1'b0;
    end
  end

  always_comb begin
    flip = 1'b0;
    for (int e = 0; e < NE; e++) flip |= flips[e];
  end

  initial for (int e = 0; e < NE; e++)
    assert (int'(NSAME[e]) <= MAXK) else $error("dec_tile: more than MAXK edges share a register");

  // count of edges frozen by the conditional update (observability)
  always_comb begin
    n_frozen = '0;
    for (int j = 0; j < LP; j++)
      for (int l = 0; l < W; l++)
        if (sat2[j][l]) n_frozen = n_frozen + 1'b1;
  end
endmodule
