// tb_dec_tile: tile 0 of the 315-bit test code (Z = 63, 4 edges per lane,
// 8 lanes, first 10 columns shortened) with the row-level inputs (global
// minimum records, row sign parity, old records) driven at random by the
// testbench.  A column-indexed model of the APP values and of the lane sign
// banks predicts, item by item through the five-stage pipeline:
//   - the loaded values (shortened columns forced to +63, -0 stored as +0),
//   - the values seen at every read tap, the local minimum and sign parity,
//   - the number of saturated (frozen) edges,
//   - every conditional update, including edges that read the same register
//     in the same cycle (their differences are summed into one write),
//   - the sign-flip indication, and the whole ring at the end.
module tb_dec_tile;
  import ldpc_pkg::*;
  localparam code_e CODE = EG_63;
  localparam int LP = 8, TILE = 0, N_SHORT = 10;
  localparam int Z = code_z(CODE), W = code_w(CODE), NT = code_nt(CODE);
  localparam int SEG = (Z + 1) / LP, NE = LP * W, NCYC = 300;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, collisions = 0, frozen_seen = 0, flips_seen = 0, writes_seen = 0;
  initial begin #5_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic shift_en = 0, load_en = 0, ctv_re = 0, ctv_we = 0, wr_en = 0, w_capture = 0, w_shift = 0;
  logic [2:0] load_tau = 0, raddr_n = 0, raddr_w = 0, waddr = 0;
  app_t llr_in [LP];
  minpair_t loc_mp [LP];
  logic loc_sx [LP];
  ctvrec_t rec [LP], rec_old [LP];
  logic stot [LP], old_valid [LP];
  logic flip;
  logic [15:0] n_frozen;
  logic [LP-1:0] hd;

  dec_tile #(.CODE(CODE), .TILE(TILE), .LP(LP), .N_SHORT(N_SHORT)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int sm(app_t a);
    return a[6] ? -int'(a[5:0]) : int'(a[5:0]);
  endfunction

  app_t colv [Z];                   // model: APP value of each column
  bit   bank [LP][SEG][W];          // model: lane sign banks
  bit   bank_ok [LP][SEG];
  // per item (indexed by decode period p)
  int   icol [NCYC][NE];
  app_t ival [NCYC][NE];
  int   iaddr [NCYC];
  ctvrec_t irec [NCYC][LP];
  logic istot [NCYC][LP];
  int   idelta [NCYC][NE];

  initial begin
    // ---------------- load
    for (int tau = 0; tau < SEG; tau++) begin
      @(negedge clk);
      shift_en = 1; load_en = 1; load_tau = 3'(tau);
      for (int j = 0; j < LP; j++) begin
        automatic int col = load_col(CODE, LP, j, tau);
        automatic int r = $urandom % 10;
        llr_in[j] = (r == 0) ? 7'h40 : (r == 1) ? 7'h3f : (r == 2) ? 7'h7f : app_t'($urandom);
        if (col >= 0) begin
          if (col < N_SHORT)            colv[col] = 7'h3f;
          else if (llr_in[j][5:0] == 0) colv[col] = 7'h00;
          else                          colv[col] = llr_in[j];
        end
      end
    end
    @(negedge clk);
    load_en = 0; shift_en = 0;
    for (int c = 0; c < Z; c++) check(dut.u_app.v[c] == colv[c], $sformatf("loaded column %0d", c));

    // ---------------- decode periods
    for (int p = 0; p < NCYC + 4; p++) begin
      shift_en = 1;
      // S1: item p
      ctv_re = 0;
      if (p < NCYC) begin
        ctv_re  = 1;
        iaddr[p] = p % SEG;
        raddr_n = 3'(p % SEG);
        raddr_w = 3'((p + 1) % SEG);
        for (int j = 0; j < LP; j++)
          for (int l = 0; l < W; l++) begin
            automatic int e = j * W + l;
            icol[p][e] = (p + SEG * j + code_col(CODE, TILE, l)) % Z;
            ival[p][e] = colv[icol[p][e]];
            check(dut.rd[j][l] == ival[p][e], $sformatf("read tap p=%0d j=%0d l=%0d", p, j, l));
          end
      end
      // S2 outputs of item p-1: local min and sign parity
      if (p >= 1 && p - 1 < NCYC)
        for (int j = 0; j < LP; j++) begin
          automatic int m1 = 99, sx = 0;
          for (int l = 0; l < W; l++) begin
            automatic int mg;
            mg = int'(ival[p-1][j*W+l][5:2]);
            if (mg < m1) m1 = mg;
            sx ^= int'(ival[p-1][j*W+l][6]);
          end
          check(int'(loc_mp[j].m1) == m1, "local minimum");
          check(int'(ival[p-1][j*W + int'(loc_mp[j].idx)][5:2]) == m1, "local minimum index");
          check(int'(loc_sx[j]) == sx, "local sign parity");
        end
      // S3: item p-2
      ctv_we = 0;
      if (p >= 2 && p - 2 < NCYC) begin
        automatic int q = p - 2;
        automatic int nfz = 0;
        ctv_we = 1;
        waddr = 3'(iaddr[q]);
        for (int j = 0; j < LP; j++) begin
          automatic int m1 = $urandom % 16;
          automatic int dm = $urandom % 4;
          automatic int om1 = $urandom % 16;
          automatic int odm = $urandom % 4;
          automatic int rb = (j + 1) % LP;
          automatic int ra = (j == LP - 1) ? (iaddr[q] + 1) % SEG : iaddr[q];
          if (m1 + dm > 15) dm = 15 - m1;
          if (om1 + odm > 15) odm = 15 - om1;
          rec[j].m1 = cmag_t'(m1); rec[j].dmin = 2'(dm);
          rec[j].idx = ($urandom % 2) ? IDXW'($urandom % W) : IDXW'($urandom % (NT * W));
          rec_old[j].m1 = cmag_t'(om1); rec_old[j].dmin = 2'(odm);
          rec_old[j].idx = IDXW'($urandom % (NT * W));
          stot[j] = 1'($urandom);
          old_valid[j] = bank_ok[rb][ra] && ($urandom % 4 != 0);
          for (int l = 0; l < W; l++) begin
            automatic int e = j * W + l;
            automatic app_t z = ival[q][e];
            automatic bit sat = (z[5:0] == 6'h3f);
            automatic bit sn = stot[j] ^ z[6];
            automatic int mn = (int'(rec[j].idx) == TILE * W + l) ? m1 + dm : m1;
            automatic int mo = (int'(rec_old[j].idx) == TILE * W + l) ? om1 + odm : om1;
            automatic int lnew = sat ? 0 : (sn ? -mn : mn);
            automatic int lold = (sat || !old_valid[j]) ? 0 : (bank[rb][ra][l] ? -mo : mo);
            idelta[q][e] = lnew - lold;
            if (sat) nfz++;
          end
        end
        check(int'(n_frozen) == nfz, $sformatf("frozen count %0d exp %0d", n_frozen, nfz));
        if (nfz > 0) frozen_seen++;
      end
      // S5: item p-4
      wr_en = 0;
      if (p >= 4 && p - 4 < NCYC) wr_en = 1;
      @(posedge clk);
      // model updates at this edge
      if (p >= 2 && p - 2 < NCYC)
        for (int j = 0; j < LP; j++) begin
          for (int l = 0; l < W; l++)
            bank[j][iaddr[p-2]][l] = stot[j] ^ ival[p-2][j*W+l][6];
          bank_ok[j][iaddr[p-2]] = 1;
        end
      if (p >= 4 && p - 4 < NCYC) begin
        automatic int q = p - 4;
        automatic bit any_flip = 0;
        automatic bit done_e [NE];
        for (int e = 0; e < NE; e++) done_e[e] = 0;
        for (int e = 0; e < NE; e++) if (!done_e[e]) begin
          automatic int c = icol[q][e];
          automatic int s = sm(colv[c]);
          automatic int n = 0;
          automatic app_t nv;
          for (int k = e; k < NE; k++)
            if (icol[q][k] == c) begin s += idelta[q][k]; done_e[k] = 1; n++; end
          if (n > 1) collisions++;
          if (colv[c][5:0] != 6'h3f) begin
            if (s > 63) s = 63;
            if (s < -63) s = -63;
            nv = (s < 0) ? {1'b1, 6'(-s)} : {1'b0, 6'(s)};
            if (nv[6] != colv[c][6]) any_flip = 1;
            colv[c] = nv;
            writes_seen++;
          end
        end
        // flip is sampled just before the edge
        if (any_flip) flips_seen++;
      end
      #1;
    end
    @(negedge clk);
    shift_en = 0;
    #1;
    for (int x = 0; x < Z; x++)
      check(dut.u_app.v[x] == colv[(x + NCYC + 4) % Z], $sformatf("final ring position %0d", x));
    check(collisions > 0, "register collisions exercised");
    check(frozen_seen > 0, "saturated edges exercised");
    check(flips_seen > 0, "sign flips exercised");
    $display("collisions %0d frozen %0d flips %0d writes %0d", collisions, frozen_seen, flips_seen, writes_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // flip output checked against the model's prediction of the current write
  always @(posedge clk) if (wr_en) begin
    // recomputed from the DUT's own write-enable outputs: a flip must coincide
    // with a write whose value changes sign
    automatic bit f = 0;
    for (int j = 0; j < LP; j++)
      for (int l = 0; l < W; l++)
        if (dut.wen[j][l] && dut.wval[j][l][6] != dut.wcur[j][l][6]) f = 1;
    checks++;
    if (flip != f) begin failures++; $display("FAIL flip output"); end
  end
endmodule
