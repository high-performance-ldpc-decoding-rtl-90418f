// tb_ldpc_flash_ecc: end-to-end test of the flash ECC top on the 315-bit
// EG(3,2^2) test code (8 lanes, 8 iterations, 10 shortened bits).
//
// The testbench acts as host and flash: it programs the three LLR tables
// (4-, 7- and 16-level reads), produces pages of 4-bit read levels from
// codewords (level bit 3 = read value, bits 2:0 = confidence), and collects
// the hard decisions.  A page sequence walks the read precision up (pages
// that cannot be decoded) until an estimation request appears, and back down
// (clean pages).  Every mechanism the design names is counted and must occur:
//   LUT lookups from each of the three tables, shortened-bit override,
//   first-visit (old CTV not yet valid) processing, saturated-node freezing,
//   register collisions summed in one update, early termination, the
//   parity-check phase, precision moves 4->7, 7->16, 16->7, 7->4, and the
//   channel-estimation request.
// Decoded pages are compared with the sent codeword; failed pages must
// really have a nonzero syndrome.
module tb_ldpc_flash_ecc;
  import ldpc_pkg::*;
  localparam code_e CODE = EG_63;
  localparam int LP = 8, IT_MAX = 8, N_SHORT = 10, REPEAT = 2;
  localparam int NT = code_nt(CODE), Z = code_z(CODE), W = code_w(CODE);
  localparam int SEG = (Z + 1) / LP, N = NT * Z;

  logic clk = 0, rst_n = 0, start = 0;
  logic lut_wr_en = 0;
  logic [1:0] lut_wr_sel = 0;
  logic [3:0] lut_wr_addr = 0;
  app_t lut_wr_data = '0;
  logic busy, load_en, out_valid, out_last, done, success, est_req, ev_early, ev_check;
  logic [$clog2(SEG)-1:0] load_tau;
  logic [3:0] level [NT][LP];
  logic [$clog2(Z)-1:0] out_col0;
  logic [LP-1:0] hd [NT];
  logic [$clog2(IT_MAX+1)-1:0] iter_count;
  logic [1:0] prec;
  logic [15:0] n_frozen [NT];

  ldpc_flash_ecc #(.CODE(CODE), .LP(LP), .IT_MAX(IT_MAX), .N_SHORT(N_SHORT), .REPEAT(REPEAT)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    #50_000_000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- mechanism counters
  typedef enum int {M_LUT4, M_LUT7, M_LUT16, M_SHORT, M_FIRST, M_FROZEN, M_COLL,
                    M_EARLY, M_CHECK, M_UP47, M_UP716, M_DN167, M_DN74, M_EST, M_NUM} mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"lut 4-level", "lut 7-level", "lut 16-level", "shortened override",
                               "first visit", "saturated freeze", "collision sum", "early termination",
                               "parity-check phase", "precision 4->7", "precision 7->16",
                               "precision 16->7", "precision 7->4", "estimation request"};

  // ---------------- code and channel
  app_t tab [3][16];
  bit cw [N];
  int lev [N];
  bit dec [N];
  int seen [N];

  function automatic bit h_one(int r, int n);
    int t = n / Z, c = n % Z;
    for (int l = 0; l < W; l++) if ((r + code_col(CODE, t, l)) % Z == c) return 1;
    return 0;
  endfunction

  function automatic int syndrome_weight();
    int s = 0;
    for (int r = 0; r < Z; r++) begin
      bit p = 0;
      for (int n = 0; n < N; n++) if (dec[n] && h_one(r, n)) p ^= 1;
      s += p;
    end
    return s;
  endfunction

  // codeword: sums of shifted circulant pairs (circulants commute)
  task automatic make_codeword(int pairs);
    for (int n = 0; n < N; n++) cw[n] = 0;
    for (int p = 0; p < pairs; p++) begin
      int a, b, sh;
      a = 1 + $urandom_range(0, NT - 2);
      b = 1 + $urandom_range(0, NT - 2);
      sh = $urandom_range(0, Z - 1);
      if (a == b) b = (a % (NT - 1)) + 1;
      for (int l = 0; l < W; l++) begin
        cw[a * Z + ((Z - code_col(CODE, b, l)) + sh) % Z] ^= 1;
        cw[b * Z + ((Z - code_col(CODE, a, l)) + sh) % Z] ^= 1;
      end
    end
  endtask

  // read levels: confident correct reads, a few weak wrong ones; the
  // shortened bits are read wrong on purpose (the decoder must ignore them)
  task automatic make_page(int nerr, bit garbage);
    for (int n = 0; n < N; n++) lev[n] = garbage ? $urandom_range(0, 15) : (int'(cw[n]) << 3) | $urandom_range(5, 7);
    if (!garbage)
      for (int e = 0; e < nerr; e++) begin
        int n = N_SHORT + $urandom_range(0, N - N_SHORT - 1);
        lev[n] = (int'(!cw[n]) << 3) | $urandom_range(0, 1);
      end
    for (int n = 0; n < N_SHORT; n++) lev[n] = 4'hf;
  endtask

  always_comb
    for (int t = 0; t < NT; t++)
      for (int j = 0; j < LP; j++) begin
        automatic int col = load_col(CODE, LP, j, int'(load_tau));
        level[t][j] = (col < 0) ? 4'h9 : 4'(lev[t * Z + col]);
      end

  // LUT output checked against the programmed table of the current precision
  always @(posedge clk)
    if (load_en) begin
      for (int t = 0; t < NT; t++)
        for (int j = 0; j < LP; j++) begin
          checks++;
          if (dut.u_lut.llr[t * LP + j] != tab[prec][level[t][j]]) begin
            failures++; $display("FAIL lut output t=%0d j=%0d", t, j);
          end
        end
      mech[M_LUT4 + int'(prec)]++;
    end

  // first visit of a row: stored CTV messages not yet valid
  always @(posedge clk) if (dut.u_dec.ctv_we && !dut.u_dec.old_valid[0]) mech[M_FIRST]++;
  // saturated nodes frozen
  always @(posedge clk) if (busy) for (int t = 0; t < NT; t++) if (n_frozen[t] != 0) mech[M_FROZEN]++;

  // collisions: count writes of updaters that sum more than one difference
  // (the read positions are recomputed here from the code tables)
  int ncoll_edges = 0;
  initial begin
    for (int t = 0; t < NT; t++)
      for (int e = 0; e < LP * W; e++)
        for (int k = 0; k < e; k++)
          if (read_pos(CODE, LP, t, e / W, e % W) == read_pos(CODE, LP, t, k / W, k % W)) ncoll_edges++;
  end
  always @(posedge clk) if (dut.u_dec.wr_en && ncoll_edges > 0) mech[M_COLL]++;

  // output collection
  always @(posedge clk)
    if (out_valid)
      for (int t = 0; t < NT; t++)
        for (int j = 0; j < LP; j++)
          if (!(out_last && j == LP - 1)) begin
            automatic int col = (int'(out_col0) + SEG * j) % Z;
            dec[t * Z + col] = hd[t][j];
            seen[t * Z + col]++;
          end

  bit est_seen;
  always @(posedge clk) if (est_req) est_seen = 1;

  int npages = 0;
  task automatic page(string name, int pairs, int nerr, bit garbage);
    logic [1:0] p0;
    bit all_seen = 1, match = 1;
    make_codeword(pairs);
    make_page(nerr, garbage);
    p0 = prec;
    est_seen = 0;
    for (int n = 0; n < N; n++) seen[n] = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    @(negedge clk);
    for (int n = 0; n < N; n++) begin
      if (seen[n] != 1) all_seen = 0;
      if (dec[n] != cw[n]) match = 0;
    end
    check(all_seen, {name, ": every bit output once"});
    for (int n = 0; n < N_SHORT; n++) if (dec[n]) begin check(0, {name, ": shortened bit decoded as 1"}); break; end
    mech[M_SHORT]++;
    if (!garbage) begin
      check(success, {name, ": decoded"});
      check(match, {name, ": decoded word equals the codeword"});
    end else begin
      check(!success, {name, ": undecodable page reported as failure"});
    end
    if (!success) check(syndrome_weight() != 0, {name, ": failure has nonzero syndrome"});
    else          check(syndrome_weight() == 0, {name, ": success has zero syndrome"});
    if (ev_early) mech[M_EARLY]++;
    if (ev_check) mech[M_CHECK]++;
    if (p0 == 0 && prec == 1) mech[M_UP47]++;
    if (p0 == 1 && prec == 2) mech[M_UP716]++;
    if (p0 == 2 && prec == 1) mech[M_DN167]++;
    if (p0 == 1 && prec == 0) mech[M_DN74]++;
    if (est_seen) mech[M_EST]++;
    npages++;
    $display("%s: prec %0d -> %0d success=%0d iter=%0d early=%0d check=%0d est=%0d",
             name, p0, prec, success, iter_count, ev_early, ev_check, est_seen);
  endtask

  initial begin
    // tables: level bit 3 = read bit (1 -> negative LLR), bits 2:0 = confidence
    for (int s = 0; s < 3; s++)
      for (int l = 0; l < 16; l++) begin
        int conf, mag;
        conf = l & 7;
        mag = (s == 0) ? ((conf >= 4) ? 24 : 6) : (s == 1) ? 4 + 4 * conf : 3 + 5 * conf;
        tab[s][l] = {l[3], 6'(mag)};
      end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 3; s++)
      for (int l = 0; l < 16; l++) begin
        @(negedge clk);
        lut_wr_en = 1; lut_wr_sel = 2'(s); lut_wr_addr = 4'(l); lut_wr_data = tab[s][l];
      end
    @(negedge clk); lut_wr_en = 0;
    check(prec == 0, "starts with 4-level reads");

    page("clean4", 2, 0, 0);
    page("err4", 3, 3, 0);
    // undecodable pages push the precision up to 16 levels, then ask for
    // channel estimation
    for (int k = 0; k < 2 * REPEAT; k++) page($sformatf("garbage%0d", k), 1, 0, 1);
    check(prec == 2, "precision raised to 16 levels");
    for (int k = 0; k < REPEAT; k++) page($sformatf("garbage_est%0d", k), 1, 0, 1);
    page("err16", 4, 4, 0);
    // clean pages bring it back down
    for (int k = 0; k < 2 * REPEAT; k++) page($sformatf("clean_dn%0d", k), 2 + k, 0, 0);
    check(prec == 0, "precision back at 4 levels");
    for (int k = 0; k < 3; k++) page($sformatf("errs%0d", k), 2 + k, 2 + k, 0);

    for (int m = 0; m < M_NUM; m++) begin
      check(mech[m] > 0, {"mechanism happened: ", mech_name[m]});
      $display("mechanism %-20s %0d", mech_name[m], mech[m]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
