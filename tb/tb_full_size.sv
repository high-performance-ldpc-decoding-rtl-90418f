// tb_full_size: the flash ECC top at its default size -- the (68254,65536)
// shortened EG-LDPC code with 17 circulants of 4095 columns, 8 lanes per
// tile, at most 8 iterations -- with no parameter overrides.
//
// The host programs the three LLR tables; the flash model provides 4-bit
// read levels (bit 3 = read value, bits 2:0 = confidence) of codewords built
// from shifted circulant pairs.  Pages: one clean page, one page with a few
// weak wrong reads.  Checks: success, the decoded word equals the codeword
// (every bit output exactly once, shortened bits zero), a zero syndrome
// computed by the testbench, and the cycle count from start to done of
// (iterations + 2) * 512 + 6.
module tb_full_size;
  import ldpc_pkg::*;
  localparam code_e CODE = EG_4095;
  localparam int LP = 8, IT_MAX = 8, N_SHORT = 1361;
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

  ldpc_flash_ecc dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    #2_000_000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit cw [N];
  bit dec [N];
  int lev [N];
  int seen [N];

  function automatic int syndrome_weight();
    int s = 0;
    for (int r = 0; r < Z; r++) begin
      bit p = 0;
      for (int t = 0; t < NT; t++)
        for (int l = 0; l < W; l++) p ^= dec[t * Z + (r + code_col(CODE, t, l)) % Z];
      s += p;
    end
    return s;
  endfunction

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

  task automatic make_page(int nerr);
    for (int n = 0; n < N; n++) lev[n] = (int'(cw[n]) << 3) | $urandom_range(5, 7);
    for (int e = 0; e < nerr; e++) begin
      int n = N_SHORT + $urandom_range(0, N - N_SHORT - 1);
      lev[n] = (int'(!cw[n]) << 3) | $urandom_range(0, 1);
    end
  endtask

  always_comb
    for (int t = 0; t < NT; t++)
      for (int j = 0; j < LP; j++) begin
        automatic int col = load_col(CODE, LP, j, int'(load_tau));
        level[t][j] = (col < 0) ? 4'h0 : 4'(lev[t * Z + col]);
      end

  always @(posedge clk)
    if (out_valid)
      for (int t = 0; t < NT; t++)
        for (int j = 0; j < LP; j++)
          if (!(out_last && j == LP - 1)) begin
            automatic int col = (int'(out_col0) + SEG * j) % Z;
            dec[t * Z + col] = hd[t][j];
            seen[t * Z + col]++;
          end

  task automatic page(string name, int pairs, int nerr);
    int c0, cycles;
    bit all_seen = 1, match = 1;
    make_codeword(pairs);
    make_page(nerr);
    for (int n = 0; n < N; n++) seen[n] = 0;
    @(negedge clk); start = 1; c0 = cyc;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    cycles = cyc - c0;
    for (int n = 0; n < N; n++) begin
      if (seen[n] != 1) all_seen = 0;
      if (dec[n] != cw[n]) match = 0;
    end
    check(success, {name, ": decoded"});
    check(all_seen, {name, ": every bit output once"});
    check(match, {name, ": decoded word equals the codeword"});
    check(syndrome_weight() == 0, {name, ": zero syndrome"});
    check(cycles == (int'(iter_count) + 2) * SEG + 6, $sformatf("%s: %0d cycles for %0d iterations", name, cycles, iter_count));
    $display("%s: success=%0d iterations=%0d cycles=%0d", name, success, iter_count, cycles);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 3; s++)
      for (int l = 0; l < 16; l++) begin
        @(negedge clk);
        lut_wr_en = 1; lut_wr_sel = 2'(s); lut_wr_addr = 4'(l);
        lut_wr_data = {l[3], 6'((s == 0) ? (((l & 7) >= 4) ? 24 : 6) : 4 + 4 * (l & 7))};
      end
    @(negedge clk); lut_wr_en = 0;
    make_codeword(3);
    for (int n = 0; n < N; n++) dec[n] = cw[n];
    check(syndrome_weight() == 0, "constructed word is a codeword");
    page("clean", 3, 0);
    page("errors", 4, 12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
