// tb_ldpc_decoder: end-to-end test of ldpc_decoder on the small (315-bit)
// EG(3,2^2) code of the same construction, 8 lanes, 8 iterations, with the
// first 10 bits shortened.
//
// Codewords are built independently of the decoder: for circulants a and b,
// putting the reversed column pattern of b into tile a and that of a into
// tile b gives a word in the null space (circulants commute); sums of such
// words are codewords too.  The testbench checks their syndrome with its own
// H, sends them through a channel with chosen errors, and checks the decoded
// word, success flag, iteration count and the exact cycle count from start to
// done: (k + 2) * SEG + 6 when converging in iteration k, and
// (IT_MAX + 3) * SEG + 10 when the parity-check phase runs.
module tb_ldpc_decoder;
  import ldpc_pkg::*;
  localparam code_e CODE = EG_63;
  localparam int LP = 8, IT_MAX = 8, N_SHORT = 10;
  localparam int NT = code_nt(CODE), Z = code_z(CODE), W = code_w(CODE);
  localparam int SEG = (Z + 1) / LP, N = NT * Z;

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, load_en, out_valid, out_last, done, success, ev_early, ev_check;
  logic [$clog2(SEG)-1:0] load_tau;
  logic [$clog2(Z)-1:0] out_col0;
  logic [LP-1:0] hd [NT];
  logic [$clog2(IT_MAX+1)-1:0] iter_count;
  logic [15:0] n_frozen [NT];
  app_t llr_in [NT][LP];

  ldpc_decoder #(.CODE(CODE), .LP(LP), .IT_MAX(IT_MAX), .N_SHORT(N_SHORT)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #20_000_000;
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
  int chan [N];           // channel LLR, signed, |.| <= 63
  bit dec [N];
  int seen [N];

  function automatic bit h_one(int r, int n);
    int t = n / Z, c = n % Z;
    for (int l = 0; l < W; l++) if ((r + code_col(CODE, t, l)) % Z == c) return 1;
    return 0;
  endfunction

  function automatic int syndrome_weight(bit v []);
    int s = 0;
    for (int r = 0; r < Z; r++) begin
      bit p = 0;
      for (int n = 0; n < N; n++) if (v[n] && h_one(r, n)) p ^= 1;
      s += p;
    end
    return s;
  endfunction

  task automatic make_codeword(int pairs);
    for (int n = 0; n < N; n++) cw[n] = 0;
    for (int p = 0; p < pairs; p++) begin
      int a = 1 + $urandom_range(0, NT - 2);
      int b = 1 + $urandom_range(0, NT - 2);
      int sh = $urandom_range(0, Z - 1);
      if (a == b) b = (a % (NT - 1)) + 1;
      // shifting both parts by the same amount keeps it a codeword
      for (int l = 0; l < W; l++) begin
        cw[a * Z + ((Z - code_col(CODE, b, l)) + sh) % Z] ^= 1;
        cw[b * Z + ((Z - code_col(CODE, a, l)) + sh) % Z] ^= 1;
      end
    end
  endtask

  task automatic make_channel(int nerr, int mag_lo, int mag_hi);
    for (int n = 0; n < N; n++) begin
      int m = $urandom_range(mag_lo, mag_hi);
      chan[n] = cw[n] ? -m : m;
    end
    for (int e = 0; e < nerr; e++) begin
      int n = N_SHORT + $urandom_range(0, N - N_SHORT - 1);
      chan[n] = cw[n] ? $urandom_range(1, 6) : -$urandom_range(1, 6);
    end
    // the shortened bits are sent as wrong, strong values: the decoder must
    // ignore them
    for (int n = 0; n < N_SHORT; n++) chan[n] = -40;
  endtask

  function automatic app_t to_sm(int v);
    return (v < 0) ? {1'b1, 6'(-v)} : {1'b0, 6'(v)};
  endfunction

  always_comb
    for (int t = 0; t < NT; t++)
      for (int j = 0; j < LP; j++) begin
        automatic int col = load_col(CODE, LP, j, int'(load_tau));
        llr_in[t][j] = (col < 0) ? app_t'(7'h55) : to_sm(chan[t * Z + col]);
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

  int frozen_seen = 0;
  always @(posedge clk) if (busy) for (int t = 0; t < NT; t++) frozen_seen += int'(n_frozen[t]);

  task automatic run(output int cycles);
    int c0;
    for (int n = 0; n < N; n++) seen[n] = 0;
    @(negedge clk); start = 1; c0 = cyc;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    cycles = cyc - c0;
  endtask

  int cycles, n_early = 0, n_check = 0, n_fail = 0, n_ok = 0;

  task automatic decode_and_check(string name, bit expect_ok);
    bit all_seen = 1, match = 1;
    bit dv [] = new[N];
    run(cycles);
    for (int n = 0; n < N; n++) begin
      if (seen[n] != 1) all_seen = 0;
      if (dec[n] != cw[n]) match = 0;
      dv[n] = dec[n];
    end
    check(all_seen, {name, ": every bit output exactly once"});
    if (expect_ok) begin
      check(success, {name, ": success"});
      check(match, {name, ": decoded word equals the sent codeword"});
      check(cycles == (int'(iter_count) + 2) * SEG + 6, $sformatf("%s: cycles %0d for %0d iterations", name, cycles, iter_count));
    end else begin
      check(!success, {name, ": reported as failed"});
      check(syndrome_weight(dv) != 0, {name, ": output really is not a codeword"});
    end
    if (success && syndrome_weight(dv) != 0) check(0, {name, ": success with nonzero syndrome"});
    if (ev_check) check(cycles == (IT_MAX + 3) * SEG + 10, $sformatf("%s: cycles %0d with check phase", name, cycles));
    for (int n = 0; n < N_SHORT; n++) if (dec[n]) begin check(0, {name, ": shortened bit decoded as 1"}); break; end
    if (ev_early) n_early++;
    if (ev_check) n_check++;
    if (success) n_ok++; else n_fail++;
    $display("%s: success=%0d iter=%0d cycles=%0d early=%0d check=%0d", name, success, iter_count, cycles, ev_early, ev_check);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // codeword sanity (independent of the decoder)
    make_codeword(3);
    begin bit v [] = new[N]; foreach (v[n]) v[n] = cw[n]; check(syndrome_weight(v) == 0, "constructed word is a codeword"); end
    // 1: error-free, strong
    make_channel(0, 20, 40);
    decode_and_check("clean", 1);
    check(iter_count == 1, "clean word converges in one iteration");
    // 2..6: a few weak errors
    for (int k = 0; k < 5; k++) begin
      make_codeword(2 + k);
      make_channel(2 + k, 8, 20);
      decode_and_check($sformatf("errors%0d", 2 + k), 1);
    end
    // 7: all-zero codeword, weak noisy channel that saturates late
    for (int n = 0; n < N; n++) cw[n] = 0;
    make_channel(3, 6, 14);
    decode_and_check("weak", 1);
    // 8: random garbage: cannot be decoded, the parity-check phase runs
    for (int n = 0; n < N; n++) begin cw[n] = 0; chan[n] = ($urandom_range(0, 1) ? 1 : -1) * $urandom_range(1, 10); end
    for (int n = 0; n < N_SHORT; n++) chan[n] = 63;
    decode_and_check("garbage", 0);
    check(iter_count == IT_MAX, "failed decoding used all iterations");
    check(n_early > 0, "early termination happened");
    check(n_check > 0, "parity-check phase happened");
    check(frozen_seen > 0, "conditional update froze saturated nodes");
    $display("early=%0d check=%0d ok=%0d fail=%0d frozen-edge-cycles=%0d", n_early, n_check, n_ok, n_fail, frozen_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
