// tb_global_min_detector: random local (min1, min2, index) pairs of 17 tiles;
// the testbench finds the row minimum (first tile on a tie), the second
// minimum over all 34 values, the 2-bit saturated offset and the sign product
// and compares them with the registered outputs.
module tb_global_min_detector;
  import ldpc_pkg::*;
  localparam int NT = 17, W = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin #2_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  minpair_t loc [NT];
  logic lsign [NT];
  ctvrec_t rec;
  logic stot;
  global_min_detector #(.NT(NT), .W(W)) dut (.clk, .loc, .lsign, .rec_q(rec), .stot_q(stot));

  initial begin
    int nsat = 0;
    for (int it = 0; it < 400; it++) begin
      int m1, m2, idx, d; bit s;
      m1 = 99; m2 = 99; idx = 0; s = 0;
      @(negedge clk);
      for (int t = 0; t < NT; t++) begin
        int a, b;
        a = $urandom_range(0, 15); b = $urandom_range(0, 15);
        if (it % 2 == 0) begin a = $urandom_range(3, 8); b = $urandom_range(3, 15); end
        if (it % 5 == 1) begin a = (t == 7) ? 2 : 14; b = 15; end
        if (b < a) begin int x; x = a; a = b; b = x; end
        loc[t].m1 = 4'(a); loc[t].m2 = 4'(b); loc[t].idx = 9'($urandom_range(0, W - 1));
        lsign[t] = 1'($urandom_range(0, 1));
        s ^= lsign[t];
        if (a < m1) begin m2 = (m1 < b) ? m1 : b; m1 = a; idx = t * W + int'(loc[t].idx); end
        else if (a < m2) m2 = a;
      end
      d = (m2 - m1 > 3) ? 3 : m2 - m1;
      if (d == 3) nsat++;
      @(negedge clk);
      checks++;
      if (rec.m1 != 4'(m1) || rec.idx != 9'(idx) || rec.dmin != 2'(d) || stot != s) begin
        failures++;
        $display("FAIL: got m1=%0d idx=%0d d=%0d s=%0d exp %0d %0d %0d %0d", rec.m1, rec.idx, rec.dmin, stot, m1, idx, d, s);
      end
    end
    checks++; if (nsat == 0) begin failures++; $display("FAIL: offset never saturated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
