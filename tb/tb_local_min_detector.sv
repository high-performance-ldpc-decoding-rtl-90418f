// tb_local_min_detector: random vectors of 16 sign-magnitude LLRs; the two
// smallest magnitudes after the divide-by-4, the first index of the smallest
// and the sign parity are computed by sorting in the testbench and compared
// one cycle later.  A 4-input instance is checked the same way.
module tb_local_min_detector;
  import ldpc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin #2_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  app_t a16 [16], a4 [4];
  minpair_t mp16, mp4;
  logic sx16, sx4;
  local_min_detector #(.N(16)) d16 (.clk, .app_in(a16), .mp_q(mp16), .sign_xor_q(sx16));
  local_min_detector #(.N(4))  d4  (.clk, .app_in(a4),  .mp_q(mp4),  .sign_xor_q(sx4));

  task automatic expect_pair(app_t a [], minpair_t got, logic gsx);
    int m1 = 99, m2 = 99, idx = 0; bit sx = 0;
    for (int k = 0; k < a.size(); k++) begin
      int m = a[k][5:0] / 4;
      sx ^= a[k][6];
      if (m < m1) begin m2 = m1; m1 = m; idx = k; end
      else if (m < m2) m2 = m;
    end
    checks++;
    if (got.m1 != 4'(m1) || got.m2 != 4'(m2) || got.idx != 9'(idx) || gsx != sx) begin
      failures++;
      $display("FAIL: got %0d %0d %0d %0d exp %0d %0d %0d %0d", got.m1, got.m2, got.idx, gsx, m1, m2, idx, sx);
    end
  endtask

  initial begin
    for (int it = 0; it < 300; it++) begin
      app_t c16 [] = new[16];
      app_t c4 [] = new[4];
      @(negedge clk);
      for (int k = 0; k < 16; k++) begin
        a16[k] = app_t'($urandom_range(0, 127));
        if (it % 3 == 0) a16[k][5:0] = 6'($urandom_range(0, 12));  // many ties
        c16[k] = a16[k];
      end
      for (int k = 0; k < 4; k++) begin a4[k] = app_t'($urandom_range(0, 127)); c4[k] = a4[k]; end
      @(negedge clk);
      expect_pair(c16, mp16, sx16);
      expect_pair(c4, mp4, sx4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
