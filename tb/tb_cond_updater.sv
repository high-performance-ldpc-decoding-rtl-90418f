// tb_cond_updater: random LLRs and pairs of differences.  Expected: a node at
// +-63 is not written; otherwise the sum saturates to +-63 after both
// differences are added, zero is +0, and `flip` marks a changed sign.
module tb_cond_updater;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;
  logic en, wen, flip;
  app_t z_cur, z_new;
  delta_t delta [2];
  cond_updater #(.K(2)) dut (.*);
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int nsat = 0, nfrz = 0, nflip = 0;
    for (int it = 0; it < 2000; it++) begin
      int z, s, ez; bit ew, ef; app_t e;
      z = $urandom_range(0, 126) - 63;
      if (it % 10 == 0) z = ($urandom_range(0, 1) ? 63 : -63);
      en = ($urandom_range(0, 7) != 0);
      z_cur = (z < 0) ? {1'b1, 6'(-z)} : {1'b0, 6'(z)};
      if (z == 0 && $urandom_range(0, 1)) z_cur = 7'h40;   // -0 reads as 0
      delta[0] = delta_t'($urandom_range(0, 60) - 30);
      delta[1] = delta_t'($urandom_range(0, 60) - 30);
      s = z + int'(delta[0]) + int'(delta[1]);
      ez = (s > 63) ? 63 : (s < -63) ? -63 : s;
      e = (ez < 0) ? {1'b1, 6'(-ez)} : {1'b0, 6'(ez)};
      ew = en && (z != 63 && z != -63);
      ef = ew && (e[6] != z_cur[6]);
      #1;
      checks++;
      if (wen != ew || (ew && z_new != e) || flip != ef) begin
        failures++; $display("FAIL z=%0d d=%0d,%0d got %h/%0d exp %h/%0d", z, delta[0], delta[1], z_new, wen, e, ew);
      end
      if (ew && (s > 63 || s < -63)) nsat++;
      if (en && !ew) nfrz++;
      if (ef) nflip++;
    end
    checks++; if (nsat == 0 || nfrz == 0 || nflip == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
