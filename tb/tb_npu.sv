// tb_npu: random row results and old records.  The testbench forms the new
// and old CTV values from the rules (second minimum = min1 + offset when the
// edge holds the minimum, sign = row product XOR own sign, zero on a first
// visit or a saturated node) and checks the stored sign bit at once and the
// difference two clock edges later.
module tb_npu;
  import ldpc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin #2_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  cmag_t min1, min1_old;
  logic [QD-1:0] dmin, dmin_old;
  logic flag_new, stot, z_sign, z_sat, old_valid, flag_old, sign_old, sign_new;
  delta_t delta_q;
  npu dut (.*);

  initial begin
    for (int it = 0; it < 500; it++) begin
      int ln, lo, mn, mo;
      @(negedge clk);
      min1 = cmag_t'($urandom_range(0, 12)); dmin = 2'($urandom_range(0, 3));
      flag_new = ($urandom_range(0, 3) == 0); stot = 1'($urandom_range(0, 1));
      z_sign = 1'($urandom_range(0, 1)); z_sat = ($urandom_range(0, 7) == 0);
      old_valid = ($urandom_range(0, 5) != 0);
      min1_old = cmag_t'($urandom_range(0, 12)); dmin_old = 2'($urandom_range(0, 3));
      flag_old = ($urandom_range(0, 3) == 0); sign_old = 1'($urandom_range(0, 1));
      mn = int'(min1) + (flag_new ? int'(dmin) : 0);
      mo = int'(min1_old) + (flag_old ? int'(dmin_old) : 0);
      ln = (stot ^ z_sign) ? -mn : mn;
      lo = sign_old ? -mo : mo;
      if (z_sat) begin ln = 0; lo = 0; end
      if (!old_valid) lo = 0;
      #1;
      checks++;
      if (sign_new != (stot ^ z_sign)) begin failures++; $display("FAIL sign"); end
      @(posedge clk); @(posedge clk); #1;
      checks++;
      if (int'(delta_q) != ln - lo) begin failures++; $display("FAIL delta %0d exp %0d", delta_q, ln - lo); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
