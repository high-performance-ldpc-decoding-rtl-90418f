// tb_dec_controller: the controller alone for a 63-column ring, 8 lanes, a
// limit of 3 iterations.  The testbench plays the datapath: it reports odd
// row parities and sign flips as told by the scenario, and checks the phase
// lengths, the CTV address/valid pattern, the convergence decision, the
// output columns and the cycle counts ((k+2)*SEG + 6 on convergence in
// iteration k, (IT_MAX+3)*SEG + 10 with the parity-check phase).
module tb_dec_controller;
  localparam int Z = 63, LP = 8, IT_MAX = 3, SEG = 8;
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin #2_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic busy, load_en, shift_en, ctv_re, ctv_we, wr_en, w_capture, w_shift, out_valid, out_last;
  logic done, success, ev_early, ev_check;
  logic [2:0] load_tau, raddr_n, raddr_w, waddr;
  logic old_valid [LP];
  logic par_any = 0, flip_any = 0;
  logic [5:0] out_col0;
  logic [1:0] iter_count;
  dec_controller #(.Z(Z), .LP(LP), .IT_MAX(IT_MAX)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // scenario: odd parity in every window before window `good_win`
  // (0-based), and a sign flip in the first window
  int good_win;
  int cyc = 0, dstart = -1, nloads, nwr, ncap, nout;
  int reads = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    par_any  = 0;
    flip_any = 0;
    if (dut.s3.valid && dut.s3.upd && dstart >= 0 && (cyc - 2 - dstart) / SEG < good_win) par_any = 1;
    if (dut.s3.valid && !dut.s3.upd && good_win > IT_MAX) par_any = 1;
    if (wr_en && dstart >= 0 && cyc - 4 - dstart < 3) flip_any = 1;
  end

  always @(posedge clk) begin
    if (load_en) nloads++;
    if (wr_en) nwr++;
    if (w_capture) ncap++;
    if (out_valid) nout++;
    if (load_en && load_tau == 3'(SEG - 1)) dstart = cyc + 1;
    if (ctv_re) begin
      // addresses: A mod SEG; lane LP-1 one ahead
      if (raddr_n != 3'((cyc - dstart) % SEG) || raddr_w != 3'((cyc - dstart + 1) % SEG)) begin
        failures++; $display("FAIL read address at %0d", cyc - dstart);
      end
      checks++;
    end
    if (ctv_we && rst_n && dstart >= 0) begin
      checks++;
      if (waddr != 3'((cyc - 2 - dstart) % SEG)) begin failures++; $display("FAIL write address %0d %0d %0d", cyc, dstart, waddr); end
      checks++;
      if (old_valid[0] != (cyc - 2 - dstart >= SEG) || old_valid[LP-1] != (cyc - 2 - dstart >= SEG - 1)) begin
        failures++; $display("FAIL old_valid at %0d", cyc - 2 - dstart);
      end
    end
  end

  task automatic run(int gw, int exp_iter, bit exp_ok, bit exp_check);
    int c0, cycles;
    good_win = gw; nloads = 0; nwr = 0; ncap = 0; nout = 0; dstart = -1;
    @(negedge clk); start = 1; c0 = cyc;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    cycles = cyc - c0;
    check(nloads == SEG, "load phase length");
    check(nout == SEG, "output phase length");
    check(success == exp_ok, $sformatf("success %0d", success));
    check(int'(iter_count) == exp_iter, $sformatf("iterations %0d exp %0d", iter_count, exp_iter));
    check(ev_check == exp_check, "check phase flag");
    check(ncap == exp_iter, "one capture per iteration");
    if (exp_check) check(cycles == (IT_MAX + 3) * SEG + 10, $sformatf("cycles %0d", cycles));
    else           check(cycles == (exp_iter + 2) * SEG + 6, $sformatf("cycles %0d", cycles));
    check(nwr == exp_iter * SEG, $sformatf("writes %0d", nwr));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0, 2, 1, 0);       // parity fine at once, but flips in window 1 -> converges in window 2
    run(2, 3, 1, 0);       // parity good from window 3
    run(9, 3, 0, 1);       // never: check phase, failure
    run(3, 3, 1, 1);       // all windows odd, but the check pass is clean -> success
    // last case: the check pass is clean, so it is a success after the limit
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
