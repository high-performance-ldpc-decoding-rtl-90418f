// tb_precision_selector: drives random page results (iteration counts,
// occasional failures, bursts of constant counts so that runs form) into the
// selector and compares its precision and estimation requests with a
// behavioural model of the rules; checks that every move (4->7, 7->4, 7->16,
// 16->7) and the estimation request were seen.
module tb_precision_selector;
  localparam int IT_MAX = 8, REPEAT = 2;
  logic clk = 0, rst_n = 0, valid = 0, success = 0;
  logic [3:0] iter_count = 0;
  logic [1:0] prec;
  logic est_req;
  int checks = 0, failures = 0;
  int moves [5];   // 4->7, 7->4, 7->16, 16->7, est
  always #5 clk = ~clk;
  initial begin #5_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  precision_selector #(.IT_MAX(IT_MAX), .REPEAT(REPEAT)) dut (.*);

  int m_prec = 0, m_up = 0, m_dn = 0;
  bit m_est;

  task automatic page(int it, bit ok);
    int eff;
    bit up, dn;
    eff = ok ? it : IT_MAX;
    up = (m_prec == 0) ? eff >= 2 : (m_prec == 1) ? eff >= 3 : eff >= 4;
    dn = (m_prec == 0) ? 0 : (m_prec == 1) ? eff == 1 : eff <= 2;
    m_up = up ? m_up + 1 : 0;
    m_dn = dn ? m_dn + 1 : 0;
    m_est = 0;
    if (m_up == REPEAT) begin
      m_up = 0; m_dn = 0;
      if (m_prec == 2) begin m_est = 1; moves[4]++; end
      else begin moves[m_prec == 0 ? 0 : 2]++; m_prec++; end
    end else if (m_dn == REPEAT) begin
      m_up = 0; m_dn = 0;
      moves[m_prec == 1 ? 1 : 3]++;
      m_prec--;
    end
    @(negedge clk);
    valid = 1; success = ok; iter_count = 4'(it);
    @(negedge clk);
    valid = 0;
    checks++;
    if (prec != 2'(m_prec) || est_req != m_est) begin
      failures++;
      $display("FAIL it=%0d ok=%0d prec %0d exp %0d est %0d exp %0d", it, ok, prec, m_prec, est_req, m_est);
    end
    repeat (1 + $urandom % 3) @(negedge clk);
    checks++;
    if (est_req) begin failures++; $display("FAIL est_req longer than one cycle"); end
  endtask

  initial begin
    #12 rst_n = 1;
    checks++;
    if (prec != 0) begin failures++; $display("FAIL reset precision"); end
    for (int b = 0; b < 300; b++) begin
      int it, len;
      bit ok;
      it  = 1 + $urandom % IT_MAX;
      ok  = ($urandom % 6) != 0;
      len = 1 + $urandom % 4;
      for (int k = 0; k < len; k++) page(it, ok);
    end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (moves[k] == 0) begin failures++; $display("FAIL move %0d never happened", k); end
    end
    $display("moves 4->7 %0d 7->4 %0d 7->16 %0d 16->7 %0d est %0d", moves[0], moves[1], moves[2], moves[3], moves[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
