// tb_llr_lut: programs random contents into all three tables of a small LUT
// (NR = 8 lookups), keeps a reference copy, and checks every lookup against
// it while the selected table and the levels change at random.  Also checks
// the all-zero reset contents and that a write changes only its own entry.
module tb_llr_lut;
  import ldpc_pkg::*;
  localparam int NR = 8, NSEL = 3;
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [1:0] wr_sel = 0, sel = 0;
  logic [3:0] wr_addr = 0;
  app_t wr_data = '0;
  logic [3:0] level [NR];
  app_t llr [NR];
  app_t ref_tab [NSEL][16];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  llr_lut #(.NR(NR), .NSEL(NSEL)) dut (.*);

  task automatic compare();
    for (int r = 0; r < NR; r++) begin
      checks++;
      if (llr[r] !== ref_tab[sel][level[r]]) begin
        failures++;
        $display("FAIL sel %0d level %0d got %h exp %h", sel, level[r], llr[r], ref_tab[sel][level[r]]);
      end
    end
  endtask

  initial begin
    for (int s = 0; s < NSEL; s++) for (int a = 0; a < 16; a++) ref_tab[s][a] = '0;
    for (int r = 0; r < NR; r++) level[r] = 4'(r);
    #12 rst_n = 1;
    // reset contents
    for (int s = 0; s < NSEL; s++) begin
      sel = 2'(s);
      for (int k = 0; k < 2; k++) begin
        for (int r = 0; r < NR; r++) level[r] = 4'(r + 8 * k);
        #1 compare();
      end
    end
    // random programming interleaved with lookups
    for (int it = 0; it < 400; it++) begin
      @(negedge clk);
      wr_en   = ($urandom % 2) == 0;
      wr_sel  = 2'($urandom % NSEL);
      wr_addr = 4'($urandom);
      wr_data = app_t'($urandom);
      sel     = 2'($urandom % NSEL);
      for (int r = 0; r < NR; r++) level[r] = 4'($urandom);
      #1 compare();                          // write not yet taken
      @(posedge clk);
      if (wr_en) ref_tab[wr_sel][wr_addr] = wr_data;
      #1 compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
