// tb_ctv_bank: random writes and reads of a 512 x 16 bank against an array
// model; read data is checked one cycle after the read.
module tb_ctv_bank;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin #2_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  logic we = 0, re = 0;
  logic [8:0] waddr, raddr;
  logic [15:0] wdata, rdata;
  ctv_bank #(.DEPTH(512), .WIDTH(16)) dut (.*);
  logic [15:0] model [512];
  bit written [512];
  initial begin
    for (int it = 0; it < 3000; it++) begin
      logic [8:0] ra; bit doread;
      @(negedge clk);
      we = 1'($urandom_range(0, 1)); waddr = 9'($urandom_range(0, 511)); wdata = 16'($urandom);
      ra = 9'($urandom_range(0, 511));
      if (ra == waddr) ra = ra + 1'b1;
      doread = written[ra];
      re = doread; raddr = ra;
      @(posedge clk); #1;
      if (we) begin model[waddr] = wdata; written[waddr] = 1; end
      if (doread) begin
        checks++;
        if (rdata != model[ra]) begin failures++; $display("FAIL addr %0d", ra); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
