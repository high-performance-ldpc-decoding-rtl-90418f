// tb_idx_flag: sweeps every 9-bit index for tile 3 of a 16-edge tile and
// checks that exactly the flag of edge idx - 48 is set when the index falls in
// the tile, and none otherwise.
module tb_idx_flag;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;
  logic [IDXW-1:0] idx;
  logic [15:0] flag;
  idx_flag #(.W(16), .TILE(3)) dut (.idx, .flag);
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 512; i++) begin
      logic [15:0] exp;
      idx = IDXW'(i);
      #1;
      exp = (i >= 48 && i < 64) ? 16'(1) << (i - 48) : '0;
      checks++;
      if (flag !== exp) begin failures++; $display("FAIL idx=%0d flag=%h exp=%h", i, flag, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
