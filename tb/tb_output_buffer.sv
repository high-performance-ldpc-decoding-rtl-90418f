// tb_output_buffer: a 63-bit ring with 8 segments.  After capturing a random
// vector, the bottom bit of segment j must show bit (8j + s) mod 63 after s
// rotations; a capture overrides a shift.
module tb_output_buffer;
  localparam int Z = 63, LP = 8, SEG = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin #2_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  logic capture = 0, shift = 0;
  logic [Z-1:0] signs, ref_v;
  logic [LP-1:0] hd;
  output_buffer #(.Z(Z), .LP(LP)) dut (.*);
  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      @(negedge clk);
      signs = {$urandom, $urandom}; ref_v = signs;
      capture = 1; shift = (rep % 2 == 1);
      @(negedge clk);
      capture = 0; shift = 1;
      signs = ~signs;
      for (int s = 0; s < SEG; s++) begin
        for (int j = 0; j < LP; j++) begin
          checks++;
          if (hd[j] != ref_v[(SEG * j + s) % Z]) begin failures++; $display("FAIL rep %0d s %0d j %0d", rep, s, j); end
        end
        @(negedge clk);
      end
      shift = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
