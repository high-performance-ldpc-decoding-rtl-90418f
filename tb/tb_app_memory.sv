// tb_app_memory: the APP ring of tile 2 of the 63-column test code, 8 lanes.
// After loading column values through the segment tops (load_col), the
// testbench rotates the ring and checks that every read tap of lane j, edge l
// shows column (T + 8j + c_l) mod 63 after T rotations, i.e. the columns of
// row T + 8j; that the sign vector is right; and that a value written at a
// write tap reappears, four rotations after its read, one place further on.
module tb_app_memory;
  import ldpc_pkg::*;
  localparam code_e CODE = EG_63;
  localparam int LP = 8, TILE = 2, Z = 63, W = 4, SEG = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin #2_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic shift_en = 0, load_en = 0;
  app_t load_in [LP];
  app_t rd [LP][W], wcur [LP][W], wval [LP][W];
  logic wen [LP][W];
  logic [Z-1:0] signs;
  app_memory #(.CODE(CODE), .TILE(TILE), .LP(LP), .D(4)) dut (.*);

  app_t colval [Z];
  initial begin
    for (int c = 0; c < Z; c++) colval[c] = app_t'($urandom_range(0, 127));
    for (int j = 0; j < LP; j++) for (int l = 0; l < W; l++) begin wen[j][l] = 0; wval[j][l] = '0; end
    // load
    for (int tau = 0; tau < SEG; tau++) begin
      @(negedge clk);
      shift_en = 1; load_en = 1;
      for (int j = 0; j < LP; j++) begin
        automatic int col = load_col(CODE, LP, j, tau);
        load_in[j] = (col < 0) ? app_t'(7'h7f) : colval[col];
      end
    end
    @(negedge clk); load_en = 0; shift_en = 0;
    for (int c = 0; c < Z; c++) begin
      checks++;
      if (signs[c] != colval[c][6]) begin failures++; $display("FAIL sign col %0d", c); end
    end
    // rotate a full turn and more, checking the taps
    for (int t = 0; t < 2 * Z; t++) begin
      for (int j = 0; j < LP; j++)
        for (int l = 0; l < W; l++) begin
          automatic int col = (t + SEG * j + code_col(CODE, TILE, l)) % Z;
          checks++;
          if (rd[j][l] != colval[col]) begin failures++; $display("FAIL t=%0d j=%0d l=%0d", t, j, l); end
          checks++;
          if (wcur[j][l] != colval[(col + Z - 4) % Z]) begin failures++; $display("FAIL wcur t=%0d", t); end
        end
      shift_en = 1;
      @(negedge clk);
    end
    // write: lane 3 edge 1 reads column c at T; at T+4 its write tap holds c;
    // writing there stores the new value into c.
    begin
      app_t nv;
      int c;
      c = (2 * Z + SEG * 3 + code_col(CODE, TILE, 1)) % Z;   // column under the tap now
      repeat (4) @(negedge clk);
      checks++;
      if (wcur[3][1] != colval[c]) begin failures++; $display("FAIL write tap does not hold the read column"); end
      nv = 7'h2a;
      wen[3][1] = 1; wval[3][1] = nv;
      @(negedge clk);
      wen[3][1] = 0;
      colval[c] = nv;
      // one more full turn: everything including the new value in place
      for (int t = 0; t < Z; t++) @(negedge clk);
      shift_en = 0;
      #1;
      for (int x = 0; x < Z; x++) begin
        checks++;
        if (signs[x] != colval[(x + 2 * Z + 5 + Z) % Z][6]) begin failures++; $display("FAIL after write x=%0d", x); end
      end
      checks++;
      if (dut.v[(c + Z - ((3 * Z + 5) % Z)) % Z] != nv) begin failures++; $display("FAIL written value not found"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
