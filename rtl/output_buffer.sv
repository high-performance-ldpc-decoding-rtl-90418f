// output_buffer: hard-decision buffer of one tile.
//
// A ring of Z sign bits next to the APP memory.  At the end of an iteration
// the controller pulses `capture` and the buffer copies the sign bit of every
// APP register (the hard decision of every bit of the tile, 1 = bit value 1).
// While `shift` is high the ring rotates like the APP memory (W[x] <= W[x+1]),
// and the bit at the bottom of each of the LP segments is presented on
// `hd[j]`, so the whole tile leaves the buffer in SEG cycles, LP bits per
// cycle.  The column a bit belongs to follows from the rotation
// count at capture time, which the controller tracks.
// Timing: capture and shift act at the clock edge; hd is combinational.
module output_buffer #(
  parameter int Z  = 4095,
  parameter int LP = 8
) (
  input  logic         clk,
  input  logic         capture,
  input  logic         shift,
  input  logic [Z-1:0] signs,
  output logic [LP-1:0] hd
);
  localparam int SEG = (Z + 1) / LP;
  logic [Z-1:0] w;

  always_ff @(posedge clk) begin
    if (capture)    w <= signs;
    else if (shift) w <= {w[0], w[Z-1:1]};
  end

  always_comb
    for (int j = 0; j < LP; j++) hd[j] = w[SEG * j];
endmodule
