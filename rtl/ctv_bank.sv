// ctv_bank: one dual-port memory block of the CTV memory.
//
// The decoder keeps check-to-variable messages in compressed form: each tile
// stores, per lane, the sign bits of its edges (16 bits per check node), and
// a central set of banks stores per lane the shared part of the record (min
// index, minimum, 2-bit offset of the second minimum).  Each bank has one
// write port and one read port, as the dual-port SRAMs of the document do.
// This model is written as an array so that synthesis infers a memory; a
// foundry SRAM macro would replace it.
//
// Timing: synchronous write; synchronous read with the data in rdata one
// cycle after re.  Read and write never use the same address in the same
// cycle in this decoder (the schedule keeps them at least two rows apart).
// The contents are not reset: the controller marks data from before the first
// write of a codeword invalid.
module ctv_bank #(
  parameter int DEPTH = 512,
  parameter int WIDTH = 16
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
