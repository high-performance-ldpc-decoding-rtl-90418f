// llr_lut: converts soft read levels from the flash into channel LLRs.
//
// A flash page read with N_s sensing voltages yields, per cell bit, one of up
// to 16 quantisation levels (4 bits).  The LLR of each level depends on the
// estimated threshold-voltage distributions, so the table is programmable:
// it holds one 16-entry table of 7-bit sign-magnitude LLRs for each read
// precision the system uses (4-, 7- and 16-level reads), written by the host
// through wr_*.  `sel` picks the table in use, NR lookups are made in
// parallel (one per LLR the decoder takes per cycle).  All entries reset to
// zero.  Lookups are combinational; writes act at the clock edge.
module llr_lut
  import ldpc_pkg::*;
#(
  parameter int NR   = 136,
  parameter int NSEL = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr_en,
  input  logic [$clog2(NSEL)-1:0] wr_sel,
  input  logic [3:0] wr_addr,
  input  app_t       wr_data,
  input  logic [$clog2(NSEL)-1:0] sel,
  input  logic [3:0] level [NR],
  output app_t       llr   [NR]
);
  app_t tab [NSEL][16];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NSEL; s++)
        for (int a = 0; a < 16; a++) tab[s][a] <= '0;
    end else if (wr_en) begin
      tab[wr_sel][wr_addr] <= wr_data;
    end
  end

  always_comb
    for (int r = 0; r < NR; r++) llr[r] = tab[sel][level[r]];
endmodule
