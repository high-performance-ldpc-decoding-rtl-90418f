// ldpc_flash_ecc: soft-decision error correction for one NAND flash page.
//
// The flash delivers, for every bit of the (68254, 65536) EG-LDPC codeword, a
// 4-bit read level; llr_lut turns it into a 7-bit channel LLR using the table
// of the read precision in use, ldpc_decoder decodes the page, and
// precision_selector uses the decoder's iteration count to choose the read
// precision (4, 7 or 16 levels) of the next page, asking for a channel
// estimate when even 16-level reads need many iterations.
//
// Interface: program the LLR tables through lut_*; pulse `start`; while
// load_en is high supply level[t][j] for codeword bit t*Z + load_col(j,
// load_tau) (see ldpc_decoder); read hard decisions from hd while out_valid;
// after `done`, success and iter_count describe the page and prec is the
// precision to use for the next read.
module ldpc_flash_ecc
  import ldpc_pkg::*;
#(
  parameter code_e CODE    = EG_4095,
  parameter int    LP      = 8,
  parameter int    IT_MAX  = 8,
  parameter int    N_SHORT = 1361,
  parameter int    REPEAT  = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic lut_wr_en,
  input  logic [1:0] lut_wr_sel,
  input  logic [3:0] lut_wr_addr,
  input  app_t       lut_wr_data,
  input  logic start,
  output logic busy,
  output logic load_en,
  output logic [$clog2((code_z(CODE)+1)/LP)-1:0] load_tau,
  input  logic [3:0] level [code_nt(CODE)][LP],
  output logic out_valid,
  output logic out_last,
  output logic [$clog2(code_z(CODE))-1:0] out_col0,
  output logic [LP-1:0] hd [code_nt(CODE)],
  output logic done,
  output logic success,
  output logic [$clog2(IT_MAX+1)-1:0] iter_count,
  output logic [1:0] prec,
  output logic est_req,
  output logic ev_early,
  output logic ev_check,
  output logic [15:0] n_frozen [code_nt(CODE)]
);
  localparam int NT = code_nt(CODE);

  logic [3:0] lv [NT*LP];
  app_t       lr [NT*LP];
  app_t       llr_in [NT][LP];

  always_comb
    for (int t = 0; t < NT; t++)
      for (int j = 0; j < LP; j++) begin
        lv[t*LP + j]  = level[t][j];
        llr_in[t][j]  = lr[t*LP + j];
      end

  llr_lut #(.NR(NT*LP), .NSEL(3)) u_lut (
    .clk, .rst_n, .wr_en(lut_wr_en), .wr_sel(lut_wr_sel), .wr_addr(lut_wr_addr),
    .wr_data(lut_wr_data), .sel(prec), .level(lv), .llr(lr)
  );

  ldpc_decoder #(.CODE(CODE), .LP(LP), .IT_MAX(IT_MAX), .N_SHORT(N_SHORT)) u_dec (
    .clk, .rst_n, .start, .busy, .load_en, .load_tau, .llr_in,
    .out_valid, .out_last, .out_col0, .hd, .done, .success, .iter_count,
    .ev_early, .ev_check, .n_frozen
  );

  precision_selector #(.IT_MAX(IT_MAX), .REPEAT(REPEAT)) u_psel (
    .clk, .rst_n, .valid(done), .success, .iter_count, .prec, .est_req
  );
endmodule
