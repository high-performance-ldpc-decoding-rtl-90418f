// dec_controller: phase sequencing and schedule counters of the LDPC decoder.
//
// Phases of one codeword (cycles for the default code, SEG = 512):
//   LOAD   SEG cycles   channel LLRs enter the APP rings, LP per tile per cycle
//   DECODE SEG / iter.  lane j processes row (T + SEG*j) mod Z at rotation T;
//                       one "iteration" (window) is SEG consecutive cycles and
//                       covers every row once (one row twice)
//   CHECK  SEG cycles   only if the iteration limit is reached unconverged:
//                       all rows are re-read without updates to test parity
//   OUT    SEG cycles   hard decisions leave the output buffers
// The worst case is therefore (IT_MAX + 2) windows plus the output phase,
// matching the document's throughput formula T = N f / (ceil(M/Lp)(It + 2)).
//
// Stage tags travel with every read through the five-stage pipeline
// (S1 read, S3 row result, S5 write).  The controller provides the CTV memory
// addresses (write at S3 at address A mod SEG of the producing read; lane j
// reads the bank of lane j+1 at A mod SEG, lane LP-1 reads bank 0 at
// (A+1) mod SEG, because the row lane j handles now was handled SEG cycles
// ago by lane j+1, or SEG-1 cycles ago by lane 0) and marks stored messages
// invalid until they were written during this codeword.
//
// Early termination: a window has converged when every row it read had even
// parity and no write from the window's first read until its last write
// changed a sign bit; then every read saw the same hard-decision vector, so
// that vector is a codeword.  The test is evaluated when the window's last
// item writes (4 cycles after its last read), the output buffer captures the
// signs in the next cycle, and on success the reads already issued for the
// next window are squashed.  The convergence rule and this bookkeeping are
// this design's; the document only names the parity-check phase.
module dec_controller
  import ldpc_pkg::*;
#(
  parameter int Z      = 4095,
  parameter int LP     = 8,
  parameter int IT_MAX = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic busy,
  // load
  output logic load_en,
  output logic [$clog2((Z+1)/LP)-1:0] load_tau,
  output logic shift_en,
  // pipeline, stage 1
  output logic ctv_re,
  output logic [$clog2((Z+1)/LP)-1:0] raddr_n,
  output logic [$clog2((Z+1)/LP)-1:0] raddr_w,
  // stage 3
  output logic ctv_we,
  output logic [$clog2((Z+1)/LP)-1:0] waddr,
  output logic old_valid [LP],
  input  logic par_any,          // some lane's row at S3 has odd parity
  // stage 5
  output logic wr_en,
  input  logic flip_any,         // some write at S5 changes a sign
  // output buffer
  output logic w_capture,
  output logic w_shift,
  output logic out_valid,
  output logic [$clog2(Z)-1:0] out_col0,   // column of lane 0's bit
  output logic out_last,                   // last output cycle (lane LP-1 idle)
  // result
  output logic done,
  output logic success,
  output logic [$clog2(IT_MAX+1)-1:0] iter_count,
  output logic ev_early,         // converged before the iteration limit
  output logic ev_check          // the parity-check phase ran
);
  localparam int SEG = (Z + 1) / LP;
  localparam int AW  = $clog2(SEG);
  localparam int ZW  = $clog2(Z);
  localparam int IW  = $clog2(IT_MAX + 1);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_DECODE, S_WAIT, S_CHECK, S_CWAIT, S_CAP, S_OUT} state_e;
  state_e state;

  typedef struct packed {
    logic          valid;
    logic          upd;      // decode item (writes) or check item
    logic          tag;      // window parity
    logic          first;
    logic          last;
    logic [AW-1:0] addr;
    logic          oldv_n;   // stored messages valid for lanes 0..LP-2
    logic          oldv_w;   // ... for lane LP-1
  } item_t;

  item_t s1, s2, s3, s4, s5;

  logic [AW-1:0] cnt;         // cycle within load / window / output
  logic [AW-1:0] acnt;        // A mod SEG
  logic [ZW-1:0] trot;        // rotations since the start of DECODE, mod Z
  logic [ZW-1:0] o_w;         // rotation at capture time
  logic [AW:0]   abs_cnt;     // decode cycles, saturating at SEG
  logic          wtag;
  logic [IW-1:0] wins;        // windows started
  logic [IW-1:0] evals;       // decode windows evaluated
  logic          par_acc [2];
  logic          flip_acc [2];
  logic          conv, eval_dec, eval_chk;

  // ---- stage-1 item
  always_comb begin
    s1 = '0;
    s1.addr   = acnt;
    s1.oldv_n = (abs_cnt >= (AW+1)'(SEG));
    s1.oldv_w = (abs_cnt >= (AW+1)'(SEG - 1));
    s1.tag    = wtag;
    s1.first  = (cnt == '0);
    s1.last   = (cnt == AW'(SEG - 1));
    if (state == S_DECODE) begin s1.valid = 1'b1; s1.upd = 1'b1; end
    if (state == S_CHECK)  begin s1.valid = 1'b1; s1.upd = 1'b0; end
  end

  assign ctv_re  = s1.valid && s1.upd;
  assign raddr_n = acnt;
  assign raddr_w = (acnt == AW'(SEG - 1)) ? '0 : acnt + 1'b1;
  assign ctv_we  = s3.valid && s3.upd;
  assign waddr   = s3.addr;
  always_comb
    for (int j = 0; j < LP; j++) old_valid[j] = (j == LP - 1) ? s3.oldv_w : s3.oldv_n;
  assign wr_en   = s5.valid && s5.upd;

  // ---- convergence test at the last write of a window
  assign conv     = !par_acc[s5.tag] && !(flip_acc[s5.tag] || flip_any);
  assign eval_dec = s5.valid && s5.last && s5.upd;
  assign eval_chk = s5.valid && s5.last && !s5.upd;

  assign busy      = (state != S_IDLE);
  assign shift_en  = busy;
  assign load_en   = (state == S_LOAD);
  assign load_tau  = cnt;
  assign w_shift   = (state == S_OUT);
  assign out_valid = (state == S_OUT);
  assign out_last  = (state == S_OUT) && (cnt == AW'(SEG - 1));
  always_comb begin
    logic [ZW:0] c;
    c = {1'b0, o_w} + (ZW+1)'(cnt);
    out_col0 = (c >= (ZW+1)'(Z)) ? ZW'(c - (ZW+1)'(Z)) : c[ZW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt <= '0; acnt <= '0; trot <= '0; o_w <= '0; abs_cnt <= '0;
      wtag <= 1'b0; wins <= '0; evals <= '0;
      s2 <= '0; s3 <= '0; s4 <= '0; s5 <= '0;
      par_acc[0] <= 1'b0; par_acc[1] <= 1'b0;
      flip_acc[0] <= 1'b0; flip_acc[1] <= 1'b0;
      w_capture <= 1'b0; done <= 1'b0; success <= 1'b0; iter_count <= '0;
      ev_early <= 1'b0; ev_check <= 1'b0;
    end else begin
      done      <= 1'b0;
      w_capture <= 1'b0;
      // pipeline of tags
      s2 <= s1; s3 <= s2; s4 <= s3; s5 <= s4;
      // rotation count
      if (state == S_LOAD) trot <= '0;
      else if (busy) trot <= (trot == ZW'(Z - 1)) ? '0 : trot + 1'b1;
      // parity accumulation at S3
      if (s3.valid) begin
        if (s3.first) par_acc[s3.tag] <= par_any;
        else          par_acc[s3.tag] <= par_acc[s3.tag] | par_any;
      end
      // sign-flip accumulation over write cycles
      for (int k = 0; k < 2; k++) begin
        if (s1.valid && s1.first && s1.tag == k[0]) flip_acc[k] <= flip_any;
        else                                        flip_acc[k] <= flip_acc[k] | flip_any;
      end

      case (state)
        S_IDLE: if (start) begin
          state <= S_LOAD; cnt <= '0;
          success <= 1'b0; ev_early <= 1'b0; ev_check <= 1'b0;
        end
        S_LOAD: begin
          cnt <= cnt + 1'b1;
          if (cnt == AW'(SEG - 1)) begin
            state <= S_DECODE; cnt <= '0; acnt <= '0; abs_cnt <= '0;
            wtag <= 1'b0; wins <= '0; evals <= '0;
          end
        end
        S_DECODE, S_CHECK: begin
          cnt  <= cnt + 1'b1;
          acnt <= acnt + 1'b1;
          if (abs_cnt != (AW+1)'(SEG)) abs_cnt <= abs_cnt + 1'b1;
          if (cnt == AW'(SEG - 1)) begin
            cnt  <= '0;
            wtag <= ~wtag;
            if (state == S_DECODE) begin
              wins <= wins + 1'b1;
              if (wins + 1'b1 == IW'(IT_MAX)) state <= S_WAIT;
            end else begin
              state <= S_CWAIT;
            end
          end
        end
        S_CAP: begin
          state <= S_OUT; cnt <= '0;
        end
        S_OUT: begin
          cnt <= cnt + 1'b1;
          if (cnt == AW'(SEG - 1)) begin
            state <= S_IDLE; done <= 1'b1;
          end
        end
        default: ;
      endcase

      // evaluation of a decode window (overrides the transitions above)
      if (eval_dec) begin
        evals      <= evals + 1'b1;
        iter_count <= evals + 1'b1;
        w_capture  <= 1'b1;
        o_w        <= (trot == ZW'(Z - 1)) ? '0 : trot + 1'b1;
        if (conv) begin
          success <= 1'b1;
          ev_early <= (evals + 1'b1 != IW'(IT_MAX));
          state <= S_CAP;
          s2.valid <= 1'b0; s3.valid <= 1'b0; s4.valid <= 1'b0; s5.valid <= 1'b0;
        end else if (state == S_WAIT) begin
          state <= S_CHECK; cnt <= '0; ev_check <= 1'b1;
        end
      end
      if (eval_chk) begin
        success <= conv;
        state   <= S_CAP;
      end
    end
  end

  initial assert (LP * SEG == Z + 1) else $error("dec_controller: Z+1 must be a multiple of LP");
endmodule
