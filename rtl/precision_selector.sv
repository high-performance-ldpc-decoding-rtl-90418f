// precision_selector: iteration-count based choice of the flash read precision.
//
// Soft reads cost sensing operations and transfer energy in the flash, while
// low-precision reads make the decoder iterate longer.  This unit watches the
// iteration count of every decoded page and moves between 4-, 7- and 16-level
// reads before decoding starts to fail:
//   4-level : count >= 2, REPEAT times in a row           -> 7-level
//   7-level : count == 1, REPEAT times in a row           -> 4-level
//             count >= 3, REPEAT times in a row           -> 16-level
//   16-level: count <= 2, REPEAT times in a row           -> 7-level
//             count >= 4, REPEAT times in a row           -> request channel
//                                                            estimation (pulse)
// A failed decoding counts as the iteration limit.  The thresholds are the
// document's; how many repetitions make "repeatedly" is not given, and
// REPEAT = 2 is this design's choice.  Run counters restart after every
// change of precision.  Inputs are sampled when `valid` is high (one pulse per
// decoded page); prec changes one cycle later.
module precision_selector #(
  parameter int IT_MAX = 8,
  parameter int REPEAT = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic valid,
  input  logic success,
  input  logic [$clog2(IT_MAX+1)-1:0] iter_count,
  output logic [1:0] prec,       // 0: 4-level, 1: 7-level, 2: 16-level
  output logic est_req
);
  localparam int IW = $clog2(IT_MAX + 1);
  localparam int RW = $clog2(REPEAT + 1);
  localparam logic [1:0] P4 = 2'd0, P7 = 2'd1, P16 = 2'd2;

  logic [RW-1:0] up_run, dn_run;
  logic [IW-1:0] it;
  logic up_hit, dn_hit;

  always_comb begin
    it = success ? iter_count : IW'(IT_MAX);
    up_hit = 1'b0; dn_hit = 1'b0;
    case (prec)
      P4:      begin up_hit = (it >= IW'(2)); dn_hit = 1'b0;           end
      P7:      begin up_hit = (it >= IW'(3)); dn_hit = (it == IW'(1)); end
      default: begin up_hit = (it >= IW'(4)); dn_hit = (it <= IW'(2)); end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prec <= P4; up_run <= '0; dn_run <= '0; est_req <= 1'b0;
    end else begin
      est_req <= 1'b0;
      if (valid) begin
        up_run <= up_hit ? up_run + 1'b1 : '0;
        dn_run <= dn_hit ? dn_run + 1'b1 : '0;
        if (up_hit && up_run == RW'(REPEAT - 1)) begin
          up_run <= '0; dn_run <= '0;
          if (prec == P16) est_req <= 1'b1;
          else             prec <= prec + 1'b1;
        end else if (dn_hit && dn_run == RW'(REPEAT - 1)) begin
          up_run <= '0; dn_run <= '0;
          prec <= prec - 1'b1;
        end
      end
    end
  end
endmodule
