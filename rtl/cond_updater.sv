// cond_updater: the conditional variable-node updater of the decoder.
//
// It sits at a write position of the APP shift register.  It takes the current
// a-posteriori LLR found there (7-bit sign-magnitude) and the K CTV
// differences of the edges that read this variable node in the same cycle,
// and produces the new LLR (Eq. 4.2, and Eq. 4.3 when several check nodes of
// the parallel schedule touch the node at once):
//
//   |Z| = 63          : Z unchanged (a saturated node is frozen)
//   otherwise         : Z + sum(delta), saturated to +-63 after the sum,
//                       returned in sign-magnitude with +0 for zero
//
// The sum is formed in a widened two's-complement word, so the saturation is
// applied once, after all differences are added, as the document requires.
// `flip` reports a change of the hard decision (sign bit), which the
// controller uses for its convergence test.  Purely combinational.
module cond_updater
  import ldpc_pkg::*;
#(
  parameter int K = 1
) (
  input  logic   en,
  input  app_t   z_cur,
  input  delta_t delta [K],
  output app_t   z_new,
  output logic   wen,       // write the new value back
  output logic   flip       // written value changes the sign
);
  localparam int SW = MAGW + 2 + $clog2(K + 1) + 1;
  logic signed [SW-1:0] sum;
  logic [SW-1:0]        absv;
  logic                 frozen;

  always_comb begin
    frozen = (z_cur[MAGW-1:0] == MAGW'((1 << MAGW) - 1));
    sum = SW'(app_to_int(z_cur));
    for (int k = 0; k < K; k++) sum += SW'(delta[k]);
    absv = sum[SW-1] ? -sum : sum;
    if (sum > SW'((1 << MAGW) - 1))
      z_new = {1'b0, {MAGW{1'b1}}};
    else if (sum < -SW'((1 << MAGW) - 1))
      z_new = {1'b1, {MAGW{1'b1}}};
    else
      z_new = {sum[SW-1], absv[MAGW-1:0]};
    wen  = en && !frozen;
    flip = wen && (z_new[Q-1] != z_cur[Q-1]);
  end
endmodule
