// npu: node processing unit for one edge (one NPU of one lane of one tile).
//
// It forms the new check-to-variable (CTV) message of its edge from the row's
// compressed result and the old CTV message from the compressed record read
// back from the CTV memory, and delivers their difference, which the
// conditional updater adds to the a-posteriori LLR (Eq. 4.1-4.3, with the
// normalisation by alpha = 1/4 already applied by the min detectors):
//
//   min selector : |L_new| = flag_new ? min1 + dmin : min1
//                  sign(L_new) = (row sign product) XOR sign(Z of this edge)
//   old message  : |L_old| = flag_old ? min1_old + dmin_old : min1_old,
//                  sign from the tile's sign memory, zero on the first visit
//   difference   : delta = L_new - L_old (two's complement, -30..30)
//
// Both messages use the same approximated second minimum, so what is added now
// is exactly what will be subtracted on the next visit.  When the edge's APP
// LLR is saturated (|Z| = 63) all inputs are forced to zero, as the modified
// NPU of the document does, so a frozen variable node makes no switching
// activity and its difference is zero.
//
// Timing: inputs at pipeline stage 3; the two messages are registered (third
// pipeline register), converted and subtracted in stage 4 and registered again
// (fourth pipeline register).  delta_q is valid two cycles after the inputs.
// sign_new is combinational (stage 3) for the write to the sign memory.
module npu
  import ldpc_pkg::*;
(
  input  logic            clk,
  // row result of this check node (stage 3)
  input  cmag_t           min1,
  input  logic [QD-1:0]   dmin,
  input  logic            flag_new,    // this edge holds the row minimum
  input  logic            stot,        // product of the row's signs
  input  logic            z_sign,      // sign of this edge's APP LLR when read
  input  logic            z_sat,       // |APP LLR| was 63 when read
  // previous visit (stage 3)
  input  logic            old_valid,   // 0 on the first visit of the row
  input  cmag_t           min1_old,
  input  logic [QD-1:0]   dmin_old,
  input  logic            flag_old,
  input  logic            sign_old,
  output logic            sign_new,    // sign bit to store in the sign memory
  output delta_t          delta_q      // L_new - L_old, stage-5 aligned
);
  ctv_t l_new, l_old, l_new_q, l_old_q;
  cmag_t mag_new, mag_old;

  always_comb begin
    sign_new = stot ^ z_sign;
    mag_new  = flag_new ? min1 + cmag_t'(dmin) : min1;
    mag_old  = flag_old ? min1_old + cmag_t'(dmin_old) : min1_old;
    // input multiplexers of the modified NPU: zero when saturated
    l_new = z_sat ? '0 : {sign_new, mag_new};
    l_old = (z_sat || !old_valid) ? '0 : {sign_old, mag_old};
  end

  always_ff @(posedge clk) begin
    l_new_q <= l_new;
    l_old_q <= l_old;
    delta_q <= delta_t'(ctv_to_int(l_new_q)) - delta_t'(ctv_to_int(l_old_q));
  end
endmodule
