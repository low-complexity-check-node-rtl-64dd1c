// v2c_former: step 3 of the layered min-max decoding of one variable node,
//   Qt(a) = Q_n(h_mn * a) - R_old(a),
// i.e. the a-posteriori vector permuted by the parity-check coefficient
// minus the C2V message this check node sent in the previous iteration.
// The difference saturates to the signed VNW-bit range (an implementation
// choice). Normalization (steps 4-5) follows in v2c_normalizer.
// Purely combinational.
module v2c_former
  import nbldpc_pkg::*;
(
  input  vllr_vec_t q_post,   // a-posteriori LLRs Q_n
  input  gf_t       h,        // nonzero coefficient h_mn
  input  llr_vec_t  r_old,    // previous C2V message R_mn
  output vllr_vec_t qt        // unnormalized V2C message
);

  vllr_vec_t qp;

  gf_permuter #(.WIDTH(VNW)) u_perm (
    .c    (h),
    .din  (q_post),
    .dout (qp)
  );

  localparam int signed VMAX = (1 <<< (VNW - 1)) - 1;
  localparam int signed VMIN = -(1 <<< (VNW - 1));

  always_comb begin
    for (int a = 0; a < GF_Q; a++) begin
      int signed d;
      d = int'(qp[a]) - int'({1'b0, r_old[a]});
      if (d > VMAX)      qt[a] = vllr_t'(VMAX);
      else if (d < VMIN) qt[a] = vllr_t'(VMIN);
      else               qt[a] = vllr_t'(d);
    end
  end

endmodule
