// app_update: step 7 of the layered min-max decoding of one variable node,
//   Q_n(h_mn * a) = Q_mn(a) + R_new(a),
// the normalized V2C message plus the new C2V message, permuted back by the
// inverse of h_mn (the exact inverse of the permutation of v2c_former).
// The sum of a wb-bit and a wb-bit unsigned value (at most 126) always fits
// the signed VNW-bit a-posteriori format, so no saturation is needed and the
// sign bit of q_post is always 0. Purely combinational.
module app_update
  import nbldpc_pkg::*;
(
  input  llr_vec_t  q_norm,   // normalized V2C message Q_mn
  input  llr_vec_t  r_new,    // new C2V message R_mn
  input  gf_t       h,        // nonzero coefficient h_mn
  output vllr_vec_t q_post    // updated a-posteriori LLRs Q_n
);

  vllr_vec_t s;

  always_comb begin
    for (int a = 0; a < GF_Q; a++) begin
      s[a] = vllr_t'(q_norm[a]) + vllr_t'(r_new[a]);
    end
  end

  gf_permuter #(.WIDTH(VNW)) u_perm (
    .c    (gf_inv(h)),
    .din  (s),
    .dout (q_post)
  );

endmodule
