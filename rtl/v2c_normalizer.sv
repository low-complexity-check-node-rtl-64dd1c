// v2c_normalizer: normalization of one V2C message vector.
//
// Input: the unnormalized V2C LLRs Qt(a) = Q(a) - R(a), signed, one per field
// element. The unit finds the smallest entry and its element z (the hard
// decision; the smaller element on ties), and outputs Q(a) = Qt(a) - min,
// so that the most reliable symbol has LLR 0, saturated to the unsigned
// wb-bit range of the check node. The input width (wb + 2 bits, signed) and
// the saturation are choices of this implementation. Purely combinational.
module v2c_normalizer
  import nbldpc_pkg::*;
(
  input  logic signed [GF_Q-1:0][VNW-1:0] qt,
  output llr_vec_t                        q,
  output gf_t                             z
);

  logic signed [VNW-1:0] mn;
  logic [VNW:0]          diff;

  always_comb begin
    mn = qt[0];
    z  = '0;
    for (int a = 1; a < GF_Q; a++) begin
      if ($signed(qt[a]) < $signed(mn)) begin
        mn = qt[a];
        z  = gf_t'(a);
      end
    end
    for (int a = 0; a < GF_Q; a++) begin
      diff = {qt[a][VNW-1], qt[a]} - {mn[VNW-1], mn};
      q[a] = (diff > (VNW+1)'({WB{1'b1}})) ? '1 : diff[WB-1:0];
    end
  end

endmodule
