// symbol_decision: hard decision of one variable node, the output step of
// layered min-max decoding: c = argmin_a Q_n(a) over the signed a-posteriori
// LLRs (smaller LLR = more reliable). A linear compare chain; on equal values
// the smaller field element is chosen (this implementation's tie rule).
// Purely combinational.
module symbol_decision
  import nbldpc_pkg::*;
(
  input  vllr_vec_t q_post,
  output gf_t       sym
);

  vllr_t best;

  always_comb begin
    best = q_post[0];
    sym  = '0;
    for (int a = 1; a < GF_Q; a++) begin
      if ($signed(q_post[a]) < $signed(best)) begin
        best = q_post[a];
        sym  = gf_t'(a);
      end
    end
  end

endmodule
