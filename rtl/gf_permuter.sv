// gf_permuter: relabels an LLR vector by a GF(2^P) multiplication,
// dout[a] = din[c * a], the permutation by a nonzero parity-check
// coefficient h_mn of the layered decoder (c = h for the V2C side, c = h^-1
// for the way back). Entry 0 stays in place. Each output is a q:1
// multiplexer whose select, c * a, is formed by a constant-by-variable GF
// multiplier. Purely combinational. The field polynomial is the package's.
module gf_permuter
  import nbldpc_pkg::*;
#(
  parameter int unsigned WIDTH = VNW
) (
  input  gf_t                       c,
  input  logic [GF_Q-1:0][WIDTH-1:0] din,
  output logic [GF_Q-1:0][WIDTH-1:0] dout
);

  always_comb begin
    for (int a = 0; a < GF_Q; a++) begin
      dout[a] = din[gf_mul(c, gf_t'(a))];
    end
  end

endmodule
