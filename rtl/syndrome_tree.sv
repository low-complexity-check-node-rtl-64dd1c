// syndrome_tree: check node syndrome beta of a half row.
//
// beta is the GF(2^P) sum (bitwise XOR) of the hard-decision symbols z of the
// enabled lanes, computed by a balanced binary tree of adders, one level per
// halving. Lanes whose enable is low contribute zero, so the same tree serves
// the 14-lane first and the 13-lane second half row. The tree adder follows
// the check node description; the lane enables are this implementation's.
// Purely combinational.
module syndrome_tree #(
  parameter int unsigned P = 5,    // bits per field element
  parameter int unsigned N = 14    // lanes (ceil(dc/2))
) (
  input  logic [N-1:0][P-1:0] z,
  input  logic [N-1:0]        en,
  output logic [P-1:0]        beta
);
  localparam int unsigned L  = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned NP = 1 << L;

  logic [L:0][NP-1:0][P-1:0] t;

  for (genvar i = 0; i < NP; i++) begin : g_leaf
    if (i < N) begin : g_lane
      assign t[0][i] = en[i] ? z[i] : '0;
    end else begin : g_pad
      assign t[0][i] = '0;
    end
  end

  for (genvar l = 0; l < L; l++) begin : g_lvl
    for (genvar i = 0; i < NP; i++) begin : g_node
      if (i < (NP >> (l + 1))) begin : g_add
        assign t[l+1][i] = t[l][2*i] ^ t[l][2*i+1];
      end else begin : g_unused
        assign t[l+1][i] = '0;
      end
    end
  end

  assign beta = t[L][0];

endmodule
