// min1_finder: 1-min finder of one row of the delta trellis.
//
// Finds the smallest of N unsigned values and its position with a balanced
// comparator tree. Masked entries (valid low) never win; on equal values the
// lower position wins. If no entry is valid, found is low and min_val is all
// ones. One instance is used per nonzero field element (q-1 rows), each over
// the ceil(dc/2) lanes of a half row. The function and the instance count
// follow the check node description; the tree shape and the tie rule are
// this implementation's. Purely combinational.
module min1_finder #(
  parameter int unsigned N     = 14,  // inputs (lanes of a half row)
  parameter int unsigned WIDTH = 6,   // LLR width
  parameter int unsigned IW    = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0][WIDTH-1:0] val,
  input  logic [N-1:0]            valid,
  output logic [WIDTH-1:0]        min_val,
  output logic [IW-1:0]           min_idx,
  output logic                    found
);
  localparam int unsigned L  = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned NP = 1 << L;

  typedef struct packed {
    logic             v;
    logic [WIDTH-1:0] m;
    logic [IW-1:0]    i;
  } node_t;

  node_t [L:0][NP-1:0] t;

  for (genvar k = 0; k < NP; k++) begin : g_leaf
    if (k < N) begin : g_in
      assign t[0][k] = '{v: valid[k], m: val[k], i: IW'(k)};
    end else begin : g_pad
      assign t[0][k] = '{v: 1'b0, m: '1, i: '0};
    end
  end

  for (genvar l = 0; l < L; l++) begin : g_lvl
    for (genvar k = 0; k < NP; k++) begin : g_node
      if (k < (NP >> (l + 1))) begin : g_cmp
        node_t a, b;
        assign a = t[l][2*k];
        assign b = t[l][2*k+1];
        assign t[l+1][k] = (a.v && (!b.v || a.m <= b.m)) ? a : b;
      end else begin : g_unused
        assign t[l+1][k] = '{v: 1'b0, m: '1, i: '0};
      end
    end
  end

  assign found   = t[L][0].v;
  assign min_val = t[L][0].v ? t[L][0].m : '1;
  assign min_idx = t[L][0].i;

endmodule
