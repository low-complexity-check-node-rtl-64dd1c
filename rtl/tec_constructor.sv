// tec_constructor: two-extra-column constructor for one nonzero field
// element A (one of the q-1 identical constructors of the modified
// two-extra-column unit).
//
// From the row minima m1(x) and their variable-node indexes I(x) it forms the
// candidate paths of the extra column with at most two deviations:
//  * one deviation: m1(A) at I(A);
//  * two deviations: max(m1(e), m1(e ^ A)) at {I(e), I(e ^ A)}, for each of
//    the (q-2)/2 unordered pairs {e, e ^ A} of nonzero elements, allowed only
//    when the two minima belong to different variable nodes.
// dq1 = Delta Q'(A) is the smallest candidate, d1/d2 its deviations (equal for
// a single deviation). dq2 = Delta Q''(A) is the smallest candidate that uses
// neither d1 nor d2, so it is a valid value for the variable nodes that the
// first path uses; it is all ones when no such candidate exists. Ties go to
// the single deviation, then to the pair with the smaller e.
// One constructor per nonzero element, built from the row minima only,
// follows the check node description; the exact candidate set and the
// definition of Delta Q'' are this implementation's.
// Purely combinational.
module tec_constructor #(
  parameter int unsigned P     = 5,   // bits per field element
  parameter int unsigned A     = 1,   // field element of this extra-column entry (1 .. 2^P-1)
  parameter int unsigned WIDTH = 6,   // LLR width
  parameter int unsigned FW    = 5    // variable-node index width
) (
  input  logic [(1<<P)-1:1][WIDTH-1:0] m1,
  input  logic [(1<<P)-1:1][FW-1:0]    idx,
  output logic [WIDTH-1:0]             dq1,
  output logic [WIDTH-1:0]             dq2,
  output logic [FW-1:0]                d1,
  output logic [FW-1:0]                d2
);
  localparam int unsigned Q  = 1 << P;
  localparam int unsigned NC = Q / 2;      // 1 single + (Q-2)/2 pairs

  // k-th element e (counting from 0) with e < e ^ A: the smaller member of pair k.
  function automatic int unsigned pair_lo(int unsigned k);
    int unsigned cnt;
    cnt = 0;
    for (int unsigned e = 1; e < Q; e++) begin
      if (e < (e ^ A)) begin
        if (cnt == k) return e;
        cnt++;
      end
    end
    return 1;
  endfunction

  typedef struct packed {
    logic             ok;
    logic [WIDTH-1:0] v;
    logic [FW-1:0]    i1;
    logic [FW-1:0]    i2;
  } cand_t;

  cand_t [NC-1:0] cand;

  assign cand[0] = '{ok: 1'b1, v: m1[A], i1: idx[A], i2: idx[A]};

  for (genvar k = 0; k < NC - 1; k++) begin : g_pair
    localparam int unsigned E = pair_lo(k);
    localparam int unsigned F = E ^ A;
    assign cand[k+1] = '{ok: idx[E] != idx[F],
                         v:  (m1[E] > m1[F]) ? m1[E] : m1[F],
                         i1: idx[E],
                         i2: idx[F]};
  end

  always_comb begin
    // first extra column: best candidate
    dq1 = cand[0].v;
    d1  = cand[0].i1;
    d2  = cand[0].i2;
    for (int k = 1; k < NC; k++) begin
      if (cand[k].ok && cand[k].v < dq1) begin
        dq1 = cand[k].v;
        d1  = cand[k].i1;
        d2  = cand[k].i2;
      end
    end
    // second extra column: best candidate disjoint from the first path
    dq2 = '1;
    for (int k = 0; k < NC; k++) begin
      if (cand[k].ok &&
          cand[k].i1 != d1 && cand[k].i1 != d2 &&
          cand[k].i2 != d1 && cand[k].i2 != d2 &&
          cand[k].v < dq2) begin
        dq2 = cand[k].v;
      end
    end
  end

endmodule
