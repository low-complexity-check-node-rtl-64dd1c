// min2_finder: 2-min finder of the first extra column.
//
// Scans the q-1 values Delta Q'(a), a = 1 .. q-1, and returns the smallest
// (m1 at field element a1) and the second smallest (m2 at a2, a2 != a1). On
// equal values the smaller field element is taken first. The function
// follows the check node description; the compare-and-insert chain and the
// tie rule are this implementation's. Purely combinational.
module min2_finder #(
  parameter int unsigned P     = 5,   // bits per field element
  parameter int unsigned WIDTH = 6    // LLR width
) (
  input  logic [(1<<P)-1:1][WIDTH-1:0] val,
  output logic [WIDTH-1:0]             m1,
  output logic [WIDTH-1:0]             m2,
  output logic [P-1:0]                 a1,
  output logic [P-1:0]                 a2
);
  localparam int unsigned Q = 1 << P;

  always_comb begin
    m1 = val[1];
    a1 = P'(1);
    m2 = val[2];
    a2 = P'(2);
    if (val[2] < val[1]) begin
      m1 = val[2];
      a1 = P'(2);
      m2 = val[1];
      a2 = P'(1);
    end
    for (int a = 3; a < Q; a++) begin
      if (val[a] < m1) begin
        m2 = m1;
        a2 = a1;
        m1 = val[a];
        a1 = P'(a);
      end else if (val[a] < m2) begin
        m2 = val[a];
        a2 = P'(a);
      end
    end
  end

endmodule
