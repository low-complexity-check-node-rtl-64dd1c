// mtec_constructor: modified two-extra-column constructor.
//
// q-1 two-extra-column constructors (one per nonzero field element) build
// the extra columns Delta Q'(a) and Delta Q''(a) and the deviations d1(a),
// d2(a) from the final row minima. Only four LLR values are kept: a 2-min
// finder picks the two smallest entries of Delta Q' (values dq1_m1, dq1_m2 at
// field elements a_m1, a_m2) and the entries of Delta Q'' at those two
// elements are selected (dq2_m1, dq2_m2). The deviations of all q-1 elements
// are passed on. This structure follows the check node description.
// Purely combinational.
module mtec_constructor #(
  parameter int unsigned P     = 5,   // bits per field element
  parameter int unsigned WIDTH = 6,   // LLR width
  parameter int unsigned FW    = 5    // variable-node index width
) (
  input  logic [(1<<P)-1:1][WIDTH-1:0] m1,
  input  logic [(1<<P)-1:1][FW-1:0]    idx,
  output logic [WIDTH-1:0]             dq1_m1,
  output logic [WIDTH-1:0]             dq1_m2,
  output logic [WIDTH-1:0]             dq2_m1,
  output logic [WIDTH-1:0]             dq2_m2,
  output logic [P-1:0]                 a_m1,
  output logic [P-1:0]                 a_m2,
  output logic [(1<<P)-1:1][FW-1:0]    d1,
  output logic [(1<<P)-1:1][FW-1:0]    d2
);
  localparam int unsigned Q = 1 << P;

  logic [Q-1:1][WIDTH-1:0] dq1, dq2;

  for (genvar a = 1; a < Q; a++) begin : g_col
    tec_constructor #(.P(P), .A(a), .WIDTH(WIDTH), .FW(FW)) u_tec (
      .m1  (m1),
      .idx (idx),
      .dq1 (dq1[a]),
      .dq2 (dq2[a]),
      .d1  (d1[a]),
      .d2  (d2[a])
    );
  end

  min2_finder #(.P(P), .WIDTH(WIDTH)) u_min2 (
    .val (dq1),
    .m1  (dq1_m1),
    .m2  (dq1_m2),
    .a1  (a_m1),
    .a2  (a_m2)
  );

  assign dq2_m1 = dq2[a_m1];
  assign dq2_m2 = dq2[a_m2];

endmodule
