// final_min1: Final-min1 stage of the half-row check node.
//
// For every nonzero field element a it delivers the minimum m1_fin(a) of the
// delta trellis row a and the position I_fin(a) of the variable node that
// holds it, together with the syndrome beta used by the extra columns.
//  * First half row: the 1-min finder results of the 14 first-half lanes pass
//    straight through and are also written into registers (m1_1fin, I_1fin,
//    beta_1) on the clock edge where load_first is high.
//  * Second half row: the result is min(m1_1fin(a), m1_2(a)) with the index
//    of the winner, i.e. the minima of the whole row; beta is the sum of the
//    stored first-half syndrome and the second-half one.
// The output index is {half, position}: bit IW is 1 when the minimum lies in
// the second half row. The register bank and the merge follow the check
// node description; on equal values the first half wins, which is this
// implementation's choice.
// Combinational output, one register bank written on load_first; the stored
// values are cleared by reset.
module final_min1 #(
  parameter int unsigned P     = 5,   // bits per field element
  parameter int unsigned WIDTH = 6,   // LLR width
  parameter int unsigned IW    = 4    // position width inside a half row
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               load_first,   // store a first-half result
  input  logic                               second,       // current half is the second one
  input  logic [(1<<P)-1:1][WIDTH-1:0]       m1_cur,
  input  logic [(1<<P)-1:1][IW-1:0]          idx_cur,
  input  logic [P-1:0]                       beta_cur,
  output logic [(1<<P)-1:1][WIDTH-1:0]       m1_fin,
  output logic [(1<<P)-1:1][IW:0]            idx_fin,
  output logic [P-1:0]                       beta_fin
);
  localparam int unsigned Q = 1 << P;

  logic [Q-1:1][WIDTH-1:0] m1_1fin;
  logic [Q-1:1][IW-1:0]    idx_1fin;
  logic [P-1:0]            beta_1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m1_1fin  <= '1;
      idx_1fin <= '0;
      beta_1   <= '0;
    end else if (load_first) begin
      m1_1fin  <= m1_cur;
      idx_1fin <= idx_cur;
      beta_1   <= beta_cur;
    end
  end

  always_comb begin
    for (int a = 1; a < Q; a++) begin
      if (!second) begin
        m1_fin[a]  = m1_cur[a];
        idx_fin[a] = {1'b0, idx_cur[a]};
      end else if (m1_1fin[a] <= m1_cur[a]) begin
        m1_fin[a]  = m1_1fin[a];
        idx_fin[a] = {1'b0, idx_1fin[a]};
      end else begin
        m1_fin[a]  = m1_cur[a];
        idx_fin[a] = {1'b1, idx_cur[a]};
      end
    end
    beta_fin = second ? (beta_1 ^ beta_cur) : beta_cur;
  end

endmodule
