// hr_mtec_cnu: half-row modified two-extra-column trellis min-max (HR-mTEC-TMM)
// check node unit for GF(32), dc = 27.
//
// A row of dc V2C messages arrives as two half rows, one per cycle: the first
// half (in_second = 0) with ceil(dc/2) = 14 lanes, then the second half
// (in_second = 1) with the remaining 13 lanes in lanes 0..12 (lane 13 is
// ignored). Each lane carries a normalized V2C vector Q(a) (smallest entry 0)
// and its hard decision z.
//
// Stage 0 (combinational, registered at its end):
//   reordering networks    Delta Q_i(x) = Q_i(x ^ z_i), one per lane
//   syndrome tree          beta of the half row
//   q-1 1-min finders      m1(a), I(a) over the lanes, for every a != 0
//   Final-min1             first half: the half-row minima, also stored;
//                          second half: minima of the whole row (stored first
//                          half merged with the current half), full-row beta
// Stage 1 (combinational, registered into the output):
//   modified two-extra-column constructor: Delta Q'/Delta Q'' columns, the
//   two smallest Delta Q' values with their field elements, the two matching
//   Delta Q'' values and the deviations d1(a), d2(a).
// The output is the compressed C2V message of the half row (cmsg_t): the four
// LLR values saturated to w = wb - 1 bits, a_m1, a_m2, the deviations as
// positions inside the current half row (IDX_NONE when the deviation lies in
// the other half) and z* = z xor beta for each lane.
//
// So the first half row is decoded from the first half alone, and the second
// from the whole row, as the algorithm prescribes. Timing: one half row per
// cycle, out_valid two cycles after in_valid; in_tag travels with the data.
// A second half must follow its first half with no other first half between.
// Pipeline registers, widths of the tag and the saturation of stored values
// are choices of this implementation.
module hr_mtec_cnu
  import nbldpc_pkg::*;
#(
  parameter int unsigned TAGW = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic                  in_second,
  input  logic [TAGW-1:0]       in_tag,
  input  llr_vec_t [HALF-1:0]   in_q,
  input  gf_t      [HALF-1:0]   in_z,
  output logic                  out_valid,
  output logic                  out_second,
  output logic [TAGW-1:0]       out_tag,
  output cmsg_t                 out_msg
);

  // ---------------------------------------------------------------- stage 0
  logic [HALF-1:0] lane_en;
  always_comb begin
    for (int i = 0; i < HALF; i++) lane_en[i] = !in_second || (i < HALF2);
  end

  llr_vec_t [HALF-1:0] dq;
  for (genvar i = 0; i < HALF; i++) begin : g_n2d
    reorder_net #(.P(GF_P), .WIDTH(WB)) u_n2d (
      .ctrl (in_z[i]),
      .din  (in_q[i]),
      .dout (dq[i])
    );
  end

  gf_t beta_half;
  syndrome_tree #(.P(GF_P), .N(HALF)) u_syn (
    .z    (in_z),
    .en   (lane_en),
    .beta (beta_half)
  );

  llr_t [GF_Q-1:1] m1_cur;
  idx_t [GF_Q-1:1] idx_cur;
  for (genvar a = 1; a < GF_Q; a++) begin : g_min1
    llr_t [HALF-1:0] row;
    for (genvar i = 0; i < HALF; i++) begin : g_row
      assign row[i] = dq[i][a];
    end
    logic found_unused;
    min1_finder #(.N(HALF), .WIDTH(WB), .IW(IDXW)) u_min1 (
      .val     (row),
      .valid   (lane_en),
      .min_val (m1_cur[a]),
      .min_idx (idx_cur[a]),
      .found   (found_unused)
    );
  end

  llr_t [GF_Q-1:1]             m1_fin;
  logic [GF_Q-1:1][FIDXW-1:0]  idx_fin;
  gf_t                         beta_fin;
  final_min1 #(.P(GF_P), .WIDTH(WB), .IW(IDXW)) u_fmin (
    .clk        (clk),
    .rst_n      (rst_n),
    .load_first (in_valid && !in_second),
    .second     (in_second),
    .m1_cur     (m1_cur),
    .idx_cur    (idx_cur),
    .beta_cur   (beta_half),
    .m1_fin     (m1_fin),
    .idx_fin    (idx_fin),
    .beta_fin   (beta_fin)
  );

  // stage 0 -> 1 register
  logic                        s1_valid, s1_second;
  logic [TAGW-1:0]             s1_tag;
  llr_t [GF_Q-1:1]             s1_m1;
  logic [GF_Q-1:1][FIDXW-1:0]  s1_idx;
  gf_t                         s1_beta;
  gf_t  [HALF-1:0]             s1_z;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      s1_second <= 1'b0;
      s1_tag    <= '0;
      s1_m1     <= '1;
      s1_idx    <= '0;
      s1_beta   <= '0;
      s1_z      <= '0;
    end else begin
      s1_valid <= in_valid;
      if (in_valid) begin
        s1_second <= in_second;
        s1_tag    <= in_tag;
        s1_m1     <= m1_fin;
        s1_idx    <= idx_fin;
        s1_beta   <= beta_fin;
        for (int i = 0; i < HALF; i++) s1_z[i] <= lane_en[i] ? in_z[i] : '0;
      end
    end
  end

  // ---------------------------------------------------------------- stage 1
  llr_t                        c_dq1_m1, c_dq1_m2, c_dq2_m1, c_dq2_m2;
  gf_t                         c_a_m1, c_a_m2;
  logic [GF_Q-1:1][FIDXW-1:0]  c_d1, c_d2;

  mtec_constructor #(.P(GF_P), .WIDTH(WB), .FW(FIDXW)) u_mtec (
    .m1     (s1_m1),
    .idx    (s1_idx),
    .dq1_m1 (c_dq1_m1),
    .dq1_m2 (c_dq1_m2),
    .dq2_m1 (c_dq2_m1),
    .dq2_m2 (c_dq2_m2),
    .a_m1   (c_a_m1),
    .a_m2   (c_a_m2),
    .d1     (c_d1),
    .d2     (c_d2)
  );

  function automatic sllr_t sat_w(llr_t v);
    return (v > llr_t'({W{1'b1}})) ? '1 : v[W-1:0];
  endfunction

  // A deviation is kept as a position when it lies in the half being decoded.
  function automatic idx_t local_idx(logic [FIDXW-1:0] d, logic second);
    return (d[FIDXW-1] == second) ? d[IDXW-1:0] : IDX_NONE;
  endfunction

  cmsg_t msg;
  always_comb begin
    msg.dq1_m1 = sat_w(c_dq1_m1);
    msg.dq1_m2 = sat_w(c_dq1_m2);
    msg.dq2_m1 = sat_w(c_dq2_m1);
    msg.dq2_m2 = sat_w(c_dq2_m2);
    msg.a_m1   = c_a_m1;
    msg.a_m2   = c_a_m2;
    for (int a = 1; a < GF_Q; a++) begin
      msg.d1[a] = local_idx(c_d1[a], s1_second);
      msg.d2[a] = local_idx(c_d2[a], s1_second);
    end
    for (int i = 0; i < HALF; i++) msg.zs[i] = s1_z[i] ^ s1_beta;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_second <= 1'b0;
      out_tag    <= '0;
      out_msg    <= '0;
    end else begin
      out_valid <= s1_valid;
      if (s1_valid) begin
        out_second <= s1_second;
        out_tag    <= s1_tag;
        out_msg    <= msg;
      end
    end
  end

  // ------------------------------------------------------------ assertions
  logic first_pending;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        first_pending <= 1'b0;
    else if (in_valid) first_pending <= !in_second;
  end

  a_second_after_first: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && in_second |-> first_pending)
    else $error("second half row without a preceding first half row");

endmodule
