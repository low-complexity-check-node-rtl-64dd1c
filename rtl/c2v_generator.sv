// c2v_generator: expands a compressed C2V message of one half row into the
// C2V LLR vectors R(a) of its variable nodes (the delta-to-normal side of the
// check node, done in variable node processing).
//
// For lane i and nonzero delta-domain element x:
//   the lane is on the path of Delta Q'(x) (d1(x) == i or d2(x) == i)
//       -> Delta Q'' value, otherwise the Delta Q' value;
//   x == a_m1 -> the m1 pair of values, any other x -> the m2 pair.
// Delta R(0) = 0. Only four LLR values are therefore needed; giving the
// second-smallest value to every element other than a_m1 is this
// implementation's reading of how the four values update all q-1 entries;
// a_m2 itself is therefore not needed here (its bits stay unused).
// The delta vector is then reordered with z* = z xor beta of the lane,
// R(a) = Delta R(a ^ z*), by one reordering network per lane.
// Timing: registered output, out_valid one cycle after in_valid; in_tag
// travels with the data. Lanes beyond the half row's size carry don't-care
// vectors.
module c2v_generator
  import nbldpc_pkg::*;
#(
  parameter int unsigned TAGW = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [TAGW-1:0]       in_tag,
  input  cmsg_t                 in_msg,
  output logic                  out_valid,
  output logic [TAGW-1:0]       out_tag,
  output llr_vec_t [HALF-1:0]   out_r
);

  llr_vec_t [HALF-1:0] dr, r;

  always_comb begin
    for (int i = 0; i < HALF; i++) begin
      dr[i][0] = '0;
      for (int x = 1; x < GF_Q; x++) begin
        logic on_path, is_m1;
        on_path = (in_msg.d1[x] == idx_t'(i)) || (in_msg.d2[x] == idx_t'(i));
        is_m1   = (in_msg.a_m1 == gf_t'(x));
        unique case ({on_path, is_m1})
          2'b00:   dr[i][x] = llr_t'(in_msg.dq1_m2);
          2'b01:   dr[i][x] = llr_t'(in_msg.dq1_m1);
          2'b10:   dr[i][x] = llr_t'(in_msg.dq2_m2);
          default: dr[i][x] = llr_t'(in_msg.dq2_m1);
        endcase
      end
    end
  end

  for (genvar i = 0; i < HALF; i++) begin : g_d2n
    reorder_net #(.P(GF_P), .WIDTH(WB)) u_d2n (
      .ctrl (in_msg.zs[i]),
      .din  (dr[i]),
      .dout (r[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tag   <= '0;
      out_r     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_tag <= in_tag;
        out_r   <= r;
      end
    end
  end

endmodule
