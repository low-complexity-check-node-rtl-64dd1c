// hr_mtec_cn_top: one check-node layer update of a layered min-max decoder
// for the (837, 726) nonbinary LDPC code over GF(32), built around the
// half-row HR-mTEC-TMM check node unit.
//
// Per half row of check node (row) in_row, the caller presents the
// a-posteriori LLR vectors Q_n of the half row's variable nodes and their
// nonzero parity-check coefficients h_mn (14 lanes; lane 13 is unused in the
// second half row). The block then performs, for every lane:
//   step 3   Qt(a) = Q_n(h*a) - R_old(a)      v2c_former, R_old read from
//                                              c2v_mem and expanded
//   step 4-5 normalization, hard decision z    v2c_normalizer
//   step 6   check node processing             hr_mtec_cnu
//   step 7   Q_n(h*a) = Q_mn(a) + R_new(a)     app_update
//   output   hard decision argmin_a Q_n(a)     symbol_decision
// and stores the new compressed C2V message at {row, half}, replacing the
// previous iteration's. Stored words not yet written expand to all-zero C2V
// messages (the R = 0 start of decoding).
//
// Pipeline (one half row per cycle, first half then second half of a row;
// no other first half between them):
//   t    inputs; c2v_mem read of {row, half} issued
//   t+1  stored message -> c2v_generator (old)
//   t+2  old C2V vectors ready: v2c_former, normalizer, CNU input
//   t+4  CNU output: written to c2v_mem, -> c2v_generator (new)
//   t+5  out_valid: updated Q_n and the new C2V vectors
// A row must not re-enter before its previous pass has been written
// (4 cycles). Keeping the a-posteriori memory, the parity-check matrix and
// the decoding schedule is left to the caller. The pipeline depth and delay
// line are this implementation's choice.
module hr_mtec_cn_top
  import nbldpc_pkg::*;
#(
  parameter int unsigned RW = $clog2(M_ROWS)   // row address width
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic                   in_second,
  input  logic [RW-1:0]          in_row,
  input  vllr_vec_t [HALF-1:0]   in_q_post,   // a-posteriori LLRs of the lanes
  input  gf_t       [HALF-1:0]   in_h,        // coefficients h_mn of the lanes
  output logic                   out_valid,
  output logic                   out_second,
  output logic [RW-1:0]          out_row,
  output vllr_vec_t [HALF-1:0]   out_q_post,  // updated a-posteriori LLRs
  output llr_vec_t  [HALF-1:0]   out_c2v,     // new C2V messages (normal domain)
  output gf_t       [HALF-1:0]   out_sym      // hard decisions argmin of the updated Q_n
);
  localparam int unsigned TAGW = RW + 1;

  typedef struct packed {
    logic                 valid;
    logic [TAGW-1:0]      tag;        // {row, second}
    vllr_vec_t [HALF-1:0] q_post;
    gf_t       [HALF-1:0] h;
  } in_stage_t;

  typedef struct packed {
    gf_t       [HALF-1:0] h;
    llr_vec_t  [HALF-1:0] q_norm;
  } vn_stage_t;

  // ---------------------------------------------------- t .. t+2: old C2V
  cmsg_t     old_msg;
  in_stage_t p1, p2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p1 <= '0;
      p2 <= '0;
    end else begin
      p1 <= '{valid: in_valid, tag: {in_row, in_second}, q_post: in_q_post, h: in_h};
      p2 <= p1;
    end
  end

  llr_vec_t [HALF-1:0] r_old;
  logic                old_valid;
  logic [TAGW-1:0]     old_tag;
  c2v_generator #(.TAGW(TAGW)) u_gen_old (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (p1.valid),
    .in_tag    (p1.tag),
    .in_msg    (old_msg),
    .out_valid (old_valid),
    .out_tag   (old_tag),
    .out_r     (r_old)
  );

  // ---------------------------------------------------- t+2: V2C messages
  vllr_vec_t [HALF-1:0] qt;
  llr_vec_t  [HALF-1:0] q_norm;
  gf_t       [HALF-1:0] z;

  for (genvar i = 0; i < HALF; i++) begin : g_vn
    v2c_former u_form (
      .q_post (p2.q_post[i]),
      .h      (p2.h[i]),
      .r_old  (r_old[i]),
      .qt     (qt[i])
    );
    v2c_normalizer u_norm (
      .qt (qt[i]),
      .q  (q_norm[i]),
      .z  (z[i])
    );
  end

  logic            cnu_valid, cnu_second;
  logic [TAGW-1:0] cnu_tag;
  cmsg_t           cnu_msg;

  hr_mtec_cnu #(.TAGW(TAGW)) u_cnu (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (p2.valid),
    .in_second  (p2.tag[0]),
    .in_tag     (p2.tag),
    .in_q       (q_norm),
    .in_z       (z),
    .out_valid  (cnu_valid),
    .out_second (cnu_second),
    .out_tag    (cnu_tag),
    .out_msg    (cnu_msg)
  );

  c2v_mem #(.DEPTH(2 * M_ROWS), .AW(TAGW)) u_mem (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (cnu_valid),
    .waddr (cnu_tag),
    .wdata (cnu_msg),
    .re    (in_valid),
    .raddr ({in_row, in_second}),
    .rdata (old_msg)
  );

  // normalized V2C messages wait for the new C2V messages (3 cycles);
  // only the valid bits are reset
  logic      [2:0] dl_valid;
  vn_stage_t [2:0] dl;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dl_valid <= '0;
    else        dl_valid <= {dl_valid[1:0], p2.valid};
  end

  always_ff @(posedge clk) begin
    dl <= {dl[1:0], vn_stage_t'{h: p2.h, q_norm: q_norm}};
  end

  // ---------------------------------------------------- t+5: update
  logic [TAGW-1:0] new_tag;
  c2v_generator #(.TAGW(TAGW)) u_gen_new (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (cnu_valid),
    .in_tag    (cnu_tag),
    .in_msg    (cnu_msg),
    .out_valid (out_valid),
    .out_tag   (new_tag),
    .out_r     (out_c2v)
  );
  assign out_row    = new_tag[TAGW-1:1];
  assign out_second = new_tag[0];

  for (genvar i = 0; i < HALF; i++) begin : g_upd
    app_update u_upd (
      .q_norm (dl[2].q_norm[i]),
      .r_new  (out_c2v[i]),
      .h      (dl[2].h[i]),
      .q_post (out_q_post[i])
    );
    symbol_decision u_dec (
      .q_post (out_q_post[i]),
      .sym    (out_sym[i])
    );
  end

  // ------------------------------------------------------------ assertions
  a_old_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    old_valid == p2.valid && (!old_valid || old_tag == p2.tag))
    else $error("stored C2V message not aligned with its V2C inputs");
  a_new_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid == dl_valid[2] && cnu_valid == dl_valid[1] && cnu_second == cnu_tag[0])
    else $error("new C2V message not aligned with its V2C inputs");

endmodule
