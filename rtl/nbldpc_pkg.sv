// nbldpc_pkg: shared constants and message types of the half-row
// modified two-extra-column trellis min-max (HR-mTEC-TMM) check node.
//
// The numbers are those of the (837, 726) nonbinary LDPC code over GF(32)
// with row weight dc = 27 and column weight dv = 4, quantized with wb = 6
// bits. A row of dc V2C messages is processed as two half rows: the first
// holds ceil(dc/2) = 14 messages, the second the remaining 13. Stored C2V
// values are kept with w = wb - 1 = 5 bits and deviations (positions inside
// a half row) with ceil(log2(dc/2)) = 4 bits, as in the storage count of the
// design. The code has M = N*dv/dc = 124 check nodes (rows). The GF(32)
// multiplication used by the variable node permutation is also here.
package nbldpc_pkg;

  localparam int unsigned GF_P    = 5;                     // bits per field element
  localparam int unsigned GF_Q    = 1 << GF_P;             // field size q = 32
  localparam int unsigned DC      = 27;                    // row weight
  localparam int unsigned DV      = 4;                     // column weight
  localparam int unsigned N_COLS  = 837;                   // code length
  localparam int unsigned M_ROWS  = N_COLS * DV / DC;      // 124 check nodes
  localparam int unsigned HALF    = (DC + 1) / 2;          // 14 lanes, first half row
  localparam int unsigned HALF2   = DC - HALF;             // 13 lanes, second half row
  localparam int unsigned WB      = 6;                     // V2C LLR width inside the CNU
  localparam int unsigned W       = WB - 1;                // stored C2V LLR width
  localparam int unsigned IDXW    = $clog2(HALF);          // 4-bit position inside a half row
  localparam int unsigned FIDXW   = IDXW + 1;              // {half, position} inside a row
  localparam int unsigned VNW     = WB + 2;                // signed width of unnormalized V2C values

  // Position code meaning "deviation lies in the other half row".
  localparam logic [IDXW-1:0] IDX_NONE = '1;

  typedef logic [GF_P-1:0] gf_t;
  typedef logic [WB-1:0]   llr_t;    // unsigned delta/normal-domain LLR
  typedef logic [W-1:0]    sllr_t;   // stored (saturated) LLR
  typedef logic [IDXW-1:0] idx_t;

  // One LLR vector per variable node: entry a is the reliability of symbol a.
  typedef llr_t [GF_Q-1:0] llr_vec_t;

  // Compressed C2V message of one half row (348 bits at the default sizes):
  // 4*w + 2*p + 2*(q-1)*ceil(log2(dc/2)) + p*ceil(dc/2).
  typedef struct packed {
    sllr_t              dq1_m1;      // Delta Q'  at a_m1 (smallest of the first extra column)
    sllr_t              dq1_m2;      // Delta Q'  at a_m2 (second smallest)
    sllr_t              dq2_m1;      // Delta Q'' at a_m1
    sllr_t              dq2_m2;      // Delta Q'' at a_m2
    gf_t                a_m1;
    gf_t                a_m2;
    idx_t [GF_Q-1:1]    d1;          // first deviation of Delta Q'(a), per nonzero a
    idx_t [GF_Q-1:1]    d2;          // second deviation of Delta Q'(a)
    gf_t  [HALF-1:0]    zs;          // z* = z xor beta, per lane of the half row
  } cmsg_t;

  localparam int unsigned CMSG_W = $bits(cmsg_t);

  // Signed a-posteriori / unnormalized V2C LLR of the variable node side.
  typedef logic signed [VNW-1:0] vllr_t;
  typedef vllr_t [GF_Q-1:0]      vllr_vec_t;

  // GF(32) arithmetic for the h_mn permutation. The field is built with the
  // primitive polynomial x^5 + x^2 + 1 (an implementation choice).
  localparam logic [GF_P:0] GF_POLY = 6'b100101;

  function automatic gf_t gf_mul(gf_t x, gf_t y);
    logic [GF_P:0] acc;
    logic [GF_P:0] sh;
    acc = '0;
    sh  = {1'b0, x};
    for (int b = 0; b < GF_P; b++) begin
      if (y[b]) acc ^= sh;
      sh = sh << 1;
      if (sh[GF_P]) sh ^= GF_POLY;
    end
    return acc[GF_P-1:0];
  endfunction

  // Multiplicative inverse by search (0 maps to 0).
  function automatic gf_t gf_inv(gf_t x);
    gf_t r;
    r = '0;
    for (int b = 1; b < GF_Q; b++) begin
      if (gf_mul(x, gf_t'(b)) == gf_t'(1)) r = gf_t'(b);
    end
    return r;
  endfunction

endpackage
