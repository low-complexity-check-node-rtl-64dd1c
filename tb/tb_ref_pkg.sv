// tb_ref_pkg: behavioural reference of the half-row trellis min-max check
// node, written as plain loops over field elements and lanes, for the
// testbenches. cnu_model keeps the first-half minima between the two calls
// of a row, like the hardware. Also counts how often each mechanism of the
// algorithm was exercised.
package tb_ref_pkg;
  import nbldpc_pkg::*;

  // variable node index inside a row: lane + 32 * half
  function automatic int full_id(int lane, bit second);
    return lane + (second ? 32 : 0);
  endfunction

  // reference extra column for one element a, from row minima and indexes
  function automatic void ref_tec(input int m1[GF_Q], input int id[GF_Q], input int a,
                                  output int dq1, output int dq2, output int d1, output int d2,
                                  output bit pair_won);
    int e, f, v;
    dq1 = m1[a]; d1 = id[a]; d2 = id[a]; pair_won = 0;
    for (e = 1; e < GF_Q; e++) begin
      f = e ^ a;
      if (f == 0 || e >= f) continue;
      if (id[e] == id[f]) continue;
      v = (m1[e] > m1[f]) ? m1[e] : m1[f];
      if (v < dq1) begin dq1 = v; d1 = id[e]; d2 = id[f]; pair_won = 1; end
    end
    dq2 = (1 << WB) - 1;
    if (id[a] != d1 && id[a] != d2 && m1[a] < dq2) dq2 = m1[a];
    for (e = 1; e < GF_Q; e++) begin
      f = e ^ a;
      if (f == 0 || e >= f) continue;
      if (id[e] == id[f]) continue;
      if (id[e] == d1 || id[e] == d2 || id[f] == d1 || id[f] == d2) continue;
      v = (m1[e] > m1[f]) ? m1[e] : m1[f];
      if (v < dq2) dq2 = v;
    end
  endfunction

  // two smallest of vals[1..q-1], lowest element first on ties
  function automatic void ref_min2(input int vals[GF_Q], output int a1, output int a2);
    a1 = 1;
    for (int a = 2; a < GF_Q; a++) if (vals[a] < vals[a1]) a1 = a;
    a2 = (a1 == 1) ? 2 : 1;
    for (int a = 1; a < GF_Q; a++) if (a != a1 && vals[a] < vals[a2]) a2 = a;
  endfunction

  function automatic int sat_w(int v);
    return (v > (1 << W) - 1) ? (1 << W) - 1 : v;
  endfunction

  // C2V vector of lane i from a compressed message, normal domain
  function automatic llr_vec_t ref_expand(cmsg_t m, int i);
    llr_vec_t r;
    for (int a = 0; a < GF_Q; a++) begin
      int x;
      bit on;
      x = a ^ int'(m.zs[i]);
      if (x == 0) begin
        r[a] = '0;
      end else begin
        on = (int'(m.d1[x]) == i) || (int'(m.d2[x]) == i);
        if (x == int'(m.a_m1)) r[a] = on ? llr_t'(m.dq2_m1) : llr_t'(m.dq1_m1);
        else                   r[a] = on ? llr_t'(m.dq2_m2) : llr_t'(m.dq1_m2);
      end
    end
    return r;
  endfunction

  // normalization of an unnormalized V2C vector
  function automatic void ref_normalize(input int qt[GF_Q], output llr_vec_t q, output gf_t z);
    int mn, zi;
    mn = qt[0]; zi = 0;
    for (int a = 1; a < GF_Q; a++) if (qt[a] < mn) begin mn = qt[a]; zi = a; end
    for (int a = 0; a < GF_Q; a++) begin
      int d;
      d = qt[a] - mn;
      q[a] = llr_t'((d > (1 << WB) - 1) ? (1 << WB) - 1 : d);
    end
    z = gf_t'(zi);
  endfunction

  // GF(32) product through discrete logarithms, x^5 + x^2 + 1
  function automatic int tgf_mul(int a, int b);
    int e[31], la, lb;
    if (a == 0 || b == 0) return 0;
    e[0] = 1;
    for (int k = 1; k < 31; k++) begin
      e[k] = e[k - 1] << 1;
      if (e[k] & 32) e[k] ^= 'b100101;
    end
    for (int k = 0; k < 31; k++) begin
      if (e[k] == a) la = k;
      if (e[k] == b) lb = k;
    end
    return e[(la + lb) % 31];
  endfunction

  class cnu_model;
    int m1_first[GF_Q];
    int id_first[GF_Q];
    int beta_first;
    // mechanism counters
    int n_first, n_second, n_min_from_first, n_min_from_second;
    int n_pair_won, n_single_won, n_dq2_none, n_dev_other_half, n_saturated;

    function new();
      beta_first = 0;
      foreach (m1_first[a]) begin m1_first[a] = (1 << WB) - 1; id_first[a] = 0; end
    endfunction

    function cmsg_t process(llr_vec_t q[HALF], gf_t z[HALF], bit second);
      int nl, beta;
      int m1[GF_Q], id[GF_Q];
      int dq1[GF_Q], dq2[GF_Q], d1[GF_Q], d2[GF_Q];
      int a1, a2;
      cmsg_t m;
      nl = second ? HALF2 : HALF;
      beta = 0;
      for (int i = 0; i < nl; i++) beta ^= int'(z[i]);
      m1[0] = 0; id[0] = 0;
      for (int a = 1; a < GF_Q; a++) begin
        m1[a] = 1 << 30;
        for (int i = 0; i < nl; i++) begin
          int d;
          d = int'(q[i][a ^ int'(z[i])]);
          if (d < m1[a]) begin m1[a] = d; id[a] = full_id(i, second); end
        end
      end
      if (!second) begin
        n_first++;
        m1_first = m1; id_first = id; beta_first = beta;
      end else begin
        n_second++;
        for (int a = 1; a < GF_Q; a++) begin
          if (m1_first[a] <= m1[a]) begin
            m1[a] = m1_first[a]; id[a] = id_first[a]; n_min_from_first++;
          end else n_min_from_second++;
        end
        beta ^= beta_first;
      end
      dq1[0] = 0; dq2[0] = 0; d1[0] = 0; d2[0] = 0;
      for (int a = 1; a < GF_Q; a++) begin
        bit pw;
        ref_tec(m1, id, a, dq1[a], dq2[a], d1[a], d2[a], pw);
        if (pw) n_pair_won++; else n_single_won++;
        if (dq2[a] == (1 << WB) - 1) n_dq2_none++;
      end
      ref_min2(dq1, a1, a2);
      m.dq1_m1 = sllr_t'(sat_w(dq1[a1]));
      m.dq1_m2 = sllr_t'(sat_w(dq1[a2]));
      m.dq2_m1 = sllr_t'(sat_w(dq2[a1]));
      m.dq2_m2 = sllr_t'(sat_w(dq2[a2]));
      if (dq2[a1] > (1 << W) - 1 || dq2[a2] > (1 << W) - 1 || dq1[a2] > (1 << W) - 1) n_saturated++;
      m.a_m1 = gf_t'(a1);
      m.a_m2 = gf_t'(a2);
      for (int a = 1; a < GF_Q; a++) begin
        bit h1, h2;
        h1 = d1[a] >= 32; h2 = d2[a] >= 32;
        m.d1[a] = (h1 == second) ? idx_t'(d1[a] % 32) : IDX_NONE;
        m.d2[a] = (h2 == second) ? idx_t'(d2[a] % 32) : IDX_NONE;
        if (h1 != second || h2 != second) n_dev_other_half++;
      end
      for (int i = 0; i < HALF; i++) m.zs[i] = (i < nl) ? gf_t'(int'(z[i]) ^ beta) : gf_t'(beta);
      return m;
    endfunction
  endclass

endpackage
