// tb_hr_mtec_cn_top: end-to-end test of the layered check-node update at the
// default sizes (GF(32), dc = 27, 124 rows), three decoding iterations.
// The testbench plays the role of the a-posteriori memory: every row owns 27
// variable nodes with random nonzero coefficients h (no parity-check matrix
// is involved). Half rows are streamed one per cycle, with occasional idle
// cycles. For each half row the expected result is computed independently:
//   GF(32) products from log/antilog tables, Qt = Q(h*a) - R_old(a) with
//   R_old from the previously expected compressed message, normalization,
//   the reference check node, expansion, and Q(h*a) = Qnorm(a) + R_new(a).
// Checked: the updated a-posteriori vectors, their hard decisions and the
// new C2V vectors of every lane, the row/half tag, the 5-cycle latency, and that each C2V vector is 0
// at z xor beta (beta summed by the testbench). Rows get four LLR profiles so
// that every mechanism of the algorithm occurs; each is counted and must
// occur at least once.
module tb_hr_mtec_cn_top;
  import nbldpc_pkg::*;
  import tb_ref_pkg::*;

  localparam int RW = $clog2(M_ROWS);
  localparam int NROWS = M_ROWS;
  localparam int NITER = 3;
  localparam int LAT = 5;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_second = 0;
  logic [RW-1:0] in_row = '0;
  vllr_vec_t [HALF-1:0] in_q_post = '0;
  gf_t [HALF-1:0] in_h = '0;
  logic out_valid, out_second;
  logic [RW-1:0] out_row;
  vllr_vec_t [HALF-1:0] out_q_post;
  llr_vec_t [HALF-1:0] out_c2v;
  gf_t [HALF-1:0] out_sym;

  hr_mtec_cn_top dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int n_old_zero = 0, n_old_data = 0, n_dev_hit = 0, n_qt_sat = 0, n_back_to_back = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // GF(32) by tables, primitive polynomial x^5 + x^2 + 1
  int gexp[62], glog[GF_Q];
  function automatic int tmul(int a, int b);
    if (a == 0 || b == 0) return 0;
    return gexp[glog[a] + glog[b]];
  endfunction

  int    post [NROWS][DC][GF_Q];
  int    hcoef[NROWS][DC];
  cmsg_t stored [2 * NROWS];
  bit    has_stored [2 * NROWS];
  cnu_model model = new();

  typedef struct {
    int       row;
    bit       second;
    int       cyc;
    int       nl;
    llr_vec_t c2v [HALF];
    int       qp  [HALF][GF_Q];
    int       zb  [HALF];
  } exp_t;
  exp_t expq[$];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      e = expq.pop_front();
      check(cycle - e.cyc == LAT, "latency");
      check(int'(out_row) == e.row && out_second == e.second, "row/half tag");
      for (int i = 0; i < e.nl; i++) begin
        check(out_c2v[i] === e.c2v[i], "new C2V vector");
        check(out_c2v[i][e.zb[i]] == '0, "C2V zero at z xor beta");
        begin
          int best;
          best = 0;
          for (int b = 1; b < GF_Q; b++) if (e.qp[i][b] < e.qp[i][best]) best = b;
          check(int'(out_sym[i]) == best, "hard decision");
        end
        for (int a = 0; a < GF_Q; a++) begin
          checks++;
          if (int'(out_q_post[i][a]) != e.qp[i][a]) begin
            failures++;
            if (failures < 10) $display("FAIL post row %0d half %0d lane %0d a %0d got %0d exp %0d",
              e.row, e.second, i, a, out_q_post[i][a], e.qp[i][a]);
          end
        end
      end
    end
  end

  // compute the expected result of one half row and update the reference state
  function automatic exp_t expect_half(int r, bit second);
    exp_t     e;
    llr_vec_t qn [HALF];
    gf_t      zz [HALF];
    llr_vec_t rold;
    cmsg_t    om, nm;
    int       beta, slot;
    e.row = r; e.second = second; e.nl = second ? HALF2 : HALF;
    slot = 2 * r + int'(second);
    om = has_stored[slot] ? stored[slot] : '0;
    if (has_stored[slot]) n_old_data++; else n_old_zero++;
    beta = 0;
    for (int i = 0; i < HALF; i++) begin
      int qt[GF_Q];
      int vn;
      vn = second ? HALF + i : i;
      rold = ref_expand(om, i);
      for (int a = 0; a < GF_Q; a++) begin
        int v;
        if (i < e.nl) v = post[r][vn][tmul(hcoef[r][vn], a)] - int'(rold[a]);
        else          v = 0;
        if (v > 127) begin v = 127; n_qt_sat++; end
        if (v < -128) begin v = -128; n_qt_sat++; end
        qt[a] = v;
      end
      ref_normalize(qt, qn[i], zz[i]);
      if (i < e.nl) beta ^= int'(zz[i]);
    end
    if (second) for (int i = 0; i < HALF; i++) beta ^= int'(zz_first[i]);
    nm = model.process(qn, zz, second);
    stored[slot] = nm; has_stored[slot] = 1;
    for (int i = 0; i < e.nl; i++) begin
      int vn;
      vn = second ? HALF + i : i;
      e.c2v[i] = ref_expand(nm, i);
      e.zb[i]  = int'(zz[i]) ^ beta;
      for (int x = 1; x < GF_Q; x++)
        if (int'(nm.d1[x]) == i || int'(nm.d2[x]) == i) n_dev_hit++;
      for (int a = 0; a < GF_Q; a++) begin
        int s;
        s = int'(qn[i][a]) + int'(e.c2v[i][a]);
        if (s > 127) s = 127;
        post[r][vn][tmul(hcoef[r][vn], a)] = s;
      end
      for (int b = 0; b < GF_Q; b++) e.qp[i][b] = post[r][vn][b];
    end
    if (!second) zz_first = zz;
    return e;
  endfunction
  gf_t zz_first [HALF];

  initial begin
    int last_drive;
    gexp[0] = 1;
    for (int k = 1; k < 62; k++) begin
      int v;
      v = gexp[k - 1] << 1;
      if (v & 32) v ^= 'b100101;
      gexp[k] = v;
    end
    for (int k = 0; k < 31; k++) glog[gexp[k]] = k;
    foreach (has_stored[k]) has_stored[k] = 0;
    foreach (zz_first[i]) zz_first[i] = '0;

    // channel LLRs with four profiles, random nonzero coefficients
    for (int r = 0; r < NROWS; r++) begin
      for (int n = 0; n < DC; n++) begin
        int zc;
        hcoef[r][n] = $urandom_range(GF_Q - 1, 1);
        zc = $urandom_range(GF_Q - 1);
        for (int a = 0; a < GF_Q; a++) begin
          case (r % 4)
            0: post[r][n][a] = $urandom_range(63);
            1: post[r][n][a] = $urandom_range(12, 1);
            2: post[r][n][a] = (n == (r % DC)) ? $urandom_range(2, 1) : $urandom_range(63, 40);
            default: post[r][n][a] = $urandom_range(120, 34);
          endcase
        end
        post[r][n][zc] = 0;
      end
    end

    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    last_drive = -10;
    for (int it = 0; it < NITER; it++) begin
      for (int r = 0; r < NROWS; r++) begin
        for (int h = 0; h < 2; h++) begin
          exp_t e;
          int nl;
          nl = h ? HALF2 : HALF;
          for (int i = 0; i < HALF; i++) begin
            int vn;
            vn = h ? HALF + i : i;
            for (int a = 0; a < GF_Q; a++) in_q_post[i][a] = (i < nl) ? vllr_t'(post[r][vn][a]) : '0;
            in_h[i] = (i < nl) ? gf_t'(hcoef[r][vn]) : gf_t'(1);
          end
          e = expect_half(r, h[0]);
          e.cyc = cycle + 1;
          expq.push_back(e);
          in_valid = 1; in_second = h[0]; in_row = RW'(r);
          if (cycle == last_drive + 1) n_back_to_back++;
          last_drive = cycle;
          @(posedge clk); #1;
          in_valid = 0;
          if ($urandom_range(7) == 0) repeat ($urandom_range(2, 1)) @(posedge clk);
          #0;
        end
      end
    end
    repeat (LAT + 3) @(posedge clk);
    check(expq.size() == 0, "all outputs delivered");

    $display("mechanisms: first=%0d second=%0d min_from_first=%0d min_from_second=%0d pair=%0d single=%0d dq2_none=%0d other_half=%0d sat=%0d dev_hit=%0d old_zero=%0d old_data=%0d qt_sat=%0d back_to_back=%0d",
      model.n_first, model.n_second, model.n_min_from_first, model.n_min_from_second,
      model.n_pair_won, model.n_single_won, model.n_dq2_none, model.n_dev_other_half,
      model.n_saturated, n_dev_hit, n_old_zero, n_old_data, n_qt_sat, n_back_to_back);
    check(model.n_first > 0 && model.n_second > 0, "both half rows processed");
    check(model.n_min_from_first > 0 && model.n_min_from_second > 0, "final min from each half");
    check(model.n_pair_won > 0 && model.n_single_won > 0, "single and double deviations");
    check(model.n_dq2_none > 0, "second extra column without candidate");
    check(model.n_dev_other_half > 0, "deviation in the other half row");
    check(model.n_saturated > 0, "saturation of stored values");
    check(n_dev_hit > 0, "lane on a deviation path");
    check(n_old_zero > 0 && n_old_data > 0, "initial and stored old C2V");
    check(n_back_to_back > 0, "half rows on consecutive cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
