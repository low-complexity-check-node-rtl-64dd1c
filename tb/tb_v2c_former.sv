// tb_v2c_former: random a-posteriori vectors (including extreme values that
// saturate), coefficients and old C2V messages; checks
// Qt(a) = Q(h*a) - R_old(a) clipped to the signed 8-bit range.
module tb_v2c_former;
  import nbldpc_pkg::*;
  import tb_ref_pkg::*;
  vllr_vec_t q_post, qt;
  gf_t h;
  llr_vec_t r_old;
  int checks = 0, failures = 0, nsat = 0;

  v2c_former dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int q[GF_Q], hv;
      hv = $urandom_range(GF_Q - 1, 1);
      h = gf_t'(hv);
      for (int a = 0; a < GF_Q; a++) begin
        q[a] = (n % 2) ? int'($urandom_range(255)) - 128 : int'($urandom_range(100));
        q_post[a] = vllr_t'(q[a]);
        r_old[a] = llr_t'($urandom);
      end
      #1;
      for (int a = 0; a < GF_Q; a++) begin
        int e;
        e = q[tgf_mul(hv, a)] - int'(r_old[a]);
        if (e < -128) begin e = -128; nsat++; end
        checks++;
        if (int'(qt[a]) != e) begin
          failures++;
          if (failures < 5) $display("h=%0d a=%0d got %0d exp %0d", hv, a, qt[a], e);
        end
      end
    end
    checks++;
    if (nsat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
