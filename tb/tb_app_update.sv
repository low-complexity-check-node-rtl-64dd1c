// tb_app_update: random normalized V2C and new C2V vectors and
// coefficients, up to the largest values; checks Q(h*a) = Qnorm(a) + R_new(a).
module tb_app_update;
  import nbldpc_pkg::*;
  import tb_ref_pkg::*;
  llr_vec_t q_norm, r_new;
  gf_t h;
  vllr_vec_t q_post;
  int checks = 0, failures = 0, nsat = 0;

  app_update dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int hv;
      hv = $urandom_range(GF_Q - 1, 1);
      h = gf_t'(hv);
      for (int a = 0; a < GF_Q; a++) begin
        q_norm[a] = llr_t'($urandom);
        r_new[a]  = llr_t'((n % 2) ? $urandom : $urandom_range(31));
      end
      #1;
      for (int a = 0; a < GF_Q; a++) begin
        int e;
        e = int'(q_norm[a]) + int'(r_new[a]);
        if (e > 120) nsat++;
        checks++;
        if (int'(q_post[tgf_mul(hv, a)]) != e) begin
          failures++;
          if (failures < 5) $display("h=%0d a=%0d got %0d exp %0d", hv, a, q_post[tgf_mul(hv, a)], e);
        end
      end
    end
    checks++;
    if (nsat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
