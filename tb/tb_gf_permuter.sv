// tb_gf_permuter: for every coefficient c and random vectors, checks
// dout[a] == din[c * a] with products from discrete-log tables, and that the
// permutation by c followed by the one by c^-1 restores the input.
module tb_gf_permuter;
  import nbldpc_pkg::*;
  import tb_ref_pkg::*;
  gf_t c, cinv;
  logic [GF_Q-1:0][VNW-1:0] din, dout, dback;
  int checks = 0, failures = 0;

  gf_permuter #(.WIDTH(VNW)) dut  (.c(c),    .din(din),  .dout(dout));
  gf_permuter #(.WIDTH(VNW)) dut2 (.c(cinv), .din(dout), .dout(dback));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 1; k < GF_Q; k++) begin
      int ki;
      ki = 0;
      for (int b = 1; b < GF_Q; b++) if (tgf_mul(k, b) == 1) ki = b;
      for (int n = 0; n < 10; n++) begin
        c = gf_t'(k); cinv = gf_t'(ki);
        for (int a = 0; a < GF_Q; a++) din[a] = VNW'($urandom);
        #1;
        for (int a = 0; a < GF_Q; a++) begin
          checks++;
          if (dout[a] !== din[tgf_mul(k, a)]) begin
            failures++;
            if (failures < 5) $display("c=%0d a=%0d got %0d exp %0d", k, a, dout[a], din[tgf_mul(k, a)]);
          end
        end
        checks++;
        if (dback !== din) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
