// tb_v2c_normalizer: random signed V2C vectors (including values that
// saturate after normalization); checks z = argmin and Q(a) = Qt(a) - min
// clipped to wb bits.
module tb_v2c_normalizer;
  import nbldpc_pkg::*;
  logic signed [GF_Q-1:0][VNW-1:0] qt;
  llr_vec_t q;
  gf_t z;
  int checks = 0, failures = 0, nsat = 0;

  v2c_normalizer dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int v[GF_Q];
      int mn, zi;
      for (int a = 0; a < GF_Q; a++) begin
        v[a] = (n % 2) ? int'($urandom_range(40)) - 20 : int'($urandom_range(255)) - 128;
        qt[a] = VNW'(v[a]);
      end
      #1;
      mn = v[0]; zi = 0;
      for (int a = 1; a < GF_Q; a++) if (v[a] < mn) begin mn = v[a]; zi = a; end
      checks++;
      if (int'(z) != zi) failures++;
      for (int a = 0; a < GF_Q; a++) begin
        int e;
        e = v[a] - mn;
        if (e > 63) begin e = 63; nsat++; end
        checks++;
        if (int'(q[a]) != e) begin
          failures++;
          if (failures < 5) $display("entry %0d got %0d exp %0d", a, q[a], e);
        end
      end
    end
    checks++;
    if (nsat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
