// tb_mtec_constructor: random row minima and indexes; checks the four kept
// LLR values, their field elements and all deviations against the reference
// extra columns and 2-min selection.
module tb_mtec_constructor;
  import nbldpc_pkg::*;
  import tb_ref_pkg::*;
  localparam int FW = 5;
  logic [GF_Q-1:1][WB-1:0] m1;
  logic [GF_Q-1:1][FW-1:0] idx;
  logic [WB-1:0] dq1_m1, dq1_m2, dq2_m1, dq2_m2;
  logic [GF_P-1:0] a_m1, a_m2;
  logic [GF_Q-1:1][FW-1:0] d1, d2;
  int checks = 0, failures = 0;

  mtec_constructor #(.P(GF_P), .WIDTH(WB), .FW(FW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      int mm[GF_Q], id[GF_Q], q1[GF_Q], q2[GF_Q], e1[GF_Q], e2[GF_Q];
      int x1, x2;
      mm[0] = 0; id[0] = 0; q1[0] = 0; q2[0] = 0;
      for (int a = 1; a < GF_Q; a++) begin
        mm[a] = int'($urandom_range((n % 2) ? 63 : 12));
        id[a] = int'($urandom_range(26));
        m1[a] = WB'(mm[a]); idx[a] = FW'(id[a]);
      end
      #1;
      for (int a = 1; a < GF_Q; a++) begin
        bit pw;
        ref_tec(mm, id, a, q1[a], q2[a], e1[a], e2[a], pw);
        checks++;
        if (int'(d1[a]) != e1[a] || int'(d2[a]) != e2[a]) failures++;
      end
      ref_min2(q1, x1, x2);
      checks++;
      if (int'(a_m1) != x1 || int'(a_m2) != x2 || int'(dq1_m1) != q1[x1] || int'(dq1_m2) != q1[x2] ||
          int'(dq2_m1) != q2[x1] || int'(dq2_m2) != q2[x2]) begin
        failures++;
        if (failures < 5) $display("got %0d %0d %0d %0d @%0d %0d exp %0d %0d %0d %0d @%0d %0d",
          dq1_m1, dq1_m2, dq2_m1, dq2_m2, a_m1, a_m2, q1[x1], q1[x2], q2[x1], q2[x2], x1, x2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
