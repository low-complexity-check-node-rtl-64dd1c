// tb_tec_constructor: three constructors (elements 1, 6 and 31) are fed
// random row minima and indexes; Delta Q', Delta Q'' and the deviations are
// compared with the reference extra column, which enumerates all pairs of
// field elements summing to the element.
module tb_tec_constructor;
  import nbldpc_pkg::*;
  import tb_ref_pkg::*;
  localparam int FW = 6;
  localparam int AS[3] = '{1, 6, 31};
  logic [GF_Q-1:1][WB-1:0] m1;
  logic [GF_Q-1:1][FW-1:0] idx;
  logic [2:0][WB-1:0] dq1, dq2;
  logic [2:0][FW-1:0] d1, d2;
  int checks = 0, failures = 0, npair = 0, nsingle = 0, nnone = 0;

  for (genvar k = 0; k < 3; k++) begin : g_dut
    tec_constructor #(.P(GF_P), .A(AS[k]), .WIDTH(WB), .FW(FW)) dut (
      .m1(m1), .idx(idx), .dq1(dq1[k]), .dq2(dq2[k]), .d1(d1[k]), .d2(d2[k]));
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int mm[GF_Q], id[GF_Q];
      mm[0] = 0; id[0] = 0;
      for (int a = 1; a < GF_Q; a++) begin
        mm[a] = int'($urandom_range((n % 2) ? 63 : 10));
        id[a] = int'($urandom_range((n % 5 == 0) ? 1 : 26));
        m1[a] = WB'(mm[a]); idx[a] = FW'(id[a]);
      end
      #1;
      for (int k = 0; k < 3; k++) begin
        int e1, e2, ed1, ed2;
        bit pw;
        ref_tec(mm, id, AS[k], e1, e2, ed1, ed2, pw);
        if (pw) npair++; else nsingle++;
        if (e2 == 63) nnone++;
        checks++;
        if (int'(dq1[k]) != e1 || int'(dq2[k]) != e2 || int'(d1[k]) != ed1 || int'(d2[k]) != ed2) begin
          failures++;
          if (failures < 5) $display("A=%0d got %0d %0d %0d %0d exp %0d %0d %0d %0d", AS[k],
            dq1[k], dq2[k], d1[k], d2[k], e1, e2, ed1, ed2);
        end
      end
    end
    checks++;
    if (npair == 0 || nsingle == 0 || nnone == 0) failures++;
    $display("pair=%0d single=%0d none=%0d", npair, nsingle, nnone);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
