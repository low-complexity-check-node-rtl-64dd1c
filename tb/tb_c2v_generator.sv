// tb_c2v_generator: random compressed messages (deviations often pointing at
// real lanes) are expanded; every lane's normal-domain vector is compared
// with the reference expansion, the output must follow one cycle after the
// input, and R(z*) must be 0.
module tb_c2v_generator;
  import nbldpc_pkg::*;
  import tb_ref_pkg::*;
  localparam int TAGW = 8;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [TAGW-1:0] in_tag = '0;
  cmsg_t in_msg = '0;
  logic out_valid;
  logic [TAGW-1:0] out_tag;
  llr_vec_t [HALF-1:0] out_r;
  int checks = 0, failures = 0, cycle = 0;

  c2v_generator #(.TAGW(TAGW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      cmsg_t m;
      m = '0;
      m.dq1_m1 = sllr_t'($urandom); m.dq1_m2 = sllr_t'($urandom);
      m.dq2_m1 = sllr_t'($urandom); m.dq2_m2 = sllr_t'($urandom);
      m.a_m1 = gf_t'($urandom_range(GF_Q - 1, 1));
      m.a_m2 = gf_t'($urandom_range(GF_Q - 1, 1));
      for (int a = 1; a < GF_Q; a++) begin
        m.d1[a] = idx_t'($urandom_range(15));
        m.d2[a] = idx_t'($urandom_range(15));
      end
      for (int i = 0; i < HALF; i++) m.zs[i] = gf_t'($urandom);
      in_msg = m; in_valid = 1; in_tag = TAGW'(n);
      @(posedge clk); #1;
      in_valid = 0;
      checks++;
      if (!out_valid || out_tag != TAGW'(n)) failures++;
      for (int i = 0; i < HALF; i++) begin
        checks++;
        if (out_r[i] !== ref_expand(m, i)) begin
          failures++;
          if (failures < 5) $display("lane %0d mismatch", i);
        end
        checks++;
        if (out_r[i][m.zs[i]] != '0) failures++;
      end
      if (n % 3 == 0) begin
        @(posedge clk); #1;
        checks++;
        if (out_valid) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
