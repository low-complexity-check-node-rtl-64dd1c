// tb_hr_mtec_cnu: self-checking test of the half-row check node unit.
// Random rows (first half then second half, back to back and with gaps) are
// driven; every compressed output message is compared field by field with
// the reference model, and the output must appear exactly two cycles after
// its input.
module tb_hr_mtec_cnu;
  import nbldpc_pkg::*;
  import tb_ref_pkg::*;

  localparam int TAGW = 8;
  localparam int NROWS = 300;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_second = 0;
  logic [TAGW-1:0] in_tag = '0;
  llr_vec_t [HALF-1:0] in_q = '0;
  gf_t [HALF-1:0] in_z = '0;
  logic out_valid, out_second;
  logic [TAGW-1:0] out_tag;
  cmsg_t out_msg;

  int checks = 0, failures = 0, cycle = 0;

  hr_mtec_cnu #(.TAGW(TAGW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cmsg_t exp_q[$];
  int    exp_cyc[$];
  int    exp_tag[$];
  cnu_model model = new();

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      cmsg_t e;
      int c, t;
      e = exp_q.pop_front(); c = exp_cyc.pop_front(); t = exp_tag.pop_front();
      checks++;
      if (out_msg !== e) begin
        failures++;
        if (failures < 5) $display("msg mismatch tag %0d: got dq=%0d %0d %0d %0d a=%0d %0d exp dq=%0d %0d %0d %0d a=%0d %0d",
          t, out_msg.dq1_m1, out_msg.dq1_m2, out_msg.dq2_m1, out_msg.dq2_m2, out_msg.a_m1, out_msg.a_m2,
          e.dq1_m1, e.dq1_m2, e.dq2_m1, e.dq2_m2, e.a_m1, e.a_m2);
      end
      checks++;
      if (cycle - c != 2 || int'(out_tag) != t) begin
        failures++;
        $display("latency/tag mismatch: %0d cycles, tag %0d exp %0d", cycle - c, out_tag, t);
      end
    end
  end

  task automatic drive_half(bit second, int tag, int maxv);
    llr_vec_t q[HALF];
    gf_t z[HALF];
    for (int i = 0; i < HALF; i++) begin
      z[i] = gf_t'($urandom_range(GF_Q - 1));
      for (int a = 0; a < GF_Q; a++) q[i][a] = llr_t'($urandom_range(maxv, 1));
      q[i][z[i]] = '0;
      in_q[i] = q[i];
      in_z[i] = z[i];
    end
    in_valid  = 1;
    in_second = second;
    in_tag    = TAGW'(tag);
    exp_q.push_back(model.process(q, z, second));
    exp_cyc.push_back(cycle + 1);
    exp_tag.push_back(tag);
    @(posedge clk);
    #1;
    in_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    for (int r = 0; r < NROWS; r++) begin
      int maxv;
      maxv = (r % 3 == 0) ? 63 : ((r % 3 == 1) ? 20 : 8);
      drive_half(0, (2 * r) % 256, maxv);
      drive_half(1, (2 * r + 1) % 256, maxv);
      if (r % 4 == 3) repeat ($urandom_range(3)) @(posedge clk);
      #0;
    end
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d outputs missing", exp_q.size()); end
    $display("mechanisms: first=%0d second=%0d min_from_first=%0d min_from_second=%0d pair=%0d single=%0d dq2_none=%0d other_half=%0d sat=%0d",
      model.n_first, model.n_second, model.n_min_from_first, model.n_min_from_second,
      model.n_pair_won, model.n_single_won, model.n_dq2_none, model.n_dev_other_half, model.n_saturated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
