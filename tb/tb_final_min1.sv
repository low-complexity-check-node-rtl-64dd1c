// tb_final_min1: drives first/second half pairs of random row minima and
// checks the pass-through of the first half, the stored first-half values
// used for the second half (min of both halves, half bit of the index, equal
// values going to the first half) and the combined syndrome.
module tb_final_min1;
  localparam int P = 5, Q = 32, WIDTH = 6, IW = 4;
  logic clk = 0, rst_n = 0, load_first = 0, second = 0;
  logic [Q-1:1][WIDTH-1:0] m1_cur, m1_fin;
  logic [Q-1:1][IW-1:0] idx_cur;
  logic [Q-1:1][IW:0] idx_fin;
  logic [P-1:0] beta_cur, beta_fin;
  int checks = 0, failures = 0, nfirst = 0, nsecond = 0;

  final_min1 #(.P(P), .WIDTH(WIDTH), .IW(IW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sm[Q], si[Q], sb;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      // first half
      second = 0; load_first = 1;
      for (int a = 1; a < Q; a++) begin
        m1_cur[a] = WIDTH'($urandom_range(8)); idx_cur[a] = IW'($urandom_range(13));
        sm[a] = int'(m1_cur[a]); si[a] = int'(idx_cur[a]);
      end
      beta_cur = P'($urandom); sb = int'(beta_cur);
      #1;
      for (int a = 1; a < Q; a++) begin
        checks++;
        if (m1_fin[a] != m1_cur[a] || idx_fin[a] != {1'b0, idx_cur[a]}) failures++;
      end
      checks++; if (beta_fin != beta_cur) failures++;
      @(posedge clk); #1;
      // idle cycles in between must not disturb the stored values
      load_first = 0;
      m1_cur = '0;
      repeat ($urandom_range(2)) @(posedge clk);
      #1;
      second = 1;
      for (int a = 1; a < Q; a++) begin
        m1_cur[a] = WIDTH'($urandom_range(8)); idx_cur[a] = IW'($urandom_range(12));
      end
      beta_cur = P'($urandom);
      #1;
      for (int a = 1; a < Q; a++) begin
        int em, ei;
        if (sm[a] <= int'(m1_cur[a])) begin em = sm[a]; ei = si[a]; nfirst++; end
        else begin em = int'(m1_cur[a]); ei = 16 + int'(idx_cur[a]); nsecond++; end
        checks++;
        if (int'(m1_fin[a]) != em || int'(idx_fin[a]) != ei) begin
          failures++;
          if (failures < 5) $display("a=%0d got %0d@%0d exp %0d@%0d", a, m1_fin[a], idx_fin[a], em, ei);
        end
      end
      checks++; if (int'(beta_fin) != (sb ^ int'(beta_cur))) failures++;
      @(posedge clk); #1;
    end
    checks++;
    if (nfirst == 0 || nsecond == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
