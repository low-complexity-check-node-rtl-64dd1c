// tb_min1_finder: compares the minimum and its position (lowest position on
// ties, masked entries excluded) with a linear scan, over random values with
// many ties and random masks.
module tb_min1_finder;
  localparam int N = 14, WIDTH = 6, IW = 4;
  logic [N-1:0][WIDTH-1:0] val;
  logic [N-1:0] valid;
  logic [WIDTH-1:0] min_val;
  logic [IW-1:0] min_idx;
  logic found;
  int checks = 0, failures = 0;

  min1_finder #(.N(N), .WIDTH(WIDTH), .IW(IW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int mv, mi;
      for (int i = 0; i < N; i++) val[i] = WIDTH'((n % 2) ? $urandom_range(5) : $urandom);
      valid = (n % 4 == 3) ? N'($urandom) : ((n % 4 == 2) ? N'((1 << 13) - 1) : '1);
      #1;
      mv = 1 << 20; mi = -1;
      for (int i = 0; i < N; i++) if (valid[i] && int'(val[i]) < mv) begin mv = int'(val[i]); mi = i; end
      checks++;
      if (mi < 0) begin
        if (found) failures++;
      end else if (!found || int'(min_val) != mv || int'(min_idx) != mi) begin
        failures++;
        if (failures < 5) $display("got %0d@%0d exp %0d@%0d", min_val, min_idx, mv, mi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
