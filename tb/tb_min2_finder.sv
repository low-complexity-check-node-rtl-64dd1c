// tb_min2_finder: compares the two smallest values and their field elements
// (smaller element first on ties) with a two-pass scan.
module tb_min2_finder;
  localparam int P = 5, Q = 32, WIDTH = 6;
  logic [Q-1:1][WIDTH-1:0] val;
  logic [WIDTH-1:0] m1, m2;
  logic [P-1:0] a1, a2;
  int checks = 0, failures = 0;

  min2_finder #(.P(P), .WIDTH(WIDTH)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int e1, e2;
      for (int a = 1; a < Q; a++) val[a] = WIDTH'((n % 2) ? $urandom_range(4) : $urandom);
      #1;
      e1 = 1;
      for (int a = 2; a < Q; a++) if (val[a] < val[e1]) e1 = a;
      e2 = (e1 == 1) ? 2 : 1;
      for (int a = 1; a < Q; a++) if (a != e1 && val[a] < val[e2]) e2 = a;
      checks++;
      if (int'(a1) != e1 || int'(a2) != e2 || m1 != val[e1] || m2 != val[e2]) begin
        failures++;
        if (failures < 5) $display("got %0d@%0d %0d@%0d exp %0d@%0d %0d@%0d", m1, a1, m2, a2, val[e1], e1, val[e2], e2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
