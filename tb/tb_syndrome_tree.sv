// tb_syndrome_tree: compares beta with the XOR of the enabled hard decisions
// for random inputs and masks (all lanes, 13 lanes, random masks).
module tb_syndrome_tree;
  localparam int P = 5, N = 14;
  logic [N-1:0][P-1:0] z;
  logic [N-1:0] en;
  logic [P-1:0] beta;
  int checks = 0, failures = 0;

  syndrome_tree #(.P(P), .N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int e;
      for (int i = 0; i < N; i++) z[i] = P'($urandom);
      case (n % 3)
        0: en = '1;
        1: en = N'((1 << 13) - 1);
        default: en = N'($urandom);
      endcase
      #1;
      e = 0;
      for (int i = 0; i < N; i++) if (en[i]) e ^= int'(z[i]);
      checks++;
      if (int'(beta) != e) begin
        failures++;
        if (failures < 5) $display("beta %0d exp %0d", beta, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
