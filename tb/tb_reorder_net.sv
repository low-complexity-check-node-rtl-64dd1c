// tb_reorder_net: checks dout[x] == din[x ^ ctrl] for every control symbol
// and random vectors, and that applying the network twice restores the input.
module tb_reorder_net;
  localparam int P = 5, Q = 32, WIDTH = 6;
  logic [P-1:0] ctrl;
  logic [Q-1:0][WIDTH-1:0] din, dout, dout2;
  int checks = 0, failures = 0;

  reorder_net #(.P(P), .WIDTH(WIDTH)) dut  (.ctrl(ctrl), .din(din),  .dout(dout));
  reorder_net #(.P(P), .WIDTH(WIDTH)) dut2 (.ctrl(ctrl), .din(dout), .dout(dout2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < Q; c++) begin
      for (int n = 0; n < 20; n++) begin
        ctrl = P'(c);
        for (int a = 0; a < Q; a++) din[a] = WIDTH'($urandom);
        #1;
        for (int a = 0; a < Q; a++) begin
          checks++;
          if (dout[a ^ c] !== din[a]) begin
            failures++;
            if (failures < 5) $display("ctrl %0d entry %0d: got %0d exp %0d", c, a ^ c, dout[a ^ c], din[a]);
          end
        end
        checks++;
        if (dout2 !== din) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
