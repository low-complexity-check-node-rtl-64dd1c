// tb_symbol_decision: random signed vectors with many ties; checks that the
// decision is the smallest field element holding the smallest LLR.
module tb_symbol_decision;
  import nbldpc_pkg::*;
  vllr_vec_t q_post;
  gf_t sym;
  int checks = 0, failures = 0;

  symbol_decision dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int v[GF_Q];
      int e;
      for (int a = 0; a < GF_Q; a++) begin
        v[a] = (n % 2) ? int'($urandom_range(6)) - 3 : int'($urandom_range(255)) - 128;
        q_post[a] = vllr_t'(v[a]);
      end
      #1;
      e = 0;
      for (int a = 0; a < GF_Q; a++) if (v[a] < v[e]) e = a;
      checks++;
      if (int'(sym) != e) begin
        failures++;
        if (failures < 5) $display("got %0d exp %0d", sym, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
