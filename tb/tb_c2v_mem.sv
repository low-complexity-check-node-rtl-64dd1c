// tb_c2v_mem: random writes and reads against a shadow array; unwritten
// words must read as zero, reads return data one cycle later, and a reset
// makes every word read as zero again.
module tb_c2v_mem;
  import nbldpc_pkg::*;
  localparam int DEPTH = 2 * M_ROWS, AW = $clog2(DEPTH);
  logic clk = 0, rst_n = 0, we = 0, re = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  cmsg_t wdata = '0, rdata;
  int checks = 0, failures = 0, nzero = 0, ndata = 0;
  cmsg_t shadow [DEPTH];
  bit    valid  [DEPTH];

  c2v_mem #(.DEPTH(DEPTH), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cmsg_t rnd_msg();
    logic [CMSG_W-1:0] v;
    for (int b = 0; b < CMSG_W; b += 32) v[b +: 32] = $urandom;
    return cmsg_t'(v);
  endfunction

  task automatic run(int n);
    for (int k = 0; k < n; k++) begin
      cmsg_t e;
      int ra;
      we = $urandom_range(1); waddr = AW'($urandom_range(DEPTH - 1)); wdata = rnd_msg();
      re = 1; ra = $urandom_range(DEPTH - 1); raddr = AW'(ra);
      e = valid[ra] ? shadow[ra] : '0;
      @(posedge clk); #1;
      if (we) begin shadow[waddr] = wdata; valid[waddr] = 1; end
      checks++;
      if (rdata !== e) begin
        failures++;
        if (failures < 5) $display("read %0d mismatch", ra);
      end
      if (e == '0) nzero++; else ndata++;
    end
  endtask

  initial begin
    foreach (valid[i]) valid[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run(2000);
    we = 0; re = 0;
    rst_n = 0; #1 rst_n = 1;
    foreach (valid[i]) valid[i] = 0;
    @(posedge clk); #1;
    run(200);
    checks++;
    if (nzero == 0 || ndata == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
