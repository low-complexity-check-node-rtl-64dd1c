// c2v_mem: storage of the compressed C2V messages, one cmsg_t word per row
// and half row (2 * 124 words of 348 bits at the default sizes).
//
// Simple dual-port memory: one write port and one read port with a
// registered read (rdata one cycle after re). A word that has not been
// written since reset reads as all zeros, which expands to all-zero C2V
// messages, the initial R = 0 of the first decoding iteration. Per-word
// written flags implement this; they are cleared by reset, the array itself
// is not. A read of the address written in the same cycle returns the old
// word. Address = {row, half}.
module c2v_mem
  import nbldpc_pkg::*;
#(
  parameter int unsigned DEPTH = 2 * M_ROWS,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  cmsg_t         wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output cmsg_t         rdata
);

  cmsg_t            mem [DEPTH];
  logic [DEPTH-1:0] written;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      written <= '0;
      rdata   <= '0;
    end else begin
      if (we) written[waddr] <= 1'b1;
      if (re) rdata <= written[raddr] ? mem[raddr] : '0;
    end
  end

  a_addr_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    (we -> int'(waddr) < DEPTH) && (re -> int'(raddr) < DEPTH))
    else $error("c2v_mem address out of range");

endmodule
