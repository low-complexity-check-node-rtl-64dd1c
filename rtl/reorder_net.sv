// reorder_net: reordering network between the normal and the delta domain.
//
// An LLR vector over GF(2^P) is indexed by field element. The network
// produces dout[x] = din[x ^ ctrl], i.e. it relabels every entry by a field
// addition of the control symbol. Used with ctrl = z (the hard decision) it
// turns a V2C vector into the delta domain (entry 0 becomes the most reliable
// symbol); used with ctrl = z xor beta it turns a delta-domain C2V vector back
// into the normal domain. The structure is the usual one of P stages of Q
// two-input WIDTH-bit multiplexers (Q*log2(Q) muxes): stage s swaps the
// entries whose labels differ in bit s when ctrl[s] is set.
// The function and the multiplexer count follow the check node description;
// the stage ordering is this implementation's. Purely combinational.
module reorder_net #(
  parameter int unsigned P     = 5,   // bits per field element (GF(32))
  parameter int unsigned WIDTH = 6    // LLR width (wb)
) (
  input  logic [P-1:0]                     ctrl,
  input  logic [(1<<P)-1:0][WIDTH-1:0]     din,
  output logic [(1<<P)-1:0][WIDTH-1:0]     dout
);
  localparam int unsigned Q = 1 << P;

  logic [P:0][Q-1:0][WIDTH-1:0] stg;

  assign stg[0] = din;

  for (genvar s = 0; s < P; s++) begin : g_stage
    for (genvar x = 0; x < Q; x++) begin : g_mux
      assign stg[s+1][x] = ctrl[s] ? stg[s][x ^ (1 << s)] : stg[s][x];
    end
  end

  assign dout = stg[P];

endmodule
