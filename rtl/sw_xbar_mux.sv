// sw_xbar_mux: one output multiplexer of the switch crossbar.
//
// The crossbar is a set of multiplexers, one per output port, each driven by
// the grant of that output's arbiter (as the document describes). Here each
// multiplexer has only the N legs of the inputs that the routes connect to its
// output, so a pruned switch has a K-to-1 multiplexer where a full switch has
// an all-inputs one. The select is the arbiter's one-hot grant and the mux is
// an AND-OR tree (this design's choice); an all-zero select gives zero.
// Purely combinational.
module sw_xbar_mux #(
  parameter int N = 4,
  parameter int W = 34
) (
  input  logic [N-1:0][W-1:0] din,
  input  logic [N-1:0]        sel,
  output logic [W-1:0]        dout
);

  always_comb begin
    dout = '0;
    for (int k = 0; k < N; k++) dout |= din[k] & {W{sel[k]}};
  end

endmodule
