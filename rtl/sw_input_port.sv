// sw_input_port: input stage of the NoC switch.
//
// The incoming flit and its control signals are latched into a register so
// that the switch's critical path starts at a flop (this follows the switch
// description). The register is a one-flit pipeline stage with a valid/ready
// handshake: it accepts a new flit when it is empty or when its current flit
// leaves in the same cycle. On a head flit the stage also decodes the output
// port from the low PORT_W bits of the route field, keeps that port for the
// body and tail flits of the packet, and shifts the route field right by
// PORT_W bits for the next switch (source routing and the handshake are this
// design's choices).
//
// Interface: in_* from the upstream link; q_* towards arbiters and crossbar,
// q_ready = the flit in the register is taken this cycle.
// Timing: a flit accepted at edge t is offered to the crossbar after edge t.
module sw_input_port
  import noc_pkg::*;
#(
  parameter int N_OUT  = 4,
  parameter int PORT_W = (N_OUT > 1) ? $clog2(N_OUT) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // upstream link
  input  logic              in_valid,
  input  flit_t             in_flit,
  output logic              in_ready,
  // towards the crossbar
  output logic              q_valid,
  output flit_t             q_flit,
  output logic [PORT_W-1:0] q_dest,
  input  logic              q_ready
);

  flit_t captured;

  assign in_ready = !q_valid || q_ready;

  always_comb begin
    captured = in_flit;
    if (in_flit.head)
      captured.data[ROUTE_W-1:0] = in_flit.data[ROUTE_W-1:0] >> PORT_W;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_valid <= 1'b0;
      q_flit  <= '0;
      q_dest  <= '0;
    end else begin
      if (in_valid && in_ready) begin
        q_valid <= 1'b1;
        q_flit  <= captured;
        if (in_flit.head) q_dest <= in_flit.data[PORT_W-1:0];
      end else if (q_ready) begin
        q_valid <= 1'b0;
      end
    end
  end

endmodule
