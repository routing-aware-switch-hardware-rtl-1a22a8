// noc_switch: routing-aware customized NoC switch.
//
// The switch has N_IN input ports, N_OUT output ports, a crossbar made of one
// multiplexer per output and one arbiter per output, with flit buffers at the
// outputs. Its point is the connectivity matrix CONN: bit CONN[o][i] is set
// when some route of the application goes from input i to output o. For each
// output o the switch builds a multiplexer and an arbiter with only
// popcount(CONN[o]) legs, wired to exactly those inputs; connections no route
// uses are not built. With CONN all ones the same RTL is the conventional
// fully connected switch. The default CONN is the document's 4x4 example:
//   output 0 <- input 0; output 1 <- input 1; output 2 <- inputs 2, 3;
//   output 3 <- inputs 0, 2, 3
// which keeps 7 of the 16 input-to-output connections (1-, 1-, 2- and 3-input
// multiplexers and arbiters). An output with no connected input gets no
// arbiter, multiplexer or buffer and stays idle.
//
// Routing is source routing (this design's choice): a head flit's low PORT_W
// route bits name the output; see noc_pkg. A flit whose route asks for a
// connection that was pruned cannot leave its input; route_err[i] flags such
// a flit and an assertion reports it, since a correctly generated switch never
// sees one.
//
// Timing: a flit accepted on in_* at edge t sits in the input register after
// t, crosses arbiter and crossbar and is written into the output buffer at
// edge t+1, and is offered on out_* after edge t+1 (two cycles input to
// output, one flit per cycle per port). Packets are switched wormhole style:
// an output stays with one input from head to tail.
module noc_switch
  import noc_pkg::*;
#(
  parameter int N_IN   = 4,
  parameter int N_OUT  = 4,
  parameter int DEPTH  = 3,
  parameter logic [N_OUT-1:0][N_IN-1:0] CONN = {4'b1101, 4'b1100, 4'b0010, 4'b0001},
  parameter int PORT_W = (N_OUT > 1) ? $clog2(N_OUT) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic  [N_IN-1:0]    in_valid,
  input  flit_t [N_IN-1:0]    in_flit,
  output logic  [N_IN-1:0]    in_ready,
  output logic  [N_OUT-1:0]   out_valid,
  output flit_t [N_OUT-1:0]   out_flit,
  input  logic  [N_OUT-1:0]   out_ready,
  output logic  [N_IN-1:0]    route_err
);

  localparam int FW = $bits(flit_t);

  logic  [N_IN-1:0]             q_valid;
  flit_t [N_IN-1:0]             q_flit;
  logic  [N_IN-1:0][PORT_W-1:0] q_dest;
  logic  [N_IN-1:0]             q_ready;
  // take[o][i]: output o takes the flit of input i in this cycle
  logic  [N_OUT-1:0][N_IN-1:0]  take;

  for (genvar i = 0; i < N_IN; i++) begin : g_in
    sw_input_port #(.N_OUT(N_OUT), .PORT_W(PORT_W)) u_in (
      .clk, .rst_n,
      .in_valid (in_valid[i]),
      .in_flit  (in_flit[i]),
      .in_ready (in_ready[i]),
      .q_valid  (q_valid[i]),
      .q_flit   (q_flit[i]),
      .q_dest   (q_dest[i]),
      .q_ready  (q_ready[i])
    );
  end

  for (genvar o = 0; o < N_OUT; o++) begin : g_out
    localparam int K = conn_count(MAX_IN'(CONN[o]));
    if (K == 0) begin : g_idle
      assign take[o]      = '0;
      assign out_valid[o] = 1'b0;
      assign out_flit[o]  = '0;
    end else begin : g_port
      logic [K-1:0]         req, tail, gnt;
      logic [K-1:0][FW-1:0] legs;
      logic [FW-1:0]        sel_flit;
      logic                 avail;

      for (genvar k = 0; k < K; k++) begin : g_leg
        localparam int I = conn_index(MAX_IN'(CONN[o]), k);
        assign req[k]  = q_valid[I] && (int'(q_dest[I]) == o);
        assign tail[k] = q_flit[I].tail;
        assign legs[k] = q_flit[I];
      end

      always_comb begin
        take[o] = '0;
        for (int k = 0; k < K; k++) take[o][conn_index(MAX_IN'(CONN[o]), k)] = gnt[k];
      end

      sw_arbiter #(.N(K)) u_arb (
        .clk, .rst_n,
        .req   (req),
        .tail  (tail),
        .avail (avail),
        .gnt   (gnt)
      );

      sw_xbar_mux #(.N(K), .W(FW)) u_mux (
        .din  (legs),
        .sel  (gnt),
        .dout (sel_flit)
      );

      sw_output_port #(.DEPTH(DEPTH)) u_out (
        .clk, .rst_n,
        .in_valid  (|gnt),
        .in_flit   (flit_t'(sel_flit)),
        .in_ready  (avail),
        .out_valid (out_valid[o]),
        .out_flit  (out_flit[o]),
        .out_ready (out_ready[o])
      );
    end
  end

  always_comb begin
    for (int i = 0; i < N_IN; i++) begin
      q_ready[i]   = 1'b0;
      route_err[i] = 1'b0;
      for (int o = 0; o < N_OUT; o++) q_ready[i] |= take[o][i];
      if (q_valid[i])
        route_err[i] = (int'(q_dest[i]) >= N_OUT) || !CONN[q_dest[i]][i];
    end
  end

  // routes only use connections kept in CONN
  assert property (@(posedge clk) disable iff (!rst_n) route_err == '0)
    else $error("noc_switch: flit routed over a pruned connection");

endmodule
