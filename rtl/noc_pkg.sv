// noc_pkg: types and elaboration-time helpers shared by the switch blocks.
//
// A flit is a data word plus two framing bits: `head` marks the first flit of
// a packet and `tail` the last one (a one-flit packet has both set). The
// switch uses source routing: the low ROUTE_W bits of a head flit hold the
// route, and every switch takes the lowest port-number bits as its output and
// shifts the route field right so the next switch finds its own field at the
// bottom. Flit width, framing and routing format are this design's choices;
// the customization method itself only needs to know, per switch, which
// inputs are routed to which outputs.
//
// conn_count() and conn_index() turn one row of a connectivity matrix into
// the size of a pruned multiplexer/arbiter and into the input number feeding
// each of its legs. They are evaluated at elaboration time only.
package noc_pkg;

  localparam int FLIT_W  = 32;  // payload bits per flit
  localparam int ROUTE_W = 16;  // route field at the bottom of a head flit
  localparam int MAX_IN  = 32;  // widest connectivity row the helpers accept

  typedef struct packed {
    logic              head;
    logic              tail;
    logic [FLIT_W-1:0] data;
  } flit_t;

  // Number of inputs connected to one output.
  function automatic int conn_count(input logic [MAX_IN-1:0] row);
    int n = 0;
    for (int i = 0; i < MAX_IN; i++) if (row[i]) n++;
    return n;
  endfunction

  // Input number of the k-th (from 0, lowest first) connected input.
  function automatic int conn_index(input logic [MAX_IN-1:0] row, input int k);
    int n = 0;
    int idx = 0;
    for (int i = 0; i < MAX_IN; i++) begin
      if (row[i]) begin
        if (n == k) idx = i;
        n++;
      end
    end
    return idx;
  endfunction

endpackage
