// sw_arbiter: output-port arbiter of the customized switch.
//
// The arbiter is sized for the N inputs that the routes actually connect to
// its output (N = 1, 2 and 3 in the example switch), instead of for all
// inputs of the switch; this pruning follows the document. The arbitration
// policy is not fixed by the document; this design uses round robin with
// packet locking (wormhole switching): once a head flit wins, the same input
// keeps the output until its tail flit has passed, and the input after it
// then gets the highest priority.
//
// Interface: req[k] = connected input k holds a flit for this output;
// tail[k] = that flit is a tail flit; avail = the output buffer accepts a flit
// this cycle. gnt is one-hot (or zero) and means: the flit of input k moves
// into the output buffer in this cycle. Decision is combinational, state
// changes on the clock edge.
module sw_arbiter #(
  parameter int N     = 4,
  parameter int IDX_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic [N-1:0] tail,
  input  logic         avail,
  output logic [N-1:0] gnt
);

  logic             locked;
  logic [IDX_W-1:0] owner;
  logic [IDX_W-1:0] ptr;
  logic [N-1:0]     cand;
  logic [IDX_W-1:0] cand_idx;

  // Round robin: scan from ptr+N-1 down to ptr so that the requester
  // nearest to ptr is the last one written and wins.
  always_comb begin
    logic [IDX_W-1:0] idx;
    cand     = '0;
    cand_idx = '0;
    idx      = '0;
    if (locked) begin
      cand[owner] = req[owner];
      cand_idx    = owner;
    end else begin
      for (int k = N - 1; k >= 0; k--) begin
        idx = IDX_W'((int'(ptr) + k) % N);
        if (req[idx]) begin
          cand      = '0;
          cand[idx] = 1'b1;
          cand_idx  = idx;
        end
      end
    end
    gnt = avail ? cand : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= 1'b0;
      owner  <= '0;
      ptr    <= '0;
    end else if (|gnt) begin
      if (tail[cand_idx]) begin
        locked <= 1'b0;
        ptr    <= (int'(cand_idx) == N - 1) ? '0 : cand_idx + 1'b1;
      end else begin
        locked <= 1'b1;
        owner  <= cand_idx;
      end
    end
  end

  // at most one input is granted
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));

endmodule
