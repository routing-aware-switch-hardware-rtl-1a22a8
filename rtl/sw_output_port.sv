// sw_output_port: output buffer and flow control of one switch output.
//
// The switch uses output buffering: each output port holds a flit FIFO of
// DEPTH entries (3 flits, the size the document uses for full throughput).
// Flow control towards the downstream link is a valid/ready handshake; the
// document says only that the output port holds the flow-control logic, so
// the handshake is this design's choice. in_ready depends on the fill level
// alone (no write into a full buffer even when it is read in the same cycle),
// so no combinational path runs from the downstream ready into the crossbar.
//
// Timing: a flit written at edge t is offered on out_* after edge t; one
// write and one read per cycle are possible.
module sw_output_port
  import noc_pkg::*;
#(
  parameter int DEPTH = 3,
  parameter int PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic  clk,
  input  logic  rst_n,
  // from the crossbar
  input  logic  in_valid,
  input  flit_t in_flit,
  output logic  in_ready,
  // downstream link
  output logic  out_valid,
  output flit_t out_flit,
  input  logic  out_ready
);

  flit_t            mem [DEPTH];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;
  logic [PTR_W:0]   count;
  logic             wr, rd;

  assign in_ready  = (int'(count) < DEPTH);
  assign out_valid = (count != '0);
  assign out_flit  = mem[rd_ptr];
  assign wr        = in_valid && in_ready;
  assign rd        = out_valid && out_ready;

  function automatic logic [PTR_W-1:0] next_ptr(input logic [PTR_W-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (wr) wr_ptr <= next_ptr(wr_ptr);
      if (rd) rd_ptr <= next_ptr(rd_ptr);
      count <= count + (PTR_W+1)'(wr) - (PTR_W+1)'(rd);
    end
  end

  always_ff @(posedge clk) begin
    if (wr) mem[wr_ptr] <= in_flit;
  end

  // the fill level never exceeds the buffer size
  assert property (@(posedge clk) disable iff (!rst_n) int'(count) <= DEPTH);

endmodule
