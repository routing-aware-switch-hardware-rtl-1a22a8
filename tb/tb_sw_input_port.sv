// tb_sw_input_port: self-checking test of the switch input stage.
//
// Random flits (random head/tail bits and routes) are offered with random
// gaps while the crossbar side takes them with random stalls. A queue model
// predicts each flit leaving the stage: identical except that a head flit's
// route field is shifted right by the port-number width, and tagged with the
// output port decoded from the latest head flit. It also checks the one-flit
// occupancy (a flit accepted at an edge is offered right after that edge) and
// that the stage accepts exactly when it is empty or being emptied.
module tb_sw_input_port;
  import noc_pkg::*;

  localparam int N_OUT  = 4;
  localparam int PORT_W = 2;

  logic              clk = 0, rst_n = 0;
  logic              in_valid, in_ready, q_valid, q_ready;
  flit_t             in_flit, q_flit;
  logic [PORT_W-1:0] q_dest;

  int checks = 0, failures = 0;

  sw_input_port #(.N_OUT(N_OUT)) dut (.*);

  always #5 clk = ~clk;

  typedef struct { flit_t f; logic [PORT_W-1:0] d; } exp_t;
  exp_t exp_q[$];
  logic [PORT_W-1:0] cur_dest = '0;
  int n_out = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    in_valid = 0; in_flit = '0; q_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      // occupancy: stage is full exactly when the model holds one flit
      check(q_valid == (exp_q.size() == 1), "occupancy");
      in_valid        = ($urandom_range(0, 3) != 0);
      in_flit.head    = $urandom_range(0, 2) == 0;
      in_flit.tail    = $urandom_range(0, 2) == 0;
      in_flit.data    = $urandom;
      q_ready         = ($urandom_range(0, 2) != 0);
      #4;
      check(in_ready == (exp_q.size() == 0 || q_ready), "in_ready");
      if (q_valid && q_ready) begin
        automatic exp_t e = exp_q.pop_front();
        check(q_flit == e.f, "flit");
        check(q_dest == e.d, "dest");
        n_out++;
      end
      if (in_valid && in_ready) begin
        automatic exp_t e;
        e.f = in_flit;
        if (in_flit.head) begin
          automatic logic [ROUTE_W-1:0] r;
          r = in_flit.data[ROUTE_W-1:0];
          e.f.data[ROUTE_W-1:0] = r / (1 << PORT_W);
          cur_dest = in_flit.data[1:0];
        end
        e.d = cur_dest;
        exp_q.push_back(e);
      end
    end
    check(n_out > 1000, "enough traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
