// tb_sw_output_port: self-checking test of the output flit buffer.
//
// Random writes and reads with random stalls on both sides. A queue model
// checks flit order, that the buffer accepts exactly while it holds fewer
// than 3 flits, that it reaches full and empty, and that a flit written at an
// edge is offered right after that edge (one cycle through the buffer).
module tb_sw_output_port;
  import noc_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  in_valid, in_ready, out_valid, out_ready;
  flit_t in_flit, out_flit;

  int checks = 0, failures = 0;
  int n_full = 0, n_read = 0;

  sw_output_port dut (.*);

  always #5 clk = ~clk;

  flit_t exp_q[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    in_valid = 0; in_flit = '0; out_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      check(out_valid == (exp_q.size() != 0), "out_valid");
      check(in_ready == (exp_q.size() < 3), "in_ready");
      if (exp_q.size() == 3) n_full++;
      // phases: fill-heavy, drain-heavy, balanced
      in_flit   = {2'($urandom), $urandom};
      in_valid  = ($urandom_range(0, 9) < ((cyc / 200) % 3 == 0 ? 9 : (cyc / 200) % 3 == 1 ? 2 : 5));
      out_ready = ($urandom_range(0, 9) < ((cyc / 200) % 3 == 0 ? 2 : (cyc / 200) % 3 == 1 ? 9 : 5));
      #4;
      if (out_valid && out_ready) begin
        check(out_flit == exp_q.pop_front(), "flit order");
        n_read++;
      end
      if (in_valid && in_ready) exp_q.push_back(in_flit);
    end
    check(n_full > 0, "buffer reached full");
    check(n_read > 1000, "enough traffic");
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
