// tb_noc_switch_cfg: the switch under connectivity matrices other than the
// default, to show that the pruning follows CONN.
//
// Instance A is the fully connected 4x4 switch (all 16 connections, 4-input
// arbiters and 4:1 multiplexers). Instance B is a 5-input, 3-output switch
// where output 0 takes inputs 0, 3 and 4, output 1 takes input 2 only, and
// output 2 has no connected input and must stay idle; input 1 reaches no
// output and sends nothing. Both run random legal
// traffic through switch_traffic_check, which scoreboards every flit.
module tb_noc_switch_cfg;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic done_a, done_b;
  int   checks_a, failures_a, checks_b, failures_b;
  int   failures = 0;

  switch_traffic_check #(.N_IN(4), .N_OUT(4), .CONN('1)) u_full (
    .clk, .rst_n, .done(done_a), .checks(checks_a), .failures(failures_a));

  switch_traffic_check #(.N_IN(5), .N_OUT(3),
                         .CONN({5'b00000, 5'b00100, 5'b11001})) u_odd (
    .clk, .rst_n, .done(done_b), .checks(checks_b), .failures(failures_b));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done_a && done_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b, failures_a + failures_b);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b, failures_a + failures_b + failures);
    $finish;
  end
endmodule
