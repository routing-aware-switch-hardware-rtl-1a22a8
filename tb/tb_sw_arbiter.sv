// tb_sw_arbiter: self-checking test of the output-port arbiter.
//
// Arbiters with 1, 3 and 4 inputs (the 1- and 3-input sizes of the example
// switch, and the size of a fully connected 4x4 switch) see random packets of
// 1 to 4 flits on every input, with gaps between the flits of a packet and a
// randomly blocked output. A reference model checks every cycle's grant:
// only when the output can accept; while a packet is in progress only its
// own input, and nothing while that input has no flit; otherwise the first
// requester in cyclic order after the input that last finished a packet.
// It also counts that locking held off other requesters and that every
// input won.
module tb_sw_arbiter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int done_cnt = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  for (genvar g = 0; g < 3; g++) begin : g_size
    localparam int N = (g == 0) ? 1 : (g == 1) ? 3 : 4;
    logic [N-1:0] req, tail, gnt;
    logic [N-1:0] taken = '0;  // flits granted at the last edge
    logic         avail;
    int           left [N];     // flits still to send of the current packet
    int           wins [N];
    int           lock_waits = 0;
    int           last_done = N - 1;
    int           owner = -1;

    sw_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .tail, .avail, .gnt);

    initial begin
      req = '0; tail = '0; avail = 0;
      for (int k = 0; k < N; k++) begin left[k] = 0; wins[k] = 0; end
      @(posedge rst_n);
      for (int cyc = 0; cyc < 3000; cyc++) begin
        logic [N-1:0] exp_g;
        @(negedge clk);
        req   = req & ~taken;
        taken = '0;
        // inputs whose flit was taken may present the next one, or pause
        for (int k = 0; k < N; k++) begin
          if (!req[k]) begin
            if (left[k] == 0 && $urandom_range(0, 2) == 0) left[k] = $urandom_range(1, 4);
            if (left[k] > 0 && $urandom_range(0, 3) != 0) req[k] = 1'b1;
          end
          tail[k] = (left[k] == 1);
        end
        avail = ($urandom_range(0, 4) != 0);
        #4;
        exp_g = '0;
        if (avail) begin
          if (owner >= 0) exp_g[owner] = req[owner];
          else
            for (int s = 1; s <= N; s++)
              if (exp_g == '0 && req[(last_done + s) % N]) exp_g[(last_done + s) % N] = 1'b1;
        end
        check(gnt == exp_g, $sformatf("grant N=%0d gnt=%b exp=%b req=%b owner=%0d last=%0d", N, gnt, exp_g, req, owner, last_done));
        if (owner >= 0 && avail && (req & ~(N'(1) << owner)) != '0) lock_waits++;
        for (int k = 0; k < N; k++) begin
          if (exp_g[k]) begin
            wins[k]++;
            left[k]--;
            taken[k] = 1'b1;
            if (left[k] == 0) begin
              owner = -1;
              last_done = k;
            end else owner = k;
          end
        end
      end
      for (int k = 0; k < N; k++) check(wins[k] > 50, $sformatf("input %0d served N=%0d", k, N));
      if (N > 1) check(lock_waits > 0, "locking held off a requester");
      done_cnt++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done_cnt == 3);
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
