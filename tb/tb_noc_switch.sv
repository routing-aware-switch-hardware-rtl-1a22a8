// tb_noc_switch: end-to-end test of the customized 4x4 switch at its default
// parameters (the example connectivity, 3-flit output buffers).
//
// Phase 1 (directed): one single-flit packet from input 1 to output 1 on an
// idle switch must appear two cycles after it was accepted, and a 4-flit
// packet must then stream out one flit per cycle.
// Phase 2 (random): every input sends packets of 1 to 4 flits, each to a
// random output that the connectivity allows for that input, with random
// gaps, while the outputs stall at random (in bursts, so buffers fill and
// inputs back up). Every flit carries its source input in data[31:24]. A
// scoreboard holds, per output and source, the expected flits (a head flit's
// route shifted by two bits); at each output packets must arrive whole, in
// order per source, and match exactly.
// Mechanism counters, each required to be non-zero: contention at a shared
// output, an output held by a packet while another input waits (wormhole
// lock), a full output buffer blocking a request, an input stalled by
// backpressure, multi- and single-flit packets, and traffic on each of the 7
// connections that the switch keeps. route_err must never rise.
module tb_noc_switch;
  import noc_pkg::*;

  localparam int N = 4;
  // the kept connections, as in the switch's default CONN (row = output)
  localparam logic [N-1:0][N-1:0] CONN = {4'b1101, 4'b1100, 4'b0010, 4'b0001};

  logic          clk = 0, rst_n = 0;
  logic  [N-1:0] in_valid, in_ready, out_valid, out_ready, route_err;
  flit_t [N-1:0] in_flit, out_flit;

  noc_switch dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  // scoreboard: expected flits per output and source input
  flit_t exp_q [N][N][$];
  int    cur_src [N];          // source of the packet being received, -1 none
  int    conn_pkts [N][N];
  int    n_multi = 0, n_single = 0, n_contend = 0, n_lock_wait = 0;
  int    n_buf_full = 0, n_in_stall = 0, n_flits_out = 0;
  bit    random_phase = 0;

  // per-input packet source state
  int    pkt_left [N];
  int    pkt_dest [N];
  int    pkt_len  [N];
  logic  [N-1:0] taken = '0;

  function automatic int pick_dest(input int i);
    int d;
    do d = $urandom_range(0, N - 1); while (!CONN[d][i]);
    return d;
  endfunction

  function automatic flit_t make_flit(input int i, input bit head, input bit tail, input int dest);
    flit_t f;
    f.head = head;
    f.tail = tail;
    f.data = $urandom;
    f.data[31:24] = 8'(i);
    if (head) f.data[1:0] = 2'(dest);
    return f;
  endfunction

  function automatic flit_t expect_out(input flit_t f);
    flit_t e = f;
    if (f.head) e.data[ROUTE_W-1:0] = f.data[ROUTE_W-1:0] >> 2;
    return e;
  endfunction

  // output side checker (samples just before each rising edge)
  task automatic check_outputs();
    for (int o = 0; o < N; o++) begin
      if (out_valid[o] && out_ready[o]) begin
        int s;
        n_flits_out++;
        if (out_flit[o].head) begin
          check(cur_src[o] < 0, "head inside a packet");
          cur_src[o] = int'(out_flit[o].data[31:24]);
        end
        s = cur_src[o];
        if (s < 0 || s >= N || exp_q[o][s].size() == 0) begin
          check(0, $sformatf("unexpected flit at output %0d", o));
        end else begin
          flit_t e = exp_q[o][s].pop_front();
          check(out_flit[o] == e, $sformatf("flit at output %0d from input %0d", o, s));
          check(int'(out_flit[o].data[31:24]) == s, "packet interleaved with another");
        end
        if (out_flit[o].tail) begin
          if (s >= 0 && s < N) conn_pkts[o][s]++;
          if (out_flit[o].head) n_single++; else n_multi++;
          cur_src[o] = -1;
        end
      end
    end
  endtask

  // mechanism counters from the switch's internal state
  always @(negedge clk) if (random_phase) begin
    n_in_stall += $countones(in_valid & ~in_ready);
    if ($countones(dut.g_out[2].g_port.req) > 1) n_contend++;
    if ($countones(dut.g_out[3].g_port.req) > 1) n_contend++;
    if (dut.g_out[3].g_port.u_arb.locked &&
        (dut.g_out[3].g_port.req & ~(3'b1 << dut.g_out[3].g_port.u_arb.owner)) != '0) n_lock_wait++;
    if (dut.g_out[2].g_port.u_arb.locked &&
        (dut.g_out[2].g_port.req & ~(2'b1 << dut.g_out[2].g_port.u_arb.owner)) != '0) n_lock_wait++;
    if (!dut.g_out[3].g_port.avail && |dut.g_out[3].g_port.req) n_buf_full++;
    if (!dut.g_out[2].g_port.avail && |dut.g_out[2].g_port.req) n_buf_full++;
    if (!dut.g_out[0].g_port.avail && |dut.g_out[0].g_port.req) n_buf_full++;
    check(route_err == '0, "route_err");
  end

  initial begin
    int t_acc, t_out, first;
    for (int o = 0; o < N; o++) cur_src[o] = -1;
    for (int i = 0; i < N; i++) pkt_left[i] = 0;
    in_valid = '0; in_flit = '0; out_ready = '1;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- phase 1: latency and streaming rate on an idle switch ----
    @(negedge clk);
    in_flit[1] = make_flit(1, 1, 1, 1);
    in_valid[1] = 1'b1;
    exp_q[1][1].push_back(expect_out(in_flit[1]));
    #4;
    check(in_ready[1], "idle input accepts");
    t_acc = cycle;
    @(negedge clk);
    in_valid[1] = 1'b0;
    t_out = -1;
    for (int c = 0; c < 10 && t_out < 0; c++) begin
      #4;
      if (out_valid[1]) t_out = cycle;
      check_outputs();
      @(negedge clk);
    end
    check(t_out - t_acc == 2, $sformatf("latency %0d cycles, expected 2", t_out - t_acc));
    // 4-flit packet, offered back to back
    for (int f = 0; f < 4; f++) begin
      in_flit[1] = make_flit(1, f == 0, f == 3, 1);
      in_valid[1] = 1'b1;
      exp_q[1][1].push_back(expect_out(in_flit[1]));
      #4;
      check(in_ready[1], "streaming input accepts every cycle");
      check_outputs();
      @(negedge clk);
    end
    in_valid[1] = 1'b0;
    first = -1;
    for (int c = 0; c < 10; c++) begin
      #4;
      if (out_valid[1]) begin
        if (first < 0) first = cycle;
        check(cycle - first < 4 && out_flit[1].data[31:24] == 8'd1, "one flit per cycle");
      end
      check_outputs();
      @(negedge clk);
    end
    check(exp_q[1][1].size() == 0, "streamed packet complete");

    // ---- phase 2: random traffic ----
    random_phase = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      automatic bit drain = (cyc >= 19000);
      in_valid = in_valid & ~taken;
      taken = '0;
      for (int i = 0; i < N; i++) begin
        if (!in_valid[i] && !drain) begin
          if (pkt_left[i] == 0 && $urandom_range(0, 3) == 0) begin
            pkt_len[i]  = $urandom_range(1, 4);
            pkt_left[i] = pkt_len[i];
            pkt_dest[i] = pick_dest(i);
          end
          if (pkt_left[i] > 0 && $urandom_range(0, 4) != 0) begin
            in_flit[i]  = make_flit(i, pkt_left[i] == pkt_len[i], pkt_left[i] == 1, pkt_dest[i]);
            in_valid[i] = 1'b1;
          end
        end
        // finish packets already started during the drain
        if (!in_valid[i] && drain && pkt_left[i] > 0) begin
          in_flit[i]  = make_flit(i, pkt_left[i] == pkt_len[i], pkt_left[i] == 1, pkt_dest[i]);
          in_valid[i] = 1'b1;
        end
      end
      // outputs stall in bursts
      for (int o = 0; o < N; o++)
        out_ready[o] = drain || ((cyc / 64) % 2 == 0) ? ($urandom_range(0, 9) != 0)
                                                       : ($urandom_range(0, 9) < 3);
      #4;
      for (int i = 0; i < N; i++)
        if (in_valid[i] && in_ready[i]) begin
          exp_q[pkt_dest[i]][i].push_back(expect_out(in_flit[i]));
          pkt_left[i]--;
          taken[i] = 1'b1;
        end
      check_outputs();
      @(negedge clk);
    end
    random_phase = 0;

    for (int o = 0; o < N; o++)
      for (int i = 0; i < N; i++) begin
        check(exp_q[o][i].size() == 0, $sformatf("all flits from %0d to %0d delivered", i, o));
        if (CONN[o][i]) check(conn_pkts[o][i] > 20, $sformatf("connection %0d->%0d used", i, o));
        else check(conn_pkts[o][i] == 0, $sformatf("no traffic %0d->%0d", i, o));
      end
    check(n_contend > 0, "contention");
    check(n_lock_wait > 0, "wormhole lock held off an input");
    check(n_buf_full > 0, "full output buffer");
    check(n_in_stall > 0, "input backpressure");
    check(n_multi > 0 && n_single > 0, "multi- and single-flit packets");
    $display("mechanisms: contention=%0d lock_wait=%0d buf_full=%0d in_stall=%0d multi=%0d single=%0d flits=%0d",
             n_contend, n_lock_wait, n_buf_full, n_in_stall, n_multi, n_single, n_flits_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
