// switch_traffic_check: traffic generator and scoreboard around one
// noc_switch of any size and connectivity matrix, for testbenches.
//
// Every input with a connected output sends packets of 1 to 4 flits to random outputs that CONN
// allows for it, with random gaps; outputs stall at random. Flits carry their
// source input in data[31:24]. A per-output, per-source queue of expected
// flits (head flits with the route shifted right by PORT_W) checks that
// packets arrive whole, in order and unchanged. At the end every allowed
// connection must have carried packets, no other connection any, outputs
// without connections must never have been valid, and route_err must never
// have risen. Results are counted in `checks` and `failures`; `done` rises
// when the run is over.
module switch_traffic_check
  import noc_pkg::*;
#(
  parameter int N_IN  = 4,
  parameter int N_OUT = 4,
  parameter logic [N_OUT-1:0][N_IN-1:0] CONN = '1,
  parameter int CYCLES = 8000
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int PORT_W = (N_OUT > 1) ? $clog2(N_OUT) : 1;

  logic  [N_IN-1:0]  in_valid, in_ready, route_err;
  flit_t [N_IN-1:0]  in_flit;
  logic  [N_OUT-1:0] out_valid, out_ready;
  flit_t [N_OUT-1:0] out_flit;

  noc_switch #(.N_IN(N_IN), .N_OUT(N_OUT), .CONN(CONN)) dut (.*);

  flit_t exp_q [N_OUT][N_IN][$];
  int    cur_src [N_OUT];
  int    conn_pkts [N_OUT][N_IN];
  int    pkt_left [N_IN], pkt_dest [N_IN], pkt_len [N_IN];
  logic  [N_IN-1:0] taken = '0;

  // input i has at least one connected output
  function automatic bit reaches(input int i);
    for (int o = 0; o < N_OUT; o++) if (CONN[o][i]) return 1'b1;
    return 1'b0;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %m %s at %0t", what, $time);
    end
  endtask

  function automatic int pick_dest(input int i);
    int d;
    do d = $urandom_range(0, N_OUT - 1); while (!CONN[d][i]);
    return d;
  endfunction

  function automatic flit_t make_flit(input int i, input bit head, input bit tail, input int dest);
    flit_t f;
    f.head = head;
    f.tail = tail;
    f.data = $urandom;
    f.data[31:24] = 8'(i);
    if (head) f.data[PORT_W-1:0] = PORT_W'(dest);
    return f;
  endfunction

  function automatic flit_t expect_out(input flit_t f);
    flit_t e = f;
    if (f.head) e.data[ROUTE_W-1:0] = f.data[ROUTE_W-1:0] >> PORT_W;
    return e;
  endfunction

  initial begin
    done = 0; checks = 0; failures = 0;
    for (int o = 0; o < N_OUT; o++) begin
      cur_src[o] = -1;
      for (int i = 0; i < N_IN; i++) conn_pkts[o][i] = 0;
    end
    for (int i = 0; i < N_IN; i++) pkt_left[i] = 0;
    in_valid = '0; in_flit = '0; out_ready = '0;
    @(posedge rst_n);
    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      automatic bit drain = (cyc >= CYCLES - 1000);
      @(negedge clk);
      in_valid = in_valid & ~taken;
      taken = '0;
      for (int i = 0; i < N_IN; i++) begin
        if (!in_valid[i] && pkt_left[i] == 0 && !drain && reaches(i) && $urandom_range(0, 3) == 0) begin
          pkt_len[i]  = $urandom_range(1, 4);
          pkt_left[i] = pkt_len[i];
          pkt_dest[i] = pick_dest(i);
        end
        if (!in_valid[i] && pkt_left[i] > 0 && (drain || $urandom_range(0, 4) != 0)) begin
          in_flit[i]  = make_flit(i, pkt_left[i] == pkt_len[i], pkt_left[i] == 1, pkt_dest[i]);
          in_valid[i] = 1'b1;
        end
      end
      for (int o = 0; o < N_OUT; o++)
        out_ready[o] = drain || ($urandom_range(0, 9) < (((cyc / 50) % 2 == 0) ? 9 : 3));
      #4;
      check(route_err == '0, "route_err");
      for (int o = 0; o < N_OUT; o++) begin
        if (CONN[o] == '0) check(!out_valid[o], "unconnected output stays idle");
        if (out_valid[o] && out_ready[o]) begin
          int s;
          if (out_flit[o].head) begin
            check(cur_src[o] < 0, "head inside a packet");
            cur_src[o] = int'(out_flit[o].data[31:24]);
          end
          s = cur_src[o];
          if (s < 0 || s >= N_IN || exp_q[o][s].size() == 0) check(0, "unexpected flit");
          else begin
            automatic flit_t e = exp_q[o][s].pop_front();
            check(out_flit[o] == e, "flit contents");
          end
          if (out_flit[o].tail) begin
            if (s >= 0 && s < N_IN) conn_pkts[o][s]++;
            cur_src[o] = -1;
          end
        end
      end
      for (int i = 0; i < N_IN; i++)
        if (in_valid[i] && in_ready[i]) begin
          exp_q[pkt_dest[i]][i].push_back(expect_out(in_flit[i]));
          pkt_left[i]--;
          taken[i] = 1'b1;
        end
    end
    for (int o = 0; o < N_OUT; o++)
      for (int i = 0; i < N_IN; i++) begin
        check(exp_q[o][i].size() == 0, $sformatf("flits from %0d to %0d delivered", i, o));
        if (CONN[o][i]) check(conn_pkts[o][i] > 10, $sformatf("connection %0d->%0d used", i, o));
        else check(conn_pkts[o][i] == 0, $sformatf("no traffic %0d->%0d", i, o));
      end
    done = 1;
  end
endmodule
