# Routing-aware customized NoC switch

In a network on chip where every route is fixed at design time, a switch
never needs most of its input-to-output paths. A conventional switch still
builds them all: every output has a multiplexer over all inputs and an
arbiter over all inputs. This switch builds only the paths that the
application's routes use. One parameter, a connectivity matrix, says which
inputs reach which outputs. From it, each output gets a multiplexer and an
arbiter sized for just those inputs, wired to just those inputs. Paths that no
route uses do not exist in the netlist, which saves crossbar and arbiter area
and power and shortens the input-to-output critical path.

The same RTL with an all-ones matrix is the conventional, fully connected
switch.

## The example switch

The default configuration is a 4x4 switch whose routes use 7 of the 16
possible connections:

| output | inputs routed to it | multiplexer | arbiter  |
|--------|---------------------|-------------|----------|
| 0      | 0                   | 1:1         | 1 input  |
| 1      | 1                   | 1:1         | 1 input  |
| 2      | 2, 3                | 2:1         | 2 inputs |
| 3      | 0, 2, 3             | 3:1         | 3 inputs |

The matrix removes 9 of 16 connections (56.25 %). A 1:1 multiplexer is only a
wire, and a 1-input arbiter only tracks packet boundaries. In the fully
connected switch, each of the four outputs would have a 4:1 multiplexer and a
4-input arbiter.

## How the connectivity matrix becomes hardware

`CONN` is a `logic [N_OUT-1:0][N_IN-1:0]` parameter of `noc_switch`.
`CONN[o][i] = 1` means "some route goes from input i to output o". For
example, the default is `{4'b1101, 4'b1100, 4'b0010, 4'b0001}`, with output 3
on the left. At elaboration time, for each output `o`:

* `noc_pkg::conn_count(CONN[o])` gives `K`, the number of connected inputs.
* `noc_pkg::conn_index(CONN[o], k)` gives the input number wired to leg `k`,
  for `k = 0 .. K-1`. Legs are taken in ascending input order.
* If `K > 0`, the switch instantiates `sw_arbiter #(.N(K))`,
  `sw_xbar_mux #(.N(K))` and one output buffer. Only the K connected inputs
  feed their request, tail and flit signals. The K-bit grant both selects the
  multiplexer leg and, mapped back through `conn_index`, tells that input that
  its flit was taken.
* If `K = 0`, the output gets no logic and stays idle.

An input can feed several outputs. Its "flit taken" signal is the OR of the
grants from all the outputs it connects to. Only one of them can be asserted,
because an input requests a single output at a time.

Routes are fixed at design time, so a flit that asks for a pruned connection
means the routes and `CONN` disagree. Such a flit is never granted and blocks
its input. `route_err[i]` shows the condition and an assertion reports it.

`CONN` has at most 32 columns (`noc_pkg::MAX_IN`).

## Datapath and timing

```
in_* --> [input register] --> req/flit --> [arbiter K] --gnt--> [mux K:1] --> [3-flit buffer] --> out_*
          decodes route                     per output           per output      per output
```

* **Input port** (`sw_input_port`): registers the flit so that the critical
  path starts at a flop. On a head flit it decodes the output port and keeps
  it for the rest of the packet.
* **Arbiter** (`sw_arbiter`): round robin. An output stays with one input from
  a head flit to its tail flit (wormhole switching). Other inputs wait even
  when the owner has a gap between flits. When the packet ends, priority moves
  to the input after the one that finished.
* **Crossbar multiplexer** (`sw_xbar_mux`): an AND-OR multiplexer on the
  arbiter's one-hot grant.
* **Output port** (`sw_output_port`): a 3-flit FIFO with the flow control of
  the output link. It accepts a flit only while it holds fewer than 3, so the
  downstream `out_ready` has no combinational path back into the arbiters.

Latency is two cycles. A flit accepted at clock edge t is in the input
register after t. It crosses arbiter and multiplexer and is written into the
output buffer at edge t+1, and it is offered on `out_*` after t+1. Each port
moves one flit per cycle. The combinational path runs from an input register
through the request decode, the arbiter and the multiplexer into the buffer.
This is the path that pruning shortens.

## Flits, packets and routing

These formats are this design's own. Only the switch structure and the
pruning follow the original description.

* `noc_pkg::flit_t` holds `head`, `tail` and 32 data bits. A one-flit packet
  has both `head` and `tail` set.
* Routing is source routing. The low 16 bits of a head flit are the route.
  Each switch reads the lowest `PORT_W` bits (`clog2(N_OUT)`, 2 for a 4-port
  switch) as its output number. It then shifts the 16-bit field right by
  `PORT_W` before the flit leaves, so the next switch finds its own field at
  the bottom. Body and tail flits pass unchanged.
* Links use a valid/ready handshake. A flit moves when both are high at a
  rising edge. `in_ready` may depend combinationally on the arbitration in
  the same cycle.
* Reset is asynchronous and active low. It clears all control state but not
  the buffer storage.

## Files

| file | content |
|------|---------|
| `rtl/noc_pkg.sv` | flit type, route field width, connectivity helper functions |
| `rtl/sw_input_port.sv` | input register and route decode |
| `rtl/sw_arbiter.sv` | N-input round-robin arbiter with packet locking |
| `rtl/sw_xbar_mux.sv` | N:1 one-hot multiplexer |
| `rtl/sw_output_port.sv` | output flit FIFO (default depth 3) |
| `rtl/noc_switch.sv` | the customized switch (top) |
| `tb/tb_*.sv` | self-checking testbench per module |
| `tb/tb_noc_switch_cfg.sv`, `tb/switch_traffic_check.sv` | the switch under other connectivity matrices |

Parameters of `noc_switch`: `N_IN` (4), `N_OUT` (4), `DEPTH` (3), `CONN`
(the table above) and `PORT_W` (derived). To build a switch for a different
set of routes, set `CONN` and the port counts. Nothing else changes.

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and ends. For
example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/noc_pkg.sv \
    tb/tb_noc_switch.sv --top-module tb_noc_switch -o sim
./obj_dir/sim
```

Add `-y tb` when building `tb_noc_switch_cfg`, which uses the helper
`switch_traffic_check`.

* `tb_noc_switch` runs the default switch end to end:
  * A directed phase checks the 2-cycle latency and the one-flit-per-cycle
    rate.
  * 20,000 cycles of random traffic follow. Packets have 1 to 4 flits and use
    only the routes the matrix allows. Outputs stall in bursts.
  * A scoreboard checks every flit: whole packets, order per source, and
    route shifting.
  * The test requires that contention, wormhole locking, full buffers and
    input backpressure all occur, and that each of the 7 connections carries
    traffic.
* `tb_noc_switch_cfg` runs the same kind of traffic through two other
  configurations. One is the fully connected 4x4 switch. The other is a 5x3
  switch in which one output has no connected input.
* The module testbenches check each block against a reference model:
  `tb_sw_input_port`, `tb_sw_arbiter` (1, 3 and 4 inputs), `tb_sw_xbar_mux`
  and `tb_sw_output_port`.

## Limits and departures

* Only the switch is given as RTL. The networks it is meant for are not
  included: a 5x3 mesh and a synthesized custom topology for a 30-core
  multimedia SoC, plus several other SoCs. Their routes, and so each
  switch's `CONN`, come from a topology-synthesis step whose results are not
  available here. A network is built by instantiating one `noc_switch` per
  router, each with its own `CONN`.
* The tool that derives `CONN` from a routing description is software and is
  not part of this RTL.
* The area, power and timing gains of the pruned switch are properties of
  synthesis in a given technology. Reported results for a 0.13 um library at
  500 MHz are about 28 % less switch area and 21 % less power on average, and
  a 4x4 critical path of about 0.57 ns instead of 1 ns. The testbenches check
  function only.
* Clock gating was used in the original evaluation. It is left to the
  synthesis flow and is not written into the RTL.
* The flit width (32 + 2 bits), the 16-bit route field, the round-robin
  policy, the valid/ready link protocol and the reset style are choices made
  here. None of them is specified by the original design.
