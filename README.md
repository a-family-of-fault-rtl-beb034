# Fault-tolerant RUFT networks in SystemVerilog

A fat-tree is the usual indirect network for large parallel machines. It is
bidirectional and needs 3k² switching elements per switch. With
destination-based deterministic routing (DESTRO), a packet's downward path in
a fat-tree depends only on its destination. The downward half can then be
folded into plain wires. The result is RUFT, a *unidirectional* multistage
network:

- N stages of k×k switches.
- Nodes inject into stage 0.
- The last stage is wired straight back to the nodes.

RUFT costs about half as much as a fat-tree and performs about as well. But
each source–destination pair has exactly one path, so any broken link
disconnects someone.

This RTL builds three extensions of RUFT that spend the hardware saved by
going unidirectional on extra links:

| `TOPO`        | injection / network / ejection links | network link faults tolerated | injection/ejection faults tolerated |
|---------------|--------------------------------------|-------------------------------|-------------------------------------|
| `RUFT_PL`     | 2 / 2 parallel / 2, all to one switch | 1 | 1 |
| `FT_RUFT_212` | 2 disjoint / 1 / 2 disjoint           | 3 | 1 |
| `FT_RUFT_222` | 2 disjoint / 2 parallel / 2 disjoint  | 7 | 1 |

`FT_RUFT_222` is the default. It has the same link count and switch degree as
a fat-tree, roughly twice its throughput, and sixteen paths per
source–destination pair. The default size is a 4-ary 3-tree: 64 nodes,
3 stages of 16 switches, and 8×8 switches in the 222 variant.

## How a packet finds its way

**Numbering.** Nodes are numbered 0…k^N−1 and read as N base-k digits
p_{N−1}…p_0. Switch `<s,o>` is switch o of stage s, where o has N−1 base-k
digits.

**Base RUFT wiring (k-ary n-tree pattern).** Output digit j of a stage-s
switch goes to the stage-(s+1) switch whose digit s is replaced by j. It
enters that switch on the input numbered by the old digit.

**Routing.** A switch at stage s routes on digit s of the destination.
Whichever switch a packet enters, after the last stage it sits on the single
last-stage switch `o = dest mod k^{N−1}`. Output `p_{N−1}` of that switch
leads to the node.

**Copies.** Every port is numbered `copy*k + digit`. The digit is fixed by
the destination. The copy (0 or 1) is the freedom the extended topologies
add:

- **Parallel links** (RUFT-PL, FT-RUFT-222): every switch-to-switch
  connection is a pair. The two links are interchangeable, so a switch may
  use either copy of the output its digit selects.
- **Disjoint injection** (FT variants): node p's second injection link goes
  to the first-stage switch of node `p XOR (k^N/2)`, the node whose most
  significant bit is inverted. That switch lies in the other half of the
  network, so the two injection points share no path.
- **Disjoint ejection** (FT variants): last-stage output digit j, copy 1,
  is the *secondary* ejection link of node `(j*k^{N−1}+o) XOR 1`. A packet
  for node d can therefore also be routed *as if it were going to d XOR 1*
  and taken off at the end by that node's neighbour switch. Only digit 0
  differs between d and d XOR 1. So the choice is made once, at stage 0, by
  choosing between the outputs for digit `d_0` and for `(d XOR 1)_0`. The
  switch records the choice in the packet's `sec` bit, and the last stage
  uses `sec` as the output copy. Stages in between see the same digits
  either way.
- In RUFT-PL both ejection links of a node come from the same switch, so
  the copy is simply picked at the last stage.

**Selection.** Wherever more than one output is legal, the switch takes the
one whose downstream input buffer has the most free space. Free space is the
credit count, and the lowest port wins a tie. The network interface makes the
same choice between its two injection links, breaking ties with an LFSR.

The table below gives the legal outputs and the number of paths for each
stage. The counts are at the default k=4, N=3.

| stage | RUFT-PL | FT-RUFT-212 | FT-RUFT-222 |
|-------|---------|-------------|-------------|
| injection | 2 links, same switch | 2 links, disjoint switches | 2 links, disjoint switches |
| 0 | 2 copies of digit d_0 | digit d_0 or (d⊕1)_0 | both copies of both digits (4) |
| middle | 2 copies | 1 | 2 copies |
| last | 2 ejection copies | copy = sec | copy = sec |
| paths (N=3) | 2·2·2·2 = 16, all through the same switches | 2·2 = 4, as disjoint as the wiring allows | 2·2·2·2 = 16; 8 network links must fail to cut a pair |

## Faults and the reachability network

Faults are static. One bit per link marks it broken: `inj_fault`,
`net_fault` and `ej_fault`. Change the bits only while the network is empty.
A broken link really is broken in the RTL: anything sent into it is lost.

Avoiding a fault is not a local decision. At stage 0, a healthy output can
still lead into a dead end two stages later. Each switch therefore has a
small combinational *reachability* stage:

- `out_reach[p][key]` says that output p is healthy **and** a healthy path
  continues beyond it for the routing key `{sec, dest}`. There are 2·k^N
  keys.
- The switch ANDs this with its static table of legal outputs. It ORs the
  result per key into `can_reach`, which is the same statement about the
  link feeding the switch.
- The network chains these stages backwards, from the ejection links
  through every stage to the injection links.
- At stage 0 of the FT variants, an output's key is rewritten with the
  `sec` value that output implies.

The selection logic then only considers legal outputs whose `out_reach` bit
is set. The interface only injects on a link whose `inj_reach` bit is set for
the destination. Any fault set that leaves at least one path per pair is
therefore routed around completely. The reachability logic is purely
combinational and unidirectional, so it has no loops. Its size is 2·k^N bits
per switch port: 128 at the default size.

The reachability mechanism is this design's own. The topology description
assumes that packets can take "any of the non-faulty available paths", but
leaves the routing mechanism that achieves this open.

## Inside a switch

`ruft_switch` is a virtual cut-through switch with one input buffer per port
and no virtual channels. Each buffer holds two packets.

1. **Buffer write.** A flit arriving on an input is written into the buffer
   and is visible one cycle later.
2. **Routing (4 cycles).** When a head flit reaches the front of its buffer,
   the input spends `ROUTE_CYC` cycles routing it.
3. **Selection and arbitration (1 cycle).** The input requests the usable
   output with the most credits. An output is usable when it is:
   - legal,
   - reachable,
   - idle, and
   - holding at least one packet's worth of credits.

   Each output has a round-robin arbiter. A loser re-selects next cycle,
   possibly choosing a different output.
4. **Transfer.** The winner holds the output until its tail flit has left.
   Flits pop one per cycle and cross the crossbar into an output register
   (1 cycle). A popped flit returns a credit upstream.

Links are register chains: 1 cycle between stages and on injection, and
`N*FLY+1` cycles from the last stage to the nodes. Credits travel back with
the same delay.

The zero-load latency, from the cycle `tx_ready` is seen to the cycle
`rx_valid` pulses, is

    (1+F) + (N−1)(R+3+F) + (R+2) + (N·F+1) + (P−1) + 1

F is the link flight, R the routing cycles and P the packet length in flits.
At the default size this is 156 cycles.

## Node interface (`ruft_nic`)

**Transmit.** A node offers a packet with `tx_valid`, `tx_dest` and
`tx_data`. The interface accepts it with `tx_ready` in the same cycle if an
injection link is:

- idle,
- able to reach the destination, and
- backed by room for a whole packet in the switch buffer it feeds.

The packet leaves on that link as `PKT_FLITS` one-byte flits:

- the head flit carries `tx_data`;
- flit f carries `tx_data + f`.

The two links work independently, so a node can inject up to two flits per
cycle.

**Receive.** Both ejection links are always accepted. At each tail flit,
`rx_valid[c]` pulses with the head byte. `rx_err[c]` flags a packet that was
misaddressed, had the wrong length or had no head.

Every flit carries a 19-bit routing sideband next to its 8-bit payload
(`ruft_pkg::flit_t`):

- `head`,
- `tail`,
- `sec`,
- a 16-bit `dest`.

## Parameters and sizes

| parameter (`ft_ruft_network`) | default | meaning |
|---|---|---|
| `TOPO` | `FT_RUFT_222` | `RUFT_PL`, `FT_RUFT_212` or `FT_RUFT_222` |
| `K`, `N` | 4, 3 | arity and stages: k^N nodes, N·k^{N−1} switches |
| `PKT_FLITS` | 128 | packet length: 128-byte packets of one-byte flits |
| `BUF_PKTS` | 2 | input buffer size in packets |
| `ROUTE_CYC` | 4 | routing delay per switch |
| `FLY` | 1 | link flight time |

At the default size the network has:

- 48 switches with 8 inputs each, so 384 input buffers of 256 flits × 27
  bits (about 2.6 Mbit of buffering);
- 256 network links;
- 128 injection and 128 ejection links.

The N ≥ 2 stages are required. Node ids must fit 16 bits.

Faulty bits are numbered as follows:

- `inj_fault[2p+c]` and `ej_fault[2p+c]`: link c of node p.
- `net_fault[(s·k^{N−1}+o)·k·C + port]`: an output of switch `<s,o>`, for
  s < N−1. C is 2 for parallel-link variants and 1 for FT-RUFT-212.

The event outputs give one bit per switch, with bit `s·k^{N−1}+o` belonging
to switch `<s,o>`:

- `ev_copy1`: a copy-1 output was granted.
- `ev_sec`: a stage-0 switch chose secondary ejection.
- `ev_blocked`: a routed head was not granted.
- `ev_fault_avoid`: a fault removed a legal output.

## Where this RTL makes its own choices

The topology, the routing rule, the free-buffer selection and the random tie
at injection follow the topology description. So do the timing values
(routing 4, crossbar 1, link flight 1, ejection flight stages+1) and the
two-packet buffers. The following are this design's own choices:

- **Flit size.** One byte per flit, inferred: with it, the zero-load
  latency of a 4-ary 3-tree with 128-byte packets comes out at the
  ~150-cycle level reported for these networks.
- **Credits instead of an "output buffer".** The selection criterion is
  described in terms of free buffer space at the switch port. Here it is
  read as the free space of the downstream input buffer, measured by
  credits.
- **Pipeline.** The one-cycle buffer write and the one-cycle
  selection/arbitration stage are not specified. Nor are round-robin
  arbitration, lowest-port tie breaking inside switches or synchronous
  active-low reset.
- **The `sec` bit** travels with the packet. The last stage does not
  recompute the secondary choice from the switch number.
- **The reachability network** used to avoid faults (see above).
- **An ideal sink at the nodes.** Ejection never back-pressures.
- **Parallel injection.** Both injection links of a node may be active at
  once.
- **Fixed packet length** (`PKT_FLITS`). The head flit is recognised by a
  sideband bit, not by parsing a header.
- **Static fault bits.** Fault detection and the stop/reconfigure/resume
  step of the static fault model are outside the RTL.

## Files

- `rtl/ruft_pkg.sv`: flit type, topology enum, port counts and the
  legal-output function.
- `rtl/ruft_flit_fifo.sv`: input buffer.
- `rtl/ruft_rr_arbiter.sv`: round-robin arbiter.
- `rtl/ruft_link.sv`: delayed link with credit return.
- `rtl/ruft_switch.sv`: the switch.
- `rtl/ruft_nic.sv`: node interface.
- `rtl/ft_ruft_network.sv`: the whole network (top).
- `tb/`: one self-checking testbench per module.
  - `tb/ruft_net_bench.sv` and `tb/ruft_net_checker.sv` are the end-to-end
    harness: traffic generator, scoreboard, and an independent path
    enumerator that decides whether a fault set is tolerable.
  - `tb/tb_ft_ruft_network.sv` runs all three topologies at 8 nodes with
    the tolerated number of random faults.
  - `tb/tb_ruft_workloads.sv` runs hot-spot, complement and shuffle traffic.
  - `tb/tb_ft_ruft_network_full.sv` runs the default 64-node network, with
    no parameters overridden. It checks the 156-cycle zero-load latency.
    It then breaks seven network links and one injection link and runs
    uniform, hot-spot, complement and shuffle traffic in turn.
  - None of the testbenches measures saturation throughput or sweeps the
    load; they check delivery and mechanisms.

Each testbench prints `TB_RESULT checks=… failures=…`.

## Simulating

    verilator --binary --timing --assert -y rtl -y tb rtl/ruft_pkg.sv \
        tb/tb_ft_ruft_network.sv --top-module tb_ft_ruft_network
    ./obj_dir/Vtb_ft_ruft_network

Replace the testbench name to run another one. Expected C++ build times for
the network testbenches are 1–3 minutes: the full 64-node configuration takes
about 3 minutes to build. To try another topology or size, change the
parameters of `ruft_net_bench` in a testbench. `ruft_net_bench` picks random
link faults of a given count, keeps them only if its path enumerator says
every pair stays connected, and then requires every packet to arrive.
