# Code-disjoint fault detection and location for a 4x4 mesh NoC

A network-on-chip needs to find out where a fault is, as well as whether
there is one. If a fault is permanent, a recovery mechanism has to route
around the broken part. A faulty switch takes all of its links out of service
with it. A faulty link removes only that link.

This design makes every switch *code-disjoint* with one parity bit per flit.
A correctly encoded flit that enters a switch also leaves it correctly
encoded. A flit that arrives wrongly encoded is never passed on. Each switch
checks parity twice:

| check | where | compares | flag | an error means |
|---|---|---|---|---|
| input check | every input port | parity of the received data, P_i(X_i), with the received parity bit X_pi | `lef` (link error flag) | the link that feeds this port is faulty |
| output check | every output port | parity of the outgoing data, P_o(X_o), with the parity bit that *entered* with the flit | `sef` (switch error flag) | this switch corrupted the flit |

The output port does not compute a new parity bit. It sends on the incoming
parity bit unchanged. A flit corrupted inside a switch therefore cannot pick
up a valid code word there. It is stopped at that switch's output check, so
the error is blamed on that switch alone. A flit corrupted on a link is
stopped at the next input check, so the error is blamed on that link alone.

Compare this with checking only at the destination, which leaves the whole
path as a suspect. Checking only at switch inputs leaves two suspects: the
previous switch and the link between them. Here every flag points at exactly
one resource.

The method follows the code-disjoint detection scheme described by Grecu,
Ivanov, Saleh, Sogomonyan and Pande in "On-line Fault Detection and Location
for NoC Interconnects". The RTL, and every detail that the scheme leaves open,
belongs to this design. Those details are listed in the section "Choices made
here, and departures".

## The network

- 4 x 4 mesh: 16 switches and 16 IP cores.
- 64-bit flits.
- Messages of 4 flits.
- Dimension-order (e-cube) routing: x first, then y.
- Wormhole switching.

The network is built from these modules:

```
 core n ──ip_tx──► cdd_ni ──(flit+parity)──► cdd_switch (x,y) ◄──► 4 neighbour switches
 core n ◄─ip_rx─── cdd_ni ◄─(flit+parity)─── cdd_switch (x,y)
                                     lef, sef, rx_err ──► fault_map
```

- `cdd_noc_mesh` is the top level. Switch `n = 4*y + x` sits at column `x`
  and row `y`.
  - North is `y+1` and east is `x+1`.
  - Ports are numbered N=0, E=1, S=2, W=3, local=4 (`cdd_pkg::port_e`).
  - Ports on the mesh edge are left unconnected: never valid, never ready.
    Dimension-order routing never uses them.
- `cdd_ni` is the network interface of one core.
  - It adds the parity bit to each flit the core injects, so a flit is a code
    word from the moment it enters the network.
  - It checks the parity of each flit it ejects to the core, just like a
    switch input does. An error there raises `rx_err`, which blames the
    ejection link.
  - The interface works at flit level. The core builds its own messages.
- `fault_map` turns the flags into sticky marks, which stay set until
  `fault_clear`:
  - `lef[n][p]` marks the link that enters switch `n` through port `p`. Port 4
    is the injection link from core `n`.
  - `sef[n][*]` marks switch `n`.
  - `rx_err[n]` marks the ejection link of core `n`.
  - From the marks it derives `link_usable` and `eject_usable`. A link is
    unusable if it is marked itself, or if the switch at either end is marked.

### Flit format

`cdd_pkg::flit_t` is what travels on a link and sits in a buffer:

| field | width | |
|---|---|---|
| `head` | 1 | first flit of a message |
| `tail` | 1 | last flit of a message |
| `data` | 64 | payload. In a head flit, `data[1:0]` is the destination x and `data[3:2]` is the destination y, so `data[3:0]` is the destination node number |
| `par`  | 1 | even parity of `data` |

Parity covers only the 64 data bits. `head` and `tail` belong to the small
control part of the switch, which the scheme deliberately leaves uncoded.
Only the data path is made code-disjoint. The cores use `ip_flit_t`, which is
the same flit without `par`.

## Inside the switch (`cdd_switch`)

This is the core of the design:

```
 in_flit[i] ─┬─► P_i ─► ≠ X_pi ? ─► lef[i] ──► in_ready[i] low, flit not stored
             └─► input FIFO[i] ─► xy_route (head flits)
                        │
                        ▼  per output: rr_arbiter among head flits, then the
                 routing block       output is held by that input until its tail
                        │
                        ▼ X_o (err_inject may flip a bit here)
                      P_o ─► ≠ carried X_pi ? ─► sef[o] ──► flit not sent
                        │
                        ▼
 out_flit[o] = {head, tail, X_o, X_pi}, out_valid[o]
```

**Handshake and retransmission.** Every link uses valid/ready. A flit moves
in a cycle where both are high, and `ready` acts as the acknowledge.

The flit that an output offers is the head entry of an input FIFO. That entry
is removed only when the next hop acknowledges it, so the FIFO head is the
one-flit retransmission buffer for the outgoing link. The two error cases
then work as follows:

- **Link error.** The receiving input raises `lef` and holds `ready` low. The
  flit is not stored and not routed. The sender keeps offering the same
  buffered flit, so a transient error costs one cycle.
- **Switch error.** The output raises `sef` and holds `valid` low. The
  original flit is still in this switch's input FIFO. Next cycle it passes
  through the routing block again.
- **Permanent fault.** Retrying cannot succeed, so the flit waits and its
  flag stays raised every cycle. Routing around a marked resource is the job
  of a recovery layer, which is not part of this design.

**Timing.**
- A flit accepted at an input in cycle t can leave on an output in cycle
  t+1. The path from the FIFO head through the routing block and the output
  check to the link is combinational.
- A message streams at one flit per cycle.
- `in_ready` depends combinationally on the arriving data, through the input
  check. The acknowledge path from one switch to the next is therefore: FIFO
  head → routing block → link → next switch's parity tree → `ready`.
- The flags are combinational and last one cycle per detected error.
  `fault_map` registers them.

**Arbitration.**
- Each output has a round-robin arbiter (`rr_arbiter`) that chooses among
  the head flits routed to it.
- The priority moves only when a flit actually leaves.
- After a head flit leaves, the output stays reserved for that input until
  the tail flit leaves. Messages are never interleaved on a link.

**Error-injection hooks.** These are not part of the detection scheme. They
exist so the scheme can be exercised. Tie them low in normal use.
- `err_inject[o]` with `err_bit` flips one data bit at the routing block
  output of a switch.
- At the top level, `sw_inject` drives the same hook.
- `link_inject[n][p]` flips a bit on the link that enters switch `n` through
  port `p`.
- `eject_inject[n]` flips a bit on the ejection link of core `n`.

## Parameters

| name | where | default | notes |
|---|---|---|---|
| `MESH_X`, `MESH_Y` | `cdd_pkg` | 4, 4 | evaluated configuration |
| `FLIT_W` | `cdd_pkg` | 64 | evaluated configuration |
| `MSG_FLITS` | `cdd_pkg` | 4 | message length; used by the testbenches, the hardware only follows head/tail |
| `FIFO_DEPTH` | `cdd_noc_mesh`, `cdd_switch` | 4 | design choice: one message per input |
| `X`, `Y` | `cdd_switch`, `xy_route` | 0 | position of the switch, set by the mesh |

The mesh size and flit width are package constants because the flit struct
and the header layout depend on them. If you change the mesh size, the header
still fits as long as `XW + YW` bits fit in the data.

## Choices made here, and departures

The scheme fixes the two checks, the flags, the forwarding of the incoming
parity bit, dropping a flit at the input on a link error, and not forwarding
it on a switch error. The following items are this design's own:

- **One FIFO per port, not two.** The scheme's switch drawing shows a FIFO on
  both the inbound and the outbound lane of every port. Here only the inbound
  FIFO exists. A flit crosses to its output combinationally. This keeps an
  unsent original of every flit in the input FIFO, which is what makes the
  retry after a switch error possible. It also makes each hop a single
  pipeline stage. The scheme says only that the data path is pipelined, not
  how deep.
- **What follows a switch error.** The scheme says only that a flit failing
  the output check is not forwarded. Routing it again from the input FIFO is
  this design's choice.
- **Retransmission buffer.** The scheme uses one-flit retransmission buffers
  per switch. Here the head of each input FIFO serves as that buffer rather
  than a separate register.
- **Five ports.** The scheme's drawing shows the four mesh ports. The fifth,
  local port connects the core.
- **Other open details**, all chosen here:
  - wormhole switching with head/tail sideband bits;
  - the header layout;
  - even parity;
  - round-robin arbitration;
  - the valid/ready acknowledge;
  - asynchronous active-low reset;
  - x before y in dimension order.
- **Fault map policy.** Any single flag marks a resource until it is cleared.
  The map makes no attempt to tell transient faults from permanent ones, and
  the scheme specifies no such rule.
- **Not built.** The two schemes that the method was compared against
  (end-to-end and flit-level switch-to-switch retransmission) are not built.
  Neither is a power model or a rerouting mechanism.

## Measured behaviour

`tb_noc_workload` runs uniform random traffic at default parameters:
- 4-flit messages to a random other core;
- 2000 cycles for each point;
- a flit error modelled as a bit flip on any link, with the given
  probability per link and cycle.

Each corrupted flit was detected at the receiving end and sent again. Every
message arrived intact. In one run:

| injection rate | flit error rate | mean latency (cycles) | accepted (flits/cycle/core) |
|---|---|---|---|
| 0.10 | 0.001 % | 7.2 | 0.10 |
| 0.10 | 4 % | 8.1 | 0.10 |
| 0.25 | 0.001 % | 8.6 | 0.25 |
| 0.25 | 1 % | 9.0 | 0.25 |
| 0.25 | 4 % | 9.7 | 0.25 |

Latency is counted from the moment a message is created at its source until
its tail reaches the destination core, so it includes source queueing. At
these loads the network does not saturate, because each switch hop takes a
single cycle. A network with deeper switch pipelines will show higher
absolute latencies and saturate earlier. The trend should be the same:
because errors are stopped at the first check that sees them, the cost of a
detected error stays at about one cycle per retry.

A third sweep keeps every core's queue full, to measure the effective
throughput at saturation: the flits actually delivered per cycle and core
while errors force retransmissions. Across the error rates it stayed between
0.51 and 0.54 flits/cycle/core. At 3-4 % flit errors it was about 2 % below
the low-error runs, which is within the run-to-run noise of a 2000-cycle
measurement.

Power was not estimated; these are RTL simulations only.

## Files

`rtl/`:
- `cdd_pkg.sv`: sizes, `flit_t`, `ip_flit_t`, `port_e`, header helpers.
- `parity_predict.sv`: parity prediction block (XOR tree), used for P_i,
  for P_o and in the interfaces.
- `flit_fifo.sv`: first-word-fall-through input buffer.
- `xy_route.sv`: dimension-order output selection.
- `rr_arbiter.sv`: round-robin arbiter.
- `cdd_switch.sv`: the code-disjoint switch.
- `cdd_ni.sv`: parity encoder and checker between a core and its switch.
- `fault_map.sv`: sticky fault marks and usable-link map.
- `cdd_noc_mesh.sv`: top level, the 4 x 4 mesh.

`tb/`: one self-checking testbench per module, `tb_<module>.sv`. Two of them
go beyond a single module:
- `tb_cdd_noc_mesh.sv`, the end-to-end test at default parameters:
  - It first replays a two-fault example. A message from (0,2) to (2,3)
    crosses a faulty switch at (1,2). A message from (0,0) to (3,3) crosses a
    faulty link from (1,0) to (2,0). While each fault lasts, the held flit
    must be caught again at every retry. Only that switch and then only that
    link may be marked, and both messages must arrive once the fault is gone.
  - It then runs uniform traffic with random errors on links and in switches,
    plus back-pressure. Every cycle, every flag must match an injected error
    at the same place. Every message must arrive once, in order and intact.
  - It counts each mechanism (link, switch and ejection errors, stalls, marks,
    links disabled by a faulty switch) and fails if one never occurred.
- `tb_noc_workload.sv`, the sweep above.

Each testbench prints `TB_RESULT checks=N failures=M` and stops on a
watchdog if it hangs.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_cdd_noc_mesh \
    -Irtl -y rtl -y tb +libext+.sv rtl/cdd_pkg.sv tb/tb_cdd_noc_mesh.sv
./obj_dir/Vtb_cdd_noc_mesh
```

To run another test, replace `tb_cdd_noc_mesh` with the testbench you want,
for example `tb_cdd_switch` or `tb_noc_workload`. Every test runs in well
under a second.

The simulator has two states, so every register read by the logic is reset.
The FIFO storage is the exception: an entry is only read after it has been
written.

`cdd_switch` also carries a concurrent assertion: no flit leaves an output in
a cycle where that output's check has failed. `--assert` enables it.
