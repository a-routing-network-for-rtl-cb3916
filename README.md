# Operand network for a grid processor

A grid processor spreads its functional units over a two-dimensional array of
nodes. A block of instructions is mapped onto the array and every instruction
fires when its operands arrive, so results travel from node to node instead of
over a broadcast bypass network. The speed of the machine then hinges on how
fast an operand crosses one hop of the network.

This RTL implements such an operand network: a 4 x 4 array of small routers,
each linked to the three nodes of the row below it (lower-left, below,
lower-right) and to the three of the row above. The central idea is to **send
the routing information one cycle ahead of the data**. Every link is a pair of
channels:

* a **control channel** carrying a 7-bit packet with the operand's relative
  destination, and
* an **operand channel** carrying the 32-bit operand itself, always one cycle
  behind its control packet.

A control packet is decoded and arbitrated for in the cycle it arrives. When
the operand turns up a cycle later, its path through the router is already
chosen, and in the common case it only passes a register and a multiplexer.
The same advance notice drives flow control. A router knows a cycle early
which operands it will have to store, and it throttles a producer before its
buffer can overflow. No acknowledgements are needed.

## Topology and addressing

```
 row 0     (0,0)  (0,1)  (0,2)  (0,3)      <- first-row inputs are ports
             | \  / | \  / | \  / |
             |  \/  |  \/  |  \/  |         each node drives three links:
             |  /\  |  /\  |  /\  |         lower-left, below, lower-right
 row 1     (1,0)  (1,1)  (1,2)  (1,3)
             ...
 row 3     (3,0)  (3,1)  (3,2)  (3,3)      <- last-row outputs are ports
```

Every link goes down one row, so an operand needs exactly `dy` hops to reach a
node `dy` rows below, and it can shift at most one column per hop. A
destination is therefore reachable when `|dx| <= dy` and it lies inside the
grid.

Addresses are **relative**. A control packet holds `dx` (signed column offset,
3 bits) and `dy` (rows still to go, 2 bits). Each router compares them with zero:

| packet            | decision                                   | packet sent on           |
|-------------------|--------------------------------------------|--------------------------|
| `dx = 0, dy = 0`  | operand is for this node (for-here)        | nothing                  |
| `dx < 0`          | output 0, lower-left                       | `dx+1, dy-1`             |
| `dx = 0, dy > 0`  | output 1, below                            | `dx, dy-1`               |
| `dx > 0`          | output 2, lower-right                      | `dx-1, dy-1`             |
| `dy = 0, dx != 0` | unreachable: assertion fails               | nothing                  |

Routing is static and deterministic: diagonal hops are taken first, then
straight down. A one-bit `slot` field travels unchanged. It tells the consuming
node which operand buffer (first or second operand) the value is for.

Input `k` of a router comes from the node at column `c+k-1` of the row above,
through that node's output `2-k`. Links that would leave the grid on the left
or right do not exist. Their inputs are idle and their outputs are held
throttled, so a router never sends on them.

## One hop, cycle by cycle

This is the part to understand before changing anything. Suppose a control
packet arrives on input `i` in cycle `t`. Its operand arrives on the same input
in cycle `t+1`.

| cycle | control side                                                                 | operand side                                                       |
|-------|------------------------------------------------------------------------------|--------------------------------------------------------------------|
| `t`   | decoder picks output `o` and rewrites the destination; chooser `o` arbitrates | —                                                                  |
| `t+1` | if granted: the new packet is on `ctrl_out[o]` (registered in the control switch) | operand arrives; it is captured by the input's delay register, or written to the operand FIFO if its control was buffered |
| `t+2` | —                                                                            | operand switch puts the operand on `op_out[o]`                     |

So a hop costs one cycle on both channels, and the one-cycle gap between
control and operand is the same on every link. Without the delay register on
the bypass path, an operand would catch up with its control packet after one
hop.

A packet that is **not** granted in cycle `t`, because another input won the
output or the next node is throttling it, is written to its input's **control
FIFO**. It has already been decoded, so the FIFO holds the output direction
together with the rewritten packet. Its operand goes into the **operand FIFO**
of the same input in `t+1`. The two FIFOs hold the same packets in the same
order, with the operand FIFO one cycle behind. From the head of the control
FIFO the packet asks its chooser again every cycle. When it is granted in cycle
`s`, the packet leaves in `s+1` and the operand is read from the operand FIFO
and leaves in `s+2`.

A fresh packet may bypass the buffers only if its input's control FIFO is
empty. Operands from one input therefore leave in the order they came.
Operands from different inputs may overtake each other.

A packet addressed to this node raises `here_next[i]` in cycle `t`, straight
from the decoder. In `t+1`, `here_valid[i]` and `here_slot[i]` are high, and
`here_data[i]` is the operand arriving on input `i` at that moment. Up to
three operands per cycle can be delivered, one per input.

The early flag lets a node's processor answer at once. Seeing `here_next`, it
can select the instruction that waits for the operand and announce that
instruction's result on `alu_ctrl` in the same cycle `t`. The operand arrives
in `t+1`, and the result is driven on `alu_op` in `t+1` as well. This is the
longest combinational path of the design: decoder, then the processor's
instruction select, then the ALU decoder, the chooser and the control
multiplexer, all within one cycle.

The local processor is a fourth source. It announces a result with `alu_ctrl`
in cycle `t` and drives the result on `alu_op` in `t+1`. The ALU decoder
treats the announcement like an incoming packet, except that a result always
leaves the node.

End to end, an operand announced in cycle `t` and addressed `h` rows down is
delivered (`here_valid`) in cycle `t+h+1` when nothing contends with it.

## Multicast

A processor result often feeds more than one instruction. With the parameter
`ALU_TARGETS = 2` a result can be announced with two destinations at once:
`alu_ctrl[0]` and `alu_ctrl[1]` in cycle `t`, and one value on `alu_op` in
`t+1`. The router then duplicates the processor's path. Each destination gets
its own ALU decoder, control FIFO, operand FIFO and delay register, and both
copies of the path capture the same result. The two copies compete for their
output channels on their own, like two independent sources. They may leave in
the same cycle, or one may wait in its buffer. `throttle_alu` rises when either
path runs short of room.

Copies are made only where the result is produced. A packet inside the
network always has a single destination, so the network, the decoders and the
packet format are the same with or without multicast. Each router then has
five sources and its choosers ten candidates, which adds one multiplexer level
to the output switches. The default, `ALU_TARGETS = 1`, is the plain router
with one processor path.

## Arbitration

There is one chooser per output channel. It sees eight candidates (ten with
multicast): the head of each control FIFO (three network inputs, then the
processor's path or paths), then the freshly decoded packet of each of the
same sources. Priority is **static** and the lowest index wins. Buffered
operands therefore go before new ones, and input 0 goes before input 2, with
the processor last. When `throttle_in` of the
output is high, nobody is granted.

Static priority can starve an input under sustained load. A round-robin
chooser would remove that, but only `chooser.sv` would have to change.

## Flow control

Each input, and the processor port, has its own FIFO pair, so only the
producer that fills a buffer is throttled. For each source the router counts
reserved slots. A slot is reserved when a control packet is buffered and freed
when its operand leaves. At the end of every cycle, if `DEPTH - reserved <=
THROTTLE_SLOTS` (default 2), the registered `throttle_out` for that source
rises. A producer must not send a control packet on a cycle in which it sees
throttle high.

Why two slots are enough: the throttle reaches the producer one cycle after
the router decides to raise it. In that window at most one more packet arrives
(the one already on the wire), and one more may be sent before the producer
sees the signal. Each needs a slot. The router asserts that a buffer is never
overrun. In random traffic at full load the buffers never fill completely.

`throttle_alu` back-pressures the local processor in the same way.

## Interfaces

Types are in `gpa_router_pkg`:

```systemverilog
typedef struct packed { logic valid; logic signed [2:0] dx; logic [1:0] dy; logic slot; } ctrl_t; // 7 bits
typedef struct packed { logic valid; logic [31:0] data; } op_t;                                  // 33 bits
```

The `valid` bit of `op_t` is not needed by the receiver, which knows from the
control packet when an operand comes. It marks the cycles in which a link is
in use.

`gpa_grid` (the top) has these ports:

| port | direction | meaning |
|------|-----------|---------|
| `clk`, `rst_n` | in | clock, synchronous active-low reset |
| `top_ctrl_in[c][k]`, `top_op_in[c][k]` | in | the three input channels of each first-row node (register-file side) |
| `top_throttle[c]` | out | their throttles |
| `bot_ctrl_out[c][o]`, `bot_op_out[c][o]` | out | outputs of the last row |
| `bot_throttle_in[c]` | in | throttles for them |
| `alu_ctrl[r][c][t]`, `alu_op[r][c]` | in | each node's results: announcement in `t` (one per target `t < ALU_TARGETS`), value in `t+1` |
| `throttle_alu[r][c]` | out | back-pressure to each node's processor |
| `here_next[r][c]` | out | per input channel: an operand for this node comes next cycle |
| `here_valid[r][c]`, `here_slot[r][c]`, `here_data[r][c][k]` | out | operands delivered to each node, per input channel |

A packet entering a first-row node from the top edge carries its destination
relative to that node, and that node decodes it.

## Modules

| file | what it is |
|------|------------|
| `gpa_router_pkg.sv` | grid size, widths, `ctrl_t`, `op_t`, `route_t`, `dir_e` |
| `gpa_grid.sv` | top: the `ROWS x COLS` array and its wiring |
| `gpa_router.sv` | one router: ties the parts below together, slot counting, throttles, for-here delivery |
| `dest_decoder.sv` | decoder of one incoming control channel |
| `alu_decoder.sv` | decoder of the processor's announcements |
| `ctrl_fifo.sv` | FIFO of decoded control packets |
| `operand_fifo.sv` | FIFO of operands |
| `chooser.sv` | static-priority arbiter of one output channel |
| `ctrl_switch.sv` | registered control multiplexer of the outputs |
| `operand_switch.sv` | operand multiplexer, with the two-cycle grant pipeline and FIFO pops |
| `bypass_latch.sv` | one-cycle delay of every operand input |

Parameters and their defaults:

| parameter | default | where | origin |
|-----------|---------|-------|--------|
| `GRID_ROWS`, `GRID_COLS` | 4, 4 | package; `ROWS`, `COLS` of `gpa_grid` | grid organisation of the target processor |
| fan-in / fan-out | 3 / 3 | package | original router design |
| `THROTTLE_SLOTS` | 2 | `gpa_router`, `gpa_grid` | original router design |
| `DEPTH` | 4 | `gpa_router`, `gpa_grid` | chosen here; the buffer size was left open |
| `ALU_TARGETS` | 1 | `gpa_router`, `gpa_grid` | 2 enables multicast; the plain router has 1 |
| `DATA_W` | 32 | package | chosen here |

The widths of `dx` and `dy` follow from `GRID_ROWS` and `GRID_COLS` in the
package. `ROWS` and `COLS` of `gpa_grid` may be made smaller than those, but
not larger.

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. To run one with Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/gpa_router_pkg.sv tb/tb_gpa_grid.sv --top-module tb_gpa_grid -o sim
./obj_dir/sim
```

Replace `tb_gpa_grid` with any other testbench name.

* `tb_gpa_grid` is the end-to-end test at the default size. A processor model
  at every node and producers at the top edge send about 29,000 operands with
  random reachable destinations at rising load. A scoreboard checks that each
  operand arrives exactly once, at the right node and slot, and never faster
  than one hop per cycle. A directed phase checks the exact `h+1` latency on
  an idle grid. The test counts bypasses, buffered packets, contention,
  throttling, held-back outputs, deliveries, processor results and top-edge
  injections, and fails if any of them never happened. Processors also
  answer the early for-here flag in the same cycle, which exercises the
  longest path. The test runs in well under a second.
* `tb_gpa_grid_mc` runs the same test with multicast (`ALU_TARGETS = 2`).
  About half of the results go to two nodes, and every copy is tracked.
* `tb_gpa_router` and `tb_gpa_router_mc` (multicast) drive one router with
  random traffic and random downstream throttles. They check the control-to-operand spacing, the rewritten packets,
  the t+1/t+2 latencies, and that nothing is sent on a throttled channel.
* The other testbenches each check one part against a reference computed in
  the testbench: exhaustively for the decoders, and with random stimulus for
  the FIFOs, chooser, switches and delay registers.

The assertions in the RTL check the protocol rules: no FIFO overflow or
underflow, no reachable-destination violation, the operand one cycle behind a
buffered control, and no processor result while throttled. With `--assert`, a
failing assertion stops the simulation.

## Where this RTL departs from, or goes beyond, the original design

* **Delay elements** are edge-triggered registers, not level-sensitive
  latches. The one-cycle behaviour is the same.
* **The processor's result** also passes a delay register, so it is treated
  exactly like a network input. The processor must drive its result one cycle
  after its announcement.
* **Candidate order** of the static priority (buffered before bypassing, input
  0 first, processor last) is a choice. Only the fact that priority is static
  comes from the original design.
* **Buffer depth 4, 32-bit operands, the packet layout and the `slot` field**
  are choices. So is the `valid` bit on the operand channel.
* **Edges:** off-grid links are tied off. A packet routed towards a missing
  link waits forever, so destinations must be reachable. The producer (the
  compiler, in a real machine) is responsible for that.
* **A result addressed to its own node** (`dy = 0` from the processor) is not
  supported and trips an assertion.
* **Not modelled:** the processor of each node (instruction and operand
  buffers, wake-up, ALU), the register-file banks, caches and load/store
  queues around the array, and the circuit-level parts (precharged operand
  drivers and wires). The processor side and the array edges are ports.
* **Multicast** happens only at the producing node, through the duplicated
  processor path. A multi-destination packet that splits inside the network
  was not built, because no format for such a packet was fixed.
* **Not built:** the alternatives the original design only proposes for later
  work. These are precomputed bypass control, multi-cycle ALU operations,
  adaptive routing, absolute addressing and out-of-order buffers. Gating
  idle links to save switching power was also left out. The valid bits of
  `ctrl_out` already say one cycle ahead which operand links will carry
  data, so a power-gating circuit could use them directly.

## Timing expectations

The RTL has a single clock. The control path inside one cycle runs through
the destination decoder, the processor's response to a for-here operand, the
ALU decoder, the chooser and the control multiplexer. That is the path the
original circuit study measured: about 460 ps in a 100 nm process and about
150 ps in 35 nm, before optimisation of the transistor sizes. In this RTL the
processor's response comes from outside, through `alu_ctrl`. A synthesis run
of this RTL will report its own numbers, which depend on the library.
