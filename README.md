# 4 x 3 on-chip crossbar switch with round-robin scheduling

A crossbar lets every input port of a switch talk to any output port, and
lets different input/output pairs talk at the same time. What it cannot do
is let two inputs talk to the same output in the same cycle: each output
needs a scheduler that picks one of the inputs competing for it, and picks
fairly, so that no input is starved. This RTL is such a switch with four
input ports (I0..I3) and three output ports (O0..O2). Each output port has
its own round-robin arbiter with a rotating priority; its priority search is
built entirely from three-input majority gates, the logic primitive of
quantum-dot cellular automata (QCA), so that the netlist maps directly onto a
QCA layout while still being ordinary synthesizable logic for CMOS.

## Structure

```
crossbar_switch                  top: ports, scheduler + fabric
├── xbar_scheduler               destination decode, one arbiter per output
│   └── rr_arbiter  x NO         4-way round robin, registered one-hot grant
│       └── maj3    (many)       majority gate: AND/OR of the priority chain
└── crossbar_core                AND-OR multiplexer per output
xbar_pkg                         sizes (N_IN=4, N_OUT=3, DATA_W=8) and types
```

All files are in `rtl/`, one module or package per file.

## How a word crosses the switch

Every input port has a valid bit, a destination and a data word:
`req_valid[i]`, `req_dest[i]` (output number) and `in_data[i]`. An input asks
for one output at a time.

| cycle | input side | switch |
|-------|------------|--------|
| t | raise `req_valid[i]`, set `req_dest[i]` | requests sampled at the rising edge ending cycle t |
| t+1 | sees `in_grant[i]`, drives its word on `in_data[i]` | `out_valid[j]`, `out_src[j] = i`, `out_data[j] = in_data[i]` |

A grant lasts exactly one cycle and carries one word. An input that lost
keeps its request up and is served at a later edge. An input that won and
has nothing more to send drops `req_valid` during its grant cycle; if it
keeps requesting, it competes again at the next edge (where, having just won,
it now has the lowest priority at that output). All three outputs can carry
a word in the same cycle. The data path through the fabric is
combinational: the word driven during the grant cycle appears on the output
in the same cycle. Register it at the output if the next stage needs a flop
boundary.

Reset (`rst_n`) is synchronous and active low. It clears all connections and
gives input 0 the highest priority at every output.

## The round-robin arbiter (`rr_arbiter`)

This is the core of the design. Each output's arbiter holds a one-hot
register `prio` that marks the input with the highest priority. At each
clock edge it grants the first requesting input found when counting upward
from `prio`, wrapping past input N-1 to input 0. It then moves `prio` to the
input just after the winner. The winner thus falls to the lowest priority,
and an input that keeps requesting is served within N-1 edges however the
other inputs behave. With no request at all the priority stays where it is.

Example, right after reset (input 0 has the highest priority):

| edge | r0 r1 r2 r3 | grant | new highest priority |
|------|-------------|-------|----------------------|
| 1 | 1 1 0 0 | g0 | input 1 |
| 2 | 0 1 0 0 | g1 | input 2 |

### Priority search as a majority-gate chain

A majority gate `maj(a,b,c)` is an AND when `c = 0` and an OR when `c = 1`.
The arbiter is built from these and inverters only:

1. **Mask.** `mask[i] = prio[0] | ... | prio[i]`, a chain of OR gates. This
   is a thermometer code that is 1 at the priority position and above.
2. **Search chain, 2N stages.** Stage k (k < N) looks at `req[k] & mask[k]`:
   the requests at or above the priority position. Stage N+k looks at
   `req[k]` unmasked, which covers the wrap-around. A "seen" signal runs down
   the chain. Each stage computes `hit = elig & ~seen_in` and
   `seen_out = seen_in | elig`. So only the first eligible stage hits.
3. **Merge.** `grant_next[i] = hit[i] | hit[N+i]`. At most one stage hits, so
   the result is one-hot or zero.
4. **Register.** At the clock edge `grant <= grant_next`. If anyone won, then
   `prio <= grant_next` rotated up by one position.

The chain's delay grows linearly with N (2N majority stages). That is fine
at N = 4; for a much wider arbiter a parallel-prefix search would be faster.

The arbiter carries assertions: the grant is one-hot or zero, it only goes
to an input that requested at the sampling edge, and `prio` is always
one-hot. `xbar_scheduler` asserts that no input is connected to two outputs
at once. `crossbar_switch` asserts that the scheduler and the fabric agree on
which outputs are active.

## Scheduler and fabric

`xbar_scheduler` turns the (valid, destination) pairs into one 4-bit request
vector per output and runs one `rr_arbiter` on each vector. Each input names
a single destination, so the grants of the three arbiters can never connect
one input to two outputs. No second matching step between outputs is
needed. The scheduler also reports, per output, whether it is connected and
the input's number (`out_src`), and per input whether it was granted
(`in_grant`).

`crossbar_core` is the fabric. For each output it ANDs every input word with
that input's grant bit and ORs the results together. With no grant the
output carries zero and `out_valid` is low.

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `N_IN` / `NI` | 4 | `xbar_pkg`, modules | input ports |
| `N_OUT` / `NO` | 3 | `xbar_pkg`, modules | output ports |
| `DATA_W` / `DW` | 8 | `xbar_pkg`, modules | word width |
| `N` | 4 | `rr_arbiter` | requesters per arbiter |

The port types `dest_t` and `src_t` come from the package. To change the
port counts, edit `N_IN` and `N_OUT` in `xbar_pkg`, not just the module
parameters, so that the index widths follow.

## What is specified and what is chosen here

These follow the switch's definition:

- 4 inputs by 3 outputs.
- One selection per output by highest priority.
- Round-robin rotating priority, with input 0 first.
- Grants taken at the clock edge, one per cycle.
- Logic built from three-input majority gates.

These are choices of this implementation:

- Request encoding as valid plus destination.
- 8-bit data width.
- Synchronous reset.
- Priority held when idle.
- One-hot priority register.
- Exact structure of the majority-gate chain.
- Combinational AND-OR fabric.
- One-cycle connections with no locking for longer transfers.

"Round-robin with rotating priority" is read as the common form, where the
input after the last winner becomes highest. A variant that rotates the
priority every cycle whether or not anyone won would also fit that phrase;
it is not what is built here.

Not in the RTL: the QCA cell layout and its four-phase QCA clocking. These
are properties of the physical layout. A synthesizable netlist cannot express
them. The same goes for area and power figures of a QCA or CMOS
implementation.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.

| testbench | what it checks |
|-----------|----------------|
| `tb_maj3` | all 8 input combinations; the AND and OR configurations |
| `tb_rr_arbiter` | the two-edge example above with one-edge grant latency; strict rotation under full load; 3000 random cycles against an integer-pointer model; reset |
| `tb_crossbar_core` | 2000 random words and grant patterns against index selection |
| `tb_xbar_scheduler` | 4000 random cycles against a model with one pointer per output |
| `tb_crossbar_switch` | end to end at default sizes (details below) |

In `tb_crossbar_switch`, 1600 words are sent with heavy contention on output
0. The test checks:

- Every word is delivered once, in order, to the right output and with the
  right `out_src`.
- No requested output is ever left idle.
- An input that keeps requesting is granted within 3 edges.

It also counts how often each switch mechanism happened and fails if one
never did: contention, priority wrap-around, all outputs busy at once, an
idle output beside a busy one, and a lost arbitration later won.

Run any testbench with plain Verilator from the directory that holds `rtl/`
and `tb/`, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/xbar_pkg.sv rtl/maj3.sv rtl/rr_arbiter.sv rtl/xbar_scheduler.sv \
  rtl/crossbar_core.sv rtl/crossbar_switch.sv tb/tb_crossbar_switch.sv \
  --top-module tb_crossbar_switch -Mdir obj_tb
./obj_tb/Vtb_crossbar_switch
```

All testbenches finish in well under a second. The whole design is about 250
word-level cells and 24 flip-flops after coarse synthesis: three 4-bit grant
registers and three 4-bit priority registers.
