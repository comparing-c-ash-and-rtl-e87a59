# A small static dataflow processor with an explicit token store

This processor has no program counter. A program is a dataflow graph: every
node is a two-input operation (add, subtract or multiply), and every arc carries
a *token*, a 16-bit value tagged with the node and input (left or right) it is
meant for. A node *fires* as soon as both of its operands have arrived. It
then sends its result to between one and four destinations, each of which is
either another node or the outside world. Execution is driven entirely by
operands arriving.

Operands that wait for their partner sit in an *explicit token store*: one slot
per node, addressed by node number, with a presence bit. When a token arrives,
its node's slot is checked. If the slot is empty, the token waits there. If it
is full, the node fires and the slot is emptied. Matching therefore costs one
memory lookup, with no associative search.

The machine is a ring of three units, each with a FIFO on its input:

```
            in_*  ──►┌──────────── router ─────────────┐
                     │ ext FIFO ─┐                     │
                     │           ├─► control ──────────┼──► out_*  (tokens marked "out")
                     │ int FIFO ─┘      │              │
                     └──▲───────────────┼──────────────┘
                        │               ▼ token
                        │   ┌────────── matcher ───────────┐
                        │   │ FIFO ─► control ◄─► token store (128 × value + presence)
                        │   │            ▲─────► program memory (128 × op + 4 dests)
                        │   └────────────┼─────────────────┘
                        │                ▼ extended token (op1, op2, op, d1..d4)
                        │   ┌─────────── ALU ──────────────┐
                        └───┤ control ◄── function unit ◄── FIFO
                    token   └──────────────────────────────┘
```

Every connection carries a valid bit (a token is there or not) and a `full`
line going back the other way. A unit acts only when its input FIFO has a token
and the FIFO it writes to is not full. The processor is itself built as a
dataflow graph, with the same firing rule.

## Tokens, instructions and programs

All types are in `rtl/dfp_pkg.sv`.

| type | fields | bits |
|---|---|---|
| `dest_t` | `to_out`, `node` (7), `side` (L=0, R=1) | 9 |
| `token_t` | `value` (signed 16), `dest` | 25 |
| `mdest_t` | `valid`, `dest` (an optional destination) | 10 |
| `instr_t` | `op` (ADD=0, SUB=1, MUL=2), `dests[3:0]` | 42 |
| `extoken_t` | `op1`, `op2`, `op`, `dests[3:0]` | 74 |

A program is one `instr_t` per node: the operation, plus up to four
destinations packed from `dests[0]` upward. Its input values are sent in as
tokens addressed to the nodes that consume them. A value needed by two nodes
is sent twice.

A destination with `to_out` set does not name a node. The router sends such a
token out of the processor, and the 7-bit `node` field is free. The tests use
it as an output tag, so that results can be told apart.

Example: `((i0+i1) - (i2*i3)) * ((i0+i1) + (i2*i3))` with inputs 1, 2, 3, 4.

| node | op | destinations |
|---|---|---|
| 0 | ADD | (2,L) (3,L) |
| 1 | MUL | (2,R) (3,R) |
| 2 | SUB | (4,L) |
| 3 | ADD | (4,R) |
| 4 | MUL | out |

The input tokens are 1→(0,L), 2→(0,R), 3→(1,L) and 4→(1,R). One token leaves,
with the value −135.

## The units, cycle by cycle

All three units handle at most one token per clock cycle. Their outputs are
combinational from their FIFO heads, and every FIFO adds one cycle.

**Router** (`rtl/router.sv`). If the internal FIFO (results from the ALU)
holds a token, the router serves that one; otherwise it serves the external
FIFO. The priority is strict: a waiting internal token is never overtaken. The
chosen token goes to `out_*` if it is marked `to_out`, and to the matcher
otherwise. It moves only when that output is not full.

**Matcher** (`rtl/matcher.sv`, with `token_store.sv` and
`program_memory.sv`). The head token's node number addresses both memories in
the same cycle, since both are read asynchronously and written synchronously.

- If the slot is empty, the value is stored and the presence bit is set. This
  needs no space downstream.
- If the slot is occupied, the matcher sends an extended token to the ALU and
  clears the slot. The left operand becomes `op1` and the right operand `op2`;
  the stored value's side is implied by the arriving token's side. The opcode
  and destinations come from the program memory. If the ALU FIFO is full, the
  matcher waits.

The token store keeps only values. Their destinations are implied by the slot
and by the partner token.

**ALU** (`rtl/alu.sv`, `rtl/function_unit.sv`). The function unit is
combinational, and its result wraps to 16 bits. A 2-bit pointer `cd` selects
the destination being served. Each cycle, one of three cases applies:

1. The output is full. Nothing happens, and `cd` is kept.
2. An entry is waiting. The ALU sends `(result, d[cd])`. If `d[cd+1]` is valid,
   `cd` advances. Otherwise `cd` returns to 0 and the entry is removed from the
   FIFO.
3. There is no entry. `cd` returns to 0.

A node with k destinations therefore keeps the ALU busy for k cycles, and a
busy ALU produces one token every cycle. An entry with no valid destination is
dropped.

**FIFO** (`rtl/fifo.sv`). This is a show-ahead ring buffer. Its parameters are
the element type `T` and `DEPTH`. It has `rd_valid`/`rd_data`/`rd` on the read
side and `wr_valid`/`wr_data`/`full` on the write side. An assertion flags a
write while full.

## Back pressure and why one FIFO is large

The ring of bounded buffers can deadlock. Here is how:

1. The router's head token waits for the matcher.
2. The matcher's head completes a match and waits for the ALU.
3. The ALU waits for the router's internal FIFO.

If all three FIFOs are full at once, nothing moves again. Fan-out makes this
likely: each ALU entry can turn into four tokens. With 4-entry FIFOs
everywhere, random 48-node graphs locked up in this way.

This design removes the cycle at the router. The internal FIFO
(`INT_FIFO_DEPTH`) defaults to `NUM_NODES × MAX_DEST = 512` entries, one per
possible arc.

Take a program in which every node fires once, so that one set of inputs is
processed at a time. It has at most one live token per arc, so the internal
FIFO can never fill. Because of that, the ALU is never blocked by the router
for good. The only thing that can hold the ALU up is the outside world keeping
`out_full` high, and that clears when the outside world frees up.

The other FIFOs stay small (`FIFO_DEPTH = 4`). If you shrink
`INT_FIFO_DEPTH`, you get back-pressure stalls in the ALU, and the deadlock
becomes possible again for programs with much fan-out.

The machine is a *static* dataflow machine. There is one slot per node and no
acknowledgement arcs. Starting a second set of inputs before the first has
drained can therefore put two tokens on the same side of a node. That is not
detected. Run one set of inputs at a time, and wait until the outputs are back
before sending the next.

## Interface of the top, `processor`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst` | in | clock; synchronous active-high reset (empties FIFOs, clears presence bits, resets ALU pointer) |
| `in_valid`, `in_token`, `in_full` | in, in, out | external tokens. Send only while `in_full` is low. |
| `out_valid`, `out_token`, `out_full` | out, out, in | tokens leaving. `out_valid` is never high while `out_full` is high. |
| `prog_we`, `prog_addr`, `prog_data` | in | write one program memory entry per cycle, before sending tokens |
| `st_*` | out | one-cycle event pulses for monitoring: internal-over-external arbitration, store, fire, matcher stall, extra destination sent, ALU stall |

Parameters: `FIFO_DEPTH` (4), `INT_FIFO_DEPTH` (512) and `NODES` (128).
Memory contents are not reset. At default sizes, coarse synthesis gives about
170 word-level cells, 180 flip-flop bits and 20.7 kbit of memory:

| memory | size |
|---|---|
| program memory | 5376 bits |
| token store values | 2048 bits, plus 128 presence flip-flops |
| router internal FIFO | 12.8 kbit |

Measured latency at the defaults, counted from the first input token offered:

| program | last result appears in cycle |
|---|---|
| the example | 15 |
| the four-point FFT | 41 |

## Relation to the published design

This RTL implements the dataflow processor described in *Comparing CλaSH and
VHDL by implementing a dataflow processor*. The following follow that
description:

- the router, matcher and ALU ring
- a FIFO with `full` back pressure on every input
- internal priority in the router
- 16-bit words, 7-bit node numbers with a left/right side, and 128 nodes
- the token store with presence bits, and a program memory of an opcode with
  four optional destinations
- store-or-fire matching that deletes the stored operand
- single-cycle add/subtract/multiply
- the ALU's three-case destination sequencing
- memories with synchronous write and asynchronous read

These are this implementation's own choices, because the description leaves
them open:

- all FIFO depths, and the 512-entry internal FIFO with its deadlock argument
- the `to_out` flag that encodes "out" destinations
- the program-load port, since no loading mechanism is given
- the opcode encoding, and 16-bit wrap-around
- left operand = `op1`
- the matcher storing tokens while the ALU is blocked
- dropping an ALU entry that has no destinations
- the reset behaviour

The description also mentions a second, hand-coded variant of the ALU. That
variant has separate instruction and operand FIFOs and an instruction word
with an explicit destination count. It does the same job as the ALU here and
is not built separately.

## Simulation

Testbenches are in `tb/`. Each one checks itself and ends with
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_fifo`, `tb_function_unit`, `tb_token_store`, `tb_program_memory` | units against reference models |
| `tb_matcher` | store/fire sequence from a random legal token stream, with ALU back pressure |
| `tb_alu` | results and destination order; one token per cycle; nothing sent while full |
| `tb_router` | cycle-exact arbitration and routing against a model |
| `tb_core` | matcher + ALU running whole programs, with the testbench acting as the router |
| `tb_processor` | the full processor at default size: the example, the FFT on 21 input sets, random graphs up to 128 nodes. Checks every output value, that the token store is empty afterwards, and that each mechanism occurred. |
| `tb_processor_bp` | the same with a 4-entry internal FIFO, so that the ALU and the matcher stall on back pressure; it uses small programs |

`tb/tb_graph_pkg.sv` builds the programs and computes their reference results
in plain integer arithmetic:

- the example graph
- a radix-2 four-point FFT, checked against the direct DFT sum
  X[k] = Σ x[m]·(−j)^(mk)
- random acyclic graphs

To run one, for example:

```
verilator --binary --timing --assert -y rtl -y tb -Irtl \
    rtl/dfp_pkg.sv tb/tb_graph_pkg.sv tb/tb_processor.sv --top-module tb_processor
./obj_dir/Vtb_processor
```

For the unit benches, leave out `tb/tb_graph_pkg.sv` and change the top module.
`verilator --lint-only -Wall -y rtl rtl/dfp_pkg.sv rtl/processor.sv` lints the
whole design without warnings.
