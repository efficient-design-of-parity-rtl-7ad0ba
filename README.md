# Parity-preserving non-restoring divider

This is an n-bit divider for unsigned integers. It runs the non-restoring
division algorithm on a datapath made only of reversible, parity-preserving
gates and latch storage. Reversible gates map their inputs one-to-one onto
their outputs. Parity-preserving gates also keep the XOR of all inputs equal
to the XOR of all outputs. In a fully reversible realisation, a single-bit
fault then shows up as a parity mismatch between a gate's inputs and outputs.

The RTL models the logic function of each gate and storage cell. It does not
model how they are built from quantum primitives. It simulates with any
SystemVerilog simulator and synthesises as ordinary logic (plus latches).

## Non-restoring division as built here

Three registers make up the datapath. The default is n = 8, set by
`pp_div_pkg::DIV_N`; the top-level parameter is `N`.

| register | width | kind | contents |
|---|---|---|---|
| M | n | latch register (`pp_register`) | divisor |
| Q | n | PIPO left-shift register (`pipo_lsr`) | dividend, replaced bit by bit by the quotient |
| A | n+1 | PIPO left-shift register (`pipo_lsr`) | signed partial remainder |

Each quotient bit takes two clocks:

1. **SHIFT**: A and Q shift left as one 2n+1-bit word. A takes Q's top bit.
   Q[0] takes the quotient bit from the previous step, which is NOT(sign of A).
2. **ADDSUB**: A is loaded with A − M if the previous A was non-negative, or
   with A + M if it was negative. Q holds.

The one non-obvious point is where the add/subtract decision comes from. The
rule depends on A's sign *before* the shift, and after the shift that sign is
gone from A. But the bit just shifted into Q[0] is exactly the complement of
that sign. So Q[0] is the control (1 = subtract), and no extra flag register
is needed. For the first step A = 0, so the first shift inserts a 1 and the
first step subtracts, as the algorithm requires.

The (n+1)-bit accumulator can overflow as it shifts, because 2r lies in
[−2M, 2M). This does no harm. The add or subtract that follows always brings
the value back into [−M, M), and two's-complement arithmetic modulo 2^(n+1)
gets it right.

After the n-th ADDSUB there is one more clock, **LASTQ**, in which only Q
shifts, to take in the last quotient bit. The last bit inserted by the first
SHIFT falls out of Q's top, so Q ends up holding exactly the n quotient bits.

**Remainder correction** needs no clock of its own. When the final A is
negative, Q[0] = 0, so the adder already computes A + M. The (n+1)-bit
multiplexer, steered by A's sign, puts either A or A + M on the `remainder`
output.

A division of n-bit operands therefore takes **2n + 2 clocks**, counting the
clock edge that accepts `start` (18 clocks at n = 8).

## The gates

All combinational logic is built from five reversible gates. Each module
implements the gate's truth table:

| module | gate | function | role in the divider |
|---|---|---|---|
| `dfg_gate` | Double Feynman | P=A, Q=A⊕B, R=A⊕C | fan-out of stored bits; copy and complement of each divisor bit (B=0, C=1) |
| `frg_gate` | Fredkin | P=A, Q=A?C:B, R=A?B:C | 2:1 multiplexer; the select passes through P to the next gate |
| `bhpf_gate` | BHPF | P=A, Q=A⊕B, R=B⊕C, S=A⊕B⊕D | three copies of the add/subtract control (A=C=D=0) |
| `tmb1_gate` | TMB1 | P=¬A, Q=¬(A⊕B), R=A⊕B⊕C⊕D, S=((A⊕B)?C:D)⊕AB, T=E⊕B⊕S | full adder with D=E=0 (R = sum, S = carry) |
| `n1_gate` | N1 | P=D?C:A, Q=B⊕P, R=A⊕C, S=D | forces the accumulator's load value to zero at start (C=0, D=clear) |

Outputs that the next stage does not use are the reversible circuit's
"garbage" outputs. They are left unconnected, and lint reports them as unused
signals. The tables of TMB1 and N1 are taken as the parity-preserving
permutations that these equations define. `tb_tmb1_gate.sv` and
`tb_n1_gate.sv` list the tables row by row.

## Blocks built from the gates

- **`d_latch`**: the storage cell. Q follows D while E = 1 and holds while
  E = 0. It has no reset.
- **`pp_register`**: one `d_latch` per bit with a shared enable. It holds the
  divisor. The sequencer opens it during the clock in which `start` is
  accepted.
- **`pipo_lsr`**: the PIPO (parallel-in, parallel-out) left-shift register.
  Each bit uses two Fredkin gates, one Double Feynman gate and one storage
  bit:

  | SV | E | next Q[i] |
  |---|---|---|
  | 1 | x | Q[i] (hold) |
  | 0 | 1 | I[i] (parallel load) |
  | 0 | 0 | Q[i−1] (shift left; `sin` enters bit 0) |

  The first Fredkin gate chooses between the load value and the lower
  neighbour. The second chooses between that and the bit's own value (hold).
  The Double Feynman gate, with two constant-0 inputs, makes three copies of
  the stored bit: one for the output, one fed back for hold, and one for the
  next bit. The mode lines E and SV pass from cell to cell through the
  Fredkin gates.
- **`frg_mux`**: W Fredkin gates sharing one select. The n-bit instance picks
  M or ¬M. The (n+1)-bit instance picks the remainder.
- **`tmb1_adder`**: a ripple-carry chain of TMB1 cells. Subtraction is
  A + ¬M + 1: the control is the carry-in and also the top operand bit,
  because M is zero-extended.
- **`div_control`**: the sequencer, with states IDLE → SHIFT → ADDSUB
  (repeated n times) → LASTQ → IDLE. It drives the two registers' (E, SV)
  mode pairs, the divisor latch enable and the accumulator clear.
- **`pp_nr_divider`**: the top. It wires all of the above together.

`pp_div_pkg` holds the mode type `lsr_mode_t` and its three constants, the
sequencer's state type, and `DIV_N`.

## Interface and timing (`pp_nr_divider`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; the registers update on the rising edge |
| `rst_n` | in | 1 | synchronous active-low reset of the sequencer only |
| `start` | in | 1 | start a division; sampled at a rising edge while `busy` is low |
| `dividend`, `divisor` | in | N | operands |
| `quotient`, `remainder` | out | N | results, valid while `done` is high |
| `busy` | out | 1 | high from the edge after `start` until `done` |
| `done` | out | 1 | rises 2N+2 edges after the accepting edge; stays high until the next `start` |

Timing rules:

- Hold `dividend` and `divisor` stable from the accepting rising edge until
  the next falling edge. The divisor latch is open while `start` is accepted
  and closes just after that edge. After that, the inputs may change freely.
- `start` is ignored while `busy` is high. If `start` is still high when the
  sequencer returns to IDLE, a new division starts.
- A zero divisor gives quotient 2^N − 1 and remainder = dividend.
- The data registers have no reset. Every division loads them first.

## Storage and clocking

The document's cost figures count one latch per register bit. A shift
register made of single transparent latches on one enable would let a bit
ripple through several stages while the enable is high. So here each bit of
the two shift registers uses **two** `d_latch` cells in master-slave form
(`pp_dff`): the master is open while `clk` is low and the slave while it is
high. The divisor register never shifts, so it keeps one latch per bit.

Lint tools model latches as combinational logic. They therefore report a
combinational loop through the hold path of `pipo_lsr`. That loop is never
open in the hardware, because a master and its slave are never transparent
at the same time.

## Where this RTL departs from, or goes beyond, the source design

The source design specifies:

- the component list: n-bit and (n+1)-bit multiplexers, an n-bit register,
  n-bit and (n+1)-bit PIPO left-shift registers, an (n+1)-bit adder and
  assorted fan-out gates;
- the gate truth tables;
- the shift-register mode table;
- the algorithm.

The following are this design's own choices:

- **Wiring:** how the components connect, including the use of Q[0] as the
  add/subtract control and the combinational remainder correction.
- **Gate roles:** which gate serves which fan-out. In particular, the roles
  given to BHPF and N1 are choices made here.
- **Sequencer:** the sequencer, its two-clocks-per-bit schedule, the
  start/busy/done handshake and the reset.
- **Storage:** master-slave storage in the shift registers, as described in
  the previous section.
- **Adder:** the adder is a plain TMB1 ripple chain. It uses 2 constant
  inputs and 3 garbage outputs per bit, so its cost is not the cost quoted
  for the source's adder.
- **Width:** the default width n = 8. The source keeps n symbolic.

Not modelled:

- quantum cost;
- constant-input and garbage-output counts;
- gate delays;
- any parity checker. The gates preserve parity, but nothing here compares
  parities at run time.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=… failures=…`:

- **The five gates:** exhaustive checks against their truth tables, plus
  checks that each gate is a permutation and preserves parity.
- **`d_latch`, `pp_register`:** random transparent/hold sequences.
- **`pipo_lsr`:** 1000 random clocks of mixed modes against a reference
  model.
- **`frg_mux`, `tmb1_adder`:** random operands at n and n+1 bits; the adder
  is also checked exhaustively at 4 bits.
- **`div_control`:** the mode sequence checked clock by clock, the latency,
  and `start` ignored while busy.
- **`tb_pp_nr_divider`:** the top at its default n = 8. It runs all 65,536
  operand pairs, including divisor 0, and checks the result and the 18-clock
  latency. Half the runs keep `start` high and scramble the operand inputs
  while busy. It counts parallel loads, shifts, holds, subtract steps, add
  steps, remainder corrections, ignored starts and zero divisors, and fails
  if any of them never happened. It runs in about a second.
- **`tb_pp_nr_divider_sizes`:** all operand pairs at n = 1 … 5.

To simulate with Verilator, for example the top:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/pp_div_pkg.sv tb/tb_pp_nr_divider.sv --top-module tb_pp_nr_divider
./obj_dir/Vtb_pp_nr_divider
```

Replace the testbench name to run any other testbench. To change the width,
set `DIV_N` in `pp_div_pkg`, or override `N` on `pp_nr_divider`.
