# 6-4 GasP control stages, ring and coupled rings

GasP is a family of asynchronous (clockless) pipeline controls. The control
stages talk to each other through a single wire per link, the **state wire**.
A stage that wants to move a message looks at two state wires: the one from
its predecessor and the one to its successor. When the predecessor wire says
FULL and the successor wire says EMPTY, the stage **fires**. The FIRE pulse
does three things. It opens the stage's latches, it drives the predecessor
wire EMPTY, and it drives the successor wire FULL. FIRE thereby destroys the
condition that caused it, so FIRE is a short pulse. Each stage behaves like a
pair of five-gate ring oscillators coupled by an AND.

"6-4" names the latencies. A message moves forward in 6 gate delays, from
predecessor FULL to successor FULL. A free place moves backward in 4 gate
delays, from successor EMPTY to predecessor EMPTY.

This repository holds SystemVerilog for these parts:

- the plain stage;
- a two-way branch and an arbitrated two-way merge;
- the one- and two-input registers that the stages control;
- two test structures built from them: a five-stage ring, and two 10-stage
  rings that share five stages.

## How time is represented

The real circuit has no clock. Its behaviour is defined by counting gates:
all gates are sized for about the same delay, so the number of gates on a
path gives its delay. The RTL keeps exactly that view:

- `clk` does not stand for a clock of the circuit. One `clk` period is **one
  gate delay**.
- Every logic gate is one register, and so is every drive transistor on a
  state wire. A signal that passes through *n* gates arrives *n* ticks later.
- A state wire is a register (`gasp_state_wire`). The register's one-tick
  delay is the delay of the transistor that fills or drains the wire.
  Between drive events the register keeps its value. That is the job of the
  two half keepers on a real wire. One keeper sits in each module: the
  upstream one holds the wire LO, the downstream one holds it HI.
- A transparent latch is a register that copies its input on every tick its
  enable is HI. Its thru time is therefore one tick.

The result is fully synthesizable and deterministic, and every timing claim
about the circuit becomes a cycle count that a testbench can check. What it
cannot show is analog behaviour: the effect of transistor widths and wire
lengths, fights between drivers, keeper strength, and metastability. Those
are left out (see "Departures" below). The model is a timing-accurate
**functional model** of the control. It is not a clocked replacement for it.

## The plain stage (`gasp_plain`)

```
pred --inv--> pinv_n --AND(pinv_n LO, succ LO)--> go --inv--> go_n --inv--> fire
fire --N transistor------------------------------> pred EMPTY   (pred_drain)
fire --inv--> fill_n --P transistor--------------> succ FULL    (succ_fill)
```

Counting gates along this chain gives the numbers that the testbench checks:

| event                             | ticks |
|-----------------------------------|-------|
| pred FULL -> FIRE                 | 4     |
| succ EMPTY -> FIRE                | 3     |
| pred FULL -> succ FULL (forward)  | 6     |
| succ EMPTY -> pred EMPTY (back)   | 4     |
| FIRE pulse width (each loop)      | 5     |
| shortest cycle of a busy stage    | 10    |

Wire levels: HI is FULL, LO is EMPTY. A stage only senses the levels
(`pred`, `succ`) and only drives through `pred_drain` and `succ_fill`. Those
two outputs are the gates of the drive transistors and connect to the
`drain`/`fill` inputs of `gasp_state_wire`. A production cell would merge
the input inverter and the AND into one three-input gate; the count of gate
delays stays the same.

## Branch and merge

**`gasp_branch`** has one predecessor and two successors. It fires only
when the predecessor is FULL and *both* successors are EMPTY. A NAND in
front of each successor's fill transistor makes the fill depend on
`direction`: LO fills successor A, HI fills successor B. Each firing
therefore fills exactly one successor. Both successors' registers see the
same outgoing message, but only the filled one takes it.

`direction` must come from the branch's *input* address bits, that is from
the register before it. It must not come from the bits the branch is
capturing. The address bits arrive early enough because their latches open
two gate delays before the data latches. `direction` has to be steady while
FIRE is HI. In the assembled rings this holds with no margin to spare. The
fill NANDs last sample `direction` four ticks after the branch fires. The
predecessor register changes five ticks after the branch fires at the
earliest.

**`gasp_merge`** has two predecessors and one successor. It uses these
gates, named by the letters of the cell drawing (the gate functions of C, D,
K, L and F are the simplest that give the stated behaviour):

```
A = NAND(predA, H)          H = NAND(predB, A)          arbiter, LO = grant
B = AND(A LO, succ LO)      C = ~B      fire[A] = D = ~C
J = AND(H LO, succ LO)      K = ~J      fire[B] = L = ~K
E: fire[A] drains predA     M: fire[B] drains predB
F = LO while fire[A] or fire[B] is HI      G: F LO fills succ
```

The cross-connected pair A/H grants one side at a time, so `fire_a` and
`fire_b` never overlap. An assertion checks this, and so do the testbenches.
When the granted predecessor empties, A returns HI and frees the other side.

Two points in the merge are this design's own choices:

- **Ties.** In a unit-delay model, two requests that arrive in the same tick
  would make A and H oscillate. This is the metastability that a real
  arbiter needs extra circuitry to settle. The model resolves a tie by a
  toggling priority bit: the first tie goes to A, the next one to B, and so
  on.
- **`EXTRA_FIRE_INPUT`.** Gate J is disabled when the successor becomes
  FULL, and that signal arrives only about one gate delay before H enables
  J. In silicon this is a race. Setting `EXTRA_FIRE_INPUT = 1` adds a third
  input to B (fire[B]) and to J (fire[A]) so that the opposite side's FIRE
  also blocks them. The default, 0, is the plain two-input circuit. In the
  unit-delay model the race cannot go wrong, so both settings behave the
  same.

## Registers and data clock gating

A message has 15 address bits and 37 data bits (`gasp_pkg`). The address
bits are fourteen numeric bits `a[1:14]` plus a token bit `T`; the data bits
are `d[1:37]`. "Kiting" means announcing data before it has arrived:
FULL on a state wire promises that the data will be there by the time the
receiver uses it. The two groups of bits are kited by different amounts:

- The **address latches** are opened by FIRE itself. In `gasp_register_one`
  the address shows at the output one tick after FIRE rises.
- The **data latches** are opened through a NAND of FIRE with the *incoming*
  T bit, followed by a large driver. They open two ticks after the address
  latches, so data shows three ticks after FIRE rises. They open only when
  the incoming T is ONE. A message with T = ZERO (a "token") moves its
  address but leaves the 37 data latches closed and keeps their old
  contents. This is clock gating to save energy.

`gasp_register_two` is the merge stage's register. `fire_a` loads
`ina`/`ind`, `fire_b` loads `inb`/`ine`, and each side gates its data pulse
with its own incoming T bit.

Reset loads every register from `init_a`/`init_d`. Together with
`init_full` on the wires, this places the starting messages of a ring.

## Assemblies

**`gasp_ring5`** closes `STAGES` (default 5) plain stages and their
registers into a ring. Wire `w[i]` runs from stage i to stage i+1, and
register i reads register i-1. With k messages in N stages:

- a message goes round in 6N ticks;
- a gap goes round backwards in 4N ticks;
- no stage cycles faster than once per 10 ticks.

Each stage therefore fires min(k/6N, (N-k)/4N, 1/10) times per tick. For
N = 5 that is 1/30, 1/15, 1/10 and 1/20 for k = 1..4. The model reproduces
these rates exactly.

**`gasp_infinity5`** builds two rings of `SHARED + PRIVATE` (5 + 5) stages
that share `SHARED` of them:

```
        +--> ring A: PRIVATE plain stages --+
        |   (wa[0] .. wa[PRIVATE])          |
branch -+                                   +-> merge -> plain ... plain -> branch
        |                                   |     (shared section, ws[])
        +--> ring B: PRIVATE plain stages --+
```

The branch steers by address bit `a[DIR_BIT]` (default a[1]) of its input:
0 sends the message into ring A, 1 into ring B. Because a message's address
never changes, each message keeps returning to its own ring. The merge
decides the order in which the two rings use the shared section. With
`SHARED = 50, PRIVATE = 50` the same module builds two 100-stage rings that
share 50 stages.

**`gasp_top`** places both structures side by side, each with its own
`init_*` load ports and observation ports. It adds four throughput counters
(`gasp_fire_counter`, which counts FIRE pulses): on ring5 stage 0, on shared
stage 1, and on the first private stage of each ring.

## Departures and limits

- **Time is quantised to gate delays.** The transistor widths, the wire
  lengths (1000 to 10000 lambda) and the drive strengths tuned per position
  of otherwise identical cells change only analog delay. They do not appear in
  the RTL.
- **Keepers** are folded into the hold behaviour of the state-wire register.
  A fill and a drain in the same tick would be a driver fight. It cannot
  happen between correct stages; an assertion reports it, and fill wins in
  the model.
- **The arbiter** has no metastability filter. Same-tick ties are resolved by
  the toggling priority described above.
- **Latches** have a fixed thru time of one gate delay. The real latches need
  both a minimum thru time (so the next message does not race through) and a
  maximum thru time (data must arrive before it is used). One tick meets
  both in this model, but with no margin: in a ring a register's input
  changes exactly one tick after its address latches close.
  Assertions in both registers report any input that changes while the
  latches it feeds are open.
- **Reset** is an addition. The source circuits have no reset. The stages
  that load a ring, read it out, or stop it cleanly on a test chip are not
  designed here; the `init_*` ports and the observation outputs stand in
  for them.
- The branch circuit's internal structure is taken to be the plain stage
  with a three-input AND and two NAND-gated fill drivers.

## Files

| file | content |
|------|---------|
| `rtl/gasp_pkg.sv` | widths, `addr_t` (a[1:14], T), `data_t` (d[1:37]) |
| `rtl/gasp_state_wire.sv` | state wire with keepers |
| `rtl/gasp_plain.sv` | plain stage |
| `rtl/gasp_branch.sv` | two-way branch stage |
| `rtl/gasp_merge.sv` | arbitrated merge stage |
| `rtl/gasp_register_one.sv` | one-input register with T-gated data latches |
| `rtl/gasp_register_two.sv` | twin-input register for the merge |
| `rtl/gasp_fire_counter.sv` | FIRE pulse counter |
| `rtl/gasp_ring5.sv` | ring of plain stages |
| `rtl/gasp_infinity5.sv` | two coupled rings |
| `rtl/gasp_top.sv` | both structures and the counters |

Each module has a testbench `tb/tb_<module>.sv`. Each testbench is
self-checking and prints `TB_RESULT checks=N failures=M`.

- `tb_gasp_plain`, `tb_gasp_branch` and `tb_gasp_merge` time-stamp every
  wire and FIRE edge and check the table above.
- `tb_gasp_ring5` checks message order, data integrity and the throughput
  formula for k = 1..4.
- `tb_gasp_infinity5` checks that messages stay in their own ring and keep
  their order, and that ties, both merge grants and both branch directions
  occur.
- `tb_gasp_top` runs the full-size top and counts each mechanism.
- `tb_gasp_merge_robust` repeats the merge checks with
  `EXTRA_FIRE_INPUT = 1`.
- `tb_gasp_infinity_chip` runs the coupled rings at 100 stages sharing 50.

## Simulating

With Verilator 5 (two-state; everything read is reset):

```
verilator --binary --timing --assert -Irtl rtl/gasp_pkg.sv tb/tb_gasp_top.sv \
          --top-module tb_gasp_top -Mdir obj_top
./obj_top/Vtb_gasp_top
```

Replace `tb_gasp_top` with any other testbench name. `-Irtl` lets Verilator
find each module in `rtl/<name>.sv`. For lint only:
`verilator --lint-only -Wall -Irtl rtl/gasp_pkg.sv rtl/gasp_top.sv`.

To start a ring, hold `rst` HI for at least one tick. While reset is HI,
set `init_full[i]` for every wire that should hold a message, and put that
message in the register that feeds the wire (`init_a[i]`, `init_d[i]`). A
ring needs at least one FULL wire and one EMPTY wire. After reset the ring
runs on its own. Observe it through `fire`, the wire levels and the register
outputs.
