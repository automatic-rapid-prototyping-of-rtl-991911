# A 4×4 pipelined array multiplier, clocked and micropipelined, in FPGA-cell form

This is a small multiplier with a larger purpose. It is the test vehicle of a
design flow in which a circuit is first laid out in a fine-grained custom-VLSI
cell library, then translated cell by cell into the logic modules of an
anti-fuse FPGA for prototyping. The multiplier takes two 4-bit unsigned
operands and returns their 8-bit product through a five-stage pipeline. It
exists in two versions with the same datapath:

* a **synchronous** pipeline, run by a two-phase non-overlapping clock that a
  small clock generator derives from one input clock; one product per clock,
  five clocks of latency;
* an **asynchronous micropipeline**, with no clock at all: every stage is
  controlled by a Muller C-element and two-phase (transition) request and
  acknowledge signals, and data is held in dual-edge-triggered latches.

The cells are the FPGA versions of the custom cells: a full adder with
active-low carries and an inverted sum, built from three FPGA logic modules;
an inverting static latch; the dual-edge-triggered latch; the C-element; and
the clock generator. The FPGA's basic logic module is modelled too, and the
full adder is really built from it.

## Files

| File | What it is |
|------|------------|
| `rtl/ppl_mult_pkg.sv` | widths, stage count, the word passed between pipeline ranks, full-adder style enum |
| `rtl/act1_logic_module.sv` | the FPGA's eight-input basic logic module (three 2:1 muxes and an OR) |
| `rtl/ppl_full_adder.sv` | full adder cell, active-low carries, inverted sum; two mappings |
| `rtl/ppl_half_adder.sv` | half adder with the same output senses, two logic modules |
| `rtl/mult_array_stage.sv` | combinational logic of one of the five pipeline stages |
| `rtl/static_latch.sv`, `rtl/ms_register.sv` | inverting transparent latch; master-slave pair of them |
| `rtl/two_phase_clock_gen.sv` | two-phase non-overlapping clock generator (behavioural model, gate delays) |
| `rtl/sync_pipe_multiplier.sv` | synchronous multiplier |
| `rtl/c_element.sv` | Muller C-element with reset |
| `rtl/det_latch.sv` | dual-edge-triggered latch |
| `rtl/matched_delay.sv` | delay line on a request wire (behavioural model) |
| `rtl/mp_control.sv` | request/acknowledge control chain of the micropipeline |
| `rtl/async_pipe_multiplier.sv` | micropipelined multiplier |
| `rtl/ppl_multiplier_top.sv` | both multipliers side by side, each with its own ports |
| `tb/tb_<module>.sv` | one self-checking testbench per module (`ms_register` is exercised through the synchronous multiplier) |
| `tb/tb_ppl_multiplier_top_hand.sv` | end-to-end test of the top with `HAND_TRANSLATION = 1` |

## The datapath: a carry-save array cut into five stages

Column *k* of the product collects the partial products `a[j] & b[i]` with
`i + j = k`. Twelve one-bit full adders reduce them:

| Stage | Adders | Work | Product bits final after it |
|------:|-------:|------|-----------------------------|
| 1 | 3 | adds row `b[0]·A` to row `b[1]·A` in columns 1–3 (carry in 0) | p0, p1 |
| 2 | 3 | adds row `b[2]·A` into columns 2–4 | p2 |
| 3 | 3 | adds row `b[3]·A` into columns 3–5 | p3 |
| 4 | 2 | carry-propagate, columns 4 and 5, rippling | p4, p5 |
| 5 | 1 | carry-propagate, column 6; its carry out is p7 | p6, p7 |

Stages 1–3 are carry-save rows: an adder's carry goes to the next column *of
the next stage*, so no carry travels sideways inside a row. The 3-bit
carry-propagate adder at the end is cut in two so that it does not become the
one slow stage of the pipe; the carry out of column 5 is held in a latch
between the two halves.

Between two pipeline ranks travels one `mult_stage_t` word (25 bits): both
operands (later rows still need them), one sum bit and one carry bit per
column, and that one ripple carry. Bits a stage does not touch pass through.
This layout is this implementation's choice; a hand layout would latch only
the live bits, and synthesis removes latches whose outputs nothing reads.

By default every adder is a `ppl_full_adder`, even where a half adder would
do (stage 1, stage 4 column 4), as in the original cell library, where the full adder cell
is so well optimised that it is used for half adders too. Its active-low carry
pins and inverted sum are converted back to positive logic at each instance.

### The full adder from three logic modules

`act1_logic_module` is the FPGA's basic cell:
`out = (sel0 | sel1) ? (selb ? b1 : b0) : (sela ? a1 : a0)`. With
constant inputs it becomes an inverter or a 4:1 multiplexer. The default
adder mapping (`FA_THREE_MODULES`) uses three of them:

* an inverter making `~b`;
* a carry module selecting on `a` and `b`: `co_n` is 1 for `a=b=0`, 0 for
  `a=b=1`, and `ci_n` otherwise;
* a sum module selecting on `ci_n` and `a` between `b` and `~b`, so that
  `sum_n = a ^ b ^ ci_n`.

The sum passes through two logic levels (inverter, then one module). The
alternative `FA_FA1B_INV` stands for the vendor's library adder, which has
active-low carries but a positive sum, followed by an inverter: one level more
on the sum. That library cell's insides are not public, so it is written from
its function. `STYLE` on every module up to the top selects the mapping; both
are tested.

## Cell-for-cell versus optimised mapping

`ppl_multiplier_top` has a parameter `HAND_TRANSLATION`. At 0 (default) the
FPGA circuit is a cell-for-cell copy of the custom chips: full adders
everywhere and the two-phase clock generator. At 1 two optimisations of a
more careful translation are applied:

* **Dedicated clock line.** The clock generator is dropped and the latches
  take `phi0 = ~clk` and `phi1 = clk`, i.e. each register becomes an ordinary
  single-clock flip-flop driven from the FPGA's low-skew clock net. This is
  safe only because the two phases feed nothing but latches.
* **Half adders.** The four adders whose carry in is the constant 0 (all of
  stage 1 and column 4 of stage 4) become `ppl_half_adder` cells: two
  modules instead of three, each output one module whose data inputs are
  constants and whose selects are `a` and `b`.

Results and latencies are identical in both settings; both are tested end to
end. (`HALF_ADDERS` on the multipliers and on `mult_array_stage` controls the
second point alone.)

## Synchronous version

`two_phase_clock_gen` turns `clk` into `phi0` (high while `clk` is low) and
`phi1` (high while `clk` is high) with a gap between them. Two cross-coupled
gate paths make each phase wait until the other has fallen:

```
phi0 = ~clk & phi1_n      (GAND2 then AND2, two inverters to phi0_n, phi0)
phi1 =  clk & ~phi0       (GAND2, two inverters to phi1_n, phi1)
```

With gate delay *d*: after `clk` rises, `phi0` falls at 4*d* and `phi1` rises
at 7*d*; after `clk` falls, `phi1` falls at 3*d* and `phi0` rises at 5*d*.
The gap exists only because gates have delay, so this block is a behavioural
model with `#` delays; synthesis would reduce it to the zero-delay logic
equations, which do not guarantee the gap.

Each of the six pipeline ranks (input, then after each stage) is an
`ms_register`: an inverting static latch open during `phi0` (master) and one
open during `phi1` (slave). The phases never overlap, so no data races
through a rank. Operands present at the end of a `phi0` pulse enter the
input rank; the product appears at `p` while `phi1` is high five periods
later, and a new pair can enter every period. There is no reset; the pipe
gives valid products once it has been filled.

```
clk    _/‾‾‾\___/‾‾‾\___/‾‾‾\___ ...
phi1   __/‾‾\_____/‾‾\_____/‾‾\_   (slaves open: ranks update)
phi0   ‾‾\____/‾‾\____/‾‾\____/‾   (masters open: ranks sample)
```

## Asynchronous version: the micropipeline

This is the part that needs care when you use or change it.

**Signalling.** All control is two-phase: a *transition* of a wire, rising
or falling, is one event. The producer sets `a` and `b`, then toggles
`req_in`; it must hold `a` and `b` until `ack_in` has made the same
transition. When a product is ready `req_out` toggles; `p` is valid then and
stays valid until the consumer toggles `ack_out`. Start with `reset` high and
`req_in`, `ack_out` low; reset clears every C-element.

**Control chain (`mp_control`).** Rank *k* has a C-element with inputs
`req[k]` (the request reaching the rank) and `~ack[k]` (the acknowledge from
rank *k*+1, inverted). Its output `en[k]`:

* is the enable of rank *k*'s latches;
* acknowledges rank *k*−1;
* after a `matched_delay` of `STAGE_DELAY[k+1]` becomes the request to rank
  *k*+1.

A C-element changes only when both inputs agree, so rank *k* fires exactly
when the previous rank has offered a new token *and* the next rank has taken
the previous one. The delay on the request must be at least the logic delay
of the stage it runs beside, so that the data reaches the next latches before
the request does (the bundled-data rule). In silicon these delays are short
inverter chains; here they are parameters.

**Latches (`det_latch`).** Because every transition of `en[k]` means
"capture", the latch must capture on both edges. It is two transparent
latches, one open while `en` is high and one while it is low, with a
multiplexer that always shows the one that is closed. At each edge the latch
that was following `d` closes and the multiplexer switches to it, so `q`
takes `d` at each edge and holds it until the next.

**Capacity, latency, throughput.** Each of the six ranks holds its own token,
so with the consumer stalled the pipe takes six operand pairs and leaves the
seventh unacknowledged. A token moves at the speed of the stage it is in, not
at the speed of the slowest one: with the default delays (0, 8, 8, 8, 24, 24
for ranks 0..5, i.e. 8 per carry-save row and 24 per carry-propagate half)
the first product arrives 72 time units after its request, against
5 × 24 = 120 for a clock that must suit the slowest stage. With eager
producer and consumer, products leave every 25 units (the 24 of the slowest
stage plus the one-unit acknowledge delay). The published measurements of
the custom chips were 72 ns latency and 24 ns for the slowest stage of the
asynchronous chip, against 24 ns clock and 120 ns latency for the
synchronous one; the default delays are chosen to reproduce the asynchronous
pair. The comparison comes out as in the original measurements: the clocked
pipe has the better throughput (one product per 24 against one per 25), the
micropipeline the better latency (72 against 120). Delays are in simulator time units; nothing sets a `timescale`.

**C-element (`c_element`).** Output high when both inputs are high, low when
both are low, held otherwise; `reset` forces 0; `out_n` is the complement.
The FPGA version of this cell is two multiplexer modules with feedback plus an
inverter. Here it is written as a latch open while the inputs agree, the same
function without a combinational loop.

**Simulation notes.** The asynchronous side relies on the `#` delays of
`matched_delay`, so simulate with timing support (`--timing`). A zero delay
on the acknowledge wire is not allowed: `ACK_DELAY` stands for the
C-element's switching time and keeps a rank from closing in the same instant
its predecessor starts to change.

## How far to trust it, and where it departs from the source design

Taken from the original design: the operand and product widths; twelve
one-bit adders in rows of 3, 3, 3, 2, 1 with a latch rank after each row;
five stages and a five-clock latency; the two control disciplines; the cells
(full adder polarity, inverting static latch, two-phase non-overlapping clock
generator with its gate list, dual-edge-triggered latch of two latches and a
mux, C-element with reset and both output senses, the FPGA basic module).

Chosen here, because the source does not say:

* **Final adder.** The source calls the final carry-propagate adder a
  carry-lookahead design, but its block diagram draws it as one-bit adders,
  two in stage 4 and one in stage 5. The diagram is followed: a ripple adder
  cut in two. For three bits the difference is small.
* The exact wiring of the three-module full adder, which pins of the basic
  module's output multiplexer the OR selects, which latch the
  dual-edge-triggered latch's multiplexer shows for which level of the
  enable, and which feedback wire enters which gate of the clock generator.
  Each is chosen so the cell does what it is described to do, and each is
  checked exhaustively or by its edge timing.
* Unsigned operands; no reset on the synchronous datapath; an active-high
  reset on the C-elements; master latches on `phi0`.
* The C-element inputs (request and inverted acknowledge) and the stage
  delays of the micropipeline.
* The C-element is written as a latch, not as the two-module feedback loop
  of its FPGA version.

Not included: the cell-by-cell netlist translator itself (software), the FPGA
device and its anti-fuse routing, the chips' pad frames, and those
optimisations that the source mentions without describing them (a
one-module dual-edge latch) or that only change a netlist's gate choice
(folding inverters into gates with inverted inputs, shortening delay chains;
the latter is just a smaller `STAGE_DELAY` here).

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
after a fixed time if something hangs. From the top of the tree:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/ppl_mult_pkg.sv tb/tb_ppl_multiplier_top.sv \
    --top-module tb_ppl_multiplier_top -Mdir obj -o sim
./obj/sim
```

Replace `tb_ppl_multiplier_top` with any `tb_<module>` to test one block.
The end-to-end test runs the top at its defaults: 400 products through the
synchronous pipe and 400 through the micropipeline with random producer and
consumer pauses, and it counts that each mechanism occurred (full
synchronous pipe, phase gaps, requests on rising and on falling
transitions, producer stalls, micropipeline filled). It runs in well under a
second. `tb_ppl_multiplier_top_hand` repeats it with `HAND_TRANSLATION = 1`.

Lint warnings you will see and why they stand: latches in `static_latch`,
`det_latch` and `c_element` are intended; unused bits of the stage word are
passed through on purpose; the unused complement outputs of the clock
generator and C-element are left open.
