# A 4×4 pipelined array multiplier built from an FPGA-mappable cell set

This RTL describes a small unsigned multiplier (4-bit × 4-bit → 8-bit) built
the way a fine-grained semi-custom CMOS cell library builds it. It is written
in terms of the logic cells that such a library maps onto when the circuit is
translated cell by cell onto an antifuse FPGA of the Actel ACT-1 family. The
same multiplier array exists in two versions:

* **synchronous**: five pipeline stages, a latch bar between stages, clocked by
  a two-phase non-overlapping clock made on-chip from one input clock;
* **self-timed**: the same array and latch bars, but every bar has its own
  C-element controller and a dual-edge-triggered latch, and data moves
  through a two-phase request/acknowledge handshake (a *micropipeline*).

Both versions sit side by side in `ppl_actel_top`. Each cell of the library
that needed a custom mapping is a module of its own: the ACT-1 logic module,
the full adder (in two translations), the two latch types, the clock driver
and the C-element.

## The multiplier array

The operands enter at latch bar 0. Five rows of one-bit adders follow, and
each row is followed by a latch bar, so there are six bars and five stages.
The column (bit weight) of every adder is fixed by the floorplan:

| row | adders at weight | adds | kind |
|-----|------------------|------|------|
| 1 | 1, 2, 3 | b0·A + b1·A (carry input 0) | carry-save |
| 2 | 2, 3, 4 | b2·A into the sum/carry pair | carry-save |
| 3 | 3, 4, 5 | b3·A into the sum/carry pair | carry-save |
| 4 | 4, 5 | sum + carry, carry rippling from weight 4 to 5 | carry-propagate |
| 5 | 6 | sum + carry + ripple carry from row 4; carry out = bit 7 | carry-propagate |

There are twelve adders in all. In the carry-save rows each carry moves one
weight up into the next row, so no row has a carry chain. The carry-propagate
adder that resolves the carry-save result is itself pipelined over rows 4
and 5. Product bits leave the array as they become final: bit 0 after row 1,
bit 1 after row 2, bit 2 after row 3, bit 3 as row 4 starts, bits 4 and 5
after row 4, bits 6 and 7 after row 5.

Every latch bar holds the same bundle, `mult_pkg::stage_t` (33 bits):
the operands `a` and `b`, which travel down so that the lower rows can form
their partial products b_j·A; the final product bits `p`; the carry-save
vectors `s` and `c`, indexed by bit weight; and `r`, the ripple carry from
row 4 to row 5. Bits of a bundle that a row does not use are zero, and
synthesis removes them. The testbench of `mult_rows` checks the key
invariant: after each row, the bundle's value (final bits + s + c + r·2⁶)
equals the sum of the partial products added so far.

The adders are `array_adder`, a true-polarity wrapper around `fa_cell`.
The library's full adder takes its carry in and gives its carry out and sum
active low. The wrapper adds the inverters. A later optimisation could absorb
them into neighbouring gates, but this RTL keeps them.

## The cells

**ACT-1 logic module (`act1_module`).** Two 2:1 multiplexers (A0/A1 chosen
by SELA, B0/B1 chosen by SELB) feed a third one, which is selected by
SEL0 OR SEL1. Every Actel macro is a configuration of this module.

**Full adder (`fa_cell`, parameter `STYLE`).** `STYLE=0` is the vendor FA1B
macro (inverted carry in and out) with an extra inverter on the sum: three
module delays to the sum. `STYLE=1` (the default) is two ACT-1 modules and one
inverter, two module delays to the sum. The carry module is selected by A
and B and passes 1, 0 or ~Ci. The sum module is selected by A and B and
passes ~Ci or Ci. The two are checked exhaustively against each other and
against A+B+Ci.

**Static inverting latch (`inv_latch`).** While the gate is high the output
is the inverse of the input, and it holds when the gate falls. The synchronous
pipeline uses it in pairs.

**Dual-edge-triggered latch (`de_latch`).** A latch open while `en` is high
(DL1), a latch open while `en` is low (DL1B) and a 2:1 multiplexer selected by
`en`. The multiplexer always passes the latch that is currently holding, so
the output changes only at a transition of `en`, and every transition (rising
or falling) captures the input. This matches two-phase signalling, where
each transition is an event.

**Clock driver (`ppl_clock_driver`, parameter `HIGH_LEVEL`).** It makes phi0
(high with clk) and phi1 (high with clk low) and their inverses. The default
form cross-couples the two phase gates, so that each phase can rise only once
the other has fallen. This keeps the phases from overlapping, whatever the
gate delays. `HIGH_LEVEL=1` is the cheaper mapping that uses the FPGA's
dedicated clock line and one inverter. It is valid only when the phases
drive nothing but latch gates.

**C-element (`c_element`, parameter `STYLE`).** The output takes the inputs'
value when they agree and holds while they differ. A high `reset` forces it
low. It has both output senses. `STYLE=0` (the default) writes it as a
storage element enabled by `i1 == i2`. `STYLE=1` is the FPGA mapping, which
uses three modules:

* an ACT-1 module selected by `i1` and `i2`, whose data inputs are constant
  0, constant 1 and its own fed-back output;
* a second ACT-1 module that forces 0 during reset;
* an inverter for `out_n`.

The state of `STYLE=1` lives in the feedback loop. Both forms are checked
against a reference and against each other.

## Synchronous pipeline (`smo_multiplier`)

Each latch bar (`smo_bar`) is a pair of inverting latches on every bundle bit:
a master open on phi1 and a slave open on phi0. The two inversions cancel, so a
bar acts as a register loaded at the rise of phi0, which is the rise of `clk`
at the top level. Operands present at rising edge *n* are captured by bar 0.
Their product is on `p` just after rising edge *n+5*. The latency is five
clock periods, and a new product comes out every period. There is no reset:
after five clocks the pipeline holds only real data.

Timing rule for users: change `a`/`b` while phi1 is low (just after the
rising edge of `clk`), so that the master latches of bar 0 close on stable
data.

## Self-timed pipeline (`amo_multiplier`)

This is the part that needs the most care. Each bar *k* (`amo_stage`) has a
C-element whose output `c[k]` is the bar's latch control:

```
c[k] = C( request into bar k, NOT c[k+1] )      (bar 5: NOT ack_in)
request into bar k = c[k-1] delayed by DELAY     (bar 0: req_in, no delay)
```

A transition of `c[k]` does three things:

1. bar *k* captures its input;
2. it acknowledges bar *k−1*, which may now accept its next item;
3. after the matched delay, it requests bar *k+1*.

Bar *k* accepts a new item only when bar *k+1* has taken the previous one.
This is the back-pressure. Because of it the pipeline can hold one item per
bar. In simulation, a slow receiver leaves up to six items inside the array.

The matched delay (`matched_delay`) is a behavioural model. It delays a
request by `DELAY` time units, which must cover the adder row of the stage it
accompanies. It plays the role of the delay chain that a real micropipeline
builds from gates. Synthesis ignores the delay. An implementation must
replace it with a buffer chain sized for the slowest row, which is row 4 with
two adders in series. Without the delay, nothing guarantees that data arrives
before its request.

Port protocol (two-phase, every transition is one event):

* **in:** put operands on `a`/`b`, then toggle `req_in`. A toggle of `ack_out`
  means the operands were taken. Keep them stable until then.
* **out:** a toggle of `req_out` means `p` holds the next product. `req_out` is
  the last bar's control, delayed by one `DELAY`. Toggle `ack_in` when `p`
  has been read.
* **reset:** hold `reset` high with `req_in` and `ack_in` low. This clears every
  C-element (all controls 0). The data latches are not reset.

The latency of one item through the empty pipeline is six matched delays
(five between bars and one on the output request). The testbench checks
this.

Tools that ignore delays see a combinational loop through the C-elements
(request forward, acknowledge back). They also report the C-elements and the
data latches as latches. Both are the circuit itself, not a coding accident.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `mult_pkg` | `N` | 4 | operand width (the array is written for 4) |
| top, multipliers, `mult_rows` | `FA_STYLE` | 1 | full-adder translation: 0 = FA1B + inverter, 1 = two ACT-1 modules + inverter |
| top, `ppl_clock_driver` | `HIGH_LEVEL` | 0 | 0 = cross-coupled phase generator, 1 = clock and its inverse |
| top, `amo_multiplier` | `DELAY` | 2 | matched delay per stage, in simulator time units |
| top, `amo_multiplier`, `amo_stage` | `C_STYLE` | 0 | C-element form: 0 = storage element, 1 = two ACT-1 modules with feedback |
| `c_element` | `STYLE` | 0 | as `C_STYLE` |
| `inv_latch`, `de_latch` | `W` | 1 | number of bits sharing one gate |

`N` is not a general width parameter. The adder rows are written out for the
4×4 floorplan.

## Where this RTL makes its own choices

The array floorplan, the cell functions, the latch types, the use of
C-elements and the two full-adder translations follow the published design.
The following are choices made here:

* Which adder input gets which signal, and the carry ripple from weight 4 to 5
  inside row 4, are read from the floorplan's connections and the arithmetic.
* Each synchronous latch bar is a master/slave pair. With this choice the
  latency is five clock periods, which matches the measured latency of the
  original chips (five clock periods in all three synchronous versions:
  120 ns at 24 ns, 280 ns at 56 ns, 160 ns at 32 ns). Alternating single
  latches would give half that.
* The self-timed version uses the same six bars as the synchronous one. Its
  control follows the standard micropipeline arrangement. The number of
  stages and the control wiring of the original self-timed chip are not
  known.
* The exact pin wiring of the two-module full adder, the C-element and the
  clock driver's gates is not fully known. Each is written as the simplest
  circuit with the documented function and pins. The clock driver omits a
  gate input tied to the supply.
* The FA1B vendor macro is modelled by its logic function.
* Gate polarities (latch open when high, reset active high, phi0 high with
  clk) and the multiplexer input order of the ACT-1 module follow common
  convention.

Not modelled: the FPGA device itself, the custom chip's layout and pads, and
the translation software that maps one cell set onto the other. The published
module counts and timing in nanoseconds come from physical implementations.
This RTL does not reproduce them.

## Simulating

Every testbench is self-checking. It ends by printing
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mult_pkg.sv \
    tb/tb_ppl_actel_top.sv --top-module tb_ppl_actel_top -o sim
./obj_dir/sim
```

Replace the testbench file and top name with any of:

| testbench | what it checks |
|-----------|----------------|
| `tb_act1_module` | all 256 input combinations of the logic module |
| `tb_fa_cell` | both full-adder translations, all 8 input combinations |
| `tb_mult_rows` | all 256 operand pairs, the carry-save invariant after every row |
| `tb_ppl_clock_driver` | no phase overlap; phases and inverses follow the clock, both forms |
| `tb_inv_latch` | transparent-inverting when open, holding when closed |
| `tb_de_latch` | capture on both edges, hold between them |
| `tb_c_element` | agree/hold rule and reset against a reference, both forms |
| `tb_smo_multiplier` | random products at a latency of exactly five periods, both full-adder translations |
| `tb_amo_multiplier` | in-order products under random handshakes; empty-pipeline latency; pipeline fill and sender stalls must occur; a second instance (FA1B adders, two-module C-elements) must match it event for event |
| `tb_ppl_actel_top` | both multipliers at default parameters at once, plus a mid-run reset of the self-timed side; each mechanism is counted and must occur |

Simulation notes:

* Verilator has two-state logic. The data latches of the self-timed pipeline
  start with arbitrary values. This is harmless because every output is
  checked only after a handshake has filled it.
* Handshake stimulus should wait at least one time unit between a response
  and the next transition. A testbench that changes a handshake input after a
  zero delay (`#0`) may not see the design react in the same time step.
