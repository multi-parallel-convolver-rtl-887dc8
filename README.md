# Multi-parallel convolver

A pipelined convolver takes one sample per clock. The clock period cannot
drop below one multiply-add plus a register, so that limit also caps the
sample rate. The multi-parallel convolver gets past it by taking **p
consecutive samples in the same clock** and producing **p convolutions in
the same clock**:

    Y(i) = sum_{j=0}^{N-1} W(j) * X(i-j)

The circuit is built only from ordinary single-input convolvers (here called
*sub-convolvers*), adders and one-step delays. It needs about p times the
cells of a standard convolver and delivers p times its throughput.

This repository holds synthesizable SystemVerilog for the scheme, following
the multi-parallel convolver of L. Dadda, V. Piuri and R. Stefanelli:

* the general p-parallel convolver;
* the conversion circuits that connect it to a sequential sample stream;
* two fault-tolerant variants that use spare sub-convolvers.

Every module has a self-checking testbench.

## The decomposition

At time step t the convolver receives the tuple

    x[q] = X(p*t + q),   q = 0 .. p-1

and delivers Y(p*t+q) for every q. Split the weight index as j = p*s + r,
where r is the residue (0..p-1) and s the group. Then

    Y(p*t+q) = sum_{r=0}^{p-1}  sum_{s}  W(p*s+r) * X(p*(t-s) + (q-r))

Each inner sum is an ordinary convolution of N/p terms. It runs over
*one* input lane, with *one* residue class of the weights:

* output phase q, residue r uses the weights W(r), W(p+r), W(2p+r), ...
* it reads input lane (q - r) mod p;
* if r > q, then q - r is negative. The sample it needs belongs to the
  **previous** tuple, so that lane passes through a one-step delay D.

Phase q is therefore p sub-convolvers, with the delay on the lanes where
r > q, followed by one adder. The whole convolver is p such phases, all fed
by the same tuple. All p² sub-convolvers have the same length and latency,
so the p partial sums of a phase line up without further alignment.

The assignment for p = 3, N = 9 (the default):

| output | residue 0: W6 W3 W0 | residue 1: W7 W4 W1 | residue 2: W8 W5 W2 |
|---|---|---|---|
| Y(3t)   phase 0 | X(3t)   | X(3t+2) delayed | X(3t+1) delayed |
| Y(3t+1) phase 1 | X(3t+1) | X(3t)           | X(3t+2) delayed |
| Y(3t+2) phase 2 | X(3t+2) | X(3t+1)         | X(3t)           |

For p = 2, N = 6:

| output | W4 W2 W0 | W5 W3 W1 |
|---|---|---|
| Y(2t)   | X(2t)   | X(2t+1) delayed |
| Y(2t+1) | X(2t+1) | X(2t)           |

A lane that several phases need delayed is delayed once, and the phases
share it. Lane 0 is never needed delayed. The convolver therefore holds
p-1 input delays.

**N not a multiple of p.** Each sub-convolver has ceil(N/p) cells, and the
weights past W(N-1) are tied to zero. For example, N = 8 with p = 3 gives
every residue-2 sub-convolver the weights W2 W5 and a zero. The published
scheme also allows a shorter last sub-convolver with an extra input delay
instead. That option is not built.

### Output grouping

Within one time step, the phase outputs are Y(pt), ..., Y(pt+p-1). With
`OUT_ALIGN = 1` (the default), the last phase passes through one more delay.
This is the optional output delay of the published circuits. The group
seen at one step is then

    y[p-1] = Y(p*t - 1),  y[0] = Y(p*t),  ...,  y[p-2] = Y(p*t + p-2)

The first group therefore starts with Y(-1). The first complete convolution
is Y(N-1). With p dividing N, Y(N-1) sits at the start of a group, in the
`y[p-1]` slot. **In this grouping the element that comes first in time is
`y[p-1]`.** `mp_convolver_top` reorders the group accordingly before
serialising it. With `OUT_ALIGN = 0`, y[q] = Y(p*t+q).

## Module hierarchy

    mp_convolver_top
    ├── input_bank            sequential samples -> p-tuples
    ├── mp_convolver          the p-parallel convolver
    │   ├── delay_unit  x(p-1)    shared input delays (lanes 1..p-1)
    │   ├── phase_convolver  x p
    │   │   ├── sub_convolver  x p
    │   │   │   └── conv_cell  x ceil(N/p)
    │   │   └── phase_adder
    │   └── delay_unit            output grouping delay (OUT_ALIGN)
    ├── output_serializer     group of p results -> one per cycle
    ├── serial_sample_bank    bit-serial input conversion (stand-alone)
    ├── ft_convolver          fault tolerant, one spare (stand-alone)
    └── bus_convolver         fault tolerant, switched buses (stand-alone)

`conv_pkg` holds the index arithmetic shared by all of them: the lane, the
delay rule, the slot order and the result width.

| module | role | main parameters (default) |
|---|---|---|
| `conv_cell` | multiply by its weight, add the next cell's partial sum, register | SW, WW, AW |
| `sub_convolver` | standard single-input convolver, transposed form | TAPS (3) |
| `delay_unit` | one time-step delay, the "D" box | W |
| `phase_adder` | registered sum of the p sub-convolutions of a phase | P |
| `phase_convolver` | one output phase | P (3), N (9), Q |
| `mp_convolver` | p phases, shared delays, grouping delay | P (3), N (9), OUT_ALIGN (1) |
| `input_bank` | bank of p registers | P |
| `output_serializer` | restores the time order of a group | P |
| `serial_sample_bank` | bank of p shift registers for bit-serial samples | P, SW |
| `ft_convolver` | p² sub-convolvers + 1 spare, 2-position switches | P (2), N (6) |
| `bus_convolver` | p² + SPARES sub-convolvers, per-unit slot map | P (2), N (6), SPARES (2) |
| `mp_convolver_top` | everything above | P=3, N=9, FT_P=2, FT_N=6, BUS_SPARES=2 |

Samples and weights are SW = WW = 8-bit signed. Results are kept at full
precision, SW + WW + clog2(N) bits (20 bits for N = 9), so nothing saturates
or wraps.

## Timing and interfaces

All logic is on one clock `clk`. Reset `rst` is synchronous and active high.
Reset clears every register, so samples before the first tuple count as
zero. The first N-1 outputs after reset are therefore the start-up partial
sums of a stream that begins in silence.

The convolver cores (`mp_convolver`, `ft_convolver`, `bus_convolver`) use
the same interface:

* `ce` advances the whole structure by one time step and takes the tuple
  on `x`. It may stay low for any number of cycles; nothing moves
  meanwhile. A new tuple may be given on every clock.
* `y_valid` is high for one cycle, **two cycles after** the cycle with `ce`
  high. `y` then holds the group for that tuple and keeps it until the next
  group.
* The weights `w[0..N-1]` are plain input ports. They must be held steady
  while the convolver runs.

Inside a core:

* the sub-convolvers register their sums on the `ce` edge;
* the phase adders and the grouping delay register on the following edge
  (`v1`, which is `ce` one cycle later);
* `y_valid` is `v1` one cycle later.

The sub-convolver has the transposed form: the sample is broadcast to all
cells. Its latency is therefore one cycle whatever its length, and the
core's latency is a constant two cycles. The published latency estimate,
L_p ≈ L_s/p, assumes a standard convolver whose latency grows with N. That
estimate does not apply to this choice of sub-convolver. The throughput
claim does apply: p results per clock.

## Connecting to a sample stream

The core wants p samples at once. `mp_convolver_top` shows the conversions
on both sides:

* **`input_bank`** stores incoming samples (`s_valid`, `s_data`) in p
  registers. When the p-th sample of a tuple arrives, it copies the tuple
  to its output and pulses `g_valid` on the next cycle. That pulse is the
  convolver's `ce`.
* **`output_serializer`** captures a group and sends its p words out one
  per cycle (`o_valid`, `o_data`). Groups must come at least p cycles
  apart, and an assertion checks this. In the top, the serial output is
  the plain sequence Y(-1), Y(0), Y(1), ...
* **`serial_sample_bank`** is the input conversion for bit-serial samples,
  sent LSB first. The p shift registers are loaded as one cascaded register
  of p·SW bits. When a tuple is complete, it is copied to a second set of p
  shift registers. For the next SW cycles these shift out together: bit b
  of all p samples appears on `par_bits` at once, and `par_first` marks bit
  0. No bit-serial convolver core is included, so in the top this block
  stands alone with its own ports.

In the top, a single clock stands for both the fast sample side and the
slow parallel core, so the stream path runs at one sample per clock. In a
real system the core would run at 1/p of the sample clock. The
single-clock version keeps the conversions simple to simulate.

## Fault tolerance

The p² sub-convolvers are almost all of the area. The two variants replace
a faulty sub-convolver with a spare. The switches, the adders and the
delays are not protected.

**`ft_convolver`: one spare, two-position switches.** The p² sub-convolvers
are put in a fixed chain of *slots*. Slot 0 is phase p-1, residue 0; next
comes phase p-1, residue 1; and so on down to phase 0, residue p-1. For
p = 2 the chain is:

* [W4 W2 W0 on X(2t+1)]
* [W5 W3 W1 on X(2t)]
* [W4 W2 W0 on X(2t)]
* [W5 W3 W1 on delayed X(2t+1)]

A spare unit sits at the end of the chain. Each slot has an input switch
and an output switch. Position 0 connects the slot to the physical unit
with the same number. Position 1 connects it to the next unit down.

The input `faulty` gives the number of the broken unit. Every slot from
that unit down is switched to position 1, so each of those slots moves one
unit down the chain and takes its weights with it. The broken unit is left
with zero input and weights, and no adder reads it. `faulty = p²` (the
spare's own number) means no fault, and all switches stay at 0.

**`bus_convolver`: several spares, switched buses.** This variant has p²
+ SPARES physical units. `slot_map[k]` assigns a slot to unit k, or
excludes the unit with the value p². The slot number sets four things for
that unit:

* which input lane (bus) it reads;
* whether it uses its own one-step delay;
* which weights it loads;
* which adder input it drives.

Any SPARES faulty units can be excluded, and the remaining units can serve
the slots in any order. Every slot must be served exactly once. An
assertion flags a slot mapped twice; an unmapped slot simply contributes
zero.

In both variants the switches should change only between operations. A
sub-convolver keeps its old samples for N/p steps, so after a switch change
the first N/p groups are wrong.

## Cost

For p = 3, N = 9, `mp_convolver` holds:

* 9 sub-convolvers of 3 cells, which is 27 = p·N cells;
* 3 adders;
* 2 input delays and 1 output delay.

This matches the published estimate A_p = p·N·A_c + p·A_a + p·A_d, about p
times a standard convolver. `ft_convolver` for p = 2, N = 6 has 5
sub-convolvers of 3 cells; `bus_convolver` with two spares has 6.

## What follows the published scheme and what is this design's own

Follows the scheme:

* the polyphase split into p phases of p sub-convolvers;
* the lane and delay rule, and the shared input delays;
* the optional output delay;
* zero-filled weights for N not a multiple of p;
* the register bank and the shift-register bank for the input conversion;
* the one-spare chain with two-position switches;
* the idea of input and output buses for more spares.

This design's own choices:

* the 8-bit signed widths and full-precision results;
* the transposed-form, word-level sub-convolver and its registered cells;
* registered adders;
* the `ce` / `y_valid` handshake and synchronous reset;
* weights as static ports;
* LSB-first bit order and the second register set in the bit-serial bank;
* the shift-out serialiser;
* one `faulty` index driving all switches of `ft_convolver`, and its
  generalisation to any p;
* the per-unit slot map and the private delays of `bus_convolver`.

Not included:

* bit-serial sub-convolvers, which the scheme allows but does not design;
* fault tolerance inside a sub-convolver, which it leaves to other work;
* the alternative "merged multiplier" organisation, which it mentions only
  in passing.

## Simulation

Each testbench is in `tb/` and is named after its module with a `tb_`
prefix. A testbench prints `TB_RESULT checks=N failures=M` and stops by
itself. A watchdog counts a failure if the run hangs. Example with
Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/conv_pkg.sv tb/tb_mp_convolver_top.sv --top-module tb_mp_convolver_top
    ./obj_dir/Vtb_mp_convolver_top

Swap in another testbench name to run a single block.

* `tb_mp_convolver` runs four configurations side by side and compares
  each group with a direct convolution. It also checks the two-cycle
  latency and random stalls, with back-to-back tuples in between. The
  configurations are:
  * p=3, N=9;
  * p=2, N=6 without the grouping delay;
  * p=3, N=8;
  * p=3, N=9 with all values at -128, for the largest result.
* `tb_phase_convolver` runs the three phases of p=3, N=9 and checks each.
* `tb_ft_convolver` breaks each physical unit in turn by forcing its
  output. It checks that the fault shows up while the unit is in use, and
  that setting `faulty` restores correct results.
* `tb_bus_convolver` breaks two units at a time, ten times. It excludes
  them with a random remapping of the other units and checks the results.
* `tb_mp_convolver_top` runs the whole system at its default parameters:
  * 600 streamed samples with random gaps, checking both the parallel
    groups and the serial output;
  * 20 bit-serial tuples;
  * one spare substitution and one double-fault bus reconfiguration.

  It counts each of these mechanisms and fails if any never occurred.
* `tb_worked_examples` runs the small textbook cases with X(i) = i+1 and
  W(j) = j+1, and checks some groups against hand-computed sums. The cases
  are p=2, N=6 with and without the grouping delay, p=3, N=9 and p=3, N=8.
  It checks which convolutions come out together at step 3, for example
  Y(5) with Y(6) when the delay is used, and Y(6) with Y(7) when it is not.
* The small blocks (`conv_cell`, `sub_convolver`, `delay_unit`,
  `phase_adder`, `input_bank`, `output_serializer`, `serial_sample_bank`)
  each have a testbench against a cycle-level model.

The reference results are always computed directly from the convolution
formula, so they do not depend on the polyphase split being checked. The
testbenches use `force` on internal nets (`g_unit[k].u_sub.y`) to break a
sub-convolver; change those paths if you rename the generate blocks.
