# Bidirectional shift register with pulsed latches, and a DA FIR filter built on it

A bidirectional shift register is usually built from one master-slave
flip-flop and one 2-to-1 multiplexer per bit. This design replaces both with a
single **bidirectional pulsed latch** (BD-PL) per bit. A pulsed latch is a plain
latch that is transparent only during a short clock pulse, so it costs about
half a flip-flop. The difficulty is that a chain of latches sharing one pulse
races: data would run through several stages during one pulse. This design
avoids the race in two ways:

* **Ordered pulses.** Each clock edge becomes a short sequence of
  non-overlapping pulses. The latches are opened one after another, starting
  at the end the data moves towards. Each latch has therefore copied its
  neighbour's value before that neighbour changes.
* **Sub registers with temporary latches.** The register is cut into 4-bit
  sub registers. They all share the same pulses, so the pulse generator does
  not grow with the register length. Each sub register has one extra
  *temporary* latch. It saves the bit that must cross into the next sub
  register before that bit is overwritten.

The register can shift right or left, one place per clock cycle. The default
size is 256 bits: 64 sub registers, 256 data latches and 65 temporary
latches. Ten pulse lines serve the whole register (five per direction).

The second part is a bit-serial **distributed-arithmetic (DA) FIR filter**
with four taps. It uses a 16-bit instance of the same register as its sample
delay line. A 16-word look-up table and a shift-accumulator replace the
multipliers.

## The bidirectional pulsed latch (`bd_pl`)

A BD-PL has a left data input `dl`, a right data input `dr` and two enables:

| pulse high    | latch does                    | used for      |
|---------------|-------------------------------|---------------|
| `clk_pulse_r` | becomes transparent to `dl`   | right shift   |
| `clk_pulse_l` | becomes transparent to `dr`   | left shift    |
| neither       | holds its value               |               |

The transistor cell also has complementary rails (`Qb`, `DL_b`, `DR_b`). They
carry no extra information and are not modelled. An asynchronous clear `rst`
was added so that the register starts from a known state.

## One shift step: five pulses

The latch positions of a sub register are numbered 1..4 from left to right,
and `T` is its temporary latch, which sits to the right of position 4. Across
the whole register the data latches are Q<1>..Q<256>. T<k> is the temporary
latch after sub register k. The extra latch T<0> sits in front of Q<1>.

**Right shift** (data moves towards Q<256>, the serial input `sr_in` enters at
Q<1>). The pulses come in this order:

1. `CLK_pulse_R<T>`: T<0> takes `sr_in`, and every T<k> takes Q<4k>. Each
   last bit is now saved.
2. `CLK_pulse_R<4>`: Q<4k> takes Q<4k-1>.
3. `CLK_pulse_R<3>`: Q<4k-1> takes Q<4k-2>.
4. `CLK_pulse_R<2>`: Q<4k-2> takes Q<4k-3>.
5. `CLK_pulse_R<1>`: Q<4k-3> takes T<k-1>, the saved last bit of the sub
   register on its left (for the first sub register, `sr_in`).

**Left shift** (data moves towards Q<1>, `sr_in` enters at Q<256>). The latches
are opened in the opposite order:

1. `CLK_pulse_L<T>`: every T<k> takes Q<4k+1>, the first bit of the next sub
   register. The last temporary latch takes `sr_in`.
2. `CLK_pulse_L<1>` to `CLK_pulse_L<4>`: positions 1, 2, 3, 4 in turn. Each
   takes the bit on its right, and position 4 takes T<k>.

A temporary latch is always loaded in the same cycle in which it is read, so
the direction may change from one cycle to the next. `sr_in` has to be stable
only until the T pulse ends, which is one delay unit after the clock edge.
That short hold time is one of the points of the scheme.

`sub_bsr4` is one sub register (four data latches and a temporary latch).
`bd_latch_array` chains `N_SUB` of them behind T<0>.

## Generating the pulses

`pulse_dir_steer` turns five time-ordered pulses into the ten pulse lines
with AND gates, using `right` and its inverse `left`. In time order, the
right-shift lines are T, 4, 3, 2, 1 and the left-shift lines are T, 1, 2, 3, 4.
Two generators produce the five pulses. Both are behavioural models, because
they rely on delay cells; the delay unit is `UNIT`, 0.2 ns by default.

**With a 2:4 decoder (`dec_pulse_gen`, the default).** This is the
reduced-area generator. Instead of one pulse circuit per latch position, two
pulse sources drive a 2:4 decoder (`decoder_2to4`). The decoder's four one-hot
outputs are the four data-latch pulses, shared by every sub register. Two more
pulse circuits give the T pulse and the decoder enable. With the clock rising
at time 0 and U = `UNIT`:

| signal                                         | high during |
|------------------------------------------------|-------------|
| T pulse                                        | [0, U)      |
| decoder enable                                 | [2U, 6U)    |
| X1: pulse source 1, on the clock               | [3U, 5U)    |
| X0: pulse source 2, on the clock delayed by 2U | [4U, 7U)    |

While the decoder is enabled, {X1,X0} steps through 00, 10, 11, 01. This is a
Gray sequence, so only one decoder input changes at a time. Decoder outputs
Y0, Y2, Y3, Y1 therefore give latch pulses 1, 2, 3 and 4, one unit each, at
[2U,3U), [3U,4U), [4U,5U) and [5U,6U). No third line glitches at a handover.
Each shift is finished 6U after the rising edge.

**Chain of pulse circuits (`chain_pulse_gen`, `DECODER_GEN = 0`).** Five
`clock_pulse_circuit`s in a row. Pulse k (T = 0) is high during
[2kU, (2k+1)U). This is the simpler generator that the decoder version is
measured against.

`clock_pulse_circuit` is the pulse source: a pulse of `WIDTH` starting
`OFFSET` after each rising clock edge. It uses transport delays.

### Timing rules for users of `bidir_shift_register`

* The clock period must exceed 7·`UNIT` with the decoder generator, and
  10·`UNIT` with the chain generator.
* `sr_in`: stable shortly before the rising edge, and until `UNIT` after it.
* `right`: must not change while pulses are running. It may change from
  6·`UNIT` after the edge (9·`UNIT` with the chain generator) until the
  next edge.
* `q` is settled from that same point until the next rising edge. A
  flip-flop on the same clock therefore samples the result of the previous
  shift.

## DA FIR filter (`da_fir`)

y[n] = h[0]x[n] + h[1]x[n-1] + h[2]x[n-2] + h[3]x[n-3]. The samples are 4-bit
two's complement. The coefficients are the `COEF` parameter: signed 6-bit,
default {5, -3, 11, 7}.

* **Shift register unit.** `x_in` carries the sample bits, least significant
  bit first, one bit per clock, into a 16-bit `bidir_shift_register` that
  always shifts right. A sample is exactly one 4-bit sub register long. The
  last latch of each sub register (Q<4>, Q<8>, Q<12>, Q<16>) therefore holds
  the same bit position of x[n], x[n-1], x[n-2] and x[n-3].
* **DA look-up table (`da_lut`).** The four tap bits form the address
  {b3,b2,b1,b0}, with b0 taken from x[n]. Word a is the sum of the h[k]
  whose bit k of a is set: 0, h[0], h[1], h[1]+h[0], ... up to
  h[3]+h[2]+h[1]+h[0]. The 16 words are computed from `COEF` when the design
  is elaborated.
* **Adder/shifter (`da_adder_shifter`).** acc ← (acc >>> 1) ± word·2³. It
  adds for bits 0 to 2 and subtracts for bit 3, the two's-complement sign
  bit. The table word is scaled up rather than letting shifted-out bits drop,
  so after four steps the accumulator holds y[n] exactly, in 13 bits.

Interface and timing: `bit_idx` (0..3) says which bit of the current sample
is latched at the next rising edge. Present that bit on `x_in` before the
edge; change it only after 6·`UNIT`. `y_valid` is high for one cycle
every four. `y` is then the output for the sample whose bit 0 was latched
8 rising edges earlier. The rate is one output per four clocks.

## Top level (`bsr_dafir_top`)

The 256-bit register and the filter sit side by side on a shared clock and
reset. Ports: `right`, `sr_in`, `sr_q[255:0]` for the register;
`x_in`, `bit_idx`, `y`, `y_valid` for the filter. Parameters: `N_SUB` (64),
`UNIT` (0.2 ns), `COEF_W` (6), `LUT_W` (8), `COEF`.

## Where this design departs from, or adds to, the original scheme

* The drawing of the decoder-based generator shows only four decoder lines
  and no temporary latches. Without temporary latches, a shared set of four
  pulses cannot shift across a sub-register boundary correctly. So the
  temporary latches of the full register and a fifth (T) pulse from a
  separate pulse circuit are kept.
* The pulse timing, the Gray-order use of the decoder, the delay unit and
  the pulse widths are this design's choices. None of them were specified.
* The clear input, the tie of T<0>'s unused right input to Q<1>, and the use
  of one `sr_in` for both ends are additions or readings of this design.
* In the filter, the original drawing shows each sample row recirculating.
  Here the samples pass through one serial register, which gives the same
  taps. The sample width (4 bits), the coefficient values and widths, the
  bit counter, the valid flag and the exact-width accumulator are this
  design's choices. The filter never uses the left shift.
* Reported figures for the scheme are given as transistor counts, power and
  delay of a transistor-level implementation (about 160 transistors for the
  decoder-based register against 206 with the chain generator, about 150 mW
  against 169 mW, 2.45 ns; about 223 transistors, 168 mW and 4.49 ns for
  the filter). This RTL cannot reproduce them: its latches and
  pulse circuits map to whatever cells a flow provides.
* Circuit-level measures of the scheme are not modelled: dropping the
  multiplexer's input and output inverters, and driving the pulse lines
  from global clock buffers.
* The register built from flip-flops and multiplexers, the master-slave
  flip-flop and the direct-form FIR filter are reference designs and are not
  included.

## How far to trust it

The latch-level behaviour is simulated with event timing: real delays in the
pulse generators and real latches in the datapath. Every block has a
self-checking testbench in `tb/` against an independent reference model:

* the full 256-bit register, with both generators, over 2000 cycles of random
  data and direction changes;
* the pulse generators, for non-overlap and pulse order;
* the filter, against direct convolution, including extreme samples and
  extreme coefficients;
* `tb_bsr16_fill_drain`, which fills a 16-bit register with ones by right
  shifts and drains it by left shifts, with both generators;
* `tb_bsr_dafir_top`, which runs the whole design at its default parameters.

Limitations:

* Latch timing is only as good as the delay model. Zero-delay latches and
  exact transport delays hide the hold-time margins a real circuit needs.
* Synthesis tools ignore the delays in the two generators and in
  `clock_pulse_circuit`. Those need a custom pulse-generator cell in a real
  flow.
* Lint tools report a combinational loop through the bidirectional latch
  chain (each latch reads its neighbour and is read back). The loop is never
  closed in operation, because neighbouring latches are never transparent at
  the same time.

## Files and simulation

`rtl/` holds one module per file, plus `bsr_pkg.sv` (the sub-register width,
the pulse-vector type and the index of the T pulse). `tb/tb_<module>.sv` is
the testbench of each module. Each testbench prints
`TB_RESULT checks=N failures=M`.

With Verilator 5 (the models need `--timing`), from the directory that holds
`rtl/` and `tb/`:

    verilator --binary --timing --timescale 1ns/1ps -Wno-fatal \
      -y rtl -y tb rtl/bsr_pkg.sv tb/tb_bsr_dafir_top.sv --top-module tb_bsr_dafir_top
    ./obj_dir/Vtb_bsr_dafir_top

Swap in any other testbench name to test a single block. To change the filter,
override `COEF` (and `COEF_W`/`LUT_W` if the values need more bits). To change
the register length, override `N_SUB`. To choose the pulse generator, set
`DECODER_GEN` on `bidir_shift_register`.
