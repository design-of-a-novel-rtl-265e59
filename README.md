# Multi-output counter NCO with a Manchester decoder

A numerically controlled oscillator (NCO) usually makes one output
frequency: a phase accumulator walks through a sine lookup table, and a new
frequency range means recomputing the table. This design replaces the table
with plain counters. One input clock feeds four independent dividers. Each
divider has its own 4-bit ratio, its own enable and its own reset. A system
with several modules that run at different rates can take all their clocks
from one block and switch off the ones it does not need.

One NCO output is then used as the sampling clock of a small Manchester
decoder. The decoder is the classic "flip-flop + XOR + gate + pulse NCO"
circuit. It recovers the data of a G.E. Thomas coded line without any
processor involvement.

```
                      nco_manchester_top
  +----------------------------------------------------------------+
  |  top_modul (multi-output NCO)                                   |
  |  +----------------+   reset[3:0]  +---------------------------+ |
  |  | reset_register |-------------->| four_output_clk_divider   |-+--> output_clk[3:0]
  |  +----------------+               +---------------------------+ |
  |   ^ global_reset, output_reset     ^ enable, freq_divider        |
  |                                                                 |
  |            output_clk[FOSC_SEL] = Fosc                          |
  |  +-------------------------------------------------------------+|
  |  | manchester_decoder:  D flip-flop -> XOR -> AND-OR -> pulse_nco||--> data_out, bit_valid, clock_out
  |  +-------------------------------------------------------------+|
  +----------------------------------------------------------------+
```

## The clock dividers (`four_output_clk_divider`)

`freq_divider[15:0]` holds four 4-bit ratios. Output *i* uses
`freq_divider[4i+3:4i]`. With ratio D, output *i* runs at
f_in / D:

* a counter runs 0 … D−1 on every `input_clock` edge;
* the registered output is high for the first ⌊D/2⌋ counts and low for the
  rest. Even ratios give a 50 % duty cycle. Odd ratios stay low one input
  period longer than they are high (D = 3: one high, two low);
* ratios 0 and 1 hold the output low. A flip-flop on the same clock cannot
  produce divide-by-1.

`enable[i] = 0` or an active reset holds output *i* low and parks its
counter. After the output is released, it goes high on the next edge and a
full period follows, so a restarted clock never starts with a short pulse.
A ratio written while the output runs takes effect at once. If the counter
is already past the new end, it wraps to 0, so the period in which the
change happens can be shortened.

The outputs are registered, so they are glitch-free and can be used as
clocks. Only one counter of 4 bits and one flip-flop are needed per output.

## Resets (`reset_register`)

The per-output `output_reset[3:0]` passes through a 4-bit register on
`input_clock`, so it takes effect on the next clock edge. The one-bit
`global_reset` sets all four bits asynchronously. Every output then drops
low on the next clock edge and stays low while `global_reset` is high.
After `global_reset` falls, the register follows `output_reset` again from
the first clock edge.

In `nco_manchester_top`, `global_reset` also resets the decoder
asynchronously. This matters because the decoder's clock stops while the
dividers are held in reset.

## The Manchester decoder (`manchester_decoder`, `pulse_nco`)

In G.E. Thomas coding, every bit has a transition in its middle:
high→low for a 1 and low→high for a 0. So the level in the first half of a
bit is the bit itself. Between two equal bits the line also changes at the
bit boundary. The decoder must ignore those boundary transitions and
respond only to the mid-bit ones. It does this with a fixed-length blanking
pulse.

**Stage 1, D flip-flop.** `q1` (= `data_out`) holds the line level taken at
the end of the last pulse.

**Stage 2, XOR.** `data_in ^ q1` goes high as soon as the line leaves the
sampled level. Between pulses, the line can only leave it at a mid-bit
transition.

**Stage 3, AND-OR gate and pulse NCO.** The NCO is advanced on every
`fosc` cycle where the XOR is high **or** its own pulse is already running.
This is the gate (Fosc AND xor) OR (Fosc AND pulse), built here as a clock
enable rather than a gated clock. On each advanced cycle, `pulse_nco` adds
`increment` to a 16-bit accumulator. Its active-low output `clock_out` is
low from the first advanced cycle until the addition carries out. On the
carry edge:

* the pulse ends;
* the accumulator is cleared;
* the flip-flop samples `data_in`.

So the XOR starts a pulse of N = ⌈2¹⁶ / increment⌉ Fosc cycles. The pulse
is meant to be ¾ of a bit. Any boundary transition falls inside the pulse
and is ignored, because the "pulse running" term keeps the NCO counting
even if the XOR drops again. When the pulse ends, the line is a quarter bit
into the next bit, so the flip-flop takes that bit's first-half level, which
is its value. That makes the XOR fall, and the next mid-bit transition
starts the next pulse.

### Setting it up

* Choose N ≈ ¾ of the bit time T_bit, in Fosc cycles. The half-bit time
  must lie strictly between N/2 and N. For example: T_bit = 8 cycles,
  N = 6, `increment` = ⌈65536/6⌉ = 10923.
* `data_in` must change on rising Fosc edges. The decoder has no input
  synchronizer.
* Latency: a mid-bit transition just after Fosc edge E₀ puts the next bit
  on `data_out` at edge E₀+N. `bit_valid` is high for one cycle after that
  edge.

### Framing

The decoder cannot tell a mid-bit transition from a boundary transition
unless it starts in phase, so the first transition it sees must be a
mid-bit one. Before a frame, let the line rest for at least N+1 Fosc cycles
at the first-half level of bit 0. The decoder then holds that level, which
is bit 0. The mid-bit transition of bit *k* then yields bit *k*+1. The
mid-bit transition of the last bit yields the level the line rests at
after the frame, which works as a stop level. If the first transition is a
boundary transition, the decoder samples second-half levels and outputs
wrong bits until a pair of differing bits (which has no boundary
transition) brings it back in phase.

## Top level (`nco_manchester_top`)

The top instantiates the NCO (`top_modul`) and the decoder. The decoder
is clocked by `output_clk[FOSC_SEL]` (default output 0). Other
outputs stay free for other uses. The decoder runs only while its output is
enabled with a ratio of 2 or more.

| parameter  | default | meaning                                  |
|------------|---------|------------------------------------------|
| `N_OUT`    | 4       | number of divided outputs                |
| `DIV_W`    | 4       | ratio bits per output                    |
| `ACC_W`    | 16      | pulse NCO accumulator width              |
| `FOSC_SEL` | 0       | output that clocks the decoder           |

The defaults live in `rtl/nco_pkg.sv`.

## Relation to the original description and choices made here

These parts follow the original design:

* four divided outputs from one clock;
* the port names and widths (`enable[3:0]`, `freq_divider[15:0]`,
  `output_reset[3:0]`, one-bit `global_reset`);
* a register between `output_reset` and the divider that `global_reset`
  sets;
* the decoder's stage structure, its ¾-bit pulse and the G.E. Thomas
  convention.

These are choices of this implementation:

* the 4+4+4+4 split of `freq_divider`;
* the duty cycle of odd ratios and the handling of ratios below 2;
* the asynchronous global reset;
* clearing the accumulator at each overflow, so every pulse has the same
  length;
* the 16-bit accumulator;
* sampling the line at the end of the pulse;
* the clock enable in place of a gated clock;
* which output clocks the decoder.

The original text reports only the first three bits of the 7-bit frame
1101001. This decoder outputs every bit of a properly framed stream. It
also quotes a 10 ns Fosc alongside a 50 MHz NCO input. Here Fosc is taken
from the NCO, at 50 MHz / 10 in the tests.

The conventional single-output counter-and-table NCO is a comparison
baseline, not part of this design, and is not included.

## Simulating

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. For
example:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/nco_pkg.sv tb/tb_nco_manchester_top.sv --top-module tb_nco_manchester_top
./obj_dir/Vtb_nco_manchester_top
```

| testbench                     | what it checks |
|-------------------------------|----------------|
| `tb_reset_register`           | one-edge delay, asynchronous global set, release |
| `tb_four_output_clk_divider`  | every output every cycle against ((k−1) mod D) < ⌊D/2⌋; ratios 10/2 → 5/3; random ratios, enables, resets; ratio change while running |
| `tb_top_modul`                | the same with the reset register in the path and random global resets |
| `tb_pulse_nco`                | pulse length ⌈2¹⁶/inc⌉ for 300 random increments, with enable gaps; overflow timing; reset mid-pulse |
| `tb_manchester_decoder`       | random frames at bit times of 8, 10, 16 and 40 cycles; decoded bits, exact latency N, stop level, pulse shape, masked boundary transitions |
| `tb_nco_manchester_top`       | all defaults, 50 MHz input: ratios 10/2 then 5/3 with period and high time measured, per-output reset, disable, global reset; then the decoder on Fosc = 50 MHz/10 with the frame 1101001 and 10 random frames. It counts each mechanism and fails if one never happens |

All testbenches run in well under a second.
