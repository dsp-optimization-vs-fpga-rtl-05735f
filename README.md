# 8-tap FIR filter in two hardware forms: one shared multiplier, or one multiplier per tap

A finite-impulse-response filter computes, for every input sample,

    y(n) = b(0)·x(n) + b(1)·x(n-1) + ... + b(7)·x(n-7)

a sum of products of the last eight samples with eight constant
coefficients. This RTL builds that filter twice, in the two classic
hardware forms that trade area for speed:

* **Sequential** (`fir_seq`): one multiplier, one adder and one accumulator
  are reused for all eight taps. A pointer walks the sample buffer and the
  coefficient table together, one tap per multiply-accumulate cycle, under a
  small state machine. Small, and slow: 18 clocks per sample.
* **Parallel** (`fir_par`): eight multipliers, one per tap, feed a tree of
  seven adders. A new sample is accepted and a new result produced on every
  clock.

Both forms take 16-bit two's-complement samples and 16-bit coefficients and
give 32-bit results. The top level, `fir_top`, places them side by side with
shared clock and reset and separate data ports, so the two can be compared
on the same input.

The structure of both filters (the blocks, their widths, the control signal
names RSP/EP/RSA/ES/EO, the five controller states, the full-buffer rule of
the parallel form, the 4 + 2 + 1 adder tree) follows a published comparison
of FIR filtering on a DSP processor and on an FPGA. Handshakes, reset
behaviour, the coefficient values, overflow handling and exact cycle timing
are not given there; they are choices of this implementation and are marked
as such below.

## Number formats and the default filter

| quantity | format |
|---|---|
| sample `x` | 16-bit signed |
| coefficient `b(k)` | 16-bit signed, constant (a parameter) |
| product | 32-bit signed (exact) |
| accumulator / adder tree / result `y` | 32-bit signed, wraps modulo 2^32 |

The coefficients are the parameter `COEFS`, a packed array in which element
`k` is `b(k)`, the weight of the sample `k` steps old. The default,
`fir_pkg::DEFAULT_COEFS`, is the symmetric low-pass `{1, 2, 3, 4, 4, 3, 2, 1}`
(DC gain 20). It is a placeholder: put your own filter in `COEFS`.

The 32-bit sum is not saturated. Eight full-scale products can reach about
2^33, so a filter whose coefficients are large can wrap. With the default
coefficients the largest result is 20 · 32768 = 655360, far from the limit.

Before the first sample, both filters treat the past as zero: reset clears
the sample buffer.

## Sequential filter (`fir_seq`)

### Datapath

```
          x ──► shift_buffer (8 × 16) ──taps[k]──┐
                                                 ├──► mac_acc: S <= S + taps[k]·b(k) ──► output reg ──► y
   pointer_k (k, 3 bit) ──► coef_rom ──b(k)──────┘      (ES adds, RSA clears)          (EO loads)
        ▲ RSP clears, EP advances
```

* `shift_buffer` holds the last eight samples. A load puts the new sample in
  entry 0 and moves every entry down by one, so entry `k` always holds
  `x(n-k)`. It is built from registers: every entry moves in one clock, which
  a block RAM cannot do.
* `pointer_k` is the tap index `k`. RSP clears it, EP advances it, and its
  `last` output (k = 7) is the loop-exit test, called CMP.
* `coef_rom` returns `b(k)` combinationally, so the buffer entry and its
  coefficient arrive in the same cycle.
* `mac_acc` multiplies them and, with ES, adds the product into the 32-bit
  accumulator S; RSA clears S.
* The output register copies S when EO is high.

### Controller (`fir_seq_fsm`)

The five states and the transitions between them follow the published state
diagram. Which controls each state drives, and the wait in INIT, are this
implementation's own choices.

| state | controls driven | next state |
|---|---|---|
| IDLE (after reset) | RSP, RSA | INIT |
| INIT | RSP, RSA; with `x_valid` also `load` | CMPT when `x_valid`, else stay |
| CMPT | ES (S += taps[k]·b(k)) | TEST |
| TEST | EP when CMP is low (k += 1) | CMPT if CMP low, DONE if CMP high |
| DONE | EO (y <= S) | INIT |

Each state lasts one clock, except that INIT waits for a sample.

### Timing and handshake

* A sample is taken when `x_valid` and `x_ready` are both high. `x_ready` is
  high only in INIT.
* When samples are always waiting, one sample takes **18 clocks**: INIT,
  eight pairs of CMPT and TEST, then DONE. Eight of these clocks are
  multiply-accumulate cycles.
* `y_valid` pulses for one clock, the clock after DONE. `y` then holds the
  result for the sample just taken, and it keeps that value until the next
  DONE.
* Every sample gives a result. There is no wait for the buffer to fill.

The published cycle count for this form is 8 clocks per sample (320 clocks
for 40 samples), which counts only the multiply-accumulate cycles. Here the
loop test is a state of its own, and there is one state for loading and one
for output. That is why the full count is 18. To get close to 8 clocks per
sample, merge CMPT and TEST into one state that does the multiply-accumulate
and the test together, and overlap INIT and DONE with the first and last
taps.

## Parallel filter (`fir_par`)

```
 x ──► shift_buffer ──taps[0..7]──► 8 multipliers (taps[k]·b(k), b constant)
                                        │
                 adder_tree: 4 adders ─► 2 adders ─► 1 adder ──► output reg ──► y
```

* Each clock with `x_valid` high loads one sample into the shift buffer.
* The eight buffer entries are each multiplied by their constant
  coefficient. The products are added two by two in a balanced tree of
  adders (`adder_tree`), and the output register captures the sum on the
  next clock edge.
* The buffer counts loads. `full` goes high at the eighth load and stays
  high until reset.
* Only results computed from a full buffer are flagged. `y_valid` is high
  one clock after each load made while the buffer is full, or made by the
  load that fills it. The first seven partial sums after reset are not
  flagged.

Timing: a sample that enters at clock edge n has its result in `y`, with
`y_valid` high, after edge n+1. With `x_valid` held high, a result comes out
every clock: 40 samples give 40 results in 40 consecutive clocks, once the
buffer is full. The published count for this form is the same (40 clocks
for 40 samples).

Because the coefficients are constants, synthesis turns most of the
multipliers into shifts and adds. With the default coefficients there are no
real multipliers left.

## Top level (`fir_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous reset, active high, clears every register |
| `seq_x`, `seq_x_valid` | in | 16, 1 | sample for the sequential filter |
| `seq_x_ready` | out | 1 | sample taken this clock |
| `seq_y`, `seq_y_valid` | out | 32, 1 | sequential result, one-clock valid pulse |
| `par_x`, `par_x_valid` | in | 16, 1 | sample for the parallel filter, up to one per clock |
| `par_y`, `par_y_valid` | out | 32, 1 | parallel result |
| `par_full` | out | 1 | parallel buffer full |

Parameters, shared by all modules and defaulted from `fir_pkg`:

| parameter | default | meaning |
|---|---|---|
| `TAPS` | 8 | filter length (buffer, table and multiplier count) |
| `DATA_W` | 16 | sample width |
| `COEF_W` | 16 | coefficient width |
| `ACC_W` | 32 | product, accumulator and result width |
| `COEFS` | {1,2,3,4,4,3,2,1} | coefficients, element k = b(k) |

`TAPS` need not be a power of two. The adder tree pads with zero terms, and
coefficient table addresses past the end read zero. The 3-tap filter
b = {-1, 0, 1}, the textbook difference filter, runs in the tests of both
forms with `TAPS = 3`.

In a full signal chain, an ADC behind an anti-aliasing filter supplies the
samples, and a DAC with a smoothing filter takes the results. Those analog
parts are not part of this RTL. Neither is the DSP processor that the
published comparison used as its software baseline.

## Throughput against common sample rates

At a 20 MHz clock, the clock used in the published comparison:

| signal | sample rate | sequential (1.11 Msample/s) | parallel (20 Msample/s) |
|---|---|---|---|
| speech | 8 kHz | yes | yes |
| audio | 44 kHz | yes | yes |
| video | 5 MHz | no (would need ≤ 4 clocks/sample) | yes |

## Where this implementation departs from, or adds to, the published design

* **Sequential cycle count:** 18 clocks per sample, not 8 (see above). The
  eight multiply-accumulate cycles do match.
* **Buffer:** the published text calls the sample buffer a block RAM, but
  the circuit shifts every entry at once. It is built here from registers.
* **Pointer width:** one 3-bit pointer addresses both the buffer and the
  table. The published drawing labels the pointer's wire to the table 2
  bits, which could not address eight entries.
* **Coefficients:** the published design gives none for its eight taps. The
  default set here is a placeholder.
* **Handshakes:** `x_valid`/`x_ready`, `y_valid` and the parallel filter's
  `x_valid` are additions. The published circuit has only a sample input,
  clock, reset and a 32-bit output.
* **Reset:** synchronous and active high. Only "reset returns the circuit to
  its initial state" is given.
* **Overflow:** 32-bit wrap-around, as the published widths imply.
* **Parallel output rule:** results are flagged only once the buffer is
  full, as published. The sequential form flags every result, counting
  samples before the first as zero.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares against a
reference computed in the testbench itself, such as a direct convolution,
and ends by printing `TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_shift_buffer` | entries and `full` against a software buffer, random loads, reset |
| `tb_coef_rom` | every entry of the default table and of a 3-tap {-1,0,1} table |
| `tb_pointer_k` | clear/advance/wrap and `last` for 8 and 5 taps |
| `tb_mac_acc` | signed products including -32768·-32768, 32-bit wrap |
| `tb_adder_tree` | 8-, 3- and 5-input trees, including wrap |
| `tb_fir_seq_fsm` | state sequence and the controls of every state; 8 ES cycles and 18 clocks per sample |
| `tb_fir_seq` | 200 random samples with gaps; 18 clocks per sample; 3-tap {-1,0,1} filter |
| `tb_fir_par` | random samples, default and arbitrary coefficients; 3-tap {-1,0,1} filter; `full` timing; 40 results in 40 clocks |
| `tb_fir_top` | both filters at the default size on the same 47 samples (7 to fill, 40 evaluated), against a reference and against each other; every controller path and the full-buffer event must occur; cycle counts of both forms |

Running a test with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
    rtl/fir_pkg.sv tb/tb_fir_top.sv --top-module tb_fir_top
./obj_dir/Vtb_fir_top
```

Replace `tb_fir_top` with any testbench name. Each one runs in well under a
second.

## Files

| file | content |
|---|---|
| `rtl/fir_pkg.sv` | sizes, default coefficients, controller state type |
| `rtl/fir_top.sv` | both filters side by side |
| `rtl/fir_seq.sv`, `rtl/fir_seq_fsm.sv`, `rtl/pointer_k.sv`, `rtl/coef_rom.sv`, `rtl/mac_acc.sv` | sequential filter and its parts |
| `rtl/fir_par.sv`, `rtl/adder_tree.sv` | parallel filter and its adder tree |
| `rtl/shift_buffer.sv` | sample buffer, used by both |
| `tb/tb_*.sv` | one testbench per module |
