# A 12-bit pipelined phase accumulator for direct digital synthesis

A direct digital synthesizer (DDS) makes a sine wave from a clock. A phase
accumulator adds a frequency word `A` to a 12-bit phase on every clock; the
phase addresses a sine look-up table; a DAC turns the table output into a
voltage. The output frequency is

    fout = A * fclk / 2^12

so with a 50 MHz clock, `A = 1` gives about 12.2 kHz and `A = 2048` gives
25 MHz.

The accumulator sets the clock rate of the whole synthesizer. A plain 12-bit
accumulator needs a 12-stage carry ripple in every cycle. This design cuts
the adder into three 4-bit slices and puts a flip-flop on each slice's carry
out. No carry then ripples through more than four full adders per clock. The
cost is that the three slices work on different clock cycles of the
accumulation. A few extra flip-flops on the outputs line them up again.

The RTL follows the structure of the original design, cell by cell: gate
cells, a full adder made from those gates, a 4-bit accumulator slice of four
full adders and five flip-flops, and the 12-bit accumulator made of three
slices. The chip around the accumulator (sine ROM and DAC) is described only
at block level, so those parts are this implementation's own. They are listed
under [Departures and choices](#departures-and-choices).

## How the pipelined accumulator works

### One slice (`acc4`)

A slice holds a 4-bit value `S`. On each rising edge it adds the slice's four
bits of `A`, plus a carry in:

    {Cout0, S} <= S + A + cin

Four full adders form a ripple-carry chain. Their sum outputs go into four
D flip-flops, and the flip-flop outputs feed back into the adders' second
inputs. The carry out of the top adder goes into a fifth flip-flop. So
`Cout0` is the carry of the addition that produced the current `S`. It
reaches the next slice exactly one clock later.

### Three slices (`acc12`)

Slice 0 holds phase bits 3..0, slice 1 bits 7..4 and slice 2 bits 11..8. Each
slice takes its bits of `A` straight from the input pins. The carry in of
slice 0 is tied low. Each other slice takes the registered carry of the slice
below it.

Take a carry that slice 0 produces on edge *n*. Slice 1 adds it on edge
*n+1*, and any carry that results reaches slice 2 on edge *n+2*. So slice 1
runs one accumulation step behind slice 0, and slice 2 runs two behind.
Equivalently, slice *k* shows, one clock earlier, the step that slice *k-1*
shows. Re-alignment flip-flops put all the bits back in step:

| slice | phase bits | re-alignment flip-flops |
|-------|------------|-------------------------|
| 0     | 3..0       | 2 per bit               |
| 1     | 7..4       | 1 per bit               |
| 2     | 11..8      | none                    |

The top carry, `Cout0`, comes straight out of slice 2's fifth flip-flop, so
it lines up with `S`. Counting the flip-flops: 3 × 5 in the slices, plus
4 × 2 + 4 × 1 for re-alignment, gives 27 flip-flops.

### What `S` shows

The input bits are not delayed per slice. The original design has no input
skew registers, and neither does this RTL. Count the rising edges after reset
as n = 1, 2, …, and let A(e) be the word sampled at edge e. Then:

    S(n) = Σ_{e ≤ n-2} A[3:0](e) + 16·Σ_{e ≤ n-1} A[7:4](e) + 256·Σ_{e ≤ n} A[11:8](e)   (mod 4096)

This has three consequences:

* **Constant word.** `S` advances by exactly `A` (mod 4096) on every clock.
  This is what a DDS needs. The ramp starts from a constant offset of
  `-(2·A[3:0] + 16·A[7:4])`, which only shifts the phase of the output sine.
  For example, with `A = 0x111` the values of `S` after edges 1, 2, 3, 4, 5
  are `0x100, 0x210, 0x321, 0x432, 0x543`.
* **Latency.** The top bits of a word act on the first edge, the middle bits
  one edge later and the low bits two edges later. The first sum from the low
  slice reaches `S` after the third edge.
* **Word change.** For two clocks after a change of `A`, the slices add
  different words: the upper slices already use the new word while the lower
  ones still use the old. After that, `S` again advances by `A` every clock.
  The phase keeps a small constant offset from the change.

`Cout0` is 1 in the cycle where `S` shows a value that wrapped past 4096. With
`A = 1` the wraps are exactly 4096 clocks apart: one full accumulation cycle,
the staircase of the phase word. With `A = 0x800` there is a wrap every
second clock.

### Cell hierarchy

| module       | contents |
|--------------|----------|
| `inv`, `nand2`, `nor2`, `xor2` | logic functions of the CMOS cells |
| `and2`       | `nand2` followed by `inv` |
| `or2`        | `nor2` followed by `inv` |
| `full_adder` | `S = A⊕B⊕Cin` from two `xor2`; `Cout = A·B + (A⊕B)·Cin` from two `and2` and one `or2` |
| `dff`        | rising-edge flip-flop with `q` and `q_bar` |
| `acc4`       | 4 × `full_adder`, 5 × `dff` |
| `acc12`      | 3 × `acc4`, 12 re-alignment `dff`s |
| `dds_chip`   | `acc12` → `sine_rom` → `dac` |

Synthesis flattens the cells into ordinary logic, so the hierarchy costs
nothing. Its purpose is to keep the RTL readable next to the cell-level
design.

## The synthesizer (`dds_chip`)

| port     | dir | width | meaning |
|----------|-----|-------|---------|
| `clk`    | in  | 1  | clock (50 MHz in the original chip) |
| `rst_n`  | in  | 1  | asynchronous reset, active low; clears all 27 flip-flops |
| `A`      | in  | 12 | frequency word (pins A0..A11) |
| `S`      | out | 12 | phase word |
| `Cout0`  | out | 1  | phase wrap |
| `sample` | out | 8  | sine ROM output, the DAC's input code |
| `out`    | out | 32 | DAC output voltage in microvolts |

`sample` and `out` follow `S` combinationally, in the same cycle.

**`sine_rom`** holds one period of a sine over all 4096 phase values, as
8-bit offset binary:

    data = round(127.5 + 127.5 · sin(2π · addr / 4096))

A constant function computes the table when the design is elaborated, so no
data file is needed. The read is combinational. 0° and 180° give 128, 90°
gives 255 and 270° gives 0. The parameters `AW` and `DW` set the address and
sample widths.

**`dac`** is a behavioural model, not a circuit. It is an ideal linear
converter. Its 1.7 V peak-to-peak swing matches the output reported for the
original chip, centred on 2.5 V:

    vout_uv = 1 650 000 + round(1 700 000 · code / 255)

The voltage is an integer in microvolts rather than a `real`, so that
synthesis front ends can read the model.

Note on the 25 MHz operating point: with `A = 0x800` the phase alternates
between 0 and 2048. The sampled sine of this design then sits on its zero
crossings, so `sample` stays at mid-scale. A sine that shows in the analogue
output at exactly half the clock rate depends on the phase offset and on the
analogue reconstruction. Neither is modelled here.

## Departures and choices

These points follow the original design:

* the three 4-bit slices;
* the slice of four ripple-carry full adders and five flip-flops with a
  registered carry;
* the 2/1/0 output re-alignment flip-flops;
* no input skew registers;
* the full-adder equations;
* AND and OR built as NAND or NOR plus an inverter;
* the names `A0..A11`, `S0..S11`, `Cout0`, `d`, `q`, `q_bar`, `inp1`,
  `inp2`, `oup`;
* the accumulator → ROM → DAC chain.

These are this implementation's own choices:

* **Reset.** The original flip-flop and chip have no reset. An asynchronous
  active-low `rst_n` was added so that the phase starts at a known value.
* **Flip-flop.** The original flip-flop is a master-slave pair of gated
  latches. Here it is one `always_ff` process with the same rising-edge
  behaviour, because cross-coupled gates would form combinational loops.
* **XOR cell.** The XOR cell is written from its equation, not from its
  transistor circuit.
* **Carry in of slice 0.** It is tied low. The 12-bit accumulator has no
  carry-in pin.
* **ROM.** The ROM takes all 12 phase bits, with no truncation. Its 8-bit
  width, its table contents and its combinational read were chosen here.
* **DAC.** An ideal behavioural model; its 2.5 V centre and 8-bit input were
  chosen here.
* **Extra ports.** `S`, `Cout0` and `sample` are ports of `dds_chip` so that
  the chip can be observed. The original pin list has only the frequency
  word, clock, output and supplies.
* **Not modelled.** The pad ring, the output buffer and the reconstruction
  low-pass filter. They have no logic function.
* **Timing.** Transistor sizing, the 50–150 MHz timing and power figures
  have no RTL counterpart. At RTL the critical path of the accumulator is one
  4-bit ripple carry, as in the original slice.

The original slice was tested with the word `0011`, so the sum advances in
steps of three. The `acc4` testbench uses the same word and expects steps of
three.

## Files

* `rtl/dds_pkg.sv`: widths shared by the design (`ACC_W = 12`,
  `SLICE_W = 4`, `N_SLICES = 3`, `ROM_DW = 8`).
* `rtl/<module>.sv`: one module per file, as in the hierarchy table above.
* `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

Each testbench is self-contained. Verilator finds the modules it uses in
`rtl/`:

    verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
              --top-module tb_dds_chip rtl/dds_pkg.sv tb/tb_dds_chip.sv
    ./obj_dir/Vtb_dds_chip

What the testbenches check:

* **`tb_dds_chip`** runs the whole chip at its default sizes, in well under a
  second:
  * `A = 0x800` at a 50 MHz clock: 500 wraps in 1000 clocks, i.e. 25 MHz;
  * `A = 0x001`: wraps exactly 4096 clocks apart, and an output spanning
    1.65 V to 3.35 V;
  * 20 000 clocks with a new random word every 50 clocks.

  Every clock it checks `S`, `Cout0`, `sample` and `out` against models
  written independently of the RTL: three running sums lagging by one clock
  each, a floating-point sine, and the DAC formula. It also counts wraps,
  carries between slices and word changes, and fails if any of them never
  happens.
* **`tb_acc12`** checks the same running-sum model, the three-edge latency of
  the low slice, and the step of exactly `A` per clock for constant words.
* **`tb_acc4`** starts with the test word `0011` and then uses random words
  and carries.
* The cell testbenches check complete truth tables, and `tb_dff` checks edge
  behaviour and reset.
* **`tb_sine_rom`** and **`tb_dac`** sweep every address and every code.

To change the accumulator width, set `SLICE_W` and `N_SLICES` on `acc12`. The
re-alignment depth follows automatically: slice *k* gets
`N_SLICES - 1 - k` flip-flops.
