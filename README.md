# Multiplierless DWT/IDWT with a reduced distributed-arithmetic memory

This is a discrete wavelet transform (DWT) and inverse transform (IDWT)
processor with no multipliers. Every filter is evaluated with distributed
arithmetic (DA), which replaces the multiplications with table look-ups and
additions.

A plain DA filter needs a lookup table that holds every possible sum of its
coefficients. That table grows as 2^(number of taps). For 16-sample frames,
the four analysis levels need 52 946 words. This design stores far less. It
takes the input samples two at a time. For each pair of adjacent taps it
stores only the three non-zero combinations: tap a, tap b and a + b. The
all-zero combination needs no word. The analysis filters then fit in
**56 words**, and a small adder tree adds the looked-up words together.

The processor handles frames of P = 16 samples of 16 bits. It computes four
resolution levels, so each frame gives 8 + 4 + 2 + 1 wavelet coefficients
plus one residue word. The synthesis bank turns such a 16-word frame back
into 16 samples. Both banks share one coefficient memory.

## What the analysis bank computes

The 16 samples of a frame are x_0 .. x_15. Resolution level i (i = 1..4)
produces P/2^i coefficients. Coefficient j (j = 1, 2, ...) of level i is a
causal convolution that ends at sample (j-1)·2^i:

    w(i,j) = sum_{n=0}^{(j-1)2^i}  x_n · g_i[(j-1)2^i - n]

So coefficient j uses s = 1 + (j-1)·2^i samples. Level 1 coefficient 8, for
example, pairs x_0..x_14 with taps g_1[14]..g_1[0]. Each level has its own tap
set g_i[0 .. P-2^i]. The last level also outputs one residue word,
x_0 · r_0.

The output words are numbered q = 0..15:

| q      | word                         |
|--------|------------------------------|
| 0..7   | level 1, j = 1..8            |
| 8..11  | level 2, j = 1..4            |
| 12, 13 | level 3, j = 1, 2            |
| 14     | level 4, j = 1               |
| 15     | residue                      |

The filter taps are not fixed in hardware. They are loaded into the memory at
run time, so any filter set that fits the number format can be used.

## The reduced memory and its addressing

This is the core of the design.

### One DA bit cycle

DA handles one bit position m of the samples per clock cycle. For each bit it
adds up the taps of all samples whose bit m is 1. It then shifts that sum into
an accumulator. In two's complement the sign bit has weight -2^(W-1), so the
sum for bit m = W-1 is subtracted instead of added.

### Pairs and slices

The design groups the samples of a coefficient into pairs (x_{2t}, x_{2t+1}).
One sample is left over: the last one, x_{(j-1)2^i}, which always meets tap
g_i[0].

Pair t of coefficient (i,j) meets the taps (g_i[2u], g_i[2u-1]), where

    u = (j-1)·2^(i-1) - t

This u is the **slice** number. The same slice appears in every coefficient of
the level, only at a different pair position. Sample m of coefficient j and
sample m + 2^i of coefficient j+1 meet the same taps. This repetition is the
symmetry the design exploits: each slice is stored once, and the address
generator works out which pair of the current coefficient meets which slice.

### Pair codes

The two bits of a pair form a 2-bit code, {x_{2t+1} bit, x_{2t} bit}:

| code | x_{2t+1} bit | x_{2t} bit | fetched word          |
|------|--------------|------------|-----------------------|
| 00   | 0            | 0          | nothing               |
| 01   | 0            | 1          | g_i[2u]               |
| 10   | 1            | 0          | g_i[2u-1]             |
| 11   | 1            | 1          | g_i[2u] + g_i[2u-1]   |

### Memory size

Level i has k = P/2 - 2^(i-1) slices. It therefore needs M_i = 3k + 1 words:
three per slice, plus g_i[0]. For P = 16, M = 22, 19, 13 and 1 for levels 1
to 4. With one residue word, the analysis region holds 56 words.

### Memory map (`dwt_pkg`)

| address                  | content                                  |
|--------------------------|------------------------------------------|
| 0                        | residue tap r_0                          |
| abase(i)                 | g_i[0]                                   |
| abase(i) + 3u - 3 + code | code 1: g_i[2u], 2: g_i[2u-1], 3: the sum |
| 56                       | synthesis residue tap                    |
| sbase(i) + d             | synthesis tap f_i[d], d = 0 .. P-2^i     |

The level bases are abase = 1, 23, 42, 55 and sbase = 57, 72, 85, 94. The
memory holds 95 words of 16 bits.

Each level therefore starts like the smallest example, a 4-word table for
three taps h_0, h_1, h_2: h_0, h_2, h_1, h_1 + h_2.

### Loading the memory

The host precomputes the pair sums g_i[2u] + g_i[2u-1] and writes every word
through `mem_we`/`mem_waddr`/`mem_wdata`, one word per cycle. The
`load_table` task in `tb/tb_dwt_idwt_top.sv` shows how the table is built.

Memory words are two's complement with 14 fraction bits (Q2.14), so a stored
pair sum can reach almost ±2. Taps of magnitude below 1.0 are always safe.

### The memory is a register file

The memory is a register array, not an SRAM macro, so one cycle can read many
words. The analysis unit reads up to 8 words per cycle: 7 pairs and the
single sample. The synthesis unit reads up to 16.

## Datapath and number formats

### Analysis unit

The analysis unit (`analysis_unit`) contains three parts:

- **Address generator** (`analysis_agu`): purely combinational. It turns bit
  m of the 16 buffered samples into up to 8 memory requests.
- **Adder tree**: adds the fetched words into a 19-bit `partial`.
- **Shift-accumulator** (`da_accumulator`): adds partial·2^m into a 35-bit
  accumulator, negated for the sign bit.

The accumulator is wide enough that the whole sum is exact.

### Output quantization

Only the finished sum is quantized. The sum is shifted right by 14 bits (the
fraction bits of the taps), truncating toward minus infinity. The result is
then saturated to 16 bits. So a wavelet word has the same scale as the input
samples. If the samples are read as Q1.15, the words are Q1.15 too.

### Synthesis unit

The synthesis unit (`synthesis_unit`) has the same structure, with 16
variables (the 16 input words) and a 20-bit partial sum.

## The synthesis bank

The synthesis bank rebuilds 16 samples from a 16-word frame:

    xr_n = sum over words (i,j) with 0 <= (j-1)2^i - n <= P - 2^i of
           w(i,j) · f_i[(j-1)2^i - n]
         + res · f_0   (for n = 0 only)

It uses the same sample/word pattern as the analysis bank, read the other way
round (the transpose). Each word spreads back over the samples it was computed
from. It has its own tap sets f_i.

The synthesis region stores one word per tap, 39 words in all. It stores no
pair sums. The adder tree adds the taps for every word whose bit m is set.

This bank's equations are a choice of this design. Its function, to rebuild
the frame with DA, comes from the architecture, but the exact filters do not.
Whether the output matches the original signal depends entirely on the taps
that are loaded.

## Control and interface timing

Each bank is run by its own controller. Both controllers are instances of
`bank_controller`, and both follow the same three steps.

1. **Accept.** While the bank is idle, hold the active-low strobe low
   (`data_ready_n` for analysis, `wavelet_ready_n` for synthesis). One word is
   taken on every rising clock edge while the strobe is low. After 16 words
   the frame is complete. A bank that is busy ignores the strobe, and any word
   offered then is lost.
2. **Compute.** The bank computes for 16 × 16 = 256 cycles: the output word
   index q is held for 16 cycles while the bit index m runs from 0 to 15.
3. **Output.** The active-low `analysis_over_n` (or `synthesis_over_n`) goes
   low for 16 cycles. During those cycles the output port carries words 0..15,
   one per cycle. Outside this window the output is zero.

Timing of one frame:

- The first result appears 257 cycles after the edge that takes the last
  input word.
- A frame occupies a bank for 16 + 256 + 16 = 288 cycles.
- The two banks run independently, so the synthesis of frame k can overlap
  the analysis of frame k+1.
- The analysis outputs and the `over_n` strobe use the same format as the
  synthesis inputs and the ready strobe. `wavelets_output` and
  `analysis_over_n` can therefore be wired straight to `wavelets_input` and
  `wavelet_ready_n`.

At 1 MHz, a 264 000-sample signal (16 500 frames) takes about 4.75 s per
bank.

### Top-level ports (`dwt_idwt_top`)

| port                              | dir | width | use                             |
|-----------------------------------|-----|-------|---------------------------------|
| clk, rst_n                        | in  | 1     | clock, asynchronous active-low reset |
| mem_we, mem_waddr, mem_wdata      | in  | 1/7/16| coefficient memory write        |
| in_data, data_ready_n             | in  | 16/1  | analysis input                  |
| wavelets_output, analysis_over_n  | out | 16/1  | analysis output                 |
| wavelets_input, wavelet_ready_n   | in  | 16/1  | synthesis input                 |
| reconstructed_data, synthesis_over_n | out | 16/1 | synthesis output              |

Reset clears the memory, the buffers and both controllers. Load the
coefficients after reset.

## Files

One module or package per file:

| file | what it is |
|------|------------|
| `rtl/dwt_pkg.sv` | Sizes, memory-map functions (k, M_i, TMR, level bases), word-number mapping, enums. |
| `rtl/generic_memory.sv` | Shared register-file coefficient memory. |
| `rtl/analysis_agu.sv` | Address generation unit (pair codes, slice addressing). |
| `rtl/da_accumulator.sv` | Bit-serial shift-accumulate and output quantization. |
| `rtl/analysis_unit.sv` | Analysis DA filter (address generator + adder tree + accumulator). |
| `rtl/synthesis_unit.sv` | Synthesis DA filter. |
| `rtl/input_unit.sv` | Frame buffer with bit-slice read-out (used by both banks). |
| `rtl/output_unit.sv` | Result buffer and output stream (used by both banks). |
| `rtl/bank_controller.sv` | Sequencer (used by both banks). |
| `rtl/dwt_idwt_top.sv` | The whole processor. |

The parameters P and W default to 16. The memory map follows from P through
the functions in `dwt_pkg`, for any power of two P ≥ 4. Only P = W = 16 has
been simulated.

## Verification

Each testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. Every testbench works out its expected
values on its own, from direct convolution sums with 64-bit integers and with
its own copy of the memory-map rules. None of them reuses the RTL's functions.

| testbench | what it checks |
|-----------|----------------|
| `tb_dwt_pkg` | Memory-map sizes and bases (56, 19 and 6 words for P = 16, 8, 4; 95 words in all for P = 16), and the mapping from word number to level and coefficient. |
| `tb_generic_memory` | All 24 read ports against a model, with random writes. |
| `tb_input_unit` | Frame capture with gaps in the strobe, the `frame_full` pulse, words ignored while busy, every bit slice. |
| `tb_output_unit` | Slot writes, read-back, and a zero output when hidden. |
| `tb_bank_controller` | Exact cycle sequence of q and m, the write strobe, and the 16-cycle `over_n` window. An assertion in the controller flags a frame-full report outside the idle state. |
| `tb_analysis_agu` | For every word q and random bit slices, that the fetched words add up to the exact tap sum, plus the 00/01/10/11 cases of the x_2/x_3 pair of the third level-1 coefficient. |
| `tb_analysis_unit`, `tb_synthesis_unit` | Whole DA evaluations against the convolution model, including saturation. |
| `tb_dwt_idwt_top` | End to end at full size: the table is loaded through the port; 12 frames go through analysis and then synthesis. It checks every word, the 257-cycle latency, the 56-word table size and dropped words while busy. It counts all four pair codes and saturation, and fails if any of them never occurred. |
| `tb_workload_stream` | 264 000 synthetic speech-like samples, then 264 000 random samples (33 000 frames). Analysis and synthesis run overlapped, and all 1 056 000 output words are checked. |

The speech-like input is synthetic: harmonics under a syllable-rate envelope.
The filter taps are random. These tests therefore show that the hardware
matches the arithmetic model bit for bit. They say nothing about wavelet
quality.

To run one testbench with Verilator (from the directory that holds `rtl/` and
`tb/`):

    verilator --binary --timing --assert -Irtl -Itb rtl/dwt_pkg.sv \
        tb/tb_dwt_idwt_top.sv --top-module tb_dwt_idwt_top -o sim
    ./obj_dir/sim

The stream test takes about 10 s. All the others take well under a second.

## Where this design makes its own choices

The following come from the architecture this design implements:

- The block structure: input, analysis or synthesis unit, and output unit per
  bank; one controller per bank; one shared memory.
- The active-low ready and "over" signals.
- P = 16 and W = 16.
- The DA formulation and two's complement arithmetic.
- The pairing rule, the three stored words per slice and the extra word for
  the unpaired sample.
- The 56-word analysis memory, and a register-based memory rather than an
  SRAM.

The following are this design's own choices:

- **Filter taps.** None are built in. The taps of each level are loaded at
  run time. Each level is computed directly from the frame samples, and the
  tap values of a real wavelet are left to the user.
- **Synthesis equations and storage.** The transpose pattern, and one stored
  word per tap with no pair sums.
- **Number formats.** Q2.14 taps, and truncation followed by saturation on
  the final sum only.
- **Interface timing.** One word per cycle while the strobe is low; the
  `over_n` strobe doubles as the output-valid window; words offered while a
  bank is busy are dropped.
- **Frame schedule and reset.** One output word at a time, least significant
  bit first, 16 cycles per word. Reset clears everything.
- **Adders.** A single adder tree per unit, rather than separate ripple-carry
  adders per coefficient.
- **The memory load port.**
