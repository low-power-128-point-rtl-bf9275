# 128-point split-radix FFT on a multipath delay commutator pipeline

This is a streaming FFT for the smallest LTE bandwidth, where each OFDM symbol is
a 128-point DFT. It is a radix-2 **multipath delay commutator (MDC)** pipeline:
seven stages that each pair samples N/2, N/4, ... 1 apart through delay lines
and a 2x2 switch, then add and subtract them. What makes it a **split-radix**
FFT is only the twiddle schedule. The multipliers between stages apply the
split-radix factors (1, -j, W^n, W^3n) rather than the radix-2 ones. Many slots
therefore need only a swap and a negation, or nothing, and the complex
multiplier stays idle in them.

The pipeline has two input lanes. Each lane carries its own stream of 128-sample
frames, so the core transforms two frames every 128 clock cycles: two samples
in and two bins out per cycle.

## Top level: `srfft128_mdc`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous reset, active low |
| `in_valid` | in | 1 | both lanes carry a sample; low stalls the entire pipeline |
| `in0_re/im`, `in1_re/im` | in | DW (16) | lane 0 / lane 1 samples, signed |
| `in_index` | out | 7 | index within the frame of the sample taken this cycle |
| `out_valid` | out | 1 | this cycle carries two new bins |
| `out_frame_lane` | out | 1 | input lane of the frame those bins belong to |
| `out_frame_start` | out | 1 | first slot of a 128-cycle output period |
| `out_bin0`, `out_bin1` | out | 7 | bin numbers on `out0` and `out1` |
| `out0_re/im`, `out1_re/im` | out | DW+1+7 (24) | the bins, signed, unscaled |

Parameters: `N` (128, any power of two of at least 4), `DW` (16, input width)
and `TW` (16, twiddle width, with 1.0 = 2^(TW-2)).

**Input timing.** After reset, the first enabled cycle takes sample 0 of a frame
on both lanes. `in_index` counts from 0 to N-1 in enabled cycles and tells the
source which sample is due next. No start pulse exists: frames are defined by
this count alone.

**Output timing.** The pipeline fills after N - 1 + 2*log2(N) = 141 enabled
cycles. From then on, `out_valid` equals `in_valid`, and each 128-cycle output
period delivers two frames:

* slots 0..63 carry the lane-0 frame; slots 64..127 carry the lane-1 frame;
* in slot t of either half, `out0` holds bin bitrev7(2t) and `out1` holds bin
  bitrev7(2t+1), using the low six bits of t.

The output is therefore in bit-reversed order. The even-numbered bins come out on
`out0` and the odd-numbered bins on `out1`. `out_bin0[6]` is always 0 and
`out_bin1[6]` always 1. Frame k of a lane comes out in the k-th output period.

**Scaling.** No stage scales. Each butterfly grows the word by one bit, and one
guard bit is added at the input. The outputs are the exact DFT
X[k] = sum x[n] W_128^(nk), apart from twiddle rounding. Full-scale random input
gives errors of at most about 60 LSB on results that can reach 6·10^6.

**Stalls.** `in_valid` is a clock enable for every register. A cycle with it low
changes nothing and shows no new output.

## How samples move through a stage

Each stage `s` (`sr_stage`) has D = N >> (s+1). Both of its input lanes carry
blocks of 2D samples, and each block is one sub-DFT of that stage.

1. **Commutator** (`commutator`). The lower lane is delayed by D. A 2x2 switch
   passes straight for D cycles and then crosses for D cycles. The upper switch
   output is then delayed by D. As a result, samples k and k+D of a block reach
   the butterfly together. The pairs of the upper lane's block come first, then
   those of the lower lane's block. Latency: D cycles.
2. **Processing element** (`pe_butterfly`). It computes the sum and the
   difference, one bit wider than its inputs, and registers them.
3. **Twiddle rotation** (`twiddle_rom` + two `rotator`s). Each butterfly output
   is multiplied by 1, by -j, or by W_N^e. The rotator's output multiplexer picks
   the plain value, the swapped and negated value, or the complex product. When
   the product is not selected, the multiplier's operands are held at zero so
   that it does not toggle.

The sum outputs form the upper lane of the next stage and the differences form
its lower lane, in blocks of D. One stage therefore has a latency of D + 2
cycles.

A controller (`srfft_ctrl`) holds one counter of enabled cycles. Stage s runs
OFFSET(s) = sum over j < s of (N >> (j+1)) + 2 cycles behind stage 0. The
controller supplies that stage-local time, which drives the commutator switch
(bit log2(D)) and the twiddle table address.

## The split-radix twiddle schedule

This is the least obvious part. The split-radix equation splits an M-point DFT
into one M/2-point DFT of the even samples and two M/4-point DFTs, weighted by
W^n and W^3n. In a radix-2 pipeline this becomes a rule about blocks. Every
block a stage works on has one of two types:

* **F (fresh).** The block starts a split-radix decomposition. Its sum half
  becomes an F block of the next stage. Its difference half becomes an S block;
  its first quarter is passed unchanged, and its second quarter (n >= M/4) is
  multiplied by -j.
* **S (second column of the L butterfly).** The block is the odd half of a
  2M-point F block. Its sum output is multiplied by W_2M^n and its difference
  output by W_2M^3n. Both halves become F blocks.

Stage 0 sees a single F block. The type of any block follows from its path bits
b0..b(s-1), where bit 0 means "sum half": after an F block, a 1 leads to an S
block; after an S block, the next block is always F. In both types the sum half
leads to the even-numbered bins. The output order is therefore the same
bit-reversed order as in a radix-2 FFT.

Inside stage s, the time slot tau (0..127) of a butterfly output encodes:

* tau[6]: which lane's frame;
* tau[5 : 6-s]: the path bits;
* tau[5-s : 0]: the pair index k.

`srfft_pkg::rot_kind` and `rot_exp` evaluate the rules above for every slot.
`twiddle_rom` fills its tables from them at elaboration, with
W_N^e = round(2^(TW-2) · (cos(2πe/N) - j sin(2πe/N))). An exponent of 0 is
treated as 1 and N/4 as -j, so neither uses the multiplier.

For N = 128, one frame needs 135 multiplications by -j and 186 multiplier
operations over all stages. Stage 0 and the last stage never multiply. Their
rotators reduce to multiplexers, and synthesis removes the multipliers.

## What comes from the published design and what does not

Taken from it:

* the 128-point size;
* the MDC pipeline of seven rows, with delay lines of 64, 32, 16, 8, 4, 2 and 1
  on each side of each commutator;
* processing elements that only add and subtract;
* twiddle multipliers with multiplexers between the rows;
* split-radix twiddle factors.

Choices made here:

* **Two complex lanes.** The architecture drawing labels its two input lines
  "real" and "imaginary" and gives each a 64-deep delay. A split-radix rotation
  needs both parts of a sample at once. Here the lines are therefore two lanes
  of complex samples, each with its own frames.
* **Two multipliers per stage.** The drawing shows one multiplier per stage. The
  L butterfly needs W^n and W^3n in the same cycle, so each stage has a rotator
  on both outputs.
* **Multiplier position and type.** In two rows the drawing places the
  multiplier before the processing element. Here every rotation follows its
  butterfly, and the schedule is built for that order. The twiddle
  multiplication is a general complex multiplier fed from a constant table, not
  a shift-and-add network.
* **Numbers and control.** The word widths, the unscaled bit growth, the
  rounding, the controller, the clock-enable stall, the output tags and the
  reset are all this design's own.
* **Sizes.** The other LTE sizes (256 to 2048) are available only by rebuilding
  with a different `N`. Switching size at run time is not implemented. 1536
  points, which needs a radix-3 stage, is not supported at all.
* **Throughput.** The source's FPGA results (slice counts, a 34 ns minimum
  period) were measured on its own implementation. They say nothing about this
  RTL.

## Files

`rtl/`:

* `srfft_pkg.sv`: rotation kinds and the schedule and coefficient functions;
* `delay_line.sv`, `commutator.sv`, `pe_butterfly.sv`, `twiddle_rom.sv`,
  `rotator.sv`, `sr_stage.sv`: the parts of a stage;
* `srfft_ctrl.sv`: the controller;
* `srfft128_mdc.sv`: the top.

`tb/` holds a self-checking testbench per module. Each prints
`TB_RESULT checks=N failures=M`.

* `tb_srfft128_mdc` runs the top at its defaults. It sends six frames per lane:
  random full-scale data, an impulse, a constant, a tone and the extreme values.
  Half of them go in with random stalls. Every bin is checked against a
  double-precision DFT. The test also checks the 141-cycle latency, that every
  bin arrives exactly once, and that swaps, -j slots, multiplier slots and stalls
  all occur.
* `tb_srfft_lte_sizes` builds the core at N = 256, 512, 1024 and 2048, using the
  helper `srfft_size_check`. For each size it checks two random frames per lane,
  the latency N - 1 + 2*log2(N) and an error bound of N/4 LSB.
* `tb_twiddle_rom` runs a software FFT that takes every rotation from the tables
  of all seven stages, and compares it with a direct DFT.

To simulate, for example:

    verilator --binary --timing -y rtl rtl/srfft_pkg.sv tb/tb_srfft128_mdc.sv --top tb_srfft128_mdc
    ./obj_dir/Vtb_srfft128_mdc

`-y rtl` lets verilator find each module in `rtl/<name>.sv`. The package is
named first because it is imported, not instantiated.
