# 64-point CORDIC-DA FFT for 802.11a

This design computes a 64-point FFT for an 802.11a OFDM receiver. It takes
16-bit complex samples at 20 MS/s, so one frame arrives every 3.2 µs. The
transform is split into two radix-8 stages.

The first stage does not use multipliers. Its 8-point butterfly and its
inter-stage twiddle factor both come from two pieces:

* a bank of bit-serial CORDIC elements that rotate each input by a multiple
  of 45°;
* a distributed-arithmetic (DA) look-up table that folds the remaining small
  twiddle angle (a multiple of 2π/64) into the sum of eight bits.

The second stage is a plain parallel 8-point FFT. An 8×8 matrix buffer sits
between the two stages. It swaps the roles of its rows and columns every frame,
so one 64-word memory serves both stages.

```
samples ──► input_buffer ──► cordic_da_fft8 ──► matrix_buffer ──► parallel_fft8 ──► output queue ──► X(k)/64
 (tick)     (ping-pong)      (stage 1, bit-serial,  (in-place        (stage 2, word-      (one word
                              CHANNELS datapaths)    transpose)       parallel)            per tick)
```

## The arithmetic

With n = n1 + 8·n2 and k = 8·k1 + k2:

```
T(n1,k2)    = W64^(n1·k2) · Σ_n2 x(n1+8·n2) · W8^(n2·k2) / 8        (stage 1)
X(8k1+k2)   = Σ_n1 T(n1,k2) · W8^(n1·k1) / 8                        (stage 2)
```

The output is therefore X(k)/64. Only inputs whose real and imaginary parts
are both near full scale and aligned in phase can exceed 16 bits after that
scaling. Such results saturate.

### Splitting the twiddle

Every product n2·k2 and n1·k2 is split into a part that is a multiple of 45°
and a small residue:

* `e = n1·k2`, `n̂ = e mod 8`, `k̂ = floor(e / 8)`.
* Input n2 of output k2 must turn by `W8^(n2·k2) · W64^e`. That equals
  `W8^r · W64^n̂` with `r = (n2·k2 + k̂) mod 8`.
* The CORDIC element of input n2 applies `W8^r`. It does this using only sign
  changes, swaps and one add, so a 45° step leaves a factor √2 behind.
  For odd r it produces `(±xr ± xi, ±xr ± xi)`, which is √2 times the true
  rotation. Each element therefore also raises a *scale flag* for odd r.
* The DA look-up table applies the shared residue `W64^n̂`. It also applies the
  `1/√2` that the flagged inputs still owe.

### Bit-serial CORDIC element (`cordic_pe`)

Each element takes the real and imaginary bit streams LSB first. It contains:

* four bit-serial two's-complement negators (`bs_complementor`), which copy
  bits up to and including the first 1 and invert every later bit;
* two bit-serial adders (`bs_adder`), each with a carry flip-flop cleared at
  the LSB.

An 8-bit control word picks the rotation. The bits are:

* enable of each of the four paths;
* sign of each of the four paths.

`fft_pkg::PE_CTRL` holds the eight words for W8^0 … W8^7.

### Distributed arithmetic with a merged twiddle (`da_lut`, `da_accumulator`)

In every bit cycle, each output channel sees eight CORDIC output bits for its
real part and eight for its imaginary part. Two ones counters per part reduce
these bits to two numbers:

* `a`, the number of ones;
* `b`, the number of ones whose input carries the scale flag.

The weighted bit-column sum is then `(a-b) + b/√2`. The table returns that sum
multiplied by both cos(2π·n̂/64) and sin(2π·n̂/64). Both come out of the same
table word.

Two shift accumulators combine the table outputs of the two parts:

* real = LA(re) + LB(im);
* imaginary = LA(im) − LB(re).

Each accumulator halves its value every cycle. On the sign bit (the guard
cycle) it subtracts instead of adding, as two's-complement DA requires.

The table is split in two:

* a 64-word main part, addressed by `{a[2:0], b[2:0]}`;
* a 2-word special part for `a = 0` and `a = b = 8`.

Address `a[2:0] = 0` is never used for a real `a = 0`, because that case goes
to the special part. The main part reuses that address for `a = 8` with
`b < 8`. As a result, every legal (a, b) pair has a word, even though the main
part has only 64 addresses. Both parts are computed at elaboration time from
constants in `fft_pkg`. The formula is `round(((a-b)·2^20 + b·round(2^20/√2)) ·
trig_Q20 / 2^(40-LUT_FRAC))`. No data file is read.

### Pass timing (`cordic_da_ctrl`, `cordic_da_fft8`)

One pass computes CHANNELS outputs k2 for one group n1. It takes
`DATA_W + 4 = 20` cycles:

| cycle        | action                                                                   |
|--------------|--------------------------------------------------------------------------|
| 0            | `start`: the P/S converter loads 8 complex words                         |
| 1 … 16       | data bits 0 … 15 shift out, LSB first (`lsb` in cycle 1)                 |
| 17           | guard bit (the sign repeated), so the ±xr±xi sums cannot overflow        |
| 2 … 18       | DA accumulates (one pipeline register after the CORDIC stage); 18 is the sign cycle |
| 19           | `y_valid`: result rounded from ACC_W = 23 bits to 16                     |

The P/S shift registers rotate rather than shift. After a pass they therefore
hold the original words again. With 4 channels, the second pass (k2 = 4 … 7)
starts without a reload.

## The 64-point processor (`fft64_cordic_da`)

### Clocking

There is one clock, `clk`, which the bit-serial logic uses at full rate. A
built-in divider (`clk_div`) makes a one-cycle `tick` every
`DIV = (8/CHANNELS)·(DATA_W+4)/8` cycles:

* The default is `DIV = 5`: a 100 MHz clock gives a 20 MHz sample rate.
* One input sample is taken per tick (when `in_valid` is high).
* One output word leaves per tick.

The word-rate logic is therefore a clock-enabled part of the same clock
domain, not a second clock.

### Schedule

Work runs in *runs* of 8 *slots*. A slot lasts `SLOT = (8/CHANNELS)·20 = 40`
cycles, so a run lasts 320 cycles. That is exactly one frame of 64 ticks. In
slot s of a run:

* **Stage 1** starts `cordic_da_fft8` on group n1 = s of the newest complete
  frame. It reads the group from its ping-pong input bank in one cycle. Its
  4-wide results go through a small write queue into the matrix buffer, one
  word per cycle, at row n1.
* **Stage 2** reads column k2 = s of the previous frame from the matrix buffer.
  It does this in the first 8 cycles of the slot, and feeds the column to
  `parallel_fft8`. The 8 results go to an output queue that sends one word per
  tick, with `out_index = 8·k1 + k2`.

Stage 1 of slot s writes the words that stage 2 read in slot s of the same
run, because the previous frame used the other orientation of the buffer. That
is the in-place transpose: stage 2 always reads a column before stage 1
overwrites it with a row.

A run starts when:

* an input bank is full; or
* a frame is still waiting for its second stage and the input is idle at a
  frame boundary. This is a flush run, with stage 2 only.

Runs follow each other with no idle cycle. A continuous stream therefore
runs indefinitely with no back-pressure.

### Interface

| port                  | dir | meaning                                                     |
|-----------------------|-----|-------------------------------------------------------------|
| `clk`, `rst_n`        | in  | clock; synchronous active-low reset                         |
| `tick`                | out | sample strobe: drive `in_*` so they are valid at this edge  |
| `in_valid`, `in_re`, `in_im` | in | one sample per tick, natural order, frames back to back (gaps allowed between ticks) |
| `out_valid`, `out_index`, `out_re`, `out_im` | out | X(out_index)/64, one per tick, in order k2 = 0..7 outer, k1 = 0..7 inner |

### Measured behaviour

These figures come from the end-to-end testbench at the default parameters:

* Latency is 652 clock cycles (6.52 µs at 100 MHz). It is measured from the
  tick of a frame's first sample to its first output word. 3.2 µs of that is
  the frame arriving.
* A new frame can start every 320 cycles, which is one frame time.
* The largest error against a double-precision DFT/64 is 1 LSB.
* Accuracy is also graded by PSNR = 20·log10(2^16 / MSE), where MSE is the
  mean squared complex error of a frame in LSB². On random full-scale frames
  (uniform in ±23000) it averages 107.3 dB, with a minimum of 106.3 dB. The
  reference chip reports 100.4 dB average and 98.8 dB minimum, for its own
  test patterns.

## Departures from the reference design

These are deliberate choices, or points the reference description leaves open:

* **Clocking.** The reference chip has two clock domains: 100 MHz bit-serial
  and 20 MHz bit-parallel. Here the 20 MHz side is a clock enable of the
  100 MHz clock. The 20 MHz sampling rate is the same.
* **Latency.** The reference chip reports 10 020 ns from input to output.
  This schedule gets 6 520 ns, because stage 2 and the output queue start as
  soon as stage 1 has finished a column.
* **Output order.** Outputs leave in the order that stage 2 produces them
  (k2 outer, k1 inner). Each word is tagged with `out_index` rather than
  reordered.
* **Scaling.** Each radix-8 stage scales by 1/8, so the output is X/64. The
  reference gives the 23-bit accumulator width, which is used here, but not
  its rounding. Here the result is rounded to nearest and saturated.
* **Second stage.** The second iteration needs no twiddle factor. It is
  realised here as a parallel radix-2 DIT 8-point FFT with registered input and
  output (2 cycles). Its W8 rotations use one Q15 constant, 23170 ≈ 2^15/√2.
  Inside, it carries 3 guard fraction bits and rounds once at the output.
  Rounding at every butterfly level instead costs about 9 dB of PSNR.
* **Channel count.** CHANNELS can be 1, 2 or 4; the default is 4. The
  8-channel option would need 2.5 fast cycles per sample. This integer clock
  enable cannot provide that, so an elaboration-time check rejects it.
* **Look-up table split.** The reference table is a 64-word main part plus
  a 2-word part for the two extreme cases, and this design keeps that split.
  The reference does not say where the words for `a = 8, b < 8` live. Here
  they take the main-part addresses with `a[2:0] = 0`, which no other case
  uses.
* **Test logic.** Scan insertion, memory BIST wrappers and the on-chip clock
  source are outside the RTL.
* **Memories.** They are plain arrays, a 64-word dual-port matrix buffer and a
  2×64-word input buffer, rather than hard register-file macros.

## Files

`rtl/` holds one module per file. `fft_pkg.sv` holds the shared types,
control words and table arithmetic.

| module              | role |
|---------------------|------|
| `fft64_cordic_da`   | top: buffers, slot scheduler, write queue, output queue |
| `cordic_da_fft8`    | 8-point CORDIC-DA FFT with merged W64 twiddle, CHANNELS datapaths |
| `cordic_da_ctrl`    | pass timing; per-channel k2, n̂, PE control words and scale flags |
| `ps_converter`      | 16 rotating shift registers, LSB first, guard bit |
| `cordic_da_channel` | one output datapath: 8 CORDIC elements, ones counters, LUTs, accumulators, rounding |
| `cordic_pe`         | bit-serial W8^r rotator |
| `bs_adder`, `bs_complementor` | bit-serial adder and negator |
| `ones_counter`      | population count of 8 bits |
| `da_lut`            | integrated cos/sin DA table |
| `da_accumulator`    | shift accumulator, sign-cycle subtract |
| `parallel_fft8`     | second-stage 8-point FFT |
| `matrix_buffer`     | 8×8 buffer with swap addressing |
| `input_buffer`      | ping-pong input banks, one group per read |
| `clk_div`           | sample-rate tick |

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`. Each
prints `TB_RESULT checks=N failures=M` and has a watchdog.

`tb_fft64_cordic_da` runs the top at its default parameters. It sends 10
frames: impulse, DC, a tone and random data. One frame has a 30-tick gap in
its input. The testbench:

* checks every output against a floating-point DFT;
* checks the latency and the frame period;
* counts the scheduler's mechanisms and fails if any never happened. The
  mechanisms are both input banks, both buffer orientations, stage-1-only,
  two-stage and flush runs, the second pass per slot, and the input gap.

`tb_fft64_channels` runs the 1- and 2-channel configurations side by side.
Each configuration gets four back-to-back random frames. The testbench checks
every result and the frame period. It uses the helper `fft64_stream_check.sv`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/fft_pkg.sv tb/tb_fft64_cordic_da.sv \
          --top-module tb_fft64_cordic_da -o sim && ./obj_dir/sim
```

Replace the testbench name to run any other unit test. The testbenches draw
their stimulus with `$urandom` and read no files. `tb_cordic_da_fft8` prints
each result when run with `+show_all`.

To change the design:

* **Width.** `DATA_W`, `LUT_W` and `ACC_W` are parameters of the top. The
  accumulator keeps `ACC_W - LUT_W - 2` extra low-order bits, and the output is
  rounded by `ACC_W - DATA_W - 3` bits. The pass length and divider ratio
  follow from `DATA_W`.
* **Channels.** `CHANNELS` selects 1, 2 or 4 first-stage datapaths. With fewer
  channels the clock must run faster for the same sample rate: 400 MHz for 1
  channel, 200 MHz for 2.
