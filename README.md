# 64-point radix-4 FFT/IFFT: MIMO MDC pipeline, register-bank processor and parallel datapath

This design computes the 64-point discrete Fourier transform, and its inverse, with the radix-4
decimation-in-time (DIT) algorithm. Because 64 = 4^3, the transform needs three ranks of radix-4
butterflies, where a radix-2 algorithm needs six. Every butterfly takes four complex values and
needs three twiddle multiplications and eight complex additions. The target is OFDM baseband
processing, where an IFFT builds each transmitted symbol and an FFT recovers it.

Three datapaths implement the same algorithm. They stand side by side in the top module
`fft64_radix4` and share only the clock and reset:

* **`fft64_mdc`** is a streaming multi-path delay commutator (MDC) pipeline shared by four
  MIMO data streams. Each stream gives one complex sample per clock and gets one result per
  clock, in natural order both ways. One set of three butterfly stages serves all four streams
  and is busy on every clock. Each stream chooses FFT or IFFT and a scaling schedule per symbol.
  Data is 16 + 16 bits.
* **`register_bank_fft`** computes the transform in place with a single butterfly processor that
  works back and forth between two 64-word register banks. It needs the least logic of the three
  and is the slowest: one symbol per 116 clocks when the input keeps up.
* **`fft64_parallel`** is a combinational circuit that transforms 64 real 4-bit samples at once.
  It has no clock. It is built from four 16-point blocks and one final rank of butterflies.

## The radix-4 index maps

Everything in the three datapaths follows from one decomposition. Write the time index and the
frequency index as base-4 digits:

    n = 16*n2 + 4*n1 + n0        k = 16*k2 + 4*k1 + k0        W = exp(-j*2*pi/64)

Then apply X(16p + q) = sum_l [W^(l*q) F(l,q)] W_4^(l*p) twice. F(l,q) is the 16-point DFT of
x(4m + l). This gives three ranks:

| rank | butterfly runs over | fixed digits | twiddle before the butterfly, input l |
|------|--------------------|--------------|----------------------------------------|
| 1    | n2 (samples 16 apart) | n1, n0     | none |
| 2    | n1                 | k0, n0       | W_64^(4*n1*k0) |
| 3    | n0                 | k1, k0       | W_64^(n0*(4*k1 + k0)) |

Rank 3's butterfly output p is X(16p + 4k1 + k0). Twiddles come before the butterfly, as DIT
requires. The butterfly (`radix4_bfly`) first forms y0±y2 and y1±y3. It then combines them into
X0 = t0+t2, X1 = t1−j·t3, X2 = t0−t2 and X3 = t1+j·t3. That is 8 additions instead of 12. For
the IFFT, −j becomes +j and the twiddles are conjugated.

## The MDC pipeline (`fft64_mdc`)

    in[s] ─► skew 16·s ─► input_buffer[s] ─┐
                                           ├─► stage 1 ─► commutator L=4 ─► stage 2 ─► commutator L=1 ─► stage 3 ─┬─► output_sorter[s] ─► out[s]
      (one per stream s = 0..3)  (1 → 4 lanes)   (e = 0)    (48 words)        (e=4k0)    (12 words)        (e=4k1+k0)  └ (4 → 1 lane, per stream)

There are four lanes between the input buffers and the output sorters. Each stage (`mdc_stage`)
holds one butterfly processor: three complex multipliers, three twiddle generators and one
radix-4 butterfly.

**Why four streams fit in one pipeline.** A radix-4 stage needs four samples that are 16 apart
in time (rank 1) or regrouped copies of them (ranks 2 and 3). An input buffer can only supply
them once the last quarter of a symbol arrives, so a single stream keeps the butterflies busy
for 16 of every 64 clocks: 25 %. The other 48 clocks are free for three more streams, as long as
their bursts fall into different quarters. `stream_scheduler` arranges that. Stream s is
delayed by 16·s clocks before its own input buffer, so with all four streams starting their
symbols together the bursts come out at clocks 49..64, 65..80, 81..96 and 97..112 after x(0).
With symbols back to back the bursts follow each other with no gap, and the stages work on
every clock. A side word with the stream number and its mode travels with each burst, delayed
to match each stage. At the end it steers the burst into that stream's output sorter. The
commutators need nothing extra. Their slot counters restart when a burst follows an idle clock
and otherwise wrap every 16 clocks, the length of a burst. Consecutive bursts do not interfere,
because a commutator only delays and regroups.
An assertion flags two bursts on the same clock.

**Input buffer.** A symbol enters as x(0) … x(63), one sample per clock. The first rank needs
x(t), x(t+16), x(t+32) and x(t+48) at the same time. A 48-word tapped shift register provides
them. While samples 48..63 arrive, lane 3 is the new sample and lanes 2, 1 and 0 are the taps 16,
32 and 48 words back. Each symbol therefore leaves the buffer as a burst of 16 lane-groups on 16
consecutive clocks. The burst starts one clock after sample 48 arrives. Burst time t counts the
groups, t = 4·n1 + n0.

**Delay commutators.** A commutator regroups the lanes between two stages. Lane i is delayed by
i·L. A switch then rotates once every L clocks and connects input lane (slot − j) mod 4 to output
lane j. Output lane j is delayed by (3 − j)·L. In effect, the lane number trades places with one
base-4 digit of the burst time:

* after stage 1, lane k0 carries t = 4·n1 + n0; after the L = 4 commutator, lane n1 carries t = 4·k0 + n0;
* after stage 2, lane k1 carries t = 4·k0 + n0; after the L = 1 commutator, lane n0 carries t = 4·k0 + k1.

A commutator holds 12·L words and has a latency of 3·L clocks. Its slot counter restarts at the
first clock of a burst that follows an idle clock. Its delay lines advance on every clock, so a burst drains after its
valid flag falls.

**Stage control.** Each stage counts the groups of its burst and derives its twiddle exponent e
from that count. Stage 1 uses e = 0. Stage 2 uses e = {t[3:2], 00}. Stage 3 uses
e = {t[1:0], t[3:2]}. Lane l is multiplied by W^(l·e).

**Output sorter.** Stage 3 puts X(16·k2 + 4·k1 + k0) on lane k2 at t = 4·k0 + k1. Each lane writes
into its own 2 × 16-word memory at address {t[1:0], t[3:2]}. Each stream has its own sorter. After the 16th write, that bank is
read out as X(0) … X(63), one per clock, while the next symbol fills the other bank.

**Timing.** The table is for stream 0. Every stream is 16·s clocks later. The table assumes the
symbol's samples arrive on consecutive clocks. Clock 0 is the clock of x(0).

| event | clock |
|-------|-------|
| x(48) accepted, input burst starts next clock | 48 / 49 |
| stage 1 burst | 50..65 |
| stage 2 burst (after 12-clock commutator) | 63..78 |
| stage 3 burst (after 3-clock commutator) | 67..82 |
| X(0) … X(63) on out_data | 84 … 147 |

So stream s returns X(0) 84 + 16·s clocks after its x(0). All streams share one `in_valid` and
start their symbols on the same clock. Symbols may follow each other with no gap, at 64 clocks
per symbol, and gaps between symbols are allowed. A symbol must not pause once it has started.
(A one-stream instance, `STREAMS = 1`, also allows gaps in the first 48 samples of a symbol.
Its last 16 samples must arrive on consecutive clocks, and an assertion checks this.)

**Mode per symbol.** `inverse` and `scale` are sampled together with x(0). They travel with the
symbol to its burst and then follow it through the stages in the side word. Each stage takes
the mode of the burst it is working on. So FFT and IFFT symbols can alternate freely, and the
four streams can use different modes at the same time.

**Numbers.** A sample is `{re[31:16], im[15:0]}`, two 16-bit two's-complement integers. Twiddles
are 16-bit values with 14 fraction bits. `twiddle_gen` stores only 17 numbers,
round(16384·cos(2πk/64)) for k = 0..16. It builds any W^e from them by quadrant conversion: the
sine is the table read backwards, and each quarter turn swaps the parts and changes their signs.
A multiplier rounds its product to an integer one bit wider than a sample. The butterfly adds
two more bits. Each stage then shifts right by 0..3 with rounding, as `scale` selects (2 bits per
stage), and saturates to 16 bits. `scale = 6'b101010` divides by 64, which is the 1/N of the
inverse DFT. With full-scale random data, use that setting or an input 2^(6−s) times smaller,
where s is the total shift.

**Butterfly processor ports.** `bfly_processor` has the black-box interface of a radix-4
processor: `read_data_a..d` and `write_data_a..d` (32 bits each), `bfpcontrol[8:0]`, `clk` and
`reset`. The control word is packed as `{shift[1:0], inverse, exp[5:0]}`. This design chose that
packing. The outputs are registered, so the latency is one clock.

**Storage.** For four streams the design holds 96 skew words (16 + 32 + 48), 4 × 48 input-buffer
words, 48 + 12 commutator words and 4 × 128 output-sorter words. A conventional MDC input stage
would use separate delay lines of 16, 32 and 48 words (96 words) per stream. With those, one
stream's input stage and commutators need 96 + 48 + 12 = 156 words, and four separate pipelines
need 624. Here the four streams share the commutators and need 96 + 192 + 60 = 348 words before
the output sorters. The tapped line gives the same lane timing as the separate delay lines
with half their storage.

## The register-bank processor (`register_bank_fft`)

    Mem In ─► ChooseMemReg ─► Register Bank 1 ─┐                ┌─► Register Bank 1 (rank 2 results)
                                               ├─ RS1..RS4 ─► Input Register Select ─► bfly_processor ─┤
              Register Bank 2 ─────────────────┘                └─► Register Bank 2 (ranks 1, 3) ─► Mem Out

One `bfly_processor` does all 48 butterflies of a transform. The three ranks take turns between
the banks: rank 1 reads bank 1 and writes bank 2, rank 2 goes back from bank 2 to bank 1, and
rank 3 writes bank 2 again, where the readout finds the result. Every butterfly writes its four
results to the addresses it read from (in place). The write addresses are the read addresses
delayed by the processor's one-clock latency. Butterfly b of a rank reads input l at:

| rank | address of input l | twiddle exponent |
|------|--------------------|------------------|
| 1 | 16·l + b | 0 |
| 2 | 16·b[3:2] + 4·l + b[1:0] | 4·b[3:2] |
| 3 | 16·b[3:2] + 4·b[1:0] + l | 4·b[1:0] + b[3:2] |

These are the same three ranks as in the MDC pipeline, with addresses doing the regrouping
that the commutators do there. After rank 3, address 16·k0 + 4·k1 + k2 holds X(16·k2 + 4·k1 + k0),
so the readout addresses the bank with the digits of k reversed.

Each rank issues 16 butterflies on 16 clocks and waits one clock for the last result to land,
so a transform takes 51 clocks. The input side has a ready/valid handshake: samples x(0) …
x(63) are accepted in order, with gaps allowed, while `in_ready` is high. `in_ready` is low
while a full bank waits and during the transform. X(0) … X(63) leave one per clock, starting
54 clocks after x(63) was accepted. The next symbol can load while the previous one is read out,
but its transform waits until the readout ends. Mode and scaling work as in the MDC pipeline
and are taken with x(0).

## The parallel datapath (`fft64_parallel`)

| port | width | content |
|------|-------|---------|
| `A` | 256 | x(n) in bits 4n+3..4n, signed real samples |
| `W` | 256 | W_64^k for k = 0..15; entry k in bits 16k+15..16k as {re[7:0], im[7:0]}, 6 fraction bits (1.0 = 64) |
| `X` | 1024 | X(k) in bits 16k+15..16k as {re[7:0], im[7:0]}, saturated |

The data split sends x(4m + l) to block l. Each of the four `topbutter16` blocks computes a
16-point DFT F(l, q) in two ranks:

* `odd_even_part` runs four radix-4 butterflies over groups spaced four apart and applies
  W_16^(l·q);
* wiring that transposes the 4 × 4 array (the commutator of a clockless design) feeds four more
  butterflies.

A final rank of 16 butterflies combines the blocks, each butterfly after its twiddles W_64^(l·q).
`twiddle_quadrant` derives every twiddle from the 16 supplied values by quarter-turn rotation.
The outputs keep full precision inside: 12 bits at the last rank. Only the 8-bit outputs
saturate. Random 4-bit inputs rarely reach the limit. A full-scale constant input (X(0) = 448)
does. The 8-bit twiddles limit accuracy to a few LSB.

A complex result needs a real and an imaginary part, so X is 64 × (8 + 8) bits. A 512-bit output
of 8 bits per point would hold only one part.

## Files

| file | content |
|------|---------|
| `rtl/fft_pkg.sv` | sample struct, control word struct, mode struct, widths |
| `rtl/fft64_radix4.sv` | top: the three datapaths |
| `rtl/fft64_mdc.sv` | MDC pipeline for four streams |
| `rtl/stream_scheduler.sv` | skew delays and input buffers that interleave the streams |
| `rtl/input_buffer.sv`, `rtl/mdc_stage.sv`, `rtl/delay_commutator.sv`, `rtl/delay_line.sv`, `rtl/output_sorter.sv` | MDC parts |
| `rtl/bfly_processor.sv`, `rtl/twiddle_gen.sv` | butterfly processor and its twiddle generator |
| `rtl/radix4_bfly.sv`, `rtl/cmult.sv` | butterfly and complex multiplier, used by all three datapaths |
| `rtl/register_bank_fft.sv` | in-place two-bank processor |
| `rtl/fft64_parallel.sv`, `rtl/topbutter16.sv`, `rtl/odd_even_part.sv`, `rtl/twiddle_quadrant.sv` | parallel datapath |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulation

Each testbench checks itself and ends with `TB_RESULT checks=N failures=M`. For example:

    verilator --binary --timing --assert -Irtl rtl/fft_pkg.sv tb/tb_fft64_radix4.sv --top-module tb_fft64_radix4
    ./obj_dir/Vtb_fft64_radix4

`tb_fft64_radix4` runs the whole design at its default sizes:

* 8 symbols on each of the four streams, each compared point by point with a double-precision
  DFT. They include FFT and IFFT, mode switches, different modes on different streams at once,
  three scale schedules, back-to-back symbols and an idle gap. The testbench also checks the
  latency of 84 + 16·s clocks, the output order, and that the first stage is busy on every
  clock of whole 64-clock symbol times.
* 4 symbols through the register-bank processor, FFT and IFFT, sent as fast as `in_ready`
  allows. The testbench checks every point, the order, the 54-clock latency, stalls, and loading
  during a readout.
* 20 parallel vectors, including one that saturates.

It reports how often each of these cases occurred, and fails if one never did.
`tb_fft64_mdc_single` runs a one-stream instance, including a gap inside a symbol. The unit
testbenches compare against independent models:

* bit-exact integer models for the butterfly and the multiplier;
* double-precision references with stated tolerances for the rest;
* tagged data for the commutators, the input buffer and the output sorter.

## Departures and limits

* The four-stream schedule (a 16·s skew per stream) is this design's own. It reaches 100 %
  butterfly use and shares the commutators, but it keeps one input buffer and one output sorter
  per stream. A tighter memory arrangement may exist; none is attempted here.
* Not included: a configurable radix-8/radix-2 last stage for other power-of-two lengths. All
  datapaths are fixed at 64 points.
* In the register-bank processor, the bank structure and the names of its selects (ChooseMemReg,
  RS1..RS4, Input Register Select, DDD_RS1/DDD_RS2) follow the processor's published block
  diagram. The address sequence, the control and the handshake are this design's own. An
  extra input-register select path shown near the bank-1 input is not built.
* These choices are this design's own: the bit widths and formats inside the MDC pipeline, the
  four-stream skew schedule, the `bfpcontrol` encoding, the scaling and saturation, the per-symbol mode capture, the
  output-sorter memory, and the W layout and output saturation of the parallel datapath.
* The MDC accuracy is within a few LSB of an exact DFT. The testbench tolerance is 6 LSB after
  scaling. In the parallel datapath the tolerance is 12 LSB per point and 2.5 LSB RMS.
