# Lossless ECG compressor: adaptive linear prediction + Golomb-Rice coding

An ECG recorder produces a steady stream of 11-bit samples. Consecutive
samples are strongly correlated, so a sample can be predicted well from the
few before it. Only the prediction error has to be stored. Errors are small
and cluster around zero, so an entropy code with a short code for small
values shrinks the stream without losing a single bit. This RTL does exactly
that, in three stages:

```
 11-bit samples      +-----+  mapped error  +-------------+  code pieces  +-------------+  16-bit words
 ------------------> | alp | -------------> | golomb_rice | ------------> | data_packer | ------------->
 valid/ready/last    +-----+  valid/ready   +-------------+  <= 11 bits   +-------------+  valid, done
```

* **Adaptive linear prediction (`alp`)** predicts each sample from the four
  before it and turns the error into a non-negative number.
* **Golomb-Rice coding (`golomb_rice`)** codes those numbers in windows of 40.
  Each window has its own 3-bit parameter k.
* **Data packing (`data_packer`)** concatenates the variable-length codes into
  16-bit words.

It follows the architecture of the published FPGA design
"FPGA Implementation of Lossless ECG Compression Algorithm". That design
reports a compression ratio of 1.57 on ECG data. The structure follows that
publication: the difference equations, the three predictors, the
first-four-samples split, the 40 x 13-bit window register, the 3-bit k, and the
26-bit/16-bit packer. The publication leaves many details open: the predictor
selection rule, the error mapping, the k rule, bit order and framing,
handshakes and end of stream. Those are this design's own choices, listed in
[Where this design chooses](#where-this-design-chooses).

On a synthetic one-minute ECG (21,600 samples at 360 Hz) the design reaches
a ratio of 1.63 and takes 0.975 samples per clock. The output is checked bit
for bit against an independent model and decoded back to the input.

## The compressed stream

For each stream (the samples from reset, or from the previous `in_last`, up to
and including the next `in_last`), the output bits are, first bit first:

| field | bits | content |
|---|---|---|
| first sample | 11 | sample 0, raw, MSB first |
| for each window of 40 errors: k | 3 | Golomb-Rice parameter of this window |
| then 40 times: U | q+1 | q = M >> k ones, then a zero |
| then: V | k | M mod 2^k, MSB first |
| padding | 0..15 | zeros up to a whole 16-bit word |

The final window holds the 1 to 40 errors that are left. A decoder must know
the number of samples: the stream carries no length.

Decoding reverses every step. Read the first sample. Then, for each window,
read k, and read each codeword as count-ones / skip-zero / read-k-bits, giving
M = q*2^k + V. Unmap with e = M/2 for even M and e = -(M+1)/2 for odd M. Then
form the same prediction from the samples already decoded, clamp it, and add e.
`tb/ecg_ref_pkg.sv` contains such a decoder (`decode()`).

## Prediction (`alp`, `lp_startup`, `lp_adaptive`, `error_predictor`)

`alp` is the control unit. It counts the samples of the stream, keeps
x(n-1)..x(n-4) in a shift register, and picks the predictor:

* sample 0: none. It is sent raw.
* samples 1, 2, 3: `lp_startup` uses P1, P2 and P3 respectively, the
  highest order the available history allows.
* sample 4 onwards: `lp_adaptive`.

The three predictors are

```
P1 = x(n-1)
P2 = 2x(n-1) - x(n-2)
P3 = 3x(n-1) - 3x(n-2) + x(n-3)
```

They are built from the differences D1_2 = x(n-1)-x(n-2),
D1_3 = x(n-1)-x(n-3), D2_3 = x(n-2)-x(n-3) and D3_4 = x(n-3)-x(n-4), with
shifts and adds. For example, P3 = x(n-1) + 2·D1_2 − D2_3.

**Choosing a predictor.** `lp_adaptive` asks how well each predictor would
have done on the previous sample. It predicts x(n-1) from x(n-2)..x(n-4), which
gives these backward errors:

| predictor | backward error |
|---|---|
| P1 | D1_2 |
| P2 | 2·D1_2 − D1_3 |
| P3 | D1_2 − 2·D2_3 + D3_4 |

The predictor with the smallest absolute backward error is used for x(n). A tie
goes to the lower order. Typically P1 wins on flat segments, P2 on slopes
and P3 on the curved parts of the QRS complex. The encoder and the decoder see
the same history, so this choice needs no side information.

**Error and mapping (`error_predictor`).** The prediction is clamped to
0..2047. The error e = x − prediction then fits in 12 signed bits. Its sign bit
selects the mapping M = 2e (e ≥ 0) or M = −2e−1 (e < 0). M ≤ 4094, so it fits
the 13-bit window register.

`alp` registers its output: one valid/ready stage with one clock of latency.

## Golomb-Rice coding with a one-window delay line (`golomb_rice`, `gr_window_buffer`, `gr_encoder`)

This is the least obvious part. k must suit the whole window, and the decoder
needs k before the window's codes, so a window cannot be coded until all 40 of
its values have arrived. A second buffer is not needed. The single 40 x 13-bit
register (`gr_window_buffer`) works as a delay line:

* While window j arrives, its values are written to slots 0..39 and their sum
  is accumulated. Nothing is sent.
* When slot 39 is written, k_j is computed. k is the smallest value in 0..7
  with 40·2^k ≥ sum, found with shifts only. This makes 2^k roughly the mean
  of M.
* While window j+1 arrives, value i of window j+1 goes into slot i. In the same
  cycle, value i of window j is read out of slot i and coded with k_j. Before
  slot 0, the 3-bit k_j header is sent.

So each value leaves one window (40 values) after it entered, and the memory
is one window, as in the publication.

**Codeword pieces (`gr_encoder`).** U = M >> k and V = M & (2^k−1) are
computed by shift and mask. A codeword can be long: with k = 0, M can give
4094 ones. The packer takes at most 11 bits per clock (see below), so a
codeword is sent in pieces:

1. If the ones still owed, plus the closing zero, plus V fit in 11 bits, send
   all of it. The codeword is then done.
2. Otherwise, if 11 or more ones are owed, send 11 ones.
3. Otherwise, send the owed ones alone. The zero and V (at most 8 bits) follow
   in the next clock.

**Flow control.** An incoming item is taken only in the clock in which the
last piece of the codeword it displaces is sent. That clock is the same one for
short codewords. Each extra piece of a multi-piece codeword holds `s_ready`
low for one clock, and this back-pressure reaches `in_ready` at the top.

The 3-bit window header normally costs nothing. It travels in the same piece
as the window's first codeword whenever the two together fit in 11 bits (first
codeword of at most 8 bits). Only otherwise is it sent alone, taking a clock of
its own. For this, `gr_encoder` offers a piece every clock but advances only
when the piece is taken (`chunk_take`). On ECG data about 2.5% of the clocks
are lost, almost all to long codes around the R wave.

**End of stream.** When the item marked `last` has been taken, the coder
drains:

1. It codes the rest of the previous window, if one is pending.
2. It sends the header and the values of the final window. This window may be
   partial; its k is computed over the n values it holds, as n·2^k ≥ sum.
3. It raises `c_flush` and waits for the packer's `flush_ack`. It then clears
   itself for the next stream.

While it drains, the prediction stage can already hold the next stream's
first sample, but it is not taken until the drain ends.

## Packing (`data_packer`)

A 26-bit temporary register holds the pending bits, oldest at the top. Two
controllers act on it in the same clock:

* **Output controller.** When 16 or more bits are held, it sends the top 16 as
  a word and shifts.
* **Input controller.** It appends the incoming piece right behind what remains
  after that shift.

After an output at most 15 bits remain, and 15 + 11 = 26. This is why pieces
are capped at 11 bits and why the packer never refuses one. An assertion checks
this bound. On `flush`, full words are sent first. The remainder is then sent
zero-padded, and `flush_ack` (the top-level `out_done`) pulses. The output has
no back-pressure: a 16-bit word per clock is well above what the input can
produce, but a consumer must take every word.

## Interfaces and timing (`ecg_compressor`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `in_valid`, `in_ready` | in/out | 1 | sample handshake; transfer when both high |
| `in_sample` | in | 11 | unsigned ECG sample |
| `in_last` | in | 1 | marks the final sample of a stream |
| `out_valid`, `out_word` | out | 1, 16 | compressed word, first bit in bit 15 |
| `out_done` | out | 1 | pulses in the clock of the last word of a stream (or, if no bits were left over, the clock after it) |
| `mon_*` | out | | monitoring: adaptive predictor in use, equation chosen, negative error, clamped prediction, header sent (and whether merged) and its k, split codeword, drain in progress |

Parameter `WINDOW` (default 40) sets the window length. The other sizes (11,
13, 3, 26, 16) are constants in `rtl/ecg_pkg.sv`. The piece limit is derived as
26 − 16 + 1 = 11.

Latency: a sample's code leaves about one window later (40 samples), plus a
clock for the ALP register and a clock or two in the packer.

## Where this design chooses

The publication does not specify these points. Each is a choice made here:

* **Predictor selection.** Uses the smallest backward error of P1/P2/P3. The
  publication lists the differences and the predictors but not the rule that
  links them.
* **First samples.** Sample 0 is sent raw, and samples 1..3 use P1/P2/P3.
* **Clamping and mapping.** The prediction is clamped to the sample range. The
  mapping is the standard 2e / −2e−1.
* **k rule.** k is the smallest k with n·2^k ≥ sum, capped at 7. The final
  partial window gets its own k.
* **Bit order and framing.** Fields go MSB first. The unary code is ones closed
  by a zero. The header comes before each window. The stream ends with zero
  padding and carries no length field.
* **Long codewords.** They are split into pieces of at most 11 bits, which
  stalls the input. There is no escape code.
* **Window headers.** A header shares a piece with the window's first codeword
  when the two fit.
* **Handshakes.** Input is valid/ready with `last`. The output has no
  back-pressure.

Departures from the published implementation:

* **Input rate.** The publication handles a sample every clock. This design
  loses a clock for each extra piece of a long codeword, and for a header that
  cannot share a piece. It measures about 0.975 samples per clock on ECG.
* **Arithmetic.** The published device report shows one 18x18 multiplier.
  This design uses no multiplier: the factors 2 and 3 and all of the
  Golomb-Rice arithmetic are shifts and adds.
* **Flip-flop count.** The published report lists 144 flip-flops, fewer than
  the 520 bits of the window register alone, so that register was presumably
  mapped to LUT RAM there. Here it is a flip-flop array with reset (675
  flip-flop bits in all). A synthesis tool may infer RAM if the reset on the
  array is removed.
* **Results.** The compression ratio depends on the data. The published 1.57
  was measured on recorded ECG. The testbenches here use a synthetic ECG-like
  signal and get 1.55–1.64.
* **No decompressor hardware.** None is described, so none is provided. The
  testbench model decodes in software.

## Files

`rtl/`:

| file | content |
|---|---|
| `ecg_pkg.sv` | widths, `alp_item_t`, `psel_e`, `select_k()` |
| `ecg_compressor.sv` | top level |
| `alp.sv` | prediction stage with control unit |
| `lp_startup.sv`, `lp_adaptive.sv` | the two predictors |
| `error_predictor.sv` | clamp, error, sign, mapping |
| `golomb_rice.sv` | window control, k, framing, drain |
| `gr_window_buffer.sv` | 40 x 13 register |
| `gr_encoder.sv` | U/V and piece emission |
| `data_packer.sv` | 26-bit register, 16-bit words |

`tb/`:

* `ecg_ref_pkg.sv` is the reference model. It uses plain integer arithmetic for
  prediction, mapping, k, encoding and decoding, plus the synthetic ECG
  generator.
* There is one self-checking testbench per module: `tb_<module>.sv`.
* `tb_ecg_compressor.sv` is the end-to-end test at default parameters. It runs
  six streams: ECG, exactly two windows, a single sample, a short stream, a
  stress pattern with spikes and rail-to-rail jumps, and ECG with input gaps. It
  counts every mechanism and requires each to occur.
* `tb_ecg_record.sv` runs one minute of synthetic ECG and reports the ratio and
  the input rate.

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ecg_pkg.sv tb/ecg_ref_pkg.sv tb/tb_ecg_compressor.sv --top-module tb_ecg_compressor \
    --Mdir obj_top -o sim
./obj_top/sim
```

Replace `tb_ecg_compressor` with any other testbench name. Each one runs in
well under a second. For lint only:
`verilator --lint-only -Wall -Irtl -y rtl rtl/ecg_pkg.sv rtl/ecg_compressor.sv`.

**Changing things.** The window length is the `WINDOW` parameter; the
reference model takes it as an argument, and the testbenches pass 40. To widen
the samples, change `SAMPLE_W` and `MAP_W` together (MAP_W ≥ SAMPLE_W + 1),
and update the 11-bit constants in the reference model. If k needs more range,
change `K_W`. Changing `PACK_W` or `OUT_W` moves the piece limit `CHUNK_W`
automatically.
