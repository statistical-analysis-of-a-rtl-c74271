# Gaussian channel emulator and NGDBF LDPC error-floor tester

Error floors of LDPC decoders sit at bit error rates of 1e-9 and below. That
is too low to reach in software simulation. The usual answer is to put the
whole experiment on an FPGA: a hardware Gaussian channel emulator, the
decoder, and a bit error rate tester (BERT) that counts errors over millions
of frames. The result can only be trusted if the emulator's noise really is
Gaussian, tails included. It must also not depend on the seed, and a reset
must restart it cleanly.

This RTL contains both halves of such a setup:

* a **channel emulator test platform**. A Gaussian sample generator feeds a
  5-bit sign-magnitude quantizer, which feeds a 32-bin histogram. A soft
  processor drives it through AXI4-Lite. It is used to check the
  emulator's distribution, its seed independence and its reset behaviour.
* a **decoder test platform**. Six BERTs run in parallel. Each has its own
  channel emulator, a second generator for perturbation noise, and a
  fully parallel 2048-bit noisy gradient descent bit-flip (NGDBF) decoder.
  Each counts bit errors and frame errors.

The top level, `ngdbf_test_system`, places the two platforms side by side.
Each has its own AXI4-Lite slave port. The processor systems that would
drive those ports (processor, UART, timer, clocking, memories) are not part
of this RTL.

```
            ch_s_axi ──► chan_test_platform
                           axil_slave ─► registers ─► channel_top
                                                        awgn_gen (mean +1)
                                                        sm_quantizer
                                                        histogram (32 bins)

            bt_s_axi ──► bert_platform
                           axil_slave ─► registers ─► bert x 6  (seeds + k)
                                                        awgn_gen (mean +1) ─► sm_quantizer ─► frame_shiftreg (channel)
                                                        awgn_gen (mean 0)  ─► sm_quantizer ─► frame_shiftreg (noise)
                                                        ngdbf_decoder: 2048 bitflip_proc, 384 parity_check
                                                        bert_fsm, error counters
```

## Number formats

| quantity | format |
|---|---|
| emulator sample | 21-bit two's complement, 16 fraction bits (Q5.16); +1.0 = 65536; range [-16, 16), saturating |
| quantized sample | 5 bits: bit 4 = sign (1 = negative), bits 3:0 = magnitude 0..15. Codes 0-15 are the positive levels, 16-31 the negative ones, and these are the histogram bins |
| SNR index | 6 bits; index = 4 x Eb/N0 in dB (index 16 = 4 dB) |
| seed | 8 bits |
| theta (NGDBF threshold) | 8-bit signed integer, in quantizer levels |

## The Gaussian generator (`awgn_gen`)

A new sample comes out every clock. Six xorshift32 generators advance each
clock, and their twelve 16-bit halves are added together. Twelve uniform
16-bit words sum to a value with mean 6·65536 and variance exactly 65536².
Subtracting the mean therefore leaves a unit-variance, nearly Gaussian value
that is already in Q16 (central limit theorem). The tails are cut at
±6σ. A second stage multiplies by σ and adds the mean, which is +1 for the
channel (an all-zero frame sent as BPSK +1) and 0 for the perturbation
noise. It then saturates to Q5.16. σ comes from a 64-entry table built at
elaboration:

    sigma(index) = sqrt( 1 / (2 · R · 10^(index/40)) ),   R = RATE_NUM / RATE_DEN = 1723/2048

`init` reloads all six states from the seed, using a fixed per-generator
key, and empties the pipeline. A given seed therefore always reproduces the
same sequence. The first valid sample appears on the second enabled clock
after `init`.

The generator's internal method is this design's own. The emulator this
setup was built around came from high-level synthesis, and its insides are
not described. What is kept is its interface: one sample per clock, the
21-bit format, mean +1, an 8-bit seed and restart on reset. The code rate R
is a parameter. 1723/2048 is the rate of the 802.3an code, which is assumed
here.

## Quantization (`sm_quantizer`)

    intsample = ( |y| · scale )[41:10]          42-bit product, upper 32 bits kept
    magnitude = min(15, intsample >> delta)
    code      = { sign(y), magnitude }

`scale` is unsigned Q5.16 and `delta` is a shift count. With the reset
values scale = 4.0 and delta = 22 one level is 0.25, so +1.0 falls on the
edge between levels 3 and 4. Two details are this design's own: which 32
bits form intsample, and reading "shifted by delta" as a right shift. The
same quantizer, with the same settings, is used for the perturbation noise.

## The NGDBF decoder (`ngdbf_decoder`, `bitflip_proc`, `parity_check`)

There is one processor per code bit and one XOR node per parity check.
Every clock is one iteration. Processor *i* holds its decision x_i (stored 0
means +1). It flips the decision when

    x_i · y_i  +  Σ_{j<6} s_j   <   θ + q_i(ℓ)

Here y_i and q_i are the quantized channel and perturbation samples, read as
integers −15..15. Each s_j is +1 for a satisfied check and −1 for a violated
one. The sum carries no weight. A metric equal to the threshold does not
flip.

* **Loading.** On `init` the decoder copies the whole frame in parallel from
  the channel shift register into its own channel registers. Each processor
  takes the sign of its sample as its first decision.
* **Perturbation.** `q_in[i]` is read every clock. The BERT drives it from a
  2048-entry shift register that moves one place per clock, so each
  processor sees a fresh sample each iteration.
* **Stopping.** The decoder stops when all checks are satisfied
  (`syndrome_ok`) or when `max_iter` iterations have been done. `done`
  (decoder_done) then stays high until the next `init`. With no errors in
  the hard decisions, decoding takes 0 iterations.
* **Code.** The 802.3an parity-check matrix is not reproduced. In its place
  is a quasi-cyclic matrix of the same shape: 384 x 2048, six checks per
  bit, 32 bits per check, made of 6 x 32 circulant permutation blocks of
  size 64. Check `b·64 + a` watches bit `k·64 + ((a + b·k) mod 64)`. The
  BERT always sends the all-zero word, which is a codeword of every linear
  code, so no encoder is needed. This matrix has short cycles (for example,
  block rows 4 apart and block columns 16 apart), so **its error-floor
  numbers are not those of the 802.3an code**. Replacing the two index
  expressions in `ngdbf_decoder.sv` is enough to use another code of the
  same degrees.

## The bit error rate tester (`bert`, `bert_fsm`)

The channel generator and its quantizer push one sample per clock into the
channel shift register. A counter tracks how many fresh samples have
arrived since the last parallel load. `initialized` is high once that
counter reaches 2048. The controller has four states:

1. **INIT.** After reset, and whenever `start` rises, `powerup_decoder` is
   high for one clock. This reseeds both generators and clears the
   counters. The controller leaves INIT when powerup_decoder is low,
   initialized is high, start is high and done is low. On leaving, it raises
   `initialize_decoder` and clears `counted`.
2. **START.** initialize_decoder is high for exactly one clock, and the
   decoder loads the frame. Once initialize_decoder, counted and
   decoder_done are all low, the controller moves to DECODE.
3. **DECODE.** Waits for decoder_done.
4. **COUNT.** For one clock the number of ones in the decoded frame is added
   to `bit_errors`, one is added to `frame_errors` if that number is not
   zero, and `frames` is incremented. `counted` is set, and the controller
   returns to INIT.

The next frame is collected while the current one decodes. A frame
therefore costs max(2048, decode time + 3) clocks. At high SNR the
controller mostly waits in INIT for samples. `done` is high once `frames`
reaches `num_frames`.

`bert_platform` gives all six testers the same settings. Tester *k* uses
channel seed CH_SEED + k and noise seed NOISE_SEED + k (8-bit wrap).

## Register maps

All registers are 32 bits and use byte addresses. Write strobes are
ignored.

**Channel test platform** (`ch_s_axi`, 9-bit address)

| addr | name | reset | meaning |
|---|---|---|---|
| 0x00 | CTRL | 0 | bit0 INIT (writing 1 gives a one-clock pulse: reseed and clear the histogram), bit1 RUN |
| 0x04 | SEED | 123 | 8-bit seed |
| 0x08 | INDEX | 16 | SNR index |
| 0x0C | SCALE | 0x40000 (4.0) | quantizer scale, Q5.16 |
| 0x10 | DELTA | 22 | quantizer shift |
| 0x14 / 0x18 | NUM_LO / NUM_HI | 2^20 | sample budget, 48 bits |
| 0x1C | STATUS | – | bit0 DONE |
| 0x20 / 0x24 | TOTAL_LO / HI | – | samples counted |
| 0x100 + 8b / +4 | BIN b LO / HI | – | histogram bin b (0..31) |

Typical use: write the settings, write CTRL=1, then CTRL=2, poll STATUS,
then read the bins.

**BERT platform** (`bt_s_axi`, 8-bit address)

| addr | name | reset |
|---|---|---|
| 0x00 | CTRL bit0 START (level; a rising edge restarts) | 0 |
| 0x04 / 0x08 | INDEX_CH / INDEX_NOISE | 18 / 18 |
| 0x0C / 0x10 | CH_SEED / NOISE_SEED | 180 / 120 |
| 0x14 | NUM_FRAMES | 1,000,000 |
| 0x18 | THETA (signed 8 bits) | −1 |
| 0x1C | MAX_ITER | 100 |
| 0x20 / 0x24 | SCALE / DELTA | 4.0 / 22 |
| 0x28 | STATUS, bit k = tester k done | – |
| 0x40 + 0x10k | +0 bit errors low, +4 bit errors high, +8 frame errors, +C frames | – |

## What is specified and what is chosen

These parts follow the original description of the setup:

* the two platforms, six parallel BERTs and seeds incremented per BERT;
* one sample per clock from each generator, the 21-bit sample, mean +1, the
  8-bit seed and the SNR index convention;
* the 5-bit sign-magnitude quantizer with a 42-bit scaled magnitude, a
  32-bit intsample and the delta shift;
* the 32-level histogram;
* 2048 bit-flipping processors, six XOR parity checks per bit and the
  flipping rule;
* the serial channel register with its parallel load, and the per-clock
  shifting noise register;
* the four controller states and their handshake signals;
* the reset values of the BERT registers (indices 18, seeds 180/120, one
  million frames) and of the channel registers (seed 123, 4 dB).

These are this design's own choices:

* the generator's internal method and seed expansion;
* the code rate used for σ;
* the saturations;
* the quantizer bit selection, and reusing the channel quantizer settings
  for the noise;
* the parity-check matrix;
* the all-zero test frame;
* the stopping rule and the iteration limit;
* the values of θ, MAX_ITER, SCALE and DELTA;
* the counter widths;
* the AXI4-Lite protocol details and both register maps;
* merging both platforms into one top.

None of the error counts this hardware produces have been compared with
measured results. The matrix alone makes such a comparison meaningless.

## Parameters

| module | parameter | default | notes |
|---|---|---|---|
| `ngdbf_test_system`, `bert_platform` | N_BERT | 6 | testers |
| `ngdbf_test_system`, `bert_platform`, `bert`, `ngdbf_decoder` | Z, KB, JB | 64, 32, 6 | frame = Z·KB bits, checks = Z·JB |
| `awgn_gen` | MEAN_Q16, RATE_NUM, RATE_DEN | 65536, 1723, 2048 | mean and code rate |
| `histogram` / `channel_top` | CNT_W | 48 | counter width |
| `frame_shiftreg` | DEPTH, W | 2048, 5 | |

All defaults are the full-size design. The testbenches reduce Z and KB to
keep simulation short.

## Simulation

Every file is one module or package, `rtl/<name>.sv` or `tb/<name>.sv`. The
packages `ce_pkg` and `bert_pkg` must be read first. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -Irtl \
        rtl/ce_pkg.sv rtl/bert_pkg.sv tb/tb_bert.sv --top-module tb_bert
    obj_dir/Vtb_bert

Each testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. Each also has a cycle watchdog.

| testbench | what it covers |
|---|---|
| `tb_awgn_gen` | bit-exact sequence against a reference model, latency, mean and σ, reseed reproducibility, enable |
| `tb_sm_quantizer` | hand cases and random samples against the integer formula |
| `tb_histogram`, `tb_frame_shiftreg`, `tb_parity_check`, `tb_bitflip_proc` | against models in the testbench |
| `tb_channel_top` | 4000-sample run: exact clock count, bins against the sample stream, shape, budget |
| `tb_axil_slave`, `tb_chan_test_platform` | bus handshakes and back-pressure; the histogram through the registers |
| `tb_ngdbf_decoder` | matrix structure, clean and single-error frames, iteration limit (64-bit code) |
| `tb_bert_fsm`, `tb_bert`, `tb_bert_platform` | controller sequence, frame timing, error counting, seeds |
| `tb_ngdbf_test_system` | both platforms end to end through AXI at 64-bit frames; requires at least one reseed, converged decode, iteration-limit stop, wait for a frame, frame error and histogram completion |

### Size of the simulations

The largest configuration the testbenches above run is 64-bit frames
(Z=8, KB=8) with all six testers. The top has also been simulated once at its
default size, with no parameter changed. That run produced a 5000-sample
histogram at 4 dB and one 2048-bit frame per tester at the reset settings,
with all checks passing. Building that model with Verilator takes about
11 minutes, because it contains 12,288 bit processors. The simulation
itself takes about 20 seconds. That testbench is not included. A
default-size test can be written by instantiating `ngdbf_test_system`
without parameters and driving it as `tb_ngdbf_test_system` does.
