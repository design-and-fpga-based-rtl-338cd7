# NB-IoT user-equipment baseband: NPUSCH transmitter and NPDSCH receiver

This is synthesizable SystemVerilog for the physical-layer data path of an
NB-IoT device. It has two chains, and they run independently:

* the **uplink shared-channel transmitter (NPUSCH)**. It turns a transport block
  into SC-FDMA time samples.
* the **downlink shared-channel receiver (NPDSCH)**. It turns synchronised OFDM
  samples back into a transport block and reports whether the CRC passed.

An **NPSS detector** sits beside them. It finds the start of the primary
synchronisation signal in the full-rate sample stream and measures its
fractional frequency offset.

Both chains are built for the full NB-IoT sizes:
* transport blocks up to 2536 bits (K = 2560 with the CRC);
* up to 2880 coded uplink bits;
* downlink repetition combining over a 3 x 2560 x 12-bit memory.

Everything is fixed point. Complex samples are two signed 16-bit numbers in
Q2.14 (`nbiot_pkg::cplx_t`), and unit-power constellation points have
amplitude 11585 (1/sqrt 2).

## Transmitter chain

```
bits -> crc24 -> turbo_encoder -> rate_matcher -> channel_interleaver
     -> scrambler -> modulation_mapper -> dft_precoder -> ul_re_mapper
     -> ifft16 -> interpolator -> samples
```

* **CRC (`crc24`)** shifts the bits through a CRC24A LFSR and then appends
  the 24 parity bits, MSB first.
* **Turbo encoder** is two 8-state recursive encoders and a QPP interleaver.
  The interleaver address pi(i) = (f1 i + f2 i^2) mod K is updated by
  additions, so no multiplier is needed. The four tail steps of each encoder
  give the 12 termination bits. The streams d0/d1/d2 leave as one triplet per
  clock, K + 4 triplets in all. f1 and f2 are inputs: the standard's table of
  188 block sizes is not built in.
* **Rate matcher** writes each stream into a 128 x 32-bit RAM, row by row
  through a 32-bit serial-to-parallel register. It then reads the circular
  buffer column by column through the permuted column order:
  * the systematic stream first, then the two parity streams interlaced;
  * the read starts at k0 = R(24 rv + 2);
  * dummy positions are skipped.
  The second parity stream is read at the shifted index (P(c) + 32r + 1) mod K_pi.
* **Channel interleaver** writes the G bits row-wise into a matrix with
  6 N_slots columns and reads them column-wise. Bits are packed 12 per RAM
  word, so the matrix is 240 words rather than 2880 flip-flops.
* **Scrambler** is a Gold-sequence generator (`gold_seq`) and an XOR. After
  `init` the generator is stepped 1600 times (1600 clocks) before the first bit
  may pass.
* **Modulation mapper** is a four-entry LUT. QPSK waits for the second bit, so
  a symbol takes two clocks. BPSK takes one.
* **DFT precoder** computes the M-point DFT (M = 1, 3, 6 or 12) with a single
  complex multiply-accumulate over a 12-entry twiddle table. It scales by
  1/sqrt(M), so power is kept. Latency is M + M^2 clocks per symbol.
* **Resource element mapper** places the M symbols on subcarriers
  `sc_start .. sc_start+M-1` of the 16-bin IFFT input:
  * subcarrier k < 6 goes to bin k + 10, and k >= 6 goes to bin k - 6;
  * bins 6..9 are guard bins and stay zero.

  While `tx_dmrs_sel` is high, the mapper takes its symbols from the `tx_dmrs_*`
  ports instead of the precoder. That is how the uplink reference-signal symbol
  of each slot is inserted.
* **IFFT** has four registered radix-2 stages with all 16 points in parallel.
  Each stage scales by 1/2, and the output is re-ordered to natural order.
  Latency is 4 clocks.
* **Interpolator** up-samples 16 samples by 8 (15 kHz spacing) or by 32
  (3.75 kHz spacing), using circular linear interpolation. It adds the cyclic
  prefix simply by starting the read-out N_cp samples before the end of the
  symbol. N_cp is 10/9 samples at 15 kHz and 40/36 at 3.75 kHz, where the long
  CP goes on the first symbol of a slot. It outputs one sample per clock.

From the channel interleaver onwards, every link has valid/ready, so the chain
runs at the interpolator's pace. The IFFT has no back-pressure, so a frame
enters it only when the interpolator is free and the IFFT pipeline is empty.

## Receiver chain

```
samples -> cfo_corrector -> sync_fifo -> fft16_sdf -> re_demapper
        -> channel_estimator (pilots) / nrs_removal (data) -> equalizer
        -> symbol_demapper -> descrambler -> bit FIFO -> rate_dematcher
        -> viterbi_decoder -> crc24 (check)
```

The receiver input is 16 samples per OFDM symbol, with the cyclic prefix
already removed.

* **CFO correction** uses a 16-bit phase accumulator (2^16 = 2 pi). It adds
  `rx_phase_inc` per sample, and a 15-stage pipelined CORDIC (`cordic_rotator`)
  rotates each sample by minus that phase. The CORDIC pre-rotates by 180°
  outside ±90° and compensates its gain. Latency is 17 clocks.
* **FFT** is a 16-point radix-2 single-path delay-feedback pipeline built from
  four `sdf_stage`s with delays 8/4/2/1. It takes one sample per clock. Outputs
  come in bit-reversed order with their bin index. The last symbol of a burst
  needs 16 more input samples (zeros will do) to push it out.
* **Resource element de-mapper** writes the FFT outputs into a 16 x 14 store at
  their bin address, which undoes the bit reversal. When a subframe is
  complete, the store is copied into the 12 x 14 grid, one symbol column per
  clock. The copy undoes the half swap of the transmitter's bin layout. The
  next subframe may already stream in during the copy, because column 0 is
  copied first.
* **Channel estimation** works as follows:
  1. `nrs_gen` gives the NRS values and positions for symbols 5 and 6 of both
     slots.
  2. The LS estimate at each pilot is y·conj(x).
  3. The two slots are averaged, which leaves four pilot subcarriers per
     subframe, spaced 3 apart.
  4. Linear interpolation and extrapolation (weights n/3) give one estimate
     per subcarrier.
* **NRS removal** reads the grid symbol by symbol and subcarrier by
  subcarrier. It skips the NRS positions, which leaves 160 data elements per
  subframe, one every two clocks.
* **Equaliser** multiplies each element by conj(H). It does not divide by
  |H|^2, because only signs are used afterwards.
* **De-mapper** makes hard QPSK decisions and emits the I bit, then the Q bit.
* **Descrambler** is the same scrambler module, initialised by `rx_start`.
* **Rate de-matcher** undoes the rate matching of the tail-biting
  convolutional code:
  * It walks the transmitter's circular buffer position by position and skips
    dummy bits, with `in_ready` low at those positions.
  * Each received bit adds +1 or -1, saturating at 12 bits, to the word at its
    de-interleaved address P(c) + 32r of its stream. Repetitions are combined
    and the sub-block interleaving is undone in the same step.
  * After E bits, the signs of the D words of each stream give the decoded
    triplets.

  A 128-deep bit FIFO in front absorbs the pauses at dummy positions.
* **Viterbi decoder** is a modified circular (tail-biting) Viterbi decoder for
  generators 133/171/165 (octal). It has 64 states, one trellis step per clock
  with Hamming branch metrics, and a K x 64 survivor memory. An iteration runs
  K steps, then traces back from the best state into a LIFO. If the path ends
  in the state it started from, it is tail-biting and decoding stops.
  Otherwise the final metrics seed another iteration, up to `MAX_ITER` = 4.
  The LIFO is then read out in order, one bit per clock.
* **CRC check** is `crc24` with `CHECK=1`. `rx_done` pulses one clock after
  the last bit, and `rx_crc_ok` holds the result.

### Subframe timing

1. Pulse `rx_start` with `rx_k_len`, `rx_e_len` and `rx_c_init`. The
   descrambler then needs 1600 clocks.
2. Pulse `rx_clear` before the first sample of a burst.
3. Feed 14 symbols of 16 samples.

When the grid is complete, `grid_ready` starts the channel estimator. The
estimator's `done` starts the read-out, and the read-out takes 320 clocks.
After rx_e_len bits have arrived, the de-matcher passes K triplets to the
decoder.

## NPSS detector

`coarse_sync` computes the delayed auto-correlation metric of the NPSS:
1. It forms r(n-NS)·conj(r(n)) at a lag of one OFDM symbol (NS = 137 samples at
   1.92 Msps).
2. It sums these products over ten symbol-long buffers, each with a running
   accumulator.
3. It combines the sums with the signs S(l)S(l+1) of the NPSS code cover.
4. It sums 16 consecutive metrics (reduction by 16, so 1200 entries per 10 ms
   frame).
5. It filters |R| over frames: A = A(1 - alpha) + |R| alpha, with alpha = 1/4.

Once per frame it reports:
* the best metric against `cs_threshold`;
* the implied first NPSS sample (resolution 16 samples);
* the complex correlation at the peak. Its angle is -2 pi times the
  fractional offset times the lag.

## What is not here

* The cross-correlation steps that follow the auto-correlation (integer
  frequency offset and time refinement) are missing. So are the cyclic-prefix
  removal and down-sampling between the detector and the receiver. The
  receiver therefore takes 16-sample symbols and a CFO value from outside.
* There is no uplink reference-signal (NDMRS) generator. Its symbols come in
  through `tx_dmrs_*`.
* There is no QPP f1/f2 table. f1 and f2 are ports.
* The detector and the de-matcher do not share one RAM; each keeps its own
  memory.
* The FFT implements all four SDF stages rather than folding the fourth stage
  onto the first. The result is the same.
* The de-matcher de-interleaves by addressing, where a design with separate
  de-interleaver memories would copy the data between them. The result is the
  same.
* The modulation mapper applies no pi/2 (BPSK) or pi/4 (QPSK) constellation
  rotation.
* Decisions are hard throughout: a hard de-mapper and Hamming metrics in the
  Viterbi decoder.
* Subframe, slot and repetition control, and the formation of `c_init` values,
  are left to the surrounding controller.

## Files and simulation

`rtl/` holds one module per file:
* `nbiot_pkg.sv` contains the shared types, constants and small functions;
* `nbiot_ue_top.sv` is the top level;
* `sdf_stage.sv` is a helper used by the FFT.

Each block has a self-checking testbench `tb/tb_<block>.sv`. Each testbench
prints `TB_RESULT checks=N failures=M` and has a watchdog.

`tb_nbiot_ue_top` runs the whole design at its default sizes:
* a 40-bit block through the transmitter, checked for 1920 output samples and
  for the activity of every stage;
* a downlink subframe that the testbench builds itself (CRC, convolutional
  coding, rate matching, scrambling, QPSK, NRS, channel, IDFT, CFO), which must
  decode correctly with a good CRC;
* three 10 ms frames for the NPSS detector.

Example with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/nbiot_pkg.sv \
          tb/tb_nbiot_ue_top.sv --top-module tb_nbiot_ue_top -Mdir obj
./obj/Vtb_nbiot_ue_top
```

The same command with another `tb_<block>` runs a block test. Several block
tests override parameters to keep their runs short:
* the NPSS detector with 8-sample symbols;
* the de-matcher and Viterbi decoder with KMAX 256 or 512;
* the FIFO depth.

## Lint notes

* Verilator reports width truncations in a few address expressions where a
  counter is one bit wider than the memory index. The values never exceed the
  memory size.
* It reports unused outputs of sub-blocks in the top level, such as `done`
  flags and `last` markers not needed there.
* `SYNCASYNCNET` is reported for reset signals that are also used in the
  `disable iff` of assertions.
