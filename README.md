# Group-wise SIC multiuser detector for the TD-SCDMA downlink

In a CDMA downlink, multipath destroys the orthogonality of the spreading
codes. A plain linear equalizer then leaves a lot of multiple-access
interference, especially when all 16 codes of a TD-SCDMA timeslot are in use.
This RTL implements a *successive interference cancellation* multiuser
detector (SIC-MUD) that removes that interference step by step:

1. equalize the received burst with a linear MMSE filter and despread all codes;
2. for every symbol, pick the codes whose estimates look most reliable;
3. rebuild their contribution to the received signal from the hard decisions,
   send it through the channel, and subtract it;
4. repeat on the residual until every code of every symbol has been decided.

Three ideas keep the hardware small. They follow the architecture of the paper
*Successive Interference Cancellation for 3G Downlink: Algorithm and VLSI
Architecture*:

* **One set of equalizer taps for all iterations.** The exact SIC filter would
  have to be recomputed after every cancellation. Here the first-iteration MMSE
  filter is kept for all of them. It can then be computed once per burst, in
  the frequency domain, as `W_i = conj(H_i) / (|H_i|^2 + sigma^2)`.
* **Time-domain equalization.** The taps are transformed back to the time
  domain (IFFT) and cut to 64. The equalizer is then a 64-tap FIR running over
  the burst memory, so no frequency-domain copy of the burst is needed.
* **Group-wise cancellation.** Three codes per symbol (`M_SIC = 3`) are
  cancelled in each iteration. A fully loaded slot of 16 codes therefore needs
  6 iterations (5 × 3 + 1) rather than 16.

## Burst and data flow

A burst is 864 chips: data block 1 (352 chips), a 144-chip midamble, data
block 2 (352 chips), and a 16-chip guard. The spreading factor is 16, so each
code carries 22 + 22 = 44 QPSK symbols. Received samples are 9-bit I/Q.

```
 in_sample ─► main_memory ──(port A)──► le_filter ─► despreader ─► selection ─► out_grp
                 ▲    │                  (64 taps,    (16 codes     (3 best,      (soft + HD)
                 │    └─(port B)──┐       4 cmul)      in parallel)  cancelled-
                 │                ▼                                   code buffer)
                 └──── channel_fir ◄── chip_fifo ◄── spreader ◄──────────┘
                       (16 taps, 1 cmul, read-modify-write r ← r − h*x)

 cir, sigma2 ─► filter_calc: FFT128 → |H|²+σ² → divider (re, then im) → IFFT128 → 64 taps
                 (its butterfly uses lane 0 of le_filter's multipliers: u_shared_mul)
```

`sic_mud_top` holds the sequencer. On `start` it does three things. It clears
the cancelled-code buffer. It starts `filter_calc` on the channel taps. It then
writes the 864 incoming samples into `main_memory`. When the taps are ready,
`ceil(Q/3)` iterations run, where Q is the number of set bits in `active`.
Every iteration processes block 1, then block 2:

* **Priming.** The LE delay line is cleared and filled with the 63 samples
  around the start of the block. Samples outside the burst read as zero.
* **Chips.** Each chip takes 16 cycles: 64 taps on 4 complex multipliers. The
  sample the next chip needs is read while the current chip is computed.
* **Symbols.** Every 16 equalized chips the despreader outputs 16 symbol
  estimates, one per code. The selection unit scans them one per cycle and
  outputs the group of up to three chosen codes on `out_valid` / `out_sym` /
  `out_grp`.
* **Cancellation.** The spreader turns the group's hard decisions back into 16
  chips and pushes them into the FIFO. The channel filter convolves the chip
  stream with the channel taps and subtracts the result from the memory. After
  the 352 chips of a block it feeds 15 zero chips, so the channel tail that
  reaches into the midamble or guard is cancelled as well.

`done` pulses after the last block of the last iteration. The memory then holds
the final residual, which can be read back on `dbg_addr` / `dbg_data`.

## Why each iteration sees a clean residual

The residual is updated in place while the same iteration is still reading it.
This is safe because of the access order. To compute chip `p`, the equalizer
reads sample `p + 32`, the newest tap of a window that spans `p−31 … p+32`. The
channel filter writes a chip position only after three things have happened:
the whole symbol containing that chip has been equalized, it has been
despread, and the symbol has been selected. The lowest address it can still
write at that point lies more than 32 chips behind the equalizer's read
pointer. So every chip of iteration *l* is equalized from `r(l−1)` only. This
matches the algorithm: detect on the residual of the previous iteration, then
cancel.

Between blocks and between iterations the sequencer waits for the channel
filter to finish its tail. An assertion (`a_drained`) checks that the
selection unit, the spreader and the FIFO are empty at that point.

## Choosing what to cancel

For each code of a symbol the selection unit does the following:

* It forms the QPSK hard decision `HD = (±A, ±A)`, where `A = 16·chip_amp` is
  the despread amplitude of one code.
* It computes the squared distance `|d − HD|²` as a reliability measure. A
  small distance means a high SINR.
* It keeps the three smallest distances in three sorted registers, visiting
  one code per cycle.

A code is skipped if it is inactive, or if its bit is set in the
**cancelled-code buffer**: 16 bits for each of the 44 symbols. This is what
lets every symbol have its own cancellation order. When the search ends, the
chosen codes are marked in the buffer. In the last iteration fewer than three
codes may be left, and the group then has empty lanes. The soft estimates of
the group are the detector's soft outputs. The hard decisions are what the
spreader re-spreads.

## Computing the equalizer taps

`filter_calc` runs once per burst, in parallel with loading the burst:

1. Load the 16 channel taps into the FFT memory, zero-padded to 128 words.
2. Run the forward FFT: radix-2 decimation in time with one butterfly. A
   bit-reversal swap pass comes first, then 7 × 64 butterflies, for 577 cycles.
3. For each bin, `denominator` forms `|H|² + σ²`. `seq_divider` then divides
   twice: first for the real part `Re H`, then for the imaginary part `−Im H`
   (42 cycles each).
4. Run the inverse FFT with conjugated twiddles, halving after every stage.
5. Take `w_t` for `t = −32 … 31` as LE coefficients 0 … 63.

This takes about 12,600 cycles. The FFT butterfly has no multiplier of its
own. It uses `u_shared_mul` in the top, which is lane 0 of the LE filter
whenever `filter_calc` is idle.

## Number formats

| Signal | Width (I and Q each) | Scaling |
|---|---|---|
| received / residual sample | 9 bits | integer |
| channel tap `cir` | 10 bits | 8 fractional bits |
| `sigma2` | 24 bits unsigned | 16 fractional bits |
| FFT word | 18 bits | same as taps (forward) |
| twiddle | 16 bits | 14 fractional bits |
| frequency-domain coefficient W | 18 bits | 14 fractional bits, saturates at ±8 |
| LE coefficient | 12 bits | 10 fractional bits, saturates at ±2 |
| equalized chip | 12 bits | sample units, rounded and saturated |
| despread symbol | 16 bits | sum of 16 chips |
| regenerated chip | 11 bits | up to 3 × `chip_amp` |

The regenerated interference is `round(Σ h_w x_{q−w} / 2^8)`. The residual is
saturated to 9 bits when it is written back.

## Timing

At the default sizes, with all 16 codes active, one burst takes 86,378 clock
cycles from the last loaded sample to `done`. At 200 MHz that is 432 µs. A
timeslot of 864 chips at 1.28 Mcps lasts 675 µs, so about 240 µs remain for
other receiver tasks such as channel estimation. This matches the budget the
architecture targets. The cost is dominated by 6 iterations × 704 chips × 16
cycles.

## Top-level interface (`sic_mud_top`)

| Port | Dir | Meaning |
|---|---|---|
| `start` | in | pulse: begin a burst |
| `in_valid`, `in_sample` | in | the 864 received samples, in order, after `start` |
| `codes[16]` | in | 16-chip code of each code number; bit `i` = 1 means chip value −1 |
| `active` | in | mask of codes present in the slot |
| `chip_amp` | in | chip amplitude of one code (all codes have equal power) |
| `cir[16]`, `sigma2` | in | channel estimate and noise variance |
| `out_valid`, `out_sym`, `out_grp[3]` | out | one selected group: symbol 0–43, and per lane `valid`, `code`, soft estimate `est_sym`, HD bits `hd_re` / `hd_im` (1 = negative) |
| `busy`, `done`, `iter` | out | status; `iter` is the current iteration |
| `dbg_addr`, `dbg_data` | in/out | residual read-back while idle, one cycle latency |

`sigma2` is the noise-to-signal power ratio that the MMSE formula needs. It is
the complex noise variance divided by the mean power of one transmitted chip
(before the channel). With Q active codes of amplitude `chip_amp` per I/Q, that
chip power is `2·Q·chip_amp²`. The channel taps are scaled so that a
unit-gain path reads 256.

All inputs except the samples must stay stable from `start` to `done`. Reset
is asynchronous and active low.

## Design choices made here

The source describes the block structure and the main sizes: 9-bit samples,
a 64-tap LE with 4 multipliers, a 128-point single-butterfly FFT shared with
the IFFT, a time-shared divider, `M_SIC = 3`, a 16-bit cancelled-code buffer
per symbol, a channel filter with one multiplier, and one multiplier shared
between the LE and the FFT. The following are this design's own choices:

* All word widths and roundings (table above).
* The 64-tap window `t = −32 … 31` of the 128-tap filter.
* 16 channel taps.
* Codes are programmable real ±1 sequences, not the complex TD-SCDMA
  channelisation and scrambling codes.
* The midamble is neither removed nor cancelled. Only the data blocks and
  their channel tails are cancelled.
* The FIFO sits between the spreader and the channel filter and is 32 chips
  deep. Its size and position are not taken from the source.
* The main memory and the FFT storage are register arrays with the ports
  described above, not memory macros.
* The whole sequencing and every handshake.

Channel estimation, the soft-decision variant and per-iteration filter
recomputation are not part of this design.

## Verification

Every module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each
one compares the module against a model written independently in the
testbench and checks latencies where they are fixed:

* 16 cycles per LE output;
* 577 cycles per FFT;
* 42 cycles per division;
* a write every 16 cycles from the channel filter.

`tb_sic_mud_top` runs one full burst at the default sizes. It generates the
burst itself: random QPSK on 16 Walsh codes, a 4-path complex channel, and
rounding to 9 bits. It then checks four things:

* every hard decision equals the transmitted symbol;
* every (symbol, code) pair is output exactly once;
* the residual energy falls below 1 % of the input (measured: 0.06 %);
* the run fits in 87,000 cycles.

It also counts that each mechanism was exercised: groups of three, the partial
last group, skips of cancelled codes, both users of the shared multiplier,
forward and inverse FFT, and real and imaginary divisions. The test has no
noise, so it checks the datapath, not BER performance.

`tb_sic_mud_channels` is the performance test. It sends 20 fully loaded
bursts over each of two multipath channels and adds Gaussian noise (standard
deviation 4.5 sample units per I/Q). Every path fades independently from
burst to burst (Rayleigh).

* Case 1 has paths at 0 and 4 chips, the second 10 dB weaker.
* Case 2 has three equal paths at 0, 4 and 15 chips.

The testbench gives the detector the exact channel. It counts two error
numbers: those of the plain MMSE equalizer, taken from the first iteration's
despread estimates inside the design, and those of the final hard decisions.
With the default seed the result is:

| Channel | MMSE errors | SIC-MUD errors | of symbols |
|---|---|---|---|
| Case 1 | 169 | 153 | 14,080 |
| Case 2 | 409 | 203 | 14,080 |

In Case 2 the echoes are strong and cause a lot of interference, and SIC
removes half or more of the errors. Other seeds gave 2–5× fewer errors. In
Case 1 there is little interference to cancel. With only tens to hundreds of
errors, the difference there depends on the fading draw, and one seed came out
slightly worse (46 against 51). The test therefore requires two things: a
strict gain on Case 2, and no more than 25 % (plus 5 errors) loss on Case 1.
It does not produce BER-versus-SNR curves.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -Irtl \
  rtl/sic_pkg.sv tb/tb_sic_mud_top.sv --top-module tb_sic_mud_top -o sim
./obj_dir/sim
```

Each run ends with a line `TB_RESULT checks=N failures=M`. The full-burst test
simulates in well under a second, the channel test in a few seconds.

## Files

`rtl/sic_pkg.sv` holds the constants and word types. Each other file holds one
module: `sic_mud_top`, `main_memory`, `le_filter`, `cmul`, `despreader`,
`selection`, `spreader`, `chip_fifo`, `channel_fir`, `filter_calc`, `fft`,
`denominator`, `seq_divider`. The testbenches are in `tb/`: one
`tb_<module>.sv` per module, plus `tb_sic_mud_channels.sv` for the multipath
performance test.
