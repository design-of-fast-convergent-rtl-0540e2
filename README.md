# LS-LMS adaptive frequency-domain equalizer for 60 GHz single-carrier receivers

A single-carrier receiver for IEEE 802.15.3c (SC mode, 1728 MS/s) gets its
data in blocks of 512 samples separated by a 64-sample cyclic prefix (the
pilot word). Thanks to the prefix, the multipath channel acts on each block as
a circular convolution. After a 512-point FFT it becomes one complex gain
`H_k` per subcarrier. Equalizing is then one complex multiply per subcarrier,
`Y_k = W_k R_k` with `W_k ≈ 1/H_k`, followed by an IFFT back to the time
domain and a slicer.

The hard part is getting `W` and keeping it right, at 1728 MS/s and with no
pilot subcarriers. This design does it in two steps:

1. **Least-squares (LS) channel estimation.** The preamble holds six copies
   of a known 512-chip training block `u512`. Their spectra are averaged, and
   `W_k = U_k / mean(R_k)` is computed without a divider.
2. **Decision-directed LMS tracking.** In every data block the slicer's
   decisions act as the reference, and each coefficient takes one LMS step
   per block: `W_k += mu * conj(R_k) * E_k`.

LS gives a good starting point after only six blocks. LMS alone would need
about 35 blocks to converge. LMS is cheap enough to run at this rate.

The datapath is 8 subcarriers wide and runs at 216 MHz (8 × 216 = 1728 MS/s).
A 512-subcarrier block is 64 *rows*, and subcarrier `k` sits in row `k / 8`,
lane `k % 8`. The design follows a published LS-LMS FDE design. This README
explains the design, and says which parts follow that design and which parts
are choices made here.

## The receive loop

```
 FFT ──r──► fde_core ──y──► IFFT ──t──► pi2_demapper ──► bits
              ▲                               │ err (decision − sample)
              └──────── e ◄── FFT ◄───────────┘
```

`fde_top` holds `fde_core` (the equalizer) and `pi2_demapper`. The three
512-point transforms (the FFT in front, the IFFT behind, and the FFT of the
decision error) are not part of this RTL. Their buses are ports of `fde_top`.
The LMS error must be in the frequency domain, but the decision is made in
the time domain. So the time-domain error `err` is sent out to be transformed
and comes back as `e`.

## Two stages that never overlap

`fde_ctrl` runs three stages. A `train_start` pulse, given on or before the
first training row, starts training from any stage:

| stage | what the lanes do | register file holds |
|---|---|---|
| `ST_IDLE` | nothing (rows ignored) | – |
| `ST_TRAIN`, blocks 0..4 | `S_k ← R_k` (block 0) or `S_k ← S_k + R_k` | running sums (SISO_1) |
| `ST_TRAIN`, block 5 | `S_k + R_k` goes into the LS pipeline, and `W_k` is written over `S_k` | coefficients (SISO_2) |
| `ST_DATA` | `Y = W R` for every row; an LMS update for every returning error row | coefficients |

Training and data never overlap, so the two stages can share hardware. This
sharing follows the reference design:

* **Register file.** `coef_regfile` has 64 rows × 8 lanes × 48 bits. It holds
  the sums during training and the coefficients afterwards.
* **Conjugating multiplier.** The per-lane `cmul_conj` (19 × 16 bits) computes
  `conj(S)·U` for LS and `conj(R)·E` for LMS.
* **Equalizer multiplier.** The four real multipliers of the one-tap
  equalizer (`shared_cmul`, 21 × 15 bits) are lent to LS during the last
  training block. Two compute the power `|S|²` and two do the divider's scalar
  multiply.

Training must be followed by at least 3 idle cycles before the first data
row, while the LS pipeline drains. Assertions check this. Real frames always
have the 8-cycle pilot-word gap here.

## Divider-free LS

With `S_k = Σ R_k` over the six training blocks, the coefficient is:

```
W_k = U_k / (S_k/6) = 6 · conj(S_k) · U_k / |S_k|²
```

The division by the positive scalar `|S|²` becomes a table lookup (`inv_lut`):

* Take the 14-bit power scalar and find its leading one.
* Keep the 4 *significant bits* `SB` that start there. The scalar is then
  about `SB · 2^dn`.
* Look up `1/SB` in a 16-entry × 13-bit table: `INV(SB) = min(8191, ⌊65535/SB⌋)`.
* `1/scalar ≈ INV(SB) · 2^-(16+dn)`.

The reference design uses this 4-bit table, which replaces a 2^14-word table.
It is not exact: dropping the bits below `SB` makes the inverse up to 12.5%
too large. This is the largest error in the LS estimate. `tb_fde_lane` checks
that the estimate stays within 25% of the ideal `1/H`.

Per lane, the last training block runs through a 4-stage pipeline
(`fde_lane`). Each row's coefficient is written back 3 cycles after the row
arrives:

| cycle | work | operands |
|---|---|---|
| 0 | `S = stored sum + R` | 24 bits |
| 1 | `P = conj(S')·U` (`cmul_conj`); `pw = |S''|²` (`shared_cmul`, 2 multipliers) | `S' = S>>1` to 19 bits; `S'' = S>>4` to 13 bits; U 9 bits |
| 2 | `scalar = pw>>12` to 14 bits → `inv_lut`; `P>>12` to 11 bits | |
| 3 | `W = sat15((6·P·INV) >> (dn + 6))` (`shared_cmul`, 2 multipliers) | 11 × 13 bits |

The reference design applies `2^-dn` to the inverse before the multiply. Here
it is applied after the multiply, so no precision is lost. The factor 6 (the
averaging) is a multiply by a constant.

`train_rom` holds `U_k`. It is the 512-point DFT of
`u512 = [a128, ~b128, ~a128, ~b128]`, built from the standard's Golay
sequences with chip 1 → +1. The values are stored as `round(4·U_k)` in
9+9 bits, 64 rows × 144 bits. Constant functions in `rtl/train_rom.sv`
compute the table at elaboration, and `tb_train_rom` recomputes it
independently. With this sequence,
`U_k = 0` at k = 64, 192, 320 and 448. Those four coefficients come out of LS
as 0, and LMS fills them in.

## One-tap equalizer and LMS

The equalizer computes `Y = sat13(round(W·R >> 14))` and registers it, so `y`
comes out one cycle after its row. Every row is 8 subcarriers, so a
512-subcarrier block takes 64 cycles.

LMS needs `R` and `E` of the same subcarrier. `E` only comes back after the
IFFT, the slicer and the error FFT, which takes more than one block. So each
equalized row also pushes a 10-bit copy of `R` (`R>>4`) into `rdelay_buf`, a
circular buffer four blocks deep. Each returning error row pops it. Errors
must come back in row order, within four blocks. `rb_overflow` is a sticky
flag for a violation, and an assertion also reports it. The update is:

```
W_k ← sat15(W_k + round(conj(R10_k) · E_k >> 7))      (mu = 2^-7)
```

It reads `W` on the register file's second read port and writes it back in
the same cycle. Meanwhile the first read port keeps feeding the equalizer.

**Departure from the reference design.** The reference design writes the
update as `W + mu·R·conj(E)`. With `Y = W·R` and `E = D − Y`, the gradient
step is `W + mu·conj(R)·E`. The two are complex conjugates of each other, and
only the second converges when the channel has a phase. This design
conjugates `R`. It costs the same: one multiplier with one conjugated input.

## Slicer and π/2 demapper

`pi2_demapper` handles π/2-BPSK and π/2-QPSK (`mod` input). A π/2-modulated
sample is `z_n = j^n s_n`. Sample `n` of a block is in lane `n % 8`, and 512
is a multiple of 4. So the rotation of lane `l` is fixed at `j^(l % 4)`.

As in the reference design, the slicer works on the rotated sample. The
decision can therefore feed the error directly:

* QPSK: signs of both axes.
* BPSK: only the real axis at even `n` and only the imaginary axis at odd `n`.
  The other axis is decided as 0.

Only the exact decision is rotated back to get the bits. Bit mapping: BPSK
`s = 2b0−1`; QPSK `s = (2b0−1) + j(2b1−1)`. Decisions have amplitude
`DEC_AMP` (1024) per axis. `err = decision − sample` is 14 bits wide. The
demapper has one cycle of latency.

## Number formats

All values are two's complement, complex, with re/im of the same width.

| signal | bits | meaning |
|---|---|---|
| `r` (FFT out) | 21 | received spectrum; with ±1 symbols of amplitude A at the FFT input, `R = A·H·U` |
| `U` (ROM) | 9 | DFT of ±1 chips, 2 fractional bits |
| `S` | 24 | sum of six `R` |
| `W` | 15 | `1/(A·H)`, 19 fractional bits (`A = 128` gives `W ≈ 2^12 / H`) |
| `y` (IFFT in) | 13 | `W·R` with 5 fractional bits, in units of the DFT of ±1 symbols |
| `t` (IFFT out) | 13 | time-domain sample; a decision is `±DEC_AMP` |
| `err` | 14 | decision − sample |
| `e` (error FFT out) | 7 | error spectrum; `tb_fde_top` scales it as `DFT(err)/64` |

The word lengths of `r`, `W`, `y`, `t` and `e`, and of the multiplier
operands, follow the reference design. Where the binary points sit, the shift
constants `SH_*` in `fde_pkg`, rounding half up and saturation on every
narrowing are choices made here. They are sized for a received amplitude of
about 128 at a 10-bit FFT input. A different front-end gain shifts the useful
range of `W`. Adjust `SH_SA`, `SH_SP`, `SH_PS`, `SH_LS` and `W_FRAC` together
to compensate.

## Interface of `fde_top`

| port | dir | |
|---|---|---|
| `train_start` | in | pulse: the next 6 blocks are the training sequence |
| `lms_en` | in | enable LMS tracking in the data stage |
| `mod` | in | `MOD_BPSK` / `MOD_QPSK` |
| `r_valid`, `r[8]` | in | FFT output row (gaps allowed, no back-pressure) |
| `y_valid`, `y[8]` | out | equalized row, one cycle after `r` (data stage only) |
| `t_valid`, `t[8]` | in | IFFT output row |
| `bits_valid`, `bits[8]` | out | 2 bits per sample (bit 1 is 0 in BPSK), one cycle after `t` |
| `err[8]` | out | decision error, valid with `bits_valid` |
| `e_valid`, `e[8]` | in | error spectrum rows, in the order the `y` rows went out |
| `stage`, `ls_done`, `rb_overflow` | out | stage, a pulse when the LS coefficients are written, and the delay-buffer error flag |

Reset (`rst_n`) is asynchronous and active low. The register file and the
delay buffer have no reset: training writes every row before it is read.

## Not included

* The FFT and IFFT (512-point, 8-parallel), which the reference design takes
  from other work. The testbenches model them with exact DFTs.
* Symbol timing, frequency-offset correction and the rest of the receiver.
  Synchronization is assumed perfect.
* π/2-8PSK and π/2-16QAM. The standard defines them, but this equalizer
  supports BPSK and QPSK.
* The layout of the reference design's 64 × 64 RAM is not known. The LMS
  delay buffer here (256 rows × 160 bits) is this design's own solution to
  the loop latency.

## Verification

Each testbench checks its results and ends with
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_cmul_conj`, `tb_shared_cmul` | random operands in both modes, against integer arithmetic |
| `tb_inv_lut` | all 16384 scalars: decomposition, table entry, approximation error |
| `tb_coef_regfile` | random dual-port traffic against a model |
| `tb_train_rom` | every entry against a DFT computed in the testbench |
| `tb_fde_ctrl` | stage sequence, strobes, row counter; gaps; retraining during data |
| `tb_pi2_demapper` | random noisy BPSK/QPSK symbols: bits, decisions, errors, latency |
| `tb_fde_lane` | one lane bit-exact through training, equalizing and LMS; LS within 25% of ideal |
| `tb_fde_core` | all 8 lanes bit-exact against a reference model, including the error latency, retraining, LMS off, and 64 cycles per block |
| `tb_fde_top` | the whole loop with DFT models of the FFT/IFFT (details below) |
| `tb_fde_ber` | bit-error rate of π/2-QPSK at Eb/N0 = 10 dB, 102400 bits, against an ideal floating-point zero-forcing equalizer on the same samples |

`tb_fde_top` runs the whole loop with DFT models of the FFT/IFFT, on a
multipath channel whose phase drifts 0.02 rad per block:

* **With LMS on:** no bit errors, and the decision-error power stays at about
  0.04.
* **With LMS off:** the decision-error power grows to about 0.19.

It also checks that each mechanism ran at least once: training, retraining,
BPSK, QPSK, and LMS on and off.

`tb_fde_ber` uses a static channel: a line-of-sight path 10 dB above 64
scattered Rayleigh taps with an exponential power profile of 22 samples
(12.7 ns). This is a stand-in, not the standard's channel model. On it the
hardware reaches a BER of about 2e-4, against 4e-5 for the ideal equalizer.
The reference design reports 1.54e-4 uncoded at 10 dB on the standard's
channel model, which is of the same order. The likely sources of the gap to
the ideal equalizer are noise in the six-block LS estimate, fixed-point
rounding, and the coarse 4-bit inverse. The testbench does not separate them.

`tb_fde_model_pkg` holds the testbenches' reference arithmetic and DFTs.
Run any testbench with plain Verilator from the project root. `-Wno-fatal`
keeps the testbenches' width warnings from stopping the build:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/fde_pkg.sv tb/tb_fde_model_pkg.sv \
    rtl/*.sv tb/tb_fde_top.sv --top-module tb_fde_top -Mdir obj && ./obj/Vtb_fde_top
```

`train_rom` computes its table at elaboration (a 512-point DFT in constant
functions). It needs no data file.
