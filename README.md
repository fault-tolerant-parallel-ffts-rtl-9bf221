# Fault-tolerant parallel FFTs with Parseval checks and a parity FFT

Systems such as MIMO-OFDM receivers run several FFTs side by side, one per
antenna stream. A soft error (a particle strike that flips a stored bit) in
any of them corrupts a whole spectrum. Triplicating every FFT fixes that at
three times the cost. This design uses two properties of the DFT instead:

* **Parseval's relation** says a frame and its spectrum carry the same energy:
  `sum_k |X[k]|^2 = N * sum_n |x[n]|^2` for an unscaled N-point DFT. If the
  two sides disagree, the FFT that produced `X` is in error. This test is
  called the *sum-of-squares (SOS) check* or *Parseval check*. It can detect
  an error but it cannot say what the right value was.
* **Linearity** says `DFT(x1 + x2 + x3 + x4) = X1 + X2 + X3 + X4`. One extra
  *parity FFT* that transforms the sum of the four input frames is enough to
  rebuild any one lost output: `X1 = Xparity - X2 - X3 - X4`.

Four FFTs are protected by one parity FFT plus a few Parseval checks. The
checks find the faulty FFT and the parity FFT repairs it. Two ways of placing
the checks are implemented. They run side by side in the top level
`ft_parallel_fft_top`:

| scheme | checks | how the faulty FFT is found |
|---|---|---|
| **Parity-SOS** (`parity_sos_fft`) | 4: one on each FFT (P1..P4) | the one check that fails names it |
| **Parity-SOS-ECC** (`parity_sos_ecc_fft`) | 3: on sums of FFTs chosen by a Hamming code | the pattern of failing checks names it |

Both schemes use the same parity FFT and the same correction. The second
scheme needs one check fewer, and it was reported as the cheaper of the two.

## The Parity-SOS-ECC scheme: locating an error with three checks

Each check in this scheme tests Parseval's relation on a *sum* of three FFTs.
By linearity, the sum of three spectra is the DFT of the sum of their input
frames:

    c1:  X1 + X2 + X3   against   x1 + x2 + x3
    c2:  X1 + X2 + X4   against   x1 + x2 + x4
    c3:  X1 + X3 + X4   against   x1 + x3 + x4

Each FFT belongs to a different set of checks. The checks act as the parity
bits of a single-error-correcting Hamming code, and their pattern
`{c1,c2,c3}` is the syndrome (`syndrome_decoder`):

| c1 c2 c3 | meaning | action |
|---|---|---|
| 000 | no error | pass through |
| 111 | FFT 1 | rebuild X1 |
| 110 | FFT 2 | rebuild X2 |
| 101 | FFT 3 | rebuild X3 |
| 011 | FFT 4 | rebuild X4 |
| 100, 010, 001 | a parity position, i.e. the check path itself | pass through, raise `check_only` |

In the Parity-SOS scheme, exactly one failing check P*i* selects FFT *i*. If
more than one check fails, the frame is passed on unchanged and
`uncorrectable` is raised.

## What the checks can and cannot see

The FFTs use fixed-point arithmetic, and twiddle products are rounded, so
Parseval's relation holds only approximately. Each check therefore flags an
error only when

    | sum |X|^2  -  N * sum |x|^2 |  >  THRESH

This tolerance is the part of the design that needs the most care:

* **No false alarms.** With N = 8, only the odd bins pass through a
  non-trivial twiddle, and each of their parts is off by at most about one
  LSB. The output energy therefore moves by at most about
  `2 * 8 * max|X| * 1`, which is about 3.7e5 for one FFT with 12-bit inputs.
  For a sum of three FFTs, both the values and the errors triple, giving about
  3.3e6. The defaults `PS_THRESH = 2^20` (1.05e6) and `PSE_THRESH = 2^23`
  (8.4e6) leave a margin of about 2.5x over these worst cases. Recompute them
  if you change N or the widths.
* **Small errors pass.** A flip in a low bit changes the energy by less than
  the tolerance. It goes undetected and leaves an error of a few LSBs, which
  is no larger than the rounding noise.
* **Energy is not the value.** Flipping bit `b` of a value `v` changes its
  square by `2^b * |2v ± 2^b|`. That is large in most cases but can be small
  when `v` sits near `∓2^(b-1)`. In the ECC scheme the `v` that matters is
  the value of the *sum* of three FFTs, so a given upset can be caught by
  one check and missed by another. That gives a wrong syndrome. The
  testbenches therefore use large upsets (bits 13 and 14 of 16) on bins where
  every check concerned sees at least four times its tolerance. Random upsets
  in mid-range bits are detected most of the time, not always.
* **Two errors can cancel.** Equal and opposite errors in FFT 1 and FFT 2 cancel
  in checks c1 and c2, so only c3 fails. The ECC scheme then reports
  `check_only` and passes the data on. The same pair of errors makes the
  Parity-SOS scheme report `uncorrectable`. Both cases are exercised by the
  end-to-end testbench.
* **The parity FFT is not checked.** An upset there does no harm unless
  another FFT fails in the same frame. In that case the rebuilt output is
  wrong. Each scheme corrects one error per frame.

### Measured coverage

`tb_fault_campaign` flips one bit of one FFT output per frame, 48 frames per
bit position, and classifies what each scheme delivers (default parameters,
16-bit outputs):

| flipped bit | Parity-SOS | Parity-SOS-ECC |
|---|---|---|
| 0-2 | not detected; output within tolerance | same |
| 3-6 | not detected: a silent error of 8-64 LSB | same |
| 7-9 | corrected in 25-70 % of frames, otherwise silent | bits 7-8 silent; bit 9 mostly silent |
| 10-12 | always corrected | 25-75 % corrected; the rest split between flagged, silent and misplaced corrections |
| 13-15 | always corrected | 94-100 % corrected, a few flagged or misplaced |

The ECC scheme saves a check but tests energies of sums that are three times
larger, with a tolerance nine times wider. It therefore needs larger upsets
before it reacts, and a check that misses one member of its sum gives a
wrong location. Exact counts vary with the random seed; the testbench prints
the table.

The rebuilt output carries the rounding of all five FFTs. The testbenches
accept it within 6 LSB of the exact DFT, against 1.5 LSB for an output that
was not rebuilt.

## Datapath

All five FFTs of a scheme take a whole frame per clock cycle. The pipeline is
the same in both schemes, one frame per cycle:

| cycle | what happens |
|---|---|
| t   | `in_valid` with frames x1..x4. The parity input `x1+x2+x3+x4` and the check input sums are formed. The FFTs compute. |
| t+1 | FFT outputs are registered. Fault masks are XORed in here. Each check registers its input energy `sum |x|^2`. |
| t+2 | Each check compares `N * input energy` with the output energy `sum |X|^2` and registers `err`. The FFT outputs are delayed to match. |
| t+3 | `fft_corrector` has rebuilt the located output (or passed all four). `out_valid` goes high. The error reports are valid. |

Widths, with the defaults N = 8 and IW = 12:

* inputs: signed IW-bit real and imaginary parts;
* protected FFT outputs: OW = IW + log2(N) + 1 = 16 bits, which holds the
  largest possible DFT value, so nothing is scaled or saturated;
* parity FFT: inputs IW+2 bits, outputs OW+2 bits;
* energies: `2*width + 1 + log2(N)` bits;
* a rebuilt value is saturated to OW bits.

### Blocks

| module | role |
|---|---|
| `ft_fft_pkg` | constants (`N_FFT = 4`, `N_POINTS = 8`, `IN_W = 12`, `TW_F = 14`) and `err_loc_e` |
| `fft_core` | N-point radix-2 decimation-in-time FFT. It is unrolled, has a registered output and a latency of 1. Twiddles are `round(2^TW_F * exp(-2πjk/N))`, computed at elaboration. Multiplying by 1 and by -j is plain wiring. Every other product is rounded half-up to an integer. |
| `sos_check` | Parseval check, two pipeline stages. It also outputs both energies. |
| `mag_square` | `re^2 + im^2`. Each square is of the absolute value, taken on a Vedic multiplier. |
| `vedic_mult` | Unsigned Urdhva Tiryakbhyam ("vertically and crosswise") multiplier. Column k adds every `a[i]b[j]` with `i+j = k` plus the carry from column k-1. |
| `syndrome_decoder` | the location table above |
| `fft_corrector` | `Xi = Xparity - sum of the other three`, registered |
| `parity_sos_fft` | Parity-SOS scheme: 4 FFTs, parity FFT, 4 checks, corrector |
| `parity_sos_ecc_fft` | Parity-SOS-ECC scheme: 4 FFTs, parity FFT, 3 checks on sums, decoder, corrector |
| `ft_parallel_fft_top` | both schemes, fed by the same frames |

### Top-level ports

`x_re/x_im [4][N]` and `in_valid` go to both schemes. Each scheme has its own
ports, prefixed `ps_` (Parity-SOS) or `pse_` (Parity-SOS-ECC):

* `*_fault_re/_im [5][N]`: XOR masks on the output registers of FFT 1..4
  (index 0..3, low OW bits used) and of the parity FFT (index 4). They are
  applied in the cycle the frame enters. They model soft errors for fault
  injection; tie them to zero in normal use.
* `*_out_valid`, `*_y_re/_im [4][N]`: the protected spectra.
* `*_err_loc` (`err_loc_e`: none, FFT1..4, uncorrectable) and `*_corrected`.
* `ps_chk_fail[3:0]` (P4..P1) and `ps_uncorrectable`.
* `pse_syndrome` (`{c1,c2,c3}`) and `pse_check_only`.

All reports belong to the frame currently on the outputs. Reset is
synchronous and active low. It clears the valid bits, the flags and the
outputs.

## Simulating

Every testbench checks itself against a direct real-valued DFT
(`tb/fft_tb_pkg.sv`) or exact integer arithmetic. Each one ends by printing
`TB_RESULT checks=<n> failures=<n>`. With plain Verilator, from the project
root:

    verilator --binary --timing -y rtl -y tb +libext+.sv \
        rtl/ft_fft_pkg.sv tb/fft_tb_pkg.sv tb/tb_ft_parallel_fft_top.sv \
        --top-module tb_ft_parallel_fft_top
    ./obj_dir/Vtb_ft_parallel_fft_top

Replace the testbench name to run another one:

* `tb_ft_parallel_fft_top`: end to end at the default parameters. It sends
  1500 frames back to back, injects each kind of fault listed in its header
  (none, FFT 1..4, parity FFT, small, cancelling double), requires each kind
  to occur, and checks every output, every report and the 3-cycle latency.
* `tb_fault_campaign`: single bit flips at every bit position, both schemes,
  prints the coverage table above. It fails on a wrong Parity-SOS correction,
  on a missed Parity-SOS upset in bits 13-15, and on any report for a
  fault-free frame.
* `tb_parity_sos_fft`, `tb_parity_sos_ecc_fft`: the same test on one scheme,
  600 frames.
* `tb_fft_core`: random and extreme frames, output within 1.5 LSB of the DFT,
  1-cycle latency, fault masks.
* `tb_sos_check`: exact energies, pass and fail decisions, 2-cycle latency.
* `tb_fft_corrector`: exact rebuilding, pass-through, saturation.
* `tb_mag_square`, `tb_vedic_mult`, `tb_syndrome_decoder`: exhaustive or
  random comparisons.

The end-to-end test takes a few minutes, most of it in compiling.

## Design choices beyond the scheme description

The protection schemes fix the structure: four FFTs, a parity FFT on the
summed inputs, Parseval checks per FFT or on Hamming-code sums, location by
the syndrome table, and correction by subtraction. They also call for a Vedic
multiplier in the magnitude-square cell. Everything else was chosen for this
implementation:

* FFT length 8, 12-bit complex samples, 14-bit twiddles, and a fully unrolled
  radix-2 FFT with one frame per cycle. The schemes work for any linear FFT,
  and `N`, `IW` and `TWF` are parameters. If you change them, recompute the
  thresholds (see above).
* The check thresholds 2^20 and 2^23, and the absolute-difference test.
* The check sums of the ECC scheme. They follow the code
  `z1 = y1+y2+y3, z2 = y1+y2+y4, z3 = y1+y3+y4`, with the Parseval check
  applied to each sum.
* The handling of patterns that name no FFT (`check_only`) and of several
  failing P checks (`uncorrectable`).
* The pipeline, the valid signalling, the reset and the fault-injection
  ports.
* Feeding both schemes from the same frames in the top level, to compare
  them on identical traffic. Each scheme module is a complete protected
  system on its own.
* The form of the Vedic multiplier (column sums with ripple carries) and
  squaring the absolute value.

The design was reported on a small FPGA (about 4,700 slices) at an
unstated FFT size and width. This RTL makes no attempt to match that
resource report. Its port count alone (several thousand bits with the
fault-injection masks) is far beyond that device's pins. Wrap it with
serialising I/O, or remove the fault ports, before mapping it to such a part.

Not included: the older scheme this one improves on, which uses three
redundant FFTs (one per Hamming parity bit) and no Parseval checks. The
location table above comes from it.
