# CPSD ECG processor

An on-sensor processor that watches an ECG stream for dangerous heart
rhythms (ventricular fibrillation and tachycardia, premature ventricular
beats) without sending the raw signal off the sensor. Once per second it
produces one number, the CPSD (Chaotic Phase Space Differential) value. The
CPSD says how far the shape of the last few seconds of ECG has moved away
from a reference recorded from the same person. A normal rhythm gives
values near 1. Fibrillation spreads the signal over its phase space and
pushes the value several times higher. A host processor on the same bus
compares CPSD with its own thresholds and decides what to do, for example
whether to wake the radio.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. The processor
is the module `cpsd_asp`. It takes 10-bit samples at 256 samples/s and
presents a Wishbone slave port with an interrupt.

## The measure in hardware terms

1. **Phase vectors.** Take a window of W filtered samples s[0..W-1] and a
   delay d. Each pair (s[k], s[k+d]), for k = 0 .. W-d-1, is a point in a
   2-D phase space.
2. **Quantization.** Each coordinate is mapped to one of L+1 levels:
   `q = floor(((s' + M) * L + M) / (2M))`. Here M is the largest magnitude
   in the *reference* window, and s' is s clipped to [-M, M]. Because of the
   clipping, q stays within 0..L.
3. **Phase matrix.** A 16 x 16 matrix counts how often each cell
   (q(s[k]), q(s[k+d])) is visited.
4. **Complexity value (CV).** This is the number of cells where the current
   matrix differs from the reference matrix.
5. **CPSD** = CV / CV_1. CV_1 is the CV measured when the reference was
   accepted, so each person normalises against their own normal rhythm.

Comments in the RTL cite these steps by the equation numbers of the
published description: Eq. 2 for the phase vectors, Eq. 3 for the
quantization, Eq. 4 for the matrix counts, Eqs. 5 and 6 for the difference
matrix and CV, Eq. 7 for the CPSD, and Eq. 8 for the training test below
(candidate accepted if its CV is below h).

Worked example, which the unit tests reproduce. It is Figure 2 of the
published description. Take the 20 samples
`9 16 28 33 25 17 10 19 26 35 27 16 9 18 24 32 25 18 8 23` with d = 5 and
L = 6. This gives M = 35 and the counts (4,4):3, (4,5):3, (5,4):2, (5,5):3,
(5,6):2, (6,5):2. Against the reference matrix of that example, six cells
differ, so CV = 6. With CV_1 = 2 the result is CPSD = 3.

## Data path

Four pipelines run one after the other, and samples keep streaming in
while they work:

| stage | modules | what happens |
|---|---|---|
| 1 | `raw_delay_regs`, `ecg_filter` (`biquad_mac` x 4), `filt_buffer` | Each sample is filtered by four second-order sections and written to a 2048-entry circular SRAM (8 s). |
| 2 | `pm_constructer` (`quantizer` x 2), `pm_sram` x 2 | The newest W samples are scanned. M is found when the window is to become a reference. The phase vectors are counted into the reference or the current matrix. |
| 3 | `diff_accumulator` | Both matrices are read cell by cell. The stage emits \|current - reference\| per cell and sums these differences. |
| 4 | `pm_diff_regs`, `cpsd_calculator` | Non-zero cells are counted (CV). In the on-line phase, CV * 256 / CV_1 is then computed by a restoring divider. |

`asp_controller` sequences stages 2-4. `asp_bus_if` holds the
host-programmable parameters and the results. Shared sizes, defaults and
types are in `cpsd_pkg`.

The memory adds up to 2048 x 10 bits of filtered data plus 2 x 256 x 10
bits of matrices: 25,600 bits in total. The matrix size was chosen so that
the total comes out at exactly that figure.

## Training and on-line phases (`asp_controller`)

This is the least obvious part of the design. The controller counts the
filtered samples written since the last build started. Every build uses the
*newest* W samples, which start at `wr_ptr - W`. The rest of the 8 s buffer
is slack, so incoming samples never overwrite a window that is still being
read.

Training runs after reset, after a host request, and every 30 CPSD outputs:

1. Wait for W new samples. Build the **candidate** matrix into the
   reference SRAM and measure its M.
2. Wait for the next W samples. Build the **check** matrix into the current
   SRAM, using the candidate's M. Then count the differing cells.
3. If CV < h, the candidate becomes the reference and this CV becomes CV_1
   (taken as 1 if it is 0). Otherwise the window just checked becomes the
   new candidate: it is rebuilt into the reference SRAM with its own M, and
   step 2 repeats.

With W = 4 s the first reference is ready after 8 s of signal at the
earliest.

On-line phase: every 256 new samples (one second), build the current
matrix of the newest W samples with the reference M. Then compare, divide
and raise `irq`. After 30 outputs, the window just used becomes a new
candidate and training resumes. No CPSD is produced until a new reference
is accepted. A retrain request from the host waits until the controller is
idle between builds.

## Arithmetic

- **Filter.** Each section is a direct-form-I biquad,
  `y = b0 x0 + b1 x1 + b2 x2 - a1 y1 - a2 y2`, computed by one MAC in five
  cycles. Coefficients are signed Q2.16. Inside the cascade, samples carry
  8 extra fraction bits (18-bit words). This is needed because with 10-bit
  section states the 1 Hz high-pass section has a rounding dead band of
  several hundred LSB, and a DC offset stays stuck at its output. Each
  section rounds to nearest and saturates. The output is rounded back to
  10 bits. Latency is 30 cycles per sample. With a1 = a2 = 0 a section is
  a 3-tap FIR filter, so the unit serves as an FIR or an IIR filter.
- **Quantizer.** The division by 2M has a quotient of at most L < 16, so
  it is a 4-step restoring division done combinationally.
- **Matrix counts** are 10 bits and saturate at 1023.
- **CPSD** is unsigned Q9.8, truncated: the register value divided by 256
  is the ratio.

## Host interface (`asp_bus_if`)

Wishbone classic, 32-bit data, byte addresses. Each access is acknowledged
one cycle after `cyc & stb`.

| addr | name | access | content (reset) |
|---|---|---|---|
| 0x00 | CTRL | W / RW | bit0 retrain (one-shot), bit1 irq enable (1) |
| 0x04 | STATUS | R | bit0 on-line, bit1 CPSD ready, [15:8] rejected candidates, [23:16] accepted references, [31:24] periodic refreshes |
| 0x08 | CPSD | R | CPSD x 256; reading clears ready and irq |
| 0x0C | CV | R | [8:0] last CV, [24:16] CV_1 |
| 0x10 | WIN_LEN | RW | W in samples (1024); keep W <= 1792 |
| 0x14 | DELAY_D | RW | d in samples (8) |
| 0x18 | THRESH_H | RW | training threshold h in cells (60) |
| 0x1C | SPS | RW | samples per CPSD output (256) |
| 0x20 | REF_PERIOD | RW | outputs between reference refreshes (30) |
| 0x24 | LEVELS | RW | L (15) |
| 0x28 | DIFF_SUM | R | sum of \|differences\| of the last comparison |
| 0x2C | FILT_LAST | R | latest filtered sample |
| 0x30 | M_REF | R | M of the reference window |
| 0x40+4(5s+t) | COEF | RW | section s, coefficient t = b0 b1 b2 a1 a2 (b0 = 1.0, the rest 0) |

With the reset coefficients the filter passes samples through unchanged.
The host programs the real ones. The tests use a 1 Hz high pass and a
100 Hz low pass (Butterworth, which together make a 1-100 Hz band pass)
and notches at 60 Hz and 120 Hz (Q = 5), all designed for 256 samples/s.

## Sizes and timing

| item | value | origin |
|---|---|---|
| sample width, rate | 10 bits, 256/s | published design |
| filtered-data buffer | 2048 samples (8 s) | published design |
| matrix | 16 x 16 cells, 10-bit counts | chosen to match the 25,600-bit SRAM total |
| W, d, h | 1024 (4 s), 8, 60 cells | this design's defaults (run-time registers) |
| reference refresh | every 30 outputs (30 s) | published design |
| filter | 4 biquads, Q2.16, 18-bit internal words | this design |
| matrix build | 256 + 4(W-d) + 1 cycles, plus W+1 when M is measured | RTL |
| comparison + division | about 280 cycles | RTL |

The on-line work is about 12,300 cycles per second of ECG. That is about
12% of a 100 kHz clock, the rate the published chip runs its processor at.
Samples must arrive at least 32 cycles apart.

## Where this departs from, or adds to, the published design

The block structure, the two phases, the five steps of the measure and the
training test, the 8 s buffer, the one-per-second output, the 30 s
refresh, the bus-programmed MAC filter and the interrupt all follow the
published processor. The
following were not specified there and are this design's choices:

- The matrix size and the count width.
- W, d, h and the CPSD format.
- The difference measure of the training test. It is the same CV, and the
  accepted value becomes CV_1.
- The rule that the rejected check window becomes the next candidate.
- Pausing CPSD output while the reference is refreshed.
- The filter structure and word lengths.
- The register map.

The published tables give the processor and host clocks as 100 kHz and
4 kHz in one place and swapped in another. The RTL has no built-in clock
rate. Only the sample count matters to it.

## Not included

- The 32-bit host processor, which runs the CPSD thresholds and the
  decision normal / AF / VF.
- The Wishbone interconnect.
- The wireless transceiver and the I2C port.
- The analog front end (amplifier and ADC).

The processor's bus port, interrupt and sample input are brought out as
top-level ports for them.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. Example, the
end-to-end test at default sizes (a few seconds to build and run):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/cpsd_pkg.sv tb/tb_cpsd_asp.sv --top-module tb_cpsd_asp
./obj_dir/Vtb_cpsd_asp
```

`tb_cpsd_asp` first programs the filter over the bus. It then feeds 70 s of
synthetic ECG: 4 s of noise, normal beats, fibrillation from 20 s to 30 s,
normal beats, a tachycardia of wide regular complexes from 36 s to 41 s,
normal beats again, and from 59 s to 70 s every third beat premature and
wide. It serves each interrupt the way a host would. A
reference model inside the testbench predicts every filtered sample and
every CV and CPSD value, and they must match bit for bit. The testbench also
checks the interval of exactly 256 samples between outputs. It also checks
that each abnormal stretch raises CPSD. The mean is about 1.1 for normal
rhythm, 7.0 in fibrillation, 2.1 in tachycardia and 2.5 with premature
beats. The reference
refresh that falls inside the tachycardia adopts that rhythm as the new
reference, and the forced retrain at 50 s restores a normal one. It counts each mechanism at least once: rejected candidate,
accepted reference, periodic refresh, host retrain, clipping of current
samples to [-M, M], and interrupt.

The unit tests cover the following:

- The worked example above (M, matrix counts, CV, CPSD).
- Filter accuracy against an integer model, and 60 Hz rejection.
- Cycle counts of builds, comparisons and divisions.
- Every register.
- The controller's build sequence, with the data path replaced by
  responders.

Detection accuracy on real ECG records has not been checked. The
thresholds are host software and are not part of this RTL.
