# Radix-2 FFT with statically swapped Booth multiplier inputs

A radix-4 Booth multiplier burns power in proportion to how many non-zero
partial products its *multiplier* operand (B) produces. Any run of equal bits
in B — the leading sign bits of a small number, for instance — yields groups
`000` or `111`, whose partial product is zero and does not toggle the adder
array. The multiplicand (A) has no such influence.

In an FMCW radar the FFT data are mostly small. Range FFTs focus the energy of
a few targets into a few bins, leaving noise and weak echoes everywhere else.
The intermediate values inside the FFT are small too, and so are all the
inputs of the later Doppler and angle FFTs. Twiddle factors, on the other
hand, are full-scale numbers on the unit circle. This butterfly therefore
wires the **data to B** and the **twiddle factor to A** in each of its four
multipliers. There is no dynamic-range detection and no operand-swapping
logic. Area and timing are those of the ordinary butterfly, because it is the
same circuit with its operands exchanged.

This RTL follows the butterfly described in *Low-Power Booth Multiplication
without Dynamic Range Detection in FFTs for FMCW Radar Signal Processing*
(O. Meteer, M. J. G. Bekooij). The butterfly is built around a sequential
FFT engine: one memory, one sequencer and the one butterfly. The publication
reports gate-level power savings of up to 28.69 % on a recorded radar frame.
Power is not modelled here. The testbenches do measure what drives the
saving, the share of zero partial products on each multiplier input:

| workload (testbench)                   | zero Booth groups, data on B | zero Booth groups, twiddles on B |
|----------------------------------------|------------------------------|----------------------------------|
| 1024-point weak tone (`tb_fft_r2_seq`)  | 75.2 %                       | 46.9 %                           |
| 1024-point strong tone                 | 70.5 %                       | 46.9 %                           |
| radar frame, 512 range FFTs (`tb_radar_frame`) | 71.2 %               | 46.9 %                           |
| radar frame, 512 Doppler FFTs          | 61.2 %                       | 49.0 %                           |

The right-hand column is what the multipliers would see with the operands the
other way round. Counting the bit toggles of all partial products (and negate
bits) from one butterfly to the next gives a rough proxy for multiplier
power. It uses the same 1024-point FFTs, with the conventional operand order
evaluated alongside (`tb_booth_activity`):

| signal | toggles, data on B | toggles, twiddle on B | reduction |
|--------|--------------------|-----------------------|-----------|
| weak tone   | 1 878 652 | 3 880 315 | 51.6 % |
| strong tone | 2 374 696 | 3 889 717 | 38.9 % |
| beat signal (near echo, two far echoes, noise) | 2 279 197 | 3 889 982 | 41.4 % |

This proxy leaves out glitches and the adder array, so it does not predict
power in a real library.

## Number format

All data are **Q2.30**: 32-bit two's complement with 30 fraction bits, so the
range is [-2, 2). A product of two Q2.30 numbers is Q4.60 in 64 bits.
Twiddles are Q2.30 too; 1.0 is `0x4000_0000`. The package `fft_pkg` holds
`DW = 32`, `FRAC = 30`, `LOG2N_MAX = 10` and the complex word type `cplx_t`
(real part in the upper 32 bits).

## The butterfly (`r2_butterfly`)

```
y0 = RND(x0 + x1*W)        y1 = RND(x0 - x1*W)
```

1. **Complex product** (`cmul_tw`). Four 32x32 Booth multipliers:
   `x_re*tw_re - x_im*tw_im` and `x_re*tw_im + x_im*tw_re`. In every one,
   `b` is a data component and `a` a twiddle component. The subtraction and
   the addition are full 64-bit.
2. **Final add/subtract, 32 bits.** The product is split at the Q2.30
   position. Bits 61..30 form a 32-bit word in Q2.30, which meets `x0` in a
   32-bit adder with carry out (33-bit result). The 30 bits below, which `x0`
   does not have, pass alongside unchanged. For `x0 - p` they are negated
   modulo 2^30, and a borrow of one is taken from the 32-bit subtracter
   whenever they are non-zero. The pair {33-bit sum, 30 low bits} is
   therefore exactly `x0*2^30 ± p`; nothing is lost before rounding.
3. **RND** (`rnd_unbiased`). Rounds the 63-bit value to Q2.30, **round half to
   even**, so the rounding error averages to zero over many butterflies. With
   `scale = 1` it divides by two as well: same rule, one bit further. The
   result keeps its low 32 bits.
4. **Output register.** The four results and `out_valid` are registered. The
   latency is one clock, and a new butterfly can start every clock.

**Overflow.** There is no saturation. A product of magnitude 2 or more, or a
sum outside [-2, 2), wraps around. With |x| ≤ 1 and |W| ≤ 1 neither happens.
The engine's scaling (below) keeps a full-scale tone inside that range when
samples are entered with headroom (see *Input scaling*).

## Booth multiplier (`booth_mult`, `booth_ppg`)

B is read in overlapping 3-bit groups `{b(2i+1), b(2i), b(2i-1)}`, with
`b(-1) = 0`. If B has an odd width, its top group is filled with the sign.
Each group drives a `booth_ppg`:

| group | 000 | 001 | 010 | 011 | 100 | 101 | 110 | 111 |
|-------|-----|-----|-----|-----|-----|-----|-----|-----|
| adds  | +0  | +A  | +A  | +2A | −2A | −A  | −A  | −0  |

A negative multiple leaves `booth_ppg` one's complemented, with a `neg` bit
that the multiplier adds at the group's least significant position. A zero
group (`000` or `111`) gives an all-zero row with `neg = 0`. It does not give
the textbook "−0" (an all-ones row plus one), and this matters. Small FFT
values change sign all the time, and with the all-ones −0 every sign change
flips every upper row. Measured on the same FFT runs, the all-ones form
leaves the data-on-B order with 1 to 4 % *more* partial-product toggles than
the conventional order. The zero row turns that into the savings below. The
partial products, sign-extended and shifted by 2i, are summed by a plain
adder chain. This models the arithmetic of the multiplier; the reduction
tree (for example a regular partial-product array) is left to synthesis.
Power and timing figures therefore depend on what synthesis builds, not
only on this RTL. `booth_ppg` also flags the zero groups (`zero`) for
observation.

## The FFT engine (`fft_r2_seq`, the top)

The engine computes an in-place radix-2 decimation-in-time FFT with the
single butterfly, one butterfly per clock. The size is chosen at run time
with `log2n` (1..10), so the 1024-point range FFT and the 512-point Doppler
FFT of a radar frame run on the same instance.

```
 ld_* ──► bit-reverse ──► fft_mem (1024 x 64, 2R/2W) ──► rd_*
                              │ rd0=x0, rd1=x1   ▲ y0, y1
 fft_ctrl ── addresses ──────►│                  │
     └──── twiddle index ──► twiddle_rom ──► r2_butterfly
```

* **`fft_mem`**: 1024 complex words with two synchronous read ports and two
  write ports.
* **`twiddle_rom`**: the 512 factors `W^k = round(2^30 cos(2πk/1024)) −
  i·round(2^30 sin(2πk/1024))`. A constant function computes them during
  elaboration, so no data file is needed. An N-point FFT uses every
  (1024/N)-th entry.
* **`fft_ctrl`**: for stage `s` and butterfly `j` it issues
  `pos = j mod 2^s`, `i0 = (j >> s)·2^(s+1) + pos`, `i1 = i0 + 2^s`, and
  twiddle index `pos·2^(9−s)`.

**Scaling.** Every odd stage (s = 1, 3, 5, …) halves its results. A
1024-point FFT is thus scaled by 2^-5 = 1/√N. That keeps a bin holding a
tone growing like √N, the same as the noise floor's growth. For odd
log2(N) the scale is 2^-floor(log2(N)/2); a 512-point FFT gets 1/16, not
1/√512.

**Pipeline and timing.** A butterfly goes through three steps:

* clock t: addresses and twiddle index issued;
* clock t+1: memory and ROM data at the butterfly inputs;
* clock t+2: results written back.

The next stage reads what the last one wrote, so two drain (stall) cycles
separate the stages. An N-point FFT takes **log2(N)·(N/2 + 2) + 1 clocks**
from the `start` clock to the `done` pulse: 5141 for 1024 points, 2323 for
512 points.

**Interface.**

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset (the memory is not reset) |
| `log2n[3:0]` | in | FFT size; hold it stable while loading and at `start` |
| `ld_we`, `ld_addr[9:0]`, `ld_re`, `ld_im` | in | write sample x[n] with `ld_addr = n` (natural order); ignored while busy |
| `start` | in | one-clock pulse: begin the FFT |
| `busy`, `done` | out | running; one-clock pulse after the last write |
| `rd_addr[9:0]` | in | bin k to read (natural order) |
| `rd_re`, `rd_im` | out | X[k], one clock after `rd_addr` (valid while not busy) |

Operating sequence: set `log2n`, write N samples, pulse `start`, wait for
`done`, then read the N bins.

**Input scaling.** The engine does not fix how ADC samples enter Q2.30. The
testbenches place a 12-bit sample `s` at `s·2^-15` (full scale 1/16). With
that placement, a full-scale tone ends up near 1.0 after 1/√N scaling.

## What comes from the publication, and what is this design's own

Taken from the publication:

* the butterfly structure: four Booth multipliers, a 64-bit subtraction and
  addition, 32-bit final adders and unbiased rounding;
* the operand assignment: twiddle on the multiplicand, data on the
  partial-product input;
* radix-4 Booth encoding;
* 32-bit Q2.30 data;
* a 1024-point FFT computed with one butterfly used sequentially;
* division by two every two stages.

This design's own choices:

* round half to even as the form of "unbiased" rounding;
* producing the −0 of a `111` group as an all-zero row;
* splitting the product between the 32-bit adder and the low bits that
  bypass it;
* wrap-around on overflow;
* the output register;
* the memory and its ports, the bit-reversed loading, the address schedule,
  the drain cycles and the run-time size;
* which stage of each pair does the halving;
* resets.

The publication's multiplier uses a specific regular partial-product array.
It is not reproduced here (see *Booth multiplier*). The radar front end (chirp
generator, mixer, one ADC per antenna) is outside this RTL. So is the frame
memory between the range and Doppler passes, and the angle FFT across
antennas.

## Verification

Each testbench is self-checking and ends with a `TB_RESULT checks=… failures=…`
line. The bit-exact reference (`tb/fft_ref_pkg.sv`) redoes the arithmetic
with 64-bit integer multiplication and remainder-based rounding. It shares no
code with the Booth structure.

| testbench | covers |
|-----------|--------|
| `tb_booth_ppg` | all 8 groups × 2000 multiplicands incl. extremes |
| `tb_booth_mult` | 32x32 corner values and 20 000 random pairs against `*`; exhaustive 7x9 (odd width, sign-extended top group) |
| `tb_cmul_tw` | complex products against 64-bit integers; that every multiplier's B input carries data and A the twiddle |
| `tb_rnd_unbiased` | ties both ways and both signs, values next to ties, random values, zero mean error over 1000 ties |
| `tb_r2_butterfly` | 20 000 back-to-back butterflies against the reference, gaps in `in_valid`, both `scale` values, one-clock latency |
| `tb_twiddle_rom` | all 512 entries, unit magnitude, exact 1 and −i, a 16-point instance, read latency |
| `tb_fft_mem` | random traffic on all four ports, read-before-write on a shared clock edge |
| `tb_fft_ctrl` | the full schedule for N = 2 … 1024, each address once per stage, write-back alignment, 2 stall cycles per stage, cycle count |
| `tb_fft_r2_seq` | default top: 1024-point weak and strong tones, 512-, 8- and 2-point runs, every bin bit-exact, within 2.5 LSB of a double-precision DFT (limit 64 LSB), cycle counts, halving/plain butterflies, stalls, size changes and ignored load writes all occur |
| `tb_booth_activity` | default top, three 1024-point signals: the built operand order toggles fewer partial-product bits than the conventional one, with identical products |
| `tb_radar_frame` | default top: synthetic 512-chirp frame, 512 range FFTs of 1024 points (upper half dropped), 512 Doppler FFTs of 512 points, all bit-exact; four reflections from 2 to 1500 LSB found at their range-Doppler cells |

## Simulating

All files are IEEE 1800-2017 SystemVerilog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fft_pkg.sv tb/fft_ref_pkg.sv tb/tb_fft_r2_seq.sv --top-module tb_fft_r2_seq
./obj_dir/Vtb_fft_r2_seq
```

Replace the testbench name to run another. The full radar frame
(`tb_radar_frame`) simulates in a few seconds. To lint the design:
`verilator --lint-only -Wall -Irtl -y rtl rtl/fft_pkg.sv rtl/fft_r2_seq.sv`.
The remaining lint warnings are intentional: the unused `zero` pin, the
unused top two product bits, and `rst_n` in the assertions'
`disable iff`.

Parameters: `LOG2N_MAX` on the top (memory and twiddle table size);
`DW`/`FRAC` on the arithmetic blocks; `AW`/`BW` on `booth_mult`. The top
takes `DW` and `FRAC` from `fft_pkg`.
