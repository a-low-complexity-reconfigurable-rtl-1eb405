# Reconfigurable non-uniform filter bank channelizer

A wideband receiver often has to pull out several channels of different
widths, belonging to different radio standards, from one digitised input.
This RTL implements a filter bank whose nine subbands can be made
narrower or wider at run time by changing one small integer, and whose
adjacent subbands can be added into wider channels. It needs no new
coefficients for any of this. The work is split between three kinds of
filter:

1. **A modal filter whose bandwidth is set by coefficient decimation.**
   A 276-tap low-pass filter `h` is *coefficient decimated* (CD-II): only
   every D-th coefficient is kept, and the kept ones are packed together.
   That stretches the response by D. The result is then *interpolated* by
   M = 8: every unit delay becomes 8 delays. This produces a comb of
   passbands at 0, π/4, π/2, 3π/4 and π. Their width is proportional to
   D/M. Subtracting the filter output from a delayed copy of the input
   gives the *complementary* response, with passbands in the gaps at π/8,
   3π/8, 5π/8 and 7π/8. Together the two give nine subbands, band-0 (DC) to
   band-8 (Fs/2). As D goes from 3 to 7, the even bands widen and the odd
   bands narrow. At D = 6 all nine are equally wide.
2. **Fixed masking filters that use coefficient decimation I.** Four fixed
   filters isolate the nine bands from the two combs. CD-I means keeping
   every D-th coefficient in place and zeroing the rest. It copies a
   filter's response to multiples of 2π/D, so one low-pass filter also
   gives a filter at π (D = 2) and at π/2 (D = 4). Four filters therefore
   serve nine bands, and none of them changes when D changes.
3. **An adder block** adds neighbouring bands to form channels up to four
   or five subbands wide.

Everything runs at the input sample rate, one sample per clock at most.

## Files

| file | contents |
|---|---|
| `rtl/fb_pkg.sv` | sizes, number formats, masking-filter coefficients, Nd(D) delay, quantiser |
| `rtl/modal_coef_lut.sv` | writable table of the 138 unique modal coefficients |
| `rtl/modal_filter.sv` | stage 1: shared multipliers, two CD-II chains, complementary subtraction |
| `rtl/cd2_chain.sv` | one transposed-form CD-II/interpolated tap chain (used twice) |
| `rtl/comp_delay.sv` | input delay line with the D-dependent tap |
| `rtl/masking_fir.sv` | fixed linear-phase FIR giving the full filter and its CD-I parts |
| `rtl/mask_bank1.sv` | H1, H2: bands 0, 2, 4, 6, 8 |
| `rtl/mask_bank2.sv` | H3, H4: bands 1, 3, 5, 7 |
| `rtl/align_delay.sv` | group-delay alignment shift register |
| `rtl/adder_block.sv` | stage 3: sums of adjacent bands |
| `rtl/nufb_top.sv` | the complete filter bank |
| `tb/tb_*.sv` | one self-checking testbench per module, `tb_nufb_top` end to end |

## Band plan

Frequencies below are relative to Fs/2 (1.0 = Nyquist). The default modal
filter has Fpass = 0.083 and Fstop = 0.115. After CD-II by D and
interpolation by 8, the even bands have passband half-width
Fpass·D/8 around k/4. The odd bands fill what is left.

| D | band-0 passband | band-1 passband (complementary) |
|---|---|---|
| 3 | 0 – 0.031 | 0.043 – 0.207 |
| 6 | 0 – 0.062 | uniform: every band π/8 wide |
| 7 | 0 – 0.073 | 0.100 – 0.150 |

The modal and complementary paths each have their own D. With equal D the
bands tile the spectrum and neighbours can be added. With different D (for
example D = 3 for the modal path and D = 7 for the complementary one), every
band is narrow and there are gaps between them. Only the nine single bands
are then meaningful, and `comb_valid` is low.

Five values of D give 9 × 5 = 45 distinct band shapes. Loading a second
modal filter into the coefficient table (for example Fpass = 0.067,
Fstop = 0.1) gives 45 more, with the same masking filters.

## Stage 1: modal and complementary filters

**Shared multipliers.** In transposed form, every tap multiplies the
*current* input sample, so each product `h[i]·x[n]` is needed once, no
matter which chain position uses it. `modal_filter` forms the products
once. The coefficients are symmetric (`h[i] = h[275-i]`), so products are
indexed by `min(i, 275-i)`. Only coefficients that some D in 3..7 actually
reaches are multiplied: 125 of the 138.

**Chains.** `cd2_chain` has K = 92 adder positions (the CD-II length for
D = 3), with an 8-sample delay between neighbours. Position k adds
`h[k·D]·x[n]`, selected from the products by a one-hot AND-OR multiplexer
driven by the 5-bit select (bit i ⇒ D = 3 + i). A product used by several D
(for example `h[6]` for D = 3 and D = 6) feeds several positions. Positions
past `floor(275/D)` add zero. The chain output is

    y[n] = D · Σ_k h[k·D] · x[n − 8k]

The factor D is this design's addition. Keeping one coefficient in D lowers
the passband gain to about 1/D. The complement only works against a
unity-gain filter, so D (3..7) is applied as a shift-and-add at the chain
output.

**Complementary path.** A second chain with its own select (`sel_comp`) is
subtracted from the input delayed by

    Nd(D) = (floor(275/D) + (floor(275/D) mod 2)) · 8/2 = 368, 272, 224, 184, 160  (D = 3..7)

`comp_delay` is a 368-deep shift register with the tap picked by
`sel_comp`. For D = 3, 5, 6 and 7 the CD-II filter has an even number of
taps. Its nominal group delay 4·floor(275/D) is then 4 samples less than
Nd. However, an even-length filter is inverted on every odd image. At
bands 2 and 6 (ω = π/4 and 3π/4), that inversion is exactly the phase of 4
more samples of delay. With the rounding up by M/2, the subtraction cancels
the modal passbands in the complementary output at bands 2 and 6, as well
as at bands 0, 4 and 8.

**Settling.** A change of D is not a reset. The chains still hold partial
sums of the old setting for up to 91·8 = 728 samples, and the delay line
for up to 368 samples.

## Stage 2: masking banks

`masking_fir` splits a linear-phase filter's taps into three transposed
chains by index: `p0` (n mod 4 = 0), `p2` (n mod 4 = 2) and `p1` (n odd).
Then

    H = p0 + p2 + p1        CD-I(2) = p0 + p2        CD-I(4) = p0

The banks form the bands at full precision, using the fact that
`2·CD-I(2) − H` is the filter moved to π and `4·CD-I(4) − 2·CD-I(2)` is
twice the filter moved to π/2:

| band | source | formula |
|---|---|---|
| 0 | modal, H1 (65 taps, low-pass) | `p0 + p2 + p1` |
| 8 | modal, H1 | `p0 + p2 − p1` |
| 4 | modal, H1 | `2(p0 − p2)` |
| 2 | modal, H2 (21 taps, low-pass over bands 0 and 2) | `H2 − band-0` |
| 6 | modal, H2 | `(H2 moved to π) − band-8` |
| 3 | complementary, H3 (65 taps, band-pass) | `H3` |
| 5 | complementary, H3 | `H3 moved to π` |
| 1 | complementary, H4 (21 taps, low-pass) | `H4` |
| 7 | complementary, H4 | `H4 moved to π` |

The 21-tap results are delayed by 22 samples (`align_delay`) so that every
band leaves stage 2 with the same 32-sample group delay. The band sums in
stage 3 depend on that alignment.

The coefficient values are this design's own: equiripple linear-phase
designs, quantised to round(h·2^15), listed half-length in `fb_pkg`.
Their band edges (relative to Fs/2) are the widest bands the modal filter
produces:

| filter | pass | stop | stop-band attenuation |
|---|---|---|---|
| H1 | 0 – 0.10 | 0.15 – 1 | 33 dB |
| H2 | 0 – 0.35 | 0.40 – 1 | 16 dB |
| H3 | 0.2811 – 0.4689 | 0 – 0.2189, 0.5311 – 1 | 39 dB |
| H4 | 0 – 0.2189 | 0.2811 – 1 | 18 dB |

The 21-tap lengths are kept as specified. At these transition widths they
cannot reach 40 dB, and H2 and H4 are the weakest part of the selectivity.
In simulation at D = 6, a tone at the centre of each band still comes out
of its own band 16.7 dB or more above every other band. The masking
filters are plain parameters: give `masking_fir` other `HALF` tables
(and `NT`) to use better ones.

## Stage 3: adder block and `Sel_band`

Stage 1 (registered) uses 2-input multiplexers on mirror pairs. Bit 0 of
`sel_band` swaps band-k with band-(8−k). Write bk' for the selected band.

    COMB_UP1 = b0'+b1'   COMB_UP2 = b8'+b7'   COMB_DOWN2 = b2'+b3'   COMB_DOWN3 = b6'+b5'

Stage 2 (registered) uses multiplexers and adders:

| bits | meaning |
|---|---|
| `[0]` | mirror (band-k ↔ band-(8−k)) |
| `[2:1]` | COMB_DOWN1 = `00` b2', `01` b2'+b3', `10` b2'+b3'+b4, `11` b3'+b4 |
| `[3]` | COMB includes a head part |
| `[4]` | head = COMB_UP1 (b0'+b1') instead of b1'; when `[2:1]` = `11`, head = COMB_DOWN3 (b6'+b5') instead of b5' |
| `[5]` | COMB1 = COMB_UP2 + b6' instead of COMB_UP2 + COMB_DOWN3 |

COMB = head + COMB_DOWN1. Examples:

| `sel_band` | COMB | COMB1 | COMB_UP1 | COMB_UP2 | COMB_DOWN1 | COMB_DOWN2 | COMB_DOWN3 |
|---|---|---|---|---|---|---|---|
| `011000` | 0+1+2 | 5+6+7+8 | 0+1 | 7+8 | 2 | 2+3 | 5+6 |
| `011100` | 0+1+2+3+4 | 5+6+7+8 | 0+1 | 7+8 | 2+3+4 | 2+3 | 5+6 |
| `001101` | 4+5+6+7 | 0+1+2+3 | 7+8 | 0+1 | 4+5+6 | 5+6 | 2+3 |
| `001010` | 1+2+3 | 5+6+7+8 | 0+1 | 7+8 | 2+3 | 2+3 | 5+6 |
| `011110` | 3+4+5+6 | 5+6+7+8 | 0+1 | 7+8 | 3+4 | 2+3 | 5+6 |

Every output is a run of adjacent bands, and every run of two to four
adjacent bands is one of the outputs for some `sel_band`. The runs across
the centre (3+4+5, 2+3+4+5, 3+4+5+6) use the `[2:1]` = `11` head. Sums are
19 bits wide, so they
never overflow. The bit assignment is this design's own.

## Interface and timing (`nufb_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset (clears all state and the coefficient table) |
| `coef_we`, `coef_addr`, `coef_wdata` | in | 1, 8, 16 | write `h[addr]`, addr 0..137, Q1.15 |
| `sel_modal`, `sel_comp` | in | 5 | one-hot D of the modal / complementary path (`00001` = 3 … `10000` = 7) |
| `sel_band` | in | 6 | adder configuration (above) |
| `in_valid`, `x` | in | 1, 16 | input sample, Q1.15 |
| `out_valid` | out | 1 | outputs below are valid |
| `band[0:8]` | out | 16 | the nine subbands, Q1.15 |
| `comb`, `comb1`, `comb_up1`, `comb_up2`, `comb_down1..3` | out | 19 | band sums |
| `comb_valid` | out | 1 | the sums' sample was filtered with equal D on both paths |

- One sample is taken in each clock where `in_valid` is high. It can be
  high every clock.
- `out_valid` follows `in_valid` by exactly 4 clocks: 1 for stage 1, 1 for
  the masking banks and 2 for the adder block.
- In signal terms, a band is the input delayed by about `Nd(D) + 32`
  samples. Near the centre of a modal band the delay is
  `4·floor(275/D) + 32`, with the inversion described under stage 1.
- `sel_modal` and `sel_comp` take effect for the next sample; `sel_band`
  acts 2 clocks after a sample enters.
- An assertion requires the D selects to be one-hot. All-zero gives silent
  outputs.
- Coefficient writes take effect from the next clock. Reload the table with
  the input idle or ignore the settling time afterwards.

**Number format.** Samples and coefficients are Q1.15. Products and sums
are kept exact in 40 bits. Each filter output is truncated (arithmetic
shift right by 15) and saturated to 16 bits.

## Size

Multipliers: 125 general multipliers of 16×16 bits in the modal stage,
shared by both chains. The masking filters have 88 constant multiplications
(33 + 11 + 33 + 11 unique coefficients), which synthesis turns into shifts
and adds. Storage is dominated by the two modal chains: 2 × 91 × 8 × 40 bits
≈ 58 k flip-flops. The masking chains and alignment delays add about 24 k flip-flops and the
complementary delay line 5.9 k.

## Verification

Every module has a self-checking testbench that compares it, sample by
sample and bit-exactly, with a reference written independently of the RTL
structure:

| testbench | checks |
|---|---|
| `tb_modal_coef_lut` | random writes (including out-of-range addresses) against a model; reset |
| `tb_comp_delay` | hand-evaluated Nd(D) delays for every D, with gaps in `in_valid` |
| `tb_modal_filter` | direct-form convolution with the CD-II filter, every D, unequal D, change of D without reset, 1-clock latency |
| `tb_masking_fir` | the three tap classes of H1 and H4 by direct convolution |
| `tb_mask_bank1/2` | each band's impulse response built by modulation (`(−1)^n h`, `2cos(πn/2) h`) |
| `tb_adder_block` | all 64 `sel_band` values from band-index lists; adjacency; every run of 2 to 4 bands reachable; 2-clock latency |
| `tb_nufb_top` | full size, default parameters: every D, unequal D, coefficient reload, all stages bit-exact, `comb_valid`, 4-clock latency, and a tone test per band at D = 6 |
| `tb_nufb_scenarios` | full size: band-0 passband and stopband edges for both modal filters and every D; the four multi-channel spectra of the published functionality tests, each channel scored by normalised MSE |

Every testbench ends with a line `TB_RESULT checks=N failures=M`. To run one with Verilator:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
              rtl/fb_pkg.sv tb/tb_nufb_top.sv --top-module tb_nufb_top -o sim
    ./obj_dir/sim

`-y rtl` lets Verilator find each module in `rtl/<name>.sv`. The package
must be named first. `-Wno-fatal` keeps the width-extension warnings of the
testbenches' 64-bit reference arithmetic from stopping the build.

`tb_nufb_top` runs the whole design at its default size in a few seconds.

**Channel edges.** `tb_nufb_scenarios` first loads each of the two modal
filters (Fpass/Fstop 0.083/0.115 and 0.067/0.1) and checks band-0 at every
D. A tone at the passband edge `D·Fpass/8` must pass within 1 dB.
A tone at the stopband edge `D·Fstop/8` must be at least 30 dB down. The
measured passband gain is −0.18 to +0.21 dB. The stopband edge is 52 to
59 dB down.

**Channel extraction tests.** It then rebuilds the published
functionality tests. Each test is a wideband input holding 5, 4, 4 or 3
channels with the published bandwidths. The source gives the bandwidths
but not the channel positions, so the positions below were chosen here.
Each channel is 8 tones spread over the inner 80% of its bandwidth. Tones
in a modal transition band are left out.

The test extracts every channel and compares it with the channel's own
tones, delayed as described under Interface and timing. The score is the
normalised error `Σ(y − y_ref)² / Σ y_ref²`. The test fails if any score
reaches 0.1. Scores measured:

| spectrum | D | channel (bandwidth → output) : NMSE |
|---|---|---|
| 1 | 3 | 0.069→band-3: 0.002, 0.033→band-8: 0.025, 0.15→band-1: 0.020, 0.03→band-0: 0.021, 0.062→band-2: 0.069 |
| 2 | 5 | 0.0797→band-2: 0.055, 0.02→band-0: 0.001, 0.04→band-8: 0.001, 0.12→COMB_DOWN3 (5+6): 0.086 |
| 3 | 4 | 0.09→COMB_UP1 (0+1): 0.015, 0.1→band-3: 0.0001, 0.05→band-6: 0.050, 0.02→band-8: 0.012 |
| 4 | 7 | 0.185→COMB (0+1+2): 0.030, 0.041→band-5: 0.0001, 0.134→COMB_UP2 (7+8): 0.009 |

The largest errors come from the 16 to 18 dB stop bands of the 21-tap
masking filters, which let part of a neighbouring channel through.

## Where this design departs from, or adds to, its source

- **Masking-filter coefficients** and **modal-filter coefficients** are not
  part of the source. The masking filters are designed here (see above).
  The modal filter is loaded at run time. The testbench uses a 276-tap
  Hamming-windowed sinc, `h[n] = fc·sinc(fc·(n−137.5))·(0.54 − 0.46 cos(2πn/275))`
  with fc = (Fpass+Fstop)/2, rather than an equiripple design.
- **Gain correction by D** after each CD-II chain (see stage 1).
- **Multiplier count:** 125 distinct modal coefficients are in use, whereas
  the source states that 91 remain after decimation. Folding the symmetric
  coefficients over all indices k·D gives 125, and that is what is built.
- **Sel_band:** the source gives a 6-bit select but its example codes are 7
  digits long and do not decode consistently. The encoding above is new.
  It reproduces the source's example combinations, including one five-band
  sum (0+1+2+3+4), although the source elsewhere limits sums to four bands.
- **Handshake, reset, number formats, latency** and the `comb_valid` flag
  are this design's choices.
- The hardware co-simulation platform used to measure the original design
  (an FPGA board and its tool flow) is not part of this RTL.
