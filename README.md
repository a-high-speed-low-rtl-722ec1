# Four-parallel 128/64-point radix-2⁴ MDF FFT/IFFT processor

An OFDM baseband with several antennas needs one FFT per spatial stream, and
each FFT has to keep up with the full sample rate. This processor computes a
64-point or a 128-point FFT or IFFT (the sizes IEEE 802.11n uses for 20 and
40 MHz channels) on **four samples per clock**. That is 560 Msample/s at
140 MHz. Three ideas keep it small:

* **Radix-2⁴ decomposition.** The transform is decimation in frequency, but
  the twiddle factors are regrouped four stages at a time. Within a group,
  only multiplications by −j (free) and by powers of W16 are needed. W16
  powers use only the constants cos(π/8), sin(π/8) and cos(π/4), so they are
  built from shifts and adds (canonic signed digit, CSD). One general complex
  multiplier per lane remains, between the group and the last stages.
* **Multipath delay feedback (MDF).** Each of the four lanes is its own
  single-path delay-feedback pipeline. Each butterfly stores half a block in a
  small memory and writes its differences back into that memory. This uses
  much less storage than delay-commutator designs.
* **Sharing between the sizes.** The butterfly units after the first stage
  serve both sizes. A 64-point frame uses half of each unit's memory.

The output is X[k]/N with 10-bit real and imaginary parts, in
decimation-in-frequency order, and every sample is tagged with its bin number.

## Data order and where each index bit is transformed

This section matters most for reading the RTL. Samples enter in natural
order, four per clock. At cycle t of a frame, lane l carries x[4t + l]. An
N-point frame therefore lasts N/4 cycles (16 or 32). The input index splits
into time bits and lane bits:

```
64-point : n = 4t + l,   t = t3 t2 t1 t0          (n1 n2 n3 n4 = t3..t0, n5 = l)
128-point: n = 4t + l,   t = t4 t3 t2 t1 t0       (n1..n4 = t4..t1, n5 = 4*t0 + l)
```

Decimation in frequency transforms the index bits from the most significant
down:

* The time bits are handled inside each lane by a delay-feedback unit of
  depth D = 2^bit. Two samples that differ only in that bit are D cycles
  apart on the same lane.
* A delay-feedback unit's output stays in the same time slot. The time bit it
  processed now holds the matching frequency bit.
* The two lane bits are transformed last, across the lanes.

Each stage's control comes from the time index of the sample it is
processing. That index travels with the data in a small sideband (`ctrl_t`:
valid, size, FFT/IFFT, index). No stage keeps a counter of its own. The
twiddles follow from the index map of the decomposition:

| after stage | twiddle | made by |
|---|---|---|
| 1 (n1) | (−j)^(n2·k1) | −j on outputs where k1 = n2 = 1 (inside BF_64/BF_128) |
| 2 (n2) | W16^((2n3+n4)(k1+2k2)), exponents 0,1,2,3,4,6,9 | `csd_cmult` |
| 3 (n3) | (−j)^(n4·k3) | BF2 form of `bf_unit` |
| 4 (n4) | W_N^(n5·(k1+2k2+4k3+8k4)) | `twiddle_rom` + `booth_cmult` in `booth_stage` |
| 5 (128 only, t0) | W8^(l·c) | `csd_w8` |
| lanes | 4-point DFT | `lane_dft4` |

Lane m of output cycle t then holds bin

```
64-point : k = rev4(t)        + 16*m
128-point: k = rev4(t[4:1]) + 16*t[0] + 32*m
```

where `rev4` reverses four bits. The processor outputs this as `out_bin`. A
consumer that needs natural order must add its own reorder buffer.

## Pipeline

```
in ─► swap Re/Im if IFFT ─► BF_64 (8 words/lane) ──┐
                         └► BF_128 (16 words/lane) ─┴► MUX ─► BF1 D=8/4 ─► CSD W16 ─► BF2 D=4/2
   ─► BF1 D=2/1 ─► ROM + Booth ×4 ─► BF1 D=1/bypass ─► CSD W8 (128) ─► 4-point DFT ─► swap ─► out
                                                        (D = 128-point depth / 64-point depth)
```

| module | role |
|---|---|
| `fft_pkg` | types (`cplx_t`, `ctrl_t`), halving butterfly arithmetic, CSD constant products, W16 multiplier |
| `bf_unit` | one lane's delay-feedback butterfly (BF1; BF2 with −j), depth DMAX or DMAX/2 |
| `bf_first` | four `bf_unit`s at fixed depth: BF_64 (8) and BF_128 (16) |
| `csd_cmult` | W16 constant multiplier, four lanes |
| `twiddle_rom` | cos/−sin of 2πe/128 from an eighth-period table of 17 entries |
| `booth_mult` | fixed-width 10×10 radix-4 Booth multiplier with error compensation |
| `booth_cmult` | four `booth_mult`s, one subtractor and one adder |
| `booth_stage` | per-lane exponent, ROM and Booth complex multiplier |
| `csd_w8` | W8 constants of the extra 128-point step |
| `lane_dft4` | four-point DFT across the lanes |
| `fft_r24mdf` | top: input counter, size MUXes, pipeline, output tags |

### Delay-feedback butterfly (`bf_unit`)

The unit works on blocks of 2D samples:

1. **First half of a block.** Each input is written into a D-word memory.
   The memory's oldest word goes to the output: this is a stored difference
   from the previous block.
2. **Second half of a block.** The stored x[n] and the arriving x[n+D] are
   combined. (x[n]+x[n+D])/2 goes to the output, and (x[n]−x[n+D])/2 is
   written back in place of x[n].

The output is the same block D cycles later: sums first, then differences.
The memory is a RAM read and rewritten in place at a pointer that cycles
through D words. Each word also holds the sample's sideband. Because of
this, gaps between frames need no special handling: the differences of the
last frame drain out during the gap.

## Arithmetic

* Words are 10-bit two's complement for Re and Im. Twiddles are Q1.9
  (value/512).
* Every radix-2 butterfly halves its result, rounding half up and saturating.
  With 6 or 7 stages the output is X[k]/N. The IFFT output is exactly
  (1/N)·Σ X[k]·W^−nk.
* CSD constants: cos(π/8) = 473 = 2⁹−2⁵−2³+1, sin(π/8) = 195 = 2⁸−2⁶+2²−1,
  cos(π/4) = 362 = 2⁹−2⁷−2⁴−2²−2. The products are summed at full precision
  and rounded once.
* The Booth multiplier keeps only the partial-product columns of weight 2⁹
  and up. Column 8 (the major group) is summed exactly. Columns 0–7 (the
  minor group) are replaced by an estimate: half a unit of column 8 for each
  non-zero partial product that reaches below column 8. Against the exactly
  rounded product, each real product is within 1 LSB, with a mean bias of
  about +0.1 LSB. The kept columns, with the compensation bits, are reduced
  by a Dadda network of full and half adders (column heights 6, 4, 3, 2).
  The adder placement is computed when the design is elaborated. The last
  two rows go to a carry-lookahead adder.
* The ROM holds round(512·cos) and round(512·sin) for angles up to π/4,
  with 1.0 stored as 511. A zero exponent bypasses the multiplier.
* Measured end to end, the error is at most 3 LSB per component against a
  double-precision DFT/N. On the test's signal (random plus a tone) the SQNR
  is 25.6 dB. The 1/N output scaling limits this figure.

## Interface and timing

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset (clears the sideband only) |
| `in_valid` | in | a frame is N/4 **consecutive** valid cycles (an assertion checks this) |
| `sel_point` | in | 0 = 64-point, 1 = 128-point; sampled on a frame's first cycle |
| `mode` | in | 0 = FFT, 1 = IFFT; sampled on a frame's first cycle |
| `in_d[4]` | in | lane l = x[4t+l] (`cplx_t`: `{re, im}`, 10 bits each) |
| `out_valid`, `out_idx` | out | valid output and its cycle within the frame |
| `out_sel_point`, `out_mode` | out | size and direction of the output frame |
| `out_bin[4]`, `out_d[4]` | out | bin number and value X[k]/N per lane |

* Latency is 25 cycles for 64-point frames and 41 cycles for 128-point
  frames, counted from input cycle t to output cycle t.
* Frames of the same size may follow each other with no gap. Output frames
  then follow each other with no gap too.
* When `sel_point` changes, leave at least 32 idle cycles, so the shared
  memories drain at the old depth.
* There is no back-pressure.

## Where this design departs from the source architecture

The architecture follows a published four-parallel radix-2⁴ MDF design. These
points are this design's own choices or differences:

* **Input order.** The input order (natural order, four per clock) is chosen
  here. It places x[n] and x[n+N/2] on the same lane. So BF_64 and BF_128 are
  per-lane delay-feedback stages, where the source draws them as
  cross-lane memory blocks.
* **Last stage.** The source's last stage (BF1 units with 16-word banks, then
  an output MUX) is replaced by a four-point DFT across the lanes. This is
  what the chosen order needs. The 16-word memory is the BF_128 memory here.
* **Shared CSD multiplier.** One W16 CSD multiplier per lane serves both
  sizes. The source has separate 64-point and 128-point ones.
* **IFFT.** The IFFT is made by swapping Re and Im around the forward
  transform.
* **Own formulas.** The scaling, rounding, Booth error-compensation formula,
  ROM contents, handshake, reset and latency are all this design's own.
* **No reordering.** The output is not reordered.
* **Not reproduced.** FPGA figures are not reproduced here: slices, gate
  count, 140 MHz.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares the
module against values computed independently in the testbench, mostly in
double precision:

* `tb_bf_unit`: sums and differences, the −j, and latency D+1 at both depths,
  with back-to-back frames and gaps.
* `tb_bf_first`: per lane, the first stage of a 128-point frame and its
  17-cycle latency.
* `tb_csd_cmult`, `tb_csd_w8`, `tb_booth_stage`: products against exact
  twiddles, for every time index in both sizes.
* `tb_twiddle_rom`: all 128 entries.
* `tb_booth_cmult`: random and corner-case products.
* `tb_lane_dft4`: the four-point DFT.
* `tb_fft_r24mdf`: the whole processor at its default parameters. It sends
  8 frames:
  * 64-point and 128-point, FFT and IFFT;
  * back-to-back frames, idle gaps, and two size switches.

  It checks every output bin against a DFT/N (tolerance 4 LSB), the bin
  numbering, the size and mode tags, the latency, and gap-free output. It
  fails if any of these mechanisms never occurred.

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a
watchdog.

## Simulating

With Verilator 5, from the directory above `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/fft_pkg.sv tb/tb_fft_r24mdf.sv --top-module tb_fft_r24mdf
./obj_dir/Vtb_fft_r24mdf
```

Replace `tb_fft_r24mdf` with any other testbench name to run that unit test.

## Changing it

* **Word length.** `W` in `fft_pkg` sets the word length. The saturation
  limits in `sat` and the Booth digit count assume 10 bits.
* **Twiddle precision.** Wider twiddles need new CSD expressions in
  `fft_pkg` and new ROM constants: round(512·cos(2πi/128)) and
  round(512·sin(2πi/128)), i = 0..16, scaled to the new fraction.
* **Larger sizes.** A size beyond 128 needs another delay-feedback stage in
  front, a wider time index (`IDXW`), and more ROM resolution.
