# 512-point modified radix-2^5 FFT, eight samples per clock

This is a streaming 512-point FFT/IFFT in SystemVerilog, aimed at high-rate
OFDM receivers such as 60 GHz WPAN and IEEE 802.11ad, whose symbols have 512
subcarriers. It takes eight complex samples per clock and returns eight
transform bins per clock. At 125 MHz that is one gigasample per second.

Two ideas keep it small:

* **Multipath delay feedback.** There are eight parallel lanes. Each one is a
  chain of radix-2 processing elements, and each element stores half its
  block in a FIFO and feeds its differences back through that FIFO. The last
  three radix-2 stages are butterflies that combine the lanes directly.
* **Radix-2^5 twiddle factorisation.** The index map rearranges the nine
  radix-2 stages so that nearly all twiddle factors are fixed constants:
  - `-j`, which is just a swap and a negation;
  - W8, W16 and W32, which are built from CSD shift-and-add multipliers with
    1, 3 and 7 distinct coefficients.

  Only one general twiddle multiplication per lane is left, W512, and it uses
  a Baugh-Wooley multiplier with a quarter-wave look-up table.

The original design was published as a 180 nm ASIC. This RTL rebuilds the
architecture from that description. Word widths, the handshake, the control
encoding and the output order were not specified, so they are choices made
here. They are listed under "Where this RTL makes its own choices".

## Data layout

A frame is 512 samples `x(0..511)`, delivered over 64 beats:

```
beat T, lane L  carries  x(8*T + L)          T = 0..63, L = 0..7
```

The transform is decimation-in-frequency, and its output stays in
*bit-reversed* order:

```
output beat t, lane l  carries  X(k),  k = bit-reverse9(8*t + l)
```

Equivalently, the 9-bit "position" of a word is `{t[5:0], l[2:0]}`. Every
radix-2 stage works on one bit of that position:

| stage | position bit | which samples pair up | hardware |
|------:|:------------:|----------------------|----------|
| 1 | 8 (t[5]) | 256 apart, same lane, 32 beats apart | PE with a 32-word FIFO |
| 2 | 7 (t[4]) | 128 apart | PE, 16 words |
| 3 | 6 (t[3]) | 64 apart  | PE, 8 words |
| 4 | 5 (t[2]) | 32 apart  | PE, 4 words |
| 5 | 4 (t[1]) | 16 apart  | PE, 2 words |
| 6 | 3 (t[0]) | 8 apart   | PE, 1 word |
| 7 | 2 (l[2]) | lanes l and l+4 | combinational butterfly |
| 8 | 1 (l[1]) | lanes l and l+2 | combinational butterfly |
| 9 | 0 (l[0]) | lanes l and l+1 | combinational butterfly |

Stages 1 to 5 of a lane form **module 1** (`fft_module1`). Stages 6 to 9 form
**module 2** (`fft_module2`), which is shared by all lanes.

## Where the twiddles go

Write the input index as `n = 256 n1 + 128 n2 + 64 n3 + 32 n4 + 16 n5 + n6`,
with `n6` in 0..15. Write the output index as
`k = k1 + 2 k2 + 4 k3 + 8 k4 + 16 k5 + 32 k6`, with `k6` in 0..15. Expanding
`W512^(n*k)` gives:

```
W512^(nk) = prod_s [ (-1)^(n_s k_s) * W_(2^s)^(n_s * K_(s-1)) ]  *  W512^(n6 * K5)  *  W16^(n6 * k6)
            s = 1..5                                                 K_j = k1 + 2k2 + ... + 2^(j-1) kj
```

Before stage `s`, the samples with `n_s = 1` must be multiplied by
`W_(2^s)^K_(s-1)`. The exponent `K_(s-1)` is made of bits already produced by
the earlier stages. At each stage's input, those are the top bits of that
stage's position, in bit-reversed order. The full set of rotations (`p` is
the beat position seen by the unit):

| where | multiplier | applied when | exponent |
|-------|-----------|--------------|----------|
| before stage 2 | `-j` (swap and negate) | `p[4]` | `p[5]` |
| before stage 3 | W8, CSD, 1 coefficient (cos pi/4) | `p[3]` | `{p[4], p[5]}` |
| before stage 4 | W16, CSD, 3 coefficients | `p[2]` | `{p[3], p[4], p[5]}` |
| before stage 5 | W32, CSD, 7 coefficients | `p[1]` | `{p[2] .. p[5]}` |
| after stage 5  | W512, look-up table and Baugh-Wooley multiplier | always | `(8*p[0] + lane) * bitrev5(p[5:1])` |
| before stage 7 | `-j` | lanes 4..7 | `p[0]` |
| before stage 8 | W8, CSD | lanes 2, 3, 6, 7 | `p[0] + 2*l[2]` |
| before stage 9 | W16, CSD | odd lanes | `p[0] + 2*l[2] + 4*l[1]` |

The rotators (`csd_rotator`) work for any `M` = 8, 16 or 32. They split
`W_M^e` into `(-j)^q * W_M^r`, with `r < M/4`. They use the identity
`sin(2*pi*r/M) = cos(2*pi*(M/4-r)/M)`, so the only coefficients needed are
`cos(2*pi*k/M)` for `k = 1..M/4-1`. Each coefficient is recoded into
canonical signed digits when the design is elaborated (`csd_const_mult`), so
the multiplier is just shifts and adders.

## The delay-feedback PE

`sdf_pe` holds a FIFO of `D` words, a butterfly and two multiplexers. Its
input arrives in blocks of `2D` samples:

* **First `D` beats (`bf = 0`).** The input goes into the FIFO. The FIFO's
  oldest word goes to the output. That word is the difference left by the
  previous block.
* **Last `D` beats (`bf = 1`).** The butterfly combines the FIFO output
  `x(n)` with the input `x(n+D)`. The sum `x(n) + x(n+D)` goes to the output,
  and the difference `x(n) - x(n+D)` goes back into the FIFO.

The output is registered. The word leaving the PE therefore belongs to the
position that entered `D + 1` enabled beats earlier, and the stream keeps its
order: sums first, then differences. The subtraction is a two's-complement
negation followed by an adder (`butterfly`).

## Control and timing

The whole pipeline advances only on beats with `in_valid` high, so taking
`in_valid` low simply stalls it. That means `fft_control` needs a single
modulo-64 beat counter. Stage `s` sees the stream delayed by a fixed offset:
0, 33, 50, 59, 64 and 67 beats for stages 1 to 6, and 69 beats for the
cross-lane network (`fft_pkg::stage_offset`). The control unit hands each
stage its current position. The stage's FIFO/butterfly phase and its twiddle
exponent come from that position.

* **Latency.** The output word of an input beat is in the output register
  after 70 enabled beats: 69 beats of pipeline plus the output register. It
  is flagged by `out_valid`.
* **Flushing.** Frames can follow each other with no gap. The last frame
  leaves only when 70 more beats have been clocked in, either from the next
  frame or from padding.
* **Frame boundaries.** There is no frame-start input. A new frame begins
  every 64 valid beats, counted from reset. If a burst is padded out and
  another burst follows, the padding must be a whole number of frames. The
  OFDM test pads with two frames.
* **Frame markers.** `out_pos` gives the output beat index `t`. `out_first`
  marks `t = 0`.
* **Reset.** `rst_n` is asynchronous and active low. It clears the counters
  and the pipeline registers. The FIFO arrays are not reset: a PE only ever
  reads words it wrote itself, so stale contents never reach a valid output.

**IFFT.** If `inverse` is high on the first beat of a frame, that frame is
inverse-transformed (`sum_k X(k) exp(+j*2*pi*n*k/512)`, with no 1/512 scaling).
The hardware exchanges the real and imaginary parts on the way in and on the
way out. The control unit carries the mode of each frame to the output. This
relies on the latency being between one and two frames long, which an
assertion checks.

## Numbers

| quantity | value |
|----------|-------|
| transform length | 512 |
| samples per clock | 8 |
| input word `DATA_W` | 12 bits per real or imaginary part, two's complement |
| internal and output word `INT_W` | 22 bits = `DATA_W + 9 + 1`, so no scaling or saturation |
| twiddle coefficients | rounded to 14 fractional bits, 16-bit signed words |
| rounding | round half up, once per rotated output part |
| FIFO storage per lane | 63 complex words (32+16+8+4+2+1) |
| general multipliers | 8 complex (one per lane), 4 Baugh-Wooley 22x16 each |
| twiddle table | 128 cos/sin pairs per lane (one quadrant) |

Accuracy: on full-scale random 12-bit input, the largest error against a
double-precision DFT is about 11 to 12 output LSBs, out of output values of
up to about 2^20.

## Files

| file | content |
|------|---------|
| `rtl/fft_pkg.sv` | sizes, elaboration-time cos/sin rounding, stage offsets |
| `rtl/fft512_r25.sv` | top: control unit, eight module-1 lanes, module 2, IFFT swap |
| `rtl/fft_control.sv` | beat counter, stage positions, output valid/position, FFT/IFFT mode |
| `rtl/fft_module1.sv` | one lane: PEs 1 to 5, `-j`/W8/W16/W32 rotations, W512 twiddle |
| `rtl/fft_module2.sv` | stage-6 PEs and the three cross-lane butterfly stages |
| `rtl/sdf_pe.sv`, `rtl/delay_fifo.sv`, `rtl/butterfly.sv` | delay-feedback processing element |
| `rtl/csd_rotator.sv`, `rtl/csd_const_mult.sv` | CSD constant complex multipliers |
| `rtl/twiddle_rom.sv`, `rtl/cmult_bw.sv`, `rtl/bw_mult.sv` | general twiddle path |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench checks itself against an independent reference and ends by
printing `TB_RESULT checks=N failures=M`. The top-level test runs the design
at its default size. It streams four frames: random data, tones, full-scale
constant and random data, mixing FFT and IFFT frames and adding random stall
beats. It compares all 2048 bins with a double-precision DFT, and checks the
latency, the frame markers and that every mechanism (FIFO fill, butterfly
phase, each twiddle kind, stall, back-to-back frames, mode switch) was
exercised.

```
verilator --binary --timing -y rtl +libext+.sv rtl/fft_pkg.sv \
    tb/tb_fft512_r25.sv --top-module tb_fft512_r25
./obj_dir/Vtb_fft512_r25
```

`tb_ofdm_roundtrip` is the OFDM use case. It loads QPSK points onto all 512
subcarriers and modulates three symbols with the IFFT. It then scales the
time-domain samples back to 12 bits and demodulates them with the FFT.
Every point must come back with the right signs and an amplitude within 10%
of the expected value.

To run another testbench, replace `tb_fft512_r25` with its name. The
simulator finds the modules in `rtl/` by file name. The full-size test takes
well under a second.

## Where this RTL makes its own choices

* **Stage order.** The original figure draws the first module's elements in
  the order BUT2, BUT1, multiplier, BUT1, BUT2, BUT1, multiplier. This RTL
  derives the order from the index map above: BUT1, then BUT2 (the `-j`
  element), W8, BUT1, W16, BUT1, W32, BUT1, W512.
* **Second module.** It is described only as "cascaded Butterfly-1 stages".
  Here it is one single-word PE per lane (stage 6) followed by three
  combinational cross-lane butterfly layers.
* **General twiddle multiplier.** The original describes it first as a
  complex Booth multiplier, then prefers a Baugh-Wooley multiplier for lower
  power. This RTL uses Baugh-Wooley.
* **Sharing between CSD multipliers.** The original mentions sharing common
  subexpressions between the CSD multipliers. Here every coefficient has its
  own shift-and-add network, and any sharing is left to synthesis.
* **Twiddle table size.** The original says its look-up table is half the
  size a Booth-based design needs. This one stores a single quadrant.
* **Undocumented details.** The following are choices made here: the lane
  mapping; the word widths and rounding; the `in_valid`-gated stall; the
  registered PE outputs; bit-reversed output with no reorder buffer; the
  per-frame IFFT selection.
* **Physical results.** The original's cell count, area and power figures
  describe its 180 nm layout. They are not reproduced here, and the clock
  rate this RTL reaches has not been measured. One gigasample per second
  needs 125 MHz.

## Changing it

* `DATA_W` on the top sets the input width, and `INT_W` follows from it.
* The transform length and lane count are fixed by the structure: the
  number of PEs and the twiddle exponent wiring are written for 512 points
  and 8 lanes.
* `fft_pkg::TW_FRAC` sets the coefficient precision for every twiddle unit.
