# Bipartite-table sine DDFS

This is a direct digital frequency synthesizer (DDFS) that makes a 16-bit sine with
a spurious-free dynamic range (SFDR) above 100 dB. It uses only 27,648 bits of
table memory, about 600 times less than a plain 2^20 x 16-bit sine table.
Two ideas keep the tables small:

* **Quarter-wave symmetry.** Only the first quarter of the sine is stored. The
  other three quarters come from mirroring the phase and negating the result.
* **Bipartite table method (BTM).** A quarter wave with 2^18 phase points is
  not stored point by point. It is split into a coarse table of 1,024 sine
  values and a small table of 2,048 short linear corrections. The output sample
  is the sum of one word from each table.

The tuning range is that of a 32-bit phase accumulator. The output frequency is
`f_out = FTW * f_clk / 2^32`, so the step size is 23.28 mHz at a 100 MHz clock.
One sample is produced per clock.

```
 ftw[31:0] ─► phase_accum ─► count_out[19:0]
                               │19        │18         │17:0
                               │          ▼           ▼
                               │       quarter_fold (invert if bit 18)
                               │            │ addr[17:0]
                               │     ┌──────┴───────────────┐
                               │  addr[17:8]      {addr[17:15], addr[7:0]}
                               │     ▼                      ▼
                               │  tiv_rom (1024 x 15)    to_rom (2048 x 6, signed)
                               │     └──────────┬───────────┘
                      2-cycle delay             ▼
                               └────────► btm_output: sum, invert + sign bit ─► douty[15:0]
```

## Phase word

The accumulator is 32 bits wide. Only its top 20 bits are used (`count_out =
acc[31:12]`):

| bits of `count_out` | use |
|---|---|
| 19 | second half of the period: negate the output |
| 18 | second or fourth quarter: mirror the phase word |
| 17:8 | `a = 10` bits: TIV address, together with 17:15 |
| 17:15 | `b = 3` bits: slope-segment number, the upper part of the TO address |
| 7:0 | `c = 8` bits: position inside one TIV interval, the lower part of the TO address |

The 12 dropped accumulator bits still set the frequency exactly. They only
limit the phase resolution of the samples. This truncation causes the phase
jitter that, together with the table error, sets the spur level.

## Quarter-wave folding

Every table entry is the sine at the centre of its phase step, at `(p + 1/2)`
steps, not at `p`. Because of that half-step offset, mirroring is a plain
bitwise inversion. `~p = 2^18 - 1 - p` lands exactly on the mirrored point
`pi/2 - (p + 1/2) * d`, with no off-by-one correction. The negative half is
handled the same way: the 15-bit magnitude is inverted and a sign bit of 1 is
placed above it. The result, read as a 16-bit two's complement number, is
`-(magnitude + 1)`. Near the peak the BTM sum can exceed the amplitude by up
to 2 LSB, so `douty` runs from -32768 to +32767. It is symmetric about
-1/2 LSB. Inverting bit 15 gives offset binary, the usual DAC input format.

## The two tables (bipartite approximation)

This part needs the most care. Let `d = (pi/2)/2^18` be one phase step and
`D = 256 d` one TIV interval. Amplitude `AMP = 32765`.

**Table of initial values (TIV), 1024 x 15 bits.** This is the sine at the
centre of each interval:

    TIV[i] = round(AMP * sin((i + 1/2) * D))

Inside an interval the sine is taken as a straight line through that centre
value. The 256 positions `j` of an interval lie at `(j + 1/2 - 128) * d` from
the centre.

**Table of offsets (TO), 2048 x 6 bits signed.** A separate slope for each of
the 1,024 intervals would need a table as large as the one saved. Instead, the
quarter wave is cut into 8 segments of 128 intervals, and every interval in a
segment uses the segment's mean slope:

    M_s = AMP * (sin((s+1) * 128 D) - sin(s * 128 D)) / (128 D)
    TO[s * 256 + j] = round(M_s * (j + 1/2 - 128) * d)

The TO therefore depends only on the segment `s` (3 bits) and the position `j`
(8 bits), not on the full TIV address. That is the saving of the method. The
offsets lie within -25..+25 and fit a signed 6-bit word.

**Sum.** `f_app = TIV[addr[17:8]] + TO[{addr[17:15], addr[7:0]}]`. The error
against the ideal sine is at most 3.18 LSB. It is largest at segment edges,
where the local slope differs most from the segment mean.

**Why 32765 and not 32767.** With the full 15-bit amplitude, the last interval
plus its largest offset reaches 32769 and overflows the 15-bit adder.
32765 is the largest amplitude for which `TIV + TO` stays within
`0 .. 32767` over the whole quarter wave. `btm_output` asserts this.

Both tables are computed at elaboration by constant functions that use `$sin`.
No data file is needed, and a synthesis tool infers a ROM from them.

## Pipeline and timing

| edge | register |
|---|---|
| 1 | phase accumulator (`phase_accum`) |
| 2 | table address registers (`tiv_rom`, `to_rom`) |
| 3 | table output registers |
| 4 | `douty` (`btm_output`) |

An FTW applied before clock edge 1 first shows up on `douty` after edge 4.
The half-period sign bit, bit 19, passes through a 2-stage delay in
`ddfs_top`, so that it meets the table words read for the same phase. All
registers use one clock. `rst_n` is synchronous and active low. It clears the
phase, the sign delay and `douty`; the table registers are not reset.

## Parameters

Everything is sized from `rtl/ddfs_pkg.sv`: `ACC_W = 32`, `PHASE_W = 20`,
`Q_W = 18`, `A_W = 10`, `B_W = 3`, `C_W = 8`, `TIV_W = 15`, `TO_W = 6`,
`OUT_W = 16`, `ROM_LAT = 2`, `AMP = 32765`. The modules take these as parameter
defaults.

If you change `a`, `b` or `c`, keep `a + c = Q_W` and `b <= a`. Then check that
the TO range still fits `TO_W` and that `TIV + TO` cannot overflow; lower `AMP`
if it can. `ROM_LAT` is wired as a 2-stage shift register in `ddfs_top`. It
must match the latency of `tiv_rom` and `to_rom`, and must be at least 2.

## Where this design departs from its source

The source is a VHDL design for an FPGA with two block RAMs. This
SystemVerilog version follows its structure, its table split
(a, b, c = 10, 3, 8), its widths and its table-generation method. It differs
in these points:

* The TIV word is 15 bits with a separate sign bit, as in the source's block
  diagram. Its prose gives the table as 16 x 2^10. A 6-bit signed offset only
  fits a 15-bit amplitude, so 15 bits were used.
* The source scales the tables by `2^R - 1`. Here the amplitude is 32765, to
  avoid the overflow described above.
* The source averages the rounded slopes of the individual intervals. Here
  each segment uses the exact mean slope. The two differ by a fraction of an
  LSB.
* The latency of the table reads is not given in the source. Two cycles were
  chosen, for a block RAM with an output register. The whole pipeline is 4
  clocks, where the source reports 4.5.
* A synchronous reset was added. The sign-bit encoding of the negative half,
  `{1, ~magnitude}`, is this design's choice.
* The DAC that follows the synthesizer is not part of this RTL. `douty` is
  the interface to it.

## Verification

All testbenches are self-checking and end with a `TB_RESULT` line.

| testbench | what it shows |
|---|---|
| `tb_phase_accum` | accumulator against a 64-bit model: the tuning words of the frequency table, random words, wrap-around |
| `tb_quarter_fold` | `addr = 2^18-1-phase` when mirroring, identity otherwise |
| `tb_tiv_rom`, `tb_to_rom` | every word against separately generated reference tables (`tb/*_ref.hex`); rounding, monotonicity, offset symmetry |
| `tb_btm_output` | sum, sign encoding, reset, edge cases at 0 and 32767 |
| `tb_ddfs_top` | whole design at default sizes, bit-exact every cycle against the reference tables and within 3.5 LSB of an ideal sine; 1 kHz to 30 MHz tones at 100 and 400 MHz clocks; period measured from zero crossings against `2^32/FTW`; 4-cycle latency |
| `tb_ddfs_sfdr` | FFT of one full 2^20-sample period (FTW = 2^12): SFDR 101.96 dB |
| `tb_ddfs_1hz` | the 1 Hz tone (FTW = 43) over its full period of 99,882,960 cycles (about a minute of simulation) |

The lowest tone, FTW = 1 (23.28 mHz, 4.3 x 10^9 cycles per period), is not
simulated through a period. Only the accumulator step is checked. Clock rates
(100 and 400 MHz) are a matter of the target technology's timing and are not
checked here.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`. The
testbenches read `tb/*.hex` by paths relative to that directory.

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/ddfs_pkg.sv tb/tb_ddfs_top.sv --top-module tb_ddfs_top -o sim
./obj_dir/sim
```

Replace `tb_ddfs_top` with any other testbench name. The reference tables
`tb/tiv_ref.hex` and `tb/to_ref.hex` hold the TIV and TO formulas above,
evaluated independently of the RTL. TO words are stored as 6-bit two's
complement.
