# LLR soft-decision demapper for DVB-S2 (QPSK to 32APSK)

A DVB-S2 receiver hands its LDPC decoder a soft value per coded bit, the log
likelihood ratio (LLR): its sign says whether the bit is more likely a 1 or a
0, and its size says how sure that is. Computing the MAX-log LLR directly
takes, for 32APSK, 32 squared distances and 5 max/subtract trees per symbol
(69 multipliers). This design does none of that in hardware. The LLRs of every
bit position are computed offline on a coarse grid of the I/Q plane and stored
in a lookup table (LUT). For each received symbol the hardware reads the four
grid points around it, bilinearly interpolates each bit's LLR between them,
and rounds the result to 6 bits. Which algorithm filled the table does not
matter to the hardware. Only the table changes between modulations.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. By default it
takes 8-bit I and Q, gives out 6-bit LLRs, handles up to 5 bits per symbol
and uses a 32 x 32 grid. It processes one symbol per lane per clock, with two
lanes side by side.

## The signal path

```
             lut_wr / lut_wr_addr / lut_wr_data  (broadcast)
                          |
symbol_data[p] ---> llr_core (lane p) ---> llr_data[p]      p = 0 .. P_PAR-1
din_valid, eob_in  ------+------------> dout_valid, eob_out
din_rdy  <------------- dout_rdy
bps (modulation) --------'
```

Inside each `llr_core`:

| stage | what is registered | module |
|---|---|---|
| 1 | grid indices of the cell (I1, I2, Q1, Q2) and the remainders rI, rQ | `llr_core` |
| 2 | the four corner words, one read from each of four LUT copies | `llr_lut_ram` x 4 |
| 3 | products along I: corner x weight | `llr_bilinear_interp` x 5 |
| 4 | sums along I: R1 (lower row), R2 (upper row) | " |
| 5 | products along Q: R x weight | " |
| 6 | sum along Q: P, the LLR times 2^(2F) | " |
| 7 | divide by 2^(2F) with rounding | `llr_round_sat` |
| 8 | saturate to 6 bits, output register | " |

The valid and end-of-block flags travel in an 8-stage shift register,
`llr_flag_pipe`, alongside the data. So does the modulation select.

## Symbol format, grid and table addressing

`symbol_data` is `{Q, I}`: Q is in the upper 8 bits, I in the lower 8, both
two's complement (-128..127). The outer 16/32APSK ring sits at a magnitude
of about 90.

The LUT width `LUT_W` (default 5) is the number of top bits of I and of Q
that pick a grid point. The remaining `F = 8 - LUT_W` bits (default 3) say
where the symbol lies inside its cell. Grid points are therefore 2^F = 8
apart, and the grid has 2^LUT_W x 2^LUT_W = 1,024 points.

- **Grid index and value.** Index `g` (the top bits, read as unsigned)
  stands for the value `signed(g) * 2^F`. Index 0 is the value 0, index 15 is
  +120, index 16 is -128 and index 31 is -8.
- **Address.** A table word's address is `{Q index, I index}`, so the table
  is stored in two's complement order, not from -128 upwards.
- **Upper corner.** The upper corner of a cell is index + 1. Going from index
  31 (-8) to index 0 (0) is correct wrap-around. One cell needs special
  handling: the one at the most positive index (2^(LUT_W-1) - 1, value +120).
  Its "next" point would wrap to -128, so its upper corner is the lower corner
  itself. For symbols between +120 and +127 the interpolation along that axis
  then returns the stored value.
- **Table word.** A word is `MAX_BPS x 6` = 30 bits. Field k,
  `[6k+5 : 6k]`, is the signed LLR of symbol bit k at that grid point.
  Fields at k >= BPS of the current modulation are unused.
- **Four copies.** All four corners are needed in the same cycle, so each
  core holds four identical copies of the table: 4 x 1,024 x 30 bits. One
  write on the load port writes the same word at the same address into all
  copies (and into all lanes of the slice).

### What goes in the table

The table generator is offline software and is not part of the RTL. The
testbench package `tb/llr_tb_pkg.sv` holds a model of it. Each entry is the
MAX-log LLR at the grid point's (I, Q):

    LLR_k(r) = ( max over s with bit k = 1 of -|r - s|^2
               - max over s with bit k = 0 of -|r - s|^2 ) / (2 sigma^2)

`s` runs over the constellation and `sigma^2` is the noise variance for that
modulation. For each bit position, the values are scaled so that the largest
magnitude on the grid is 31, then clipped to [-32, 31] and rounded. A positive
LLR means bit 1. Because the 1/(2 sigma^2) factor is folded into the table,
the hardware has no variance input. Changing modulation means reloading the
table and changing `bps`.

## Interpolation arithmetic

Write `x_ll, x_lh, x_hl, x_hh` for the four corner LLRs, with the first letter
for the Q row (low/high) and the second for the I column. With remainders
`rI, rQ` in 0..2^F-1, the three linear interpolations are computed without
any division:

    R1 = x_lh * rI + x_ll * (2^F - rI)        lower row, along I
    R2 = x_hh * rI + x_hl * (2^F - rI)        upper row, along I
    P  = R2  * rQ + R1  * (2^F - rQ)          along Q

P is the interpolated LLR times 2^(2F) = 64. The weights are signed
(F+2)-bit numbers in 0..2^F. Widths at the default sizes:

| signal | width (signed) | range |
|---|---|---|
| corner LLR | 6 | -32..31 |
| weight | 5 | 0..8 |
| R1, R2 | DOUT_W+F+2 = 11 | -256..248 |
| P | DOUT_W+2F+4 = 16 | -2048..1984 |

The two weights of each interpolation add up to 2^F. So P/64 always lies
within the range of the four corners and cannot overflow 6 bits. The
saturation in the rounding stage is only a safeguard. It also covers
out-of-range table contents, since the hardware does not check them.

## Rounding

Dropping the low 2F bits of P floors the result: 22.9 would become 22. The
rounding stage instead rounds to nearest, with ties away from zero. It adds
2^(2F-1) to a non-negative P, or 2^(2F-1) - 1 to a negative one, then shifts
right arithmetically. The output equals `round(P / 2^(2F))` in the
floating-point sense. It is then clamped to [-32, 31].

## Flow control and latency

There is one global enable: the downstream ready `dout_rdy`.

- When `dout_rdy` is high, every register in the core advances, whether or
  not the current input is valid.
- When `dout_rdy` is low, everything holds, outputs included.
- `din_rdy` is `dout_rdy` passed straight through. An input is taken on a
  rising edge with `din_valid && din_rdy`. An output is delivered on an edge
  with `dout_valid && dout_rdy`.
- The valid bit of each input follows it through the flag pipeline.
  `dout_valid` is that pipeline's last stage, so the bubbles of an input
  stream that is not always valid come out as `dout_valid` low.
- `eob_in`, the end of a FECFRAME, is carried the same way to `eob_out`. The
  demapper does not use it.

Latency is exactly 8 advancing cycles (cycles with `dout_rdy` high), at one
symbol per lane per clock. Reset (synchronous, active high) clears the flag
pipelines, the modulation pipeline and the rounding registers. The data
registers and the table are not reset.

Two handshake rules are written as assertions in `llr_core`: the output holds
while stalled, and `din_rdy == dout_rdy`. `llr_slice` asserts that all lanes
stay in lock step.

`bps` is sampled with each symbol and carried along with it. LLR fields at
k >= bps come out as zero. The modulation should only change between frames,
after the pipeline has drained and the new table has been loaded. The table
is not double-buffered.

## Parallel lanes: `llr_slice`

`llr_slice` is the top level. It holds `P_PAR` cores, each with its own four
table copies. The lanes share `bps`, `din_valid`, `eob_in` and `dout_rdy`, so
one valid/EOB pair describes the whole beat. `symbol_data` and `llr_data`
are packed arrays indexed by lane. Two lanes meet a 150 MHz clock on the
original FPGA target; four lanes reach about 142 MHz there, limited by the
table reads. The default is `P_PAR = 2`.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `P_PAR` (slice only) | 2 | cores side by side |
| `DIN_W` | 8 | bits of I and of Q |
| `DOUT_W` | 6 | bits of one LLR (and of one table field) |
| `MAX_BPS` | 5 | table fields per word, largest modulation |
| `LUT_W` | 5 | grid bits per axis; 1..DIN_W, tested at 1, 3, 5, 8 |

`bps` is `$clog2(MAX_BPS+2)` bits wide (3 by default). At the defaults,
synthesis of `llr_slice` gives 245,760 LUT bits in 8 memories and about
1,300 flip-flops. Each lane uses 30 multipliers of 6 x 5 and 11 x 5 bits.

## Files

- `rtl/llr_pkg.sv`: default sizes, latency, modulation encoding.
- `rtl/llr_slice.sv`: top level, `P_PAR` lanes.
- `rtl/llr_core.sv`: one demapper lane (coordinate split, four LUT copies,
  interpolation, rounding, flags).
- `rtl/llr_lut_ram.sv`: one table copy, a write port and a registered read
  port. A read of the address being written returns the old word.
- `rtl/llr_bilinear_interp.sv`: 4-stage interpolation of one bit.
- `rtl/llr_round_sat.sv`: 2-stage rounding and saturation.
- `rtl/llr_flag_pipe.sv`: valid and EOB pipelines.
- `tb/llr_tb_pkg.sv`: table-generator model and floating-point reference.
- `tb/llr_core_harness.sv`: drive-and-check harness for one core.
- `tb/tb_*.sv`: one self-checking testbench per module.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5, from the project root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/llr_pkg.sv tb/llr_tb_pkg.sv tb/tb_llr_slice.sv --top-module tb_llr_slice
./obj_dir/Vtb_llr_slice
```

Replace `tb_llr_slice` with any other `tb_*` name. `-y rtl -y tb` lets
Verilator find the modules by file name.

- **`tb_llr_slice`** is the end-to-end test, at the default parameters. It
  builds the MAX-log tables for QPSK, 8PSK, 16APSK and 32APSK. It loads each
  one and streams a full normal FECFRAME (64,800 coded bits) through both
  lanes, then switches back to QPSK for a short frame (16,200 bits). Flow
  control cycles through three patterns: always valid and ready, valid
  toggling, and ready toggling. It checks every LLR against the
  floating-point reference interpolation of the same table, and checks the
  8-cycle latency and EOB on every beat. For noiseless constellation points
  it checks that the sign of each LLR gives back the bit that was sent. It
  requires that stalls, bubbles, EOBs, modulation switches, clamped edge
  cells, rounding up and masked fields all happen. It runs in well under a
  second.
- **`tb_llr_slice_p4`** is the same test with `P_PAR = 4`.
- **`tb_llr_core`** runs the same kind of test on single cores at LUT widths
  1, 3, 5 and 8.
- **Unit testbenches**: each unit testbench checks its module against a model
  written independently of the RTL, with random stalls.

## Own choices and limits

The following are design decisions, where the original design leaves the
point open:

- the table load port writes all four copies at once;
- read-during-write returns the old word;
- `bps` only masks unused fields;
- rounding is half away from zero, then saturation;
- the lanes share their control;
- two lanes by default.

The testbench constellations follow DVB-S2 ring ratios and power levels:

- QPSK: radius 49*sqrt(2);
- 8PSK: radius 86;
- 16APSK: ring ratio 2.70, outer radius 90;
- 32APSK: ring ratios 2.64 and 4.64, outer radius 90.

The 16APSK and 32APSK bit labels in the testbench are a plain ring-by-ring
numbering, not the standard's Gray labels. This changes only the table
contents, not the hardware. For real use, generate the tables with the
standard's bit mapping.

Outside this design:

- the automatic gain control ahead of the demapper;
- the LDPC decoder after it;
- the software that generates the tables.

Bit error rates depend on these, so they are not measured here.
