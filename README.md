# Two-level 2-D 9/7 DWT with bit-parallel and digit-serial flipped lifting cores

This is synthesizable SystemVerilog for a JPEG 2000-style image wavelet
transform. It runs the irreversible 9/7 discrete wavelet transform (DWT) over an
N x N image, for two decomposition levels by default, and then quantizes the
coefficients with a uniform dead-zone quantizer.

The design rests on two ideas:

* **The flipped lifting structure.** The 1-D transform uses the 9/7 lifting
  factorisation in "flipped" form. Each lifting step divides its data path by
  the step coefficient, so the constants multiply the incoming samples and no
  two multipliers sit in series. This shortens the critical path. The
  computational cost is unchanged.
* **Bit widths set by analysis, not by habit.** Every internal node carries
  only the integer bits that a worst-case range analysis allows. Addends share
  their integer width. The fractional widths are the fewest that keep the
  error of a 1-D pass below 2 units in the last place (ulp) of the output.

One 1-D core serves every row and column pass. A dual-port buffer with two
frames holds the image between passes, and a controller sequences the passes.

The same 1-D transform also exists in a digit-serial form. There every
value travels as a stream of radix-2 signed digits, most significant digit
first, one digit per clock. Signed-digit addition has no carry chain, so each
operator is small and the clock can be fast, at the price of many clocks per
sample. Both cores are built into the 2-D system, and an input chosen at
the start of each transform decides which one does the work.

## Block overview

| file | block |
|---|---|
| `rtl/dwt_pkg.sv` | constants C0..C5, fixed-point rounding of constants, buffer/filter control types, controller states |
| `rtl/lifting_dwt_1d.sv` | bit-parallel flipped 9/7 lifting core: one sample pair in, one low/high coefficient pair out |
| `rtl/frame_buffer.sv` | two-frame dual-port buffer (port 0 read, port 1 read/write) |
| `rtl/dwt_controller.sv` | load, row/column passes for every level, read-out |
| `rtl/deadzone_quantizer.sv` | dead-zone quantizer whose step halves per level |
| `rtl/dwt2d_top.sv` | top level: the above plus the digit-serial core, the even/odd split and the write-back multiplexer |
| `rtl/ds_dwt_1d.sv` | digit-serial flipped 9/7 lifting core in nine stages |
| `rtl/ds_serializer.sv` | word to digit stream: parallel-to-serial plus two's complement to signed digit |
| `rtl/ds_deserializer.sv` | digit stream to word: signed digit to two's complement plus serial-to-parallel |
| `rtl/ds_sd_adder.sv` | carry-free signed-digit adder, most significant digit first |
| `rtl/ds_sd_mult.sv` | online multiplier of a digit stream by a constant |
| `rtl/ds_digit_delay.sv` | digit delay line: one-word delay, alignment and pipeline registers |

```
            addr0/ctrl0        dout0 (even) ──► s_in ┐
 controller ───────────► frame ──────────────────────┤ lifting_dwt_1d ─► s_out ┐
    │       addr1/ctrl1  buffer dout1 (odd)  ──► d_in ┘        ▲       ─► d_out ┤
    │  ─────────────────►  ▲  │                                │ en            │
    │                      │  └──► dead-zone quantizer ─► coef, q (read-out)   │
    │  filter control ─────┼──────────────────────────────────┘                │
    └──────────────────────┴── din1 ◄── write mux ◄── {pixel, s_out, d_out} ◄──┘
```

## The 1-D core (`lifting_dwt_1d`)

### Data flow

The input pair at step t is s = x[2t] (even) and d = x[2t+1] (odd). Below, a
primed name such as s' is the value one pair earlier (a z^-1 register):

```
lifting step 1   D2 = s + s'          D0 = C0*d'           D3 = D0 + D2
                 D1 = C1*s'           D4 = (D3 + D3') >>> 4   D5 = D1 + D4
lifting step 2   D6 = C2*D3'          D7 = (D5 + D5') >>> 1   D9 = D6 + D7
                 D8 = C3*D5'          D10 = (D9 + D9') >>> 1  D11 = D8 + D10
scaling          low  = C5*D11        high = C4*D9
```

| constant | value | meaning (alpha, beta, gamma, delta: 9/7 lifting steps; zeta = 1.149604398) |
|---|---|---|
| C0 | -0.6304636 | 1/alpha |
| C1 | 0.7437502472 | 1/(16 alpha beta) |
| C2 | -0.6680671710 | 1/(32 beta gamma) |
| C3 | 0.6384438531 | 1/(4 gamma delta) |
| C4 | 2.065244244 | 32 alpha beta gamma / zeta |
| C5 | 2.421021152 | 64 alpha beta gamma delta zeta |

The factors 16, 32 and 4 offset the `>>> 4` and `>>> 1` shifts. They keep every
intermediate node at about the magnitude of the input. In standard lifting
terms, D3 is d1/alpha, D5 is s1/(16 alpha beta), D9 is d2/(32 alpha beta gamma)
and D11 is s2/(64 alpha beta gamma delta). The outputs are zeta*s2 (low) and
d2/zeta (high).

### Latency and line ends

The output registered after pair t is the coefficient pair of index t-2. It
depends on input pairs t-4 .. t, that is on samples x[2t-8] .. x[2t]. A line of
L samples therefore needs pairs t = -2 .. L/2+1. The controller supplies the
samples outside the line by whole-sample symmetric extension:

* x[-i] = x[i]
* x[L-1+i] = x[L-1-i]

The first four outputs of each line are discarded. The core itself has no
notion of a line.

### Number format

Words are signed fixed point with DF fractional bits, and DW-DF integer bits
including the sign. Internally each node has FI fractional bits. Each node's
integer width is the input's plus its worst-case growth, computed as the L1 norm
of the linear map from the input samples to that node:

| node | worst-case gain | extra integer bits |
|---|---|---|
| D0, D2 (shared) | 0.63, 2.00 | 1 |
| D3 | 2.63 | 2 |
| D1, D4 (shared) | 0.74, 0.33 | 0 |
| D5 | 1.07 | 1 |
| D6, D7 (shared) | 1.76, 1.07 | 1 |
| D8, D10 (shared), D9, D11 | 0.68, 0.79, 0.89, 0.81 | 0 |
| low / high outputs | 1.95 / 1.84 | 1 |

Products and shifts truncate toward minus infinity. With FI = DF + 6 = 10 and
constants held to CF = 18 fractional bits, the measured error against exact
arithmetic is at most 1.13 output ulp over full-scale random and adversarial
lines. The core's outputs have DW+1 bits.

## The digit-serial core (`ds_dwt_1d`)

### Digits and streams

A signed digit is -1, 0 or +1, coded as a 2-bit two's complement number
(`11`, `00`, `01`). A word is a stream of P digits, most significant first,
one per clock. All streams share one format: digit j of a word (j = 0..P-1)
has weight 2^(E-j). With E = DW - DF + 2 = 14 and FI = 10 fractional digits,
P = E + FI + 1 = 25. E leaves room for the largest node of the datapath: the sum
D3 + D3' reaches 5.3 times the input range.

A free-running digit counter `cnt` (0..P-1) marks word boundaries. Each
operator adds a fixed number of clocks: 3 for an adder, 4 for a multiplier.
So every node of the datapath is a stream that lags the counter by a fixed
*offset*. An operator is told its operand offset (`OFF`) and from that knows
which digit position is arriving.

### Operators

* **Serializer** (`ds_serializer`). A word is loaded at the word boundary and
  shifted out. Converting two's complement to signed digits needs no
  arithmetic: the sign bit has negative weight, so it becomes digit -1 when
  set; every other bit becomes 0 or +1.
* **Adder** (`ds_sd_adder`). The digit sum p = x + y of a position (-2..2)
  is split into a transfer t and an interim digit w, with p = 2t + w. The
  split looks at the sign of the next lower position's sum, which keeps
  w + (transfer from below) inside {-1, 0, 1}. So a result digit is final
  once two more operand digits have arrived: online delay 2, plus an output
  register. Lookahead is cut at the word boundary. The top position's
  transfer is folded into the top digit, which is exact while the sum stays
  below the top weight. The range analysis guarantees that, and an assertion
  checks it.
* **Constant multiplier** (`ds_sd_mult`). It keeps a residual
  v = 2w + K * x_j * 2^-3. The result digit is +1 if v >= 1/2, -1 if
  v <= -1/2, and 0 otherwise; it is then subtracted from the residual. With
  |K| < 4 the residual stays within +-1/2. The online delay is 3. The first
  3 digit slots of a word drain the previous word's residual through a
  second register while the new residual is loaded, so words follow each
  other without a gap. The only error is the final residual, at most half a
  last-digit unit.
* **Division by 2^k** costs nothing. The stream is relabelled k positions
  earlier, so its offset drops by k. The k digits that would run into the
  next word's slots are cleared.
* **Deserializer** (`ds_deserializer`). It accumulates acc = 2*acc + digit,
  which turns the redundant digits back into a two's complement number. At
  the last digit it rounds down to DF fractional bits and presents a DW+1-bit
  word.
* **Delay line** (`ds_digit_delay`). With P clocks it is the word delay
  z^-w, which gives the previous word (x') in the current word's slot. With a
  few clocks it lines up the binary points of two addends.

### Stages and offsets

Offsets are in clocks behind the digit counter:

| stage | nodes | offset |
|---|---|---|
| 0 | D2 = s + s', D1 = C1*s', D0 = C0*d' | 3, 4, 4 |
| 1 | D3 = D0 + D2 (D2 delayed 1) | 7 |
| 2-3 | D3 + D3' at 10, D4 = that / 16 at 6; D5 = D1 + D4 (D1 delayed 2) | 6, 9 |
| 4-5 | D5 + D5' at 12, D7 = that / 2 at 11; D6 = C2*D3' at 11; D8 = C3*D5' at 13; D9 = D6 + D7 | 11, 11, 13, 14 |
| 6-7 | D9 + D9' at 17, D10 = that / 2 at 16; D11 = D8 + D10 (D8 delayed 3) | 16, 19 |
| 8 | low = C5*D11, high = C4*D9 (delayed 5) | 23 |

### Interface and timing

The core takes one (even, odd) pair every P = 25 clocks, in the clock where
`in_ready` is high; `pre_ready` is high in the clock before. If `in_valid` is low there, a zero pair is sent and no
output is flagged for it. The coefficient pair of index t-2 appears on
`s_out`/`d_out` with `out_valid` exactly P + 24 = 49 clocks after pair t was
taken. It depends on the same pairs, and lines need the same symmetric
extension, as in the bit-parallel core. The measured error against exact
arithmetic is at most 1.02 output ulp.

## The 2-D system (`dwt2d_top`, `dwt_controller`, `frame_buffer`)

### Passes and frames

For level l = 0..LEVELS-1, with len = N >> l, the controller runs two passes
over the top-left len x len region:

1. **Row pass**, reading frame 0 and writing frame 1.
2. **Column pass**, reading frame 1 and writing frame 0.

Low-pass results fill the first half of each line and high-pass results the
second half. For two levels, frame 0 ends up holding:

```
+-----+-----+----------+
| LL2 | HL2 |          |
+-----+-----+   HL1    |
| LH2 | HH2 |          |
+-----+-----+----------+
|           |          |
|    LH1    |   HH1    |
|           |          |
+-----------+----------+
```

Each pass only covers the LL region of its level. So frame 1 always holds stale
data outside that region, and the level-1 subbands stay untouched in frame 0.

### Four-phase pair schedule

Port 1 must read the odd sample and also write both results. So each pair takes
four clocks:

| phase | port 0 | port 1 | core |
|---|---|---|---|
| 0 | read x[2t] | read x[2t+1] | |
| 1 | | | `en`: take the pair, register outputs |
| 2 | | write low result (t >= 2) | |
| 3 | | write high result (t >= 2) | |

There is no idle clock between lines, passes or levels. A transform takes
sum over levels of 8 * len * (len/2 + 4) clocks. At N = 256 and two levels that
is 339,968 clocks.

### Running on the digit-serial core

With `ds_mode` set at start, the controller paces itself to the digit-serial
core, which takes one pair per word period of P = DW + 9 clocks:

1. The core raises `pre_ready` one clock before its taking slot. In that
   clock both ports read the pair.
2. In the taking clock the filter enable goes to the digit-serial core.
3. The destination addresses of the pair's two results go into a
   two-entry queue.
4. About two word periods later the core flags the results. The controller
   pops the addresses and writes the low and then the high result through
   port 1, in the next clocks where port 1 is not reading.
5. After the last pair, a drain state waits for the last writes before the
   read-out starts.

Because of the pipeline lag, the results of a line's last pairs land while
the next line, or the next pass, is already being read. Those reads never
touch the locations still in flight: a column pass reaches the last row of
a column only about len/2 word periods after the row pass finished, and the
next level reads only the LL quadrant. At N = 256 and two levels, a
transform takes 84,992 pairs x 25 = 2,124,800 clocks plus about 50 clocks of
drain, against 339,968 clocks on the bit-parallel core.

### Word width and overflow

Each pass grows the range by at most 1.95x. The buffer word therefore has
PIX_W + 2*LEVELS integer bits (12 for 8-bit pixels and two levels) and
DF = 4 fractional bits, giving DW = 16. Under this sizing the core's extra
output bit is always a copy of the sign. The top drops it, and an assertion
checks it on every write.

Accuracy accumulates over the passes, each adding at most about 1.5 ulp and
amplifying earlier error by at most 1.95. The testbenches accept about 4.4 ulp
for level-1 coefficients and 21 ulp (1.3 in pixel units) for level-2
coefficients.

## Dead-zone quantizer (`deadzone_quantizer`)

The quantizer computes q = sign(y) * floor(|y| / step_l):

* The zero bin spans (-step, +step), twice the width of the others.
* step_l = 2^(QS1 - l + 1), so each finer level gains one bit: level-1
  coefficients use QN bits, level-2 coefficients (including LL2) use QN+1 bits.
* Values beyond that range saturate.

It sits on the read-out path. Every coefficient of frame 0 is streamed out in
row-major order with its level, its raw value and its quantized value.

## Interface of `dwt2d_top`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `pix_valid`, `pix_data[PIX_W]` | in | while idle: one signed pixel per valid clock, row-major, N*N pixels |
| `start` | in | one-clock pulse while idle starts the transform |
| `ds_mode` | in | sampled with `start`: 1 runs this transform on the digit-serial core, 0 on the bit-parallel core |
| `busy` | out | high from start until the last coefficient has been read |
| `coef_valid`, `coef[DW]`, `coef_level`, `q[QW]`, `coef_last` | out | read-out stream, row-major; the first word comes 2 clocks after the transform ends |

Pixels are signed, so subtract 128 from unsigned 8-bit image data first.

Parameters, with defaults:

| parameter | default | notes |
|---|---|---|
| `N` | 256 | power of two; the last level needs lines of at least 8 samples |
| `LEVELS` | 2 | |
| `PIX_W` | 8 | |
| `DF` | 4 | |
| `DW` | PIX_W + 2*LEVELS + DF | |
| `FI` | DF + 6 | |
| `CF` | 18 | |
| `QN` | 8 | |
| `QS1` | 3 | |

## What follows the published architecture and what is this design's own

These parts follow the published architecture:

* the flipped 9/7 structure, its node names, shifts and constants C1..C5;
* the integer-width sharing rule for addends;
* the 2-ulp accuracy target;
* the partition into controller, two-frame dual-port buffer and 1-D DWT, with
  the multiplexers around the core;
* two decomposition levels on the LL band;
* the dead-zone quantizer with one extra bit per level;
* 8-bit pixels and a 256 x 256 image as the main size;
* for the digit-serial core: radix-2 signed digits, most significant digit
  first, carry-free adders and constant multipliers producing one digit per
  clock, nine stages, converters at both ends, word delays and alignment
  registers.

These are this design's own choices:

* C0 = 1/alpha, which is implied but not stated;
* all concrete bit widths, which come from this design's own range and
  precision analysis;
* truncation rather than rounding;
* the output register of the core;
* the four-phase schedule and the port roles;
* symmetric extension at line ends;
* the frame ping-pong order;
* the load and read-out interfaces;
* placing the quantizer on the read-out path;
* power-of-two quantizer steps and the level-1 step and width;
* for the digit-serial core: the digit coding, the common stream format, the
  adder and multiplier algorithms and latencies, and hence the offsets and
  which paths get alignment delays (D2, D1, D8 and the high-pass output);
* selecting the core per transform, and the digit-serial schedule with its
  write-back queue.

Not included:

* Changing the digit-serial precision at run time by stopping after fewer
  digits. The digit count is a parameter.
* The bit-width optimisation itself (the error-bound search). It is an
  offline design step, not hardware; its outcome is reflected in the
  parameter defaults.

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself
through a watchdog if it hangs. With plain Verilator, from the directory that
holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/dwt_pkg.sv tb/dwt_ref_pkg.sv tb/tb_dwt2d_top.sv --top-module tb_dwt2d_top
./obj_dir/Vtb_dwt2d_top
```

Replace the testbench name for the others:

| testbench | what it checks |
|---|---|
| `tb_lifting_dwt_1d` | core against a real-valued unflipped lifting reference: random, full-scale alternating and constant lines; latency; hold when disabled |
| `tb_frame_buffer` | both ports, read latency, hold, write-through behaviour |
| `tb_dwt_controller` | the complete bit-parallel port/filter schedule, clock by clock, for N = 16; then a digit-serial-mode run against a stand-in for that core (same read and write order, reads only with `ds_pre`, takes only in the slot, transform length, drain) |
| `tb_deadzone_quantizer` | dead zone, bins and saturation at each level |
| `tb_dwt2d_top` | end to end at N = 16 with three images. It checks every coefficient, the quantized values, level tags and the exact transform latency. Each image runs on both cores; the digit-serial transform time is checked against bounds. It counts row/column passes, level-2 passes, writes to each frame, extension at both line ends, dead-zone zeros, level-2 values wider than level 1, pairs taken by each core, digit-serial write-backs and drain clocks |
| `tb_dwt2d_full` | one full 256 x 256 two-level operation at the default parameters on each core (a few seconds) |
| `tb_ds_dwt_1d` | digit-serial core against the reference: random, full-scale and small lines; exact latency; no output for an idle slot; `pre_ready` timing |
| `tb_ds_sd_adder` | exact word sums and valid digits, at two offsets |
| `tb_ds_sd_mult` | products by C5 and C2 within one last-digit unit, at two offsets |
| `tb_ds_converters` | serializer, delay line (0, 3 and P clocks) and deserializer round trip, with done timing |

`tb/dwt_ref_pkg.sv` holds the real-valued 1-D and 2-D reference model.
