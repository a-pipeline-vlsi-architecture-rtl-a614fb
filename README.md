# Two-stage pipelined 1-D discrete wavelet transform

This RTL computes a J-level 1-D discrete wavelet transform (DWT) of an
N-sample frame with an L-tap orthogonal filter pair. It uses only two
filter datapaths, and both are busy almost all the time.

At each level j the lowpass output of level j-1 is filtered and
down-sampled by two. With `C(0) = x` as the input:

    C(j)_i = sum_k h_k * C(j-1)_{2i+k}          (lowpass,  "approximation")
    D(j)_i = sum_k g_k * C(j-1)_{2i+k}          (highpass, "detail")
    g_k    = (-1)^(k+1) * h_{L-1-k}

Indices past the end of a level wrap around (periodic border extension).
Level 1 produces N/2 + N/2 outputs, which is as many as all the higher
levels together. The design therefore gives level 1 a datapath of its own
(stage 1). A second, identical datapath (stage 2) computes levels 2..J.

Stage 2 cannot wait until level 1 is finished, or it would double the frame
time. It also cannot run freely, because each higher-level sample needs L
(and later 2 more) samples of the level below. The core of the design is
the controller that interleaves the levels in stage 2:

- Stage 2 starts as soon as enough level-1 samples exist that it can then
  run without ever stalling.
- It never stalls while stage 1 is still producing.
- It finishes n_c slots after stage 1, where n_c is the number of
  higher-level samples that depend on the last level-1 sample. This is the
  smallest possible tail.

## Default configuration

| parameter | default | meaning |
|---|---|---|
| `N` | 128 | samples per frame (a power of two, `N >= 2^J`) |
| `J` | 7 | decomposition levels |
| `L` | 6 | filter taps (even); default filter is Daubechies-6 |
| `SW`, `CW` | 8, 8 | sample and coefficient widths (two's complement) |
| `FRAC` | 7 | fractional bits of a coefficient (Q1.7) |
| `OW` | 19 | width of a full-precision output, `SW+CW+clog2(L)` |
| `NC` | 18 | n_c, computed by `dwt_pkg::calc_nc(L, J)` |

The default coefficients (`dwt_pkg::DB6_Q7`) are round(128·h) of the
Daubechies 6-tap lowpass filter: 43, 103, 59, -17, -11, 5. The highpass
coefficients are derived inside the datapath, so only the L lowpass values
are ever loaded.

## Block structure

```
                 +-------------+   window   +------+  C(1),D(1)
  in_data ------>| stage1_ctrl |----------->| PU1  |---------------------> out1_*
                 +-------------+            +------+     |
                                                         | C(1) (rounded)
                                                         v
                 +-------------+  level,idx +---------------+
                 | stage2_ctrl |----------->| stage2_buffer |<---+
                 +-------------+   <-avail--+---------------+    |
                        |                          | window      | C(j), j<J (rounded)
                        +-- issue --------------->+------+       |
                                                  | PU2  |-------+-------> out2_*
                                                  +------+  C(j),D(j), j = 2..J
```

| module | role |
|---|---|
| `dwt_top` | wiring and frame sequencing |
| `stage1_ctrl` | input shift register, window strobe, border replay |
| `processing_unit` (PU1, PU2) | one L-tap lowpass+highpass filter pair |
| `coef_latch_block` | coefficient storage inside each PU, held as two rows |
| `mac_cell_network` | the sum of L/2 products, as a carry-save adder tree |
| `stage2_buffer` | storage of the lowpass samples that stage 2 consumes |
| `stage2_ctrl` | start condition and per-slot choice of level for stage 2 |
| `dwt_pkg` | defaults, `calc_nc`, coefficient set, rounding function |

## The processing unit: one window every two clocks, one output per clock

A window is the L samples `x[2i] .. x[2i+L-1]`. C_i and D_i of that window
use the same samples with two coefficient sets. Split the taps by the parity
of k:

- The **even block** multiplies samples `x[2i], x[2i+2], ...`.
- The **odd block** multiplies samples `x[2i+1], x[2i+3], ...`.

Each block is an L/2-input MAC-cell network (L/2 multiplications summed)
followed by a register.

The coefficient latch block holds two rows:

- row A = `h0, h2, ..., h(L-2)`
- row B = `h(L-1), h(L-3), ..., h1`

Working out g_k shows that each of the four partial sums needs one of these
rows:

| partial sum | coefficients |
|---|---|
| C, even taps | row A |
| C, odd taps | row B, reversed |
| D, even taps | row B, negated |
| D, odd taps | row A, reversed |

So a single row multiplexer can feed both blocks if the odd block runs one
cycle behind the even block:

| cycle | even block | odd block | adder output |
|---|---|---|---|
| 0 | C even (row A) | — | |
| 1 | D even (−row B) | C odd (row B reversed) | |
| 2 | next window's C even | D odd (row A reversed) | C_i |
| 3 | ... | ... | D_i |

The even block gets an extra register so that its two partial sums line up
with the odd block's. The final carry-propagate adder then adds four
carry-save rows: two from each network. Results:

- C_i appears two cycles after the window strobe and D_i three cycles after.
- Windows may arrive every second cycle.
- The PU then delivers one output sample per clock, alternating C and D
  (`y_high` marks D).
- An assertion checks that windows are at least two cycles apart.

A **slot** below means these two cycles: one window, one C/D pair.

## The MAC-cell network: building an adder tree from a bit heap

`mac_cell_network` does not multiply and then add. It writes every
partial-product bit of all L/2 products into one "bit heap", a list of bits
per column (bit weight). It then adds layers of adders:

- Within a layer, columns are scanned from the least significant one up.
- Groups of three bits in a column go to a full adder. The sum stays in the
  column and the carry moves one column up.
- If exactly two bits are left and the next column still holds two or more,
  those four bits go to a "double adder": a 2-bit adder whose two sum bits
  stay in the two columns and whose carry goes two columns up.
- Anything else passes through to the next layer.
- Layers are added until no column holds more than two bits. The two
  remaining rows are the carry-save result.

The procedure is a constant computation. The network is generated by
combinational loops over fixed-size arrays, so its shape depends only on the
parameters. `LAYERS` reports the depth:

- 3 for two unsigned 6x3-bit products;
- 7 for three signed 8x8-bit products, the default.

Both agree with `ceil(log1.5(min(X,Y)·L/4))`, the depth of such a
full-adder tree.

Signed operands use the modified Baugh-Wooley form:

- the partial-product bits weighted by exactly one sign bit are inverted;
- a constant correction word is added as extra one-bits in the heap.

The result is exact modulo 2^OW.

## Stage 1

`stage1_ctrl` shifts the input into an L-sample register. After the L-th
sample, and after every second sample from then on, it strobes a window into
PU1. The first L-2 samples are also copied into a small padding store. After
the N-th sample, that store is shifted in again, one sample per clock. This
produces the last (L-2)/2 windows, which wrap around the frame end.

A frame therefore gives exactly N/2 windows. With one input sample per
clock, PU1 emits one output per clock, C(1) and D(1) interleaved.
`in_ready` is low during the replay and after the frame, until the frame is
complete.

## Stage 2: when to start, and which level to compute

Output i of level j needs samples up to `2i+L-1` of level j-1. If that runs
past the end of level j-1, it needs the whole level. `stage2_ctrl` keeps the
count of issued outputs per level and compares the requirement with
`avail[]` from the buffer.

**Start.** Stage 2 starts in the cycle in which n_c+1 level-1 samples are
held. n_c is computed from L and J:

- it is 18 for L = 6, J = 7;
- it is 13 for L = 4, J = 7.

Starting this late guarantees that stage 2 never runs dry during stage 1.
Starting any later would lengthen the frame.

**Choice per slot.** Let `lo` be the lowest level that is not yet complete.

- If the previous sample was at `lo`: take the lowest *higher* level whose
  next sample is ready. If there is none, compute the next sample at `lo`.
- If the previous sample was at a higher level: go back to `lo` if it is
  ready. Otherwise take the lowest ready higher level.
- If nothing is ready, the slot stays idle (`stage2_idle_slot` pulses).

With continuous input this alternates level 2 with "whatever higher level is
ready". Simulation shows:

- no idle slot while stage 1 runs;
- stage 2 finishes exactly n_c slots after stage 1's last window, for both
  L = 6 and L = 4.

Idle slots occur only when the input itself has gaps.

## The buffer and its write-through path

`stage2_buffer` holds the rounded lowpass samples of levels 1..J-1:

- **Level 1** has a shift-register channel of n_c+1 = 19 samples. That is
  the most stage 2 ever lags behind stage 1. An assertion checks that every
  sample a window needs is still held and has already been written.
- **Each higher level** has its own channel of L+2 samples.
- **Each level** also keeps its first L-2 samples, which serve the windows
  that wrap around (`m >= len` is read as `m mod len`).

The write-through path is the subtle part. A sample that PU2 computes in one
slot must be usable in the very next slot. Without it, stage 2 would idle
once during stage 1 and its tail would grow from 18 to 24 slots.

PU2's C output reaches the buffer in the cycle in which the controller
decides the next slot. So the buffer does two things:

- it reports `avail[]` including a write in progress;
- it passes that sample straight from the write port to the window output
  (also into the padding read).

## Number format

- Inputs and coefficients are signed two's complement. The coefficients are
  Q1.7, and the value -128 must not be used.
- Every output port carries the full-precision sum, `OW` = 19 bits.
- A lowpass sample that feeds the next level is rounded before it is stored
  in the buffer. It is shifted right by `FRAC` with round-half-up and then
  saturated to `SW` bits. Each level thus sees 8-bit samples, the same
  format as the input.
- Stage-2 outputs are therefore the exact filter outputs of the rounded
  lower level, not of an ideal infinite-precision transform.

## Frame timing

With a continuous input, a default frame takes 175 cycles from the first
input sample until `frame_done`:

- 128 input cycles, plus 4 cycles of border replay;
- the stage-2 tail of n_c = 18 slots;
- the PU latency and a four-cycle drain.

The next frame's samples are accepted after `frame_done`, so frames do not
overlap. The original analysis of this architecture quotes about N + J
clock cycles per frame. That figure is not reached here: this RTL spends two
clocks per C/D pair, so the stage-2 tail alone is 2·n_c = 36 cycles. A
default frame therefore takes 175 = N + 2·n_c + 11 cycles, not N + J = 135. Overlapping frames (starting frame k+1 while
stage 2 finishes frame k) would hide most of the tail, but it is not built.

## Where this RTL departs from the original architecture

- **Buffer size.** The original organisation uses only n_c+1 registers in
  total. They are split into channels of L registers: the higher channels
  first absorb level-1 samples, and one channel is later re-used for all the
  top levels. Here every level has a dedicated channel. That costs
  (J-2)·(L+2) + J·(L-2) extra sample registers (68 at the defaults), but the
  controller and the schedule are unchanged.
- **Write-through path and `avail[]`.** These are this design's way to get
  the zero-stall schedule with registered PU outputs.
- **Final adder.** The carry-propagate adder is written as one addition of
  four rows. A specific fast-adder structure (carry-skip/carry-select) is
  left to synthesis.
- **Own choices where the architecture leaves details open:**
  - the per-cycle order inside the PU;
  - the signed (Baugh-Wooley) bit heap;
  - the coefficient format, loading (`coef_load` writes both PUs' latches)
    and reset values;
  - rounding and saturation;
  - the input handshake and frame sequencing;
  - the asynchronous active-low reset.

## Interface of `dwt_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `coef_load`, `coef_in[L]` | in | 1, CW | load new lowpass coefficients (between frames) |
| `in_valid`, `in_data`, `in_ready` | in/in/out | 1, SW, 1 | input stream, one frame of N samples |
| `out1_valid`, `out1_high`, `out1_data` | out | 1, 1, OW | level-1 outputs, C then D per index |
| `out2_valid`, `out2_high`, `out2_level`, `out2_data` | out | 1, 1, 4, OW | level 2..J outputs; `C(J)` is the final approximation |
| `stage2_started`, `stage2_idle_slot`, `frame_done` | out | 1 | status |

Within a level, outputs come in index order. Levels 2..J are interleaved on
`out2_*`.

## Simulation

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<m>`. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/dwt_pkg.sv \
          tb/tb_dwt_top.sv --top-module tb_dwt_top -o sim
./obj_dir/sim
```

The package goes first, and `-y rtl` lets verilator find each module
in `rtl/<module>.sv`. `-Wno-fatal` keeps the index-width warnings from
stopping the build. They come from counters that are wider than the arrays
they index; the values always stay inside the array bounds.

| testbench | what it checks |
|---|---|
| `tb_mac_cell_network` | random and corner-case sums for signed and unsigned operands, layer counts |
| `tb_coef_latch_block` | row contents, reset value, reload |
| `tb_processing_unit` | C/D values against a direct dot product, latency 2/3 cycles, tags, coefficient reload mid-stream |
| `tb_stage1_ctrl` | window contents including the wrapped windows, window spacing, two frames, input gaps |
| `tb_stage2_buffer` | every window of every level against a model, write-through and padding use |
| `tb_stage2_ctrl` | the choice rule slot by slot against a model, start at n_c+1, no idle slot, tail = n_c |
| `tb_dwt_top` | default configuration end to end (see below) |
| `tb_dwt_top_l4` | the same with `L = 4` (Daubechies-4, n_c = 13); also checks that once level 1 is complete, a level-4 sample comes next and then the last, wrapped level-2 sample |

`tb_dwt_top` runs three frames:

1. small inputs, continuous;
2. random coefficients and full-range inputs, which drive stored samples
   into saturation;
3. the default coefficients again, with random gaps in the input.

It compares every C and D of every level with a reference model, then
checks:

- that stage 1 delivers N outputs in N consecutive cycles;
- that stage 2 starts with n_c+1 samples, never idles during stage 1, and
  ends n_c slots after it;
- that each mechanism occurred at least once: border replay, wrapped
  stage-2 windows, level moves up and back, saturation, coefficient reload
  and restart.

It runs in well under a second.
