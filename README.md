# Overlapped stripe-based 2-D (9,7) DWT

This RTL computes a one-level, two-dimensional (9,7) discrete wavelet transform
of an N x N image held in an external frame memory. Its main point is the way
the frame is read. A line-based 2-D DWT needs a temporal buffer of L·N words,
where L is the number of registers per sample stream in the 1-D filter. That
buffer grows with the image width. Here the frame is cut into horizontal
**stripes of S rows that overlap by 2K rows** (K = 4 for the 9-tap filter).
Each stripe is transformed by a line-based unit whose "line" is a stripe column
of only S samples. So the internal buffer holds S words, whatever N is. The
price is extra frame memory reads. The 2K overlap rows are read twice, and
about N²·S/(S−2K) pixels are read instead of N².

The scan method and the line-buffer implementations follow the paper
"Memory Analysis and Architecture for Two-Dimensional Discrete Wavelet
Transform". That paper describes these structures at block level. Everything
finer is this design's own: the filter arithmetic, the border handling, the
interfaces, the pipeline and the ping-pong conflict handling. Each choice is
marked as such below and in the file headers.

## The overlapped stripe scan

```
      columns -K ........................................ N+K-1
row r0-K   +--------------------------------------------------+  \
           |  K rows: context only, outputs dropped           |   |
row r0     |--------------------------------------------------|   |
           |                                                  |   |  one stripe,
           |  S-2K rows of valid coefficients                 |   |  S rows,
           |  (read column by column, top to bottom)          |   |  read as N+2K
row r0+S-2K-1 ---------------------------------------------------|   |  lines of S
           |  K rows: context only, outputs dropped           |   |  samples
           +--------------------------------------------------+  /
             next stripe starts at r0 + (S-2K): its top 2K rows are
             the last 2K rows read above
```

* **Order.** Within a stripe, one column of S pixels is read top to bottom,
  then the next column to its right. Each column is one line for the
  line-based unit. Stripes follow from the top of the frame down in steps of
  S−2K rows, until a stripe covers the last frame row.
* **Why the overlap removes the inter-stripe buffer.** A 9-tap filter needs
  four neighbours on each side. A coefficient in the first or last K rows of a
  stripe would need rows outside the stripe. Those rows are not stored: they
  are re-read as part of the next stripe. The edge coefficients are simply
  dropped, so no state is carried from one stripe to the next.
* **Frame borders** are handled by the address generator, not the filters.
  Rows and columns outside the frame are read mirrored about the first or last
  row or column (whole-sample symmetric extension). The datapath sees the same
  situation everywhere: K rows of context above and below, and K columns of
  context before and after. With this, a stripe is read as N+2K columns. The
  last stripe may reach past the bottom of the frame. Its extra rows are read
  mirrored and their results discarded.
* **Which coefficients are kept.** Both lifting units have a latency of four
  sample positions. The pair produced for stripe row j and column counter c
  therefore belongs to frame row r0 − 2K + j and frame columns c − 2K and
  c − 2K + 1. `coef_writer` keeps it only if 2K ≤ j, the frame row is below N,
  and 0 ≤ c − 2K ≤ N − 2. Every output word is written exactly once.

Traffic at the default size, N = 128 and S = 64:

| quantity | value |
|---|---|
| stripes | ⌈N/(S−2K)⌉ = 3 |
| pixel reads | 3 × (128+8) × 64 = 26 112 (the ideal N²·S/(S−2K) ≈ 18 725; the rest is the mirrored border columns and the part of the last stripe past the frame) |
| coefficient writes | N² = 16 384 words (8 192 two-word writes) |
| cycles per frame | one per read, plus 6 (two-port, ping-pong, convolution); two per read for the folded buffer |

With S = N the scan reduces to an ordinary line-based scan whose lines are
frame columns. It is still cut into two stripes, because the top and bottom K
rows of a stripe are never kept.

## Datapath

```
frame memory --> stripe_addr_gen --> lift97_col --> lift97_row ----> coef_writer --> frame memory
   (pixel,         (addresses,        (along the      (across lines,    (drop edge
    1-cycle         mirroring,         stripe column,   temporal line     rows, subband
    latency)        tags j,c,r0)       registers)       buffer of S words) layout)
                                                    or conv97_row + conv_rotating_buffer
```

* `lift97_col` filters each stripe column along its S samples. It takes one
  sample per cycle and gives one coefficient per cycle. An even sample
  triggers a lifting step, which produces a low-pass and a high-pass value.
  The low-pass leaves at once. The high-pass is held one cycle and leaves
  with the next (odd) sample. The state lives in five 16-bit registers. The
  unit does no boundary handling: the first four outputs of a column mix in
  the previous column's state, and they are among the dropped ones.
* `lift97_row` filters across columns. Each of the S row positions of a stripe
  is its own sample stream, advancing by one sample per column. The five
  state words of a stream are stored, merged into one 80-bit word, at that
  position's address in the temporal line buffer. For each input the word is
  read (cycle t), updated by `lift97_step` and written back (cycle t+1). On
  odd columns the step only parks the sample; on even columns it produces a
  low-pass/high-pass pair.
* `lift97_step` is the shared combinational lifting step:
  `d1 = x_o + α(x_e + x_e')`, `s1 = x_e + β(d1_prev + d1)`,
  `d2 = d1_prev + γ(s1_prev + s1)`, `s2 = s1_prev + δ(d2_prev + d2)`.
  The outputs are `low = s2/ζ` and `high = ζ·d2` with ζ = 1.230174105. The
  low-pass has DC gain 1 and the high-pass Nyquist gain 2.
* `coef_writer` writes each kept pair as two 16-bit words. The output frame
  uses the subband (Mallat) layout: LL at the top left, HL at the top right,
  LH at the bottom left, HH at the bottom right. It starts at `OUT_BASE`,
  which defaults to just after the image. The image cannot be overwritten in
  place, because the overlap rows are read twice.

Throughput is one pixel per cycle: one frame-memory read per cycle, and one
two-word write per cycle during even columns (none during odd columns). The folded buffer halves this.
The latency from a read to the write of its last dependent coefficient is 5
cycles.

## Temporal line buffer styles (`LB_MODE`)

The across-line filter needs one read and one write per cycle on the buffer.
There are four ways to build that buffer, selected by a parameter of the top:

| `LB_MODE` | memories at S = 64 | rate | notes |
|---|---|---|---|
| `LB_TWO_PORT` (default) | 1 two-port, 64 × 80 bit | 1 px/cycle | read and write on separate ports |
| `LB_PING_PONG` | 2 single-port, 64 × 80 bit each | 1 px/cycle | each column reads one bank and writes the other; roles swap every column |
| `LB_FOLDED` | 1 single-port, 64 × 80 bit | 1 px / 2 cycles | the unit runs at half rate; read and write cycles alternate |
| `LB_CONV_ROT` | 9 single-port, 64 × 16 bit each | 1 px/cycle | convolution filter instead of lifting (below) |

**Ping-pong hazard.** Read data comes one cycle after the read, so the write
of a column's last position falls in the same cycle as the next column's first
read. Both go to the same bank. `lb_pingpong` parks that write in a one-word
hold register. The next column's read of that address is served from the
register, and the register is written to its bank in the first cycle that
bank is idle. An assertion checks that a parked word is never overwritten
before it has been used.

**Rotating buffer for the convolution form.** `conv97_row` computes the same
transform with a 9-tap low-pass and a 7-tap high-pass filter working in
parallel. Those filters need the last nine samples of every stream. Shifting
a 9-word FIFO per position would rewrite every word each time. Instead,
`conv_rotating_buffer` keeps nine separate line memories. Each new sample is
written into the memory that holds the oldest sample, which is no longer
needed. The other eight are read in the same cycle. A pointer rotates by one
memory per column, so no memory is read and written in the same cycle. The
filter outputs have the same positions and timing as `lift97_row`. The
results are not bit-identical to the lifting form, because the two use
different rounding.

## Arithmetic

All datapath words are 16-bit two's complement. Pixels (8 bits) enter as
`pixel << 2`, so coefficients carry 2 fractional bits. Each lifting update
computes `base + round(c·(u+v)/2¹²)` with 12-bit fixed-point constants,
rounding half up, and wraps to 16 bits. Each convolution output is rounded
once in the same way. For 8-bit input the largest intermediate stays below
about a third of the 16-bit range, so nothing wraps in practice. The
constants are in `rtl/dwt97_pkg.sv`.

## Top-level interface (`dwt2d_stripe_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `start` | in | begin a frame (ignored while `busy`) |
| `busy`, `done` | out | frame in progress; one-cycle pulse after the last write |
| `fm_rd_en`, `fm_rd_addr` | out | pixel read request, address = row·N + column |
| `fm_rd_data[7:0]` | in | the requested pixel, **one cycle** after the request |
| `fm_wr_en`, `fm_wr_addr[2]`, `fm_wr_data[2]` | out | write of a low-pass / high-pass pair (two 16-bit words) |
| `pair_dropped` | out | a pair outside a stripe's valid rows was discarded (for observation) |

Parameters: `IMG_N` (128; must be even), `STRIPE_S` (64; even,
2K < S ≤ N), `LB_MODE`, `OUT_BASE`. The paper reports line buffers for lines
of 64 and 128 words. Use `STRIPE_S = 128` for the 128-word configuration.

## Departures from the reference description

* The reference builds its lifting unit as a "flipping" structure with four
  registers, which gives a 64-bit buffer word (112 bits for its faster 7-register
  version). The insides of that structure are not given there. This design
  uses conventional lifting, which keeps five words per stream, so the buffer
  word is 80 bits.
* Its lifting and convolution units take two samples per cycle. Here the
  column scan delivers one sample per cycle. The rotating convolution buffer
  therefore writes one memory per input, not two. The folded form of the
  convolution buffer (seven memories, written in pairs) is not built.
* Border handling, the frame-memory interface, the output layout, the
  fixed-point format and the ping-pong hold register are not specified by the
  reference; all are this design's choices.
* The memories are synthesizable arrays. The reference uses generated SRAM
  and register-file macros of a specific process, and reports their area and
  power. Those figures cannot be checked from RTL.

## Files

`rtl/`:
* `dwt97_pkg.sv`: types, constants and lifting arithmetic.
* `dwt2d_stripe_top.sv`: the top level.
* `stripe_addr_gen.sv`: the overlapped stripe scan.
* `lift97_step.sv`, `lift97_col.sv`, `lift97_row.sv`: the lifting step and the two lifting units.
* `lb_twoport.sv`, `lb_pingpong.sv`, `lb_folded.sv`: the lifting line-buffer styles.
* `conv97_row.sv`, `conv_rotating_buffer.sv`: the convolution form and its rotating buffer.
* `coef_writer.sv`: drops edge coefficients and writes the rest.

`tb/`:
* One self-checking testbench per module (`tb_<module>.sv`).
* `tb_dwt2d_stripe_top.sv`: full frame at the default parameters.
* `tb_dwt2d_modes.sv`: every buffer style, smaller frames, the convolution
  form, and S = N.
* `tb_dwt2d_workloads.sv`: the two line widths used in the buffer-size
  comparison, 64 and 128 words, each as an N × N frame with S = N, in all
  four buffer styles (eight instances side by side).
* `frame_checker.sv`: frame-memory model and scoreboard.
* `dwt97_ref_pkg.sv`: array-based reference transform (lifting and direct
  convolution with mirrored borders).

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself.
A watchdog ends a hung run.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    --top-module tb_dwt2d_stripe_top rtl/dwt97_pkg.sv tb/dwt97_ref_pkg.sv \
    tb/tb_dwt2d_stripe_top.sv -Mdir obj_top -o sim
./obj_top/sim
```

Swap the top module name for any other testbench. The unit testbenches that
do not use the reference package still compile with it on the command line.
The full-size run (128 × 128, 26 112 reads) takes well under a second.

What the end-to-end testbenches verify:

* Every read address against an independent model of the scan.
* Every coefficient, bit-exact, against the array reference.
* One read per cycle, or one per two cycles for the folded buffer.
* The done latency.
* That each mechanism actually occurs: mirroring at all four borders,
  overlap re-reads, dropped edge pairs, ping-pong hold-register reads, folded
  read/write alternation, and wrap of the rotating pointer.

Clock-rate targets (the reference quotes 50 and 100 MHz in a 0.25 µm
process) have not been checked.
