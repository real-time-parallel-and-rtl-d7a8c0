# Frame-recursive lattice 2-D DCT for serial video, with an HDTV encoder front end

A 2-D DCT is usually built as a row transform, a transposition memory and a
column transform. This design avoids the transposition. Pixels arrive one per
clock in raster order, and the hardware treats each new row as the step from
one "frame" of N rows to the next. Each step updates every 2-D coefficient by
a rotation. So the 2-D transform needs only two arrays of small lattice
butterflies plus shift registers. Once the pipeline is full, a complete set of N x N coefficients is ready every
N clocks (moving frame) or every N² clocks (disjoint blocks).

The same butterfly serves three designs, which sit side by side in the top
module `dct_lattice_top`:

| Part | Module | What it computes |
|---|---|---|
| Block 2-D DCT | `block_dct2d` | DCT/DSCT of disjoint N x N blocks, one block per N² clocks |
| Postmatrix moving frame | `postmatrix_dct2d` | DCT/DSCT of the last N rows, a new frame every N clocks |
| Prematrix moving frame | `prematrix_dct2d` | the same, with the frame difference formed on pixels rather than on 1-D transforms |
| HDTV encoder | `hdtv_dct_encoder` | a scanning processor feeding five `block_dct2d` units (4 luminance, 1 colour difference) and an output multiplexer |

The defaults are N = 8, 12-bit words for the block DCT, 20-bit words for the
moving-frame designs, and a 1080 x 1920 frame cut into 240 channels of 8 pixels.

## The recursion

All outputs use the scaling

    X_c(k,l) = (4/N²) C(k) C(l) Σ_m Σ_n x(m,n) cos(π(2m+1)k/2N) cos(π(2n+1)l/2N)

where C(0) = 1/√2 and C(k>0) = 1. At N = 8 this is one quarter of the
orthonormal 8x8 DCT. The companion DSCT `X_sc(k,l)` uses sin in place of the
first cosine, for k = 1..N.

Write X'(r,l) for the 1-D DCT of row r. When row t+N enters the frame and row t
leaves it, define

    δ(k,l) = (-1)^k X'(t+N,l) − X'(t,l)

Then each (k,l) pair is updated by

    A = X_c  + δ (2/N) cos(πk/2N)
    B = X_sc + δ (2/N) sin(πk/2N)
    X_c  ← A cos(πk/N) + B sin(πk/N)
    X_sc ← B cos(πk/N) − A sin(πk/N)

k = 0 and k = N are special cases:
- k = 0 has no rotation and uses gain 2/(√2 N).
- k = N changes sign every frame.

One `laii_module` implements this butterfly for one k. Module 0 also carries
the k = N term, on its sine output.

The 1-D DCT X'(·,l) of a row comes from the same butterfly run in the other
direction. An `lai_module` for index l feeds its output back through a
register and takes one sample per clock, with the sign (-1)^l. After N samples
it holds X'(l). The N modules of `lai` are cleared at the start of every row.

## Serialising the N² updates

Each row produces N values δ(·,l), and every k needs all of them. The
hardware spreads this work over the N clocks of the next row:

- Two **circular shift arrays** (`csa`) load the N-vector in parallel when a
  row ends, then rotate it one place per clock. One array serves even k and
  one serves odd k. The odd one's outputs are negated to give (-1)^k.
- **Lattice array II** (`laii_group`, even and odd halves, N/2 modules each).
  Module k reads shift array position k. At phase j it therefore works on
  l = (j + k) mod N.
- **Shift register arrays** (`sra`) give each module two N-long delay lines,
  one for X_c and one for X_sc. The value a module writes for (k,l) comes back
  exactly N clocks later, when the module next handles that same l.

The result is that the outputs come out with a diagonal skew. In each output
cycle, `xc[k]` belongs to l = (out_l0 + k) mod N. `out_l0` is reported with
the data. A consumer that wants raster order needs an N x N reorder buffer;
that buffer is not part of this design.

## Block DCT (`block_dct2d`)

- One LAI computes the row transforms. The result goes straight into the
  shift arrays.
- On the first row of each block, the values fed back from the shift register
  arrays are replaced by zero. This is the "reset every N² cycles" that turns
  the moving-frame recursion into a block transform.
- The block's coefficients appear during the N enabled clocks after its last
  row has been transformed. That is ticks N²+1 .. N²+N after its first pixel,
  registered, so they are visible one clock later.
- The next block's first row is clocked in at the same time, so there are no
  gaps between blocks.
- `en` is a clock enable for the whole pipeline. The HDTV encoder uses it to
  run each unit at one fifth of the pixel rate.

## Moving-frame designs

These two designs never reset the lattice state. A frame of the last N rows is
therefore complete after every row.

- **Postmatrix** (`postmatrix_dct2d`). The LAI transforms every row. Circular
  shift matrix II (`csm2`) keeps the last N+1 row transforms in a snake of
  registers. Two vector adders form δ_even = X'(new) − X'(old) and
  δ_odd = −X'(new) − X'(old).
- **Prematrix** (`prematrix_dct2d`). Circular shift matrix I (`csm1`) delays
  the pixel stream by N and by (N+1)·N. Two adders form x_new − x_old and
  −x_new − x_old, and two LAIs transform those differences directly. This
  makes the output one row later than in the postmatrix design.

In the prematrix design the first complete frame (rows 0..N−1) is finished
at clock N²+2N after the first pixel, plus one output register. The
postmatrix design has no pixel delay in front of its LAI and is one row
earlier. After that, both designs deliver a frame every N clocks.

Rows before the first one count as zero. The first N−1 frames are therefore
partial frames that include zero rows.

The state of both designs runs forever, so round-off builds up over time. The
default is 20-bit words with 8 fraction bits. Over 400 simulated rows the
error stayed below 1 pixel unit. At 12 bits it grew past 3 units within a few
hundred rows. For streams much longer than that, widen W or restart the design
periodically.

## Multiplications by distributed arithmetic (`da_cmul`)

No lattice module contains a multiplier. Every pair of constant products
(x·c0, x·c1) is computed by `da_cmul` like this:

- The W-bit input is split into 4-bit nibbles.
- Each nibble addresses a 16-entry ROM of two ROM_W-bit words.
- The shifted ROM outputs are added.

A 12-bit word needs three 16 x 24-bit ROMs per constant pair, and a lattice
module uses three such pairs. The ROM contents are computed at elaboration
from the real constants:

- The top nibble is signed, with entries round(c·v·2^(ROM_W−4)).
- The lower nibbles are unsigned, with entries round(c·v·2^(ROM_W−5)).

The sum is exact and is rounded once, so the error per product is about
1 LSB or less. Constants must satisfy |c| < 1.

## HDTV encoder (`hdtv_dct_encoder`, `scan_proc`, `dct_out_mux`)

A 1080 x 1920 frame is cut into 240 vertical channels, each 8 pixels wide:

- 192 luminance channels, dealt round robin to four DCT units (channel c goes
  to unit c mod 4).
- 48 colour-difference channels, all going to the fifth unit.

Every unit therefore serves 48 channels. The encoder treats its input as
progressive lines. Splitting an interlaced frame into fields, if wanted, has
to happen in front of it. Inside a channel, a unit scans pixels
row by row, left to right, which is the order `block_dct2d` needs.

`scan_proc` double-buffers bands of 8 lines (2 x 8 x 1920 pixels):

- It writes one band in raster order while it reads the other.
- It reads one pixel per clock, rotating over the five units: luminance units
  0..3, then the colour unit.
- The one-hot `dct_en` output is used as the clock enable of each unit.

A band is read in exactly the 15,360 clocks it takes to write one, so the
design keeps up with a continuous pixel stream. If a band arrives while both
halves are still full, the sticky `overflow` flag is set.

A unit's last blocks of a stream only come out once the next band starts,
because it produces a block's coefficients while the next block's first row
is clocked in.

`dct_out_mux` registers the one valid unit output and tags it with the unit
number (`out_src`). An assertion checks that no two units are ever valid at
once. Only the DCT outputs of the units are used. Their DSCT outputs are left
unconnected.

At 30 frames/s, 1080 x 1920 pixels is 62.2 Mpixel/s. The encoder therefore
needs a pixel clock of at least that rate, and each unit then runs at
12.4 MHz. No timing analysis has been done.

## How far it can be trusted

Every module has a self-checking testbench in `tb/`. Each testbench compares
the module with a reference model written independently in the testbench
(floating point for everything that computes a transform), and checks latencies where these are defined.

| Testbench | What it covers | Result |
|---|---|---|
| `tb_da_cmul` | every 12-bit input | error within 1.25 LSB |
| `tb_block_dct2d` | random blocks | within 3 pixel units (observed 2.1); first output at tick N²+1 |
| `tb_postmatrix_dct2d`, `tb_prematrix_dct2d` | 120 rows | within 1 unit; latencies (m+1)N+2 and (m+2)N+1 clocks for the frame ending at row m |
| `tb_dct_lattice_top_full` | the top at its defaults; a whole 1080 x 1920 frame through the HDTV encoder (every block checked) plus 400 rows through both moving-frame designs | about 2.2 million checks; coefficient error at most 2.7 units (HDTV) and 0.9 units (moving frame) |
| `tb_block_dct2d_n16`, `_n32`, `_n64` | the block DCT at N = 16, 32, 64 (words of 16, 20, 24 bits) | within 0.5 units; same latency rule |
| `tb_dct_lattice_top` | the same at a reduced size | counts that each mechanism happened: band swap, all five units producing, block reset, clock-enable stall, idle input cycles, moving-frame updates, start-up frames |

Points where the design departs from, or chooses between, descriptions of
the same thing:

- **k = N term.** The k = N sine term is negated every frame, as the
  recursion requires. One block diagram of the butterfly draws it without the
  sign change.
- **Block reset.** The block transform clears the fed-back lattice-array-II
  state. One passage instead speaks of resetting the shift matrix. Clearing the
  state is what makes the recursion correct.
- **LAI input path.** The drawing shows a delay line of N samples with an
  adder. It is omitted because every row starts from a cleared state, so the
  sample leaving the window is always zero.
- **k = 0 gain.** The 2/(√2 N) factor of the LAI module for l = 0 is applied
  at the input rather than the output. The result is the same, and the
  accumulator stays within a smaller range.
- **CSM II outputs.** Both the first and the last row of CSM II are read in
  parallel. The drawing shows single serial lines.
- **Choices the description leaves open**, and which are therefore this
  design's own:
  - pixel width: 8-bit signed, level-shifted;
  - fraction bits;
  - clock-enable and valid signalling;
  - synchronous active-high reset;
  - the order in which a unit moves between its channels: band by band;
  - the ROM rounding and sign handling.
- **Out of scope.** These are not implemented: the analog front end,
  entropy coding and channel interface; the single-ROM lattice variant; and
  transform sizes other than 8 at the defaults. The RTL is parametrised in N,
  which must be a power of two. The block DCT has also been simulated at
  N = 16, 32 and 64, with wider words; the moving-frame designs only at N = 8.
- **Adders.** All adders are written as plain `+` and `-`. The structure of the
  12-bit carry-look-ahead adders is left to synthesis.

## Simulating

The RTL uses only synthesizable SystemVerilog. Each testbench is a top-level
module with no ports. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
        rtl/dct_pkg.sv tb/tb_block_dct2d.sv --top-module tb_block_dct2d
    ./obj_dir/Vtb_block_dct2d

Other modules are found through `-Irtl` by file name. Every testbench ends by
printing `TB_RESULT checks=<n> failures=<n>`. The full-size run
(`tb_dct_lattice_top_full`) takes about 20 s of simulation after compiling.
To change a size, override the parameters of the instance in a testbench;
`N`, `W` and `F` are available on every transform.

## Files

| Directory | Contents |
|---|---|
| `rtl/` | one module per file |
| `rtl/dct_pkg.sv` | shared constants and the cos/sin coefficient functions |
| `tb/` | one testbench per module, plus the two top-level ones |
