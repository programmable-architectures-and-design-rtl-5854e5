# Programmable two-variable numeric function generators

These circuits compute a real function of two variables, f(X, Y), in a
fully pipelined datapath. They also switch to a different function when new
data is written into their RAMs: no gate has to change.

The domain is cut into square **segments**. In each segment f is replaced by
its bilinear interpolation through the segment's four corners, shifted up or
down so that the positive and negative errors are equal. Written relative to
the segment's lower corner (Bx, By), every segment needs four coefficients:

    g(X,Y) = Cxy·(X−Bx)·(Y−By) + Cx·(X−Bx) + Cy·(Y−By) + C0

The hardware finds the segment, reads its four coefficients from a RAM and
evaluates this polynomial with three multipliers and a few adders. The
segments can be cut in three ways. Each way gives a different generator, and
all three are provided:

| generator | segmentation | how the segment is found | memory | latency (defaults) |
|---|---|---|---|---|
| `nfg2_uniform`   | all squares the same size, 2^UB × 2^UB of them | top UB bits of X and of Y | large | 4 clocks |
| `nfg2_recursive` | quadtree: a square is split into four while its error is too large | LUT-cascade **segment index encoder** | small | 17 clocks |
| `nfg2_symmetric` | quadtree of a symmetric f(X,Y)=f(Y,X); mirror segments share one word | same encoder, plus a comparator that exchanges X and Y | about half of recursive | 17 clocks |

`nfg2_top` places the three side by side on one (X, Y) input, with one
configuration write port that reaches every RAM.

The method and the architecture come from the article "Programmable
Architectures and Design Methods for Two-Variable Numeric Function
Generators". Number formats, pipeline stages, the configuration port and the
encoder's cell size are this implementation's own choices. Each is listed
under "Departures and choices" below.

## Number formats (defaults in `rtl/nfg2_pkg.sv`)

| quantity | format | parameter |
|---|---|---|
| X, Y | unsigned, N = 12 bits, all fractional (domain [0,1), 12-bit accuracy) | `N_BITS` |
| Cxy, Cx, Cy, C0 | signed, 34 bits, 20 fractional (range ±8192) | `COEF_W`, `COEF_F` |
| result | signed, 16 bits, 12 fractional (range −8 … 8), rounded to nearest (ties up), saturated | `OUT_W`, `OUT_F` |

The offsets X−Bx and Y−By keep the input's 12 fractional bits. Every term is
aligned to CF + 2N = 44 fractional bits and summed exactly. Rounding happens
only once, at the end. Cxy needs many integer bits because it behaves like
∂²f/∂x∂y. For √(X²+Y²) in the 1-unit square at the origin it is about
−(2−√2)·2^12 ≈ −2400. Cxy is only ever multiplied by two offsets smaller than
the segment, so such values cause no loss of precision.

A different domain is handled by scaling. A domain [0, 2^k) at m-bit accuracy
needs N = k + m input bits, with the coefficients scaled to match.

## The uniform generator (`nfg2_uniform`)

    X[11:5] Y[11:5] ──► coefficients RAM (16,384 × 136 b) ──► Cxy Cx Cy C0 ─┐
    X[4:0]  Y[4:0]  ──► (delay 1) ───────────────────────── dx dy ─────────┴► bilinear_eval ─► out

The number of segments is a power of two, so the segment number is just the
top bits of the inputs. The offsets are the low bits, so neither an encoder
nor offset logic is needed. Stage 1 is the synchronous RAM read and stages
2–4 are the evaluator: four stages in all.

## The recursive generator (`nfg2_recursive`)

    X,Y ─► seg_index_encoder (12 LUT cells + adders) ─► segment number
                                                         │
                                        coefficients RAM (16,384 × 160 b: Bx By Cxy Cx Cy C0)
                                                         │
    X,Y ─► delay line (14 clocks) ─► offset_and: X & ~Bx, Y & ~By ─► bilinear_eval ─► out

**Offsets with AND gates.** A quadtree square of side 2^h units has a corner
whose low h bits are zero. Every X inside the square shares all higher bits
with Bx. Clearing the bits that are set in Bx therefore gives exactly X − Bx,
so the subtractors become AND gates fed with ~Bx. The corner is stored in the
coefficients word.

### The segment index encoder (`seg_index_encoder`)

This block is the least obvious part of the design. It computes the index
function seg(X, Y), which maps a point to the number of its quadtree square.
It does this with a chain of small RAMs instead of comparators.

1. **Interleave.** Z = x11 y11 x10 y10 … x0 y0. Every pair of Z bits selects
   one quadrant at one level of the quadtree. If the segments are numbered in
   this Z order (depth first, children in order 00, 01, 10, 11 of (x bit,
   y bit)), seg becomes a monotone function of Z.
2. **Cascade.** Z is cut into NCELL = 2N / CELL_BITS groups: 12 groups of
   2 bits, one quadtree level per cell. Cell c is a RAM addressed by
   {rails from cell c−1, Z bits of group c}, and cell 0 by its Z bits alone.
   Each cell outputs
   - **rails**: which sub-function of the remaining Z bits is
     left. Think of it as "which quadtree node the prefix has reached";
   - **Arail** (SEG_W bits): a number that this cell adds to the result.
3. **Add.** seg = Σ Arail_c, taken modulo 2^SEG_W.

This is an edge-valued decision diagram (EVBDD), cut into horizontal slices.
One valid set of tables can be built straight from the quadtree. Let
*base(r)* be the segment number at the lower corner of region r.

- Rail value 0 means "already inside a leaf" at every cut that some leaf
  has already reached. Its entries are rails 0 and Arail 0, for every input.
- Each internal node at the depth of a cut gets its own rail value: 1, 2, …
  after value 0, or 0, 1, … at a cut that no leaf has reached yet.
- For cell c, a region r on its input rails and Z bits b, follow b down the
  tree from r to region r′. The entry is rails = id(r′) (0 if r′ is a leaf)
  and Arail = base(r′) − base(r). For cell 0, take base(root) = 0.

The Arails telescope, so their sum is base(final leaf) = seg. Because the sum
is modular, the encoder realises any index function, monotone or not. The
symmetric generator depends on this. A tighter encoding merges nodes whose
subtrees have the same shape, and the rail width can then be
⌈log₂ k⌉ for k segments.

**Rail widths per cut.** After t bits of Z, at most 2^t sub-functions can
be left, so the cut after cell c needs at most (c+1)·CELL_BITS rail bits.
The encoder sizes each cut as min(RAIL_W, (c+1)·CELL_BITS), and the last
cell has no rail output. At the defaults, RAIL_W = SEG_W = 14. The cell
RAMs therefore grow from 4 words (cell 0) to 65,536 words (cells 7–11):
8.4 Mbit in all. Any quadtree with up to 16,384 segments can be loaded
without resizing anything, as long as no cut needs more than 2^14 rail
values. The cell-by-cell construction above always stays below that,
since a quadtree of k leaves has fewer than k/3 internal nodes.

Timing: cell c reads in clock c+1, the Arail sum runs alongside, and a final
register holds seg. The encoder latency is NCELL + 1 = 13 clocks. The
coefficients RAM adds 1 clock and the evaluator 3, so the whole generator
takes NCELL + 5 = 17 clocks. It accepts one input per clock.

## The symmetric generator (`nfg2_symmetric`)

If f(X,Y) = f(Y,X), the quadtree comes out mirror-symmetric about the
diagonal. The interpolations of a mirror pair satisfy g₁(X,Y) = g₂(Y,X): the
same Cxy and C0, with Cx and Cy exchanged. The two segments of a pair
therefore share one segment number and one RAM word, the word of the segment
on or above the diagonal (Bx ≤ By).

`sym_swap` compares X with Y and, if X > Y, exchanges them on the way to the
AND gates and the multipliers. The stored segment is thus evaluated at
(min, max), and that equals the mirror segment's polynomial at (X, Y). The
encoder still reads the original X and Y, so its tables must give both
segments the same number. That number is not monotone in Z; the modular
Arails handle it. Diagonal segments are their own mirror. For a symmetric f
their Cx equals Cy, so an exchanged point inside them gives the same value.
The comparator runs beside the encoder and adds no clock.

## Loading a function

Every table is a RAM with one write port; all reads are synchronous.

| memory | address | word (most significant first) |
|---|---|---|
| uniform coefficients | {X[N−1 −: UB], Y[N−1 −: UB]} | {Cxy, Cx, Cy, C0}, 4 × 34 b |
| recursive/symmetric coefficients | segment number | {Bx, By, Cxy, Cx, Cy, C0}, 2 × 12 + 4 × 34 b |
| LUT cell 0 | Z bits | {rails_out, Arail} |
| LUT cell c > 0 | {rails_in, Z bits} | {rails_out, Arail} |

In the LUT words, Arail takes the low SEG_W bits and rails_out sits just
above it. Each rail field is as wide as its cut, min(RAIL_W, (c+1)·CELL_BITS)
bits for the output of cell c, and the last cell has none.

On `nfg2_top`:
- `cfg_arch` (`ARCH_UNI`/`ARCH_REC`/`ARCH_SYM`) selects the generator.
- `cfg_target` (`CFG_COEF`/`CFG_LUT`) selects the memory.
- `cfg_cell` selects the LUT cell and `cfg_addr` the word.
- `cfg_data` is right-aligned to the target's word width.
- A word is written on a clock edge where `cfg_we` is high.

A result computed while its tables change is undefined. Nothing else needs
attention: results are valid again as soon as the writes are done.

The tables are computed off-line:

1. **Segment.** Start with the whole domain. Fit the shifted bilinear
   interpolation and measure its error ε = (max(f−g) − min(f−g)) / 2 over
   the square's grid points. If ε is not below the acceptable error and the
   square is wider than one unit, split it into four and repeat. A uniform
   segmentation uses the smallest square found this way everywhere.
2. **Coefficients** per square of side w, from the corner values fbb, feb,
   fbe and fee:
   - Cxy = (fbb − feb − fbe + fee)/w²
   - Cx = (feb − fbb)/w
   - Cy = (fbe − fbb)/w
   - C0 = fbb + (max(f−g) + min(f−g))/2
   - each rounded to 20 fractional bits.
3. **LUT tables** from the quadtree, as described above.

`tb/nfg2_tb_pkg.sv` contains all three steps in SystemVerilog (class
`QuadSeg`, functions `fit_square` and `qcoef`).

## Verification

Each testbench checks its results against values computed separately: exact
64-bit integer polynomials, quadtree walks, or the real function. The block
testbenches also check latency, and every testbench and prints `TB_RESULT checks=… failures=…`.

| testbench | what it shows |
|---|---|
| `tb_nfg_ram` | RAM reads one clock late; read-during-write returns old data |
| `tb_offset_and` | X & ~Bx = X − Bx for random aligned squares of every size |
| `tb_sym_swap` | min/max and the X > Y flag, including X = Y |
| `tb_bilinear_eval` | random coefficients and offsets, one per clock, bit-exact, both saturation limits reached |
| `tb_seg_index_encoder` | random quadtree, then a mirrored one with shared numbers; every segment number, latency 13 |
| `tb_nfg2_uniform` | default size, all 16,384 words loaded, random points, latency 4 |
| `tb_nfg2_recursive`, `tb_nfg2_symmetric` | 8-bit instances, random quadtrees, random coefficients; mirror and diagonal segments and several segment sizes hit |
| `tb_nfg2_top` | **all defaults**: all three generators loaded through the config port and streamed back-to-back; then a function switch (every table reloaded) and a second stream. It counts back-to-back results, segment sizes, exchanges, mirror and diagonal hits, and switches, and fails if any count is zero |
| `tb_nfg2_workload` | real functions at 8-bit accuracy on all three generators (below) |
| `tb_nfg2_workload12` | **all defaults**: real functions at 12-bit accuracy, 60,000 random points per function and generator (below) |
| `tb_nfg2_workload_large` | sin(πX)√Y and 1/√(X²+Y²) at 12-bit accuracy on widened instances (below) |
| `tb_nfg2_workload_int` | WaveRings at N = 14 and Sombrero at N = 15, 12-bit accuracy, recursive and symmetric (below) |
| `tb_nfg2_accuracy_sweep` | XY/√(X²+Y²) at 4, 6, 8, 10 and 12 bits: counts, memory and accuracy (below) |

`tb/nfg2_wl_runner.sv` is a helper for the last two. It segments one
function, loads an `nfg2_top` instance of the requested size, and checks
random inputs against the function.

**Real functions.** `tb_nfg2_workload` segments six functions with the
procedure above. The acceptable error is 2⁻¹⁰, the inputs are 8-bit, and
the instance has N = 8, UB = 7, SEGW = RAILW = 12. It then evaluates all
65,536 inputs on each generator and compares them with the real function.
Every result is within 2⁻¹⁰ + 2⁻¹² (approximation plus rounding):

| function | recursive segments (published) | symmetric words (published) | uniform segments (published) |
|---|---|---|---|
| sin(πXY) | 547 (508) | 283 (263) | 1,024 (1,024) |
| X⁴Y⁵ | 250 (193) | – | 4,096 (4,096) |
| XY/√(X²+Y²) | 274 (256) | 148 (139) | 4,096 (4,096) |
| √(X²+Y²) | 262 (226) | 140 (121) | 4,096 (4,096) |
| ∛(X³+Y³) | 265 (232) | 144 (127) | 4,096 (4,096) |
| sin(πX)√Y | 1,198 (997) | – | 16,384 (16,384) |

The uniform counts agree exactly. The recursive counts come out 7–30 %
higher than published. The published figures were made with the
authors' own programs; details such as the error test at the boundary and
the exact sample set are not known, and they probably explain the gap. The
testbench accepts counts within 30 %.

**12-bit accuracy at the defaults.** `tb_nfg2_workload12` does the same
with an acceptable error of 2⁻¹⁴, on the default instance. It draws 60,000
random inputs per function and generator. Every result is within
2⁻¹⁴ + 2⁻¹³ + 2⁻¹⁸: the approximation, plus output rounding, plus the
coefficient quantisation. The measured segment counts are:

| function | recursive segments (published) | symmetric words (published) | uniform segments (published) |
|---|---|---|---|
| sin(πXY) | 8,515 (8,389) | 4,296 (4,232) | 16,384 (16,384) |
| X⁴Y⁵ | 3,802 (3,592) | – | – |
| XY/√(X²+Y²) | 4,207 (4,114) | 2,151 (2,104) | – |
| √(X²+Y²) | 4,252 (4,093) | 2,164 (2,083) | – |
| ∛(X³+Y³) | 4,069 (3,955) | 2,085 (2,027) | – |
| sin(πX)√Y | 40,954 (29,875) | – | – |

At 12 bits the counts are within 2–5 % of the published ones. For
sin(πX)√Y the gap is larger. Its slope in Y is unbounded at Y = 0, so the
count depends on how the edge row is treated. The count exceeds 16,384
segments either way, and this testbench checks only that it is refused.

**Larger instances.** `tb_nfg2_workload_large` runs the two functions that
overflow the default instance, on instances widened through parameters:

| function | instance | recursive segments (published) | symmetric words (published) |
|---|---|---|---|
| sin(πX)√Y | SEGW = RAILW = 16 | 40,954 (29,875) | – |
| 1/√(X²+Y²) | SEGW = RAILW = 18, CW = 57, OW = 26 | 157,492 (103,046) | 78,938 (51,687) |
| 1/√(X²+Y²), 8-bit accuracy | N = 8, SEGW = RAILW = 12, CW = 57, OW = 22 | 3,712 (2,344) | 1,883 (1,195) |

1/√(X²+Y²) reaches about 2,900 near the origin, and its bilinear
coefficients reach about 5·10¹⁰. Hence the wider coefficients and output.
Both functions have a singular derivative at the domain edge. Their counts
come out 1.4–1.6 times the published ones, because the count there depends
on which points the error test visits. Every checked output is still
within the bound.

**What fits the default instance.** The instance has 16,384 coefficient
words, 12-bit inputs in [0,1) and outputs within ±8. Using the published
12-bit segment counts, these fit:
- the recursive and symmetric generators for sin(πXY), X⁴Y⁵ (recursive
  only), XY/√(X²+Y²), √(X²+Y²) and ∛(X³+Y³);
- the uniform generator for sin(πXY) only (exactly 16,384 squares).

These do not fit:
- sin(πX)√Y needs 29,875 segments (run above with SEGW = 16);
- 1/√(X²+Y²) needs 103,046 segments, and its values reach about 2,900
  (run above with wider parameters);
- the WaveRings function on [0,π]² and the Sombrero function on (0,8)²
  need 2 and 3 integer input bits. Set `N` to 14 or 15 for them (below).

**Integer input bits.** The hardware does not know where the binary point
of X and Y sits. An N-bit code is an offset in units of one LSB, and the
coefficients are stored per LSB. A domain with integer bits therefore only
needs a wider N. `tb_nfg2_workload_int` runs WaveRings,
cos(r)/√(r² + 0.25) with r = √(X²+Y²), on [0,π]² at N = 14. It runs the
Sombrero sin(r)/r on (0,8)² at N = 15. Both use 12 fractional bits, an
error target of 2⁻¹⁴, and SEGW = 15 (32,768 words):

| function | recursive segments (published) | symmetric words (published) |
|---|---|---|
| WaveRings | 16,879 (16,278) | 8,505 (8,202) |
| Sombrero | 18,781 (18,664) | 9,457 (9,398) |
| WaveRings, 8-bit accuracy (N = 10) | 1,132 (949) | 583 (490) |
| Sombrero, 8-bit accuracy (N = 11) | 1,201 (1,180) | 618 (607) |

All random domain inputs are within the bound: 40,000 per function and
generator at 12 bits, and 20,000 at 8 bits. The recursive WaveRings
segmentation just misses 16,384 words.

**Accuracy sweep.** `tb_nfg2_accuracy_sweep` builds XY/√(X²+Y²) at
N = 4 … 14 with an error target of 2^−(N+2). For each size it prints the
segment counts and the memory a generator sized for that one function would
need. For that count, rails and segment numbers are only as wide as used,
with 34-bit coefficients:

| N | uniform squares | recursive segments | symmetric words | uniform bits | recursive bits | symmetric bits |
|---|---|---|---|---|---|---|
| 4 | 16 | 16 | 10 | 2,176 | 2,424 | 1,560 |
| 6 | 256 | 70 | 40 | 34,816 | 11,492 | 6,928 |
| 8 | 4,096 | 274 | 148 | 557,056 | 48,340 | 28,680 |
| 10 | 65,536 | 1,072 | 559 | 8.9 M | 197,212 | 115,396 |
| 12 | 1,048,576 | 4,207 | 2,151 | 143 M | 816,244 | 480,376 |
| 14 | 16,777,216 | 16,759 | 8,476 | 2.3 G | 3.4 M | 2.0 M |

The uniform memory grows about 16-fold per two bits, like a plain table of
all inputs. The recursive and symmetric memories grow about 4-fold, and the
symmetric one stays a little over half of the recursive one. The published
12-bit totals are smaller (293,330 and 153,176 bits), because there the
coefficients are only as wide as each function needs.

### Running a testbench

Any testbench runs with plain Verilator, for example the full-size one:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
        rtl/nfg2_pkg.sv tb/nfg2_tb_pkg.sv tb/tb_nfg2_top.sv --top-module tb_nfg2_top
    ./obj_dir/Vtb_nfg2_top

Replace `tb_nfg2_top` with any other testbench name. Packages must be listed
first; other modules are found through `-y`. The testbenches' reference
arithmetic mixes 32- and 64-bit integers, and Verilator reports width
warnings for it. `-Wno-fatal` keeps those from stopping the build.

## Departures and choices

- **Inputs are unsigned.** The method is defined for two's-complement
  fixed point, but every evaluated domain is non-negative, so X and Y are
  unsigned here.
- **Formats.** The coefficient width (34 b, 20 fractional), the output
  width (16 b, 12 fractional), rounding to nearest and saturation are
  choices made here. The published memory totals suggest narrower,
  per-function coefficient widths. Narrow them through `COEF_W`/`COEF_F`
  once the function is known.
- **Encoder geometry.** The encoder uses 2 Z bits per cell. It caps every
  cut at RAIL_W bits, instead of fitting the rail count to one function.
  The published designs fit the rails to each function, which gives far
  smaller memories: about 0.3 Mbit in all for ∛(X³+Y³) at 12 bits,
  coefficients included, against 8.4 Mbit of LUT RAM here. The generic
  sizing here lets any function be loaded at run time.
- **Pipeline.** The source reports only stage counts: 4 for uniform,
  9–18 for recursive, one more for symmetric, depending on the function.
  Here uniform has 4 stages; recursive and symmetric have 17, with no
  extra stage for the symmetric comparator.
- **Bx and By** are stored in each coefficients word to feed the AND gates.
- **No handshake or back-pressure.** `in_valid` simply travels with the
  data. Only the valid flags are reset (asynchronous, active low). RAM
  contents and data registers must be loaded and flushed by the user.
- **Not provided.** The off-line tools (segmentation, coefficient fitting
  and the decision-diagram decomposition) are not hardware. The testbench
  package contains simple versions of them.
- **Baselines not built.** The single look-up table and the composition
  from one-variable generators are only comparison points.

## Files

| file | contents |
|---|---|
| `rtl/nfg2_pkg.sv` | default sizes, configuration enums |
| `rtl/nfg_ram.sv` | synchronous RAM (all coefficients and LUT memories) |
| `rtl/bilinear_eval.sv` | multipliers and adders, 3 stages |
| `rtl/offset_and.sv` | X & ~Bx, Y & ~By |
| `rtl/seg_index_encoder.sv` | LUT cascade with rails, Arails and adders |
| `rtl/sym_swap.sv` | comparator and multiplexers |
| `rtl/nfg2_seg_datapath.sv` | encoder → RAM → AND gates → evaluator, shared by the next two |
| `rtl/nfg2_uniform.sv`, `rtl/nfg2_recursive.sv`, `rtl/nfg2_symmetric.sv` | the three generators |
| `rtl/nfg2_top.sv` | all three with one configuration port |
| `tb/nfg2_tb_pkg.sv` | quadtree, table builder, segmentation and fitting, reference arithmetic |
| `tb/nfg2_wl_runner.sv` | one function on one generator instance of any size, for the workload testbenches |
| `tb/tb_*.sv` | testbenches |
