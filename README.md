# DDBME: a data-dispatch binary motion estimator for MPEG-4 shape coding

MPEG-4 encodes the shape of a video object as a binary alpha plane: one bit
per pixel, 1 inside the object. Boundary 16x16 blocks of that plane (binary
alpha blocks, BABs) are coded with context-based arithmetic coding, and the
inter mode needs a motion vector. That motion vector comes from binary
motion estimation (BME). The reference plane is searched over [-16, 15] in x
and y around a predicted vector. The cost of a candidate is its SAD, here the
number of pixels that differ from the current BAB. In software this step
dominates shape coding.

This RTL implements the DDBME architecture (data-dispatch based BME). The
main ideas are:

* **Bit parallelism.** A BAB row is one 16-bit word. Comparing two rows is
  one 16-bit XOR followed by a ones count, not 16 separate pixel operations.
* **No bit addressing in the datapath.** A candidate row usually straddles
  two memory words. Instead of shifting and masking for every candidate, a
  32-pixel search-range row is read once and hard-wired to 16 processing
  elements (PEs) at 16 different bit offsets. PE *k* therefore works on the
  candidate *k* pixels to the right of PE0's candidate. Every bit read is
  used.

At its default sizes the design handles a 16x16 BAB, a 32x32-candidate search
and frames of up to 1023 rows by 63 words. That is 1008 pixels, enough for
CIF and larger.

## Block structure

```
 frame memory ──► SAP ──► SR buffer 16x32 ──SR[31:0]──► PE0 .. PE15 ──16 SADs──► CAS ──► mv, min_sad
 (external)        ▲          ▲                              ▲
                   └── AG ────┘  current BAB RAM 16x16 ──row─┘ (same row to all PEs)
 neighbour MVs ──► MVP select ──► predictor (to AG and CAS)
```

| module | role |
|---|---|
| `ddbme_top` | wires everything together; this is the design's top |
| `ddbme_mvp_select` | picks the predictor: the first defined MV of MVs1, MVs2, MVs3, MV1, MV2, MV3, or (0,0) |
| `ddbme_ag` | address generation and sequencing: frame reads, SAP control, SR buffer ring, PE control |
| `ddbme_sap` | shift and pack: turns three 16-bit frame words into one aligned 32-pixel row (48-bit barrel shift) |
| `ddbme_sr_buffer` | 16 x 32-bit search-range buffer (synchronous read) |
| `ddbme_cur_ram` | 16 x 16-bit current-BAB RAM (synchronous read) |
| `ddbme_pe_array` | 16 PEs and the hard-wired data dispatch |
| `ddbme_pe` | XOR, adder tree and accumulator |
| `ddbme_adder_tree` | 16-input ones counter made of 1-bit full adders and 2-, 3- and 4-bit adders |
| `ddbme_cas` | compare and select: 16 SAD buffers and one comparator |
| `ddbme_pkg` | shared constants and types (`mv_t`, `postag_t`, widths) |

## Search geometry and processing order

Let the current BAB sit at pixel (16·bab_x, 16·bab_y), with predictor
(px, py). The search range's top-left pixel is then

    x0 = 16·bab_x + px − 16,   y0 = 16·bab_y + py − 16

Candidate (i, j), with i, j = 0..31, is the block at (x0 + i, y0 + j). Its
motion vector is (px + i − 16, py + j − 16). The search range is 47 x 47
pixels.

The candidates are covered in two **strips** of 16 columns each:

* strip 0: i = 0..15. It uses search-range columns 0..31.
* strip 1: i = 16..31. It uses columns 16..47.

Within a strip the array goes down one row per **position**, j = 0..31. At
position j, cycle t = 0..15, the array reads search-range row j + t of the
strip (32 pixels) and current-BAB row t. PE k accumulates
popcount(SR[31−k : 16−k] XOR cur[t]). After 16 cycles PE k holds the SAD of
candidate (16·strip + k, j). A strip is therefore 32 × 16 = 512 cycles and
the two strips take 1024 PE cycles.

## The data dispatch

This is the core of the design. The word read from the SR buffer has the
leftmost pixel in bit 31. A candidate k pixels to the right of the strip's
first column sees bits 31−k down to 16−k:

```
SR bit:  31 30 29 ... 16 15 ... 1 0
PE0:     [31 ............ 16]
PE1:        [30 ............ 15]
...
PE15:                [16 ............ 1]
```

The routing is fixed wiring (`sr_word[31-k -: 16]` in `ddbme_pe_array`), so
the array needs no shifter. Bit 0 of the word is never used: with 16 PEs one
pixel apart, the windows end at bit 1. In the published description PE15 is
connected to bits 15..0, but that does not fit a one-bit stride, and the
stride is what makes PE k's candidate sit k pixels right of PE0's. The stride
is followed here. All PEs share one current-BAB row per cycle, so the current
block needs no per-PE pipeline registers.

## Filling the SR buffer

Only 16 search-range rows of 32 bits are held. Rows are numbered in one
stream across the whole search, and row *g* lives in slot *g* mod 16. Two
engines in `ddbme_ag` share the buffer.

* **Fetch.** For each row, in order, the fetch engine reads the three frame
  words that contain the row's 32 pixels. It starts at word
  floor((x0 + 16·strip) / 16). The SAP joins the three words, shifts left by
  x0 mod 16, keeps the top 32 bits and writes the row. Words outside the frame
  are not read and count as 0. A new row is started only while fewer than 16
  rows are held.
* **Compute.** A position starts only when all 16 of its rows have been
  written. Otherwise `stall` is high and the array waits. Each row is given
  back after its last use:
  * row j at the first cycle of position j;
  * every row of a strip's last position as it is read.

Inside a strip this runs without a stall. Each position releases one row, and
refilling it takes about 5 cycles of the 16 available. Between strips it
cannot: the new strip's first 16 rows are different rows, and the buffer is
full with the old strip's last position until that position ends. So each
strip begins with a fill of 16 rows × 3 frame words. This fill is the main
difference from the published cycle count (see Timing).

## Processing element and adder tree

`ddbme_pe` computes XOR → ones count → accumulate. `in_first` restarts the
accumulator with the first row's count. The SAD (9 bits, at most 256) is in
the register the cycle after the 16th row, and the next candidate's first
row overwrites it. The ones counter follows the published tree:

* five 1-bit full adders on x[15:13], x[12:10], x[9:7], x[6:4] and x[3:1];
* three 2-bit adders: FA1+FA2, FA3+FA4 and FA5+x[0];
* one 3-bit adder;
* one 4-bit adder, whose carry is the fifth result bit.

## Compare and select

When the array finishes a position, all 16 SADs are copied into CAS's SAD
buffers in one cycle. One comparator then scans them one per cycle, PE0
first, while the array already works on the next position. A candidate
replaces the best one only when its SAD is strictly smaller. On a tie, the
candidate met first wins. The order is strip 0 before strip 1, then j
ascending, then i ascending. This tie rule is a choice made here.

## Predictor and predictor check

`ddbme_mvp_select` takes the six neighbour MVs with valid flags, in the fixed
priority order MVs1, MVs2, MVs3, MV1, MV2, MV3:

* MVs1..MVs3: shape MVs of the left, upper and upper-right BABs;
* MV1..MV3: texture MVs of the neighbouring blocks.

The encoder decides which neighbour drives which input.

Shape coding may accept the predictor without a search when its candidate
differs from the current BAB in fewer than a threshold of pixels. Setting
`pre_en` adds a short phase before the full search. The 16 rows
y0+16..y0+31 of columns x0+16..x0+47 are fetched and one position is run;
its PE0 SAD is the predictor's. If that SAD is below `thr`, CAS returns the
predictor at once (`used_pred` = 1). Otherwise the full search follows. How
the check is mapped onto the array is this design's choice.

## Interface (`ddbme_top`)

* **Current BAB.** Write the 16 rows through `cur_we`, `cur_waddr` and
  `cur_wdata`, leftmost pixel in bit 15, before `start`.
* **Start.** Pulse `start` for one cycle. Hold `bab_x`, `bab_y` (in 16-pixel
  units), `nb_mv`, `nb_valid`, `pre_en` and `thr` stable during that cycle.
  `frame_h` (rows) and `frame_w_words` (16-pixel words) describe the
  reference frame.
* **Frame memory.** The design drives `fm_re`, `fm_row` and `fm_col`. The
  16-bit word must be on `fm_rdata` one cycle later, leftmost pixel in bit 15.
* **Result.** `done` pulses once. From then until the next `start`, `mv`
  (signed 10-bit x and y), `min_sad` and `used_pred` are valid.
* **Status.** `busy` is high from `start` to `done`. `pre_checked` pulses
  when the predictor check is made. `stall` is high while the array waits for
  rows. `mvp_out` and `mvp_defined` show the predictor in use.

Reset (`rst_n`) is asynchronous and active low. The RAM contents are not
reset.

## Timing and throughput

| | cycles |
|---|---|
| PE work per search | 1024 (2 strips × 32 positions × 16 rows) |
| one strip, first to last PE row | 512, no stall inside a strip |
| last PE row → `done` | 18 (SADs registered, loaded into CAS, 16 comparisons, `done` registered) |
| full search, `start` → `done` | 1128 |
| with a failed predictor check | 1179 |
| predictor check that succeeds | 69 |

Every PE cycle reads one 32-bit word from the SR buffer. That is
1024 × 4 = 4096 bytes per motion vector, the published figure.

The published figure is 32 × 16 × 2 + 15 = 1039 cycles per motion vector,
which assumes the SR buffer is always ready. This implementation adds the
two strip fills and a slightly longer comparison tail.

Throughput targets:

* **MPEG-4 core profile level 2.** Two CIF objects at 30 fps, 30 % boundary
  blocks: 396 × 0.3 × 2 × 30 = 7128 searches/s. At 1128 cycles per search
  this needs a clock of at least 8.1 MHz. The published design claims
  7.29 MHz.
* **One 352x240 object** with up to about 71 boundary blocks per frame
  needs about 80 k cycles per frame.

## How this departs from the published architecture

* SR buffer refill: a ring of 16 rows with a fill before each strip (see
  above). The published text does not say how the buffer is refilled, and
  its cycle count hides the fill.
* PE15 gets bits 16..1, not 15..0 (see the data dispatch).
* SAP: three 16-bit words form one 48-bit barrel shift per row. The
  published unit is described only as a 32-bit barrel shifter.
* The predictor check runs on the PE array as an extra position.
* The following are choices made here:
  * pixels outside the frame are 0;
  * the tie rule in CAS;
  * 10-bit motion vector components;
  * all handshakes and port formats.
* Not part of this RTL:
  * the rest of the shape coder (BAB type decision, motion compensation,
    size conversion, CAE, VLC, multiplexer);
  * the frame memory itself.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_ddbme_top` | full design at default sizes on a 352x288 plane of ellipses plus noise. Five searches: interior, frame corners, predictor hit and miss. Each result is compared with an exhaustive search in the testbench. It also checks the cycle counts above and that each mechanism happened: stall, out-of-frame word, aligned and unaligned range, predictor hit, miss and default |
| `tb_ddbme_vop` | a whole 352x288 plane: every boundary BAB of three moving objects is searched, with the predictor taken from the MVs already found for the left, upper and upper-right BABs and the predictor check on (threshold 16). Each result is checked against an exhaustive search, and the cycle total is reported. One plane gave 74 boundary BABs, 57 predictor hits and 23976 cycles |
| `tb_ddbme_ag` | frame-read and PE-read sequences against independently built lists, strip timing, stop on `finish` |
| `tb_ddbme_cas` | minimum, MV, tie rule, done timing, predictor hit and miss |
| `tb_ddbme_pe_array` | dispatch and 16 SADs per position, `sad_valid` timing |
| `tb_ddbme_pe`, `tb_ddbme_adder_tree` | accumulation; exhaustive ones count |
| `tb_ddbme_sap`, `tb_ddbme_sr_buffer`, `tb_ddbme_cur_ram`, `tb_ddbme_mvp_select` | their units |

`tb/frame_mem_model.sv` is a behavioural frame memory for the testbenches.
To build and run one testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/ddbme_pkg.sv \
    tb/tb_ddbme_top.sv --top-module tb_ddbme_top -Mdir obj_top
./obj_top/Vtb_ddbme_top
```

The full-design test runs in well under a second.

The sizes are named constants in `ddbme_pkg`:

* `BLK`: block size, number of PEs and entry width.
* `NPOS`: candidates per axis.
* `MV_W`: motion vector width.
* `ROW_W`, `COL_W`: frame address widths.

The adder tree and several 4- and 5-bit counters in `ddbme_ag` and
`ddbme_cas` are written for `BLK` = 16 and `NPOS` = 32. Changing those two
constants means adjusting those widths as well.
