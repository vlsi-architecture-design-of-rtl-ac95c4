# MPEG-4 binary shape encoder

MPEG-4 describes the shape of an arbitrarily shaped video object with a binary
alpha plane. The plane is cut into 16x16 binary alpha blocks (BABs), and each
BAB is coded on its own:

- a fully transparent or fully opaque BAB costs only a mode code;
- in a P-VOP, a BAB that a motion-compensated block from the previous plane
  already reproduces is sent as a motion vector only ("no update");
- every other BAB may be shrunk by 2 or 4 and is then coded pixel by pixel with
  context-based arithmetic encoding (CAE).

Two parts dominate the work:
- **Binary motion estimation.** A full search over 1024 candidate positions,
  each a 256-pixel XOR-and-count.
- **CAE context formation.** Every pixel needs ten neighbouring pixels from up
  to two rows back.

This RTL attacks both with data reuse:

- **Data-dispatch motion estimation.** Sixteen SAD units share one 32-pixel row
  of the search area. Each one sees that row shifted by a different amount, so
  every row fetched from the search-range buffer serves 16 candidates at once.
- **Delay-line context model.** The block is streamed through a single shift
  register chain whose length equals the bordered row stride plus two. All ten
  context pixels are fixed taps on that chain, so the whole context is
  available every cycle. Multiplexers move the taps when the block is 8x8 or
  4x4, so the same chain serves all three block sizes.

The same delay-line idea drives the upsampling unit, which the size-conversion
loop uses.

## Data conventions

- A BAB row is a 16-bit word with the **leftmost pixel in the MSB**.
  `shape_pkg::bab_t` is `logic [15:0][15:0]`, indexed `bab[y][x]` with x = 0 on
  the left. 1 means opaque.
- Motion vectors are signed pixel displacements of the reference block relative
  to the current BAB position. The search window is [-16, 15] in both
  directions around the predictor.
- `bab_type` numbers follow MPEG-4:

  | bab_type | Meaning |
  |---|---|
  | 0 | no update, MV difference 0 |
  | 1 | no update, MV difference ≠ 0 |
  | 2 | transparent |
  | 3 | opaque |
  | 4 | intra CAE |
  | 5/6 | inter CAE (never produced, see below) |

- Conversion ratio `cr`: 0 is 1, 1 is 1/2, 2 is 1/4 (`shape_pkg::cr_e`).

## Top level: `shape_coder_top`

### Per-BAB sequence

1. Write the BAB into the on-chip 16x16 memory (`cur_we/cur_waddr/cur_wdata`).
2. Pulse `start` with:
   - `vop_type`
   - BAB position `bab_x/bab_y` (pixels, signed)
   - predictor `mvp_x/mvp_y`
   - `conv_en` (allow size reduction)
   - `alpha_thr` (errors tolerated per 4x4 sub-block)
3. The stages then run as follows. For a P-VOP, size conversion and then
   intra CAE run while motion estimation is still searching. They work on the
   copy of the BAB that mode decision collected, so they share no memory port
   with the search. If the search finds an exact match, the CAE run is aborted
   and the bits it has already produced must be discarded. Otherwise the BAB
   completes when both the search and the CAE have finished.

   | Stage | Cycles | What happens |
   |---|---|---|
   | Mode decision (`mode_decision`) | 17 after the start cycle | Reads the 16 rows and classifies the BAB. Transparent and opaque BABs finish here. |
   | Motion estimation (`ddbme`), P-VOPs only | 1139 | Best SAD 0 ends with bab_type 0 or 1. |
   | Size conversion (`size_conv`) | up to about 930 | Tries ratio 1/4, then 1/2, then falls back to 1 (see below). |
   | Intra CAE (`cae_coder`) | about (N+2)(N+4), plus stall cycles while the coder renormalises | Starts right after size conversion. N is 4, 8 or 16. Emits bits on `bit_valid`/`bit_out`. |

4. `done` pulses once. With it, `bab_type`, `mv_x/mv_y`, `min_sad`, `cr` and
   `nbits` are valid. The code bits and `nbits` belong to the BAB only when
   `bab_type` is 4.

### Tables and external memory

Two tables must be loaded once after reset:
- the CAE probability table: 1024 x 16 bits, P(pixel = 0) scaled to 2^16,
  indexed by the 10-bit context;
- the upsampling threshold table: 256 x 5 bits.

The MPEG-4 standard defines both. They are loadable so that the standard's
values, or any others, can be used.

The reference alpha plane stays outside the chip:
- `ref_rd_en` with `ref_rd_row` (signed row) and `ref_rd_word` (signed 16-pixel
  word index) requests one 16-bit word;
- `ref_rd_data` must return it on the next cycle;
- words outside the object must read as zero.

### Throughput

The worst boundary BAB of a P-VOP measured in simulation took 1703 cycles. A
no-update BAB takes 1160 cycles. The worst case by construction is about 1960
cycles: a noise-like block needing all three size-conversion trials and about
1000 cycles of CAE, which then outlasts the 1139-cycle search. At 23.5 MHz this is enough for the
7128 boundary BABs per second of an MPEG-4 Core Profile Level 2 stream with
30 % boundary blocks, with room to spare. A strictly sequential schedule
would need up to about 3100 cycles per BAB.

Overlapping successive BABs would go further. That is not built here (see
"Departures").

## Motion estimation: `ddbme`

### Structure

**SAD units (`sad_pe`).** The 16 units each own one horizontal displacement.
Each cycle:
- one row of the current BAB is broadcast to all of them;
- one 32-pixel row `SR` of the search area is read;
- PE k receives `SR[31-k:16-k]`.

A unit XORs its two rows, counts the ones and accumulates. After 16 rows each
unit holds the SAD of one candidate, so 16 candidates (one vertical offset,
16 horizontal offsets) complete per 16-cycle pass.

**Compare-and-select (`bme_cas`).** It latches the 16 SADs at the end of a pass
into its own registers. While the next pass runs, one comparator scans them one
per cycle and keeps the minimum. The comparison is strict, so among equal SADs
the candidate reached first wins. The order is:
- horizontal offsets -16..-1 for all vertical offsets;
- then 0..15.

**Search-range buffer.** A 16-entry x 32-bit memory (`dp_sram`), used as a ring:
row r of the search area lives in slot r mod 16.

**Shift-and-pack (`sap`).** The predictor is rarely a multiple of 16, so a
32-pixel search row is cut out of three consecutive 16-bit reference words by
a barrel shifter before it is written into the ring.

**Address generator (`bme_agu`).** Each half (horizontal offsets -16..-1, then
0..15) works as follows:
1. Preload 16 rows (48 reference reads).
2. Run 32 passes, one per vertical offset.
3. During pass j, refill row j+16 into the slot that pass j has just finished
   with. This uses the three reference reads of cycles 1..3 of the pass.

So the buffer is refilled while it is being read, and no pass waits.

### Timing

Total: 2 x (48 + 32 x 16) plus the pipeline and the final scan = **1139
cycles** from `start` to `done`.

## Context-based arithmetic coding: `cae_coder`, `cae_ctx`, `bac_encoder`

### Bordered stream

The coder streams the block with a two-pixel border, row by row, at stride
S = N + 4:
- top and left border pixels are 0;
- right border pixels inside the block's rows repeat the rightmost pixel of
  that row.

Streaming the border through the chain means no special cases at block edges.

### Context chain (`cae_ctx`)

Every stream pixel enters a 41-stage chain, which is 2 x 20 + 1 for the largest
stride. The ten context bits are fixed offsets behind the newest pixel:

| Bit | Position | Bit | Position |
|---|---|---|---|
| c0 | (x-1, y) | c5 | (x-1, y-1) |
| c1 | (x-2, y) | c6 | (x-2, y-1) |
| c2 | (x+2, y-1) | c7 | (x+1, y-2) |
| c3 | (x+1, y-1) | c8 | (x, y-2) |
| c4 | (x, y-1) | c9 | (x-1, y-2) |

The offsets depend on S. `bsize` selects between the three tap sets, which is
how one chain serves 16x16, 8x8 and 4x4 blocks. Border positions are streamed
but not coded.

### Arithmetic coder (`bac_encoder`)

For each coded pixel, the context addresses the probability RAM. The pixel and
its P(0) go to a binary arithmetic coder with:
- a 32-bit interval;
- the less probable symbol placed at the bottom, with size
  (range >> 16) x P(LPS);
- one bit of renormalisation per cycle while range ≤ 2^30;
- carry-free output using pending ("follow") bits;
- a flush that emits one decision bit followed by the pending bits.

This coder is self-consistent and decodable, but it is **not bit-exact** with
the MPEG-4 shape arithmetic coder.

## Size conversion: `size_conv`, `downsample`, `upsample`, `acq_detect`

### Decision order

With `conv_en` set, the BAB is tried as follows:
1. At ratio 1/4: reduce to 4x4, upsample back to 8x8 and then 16x16, and compare
   with the original.
2. If that is not acceptable, at ratio 1/2: 8x8 and back to 16x16.
3. Otherwise ratio 1.

"Acceptable" means no 4x4 sub-block has more than `alpha_thr` wrong pixels.

### Downsampling and upsampling

**Downsampling** is a majority vote over 2x2 or 4x4 cells, with ties going to
opaque.

**Upsampling** (`upsample`) computes four output pixels per input pixel A, one
per cycle, from a 12-pixel neighbourhood:

        E F
      L A B G
      K C D H
        J I

The output pixel is opaque when

    4A + 2(B + C + D) + (E + F + G + H + I + J + K + L) > Th[Cf]

where:
- Cf is the 8-bit word {E,F,G,H,I,J,K,L};
- the other three output pixels use the same template mirrored horizontally,
  vertically or both.

Block edges repeat the edge pixels. The unit takes 140 cycles for 4x4 to 8x8
and 388 cycles for 8x8 to 16x16.

## Departures from the original architecture

- **No pipelining across BABs.** Within a BAB, size conversion and CAE
  overlap motion estimation as in the original schedule. The next BAB,
  however, starts only after `done`.
- **Slower motion estimation.** It takes 1139 cycles instead of about 1040
  cycles, because the preload of each half is not hidden behind the previous
  half.
- **No inter-mode CAE.** Boundary BABs of P-VOPs are coded with intra CAE, so
  bab_type 5 and 6 are never produced.
- **No-update needs an exact match.** It is chosen only when the best SAD is 0,
  not after an error-tolerant comparison.
- **Neighbours are not used.** Border pixels taken from neighbouring BABs are 0
  here, both in CAE and in upsampling.
- **Missing units.** The motion-vector predictor unit and the variable-length
  coder of bab_type and MV differences are absent. The predictor is an input
  port.
- **Tables.** The probability and threshold tables are RAMs, not the
  standard's constants.
- **Own arithmetic coder.** It is a simple integer coder of my own, not the
  original Q-coder-derived one.
- **One BAB memory.** Only the current-BAB memory and the search-range buffer
  are instantiated. The other two 16x16 block memories of the original serve
  the inter-CAE path.

## Files

| Path | Contents |
|---|---|
| `rtl/shape_pkg.sv` | Shared types |
| `rtl/*.sv` | One module per file, named as above. `dp_sram` is a generic one-write/one-read synchronous RAM (old data on a read/write collision). |
| `tb/shape_ref_pkg.sv` | Reference models in plain SystemVerilog: arithmetic coder, context, CAE, up/downsampling, ACQ and size-conversion decision |
| `tb/tb_<module>.sv` | Self-checking testbench for each module |

Each testbench prints `TB_RESULT checks=.. failures=..` and has a watchdog.

`tb_shape_coder_top` runs the whole encoder at its only size:
- It loads the tables and codes a sequence of I- and P-VOP BABs against a
  behavioural reference-plane memory.
- It checks every output and every code bit.
- It checks that each P-VOP boundary BAB finishes within 3034 cycles, the budget of the unpipelined schedule.
- It requires every mode it can produce to occur at least once:
  - bab_type 0 to 4;
  - all three conversion ratios;
  - a stall of the CAE stream by the arithmetic coder.

`tb_vop_workload` codes two whole planes of 6x4 BABs: an I-VOP with an
elliptical object, then a P-VOP in which the object has moved and changed
shape. It checks each BAB as above, using the reported vector instead of a
full search. It then compares the cycles spent on each plane with 3297 cycles
per boundary BAB, which is the Core Profile Level 2 budget at 23.5 MHz. The
P-VOP needs about 1210 cycles per boundary BAB, with its transparent and
opaque BABs included.

## Simulating

With Verilator 5, for example for the top:

    verilator --binary --timing -Wno-fatal -y rtl -y tb \
        rtl/shape_pkg.sv tb/shape_ref_pkg.sv tb/tb_shape_coder_top.sv \
        --top-module tb_shape_coder_top -o sim && ./obj_dir/sim

Replace the testbench name for any other module.

The top testbench uses a run-time loop bound (`n16`) in its exhaustive
reference search. This keeps Verilator from unrolling 1024 x 256
comparisons at compile time.
