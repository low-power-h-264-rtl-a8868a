# Two-step, pixel-truncated motion estimation for H.264

Integer motion estimation dominates the energy of a small H.264 encoder.
This design is a 16x16-macroblock motion estimator that spends most of its
search at low precision. It first matches every candidate using only the
two most significant bits of each pixel. It then runs a short full-precision
search around the place the first pass points to. The expensive 8-bit
arithmetic, and most of the search-area memory traffic, are confined to a
quarter of the search area.

The estimator also runs a conventional full search at 8 bits. Each macroblock
picks its mode at start, so the two results can be compared on the same data.
In both modes the output is the full H.264 variable-block-size decision: the
best way to split the macroblock into 16x16, 16x8, 8x16, 8x8, 8x4, 4x8 or 4x4
blocks, plus a motion vector for every 4x4 block.

## The search

Default sizes give a first-pass range of P1 = 8, so candidates run over
[-8, 7] in x and y: 256 candidates. The second-pass range is P2 = P1/2 = 4.

1. **Low-resolution pass.** Every pixel of the current macroblock and of the
   search area is cut to its two MSBs (`& 8'b1100_0000`). The matching cost
   is the *difference pixel count* (DPC): the number of pixels whose two
   bits differ. The comparator tracks the minimum for all 41 partitions, as
   it always does. Only the four 8x8 results (quadrants A, B, C, D) are used
   from this pass.
2. **Second search centre.** From the four 8x8 vectors, take the minimum
   and maximum of each component. The centre is the mid-point
   `((min+max)>>1)` per component. It is then clamped to [-(P1-P2), P1-P2],
   so the second window stays inside the stored search area.
3. **Refinement.** An 8-bit SAD search over [c-P2, c+P2-1] in both
   directions (64 candidates) produces fresh minima for all 41 partitions.
   The decision unit chooses the partitioning from these.

The low-resolution pass sees the 8x8 quadrants rather than the whole
macroblock, so a macroblock whose quadrants move differently still gets a
centre in the middle of their motion. The clamp is this design's choice:
without it, a centre near the edge of the range would need pixels that were
never loaded.

In conventional mode (`two_step = 0`), step 3 runs alone over all 256
candidates with centre 0.

## Datapath: two PE arrays, one adder tree

`me_combine` holds two 16x16 arrays of processing elements that see the
same pixels:

* `sad_pe`: 8-bit current and search registers, |c - s|.
* `dpc_pe`: 2-bit registers, `|(c ^ s)`, a single bit.

Each PE's search register loads from its upper, lower or right neighbour
(`sel`). The whole window can therefore move one pixel down, up or left per
clock. A new row enters at the bottom or top edge, or a new column at the
right edge.

`low_res` picks which array feeds the single adder tree, comparator and
decision unit. Only that array loads search pixels; the other array holds
still. The DPC bit enters the 8-bit tree in bit 0.

`adder_tree` is combinational. It forms the sixteen 4x4 sums and builds the
other 25 partitions from them. Partitions are numbered in `me_pkg`:

* 0-15: 4x4
* 16-23: 8x4
* 24-31: 4x8
* 32-35: 8x8 (A..D)
* 36-37: 16x8
* 38-39: 8x16
* 40: 16x16

`comparator_unit` keeps, per partition, the lowest cost and its vector. It
updates only on a strictly lower cost, so the first candidate in scan order
wins a tie.

`decision_unit` compares four totals:

* 16x16;
* 2 x 16x8;
* 2 x 8x16;
* the sum over the four quadrants, where each quadrant takes the cheapest of
  8x8, 2 x 8x4, 2 x 4x8 and 4 x 4x4.

Ties go to the larger block. The cost is distortion only: there is no
motion-vector rate term.

## Scan order and timing

The array evaluates one candidate per clock. The scan is a vertical
serpentine: down the first column of candidates, one step right, up the
next column, and so on. Each move needs exactly one new 16-pixel row (at
the bottom when going down, at the top when going up) or one new 16-pixel
column (at a column change).

The controller in `me_mc_m8p` requests that row or column from the
search-area memory in the same clock that it evaluates the current
candidate. It moves the array when the memory answers. It also sends the
memory a *prefetch hint* for what it will need next:

1. the next four-row group of the current column;
2. then the column for the step right;
3. then the first row of the next column.

A macroblock starts like this:

* 16 clocks load the current macroblock into both arrays, overlapped with
  loading the first candidate's 16 rows.
* The scan follows.
* A two-step macroblock repeats the row loading for the second window.

Measured clocks from `start` to `done` with the default sizes:

| mode | candidates | clocks per macroblock | bank words read |
|------|-----------:|----------------------:|----------------:|
| full search, 8-bit SAD | 256 | 410 | 4652 |
| two-step (DPC + SAD) | 256 + 64 | 443-472 | 2583-3095 |

Both modes stay under 500 clocks per macroblock. That is the figure needed
for QCIF at 30 frames/s with a 1.4 MHz clock: 99 x 30 x 472 = 1.40 M
clocks/s.

The two-step search does more candidates in slightly more time. It reads
about 40% fewer memory words, and three quarters of its candidates use
1-bit PE outputs instead of 8-bit ones. The next section explains how the
memory reads only the bits the low-resolution pass needs.

## The bit-transposed search-area memory (`sa_mem8pre`)

The search area (32x32 pixels at the default size, covering the 31x31 that
P1 = 8 needs) lives in 16 single-port banks of 64 x 8 bits. That is the
same capacity as a plain pixel-per-word memory. The low-resolution pass
still reads only the bits it uses.

**Groups and planes.** Four vertically adjacent pixels form a *group*:
column x, rows 4g .. 4g+3, pixels a, b, c, d from top to bottom. The group
is stored as four words, one per bit pair ("plane"):

    plane p word = { d[2p+1:2p], c[2p+1:2p], b[2p+1:2p], a[2p+1:2p] }

Plane 3 holds the four pixels' MSB pairs. A low-resolution read of four
pixels is therefore one word; a full-resolution read is four words in four
clocks.

**Placement.** A group lives in bank `(x + g) mod 16` at address
`((g * W/16 + x/16) * 4 + p)`. W is the search-area width.

* A row read touches the 16 groups of row group g at columns x .. x+15.
  Those sit in 16 different banks, so all 16 are read in parallel.
* A column read touches at most five groups of one column. Those sit in
  five different banks, because of the diagonal (ladder) offset.

**Buffers.** A fetch captures the words into one of three *row buffers*
(four rows x 16 pixels, one group row) or into the *column buffer*. The
full-resolution bit pairs are reassembled into 8-bit pixels there. Any
later read of a row of that group, or of the buffered column, is answered
in the same clock (`rd_valid` is combinational on a hit).

* Low-resolution reads return `{2 MSBs, 6'b0}`.
* A miss costs 3 clocks at low resolution and 6 clocks at full resolution.
* Fetches are pipelined: the next one starts while the previous one's last
  words are still being captured.
* The three row buffers are filled in turn, skipping the one that is
  serving the current read. The scan can then consume one group while the
  next waits and the one after is fetched.

**Bandwidth.** At full resolution one group row (4 rows) costs 64 bank
reads in 4 clocks. That is one row per clock, exactly the rate of the
scan, so the prefetching matters. At low resolution it costs 16 reads in 1
clock, and the memory is mostly idle.

**Writes.** A group of four pixels is offered on `wr_*` with a
valid/ready handshake. The memory transposes it and writes the four planes
in four clocks. Writing invalidates all buffers, and `wr_ready` is low
while a read is pending.

## Top-level interface (`me_mc_m8p`)

Parameters:

* `P1 = 8`: first-pass range [-P1, P1-1].
* `P2 = P1/2`: second-pass range.

The search-area memory side is `2*P1 + 16`.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `cur_we`, `cur_waddr`, `cur_wdata` | in | 1, 8, 8 | write one pixel of the current macroblock at row*16+column |
| `sa_wr_valid` / `sa_wr_ready` | in/out | 1 | search-area group write handshake |
| `sa_wr_x`, `sa_wr_g`, `sa_wr_pix[4]` | in | 5, 3, 4x8 | group column, group index (rows 4g..4g+3), pixels top first |
| `start`, `two_step` | in | 1 | start pulse while idle; search mode sampled at start |
| `busy`, `done` | out | 1 | running; one-clock pulse when results are valid |
| `mb_mode`, `sub_mode[4]` | out | 2, 4x2 | chosen partition; sub-partition per 8x8 quadrant (valid in 8x8 mode) |
| `total_cost` | out | 18 | cost of the chosen partitioning |
| `mv_4x4[16]` | out | 16x(2x6) | signed motion vector of each 4x4 block, raster order |
| `centre` | out | 2x6 | second search centre (0 in full-search mode) |
| `bank_reads`, `cycles` | out | 32, 16 | search-area words read since reset; clocks of the last macroblock |

Search-area row 0, column 0 is displacement (-P1, -P1). The block at
displacement (0, 0) therefore starts at (P1, P1).

Results hold until the next `start`. Write the current macroblock and the
search area before pulsing `start`, and do not write while `busy`.
Loading a 32x32 search area through the group port takes 256 groups x 4
clocks. That loading is not overlapped with a search.

## What comes from the source design and what does not

These parts follow the published architecture:

* the two-step algorithm;
* DPC on two MSBs;
* the centre formula;
* P2 = P1/2;
* the me_combine structure (two PE arrays sharing the tree, comparator and
  decision unit);
* 16 banks of H x W/16 words;
* four-pixel bit-pair transposition, with one word per group at low
  resolution and four words realigned at full resolution;
* the sub-500-clock budget.

These are choices of this design:

* **Decision rule.** The lowest summed cost, ties to the larger partition,
  no rate term.
* **Centre.** The rounding (toward minus infinity) and the clamp.
* **Group shape.** A group is four *vertically* adjacent pixels. Also the
  bank and address formulas, the three row buffers and one column buffer,
  and the prefetch hints.
* **Scan.** The serpentine order and the load sequence.
* **Protocol.** The start/done protocol and the write handshakes.
* **Ranges.** [-P1, P1-1] and [c-P2, c+P2-1] are read as half-open, as in
  "[-8, 7]".
* **Search area.** It is 32x32 rather than 31x31, so that rows fall into
  whole groups.
* **Scan time.** The source quotes 256 clocks to scan the 256 candidates.
  Here a full search takes 410 clocks from start to done. That includes
  loading the first window and waiting for column fetches, since every
  full-resolution access reads four bit-pair words.
* **Cost width.** Every partition cost is 16 bits wide. The source sizes
  them from 12 to 16 bits by partition.
* **Power.** There is no power or clock gating. The idle PE array simply
  does not load new pixels. No power figures were measured.

Not built:

* the surrounding H.264 encoder (motion compensation, integer transform
  and quantiser, deblocking filter, entropy coder, frame memory and
  pipeline buffers);
* the alternative memory organisations (separate 2-bit and 8-bit memories,
  or a plain 8-bit memory read at full width);
* the split computation unit that the source compares against.

CIF video with a [-16, 15] range corresponds to `P1 = 16`, which gives a
48x48 search-area memory. That size is simulated end to end. It takes at
most 1576 clocks per two-step macroblock and 1434 per full search. CIF at
30 frames/s is 396 x 30 = 11880 macroblocks/s, which needs a clock of
about 19 MHz.

## Verification

Every module has a self-checking testbench in `tb/`, and each prints
`TB_RESULT checks=N failures=M`. `tb/me_ref_pkg.sv` is an independent
reference model. It computes partition costs from pixel arrays, runs the
same serpentine search in either precision, the centre rule and the
decision.

* `tb_me_mc_m8p` runs the top at its default size on 8 macroblocks: global
  motion, different motion per quadrant, motion at the edge of the range
  (clamped centre) and flat content (ties). It runs both search modes and
  compares every output, including the centre and the cycle bound
  (< 500).
* It also counts, and requires, each mechanism:
  * both modes;
  * a centre clamp;
  * 16x16 and 8x8 decisions;
  * low- and full-resolution demand fetches;
  * row and column prefetches;
  * scan stalls.
* `tb_me_mc_m8p_cif` runs the same test at `P1 = 16`, with a bound of 1700
  clocks.
* `tb_sa_mem8pre` writes a random search area. It reads rows and columns
  at random positions, aligned and unaligned to the groups, in both
  precisions, and compares them with a pixel array. It checks hit and miss
  latencies, bank-word counts per fetch and prefetch behaviour.
* The unit testbenches cover the PEs, array moves, adder-tree partitions,
  comparator ties, decision ties, centre rounding and clamp, and the
  current-macroblock memory.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/me_pkg.sv tb/me_ref_pkg.sv tb/tb_me_mc_m8p.sv \
        --top-module tb_me_mc_m8p -o sim
    ./obj_dir/sim

Substitute any other `tb/tb_<module>.sv` to test a single block. The
`me_ref_pkg.sv` argument is needed only by testbenches that import it.
`-y rtl` lets Verilator find each module in `rtl/<module>.sv`.

## Files

* `rtl/me_pkg.sv`: sizes, pixel/cost/vector types, partition numbering.
* `rtl/me_mc_m8p.sv`: top and scan controller.
* `rtl/me_combine.sv`: the computation unit.
* `rtl/pe_array.sv`, `rtl/sad_pe.sv`, `rtl/dpc_pe.sv`: the arrays and PEs.
* `rtl/adder_tree.sv`, `rtl/comparator_unit.sv`, `rtl/decision_unit.sv`.
* `rtl/search_centre.sv`: the second search centre.
* `rtl/sa_mem8pre.sv`, `rtl/sram_sp.sv`: the transposed search-area memory
  and its banks.
* `rtl/cur_mb_mem.sv`: the current-macroblock memory.
* `tb/`: one testbench per module, plus the reference model.
