# Class-skipping binary motion estimation for MPEG-4 shape coding

MPEG-4 codes the shape of a video object as a binary mask cut into 16x16
binary alpha blocks (BABs). Binary motion estimation (BME) looks for the
16x16 block of the reference mask that best matches the current BAB, using a
SAD that for one-bit pixels is simply the number of differing pixels. A full
search over a -16..+15 range tries 1024 positions per BAB.

This engine skips most of them. The number of ones in a BAB is a cheap
summary of its content: a candidate with 35 ones is a far likelier match for
a block with 34 ones than a candidate with 189. Every candidate is therefore
put in a *class* by its count of ones, and the SAD is computed only for
candidates whose class equals (or is within a set distance of) the class of
the current BAB. Counting ones is done incrementally as the search slides
down the window, so deciding to skip a position costs 2 clock cycles, while
a SAD costs 16.

The RTL is SystemVerilog-2017, synthesizable, with no vendor cells.

## Datapath

```
             sr_wr_*                              cur_wr_*
                |                                    |
        +---------------+                    +---------------+
        |  SR buffer    |                    | current BAB   |
        |  48 x 48 bits |                    | 16 x 16 bits  |--> CurrMB (ones)
        +---------------+                    +---------------+
          row, pass |                              | row (16 bits, to all PEs)
                    v 31 bits                      |
            +---------------+                      |
            | data dispatch |  PE k <- bits [30-k:15-k]
            +---------------+                      |
              | 16 x 16 bits                       |
        +-----------------------------------------------+
        | 16 PEs: XOR -> MUX -> adder tree -> +/- acc    |
        |         count_reg (ones), sad_reg (SAD)        |
        +-----------------------------------------------+
              | counts                 | SADs
        +-------------+          +-----------+
        | class match |--mask--->|    CAS    |--> best SAD, motion vector
        +-------------+          +-----------+
              | any match
        +-----------------------+
        | control / address gen |
        +-----------------------+
```

| Module | Role |
|---|---|
| `bme_pkg` | sizes (16 PEs, 16x16 BAB, 48x48 window, 9-bit counts) and the PE operation type |
| `bme_adder_tree` | ones count of a 16-bit row, four levels of adders |
| `bme_pe` | one processing element: XOR, MUX, adder tree, add/subtract accumulator, `count` and `sad` registers |
| `bme_pe_array` | 16 PEs plus the data dispatch, the fixed wiring of the 31-bit window slice into 16 overlapping 16-bit rows |
| `bme_sr_buffer` | search-window buffer with the two-pass column selector |
| `bme_cur_bab` | current-BAB buffer and the CurrMB ones counter |
| `bme_class_match` | classification and class comparison for all 16 PEs |
| `bme_cas` | compare-and-select of the minimum SAD and its position |
| `bme_ctrl` | sequencer and address generator |
| `bme_top` | the engine |

## Window geometry: 16 PEs, two passes

The reference window is 48 pixels wide and 48 rows high; row 0 / column 0 is
the displacement (-16,-16) from the motion vector predictor. Candidate
(v, h), with v and h in 0..31, is the 16x16 block whose top-left pixel is
window pixel (v, h); its motion vector relative to the predictor is
(h-16, v-16).

The 16 PEs work on 16 horizontally adjacent candidates at once. They all read
the same window row: a 31-pixel slice of it, of which PE k takes pixels
k..k+15. Two slices cover the 32 horizontal offsets: pass 0 uses columns
0..30 (h = 0..15), pass 1 columns 16..46 (h = 16..31). Column 47 and row 47
are never read; 47 rows and 47 columns are all a -16..+15 search needs.

Pixel order inside words: bit 47 of a window row, bit 15 of a BAB row and
bit 30 of the dispatch bus are the leftmost pixel.

## The sliding ones count

Each PE's `count` register holds the number of ones in its candidate. At
the top of a pass all 16 counts are built in 16 cycles, one window row per
cycle. To move every candidate one row down, the PE adds the ones of the new
bottom row (v+16) in one cycle and subtracts the ones of the expired top row
(v) in the next. The one accumulator of the PE does both; a MUX in front of
the adder tree feeds it either the raw window row (counting) or the XOR of
the window row and the current-BAB row (SAD).

At each position the class match compares all 16 counts with CurrMB. If no
PE matches, the position is over in 2 cycles. If any match, all matching
PEs compute their SAD together in one 16-cycle slot (rows v..v+15 against
current rows 0..15) while the others stay idle; the count registers are
untouched during the slot. The class decision costs no cycle of its own:
the first cycle at a position is either the first SAD row or the add half of
the next slide.

## Schedule and latency

| Phase | Cycles |
|---|---|
| count the current BAB into CurrMB | 16 |
| per pass: count rows 0..15 | 16 |
| per pass: 31 slides (add, subtract) | 62 |
| per pass: decision at the last row | 1 |
| per row with at least one class match (a *slot*) | +16 |
| `done` | 1 |

From the clock edge that samples `start` to the cycle in which `done` is
high: **175 + 16 x slots** cycles. No match anywhere gives 175 cycles; a
full search gives 175 + 64 x 16 = 1199 cycles (1024 positions, 16 per slot).

The architecture this follows quotes 16 + 16 + 128 + 16 x #SP cycles (160
plus 16 per SAD slot). The difference of 15 cycles comes from counting the
first window of both passes (16 cycles each; the quoted formula counts one),
31 rather than 32 slides per pass, one decision cycle per pass end and the
`done` cycle. For a CIF frame with 198 shape blocks and the worst reported
average of 563 cycles per block (32-class overlap), this design needs about
578 x 198 = 114,444 cycles, i.e. 3.43 MHz for 30 frames/s, plus 48 cycles per
block to load the window if that is not overlapped with the previous search.

## Classes and matching

A count c is put in class ceil(c / 2^`class_shift`): with `class_shift` = 4,
class 1 holds 1..16 ones, class 2 17..32 and so on; with 0 every count is
its own class. A candidate matches when its class and CurrMB's class differ
by at most `overlap`. `full_search` makes every candidate match, which turns
the engine into a plain full search with no other change.

| Setting | `class_shift` | `overlap` |
|---|---|---|
| 256 classes, no overlap (largest skip rate) | 0 | 0 |
| 256 classes, 6 classes overlapping (bit rate close to full search) | 0 | 6 |
| 64 / 32 / 16 classes | 2 / 3 / 4 | 0 |
| full search | any | any, `full_search` = 1 |

Fewer classes or more overlap mean more SAD slots (more cycles) and a
better motion vector. Only uniform class widths exist; classes of different
widths for different count ranges, tuned to how often each count occurs,
cannot be configured.

The compare-and-select keeps the first minimum in scan order (pass, then
row, then PE index); a later candidate replaces it only with a strictly
smaller SAD. If no candidate matches, `mv_found` stays 0.

## Using `bme_top`

1. While `busy` is low, write the 16 current-BAB rows (`cur_wr_en`,
   `cur_wr_row`, `cur_wr_data`) and the 48 window rows (`sr_wr_en`,
   `sr_wr_row`, `sr_wr_data`), one row per clock. An assertion flags writes
   during a search.
2. Set `class_shift`, `overlap`, `full_search`, `mvp_x`, `mvp_y` and pulse
   `start` for one cycle. `start` is ignored while busy.
3. When `done` pulses, read `mv_found`, `mvd_x`/`mvd_y` (-16..+15),
   `mvs_x`/`mvs_y` (= predictor + mvd), `best_sad` and `curr_mb`. They hold
   until the next `start`. `n_slots` and `n_sp` give the number of SAD slots
   and SAD positions of that search, for measuring the skip rate.

Reset is asynchronous and active low. Memories are not reset; everything
the search reads is written first.

## Departures and choices

* **9-bit counters.** Count and SAD registers are 9 bits. The architecture
  calls for 8-bit count registers "up to 255", but an all-ones BAB holds 256
  ones and 8 bits would wrap it to 0.
* **Cycle count** differs from the quoted formula by 15 cycles, as above.
* **Uniform classes only** (see above).
* **Tie rule and no-match result** are this design's choices.
* **Buffers** are register arrays with a combinational row read. A real
  implementation may map the 48x48 window to a register file; the
  controller's timing assumes the row is available in the cycle it is
  addressed.
* **Frame memory** is outside the engine: the window arrives through the row
  write port, already cut out around the predictor, with pixels outside the
  object plane set by the caller.
* `n_slots`, `n_sp` and `mv_found` are additions for observation.

## Size

Synthesized coarsely with yosys, the engine has 364 flip-flops plus the
2,304-bit window buffer and the 256-bit current-BAB buffer, and about 630
word-level cells. The main costs are the 16 PEs (adder tree, 9-bit
accumulator and two 9-bit registers each) and the window buffer.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| Testbench | What it checks |
|---|---|
| `tb_bme_adder_tree` | all 65,536 inputs |
| `tb_bme_pe` | random op streams against a register model, 256-ones count |
| `tb_bme_sr_buffer` | every row in both passes, out-of-range rows |
| `tb_bme_cur_bab` | row read-back and CurrMB for random and opaque BABs |
| `tb_bme_class_match` | class boundaries of the 16-class layout, random configurations |
| `tb_bme_cas` | random slots against a first-minimum reference |
| `tb_bme_pe_array` | counts at every position of both passes, SADs with random enables |
| `tb_bme_ctrl` | every output in every cycle against an expected schedule, latency |
| `tb_bme_top` | ten full searches at full size against a reference search |
| `tb_bme_workload` | every boundary BAB of a synthetic CIF object plane, three settings |

`tb_bme_top` builds noisy binary objects, cuts the current BAB out of the
window, and checks CurrMB, the motion vector, the SAD, the number of slots
and SAD positions and the latency of 175 + 16 x slots. It requires at least
once: skipped positions, a slot with several matching PEs, matches in the
second pass, overlap, coarse classes, full search and a search with no
match.

`tb_bme_workload` moves and slightly reshapes a synthetic object (an ellipse
joined with a rectangle) on a 352x288 plane and searches each of its 36
boundary BABs, with the predictor at zero, in three settings. Every search is
checked against the reference, and the totals are printed:

| Setting | SAD positions (of full search) | Cycles per BAB | Mean SAD of the chosen vector |
|---|---|---|---|
| 256 classes, no overlap | 251 (0.68 %) | 254.6 | 10.22 |
| 256 classes, overlap 6 | 3,084 (8.37 %) | 603.4 | 0.42 |
| full search | 36,864 (100 %) | 1199 | 0.42 |

This one object is not a benchmark, but it shows the trade-off: exact class
matching cuts the SAD work by more than two orders of magnitude at some cost
in match quality, and a little overlap restores the full-search result here.
A BAB with no match at all counts as SAD 256 in the mean.

Run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/bme_pkg.sv tb/tb_bme_top.sv \
          --top-module tb_bme_top -Mdir obj_top -o sim
./obj_top/sim
```

Replace `tb_bme_top` by any other testbench name. Every testbench finishes in
well under a second.
