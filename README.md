# Enhanced Diamond Search motion estimator

Block-matching motion estimation looks for the position in a reference frame that best matches a
16x16 block of the current frame. "Best" means the smallest sum of absolute differences (SAD).
A full search inside a 32x32 area computes the SAD at all 17 x 17 = 289 displacements. This design
computes it at about ten to twenty of them instead. It follows a cross-shaped pattern downhill on the
SAD surface, which is the Enhanced Diamond Search (EDS). Five processing elements (PEs), one per
point of the pattern, work in parallel. Each PE takes eight pixel pairs per clock, so one
pattern step costs 32 clocks of streaming.

The RTL is synthesizable SystemVerilog in `rtl/`. There is a self-checking testbench for every module in `tb/`.

## The search

Two patterns are used (offsets in pixels, x to the right, y downwards):

* **Large cross diamond pattern (LCDP):** the centre and the four points at (+-2, 0) and (0, +-2).
* **Small cross diamond pattern (SCDP):** the four points at (+-1, 0) and (0, +-1) around a centre.

A block is searched as follows:

1. The LCDP is placed at (0, 0) and all five SADs are computed.
2. If the minimum is on an arm, the LCDP moves there and is evaluated again. Only points not
   seen before are computed. The new centre's SAD is already known: it is the minimum just found.
   After a straight move three new arms remain. After a turn, one more arm is a point that was an
   arm two steps ago, so only two new arms remain. Points outside the range of -8..+8 are skipped.
   This repeats until the minimum stays at the centre.
3. The SCDP's four points around that centre are computed. The best of the five (the centre
   included) is the motion vector.

Ties keep the centre, then the earlier arm in the order +x, -x, +y, -y. So every move strictly
lowers the minimum, and the walk ends. The longest walk, from (0,0) to a corner, is eight moves.

## Datapath

```
 write ports ──► current block memory (16x16 B) ─┐
 write ports ──► reference memory   (32x32 B) ───┤ 5 read ports
                                                 ▼
 data-fetch initializer ──addresses──► data-fetch unit ──DI──► PE array (5 PEs) ──SAD0..4──► comparator ──► MV, SAD, position
 PE array enabler ─────────────── EN ───────────────────────────────▲
 timing and control FSM ── control word (clr, init, fetch, cmp, scdp, first) ──► all blocks
```

* **Memories:** both are register arrays with byte writes and read ports that need no clock. The
  reference memory has one port per PE, so all five candidate blocks are read in the same clock. A port
  returns eight horizontally adjacent pixels.
* **Data-fetch initializer** (`data_fetch_initializer`): at the start of each step it registers
  each PE's candidate block corner, `(8 + y + dy*radius, 8 + x + dx*radius)`. It also registers how
  many PEs run and the beats per block (32).
* **Data-fetch unit** (`data_fetch_unit`): sends 32 beats, one per clock. Beat *t* is row *t/2*,
  with the left or the right eight columns. Its output register is pipeline stage 1.
* **PE array enabler** (`pe_array_enabler`): switches on only the PEs of new, in-range points, as
  listed in step 2. The centre PE runs only in the first step. A switched-off PE holds all its
  registers, and this is where the power saving comes from.
* **PE array** (`pe_array`, `processing_element`): five PEs share the current pixels.
* **Comparator** (`sad_comparator`): it starts from the centre's SAD, which is PE 0's result in
  the first step and the kept minimum after that. It then checks the four arms in order, with one
  16-bit less-than tree each (`sad_less`). On the compare strobe it registers the minimum, the
  winning point and the motion vector.

## Inside a processing element

Each PE is a four-stage pipeline:

| stage | register holds |
|---|---|
| 1 | eight current and eight reference pixels (in the data-fetch unit) |
| 2 | eight absolute differences |
| 3 | four carry-save rows from the compressor array |
| 4 | the accumulated SAD (16 bits; 256 x 255 = 65,280 at most) |

The SAD of a block is ready two clocks after the clock edge that takes its last beat.

### Absolute difference without a subtractor

`abs_diff_unit` first decides which of C and R is larger with a comparator tree. Eight one-bit
cells (`cmp1bit`) each give *less* (`~c & r`), *greater* (`c & ~r`) and *differs* (`c ^ r`).
Seven combining cells (`cmp2bit`) merge neighbouring fields, and the more significant field's
verdict wins unless it is equal. Two XOR arrays then invert the smaller operand:

```
A = C ^ {8{C<R}},  B = R ^ {8{C>R}}
```

Inverting an 8-bit value gives 255 minus the value. So for C != R the sum A + B + 1 (mod 256) is
the larger operand minus the smaller one. For C == R both words are masked to zero, and the result is 0.

### Compressor array

The eight differences of a beat are added in carry-save form by `compressor_array`, one
pair of compressors per bit column *j*:

* a **3-2 compressor** (`compressor_3_2`, a full adder built from two XORs and a multiplexer) adds
  bits A0..A2;
* a **5-2 compressor** (`compressor_5_2`) adds A3..A7. It also adds the 3-2 sum of its own column
  (`cin2`) and the 3-2 carry coming from column *j-1* (`cin1`). All seven inputs of the 5-2
  compressor have the same weight: `a3+..+a7+cin1+cin2 = sum + 2*(cout+cout1+cout2)`. Inside it, a
  majority gate gives `cout1`. A multiplexer gives the majority of a7, cin1 and cin2 as `cout2`. A
  final XOR and multiplexer pair gives `sum` and `cout`.

The column's sum bit and its three carries form four 11-bit rows. Stage 4 adds these four rows to
the accumulator.

## Minimum comparator

The comparator's less-than trees mirror the difference unit. Its one-bit cell (`lcmp1bit`) gives
`a < b` as `~a & b` and *differs* as an XOR. Its combining cell (`lcmp2bit`) gives
`lt = hi_lt | (~hi_ne & lo_lt)`. A W-bit tree has W leaf cells and W-1 combining cells.

## Timing and control

`control_unit` is a ten-state machine:

| state | name | what happens |
|---|---|---|
| S0 | CLEAR | datapath cleared; waits for `start` |
| S1 | DI | external writes accepted; `load_done` moves on; centre := (0,0) |
| S2 | large-pattern init | initializer and enabler register the step |
| S3 | SAD computation | one fetch strobe; waits until fetch and PE pipelines are empty |
| S4 | compare | comparator registers minimum, position, vector |
| S5 | step complete | PEs cleared; minimum on an arm → move centre, back to S2; else S6 |
| S6 | small-pattern init | as S2 with radius 1 |
| S7 | SAD computation | as S3 |
| S8 | compare | as S4 |
| S9 | FINISH | `done` for one clock, then S0 |

The states and their duties describe a "horizontal" phase (S2-S5) and a "vertical" phase
(S6-S8). This design takes the first as the large-pattern walk, which loops, and the second as
the single small-pattern step.

A search step (S2 to S5) takes 40 clocks: 1 init, 1 fetch strobe, 32 beats, 3 pipeline clocks,
1 clock to see the datapath idle, 1 compare and 1 step-complete. A block needs (steps + 1) x 40
clocks after loading: 80 clocks when the first LCDP already hits the centre, and 400 in the
worst case. Loading takes 1,280 clocks at one byte per clock. Loading dominates: about
1,700 clocks per block in the worst case. For CIF video (352x288, 396 blocks per frame) at 30
frames/s, that is 20 M clocks/s, which is well within a clock of a few hundred MHz.

## Interface (`eds_me_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | begin a block (S0 → S1) |
| `cur_we`, `cur_waddr`, `cur_wdata` | in | 1, 8, 8 | current-block pixel write, address row*16+col |
| `ref_we`, `ref_waddr`, `ref_wdata` | in | 1, 10, 8 | reference pixel write, address row*32+col; reference (8,8) is displacement (0,0) |
| `load_done` | in | 1 | memories loaded (S1 → S2) |
| `accept_input` | out | 1 | writes are taken only while this is high |
| `busy` | out | 1 | search running |
| `done` | out | 1 | one-clock pulse; results are valid from here until the next block |
| `mv` | out | 2 x 5 signed | motion vector {x, y}, each -8..+8 |
| `min_sad` | out | 16 | SAD at `mv` |
| `position` | out | 3 | winning pattern point of the last step (0 centre, 1 +x, 2 -x, 3 +y, 4 -y) |
| `points` | out | 8 | SADs computed for this block |
| `steps` | out | 8 | large-pattern steps for this block |

Shared constants and types (block size, search area, PE count, control word, pattern points) are
in `eds_pkg`. `BLK = 16`, `WIN = 32`, `NPE = 5` and the eight pixels per clock are tied together:
the fetch beat order and the address widths assume these values.

## Design choices beyond the published architecture

The block structure, the pattern rules, the five PEs, the four-stage PE pipeline, the comparator
and compressor cells and the ten control states come from the published architecture. The
following are this design's own choices:

* Eight pixels per PE per clock. This follows from the stated 32 clocks per SAD of a 16x16 block.
  Those 32 clocks are the streaming beats. Pipeline drain and the FSM's own states add 8 clocks,
  so one step takes 40.
* y grows downwards (row direction), so a block that moved up gives a negative `mv.y`.
* The enable rule that produces "three or two new points", and the tie rule. A point seen three
  or more steps earlier in a zig-zag may be computed again; this does not change the result.
* The small-pattern step runs once and always ends the search, whether or not its minimum is at
  the centre.
* The way A, B and the not-equal flag become |C-R| (the masked A + B + 1).
* The wiring of the compressor columns: `cin1` takes the neighbouring column's 3-2 carry so that
  all weights match. The final four-row addition happens in the accumulator's adder.
* The two-bit combining cells use the standard cascade. Their drawn gate-level wiring is only
  partly readable, and the one-bit cell's XOR output is a not-equal signal.
* Memories are register arrays with five read ports. The write interface (byte ports, open only
  in S1) and the `start`/`load_done` handshake are also this design's choices.
* Reading the "horizontal/vertical" phases as the large and small patterns.

Size: synthesis of `eds_me_top` gives about 1,070 flip-flops plus 10,240 bits of pixel storage
(2,048 current, 8,192 reference). It has no latches. The five-port reference memory becomes a wide
multiplexer. A target with block RAM would need another organisation for the reference memory,
such as one copy per PE.

Not reproduced: the quality results on real video (search points per block, SAD per pixel,
PSNR), which need the test sequences, and the FPGA timing and area figures.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/eds_pkg.sv \
          $(ls rtl/*.sv | grep -v eds_pkg) tb/tb_eds_me_top.sv \
          --top-module tb_eds_me_top -o sim
./obj_dir/sim
```

The package must come first and must be listed only once. For a single block, use that block's
testbench and top module name (`tb_<module>`). The end-to-end run takes well under a second.

* `tb_eds_me_top` runs 60 blocks at full size: random noise, and smooth "blob" images where the
  current block is a displaced copy of the reference. It checks the motion vector, SAD, number of
  SADs and number of steps against a loop-based model of the same search. It checks that each step
  streams exactly 32 beats. It also requires every mechanism to occur: an immediate centre hit,
  straight moves (three new points), turns (two new points), points outside the range, switched-off
  PEs, and small-pattern winners both on and off the centre. Last, it writes while the estimator is
  idle and checks that those writes are ignored.
* `tb_eds_cif_frames` runs three whole CIF frames (396 blocks each) of a synthetic texture. The
  background moves by a global motion and a rectangular object moves its own way. Every block is
  checked against the model. Each frame, loading included, must fit within 1/30 s at 397.84 MHz
  (13.26 M clocks). The measured cost is 0.56 to 0.61 M clocks per frame. The bench also prints
  the average search points per block: 13 to 21 on these synthetic frames. These numbers say
  nothing about natural video.
* The cell testbenches (`cmp1bit`, `cmp2bit`, `lcmp1bit`, `lcmp2bit`, both compressors,
  `abs_diff_unit`) are exhaustive. `compressor_array` is random plus corner cases.
* The PE, PE array, memory, fetch, initializer, enabler, comparator and control testbenches each
  check their block against values computed in the bench, including latencies.
