# Census stereo matcher for programmable logic

This is a streaming stereo-vision pipeline that turns a rectified pair of
256x256 grey-level images into a dense disparity map (32 disparity levels)
in about 34 ms at a 10 MHz clock, i.e. within one video frame. It follows a
published two-board FPGA system (the CSIRO "Configurable Logic Processor"
stereo matcher) and reproduces its structure: a census pass on one board,
then four matching passes of eight disparities each on a second board.

The key idea is to match *census words* instead of grey levels. A census
word records, for a small window, which neighbours are darker than the
centre pixel. It depends only on the ordering of intensities, so a gain or
offset difference between the two cameras leaves it unchanged, and comparing
two words needs only exclusive-or and a bit count. Every operation in the
design is therefore a comparator, an XOR, a small counter or an adder, which
is what makes it cheap to replicate in logic.

## The matching measure

For every pixel of both images:

1. **Census (5x5 window, 15 bits).** The centre pixel is compared with 15 of
   its 24 neighbours. Bit *k* is 1 when the *k*-th selected neighbour is
   *less* than the centre. The selected positions (`CENSUS_MASK` in
   `stereo_pkg`) are the whole inner 3x3 ring plus seven outer pixels:

       X . X . X
       . X X X .
       X X c X X
       . X X X .
       X . . . X

   Bits are numbered in raster order of the window, top line first.
   Pixels within 2 of the image border get the word 0.

2. **Per-pixel similarity.** For right pixel (x, y) and disparity d, the
   number of *equal* bits between the right word and the left word at
   (x+d, y): `15 - popcount(R ^ L)`. A left pixel past the right edge of the
   image contributes 0.

3. **Window sum.** The per-pixel similarities are summed over an 11x11
   window (at most 121 x 15 = 1815, 11 bits).

4. **Winner take all.** The output disparity of a pixel is the d in 0..31
   with the largest window sum. On a tie the smaller disparity wins. The map
   is referred to the right image: a scene point at column x in the right
   image is at x+d in the left one. Pixels closer than 7 to the border
   (2 for the census window plus 5 for the matching window) are output as 0.

## Data flow and pass schedule

```
            census_board (first board)                disparity_board (second board)
 in_left  ->  FS0 --+                                 
 in_right ->  FS1 --+-> 2 x census_transform -> FS2 (left census)   4 streams   8 lanes x (2 match_counter
                                                FS3 (right census) ----------->  + window_sum) -> disparity_max
                                                                                 -> best store (FS) -> out_disp
                          pass_controller: phases and raster pointers for both boards
```

Each board has four frame stores (`frame_store`, 512x512x8 by default,
modelled with a read/write port and a read-only port) reached through a
crossbar (`shuffle_network`) so that a store can be handed from one stage to
the next between passes.

One frame takes five passes, each a raster scan with one pointer step per
clock:

| pass | first board | second board | cycles at 256x256 |
|------|-------------|--------------|-------------------|
| census | reads FS0/FS1, writes census words to FS2/FS3 | outputs the *previous* frame's disparity map | 256*256 + 8 = 65 544 |
| match 0..3 | streams census words of FS2/FS3; accepts the *next* frame into FS0/FS1 | matches disparities 8p..8p+7, updates the best store | 256*263 + 8 = 67 336 each |

A frame therefore takes 334 888 cycles, 33.5 ms at 10 MHz (below the 40 ms
of a 25 Hz video frame). Input of frame n+1 overlaps the matching of frame
n, and output of frame n overlaps the census pass of frame n+1. If no frame
is waiting when matching ends, the controller runs an output-only pass. The
8 extra cycles per pass (`DRAIN`) let the pipelines empty before the stores
change hands.

## Inside a matching pass

This is the part of the design that needs the most care, because several
alignments have to agree.

**Four streams, 11 lines apart.** During a pass with base disparity b, the
first board reads each census store on both ports: line y on port A and line
y-11 on port B. That gives four words per clock: left(y), left(y-11),
right(y), right(y-11). The old lines are what makes the vertical part of the
11x11 sum cheap (below).

**Left read-ahead and the lead-in.** The left stores are read at column
c+b and the right ones at column c-7, where c is the pointer. On the second
board the left words pass through an 8-stage delay line; when the right word
of column x = c-7 arrives, tap 7-k holds the left word of column x+b+k, so
lane k sees disparity b+k. Each line is scanned for W+7 clocks: the first 7
only fill the delay line, so it never mixes two lines. Words whose column
falls outside the image carry a valid flag of 0, and their match count is
forced to 0.

**Sliding sums.** Each lane has two `match_counter`s (line y and line y-11)
and a `window_sum`:

    C(x,y) = C(x,y-1) + m(x,y) - m(x,y-11)        column sum, one line of memory
    S(x,y) = S(x-1,y) + C(x,y) - C(x-11,y)        row sum, 11-entry shift register

with C = 0 above the first line and S restarting at x = 0, so no memory has
to be cleared between passes. S(x,y) covers columns x-10..x and lines
y-10..y.

**Coordinates.** Census words are stored at the trailing corner of their
5x5 window (the word of pixel (p,q) sits at address (p+2,q+2)), and window
sums at the trailing corner of their 11x11 window. A best-store address
(a,b) therefore belongs to image pixel (a-7, b-7). Both images are shifted
alike, so disparities are unaffected; the output pass simply reads address
(u+7, v+7) for output pixel (u, v).

**Best store.** `disparity_max` picks the best of the 8 lanes. The stored
record `{sum[10:0], disp[4:0]}` of the same pixel is read on port B of the
best store; it is overwritten on the first pass, or when the new sum is
strictly larger. From stream word to store write is 4 clocks.

## Interface of `stereo_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| in_valid, in_ready | in, out | 1 | handshake for one left/right pixel pair |
| in_left, in_right | in | 8 | pixels in raster order, line by line |
| out_valid | out | 1 | one disparity pixel, raster order, no back-pressure |
| out_disp | out | 5 | disparity 0..31 |
| out_x, out_y | out | log2(W), log2(H) | its position |
| phase, pass_idx | out | 2, 2 | current pass (idle, census, match, output) |
| frame_done | out | 1 | pulse at the end of a frame's last matching pass |
| upd_improve | out | 1 | a later pass replaced a stored best match |

`in_ready` is low from the moment a complete frame is stored until its
census pass is over. The source must then hold its pixel pair (an assertion
in `census_board` checks this). The output stream has no handshake: the
sink must take one pixel per clock during the output pass.

Parameters: `IMG_W`, `IMG_H` (256), `FS_AW` (18: a frame store holds
2^FS_AW bytes; census and best-match stores use the same capacity as
2^(FS_AW-1) 16-bit words; `IMG_W*IMG_H` must fit in the latter) and `DRAIN`
(8). The census pattern, window sizes, 8 disparities per pass and 4 passes
are constants in `stereo_pkg`.

## Files

| file | contents |
|------|----------|
| `rtl/stereo_pkg.sv` | widths, census mask, `best_t` record, `phase_e` |
| `rtl/frame_store.sv` | two-port synchronous RAM |
| `rtl/shuffle_network.sv` | store-port crossbar |
| `rtl/census_transform.sv` | line buffers, 5x5 window, 15 comparators |
| `rtl/match_counter.sv` | XOR and count of equal bits |
| `rtl/window_sum.sv` | column-sum memory and row sum of one lane |
| `rtl/disparity_max.sv` | maximum of 8 sums and its index |
| `rtl/pass_controller.sv` | pass sequence and raster pointers |
| `rtl/census_board.sv` | first board: input, census pass, stream reader |
| `rtl/disparity_board.sv` | second board: lanes, best store, output |
| `rtl/stereo_top.sv` | the two boards and the controller |
| `tb/stereo_ref_pkg.sv` | reference model: census by definition, window sums by summed-area table |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_stereo_full` |

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
through a watchdog if it hangs. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/stereo_pkg.sv tb/stereo_ref_pkg.sv tb/tb_stereo_top.sv --top-module tb_stereo_top
./obj_dir/Vtb_stereo_top
```

(Substitute any testbench name.) The tests:

* `tb_stereo_full` runs one complete 256x256 frame at the default
  parameters (a few seconds). The right image is the left one shifted by 2,
  9, 18 and 27 pixels in four bands, one for each matching pass, and
  brightened by 40 grey levels. It checks all 65 536 output pixels against
  the reference model and the pass lengths. It reports 334 888 cycles per
  frame, and the true disparity at every fully covered pixel.
* `tb_stereo_top` sends two 48x32 frames back to back, the second with a
  gain and an offset between the cameras, and checks every output pixel. It also requires input back-pressure, input during matching,
  output during a census pass, an output-only pass and a later pass
  improving a stored match to each occur at least once.
* `tb_census_board` and `tb_disparity_board` test each board on its own, with
  the other board's side emulated by the testbench. The disparity-board test
  includes a periodic pattern whose sums tie across passes, to check the tie
  rule.
* `tb_census_transform`, `tb_window_sum`, `tb_match_counter`,
  `tb_disparity_max`, `tb_frame_store`, `tb_shuffle_network` and
  `tb_pass_controller` test the leaf modules against direct computations;
  `tb_census_transform` also checks its 2-clock latency, and
  `tb_pass_controller` the exact length and order of every pass.

Under `verilator --lint-only -Wall` the modules give only notices: unused
signals (spare frame-store ports, bit 15 of the 16-bit census words),
package constants a module does not use, and SYNCASYNCNET, because the
input-handshake assertion samples `rst_n` in its `disable iff`.

## What follows the published system and what does not

Taken from it: the census transform with 15 comparisons in a 5x5 window;
matching by XOR and counting equal bits; the 11x11 window built from
column and row sums, with census words read 11 lines apart; 8 disparities
in parallel and 4 passes for 32; the running maximum kept per pixel across
passes; the split into a census board and a disparity board with four frame
stores each behind a switch; 256x256 images; a five-pass frame of about
34 ms at 10 MHz, with input and output overlapped with processing.

Choices made here, where the published description gives no detail:

* which 15 neighbours the census uses, and its bit order;
* the tie rule (smaller disparity wins, within and across passes);
* border behaviour (census 0 near the border, left pixels past the edge
  score 0, output 0 within 7 pixels of the border);
* storing a 15-bit census word and a 16-bit best-match record as one 16-bit
  word, and modelling the 20 ns RAMs as two-port memories;
* the left read-ahead with a 7-cycle lead-in per line, and the 8-cycle
  drain (together they set the pass length to 67 336 cycles, against the
  quoted 6.8 ms per pass);
* the video ports: a valid/ready pixel-pair stream in and a plain valid
  stream out. The original board used Datacube MAXBUS video timing, which is
  not modelled;
* an output-only pass when no new frame is waiting.

Not included: the VMEbus interface used to load the FPGA configurations,
the MAXBUS video interface, the rank-transform alternative, and the
successor multi-module processor, which is described only at the product
level.
