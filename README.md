# Binary-image motion estimation for power-constrained video encoders

Motion estimation is the costliest part of a video encoder. For each 16x16
macroblock (MB) of the current frame, it finds the displacement into a
reference frame that matches best. This design replaces 8-bit pixel matching
with matching on *binary* images, one bit per pixel. The distortion of a
candidate is then the number of differing bits, the sum of XORs (SOD). An
adder tree of 256 one-bit XORs is much smaller and uses much less power than
one of 256 eight-bit absolute differences.

The RTL holds two independent estimators built on this idea. They sit side by
side in the top module `pa_ibs_top`, each with its own ports:

* **PA-IBS** (power-adaptive iterative binary search), made of `bip` and
  `ibs_me`. Each frame is turned into eight bit-planes by eight different
  filters. The search can run over 1 to 8 of these planes; more planes give
  better vectors and cost more power. How many planes are used (phi) is
  chosen per MB from how irregular the neighbouring motion vectors are. The
  clock is slowed to match, so one MB always takes about the same time.
* **BBME** (binary block motion estimation with B-frame support), in `bbme`.
  This is a three-level binary pyramid search. Two shared SOD units search
  forward and backward at the same time for B pictures, or split a P
  picture's candidates between them.

Everything is synthesizable SystemVerilog. Nothing outside this design is
modelled, such as the frame buffer or the rest of the encoder. Testbenches
feed the memories directly.

## PA-IBS: from pixels to bit-planes (`bip`, `bip_filters`)

`bip` takes a W x H frame in raster order, one 8-bit pixel per cycle, through
a valid/ready handshake. The defaults are CIF, 352 x 288.

For each pixel, `bip_filters` applies eight high-pass filters:
* two 3x3 kernels;
* six 4x4 third-order kernels.

Each output bit is 1 when its filter response is >= 0.

Four row buffers, used as a ring, hold the rows the 4x4 window needs. A pixel
is produced once the pixel one row below and one column to the right has
arrived. Pixels outside the frame repeat the nearest edge pixel. Input is
held off for about two cycles per row while a row buffer is still needed.

Which pixel each kernel is centred on is this design's reading of the
coefficient table.

## PA-IBS: the search (`ibs_me`)

### Data layout

The ±16 search window of an MB is 48 x 48 binary pixels. It is stored as
thirty-six 8x8 *regions*: region (bx, by), with bx and by in 0..5, for each of
eight planes (z) and for two ping-pong halves (pp).

`lm_ref` has nine banks of 64 words x 64 bits, built on `tp_regfile`. Region
(bx, by) goes to:
* bank (by mod 3)·3 + (bx mod 3);
* word 32·pp + 4·z + 2·(by/3) + bx/3.

The 3 x 3 regions around any position are therefore in nine different banks.
One cycle reads them all: the 24 x 24 reference area of an 8 x 8 "region
search". `ag` computes these bank and word addresses.

`lm_cur` holds the current MB as four banks of 16 words, one bank per 8x8
quarter.

`mem_if` accepts one region word per cycle together with its coordinates.
The host writes the next MB into the other ping-pong half during a search.

### One search

The 32 x 32 candidate positions are searched region by region in raster
order: 16 regions of 8 x 8 positions. Each region takes 8 working cycles:

1. `region_regs` latches REG_CUR (16 x 16) and REG_REF (24 x 24).
2. `line_search` evaluates one line of 8 positions per cycle. For each
   position it gives the sixteen 4x4 SODs.
3. `pipelined_buffers` (PB0-PB7) accumulate these SODs over the phi planes.
   The weights w_k of the bit-planes are a parameter, 1 by default.
4. After the last plane, `decision_engine` adds the 4x4 SODs into the 41
   H.264 partitions (1 × 16x16, 2 × 16x8, 2 × 8x16, 4 × 8x8, 8 × 8x4,
   8 × 4x8, 16 × 4x4). It keeps the best SOD and vector of each partition;
   the vector comes from `vg`.

A search takes 128·phi working cycles, plus 2 for preloading and 10 for
flushing the pipeline.

`ibs_ctrl` sequences the planes, regions and lines. It issues memory reads
one working cycle ahead, so the line engine never waits.

### Power adaptation (`cam`, `cg`)

`cam` measures how much the neighbouring vectors disagree:

act = (|top − topright| + |top − left|) / 2, summed over x and y.

It returns phi, the largest k for which T_k <= act. The thresholds are
inputs. With T1=0, T2=4, T3=8 and T4..T8=16, phi runs from 1 to 4. A
threshold equal to the one before it is skipped, so equal thresholds cap phi.

`cg` turns phi into a clock enable: phi evenly spaced enables in every 8
input cycles, so the working rate is phi/8 of the input clock. The total time
per MB is therefore about 1024 + 96/phi input cycles whatever phi is. The
switched power falls with phi.

This design uses one clock with an enable. The design it follows divides the
clock itself.

## BBME: binary pyramid search (`bbme`)

### Pre-processing (`mbppu`, `bbme_bin_pe`)

`mbppu` receives an 18 x 18 block of 8-bit pixels: the MB and a 1-pixel
margin, four pixels per word.

It builds three pyramid levels by 2x2 averaging with rounding. At each level,
`bbme_bin_pe` binarizes every pixel against the mean of its four direct
neighbours, ((sum + 1) >> 2). The result is three binary blocks:
* LV3: 16 x 16;
* LV2: 8 x 8;
* LV1: 4 x 4.

Missing border pixels at LV2 and LV1 repeat the edge. This takes about 113
cycles per MB.

### Search (`bbme_search`, `bbme_sod_unit`)

Each `bbme_sod_unit` is a 256-bit XOR with an adder tree. It gives sixteen
4x4 SODs, four 8x8 SODs, or one 16x16 SOD.

The binary reference windows are written beforehand, row by row:
* LV1: 12 x 12;
* LV2: 24 x 24;
* LV3: 48 x 48.

There is one set for each direction.

The three levels:
* **LV1**: full search of the 64 points (vectors −4..+3 in x and y).
* **LV2, step 1**: four candidates at once, which are all four 8x8 SODs of
  one unit:
  * twice MV_LV1;
  * zero;
  * the top neighbour's vector halved;
  * the left neighbour's vector halved.
* **LV2, step 2**: a ±1 cross around the winner. The point opposite the
  winner's direction is left out, so that four points fit in one pass.
* **LV3**: a ±2 full search (25 points) around twice MV_LV2. Each point gives
  the 16x16 SOD and the four 8x8 SODs. The 16x16 vector and the four 8x8
  vectors therefore come out of the same pass.

The cost of a candidate is SOD + λ·(|dx − px| + |dy − py|). Ties keep the
earlier candidate.

In **P mode** both units search forward and split the candidates. The search
takes 19 cycles. In **B mode** one unit searches forward and the other
backward, and the search takes 33 cycles.

## Where this design departs from its source

* **BBME LV2 candidates.** The source's LV2 step 1 considers six predictors:
  top, left, top-right, co-located in the previous frame, MV_LV1 and zero.
  This RTL uses four: 2·MV_LV1, zero, top/2 and left/2. The top-right and
  co-located predictors are not searched.
* **BBME cycle counts.** The search takes 19 (P) or 33 (B) cycles, against 37
  and 68 in the source. The pre-processor takes about 113 cycles against 107.
  It holds the whole 18 x 18 block in registers instead of rotating row
  buffers.
* **Working clock.** It is produced as an enable, not as a divided clock.
* **Choices of this design.** These are not given in the source:
  * the bit-plane weights w_k (all 1);
  * the BIP border handling (edge repetition);
  * the alignment of the BIP kernels;
  * the bus formats and handshakes;
  * tie-breaking;
  * the SOD accumulator width (8 bits, saturating).
* **CAM activity.** It uses the top, top-right and left vectors, as the
  source's text describes. The source's formula names the top-left
  neighbour instead.
* **BBME binarization kernel.** It uses the four direct neighbours, which is
  the kernel matrix the source gives. The source's written sum can be read
  as the diagonal neighbours instead.

## Throughput

* **PA-IBS at CIF, 30 frames/s.** This is 11 880 MBs per second at no more
  than about 1 120 input cycles each, so an input clock of about 13.3 MHz is
  enough. The source's implementation runs at 24.95 MHz.
* **BBME at CIF, 30 frames/s.** This needs about 1.6 MHz for P pictures and
  1.7 MHz for B pictures.

## Simulating

Every testbench in `tb/` checks itself and prints
`TB_RESULT checks=N failures=M` at the end. Build one with plain Verilator,
packages first:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/ibs_pkg.sv rtl/bbme_pkg.sv tb/tb_ibs_me.sv --top-module tb_ibs_me
    ./obj_dir/Vtb_ibs_me

The testbenches:

* **`tb_pa_ibs_top`** runs the whole top at its default sizes. It covers:
  * a full CIF frame through BIP;
  * PA-IBS searches with fixed phi and with CAM-chosen phi;
  * BBME P and B searches.

  It counts each mechanism and fails if one never happened.
* **`tb_ibs_me`** compares PA-IBS searches against an exhaustive model across
  phi values.
* **`tb_bip`** uses a small frame.
* **`tb_bbme`** compares against a software pyramid search.
* The others cover single blocks: `cam`, `cg`, `ag`, `vg`, `mem_if`,
  `tp_regfile`, `bbme_bin_pe` and `bbme_sod_unit`.

Testbench loops use bounds held in variables rather than constants, which
keeps Verilator from unrolling the large reference models.
