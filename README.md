# Digital camera trigger for a Cherenkov telescope

A Cherenkov telescope camera must decide, within some tens of nanoseconds,
whether the flash of light it just saw came from an air shower or from the
night sky. A shower lights up a compact group of neighbouring pixels within a
few nanoseconds; night-sky light hits single pixels at random, at around
100 MHz per pixel. This RTL implements a fully digital trigger for such a
camera, built from many identical low-cost FPGAs:

* **L0** – each pixel's analogue signal passes a comparator; the resulting
  digital L0 signal is high while the pulse is above threshold (its length
  encodes the time over threshold). The comparator is analogue and not part
  of the RTL: the design starts at the L0 signals.
* **L1** – the camera is tiled with 7-pixel *clusters* (a pixel and its six
  neighbours). Each cluster has a *cluster FPGA* that samples its own 7 L0
  signals and 5 signals from each of its six neighbour clusters, 37 pixels
  in all, at about 1 GHz, and runs trigger algorithms on this 37-pixel
  region. The regions overlap, so a shower image is seen whole by at least
  one FPGA. The result is a 2-bit L1 signal whose bits stand for trigger
  types.
* **L2** – Cluster Service Boards (CSB) OR the L1 signals of 16 clusters
  each; the L2 Controller Board (L2CB) ORs the 18 CSB results into the
  camera trigger.

The default configuration is a camera of 271 clusters (1897 pixels) served by
18 CSBs.

## Time: slices and words

Everything runs on one clock, `clk`, at the L0 sampling rate (950 MS/s, one
**slice** = 1.05 ns). Eight slices form a **word**. The cluster FPGA
deserializes each L0 input into 8-bit words and evaluates eight copies of the
trigger logic in parallel, one per slice, so the heavy logic runs at the word
rate (about 119 MHz in an FPGA). In the RTL the word rate is an enable,
`word_stb`, from a 3-bit phase counter cleared by the synchronous reset; all
boards reset together and so share word boundaries.

A coincidence of pixels is a coincidence *within one slice* of the L0
signals after they have been lengthened. The L0 length (`cfg.stretch`,
1–16 slices) is therefore the coincidence window: each pulse is extended by
`stretch - 1` slices, which keeps its time over threshold. The history of the
two previous words per pixel lets a pulse carry across a word boundary.

## Geometry of the 37-pixel region

This is the least obvious part of the design and is defined in
`rtl/trig_pkg.sv`. Pixels sit on a hexagonal grid with axial coordinates
(q, r); the six directions are (1,0) (1,-1) (0,-1) (-1,0) (-1,1) (0,1).
Neighbour cluster k has its centre at pixel offset C_k, with C_0 = (2,1) and
C_1..C_5 its rotations by 60 degrees: (3,-2) (1,-3) (-2,-1) (-3,2) (-1,3).
These 7-pixel clusters tile the plane. The region of a cluster FPGA is every
pixel within hexagonal distance 3 of its centre: exactly its own 7 pixels
plus 5 of the 7 pixels of each neighbour (the other two lie at distance 4).
Region pixel numbering:

| index | pixel |
|---|---|
| 0 | own centre |
| 1..6 | own pixel in direction 0..5 |
| 7+5k+j | j-th in-region pixel of neighbour cluster k, counting its cells as centre, direction 0..5 |

Because the numbering is fixed, every board sends the same five of its own
pixels to a given neighbour: to neighbour k it sends the pixels that
neighbour numbers as its neighbour (k+3) mod 6 (`l0_fanout`). On the camera
level, clusters are numbered row by row on their own hexagonal lattice of
radius `RING`; lattice direction k leads to neighbour cluster k. With
`RING = 9` this gives 1 + 3·9·10 = 271 clusters. Edge clusters report the
missing neighbours as absent, and their inputs read as low.

The geometry functions are evaluated once, in the package, into tables
(`NB_TAB`, `PATCH7_TAB`, `EXCH_TAB`) that the modules index at elaboration.

## Trigger algorithms

Each slice of each cluster FPGA evaluates, in `trigger_slice`:

| bit | algorithm | condition |
|---|---|---|
| 0 | 3NN | three mutually adjacent pixels (a compact triangle) are all on |
| 1 | Majority N/7 | at least `maj7_n` pixels on in one of 19 patches formed by a pixel and its six neighbours (patch centres: the 19 pixels within distance 2) |
| 2 | Majority N/21 | at least `maj21_n` pixels on in one of 6 patches formed by the own cluster and two adjacent neighbour clusters (17 pixels each within the region) |

L1 bit b is the OR of the algorithms selected by `cfg.l1_sel0` or
`cfg.l1_sel1`. Running several algorithms side by side and ORing them is the
design's way to cover both small, low-energy showers and large ones.
`FABRIC_CFG_DEFAULT` sets L1 bit 0 = Majority 3/7, bit 1 = 3NN, L0 length
3 slices (about 3.3 ns).

## Modules

| module | role |
|---|---|
| `trig_pkg` | constants, `fabric_cfg_t`, geometry functions and tables |
| `prog_delay` | per-input delay, 0–15 slices, to align channels |
| `iserdes8` | 1:8 deserializer; bit 0 = earliest slice |
| `l0_history` | two-word history per pixel and L0 lengthening |
| `trigger_slice` | the three algorithms on one slice (combinational) |
| `trigger_fabric` | eight `trigger_slice` in parallel, L1 selection, register |
| `oserdes8` | 8:1 serializer for each L1 bit |
| `l0_fanout` | picks the 5 signals for each neighbour, gated by neighbour detection |
| `dtb_fpga` | one cluster FPGA: all of the above |
| `csb` | OR of 16 L1 signals (per type bit, with input enables); returns the camera trigger |
| `l2cb` | OR of 18 CSB results with CSB and type enables; counts camera triggers (`event_nr`) |
| `pattern_gen` | test firmware: plays a 38-bit × 8192 table, 37 L0 bits + expected outcome |
| `dtb_pattern_test` | pattern generator driving a cluster FPGA, compares L1 with the expected bit |
| `camera_trigger` | top: 271 cluster FPGAs, 18 CSBs, L2CB; the pattern test beside them (`pt_*` ports) |

## Latency

With zero programmable delay and an L0 length of one slice, an L0 edge at a
cluster FPGA input appears on its L1 output 33 clocks later
(`DTB_LATENCY`): 1 delay register, 8 to align with the word, 8 each for the
history, fabric and serializer registers. The CSB and L2CB add one clock
each: 35 clocks, about 37 ns of FPGA logic, fixed. Cables and the L0 stage
come on top; whole-system estimates for this kind of trigger are 80–300 ns.

## Where this RTL departs from, or goes beyond, the source design

* The pin delay lines of the FPGA have about 40 ps steps and act before
  sampling; here delays are whole slices on the sampled signal.
  `prog_delay` is therefore only a partial model.
* One clock plus a word enable replaces the PLL's bit and word clocks.
* The 2-bit L1 encoding, the CSB/L2CB enables, the per-type OR, the event
  counter and the use of neighbour detection to silence absent inputs are
  this design's choices; the source gives only "OR" and "2 bits encode the
  trigger type".
* The 7-pixel and three-cluster patches are those of a 37-pixel region
  (19 and 6 patches, 17 pixels per three-cluster patch); performance studies
  of these algorithms assumed access to all 49 pixels of the seven clusters.
* 3NN is read as a compact triangle of pixels.
* One L0 length is shared by all algorithms of a board.
* Not built: the analogue L0 front end and its threshold DAC, the PLL, the
  block driven by the `calibrate` input, slow control (Ethernet, serial
  links to the CSBs), power switching and current monitoring, PROMs, ID ROM,
  temperature sensor. The *Binary Trigger* (Majority 3/7 OR 4/7 at two
  different pixel thresholds) needs two comparators per pixel and is not
  built. The asynchronous, purely combinational 3NN of the earlier board
  revision is not built either: this design is synchronous throughout.

## Simulation

All testbenches are self-checking and print
`TB_RESULT checks=N failures=M`. `tb/tb_ref_pkg.sv` holds a brute-force
reference: adjacency from coordinate differences, 3NN by searching all
triples, patches from the pixel numbering, so no table of the design is
reused. Build any of them with, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb --top-module tb_dtb_fpga \
  rtl/trig_pkg.sv tb/tb_ref_pkg.sv $(ls rtl/*.sv | grep -v trig_pkg) tb/tb_dtb_fpga.sv
./obj_dir/Vtb_dtb_fpga
```

The packages must come first on the command line.

* `tb_dtb_fpga` – one cluster FPGA under random hits, bursts, random delays,
  L0 lengths, thresholds and neighbour patterns; output compared every clock
  with the reference; the 33-clock latency measured with a single pulse.
* `tb_camera_trigger` – the whole camera at 7 clusters on 2 CSBs of 4
  inputs (`camera_tb_core`): camera trigger, type, event count and returned
  trigger checked every clock, plus counts of each mechanism (each
  algorithm, triggers that need neighbour pixels, overlapping regions, edge
  clusters, CSB and type masking); also runs the pattern test.
* One testbench per module for the rest.

The largest camera simulated is 19 clusters (`RING = 2`, 3 CSBs); it
passed the same checks. The full 271-cluster configuration elaborates and
lints, but Verilator compiles a separate class per cluster FPGA: the build
takes about 10 minutes at 7 clusters and grows with the count, so the
271-cluster camera has not been simulated.

Checked against the reference: every slice of every word, every L1 bit, at
random configurations. Not checked: timing closure of the logic at 950 MS/s
or 119 MHz in a real FPGA.
