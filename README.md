# HORN-8: a massively parallel hologram computing board in SystemVerilog

A computer-generated hologram (CGH) of a 3D point cloud is, pixel by pixel,
a sum of interference fringes: every object point contributes one cosine
whose phase grows with the squared distance between the pixel and the point.
The work is `pixels x points` cosines. That is about 2 x 10^10 for a
1,920 x 1,080 hologram of 10,000 points, and far more for the 10^8-pixel,
1 um-pitch holograms that a wide viewing angle needs. But no pixel depends
on any other. The HORN-8 board uses this by placing thousands of identical
pixel units in long systolic chains. Each chain computes 640 neighbouring
pixels of one hologram line at a time, taking in one object point per clock.
Seven such chains, one per calculation node, share a ring bus with a
communication node that talks to the host. The board therefore evaluates
4,480 pixels per clock.

This repository holds the RTL of that board. It covers the pixel arithmetic,
the node controller, the object memories, the ring bus and the host bridge.
The only part left out is the PCI-Express endpoint.

## 1. What a pixel computes

With the reference light taken as a plane wave and the Fresnel approximation,
pixel `(X, Y)` of an amplitude hologram is

    I(X, Y) = sum over points j of cos( 2*pi * Delta_j * ((X - X_j)^2 + (Y - Y_j)^2) )
    Delta_j = p / (2 * lambda * Z_j)

Here `p` is the pixel pitch, `lambda` the wavelength and `Z_j` the depth of
point `j`. All coordinates are integers in units of `p`, and all point
amplitudes are 1. Only the fractional part of the phase matters, because
the cosine repeats every turn. This sets the number formats:

| quantity | bits | format |
|---|---|---|
| `X`, `Y`, `X_j`, `Y_j` | 14 | unsigned integers (0 .. 16,383) |
| `dX = X - X_j`, `dY` | 14 | two's complement |
| `dX^2`, `dY^2`, their sum | 28 | unsigned |
| `Delta_j` | 32 | unsigned fraction of a turn, 32 fraction bits (Q0.32) |
| phases `Theta`, `Gamma`, `2*Delta` | 21 | fraction of a turn: bits 31..11 of the Q.32 product, wrapping modulo 1 |
| cosine argument / value | 6 / 6 | top 6 phase bits / signed, about 31*cos |
| pixel sum | 18 | two's complement, wraps |

The output pixel is the MSB of the 18-bit sum: a binary hologram, 1 where
the fringe sum is negative. A binary hologram and its complement
reconstruct the same image.

For depths of practical interest `Delta_j` is small. For example, p = 6.5 um,
lambda = 0.5 um and Z = 0.5 m give about 1.3 x 10^-5 turn, or 55,800 in Q0.32.
A Q0.32 format keeps about 16 significant bits of it.

## 2. The pixel pipeline: one multiplier-heavy head, 639 adder-only units

Computing the squared distance and a 60-bit product for every pixel would be
costly. The pipeline does it only once per segment, in the **basic processing
unit (BPU)**. Every other pixel uses the exact difference identity for
stepping one pixel to the right:

    Theta(X+1) = Theta(X) + Gamma(X),     Gamma(X) = Delta * (2*dX + 1)
    Gamma(X+1) = Gamma(X) + 2*Delta

For each object point, the BPU (`rtl/bpu.sv`) computes `Theta_1`,
`Gamma_1` and `2*Delta` for the first pixel of the segment. It uses two
14-bit subtractors, two squarers, a 28-bit adder, a shift-and-add for
`2*dX + 1`, and two products with `Delta`. It has four register stages.

Each **additional processing unit (APU)** (`rtl/apu.sv`) holds two 21-bit
adders and registers `Theta`, `Gamma` and `2*Delta` for its downstream
neighbour. The chain (`rtl/horn_pipeline.sv`) is therefore systolic:

    clock c      point j enters the BPU
    clock c+3    BPU outputs Theta_1(j); pixel 0 adds cos(Theta_1(j))
    clock c+3+k  unit k holds Theta_{k+1}(j); pixel k adds its cosine

Every unit sees every point, one clock after its upstream neighbour. A pass
of N points keeps all 640 units busy for N clocks. A `first` flag and a
`last` flag travel with each point:

- `first` restarts a unit's sum, so no clear cycle is needed.
- `last` makes the unit latch the MSB of its sum as its pixel.

Because `Gamma_1` and `2*Delta` are rounded to 21 bits, the
difference recursion drifts from the exact phase. The error grows with the
unit index k: it is about `k * eps(Gamma) + k^2/2 * eps(2*Delta)` LSBs of a
21-bit turn. The original hardware has this property too. The reference model in the testbenches
reproduces the RTL arithmetic exactly, in closed form (`Theta_1 + k*Gamma_1 +
k(k-1)/2 * 2*Delta`). It does not use the recursion.

**The cosine** (`rtl/cos_approx.sv`) uses no table. A 6-bit phase `t` is
folded (`f = t` or `63 - t`), and the result is `31 - 2f`. The outcome is a
triangle wave that stays within 7 LSB of `31*cos(2*pi*(t+0.5)/64)` and sums
to zero over a period. It takes two subtractions. The published HORN-8 cosine
also uses two adder-subtractors, but its exact form is not reproduced here:
the triangle wave is this design's choice. **The accumulator**
(`rtl/pixel_acc.sv`) sign-extends the cosine into the 18-bit sum. It wraps
after 4,096 points of equal phase.

## 3. A calculation node: passes, segments, bubbles and stalls

`rtl/calc_module.sv` turns the pipeline into a node. It contains:

- the object memory (`rtl/object_ram.sv`): 65,536 points of 60 bits, one
  write port from the ring and one synchronous read port into the BPU;
- configuration registers and the `X_a`/`Y_a` pixel counters;
- a pass sequencer;
- a one-pass result buffer.

A **pass** streams points 0..N-1 into the pipeline and produces the 640
pixels `X_a .. X_a+639` of line `Y_a`. After a pass, `X_a` advances by 640.
When `X_a` reaches the configured line width it returns to 0, and `Y_a`
advances by the configured line step. With a line step of 7, node k computes
lines k-1, k+6, k+13 and so on, so seven nodes share a hologram line by line.

Two rules keep consecutive passes from corrupting each other:

- **Bubble.** Each pixel latches its result when the pass's last point
  reaches it, so pixel 0 finishes 639 clocks before pixel 639. The node reads
  all 640 result bits in the single clock when the last point leaves the
  final unit. That works only if no unit has already latched the next pass.
  This requires at least 640 clocks between the last points of consecutive
  passes. A pass therefore lasts `max(N, 640)` clocks, and for N < 640 the
  node pads it with idle slots. All the workloads of interest have thousands
  of points, so this case costs nothing in practice.
- **Stall.** At the end of a pass, the 640 pixels are copied into the result
  buffer and sent as ten 64-bit RES words while the next pass computes.
  Result transfer is thus hidden behind calculation. If the buffer is still
  full when the next pass completes, the whole node freezes: every pipeline
  register, the accumulators, the memory read port and the sequencer. It
  resumes when the buffer empties. Freezing everything keeps the relative
  timing of passes, so a stall never changes a pixel.

With N >= 640 and a host that keeps up, a node finishes one pass every N
clocks. A hologram of H pixels then takes `N * H / 4,480` clocks, or
18.5 ms for 1,920 x 1,080 pixels and 10,000 points at 250 MHz.

## 4. The ring bus and the host protocol

Each node has a `bus_ctrl` (`rtl/bus_ctrl.sv`), and the nodes form one
ring: node 0 (the communication node) feeds 1, 1 feeds 2, and so on, and
7 feeds 0. Every hop is a register with a valid/ready handshake.
Back-pressure therefore propagates backwards instead of losing words. A
concurrent assertion checks that a word offered to the next node stays
unchanged until that node takes it. Node 0 is both the source and the sink
of the ring (`SINK_ALL = 1`), so the ring cannot deadlock on itself.

A ring word is 86 bits: `{op[3], node[3], tag[16], data[64]}`.

| op | direction | node field | tag | data |
|---|---|---|---|---|
| `OBJ` (1) | host to node | destination, 0 = all | memory address | `{X_j[14], Y_j[14], Delta_j[32]}` in bits 59:0 |
| `CFG` (2) | host to node | destination, 0 = all | register | value |
| `RUN` (3) | host to node | destination, 0 = all | - | - |
| `RES` (4) | node to host | source | `{pass[12], word[4]}` | 64 pixels, bit i = pixel `X_a + 64*word + i` |
| `DONE` (5) | node to host | source | passes done | - |

A node takes a host-to-node word off the ring if the word is addressed to
it. It both takes and passes on a broadcast. It passes on everything else.
Its own RES/DONE words fill empty slots, and traffic already on the ring goes
first.

The node's configuration registers (`CFG` tags) are:

- `0` `CFG_NOBJ`: point count N in bits 16:0 (1..65,536).
- `1` `CFG_START`: `X_a` start in bits 13:0 and `Y_a` start in bits 29:16.
- `2` `CFG_GEOM`: line width in bits 14:0, which must be a multiple of 640;
  line step in bits 29:16; and pass count in bits 63:32.

`rtl/interface_ctrl.sv` bridges the host's 64-bit DMA streams to the ring.
A host command is a header word `{op[63:61], node[60:58], tag[57:42],
count[40:24]}` followed by its payload:

- for `OBJ`, `count` point words, which get consecutive addresses starting
  at `tag`;
- for `CFG`, one value word;
- for `RUN`, nothing.

In the other direction, each RES becomes a header word and a data word, and
each DONE becomes a header word. A complete job:

1. Broadcast `OBJ` with all N points.
2. Broadcast `CFG_NOBJ`.
3. Send each node k its `CFG_START` (`Y = k-1`) and its `CFG_GEOM` (width,
   step 7, passes).
4. Broadcast `RUN`.
5. Collect the RES words until seven DONE words have arrived.

For objects larger than 65,536 points, the host splits the object into
blocks and runs one job per block. Each block gives its own binary hologram,
and the blocks are shown in turn (time division). The original system works
the same way.

## 5. Parameters and sizes

| module | parameter | default | meaning |
|---|---|---|---|
| `horn8_board` | `N_CALC` | 7 | calculation nodes |
| `horn8_board`, `calc_module`, `horn_pipeline` | `UNITS` | 640 | pixel units per node (1 BPU + 639 APUs) |
| `horn8_board`, `calc_module`, `object_ram` | `DEPTH` | 65,536 | object points per job |
| `calc_module`, `bus_ctrl` | `NODE_ID` | 1 | ring address |

All defaults are the original board's numbers. The word widths live in
`rtl/horn8_pkg.sv`. After coarse synthesis the full board has about
77,000 word-level cells, 389,000 flip-flop bits and 27.5 Mbit of object
memory (7 x 65,536 x 60).

How the published workloads map onto the default configuration:

- **1,920 x 1,080 pixels, 10,000 to 60,000 points:** fits. A line is three
  640-pixel segments. The busiest node computes 155 lines, or 465 passes.
- **70,000 points or more:** must be split into blocks of at most 65,536
  points (time division).
- **10^8 pixels (9,600 x 10,800 or 10,000 x 10,000), 7,877 points, shared by
  8 boards:** fits. Coordinates stay below 16,384. A 10,000-pixel line takes
  16 segments, and the host discards the last 240 pixels.
- **Multi-board clusters:** each board is an independent `horn8_board`. The
  host software splits the lines between boards.

## 6. Where this RTL departs from, or adds to, the original design

Taken from the original design:

- the BPU/APU structure and every printed width (14, 15, 21, 28 and 32 bits;
  6-bit cosine; 18-bit accumulator; MSB output);
- 640 units per node, seven calculation nodes and one communication node on
  a ring;
- the 65,536-point object memory;
- result output overlapped with calculation.

This design's own choices:

- the triangle-wave cosine;
- the Q0.32 binary point of `Delta` and the choice of bits 31..11 as the
  phase;
- reading the 21-bit `Delta` bus between units as `2*Delta`;
- signed cosine and sum, so that the pixel is the sign;
- all pipeline register placement;
- the bubble and stall rules;
- the ring word format, handshake and addressing;
- the host stream format and configuration map;
- line interleaving between nodes.

The `X_a`/`Y_a` counters sit in the node controller instead of inside the
BPU.

Not included: the PCI-Express Gen 1 endpoint and its DMA engine, for which
the host streams are top-level ports instead, and the host PCs that combine
boards into a cluster.

## 7. Simulating

Every block has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog. The shared reference
arithmetic is `tb/horn8_ref_pkg.sv`. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
        rtl/horn8_pkg.sv tb/horn8_ref_pkg.sv tb/tb_calc_module.sv \
        --top-module tb_calc_module -o sim
    ./obj_dir/sim

| testbench | what it shows |
|---|---|
| `tb_cos_approx` | all 64 cosine values, closeness to a true cosine, zero mean |
| `tb_pixel_acc` | sums and pixels over random passes with stalls and idle slots |
| `tb_bpu` | `Theta_1`, `Gamma_1`, `2*Delta` against the formula, 4-clock latency, stall hold |
| `tb_apu` | one difference step, stall hold, pixel sign |
| `tb_object_ram` | full 65,536-entry memory, read latency, read-enable hold |
| `tb_horn_pipeline` | 24-unit chain: every pixel, and pass-end latency with and without stalls |
| `tb_calc_module` | bubbles for N < UNITS, one pass per N clocks, stalls under back-pressure, segment order, DONE |
| `tb_bus_ctrl` | addressed, broadcast and pass-through traffic under random back-pressure; no loss or reordering |
| `tb_interface_ctrl` | host command parsing and result serialisation, both directions back-pressured |
| `tb_horn8_board` | whole board with 16-unit nodes: two jobs, every pixel, and counts of broadcasts, bubbles, stalls, ring back-pressure, overlapped transfers and DONEs |
| `tb_horn8_board_full` | the same at full size (7 x 640 units, 65,536-point memories) on a 1,920 x 14 strip |
| `tb_horn8_table1` | full size, 10,000 points, 1,920-pixel lines: every pixel and the N-clocks-per-pass rate |
| `tb_horn8_100mpix` | full size, 7,877 points, 9,600-pixel lines, the top 14 of 10,800 lines: X wrap between lines, Y near the top of the counter range, rate; every fifth result word checked |
| `tb_horn8_objblock` | full size, one job of 65,536 points (the memory's capacity): rate and sampled pixels |

The full-size board takes Verilator about 4 minutes to build. Simulating it
takes seconds to a few minutes, depending on the job.

## 8. Files

- `rtl/horn8_pkg.sv`: widths, structs, ring op codes, register map
- `rtl/cos_approx.sv`, `rtl/pixel_acc.sv`: cosine and pixel accumulator
- `rtl/bpu.sv`, `rtl/apu.sv`, `rtl/horn_pipeline.sv`: the pixel pipeline
- `rtl/object_ram.sv`, `rtl/calc_module.sv`: the calculation node
- `rtl/bus_ctrl.sv`, `rtl/interface_ctrl.sv`: the ring and the host bridge
- `rtl/horn8_board.sv`: the top level
- `tb/`: testbenches, the reference package and the shared board host model
  `tb/horn8_board_host.svh`
