# Parallel 3D Bresenham line engine

Bresenham's algorithm draws a straight line with integer adds and compares
only, but it is inherently sequential: it walks from one end point to the
other and produces one point per step, so a line of L points takes L steps.
This engine removes that limit by cutting a long 3D line into N segments of
equal length and running N independent Bresenham cores side by side. Each
core produces one point of its own segment per clock, so the whole line is
done in L/N clocks. With 32 cores at 100 MHz a 992-point line takes 31
clocks (310 ns) of compute time instead of 992 clocks (9.92 us) on one core.

The engine is the programmable-logic half of a processor + FPGA system. The
processor does the cheap, once-per-line work (computing the end points of
every segment), writes them into the cores over AXI4-Lite, starts the
cores, and reads the finished points back.

## Structure

```
br3d_system                 top: AXI4-Lite slave, address decode, start register
 ├─ axil_slave              AXI4-Lite to single-cycle register accesses
 └─ br3d_core  x N_CORES    one segment engine: Reg0..Reg4
     ├─ br3d                line unit: control, point counter, memory writes
     │   ├─ br3d_setup      subtractors, ABS units, comparators, multiplexer
     │   └─ br3d_calc       calculation unit: current point + error terms
     └─ point_bram          1024 x 32 dual-port point memory
br3d_pkg                    shared types (point_t, axis_step_t, register indices)
```

A point is one 32-bit word: x in bits 9:0, y in bits 19:10, z in bits
29:20, bits 31:30 zero. Coordinates are 10-bit, so the drawing space is the
cube (0,0,0)..(1023,1023,1023), and a segment has at most 1024 points, which
is exactly the depth of a core's point memory.

## The Bresenham step in hardware

For a segment from P1 to P2 the setup stage (`br3d_setup`) forms, per axis,
the difference d = P2 - P1, its magnitude |d| and its sign. Three
comparators (|dx|>=|dy|, |dx|>=|dz|, |dy|>=|dz|) find the axis with the
greatest difference, the driving axis, and a multiplexer passes its
magnitude out as M. The segment has M+1 points. Ties go to x, then y.

The calculation unit (`br3d_calc`) keeps the current point and one signed
error term per axis. On load:

    e[k] = 2*|d[k]| - M          for k in x, y, z

On every step, for every axis independently:

    if e[k] >= 0:  coordinate[k] += sign(d[k]);  e[k] += 2*|d[k]| - 2*M
    else:          e[k] += 2*|d[k]|

The textbook 3D form permutes the axes so the driving axis comes first and
keeps only two error terms. Here all three axes use the same rule: for the
driving axis |d| = M, so its error starts at M and never changes, which
makes it step on every clock; the other two axes step when their error
crosses zero. The points are identical to the textbook walk (the testbench
compares against it), and the hardware needs no axis permutation network.
An axis with d = 0 starts at -M and stays negative, so it never moves. The
error terms lie in [-2M, 2M] and are 13-bit signed.

`br3d` wraps the two with a small controller: `start` loads the unit in one
clock, then it writes one point per clock to addresses 0..M of the point
memory (P1 first, P2 last), and pulses `done` the clock after the last
write, with `npts` = M+1.

## One core: registers

| Reg | Offset | Access | Contents |
|-----|--------|--------|----------|
| Reg0 | 0x00 | R/W | P1, start point |
| Reg1 | 0x04 | R/W | P2, end point |
| Reg2 | 0x08 | R   | bit 10 Rdy, bits 9:0 NCP (number of points computed) |
| Reg3 | 0x0C | R/W | read-back address (0..1023) |
| Reg4 | 0x10 | R   | point stored at address Reg3 |

Rdy clears when the core starts and sets when its last point is written.
NCP is a 10-bit field, so a full 1024-point segment reads NCP = 0 with Rdy
set; every shorter segment reads its true count. Reg4 follows a Reg3 write
one clock later (registered block-RAM read); over AXI4-Lite any following
read is later than that.

## System: address map and start

Byte addresses on the AXI4-Lite port (12-bit address, 32-bit data):

| Address | Register |
|---------|----------|
| 0x000 + 32*c + 4*r | core c (0..N_CORES-1), register r (table above) |
| 0x400 | START, write-only: bit c = 1 starts core c; all selected cores start in the same clock |

Other addresses read as 0. `core_rdy[N_CORES-1:0]` brings every core's Rdy
bit out as a plain signal. A start sent to a busy core is ignored.

The AXI4-Lite slave handles one transaction at a time. A write is taken when
AWVALID and WVALID are both high (AWREADY and WREADY rise together in that
clock) and BVALID follows the next clock; a read is taken when ARVALID is
high and no write is presented, and RVALID follows the next clock. Writes
win when both arrive together. Responses are always OKAY and WSTRB is
ignored (every register is written as a full word). Assertions in
`axil_slave` check that BVALID and RVALID hold until taken.

## Driving the engine

1. Split the line A..B into N segments. With M the line's greatest
   coordinate difference and K = (M+1)/N points per segment, segment i runs
   from point i*K to point i*K+K-1 (the last one to M), and point t of the
   line is `A + sign(B-A) * floor((2*|B-A|*t + M) / (2*M))` on each axis.
   For the 992-point diagonal line every segment has exactly 31 points and
   the joined segments are identical to a single walk of the whole line.
   For other lines each segment is an exact Bresenham segment and the joins
   are continuous, but a point near a join may differ by one unit from what
   a single walk of the whole line would give.
2. Write Reg0 and Reg1 of cores 0..N-1.
3. Write the mask of those cores to START (0x400).
4. Wait for their `core_rdy` bits (or poll Reg2).
5. For each core and each address a < NCP: write a to Reg3, read Reg4.

## Timing

Clock edges counted from the edge at which the START write is accepted
(edge 0):

| Event | Clock edge |
|-------|-----------|
| start strobe registered | 0 |
| end points loaded into the calculation unit | 1 |
| point writes | 2 .. M+2 (M+1 edges, one point per clock) |
| Rdy set | M+3 |

The compute time, in which the cores write points, is M+1 clocks per core:
31 clocks for 31-point segments. Rdy is set M+3 clock periods after the
START write is accepted, two more than the compute time, whatever the
segment length and the number of cores. Reading the
points back over AXI4-Lite costs two bus transactions per point and is not
part of the compute time.

## Parameters and sizes

| Parameter | Default | Where |
|-----------|---------|-------|
| `N_CORES` | 32 (1..32) | `br3d_system` |
| `DEPTH`, `WIDTH` | 1024, 32 | `point_bram` |
| `COORD_W` | 10 | `br3d_pkg` |

The start mask is one 32-bit word and the core index uses address bits
9:5, so more than 32 cores needs a wider address map. At 32 cores the
design holds 32 x 1024 points of memory. A single straight line in the
10-bit cube has at most 1024 points, so one line uses at most 1024 of those
words; the full capacity is used only when the cores draw separate
segments or lines.

## What follows the source design and what is this design's own

Taken from the source design: 32 cores, one Bresenham unit and one 1024 x
32 point memory per core, 10-bit coordinates packed in a 32-bit word, the
five registers of a core with Rdy in bit 10 and NCP in bits 9:0, read-back
through an address register and a data register, one point per clock,
AXI4-Lite between processor and cores, and the setup structure (three
subtractors, three ABS units, three comparators, a multiplexer and a
calculation unit).

Chosen here, because the source is silent: the order of x, y and z inside
the word; the START register, the address map and the `core_rdy` outputs;
the single-outstanding AXI4-Lite slave; one load clock before the first
point; a write-only and a read-only port on the point memory; the
three-error formulation of the step; tie order x, then y; asynchronous
active-low reset of all registers (memory contents are not reset); NCP
wrapping to 0 for a 1024-point segment.

One statement in the source does not match the algorithm: for the segment
(3,2,5) to (12,15,20) it says z changes every two clocks and x every
clock. With dx = 9, dy = 13, dz = 15, z is the driving axis; this design
steps z on every clock and x on 9 of the 15 steps, as Bresenham's algorithm
requires.

Not included: the processor and its software (segmentation, display).
The source design ran at 100 MHz on a Zynq-7010 FPGA; the times quoted
here assume that clock, and no timing analysis of this RTL is implied.
Every core's critical path is one 13-bit add/compare per axis plus the
setup stage's subtract, negate and compare chain on the load clock.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. All compare against `tb/br3d_ref_pkg.sv`,
a textbook 3D Bresenham walk written independently of the RTL.

| Testbench | What it checks |
|-----------|----------------|
| `tb_br3d_setup` | differences, signs, driving axis and M for corner cases and 2000 random pairs |
| `tb_br3d_calc` | every point of 45 lines, stepped directly; hold without step |
| `tb_br3d` | every write address and point, write in clock n+1 for point n, `done` at M+2, start while busy ignored |
| `tb_point_bram` | all 1024 words, write enable, one-clock read latency |
| `tb_br3d_core` | register read-back, Rdy/NCP, Rdy clears on start, Rdy set M+2 clock edges after start is sampled, all points read back via Reg3/Reg4, full 1024-point segment |
| `tb_axil_slave` | write with AW/W together or in either order, reads, back-pressure on B and R, write priority, one register write per transaction |
| `tb_br3d_system` | whole engine at 32 cores, see below |

`tb_br3d_system` runs at the default size. It drives the 992-point
diagonal line on 32, 4, 2 and 1 cores and checks a compute time of 31, 248,
496 and 992 clocks and that the joined segments equal the single walk; runs
a skewed 1024-point line over 32 cores and checks continuity at every
point; runs 32 unrelated random segments in one start (all driving axes and
both directions); runs two full 1024-point segments and a start sent to a
busy core. It counts each of these and the AXI back-pressure cases and
fails if any never occurred.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/br3d_pkg.sv tb/br3d_ref_pkg.sv tb/tb_br3d_system.sv \
  --top-module tb_br3d_system -o sim
./obj_dir/sim
```

Replace `tb_br3d_system` with any other testbench name to run it. The
system test takes well under a minute. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/br3d_pkg.sv rtl/<module>.sv`.
