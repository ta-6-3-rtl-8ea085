# PADDI-2 style data-driven DSP array: SystemVerilog model

This is synthesizable RTL for a 48-processor array that runs DSP data-flow
graphs at the sample rate. It follows the PADDI-2 chip (ISSCC 1995, session TA 6.3).
Each node of the graph goes on its own small 16-bit processing element (PE).
Each edge becomes a stream over a reconfigurable bus network. There is no
global controller and no schedule. A PE executes its next instruction as soon
as the operands it needs have arrived and the outputs it writes are free. The
same handshake that moves the data also keeps every PE in step, however many
there are. At 50 MHz, 48 PEs issuing one instruction per cycle give 2.4 GOPS
peak. Eight PEs double as I/O processors with 16-bit ports, which gives
8 x 2 bytes x 50 MHz = 800 MB/s.

## The array

```
   upper row:  cluster 0   1   2   3   4   5      (PE 0..23)
               |   |   |   |   |   |
   level 2:    ==16 buses, break points after positions 1 and 3==
               |   |   |   |   |   |
   lower row:  cluster 6   7   8   9  10  11      (PE 24..47)
```

* A **cluster** holds four PEs (`pe`). They share six 16-bit **level-1
  buses** and six 1-bit level-1 control buses (`l1_net`).
* PE k of a cluster can also read the output of PE k-1 directly, bypassing
  the buses. PE 0 reads PE 3. This is the **neighbour path**.
* Sixteen **level-2 buses** run past all twelve clusters (`l2_net`). The
  data and control networks each have their own set. Clusters c and c+6 sit
  at the same position along these buses.
* Any level-1 bus can drive one level-2 bus, or receive from one.
* **Break switches** cut a level-2 bus at the point between positions 1
  and 2, and at the point between positions 3 and 4. One long bus then
  becomes up to three independent segments, and each segment carries its
  own transfer in the same cycle.
* **I/O processors**: PE 0 of clusters 0, 1, 4, 5, 6, 7, 10 and 11 serve I/O
  ports 0 to 7. On these PEs, DQ0 can take words from the pins and the
  data output can drive the pins.
* The 4-pin **scan port** (`scan_tap`) does all configuration and
  execution control.

Numbering: PE `4*c + k` is PE k of cluster c.

## How a word moves: the wired-AND handshake

This is the part to understand before writing programs. Once the switches
are set, every bus segment becomes a **net**. A net has one sender, which is
a PE output register. It has any number of receivers, which are PE input
buffers, plus the neighbour path and the I/O pins. The net's handshake is the
AND of:

* the sender's `valid` (its output register holds a word), and
* the `ready` of every receiver on the net (its buffer has a free entry).

If the handshake is high at a clock edge, three things happen at that edge:

* the sender's register empties;
* every receiver takes the word;
* all of this takes exactly one clock.

If the handshake is low, nothing moves anywhere on the net. A broadcast to
ten PEs therefore completes in all ten at once, or waits for the slowest one.
That is the only synchronisation the array has.

When a net spans both levels, `l1_net` exports three things per level-1 bus:
whether its local sender has a value, the value, and whether all its local
receivers are ready. `l2_net` ANDs these over every level-1 bus attached to
the same segment and returns one handshake to all of them.

Readiness is computed from buffer state only. It never depends on a pop in
the same cycle. So there is no combinational path from a handshake back into
readiness, and no combinational loop. A full buffer becomes ready again one
cycle after the PE consumes from it.

Bus values imitate a precharged bus:

* an undriven bus reads `16'hFFFF`;
* two drivers on one net combine as a bitwise AND.

Configuring two senders on one net is a configuration error, not a feature.

Throughput consequence: buffers are only two words deep. A broadcast that
feeds two paths of unequal latency stalls the sender until the longer path
catches up. Balance path lengths as you would in a systolic design. The
cluster testbench's graph is balanced for this reason. The multiply in the
top-level testbench is deliberately unbalanced and runs slower as a result.

## Inside a PE

```
 in0..2 --> DQ0 DQ1 DQ2 (2 words each, queue or registers) --+
 cin0..1 -> CQ0 CQ1 (2 x 1 bit) ---------+                    v
                                         v              16-bit ALU + Booth step --> out (16b, valid)
 program store 8 x 40b --> IR --> controller (fire / stall / next PC) ---------> cout (1b = cc0)
```

**Pipeline.** There are two stages, fetch and execute, and every instruction
takes one cycle. The executing instruction chooses the next PC from two
targets in the same cycle. The condition is one of:

* always true;
* the cc0 value that this same instruction is producing;
* the head bit of control queue CQ0 or CQ1.

The program store is read asynchronously and registered into the instruction
register, so a taken branch costs no cycle. After the program or the PC is
preset, the PE spends one cycle refetching.

**Stalls.** An instruction does not fire while any of these holds:

* a source it uses is a queue-mode buffer that is empty;
* its branch tests an empty control queue;
* it writes an output register that still holds an unsent value;
* the array is halted.

A stalled PE changes no state.

**Buffers.** Each DQ is either a two-entry FIFO that the network fills
(queue mode) or two registers that the PE's own instructions write
(register-file mode). Registers r0 to r5 are the words of DQ0 to DQ2, with
r(2i) and r(2i+1) in DQi. A source code 2i on a queue-mode DQi reads the head
and pops it. Code 2i+1 reads the head and leaves it in place. This lets two
instructions look at the same sample.

**Outputs.** Each PE has one 16-bit data output and one 1-bit control output.
An instruction with `coen` sends its new cc0 value as a control token.

### Instruction word (40 bits)

| bits  | field  | meaning |
|-------|--------|---------|
| 39:35 | op     | ALU operation |
| 34:32 | sa     | source A |
| 31:29 | sb     | source B |
| 28:26 | sc     | source C (Booth multiplier) |
| 25:23 | dst    | destination register r0-r5 |
| 22    | wen    | write dst (register-file mode buffers) |
| 21    | oen    | send result on the data output |
| 20    | coen   | send new cc0 on the control output |
| 19:18 | ccsel  | cc0 := keep / sign / zero / carry |
| 17:16 | bcond  | branch: always / new cc0 / CQ0 head / CQ1 head (pops the CQ) |
| 15:13 | next_t | next PC if condition true |
| 12:10 | next_f | next PC if false |
| 9:0   | imm    | signed immediate; BOOTH uses imm[1:0] as digit index |

Source codes: 0-5 select r0-r5 (or a queue head, as above), 6 selects the
sign-extended immediate, and 7 selects zero.

Operations (`paddi_pkg::alu_op_e`):

| ops | result |
|-----|--------|
| ADD, SUB, ADDC, NEG | arithmetic; all four go through the carry-select adder |
| AND, OR, XOR, NOT, PASS | logic |
| SHL, SHRA, SHRL | shift by b[3:0] |
| CSEL | conditional select: `cc0 ? a : b` |
| BOOTH | one radix-4 Booth step |

Flags are s (sign), z (zero) and c (adder carry).

Maximum and minimum each take two instructions: a SUB that sets cc0 from the
sign, then a CSEL.

The adder (`csel_adder`) is a carry-select adder with blocks of 3, 4, 4 and 5
bits.

### Multiplying with Booth steps

A 16 x 8 multiply uses four PEs in a pipeline. Each PE performs one step with
a fixed digit index i = 0..3:

```
d   = booth_digit({y[2i+1], y[2i], y[2i-1]})     (y[-1] = 0, d in -2..2)
acc' = (acc + d*m) >>> 2                          (computed on 18 bits)
```

Start with acc = 0 and run digits 0 to 3. The result is exactly
`floor(m*y / 256)`, the upper 16 bits of the 24-bit product. This holds
because the floors nest:

    floor((floor(a/4^k) + b)/4) = floor((a + b*4^k)/4^(k+1))   for integer b

To map it, broadcast the multiplicand stream m to all four PEs. Hold a
constant multiplier y in a register. Pass acc from PE to PE over the
neighbour path. `tb_paddi2_top` does exactly this.

## Configuring and controlling the array

### Scan port

`scan_tap` is an IEEE 1149.1 style TAP on four pins: `tck`, `tms`, `tdi`
and `tdo`. It has the usual 16-state controller and a 4-bit instruction
register, which captures `0101`.

| IR   | name | data register / effect |
|------|------|------------------------|
| 4'h1 | CFG  | 53 bits `{write, addr[11:0], data[39:0]}`, LSB first. Update-DR latches the address and writes if `write` is set. Capture-DR returns `{0, addr, word at the last latched address}`. |
| 4'h2 | RUN  | Update-IR starts free running |
| 4'h3 | HALT | Update-IR stops |
| 4'h4 | STEP | each Update-DR runs the array for exactly one clock |
| other| BYPASS | 1 bit |

To read a word, scan once with the address and the write bit clear, then
scan again to collect the captured word.

The port is sampled with the array clock. `tck` is synchronised, so keep it
below clk/4. The testbenches use clk/6.

### Address map

The address is `{unit[5:0], local[5:0]}`.

| unit | local | content |
|------|-------|---------|
| PE 0-47 | 0-7 | program words |
| | 8-13 | r0-r5 |
| | 14 | buffer modes; 3 bits per buffer `{count[1:0], register_mode}`; DQ0 at [2:0], DQ1 [5:3], DQ2 [8:6], CQ0 [11:9], CQ1 [14:12]; writing resets the read pointers |
| | 15 | `{cc0, pc[2:0]}` preset; reads `{ir_valid, cc0, pc}` |
| | 16 | reads `{carry, cout_valid, cout, out_valid, out[15:0]}`; a write clears both output registers |
| | 17-20 | CQ0/CQ1 words |
| 48+c (cluster c) | 0-3 | PE k switch word `pecfg_t`: `{cout_bus, out_bus, cq1_sel, cq0_sel, dq2_sel, dq1_sel, dq0_sel}`, 3 bits each |
| | 4-9 | data bus b level-2 attachment `{mode[1:0], l2bus[3:0]}`; mode 0 none, 1 drive, 2 receive |
| | 10-15 | control bus b, same format |
| 60 | 0 / 1 | data / control break switches; bit 2*i+k opens level-2 bus i at break point k |

Input select codes:

* 0-5: a level-1 bus;
* 6: the neighbour PE;
* 7: unconnected, or the pins for DQ0 of an I/O PE.

Output bus codes:

* 0-5: a bus;
* 6: none;
* 7: the pins (I/O PE data output only).

Reset leaves the array halted, with every input unconnected, every output
driving nothing, all buffers in empty queue mode, and PC = 0.

### Example: the counter

The classic example counts down from 9 to -1 and restarts, taking one
instruction per cycle and 11 cycles per period:

```
r1 = 10, r3 = 1, DQ0-2 in register mode (local 14 = 0x049), pc = 0
0 START: SUB sa=1 sb=3 dst=2 wen ccsel=S bcond=CC0 next_t=0 next_f=1
1 LOOP:  SUB sa=2 sb=3 dst=2 wen ccsel=S bcond=CC0 next_t=0 next_f=1
```

## Files

`rtl/` contains one module or package per file:

| file | role |
|------|------|
| `paddi_pkg` | shared constants, instruction struct, encodings and Booth digit function |
| `paddi2_top` | the chip: 12 clusters, 2 level-2 networks (data and control), scan port, level-2 break-switch registers, I/O port mapping |
| `cluster` | 4 PEs, 2 `l1_net` (data and control), switch registers, I/O hookup |
| `l1_net`, `l2_net` | bus selection and wired-AND handshake for each network level |
| `pe` | one processing element; contains `pe_dq` (x3 data, x2 control), `pe_imem`, `pe_alu` (with `csel_adder`) and `pe_ctrl` |
| `scan_tap` | scan port |

`tb/` holds one self-checking testbench per module (`tb_<module>`). It also
holds four workload testbenches that program the full array through its
pins (below). Each testbench prints `TB_RESULT checks=N failures=M`.

`tb_paddi2_top` drives only the pins of the full-size array, with no
parameter overrides. It loads three programs through the scan port and runs
them side by side:

* A: a Booth multiply by -93/256 across 4 PEs, sent over level-2 bus 5 to a
  max(y, 0) stage.
* C: `(x ^ 255) + 1`, which reuses level-2 bus 3 in the segment cut off from
  program A.
* B: the counter, sending its sign as a control stream over level-2 control
  bus 3 to a PE that branches on it.

Before free running, the testbench single-steps a counter on PE 47 and reads
it back. It checks every output value and the 12-cycle period of program B,
and it counts that each mechanism occurred at least once:

* stalls;
* back pressure at the pins;
* both branches of the conditional select;
* concurrent use of two segments of one level-2 bus;
* the neighbour path;
* level-2 broadcast;
* control-stream branches;
* single step.

### Workloads on the full array

`tb_fir7_workload` maps a 7-tap transversal filter onto the full array. It
is the equalizer stage of a PRML read-channel detector. The filter is in
transposed form with one tap per PE:

* each tap forms c_k*x/256 with four sequential Booth steps;
* it then adds the partial sum handed over by the next tap;
* that is five instructions per sample.

The partial-sum queues start with a preset zero word, loaded through the
scan port. The testbench checks every output and a sample period of exactly
five clocks.

`tb_median3_workload` maps the kernel of a rank-order (sorting) filter:
y[n] = median(x[n], x[n-1], x[n-2]).

* It uses four compare nodes. Each is a SUB that sets cc0 from the sign,
  then a conditional select that sends the maximum or the minimum.
* Two delay nodes hold a preset zero word.
* The graph spans two clusters, joined by three level-2 buses.
* The testbench checks every output and a rate of one output per two
  clocks.

`tb_median3x3_workload` extends this to the 3x3 median, using the
column-sort method.

* Three I/O ports deliver one window column per step. Six compare PEs sort
  each column into lo, mid and hi.
* Across the last three columns, the filter takes the largest lo, the
  median mid and the smallest hi. The median of those three is the median
  of all nine pixels.
* Earlier columns come from one-word zero presets, plus one PASS delay PE.
* The mapping uses 19 PEs plus 4 I/O PEs, in six clusters joined by 13
  level-2 buses.
* The paths are not balanced. With two-word buffers, the early streams stall
  their senders, and the mapping settles at one column per six clocks. The
  testbench checks that period and every output. Balancing the paths with
  PASS delay PEs would raise the rate.

`tb_viterbi2_workload` maps a Viterbi detector for the dicode (1-D)
channel. It has two states, so two add-compare-select (ACS) PEs.

* Each ACS PE runs four instructions per sample:
  1. add the branch metric;
  2. add the other state's path metric, which arrives as a stream;
  3. SUB to set cc0 from the sign;
  4. CSEL to keep the smaller metric.
* The ACS PE sends the new metric to its partner. It sends the decision as
  a control token.
* Two register-exchange PEs branch on those tokens to build the survivor
  words. This uses the zero-latency branch on a control queue.
* Path metrics wrap modulo 2^16 and are compared by the sign of their
  difference, so no normalisation is needed.
* The testbench checks three things:
  * every survivor word, against a reference model;
  * the decoded bits, against the transmitted ones;
  * a rate of four clocks per sample.

`tb_scan_master` provides the scan-port tasks that the workload testbenches
use.

## Simulating

With Verilator, list the package first:

```
verilator --binary --timing --assert --top-module tb_paddi2_top \
    rtl/paddi_pkg.sv $(ls rtl/*.sv | grep -v paddi_pkg) tb/tb_paddi2_top.sv
./obj_dir/Vtb_paddi2_top
```

The workload testbenches also need `tb/tb_scan_master.sv`. The full array
takes about 1.5 minutes to build. Each run takes about a second.

## What follows the original chip and what is this design's

**Taken from the original:**

* 48 16-bit PEs in 12 clusters of 4, in two rows of six;
* six level-1 buses per cluster and sixteen level-2 buses with break
  switches;
* a wired-AND handshake with broadcast, and one cycle per transfer;
* eight I/O PEs, at the positions shown in the chip's block diagram;
* per PE: an 8 x 40-bit program store, three 2-word data buffers usable as
  queue or register file, and a 16-bit ALU with a carry-select adder, a
  modified-Booth step and a conditional select;
* a two-stage pipeline with one-cycle instructions;
* zero-latency branches on ALU status or control streams, and stalls on
  missing operands or blocked outputs;
* the neighbour path;
* a 4-pin JTAG-like port that loads programs and switches, presets
  registers, observes state and single-steps.

**This design's own choices, where the original gives no detail:**

* the instruction layout, opcodes and immediates;
* the control network's size, a copy of the data network at 1 bit;
* two control queues of two bits;
* one data output and one control output per PE, with the control output
  carrying cc0;
* the Booth step's exact arithmetic, and the adder's block sizes;
* one level-2 connection per level-1 bus, where the original has a full
  16 x 6 crosspoint;
* two break points per level-2 bus, placed after positions 1 and 3;
* which PE input the pins feed, and the pin handshake;
* the TAP instruction set, the word-addressed configuration register
  (instead of a serial scan chain) and the address map;
* running the scan port in the array clock domain.

**Not modelled:**

* The dynamic precharged handshake line, the regenerative buffer between the
  network levels and the nMOS-only switches are circuit techniques. Only
  their logic function is modelled.
* The 208-pin package and pads.
* External SRAMs.

**Benchmarks.** Published benchmarks include a Viterbi detector with
equalizer (34 PEs), sorting and FIR filters, and DCTs.

* The equalizer's 7-tap filter is mapped (`tb_fir7_workload`). It uses 7
  tap PEs at five clocks per sample, where the original mapping uses 10 PEs
  at four clocks per sample (12.5 MHz at 50 MHz).
* The 3x3 sorting filter is mapped as a 3x3 median on 23 PEs
  (`tb_median3x3_workload`). It runs at one column per six clocks, where the
  published mapping uses 30 PEs at one pixel per clock. Its
  one-dimensional kernel, a three-point median on 8 PEs, is in
  `tb_median3_workload`.
* Of the Viterbi detector, a 2-state dicode detector is mapped
  (`tb_viterbi2_workload`). It runs at four clocks per sample, the
  published detector's 12.5 MHz at a 50 MHz clock.
* The published 8-state EPRML trellis was not mapped.
* The DCTs were not mapped.
* Of the published benchmarks, the 3x3 sorting filter (30 PEs) and the
  Viterbi detector (34-40 PEs) fit on one array. The 11-tap FIR (56 PEs),
  the DCTs (50 and 94 PEs, plus memories) and the larger applications need
  several chips.
