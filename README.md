# CREMA: a run-time reconfigurable coarse-grain array for OFDM baseband kernels

CREMA is an accelerator that sits beside a small 32-bit RISC processor. It
runs the arithmetic-heavy inner loops of an IEEE 802.11a OFDM receiver:
cyclic-prefix correlation for time synchronisation, complex multiplication
for frequency-offset correction, and the arithmetic of channel estimation.
The processor keeps the control-heavy parts, such as maximum search, CORDIC
division and symbol demapping.

The accelerator is a 4 × 8 grid of 32-bit processing elements (PEs) placed
between two local memories. Each memory has 16 banks of 256 words. A
*run* streams one memory line (16 words) per clock out of one memory,
through an input buffer, down through the PE grid and an output buffer, and
into the other memory. The two memories then swap roles ("ping-pong"), so the
result of one run is the input of the next without a round trip through the
processor.

The array's function comes from a *context*: each PE's operation plus the
routing of its two operands. Each PE keeps eight contexts, and switching
between them takes one clock. Contexts are loaded at run time by pushing
configuration words through a pipelined network inside the array.

This RTL follows the published CREMA template in its sizes and structure:
- 4 × 8 PEs;
- two 16 × 256 × 32-bit memories used ping-pong;
- two 16-lane I/O buffers built from registers and multiplexers;
- per-PE context memories with one-clock switching and pipelined
  configuration delivery;
- 15 routing choices per operand, split into local, interleaved and global
  connections;
- a control unit with parallel read and write state machines, a write
  latency of 1 to 32 clocks, and write cycles and write stalls.
- function units (adder, multiplier, shifter, logic, immediate register)
  chosen per PE at design time.

The following are this design's own choices. They are listed with the
reasons in [Departures and open points](#departures-and-open-points).
- the instruction and routing encodings;
- the host register map;
- the DMA port;
- the number of stored I/O buffer patterns;
- the omission of floating point.

## Module hierarchy

```
crema                     top: register port, DMA port, irq
├── crema_ctrl            read FSM, latency delay chain, write FSM
├── crema_local_mem ×2    16 banks × 256 × 32, line port + DMA word port
├── crema_io_buffer ×2    input buffer (memory → PEs), output buffer (PEs → memory)
└── crema_pe_array        4 × 8 grid, interconnect, configuration network
    └── crema_pe ×32      operand multiplexers, context memory, core
        ├── crema_context_mem   8 contexts, registered selection
        └── crema_pe_core       operand registers, ALU units, immediate register
crema_pkg                 sizes, operation/source encodings, word formats, register map
```

## The processing element

Each PE has two operand multiplexers, A and B. Each one picks one of 15
sources or zero. Both operands are registered on every clock, and the PE
core works on those registers. The PE has two outputs:
- **OUT1** is the result.
- **OUT2** is the operand B register. It lets a PE pass a second value down
  or across the array alongside its result.

| Code | Operation | OUT1 | Notes |
|---|---|---|---|
| 0 | NOP | 0 | |
| 1 / 2 | ADD / SUB | A ± B | |
| 3 | MUL | low 32 bits of A·B | |
| 4 / 5 | SHR / SHL | A >>> imm, A << imm | Arithmetic shift by the immediate register. |
| 6 | DELAY | A | OUT2 = B. A pure pipeline stage. |
| 7 | URF | A, unregistered | OUT2 = B. The operands pass straight through in the same clock. |
| 8 | LDIMM | 0 | The immediate register takes B while a valid line is present. |
| 9–11 | AND / OR / XOR | bitwise | This is the "LUT" unit. |

Fixed-point kernels shift right after every multiplication, so a shift
amount (12 in the receiver kernels) must reach every PE. The shift amount
lives in the immediate register. It is loaded by a context of its own:
1. Every PE runs LDIMM with operand B on the **vertical** line of its column.
2. A one-line run feeds the value down the vertical lines.
3. The immediate register loads only when the input buffer marks a valid
   line. It therefore keeps its value after the run ends.

The parameters `FU_ADD`, `FU_MUL`, `FU_SHIFT`, `FU_LUT` and `FU_IMM` of
`crema_pe_core` remove units at design time. This is the template's
"mapping adaptiveness": a PE carries only the units its mappings use. An
operation whose unit is removed gives zero.

The top and the array set these per PE through five 32-bit masks:
`ADD_EN`, `MUL_EN`, `SHIFT_EN`, `LUT_EN` and `IMM_EN`. Bit r·8 + c
belongs to PE (r, c). The defaults build every unit everywhere, so one
instance runs every kernel. An instance made for a single receiver stage
can clear the bits its contexts never use. For example, the correlation
context multiplies only in row 0, columns 0 to 3. An instance that runs
nothing else can clear the other 28 `MUL_EN` bits and drop 28 of the 32
multipliers.

### The 15 routing choices

In the table, "_A" names a neighbour's OUT1 and "_B" its OUT2. Columns are
numbered c = 0..7.

| Code | Source | Row 0 takes instead |
|---|---|---|
| 0, 1 | UP_A, UP_B: the PE above | input lanes 2c, 2c+1 |
| 2, 3 | UL_A, UL_B: the PE up-left | input lanes 2c−2, 2c−1 |
| 4, 5 | UR_A, UR_B: the PE up-right | input lanes 2c+2, 2c+3 |
| 6, 7 | LEFT_A, LEFT_B: the PE to the left (same row) | |
| 8, 9 | LOOP_A, LOOP_B: the PE's own outputs | |
| 10, 11 | IL_A, IL_B: interleaved, two rows up | row 1 takes input lanes 2c, 2c+1 |
| 12 | VERT: input lane 2c, broadcast down column c | |
| 13, 14 | HOR0, HOR1: input lanes 0 and 1, broadcast to every PE | |
| 15 | zero | |

Two more rules apply to the edges and the outputs:
- A neighbour outside the grid reads as zero. There is no wrap-around.
- Column c of the bottom row drives output lanes 2c (OUT1) and 2c+1 (OUT2).

**Accumulation** uses LOOP. For example, ADD with A = UP_A and B = LOOP_A
adds each new value to the PE's own previous result. At the start of every
run the control unit clears all operand registers, so each accumulator
starts from zero.

**Feed-through (URF)** removes one register stage from a path. The
correlation mapping uses this to move a stream one line earlier than its
neighbours, as described under the correlation kernel below.

A PE in URF passes its selected sources through combinationally. This can
never close a combinational loop, for two reasons:
- Every neighbour source comes from a row above or from the PE to the left.
- A feed-through PE reads its LOOP sources as zero.

A chain of URF PEs therefore only lengthens a combinational path; it never
closes one.

## Contexts and configuration

A context word has 12 bits: `{op[3:0], src_a[3:0], src_b[3:0]}`.

A configuration word is 20 bits, carried in the low bits of a 32-bit
register write: `{pe[4:0], slot[2:0], context[11:0]}`.
- `pe` is the header naming the destination PE, numbered row × 8 + column.
- `slot` chooses one of the PE's eight contexts.

Configuration words are written one per clock to `REG_CFG_PE`. Each word:
1. enters the array at PE (0,0);
2. moves one PE per clock to the right along row 0, and down every column;
3. stops at the PE whose number matches its header.

The farthest PE, (3,7), holds its word about 11 clocks after the write.
Loading does not disturb a run that is using a different slot.

`REG_CTX` selects the context of all PEs at once. The selected context is
registered inside each PE, so a switch takes effect on the next clock.

## I/O buffers and patterns

Both buffers are a register stage with a 16-to-1 multiplexer per lane:
- Each **input buffer** lane takes any memory bank. Lanes can be duplicated
  and reordered. For example, the complex multiplication needs each of
  a, b, c and d on two lanes.
- Each **output buffer** lane (that is, each bank of the destination memory)
  takes any PE output lane, or is disabled. A disabled bank is not written,
  so a run can fill some banks of a line and leave the rest alone.

Each buffer stores eight patterns. `REG_IBUF_PAT` and `REG_OBUF_PAT` pick
the active one. A pattern lane is written with a 12-bit word
`{pat[2:0], lane[3:0], sel[3:0], en}`, through `REG_CFG_IBUF` or
`REG_CFG_OBUF` (`{pat,lane,sel,en}` occupies bits 11:0). After reset, every
pattern is the identity with all lanes enabled.

## A run, clock by clock (the part that needs care)

The control unit has two state machines that work in parallel:
- **Read machine:** reads `RD_COUNT` consecutive lines from `RD_BASE`, one
  per clock, starting the clock after the start write.
- **Write machine:** follows the reads through a delay chain of
  `REG_LATENCY` stages (1 to 32). It writes consecutive lines from
  `WR_BASE`.

Take a read issued at clock *t*:

| Clock | What happens |
|---|---|
| t | line address presented to the source memory |
| t+1 | line data out of the memory |
| t+2 | input buffer output (the row-0 PE inputs) |
| t+2+k | output of a path that passed k registered PEs (URF PEs do not count) |
| t+1+L | write-enable of that line reaches the output buffer (L = `REG_LATENCY`) |
| t+2+L | output buffer registered; the destination line is written at this edge |

The output buffer registers the array output at the end of clock t+1+L.
That value must be the one for line t, so the deepest path of the mapping,
P registered PEs, must satisfy **L = P + 1**. A plain 4-row mapping uses
L = 5.

A mapping may use paths of different depths. A shallower path then delivers
data from *later* reads at the same write. The correlation and reordering
kernels below rely on exactly this.

The write machine counts valid lines in periods of `WR_CYC + WR_STALL`:
- the first `WR_CYC` lines of each period are written;
- the next `WR_STALL` lines are dropped;
- the write address advances only on written lines.

Setting `WR_CYC` = 0 discards everything. That is useful for the
immediate-load run.

`irq` pulses, and the sticky done bit in `REG_CTRL` sets, **N + L + 4
clocks** after the clock that took the start write (N = `RD_COUNT`). Every
testbench checks this count exactly.

A run costs N + L + 4 clocks. Host writes between runs (context, patterns,
run registers) cost one clock each, on top of that.

## Host interface

| Reg | Name | Meaning |
|---|---|---|
| 0 | CTRL | Write bit 0 to start; ignored while busy. Read `{done (sticky, cleared by start), busy}`. |
| 1 | CTX | Active context. |
| 2 / 3 | IBUF_PAT / OBUF_PAT | Active buffer patterns. |
| 4 / 5 | RD_BASE / RD_COUNT | First line and number of lines read (1..256). |
| 6 | WR_BASE | First line written. |
| 7 | LATENCY | L, 1..32 (see above). |
| 8 / 9 | WR_CYC / WR_STALL | Write period. |
| 10 | DIR | 0: read memory 1, write memory 2. 1: the reverse. |
| 11 | CFG_PE | Inject a configuration word. |
| 12 / 13 | CFG_IBUF / CFG_OBUF | Write one lane of one buffer pattern. |

The register port works as follows:
- Writes take effect at the clock edge.
- `reg_rdata` is combinational from `reg_addr`.
- Readback covers only the used low bits; the rest read as zero.
- Configuration registers are write-only.

The DMA port accesses a single word at a time:
- `dma_mem` selects memory 1 (0) or memory 2 (1).
- `dma_bank` and `dma_addr` give the bank and the word.
- Read data appears on `dma_rdata` one clock after `dma_re`.
- The DMA port should be used while the accelerator is idle. An assertion
  flags DMA traffic during a run.

## The receiver kernels as mapped here

`tb/tb_crema.sv` drives the whole design, with its default sizes, through
the host ports. It checks every result against a reference computed in the
testbench. Its runs, in order:

1. **Immediate load.** This is one line of 12s.

2. **Cyclic-prefix correlation** (time synchronisation). Each memory line i
   holds four values: x_i and x_{i+16}, each as a real and an imaginary
   part.

   The input buffer duplicates these onto lanes. The mapping then runs in
   four stages:
   1. Row 0 forms the four cross products.
   2. Row 1 forms the real part (ac + bd) and the imaginary part (ad − bc)
      of x·conj(x_D).
   3. Row 2 shifts right by 12.
   4. Row 3 accumulates with LOOP.

   Line 79 of the result holds the 80-sample correlation.

   In the same run, the delayed samples also pass through a column whose
   top PE is a feed-through. That path is one register shorter, so the
   delayed samples land in the destination memory **one line earlier**:
   the shifted copy needed for the correlation at the next lag. The
   undelayed samples pass through a plain 4-register column next to it.

   A second run then computes the next-lag correlation from the other
   memory with the same context (ping-pong). It does not reload any data.

3. **Square modulus** of the running correlation (a² + b²).

4. **Frequency-offset correction.** This is an 80-point complex
   multiplication by the correction factor, two products per line, each on
   four columns.

   A second context then shifts the products right by 12, reading back
   from the other memory.

5. **Delay-chain reordering.** One bank holds x0, x1, … in consecutive
   lines. Two paths of different depth, 4 and 6 registered PEs, give line
   pairs (x2, x0), (x3, x1), (x4, x2), … at latency 7.

   With 2 write cycles and 2 write stalls, the memory receives
   (x2, x0), (x3, x1), (x6, x4), (x7, x5). That is the sequence split into
   two parallel columns, ready for column-wise processing.

The testbench checks every run's clock count. It also counts each
mechanism and fails if any of them never occurred:
- configuration words;
- context switches;
- immediate loads;
- LOOP accumulation;
- URF;
- ping-pong swaps;
- pattern switches;
- write stalls;
- interrupts.

### Complete receiver stages

Three more testbenches run whole receiver stages at the default sizes. Each
one checks every value and every run's clock count.

**`tb_crema_timesync`: time synchronisation.** It runs 80 correlations of
80 samples against a delayed copy that slides by one sample per
correlation. The test signal repeats a segment at offset 37, the way a
cyclic prefix repeats the end of a symbol. The two local memories
alternate as source and destination:
- Each run recycles the delayed copy, one line earlier, into the other
  memory.
- Between runs the host reads the result and writes only the one new
  sample at the end of the copy.

A second context then computes the square moduli, four per line, and the
testbench checks that the peak lies at offset 37.

A second accelerator instance runs alongside the first. It has only the 8
multipliers of row 0, which is all that these two contexts use. It
receives the same host traffic and must return identical results.

**`tb_crema_cfo`: frequency-offset estimation and correction.**
- A 160-point product with the complex conjugate, on 80 lines.
- An 80-point complex multiplication.
- A separate shift context, which reads from the other memory.

The processor's CORDIC division and Taylor series would compute the
correction factor between these parts. That software is replaced by test
data.

**`tb_crema_chest`: channel estimation and equalisation** from four
pilots to 48 data subcarriers. It uses all eight contexts and seven input
patterns:

| Context | Work | Lines |
|---|---|---|
| 0 | load the shift amount 12 | 1 |
| 1 | pilot response HLS = (RP · ITP) >> 12, two pilots per line | 2 |
| 2 | linear interpolation, run once for the real and once for the imaginary parts | 16 each |
| 3 | Newton-Raphson, first half: Y = ((a² + b²) >> 12) · X0 | 19 |
| 4 | Newton-Raphson, second half: R = X0 · (2 − (Y >> 12)) ≈ 1/\|H\|² | 16 |
| 5 | Z = F · conj(H), two subcarriers per line | 24 |
| 6 | (Z >> 12) · (R >> 12) | 16 |
| 7 | a final shift by 12 | 16 |

The interpolation computes H = HLS_s + (((HLS_s+1 − HLS_s) · m/16) >> 12)
for three groups of 16 subcarriers, one group per column pair:
1. Row 0 subtracts the two pilots.
2. Row 1 multiplies the difference by the step m/16, held in Q12.
3. Row 2 shifts right by 12.
4. Row 3 adds the lower pilot, which has waited in delay PEs.

The real and imaginary runs share the same context. In the second run
the two spare columns carry the real results from the first run alongside
the new values. Real and imaginary parts of H therefore land side by side,
in the layout the Newton-Raphson context reads.

The Newton-Raphson step is a single iteration from a fixed guess of 1.0.
That guess reaches every PE on a horizontal broadcast line. The broadcast
path is three registers shorter than the columns, so it runs three lines
ahead of them. The run therefore reads 19 lines and writes only 16:
- write cycles = 16 and write stalls = 3;
- the three extra lines hold only the guess.

Between runs the host moves data whose layout changes, as the processor
does through main memory in the original system.

Clock counts against the published CREMA figures are listed below. The
published mappings pack more work into each line or read more than one
line per clock, so they take fewer clocks. The published counts in
brackets include data transfers.

| Kernel | Here (lines + L + 4) | Published |
|---|---|---|
| 80-point correlation | 80 + 5 + 4 = 89 | 50 (80 of them: 4017) |
| square modulus of 80 values | 20 + 5 + 4 = 29 | (225) |
| 160-point conjugate multiply | 80 + 5 + 4 = 89 | 26 (485) |
| 80-point complex multiply, then shift | 2 × (40 + 5 + 4) = 98 | 30 (842) |
| channel estimation stages | 197 in eight runs | 107 (708) |

## Departures and open points

- **No floating point.** The original PE lists an IEEE-754 unit, but none
  of the receiver kernels uses it and its operations are not specified. It
  is not built.
- **LUT = bitwise logic.** The "LUT" unit is implemented as AND/OR/XOR.
- **Encodings are this design's own.** This covers the operation codes,
  the meaning of each of the 15 routing codes, and all word and register
  formats. The routing categories (local neighbours, loops, interleaved,
  vertical and horizontal) and their count follow the template.
- **Stored I/O patterns.** The original describes an accelerator as using
  "n I/O buffers" (up to seven) with only two physical buffers. Here that
  is read as n stored patterns, and each buffer holds eight.
- **One clock domain.** The original FPGA builds run the array, the
  memories and the system bus on separate clocks.
- **Host and DMA are outside the design.** Their ports are plain register
  and word ports. The original loads configuration words with the same DMA
  device as the data; here the host writes them through `REG_CFG_PE`.
- **Kernel mappings are re-derived.** The testbench mappings use the
  operations of the original mappings where those are known. They differ in
  two places:
  - Linear interpolation shifts the product before adding the lower pilot,
    so that both terms share the Q12 scale. The original adds first, then
    shifts.
  - Newton-Raphson runs one iteration from a fixed guess of 1.0.
- **Multiplier width.** The multiplier keeps the low 32 bits. Fixed-point
  kernels keep samples within 13 bits so that products and sums fit.

## Simulating

Everything is plain SystemVerilog 2017. Every testbench prints a final line
`TB_RESULT checks=N failures=M` and has a watchdog. To run one with
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv \
    rtl/crema_pkg.sv tb/tb_crema.sv --top-module tb_crema -o sim
./obj_dir/sim
```

| Testbench | What it checks |
|---|---|
| `tb_crema_pe_core` | Every operation against a reference, the immediate load enable, URF, clear, and a loop accumulator. |
| `tb_crema_context_mem` | Slot writes, selection latency, reset contents. |
| `tb_crema_pe` | Header matching and forwarding, all operand sources, URF, LOOP. |
| `tb_crema_pe_array` | Pipelined configuration; complex multiply with shift; MAC with LOOP; URF, horizontal and interleaved routing; a second array with multipliers removed by `MUL_EN`. |
| `tb_crema_local_mem` | DMA fill, line reads, partial line writes, DMA reads. |
| `tb_crema_io_buffer` | Random patterns, lane selection, enables, switching. |
| `tb_crema_ctrl` | Exact read and write clocks and addresses for random runs with all latencies, write cycles and stalls. |
| `tb_crema` | The whole accelerator at full size, with the kernels above, and the count of each mechanism. |
| `tb_crema_timesync` | 80 ping-pong correlations, square moduli, and the peak offset. A second instance that has multipliers only in row 0 (`MUL_EN`) must return the same values. |
| `tb_crema_cfo` | Frequency-offset estimation and correction products. |
| `tb_crema_chest` | Channel estimation and equalisation through all eight contexts. |

All testbenches run in seconds.

Verilator's lint reports three warnings that are not faults:
- `SYNCASYNCNET` on `crema`: the reset is used both by the registers and by
  the `disable iff` of two assertions.
- Unused package constants, in modules that do not need them.
- The unused upper bits of `reg_wdata`.
