# Chirp-scaling SAR processor on a base-4 systolic array

This is SystemVerilog RTL for a processor that accelerates chirp-scaling (CSA) synthetic aperture
radar imaging. CSA turns raw radar echoes into an image using only two kinds of operation:

- long FFTs or IFFTs along the azimuth and range axes of the 2-D echo matrix;
- element-wise multiplications by precomputed "phase functions".

The processor runs one **block operation** on one line of the matrix: an N-point FFT or IFFT
(N = 4096 by default), followed by an element-wise multiplication by a phase function. It keeps
four points per clock cycle flowing through a systolic array. The multipliers that apply the
FFT's own twiddle factors also apply the phase function, so phase compensation costs no extra
multipliers.

The architecture follows the article "FPGA Implementation of the Chirp-Scaling Algorithm for
Real-Time Synthetic Aperture Radar Imaging", which describes it as a base-4 systolic array on a
Zynq UltraScale+ device. The article names the blocks and says what each one does, but it leaves
many details open: the number format, how results leave the arrays, the memory mapping and the
bus protocol. Those parts are this design's own choices. They are listed in
[Where this design departs from or goes beyond the source](#where-this-design-departs-from-or-goes-beyond-the-source).

## How CSA uses the processor

An image is formed in four passes over the whole matrix. Each pass runs one block operation per
line:

| operation | axis | transform | multiplied by |
|-----------|------|-----------|---------------|
| 1 | azimuth | FFT  | phase function 1 (differential RCMC / chirp scaling) |
| 2 | range   | FFT  | phase function 2 (range compression, SRC, bulk RCMC) |
| 3 | range   | IFFT | phase function 3, transposed (azimuth compression, residual phase) |
| 4 | azimuth | IFFT | 1 (plain IFFT) |

This is the "modified" CSA flow. In the textbook flow, the third phase multiplication happens on
the azimuth axis, after a transpose. Here the third phase function is transposed in advance
instead. Operations 2 and 3 then both work on the range axis, so operation 3 can run on the line
that operation 2 left in the processor's cache, with no trip through DDR.

The matrix is transposed between operations 1 and 2, and between 3 and 4. The host does this in
DDR. It is not part of this RTL.

## The FFT: two levels of factorisation

The most unusual part of this design is how a 4096-point transform becomes work for a 16 × 4
array of processing elements.

**Level 1 (row/column, "four-step").** Write N = L·L with L = 64, and store the line as an L × L
matrix: sample `x(n1 + L·n2)` goes to row n2, column n1. Then:

1. *Column pass.* Run a length-L FFT down each of the L columns. Multiply result k2 of column n1
   by the twiddle W_N^(n1·k2), where W_N = e^(−j2π/N).
2. *Row pass.* Run a length-L FFT along each of the L rows. Row k2, output k1, is
   `Z(L·k1 + k2)`. Multiply it by the phase function, or by 1 for a plain FFT.

**Level 2 (base-4 matrix form).** Each length-L sub-FFT is split again, with L = 4·Q and Q = 16.
Take its input X(m), m = 0..L−1, as a 4 × Q matrix with X(n1 + Q·n2) at [n2][n1]. Then

    Y(k1, n1) = W_L^(n1·k1) · Σ_{n2=0..3} W_4^(n2·k1) · X(n1 + Q·n2)    (k1 = 0..Q−1)
    Z(k1 + Q·k2) = Σ_{n1=0..Q−1} W_4^(n1·k2) · Y(k1, n1)                 (k2 = 0..3)

Both sums are matrix products whose coefficients are powers of W_4, that is 1, −j, −1 or +j.
Multiplying by one of these only swaps or negates I and Q. So each processing element (PE) needs
one adder and no hardware multiplier. Real multipliers appear in only two places:

- the Q multipliers for the W_L^(n1·k1) factor, called "W_M";
- the four shared multipliers at the end of the array.

This requires Q to be a multiple of 4, so that W_4^(Q·n2·k2) = 1. That holds for L = 16, 32
and 64.

## Datapath and its timing

    data cache ──4 pts──► LHS array ──Q rows──► W_M multipliers ──Q rows──► RHS array
    (4 banks)             (Q × 4 PEs)           (Q complex ×)               (Q × 4 PEs)
        ▲                                                                        │ 4 pts
        └──────────── shared multipliers (4 complex ×: W_N / phase / 1) ◄────────┘
                                   ▲ phase cache (4 banks)

The whole datapath is pipelined. Each cycle one new group of four samples enters,
`X(m), X(m+Q), X(m+2Q), X(m+3Q)`, and four results leave. A pass over a line therefore takes
N/4 cycles plus the pipeline latency. One block operation is two passes: 2113 cycles for 4096
points, about N/2.

- **LHS array** (`lhs_array`, `lhs_pe`). PE (k1, n2) holds the coefficient W_4^(n2·k1).
  - Samples enter at the bottom and move up one PE per cycle.
  - Partial sums move right one PE per cycle.
  - Input column n2 is delayed by n2 cycles, so each sample meets its partial sum.
  - Row k1's sum leaves the right edge k1 + 4 cycles after the samples entered.

  The rows therefore come out skewed. That skew is kept on purpose: it is exactly what the RHS
  array needs.
- **W_M multipliers** (`wm_multiplier`). There is one 2-stage complex multiplier per row. The
  twiddle W_L^(n1·k1) is looked up from the n1 carried in the row's tag.
- **RHS array** (`rhs_array`, `rhs_pe`). Row k1 receives Y(k1, n1) from the left. Column k2
  receives the coefficient W_4^(n1·k2) from below, together with the markers for the first and
  last term of the sum. The coefficient is delayed by k2 cycles, so the skew of the data and of
  the coefficient match at every PE.
  - Each PE accumulates its own output Z(k1 + Q·k2).
  - On the last term the PE copies the sum into a result register, where it stays for Q cycles.
  - A counter per column reads the result registers one row per cycle.
  - The four columns are deskewed. Each output cycle then carries Z(d + Q·k2) for k2 = 0..3,
    with d on `out_idx`.
  - The result is rounded, shifted right by the pass's shift, and saturated to 16 bits.

  Consecutive sub-FFTs follow each other with no gap.
- **Shared multipliers** (`shared_multiplier`). Four 3-stage complex multipliers. In the column
  pass they multiply by W_N^(n1·k2). In the row pass they multiply by the phase value from the
  phase cache, or by 1.0 when phase compensation is off. In IFFT mode every twiddle (W_4, W_L,
  W_N) is conjugated. The phase function is never conjugated.
- **Controller** (`csa_controller`). It generates the read coordinates and the LHS tags
  `{first, last, m}`. It follows the RHS output to produce the write coordinates, the W_N
  exponents and the phase-cache read coordinates. The row pass starts only after the last
  column-pass result has been written.

Twiddles are not stored in files. `twiddle_rom` builds a quarter-wave sine table of n/4 + 1
entries at elaboration, using `sin()`, and rebuilds the other three quadrants by symmetry:

    W_n^e = cos(2πe/n) − j·sin(2πe/n),   stored as round(2^14 · sin(2πf/n)), f = 0..n/4

## Memory organisation and the "transposed" layout

`cache_ram` holds one line in four banks of N/4 words. This design adds a second, identical
cache for the phase function. Element [r][c] of the L × L matrix lives in

    bank = (r/Q + r + c/Q + c) mod 4,   word = r·Q + c/4.

The datapath and the host need four elements in the same cycle. With this mapping, these four
always fall in four different banks, and an assertion checks it:

- the datapath takes elements Q apart along a column (column pass) or a row (row pass);
- the host takes four neighbours along a row.

Every pass writes its results back in place, where its inputs were. This has a side effect:

- A line loaded in natural order (sample n at row n/L, column n%L) ends with frequency k at
  `[k%L][k/L]`. In other words, the result is transposed.
- With the mode bit `transposed` = 1, the controller swaps the roles of rows and columns. It then
  takes such a transposed line as its input, and leaves the result in natural order.

This is what lets operation 3 run directly on the output of operation 2.

The phase function must be stored in the same layout as the result it multiplies:

- normally, the value for frequency k goes at `[k%L][k/L]`;
- with `transposed` = 1, it goes at `[k/L][k%L]`.

The host port always addresses the matrix row by row, four points per beat. Beat q holds
elements `[q/Q][4·(q%Q) + i]`, i = 0..3.

## Number format and scaling

- Samples are complex: 16-bit I and 16-bit Q, two's complement, 32 bits per point. Four points
  make one 128-bit bus beat.
- Point i of a beat is bits [32i+31:32i], with I in the upper half.
- Twiddles and phase values are 16-bit with 14 fraction bits, so 1.0 = 16384.
- The LHS grows the word by 2 bits (to 18), and the RHS accumulators by log2 Q more bits.
- After each pass, the result is rounded to nearest, shifted right by a programmable amount
  (`shift_col`, `shift_row`, 0..7), and saturated to 16 bits.
- The multipliers round to nearest and saturate.

In the default-size testbench, random samples in ±4000 go through a 4096-point FFT with shifts
of 4 + 4. Every output point stays within 6 LSB of a double-precision DFT. The block-floating-point schemes often used in SAR processors are
not built.

## Platform: registers and DMA

`csa_sar_top` wraps the core for a processor system:

- an AXI4-Lite slave (`csa_axil_regs`) for the host;
- a 128-bit AXI4 master (`axi_dma_master`) to the DDR controller.

| offset | register | meaning |
|--------|----------|---------|
| 0x00 | CTRL   | write: bit 0 start; bits 4:1 steps {store, process, load phase, load line}. Read: the step bits |
| 0x04 | STATUS | bit 0 busy, bit 1 done (set at the end, cleared by the next start) |
| 0x08 | MODE   | bits 8:0 `{inverse, phase_en, transposed, shift_col[2:0], shift_row[2:0]}` |
| 0x0C | SRC    | DDR byte address of the input line |
| 0x10 | PHASE  | DDR byte address of the phase function |
| 0x14 | DST    | DDR byte address for the result |

A command runs its selected steps in this order:

1. load the line (N/4 beats);
2. load the phase function (N/4 beats);
3. run the block operation;
4. store the line.

Reads and writes use INCR bursts of 256 beats. The write side prefetches from the cache into a
two-entry queue, so it sends one beat per cycle while `wready` is high. `irq` pulses when a
command ends.

Operation 3 of the CSA flow is a command without the "load line" step. Operation 2 can leave out
"store".

The processing part of one 4096-point line takes 2113 cycles. Each load or store takes at least
1024 cycles. In total that is about 5200 cycles per line operation at full bus speed, or roughly
0.36 s of transfer plus compute for the four operations on a 4096 × 4096 image at 235 MHz. That
figure does not include DDR latency or the host's transposes. The published system measured
1.96 s for the whole image.

## Where this design departs from or goes beyond the source

- **Line length is a build parameter, not a register.** The source's mode register selects
  lengths from 64 to 4096. Here the core always processes L·L points:
  - the default L = 64 gives 4096 points;
  - L = 16 gives 256 points, and L = 32 gives 1024.

  Non-square lengths (512, 2048) and lengths below 256 are not supported.
- **Shared multipliers apply W_N.** The source, in one sentence, has them share the W_M product.
  Its description of the block operation, which is followed here, has them apply W_N.
- **PEs have no multiplier.** The source counts one multiplier and one adder per PE, but
  reports no DSP blocks for the arrays. Here multiplication by W_4 powers is a swap and a
  negation.
- **Open points decided here.** The following are this design's choices:
  - the fixed-point format, rounding and per-pass shifts;
  - the output-stationary RHS with its read-out counter;
  - the bank mapping and the transposed-layout mode bit;
  - the phase cache as a separate 4-bank memory;
  - the register map and the step bits;
  - the burst length and the packing of points in a beat;
  - the interrupt.
- **Not included.** The DDR controller and memory, the host processor, and the host-side matrix
  transposes are outside this RTL. The testbenches use a behavioural AXI4 DDR model
  (`tb/axi_ddr_model.sv`) in their place.

## Files

| file | contents |
|------|----------|
| `rtl/sar_pkg.sv` | widths, `cplx_t`, `coef_t`, `mode_t`, pass and multiplier-select enums, bank mapping, sine helper |
| `rtl/csa_sar_top.sv` | platform top: registers + DMA + core |
| `rtl/csa_sar_core.sv` | one block operation: caches, arrays, multipliers, controller |
| `rtl/csa_controller.sv` | pass sequencing and address generation |
| `rtl/lhs_array.sv`, `rtl/lhs_pe.sv` | left-hand systolic array and its PE |
| `rtl/wm_multiplier.sv` | W_M multipliers |
| `rtl/rhs_array.sv`, `rtl/rhs_pe.sv` | right-hand systolic array and its PE |
| `rtl/shared_multiplier.sv` | W_N / phase / unity multipliers |
| `rtl/cache_ram.sv` | four-bank line memory |
| `rtl/twiddle_rom.sv`, `rtl/cmul.sv` | twiddle table and pipelined complex multiplier |
| `rtl/csa_axil_regs.sv`, `rtl/axi_dma_master.sv` | AXI4-Lite slave and AXI4 master/sequencer |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/axi_ddr_model.sv` | behavioural AXI4 DDR slave with random stalls |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. Example with
Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/sar_pkg.sv tb/tb_csa_sar_top.sv \
              --top-module tb_csa_sar_top -o sim && ./obj_dir/sim

Replace the testbench name to run another one. The sources are found through `-Irtl -Itb`.

What the testbenches establish:

- **`tb_csa_sar_top`** runs at the default size (4096-point lines). It drives the registers over
  AXI4-Lite, with the DDR model stalling at random, and chains three operations:
  1. FFT with phase;
  2. IFFT with phase on the transposed result;
  3. FFT from the cache without reloading.

  Each result is compared with a double-precision DFT or IDFT of the previous result. It also
  checks that every mechanism (FFT, IFFT, phase, unity, transposed layout, cache reuse, W and R
  stalls, interrupt) happened at least once. It checks that a block operation takes N/2 cycles
  plus latency.
- **`tb_csa_image_flow`** forms a whole 256 × 256 image with a 256-point build (L = 16).
  - It runs all four operations on every line: 1024 commands.
  - The testbench does the two corner turns in the DDR model, as the host would.
  - Every line has its own random phase functions.
  - Each operation's output is compared with a double-precision DFT or IDFT of its input. Ops 2
    and 3 are checked together, because the line between them stays in the cache.
  - It prints the total processor time: about 405,000 cycles with the random bus stalls, or
    1.7 ms at 235 MHz, without the corner turns. The source reports 7.3 ms for this size,
    corner turns included.
- **`tb_csa_sar_core`** tests the core alone at 256 points, including an impulse test.
- **The unit testbenches** compare each block bit-exactly with an independent model, and check
  its latency. This covers the arrays, the multipliers, the cache mapping in all access
  patterns, the controller's addressing, the registers and the DMA.
