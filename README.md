# Warp: a linear systolic array of programmable floating-point cells

Warp is a one-dimensional systolic array for signal processing. A row of
identical cells, ten in the prototype this RTL follows, is fed at the left end.
The x data stream, the y data stream, a stream of memory addresses and the
control stream all move one way, from a cell to its right neighbour. Results
leave at the right end. Only the two end cells talk to the outside, so a row
of n cells does O(n) work for each word of I/O.

Each cell is a small, horizontally microcoded 32-bit floating-point machine. It
has a five-stage multiplier and a five-stage ALU, so it can start one multiply
and one add every cycle. Pipelining therefore happens at two levels: across
the cells, and inside each cell's arithmetic units. Each cell also has
programmable delay lines, a 4K-word data memory and a crossbar. With these it
can run convolution, interpolation, matrix multiplication, FFT butterflies and
linear-system kernels. The delay lines keep the different streams in step.

This repository has synthesizable SystemVerilog for the array and its cell.
It also has a self-checking testbench for every module. The top-level
testbench runs convolutions and the other mechanisms on the full ten-cell
array. Two workload testbenches add interleaved matrix multiplication on the
array and FFT butterflies at one per 6 cycles on a cell.

## The array (`warp_array`)

```
           cntl ──► ┌────────┐ ──► ┌────────┐ ──►      ──► ┌────────┐ ──► cntl_out
           addr ──► │ cell 1 │ ──► │ cell 2 │ ──►  ...  ──► │ cell N │ ──► addr_out
           x    ──► │        │ ──► │        │ ──►      ──► │        │ ──► x_out
           y    ──► │        │ ──► │        │ ──►      ──► │        │ ──► y_out
    y_first_out ◄── │        │ ◄── │        │ ◄──      ◄── │        │ ◄── y_right_in
                    └────────┘     └────────┘              └────────┘
```

`N_CELLS` defaults to 10. Every output of a cell is registered. Each cell also
sees the y output of its right neighbour, which lets y flow right to left in
bi-directional algorithms such as triangular solvers and QR updates. For
those, cell 1's y output is brought out as `y_first_out`, where a boundary
processor doing divisions and square roots would attach. That processor is not
part of this RTL.

### Control flows with the data

There is no program memory in a cell. The microinstruction for a cycle
(`uinst_t`, see `warp_pkg`) enters cell 1 on `cntl_in`. Cell 1 executes it in
that cycle and passes it on, registered, to cell 2, which executes it one cycle
later, and so on down the row. All cells therefore run the same program, each
one cycle behind its left neighbour. This one-cycle skew is what makes a
single instruction stream work for a systolic algorithm:

* In steady state most algorithms repeat a single microinstruction every
  cycle. The two arithmetic pipelines and the delay lines overlap all the
  work, so the skew does not matter.
* A one-off instruction reaches cell j at a different time than a given
  stream word does. The stream moves at d cycles per cell and the instruction
  at 1 cycle per cell, so the two meet at a different word in every cell.
  This is how cell-specific values are loaded without cell-specific code (see
  "Loading weights" below).

The host feeds `cntl_in` and the data streams, and collects results from the
right end.

## The cell (`warp_cell`)

```
  y_left ─┐
 y_right ─┤3:1├─► y-file ─┐                           ┌─► x_out latch
  y_out ──┘               │      ┌───────────────┐    ├─► y_out latch
  x_left ─┐               ├─────►│               │────┼─► MPY RF A,B ──► lookup ─► MPY (5) ─┐
  x_out ──┤2:1├─► x-file ─┘      │   crossbar    │    ├─► ALU RF A,B ──────────────► ALU (5) ─┤
                                 │ 6 sources     │    ├─► memory write data                   │
 addr_left ──► addr-file ──┐     │ 8 destinations│◄───┴───────── MPY, ALU, memory results ◄───┘
                           ├─3:1─► memory address pair ──► addr_out latch
      crossbar ────────────┤       (also the outgoing address stream)
      memory read data ────┘                     microcode literal ──► crossbar
```

Crossbar sources (`src_e`): x-file output, y-file output, MPY result, ALU
result, data-memory read data, microcode literal.

Crossbar destinations (`DST_*`): x output latch, y output latch, MPY register
file write ports A and B, ALU register file write ports A and B, data-memory
write data, data-memory address pair.

Every source is a register output, so the combinational crossbar closes no
loop. Each destination picks its source independently every cycle.

**x-, y- and addr-files (`delay_file`).** Each is a 128-word file with a
write counter and a read counter. With `CTR_INC` both counters step every
cycle and the file is a delay line. A word written in cycle t appears on the
output in cycle t + D + 1, where D = (write counter − read counter) mod 128.
`CTR_LOAD` sets D, or sets absolute addresses. `CTR_HOLD` freezes the
counters, so the file works as a scratchpad addressed by the microcode.

**Register files (`regfile`).** There are two 32 × 32-bit files, one in front
of the MPY and one in front of the ALU. Each has two write ports from the
crossbar and two flow-through operand reads. Either operand can instead take
this cycle's crossbar word directly (`byp`). That is how a stream word goes
straight into the multiplier while the other operand is a stored weight.

**Look-up unit (`fp_lookup`).** It sits on the MPY's operand A and gives a
seed for 1/x or 1/sqrt(x), with a relative error below 2^-9. Two 256-entry
tables are computed at elaboration:

* 1/x: indexed by the top 8 fraction bits, `recip[i] = 2^33/(513+2i) − 2^23`.
* 1/sqrt(x): indexed by exponent parity and the top 7 fraction bits,
  `rsqrt[p][j] = isqrt(2^(56−p)/(257+2j)) − 2^23`.

Newton steps on the MPY and ALU refine the seed.

**Data memory (`data_memory`).** 4096 words, with one read and one write
every cycle. Read data arrive one cycle after the address. A read of the
address being written returns the old word. The address pair comes from a 3:1
mux: the addr-file (addresses flowing systolically with the data), the
crossbar (computed or literal addresses), or the memory's own read data
(indirect addressing). Whichever pair is selected also leaves the cell as its
address-stream output.

**Address pair format.** A pair travels as one 32-bit word: the write address
in bits 31:16 and the read address in bits 15:0 (`addr_pair_t`). Only the low
12 bits are used, and the field width leaves room for a 16K-word memory
(`WORDS` parameter).

**Input muxes (`in_mux`).** The 2:1 x mux takes the left neighbour's x or
the cell's own x output (wraparound). The 3:1 y mux takes the left
neighbour's y, the right neighbour's y, or the cell's own y output.
Wraparound lets one physical cell act as several consecutive logical cells
when host I/O is the bottleneck.

**Arithmetic (`fp_mul`, `fp_alu`).** IEEE-754 single precision with
round-to-nearest-even. The ALU does add, subtract, pass A and pass B. Each
unit takes a new operation every cycle and gives its result exactly 5 cycles
later. Simplifications:

* Subnormal inputs are read as zero, and results that would be subnormal are
  flushed to zero.
* Every NaN result is 0x7FC00000.
* An exact zero difference is +0.

Each unit computes its result in one combinational step followed by five
pipeline registers; a retiming synthesis flow can spread the logic.

**Twiddle counter (`twiddle_cnt`).** This is the one per-cell exception to
"all cells run the same code". In the constant-geometry FFT, cell i does
every butterfly of stage i. The powers w^0 … w^(n/2−1) of the root of unity
stream past all cells on x, one per butterfly. Cell i has to keep one entry
and reuse it for n/2^i butterflies before it takes the next one. For n = 16:

| cell (stage) | twiddle used by butterflies 0 … 7 |
|---|---|
| 1 | w^0 w^0 w^0 w^0 w^0 w^0 w^0 w^0 |
| 2 | w^0 w^0 w^0 w^0 w^4 w^4 w^4 w^4 |
| 3 | w^0 w^0 w^2 w^2 w^4 w^4 w^6 w^6 |
| 4 | w^0 w^1 w^2 w^3 w^4 w^5 w^6 w^7 |

The counter is controlled by the `cnt` field of the microinstruction:

* `CNT_INIT` clears the butterfly count. It sets the hold length to
  2^max(L − CELL_INDEX, 0), where L = log2(n/2) comes from `literal[4:0]` and
  `CELL_INDEX` is the cell's 0-based position. `warp_array` sets
  `CELL_INDEX` from its generate loop.
* `CNT_STEP` marks one butterfly and advances the count. The MPY register
  file's port-B write in that cycle happens only when the count is at the
  start of a hold period.
* `CNT_GATE` applies the last STEP's decision again without counting. A
  complex twiddle is two words (real and imaginary), so the second word is
  kept or dropped together with the first.

The microcode stays identical for every cell. Only the gating differs, and
that follows from the cell's position.

## Programming a systolic algorithm: timing rules

The difficult part of using the array is lining up the streams. With the
register placement of this cell, the rules are as follows. Write Dx, Dy and
Da for the counter differences of the x-, y- and addr-files.

| path through one cell | cycles |
|---|---|
| x_left → x-file → crossbar → x_out | Dx + 2 |
| x-file output → MPY → ALU input | 5 |
| y_left → y-file → ALU (5) → y_out | Dy + 7 |
| addr_left → addr-file → mux → addr_out | Da + 2 |
| address at the memory → read data at a unit input | 1 |
| instruction, cell j → cell j+1 | 1 |

**1-D convolution** computes y_i = Σ_j w_j x_{i+j}, with one weight per cell
and one output per cycle. Each y_i must meet x_{i+j} in cell j. That holds
when y moves one cycle per cell slower than x (dy = dx + 1). Here this means
Dy + 7 = Dx + 3, and the testbench uses Dx = 5 and Dy = 1. So x takes 7
cycles per cell, y takes 8 cycles per cell, and every cell repeats one
instruction:

    x-file, y-file, addr-file: write, INC
    crossbar: x_out <- x-file, MPY.A <- x-file (bypass), ALU.A <- MPY (bypass),
              ALU.B <- y-file (bypass), y_out <- ALU
    MPY.B <- MPY register 0 (the weight); ALU op = ADD

If x_i enters cell 1 in cycle T + i, y_i (its initial value) must enter in
cycle T + i + 9. The finished y_i leaves the last cell of an N-cell array in
cycle T + i + 9 + 8N.

**Loading weights.** A single instruction "MPY register 0 ← x-file" issued
in cycle t_w runs in cell j (0-based) in cycle t_w + j. In that cycle cell j
stores the x word that entered the array in cycle t_w − 6 − 6j. The host
therefore places w_j at that cycle of the x stream, and all N weights load
from one instruction.

**Adaptive weights (interpolation / resampling).** Each cell keeps several
weight sets in its data memory, loaded the same way with memory writes at
literal addresses. MPY.B takes the memory read data. The read address comes
from the addr-file and travels with its output y_i. For it to move at y's
speed, Da + 2 = 8, so Da = 6. The address for y_i enters cell 1 two cycles
before x_i. Every output can then use its own weight set, chosen by the host.

**Right-to-left flow.** Set `yin = YIN_RIGHT` and route the y-file to
y_out. A word given on `y_right_in` leaves `y_first_out` 3N cycles later
(Dy = 1).

**Wraparound.** Set `xin = XIN_WRAP`. With Dx = 1, each cell then holds a
ring of three words that circulates every three cycles.

**Twiddle distribution (FFT).** A butterfly takes 6 cycles. If the x delay
per cell is a whole number of butterfly periods plus the one-cycle control
skew, the same twiddle index reaches every cell in the same butterfly slot.
The testbench uses Dx = 47, which gives 49 cycles per cell: 8 periods of 6
cycles plus 1. It issues `CNT_INIT` (L = 3) once. Then, in every period, it
issues `CNT_STEP` with "MPY register 1 ← x-file", followed by `CNT_GATE` with
"MPY register 2 ← x-file".

**Matrix multiplication, five products interleaved.** The ALU needs 5
cycles per addition, so one running sum can only be updated every 5 cycles.
Five independent products Y_q = X_q·W therefore share the array. Word
x_q[i][k] enters in cycle 5k + q of a P = 5n cycle period. Each cell runs
the same periodic program:

* MPY: x-file word × MPY register k, where k = phase / 5.
* ALU, 5 cycles later: product + the ALU result fed back from 5 cycles
  before. For k = 0 the product alone is passed, and in those five cycles
  the finished sums of the previous row go onto y.
* In all other cycles y passes through the y-file, 6 cycles per cell.

Because the instruction reaches cell j j cycles late, x must take P + 1
cycles per cell (Dx = P − 1), so every cell sees the same phase. Cell j then
works on row i during period i + j. With n = 10 and ten cells, the ten
five-word bursts fill the y stream exactly.

**Butterfly at one per 6 cycles.** A complex butterfly
(a ± b·w) takes 4 multiplies and 6 adds, so the ALU limits it to one every 6
cycles. One butterfly, counted from its first memory read at cycle 0:

| cycle | action |
|---|---|
| 0–3 | memory reads b_r, b_i, a_r, a_i (literal addresses) |
| 0, 1 | w_r, w_i from x into MPY registers 1, 2 (STEP, GATE) |
| 1–4 | MPY: b_r·w_r, b_i·w_i, b_r·w_i, b_i·w_r (b kept in MPY registers 3, 4) |
| 3, 4 | a_r, a_i into the ALU register file |
| 7, 9 | ALU: t_r = b_r·w_r − b_i·w_i, t_i = b_r·w_i + b_i·w_r |
| 12, 16 | ALU: a_r + t_r, a_r − t_r |
| 14, 17 | ALU: a_i + t_i, a_i − t_i |
| 17, 21, 19, 22 | results leave the ALU, to y and to memory |

Every resource is used in a different cycle modulo 6, so a new butterfly
can start every 6 cycles with four in flight. The ALU register file is split
into four banks of eight registers, chosen by the butterfly number mod 4.
Each cycle's literal address pair holds the read address of one butterfly and
the write address of another.

## How far this follows the published design

Taken from the published prototype:

* the linear topology, with data and control moving one way
* ten cells, 32-bit floating point, and five-stage MPY and ALU pipelines
* 32-word register files, a look-up unit for 1/x and 1/sqrt(x), and 128-word
  x/y/addr files with self-incrementing counters
* a 4K-word data memory with one read and one write per cycle, and addresses
  from the addr-file, the crossbar or the memory itself
* a crossbar with six sources, one of them the microcode literal, and eight
  destinations
* the 2:1 and 3:1 input muxes, and the right-neighbour y path

This design's own choices:

* the microinstruction format and every encoding
* passing the microinstruction down the array instead of giving each cell a
  program store
* the register placement, which sets the latencies in the table above
* how the twiddle counter works: the hold-length rule, the INIT/STEP/GATE
  operations, and gating of the MPY register-file write (the published
  design only names a counter per cell for this job)
* operand bypass in the register files
* the address-pair packing
* the look-up table sizes
* reset behaviour, and the floating-point simplifications listed above

Known departures and omissions:

* **Register-file ports.** The prototype's register file is a six-port part.
  Only the four ports the cell datapath draws are built: two in from the
  crossbar and two out to the unit.
* **Per-cell behaviour.** Every cell runs the same instruction stream. The
  only position-dependent logic is the FFT twiddle counter. Other algorithms
  whose cells must act differently cannot be expressed without per-cell
  program memory. One example is 2-D convolution with the cell-saving trick,
  where only some cells buffer image rows.
* **Systolic delays of the matrix and FFT mappings.** The published
  mappings put a short fixed delay on x in each cell (6 latches for
  matrix multiplication). With one shared, skewed instruction stream, the
  x delay per cell must instead be one program period plus one cycle. Then
  every cell meets the same instruction phase. Results are the same, but the
  pipeline fill time is longer.
* **Outside parts.** The host, the external constant memory that feeds the
  FFT's addr and twiddle streams, and the boundary processor for
  divisions and square roots are outside the array and not modelled.

## Capacity against the evaluated workloads

* **1-D convolution.** A k-tap kernel needs k cells, so up to 10 taps fit.
  Simulated with 10 taps.
* **Adaptive-weight convolution.** Up to 4096 weight sets per cell fit in
  memory. Simulated with 4.
* **1024-point complex FFT, ten FFTs in flight.** Double-buffering needs
  2 × 1024 × 2 = 4096 words per cell, exactly the memory size. At 6 cycles per
  butterfly and 200 ns per cycle, one FFT completes every 614.4 µs. The
  twiddle distribution is simulated for the 16-point example on the full
  array. Butterfly arithmetic is simulated on one cell at one butterfly
  every 6 cycles, with four butterflies overlapped. Not simulated: passing
  results into the next cell's memory, and a whole FFT across several
  cells.
* **2-D convolution with a 5 × 5 kernel at full rate.** Needs 25 cells
  against the 10 built. Its row buffers (n − 5 words) fit easily.
* **3-D convolution.** Needs (n − k)(n + 1) words per cell. For n = 64 and
  k = 3 that is 3965, which fits.
* **Matrix multiplication with five interleaved products.** Cell j keeps
  column j of W, n words, in its MPY register file. That allows n ≤ 32, and
  n up to 4096 if the column is moved to the data memory. Simulated with
  n = 10 on the full array.

## Verification

Each module has a testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog:

| testbench | what it checks |
|---|---|
| `tb_fp_mul`, `tb_fp_alu` | exact products and sums of integer-valued operands; random full-precision operands checked against the exact double result rounded to single; round-to-even ties; specials; exactly 5-cycle latency at one operation per cycle |
| `tb_fp_lookup` | 1/x and 1/sqrt(x) seeds within 2^-8 and 2^-7 over 2000 random inputs; special values |
| `tb_regfile`, `tb_delay_file`, `tb_data_memory`, `tb_crossbar`, `tb_in_mux` | comparison with reference arrays and direct indexing; delays of 2, 5, 17 and 128 cycles; scratchpad use |
| `tb_warp_cell` | programmable delay, multiply-accumulate with exact cycle offsets, wraparound, right-to-left y, memory through the addr-file, indirect addressing, look-up, control pass-on |
| `tb_twiddle_cnt` | five counter positions against the 16-point twiddle table above; random sizes, re-initialisation, idle and GATE cycles checked against the hold-length rule |
| `tb_fft_butterfly` | one cell runs 16 radix-2 complex butterflies, one started every 6 cycles. Operands come from its data memory, twiddles from the x stream held by the counter for 4 butterflies, and results go out on y and back to memory. They are compared with each operation rounded to single precision |
| `tb_matmul` | full 10-cell array: five interleaved 4×10 by 10×10 integer-valued matrix products. Weights are loaded through x, one instruction per register. All 200 results are checked in their exact exit cycles |
| `tb_warp_array` | full 10-cell array at default parameters: 200-output convolutions with register weights and with address-selected memory weights, the systolic address stream, right-to-left flow, wraparound, indirect addressing, look-up, and the 16-point twiddle distribution read from cells 1–5; each mechanism is counted and must occur |

To run one with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/warp_pkg.sv tb/tb_fp_pkg.sv tb/tb_warp_array.sv --top-module tb_warp_array
./obj_dir/Vtb_warp_array +verilator+rand+reset+2
```

`tb_fp_pkg` holds the testbench helpers: integer-to-float conversion, a
double-to-float rounding routine, and float-to-real conversion.

## Files

* `rtl/warp_pkg.sv`: widths, sizes, enums, the microinstruction struct
* `rtl/warp_array.sv`: the top, a chain of `N_CELLS` cells
* `rtl/warp_cell.sv`: one cell
* `rtl/crossbar.sv`, `rtl/in_mux.sv`, `rtl/delay_file.sv`, `rtl/regfile.sv`,
  `rtl/fp_lookup.sv`, `rtl/fp_mul.sv`, `rtl/fp_alu.sv`,
  `rtl/data_memory.sv`, `rtl/twiddle_cnt.sv`: the cell's parts
* `tb/`: testbenches and `tb_fp_pkg.sv`
