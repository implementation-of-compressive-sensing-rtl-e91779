# Streaming matrix-vector accelerator for compressive-sensing recovery

Compressive sensing rebuilds a sparse signal `x` of length N from M < N
measurements `u = Phi * x`. The greedy recovery algorithms (orthogonal
matching pursuit, CoSaMP-style compressive sampling matching pursuit and
stagewise OMP) repeat the same steps: correlate the residual with the columns
of `Phi`, pick columns, solve a small least-squares problem, and recompute the
residual `r = u - Phi * x_k`. The matrix-vector products are the regular,
parallel part of that loop. This design moves them into programmable logic.

This RTL is the logic half of a processor + FPGA system. A Cortex-A9 runs the
recovery algorithms in C. When it needs a product `y = A * b`, it has a DMA
engine stream `A` and then `b` into the core over one AXI4-Stream. The core
multiplies them with one floating-point multiply-accumulate lane per output
row and streams the `ROWS` results back through the same DMA. The processor
starts the core and waits for it over an AXI4-Lite control bus, polling or
using the interrupt line.

Default size: `ROWS = 24`, `COLS = 512`. This is a 24 x 512 measurement matrix
for a 512-sample scene. The same RTL also builds at 18 x 512 and 700 x 1000.

## What is in the RTL and what is not

| module | what it is |
|---|---|
| `mmult_accel_core` | top: sequencer, vector memory, `ROWS` lanes, control bus |
| `mmult_lane` | one output row: row memory, multiplier, adder, accumulator |
| `fp_mul`, `fp_add` | combinational IEEE-754 single-precision multiply and add |
| `mmult_ctrl_bus` | AXI4-Lite control slave and interrupt logic |
| `mmult_pkg` | float type, register offsets, sequencer states |

Outside the RTL, in the rest of the system:

- the processing system (Cortex-A9 cores, DDR, ACP port);
- the AXI DMA;
- the AXI interconnects;
- the reset block;
- the interrupt concatenation;
- an AXI timer, used only to count 100 MHz cycles for benchmarking.

All of these are standard vendor blocks. The core's ports are exactly the
signals those blocks connect to. The testbenches play the roles of the
processor and the DMA.

## One operation

```
ap_start ─► LOAD_A ─► LOAD_B ─► COMPUTE ─► DRAIN ─► OUTPUT ─► ap_done
           ROWS*COLS   COLS      COLS        2        ROWS
           words in    words in  cycles     cycles    words out
```

1. The processor writes 1 to bit 0 of `AP_CTRL`.
2. **LOAD_A.** `ROWS*COLS` words arrive, row-major: `A[0][0..COLS-1]`,
   `A[1][..]`, and so on. The word count alone steers each word to its row's
   memory at address `col`. Input `TLAST` is ignored, so `A` and `b` may come
   as one DMA transfer or as two.
3. **LOAD_B.** `COLS` words of `b` go into the vector memory. `ap_ready`
   pulses when the last one is taken, and the lane accumulators are cleared.
4. **COMPUTE.** The column index `k` steps from 0 to `COLS-1`, one per cycle.
   Every lane reads `A[i][k]`, and the vector memory broadcasts `b[k]` to all
   lanes.
5. **DRAIN.** Two cycles let the last product reach the accumulators.
6. **OUTPUT.** `y[0] .. y[ROWS-1]` leave on `OUTPUT_STREAM`. `TLAST` goes
   with `y[ROWS-1]`.
7. `ap_done` pulses. The core returns to idle, or starts the next operation
   at once if `auto_restart` keeps `ap_start` set.

`TREADY` is high only during the two load phases. A gap in the input
`TVALID` simply stalls the load. Output `TREADY` low holds the current result
word, and an assertion checks that it stays stable.

**Latency.** Without stalls, one operation takes
`ROWS*COLS + 2*COLS + ROWS + 4` cycles from start to done.

| size | this RTL | reported for the original core |
|---|---|---|
| 24 x 512 | 13,340 | 13,471 |
| 18 x 512 | 10,262 | 10,363 |
| 700 x 1000 | 702,704 | 706,213 |

Nearly all of the time is the input stream at one word per cycle. Overlapping
the multiply-accumulate with the arrival of `b` would save `COLS` cycles. It
is not done here, so the loading and computing phases stay as in the
original.

## The row lane

The lane is where the arithmetic happens. Its structure follows the resource
counts reported for the original core:

- one 18 Kb block RAM per row of `A`, plus one for `b` (19 at 18 rows);
- two per row when rows are 1000 words long (1,402 at 700 rows);
- five DSP slices per row: 90 at 18 rows, 120 at 24, 3,500 at 700.

That means one single-precision multiplier (three DSPs) and one adder (two
DSPs) per output row, with every row working in parallel.

Each lane is a three-stage pipeline:

| cycle | stage |
|---|---|
| t | `rd_en`, `rd_addr = k`: the row memory is read into a register |
| t+1 | `b_data = b[k]` (the core's vector memory is read in cycle t too); `A[i][k]*b[k]` is registered |
| t+2 | the product is added: `acc <= acc + product` |

The accumulator feeds back through a combinational adder in one cycle. That
is what lets the lane accept a new `k` every cycle, but it makes
`fp_add` the critical path. A higher-clocked version would pipeline the adder
and interleave several partial sums per lane. That would change the order of
the additions, and so the rounding of the results.

## Arithmetic and its exact results

Numbers are IEEE-754 single precision, with these rules:

- round to nearest, ties to even;
- subnormal inputs read as zero, and subnormal results flush to a signed zero;
- overflow gives a signed infinity;
- NaN in, or an invalid operation (infinity times zero, +inf plus -inf),
  gives `0x7FC00000`.

These are the usual FPGA floating-point operator settings. They are this
design's choice, since the original used an unspecified vendor operator.

Each `y[i]` is the exact sequential sum
`((((+0) + A[i][0]*b[0]) + A[i][1]*b[1]) + ...)`, with each operation rounded
once. It equals, bit for bit, a plain C loop in `float` with flush-to-zero.
A processor result computed in a different order (for example with SIMD) can
differ in the last bits.

`fp_mul` forms the exact 48-bit significand product, normalises it by at most
one place and rounds once. `fp_add` orders its operands by magnitude and
aligns the smaller one. The bits shifted out fold into a sticky bit, behind
guard and round bits. It then adds or subtracts, normalises by a
leading-zero count, and rounds.

## Control registers (`s_axi_control_bus_*`, 5-bit byte address)

| offset | register | bits |
|---|---|---|
| 0x00 | AP_CTRL | 0 `ap_start` (W1 sets; clears at `ap_ready` unless auto-restart), 1 `ap_done` (clears when read), 2 `ap_idle`, 3 `ap_ready`, 7 `auto_restart` |
| 0x04 | GIE | 0 global interrupt enable |
| 0x08 | IER | 0 done, 1 ready |
| 0x0C | ISR | 0 done, 1 ready; writing 1 toggles |

`interrupt = GIE & (ISR != 0)`. A write is taken when address and data are
both valid; there is one outstanding response per channel, and the response
is always OKAY. Only write-strobe byte 0 is used. The original design names
only the bus and the interrupt pin. The layout above is the conventional one
for cores generated from C, as the original was.

## Sizes and the workloads they serve

| workload | fits the default core? |
|---|---|
| 24 x 512 by 512 x 1 | yes, exactly: 13,340 cycles |
| 18 x 512 by 512 x 1 | yes, with six zero rows (or build with `ROWS=18`) |
| 12 x 12 by 12 x 12 matrix multiply | as 12 zero-padded products, 160,080 cycles |
| 700 x 1000 radar matrix by 1000 x 1 | as 30 x 2 tiles whose two partial sums per row the processor adds; 60 operations |

A 700 x 1000 core is legal RTL (`ROWS=700, COLS=1000`). But it needs
3,500 DSP slices, far beyond a 220-slice Zynq-7020, which is why the tiled
use matters.

The correlation step `Phi^T * r` is a 512 x 24 product. It needs a core built
with `ROWS=512, COLS=24`, or 22 passes of the default core.

Memory is `ROWS*COLS + COLS` words: 12,800 words (409,600 bits) at the
default. There are `ROWS` multipliers and `ROWS` adders.

## Where this departs from, or adds to, the original

- The pipeline depth, the phase sequencing, the word-count framing of the
  input stream, the reset (asynchronous, active-low `aresetn`) and the
  register map are this design's own choices.
- The floating-point rules (flush-to-zero, NaN handling) are chosen, as
  described above.
- Latency is within about 1% of the figures reported for the original core,
  but not identical.
- The original also tried an element-wise design, with a stand-alone
  streaming multiplier and adder fed one product at a time by two DMAs. That
  design was slower than the processor alone and is not included.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, the end-to-end test at full size:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mmult_accel_core \
  rtl/mmult_pkg.sv tb/fp_ref_pkg.sv rtl/fp_mul.sv rtl/fp_add.sv \
  rtl/mmult_lane.sv rtl/mmult_ctrl_bus.sv rtl/mmult_accel_core.sv \
  tb/tb_mmult_accel_core.sv
./obj_dir/Vtb_mmult_accel_core
```

| testbench | what it checks |
|---|---|
| `tb_fp_mul`, `tb_fp_add` | 20,000 and 30,000 random and directed cases, bit-exact |
| `tb_mmult_lane` | a 512-column lane with random gaps; the accumulator is checked at the exact cycle the pipeline predicts, and not a cycle early |
| `tb_mmult_ctrl_bus` | start/ready/done handshakes, auto-restart, interrupt enables and status, with random bus delays |
| `tb_mmult_accel_core` | five operations at the default 24 x 512 size (see below) |
| `tb_mmult_workloads` | the 12 x 12 matrix multiply and the tiled 700 x 1000 radar product |

The five operations of `tb_mmult_accel_core` are:

1. a three-target sparse measurement, with the exact cycle count checked;
2. a dense product with input gaps and output back-pressure, finished by
   interrupt;
3. and 4. two operations back to back under auto-restart, one of them an
   18-row problem padded with zero rows;
5. an overflow to infinity.

It also counts each stall, back-pressure, interrupt and restart event, and
fails if one never occurs.

`tb/fp_ref_pkg.sv` holds the reference arithmetic. It widens to double
precision and rounds back once, which is exact for products and correctly
rounded for sums.
