# A true random number generator from a filled-up FPGA

An FPGA design that keeps almost every slice and most of the routing busy can
stop behaving deterministically. Coupling between heavily used wires makes
registers read values that differ from run to run, even though every operator
in it is deterministic on its own. This generator uses that effect as its
entropy source. A floating-point computational core turns out a new result on
every clock. A 64-bit fixed-point accumulator sums the results. The accumulator
bits that change most from run to run are reduced by an XOR tree to random
bytes, which go to a PC over a serial line.

This RTL gives the data path and control around that entropy source. The
entropy source is the physical behaviour of a nearly full chip. Logic cannot
describe it, and in simulation the design is fully deterministic: the same
points and the same pipeline give the same bytes every time. On a device, the
randomness appears only when the complete design, including a large enough
floating-point pipeline, fills the chip. The reference implementation was a
Virtex-II Pro 30 at 45 MHz, with 100 % of its slices, 88 % of its LUTs and 95 %
of its block RAMs in use.

## Data flow

```
 load port ──> point_memory ──> pipeline_interface ──> (floating-point pipeline,
                                                        outside trng_top)
                                                              │ pipe_res (fp32)
                            ┌─────────────────────────────────┴──────────┐
                     fp_accumulator (32-bit float)        fix_accumulator (64-bit fixed)
                            └───────────────┬────────────────────────────┘
                                      result_cache  ── core_en: stalls the core
                                            │ 64-bit value
                                      xor_postproc  (bits 39..8 → 1 byte)
                                            │
                                         uart_tx ──> uart_txd (RS-232 to the PC)
```

All of it runs on one clock (`clk`, 45 MHz by default).

* `point_memory` holds the point set. Each point has three single-precision
  coordinates (X, Y, Z). It is loaded through its own write port.
* `pipeline_interface` reads one point per clock, walking through addresses 0
  to `last_addr` and then wrapping around. It hands each point to the
  floating-point pipeline.
* The floating-point pipeline is **not** part of this RTL (see below). It
  connects through the `pipe_*` ports of `trng_top`.
* `fp_accumulator` is the regular accumulator. It adds each pipeline result into
  a 32-bit floating-point register.
* `fix_accumulator` is the improved accumulator. It converts each result to
  fixed point and adds it into a 64-bit register.
* `result_cache` stores every pair of accumulator values, one pair per
  accumulated result. It stalls the core while it is being emptied.
* `xor_postproc` turns each 64-bit value into one random byte.
* `uart_tx` sends the bytes at 115200 baud, in 8N1 format.

## The cache and the stall

The core produces one value per clock, far faster than a serial link can carry.
The cache therefore works in two phases, not as a FIFO:

1. **Fill.** `core_en` is high. The pipeline interface, the external pipeline
   (through `pipe_en`) and both accumulators advance on every clock. Each clock
   on which the accumulators took a result writes one entry: the 64-bit and
   32-bit sums after that result.
2. **Drain.** When the last of the `CACHE_DEPTH` entries has been written,
   `core_en` drops and the whole core freezes. The entries are read back in
   order through the post-processor to the transmitter. After the last entry has
   been accepted, `core_en` rises again and the core continues exactly where it
   stopped.

The stall is a clock enable, not a stopped clock. Every register in the core
updates only when `core_en` is high, and the external pipeline must do the same
with `pipe_en`. A stalled core therefore behaves as if it received no clock
edges. For example, one result that is already inside the accumulator register
when the stall begins is held there, and it becomes the first entry written
after the restart. No value is lost and none is written twice.

Timing: a fill of `CACHE_DEPTH` entries takes `CACHE_DEPTH` clocks once the
pipeline is full. The drain is paced by the serial link, at 10 bit times per
entry. With the defaults (8192 entries, 390 clocks per bit) one drain takes
about 32 million clocks, or 0.71 s at 45 MHz.

`run` low pauses the point stream without stalling the rest of the core. Results
already in the pipeline are still accumulated.

## The two accumulators

**Regular accumulator.** This is an IEEE 754 single-precision sum with a
single-cycle adder fed back into the register. That is what lets it take one
operand per clock. The adder rounds to nearest, ties to even. Subnormals read as
zero and tiny results are flushed to zero. An overflow gives infinity, and NaN
or infinity inputs get no special treatment. Large sums lose the low-order
contributions, which is why this design has a second accumulator.

**Improved accumulator.** This is a 64-bit two's-complement fixed-point register
whose least significant bit weighs 2^`LSB_EXP` (2^-32 by default). An operand
1.f × 2^(e-127) is converted by shifting its 24-bit significand by
e − 150 − `LSB_EXP` places. Bits below the LSB are cut off from the magnitude.
Negative operands are subtracted. `acc_overflow` is a sticky flag. It is set
when an operand's magnitude needs more than 63 bits or when a signed addition
wraps.

Both accumulators present their new sum one clock after the operand. Their
`out_valid` says whether the last enabled clock added an operand.

## From 64 bits to a random byte

Only bits 39..8 of the improved accumulator are used. On hardware, the
run-to-run differences hit these middle bits most often, and they scored best
in statistical tests. The high bits (63..40) and the lowest byte (7..0) are
discarded. The 32 bits form four bytes:

```
  b3 = acc[39:32]   b2 = acc[31:24]   b1 = acc[23:16]   b0 = acc[15:8]
  random byte = (b3 ^ b2) ^ (b1 ^ b0)
```

Each output bit is thus the XOR of four raw bits. This reduces bias and spreads
entropy at the cost of a factor of four in bit rate: 32 raw bits become 8 output
bits. The unit has a valid/ready interface with one output register and
handles one word per clock.

## What is not in the RTL

* **The floating-point pipeline.** The original core was a deep pipeline of
  floating-point operators from a separate operator library. It computed
  physical quantities from the point coordinates, but the computation is not
  specified. `trng_top` brings its interface out instead:
  * `pipe_en`: the clock enable the pipeline must obey;
  * `pipe_valid`, `pipe_point` and `pipe_last`: the operands;
  * `pipe_res_valid` and `pipe_res`: one single-precision result per enabled
    clock.

  The testbenches use `tb/fp_pipeline_model.sv`, a non-synthesizable stand-in
  that computes x·y + z with a latency of 6 enabled clocks.
* **VGA monitors.** These were only used while the effect was being
  investigated, and are not part of the generator.
* **Ethernet link.** An Ethernet link works in place of RS-232 as well. Only
  RS-232 is given here.
* **Warm-up.** On hardware the first stretch of output, roughly 100 000 numbers,
  is the same from run to run. Nothing in the RTL discards it. A user who needs
  it discarded must drop those bytes.

## Choices made in this RTL

The overall structure is fixed by the generator's description. So are the
widths 32 and 64, the bit range 39..8, the grouping into bytes under an XOR tree
and the 45 MHz clock. The following were chosen here:

| item | choice |
|---|---|
| number format of pipeline results and regular sum | IEEE 754 single |
| fixed-point LSB weight `LSB_EXP` | 2^-32 |
| point memory depth `PT_DEPTH` | 4096 points |
| cache depth `CACHE_DEPTH` | 8192 entries of 96 bits |
| serial link | 115200 baud, 8N1, LSB first |
| stall mechanism | clock enable (`core_en` / `pipe_en`) |
| point order | sequential, wrapping after `last_addr` |
| reset | synchronous, active low; memories not reset |
| handshakes | valid/ready between cache, post-processor and UART |

The cache stores the 32-bit regular sum next to each 64-bit value, because both
accumulators feed it. Only the 64-bit value is post-processed, so synthesis
will trim the 32-bit half unless something else reads it.

## Parameters of `trng_top`

| parameter | default | meaning |
|---|---|---|
| `PT_DEPTH` | 4096 | points in the point memory (address width `$clog2(PT_DEPTH)`) |
| `CACHE_DEPTH` | 8192 | cache entries per fill/drain round |
| `LSB_EXP` | -32 | weight 2^`LSB_EXP` of the fixed-point LSB |
| `CLK_HZ` | 45 000 000 | clock frequency |
| `BAUD` | 115 200 | serial bit rate; `CLK_HZ/BAUD` clocks per bit, rounded down |

To fill a bigger device in the spirit of the original, enlarge the memories and,
above all, the pipeline. The accumulators and post-processor do not depend on
these sizes.

## Files

`rtl/`:

* `trng_pkg.sv`: shared types (`point_t`, `cache_entry_t`, `fp32_t`) and widths
* `point_memory.sv`
* `pipeline_interface.sv`
* `fp_add.sv`: used by `fp_accumulator.sv`
* `fp_accumulator.sv`
* `fix_accumulator.sv`
* `result_cache.sv`: includes assertions for its read handshake
* `xor_postproc.sv`
* `uart_tx.sv`
* `trng_top.sv`

`tb/`:

* one self-checking testbench per module: `tb_<module>.sv`
* `tb_trng_top.sv`: an end-to-end run at small sizes
* `tb_trng_top_full.sv`: an end-to-end run at the default sizes
* `tb_ref_pkg.sv`: the reference arithmetic they share
* `fp_pipeline_model.sv`: the pipeline stand-in

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. For example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/trng_pkg.sv tb/tb_ref_pkg.sv rtl/*.sv tb/fp_pipeline_model.sv \
  tb/tb_trng_top.sv --top-module tb_trng_top -Mdir obj_top
./obj_top/Vtb_trng_top
```

For a single block, list only its files. For example, for the fixed-point
accumulator: `rtl/trng_pkg.sv tb/tb_ref_pkg.sv rtl/fix_accumulator.sv
tb/tb_fix_accumulator.sv --top-module tb_fix_accumulator`.

What the tests establish:

* **Accumulators.** The expected values come from independent reference
  arithmetic. Floats are widened exactly to double precision, added, and
  rounded back. Fixed-point values are computed with 128-bit integers. Tens of
  thousands of random operands are checked, including cancellation, operands
  that are fully shifted out, truncation and overflow.
* **`tb_trng_top`.** This runs seven fill/drain rounds at small sizes. It
  predicts every accumulator value and every random byte. It checks the bytes
  both where they enter the transmitter and after decoding the serial line. It
  also checks that nothing sent to the pipeline changes while the core is
  stalled. It counts stalls, restarts, wraps of the point stream, negative and
  truncated results, and pauses of `run`, and it fails if any of them never
  occurred.
* **`tb_trng_top_full`.** This does the same at the default sizes. It loads 4096
  points, runs one complete fill of 8192 entries and sends all 8192 bytes over
  the 115200-baud link, about 32 million clocks. It takes under a minute of
  simulation.

None of this says anything about the randomness of the output on hardware.
That can only be measured on a device filled as described above.
