# Write-buffered accumulation for a systolic-array DNN accelerator

A systolic array that splits a convolution into many partial sums produces
far more values than there are outputs. Sending each partial sum to memory
separately, as a read-add-write, makes memory traffic the bottleneck. This
design adds the partial sums up on the way out instead.

Each column of the array gets three parts:

- a small **write-out buffer** that collects the column's partial sums, each
  tagged with its destination address;
- a **padded register** that picks up a run of neighbouring entries with the
  same address;
- a pipelined **adder tree** that reduces the run to one value.

Only the reduced values go through an output buffer to memory.

The default configuration is a 32 × 64 array of FP32 multiply-accumulate
processing elements. Each of the 64 columns has a 32-input FP32 adder tree.

```
 memory ──► RFA (32 lanes) ──►┌──────────────────────┐
 memory ──► RFB (64 lanes) ──►│ systolic array 32×64 │  PEs accumulate A·B
                              └──────────┬───────────┘
              one 32-value batch per column, with addresses, on "emit"
          ┌──────────────────────────────┼──────────────── … 64 columns
          ▼                              ▼
   write-out buffer 0             write-out buffer 63   (FIFO, 2 batches)
          ▼ run of equal addresses (≤ 32)
   padded register 0  …                                 (zero-filled)
          ▼
   adder tree 0 (5 levels)  …                           (valid + address per level)
          └──────────────┬─────────────────┘
                  output buffer ──► memory write port (value is added into the word)
```

## Files

| file | contents |
|---|---|
| `rtl/sa_pkg.sv` | FP32 and address types, `entry_t` = {value, address}, the null address |
| `rtl/fp32_add.sv`, `rtl/fp32_mul.sv` | combinational IEEE-754 binary32 adder and multiplier |
| `rtl/pe.sv` | processing element: Reg A, Reg B, multiplier, adder, Reg O |
| `rtl/systolic_array.sv` | ROWS × COLS grid of PEs |
| `rtl/feed_regs.sv` | feeding registers (RFA/RFB) with diagonal skew |
| `rtl/write_out_buffer.sv` | per-column buffer with capacity check and same-address ejection |
| `rtl/padded_register.sv` | zero-padding register in front of the tree |
| `rtl/adder_tree.sv` | pipelined FP32 reduction tree with address and valid forwarding |
| `rtl/output_buffer.sv` | collects column results and sends one write per cycle to memory |
| `rtl/wb_accel_top.sv` | the whole accelerator |
| `tb/*_tb.sv` | self-checking testbenches, one per module, plus the others described under Simulating |
| `tb/fp_ref_pkg.sv` | reference FP32 conversions for the testbenches |

## The processing element and the array

Each PE latches an operand from the left (`a_in`) and one from above
(`b_in`). It passes each to its neighbour one cycle later. Whenever both
operands are valid, it adds their product into its output register, Reg O.
Operands travel with valid bits: an empty slot carries +0 and a cleared
valid bit, so it adds nothing.

The feeding registers delay lane *i* by *i*+1 cycles. The memory side can
therefore present one whole operand vector per cycle (row vector `a_in`,
column vector `b_in`), and operand *k* of row *i* meets operand *k* of
column *j* in PE(*i*,*j*). After *K* vectors, PE(*i*,*j*) holds
Σₖ A[i][k]·B[k][j].

The last PE (bottom right) finishes *K*+ROWS+COLS cycles after the first
vector is presented: one cycle in the feeding registers and
*K*+ROWS+COLS−1 cycles in the array.

How a convolution layer is cut into such dot products is up to the
controller, and so is the choice of which PE sums belong to the same output
word. The control unit is not part of this RTL (see
[Limits and departures](#limits-and-departures)). The top exposes what the
controller needs:

- `emit`: requests that all PE sums be written out;
- `emit_valid[r][c]`: marks the PEs whose sum is to be written;
- `emit_addr[r][c]`: gives each PE sum's output address.

## Mapping a convolution

The accumulator saves memory traffic when partial sums of the same output
word sit next to each other in a column. One mapping that does this:

- columns are filters;
- each output pixel takes G adjacent rows;
- row *g* of a pixel computes the dot product over the *g*-th share of the
  filter's elements (input channel × filter tap).

All rows of a column see the same B stream, the filter's weights in full.
So row *g* gets the pixel's input elements for its own share and zeros for
the others. The G rows of a pixel are emitted to one address, the address
of the output word (pixel, filter). The column's tree then adds them, and
memory receives one write per output instead of G.

With this array, splitting a dot product over rows saves memory writes but
not array cycles, because the weights are shared down a column. The
controller chooses G and the addresses; the RTL only sees the addresses.

## Emitting partial sums and the capacity stall

When `emit` is high, column *c* offers its 32 values (those with
`emit_valid` set) as one batch to its write-out buffer. A buffer can take a
batch only if it has a free slot for every valid value in it. All 64
columns must be able to take their batches in the same cycle:

- **Accepted:** every batch is written in that cycle, packed in row order.
  Every PE restarts its accumulation in the same cycle, so Reg O is loaded
  with the current product and no cycle of computation is lost.
- **Not accepted:** `sa_stall` goes high. The feeding registers and the
  whole array hold every register, and the controller keeps `emit`, its
  addresses and its operand inputs unchanged. The emit completes in the
  first cycle in which `sa_stall` is low.

## Same-address ejection, padding and folding

Every cycle the accumulator advances, each write-out buffer looks at its
oldest entry and at the entries behind it, in order. It stops at the first
entry whose address differs, or after `TREE_IN` entries. It never searches
the whole buffer: mappings place partial sums of one output next to each
other, and comparing only neighbours keeps the logic small. That run is
removed from the buffer and loaded into the padded register. Slots past the
end of the run are filled with +0.

An empty buffer gives a padded register of zeros, with the null address
(all ones) and a cleared valid bit. If a run is longer than the tree is
wide, it is **folded**: it leaves over several cycles and gives several
partial results for the same address.

For example, with 4-input trees, a batch of seven values for address 1
(`1.5 2 3 4 4 3 2`) gives two padded-register contents:

- `1.5 2 3 4 → 1`
- `4 3 2 0 → 1`

The tree outputs 10.5 and 9 two cycles after each one. The memory adds both
into word 1. `tb/column_fold_tb.sv` replays this sequence cycle by cycle.

## The adder tree

A tree with N inputs (a power of two) has log₂N register levels. Each level
holds half as many FP32 sums as the level above. Beside the data, each level
carries:

- a valid bit;
- the destination address.

A new padded register can enter every cycle. The result leaves log₂N cycles
later on `out_val`/`out_addr`/`out_valid`. Invalid results (bubbles) are
dropped. The tree's `busy` output is high while any level, input included,
holds valid data. At the top, `busy` also covers the buffers and the output
buffer: it tells the controller when the accumulator has drained.

## Output buffer and back-pressure

The output buffer takes up to one result per column per cycle, packed in
column order. It presents one (address, value) pair per cycle on the memory
port, with a valid/ready handshake.

The memory is expected to **add** the value into the addressed word.
Partial results of one output word can arrive separately: after a fold,
from different columns, or from different emits.

The trees advance only while the output buffer has room for a full set of
64 results. Otherwise all trees, padded registers and buffer ejections hold,
and `acc_stall` is high. A slow memory therefore backs up, in order:

1. into the output buffer;
2. then into the write-out buffers;
3. and finally into the array, through the capacity stall.

## Number format

All arithmetic is IEEE-754 binary32 with round-to-nearest-even. Infinities
and NaNs follow the standard. Subnormal inputs are read as zero and results
below the normal range are flushed to a signed zero: this is a
simplification of this design. The PE's multiply and add round separately
(no fused multiply-add). Tree results are rounded at every level, so a sum
may differ in the last bit from a sum taken in another order.

## Parameters

| module / parameter | default | origin |
|---|---|---|
| `wb_accel_top.ROWS` | 32 | array size used for the published results |
| `wb_accel_top.COLS` | 64 | array size used for the published results |
| `wb_accel_top.TREE_IN` | 32 (= ROWS) | tree as wide as a column; must be a power of two ≥ 2; half-size trees (ROWS/2) are a supported variant |
| `wb_accel_top.BUF_MULT` | 2 | write-out buffer capacity in batches (own choice); ROWS·BUF_MULT must be a power of two |
| `wb_accel_top.OB_DEPTH` | 128 | output buffer entries (own choice); power of two ≥ COLS |
| `sa_pkg::ADDR_W` | 20 | address width (five hex digits) |

All registers reset asynchronously on `rst_n` low.

## Limits and departures

- **Controller not included.** There is no instruction decoder or layer
  scheduler. The top's ports stand where the controller would connect: the
  operand feed, the emit request and the stall/busy flags.
- **Batch write in one cycle.** A batch is written into its buffer in a
  single cycle. A one-value-per-cycle insertion would hold the array for up
  to ROWS cycles per emit.
- **Neighbour-only matching.** Ejection compares only neighbouring entries.
  Equal addresses separated by a different one are not combined in the
  buffer, only later in memory.
- **Operand sharing.** The array's operands are shared along rows (A) and
  down columns (B), and every PE keeps its own sum. Mappings in which
  different rows of a column must use different weights at the same time
  cannot be expressed.
- **Unbounded latencies.** No latency is guaranteed for an emit or for
  draining: both depend on the memory's ready rate.
- **Synthesis unverified.** Only simulation has been run; there are no
  timing or area results. The FP32 adder and multiplier are single-cycle
  combinational blocks, and a real implementation at speed would pipeline
  them.

## Simulating

The testbenches need Verilator 5 with `--timing`. From the top directory:

```sh
verilator --binary --timing --assert -Wno-fatal --top-module wb_accel_top_tb \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/sa_pkg.sv tb/fp_ref_pkg.sv tb/wb_accel_top_tb.sv
./obj_dir/Vwb_accel_top_tb
```

Replace the top module and file name to run another testbench. Each prints
`TB_RESULT checks=N failures=M` and stops at a watchdog if it hangs.

- `wb_accel_top_tb` runs 12 tiles of random integer matrix products on a
  4 × 4 array with 2-input trees, one-batch buffers and a 4-entry output
  buffer. The memory answers with a random ready. The test checks every
  memory word against the exact sum of the partial sums sent to it. It
  counts, and requires at least once, each of the following:
  - the capacity stall;
  - the output back-pressure stall;
  - the merging of neighbouring equal addresses;
  - a fold;
  - zero padding.
- `wb_accel_top_full_tb` runs the top at its default size, 32 × 64, two
  tiles. Building it takes a few minutes; the run itself takes seconds.
- `column_fold_tb` runs the folding example above on one column, buffer to
  tree.
- `conv_layer_tb` runs two small convolution layers end to end on an 8 × 8
  array with 4-input trees:
  - 8 filters of 1×1×16 on a 7×7×16 input;
  - 8 filters of 3×3×4 on a 5×5×4 input.

  Each output's dot product is split over two adjacent rows of a column,
  as described in [Mapping a convolution](#mapping-a-convolution). The test
  checks the exact output map and that memory receives exactly one write
  per output: 784 partial sums become 392 writes, and 144 become 72.
- The other testbenches check one module each against independent reference
  models. The FP units are compared with double-precision arithmetic rounded
  to single precision.
