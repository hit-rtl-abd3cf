# HiT — one array for hyper-sparse, moderately sparse and dense matrix multiplication

HiT multiplies C = A x B on a single fabric of 16,384 FP32 multipliers
(4 Compute Clusters x 32 Compute Rows x 4 Compute Groups x 32 lanes). The fabric
is reconfigured between three dataflows, chosen per matrix by its density:

| mode | operands | dataflow | what does the work |
|---|---|---|---|
| HSparse (`MODE_HS_COMP`, `MODE_HS_DIRECT`) | hyper-sparse A | outer product: each Row owns a slice of A's columns and the matching B rows; partial sums (psums) travel over a ring of Rows to the Row that owns their C row | PIDU, PSum Router ring, DMAccum binning into the Local Buffer |
| MSparse (`MODE_MS`) | moderately sparse | each Row owns a slice of A's rows; B is broadcast to all Rows of a Cluster, one 64-element group at a time | PIDU, DMAccum direct indexing into the Local Buffer |
| Dense (`MODE_DENSE`) | dense | weight-stationary systolic array, K = 128 Rows deep, 128 columns wide | multipliers and DMAccum adders only |

## The sparse datapath of one Compute Group

The Groups are where the design differs from a plain systolic array.

* **PIDU (`pidu`)**: the intersection unit. One A element (column k) meets a
  group of 64 B elements. 64 comparators mark the B elements whose row is k. A
  leading-zero count finds the first match, and a shifter moves up to 32
  matches onto the 32 multipliers. These are four pipeline stages. If more
  than 32 B elements match, the element stays in stage 2 for another pass,
  and the PIDU stops taking input until the pass is done. The `pidu_split`
  event marks this.
* **Multipliers (`fp32_mul`)**: 32 per Group, combinational, followed by one
  register.
* **PSum Router (`psum_router`)**: HSparse only. The Row that owns C row r is
  `(r / 16) mod 32`. A psum vector (32 products that share one C row) goes to
  local DMAccum, or leaves over the up or down ring link, whichever is shorter.
  There are four buffers: 6 for up-in, 6 for down-in, 4 for multiplier-in and
  6 for to-DMAccum. Vectors already on the ring go first. A new vector may
  enter the ring only if the next router has two free entries. This rule
  keeps one slot free, so the ring cannot deadlock. When the multiplier-in
  buffer is full, the Group stalls (`router_stall`).
* **DMAccum (`dmaccum`)**: reads the Local Buffer row of a psum vector's C
  row, adds the 32 lanes into it and writes it back, all in one cycle.
  * Compressed mode (HS x HS): the C column goes to bin `col mod 8`, and each
    bin has 16 slots. Each lane is compared with the stored columns of its bin
    (32 lanes x 16 slots = 512 comparators). On a hit the lane is added to
    that slot. On a miss it takes the next free slot; lanes of one vector that
    share a bin take free slots in lane order. If the bin is full, the lane
    goes to a 4-vector overflow buffer, which is spilled out of the chip
    (`acc_overflow`). The host adds spilled psums to the drained results.
  * Direct mode (MSparse, and HS x MS / HS x D): the slot is fixed,
    `bin = col mod 8, slot = (col / 8) mod 16`, so one Local Buffer row holds
    a 128-column tile of a C row.
  * Dense mode: the same 32 adders add each product to the psum coming from
    the Row above.
* **Local Buffer (`local_buffer`)**: 16 rows x 8 banks x 16 entries of
  {valid, column, FP32}. It has four read and four write ports, one each per
  Group, and a drain port for the host. When Groups ask for the same row, the
  lowest-numbered Group wins and the others wait (`lb_conflict`).

## Memory and streaming

* **Global Memory (`global_memory`)**: one per Cluster, 128 banks of 512
  words x 64 B. Banks 4r..4r+3 form the dedicated channel of Row r, one
  2048-bit line per cycle. A line holds 32 COO elements, each 64 bits
  `{valid, row[15], col[16], value[32]}`, or 64 FP32 values. A line is ready
  one cycle after it is granted.
* **Stream controller (`stream_ctrl`)**, one per Row:
  * HSparse: reads a B group of 2 lines, then sends up to 4 A elements per
    cycle, one per Group, while their column is at most the group's highest
    B row. When the next A element is beyond that row, it loads the next B
    group.
  * A is sorted by (column, row). B is sorted by row, and no B row may cross
    a group boundary.
* **B broadcast (`b_broadcast`)**, MSparse: reads B groups from one bank group
  and sends them to every Row of the Cluster. It moves to the next group only
  after every Row has finished the current one (`bcast_sync`). This is how
  the Rows are kept partly in step.
* **Dense**: each Row loads its 128 stationary weights (2 lines) and then
  feeds one A value per cycle. Row r starts 4 + r cycles after start. Psums
  run down the 32 Rows of a Cluster and on into the next Cluster. The last
  Row of the last Cluster emits one C row per cycle per Group, with Group g
  one cycle behind Group g-1.

## Reconfiguration

`config_ctrl` takes a mode request. It drops every enable flag, clears the
Local Buffers, and after 4 cycles sets the flags of the new mode. The flags
stand in for the clock and power gates. `start` may only be raised while
`cfg_busy` is low.

## Using the top (`hit_top`)

1. Write the operands into Global Memory one 64-byte bank word at a time (`gm_wr_*`).
2. Write one descriptor per Row with `desc_wr`:
   * `a_base` and `a_lines`;
   * `b_base` and `b_lines`;
   * `dense_m`, the number of A rows in dense mode.
3. In MSparse, also write one broadcast descriptor per Cluster (`bdesc_wr`).
4. Select the mode with `cfg_valid`/`cfg_mode`.
5. Pulse `start` and wait for `done`.
6. Collect the results:
   * sparse modes: read the Local Buffer rows with `drain_*` (data appears one
     cycle later), and collect `spill_*` vectors during the run;
   * dense mode: results come out on `dense_valid`/`dense_out`.

`evt` has one flag per mechanism. The testbench uses these flags to count events.

## Where this design departs from the description it follows

Choices of this implementation:
* Index widths (15-bit rows, 16-bit columns).
* The COO bit layout and line format.
* The number of Local Buffer rows (16), and the 128-column C tile of direct mode.
* The length of the overflow buffer.
* The router's bubble rule.
* The owner function of C rows.
* The Local Buffer port arbitration.
* Spilling overflowed psums to the host.
* A 4-cycle reconfiguration.

Other departures:
* The Local Buffer is 12.25 KiB, against the 11.4 KB given.
* The multiplier is one combinational stage plus a register, not a deeper
  pipeline.
* The dedicated Row channel is also used in MSparse and dense mode.

Not built:
* HBM. The host writes Global Memory directly.
* The CSR-to-COO conversion and host preprocessing (sorting, B grouping, tiling).
* Real clock and power gating cells.

Workloads of the evaluation that exceed 16 MB of on-chip memory would need
streaming from HBM: opt1, cage12, msc10848 and the Llama2-7B layers.

## Verification

Every testbench in `tb/` checks its results and ends with one
`TB_RESULT checks=N failures=M` line.

* `tb_fp32_mul`, `tb_fp32_add`: compare with rounding done in double precision.
* `tb_sync_fifo`, `tb_local_buffer`: compare with queue and array models.
* `tb_config_ctrl`: checks the mode table and the timing.
* `tb_pidu`: compares every emitted (row, column, product operand) pair in
  order, under random back-pressure, and checks the 4-cycle latency and the
  pass splitting.
* `tb_hit_top`: the whole design at 2 Clusters x 4 Rows. It runs an HSparse
  HS x HS product, an MSparse product and a dense product (K = 8, 128
  columns, 20 rows). It compares about 20,000 results with products computed
  in the testbench, checks the dense output rate, and requires each of the
  nine mechanisms in `evt` to happen. The dataflow blocks (Cluster, Row,
  stream controller, Group, router, DMAccum, broadcast, Global Memory) are
  tested through it.

No testbench runs the full 4 x 32 size. The largest size simulated is
2 Clusters x 4 Rows. At full size the model is about 16 times larger, and
building it takes far longer than a routine test run. Verilator's memory use grows about linearly with the number of Rows, about 140 MB per Row, so elaborating the full-size top needs about 18 GB.

Simulate with Verilator, for example:

    verilator --binary --timing -Wno-fatal --top-module tb_hit_top \
      rtl/hit_pkg.sv $(ls rtl/*.sv | grep -v hit_pkg) tb/tb_hit_top.sv
    obj_dir/Vtb_hit_top
