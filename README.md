# Self-healing systolic-array accelerator for SRAM FPGAs

On an SRAM-based FPGA, a radiation upset in the configuration memory does not
flip one stored value. It rewires part of the circuit, and the damage stays until
that region is rewritten. Scrubbing the configuration works on a millisecond
scale, while an inference pipeline produces wrong results every few nanoseconds.
Triplicating a large accelerator is usually too expensive.

This RTL follows a different approach. It is built around a weight-stationary
N x N systolic array, and each array column is its own partially
reconfigurable region. The design does four things:

1. **Detect.** In testing mode, every matrix multiplication ends with a test
   vector. This vector makes each column output a checksum of its weights.
   A separate bank of accumulators computes the expected checksums from the
   same weights. Any mismatch marks that column as faulty.
2. **Exclude.** From the next operation on, a faulty column is left out of the
   computation and the data path skips over it. The other columns keep
   working.
3. **Repair.** Faulty columns are reconfigured one at a time. A repaired
   column rejoins at the next operation, so capacity comes back column by
   column.
4. **Replay.** The work that an excluded column could not do is saved in a
   weight recovery buffer, grouped by input channel. Once the regular
   operations are finished, this work is replayed as extra "recovery
   operations". The final output feature maps are exact, and the accelerator
   never stops.

The parts that cannot be RTL sit outside the design and are reached through
ports:
- the device's configuration port and the per-column partial bitstreams
  (`pr_req`, `pr_col`, `pr_done`);
- the upsets themselves (`cram_upset`, a fault-model input).

## How a convolution is mapped

A convolution is rewritten as matrix multiplications, one input channel at a
time:

- Each channel of the input image goes through Img2Col. This gives a P x K
  matrix: one row per output pixel and one column per kernel element, with
  K <= N. The host stores these matrices in `input_buffer`.
- The filters are split into G groups of N. For channel `ch` and group `g`, the
  weight tile is N x N. Row `r`, column `c` holds kernel element `r` of filter
  `g*N + c` for that channel. The tiles are stored in `weight_buffer`.
- An **operation** is one (channel, group) pair. It multiplies the channel's
  input matrix by the tile, so column `c` produces the channel-`ch` partial
  result of filter `g*N + c` for all P pixels.
- Operations run channel-major: (ch0,g0), (ch0,g1), (ch1,g0), ... In total
  there are C*G regular operations.
- `ofm_accumulator` adds each channel's partial results into the filter's
  output map. When all channels are done, the map is the convolution output.

Each filter's channels are summed separately, and this is what makes recovery
simple. A piece of work that was skipped is always "channel `ch` of filter `f`".
It can be redone later by any column, provided that column is given the same
channel's input matrix.

## The array and its timing (`sa_pe`, `systolic_array`, `input_skew`)

- **Weights.** Each PE holds one weight. `w_we`/`w_row_idx`/`w_row` write one
  row of weights per cycle.
- **Operands and partial sums.** Operands move right and partial sums move
  down. Each takes one cycle per PE.
- **Skew.** `input_skew` delays element `r` of each input row by `r` cycles,
  so the rows enter the array as a staircase.
- **Output timing.** If element 0 of a vector enters at cycle `t`, column `c`
  presents `sum_r x[r]*W[r][c]` at its bottom edge in cycle `t + N + c`.
- **Tag bits.** Two bits travel with every operand: *valid* and *test vector*.
  Column `c`'s `y_vld`/`y_tst` are the tags seen by its bottom PE, gated by
  `col_en[c]`.
- **Load/stream overlap.** Streaming starts one cycle after weight row 0 is
  written. Row `r` of weights is always in place before element `r` of the
  first vector reaches it, so loading and streaming overlap.

**Exclusion and bypass.** Beside every column, each row has a static bypass
register. When `col_en[c]` is low, the operand stream for column `c+1` comes
from that register instead of from column `c`'s PEs. The delay stays at one
cycle, so the timing does not change. Column `c`'s results are never marked
valid. This means a column can be broken, or be in the middle of
reconfiguration, without affecting its neighbours.

**Fault model.** `col_fault[c]` (the top-level `cram_upset[c]`) forces every
PE adder in column `c` to have a carry-in of 1. The column's results are then
off by N. In silicon this input is tied low; it exists so that simulation can
create upsets.

## Online checksum test (`checksum_checker`)

1. While a tile is written into the array, `checksum_checker` receives the
   same weight rows and sums each column into a reference accumulator.
2. In testing mode, the sequencer appends one input row of ones after the P
   data rows. For that row, a healthy column returns exactly the sum of its
   weights.
3. When a column's test result arrives (`y_vld & y_tst`), the checker compares
   it with the reference.
4. `done` rises once every enabled column has reported. `err_vec` then lists
   the mismatching columns.

The next operation does not start until this comparison is finished. This is
the "pause" in testing mode. With `test_mode` low, no test row is sent and
faults are not detected. `tb_selfheal_top` shows that in this mode the
affected filters come out wrong.

## Exclusion, logging and recovery (`sa_controller`, `recovery_buffer`, `ofm_accumulator`)

This is the core of the design.

**Per operation.** `sa_controller` samples the faulty set from `pr_manager`
when an operation starts, and uses its complement as `col_en`. Then it:

1. **RUN.** Reads the tile rows from the weight buffer and writes them into the
   array. It also keeps a copy in a local N x N tile register. It streams the P
   input rows, then the test row. It waits until `ofm_accumulator` has staged
   all P results of every enabled column and, in testing mode, until the
   checksum comparison is done.
2. **EVAL.** Columns that failed the checksum are reported to `pr_manager`
   (`err_vld`, `err_vec`). The staged results of the columns that are enabled,
   have work and passed the check are committed. `ofm_accumulator` adds them,
   one pixel per cycle, into `ofm[p][tag]`, where `tag` is the filter index of
   the column.
3. **LOG.** A column can have work but not commit it. This happens when it was
   excluded at the start, or when it failed the check just now. For each such
   column, its weight column (N values from the tile register) and its filter
   index are pushed into the recovery buffer region of the current channel.

Results wait in the staging buffer until the checksum has cleared them. So
the operation that *finds* a fault never adds a corrupted value.

**Recovery buffer.** The buffer has one FIFO region per input channel. All
skipped work of one channel sits together, because it all needs the same input
matrix.

**Recovery operations.** These start after the last regular operation:

1. Take the lowest channel whose region is not empty.
2. Pop as many entries as there are healthy columns, and place them in those
   columns. Their weights go into the tile register and their filter indices
   become the column tags. Columns left without work get zero weights.
3. Stream that channel's input matrix again and commit the results under the
   stored filter indices.
4. If a column fails again during a recovery operation, its entry is logged
   again.
5. If every column is faulty, the sequencer waits (`stall_cycles`).
6. `done` pulses once the buffer is empty.

**Worked example (`tb_fig1_workload`).** The setup is a 3 x 3 array, an RGB
input, 6 filters, and column 0 broken from the start. The regular operations
are R(f0-f2), R(f3-f5), G(f0-f2), G(f3-f5), B(f0-f2), B(f3-f5).

- The checksum of operation 1 finds column 0. Its f0/R result is discarded and
  logged.
- Operation 2 excludes column 0 and logs f3/R next to f0/R.
- Operation 3 still excludes column 0 and logs f0/G in the G region.
- The repair finishes during operation 3, so column 0 takes part again from
  operation 4.
- Recovery operation 7 runs f0 and f3 together on the R input. Recovery
  operation 8 runs f0 on the G input.
- All 54 output values are exact.

## Repair scheduling (`pr_manager`)

- Reported columns join the faulty set.
- If a faulty column exists and no request is outstanding, `pr_req` rises with
  the lowest faulty index on `pr_col`. Both stay stable until the configuration
  engine answers with a one-cycle `pr_done`. An assertion checks this.
- The repaired column leaves the faulty set. The next faulty column is
  requested in the following cycle.
- With k faulty columns, the total repair time is therefore the sum of k
  single-column reconfigurations.

Published figures for column-wise partial reconfiguration on an UltraScale+
device are about 0.6 ms (6 MACs per column) to 1.2 ms (22 MACs per column).
Reconfiguring a whole 22 x 22 array takes about 21 ms. These times belong to
the engine, not to this RTL. Regular work continues on the healthy columns
while a repair is in progress.

## Cycle budget of one operation

Count the cycles from operation start:

- `max(N, P+2) + 1` issue cycles;
- about `2N` cycles for the last result to leave the array;
- 1 evaluation cycle;
- N logging cycles;
- any rest of the P-cycle commit;
- 1 setup cycle.

At the default size (N=22, P=9), this comes to about 100 cycles per operation.
Operations do not overlap.

## Top level (`selfheal_top`)

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `start`, `test_mode` | in | run the convolution held in the buffers; append checksum vectors |
| `busy`, `done` | out | running; one-cycle pulse at the end |
| `wb_wr_en/addr/data` | in | host write of a weight-tile row, address `(ch*G+g)*N + r` |
| `ib_wr_en/addr/data` | in | host write of an input row, address `ch*P + p` |
| `ofm_rd_p`, `ofm_rd_f` / `ofm_rd_data` | in / out | combinational read of output pixel `p` of filter `f` |
| `cram_upset[N]` | in | fault model: configuration upset in a column (tie low in hardware) |
| `pr_req`, `pr_col` / `pr_done` | out / in | column repair request / completion |
| `faulty[N]` | out | columns currently out of service |
| `rb_overflow` | out | sticky: a recovery-buffer region overflowed (cannot happen at default depth) |
| `reconf_count`, `op_count`, `rec_op_count`, `logged_count`, `err_events`, `stall_cycles`, `check_wait_cycles` | out | activity counters of the last run |

| Parameter | Default | Meaning |
|---|---|---|
| `N` | 22 | array rows = columns = MACs per column (the largest size published for the scheme) |
| `C` | 3 | input channels (RGB) |
| `G` | 2 | filter groups per channel; F = G*N filters (two operations per channel, as in the worked example) |
| `P` | 9 | output pixels per feature map (this design's choice) |

Operands are signed 8-bit and accumulators are signed 32-bit (`selfheal_pkg`).
The recovery buffer holds F entries per channel. This is enough for every
filter of every channel to be logged at once.

## Simulating

Every testbench in `tb/` checks itself and ends with a
`TB_RESULT checks=... failures=...` line. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    --top-module tb_selfheal_top rtl/selfheal_pkg.sv tb/tb_selfheal_top.sv
./obj_dir/Vtb_selfheal_top
```

Replace `tb_selfheal_top` with any other testbench name.

**`tb_selfheal_top`** runs the whole design at its default size and compares
all output maps with a software convolution. It covers five scenarios:
- no fault;
- one column upset before the run;
- two columns upset in the middle of the run;
- all columns upset with slow repairs, which forces recovery to stall;
- testing mode off.

It counts every mechanism (detection, exclusion, bypass, logging, separate
channel regions, repair, rejoin, recovery operation, stall, checksum pause,
testing mode off, multiple faulty columns) and fails if any of them never
happened.

**`tb_fig1_workload`** replays the worked example above.

**`tb_array_sizes`** runs a full convolution with one faulty column at array
sizes 6, 10, 14 and 18. These are the other column sizes for which
reconfiguration times have been published. The run uses the helper
`tb/size_run.sv`.

**Unit testbenches.** There is one for each block:
- `tb_sa_pe`, `tb_systolic_array` (which also checks the `t + N + c` latency);
- `tb_input_skew`, `tb_checksum_checker`;
- `tb_weight_buffer`, `tb_input_buffer`;
- `tb_recovery_buffer`, `tb_ofm_accumulator`;
- `tb_pr_manager`;
- `tb_sa_controller`, which runs the sequencer against simple models of its
  neighbours.

## What follows the scheme and what is this design's own

**Taken from the scheme:**
- the checksum test vector appended in testing mode;
- reference checksums from a separate accumulator bank that sees the same
  weights;
- the error vector naming faulty columns;
- the pause until the comparison is done;
- automatic exclusion of faulty columns;
- column-wise repair, one column at a time, with rejoin at the next operation;
- the per-channel organisation of the work;
- the recovery buffer with per-channel regions;
- recovery operations after all queued work;
- the default array size.

**This design's own choices**, because the scheme does not specify them:
- operand and accumulator widths;
- the row-wise weight write port;
- the static bypass registers;
- the all-ones test vector;
- holding results until the checksum clears them;
- logging the work of the operation that discovers a fault;
- FIFO order inside a recovery region, and lowest-channel-first replay;
- the `pr_req`/`pr_done` handshake and lowest-index-first repair;
- buffer layouts, P = 9, and the carry-in fault model.

**Limits to keep in mind:**
- Img2Col is done by the host. The buffers hold already transformed matrices,
  and kernels larger than N elements per channel are not tiled.
- Skipped work keeps its nominal column in the regular operations. It is moved
  onto other healthy columns only in recovery operations.
- The fault model only corrupts partial sums. Damage to the operand path of a
  column is covered by the bypass, but no testbench injects such damage.
- Operations do not overlap. With testing mode off, the sequencer is no faster
  than with the pause in place, except for the one test row.
- Resource and timing figures of an FPGA build have not been reproduced.
