# Parallel ordered-access machine

A processor in which nothing is found by address. Every instruction, every
operand and every result carries an **index**: its position (row, column) in a
matrix. The memories are *ordered-access memories*. You write items into them
in any order, each with its index, and they hand back whole rows already
sorted by index, one item per output port. A program is cut into **stages**.
Every operation of a stage depends only on results of earlier stages, so all
operations of a stage can run in any order and in parallel. Each stage is run
as a sequence of **steps**. In one step, one row is read from the memories and
every ALU executes one instruction. Each result is written back under an
index chosen in advance, when the program was prepared. The results of stage
*s* therefore arrive in the memory as a correctly ordered operand matrix for
stage *s+1*. Nobody computes addresses and no two ports ever compete for a
location.

This repository holds synthesizable SystemVerilog for that machine: the
ordered-access memory, the data and instruction memories built from it, the
ALUs with their index buffers, and the stage/step sequencer. Self-checking
testbenches cover every block, plus an end-to-end run of an RGB-to-YUV
colour conversion.

## The ordered-access memory (`poam`)

This block is the key to the whole design.

* **Index.** An index is `{stage, row, col}` (4 + 4 + 4 bits, `poam_idx_t` in
  `poam_pkg`). `stage` selects the matrix, `row` the step, and `col` the output
  port.
* **Writing (entering).** Up to `WPORTS` items per cycle. The memory array has
  `P` locations, each holding a valid bit, an index and a data item. The items
  of a cycle go to the next free locations in port order, so writes never
  conflict and the writer never gives an address.
* **Reading (fetching).** A request names a row `(stage, row)`. For each of the
  `RPORTS` output columns *t*, every valid location compares its index with
  `(stage, row, t)` in parallel. The matching item appears on port *t* one
  cycle later. `rd_present[t]` is low when no item has that index. Such holes
  are normal: a column with no operand, or an ALU with no instruction in that
  step.
* **Lifetime.** Reads do not consume items. `clear` empties the memory. Items
  written when it is full are dropped and raise the sticky `overflow` flag. If
  two items have the same index, the older one is returned.
* **Timing.** An item written at edge *e* can be read by a request issued in
  the cycle after *e*.

The placement policy and the parallel compare are the simplest logic with this
behaviour. An implementation could also sort the indices in a pipelined
network; the interface would not change. Defaults: 8 write ports, 8 read
ports, 32-bit items, 64 locations.

## Machine organisation (`poam_machine`)

```
            outside load (idle)                       outside load (idle)
                  |                                          |
      +-----------v------------+                  +----------v---------+
      |  data_poam  (3N cols)  |<-- row request --|  exec_controller   |
      |  cols 0..2N-1 operands |                  |  stages / steps    |
      |  cols 2N..3N-1 indices |                  +----------+---------+
      +--+--------+--------+---+                             | row request
         |operands|        |indices                +---------v---------+
         |        |        v                        |  instr_poam (N)   |
         |        |   index_buffer B_c              +---------+---------+
         v        v        |                                  | op_c
        ALU_c (a = col 2c, b = col 2c+1) <---------------------+
              |            |
              +--result----+--index--> write back into data_poam
```

* **`data_poam`** is a `poam` with `3N` columns. Columns `2c` and `2c+1` are
  the operands of ALU *c*. Column `2N+c` holds the **result index** of ALU *c*
  for that step: an index stored as an item under its own index, kept in the
  low 12 bits of the data word. One read therefore brings everything a step
  needs except the instructions. The `N` write ports serve the outside loader
  while the machine is idle and the ALU write-back while it runs. Outside
  writes during a run are refused (`load_ignored`).
* **`instr_poam`** is a `poam` with `N` columns of 3-bit opcodes. An empty
  position is issued as `nop` and reported on `instr_absent`.
* **`alu`** (one per column) executes `mul`, `add`, `sub` (a − b), `tr`
  (pass *a* unchanged, to move a value to a later stage under a new index) and
  `nop`. It uses 32-bit two's-complement arithmetic that wraps, and the
  product keeps its low 32 bits. The result is registered, with one-cycle
  latency. An instruction whose operands are missing produces nothing and
  raises `operand_err`.
* **`index_buffer`** (B) delays the result index by the ALU latency, so the
  result and its index reach the write port in the same cycle. A result
  without an index is discarded (`result_dropped`).
* **`exec_controller`** captures `num_stages` and `steps[]` at `start`. It then
  requests rows `(s, 0) … (s, steps[s]−1)` for every stage, one per cycle.
  After the last row of a stage it idles for 2 **drain** cycles (`stall`),
  until that stage's last results are in the memory. Then it starts the next
  stage. After the final drain it pulses `done`.

### Timing

The pipeline is: read request → row out (1 cycle) → ALU result and buffered
index (1 cycle) → written at the next edge. Steps within a stage are issued
back to back. A program of *S* stages with *T* steps in total raises `done`
**T + 2·S + 1** cycles after the `start` cycle. A stage with zero steps
counts as one step.

### Programming the machine

With the machine idle:

1. Pulse `clear`.
2. Write the **initial operands** of stage 0 through `dm_wr_*`, each at its
   `(0, row, col)`.
3. For every instruction at `(s, row, c)`, write a **result-index item**
   through `dm_wr_*`. It goes at index `(s, row, 2N+c)`, and its data is the
   index the result must take in stage *s+1*, e.g. `(s+1, r', c')`.
4. Write the **instructions** through `im_wr_*`, each at `(s, row, c)`.
5. Set `num_stages` and `steps[]` and pulse `start`.
6. After `done`, read the final matrix (stage `num_stages`) through
   `rd_en/rd_stage/rd_row`. Columns `0..2N−1` come out on
   `rd_data`/`rd_present`.

Items may be written in any order and on any port. Up to `N` data items and
`N` instructions go in per cycle.

## Example: RGB to YUV

`tb/tb_poam_machine.sv` runs

```
Y = KYR·R + KYG·G + KYB·B
U = KUG·G − KUR·R + KUB·B + C1
V = KVR·R + KVG·G + KVB·B + C1
```

on the default machine (3 ALUs) as a four-stage program:

| stage | steps | work |
|---|---|---|
| 0 | 4 | 9 products; 2 transfers of C1 |
| 1 | 3 | 2 add, 1 sub; 5 transfers |
| 2 | 2 | 3 add; 2 transfers of C1 |
| 3 | 1 | 2 add (U, V), 1 transfer (Y) |

There are 20 initial operands, 24 intermediate results, 3 final results and
27 result-index items. The data memory holds 74 items of its 128, and the
instruction memory 27 of its 64. A run takes 10 steps and finishes in 19
cycles. Indices in the testbench's table are written from 1, as row/column
pairs, and converted to the hardware's 0-based form.

## Parameters

| module | parameter | default | note |
|---|---|---|---|
| `poam_machine` | `N` | 3 | ALUs, buffers, instruction columns |
| | `DW` | 32 | data width (must be ≥ 12, an index is stored in data items) |
| | `P_DATA` | 128 | data memory locations |
| | `P_INSTR` | 64 | instruction memory locations |
| `poam` | `P`, `WPORTS`, `RPORTS`, `DW` | 64, 8, 8, 32 | stand-alone memory |
| `exec_controller` | `DRAIN` | 2 | must equal read + ALU latency |
| `index_buffer` | `LAT` | 1 | must equal ALU latency |
| `poam_pkg` | `IDX_STAGE_W/ROW_W/COL_W` | 4/4/4 | ≤ 16 stages, rows, columns (so `3N ≤ 16`) |

The fetch compare grows as `P × RPORTS`. At the defaults the machine
synthesises to roughly 6.8k word-level cells, about 700 flip-flop bits of
control and index state, and 6.6k bits of memory-array storage.

## Where this design makes its own choices

The following are not fixed by the computational model. They were chosen
here:

* Every index carries an explicit stage number, so all stage matrices share
  one data memory. An alternative would be ping-pong banks.
* Result indices are stored as extra columns of the data memory's rows.
* The memory takes locations in fill order and fetches by parallel compare.
  It has no sorting network, reads do not free items, the oldest item wins on
  a duplicate index, and extra items overflow.
* Writes and reads use separate ports, so results can be written back while
  the next row is read. A single read/write strobe with bidirectional ports is
  the classic form of such a memory.
* The opcode encoding, the number format (32-bit wrapping two's complement)
  and `tr` passing operand *a*.
* The one-cycle latencies, the 2-cycle drain, and loading only while idle.
* The memory capacities (128 and 64 locations).

One consequence departs from the model's promise that an ordered-access
memory's bandwidth is independent of its capacity. Here the fetch path
selects among all `P` locations, so its delay grows with `log P`. Pipelining
that selection would keep the clock rate up at the cost of read latency. The
sequencer's `DRAIN` and the buffer's `LAT` would then have to grow to match.

In the RGB-to-YUV program, the two copies of C1 sit at stage-0 positions
(4,1) and (4,3). They feed the transfers in ALUs 0 and 1 of step 4. This
follows the example's instruction matrix (`tr tr nop`). A literal reading of
its data-index matrix would place both copies in the two operand slots of
ALU 0.

## Files and simulation

`rtl/` holds one module or package per file:
`poam_pkg.sv` (index type, opcodes), `poam.sv`, `data_poam.sv`,
`instr_poam.sv`, `alu.sv`, `index_buffer.sv`, `exec_controller.sv` and
`poam_machine.sv` (top). `tb/` holds one self-checking testbench per module,
`tb_<module>.sv`. Each prints `TB_RESULT checks=<n> failures=<m>` and
finishes. A watchdog counts a failure if a testbench hangs.

Simulate with Verilator 5, for example the end-to-end test:

```
verilator --binary --timing -Irtl -y rtl rtl/poam_pkg.sv tb/tb_poam_machine.sv \
          --top-module tb_poam_machine -o sim
./obj_dir/sim
```

Replace the testbench name to run any other test. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/poam_pkg.sv rtl/<module>.sv`.

What the tests establish:

* `tb_poam` tests random writes and row reads against a reference map. It
  also covers write-then-read, duplicates, exact fill, overflow and clear. It
  then writes an 8×8 matrix row by row with transposed indices and reads back
  its transpose, using all 64 locations.
* `tb_data_poam` and `tb_instr_poam` test the column split, the
  loader/write-back arbitration, and absent positions read as nop.
* `tb_alu` runs random operations against reference arithmetic.
* `tb_index_buffer` checks the delays for LAT = 1 and 3.
* `tb_exec_controller` runs 60 random programs and checks the request order,
  the cycle timing, and the stall and stage counts.
* `tb_poam_machine` runs six pixels of RGB→YUV, including a BT.601-style
  coefficient set, at the default size. It checks the exact run time and
  Y/U/V. It also checks that drains, transfers, nop slots, empty operand
  slots, refused loads and overflow each occur.
* `tb_poam_machine_random` runs 40 random staged programs of 1 to 6 stages.
  It checks them against a software evaluation of the same program: final
  matrix, presence of each item, and run time.

Not covered: clock frequency and timing closure. The fetch compare is the
critical path and is not pipelined.
