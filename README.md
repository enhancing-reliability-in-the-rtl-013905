# RX-morph: a TRIPS-style dataflow grid with hop queues

This is a synthesizable SystemVerilog model of the execution array of one core
of a TRIPS-style grid processor. It adds the hop queue proposed in the report
*Enhancing Reliability in the TRIPS Grid Array*. The core is a 4x4 array of
dataflow nodes. An instruction in a node fires when its operands arrive, and
it sends its result over a mesh of links straight to the nodes that consume it.
Operands therefore often cross nodes that do nothing with them; they take the
node's *hop path*.

The reliability idea is time redundancy. Each node can put a FIFO, the hop
queue, on its hop path. When the queue is enabled, an operand advances **at
most one link per frame**. The combinational path that one frame exercises
then shrinks to a single link per operand. A transient fault in a distant part
of the array during one frame cannot corrupt an operand that is not passing
there in that frame. The cost is time: an operand that crossed the array in
one frame now needs one frame per link. Enabling the queues gives the
"reliable" configuration, RX-morph (RD-, RT- or RS-morph). Disabling them gives
the normal X-morph. Nothing else in the array changes.

## The array

```
            bank0     bank1     bank2     bank3      <- register banks, 32 x 32 bit each
              |         |         |         |
           (0,0) --- (0,1) --- (0,2) --- (0,3) ---  east edge: data-cache side (dc_* ports)
              |         |         |         |
           (1,0) --- (1,1) --- (1,2) --- (1,3) ---
              |         |         |         |
           (2,0) --- (2,1) --- (2,2) --- (2,3) ---
              |         |         |         |
           (3,0) --- (3,1) --- (3,2) --- (3,3) ---
```

* Each node `(row, col)` holds 64 instruction slots. *Frame f* means slot `f`
  of every node, so one frame holds 16 instructions and a node holds eight
  8-slot hyperblocks.
* The core has 128 registers of 32 bits. Register `r` lives in the bank above
  column `r % 4`, at entry `r / 4`. Register values enter the array through the
  top-row node of their column. Results bound for a register leave the same way.
* The data-cache banks would attach at the east edge of each row. They are not
  built, so the four east-edge links are top-level ports. Packets can enter
  there (`dc_in_*`).
* Instructions are written straight into a node slot through the `il_*` port.
  This port stands in for the instruction-cache network that reaches every node.

Every link is a point-to-point channel in each direction. It carries one
packet per cycle with a `valid`/`ready` handshake. `valid` never waits for
`ready`, which keeps the mesh free of combinational loops.

## Operands in flight

A packet (`trips_pkg::pkt_t`) is a 32-bit value plus a target. There are two
kinds of target:

* `TGT_NODE` — frame (slot) `f`, row `r`, column `c`, operand `o` (A or B).
  This is the `Nf:r:c:o` notation of the report's matrix-multiply listing.
* `TGT_PRED` — the predicate operand P of slot `f` at `(r, c)`.
* `TGT_REG` — register number 0..127.

Routing is fixed and shortest (`trips_pkg::route`). A packet first moves
along its row to the target column, then along the column. A register write
moves to its bank's column and then up and out of the top. The path between
two nodes is therefore always the same, which the reliability model needs.
The report's Figure 8 shows the same order: along the row first, then up the
column.

## Frames and the hop queue

A free-running timer divides time into frames of `FRAME_CYCLES` clock cycles
(default 8). `frame_start` is high in the first cycle of each frame. Every
node has an `hq_en` bit.

**X-morph (`hq_en = 0`).** A packet passing through a node spends one cycle
in the node's hop queue. It then leaves as soon as its outgoing link is free.
A result leaves the cycle after the instruction issues. Within one frame an
operand can cross many links.

**RX-morph (`hq_en = 1`).** Two rules limit every operand to one link per
frame:

1. A packet written into a hop queue is marked *held*. All marks clear at the
   next `frame_start`. A held head cannot leave, so a packet that crossed a
   link in frame *k* makes its next hop in frame *k+1* at the earliest.
2. A new ALU result is held in the node's result register in the same way.
   The instruction may fire in the frame its last operand arrived, but the
   result first moves in the next frame.

The queue is first-come first-served: only the head may leave. When several
operands share a hop path, one can wait more than one frame at a node.

Worked example (the report's Figure 8, reproduced by `tb_trips_rx_grid`). A
register value from bank 0 feeds an add-immediate at node (3,0). The sum goes
to a consumer at node (1,2).

| frame | event |
|---|---|
| 0 | register read; value crosses bank0 → (0,0), waits in (0,0)'s hop queue |
| 1 | (0,0) → (1,0) |
| 2 | (1,0) → (2,0) |
| 3 | (2,0) → (3,0); the add fires; result held |
| 4 | (3,0) → (3,1) |
| 5 | (3,1) → (3,2) |
| 6 | (3,2) → (2,2) |
| 7 | (2,2) → (1,2); the consumer fires |


**Lanes.** The report draws one hop queue per node. Here it is four FCFS
lanes (`hop_queue` instances), one for each direction a packet can leave in.
With one shared queue, row-first routing can deadlock: two neighbours each
fill their queue with packets bound for the other. The matrix-multiply
workload below did exactly that on row 0. With one lane per direction, each
channel waits only on channels further along its path, and the usual
dimension-order argument rules out a cycle. Because it is split per
direction, the queue still carries one packet per link direction per frame.

**The X-morph queue is a buffer, not a bypass.** The report's enable *bypasses*
the hop queue in X-morph. There, a whole frame is one combinational circuit
running from register read through the ALUs to write-back. That circuit cannot
be built as synthesizable RTL without combinational loops through the ALUs.
Here a link costs one clock cycle in both modes, and the enable only decides
whether the frame boundary applies. The reliability argument depends on how
many links an operand crosses per frame, and this model keeps that
difference exactly. It does not model the clock period.

## Inside a node (`grid_node`)

```
 links N,E,S,W ──> node_controller ──┬─> operand buffers A, B, P ──┐
                   (1 packet/cycle,  │   instruction_buffer ────────┴─> node_alu ─> result regs (2)
                    round robin)     │                                                  │
                                     └─> hop_queue lanes x4 ──> operand_router <────────┘
                                                                  ├─> links N,E,S,W
                                                                  └─> own slots (local)
```

* **node_controller** takes at most one incoming packet per cycle, round
  robin over N, E, S, W.
  * A packet addressed to this node is written into operand buffer A, B or
    P of its slot.
  * Any other packet is pushed into the lane of the direction it will leave
    in. While that lane is full, the link is refused.
* **Issue.** A slot is ready when:
  * it holds an instruction that has not fired in this block, and
  * every operand its opcode needs is present, and
  * its predicate has arrived, if it is predicated.

  The lowest ready slot issues, but only when both result registers are
  empty. Otherwise the node stalls. Issuing consumes the operands and marks
  the slot fired. `flush` clears all operands and fired marks while keeping
  the instructions; it is the block commit/abort of the block controller.
  Loading a slot clears that slot.
* **Predication.** A predicated instruction executes only when bit 0 of
  its predicate equals the polarity in its `pred` field. Otherwise it is
  *nullified*: it fires and consumes its operands, but sends no result.
  Generate-Constant instructions are never predicated. The test opcodes
  `TEQ` and `TLT` produce the 0/1 values used as predicates.
* **Results.** An instruction names up to two targets, so there are two
  result registers.
* **operand_router** offers one packet per output link per cycle, in priority
  order: the lane for that direction first, then result 0, then result 1. A
  result that targets the node's own slot goes straight back into the operand
  buffers.

## Instruction word (`trips_pkg::instr_t`)

| field | bits | meaning |
|---|---|---|
| valid | 1 | slot holds an instruction |
| op | 4 | `NOP ADD SUB MUL AND OR XOR MOV ADDI GENC TEQ TLT` |
| pred | 2 | `PR_NONE`, `PR_FALSE` (run on 0), `PR_TRUE` (run on 1) |
| imm | 16 | sign-extended immediate (ADDI, GENC) |
| t0, t1 | 20 each | targets: kind (NIL/NODE/REG/PRED), frame, row, col, operand, register |

`MOV` and `ADDI` need operand A only. `GENC` needs no operand, so it fires as
soon as it is loaded (or after a flush). `TEQ` gives `A == B` and `TLT` gives
signed `A < B`. The bit encoding, the opcode set and the delivery of the
predicate as a third operand are choices of this model. The report says only
that an instruction runs on a true or false predicate. Multiplication keeps
the low 32 bits.

## Measured behaviour

The end-to-end testbench runs the report's 4x4 matrix-multiply placement
with default parameters. There are 16 sequences, each using one frame of ten
nodes:

* multiplies in row 0;
* adds at (1,0), (1,1), (1,2), (2,0) and (2,1);
* the last add at (3,0), writing r33..r48.

All 128 register reads come from the four banks.

| configuration | frames for all 16 sequences |
|---|---|
| X-morph | 19 |
| RX-morph | 39 |

The report counts 8 frames (T-morph) against 56 (RT-morph) per core for its
eight-thread version. It assumes each sequence runs alone, in one frame, or
in 7 frames with hop queues. Here the sequences overlap and share links. The
bottlenecks are register injection through row 0 and one input packet per
node per cycle.

One sequence run alone takes 4 frames in X-morph and 15 in RX-morph. The
lower bound is 8: four multiply/add levels and four links up to the register
bank. It is missed because registers sit in the bank of their column
(`r % 4`): r17, r21, r25 and r29 all live in bank 1. They enter at column 1
and travel sideways along row 0 at one link per frame, queueing behind each
other. The report's reliability analysis assumes instead that any register
can enter at any column.

The dataflow graph printed for each sequence computes
`p0 + 3·p1 + 3·p2 + p3`, not the dot product `p0+p1+p2+p3`. Its second and
third level adds reuse the middle products. The testbench uses the graph as
printed and checks the hardware against a software evaluation of that graph.

A fourth workload of the testbench computes `r54 = max(r50, r51)` with
predication. It runs in both modes and with both orders of the values.

## Where this model departs from the report, and what is missing

* **Not built.** The following are only named in the report, with no design
  given:
  * block controller and branch prediction;
  * register stitching;
  * block-header cache;
  * instruction and data L1 caches;
  * per-thread contexts (PC, history register, commit buffer, return stack);
  * memory tiles and the on-chip network;
  * the second core.

  T-morph threads can still share the array by using disjoint frames and
  registers, but there is no per-thread state.
* **Instruction formats.** Load, Store and Branch are not implemented.
  Predication is built, but its encoding is this model's own, because the
  report gives none.
* **Registers.** They are written as soon as a result arrives; there is no
  commit buffer. A register can be read only through its own bank's column.
  The reliability analysis lets any register enter at any column.
* **Choices of this model.** The report gives none of the following: frame
  length, hop-queue depth (4 per lane), the four-lane split, the link
  handshake, issue order, and the instruction encoding.
* **Reliability model.** The report's reliability equations and its table of
  average node reliabilities are analysis, not hardware, and are not part of
  the RTL.

## Files

| file | contents |
|---|---|
| `rtl/trips_pkg.sv` | geometry, packet and instruction types, routing function |
| `rtl/trips_rx_grid.sv` | top: 4x4 nodes, register banks, frame timer |
| `rtl/grid_node.sv` | one node |
| `rtl/node_controller.sv` | input steering, issue, result registers |
| `rtl/hop_queue.sv` | one FCFS lane with the frame hold |
| `rtl/operand_router.sv` | output link selection |
| `rtl/instruction_buffer.sv`, `rtl/operand_buffer.sv`, `rtl/node_alu.sv` | node storage (instructions; operands A, B and predicate) and ALU |
| `rtl/register_bank.sv` | one column's register bank |
| `tb/tb_<module>.sv` | self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, to run the whole array with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/trips_pkg.sv tb/tb_trips_rx_grid.sv --top-module tb_trips_rx_grid -o sim
./obj_dir/sim
```

Use the same command with another `tb_*` file for a single block.
`tb_trips_rx_grid` takes a few seconds. It prints the frame counts above and
how often each mechanism occurred:

* hop-queue holds;
* result holds;
* issue stalls;
* link back-pressure;
* hop-queue contention;
* east-edge entries;
* nullified predicated instructions.

It fails if any of them never happens.

## Changing it

* `FRAME_CYCLES` and `HQ_DEPTH` are parameters of `trips_rx_grid`.
* Geometry, slot count and register count are constants in `trips_pkg`.
  Widths follow from them, but the routing and edge wiring assume the register
  banks sit on the top edge.
* `hq_en` can be changed at any time. Entries already held simply become
  free when the bit clears.
* The instruction set lives in `node_alu` and the two `op_needs_*` functions
  in the package.
