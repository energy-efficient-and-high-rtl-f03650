# Ring-based sharing fabric (RSF) for a multi-CGRA

Several coarse-grained reconfigurable arrays (CGRAs) can run a *kernel
stream* as a pipeline: kernel A on one array produces data for kernel B on
the next, and so on, iteration after iteration. If the arrays are only
joined by a bus, this works badly. Every intermediate result goes out to a
data buffer and back in over the bus. And each array is stuck with its own
configuration memory and data buffer, however much or little its kernel
needs.

The ring-based sharing fabric (RSF) fixes both problems with little
wiring. The CGRAs are placed on a ring:

* neighbouring PE arrays are wired to each other directly, so a result moves
  to the next kernel in one cycle;
* each configuration memory (CM) and each data buffer (DB) sits between two
  neighbouring arrays and can serve either or both of them;
* each execution controller (EC) is linked to its two neighbours. The ECs
  synchronise the pipeline without a central controller, and they can
  shift a kernel stream around the ring from one phase to the next. A
  kernel that needs more buffer space than two DBs hold can thus go on
  running on fresh buffers without stalling.

This repository holds synthesizable SystemVerilog for the ring at its
published default size: four CGRAs, each with a 4x4 array of 16-bit PEs, a
4 KB CM and a 1.5 KB DB. It also holds a self-checking testbench for every
block. The processor, DMA engine and system bus that would load the ring
are not included. Their connections are the top level's ports.

```
          CM3/DB3            CM0/DB0            CM1/DB1            CM2/DB2
   ...---[shared]--- tile 0 ---[shared]--- tile 1 ---[shared]--- tile 2 ---[shared]--- tile 3 ---(back to CM3/DB3)
                     EC0+PA0             EC1+PA1             EC2+PA2             EC3+PA3
          <---- result bus, Intermediate Done, max cycles: both directions between neighbouring tiles ---->
```

Tile k reaches CM/DB k-1 (its *prev* side) and CM/DB k (its *own* side).
CM/DB k serves tile k on port 0 and tile k+1 on port 1.

## Files

| file | contents |
|---|---|
| `rtl/rsf_pkg.sv` | sizes, opcode and operand enums, `ctx_t` (context word), `ctrl_t` (control data), request structs |
| `rtl/pe.sv` | processing element |
| `rtl/pe_array.sv` | 4x4 PE array (PA) |
| `rtl/config_memory.sv` | configuration memory with its two-EC controller |
| `rtl/db_bank.sv` | one dual-port DB bank |
| `rtl/data_buffer.sv` | DB: two sets of three banks with the DB controller |
| `rtl/pa_input_mux.sv` | chooses the prev-side or own-side CM and DB for one PA |
| `rtl/ring_link.sv` | receiving end of the direct PA-to-PA link |
| `rtl/exec_ctrl.sv` | execution controller (EC) |
| `rtl/cgra_tile.sv` | EC + PA + input mux + link |
| `rtl/rsf_top.sv` | the ring: `NUM_CGRA` tiles, CMs and DBs |
| `tb/tb_<block>.sv` | one self-checking testbench per block; `tb_rsf_top` runs a full kernel stream |
| `tb/tb_shift_twice.sv` | a stream shifted twice around the ring |
| `tb/tb_kernel_streams.sv`, `tb/ks_runner.sv` | kernel streams on rings of 4 to 16 CGRAs |

## The PE array and its context word

Each PE has a 16-bit output register, four 16-bit registers and an ALU.
Every cycle it executes one 32-bit context word. The PA receives one layer
of the CM per cycle: 16 context words, one per PE, with word `r*4+c` going
to PE (r,c). The published architecture fixes the word width, not its
layout; the layout below (`rsf_pkg::ctx_t`) is this implementation's:

| bits | field | meaning |
|---|---|---|
| 31:28 | `op` | NOP, ADD, SUB, MUL (low 16 bits), AND, OR, XOR, SHL, SHR, SRA, MIN, MAX (signed), ABSD, PASS, MAC (a*b+out) |
| 27:24 | `src_a` | R0-R3, N/S/W/E neighbour, DB bus 0, DB bus 1, RING (upstream PA, column-wise), RROW (upstream PA, row-wise), IMM, OUT (own output), ZERO |
| 23:20 | `src_b` | same choices |
| 19:18 | `dst` | register written when `reg_we` |
| 17 | `reg_we` | write the result to register `dst` |
| 16 | `out_we` | write the result to the output register |
| 15:0 | `imm` | immediate operand |

The PEs form a nearest-neighbour mesh, and an edge PE reads zero where it
has no neighbour. Column c sees 16-bit word c of both DB read buses and of
the upstream PA's result (operand RING). Operand RROW gives the upstream
result row-wise instead: PE (r,c) reads word r. With RING the upstream
last row continues down this array's columns; with RROW it enters along
this array's rows. The outputs of the last row form the 64-bit
result bus. It goes to the DB write bus and to both neighbouring tiles. A
result is visible one cycle after the context that computed it. An
undefined opcode, NOP, or a cycle without `en` leaves the PE unchanged.

## Memories shared between neighbours

**Configuration memory.** It has 16 configuration elements (one per PE),
each 64 layers of 32 bits, 4 KB in all. A read returns one layer of all 16
CEs. There are two read ports, one per adjacent EC, so two neighbouring
PAs can run different kernels out of the same CM in the same cycle. The
shifted configurations rely on this. Reads are synchronous. The host writes
one 32-bit word per cycle (`cm_we`, `cm_idx`, `cm_ce`, `cm_layer`).

**Data buffer.** It has two sets of three banks, 1.5 KB in all. Each bank
is dual-ported:

* port A is 32 bits x 64 and carries transfers from the system side;
* port B is 64 bits x 32 lines and faces the PA. Line L is port-A words 2L
  (low half) and 2L+1 (high half).

In each set, bank 0 is the write bank (the PA result bus writes it) and
banks 1 and 2 are the read banks (they drive read buses 0 and 1). The DB
controller gives each of the two adjacent ECs the set named in its control
data. Any one-to-one mapping is allowed, so both neighbours work on the
same DB at once. Port A of every bank stays open to transfers through
`dma[k]` at all times. This is how operands for a later phase are loaded
while the PAs compute. Two ECs asking for the same set is a mapping
error: port 0 wins, `db_conflict[k]` rises, and an assertion in `rsf_top`
fires.

**Choosing sides.** `pa_input_mux` routes an EC's requests to the prev-side
or own-side memory according to `cm_sel` / `db_sel` (0 = prev, 1 = own). It
also brings the answers back, one cycle later.

## Running a kernel stream: the execution controller

Each EC holds a list of up to four control-data entries (`rsf_pkg::ctrl_t`).
It runs them in order; an entry with `iterations == 0` ends the list. One
entry means "run this kernel for this many iterations, in this role":

| field | meaning |
|---|---|
| `exec_cycles` | CE layers per iteration (1-64) |
| `iterations` | iterations of this entry |
| `cm_base`, `cm_sel` | first layer of the kernel; which adjacent CM |
| `db_rd`, `db_rd_base` | read mode: load operand line `db_rd_base + i` in iteration i |
| `db_wr`, `db_wr_base` | write mode: store the result to line `db_wr_base + i` |
| `db_set`, `db_sel` | which set of which adjacent DB |
| `partner` | upstream neighbour: 0 = tile k-1, 1 = tile k+1 (the stream may run either way round) |
| `sender` | pulse Intermediate Done when a result is ready |
| `receiver` | wait for the upstream result before each iteration |
| `head`, `tail` | first / last kernel of the stream |

**One iteration** takes at least 1 wait cycle, then `exec_cycles` cycles
issuing CE layers, then 1 drain cycle while the last layer executes, then 1
result cycle. In the result cycle the result bus is valid: it is written
to the DB and announced with Intermediate Done. Going to the next entry
costs one reload cycle.

**Synchronisation.** The kernels of a stream take different numbers of
cycles, but the pipeline can only move at the pace of the slowest.

* *Receivers* start an iteration only when the upstream result has arrived.
  `ring_link` captures that result from the upstream neighbour's bus when
  Intermediate Done is pulsed. It holds up to two results and hands the
  oldest to the PA for a whole iteration.
* The *Head* has no upstream neighbour, so it paces itself. The largest
  `exec_cycles` of the stream travels backwards from the Tail to the Head,
  one register per EC: each EC forwards the larger of its own count and
  the one it receives. The Head counts IDLE = max - own cycles from its
  previous result before it starts the next iteration. It does so even
  when that iteration belongs to its next entry, so the pace holds across
  an entry switch. The whole stream then advances every
  `max(exec_cycles) + 3` cycles, and no receiver waits for more than one
  result.

**Shifting configuration.** Suppose a stream A->B->C runs on tiles 0->1->2
and the head's buffers run out. The stream can move one tile back, to
3->0->1. Tile 3 then uses fresh DBs and CMs, while tiles 0 and 1 switch to
their next entries: an EC running a different kernel from one phase to the
next is the *intra-CGRA reconfiguration*. Tile 3's entry is marked Head
and Receiver at once. That combination means *activation*: the EC waits
for an Intermediate Done flagged as the last iteration from its downstream
neighbour, i.e. for tile 0 to finish the head kernel of phase 1, and only
then starts. From there the phases join up with no more loss than the
activation and reload cycles. In the end-to-end test this comes to 7 cycles
between the last phase-1 and the first phase-2 result, inside a 9-cycle
pipeline period.

A second shift works the same way, one tile further back: 2->3->0. The
head of phase 2 activates the head of phase 3. The tile that started as
the Head of phase 1 now runs the Tail kernel, so it has run all three
kernels, from two CMs.

## Programming the ring

1. Write the kernels' context words into the CMs (`cm_*` ports). A CM can hold
   several kernels at different layer offsets. Either neighbour can run
   them.
2. Transfer operands into the read banks (1, 2) of the DBs through `dma[k]`.
3. Write each EC's entry list (`cfg_we`, `cfg_tile`, `cfg_idx`, `cfg_data`).
   Write zero entries after the last one.
4. Pulse `start`. Phase-2 operands may be transferred while phase 1 runs.
5. Wait for `done` (every EC at the end of its list). Then read the results
   from the write banks (bank 0) through `dma[k]`.

`tb/tb_rsf_top.sv` is a complete worked example. It has three kernels, with
24 iterations in phase 1 on tiles 0->1->2 and 8 in phase 2 on tiles 3->0->1.
In phase 2 tile 0 runs its kernel from CM 3, and tiles 2 and 1 write into
the DB of the previous index.

## Sizes and parameters

| parameter | default | where |
|---|---|---|
| `DATA_W`, `NREG` | 16, 4 | PE registers |
| `PA_ROWS` x `PA_COLS` | 4 x 4 | PE array |
| `CE_W`, `CM_LAYERS` | 32, 64 | CM: 16 CEs x 64 x 32 bit = 4 KB |
| `DB_SETS`, `DB_BANKS` | 2, 3 | DB: 6 banks x 256 B = 1.5 KB |
| bank port A / B | 32 x 64 / 64 x 32 | DB bank |
| `NUM_ENTRIES` | 4 | control-data entries per EC (this implementation's choice) |
| `ITER_W` | 9 | up to 511 iterations per entry |
| `NUM_CGRA` (`rsf_top`) | 4 | tiles on the ring; 8, 12 and 16 are the other published sizes |

## What is this implementation's own

The published architecture fixes the ring, the sharing of CMs and DBs
between neighbours, the DB set/bank structure, the sizes above, and the
control-data fields. It also fixes the synchronisation by IDLE cycles and
Intermediate Done, and the idea of shifting configurations. The following
were left open and are chosen here:

* the PE operation set and the context-word layout;
* the intra-array mesh (nearest neighbour, zero at the edges) and the
  mapping of DB and ring words to columns;
* the control-data field widths, the one-bit Partner encoding, and one
  DB line per iteration for operands and for results;
* the EC's cycle budget (wait + run + drain + result), the backward max
  chain through one register per EC, and the last-iteration flag;
* activation of a shifted Head by its downstream neighbour's last result;
* two read ports per CM;
* the 2-deep capture FIFO at the receiving end of the direct link, and
  what row-wise means: the direct link always carries the upstream PA's
  last row; row-wise transfer hands word r of it to row r;
* the transfer port on port A of every bank, and the conflict rule of the
  DB controller.

Limits to keep in mind:

* The max chain settles within a few cycles after an entry change; until
  then a Head can see a stale maximum.
* Correct results depend on a valid mapping: no two ECs on one DB set, and
  a pipeline paced by the Head. Assertions catch the two ways a mapping can
  go wrong (`db_conflict`, `link_overflow`).
* Memories have no reset.
* Only the ring is built. The two fabrics it is usually measured against
  are not: a plain bus-connected multi-CGRA, and a fully connected fabric
  where any PA reaches any CM or DB. Area, delay, power and energy
  figures are therefore not reproduced here. Only cycle behaviour is
  checked.
* The published evaluation streams are made of DSP kernels that are not
  specified further. The tests use synthetic kernels of known
  `exec_cycles` in their place.
* Four entries per EC allow up to three shifts (four phases). The
  end-to-end test exercises one shift. `tb_shift_twice` exercises two,
  with one array running three kernels in turn. Three shifts are not
  tested.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
(each has a watchdog). Example with plain Verilator:

```
verilator --binary --timing --assert -Irtl rtl/rsf_pkg.sv rtl/pe.sv rtl/pe_array.sv \
  rtl/config_memory.sv rtl/db_bank.sv rtl/data_buffer.sv rtl/pa_input_mux.sv \
  rtl/ring_link.sv rtl/exec_ctrl.sv rtl/cgra_tile.sv rtl/rsf_top.sv \
  tb/tb_rsf_top.sv --top-module tb_rsf_top
./obj_dir/Vtb_rsf_top
```

For a single block, compile `rsf_pkg.sv`, the block, the blocks it
instantiates, and `tb/tb_<block>.sv`.

| testbench | what it establishes |
|---|---|
| `tb_pe` | 2000 random context words against a reference ALU/register model |
| `tb_pe_array` | data movement N/S/E/W, DB and ring column mapping, row-wise ring mapping, edge zeros, hold |
| `tb_config_memory` | full fill, simultaneous reads on both ports, hold when idle |
| `tb_db_bank` | random traffic on both ports against a word model |
| `tb_data_buffer` | both EC mappings in the same cycle, transfers during PA access, read-back of written lines, conflict flag |
| `tb_pa_input_mux` | request steering and return alignment |
| `tb_ring_link` | capture from the selected neighbour, order, count, overflow |
| `tb_exec_ctrl` | layer/line sequences, period `E+3` and `max+3` (IDLE), receiver stalls, activation, entry switch, a three-entry list |
| `tb_cgra_tile` | a head kernel on its own CM/DB and a receiver kernel on the shared CM/DB, with real memories |
| `tb_rsf_top` | the two-phase shifted stream above at default sizes. Checks every result, the 9-cycle period, the phase change, and that each mechanism occurred |
| `tb_shift_twice` | the same kernels in three phases of 32, 16 and 8 iterations, shifted twice so that the head reads DB 0, then DB 3, then DB 2, and tile 0 runs all three kernels. Checks every result, the 9-cycle period and both phase changes |
| `tb_kernel_streams` (with helper `ks_runner`) | kernel streams on rings of 4, 8, 12 and 16 CGRAs, one kernel per tile, 32 to 256 iterations (the published evaluation sizes; the kernels are synthetic). Checks every result and the period `max(E)+3` |

`tb_kernel_streams` takes about two minutes to compile, because it builds
four ring sizes. The other testbenches build in seconds.

## Larger rings and long streams

`rsf_top #(.NUM_CGRA(n))` builds a ring of any size. The ring's wiring
depends only on neighbours, so adding tiles does not lengthen any path.
The published evaluation runs streams of 4, 8, 12 and 16 kernels, one per
CGRA, for 32, 64, 128, 192 and 256 iterations. At the default
`NUM_CGRA = 4` only the 4-kernel streams fit; the larger ones need the
matching ring size. An entry counts up to 511 iterations. DB addresses
wrap modulo the 32 lines of a set, so a long stream can stream its
operands through one set. `ks_runner` shows how. Once the Head has finished
iteration i, the host overwrites line `i mod 32` with the operands of
iteration i+32. It reads each result line out as soon as the Tail has
written it.
