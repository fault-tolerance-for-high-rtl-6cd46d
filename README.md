# Micro rollback for multi-module VLSI systems

Fast error checkers are expensive, and slow checkers in the data path make
every cycle longer. Micro rollback takes a third way. A module uses its
inputs at once, while checkers (EDC decoders, duplex comparators) work on
them in parallel. When a checker fires a few cycles later, the module
returns its whole state to where it was *C* cycles ago, all in a single
clock, and carries on from there. The cost is a little hardware that keeps
the last *N* cycles of state changes, plus a way to keep several modules
consistent when only one of them finds the error.

This repository holds synthesizable SystemVerilog for that hardware:

* **Register files** get a *delayed write buffer* (DWB). There are two
  versions: a full buffer for a register file written every cycle, and a
  smaller one for register files written at most *M* times in *N* cycles.
* **Scattered single registers** (program counter, status word, pipeline
  latches) get a small RAM of *shadow registers* and a pointer.
* **Modules on different clocks**, joined by point-to-point links, get a
  *transducer* per link. It turns "roll back C of my cycles" into "undo T of
  our transactions" and back again.
* **Modules on one shared bus** use the bus transactions as a common
  logical clock. Each module has two transducers in series, so a module that
  took no part in the bad transactions does not roll back.
* **Modules that cannot roll back** (peripherals) sit behind two buffers:
  - a *commit buffer* holds outgoing data until it can no longer be undone;
  - a *replay buffer* keeps incoming data so it can be handed over again
    after a rollback.

The processor and coprocessor cores themselves, the error checkers, memory
and the bus protocol are not part of this RTL. Their signals are ports: a
core's register writes, state-register loads and "roll back C cycles"
requests come in as plain inputs.

## Conventions used everywhere

* **One clock, per-module enables.** Modules that run at different rates
  are modelled with one clock `clk` and a clock enable `tick` per module. A
  module's "cycle" is a clock edge at which its `tick` is high. All
  histories below advance only on such edges.
* **Rollback cycle.** A module rolls back *C* cycles (`rb = 1`,
  `rb_cycles = C`, 1 ≤ *C* ≤ *N*) in one enabled cycle. In that cycle:
  - nothing shifts, nothing is committed and no new write is accepted;
  - the *C* newest entries of every history are cleared.

  The cycle after it starts from the restored state.
* **Newest first.** In every history, index 0 is the most recent cycle. In
  the buffers, cell 0 holds the newest write and cell *N*−1 (or *M*−1) sits
  next to the register file.
* **Reset.** Reset is asynchronous and active low (`rst_n`). Valid bits,
  monitors, pointers and the shadow RAM reset to zero. Register-file
  contents and buffer data cells are not reset.

## Register files: the delayed write buffer

### Full buffer (`full_dwb`)

A write does not go into the register file. It goes into cell 0 of an
*N*-cell FIFO together with its register address and a valid bit. Every
enabled cycle all cells move one place toward the register file. A write
therefore reaches the last cell after exactly *N* cycles and is written into
the register file then (`commit`). By that time no rollback can reach it.

Rolling back *C* cycles clears the valid bits of cells 0..*C*−1. Those are
exactly the writes of the last *C* cycles.

Reads must see writes that are still in the buffer. The address fields form
a CAM: each read port compares its address against every valid cell, and a
priority circuit picks the newest match. `rb_regfile` puts this in front of
a plain 64 × 32 register file (`regfile`, two combinational read ports, one
write port). It takes the buffer's data on a hit and the register file's
otherwise.

### Buffer for infrequently modified registers (`gen_dwb`)

Some modules write their register file rarely, such as a floating-point
coprocessor whose instructions take tens of cycles. If such a module writes
at most *M* times in any *N* consecutive cycles, *M* data cells are enough.
The reference size is *N* = 5, *M* = 3. Two things get harder:

- a write no longer sits at a fixed distance from the register file;
- a rollback of *C* cycles must find out how many cells to clear.

A control section does both:

| Part | Module | What it does |
|---|---|---|
| Write Monitor (WM) | inside `gen_dwb` | *N*-bit shift register, one bit per cycle, 1 if that cycle wrote. More than *M* ones raises `error` (the module broke its write-rate promise). |
| Invalidate Write Counter | `iwc` | Counts the ones among the first *C* WM bits and outputs the count *W* as a thermometer code (`writes[k-1]` = "at least *k*"). Flags *W* > *M*. |
| Invalidate Write Mapper | `iwm` | Clears the *W* valid cells with the lowest index, i.e. the *W* newest writes. Flags fewer than *W* valid cells. |
| Shift control | `dwb_shift_ctrl` | The last cell goes to the register file only when the oldest WM bit is 1, so the write is exactly *N* cycles old. Any other cell moves up only if the cell above it is empty or moving too, so cells stay in write order with gaps squeezed out. |

In a rollback cycle the WM does not shift, and its bits 0..*C*−1 are
cleared together with the *W* cells. `gen_dwb.error` combines three checks:

- a WM overflow;
- a new write that finds cell 0 still occupied;
- a counter or mapper error in a rollback cycle.

The data side (cells, CAM and priority circuit) is the same as in the full
buffer.

`rb_regfile` picks the buffer with its `FULL` parameter. Its default is the
reference processor: 64 registers of 32 bits, a full buffer of 4 cells. The
module instances in the systems below set other sizes.

## Single registers: shadow registers (`shadow_reg`)

A register that sits far from the others cannot share a buffer, so it
carries its own history. Every enabled cycle:

1. the current value is copied into a RAM of *N* shadow slots at `ptr`;
2. `ptr` advances;
3. the register takes its new value if `load` is set.

A rollback of *C* moves the pointer back by *C* and reloads the register
from that slot in one cycle. A stack would need *C* cycles.

The register and every slot carry an even parity bit. `parity_err` flags a
stored word whose parity is wrong. The default is *N* = 4.

## Interfaces to modules that cannot roll back

* **`commit_buffer`** (outgoing). This is an *N*-stage delay line advanced by
  the sender's enable. An item leaves (`out_valid`) only after *N* sender
  cycles, once it is committed. A rollback of *C* removes what the sender
  emitted in its last *C* cycles.
* **`replay_buffer`** (incoming). Every item handed to the rolling-back
  module is kept for *N* of its cycles. A rollback of *C* moves the items
  handed over in those *C* cycles into a replay queue, oldest first. From
  the next cycle they are handed over again, one per cycle, and the sender
  is held off (`in_ready = 0`) until the queue is empty.

  The history and the queue together never hold more than *N* items, so an
  *N*-entry queue is enough. The receiver thus sees the sender's stream in
  order, with nothing lost or duplicated, once its own rollbacks are taken
  into account.

## Modules on different clocks: transducers

Two modules on unrelated clocks cannot agree on "the last *C* cycles". They
can agree on the transactions they exchanged. Each end of a link has a
`transducer`:

* a **Transaction Monitor**: *N* bits, one per local cycle, 1 if that cycle
  carried a transaction on this link;
* a **CTU** (`ctu`, cycles → transactions): counts the ones among the first
  *C* monitor bits. This is how many transactions the neighbour must undo.
  More than `TMAX` (4) is an error;
* a **TCU** (`tcu`, transactions → cycles): given *T* transactions to undo,
  finds how far back the *T*-th most recent one lies. This is how many local
  cycles to roll back. Asking for more transactions than the monitor holds
  is an error.

With *N* = 5 and `TMAX` = 4 the buses between them are 3 bits wide.

`mr_node` is one rollback-capable module. It contains:

- an `rb_regfile`;
- a `shadow_reg` standing for the module's single state registers;
- one transducer per link.

In an enabled cycle it takes the largest requested rollback: its own
checker's request, or any message received on a link. It applies that
rollback everywhere and sends each *other* link the number of transactions
it must undo. No message is sent when that number is 0, and nothing is
echoed back on the link the request came from.

`mr_system` joins a main processor (full buffer, *N* = 5, three links) to
three coprocessors in a tree:

| Module | Buffer | *N*, *M* |
|---|---|---|
| coprocessor 0 | infrequent writes | 5, 3 |
| coprocessor 1 | infrequent writes | 8, 2 |
| coprocessor 2 | infrequent writes | 5, 3 |

The main processor's output to a peripheral goes through a `commit_buffer`,
and the peripheral's replies come back through a `replay_buffer`.

**Link timing** is this design's own choice:

- An outgoing rollback message is registered and lasts one clock.
- The receiver holds it until its own next enabled cycle.
- `xact_done[i]` lets a transaction happen only when both ends are enabled
  and neither end has a message in flight or a rollback under way. This
  keeps the two monitors of a link in step.

The reference example is a main-processor rollback of 4 cycles. It must
send 1, 3 and 2 transactions to the three coprocessors, which then roll
back 2, 6 and 3 of their own cycles. The testbench reproduces this case
exactly.

## Modules on a shared bus

On a common bus, pairwise transducers could set off a chain of ever deeper
rollbacks between modules. Instead every module watches every bus
transaction (`bus_transducer`, two transducers in series):

* the *bus* monitor shifts on each bus transaction and records whether it
  was the module's own (private);
* the *cycle* monitor shifts on each module cycle and records whether a
  private bus transaction happened in it.

A local rollback of *C* cycles is converted in three steps:

1. *C* cycles → *P* private transactions (cycle monitor);
2. *P* → the number *G* of generic bus transactions that reach back to the
   *P*-th private one (bus monitor);
3. *G* is announced on the bus.

Every other module converts *G* the other way: generic → private → its own
cycles. A module with no private transaction in range gets 0 and stays
where it is.

`mr_bus_system` has four such modules (`mr_bus_node`): processor, MMU, FPU
and FFT unit.

- The processor has a full buffer. The others use *N* = 5, *M* = 3.
- Announcements are registered for one clock and go to every module except
  the sender.
- If several modules announce in the same clock, the largest *G* wins, and
  the lowest module number on a tie.
- A bus transaction (`bus_req` with the participant mask `bus_parts`)
  happens only when all modules are enabled and no announcement is pending
  or being applied.

Memory on the bus has no rollback hardware and is outside this block.

## Top level (`mr_top`)

`mr_top` places `mr_system` and `mr_bus_system` side by side. They share
only `clk` and `rst_n`, and the bus system's ports carry a `b_` prefix. The
request and response bundles (`node_req_t`, `node_rsp_t`) and the shared
sizes are in `mr_pkg`.

Default sizes:

| Parameter | Default | Where |
|---|---|---|
| register file | 64 × 32 | all nodes (`mr_pkg`) |
| full DWB depth *N* | 4 (`full_dwb`, `rb_regfile`); 5 in the systems | reference processor: 64 registers with 4 cells |
| generalized DWB *N*, *M* | 5, 3 (`gen_dwb`); 8, 2 for coprocessor 1 | reference sizes |
| shadow registers *N* | 4 (`shadow_reg`); set to the node's *N* in the systems | reference size |
| transducer *N*, `TMAX` | 5, 4 → 3-bit buses | reference sizes |
| bus monitor depth `NB` | 5 | this design's choice |

The top bit of `rsp.rb_cycles` is constant in nodes whose *N* ≤ 5. The
field is 4 bits wide so that the *N* = 8 coprocessor fits.

## Verification

Every block has a self-checking testbench in `tb/`. Each compares the block
against a reference written independently in the testbench: a log of the
last *N* cycles, a class model of a node (`mr_model_pkg`), or a property of
the data stream. Each ends by printing `TB_RESULT checks=<n> failures=<n>`
and has a watchdog.

| Testbench | Covers |
|---|---|
| `tb_iwc`, `tb_iwm`, `tb_dwb_shift_ctrl`, `tb_ctu`, `tb_tcu` | Exhaustive or large random sweeps of the combinational units. Includes the reference cases: 4 cycles → 2 writes for the write counter, 5 cycles → 2 transactions for the CTU, 2 transactions → 4 cycles for the TCU. |
| `tb_full_dwb`, `tb_gen_dwb`, `tb_rb_regfile`, `tb_shadow_reg` | Random writes, reads, stalls and rollbacks of every distance. Includes the overflow error of the *M*-cell buffer. |
| `tb_dwb_table1` | All sixteen buffer sizes *N* ∈ {4, 5, 8, 16} × *M* ∈ {2, 3, 4, *N*} side by side. |
| `tb_transducer`, `tb_bus_transducer` | Monitors and conversions against a model. |
| `tb_commit_buffer`, `tb_replay_buffer` | Commit timing; in-order, loss-free delivery across rollbacks. |
| `tb_mr_node` | One node with links, against the node model. |
| `tb_mr_system`, `tb_mr_bus_system` | The two systems, through `p2p_harness` and `bus_harness`. |
| `tb_mr_top` | The whole design at default parameters. It runs both harnesses at once. |

The two system harnesses first replay the fan-out example, then run 8000
random cycles. They count every mechanism and fail if any count stays at
zero:

- local and received rollbacks per module;
- messages down, up, forwarded and held;
- transactions and blocked transactions;
- checker errors;
- committed peripheral writes, replayed inputs and a held-off peripheral;
- for the bus: announcements, modules that followed or were spared, and
  blocked bus transactions.

To run any testbench with Verilator 5:

    verilator --binary --timing -Wno-fatal --top-module tb_mr_top \
        -y rtl -y tb +libext+.sv -Irtl \
        rtl/mr_pkg.sv tb/mr_model_pkg.sv tb/tb_mr_top.sv -o sim
    ./obj_dir/sim

Replace `tb_mr_top` with any other testbench name; the two package files
can stay on the command line. The full-design run takes well under a
minute.

## Departures and own choices

Things the reference scheme leaves open and that were decided here:

* Clock domains are modelled as clock enables on one clock. There are no
  synchronizers.
* What happens in a rollback cycle: nothing shifts, nothing commits and
  the write of that cycle is dropped. When a local request and received
  requests coincide, the largest one wins.
* Link and bus timing, as described above:
  - messages are registered for one clock and held by the receiver;
  - transactions are blocked while a rollback is in flight;
  - on the bus, the largest announcement wins.
* The replay protocol of `replay_buffer`: oldest first, one per cycle,
  with the sender held off during replay.
* The shadow RAM is reset, so a rollback that reaches back before reset
  gives the reset value with good parity.
* The reference circuits for the counters and mappers are precharged
  switch arrays. Here they are written as behavioural counts and scans that
  compute the same function.
* Only the selective bus technique is built. The simpler variant, in which
  every module follows every announcement, is not.

## Limitations

* The cores, error checkers, memory and bus protocol are outside the RTL.
  Their effects come in as port stimulus.
* Timing and area (access-time penalty, layout areas) are properties of a
  layout and are not modelled. The area table is exercised only for
  function.
* A write rate above *M* in *N* cycles, a transaction count above `TMAX`,
  or a rollback deeper than *N* is flagged on `error`, not prevented. A
  rollback request deeper than *N* is clipped to *N*.
