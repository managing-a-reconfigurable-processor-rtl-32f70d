# A shareable reconfigurable execution unit (Proteus-style)

A block of reconfigurable logic inside a workstation processor is only
useful if the operating system can share it between whatever processes
happen to be running. Those processes come and go, and together they may
want more circuits than the fabric holds. This RTL is the execution unit
that makes such sharing cheap. It sits next to the integer unit as a
coprocessor. It holds several **Programmable Function Units (PFUs)**, each a
region of fabric holding one custom-instruction circuit, plus its own
register file. It also has the small amount of control logic the operating
system needs to manage the PFUs:

* **Dispatch by ID tuple.** An application names a custom instruction by a
  *Circuit ID* (CID) that it picks itself. The hardware pairs that CID with
  the *Process ID* (PID) of the running process. The (PID, CID) tuple is
  unique across the whole system, so nothing has to be flushed on a
  context switch.
* **Three outcomes.** A tuple resolves to a PFU, to the address of a
  software routine that does the same job, or to a fault that hands
  control to the operating system.
* **Interruptible multi-cycle circuits.** PFU circuits may be sequential and
  take many cycles. They can be interrupted and later resume where they
  stopped.
* **Usage counters.** Each PFU counts its completed instructions, which
  gives the operating system data for choosing which circuit to evict.

The parts that are not logic in this unit are outside the RTL: the fabric
itself, its configuration port, and the host core. The PFU side is a set of
plain ports, so you can attach any circuit model or fabric.

## Structure

```
               ex_pid, ex_cid                         OS: tlb_* writes
                    |                                      |
            +-------v--------------------------------------v------+
            | proteus_dispatch                                    |
            |   id_tlb (TLB 1): (PID,CID) -> PFU number           |
            |   id_tlb (TLB 2): (PID,CID) -> software address     |
            |   kind = HW if TLB1 hit, else SW if TLB2 hit, else FAULT
            +-----------------------------+-----------------------+
                                          | kind, pfu, addr
  ex_rn, ex_rm --> cp_regfile --src_a/b-->+
                   (16 x 32)              v
                      ^         proteus_exec_ctrl ---> resp_valid/kind/addr
                      |  rf write   |   |   |
                      +-------------+   |   +--> spr capture --> sw_dispatch_regs <--> spr_* ports
                                        |
               pfu_op_a/b, pfu_clk_en[p]|  pfu_result[p], pfu_done[p]
                                        v
                 +--------------------------------------------+
  per PFU p:     | pfu_init_status  (done -> init feedback)   | --> pfu_init[p]
                 | usage_counter    (completions)             | --> cnt_rdata
                 +--------------------------------------------+
```

| module | role |
|---|---|
| `proteus_pkg` | sizes, the ID-tuple struct, the dispatch and response enums, and the special-register selector |
| `proteus_unit` | top: wires everything and brings out the PFU fabric ports |
| `proteus_dispatch` | two TLBs and the hardware / software / fault decision |
| `id_tlb` | a content-addressable memory of (PID, CID) tuples that indexes a data RAM |
| `cp_regfile` | the unit's 16 x 32-bit register file: two operand ports, one transfer read port, one write port |
| `proteus_exec_ctrl` | runs one request: clocks the chosen PFU until `done`, handles interrupts, writes the result back |
| `pfu_init_status` | one status bit per PFU that feeds `done` back to `init` |
| `usage_counter` | one completion counter per PFU |
| `sw_dispatch_regs` | special registers that give a software routine its operands |

## Dispatch: why a TLB and not an ID register per PFU

A simpler scheme gives each PFU an ID register holding the opcode of its
circuit. That scheme has three problems:

* A circuit can answer to only one ID, so two processes cannot share it.
* The ID registers must be reloaded on every process switch.
* It cannot send an instruction to software.

This design uses two small TLBs instead (`id_tlb`). Each TLB is a
content-addressable memory (CAM) of tuples that indexes a data RAM:

* **TLB 1** maps a tuple to a PFU number.
* **TLB 2** maps a tuple to the address of a software alternative.

Any number of tuples may carry the same PFU number or address, so a circuit
can be shared. The PID is part of the key, so entries of different
processes sit side by side and nothing needs flushing on a switch.

The two TLBs are searched at the same time, combinationally, in the cycle
the request is presented. A TLB 1 hit wins over a TLB 2 hit. With no hit the
result is a fault.

The price of the indirection is a second kind of fault. A circuit can still
be loaded in a PFU after its TLB entry has been overwritten. On a fault the
operating system must first look for the circuit in the PFUs, and only then
load it.

The hardware never replaces TLB entries by itself. The operating system
writes entries by index through the `tlb_*` port: `tlb_sel` picks the TLB,
and `tlb_wr_valid = 0` invalidates an entry. A tuple should appear at most
once in a TLB. If it appears twice, the lowest index wins and a simulation
assertion reports it.

## Long instructions: the init/done loop

This part takes the most care. A PFU has two control signals besides its
operands and result:

* **`init`** (into the PFU) is high in the first cycle of an invocation.
* **`done`** (out of the PFU) is high in the cycle its result is valid.

The unit clocks a PFU only through `pfu_clk_en`. **A circuit must keep its
state while its clock enable is low.**

`pfu_init` is not generated by the sequencer. It is the output of a
one-bit register (`pfu_init_status`) that reset sets to 1. The register
loads `done` in every cycle its PFU is clocked. So:

1. **First invocation.** The bit is 1, so the circuit sees `init` high in
   its first cycle.
2. **Running.** The first cycle ends with `done` low. The bit drops to 0
   and `init` stays low while the circuit runs.
3. **Completing.** The finishing cycle has `done` high. The unit writes the
   result and the bit returns to 1, ready for the next invocation.
4. **Interrupt.** When `irq` is high in a running cycle, the PFU is *not*
   clocked in that cycle and the request ends with `RESP_INTR`. Nothing is
   written back and nothing is counted. The bit is still 0 and the
   circuit's own state is frozen.

   When the core reissues the same instruction after servicing the
   interrupt, the circuit sees `init` low and carries on. The total number
   of clocked cycles equals that of an uninterrupted run. The core and the
   application never notice the interruption.

The usage counter increments on completion, not on issue, so an
interrupted and reissued instruction counts once.

A limitation: the status bit has no software access. If the operating
system swaps out a circuit that was interrupted mid-instruction, it cannot
restore the bit for the next circuit in that PFU. The bit then comes back
correct only after that circuit's next completion.

## Software dispatch and the special registers

A TLB 2 hit turns the instruction into a branch-and-link to the routine's
address (`RESP_BRANCH`, address on `resp_addr`). The routine should not
have to decode the trapped instruction to find its operands. So in the
same cycle the unit copies the following into `sw_dispatch_regs`:

* both source register values
* the destination register number
* a cleared result register

The routine then uses these ports:

* **Special load** (`spr_rd_sel` / `spr_rdata`) reads the operands.
* **Special store** (`spr_store` with `spr_wdata`) puts its answer into the
  result register. In the same clock edge it writes the answer to the
  remembered destination register in the register file.

The operating system saves and restores all four registers around a
process switch, reading them with `spr_rd_sel` and writing them with
`spr_os_we` / `spr_wr_sel`.

The routine must not itself issue a custom instruction that dispatches to
software. That would overwrite the registers.

## Interface and timing

All signals are synchronous to `clk`. `rst_n` is an active-low
asynchronous reset.

| group | signals | behaviour |
|---|---|---|
| exec | `ex_valid`, `ex_ready`, `ex_pid`, `ex_cid`, `ex_rd`, `ex_rn`, `ex_rm`, `irq` | A request is accepted in a cycle where both `ex_valid` and `ex_ready` are high. The source registers are read and dispatch is decided in that cycle. `ex_ready` is low while a PFU runs. |
| response | `resp_valid`, `resp_kind`, `resp_addr` | One pulse per request. A fault or branch responds 1 cycle after the request. A PFU circuit that needs K clocked cycles responds with `RESP_DONE` K+1 cycles after the request. An interrupt responds with `RESP_INTR` the cycle after `irq` is seen. |
| transfers | `xfer_we`/`xfer_waddr`/`xfer_wdata`, `xfer_raddr`/`xfer_rdata` | The host core moves values into and out of the register file. Reads are combinational. |
| special registers | `spr_*` | See above. |
| TLBs | `tlb_wr_en`, `tlb_sel`, `tlb_wr_idx`, `tlb_wr_valid`, `tlb_wr_pid`, `tlb_wr_cid`, `tlb_wr_data` | One entry written per cycle. For TLB 1 the PFU number goes in the low bits of `tlb_wr_data`. |
| counters | `cnt_sel`/`cnt_rdata`, `cnt_clr[p]` | A completion in the same cycle as a clear is still counted. |
| fabric | `pfu_op_a`, `pfu_op_b` (shared by all PFUs), `pfu_init[p]`, `pfu_clk_en[p]`, `pfu_result[p]`, `pfu_done[p]` | `pfu_result` and `pfu_done` are sampled in the clocked cycle. They may be combinational in the PFU. |

The register file has one write port, shared by the PFU result, the special
store and a transfer, in that priority. The core must not issue a transfer
or a special store in a cycle when a PFU result is written. An assertion
checks this.

## Sizes

| parameter | default | where it comes from |
|---|---|---|
| `NUM_PFU` | 4 | the reference system. It deliberately limits the PFU count to show contention, and estimates that the chip could hold twice as many. |
| `DATA_W`, `RF_DEPTH` | 32, 16 | the reference system's coprocessor register file |
| `TLB_ENTRIES` | 8 | this design's choice |
| `PID_W`, `CID_W` | 8, 8 | this design's choice |
| `ADDR_W` | 32 | the host's address width |
| `CNT_W` | 32 | this design's choice |

Every PFU in the reference system is 500 CLBs of fabric. Loading one
circuit means moving about 54 KB of configuration.

## What is not here

* **The PFU fabric.** The reference design uses a Virtex-like array without
  I/O blocks, with multiplexer-based routing, and with CLB registers but no
  block RAM. What runs on it is whatever circuit the application supplies.
  The RTL exposes the fabric's ports instead.
* **Split configuration.** The intended fabric can save and load the
  contents of its state registers separately from its static configuration
  (LUTs and routing). Swapping a circuit out then costs only its state. This
  belongs to the fabric's configuration logic, which is not specified
  closely enough to build.
* **The host core.** The core is an ARM7TDMI-class processor with its
  coprocessor interface extended to accept a branch address from the unit.
  Here it is represented only by the exec/response and transfer ports.
* **The scheduler.** The operating system's custom-instruction scheduler
  loads circuits, writes TLB entries and reads counters. It is software.

## Where this RTL makes its own choices

The published architecture fixes the following:

* the dispatch structure and its order: hardware, then software, then fault
* the init/done feedback bit and its reset value of 1
* counting on completion
* special registers for the two operands and the result
* the sizes marked as coming from the reference system above

Everything below is this design's own choice:

* **Parallel TLB search.** Both TLBs are searched in the same cycle rather
  than one after the other.
* **Ports.** The request, response and transfer handshakes, and the shared
  operating-system write port for the TLBs.
* **Interrupt timing.** An interrupt is taken before the PFU is clocked in
  that cycle, and discards nothing but the current request.
* **Special registers.** A fourth special register remembers the
  destination register. The special store also writes the register file.
* **Register-file ports.** One write port with fixed priority, and
  combinational reads.
* **Sizes.** PID and CID widths, TLB depth, counter width, and wrap-around
  of the counters.
* **No software access to the init/done bit.** The source does not describe
  one (see the limitation above).

## How well it is tested

Each module has a self-checking testbench in `tb/`. Each testbench compares
the module against values computed independently, uses random stimulus
where that helps, and has a watchdog. All of them end with a
`TB_RESULT checks=N failures=M` line.

`tb/pfu_circuit_model.sv` is a behavioural sequential circuit for
testbenches only. It computes `(a*K) ^ salt` by repeated addition in
K = `(b & 7) + 1` cycles, so its latency depends on the operand.

`tb_proteus_unit` runs the whole unit at its default sizes with four such
circuits attached. The testbench also plays the host core and the
operating system. It covers:

* faults and loading circuits on demand
* two processes sharing one PFU
* one CID resolving differently for two PIDs
* interrupt and resume, with the latency checked
* a mapping fault while the circuit is still loaded
* software dispatch
* saving and restoring the special registers
* reading and clearing the counters
* a five-process, four-PFU contention loop with round-robin eviction and a
  software fallback

It counts each of these events and fails if any count is zero.

`tb_sched_workload` (see below) adds the contention workload on top.

## Behaviour under contention

`tb_sched_workload` runs the unit under a small model of a time-sharing
operating system:

* **Processes.** 1 to 8 processes loop over custom instructions. Each
  process uses either one circuit, or two circuits used alternately in a
  tight loop.
* **Scheduler.** Round-robin, with a long (batch-like) or a short
  (interactive-like) quantum.
* **Fault handling.** On a fault the operating system loads the circuit into
  a free PFU. When all four PFUs are full, it does one of two things:
  * evicts a circuit, choosing the victim round-robin or at random, and pays
    a fixed reload time;
  * maps the tuple to a software alternative instead.

All times are scaled-down cycle counts. The test checks every result, and
that the usage counters add up.

What the runs show:

* Completion time grows linearly until the processes need more than four
  circuits: four one-circuit processes, or two two-circuit processes.
* Beyond that point, swapping with a short quantum costs far more than
  swapping with a long one.
* Round-robin eviction suffers from always evicting the circuit of the
  process that runs next, so it does worse than random eviction.
* Software dispatch does not depend on the quantum, and sits between the
  two swapping cases.

The testbench prints this as a table.

## Simulating

Verilator 5 works; any IEEE 1800-2017 simulator should too. The package is
listed first:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/proteus_pkg.sv tb/tb_proteus_unit.sv --top-module tb_proteus_unit
./obj_dir/Vtb_proteus_unit
```

Replace `tb_proteus_unit` with any other `tb_*` module to test one block.
To change a size, override the parameter on `proteus_unit`. The package
constants only supply the defaults.
