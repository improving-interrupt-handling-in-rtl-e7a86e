# Interrupts as tasks: the interrupt path of the nMPRA hardware scheduler

The nMPRA is a processor for hard real-time systems. Its RTOS scheduler is built in hardware, and each task runs on its own *sCPU* (semi-CPU). An sCPU has a private copy of the pipeline registers and of the register file, and shares everything else. A context switch is therefore only a change of which copy is selected. Nothing is saved, restored or flushed.

This RTL implements how that processor handles interrupts. It has **no interrupt controller**:

* Each interrupt is *attached* to one task. The task is the interrupt's handler. An interrupt has no priority of its own: it inherits its task's priority, so tasks and interrupts share one priority space.
* An interrupt can preempt only tasks of **strictly lower** priority. An interrupt belonging to a low-priority task never delays a high-priority task. This removes the priority inversion of conventional controllers, where a low-priority interrupt can stall high-priority work.
* Interrupts nest freely. A preempted handler later resumes where it stopped, because its sCPU state was never touched.
* Several interrupts can be attached to one task. When they arrive together, a priority encoder picks one and a table of *trap cells* gives its handler address. Every interrupt then takes the same, fixed decision time. A software polling loop would take longer for interrupts that it tests later.

The processor core itself (pipeline, register files, instruction set) is not part of this RTL. The block brings out what the core would connect to: the running sCPU, a context-switch pulse, the `wait` instruction inputs and the handler address.

## How an interrupt travels

```
 dev_event[k] ─► int_dev_flags ─INT_k─► int_assoc ─INT_t─► event_sync ─IntEv_t─► scpu_ready ─ready[t]─► hse_sched ─► run_id
                 (flag & enable)        INT_ID_k regs      (falling edge)         (wait mask)              (sCPU_0 first)
                                        demux + OR/task                                                       │
                                            │ INT_k_t (per task t)                                            ▼
                                            └──────────► int_prio_enc[t] ──num──► mux by run_id ──► trap_table ──► handler_addr
                                                         (interrupt 0 first)                        (cell = BASE + 4*num)
 task_timer[t] ──timer event──► event_sync
 ext_ev[t] (watchdog, deadline, mutex, message) ──► event_sync
```

1. **Device bits** (`int_dev_flags`). A device has a condition flag, an enable bit and a clear bit. `INT_k` is the flag AND the enable. The flag stays set until software clears it. If a new event arrives in the same cycle as a clear, the event wins.
2. **Association** (`int_assoc`). `INT_ID_k` holds the number of the task that owns interrupt k. A demultiplexer steers `INT_k` to exactly one of N lines `INT_k_t`. One OR gate per task collects that task's lines into `INT_t`. Depending on how the `INT_ID` registers are written, a task can own none, some or all of the interrupts. Rewriting `INT_ID_k` moves interrupt k to another task, which changes its priority.
3. **Synchronisation** (`event_sync`). One flip-flop per event line, clocked on the **falling** clock edge, produces `IntEv_t`. Timer and external events go through the same flip-flops.
4. **Ready logic** (`scpu_ready`). A task reacts to events only while it is blocked in a `wait` instruction. The wait's operand selects which events can wake it, and one wait can select several, e.g. an interrupt and a message. The task is ready if it is enabled and either not waiting, or waiting with a selected event present. The wait state ends on the next rising edge. Events are not consumed: the handler clears them at their source.
5. **Scheduling** (`hse_sched`). On every rising edge the highest-priority ready sCPU becomes the running one. sCPU_0 has the highest priority. While the kernel *monitor* runs (`monitor = 1`), no switch happens. The monitor is the short, uninterruptible kernel.
6. **Hardware interrupt decision** (`int_prio_enc`, `trap_table`). Each sCPU has a priority encoder over its own `INT_k_t` lines. Interrupt 0 has the highest priority. The running sCPU's encoder output `num` selects trap cell `TRAP_BASE + 4*num`. The cell holds the handler address. A handler typically serves the interrupt, clears its flag, looks at the encoder again, and executes `wait` when `int_valid` drops.

For 4 inputs the encoder is the two-level logic
`num[1] = ~r0 & ~r1`, `num[0] = ~r0 & r1 | ~r0 & ~r2`.
The RTL is the generic form for any P. When no request is present, `num` is P-1, so use it only while `valid` is 1.

## Timing

* A device event pulse sets its flag at the next rising edge. `INT_k` and `INT_t` follow combinationally.
* The falling edge captures `IntEv_t`. The scheduler registers its choice at the next rising edge. An asynchronous event (e.g. on `ext_ev`) therefore runs its task **0.5 to 1.5 clocks** after it appears. For a device flag, the task runs exactly one clock after the flag rises.
* A context switch costs no cycles beyond that decision. `ctx_switch` pulses for one clock with each change of `run_id`/`run_valid`.
* `int_num`, `cell_addr` and `handler_addr` are combinational from `run_id` and the flags.

## Task timers

Each sCPU has a `task_timer`. Software loads a budget in clocks and a threshold. The counter decrements only while its task is running. When the remaining time drops to the threshold, the timer event is raised one clock later. It is raised once per load, and it enters the task's event set like any other event. `expired` shows that the budget is used up. Limiting the counting to run time, and the threshold register itself, are this design's choices.

## Register map

Writes use the `cfg` bus (`cfg_req_t` in `nmpra_pkg`): `we`, a 12-bit word address and 32-bit data, taking effect on the rising edge. Address bits [11:8] select the region and bits [7:0] the interrupt or task. The map is this design's own.

| region | register | data |
|---|---|---|
| 0x0 | `INT_ID_k` | owning task id (binary, clog2(N) bits) |
| 0x1 | device k control | bit0 enable; bit1 = 1 clears the flag |
| 0x2 | trap cell k | handler address |
| 0x3 | task t control | bit0 task enable |
| 0x4 | timer t budget | write starts the timer and clears its event |
| 0x5 | timer t threshold | |
| 0x6 | timer t clear | any write clears the timer event |

The bits of the event vector of each task (`ev_idx_e`) are: 0 interrupt, 1 timer, 2 watchdog, 3 deadline, 4 mutex, 5 message. `wait_mask[t]` uses the same order. `ext_ev[t]` carries bits 2..5.

## Parameters of `nhse`

| name | default | meaning |
|---|---|---|
| `N` | 4 | sCPUs (tasks) |
| `P` | 8 | system interrupts |
| `AW` | 32 | handler address width |
| `TW` | 16 | task timer width |
| `TRAP_BASE` | 0x100 | byte address of trap cell 0 |

The nMPRA description gives no values for N and P. These defaults are chosen to be small but non-trivial.

## Files

| file | contents |
|---|---|
| `rtl/nmpra_pkg.sv` | event indices, register bus type and map |
| `rtl/int_dev_flags.sv` | device flag / enable / clear bits |
| `rtl/int_assoc.sv` | `INT_ID` registers, demultiplexers, OR per task |
| `rtl/event_sync.sv` | falling-edge event flip-flops |
| `rtl/scpu_ready.sv` | ready logic of one sCPU with the `wait` mask |
| `rtl/hse_sched.sv` | static-priority selection, monitor lock |
| `rtl/int_prio_enc.sv` | interrupt priority encoder |
| `rtl/trap_table.sv` | trap cells, 4 x number displacement |
| `rtl/task_timer.sv` | per-task time budget and warning event |
| `rtl/nhse.sv` | top: all of the above wired together |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Where this RTL departs from, or adds to, the nMPRA description

* The task priority order (sCPU_0 highest) is assumed. So are the register map, all widths, reset values (everything cleared; every interrupt initially attached to sCPU_0 but disabled) and the set-over-clear rule of the device flags.
* `INT_ID` registers hold the task id in binary (clog2(N) bits), because they drive a demultiplexer.
* One trap table with P cells serves all sCPUs, since each interrupt belongs to exactly one task. The encoder and handler address are given for the running sCPU. Loading the handler address into that sCPU's program counter is left to the core.
* Each sCPU's encoder has P inputs. It does not shrink to the number of interrupts actually attached.
* Only the static scheduler is built. The dynamic schedulers (EDF, RMA), the watchdog and deadline timers, and the mutex and message units are outside this RTL. Their events enter through `ext_ev`.
* Some features are named in the nMPRA description but not specified, and are not implemented: attaching an interrupt to the kernel monitor instead of a task, self-support events, and the nHSE input that inhibits load and store instructions. The `monitor` input only blocks switching while the kernel runs.
* The software alternative to the encoder (a loop of flag tests in the handler) needs no hardware and is not part of the RTL.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/nmpra_pkg.sv tb/tb_nhse.sv --top-module tb_nhse -o sim && obj_dir/sim
```

Replace `tb_nhse` with any other testbench name. The simulator is two-state and the testbenches reset everything they read.

* `tb_nhse` runs the top at its default size, with the testbench playing the processor. It makes each mechanism happen and counts it: preemption, nesting, simultaneous interrupts of one task served in encoder order through the trap cells, a lower-priority interrupt held back, a disabled interrupt, the monitor lock, reattaching an interrupt, 20 asynchronous-event latency measurements (each must fall between 0.5 and 1.5 clocks), and the timer event.
* `tb_nhse_all_to_one` runs the worst case of the scheme at the default size: all 8 interrupts attached to one task, with random subsets (up to all 8) raised in the same cycle, for 40 rounds. It checks that they are served in priority order through the right trap cells, and that after each flag is cleared the next decision is present without any extra clock.
* The unit testbenches compare each block with a reference model in the testbench, using random stimulus. `tb_int_prio_enc` checks the 4-input encoder exhaustively against the equations above, and the 8-input one against a first-set-bit search.
