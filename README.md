# FASTHARD: a real-time kernel in hardware

FASTHARD is a Real-Time Unit (RTU). It takes the real-time kernel off the CPU
and runs it in dedicated logic on the same system bus. The CPU runs only task
code. FASTHARD keeps the task states, the ready queues, the delay and time-out
timers, the periodic starts, the tasks waiting for external interrupts and the
rendezvous queues. When another task should run, it interrupts the CPU on one
line, `IRQ_CPU`. Kernel work no longer eats CPU time. Its duration no longer
depends on how many tasks exist. Most service calls finish in one FASTHARD
clock cycle.

The design handles 256 tasks, 8 priorities and 8 external interrupt lines. It
works with any standard CPU. That CPU needs seven 16-bit bus registers and one
interrupt input.

```
                 IRQ_CPU                      +--------------------------+
   +-----+ <-------------------------------- |  fh_run   (task switch)  |
   | CPU |                                   +------------^-------------+
   +--+--+                                                | start
      | system bus   +-----------+   +-----------+  +-----+--------+  +------------------+
      +------------> | fh_bus_if |-->| fh_kernel |->| fh_scheduler |<-| fh_ready_queues  |
                     | 7 regs    |<--| task table|  +--------------+  | 8 FIFOs, prio 0-7|
                     +-----------+   | + SVC FSM |------------------->+------------------+
                                     +-----+-----+   push / pop
                    commands / wake-ups |  |  |
          +-----------------+  +--------+--+--+--------+  +----------------+
          | fh_timeout_unit |  | fh_period_unit        |  | fh_irq_unit    |<- IRQ_EXTERNAL[7:0]
          | delay, time-out |  | periodic start        |  | waiting tasks  |
          +--------^--------+  +-----------^-----------+  +----------------+
                   +------- now (ticks) ---+---- fh_timebase
```

## The CPU's view

### Registers

The address is `adr[2:0]`. `rw_n` is 1 for a read and 0 for a write. All
registers are 16 bits wide, and bits that are not listed read as 0.

| adr | register       | dir | content |
|-----|----------------|-----|---------|
| 000 | HS_TSW         | W   | bit 0: task-switch handshake |
| 001 | NEXT_TASK_ID   | R   | task to load (bits 7:0) |
| 010 | BLOCK_TSW      | R/W | bit 0: 1 = no task switch may start |
| 011 | CALL_SVC       | W   | one bit per service call (table below) |
| 100 | HS_SVC         | R   | bit 0: 1 = the service call was executed |
| 101 | RETURN_DATA    | R   | return word of the executing task |
| 110 | PARAMETER_DATA | W   | parameter words, in argument order |

An access lasts one cycle in which `cs` is high. Writes take effect at the
clock edge. Read data is combinational. An access in the wrong direction for
its register does nothing and reads 0.

### Making a service call

```
write BLOCK_TSW      = 1            no task switch from here on
write PARAMETER_DATA = arg0, arg1.. up to four words
write CALL_SVC       = 1 << bit
read  HS_SVC until bit 0 = 1        first read succeeds, except for ACCEPT
read  RETURN_DATA
write CALL_SVC       = 0            also rewinds the parameter index
read  HS_SVC until bit 0 = 0
write BLOCK_TSW      = 0            a pending task switch may start now
```

A call that blocks the task is executed at once like any other. It changes
the task's state and returns `HS_SVC`. The task switch follows as soon as
`BLOCK_TSW` is cleared. The value a blocking call returns (time-out, caller
id, missed periods) is set when the task is woken. The task reads
`RETURN_DATA` again after it has been resumed. `RETURN_DATA` always shows the
return word of the task that FASTHARD sees executing.

| bit | call | parameter words | blocks until | return word |
|-----|------|-----------------|--------------|-------------|
| 0 | RELATIVE_DELAY | time | `time` ticks have passed | 0 |
| 1 | TERMINATE | – | for good (dormant) | – |
| 2 | ACTIVATE | task_id, priority, start_address | – | 0, or refused |
| 3 | INIT_PERIOD_TIME | period | – | 0 |
| 4 | WAIT_FOR_NEXT_PERIOD | – | the next periodic release | periods missed since the last wait |
| 5 | OFF_PERIOD_START | – | – | 1 if it was already off |
| 6 | WAIT_IRQ_EXTERNAL | irq_nr, time_out | the interrupt, or the time-out | 0 or time-out |
| 7 | ACCEPT | entry, msg_pointer, time_out | a call to `entry`, or the time-out | caller task id, or time-out |
| 8 | COMPLETE | – | – | 0; the caller becomes ready |
| 9 | CALL | entry, msg_pointer, task_id, time_out | accepted and completed, or the time-out | 0 or time-out |

The return word uses these bits:

- bit 15 means the time-out ended the wait;
- bit 14 means the call was refused;
- the low bits carry the caller id or the missed-period count.

A time-out of 0 waits forever. Times are in ticks and must stay below 32768.

`OFF_TASK_SWITCH` and `ON_TASK_SWITCH` have no `CALL_SVC` bit. Software reads
`BLOCK_TSW` to learn whether switching was already off, then writes it.

Calls are refused in these cases:

- ACTIVATE of a task that is not dormant, or of itself;
- a task number above 255, a priority above 7 or an interrupt line above 7;
- WAIT_IRQ_EXTERNAL on a line that another task already waits on;
- CALL to itself;
- COMPLETE without a rendezvous;
- WAIT_FOR_NEXT_PERIOD without a period;
- an unknown `CALL_SVC` bit.

FASTHARD keeps no memory pointers. The start address and the message pointer
belong in the task control block (TCB), which software keeps in main memory.
After `ACCEPT` returns the caller's id, the acceptor finds the message through
the caller's TCB.

### The task-switch interrupt

```
IRQ_CPU rises     -> write HS_TSW = 1      (IRQ_CPU falls)
                     save registers into the old task's TCB
                     read NEXT_TASK_ID, load registers from its TCB
                     write HS_TSW = 0      (FASTHARD records the switch)
                     jump to the new task's saved PC
```

FASTHARD asks for a switch in two cases. The executing task may have blocked
or terminated while another task is ready. Or a ready task may have a
strictly higher priority than the executing one. Priority 0 is the highest.
Equal priorities never preempt each other, and there is no time slicing. No
switch starts while `BLOCK_TSW` is 1 or while a switch is under way.

After reset, task 0 executes at priority 7 and every other task is dormant.
Task 0 is meant to be the initial task and then the idle loop. While task 0
executes, any ready task takes the CPU from it, even one at priority 7. Task 0
therefore sits below every priority, and priority 7 stays usable for ordinary
tasks. Task 0 goes to the back of the priority-7 queue when it is preempted.
It must never block. If it did block while no task is ready, the CPU would
keep running task 0's code until some task became ready.

## Inside

### Task table and the service-call engine (`fh_kernel`)

The table has one entry per task. Each entry holds:

- the state;
- the priority;
- the argument it waits on (entry number or interrupt line);
- the task it calls;
- the caller it serves;
- its return word;
- its missed-period count;
- whether periodic start is on.

The states are: dormant, ready, executing, delayed, waiting for period,
waiting for interrupt, calling, accepting and in rendezvous.

One controller does one job per clock cycle, chosen in this fixed order:

1. record a task switch that the CPU has completed;
2. a pending service call;
3. an interrupt wake-up;
4. a time-out;
5. a periodic release;
6. start a task switch if the scheduler asks for one.

A job can do all of the following in the same cycle:

- write two table entries;
- push one task into a ready queue;
- send one command to each timer block.

The commands are combinational outputs of that cycle's decision, so a
decision and its effects never drift apart. Every service call takes one
cycle, except ACCEPT. ACCEPT scans the whole table, one task per cycle, for
the caller of its entry that has waited longest. It always takes 257 cycles,
whatever the load. Every CALL that has to wait is stamped with a running call
number, which makes each call queue first come, first served.

Rendezvous works like this. CALL to a task that is already waiting in ACCEPT
on the same entry makes the acceptor ready, with the caller's id. Otherwise
the caller waits in the calling state. A later ACCEPT finds the caller and
does not block. In both cases the caller stays in rendezvous until the
acceptor executes COMPLETE. The time-out of a call applies only while the
call has not yet been accepted.

### Timers (`fh_timeout_unit`, `fh_period_unit`, `fh_timebase`)

`fh_timebase` advances `now` by one tick every `TICK_CYCLES` cycles (1000 by
default).

Delays and the time-outs of interrupt, call and accept waits share one
deadline per task, because a task waits in only one place at a time. A
deadline is reached when `now - deadline`, read as a signed 16-bit number,
is not negative. A scanner visits one task per cycle. Every deadline is
therefore seen within 256 cycles of its tick, which is well inside one tick.
A reached deadline is offered to the kernel and held until the kernel
acknowledges it. Re-arming or disarming a task withdraws its offer, so a
stale expiry is never delivered.

The period unit works the same way. Each release advances the next release
time by exactly one period, so releases do not drift. If the task is waiting
when a release comes, it becomes ready and receives its missed count. If it
is not waiting, the release counts as one missed deadline. A task that is
several periods behind gets one release per missed period.

### Interrupts (`fh_irq_unit`)

Each of the eight lines passes through a two-flop synchroniser, and a rising
edge is an interrupt. Each line has one slot for a waiting task. An edge
wakes that task, which keeps its own priority. If several lines fire, the
lowest line is served first. An edge on a line with no waiting task is
dropped. When a wait times out, the slot is emptied and any fire flag still
pending for it is dropped.

### Ready queues, scheduler, run

- `fh_ready_queues` has eight FIFOs, one per priority, each with room for all
  256 tasks. A preempted task goes to the tail of its queue.
- `fh_scheduler` is combinational. It picks the highest non-empty queue and
  decides whether to switch.
- `fh_run` sequences `IRQ_CPU`, `HS_TSW` and `NEXT_TASK_ID`. It holds the
  completion until the kernel takes it.

## Departures and choices

These follow the original FASTHARD description:

- 256 tasks, 8 priorities and 8 interrupt lines;
- the register set, its addresses and read/write directions;
- the bit 0 handshakes;
- the `CALL_SVC` bit positions;
- the list of service calls and their arguments;
- the two CPU routines;
- the block structure.

These are this design's own choices, because the description does not give
them:

- the bus timing;
- the parameter buffer;
- the return-word encoding and the error rules;
- the meaning of priority 0;
- FIFO order within a priority;
- the tick length;
- time-out 0 meaning "forever";
- edge-triggered interrupts with one waiter per line;
- dropped unclaimed interrupts;
- the reset state, and task 0 yielding to every ready task;
- the missed-period counting;
- keeping the call queues as stamped table entries.

The description builds the kernel from about sixty concurrent state machines.
This RTL serialises the kernel's jobs through one controller. Several wake-ups
in the same cycle are therefore taken one per cycle. No job waits more than a
few cycles, except behind an ACCEPT search.

The CPU, main memory and I/O ports are not part of this RTL. The testbench
plays the CPU.

## Size

At the default parameters, the logic holds:

- about 33 k flip-flops, mostly the per-task tables (states, return words,
  call stamps, deadlines and periods);
- 16 kbit of ready-queue memory;
- roughly 5 k word-level cells after coarse synthesis.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

`tb_fasthard` runs the whole unit at its default size. It plays the CPU
through the register protocol. It goes through activation, preemption, a
held-off switch under `BLOCK_TSW`, delays, periodic starts with missed
deadlines, interrupt wake-ups and time-outs, both orders of rendezvous, call
and accept time-outs, termination and equal-priority tasks. It checks the
tick at which every wait ends.

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_fasthard rtl/fasthard_pkg.sv tb/tb_fasthard.sv
./obj_dir/Vtb_fasthard
```

`tb_fasthard_load` puts all 256 tasks to work at the default size. Task 0
activates 255 tasks spread over the eight priorities. Every task then delays
to one common tick, starts a period and terminates at its first release. The
test checks the run order after each burst of wake-ups and the tick of every
wake-up and release.

To test another block, replace `tb_fasthard` with that block's testbench.
The package `fasthard_pkg` holds the register map, the `CALL_SVC` bit
numbers, the return codes and the task-state type. The sizes are parameters
of `fasthard`: `NTASKS`, `NPRIO`, `NIRQ` and `TICK_CYCLES`.
