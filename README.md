# HW-RTOS: data handling and scheduling of a small RTOS in hardware

In a multitasking embedded system the kernel spends much of its time on two
jobs: moving messages between tasks, and deciding which task runs next. A
software kernel does both with mutexes, condition variables and bus traffic,
at the cost of thousands of CPU cycles per message. This design moves those two
jobs into a small hardware block, the HW-RTOS. The CPU keeps only the context
switch, the part that must touch its own registers.

The split:

| part | where | what it does |
|---|---|---|
| data handling | hardware (`hwrtos_data_handling`) | port buffers and event flags; moves sent words to receivers |
| scheduler | hardware (`hwrtos_scheduler`, inside `hwrtos_controller`) | round-robin choice of the next software task |
| sequencer | hardware (`hwrtos_controller`) | start-up, then one data-handling pass and one scheduling pass per kernel call |
| bus slave | hardware (`hwrtos_bus_if`) | register window that software and hardware tasks use |
| context switch | software on the CPU | save registers, take the interrupt, read the next task id, restore |

`hwrtos_top` puts the four hardware parts together. `hwrtos_pkg` holds the bus
structs, the register map and the state encoding.

## Ports, events and the task protocol

Tasks talk through numbered **ports**, 1 to `NUM_PORTS`. Port number 0 means
"no port". Each port has four pieces of state:

* a **send buffer** and an **active** flag, written by the sender;
* a **receive buffer** and a **frozen** flag, read by the receiver.

The port operations are plain bus accesses:

* `port_send(p, d)`: write `d` to `PORT_SEND + p`. This fills the send buffer
  and sets *active*.
* non-blocking `port_receive(p)`: read `PORT_RECV + p`. This returns the receive
  buffer. It does not wait and does not touch any flag.
* blocking `port_receive(p)`:
  1. write `p` to `WAIT_PORT`;
  2. write the task's id to `CALL_RTOS`;
  3. give up the CPU and wait for the interrupt;
  4. once resumed, read `PORT_RECV + p`;
  5. write `PORT_RECV + p` to clear *frozen*.

A **data-handling pass** looks at every port with *active* set. For each one it
copies the send buffer into the receive buffer, sets *frozen* and clears
*active*. All ports are handled in one clock cycle. Because the two sides have
separate buffers, the sender can post its next word while the receiver is
still reading the previous one.

Two things follow from this:

* A *frozen* flag means "data has arrived that a blocked receiver has not yet
  taken". The scheduler looks only at these flags.
* A second pass overwrites a receive buffer that nobody has read. The protocol
  needs flow control, which a task gets by waiting for an answer before sending
  again. The example in `tb_hwrtos_top` does this.

## The scheduler wheel

The controller keeps a **wait port list** with one entry per software task: the
port that task is blocked on, or 0.

* A task is **runnable** if its entry is 0, or if the *frozen* flag of its port
  is set.
* On each kernel call (`CALL_RTOS` = c), the tasks are searched in wheel order
  c+1, c+2, ..., c+N-1, and last c itself. The search is done modulo N, the
  number of tasks. The first runnable task wins. It is a rotate followed by a
  priority encoder, all combinational.
* The chosen task's wait entry is cleared to 0.
* The chosen id goes out as `next_task` with a one-cycle `irq` pulse. It can
  also be read from `NEXT_TASK`: bit 31 is a valid flag, and the read clears it.

The calling task is last on the wheel, so every other runnable task runs before
it. But if the caller's own data is already there and nobody else can run, it
gets the CPU straight back. This happens often when a task does two blocking
receives in a row on data that arrived together.

If **no task is runnable**, the controller does not stop. It repeats the
data-handling and scheduling passes, and `sched_miss` pulses on each empty
pass. This continues until a word sent by a hardware task (or any bus master)
makes a waiting task runnable, or until a new kernel call arrives.

## Start-up and the main loop

After reset the controller starts every software task once, in order
0, 1, ..., N-1:

1. It presents task i on `next_task` with `irq`.
2. It waits for that task's first kernel call and records the task's wait port.

After the last task has called, `init_done` rises and the main loop begins.
Each kernel call then runs through these cycles, with the `CALL_RTOS` write
in cycle 0:

| cycle | action |
|---|---|
| 0 | `CALL_RTOS` written (after `WAIT_PORT`) |
| 1 | caller's wait port recorded in the wait port list |
| 2 | data-handling pass (`dh_go`) |
| 3 | scheduling pass |
| 4 | `next_task` valid, `irq` high, `NEXT_TASK` readable |

The hardware part of a context switch therefore takes 4 cycles. The rest is
the CPU saving and restoring registers. Only one kernel call can be
outstanding at a time, and an assertion checks this.

## Register map

The window uses 32-bit data and 8-bit word addresses. The top two address bits
select a region. The low six bits select a port or a register.

| address | read | write |
|---|---|---|
| `0x00 + p` (`PORT_SEND`) | send buffer of port p | `port_send(p, data)` |
| `0x40 + p` (`PORT_RECV`) | receive buffer of port p | clear frozen flag of port p |
| `0x80` `WAIT_PORT` | 0 | port the caller blocks on |
| `0x81` `CALL_RTOS` | 0 | id of the calling task; starts the pass |
| `0x82` `NEXT_TASK` | `{valid, 0..., id}`; clears valid | ignored |
| `0x83` `ACTIVE` | active flags, bit p-1 = port p | ignored |
| `0x84` `FROZEN` | frozen flags | ignored |
| `0x85` `STATUS` | `{runnable tasks, init_done, busy}` | ignored |

Addresses not listed, port 0, and ports above `NUM_PORTS` read as 0, and
writes to them are ignored.

Bus handshake:

* A request (`valid`, `write`, `addr`, `wdata`) is accepted in the cycle it is
  presented. There are no wait states.
* Read data comes back in the next cycle with `rvalid`.
* The slave never stalls. Any arbiter in front of it only has to serialise the
  masters.

## Parameters and size

| parameter | default | meaning |
|---|---|---|
| `NUM_TASKS` | 3 | software tasks on the wheel (the three-task image-filter example) |
| `NUM_PORTS` | 16 | communication ports. The `ACTIVE`/`FROZEN` registers show 32 of them, and the address map allows up to 63 |
| `DATA_W` | 32 | port word width (package constant) |

At the defaults the design has about 1150 flip-flop bits. The two 16 x 32-bit
buffer arrays account for 1024 of them. Coarse synthesis gives about 460
word-level cells. The buffers are flip-flops rather than SRAM, because a
data-handling pass reads and writes every port in one cycle.

## How far this follows the original design, and where it departs

The following come from the original design:

* the hardware/software split;
* the four per-port arrays and the copy rule of the data-handling pass;
* the wait port list;
* the rule "runnable when the awaited port's event is frozen, or waiting on nothing";
* the round-robin wheel read from the caller onwards into a priority encoder;
* clearing the chosen task's wait entry;
* the start-up sequence that runs each task once;
* the 4-cycle hardware share of a context switch.

The following are this design's own choices:

* **Bus protocol and register map.** The original only says that the kernel
  call and the wait port travel over the system bus, and that any bus can be
  used.
* **Port numbering.** Ports are numbered from 1 so that 0 can mean "not
  waiting".
* **Caller last on the wheel.** The wheel includes the calling task, in last
  place.
* **One main-loop iteration per kernel call.** The original kernel code does
  not say where its main loop waits. Here each iteration starts when a kernel
  call arrives.
* **Idle rescans.** When nothing is runnable, the controller keeps rescanning.
  The original waits for the next kernel call, without running the
  data-handling pass again.
* **Interrupt and valid flag.** The interrupt is a pulse, and the valid flag is
  cleared by reading `NEXT_TASK`.
* **One-cycle pass.** The data-handling pass handles all ports in one cycle.
* **Collision rules.** A send that meets a pass on the same port stays pending.
  A frozen clear that meets a pass loses to the pass.
* **Reset.** Reset is asynchronous and active-low, and clears everything.

Not provided as RTL: the CPU, the context-switch routine (software), the
system bus and arbiter, the system memory, and application hardware tasks.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_hwrtos_data_handling`: random sends, clears and passes, including all
  three on one port in the same cycle, compared with a reference model every
  cycle.
* `tb_hwrtos_scheduler`: random wait lists and events for every caller,
  compared with a wheel walk written in the testbench. It runs at 3 and at 5
  tasks.
* `tb_hwrtos_bus_if`: random requests over all regions, checking decode
  strobes and read data.
* `tb_hwrtos_controller`: checks the start-up order, the 4-cycle latency and
  the one pass per call. It also checks choices against a reference wait
  list, that wait entries are cleared, and that idle rescans happen and end
  when data arrives.
* `tb_hwrtos_top`: the whole design at default parameters with a bus-level CPU
  model. Three software tasks form a 3x3 image-filter pipeline:
  * an index task sends pixel coordinates;
  * a retrieve task sends the nine window pixels;
  * a filter task sums them.

  A hardware-task model feeds the filter one coefficient at a time after
  random delays, which forces idle rescans. The test checks every filtered
  pixel and that every kernel call takes 4 cycles when a task was runnable.
  It also counts passes, copies, rescans, self-reschedules and non-blocking
  reads, and fails if any of them never happened.

* `tb_hwrtos_top_wheel`: the whole design with 5 tasks and 8 ports. It has
  four tasks runnable at once and checks that the CPU is handed out strictly
  in wheel order. It also checks that later answers overwrite an unread
  receive buffer.

Run any of them with plain Verilator from the directory that holds `rtl/`
and `tb/`, for example:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        rtl/hwrtos_pkg.sv tb/tb_hwrtos_top.sv --top-module tb_hwrtos_top
    ./obj_dir/Vtb_hwrtos_top

The testbenches initialise every signal they read. The simulation also
passes when undriven state starts at random values.
