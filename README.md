# hthreads hardware threads: a uniform thread interface across the CPU/FPGA boundary

In a hybrid CPU/FPGA system, a computation placed in the FPGA is normally a
slave of the program on the CPU. It is driven through custom registers, and
its data must be recast into raw bit fields. The hthreads model removes that
distinction: every part of the application is a POSIX-style thread. A thread is
either compiled for the CPU or turned into a circuit, and both kinds use the
same services: create, join, exit, mutexes and access to global memory.

This RTL provides the FPGA side of such a system:

* the **hardware thread interface (HWTI)**. It is the hardware thread's
  equivalent of a system-call layer. The thread's logic asks for a service with
  an opcode and two arguments. The HWTI turns the request into ordinary bus
  loads and stores towards memory and the system services, the same protocol
  the CPU uses.
* the system services that software and hardware threads share: a **Mutex
  Manager**, a **Thread Manager** (create, add to the ready queue, join, exit)
  and a **Scheduler**. The Scheduler starts and resumes hardware threads by
  itself and keeps the next software thread ready for the CPU;
* two example **hardware user threads**: a trivial counting thread, and a
  `mutexAdd` thread that works with other threads (hardware or software) on a
  shared vector addition;
* a simple shared **system bus**, and a top level that puts two `mutexAdd`
  threads and one counting thread together with the three services.

The CPU with its software threads and global memory are not part of this RTL.
They connect through ports of the top, and the end-to-end testbench models
them.

## How a hardware thread sees the system: the HWTI

An HWTI has two faces. Three state machines are involved: one for each face,
and a controller between them (`hwti_ctrl`).

### System interface (`hwti_sys_if`): the thread's context

The system services see a hardware thread only as five bus registers, at word
offsets of the HWTI's base address:

| offset | register  | access | meaning |
|-------:|-----------|--------|---------|
| 0x00   | thread_id | R/W    | ID assigned at creation; writing it moves status to USED |
| 0x04   | command   | R/W    | write `RUN` (1) or `RESET` (2) |
| 0x08   | status    | R      | `NOT_USED` 0, `USED` 1, `RUNNING` 2, `BLOCKED` 3, `EXITED` 4 |
| 0x0C   | argument  | R/W    | the single thread argument (value or pointer) |
| 0x10   | result    | R      | the value passed to `HTHREAD_EXIT` |

These registers play the part that the program counter, stack pointer and data
registers play for a software thread. Loading `RUN` into `command` starts the
thread much as loading the program counter would. First the HWTI copies
`argument` into the thread's `user_result`, then it raises `user_status` to
`RUN`. The scheduler also writes `RUN` to resume a thread that was `BLOCKED` on
a mutex. `RESET` returns the HWTI and the user logic to their unused state, so
the same circuit can be created again with a new ID.

### User interface (`hwti_user_if`): the thread's syscall entry

The user logic connects through five signals:

| signal | width | direction (thread view) |
|--------|------:|------|
| `intrfc2thrd_status` | 4 | in: `RESET` 0, `RUN` 1, `ACK` 2 |
| `intrfc2thrd_result` | 32 | in: argument at start, then each call's result |
| `thrd2intrfc_opcode` | 8 | out: system call |
| `thrd2intrfc_argument_one` | 32 | out |
| `thrd2intrfc_argument_two` | 32 | out |

The calling convention:

1. While status is `RESET`, the thread holds its initial state. It starts when
   status turns `RUN`, and reads its argument from `result`.
2. To make a call, the thread drives an opcode other than `NOOP`, with its
   arguments, for **one** cycle. It then drives `NOOP` and waits.
3. The HWTI answers with status `ACK` for one cycle, with the result in
   `result`. Status then returns to `RUN`.

A call is latched only while status is `RUN` and no other call is pending.

### System calls

| opcode | value | what the HWTI does |
|--------|------:|--------------------|
| `NOOP` | 0x00 | nothing requested |
| `HTHREAD_EXIT` | 0x01 | copies argument_one into `result`. Loads from the Thread Manager's exit address with the thread ID in the address. Status becomes `EXITED` |
| `LOAD` | 0x02 | bus read of address argument_one; result = data |
| `STORE` | 0x03 | bus write of argument_two to address argument_one |
| `HTHREAD_SELF` | 0x04 | result = thread_id |
| `HTHREAD_YIELD` | 0x05 | nothing to do for a hardware thread; acknowledged at once |
| `HTHREAD_MUTEX_LOCK` | 0x06 | load from the Mutex Manager, mutex = argument_one. If the mutex is taken, status becomes `BLOCKED` and the call stays open until the scheduler writes `RUN` |
| `HTHREAD_MUTEX_UNLOCK` | 0x07 | load from the Mutex Manager; result = its answer |

Creating threads from within a hardware thread is not supported. Every thread
is created from the CPU side.

### Service calls are loads

Like the CPU, the HWTI calls a system service with one bus **load**. The
address encodes the request, and the load's data is the answer:

```
address = SERVICE_BASE | op << 18 | calling_thread_id << 10 | object << 2
```

`SERVICE_BASE` is 0x2000_0000 for the Mutex Manager, 0x3000_0000 for the
Thread Manager and 0x4000_0000 for the Scheduler. `op` is 2 bits, the thread
ID is 8 bits, and the object (a mutex number or a target thread) is 8 bits. `hthreads_pkg::svc_addr()` builds these addresses.

### Timing

Cycle 0 is the cycle in which the thread drives the opcode.

| operation | cycles here | published figure for the original (with its vendor bus attachment) |
|-----------|------------:|------:|
| write thread_id → status `USED` | 2 | 5 |
| write `RUN` → user_status `RUN` | 4 | 5 |
| write `RESET` → user_status `RESET` | 2 | 4 |
| `HTHREAD_SELF`, `HTHREAD_YIELD` → back to `RUN` | 4 | 5 |
| `LOAD` | 5 + bus round trip | 14 |
| `STORE` | 5 + bus round trip | 33 |
| `MUTEX_LOCK` / `MUTEX_UNLOCK` | 5 + bus round trip | 20 |
| `HTHREAD_EXIT` → status `EXITED` | 4 + bus round trip | 20 |

"Bus round trip" counts from the cycle the HWTI raises `req` to the cycle of
`ack`. The HWTI testbench uses round trips of 9 (read), 28 (write), 15 (mutex)
and 16 (exit) cycles, and then reproduces the published 14 / 33 / 20 / 20 cycles
exactly. In the full system, `hbus_xbar` adds one arbitration cycle to every
round trip. The Mutex Manager answers two cycles after it sees a request.

## Mutex Manager (`mutex_manager`)

It serves four operations, each a single load (`op` field above):

* `LOCK` (0): a free mutex goes to the caller, answer `GRANTED` (0). A taken
  mutex puts the caller at the end of that mutex's FIFO of waiters, answer
  `BLOCKED` (1).
* `UNLOCK` (1): only the owner may unlock. If there are no waiters, the mutex
  becomes free. Otherwise ownership passes **directly** to the oldest waiter,
  and the Mutex Manager offers that thread's ID to the scheduler on
  `wake_valid` / `wake_tid` / `wake_ready`.
* `TRYLOCK` (2): like `LOCK`, but answers `BLOCKED` without queueing.
* `OWNER` (3): bit 31 = locked, low bits = owner.

Re-locking a mutex you already own, unlocking one you do not own, or naming an
out-of-range mutex answers `ERROR` (2).

Because ownership moves on unlock, a woken thread never has to retry. For a
hardware thread, the scheduler writes `RUN` to its HWTI, and the HWTI completes
the open `MUTEX_LOCK` call with `ACK`. Meanwhile the CPU is not involved at all.

Waiters are held as linked lists threaded through one next-pointer table
indexed by thread ID. Each mutex has a head, a tail and a non-empty flag, so
every operation takes constant time. While a wake-up waits for the scheduler,
no new request is accepted.

Defaults: 64 mutexes and 256 thread IDs.

## Thread Manager (`thread_manager`) and Scheduler (`scheduler`)

Together these two take the CPU out of thread control. Creating, starting,
blocking, waking and joining a thread needs no software scheduler pass. The
CPU only sees a context switch when the thread it should run changes.

The Thread Manager (0x3xxx_xxxx) serves four loads, with the same address
fields as the Mutex Manager (`op`, caller, target):

* `CREATE` (2) returns the lowest free thread ID, or `0x8000_0000` if none is
  free. ID 0 is the main thread and is taken from reset.
* `ADD` (3) passes the target to the Scheduler (`add_thread`).
* `JOIN` (1) answers `OK` (0) if the target has already exited; the target's
  ID is then free. Otherwise it answers `WAIT` (1), and the caller must give
  up the CPU. It is recorded as the target's joiner.
* `EXIT` (0) marks the caller exited. If a thread is joined on it, that
  thread goes back to the Scheduler and the ID is freed.

Bad IDs, joining yourself, or a second joiner answer `ERROR` (2).

The Scheduler (0x4xxx_xxxx) is told about each thread by the CPU:

* `SET_HW` (store, op 1): the thread is a hardware thread; `wdata` = base
  address of its HWTI.
* `SET_SW` (store, op 0): the thread is a software thread; `wdata` = its
  priority, where 0 is the highest. A thread never registered counts as
  software with priority 0.

A thread becomes ready through `add_*` (Thread Manager) or `wake_*` (Mutex
Manager hand-over). Both are accepted every cycle. What happens next depends
on the kind of thread:

* A **hardware** thread is dispatched at once. The Scheduler, a bus master
  itself, writes `RUN` into the HWTI's command register. This is how
  hardware threads start, and how they resume after blocking on a mutex.
* A **software** thread enters the ready set. `next_tid` / `next_valid` always
  show the highest-priority ready thread, with the lowest ID winning a tie.
  They follow one cycle after any change, whatever the number of ready threads.
  `preempt` is high while that thread outranks the one on the CPU; it stands
  for the CPU's scheduling interrupt. At a context switch the CPU loads
  `NEXT` (op 2). The answer is `{valid, 0…, tid}`; that thread leaves the
  ready set and becomes the running one. `PEEK` (op 3) gives the same answer
  without taking the thread.

Both services answer two cycles after a request. The Thread Manager takes no
new call while its hand-over to the Scheduler is pending; with this Scheduler
that is never longer than one cycle.

A complete life cycle as the testbenches run it:

1. `CREATE` returns an ID.
2. For a hardware thread: write the ID to the HWTI's `thread_id`, the
   argument to its `argument`, then `SET_HW`. For a software thread:
   `SET_SW`.
3. `ADD`: a hardware thread receives `RUN`; a software thread becomes
   `next_thread`.
4. `JOIN`: on `WAIT`, the parent waits until the Scheduler offers it again as
   `next_thread`.

## The example threads

### `simple_thread`

This is `x = 0; for (i = 0; i < arg; i++) x++; return x;` as a state machine.
The loop runs one iteration per cycle, then the thread calls `HTHREAD_EXIT`
with `x`. It is the smallest possible HWTI user, and it shows the RESET / RUN /
ACK sequencing. It has no reset pin; `user_status = RESET` resets it.

### `matrix_add_thread` (mutexAdd)

Several threads compute `Z[i] = X[i] + Y[i]` together. The thread's argument
points to a shared structure in global memory:

```
+0 size   +4 index   +8 &X   +12 &Y   +16 &Z      (32-bit words)
```

Each thread loops:

```
lock(m); idx = index; index = idx + 1; unlock(m);
if (idx < size) { Z[idx] = X[idx] + Y[idx]; yield(); }
```

It stops once it draws an index of at least `size`, and exits with the number of
elements it added. Every step is one system call. Whoever takes an index first
does that element, so software and hardware threads share the work dynamically.
Each worker makes one final draw past the end, so the shared index ends at
`size + number of workers`. The mutex number is the parameter `MUTEX_ID`.

## The system bus (`hbus_xbar`) and the top (`hthreads_top`)

The bus has a single-beat request/acknowledge protocol (`bus_req_t` /
`bus_rsp_t` in `hthreads_pkg`). A master holds `req`, `we`, `addr` and `wdata`
until the slave returns a one-cycle `ack` with `rdata`, and drops `req` in the
next cycle. `hbus_xbar` carries one transfer at a time. It arbitrates round
robin with one arbitration cycle, and decodes by base/mask per slave; the first
match wins, and a mask-0 slave catches everything. An unmapped address is
answered by the bus itself with 0.

`hthreads_top` address map and masters:

| region | slave |
|--------|-------|
| 0x1000_0000 + k·0x100 | HWTI k (k = 0..NUM_MATRIX_THREADS-1: mutexAdd threads; k = NUM_MATRIX_THREADS: simple_thread) |
| 0x2xxx_xxxx | Mutex Manager |
| 0x3xxx_xxxx | Thread Manager |
| 0x4xxx_xxxx | Scheduler |
| everything else | global memory (port `mem_req` / `mem_rsp`) |

Bus master 0 is the CPU side (`host_req` / `host_rsp`), master k+1 is HWTI
k, and the last master is the Scheduler. Inside the top, the Mutex Manager's
wake-ups and the Thread Manager's hand-overs go to the Scheduler. The
Scheduler's `next_valid`, `next_tid` and `preempt` are the top's outputs to
the CPU.

| parameter | default | meaning |
|-----------|--------:|---------|
| `NUM_MATRIX_THREADS` | 2 | hardware mutexAdd threads (the configuration the example system was built with) |
| `NUM_MUTEXES` | 64 | Mutex Manager size |
| `NUM_THREADS` | 256 | thread-ID space |
| `MUTEX_ID` | 0 | mutex shared by the mutexAdd threads |

To start a hardware thread, the CPU side follows the life cycle above. After
`thread_id` and `argument` are written, the HWTI's status reads `USED`. The
`RUN` then comes from the Scheduler, although the CPU side may also write it
directly. When the thread exits, its HWTI calls the Thread Manager, which
releases any joined parent. `result` then holds the exit value.

## Where this departs from, or adds to, the design it follows

* The HWTI's registers, calls, state names, statuses and user-side signals
  follow the published design. The numeric encodings, the register offsets,
  the bus, the address map and the service-address encoding are choices made
  here.
* The original attaches each core through a vendor bus interface. Here
  `hbus_xbar` replaces it, which is why operations that need no bus are faster
  than the published figures.
* The Mutex Manager, Thread Manager and Scheduler belong to the hthreads
  system, but their internals are published elsewhere. All three are written
  here from their roles alone, as the simplest logic that fills them:
  * Mutex Manager: FIFO hand-over on unlock.
  * Thread Manager: only create, add, join and exit.
  * Scheduler: a ready set with a priority encoder.
* The original Scheduler takes a constant 13 cycles per decision. This one
  takes 1 cycle, also independent of the number of ready threads, at the
  cost of a wide comparator tree over all 256 entries.
* The CPU Bypass Interrupt Scheduler is not included. `preempt` is the
  interrupt request it would deliver.
* The original mutexAdd hardware thread was hand-written and not published.
  This one follows the software version step by step, including its `yield`.
  The published discussion says yields are dropped when hardware threads are
  generated automatically. Here the HWTI acknowledges a yield in 4 cycles.
* `matrix_add_thread` returns the number of elements it added. The original
  returns nothing.
* `HTHREAD_SELF` is not used by either example thread, so it is exercised only
  in the HWTI testbench.
* Widths are 32-bit data and addresses, 8-bit thread IDs and 8-bit opcodes.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it establishes |
|-----------|---------------------|
| `tb_hwti_sys_if` | register access, read-only status/result, command pulses, clear, 1-cycle ack |
| `tb_hwti_user_if` | call latching only in RUN, one pending call, result/status path, clear |
| `tb_hwti` | every system call, create / RUN / BLOCKED-resume / EXIT / RESET / re-create, all cycle counts in the timing table |
| `tb_mutex_manager` | directed cases plus 2000 random operations against a reference model, including FIFO hand-over and wake-up back-pressure |
| `tb_hbus_xbar` | random traffic from 3 masters to 6 slaves: routing, one slave at a time, round-robin fairness, unmapped addresses |
| `tb_simple_thread` | exit value and cycle count for several bounds, including 0 |
| `tb_matrix_add_thread` | Z = X + Y, index accesses only under the mutex, lock/unlock pairing, one yield per element, a part-done start |
| `tb_thread_manager` | ID allocation from 1 upward and running out, add hand-over with back-pressure, join before and after exit, parent re-queued on exit, ID reuse, errors, 1500 random calls against a reference model |
| `tb_scheduler` | RUN dispatch to the right HWTI on add and on wake (also both in one cycle), next_thread by priority and ID, NEXT and PEEK, preempt rules, 300 random rounds against a reference model |
| `tb_scheduler_load` | the Scheduler at its default 256-thread size with 2, 10, 50, 100 and 250 ready software threads: decision 1 cycle and NEXT answer 2 cycles at every load, dispatch in priority order, each thread once |
| `tb_hthreads_top` | the top at its default parameters. 2 hardware mutexAdd threads and 1 modelled software thread add 100-element vectors; the simple thread runs, is RESET, re-created and run again. All threads are created, started and joined through the Thread Manager and Scheduler. Counts blocking, hand-over, Scheduler RUNs, software resumes through next_thread, preempt, joins that waited or not, loads, stores, yields, exits and bus contention |
| `tb_matrix_workloads` | the vector add with 1 or 2 hardware and 0, 1 or 2 software threads, at 100 and 5,000 elements for every mix and 25,000 for two hardware threads; checks every Z element and that the shares add up, and prints the cycle count and software share of each run |

`tb_hthreads_top` at the default size takes about 11,000 cycles for the
100-element add. A run, from the repository root:

```
verilator --binary --timing --assert --top-module tb_hthreads_top \
  -y rtl -y tb +libext+.sv -Irtl rtl/hthreads_pkg.sv tb/tb_hthreads_top.sv
./obj_dir/Vtb_hthreads_top
```

With the bus timing of the testbenches (9-cycle memory reads, 28-cycle
writes) `tb_matrix_workloads` reports, for example:

| mix | 100 elements | 5,000 elements | software share |
|-----|-------------:|---------------:|---------------:|
| 1 HW | 14,261 cycles | 705,161 cycles | 0 % |
| 2 HW | 10,956 | 535,256 | 0 % |
| 1 HW + 1 SW | 11,320 | 555,220 | 50 % |
| 2 HW + 2 SW | 11,177 | 537,927 | 50 % |

The shared index, taken under one mutex for every element, is the bottleneck:
a second thread of either kind helps once, and further threads mostly wait.
The software threads are a bus-level model with a fixed 40-cycle compute delay
per element, so the software share depends on that number.

`tb/tb_bus_mem.sv` is a behavioural bus memory with configurable read and write
latency, used by the system testbenches.
