# Hardware task scheduling: FTS Manager/Delegates and the Fast Task Scheduler IP

Task-based runtimes (OpenMP/OmpSs style) spend much of their time on
bookkeeping. They create tasks, work out which tasks depend on which, hand
ready tasks to workers and retire finished ones. With small tasks this
overhead dominates. This RTL moves that bookkeeping into hardware, in two
independent forms that sit side by side in one top module
(`fts_system_top`):

1. **Many-core RISC-V integration.** Each of 30 cores gets a small
   coprocessor, the *FTS Delegate*. It adds ten custom instructions for
   creating, fetching and retiring tasks. One shared *FTS Manager* collects
   the traffic of all Delegates and talks to *Picos*, an external
   hardware dependence manager. Picos decides when a task's inputs are
   ready; the Manager makes sure many cores can use it at once without
   corrupting each other's requests.
2. **Fast Task Scheduler (FTS) IP core for FPGA accelerators.** A host
   writes task commands into a memory-mapped command queue, one sub-queue
   per accelerator. The FTS sends each command over AXI-Stream to its
   accelerator when that accelerator is idle. It collects the accelerator's
   "finished" reply into a second queue that the host reads.

Picos, the Rocket cores and the accelerators themselves are not part of
this RTL. Their connections are ports of the top module. The testbenches
contain behavioural models of Picos and of an accelerator.

## Design 1: task-scheduling instructions and the FTS Manager

### The instruction set (`fts_delegate`)

A Delegate is a RoCC accelerator: the core sends it `funct7`, `rs1`, `rs2`
and `rd`, and it returns one 64-bit value. Every instruction is
**non-blocking**. It answers on the cycle after it is accepted, either
with a result or with a failure value, and software decides whether to
retry. No core can be stalled by the scheduler.

| funct7 | instruction | operands | result |
|---|---|---|---|
| 0 | Initiate Task | rs1 = 64-bit software task ID, rs2[7:0] = number of dependence pointers | 1 accepted / 0 queue full |
| 1 | Add Info | rs1 = one word of task metadata | 1 / 0 |
| 2 | Send IN Dep | rs1 = input pointer | 1 / 0 |
| 3 | Send IN Deps | rs1, rs2 = two input pointers | 1 / 0 |
| 4 | Send OUT Dep | rs1 = output pointer | 1 / 0 |
| 5 | Send OUT Deps | rs1, rs2 = two output pointers | 1 / 0 |
| 6 | Fetch SW ID | - | software ID of the next ready task, or 0 if none (not removed) |
| 7 | Fetch Picos ID | - | `{bit 32 = 1, Picos ID}` of that task, which is removed; 0 if none |
| 8 | Retire Task | rs1[31:0] = Picos ID | 1 accepted / 0 collided, retry |
| 9 | Ready Task Request | - | 1 if the request was queued / 0 |

A typical worker loop is: Ready Task Request, then poll Fetch SW ID until
it is non-zero, then Fetch Picos ID, run the task, then Retire Task until
it returns 1. A task creator issues Initiate Task, one Add Info, and then
as many dependence pointers as it announced (0 to 15). Software task ID 0
is reserved to mean "nothing ready". With `xd = 0` no reply is sent.
`cmd_ready` is low while a reply is waiting, so an always-ready core can
issue one instruction every two cycles.

Each Delegate also holds that core's small ready queue (`READY_DEPTH = 2`).
The Manager fills it.

### Submission: atomic sequences from 30 cores (`submission_ctrl`)

This is the subtle part. Picos accepts a task as one contiguous
*sequence*: header, software ID, metadata, then one beat per dependence.
Thirty cores build such sequences concurrently, one instruction at a time,
and may be interrupted between instructions. The Manager must never let
two sequences interleave. Picos may also refuse a whole sequence (it is
full), and then the sequence must be sent again unchanged.

The submission controller has four parts:

* **Core Submission Handler** (`core_sub_handler`), one per core. It has
  three small FIFOs (`SUBQ_DEPTH = 4`), one per class of submission
  instruction: Initiate Task, Add Info, and the dependence instructions.
  Filling them needs no arbitration. When an Initiate Task entry is at the
  front, the handler requests arbitration. The request carries the
  sequence length, 3 + number of pointers. Once granted, it emits the
  beats in order: `HDR` (pointer count), `SWID`, `INFO`, then `DEP_IN` or
  `DEP_OUT` per pointer. A two-pointer entry gives two beats. If the
  metadata or a pointer has not arrived yet, the handler waits; beats from
  other cores cannot slip in, because the grant is held.
* **Round Robin Arbiter** (`rr_arbiter`). It offers one requesting handler
  at a time. The pointer moves past a core only when its request is
  actually taken.
* **Guided Arbiter** (`guided_arbiter`). It takes the offered request and
  forwards exactly that many beats from that one core. It marks the last
  beat by counting, not by trusting the core. Then it takes the next
  request.
* **Resubmission Handler** (`resub_handler`). It passes each sequence to
  Picos while copying it into an 18-entry buffer (3 + 15 beats). After
  the last beat it waits for Picos' one-cycle answer (`resp_valid`,
  `resp_nack`). On a nack it replays the buffered copy, and pulses
  `resubmit` for observability. Only after an accept does it pass the next
  sequence. The core that submitted never learns about the nack.

### Work fetch: tasks in the order they were asked for (`workfetch_ctrl`)

Picos has one global ready queue. Each Ready Task Request puts the
requesting core's index into an order FIFO (`ORDER_DEPTH = 64`), at most
one per cycle. Simultaneous requests are ordered round robin. The task at
the head of Picos' queue always goes to the core at the head of the order
FIFO, into that core's Delegate ready queue. Tasks are thus handed out in
the total order of the requests, and no core hoards work while another
starves.

### Retirement (`retire_ctrl`)

A Retire Task is offered for one cycle. If several cores offer in the same
cycle, a round-robin arbiter lets one through. The others get 0 back and
retry in software; `ret_collision` pulses when this happens. The accepted
retirement becomes the three-beat stream Picos expects: Picos ID, index of
the retiring core, then a zero word marked last.

### Picos-side ports

| group | signals | protocol |
|---|---|---|
| submission | `picos_sub_valid/ready/beat/last` | valid/ready; `beat` = `{kind[2:0], data[63:0]}`; `last` on the final beat |
| submission answer | `picos_sub_resp_valid`, `picos_sub_resp_nack` | one cycle per finished sequence |
| ready tasks | `picos_rdy_valid/ready/data` | valid/ready; data = `{Picos ID[31:0], SW ID[63:0]}` |
| retirement | `picos_ret_valid/ready/data/last` | valid/ready, three beats |

## Design 2: the Fast Task Scheduler IP core

### Command queues (`cmd_queue_bram`)

There are two memories of 1024 × 64-bit words: command-in and command-out.
Each is split into 16 sub-queues of 64 words, one sub-queue per
accelerator (accelerator *a* owns words `64a .. 64a+63`). Each sub-queue is
a circular buffer of variable-length commands. Both memories are true
dual-port with byte write enables and a byte address (word =
`addr[12:3]`), one-cycle read latency, read-first. Port A belongs to the
FTS core and port B to the host (`host_in_*`, `host_out_*` on the top).

### Command format

Word 0 of every command is a header:

| bits | field |
|---|---|
| 63:56 | valid: `0x80` valid, `0x00` free |
| 47:40 | destination ID |
| 39:32 | compute flag |
| 15:8 | number of arguments |
| 7:0 | command code: `0x01` Execute Task, `0x03` Finished Task, `0x05` Execute Periodic Task |

An Execute command is: the header, the task ID (bits 119:64 ID, 127:120
zero), the parent task ID, then for Execute Periodic one word with
`{period in µs, repetitions}`, then two words per argument (flags and
argument ID, then the value). Its length is `3 + periodic + 2 × args`
words, at most 34. A Finished Task is two words: header and task ID.
**Odd command codes make the accelerator busy.** It gets nothing more
until it returns its Finished Task.

### Command in (`cmd_in`)

Command in walks the accelerators round robin and skips busy ones. For an
idle one it reads the header at that sub-queue's read pointer. If the
header is valid, it streams the whole command to that accelerator
(`tdest` = accelerator, `tlast` on the last word). Each slot is written
back to 0 as soon as its word is sent, so the host can refill it. The read
pointer then advances by the command length, modulo 64. Each word takes
three cycles (read, wait, send-and-clear), plus back-pressure.

### Command out (`cmd_out`)

Command out accepts a two-word command from any accelerator (`tid` =
source). It then checks the header slot at that accelerator's write
pointer in the command-out queue. If the host has not consumed the
previous entry there yet (valid byte still `0x80`), it waits and checks
again. It writes the task ID first and the header with its valid byte
last, so the host never sees a half-written entry. For a Finished Task it
then tells Command in to clear the accelerator's busy flag. `tready` stays
low until the command is stored, so a slow host back-pressures the
accelerators.

### Stream interconnect

`axis_cmd_demux` routes the command stream by `tdest`. It is combinational;
an out-of-range `tdest` is swallowed. `axis_cmd_mux` merges the accelerator
streams round robin, stays on one source until `tlast`, and tags the
output with `tid`.

### Parameters (`fts_core`, `fts_system_top`)

| parameter | default | meaning |
|---|---|---|
| `MAX_ACCS` | 16 | accelerators, sub-queues per queue |
| `MAX_ACC_TYPES` | 16 | accepted for compatibility, unused |
| `CMDIN_QUEUE_LEN` / `CMDOUT_QUEUE_LEN` | 64 | words per sub-queue |
| `MAX_ARGS_PER_TASK` | 15 | larger argument counts are clamped |
| `NUM_CORES` | 30 | Delegates, design 1 |

The FTS core has its own active-low synchronous reset `rstn`; design 1
uses active-high `rst`. Host software should clear both queues before
releasing `rstn`, because the memories are not reset.

## What is specified and what is this design's own choice

The specified behaviour:

* the ten instructions and their non-blocking nature;
* the Manager's three controllers and their internal split;
* atomic submission with replay on rejection;
* work-fetch in request order;
* retirement arbitration with retry;
* conversion of a retirement into three packets;
* the queue sizes and layout, the command formats and the odd-code busy
  rule;
* in-order processing per accelerator;
* the AXI-Stream and BRAM port sets of the FTS core, and its parameters.

This design's own choices:

* the funct7 numbering;
* result encodings, and 0 as "no task";
* the Picos beat format, the response handshake and the contents of the
  three retirement beats;
* all FIFO depths;
* the round-robin scan in Command in;
* clearing every slot after reading it;
* the write order and wait-for-free-slot rule in Command out;
* the two-word framing on `cmdout_in`, which has no `tlast`;
* byte addressing of the queue memories;
* forwarding a periodic command whole, leaving the repetitions to the
  accelerator.

Each RTL file's opening comment says which parts of that block are which.

Known limits:

* Accelerator types are not modelled.
* The Delegate is not a full Rocket RoCC wrapper. It has no memory
  interface because it needs none.
* Picos' real packet format is not reproduced.

## Simulation

Every block has a self-checking testbench `tb/tb_<block>.sv` that prints
`TB_RESULT checks=N failures=M` and stops itself via a watchdog if it
hangs. Behavioural models: `tb/picos_model.sv` (bounded capacity, can
reject every k-th submission; hands out accepted tasks as ready either at
once or, optionally, after a simple pointer-conflict dependence check) and
`tb/acc_model.sv` (random back-pressure, fixed run time, replies with
Finished Task).

`tb_fts_system_top` runs both designs at full default size: 30 cores and
16 accelerators with 64-word sub-queues. Three cores create 60 tasks with
0 to 3 dependence pointers, and all 30 run the worker loop. The host
issues 96 commands, a third of them periodic, and holds one command-out
slot for a while. The test checks the following:

* every task ran exactly once and was retired;
* every command finished on its accelerator, in order;
* each of these mechanisms happened at least once:
  * submission replay;
  * concurrent submitters;
  * retirement collision;
  * refused instructions;
  * empty fetches;
  * busy accelerators skipped;
  * periodic commands;
  * simultaneous finishes;
  * waiting for a command-out slot.

It runs in well under a minute.

`tb_fts_task_bench` runs the two overhead benchmarks used to evaluate this
kind of scheduler on the same full-size system. **Task Free** is
independent tasks with 0 to 15 pointer parameters. **Task Chain** is, for
each pointer count from 1 to 15, a chain of tasks that all write the same
pointers. As in the evaluated system, core 0 creates tasks and also
executes them, while cores 1 to 29 only execute. Here the Picos model
tracks dependences: it releases a task only when no older unretired task
conflicts with it. The test checks that no chain task starts before its
predecessor retired.

Simulate with Verilator 5, from the repository root:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl -y tb \
  --top-module tb_fts_system_top rtl/fts_pkg.sv tb/tb_fts_system_top.sv
./obj_dir/Vtb_fts_system_top
```

Replace the top module name to run another testbench. All RTL is
synthesizable SystemVerilog-2017. `rtl/fts_pkg.sv` holds the shared types
and constants; `rtl/fts_fifo.sv` is a generic FIFO helper.
