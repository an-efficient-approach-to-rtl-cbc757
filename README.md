# Transparent run-time reconfiguration controller

A reconfigurable coprocessor can replace several fixed accelerators: each
accelerator becomes a *virtual hardware task* (VH task) that is loaded into one
reconfigurable region when it is needed. Usually software must then ask for the
reconfiguration explicitly, through extra instructions or operating-system
calls. This RTL removes that need. The tasks keep the memory-mapped register
interface of a fixed accelerator. A hardware **RTR (run-time reconfiguration)
controller** watches the register accesses. It treats a write to a task that is
not loaded the way a cache treats a miss:

1. The write is acknowledged at once and held back inside the controller.
2. The task is queued for loading.
3. An interrupt asks the operating system to block the calling software task.
4. Once the task's bitstream is in the region, the held-back writes are
   replayed to it in order.
5. A second interrupt lets the operating system release the blocked task.

Driver code written for fixed accelerators therefore runs unchanged. This
design does not try to hide the reconfiguration *latency*: a task is loaded
when it is first written, with no prefetching.

The RTL contains the controller, a reconfigurable region and two example
tasks: a CORDIC cosine unit and an 8-point DCT. The processor, system bus,
bus adapter and configuration-memory controller are outside it, and the top
level brings their signals out as ports.

## System structure

```
 host CPU -- system bus -- bus adapter ==register bus==> rtr_controller ==> rcp_region
                                          (s_*)            |   |   |        (rq_*/rs_*, irq)
                                                           |   |   |        +-----------------+
           interrupt controller <-- irq_block/irq_unblock -+   |   |        | cordic_vh  (0)  |
                                    vh_irq[1:0]                |   |        | dct_vh     (1)  |
           configuration memory <-- cfg_start/cfg_task --------+   |        +-----------------+
           controller           --> cfg_done                       |             | m_*
           system memory        <========= m_* (master port, gated) +<------------+
```

`rtr_top` holds `rtr_controller` and `rcp_region`. Inside the controller are a
request FIFO (`sync_fifo`), one write buffer per task (also `sync_fifo`) and the
read-back copy (`readback_regfile`). `rtr_pkg` holds the shared types.

| File | Contents |
|---|---|
| `rtl/rtr_pkg.sv` | task-state enum `vh_state_t`, bus widths, task numbers |
| `rtl/rtr_controller.sv` | the controller: task states, decisions, replay, read-back copy |
| `rtl/sync_fifo.sv` | fall-through FIFO (request queue, held-write buffers) |
| `rtl/readback_regfile.sv` | local copy of each task's result/status registers |
| `rtl/rcp_region.sv` | reconfigurable region model holding one task at a time |
| `rtl/cordic_vh.sv`, `rtl/dct_vh.sv` | the two VH tasks |
| `rtl/rtr_top.sv` | top level |

## Register map seen by software

Each task owns four 32-bit registers, at byte offsets 0, 4, 8 and 12 from its
base address.

| Task | Base | +0 | +4 | +8 | +12 |
|---|---|---|---|---|---|
| CORDIC (task 0) | `0x1000` | angle (R/W) | start (W) | done (R) | cos (R) |
| DCT (task 1) | `0x2000` | input address (R/W) | output address (R/W) | start (W) | done (R) |

Any write to a start register starts the task, whatever the value written. A
done register reads 0 while the task is busy and 1 once its results are ready.
Addresses outside both windows are acknowledged at once, and reads of them
return 0.

## Task life cycle

The controller keeps a state for every task (`vh_state` output). Only one task
can be in the region at a time, so no task is ever "ready but not running".
That is why there is no READY state.

| State | Meaning |
|---|---|
| UNLOADED | The task exists only as a bitstream. |
| WAITING | The task has been requested and sits in the request FIFO, because the region is busy. |
| LOADING | The task's bitstream is being written into the region. |
| RUNNING | The task is in the region, either running or idle and ready to be used. |
| DONE | The task is still in the region, but it has finished and may be replaced. |

Transitions:

| From | Event | To |
|---|---|---|
| UNLOADED | Host write while the region is free, no request is queued and the controller is idle. The write is held back, `irq_block` and `cfg_start` pulse. | LOADING |
| UNLOADED | Host write otherwise. The write is held back, the task is pushed into the request FIFO and `irq_block` pulses. | WAITING |
| WAITING | The task is at the FIFO head and the region is free (empty, or its task is DONE). `cfg_start` pulses. | LOADING |
| LOADING | `cfg_done`. The held writes are then replayed and `irq_unblock` pulses. | RUNNING |
| RUNNING | The task raises its completion interrupt. The read-back registers are copied and `vh_irq[task]` pulses. | DONE |
| DONE | Host write. The task runs again without being reloaded. | RUNNING |
| DONE | Another task is at the FIFO head. | UNLOADED |

## How each host access is handled

Reads never change a task's state.

| Target task state | Write | Read |
|---|---|---|
| UNLOADED | Held back, `irq_block`, loaded at once or queued | answered from the read-back copy |
| WAITING | Held back | answered from the read-back copy |
| LOADING | Held back | waits until the task is RUNNING, then goes to the task |
| RUNNING / DONE | Goes to the task (DONE becomes RUNNING). If writes are still being replayed, it is held back behind them. | goes to the task |

Each task has a write buffer of `WBUF_DEPTH` entries (2 by default). A write
that finds the buffer full gets no acknowledge until the replay drains the
buffer, so writes always reach the task in program order.

**Read-back copy.** A swapped-out task has no registers to read, yet software
may still want its result. For example, a CORDIC result may be read after the
DCT has replaced the CORDIC. So every time a task finishes, the controller
reads that task's result and status registers into `readback_regfile`. Which
registers to copy is set per task by `RB_MASK`:

- CORDIC: `done` and `cos`.
- DCT: `done`.

This copy is made on every completion, even when no other task is waiting.

**Ordering inside the controller.** A completion interrupt from the region is
served before the request FIFO. The finished task must first become DONE
before it can be replaced.

## A worked sequence

This is the run that `tb/tb_rtr_top.sv` plays first:

1. Software 1 writes a CORDIC angle. Nothing is loaded. The write is
   acknowledged after one controller cycle, `irq_block` pulses and the CORDIC
   starts loading.
2. Software 2 writes the DCT input address. The DCT becomes WAITING because the
   CORDIC is LOADING, and `irq_block` pulses again.
3. `cfg_done` arrives. The angle write is replayed into the CORDIC, then
   `irq_unblock` pulses.
4. Software 1 writes the CORDIC start register and the CORDIC finishes 17
   cycles later. The controller copies `done` and `cos`, marks the CORDIC
   UNLOADED, and starts loading the DCT. After that load, the held input
   address is replayed and `irq_unblock` pulses.
5. Software 1 reads `cos`. The CORDIC is no longer in the region, so the value
   comes from the read-back copy.
6. Software 2 sets the DCT output address, starts the DCT and polls `done`.

## Interfaces and timing

- **Host register bus (`s_*`).** `s_wr` or `s_rd` is held together with
  `s_addr`, `s_wdata` and `s_be` until a one-cycle `s_ack`. `s_rdata` is valid
  with `s_ack`. The master may start a new request in the cycle after `s_ack`.
  The controller acknowledges accesses it answers itself (held-back writes,
  reads from the read-back copy, unmapped addresses) one cycle after it sees
  them. Accesses passed to a task take the task's latency plus two cycles.
- **Interrupts.** `irq_block`, `irq_unblock` and `vh_irq[i]` are one-cycle
  pulses. An interrupt controller must latch them. The operating system keeps a
  FIFO of blocked software tasks. On `irq_unblock` it releases the oldest one.
  Requests are served in order, so that is the task whose VH task was just
  loaded. This pairing assumes each VH task is driven by one software task at
  a time. Only the first write to an unloaded task raises `irq_block`. A
  second software task writing to the same task while it is WAITING or
  LOADING would not be blocked, although its write is still held back and
  delivered in order.
- **Configuration port.** `cfg_start` pulses with `cfg_task` when a bitstream
  must be loaded. The external configuration controller answers with a
  one-cycle `cfg_done`. The region is switched off while loading.
- **Region register bus (`rq_*`/`rs_*`).** This uses the same handshake as the
  host bus, with a 2-bit register index instead of an address. The tasks
  answer one cycle after a request.
- **Memory master (`m_*`).** The DCT reads its samples and writes its results
  itself. It holds `m_req` (with `m_we`, `m_addr` and `m_wdata`) until a
  one-cycle `m_ack`, and read data is taken from `m_rdata` in the `m_ack`
  cycle. The controller passes the port through only while the region's task
  is RUNNING or DONE.
- **Reset.** `rst_n` is asynchronous and active low. All tasks start UNLOADED,
  the FIFOs start empty and the read-back copy starts at zero.

## The reconfigurable region model

On an FPGA the region is rewritten by a partial bitstream. `rcp_region` models
this as a switch, in the style of dynamic circuit switching:

- Both tasks are instantiated.
- The task selected by `cfg_sel` is connected while `cfg_active` is high.
- Every other task is held in reset and cut off from the register bus, the
  interrupt and the memory port.

As a result, a task that is loaded again always starts from reset, like a
fresh configuration, and a task that is not loaded cannot be seen at all. The
switch follows `cfg_sel` and `cfg_active` one cycle late, because the enables
are registered. For an ASIC or a simulation the module can be used as it is.
For a real partial-reconfiguration flow, replace it with the region wrapper
and its bus macros.

## The example tasks

**CORDIC (`cordic_vh`).**

- The angle is a 16-bit binary angle: `0x4000` is +π/2 and `0x8000` is −π.
- A quarter-turn pre-rotation first folds the angle into [−π/2, π/2].
- Then 16 rotation-mode micro-rotations run, one per clock, starting from
  x = 0.60725, so the CORDIC gain cancels out.
- Internally the residual angle keeps 4 guard bits: the arctangent table is
  round(atan(2⁻ⁱ)/π·2¹⁹). x and y are Q1.17 (gain constant 79594).
- The result is rounded to Q1.14 (16384 = 1.0) and sign-extended to 32 bits.
  Over the whole circle it is within 1.5 LSB of the exact cosine. Without the
  guard bits the error reached about 9 LSB.
- The result is ready 17 cycles after the start write is acknowledged. The
  unit has no multiplier.

**DCT (`dct_vh`).**

- It computes an orthonormal 8-point DCT-II:
  X[k] = s(k)·Σ x[n]·cos((2n+1)kπ/16), with s(0) = √(1/8) and s(k) = 1/2.
- Samples are signed 16-bit values in the low half of consecutive 32-bit
  words. Results are rounded, signed 32-bit words.
- The constants s(k)·cos(mπ/16) are held in Q1.14, built from nine values of
  8192·cos(mπ/16) by symmetry.
- Eight multiply-accumulate lanes (one per output k) update on every sample
  read: 8 multipliers in total.
- A run is 8 reads and then 8 writes. With a one-cycle memory this takes
  32 cycles.
- The rounding of the constants gives an error of at most
  2 + Σ|x[n]|/32768 LSB against an exact DCT.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `rtr_controller` | `NUM_VH` | 2 | number of tasks |
| | `NREG` | 4 | registers per task |
| | `WBUF_DEPTH` | 2 | held writes per task |
| | `VH_BASE` | `{0x2000, 0x1000}` | byte base address per task (task 0 in the low word) |
| | `RB_MASK` | `{4'b1000, 4'b1100}` | registers copied into the read-back copy, per task |
| `cordic_vh` | `ITER` | 16 | micro-rotations (at most 16) |
| `sync_fifo` | `WIDTH`, `DEPTH` | 8, 4 | set by the controller at each use |

The controller is generic in the number of tasks; its testbench runs it with
three. `rcp_region` and `rtr_top` are written for the two example tasks. To add
a task, instantiate it in the region, widen the selection, and extend
`VH_BASE` and `RB_MASK`.

## Choices made in this implementation

Several points are not fixed by the original approach. This RTL decides them
as follows:

- **Bus handshake.** The original design uses a subset of Xilinx IPIC signals
  between the adapter, the controller and the region. This RTL uses the simple
  request/acknowledge handshake described above.
- **Start register.** Any write starts a task. One description of the original
  design asks for a non-zero value, but its example driver code writes 0, so
  this RTL accepts both.
- **Reads of a LOADING task.** The original approach reads a LOADING task
  "from its own registers". Such a task has no valid registers yet, so here the
  read waits until the task is RUNNING.
- **Unblock timing.** `irq_unblock` is sent after the held writes have been
  replayed, not as soon as `cfg_done` arrives.
- **Configuration port.** It is a simple start/done handshake. The original
  design uses an external SystemACE controller.
- **Task internals.** The formats and internals of both tasks are this
  implementation's own: angle and result formats, DCT size, sample layout and
  memory protocol.
- **Not built.** Prefetching (loading a task before it is written) and several
  tasks sharing the region at once are not implemented, and neither is part of
  the original approach.

## Simulating

Every testbench checks its results itself and ends with a line
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/rtr_pkg.sv tb/tb_rtr_top.sv --top-module tb_rtr_top
./obj_dir/Vtb_rtr_top
```

Put the package first and replace `tb_rtr_top` with any of the testbenches:

| Testbench | What it checks |
|---|---|
| `tb_rtr_top` | Full system at default parameters. It runs the sequence above, a DCT re-run without reloading, a reload that replaces a DONE task, a full write buffer and an unmapped read. It counts every mechanism (block, unblock, waiting, replay, read-back copy, local read, read of a loading task, DONE→RUNNING, replacement, full buffer, pass-through) and fails if any of them never happened. CORDIC and DCT results are compared with `$cos` arithmetic. |
| `tb_rtr_workload` | The three-software-task scenario on `rtr_top`. A host model with a round-robin scheduler and a FIFO of blocked tasks drives the CORDIC and DCT with plain accelerator driver code. It handles `irq_block` and `irq_unblock` as the operating system's interrupt services would. It checks the results, that tasks are unblocked in order, that there are two reconfigurations, and the two-cycle miss handling. |
| `tb_rtr_stress` | The same host model run for 12 rounds of each accelerator. It uses random data, random time slices and random configuration delays, so the tasks keep displacing each other. Every result is checked. |
| `tb_rtr_controller` | The controller with three tasks and a stub region: FIFO order, replay order, the unblock after the replay, `RB_MASK`, gating of the master port, and no access to an inactive region. |
| `tb_rcp_region` | Isolation of unloaded tasks, switching between tasks, and reset of a reloaded task. |
| `tb_cordic_vh` | Cosine over all four quadrants (within 2 LSB), the 17-cycle latency and the interrupt. |
| `tb_dct_vh` | DCT against floating point, the 32-cycle run time, and random memory wait states. |
| `tb_sync_fifo`, `tb_readback_regfile` | The storage blocks, against reference models. |

The testbenches model the configuration controller as a fixed delay (300
cycles in `tb_rtr_top`). The system memory is modelled as a word array with one
cycle of latency.
