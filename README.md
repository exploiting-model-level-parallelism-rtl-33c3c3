# Dual-core LSTM-RNN inference accelerator

A single large LSTM accelerator can only serve one job at a time, and a small
model leaves much of it idle. This design splits the compute into two
identical LSTM cores that share one main-memory bus. A scheduler can then use
the two cores in three ways:

- **multi-programming (MP)**: two independent jobs, one per core. This gives
  throughput, not latency.
- **multi-threading (MT)**: one multi-layer job. Its logical timesteps become
  threads that alternate between the cores. A core moves up through the layers
  of its own timestep while the other core works one timestep behind.
- **helper-core**: one job, split inside each layer. Core 0, the helper,
  computes the input products `W_x * x_t` one time slot ahead, for several
  timesteps at once. Core 1, the main core, adds the recurrent products
  `W_h * h_{t-1}`, applies the activations and does the element-wise update.

The arithmetic is Q8.8 fixed point throughout. The RTL is synthesizable
SystemVerilog (IEEE 1800-2017). A behavioural main-memory model and
self-checking testbenches come with it.

## Block overview

```
 host link ──► system_manager ──┐ (registers: mode, jobs, start, status, counters)
   (PCIe)           │           ▼
                    │      mode_scheduler ──► core_task_runner x2
                    │           │ commands          │
                    │           ▼                   ▼
                    │      lstm_core 0         lstm_core 1      (each: onchip_buffer x2,
                    │           │                   │            4 MAC lanes, lstm_elementwise)
                    ▼           ▼                   ▼
                 mem_bus_arbiter (round robin, 3 masters) ──► memory controller port
                                         perf_profiler  ◄── busy flags of both cores
```

| file | role |
|---|---|
| `rtl/lstm_pkg.sv` | shared types: Q8.8, bus structs, core command, job/layer descriptors, modes, profiler states |
| `rtl/lstm_dual_core_top.sv` | top level: wires the blocks below |
| `rtl/lstm_core.sv` | one LSTM core |
| `rtl/lstm_elementwise.sv` | gate activations and the `c_t`, `h_t` update of one row |
| `rtl/lstm_act.sv` | piecewise-linear sigmoid / tanh |
| `rtl/onchip_buffer.sv` | dual-port block RAM for the input vectors |
| `rtl/mode_scheduler.sv` | MP / MT / helper-core scheduling, time slots, barrier |
| `rtl/core_task_runner.sv` | turns one scheduled task into core commands and addresses |
| `rtl/mem_bus_arbiter.sv` | shares the memory port between the cores and the system manager |
| `rtl/perf_profiler.sv` | per-core cycle counters for compute / memory / both / neither |
| `rtl/system_manager.sv` | host port: memory access and control registers |

## The three computing modes

The scheduler works on **tasks**. A task is one layer of one job over one or
more timesteps. It reads the job descriptions that the host wrote into the
system manager.

### Multi-programming

Job 0 runs on core 0 and job 1 on core 1. Each core works through its own job:
layer by layer, and inside a layer timestep by timestep. There are no time
slots and the cores never wait for each other. They meet only on the memory
bus. There, round-robin arbitration makes one core wait while the other is
served. This is why MP gains least on memory-bound models. A job with
`nlayers = 0` leaves its core idle. That is also how to run a single job on a
single core.

### Multi-threading

Timestep `t` of the job (all of its layers) is thread `t+1`. Odd threads go to
core 0 and even threads to core 1. Work proceeds in **time slots**. At the
start of a slot, each core looks at its next step (layer `l` of its current
thread) and runs it only if both inputs are final:

- `h`/`c` of the same layer one timestep earlier (done by the other core);
- `h` of the layer below in the same timestep (done by this core in an
  earlier slot).

If a step is not ready, the core idles for that slot; these are counted as
*idle slots*. A slot ends only when both cores have finished; this is the
*barrier*. After the top layer, a core jumps to the first layer of its next
thread. For 3 layers and 3 timesteps this gives the following schedule, which
`tb_mode_scheduler` checks entry by entry:

| slot | core 0 | core 1 |
|---|---|---|
| 1 | L1 of thread 1 | idle (needs L1 of thread 1) |
| 2 | L2 of thread 1 | L1 of thread 2 |
| 3 | L3 of thread 1 | L2 of thread 2 |
| 4 | L1 of thread 3 | L3 of thread 2 |
| 5 | L2 of thread 3 | no work left |
| 6 | L3 of thread 3 | no work left |

Readiness is computed from one counter per layer, `hdone[l]`. It holds the
number of timesteps of layer `l` whose outputs are final. Step `(l, t)` is
ready when `hdone[l] == t` and, for `l > 0`, when `hdone[l-1] > t`. The
counters change only at the end of a slot, so decisions inside a slot never
see a half-finished step.

### Helper-core

The products with `x_t` do not depend on the recurrence, so they can be
computed ahead of time. The timesteps of a layer are cut into groups of
`reuse` timesteps. The evaluated configuration uses 4.

- The helper (core 0) runs one **x-part** pass per group. It computes
  `p = W_x * x_t` for all timesteps and batch entries of the group, reading
  each weight word only once. It writes the partial sums to memory.
- The main core (core 1) runs an **h-part** pass for each timestep of the
  group, in order. Each pass computes `b + p + W_h * h_{t-1}`, the
  activations, and `c_t`, `h_t`.

The helper works on group `g+1` while the main core finishes group `g`. The
slot barrier keeps the two in step. The helper then moves on to the groups of
the next layer. A group there may start only after the main core has produced
the `h` values it uses as input (`hdone[l-1] >= last timestep of the group`).
Otherwise the helper idles for that slot. The first and last slot of a job,
and any such wait, leave one core idle. The mode's main loss is the gap at the
barrier: the main core carries the element-wise work, so the two cores rarely
finish a slot together.

Example (1 layer, 4 timesteps, `reuse` = 2): slot 1, helper does x-part of
steps 1-2 and the main core is idle. Slot 2, helper does steps 3-4 and main
does h-part of steps 1-2. Slot 3, main does steps 3-4.

## The LSTM core

A core executes **commands** (`core_cmd_t`). A command is a pass over all `M`
rows of one layer for `nvec` vectors that share that layer's weights: the
batch entries and, in an x-part pass, several timesteps. The operations are:

| op | accumulator start | products | result written |
|---|---|---|---|
| `OP_FULL` | bias | `W_x*x + W_h*h_{t-1}` | `c_t`, `h_t` |
| `OP_XPART` | 0 | `W_x*x` | partial sums `p` (4 gates per word) |
| `OP_HPART` | bias + `p` | `W_h*h_{t-1}` | `c_t`, `h_t` |

A command runs in this order:

1. Copy the `x` vectors and/or `h_{t-1}` vectors from memory into two on-chip
   buffers (`VMAX*NMAX` and `VMAX*MMAX` Q8.8 entries).
2. For each row `r`:
   1. Read the bias word (and, for h-part, the partial-sum word per vector)
      and start the accumulators.
   2. Stream the row's weight words, first the `W_x` part and then the `W_h`
      part. One 64-bit word holds the weights of all four gates for one
      (row, column). Four MAC lanes, one per gate, apply it to one vector per
      cycle, so every weight word is used `nvec` times. The next weight word
      is fetched while the lanes work on the current one.
   3. For each vector: read `c_{t-1}[r]`, then pass the four pre-activations
      through `lstm_elementwise`:
      `i,f,o = sigma(.)`, `g = tanh(.)`, `c_t = f*c_{t-1} + i*g`,
      `h_t = o*tanh(c_t)`. Write `c_t[r]` and `h_t[r]`.
3. `done` pulses after the last write has been granted.

Fixed-point rules: products are Q16.16. They accumulate in 32 bits. They are
truncated (floor) and saturated back to Q8.8 before an activation and after
each element-wise multiply. The activations are piecewise-linear with
power-of-two slopes: sigmoid has breakpoints at 1, 2.375 and 5, and
`tanh(x) = 2*sigmoid(2x) - 1`. The worst error is about 0.02 for sigmoid and
0.04 for tanh. In helper mode, the partial sums are also rounded to Q8.8. So
helper-mode results can differ from a full pass in the last bit.

## Main-memory layout and bus

A memory word is 64 bits. Gate data is packed `{c~, o, f, i}` from the top
lane down, and a vector element uses the low 16 bits. For layer `l` with input
size `N`, size `M`, batch `B`:

| data | address of element |
|---|---|
| `W_x` | `wx_base + r*N + k` |
| `W_h` | `wh_base + r*M + k` |
| bias | `b_base + r` |
| input `x[t][b]` | `in_base + (t*B + b)*N + k` |
| `h`, `c` of timestep `t` | `h_base/c_base + ((t+1)*B + b)*M + r` (slot 0 = initial state) |
| partial sums | `p_base + (t*B + b)*M + r` |

Two layers chain when `in_base` of layer `l+1` is `h_base(l) + B*M(l)`.

Bus rules (`mem_req_t` / `mem_rsp_t`):

- A master holds `req`, `we`, `addr` and `wdata` until `gnt`.
- Read data returns in order on `rvalid`/`rdata` one or more cycles later.
- The arbiter lets only one read be outstanding in the whole system, so a
  reply needs no tag. Writes do not wait.

The top's `mem_req`/`mem_rsp` port is where a memory controller (DDR3) would
attach.

## Host port and registers

The host issues word requests (`host_valid/ready/we/addr/wdata`). Reads return
on `host_rvalid/host_rdata`. Address bit 31 = 0 selects main memory. Bit
31 = 1 selects a register (index in bits 11:0):

| index | register |
|---|---|
| `0x000` | write: bit 0 start, bits 2:1 mode (0 MP, 1 MT, 2 helper). Read: bit 0 busy, bit 1 done (sticky), bits 3:2 mode |
| `0x010 + 0x40*j` | job `j`: +0 nlayers (0-4), +1 T, +2 batch B, +3 reuse |
| `0x018 + 0x40*j + 9*l + f` | layer `l` field `f`: n, m, wx, wh, b, in, h, c, p base |
| `0x100 + 4*c + s` | profiler cycles of core `c` in state `s` (0 compute only, 1 both, 2 memory only, 3 neither) |
| `0x110` | profiled cycles in total |
| `0x120`-`0x124` | slots; idle slots of core 0 and 1; barrier-wait cycles of core 0 and 1 |

A run works like this:

1. Load the model and inputs into memory.
2. Write the job registers.
3. Write start together with the mode.
4. Poll until `busy` falls (or wait for the `done` output).
5. Read `h` back.

Starting clears the profiler, which counts while the accelerator is busy. The
top also brings out each core's profiler state and the bus-wait flags as
debug probes.

## How far it follows the original design, and where it does not

Taken from the original design:

- two cores on one shared memory bus;
- the three modes;
- odd/even thread assignment;
- time slots with a barrier;
- the helper running one slot ahead on `W_x*x_t`;
- weight reuse across batch entries and helper timesteps (batch 32 and
  `reuse` 4 in its evaluation);
- the LSTM data flow;
- Q8.8 data;
- a system manager that loads main memory for the host;
- a four-state profiler.

The original does not describe the core's internals, the bus, the instruction
format or the activation circuits. Everything in those parts is this design's
own choice:

- **Core organisation**: four MAC lanes (one per gate), one vector per cycle,
  with one weight word prefetched. A real implementation would use many more
  MACs and wide memory bursts.
- **Memory traffic**: one 64-bit word per access and one read in flight.
  Because of this, the cores here are memory-bound on every model, and
  multi-programming gains little. The speed-up ratios of the original (up to
  about 2x) should not be expected from this RTL.
- **`c_{t-1}` in memory**: `c_{t-1}` is read from memory for each row. The
  original keeps the element-wise operands on chip. Here the state has to move
  between the cores in multi-threading mode.
- **Control**: instead of an instruction stream produced offline, the host
  writes job descriptions into registers.
- **Activations**: piecewise-linear curves; the original's are unspecified.
- **Helper mode with several layers**: it chains the layers through one
  helper/main pipeline. The dependency rules are the scheduler's own.
- **Two cores only**: the scheduler is written for two cores. The original
  notes that the scheme extends to more.

The DDR3 memory, its controller and the PCIe link are vendor parts and are
not included. `tb/mem_model.sv` stands in for memory and controller in
simulation.

## Sizes and what fits

Defaults: `NMAX = MMAX = 1024`, `VMAX = 128`, up to 4 layers per job. That
covers the largest evaluated layer (1024 inputs, 1024 cells). It also covers
batch 32 times 4 timesteps per helper pass. Each core's two vector buffers
hold 2 x 131072 x 16 bits (4 Mbit). The 128 x 4 accumulators are registers.

| model | layers | input | layer | fits |
|---|---|---|---|---|
| IMDB | 1 | 128 | 128 | yes |
| LRCN | 1 | 320 | 256 | yes |
| Show & Tell | 1 | 512 | 512 | yes |
| Shakespeare-2 | 2 | 65 | 128 | yes |
| CTC-3L-421-UNI | 3 | 121 | 421 | yes |
| Translation | 3 | 1024 | 1024 | yes (x buffer exactly full in helper mode) |

Weights live in main memory. Translation needs about 48 MiB of them
(2M 64-bit words per layer).

Cycle counts from `tb_workloads` (memory latency 4 cycles, no stalls).
These are short sequences, so the single-core equivalent is not shown:

| model (T x B) | MP, two copies | MT | helper |
|---|---|---|---|
| IMDB (3 x 2) | 1.01 M | - | 0.48 M |
| LRCN (3 x 2) | 4.48 M | - | 2.04 M |
| Show & Tell (3 x 2) | 15.8 M | - | 7.43 M |
| Shakespeare-2 (3 x 2) | - | 0.96 M | 0.84 M |
| CTC-3L-421-UNI (3 x 2) | - | 15.4 M | 13.1 M |
| Translation (2 x 1) | - | - | 56.8 M |

## Simulation

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and finishes. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/lstm_pkg.sv tb/lstm_ref_pkg.sv tb/tb_lstm_dual_core_top.sv \
    --top-module tb_lstm_dual_core_top
./obj_dir/Vtb_lstm_dual_core_top
```

| testbench | what it shows |
|---|---|
| `tb_lstm_dual_core_top` | all three modes end to end at reduced buffer sizes, through the host port, against an integer reference model. It also requires that idle slots, barrier waits, all four profiler states, bus contention and memory back-pressure each occur. |
| `tb_lstm_dual_core_full` | the same at default sizes |
| `tb_workloads` | the six model geometries above at default sizes (about 2 minutes) |
| `tb_mode_scheduler` | exact MT and helper schedules, MP concurrency |
| `tb_lstm_core` | full, x-part and h-part passes; reads per pass, which proves the weight reuse |
| `tb_lstm_elementwise`, `tb_lstm_act` | cell arithmetic; activation error against the exact functions |
| `tb_mem_bus_arbiter`, `tb_system_manager`, `tb_perf_profiler`, `tb_onchip_buffer` | block-level behaviour |

The reference arithmetic is in `tb/lstm_ref_pkg.sv`. It is written in plain
integers, separately from the RTL.

## Changing it

- Buffer sizes are the top's parameters. `VMAX` must be at least
  `B * reuse` for helper mode and at least `B` for the other modes.
- The layer limit is `LMAX` in `lstm_pkg`.
- The activation curve is confined to `lstm_act.sv`.
- The gate order in a memory word is set by the `G_*` constants.
- To make the core faster, change only its weight stream and MAC array. The
  command interface, and with it the scheduler, can stay as it is.
