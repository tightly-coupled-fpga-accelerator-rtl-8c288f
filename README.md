# Fine-grained task scheduling fabric for an FPGA molecular-dynamics accelerator

A molecular-dynamics (MD) time step breaks into thousands of small tasks. These
include range-limited pair forces for one cell of particles, charge spreading
onto a grid, FFTs and long-range forces. Many of these tasks last only 1–10 µs.
A software scheduler on an embedded CPU costs about as much time per task as
the task itself. This design moves task distribution into the fabric.

- **Lock-free ready queue.** Tasks that are ready to run circulate on a
  single-direction bufferless ring. Each execution unit (EU) pulls its own
  tasks off the ring. No lock is taken anywhere, and the CPU never waits for an
  EU.
- **Distributed dependency tracking.** The task graph lives in on-chip memory
  as task records and data-version records. When an EU finishes a task, it
  updates the graph itself using atomic memory operations on a dedicated bus.
  The CPU only has to spot tasks whose dependency count has reached zero and
  inject them.

The RTL contains the whole programmable-logic side at full size:

- the ring with 73 EU cross stations and 2 CPU cross stations;
- 73 EU controllers with their dependency-update engines;
- 68 range-limited (RL) force units;
- the grid-mapping (charge-spreading) unit;
- the load sampler;
- the shared task-graph memory with its atomic bus.

The CPU software, the FFT units and the long-range-force units are not part of
the RTL. They connect through ports (see *Limits*).

## 1. Tasks, DataCtx versions and the task graph

The scheduling works on two kinds of record, both kept in the shared memory.
The record layouts are defined in `md_pkg`. All fields are 32-bit words.

```
task record at T        T+0 dependency counter     (number of inputs not yet produced)
                        T+1 kernel argument        (start address of the task's input data)
                        T+2 nin                    (number of DataCtx read)
                        T+3 nout                   (number of DataCtx written)
                        T+4 .. T+3+nin             pointers to read DataCtx records
                        then nout pointers         to written DataCtx records
DataCtx record at D     D+0 producer task pointer
                        D+1 data address
                        D+2 pending readers        (decremented as readers finish)
                        D+3 ncons                  (number of consumer tasks)
                        D+4 .. D+3+ncons           consumer task pointers
```

A DataCtx is one version of one block of data. A new version is a new record,
so a reader of the old version and the writer of the new one never conflict.
Only true (read-after-write) dependencies remain, and those are counted in the
dependency counter.

When a task completes, its EU runs `dep_update` (section 4). The engine does
two things:

- It decrements the pending-reader count of every DataCtx the task read. This
  releases that version.
- For every DataCtx the task wrote, it decrements the dependency counter of
  each consumer task.

A decrement that takes a counter from 1 to 0 raises `eu_task_ready` for one
cycle. The CPU-side dependency manager finds ready tasks either by polling the
counters over its own memory port or by using these pulses, and then injects
them into the ring.

## 2. The ring as a multi-producer, multi-consumer ready queue

### 2.1 Stations and flits

`bufferless_ring` chains `NUM_CPU` CPU stations and `NUM_EU` EU stations into
one clockwise loop. Each station holds exactly one flit (its ring slot), and
every flit moves one station per clock.

The loop order is: CPU 0, CPU 1, …, EU 0, EU 1, …, EU 72, and back to CPU 0.
Station IDs are:

- EU *i* has ID *i*;
- CPU station *c* has ID 73 + *c*.

A flit (`md_pkg::flit_t`, 42 bits) carries these fields:

| field | bits | meaning |
|---|---|---|
| valid | 1 | slot occupied |
| workload | 2 | workload tag: a rough cost class the CPU may use when choosing an EU |
| dst | 7 | destination station ID |
| itag | 1 | set once the flit has passed a CPU station |
| body | 32 | pointer to the task record |

### 2.2 EU cross station (`cs_eu`)

A flit addressed to this station is moved into the station's eject queue if
the queue has room. The EU then pops it from there.

If the queue is full, the flit simply stays on the ring and goes round again.
There is no buffer and no back-pressure. This is called *deflection* (the
`deflected` pulse).

### 2.3 CPU cross station (`cs_cpu`)

The CPU produces tasks as well as running some, so its station has both an
inject queue and an eject queue. Three rules apply.

1. **Traffic on the ring has priority.** An injected task enters only an empty
   slot, or a slot that has just been emptied by an eject. If a task is passing,
   injection waits, which shows as the `inj_stalled` pulse.
2. **The I-Tag.** A flit that passes a CPU station gets `itag = 1`. If a flit
   reaches a CPU station with `itag` already set, it has been right round the
   ring without its EU taking it, so the station ejects it to the CPU
   (`bounced`). The CPU software then picks another destination, or runs the
   task itself, and re-injects it with `itag` cleared.
   - Because of this rule, a task can circle at most about once.
   - A full eject queue at one EU therefore costs one lap, not a lost task.
3. **Own tasks.** A flit whose `dst` is the CPU station's own ID is ejected to
   the CPU like at an EU station. This is how the CPU takes on tasks that it
   runs itself.

### 2.4 Timing

A task pushed into an inject queue in cycle *t* can occupy the slot at *t*+1
and can be in the next station's eject queue at *t*+2. Each further station
adds one cycle. This two-cycle minimum is the queue's latency: the time from
"CPU decides" to "EU sees the task".

### 2.5 Load sampling (`load_sampler`)

Every `SAMPLE_PERIOD` = 1000 cycles, the sampler latches one bit per EU:
whether that EU's eject-queue occupancy is below `sample_thresh`. The result is
the `eu_below` bitmap, and `sample_tick` marks each update.

The CPU uses the bitmap as a hint when choosing destinations. It is deliberately
stale and unlocked: if the hint is wrong, the cost is a deflection or an I-Tag
bounce, not an error.

## 3. The atomic memory bus (`atomic_mem`)

All 73 EUs and both CPU ports (75 requesters) share one single-ported memory.
`MEM_DEPTH` is 65536 words of 32 bits.

**Protocol**

- A requester drives `req[i]` (valid, op, addr, wdata) and holds it until
  `gnt[i]` is high.
- One request is granted per cycle, chosen by round robin starting after the
  previous winner, so no requester can starve.
- The response arrives on `rsp[i]` one cycle after the grant. It carries the
  old value for reads and for the atomic operations.

**Operations**

| op | action |
|---|---|
| `MEM_READ` | read a word |
| `MEM_WRITE` | write a word |
| `MEM_DEC` | fetch-and-decrement: dependency counters and reader counts |
| `MEM_ADD` | fetch-and-add of wdata: charge grid accumulation |

Each operation finishes in its grant cycle on the only port. Nothing can come
between its read and its write, so fetch-and-op is atomic without locks.

This bus is separate from the ring, so task traffic and data traffic do not
compete.

## 4. Execution units

### 4.1 Controller (`eu_ctrl`) and dependency update (`dep_update`)

Per task, an EU controller:

1. pops the flit from its eject queue;
2. reads the kernel argument word (T+1) of the task record;
3. pulses `kern_start` with the argument and waits for `kern_done`;
4. runs `dep_update` on the record (section 1);
5. moves on to the next task and pulses `task_done`.

`dep_update` issues its accesses strictly one after another, two cycles each.
For a task with *nin* inputs, *nout* outputs and *c* consumers in total, it
makes 2 + 2·*nin* + 2·*nout* + 2·*c* accesses:

- 2 reads for the counts;
- a pointer read and a reader release per input;
- a pointer read and a consumer-count read per output;
- a pointer read and a counter decrement per consumer.

The update therefore takes twice that many cycles.
The exact count is checked by the testbench. The kernel and the controller
share the EU's single bus port; they never request at the same time.

### 4.2 Range-limited force units (EU 0–67: `rl_kernel` + `rl_pipeline`)

An RL task computes the total short-range force on one particle from its
neighbour list. Its argument *A* points at:

```
A+0 N (neighbours)   A+1 box edge   A+2 cutoff^2   A+3..5 particle position
A+6+6k .. A+11+6k    neighbour k: x, y, z, sigma^2, eps/sigma^2, kq
A+6+6N .. A+8+6N     result: force x, y, z (written by the kernel)
```

The kernel fetches each neighbour word by word and issues the pair to the
pipeline. It sums the results as they arrive, overlapping the next fetch, and
writes the three sums back.

`rl_pipeline` evaluates, for each pair, Lennard-Jones plus the short-range
Coulomb term:

    F = [ eps/sigma^2 · (48 (sigma/r)^14 − 24 (sigma/r)^8) + kq / r^3 ] · d,   d = r_i − r_j

The force is zero beyond the cutoff, and *d* is folded to the nearest periodic
image (box = 0 disables the fold).

**How it avoids a divider.** The pipeline computes only 1/r, from r²:

1. normalise r² by an even shift;
2. look up a 64-entry seed table, which is computed at elaboration from an
   integer square root;
3. apply two Newton steps, y ← y(3 − m·y²)/2.

All other powers follow by multiplication.

**Timing and formats**

- One pair per cycle, latency 9 cycles, no back-pressure.
- Number formats:

| value | format |
|---|---|
| positions, box, force | Q16.16 signed |
| cutoff² | Q16.16 |
| sigma² and eps/sigma² | Q8.24 |
| kq = q_i·q_j/(4π·eps0) | Q16.16 signed |

- Pairs closer than 0.125 units are discarded.
- Results are accurate to about 1e-4 relative while sigma/r ≤ 8.
- Force sums wrap at 32 bits.

### 4.3 Grid mapping (EU 68: `gm_kernel` + `grid_mapping`)

For the long-range Coulomb part, each particle's charge Q is spread onto the
3×3×3 surrounding points of a periodic grid. Each point receives
Q·φx·φy·φz, where φ is the quadratic (third-order) B-spline of the distance in
grid units.

With u = x/h, v = u − ½, b = floor(v) and t = v − b, the grid points b, b+1
and b+2 get these weights:

    w0 = (1 − t)² / 2      w2 = t² / 2      w1 = 1 − w0 − w2  (= ¾ − (t − ½)²)

Computing w1 as 1 − w0 − w2 makes the weights sum to exactly one, so charge is
conserved up to the final rounding.

**`grid_mapping`**

- Accepts one particle (position and charge in Q16.16, and 1/h in Q16.16).
- Emits its 27 contributions (x, y and z grid index, plus a Q16.16 value), one
  per cycle, with z varying fastest.
- Uses a valid/ready handshake, so a continuous stream runs at 27 cycles per
  particle.
- Grid indices wrap modulo 2^`GRID_BITS`.

**`gm_kernel`**

Its argument *A* points at:

```
A+0 N   A+1 1/h   A+2 grid base G   A+3+4k .. A+6+4k  particle k: x, y, z, Q
```

Grid point (ix, iy, iz) is the word G + ix·2^(2·GRID_BITS) + iy·2^GRID_BITS +
iz. Every contribution is deposited with `MEM_ADD`. The accumulation is
therefore atomic, and other requesters can add to the same grid at the same
time.

**Sizes.** In the top, the grid is 32³ (`GRID_BITS` = 5) and takes the upper
half of the shared memory. The testbench places it at word 32768.

### 4.4 The remaining EUs (69–72)

These are three FFT/IFFT units and one long-range-force unit. Their controllers
are built and their stations sit on the ring. Their kernels are not built:
`kern_start`, `kern_task`, `kern_arg` and `kern_done` for index *e* − 69 are
top-level ports, so an external kernel can be attached.

## 5. Top level (`md_accel_top`)

**Parameters** (defaults are the full design):

| parameter | default | meaning |
|---|---|---|
| NUM_EU | 73 | EUs on the ring (68 RL + 1 grid mapping + 3 FFT/IFFT + 1 LR force) |
| NUM_RL | 68 | the first NUM_RL EUs get an RL kernel; EU NUM_RL gets the grid-mapping kernel |
| NUM_CPU | 2 | CPU cross stations |
| EJ_DEPTH, INJ_DEPTH | 8, 8 | eject and inject queue depths |
| MEM_DEPTH | 65536 | task-graph and data memory, 32-bit words |
| GRID_BITS | 5 | charge grid is 2^GRID_BITS points per edge |
| SAMPLE_PERIOD | 1000 | cycles between load samples |

**Ports**

- **Per CPU *c*:**
  - the inject queue (`cpu_inj_push`, `cpu_inj_task`, `cpu_inj_full`);
  - the eject queue (`cpu_ej_pop`, `cpu_ej_task`, `cpu_ej_valid`; first-word
    fall-through);
  - a memory-bus port `cpu_mem_req`/`gnt`/`rsp`, which is requester 73 + *c*.
- **Load sampling:** `sample_thresh`, `eu_below`, `sample_tick`.
- **External kernels:** the handshakes of the four external kernels (section
  4.4).
- **Status:**
  - `eu_task_done` and `eu_task_ready` per EU;
  - the event pulses `ev_injected`, `ev_inj_stall` and `ev_bounced` per CPU;
  - `ev_ejected` and `ev_deflected` per EU.

**What the CPU software must do**

1. Write the task and DataCtx records and each kernel's input data through its
   memory port.
2. Inject each task whose dependency counter is zero, with its chosen
   destination, workload tag and `itag = 0`.
3. Watch its eject queue:
   - a flit with `itag` set is a bounce, to be retargeted;
   - a flit addressed to the CPU's own ID is a task it runs itself. When it
     finishes, it releases the task's inputs with `MEM_DEC`, as an EU would.

Reset is asynchronous and active low (`rst_n`). The memory contents are not
reset.

## 6. Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_sync_fifo` | random push/pop against a queue model |
| `tb_cs_eu`, `tb_cs_cpu` | eject, deflect, I-Tag set/bounce, inject priority, the 2-cycle latency |
| `tb_bufferless_ring` | 600 tasks from both CPUs each delivered exactly once; per-station latency; deflections, bounces, inject stalls |
| `tb_load_sampler` | the bitmap against a model, and the 1000-cycle period |
| `tb_atomic_mem` | round-robin order, one grant per cycle, responses against a memory model, exact result of 800 concurrent decrements |
| `tb_dep_update` | the example graph and 30 random graphs: final counters, ready pulses, exact cycle counts |
| `tb_eu_ctrl` | a 10-task chain through one EU with a modelled kernel |
| `tb_rl_pipeline` | random pairs against a real-number reference (1e-4 relative), latency 9, cutoff, periodic fold |
| `tb_rl_kernel` | 20 particles with 0–8 neighbours through memory |
| `tb_grid_mapping` | 800 particles against a real-number B-spline reference, grid indices and order, charge conservation, 27 cycles/particle under back-pressure |
| `tb_gm_kernel` | 12 tasks depositing into an 8³ grid while the bench adds to the same grid concurrently |
| `tb_md_accel_top` | the whole design at default parameters (see below) |
| `tb_md_workload` | one production-density tile at default parameters: 17 particles with 305 neighbours each (9 Å cutoff, 0.1 atoms/Å³), forces against the reference, run time against the bus bound |

**End-to-end run (`tb_md_accel_top`).** Two CPU models act as the software
dependency manager for a 220-task graph:

- 146 RL force tasks (1–4 neighbours each, checked against a real-number
  reference);
- 8 grid-mapping tasks (every touched grid point checked);
- 65 reduction tasks on the external-kernel EUs (modelled in the bench);
- a final task that a CPU runs itself.

CPU 0 deliberately sends its first 24 RL tasks to EU 0 to force deflections and
I-Tag bounces. The run fails if any of these mechanisms never happens:

- ejection;
- deflection;
- bounce;
- inject stall;
- sampling tick;
- ready pulse;
- bus contention;
- grid deposit;
- CPU-run task.

It also checks that every dependency counter and reader count ends at zero.

**Running a testbench with plain Verilator**, for example:

```
verilator --binary --timing --assert -Irtl rtl/md_pkg.sv $(ls rtl/*.sv | grep -v md_pkg) \
          tb/tb_md_accel_top.sv --top-module tb_md_accel_top -o sim
obj_dir/sim +verilator+rand+reset+2
```

The package goes first because the other files import it. The full-size run
takes about half a minute to compile and about a second to simulate. For a
single block, list only that block's files, for example:

```
rtl/md_pkg.sv rtl/atomic_mem.sv rtl/grid_mapping.sv rtl/gm_kernel.sv tb/tb_gm_kernel.sv
```

## 7. Where this design follows its source and where it chooses

**Taken from the architecture description**

- the single-direction bufferless ring as the ready queue;
- CPU stations with inject and eject queues, and EU stations with an eject
  queue only;
- the I-Tag rule and the return of undeliverable tasks to the CPU;
- the 2-bit workload tag and the destination tag in the flit;
- sampling every 1000 cycles against a threshold;
- a separate bus for atomic memory access;
- EUs updating dependency counters when a task completes;
- DataCtx versioning;
- the unit counts (68 RL, 1 grid mapping, 3 FFT/IFFT, 1 LR force);
- two CPU stations;
- the LJ and Coulomb force formulas;
- the third-order spreading;
- the 9 Å cutoff used in the tests.

**This design's own choices**

- All widths and fixed-point formats. The arithmetic is fixed point throughout.
- Queue depths (8), the memory size (64 Ki words) and the grid size (32³).
- The record layouts and the bus protocol.
- The operation set (read, write, fetch-and-decrement, fetch-and-add).
- Deflection as the response to a full eject queue.
- The EU order on the ring.
- The reciprocal-square-root method.
- The word-serial kernel fetch, with no particle cache.
- The reading of "release the DataCtx" as a pending-reader count.

**Limits**

- **The memory bus limits compute throughput.** Every kernel fetches its
  operands word by word over the one shared bus. That bus moves one word per
  cycle, and a pair needs six words, so the whole fabric sustains at most one
  pair every six cycles, however many RL units are busy. `tb_md_workload`
  measures 5185 pairs in 31324 cycles, or 0.166 pairs per cycle. The 68
  pipelines could take 68 pairs per cycle, so a production build needs a
  private operand path per unit, for example a local particle cache filled by
  DMA. The scheduling fabric itself does not change.

- Particle data and the task graph for a real protein do not fit in on-chip
  memory. A 4779-atom system needs on the order of 9 M words of neighbour data
  per step. The intended system keeps bulk data in external DDR, which is not
  modelled here, so a full run must stream tiles through the shared memory.
- The 32³ grid covers boxes up to about 40 Å at 1.25 Å spacing. Larger systems
  need `GRID_BITS` = 6 and a larger `MEM_DEPTH`.
- FFT/IFFT and the long-range-force kernels are not implemented. Their
  algorithms, sizes and precision are not specified, and the system runs FFTs
  on the CPU.
- The CPU, its software and its AXI link are outside the RTL and are modelled
  only in the testbench.
