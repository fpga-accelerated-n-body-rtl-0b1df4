# All-pairs N-body accelerator: 2D gravity in single precision, 8 pairs per clock

This RTL advances a 2D system of N particles (10,000 by default) under their
mutual gravity, one time step after another. Every particle feels every other
particle, so a step costs N² pair interactions. The design keeps the whole
particle set on chip. Each clock cycle it evaluates BATCH = 8 pair
interactions in 8 identical lanes. A step of 10,000 particles therefore takes
12.5 million cycles: 62.5 ms at 200 MHz.

The architecture follows the report *FPGA Accelerated N-Body Simulations*, an
HLS (C++) design for the Xilinx Ultra96-V2 board. The report describes its
kernel at the level of loops, memories and HLS optimisations. It gives no
circuit, so the circuit-level choices here are new. The section
"Relation to the report" lists what comes from the report and what does not.

## One time step

Each step runs the report's *all-pairs* algorithm:

```
for each particle i:  a[i] = sum over j of  pair(i, j)      (force phase)
for each particle i:  v[i] += a[i]*dt ;  x[i] += v[i]*dt     (update phase)
```

`pair(i, j)` is zero when the pair is not "nearby": when i = j, or when the
squared distance is not below the run input `cutoff2`. If `cutoff2` is +inf,
every pair counts. Otherwise

```
a = G * m_j * (r_j - r_i) / (|r_j - r_i|^2 + eps^2)^(3/2)
```

`G`, `dt`, `eps^2` (`soft2`) and `cutoff2` are single-precision run inputs.
The design stores the acceleration rather than the force, so the update needs
no division by m_i. The update is semi-implicit Euler: the new velocity is
used to advance the position.

## Loop order: broadcast j, stream i

The sum is computed with the loops swapped:

```
for j in 0 .. N-1:                 outer: one particle j, read once
  for all lanes k in parallel:
    for i in lane k's particles:   inner: one pair per lane per cycle
      acc[i] += pair(i, j)
```

The particle memory is split into BATCH partitions of DEPTH = N/BATCH
records. Lane k owns particles k·DEPTH … k·DEPTH+DEPTH−1. Particle j is read
once and broadcast to all lanes. Each lane then streams its own DEPTH
particles past it, one per cycle.

This order matters for the accumulator. Consecutive additions in a lane go to
different particles i. So no addition ever waits for the previous one, and
the adder can sit at the end of a deep pipeline without stalling it. With the
other loop order (all j for one i), every addition would depend on the one
before. The report identifies the order and the batching as the source of its
speed-up.

While row j streams, particle j+1 is read through the memory's second port,
so rows follow each other without a gap. A force phase takes
`N * DEPTH + 12` cycles: 2 to fetch the first j, and 10 to drain the pipeline.

## The compute-force pipeline (`pair_force`)

Each lane has one 8-stage pipeline. It accepts a pair every cycle and never
stalls.

| stage | work |
|---|---|
| 1 | dx = x_j − x_i, dy = y_j − y_i, G·m_j |
| 2 | dx², dy² |
| 3 | r² = dx² + dy²; nearby test `i≠j && r² < cutoff2` |
| 4 | r² + eps² |
| 5 | sqrt |
| 6 | (r² + eps²)·sqrt(...) = r³ |
| 7 | G·m_j / r³ |
| 8 | × dx, × dy; forced to +0 if the pair is not nearby |

Each stage holds one single-precision operator, and each operator is
combinational. The divider (stage 7) and the square root (stage 5) are deep
logic. Before this can run at 200 MHz on an FPGA, those two stages must be
split into several pipeline stages. That change alters only the
`PAIR_LATENCY` constant in `nbody_pkg`, which every consumer follows.

## Accumulating without stalls (`force_lane`)

Each lane keeps a DEPTH × 64-bit acceleration buffer: ax and ay per particle.
The buffer is a dual-port RAM.

- **Read ahead.** Port A reads the entry of particle i PAIR_LATENCY − 1
  cycles after the pair entered. The old value therefore arrives in the same
  cycle as the pair's contribution.
- **Add and write.** The sum goes through two adders and is written on port B
  in that same cycle.
- **Ordering rule.** Two consecutive pairs must not target the same entry. The
  broadcast loop order guarantees this, and an assertion checks it.
- **Clearing.** Accelerations are never cleared explicitly. For the first j of
  a step, the contribution overwrites the entry instead of being added to it.
- **Update reads.** After the force phase, the update logic reads the finished
  accelerations through port A.

## Memories

| memory | per lane | total at defaults |
|---|---|---|
| particle partition (`bram_2p`, 160-bit words) | 1,250 × 160 b | 200 KB |
| acceleration buffer (`bram_2p`, 64-bit words) | 1,250 × 64 b | 80 KB |

A particle record (`particle_t`) packs, most significant first:
`x, y, vx, vy, m`. Each field is a 32-bit float.

The acceleration buffer is accessed on every cycle of the force phase. On an
FPGA it may be better mapped to LUT RAM than to block RAM.

Both memories have one cycle of read latency. Port A only reads; port B reads
or writes and is read-first. The particle partitions' ports are shared between
phases as follows:

| phase | port A | port B |
|---|---|---|
| load | – | DMA writes |
| force | stream of particle i | read of particle j (prefetch) |
| update | read particle i | write updated particle i |
| store | DMA reads | – |

## Load, store and the DRAM port (`dram_dma`)

A run starts with `start`. The kernel samples its inputs and then works
through these phases:

1. **Load.** It reads N records from DRAM word addresses `in_base …` into the
   partitions. Read requests go out back to back without waiting for data, so
   the DRAM read latency is paid once per load rather than once per particle.
2. **Steps.** It runs `num_steps` steps. After each step it stores all N
   records to `out_base + step·N …`, so each step's state is kept.
3. **Done.** `done` pulses once, after the last store.

The port is a plain valid/ready request channel plus an in-order read
response channel. One word is one 160-bit particle record:

| signal | dir | meaning |
|---|---|---|
| `mem_req_valid/ready` | out/in | request handshake |
| `mem_req_write` | out | 1 = write (posted, no response), 0 = read |
| `mem_req_addr` | out | word address |
| `mem_req_wdata` | out | record to write |
| `mem_rsp_valid`, `mem_rsp_data` | in | read data, in request order, cannot be refused |

The store is not pipelined: it takes 3 cycles per record, plus any cycles
waiting on `mem_req_ready`. That is about 0.2 % of a full-size step.

## Kernel interface (`nbody_kernel`)

Parameters: `N_PARTICLES` (10000) and `BATCH` (8). `N_PARTICLES` must be a
multiple of `BATCH`, with at least 2 particles per lane; an elaboration-time
assertion checks this.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `start` | in | 1 | pulse: sample the run inputs and start |
| `num_steps` | in | 32 | time steps (0: load only) |
| `in_base`, `out_base` | in | 32 | DRAM word addresses |
| `grav_g`, `dt`, `soft2`, `cutoff2` | in | 32 | float constants |
| `busy` | out | 1 | run in progress |
| `done` | out | 1 | pulse at the end of the run |
| `phase` | out | 3 | `phase_e`: idle, load, force, update, store |
| `step` | out | 32 | current step |
| `events` | out | 5 | `nbody_events_t` one-cycle pulses, for performance counters (below) |
| `mem_*` | | | DRAM port, above |

`events` carries one pulse per cycle for each of: prefetched particle
forwarded from the memory output (`pf_forward`), taken from the prefetch
register (`pf_register`), a self pair issued to a lane (`self_pair`), a
pair accumulated in any lane (`near_pair`) and a pair dropped by the cut-off
in any lane (`far_pair`). The last two are ORs over the lanes, so they count
cycles, not pairs. Leave it unconnected if not needed.

Cycles per step: `N·N/BATCH + 12` (force) + `N/BATCH + 4` (update) +
`3N + DRAM waits + 2` (store).

## Number format

All arithmetic is IEEE-754 binary32 with round-to-nearest-even. The units are
`fp_add`, `fp_mul`, `fp_div` and `fp_sqrt`, with shared helpers in
`fp32_pkg`. They are exact to the last bit for normal numbers, with these
limits:

- Subnormal inputs count as zero, and results that would be subnormal become
  zero.
- Infinities propagate.
- Every invalid operation returns the quiet NaN `0x7fc00000`.

Because the units are exact, the testbenches can check results bit for bit
against a reference that rounds double-precision results to single.

## Relation to the report

Taken from the report:

- the all-pairs algorithm with a nearby test
- single-precision floating point (the report tried fixed point first and
  dropped it)
- the swapped loop order with element-wise accumulation
- batches of 8 parallel compute-force units, each fed by its own block-RAM
  partition, with particle j broadcast
- partition k holding a contiguous block of particles
- 10,000 particles kept entirely on chip (the report quotes about 200 KB)
- dual-port block RAM
- DRAM holding the initial state and each step's results
- the ARM core launching the kernel

This design's own:

- the force law's softening term `eps²`
- the nearby test as a squared-distance cut-off
- storing acceleration instead of force
- the semi-implicit Euler update
- clearing the sums by overwriting on the first j
- the 8-stage split of the pipeline
- the prefetch of particle j
- the DRAM port protocol and word size
- the run-control inputs (the report's kernel is launched by software through
  vendor interfaces that are not modelled)
- reset behaviour

The ARM core, the LPDDR4 DRAM, the AXI links, the host PC and the web-based
display are outside this RTL. `tb/dram_model.sv` is a behavioural stand-in for
the DRAM.

## Verification

Every testbench checks itself and ends with a `TB_RESULT checks=… failures=…`
line.

| testbench | what it checks |
|---|---|
| `tb_fp_add`, `tb_fp_mul`, `tb_fp_div`, `tb_fp_sqrt` | 20,000 random operands plus special cases each, bit-exact against the correctly rounded reference |
| `tb_bram_2p` | random traffic on both ports with collisions; read latency, read-first |
| `tb_pair_force` | random pairs, self pairs, pairs beyond the cut-off; bit-exact results; latency exactly 8 |
| `tb_particle_update` | bit-exact update, 1-cycle latency |
| `tb_force_lane` | accumulation over 12 broadcast particles, stall-free rate, first-j clearing, nearby and cut-off pair counts |
| `tb_dram_dma` | partition placement on load; overlapped reads under 20-cycle latency and back-pressure; store addresses |
| `tb_nbody_kernel` | two kernels (16 particles in 8 lanes, 3 steps; 24 particles in 4 lanes, 2 steps); every record of every step; force-phase cycle count; every mechanism (see below) |
| `tb_nbody_full` | default size (10,000 particles, 8 lanes): one full step, all 10,000 records bit-exact; force phase 12,500,012 cycles |
| `tb_nbody_workloads` | 10 steps of 1,000 particles; 1,000 steps of 64 particles; one step of 40 particles at 1, 2, 4, 5 and 8 lanes |

`tb_nbody_kernel` (114 checks) counts the following through the `events`
port and the DRAM model and confirms that each happens at least once:

- the load, force, update and store phases
- both prefetch paths: forwarding from the memory output, and the register
- self pairs
- pairs excluded by the cut-off
- DRAM back-pressure

`tb_nbody_workloads` also computes an accuracy figure: 100 % minus the mean
relative x/y position error over all particles and steps, measured against a
double-precision run of the same algorithm. Results:

- 99.99999 % after 10 steps
- 93.0 % after 1,000 steps of a small, dense system

The run fails if either drops below 90 %.

The end-to-end tests run the DRAM model with 100 cycles of read latency
(500 ns at 200 MHz) and refuse a random quarter of requests.

## Simulating

All files use plain SystemVerilog-2017. The packages must come first. For
example, the kernel test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/fp32_pkg.sv rtl/nbody_pkg.sv tb/fp_ref_pkg.sv tb/nbody_ref_pkg.sv \
  tb/tb_nbody_kernel.sv --top-module tb_nbody_kernel -o sim
./obj_dir/sim
```

To run another test, replace the testbench file and the top module name.
Approximate run times:

| testbench | time |
|---|---|
| `tb_nbody_kernel` | about 15 s |
| `tb_nbody_workloads` | about 2.5 min |
| `tb_nbody_full` | about 2 min |

The reference model is in `tb/nbody_ref_pkg.sv`. It uses the same operation
order as the hardware, which is what makes bit-exact comparison possible.

## Files

- `rtl/nbody_pkg.sv`: particle and acceleration types, phases, `PAIR_LATENCY`.
- `rtl/fp32_pkg.sv`: floating-point helpers.
- `rtl/fp_add.sv`, `rtl/fp_mul.sv`, `rtl/fp_div.sv`, `rtl/fp_sqrt.sv`: the
  single-precision units.
- `rtl/bram_2p.sv`: dual-port memory (particle partitions and acceleration
  buffers).
- `rtl/pair_force.sv`: compute-force pipeline.
- `rtl/force_lane.sv`: one lane (pipeline plus accumulator).
- `rtl/particle_update.sv`: update unit.
- `rtl/dram_dma.sv`: load/store engine.
- `rtl/nbody_kernel.sv`: top level.
- `tb/`: testbenches, reference packages, `dram_model.sv`, and `nbody_env.sv`
  (the end-to-end environment).

## Known limits

- Division and square root are single-cycle combinational stages. They are
  correct, but not sized for a 200 MHz clock (see the pipeline section).
- Writes to DRAM are posted, and the port has no error response.
- There is no host register interface. The run inputs are plain ports.
- The store phase is not overlapped with the next step's computation.
