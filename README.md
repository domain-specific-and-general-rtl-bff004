# Three FPGA accelerators: sphere collisions, gene-network attractors, and a memory-based vector processor

This repository has synthesizable SystemVerilog for three accelerators. They come from one line of work on CPU–FPGA co-processing.

- **Sphere collision detection.** Each step of a physics simulation produces candidate pairs of touching spheres. An accelerator function unit (AFU) takes those pairs and computes the full contact for each one: contact point, normal and penetration depth. It works on 16 pairs in parallel, in single-precision floating point. It exchanges data with the host only through buffers in shared memory.
- **Boolean gene regulatory network (GRN) attractors.** For every initial state of a small Boolean network, the accelerator finds how many steps the trajectory takes to reach its cycle (the *transient*) and how long that cycle is (the *attractor*). It uses the constant-memory tortoise-and-hare method, with one network copy stepping once and another stepping twice per clock.
- **A vector processor whose instructions address memory, not registers.** Vector instructions carry three scalar values: the scratchpad byte addresses of the destination and of the two sources. A DMA engine moves data between main memory and the scratchpad while the vector pipeline computes. Vectors can start at any byte address and can be any length that fits. This removes vector loads and stores, register spilling and loop unrolling for prefetching.

The three designs share nothing. `platform_top` instantiates them side by side on one clock and reset. Each design keeps its own prefixed ports (`cd_*`, `grn_*`, `vm_*`), and those ports are where the host CPU, the shared-memory link and DRAM connect. None of those three is part of this RTL.

---

## 1. Sphere collision AFU (`cd_afu`)

### Data in shared memory

Addresses are in 512-bit lines. The layout is this design's own.

| Buffer | Line | Contents |
|---|---|---|
| source | 0 | header: `num_spheres` in bits [15:0], `num_collisions` in [31:16] |
| source | 1 … | spheres, four per line; each is 128 bits `{r, z, y, x}` as fp32, x in the low word |
| source | after the spheres | collision lines: 16 pairs per line; pair *p* has sphere index *a* in bits `[32p +: 16]` and *b* in `[32p+16 +: 16]` |
| destination | 0 | status line `{num_collisions, 32'd1}`, written last; the host polls it |
| destination | 1 + c/2 | result *c* in half `c % 2`: a 256-bit `contact_t` |

A `contact_t` holds, from the low word up: `px, py, pz` (contact position), `nx, ny, nz` (unit normal) and `depth`. Above those is a word whose low two bits give the type: 0 = fake (no contact), 1 = grazing (coincident centres), 2 = real.

### One simulation step (`puc`)

The host writes the source buffer and pulses `start`. The Processing Units Controller then works through the step in phases.

1. **Collect.** It reads the header, then every sphere line and collision line. It keeps several line reads in flight, so the memory latency overlaps. The data is stored in the on-chip *Virtual World Info RAM Block* (`vwirb`). That block has four sphere banks, so one 512-bit line is written per clock, and a separate collision-line RAM.
2. **Replicate.** It reads each sphere from the VWIRB once and broadcasts it into the local RAM of every SCPU (`sphere_local_ram`) at the same clock. That is one sphere per clock for the whole world.
3. **Dispatch.** For each collision line, every SCPU reads its two spheres from its own local RAM. Because the RAMs are private, all 16 reads happen in the same cycle. The SCPUs then start together, and the controller waits until the active ones are done.
4. **Write back.** The 16 contacts go out as 8 destination lines. After the last collision line, the status line is written and `done` rises.

`perf_mem_cycles` counts the cycles spent moving data to and from shared memory. `perf_proc_cycles` counts replication and processing. Together they show the balance between communication and computation, which is what limits this kind of fine-grained accelerator.

Capacity at the defaults:
- `SPHERES = 4096` spheres, in the VWIRB and in each of the 16 local copies.
- `CLINES = 512` collision lines, which is 8 192 pairs per step.

### The SCPU datapath (`scpu`)

For spheres (p1, r1) and (p2, r2), each SCPU carries out the standard narrow-phase sphere–sphere test. It is split into five dependent stages, and the operations inside each stage run in parallel.

| Stage | Computes |
|---|---|
| 1 | `psub = p1 − p2`; `d = sqrt(dx² + dy² + dz²)`; `rsum = r1 + r2`; `rsub = r2 − r1` |
| 2 | `1/d`; the fake test `d > rsum`; `depth = rsum − d`; `rsub − d` |
| 3 | `normal = psub · (1/d)`; `k = 0.5 · (rsub − d)` |
| 4 | `normal · k` |
| 5 | `pos = p1 + normal · k` |

The outcome depends on d:
- **Fake.** If `d > rsum`, the unit stops after stage 2 and returns type 0 with zero fields.
- **Grazing.** If `d ≤ 0`, it returns `pos = p1`, `normal = (1,0,0)` and `depth = rsum`.

Five adders and four multipliers are shared between the stages. They are combinational and round to nearest-even, with denormals flushed to zero. The square root (`fp32_sqrt`) and the reciprocal (`fp32_recip`) are sequential: each produces one result bit per clock using the restoring method, and rounds half-up.

From the `start` cycle to the `done` cycle, latency is:
- **33 clocks** for a fake or grazing pair;
- **63 clocks** for a real contact.

The SCPU is not pipelined across pairs: one pair is in flight per SCPU, and parallelism comes from the 16 copies.

---

## 2. GRN attractor accelerator (`grn_accel`)

### The network

`grn_network` is the combinational update function of the four-gene example network. State bits are `v1 v2 v3 v4`, with v1 as the most significant bit. The update rules are:

```
v1' = v2 xor v3    v2' = v1 or v4    v3' = v1 and v4    v4' = v3
```

Starting from 0010, it gives the trajectory 0010 → 1001 → 0110 → 0001 → 0100 → 1000 → 0100 → … To use another network, rewrite this one function and `N_GENES` in `grn_pkg`.

### Processing element (`grn_pe`)

Each PE holds three copies of the function: N1 steps once per clock, and N2 steps twice (two copies chained). It runs three phases:

| Phase | What happens | Clocks |
|---|---|---|
| FIND | N1 takes one step and N2 takes two per clock, until they meet inside the cycle | the meeting step count |
| LEN | N2 is held while N1 walks around the cycle until it is equal to N2 again; the count is the attractor length L | L |
| TRANS | N1 restarts at the initial state; N1 and N2 both step once per clock until equal; the count is the transient length μ | μ |

A state takes 2 + meet + L + μ clocks. Only three states are stored, whatever the network size.

### Distribution and collection

- **Thread control (`grn_thread_ctrl`).** Generates the initial states `first … first+count−1`. It pushes them round-robin into one input FIFO per PE, and skips a FIFO that is full.
- **Interface unit (`grn_interface`).** Drains the PE output FIFOs round-robin. For each state it writes one 64-bit record to `res_base + 8·(state − first)`, so the results come out in state order whichever PE computed them. The record is `{16'b0, attractor, transient, state}`.
- **Completion.** `done` rises once every record has been written.

Defaults are 4 PEs and FIFOs of depth 4.

---

## 3. Memory-based vector processor (`vm_core`)

### Instructions

The host pushes each instruction into a FIFO as one 128-bit `vinstr_t`: `{vb, va, vd, ctrl}`. The fields of `ctrl` (`vctrl_t`) are:

| Field | Meaning |
|---|---|
| `op` [4:0] | 0 ADD, 1 SUB, 2 MUL, 3 AND, 4 OR, 5 XOR, 6 ABSDIFF, 7 MIN, 8 MAX, 9 SHL, 10 SHR, 11 MOV; 24 SET_VL, 25 DMA_RD, 26 DMA_WR |
| `szd`, `sza`, `szb` | element size of the destination and of each source: 0 byte, 1 halfword, 2 word |
| `sgn` | sign-extend sources; use signed MIN/MAX/ABSDIFF; arithmetic SHR |
| `bscalar` | B is the scalar value `vb`, not an address |

The scalar values mean different things for each kind of instruction:
- **Vector ops.** `vd`, `va` and `vb` are scratchpad byte addresses. Any alignment is allowed, and each operand has its own element size, so mixed, widening and narrowing operations need no separate opcodes.
- **SET_VL.** Sets the vector length to `va`.
- **DMA_RD.** Copies `vb` bytes from main-memory address `va` to scratchpad address `vd`.
- **DMA_WR.** Copies `vb` bytes from scratchpad address `va` to main-memory address `vd`.

The host stalls only when the FIFO is full. It polls `busy` before reading results.

### The scratchpad and why any byte address works (`vm_scratchpad`)

This is the least obvious part of the design. The scratchpad is 64 KiB, and 32-bit words are striped across the `LANES` = 16 lane banks. One full-width window is therefore 64 bytes.

If each bank were one RAM, a window starting mid-row would need two rows from some banks, so unaligned vectors would need two accesses. Here each lane bank is split into four **byte columns**, so there are 64 columns, each with its own row address.

For a window starting at byte address *A*:
- column *k* reads row `A/64` if `k ≥ A mod 64`;
- otherwise it reads row `A/64 + 1`.

Every column is touched exactly once, and the full 64-byte window comes back in one clock. The bytes only need to be rotated so that byte 0 of the window is the byte at *A*.

The same trick serves all five ports:
- operand reads A and B;
- the DMA read;
- the vector write W;
- the DMA write, with byte enables.

Reads return one clock after the address. A read in the same clock as a write to the same bytes returns the old data.

### The vector pipeline (`vm_vector_engine`)

Each group of up to 16 elements goes through three stages:

- **R.** Present the A and B window addresses.
- **E.** The source aligners (`vm_rd_aligner`) cut the windows into 16 elements of the operand sizes and extend them to 32 bits. The 16 ALUs (`vm_alu`) compute. The destination aligner (`vm_wr_aligner`) truncates to the destination size, packs the elements, and sets byte enables only for valid elements, so the last, partial group writes nothing past the vector's end.
- **W.** Write the window to the scratchpad.

Throughput is one group per clock. A 4 096-element word operation takes 259 clocks from its acceptance to `busy` falling.

**Hazards.** Sources and destination are arbitrary byte ranges, so a group in R may need bytes that a group in E or W has not written yet. This happens, for example, with a dependent instruction right behind its producer, or an in-place sliding update. R compares its read ranges with the destination ranges held in E and W, and inserts bubbles until they have drained (`perf_hazard_stalls`). The result is as if each group were executed completely before the next one starts.

### DMA and ordering (`vm_dma`, dispatcher in `vm_core`)

The DMA engine moves one aligned 64-bit beat at a time. It has one request outstanding, on a simple valid/ready request port with byte strobes and a response port. For each beat, the scratchpad window starts at `sp_addr + (beat address − mm_addr)`, and the byte strobes trim the first and last beats. As a result, main-memory and scratchpad addresses may both be unaligned, independently of each other.

The dispatcher issues in program order and keeps the two engines as busy as it can:
- A vector instruction starts when the vector engine is free, unless the running DMA covers a scratchpad range the instruction reads or writes.
- A DMA starts when the DMA engine is free, unless the vector engine still has an overlapping range queued or in flight (`probe_conflict`).

Independent transfers therefore overlap with computation, which gives prefetching without unrolling. Dependent ones wait. Three counters report this:
- `perf_concurrent` counts cycles with both engines busy;
- `perf_order_waits` counts cycles the head instruction waited;
- `perf_hazard_stalls` counts pipeline bubbles.

---

## 4. What follows the original designs and what is this design's own

**Taken from the original designs:**
- the collision dataflow (collect into on-chip RAM, replicate to per-unit RAMs, dispatch 16 pairs per 512-bit line, write back, done flag);
- the five-stage sphere algorithm and its three outcome types;
- 16 SCPUs;
- the two-speed network copies and the held copy for the attractor length;
- the GRN organisation (thread control, per-PE FIFOs, interface unit);
- the memory-based vector ISA idea: three scalar operands, a vector-length register, explicit DMA, an instruction FIFO with a busy bit, concurrent DMA and compute, and hazard bubbles;
- 16 lanes, a 64 KiB scratchpad and a 64-bit memory link.

**This design's own choices:**
- all buffer and record layouts, and the instruction encoding;
- the memory-port handshakes, which stand in for the original QPI/SPL2 and AXI interfaces;
- the iterative square root and reciprocal, and the sharing of floating-point units inside the SCPU;
- the cycle counts given above;
- the GRN's second-phase method for the transient, and its example network function (chosen to reproduce the example trajectory);
- the byte-column scratchpad;
- the byte-range hazard and ordering rules;
- a single clock for everything.

**Not built:**
- The vector engine's strided 2D/3D, sliding and repeated read-out address modes.
- Accumulating and reduction instructions. DCT and autocorrelation kernels that use multiply-accumulate or shift-accumulate would need rewriting with separate MUL and ADD.
- Custom accelerator slots beside the ALUs.
- Handling of NaN and denormals in the floating-point units.
- The host processors, the CPU–FPGA link and DRAM, which exist only as behavioural models inside the testbenches.

**Capacity at the defaults:**
- The largest published collision benchmark (4 812 pairs) needs 301 of the 512 collision lines. Its sphere count is not known, but at least about 800 spheres are needed, against 4 096.
- Row-strip working sets of the image and matrix kernels fit in 64 KiB. The largest is a 1600×1600 matrix multiply at 6 rows × 6.4 KB.

---

## 5. Verification

Every testbench is self-checking and ends with a `TB_RESULT checks=… failures=…` line. Each one also has a watchdog.

| Testbench | Covers |
|---|---|
| `tb_fp32` | fp32 add, subtract and multiply: random operands compared against real arithmetic, and bit-exact against round-to-nearest-even |
| `tb_scpu` | random pairs of all three kinds against a real-number model; latency of 33 and 63 clocks |
| `tb_vwirb`, `tb_sphere_local_ram` | the RAMs against array models |
| `tb_cd_afu` | two full steps through a behavioural shared memory with random latency and back-pressure; every contact is checked |
| `tb_fifo` | random push/pop against a queue model |
| `tb_grn_pe` | all 16 states of the network and the cycle count |
| `tb_grn_accel` | full and wrapping state ranges, write back-pressure and full-FIFO skipping |
| `tb_vm_scratchpad`, `tb_vm_aligners`, `tb_vm_alu` | the scratchpad, the aligners and the ALUs, each against a model |
| `tb_vm_core` | a whole program (unaligned DMA, mixed element sizes, dependent and in-place operations, a prefetch during a long operation, DMA writes) against a byte-level interpreter; it also requires that hazards, ordering waits and concurrency all happen, and checks throughput |
| `tb_platform_top` | all three accelerators at once at their default sizes, with each mechanism counted |

To simulate one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/cd_pkg.sv rtl/grn_pkg.sv rtl/vm_pkg.sv tb/tb_fp_pkg.sv tb/tb_platform_top.sv \
  --top-module tb_platform_top -Mdir obj_top
./obj_top/Vtb_platform_top
```

Replace the testbench file and top name to run another one. Each testbench finishes in well under a minute. Lint warnings that remain are unused signals (spare bits of shared records, unused `level` outputs of FIFOs) and a note that `rst_n` is used both as an asynchronous reset and in an assertion's `disable iff`.
