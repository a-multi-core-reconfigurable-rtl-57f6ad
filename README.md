# Multi-core bio-signal platform with a shared CGRA accelerator

Wearable ECG monitors must run filtering, delineation and classification
on a very small energy budget. This platform splits the work two ways. Eight
small RISC cores run the control-heavy parts of the application. A shared
coarse-grained reconfigurable array (CGRA) runs the short, compute-heavy
inner loops ("kernels"). A core hands a kernel to the CGRA with one
instruction, `ACCEL #kid`, and its clock is stopped until the results are in
data memory. Several cores can use the array at once: each kernel gets its
own group of columns, and kernels run side by side.

The RTL follows the architecture of the article *A Multi-Core Reconfigurable
Architecture for Ultra-Low Power Bio-Signal Analysis*. That article gives the
structure and the run-time protocol. It does not give sizes, encodings or the
processors themselves. Every such choice made here is listed in
[Where this design departs from, or fills in, the article](#where-this-design-departs-from-or-fills-in-the-article).

## Block diagram

```
          core 0..7 (external)       instruction and data ports, sync and ACCEL instructions
             |  |  |  |
   +---------+--+--+--+-----------------------------------------------+
   |  xbar (I) 9x8 --- 8 x mem_bank (24-bit words)   program load port |
   |  xbar (D) 8x16 -- 16 x mem_bank (16-bit words)                    |
   |     ^ port k: core k, or DMA channel k while core k is gated      |
   |  synchronizer --clk_en--> 8 x clock_gate --> core_clk[k]           |
   |  cgra_controller (parameter registers, request queue, columns)    |
   |       |  header lookup          | granted request                 |
   |  config_ram (2 read ports) <----+---- cgra                         |
   |                                     +- cgra_config_loader          |
   |                                     +- 4 x column_pc               |
   |                                     +- 4x4 rc_cell mesh            |
   |                                     +- 8 x dma_channel             |
   +--------------------------------------------------------------------+
```

| File | Role |
|---|---|
| `rtl/cgra_pkg.sv` | Widths, ALU and operand encodings, configuration word, kernel header and request structs |
| `rtl/mc_cgra_top.sv` | Top level: memories, crossbars, synchronizer, clock gates, controller, Configuration RAM, CGRA |
| `rtl/cgra.sv` | The CGRA: mesh, column PCs, loader, DMA channels, stream routing |
| `rtl/rc_cell.sv` | One reconfigurable cell: ALU, 4-word register file, operand multiplexers, configuration store |
| `rtl/column_pc.sv` | Column program counter, iteration counter, column control words |
| `rtl/cgra_config_loader.sv` | Copies a kernel's configuration words into its columns |
| `rtl/dma_channel.sv` | One DMA channel: input prefetch FIFO, output FIFO, memory port |
| `rtl/cgra_controller.sv` | Kernel parameter registers, ACCEL request queue, column allocation |
| `rtl/config_ram.sv` | Configuration RAM, 1024 x 32 bits, 1 write and 2 read ports |
| `rtl/synchronizer.sv` | Per-point counters, sleep/wake and ACCEL gating of the cores |
| `rtl/clock_gate.sv` | Latch-based clock gate |
| `rtl/xbar.sv` | Combinational crossbar, word-interleaved banks, round-robin arbitration |
| `rtl/mem_bank.sv` | Single-port synchronous SRAM bank |
| `rtl/sync_fifo.sv` | Small FIFO (helper) |

## How a kernel is offloaded

This is the central mechanism. Most of the design exists to make it cheap.

1. **Parameters.** The core writes five memory-mapped registers. It uses
   ordinary data stores with address bit 15 set, and address bits 2:0 pick
   the register:

   | Offset | Register |
   |---|---|
   | 0 | input address |
   | 1 | input length |
   | 2 | output address |
   | 3 | output length |
   | 4 | number of loop iterations |

   Each core has its own set, so the cores do not interfere.
2. **ACCEL #kid.** The core raises `core_a_valid` with the kernel id. The
   synchronizer gates the core's clock from the next cycle.
3. **Queue.** The controller turns the request into a queue entry. At most
   one request enters the queue per cycle, lowest core first. The queue is
   served in order.
4. **Mapping.** For the request at the head of the queue, the controller
   reads the kernel's header from Configuration RAM address `kid`. The header
   gives the number of columns, the schedule length and the address of the
   configuration words. The controller waits until two things are true:
   - that many *adjacent* columns are free;
   - the CGRA can accept a kernel for configuration.

   It then sends the request, with the first column and the core's
   parameters, to the CGRA. If the head request needs more columns than are
   free, the requests behind it wait too (head-of-line blocking).
5. **Configuration.** The CGRA's loader reads the kernel's words from the
   Configuration RAM, one per cycle, and writes them into the assigned
   columns. This takes `ncols * len * (ROWS+1) + 2` cycles. Only one kernel
   is configured at a time, but kernels already running keep running. At the
   same moment the request is accepted, the core's DMA channel starts
   prefetching the input.
6. **Execution.** The columns start together. Each cycle, every cell runs the
   configuration word that its column PC selects. The schedule has `len`
   steps and is repeated `iters` times.
7. **Completion.** After the last iteration, the DMA channel writes out the
   outputs it still holds. It then pulses `ch_done`. The controller frees the
   columns, and the synchronizer restarts the core's clock.

While core *k* is gated, its data-memory crossbar port belongs to DMA channel
*k*. The CGRA therefore needs no memory ports of its own; it borrows the
ports of the cores it is working for.

## The CGRA execution model

### Cells

Each `rc_cell` has an ALU, four registers R0..R3 and an output register. Each
operand can come from:
- a register;
- the cell's own output;
- the output of the cell to the north, south, east or west;
- the kernel's input stream (`SRC_IN`);
- an 8-bit sign-extended immediate.

The result goes to the output register, and optionally also to a register.

Operations: `NOP` (hold), `PASS`, `ADD`, `SUB`, `MUL` (low half),
`MULH` (high half, for Q15 arithmetic), `AND`, `OR`, `XOR`, `SHL`, `SRL`,
`SRA`, `MIN`, `MAX`, `ABS`, `SLT`.

Neighbours see only registered outputs. A value computed in step *s* is
therefore available to the neighbours in step *s+1*, and the mesh has no
combinational paths. Cells at the edge of the mesh read 0 from the missing
neighbours. When a kernel is launched, the registers of its columns are
cleared.

### Configuration words

A cell word is the 23-bit `rc_cfg_t` in the low bits of a 32-bit
Configuration RAM word: `{op, srcA, srcB, rf_we, rf_wa, imm8}`.

Each column also has a control word per step, the 5-bit `col_cfg_t`:
`{pop, push, out_row}`. Only the control words of the kernel's leftmost
column (its *leader*) are used:
- `pop` consumes the current input word, which every cell of the kernel sees
  as `SRC_IN`;
- `push` appends the output register of row `out_row` of the leader column to
  the output stream.

Configuration RAM layout:
- address *k* holds the header of kernel *k*: `{len[7:0], ncols[3:0], 4'b0, base[15:0]}`;
- from `base` on come the kernel's words, ordered as: for each column, for
  each step, one control word followed by one word for each row, top to
  bottom.

### Stalls

A kernel must stall when its leader would pop a word that has not arrived
yet, or push into a full output FIFO. When it stalls, all of its columns hold
for that cycle: PC, registers and outputs. Other kernels are not affected.

Once the input stream is used up, more pops return 0 and do not stall.
Pushes past the output length are dropped. A pipelined schedule can use
these two rules to run its prologue and epilogue without special cases.

### Example kernels

Eight example kernels are in `tb/tb_kernels_pkg.sv`:
- `3x+5`;
- a running sum over two columns, using the east/west links;
- `|x|`;
- a one-step pipelined increment that consumes and produces a word every
  cycle, and so runs into stalls;
- erosion: the minimum of the last 3 samples;
- dilation: the maximum of the last 3 samples;
- the morphological derivative `max + min - 2*centre` over 3 samples; three
  cells of the column compute the maximum, the minimum and `2*centre` in
  parallel;
- a random projection: each iteration consumes an 8-sample vector and emits
  4 sums. Each sum uses coefficients of +1, -1 or 0, which become ADD, SUB
  or a plain copy of the accumulator in the cell's configuration words.

They show how the words are laid out.

## Synchronization and clock gating

The synchronizer has `N_POINTS` (8) counters. A core's synchronization
instruction arrives as `core_s_valid` with an operation and a point:

| Operation | Effect |
|---|---|
| `SYNC_INC` | Add one to the point's counter |
| `SYNC_DEC` | Subtract one from the point's counter |
| `SYNC_SLEEP` | Gate the core until the point's counter is zero |

If the counter is already zero, `SYNC_SLEEP` does not gate at all.

Common patterns:
- **Barrier over *n* cores.** Raise the counter to *n* once. At the barrier,
  every core issues `DEC` and then `SLEEP`. The last `DEC` releases them all.
- **Producer/consumer.** The consumer issues `INC` and then `SLEEP`. The
  producer issues `DEC` when the data are ready.

`core_clk_en[k]` is low while core *k* sleeps or waits for its kernel.
`core_clk[k]` is the free-running clock passed through a latch-based clock
gate. The latch is intentional: it prevents glitches.

## Memories and crossbars

| Memory | Banks | Words per bank | Word width | Crossbar masters |
|---|---|---|---|---|
| Instruction | 8 | 2048 | 24 bits | 8 cores + 1 program-load port |
| Data | 16 | 2048 | 16 bits | 8 ports (core *k* or DMA channel *k*) |

Both memories are word-interleaved: the low address bits select the bank.
Each bank has its own round-robin arbiter. Several reads of the same word in
the same cycle are all served by one bank access, so cores running the same
code in lock-step do not conflict.

Port timing:
- the grant comes in the cycle of the request;
- read data come one cycle after the grant, with `*_rvalid`;
- a master that is not granted keeps its request up.

## Parameters (top level)

| Parameter | Default | Origin |
|---|---|---|
| `N_CORES` | 8 | article |
| `IM_BANKS` | 8 | article |
| `DM_BANKS` | 16 | article |
| `IM_BANK_DEPTH`, `DM_BANK_DEPTH` | 2048 | this design |
| `INSTR_W` | 24 | this design |
| `ROWS` x `COLS` | 4 x 4 | this design |
| `CFG_DEPTH` (words per cell) | 16 | this design |
| `CRAM_DEPTH` | 1024 | this design |
| `N_POINTS` | 8 | this design |

Data width is 16 bits (`cgra_pkg::DATA_W`). The core id is 4 bits wide, so
up to 16 cores are possible. Kernel headers allow up to 15 columns and 255
steps, but a kernel must fit `COLS` and `CFG_DEPTH`, and an assertion checks
this.

## Where this design departs from, or fills in, the article

- **Processors are not included.** The article reuses cores from earlier
  work and does not describe their instruction set. Their ports (instruction,
  data, synchronization, ACCEL) are top-level ports, and the testbench drives
  them with core models.
- **Synchronization instructions.** The article takes these from earlier work
  and says they support SIMD modes and producer/consumer relations. The
  counter semantics above are this design's reading. Beyond the merged
  instruction fetches of the crossbar, no SIMD execution mode is modelled.
- **Sizes are this design's.** The article gives no mesh size, memory size,
  word width, configuration depth or Configuration RAM size. The values
  chosen are in the table above.
- **Streaming is this design's.** The article says only that the DMA moves
  inputs and outputs between the CGRA and memory. The leader-column
  pop/push scheme, the 4-word FIFOs, the stall rule, and the zero-read and
  drop rules are this design's.
- **Allocation policy is this design's.** Kernels take adjacent columns
  because the east/west links are used. The queue is first-come first-served
  with head-of-line blocking. The article only says that kernels are mapped
  "when enough resources are available".
- **The request carries the header, not the kernel id.** In the article,
  the request sent to the CGRA carries the kernel id, and the CGRA fetches
  the rest of the configuration. Here the controller needs the column count
  before it can allocate. It therefore reads the header word at address
  `kid` itself and sends the header, so the CGRA fetches only the words that
  follow.
- **Kernel mappings are not included.** The seven kernels of the
  evaluation (filtering, delineation and classification of 5000-sample ECG
  excerpts) were mapped by hand and are not given. Whether each fits 4
  columns and 16 steps is therefore unknown. The signal buffers of a
  three-lead excerpt (3 x 5000 words in, as many out) fit the 32768-word
  data memory, but with little room left over.
  The workload testbenches use simplified stand-ins written for this design:
  3-sample erosion and dilation, the derivative at scale 1, and a 4 x 8
  random projection.
- **No timing or energy claims.** The 65 nm, 1 MHz implementation and the
  energy results are not reproduced. Nothing here has been synthesized
  beyond a generic check.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_rc_cell` | All 16 operations with random operands against a reference model |
| `tb_column_pc` | Step and iteration counting under random stalls; exact cycle count |
| `tb_dma_channel` | Stream order, bounds, dropped words and completion, against a randomly granting memory |
| `tb_cgra_config_loader` | Every word reaches the right (column, row, step); load time is `ncols*len*(ROWS+1)+2` |
| `tb_cgra` | Example kernels run concurrently on different columns; results match reference functions |
| `tb_cgra_controller` | Queue order, no overlapping columns, parameters, completion |
| `tb_synchronizer` | Barrier, producer/consumer, same-cycle decrements, ACCEL gating |
| `tb_xbar` | Data integrity, one access per bank, fairness, merged reads |
| `tb_mem_bank`, `tb_config_ram`, `tb_clock_gate` | Storage, ports and glitch-free gating |
| `tb_mc_cgra_top` | The whole platform at its default size (see below) |
| `tb_ecg_morph_filter` | Three-lead morphological filtering at full data size (see below) |
| `tb_ecg_mmd_delineation` | Three-lead delineation at full data size (see below) |
| `tb_ecg_rp_class` | Heartbeat classification with selective processing (see below) |

`tb_mc_cgra_top` runs the whole platform at its default size:
1. eight core models load and fetch a program;
2. they meet at a barrier;
3. each offloads one of the example kernels; eight requests compete for four
   columns;
4. each core reads back and checks its results;
5. two cores do a producer/consumer hand-over.

The test counts each mechanism and fails if one never occurred:
- merged fetches;
- crossbar conflicts;
- barrier sleep;
- producer/consumer wake-up;
- ACCEL gating;
- queue waits;
- concurrent kernels;
- configuration while another kernel runs;
- stream stalls.

`tb_ecg_morph_filter` runs a three-lead ECG workload at its full data size:
- three cores each store one lead of 5000 synthetic samples (10 s at
  500 Hz);
- each core offloads an erosion and then a dilation (kernels 4 and 5);
  together these form a morphological opening;
- the three leads are filtered concurrently on separate columns.

Every sample is checked against a reference. Each kernel takes 5 cycles per
sample, which is its schedule length, plus about 35 cycles of overhead.

Two buffers per lead use 30000 of the 32768 data words. The filters used in
practice use much longer structuring elements than the 3-sample window here.

`tb_ecg_mmd_delineation` runs on the same kind of three-lead, 5000-sample
data:
- each core offloads the morphological derivative (kernel 6), 6 cycles per
  sample;
- the core then finds the R peaks in software: they are the strong
  negative extremes of the transform;
- the testbench checks every transform sample and every peak position.

Real delineators use several scales and locate more points than the R peak.

`tb_ecg_rp_class` shows *selective processing*, where expensive analysis
runs only on beats that need it:
1. The core cuts a 64-sample window around each of 12 beats and downsamples
   each window to 8 words.
2. It offloads the projection of all beats in one call (kernel 7, 12 cycles
   per beat).
3. It labels each beat by the nearest class centre.
4. It offloads the derivative (kernel 6) only for the beats labelled
   abnormal.

The testbench checks every coefficient, every label and every derivative
sample. The classifier is deliberately minimal.

Running a testbench with plain Verilator, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mc_cgra_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/cgra_pkg.sv tb/tb_kernels_pkg.sv \
  tb/tb_mc_cgra_top.sv -o sim
./obj_dir/sim
```

Replace the top module and file for the other testbenches. `tb_kernels_pkg.sv`
is only needed by `tb_cgra` and `tb_mc_cgra_top`. Lint a module with
`verilator --lint-only -Wall -y rtl rtl/cgra_pkg.sv rtl/<module>.sv`.

Lint warnings that remain, and why:
- **Unused signals.** Status outputs of submodules, the upper bits of 32-bit
  configuration words, and the DMA's copy of the iteration count.
- **`rst_n` used both asynchronously and in assertions' `disable iff`.**
- **The latch in `clock_gate`.** It is intended.

## Changing the design

- **Mesh size.** Set `ROWS`/`COLS` on `mc_cgra_top`. `ROWS` up to 8 fits the
  3-bit `out_row`; `COLS` up to 15 fits the header.
- **Longer schedules.** Raise `CFG_DEPTH`; the header allows up to 255.
- **New ALU operations.** The opcode space is full. Widen `alu_op_e` in
  `cgra_pkg` and grow `rc_cfg_t`; it has 9 spare bits in the 32-bit word.
- **Different column allocation.** Edit the `fit` search in
  `cgra_controller`. The CGRA accepts any start column, provided the group
  fits.
