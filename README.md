# HARP OFDM receiver with feedback frequency and voltage control

A pipeline is as fast as its slowest stage. This design is a heterogeneous
multicore built from several coarse-grained reconfigurable arrays (CGRAs)
and RISC nodes on a network-on-chip. It is set up as an OFDM receiver
front end, with four stages:

- time synchronization
- frequency offset estimation
- FFT
- channel estimation

Each stage runs on its own CGRA, and the four stages take very different
numbers of cycles. Running the fast CGRAs at full speed only makes them
wait for the slow one while still burning power.

The design therefore measures how long every CGRA takes for one job. It
finds the slowest one, the *worst-case node*. Then, iteration by
iteration, it lowers the clock of every other CGRA until that CGRA's job
time sits just below the worst case. This is dynamic frequency scaling
(DFS). In DVFS mode, each CGRA's supply voltage also drops to the lowest
level that still supports its new frequency. Throughput stays set by the
worst-case node, and the others spend less energy.

The controller is a closed loop:

```
   CGRA jobs ──► execution counters ──► FCS (feedback control) ──► PMU register
      ▲                                                            │
      └──── clock enable per CGRA ◄── tunable clock generators ◄────┘
                                        (+ voltage code, clock gate)
```

All of it is synthesizable SystemVerilog in `rtl/`. Each block has a
self-checking testbench in `tb/`.

## Platform map

The nodes sit on a 3×3 grid, N0..N8 row-major, so node n is at column
n%3, row n/3. The OFDM configuration populates seven of them:

| node | content | CGRA size (rows × cols) | stage |
|------|---------|-------------------------|-------|
| N0 | CGRA + DMA | 5 × 16 | time synchronization |
| N1 | CGRA + DMA | 4 × 8  | frequency offset estimation |
| N2 | CGRA + DMA | 4 × 16 | FFT |
| N8 | CGRA + DMA | 4 × 16 | channel estimation |
| N3, N4, N5 | RISC node: data memory, NoC master port | – | supervision |

The links are N0–N1, N1–N2, N0–N3, N1–N4, N2–N5, N3–N4, N4–N5 and N5–N8.
N6 and N7 are empty, and N8 hangs off N5.

Every populated node has a five-port switch (`noc_router`). The RISC
processors themselves are not part of this RTL. Each RISC node brings its
NoC master port and one port of its data memory out of the top
(`risc_*`, `dmem_*`). A testbench, or a processor model, plays the RISC
role: it writes configuration and data packets, starts the CGRAs and
collects the results.

The power management unit (PMU) sits on N4 and is reachable over the
network.

## A CGRA job, packet by packet

All traffic consists of single-flit 58-bit packets (`noc_pkt_t` in
`harp_pkg`):

```
 57    54 53 52 51   48 47            32 31                         0
 ┌──────┬─────┬───────┬────────────────┬────────────────────────────┐
 │ dst  │ tgt │  src  │      addr      │            data            │
 └──────┴─────┴───────┴────────────────┴────────────────────────────┘
 tgt: 0 = data memory of dst, 1 = DMA of dst, 2 = PMU (on N4)
```

The `tgt` field implements the "one master, two slaves" arrangement of a
node: a packet ends in either the data memory or the DMA behind the
switch.

For a DMA, `addr[15:14]` selects a region:

| region | addr | meaning of the packet |
|--------|------|-----------------------|
| 0 first local memory  | bank `[13:9]`, word `[8:0]` | input data word |
| 1 second local memory | bank `[13:9]`, word `[8:0]` | (normally written by the CGRA) |
| 2 context memory      | context `[13:12]`, slot `[7:0]` | configuration word |
| 3 control             | command `[1:0]` | see below |

The four commands:

| command | data | effect |
|---------|------|--------|
| `C_RUN` | `[17:16]` context, `[15:0]` length | run a context over `length` words; the DMA accepts nothing more until the run is over |
| `C_XFER_DST` | `[19:16]` node, `[15:0]` base | destination for results |
| `C_XFER_GO` | `[20:16]` bank, `[9:0]` count | send `count` words of a second-memory bank, one packet per word, to the destination data memory (the address increments) |
| `C_ACK` | `[19:16]` node, `[15:0]` address | send the job's cycle count to that data memory word; this ends the job |

A job runs from the first packet the DMA accepts after the previous
acknowledgment up to its own acknowledgment. It covers the transfers in,
the runs, the transfers out and the acknowledgment. The execution counter
of the node (`exec_counter`) counts system cycles over exactly that span.
Its count travels in the ACK packet and also reaches the FCS directly. So
the measured time includes network and memory traffic, not only the
array's compute time.

## The CGRA template (`cgra_core`, `pe_array`, `rpe`, `io_buffer`, `dp_ram`)

A CGRA with R rows and C columns has the following parts:

- **NB = 2·C first local memory banks** (input) and **NB second local
  memory banks** (output). Each bank is a `dp_ram` of `DEPTH` 32-bit words
  (default 512). Port A belongs to the DMA on the system clock enable.
  Port B belongs to the array on the CGRA's own clock enable.
- **An input I/O buffer**: NB multiplexers, each picking one of the NB
  first-bank words, followed by registers. Word 2c feeds column c of row
  0 as if it were the OUT1 of a PE above it, and word 2c+1 as its OUT2.
  Row 0 and row 1 also use word 2c as their interleaved source, and any
  PE can read word 2c (operand 1) or 2c+1 (operand 2) over the global
  line.
- **An R × C array of PEs** (`rpe`). Each PE has two operand registers,
  one set of units (add/sub, multiply, shifts, a 2-input LUT, an immediate
  register, single-precision add and multiply) and a result mux. OUT1 is
  the result. OUT2 is the operand 2 register, passed on so that a value
  can travel down a column next to a result.
- **An output I/O buffer**: for each second bank, one multiplexer over the
  2·C last-row outputs plus a write enable.
- **A context memory** with `NCTX` contexts (default 4), loaded word by
  word over the network and picked at run time by `C_RUN`.

### Operand sources

Each operand of a PE at (r, c) takes one of eight sources:

| code | source | |
|------|--------|-|
| `S_UP` | OUT1 of (r-1, c) | vertical |
| `S_UPLEFT` / `S_UPRIGHT` | OUT1 of (r-1, c∓1) | diagonal |
| `S_UP2` | OUT2 of (r-1, c) | pass-through line |
| `S_LEFT` | OUT1 of (r, c-1) | horizontal |
| `S_LOOP` | own OUT1 | accumulation |
| `S_ILV` | OUT1 of (r-2, c) | interleaved (skips a row) |
| `S_GLOBAL` | input-buffer word of column c | global |

A neighbour outside the array reads 0. `S_LEFT` reads the left
neighbour's *registered* result. A horizontal chain is therefore one cycle
behind per hop within a row, and a context using it must allow for that.

### Context layout

A context occupies `R·C + 2·NB` slots:

| slots | content |
|-------|---------|
| `0 .. R·C-1` | PE configuration words, row-major (`pe_cfg_t`) |
| next NB | input-buffer selects, bits `[SW-1:0]` |
| last NB | output-buffer words: select in `[SW-1:0]`, write enable in bit 8 |

The PE word (`pe_cfg_t`) is laid out as follows:

```
 31        16 15  12 11     10      9..7   6..4   3..0
 ┌──────────┬──────┬──────┬───────┬──────┬──────┬──────┐
 │   imm    │ lut  │spare │use_imm│ src2 │ src1 │  op  │
 └──────────┴──────┴──────┴───────┴──────┴──────┴──────┘
```

`use_imm` makes operand 2 the sign-extended immediate. `OP_LUT` computes
`lut[{a_i, b_i}]` for each bit i.

### How a run executes

The array streams data. For `i = 0 .. len-1`, word i of every first bank
is read, selected by the input buffer and pushed through the R register
stages of the array. The output buffer then picks a last-row output for
each enabled second bank, and the result is written to word i of that
bank. A valid bit travels with each row of data. Operand registers load
only on valid data, so a `S_LOOP` accumulator sums exactly `len` values.
It clears at the start of each run.

A run takes `len + R + 3` CGRA clock cycles: memory read, input buffer,
R array stages, output buffer, write. `last_cycles` reports that number.

The DMA (system clock) and the array (CGRA clock) start and finish a run
with a four-phase handshake (`run_req`/`run_ack`). Because of that, the
two clock enables may have any ratio.

## Clocking

The whole design has one clock, `clk`, at 200 MHz. Slower domains are
clock enables from `clk_en_gen`, a phase accumulator. Each base cycle it
adds `f`, and it fires whenever the sum passes 200. This gives exactly
`f` enables per 200 base cycles, spread as evenly as possible:

- The system domain (switches, DMAs, RISC-side memories, counters, FCS)
  runs at 100 MHz.
- Each CGRA runs at `f = 35 + 11·code` MHz, with `code` its 4-bit field in
  the PMU register. This gives 35, 46, …, 200 MHz, 16 steps.

While the PMU gates a CGRA, that CGRA gets no enables at all.

## PMU (`pmu`)

The PMU has one 32-bit register:

| bits | field |
|------|-------|
| `[3:0]` | frequency code of N0's CGRA |
| `[7:4]` | frequency code of N1's CGRA |
| `[11:8]` | frequency code of N2's CGRA |
| `[15:12]` | frequency code of N8's CGRA |
| `[16]` | DVFS mode |

After reset the register holds `0x0000FFFF`, so every CGRA starts at the
highest frequency. The FCS writes it, and so does any node that sends a
packet with `tgt = PMU`. The FCS write wins if both arrive on the same
system cycle.

When a field changes, that CGRA goes through three steps:

1. Its clock enable is gated for 2 system cycles.
2. It stays gated while the generator settles: `F_SETTLE` (16) cycles for
   a frequency change, or `V_SETTLE` (64) cycles in DVFS mode, where the
   supply also moves.
3. The clock is released at the new frequency.

`gate` and `busy` show this. A CGRA halted in the middle of a run simply
pauses, because its state is held by the clock enable.

In DVFS mode, `vsel` gives the supply as `0.5 V + 0.1 V · vsel`. The value
is the lowest of six operating points whose maximum frequency covers the
selected one:

| vsel | supply | maximum frequency |
|------|--------|-------------------|
| 0 | 0.5 V | 55 MHz |
| 1 | 0.6 V | 119 MHz |
| 2 | 0.7 V | 238 MHz |
| 3 | 0.8 V | 366 MHz |
| 4 | 0.9 V | 480 MHz |
| 5 | 1.0 V | 500 MHz |

With the 35–200 MHz table only vsel 0–2 actually occur. Outside DVFS mode,
`vsel` is 5 (1.0 V). The regulator itself is analog and not part of the
RTL: `vsel` is its control input.

## Feedback control (`fcs_engine`)

The FCS is the part that decides power. It works in *iterations*. An
iteration ends once every CGRA has finished at least one job since the
previous decision. The `done` pulse of each execution counter marks the
finished job, and `counts[i]` is its length in system cycles. Then the
FCS makes one of two decisions:

1. **Calibration.** This happens on the first iteration after reset, or
   after `fcs_retarget`. The node with the largest count becomes the
   worst-case node, and no clock is touched. Retargeting is meant for the
   moment the CGRAs are given new contexts. The stage that is slowest may
   then change.
2. **Tracking.** This covers every later iteration. The target `t` is
   the worst-case node's latest count. The other nodes step as follows:
   - A node whose count is below the *equalization region*
     `[t − t/2^MARGIN_SHIFT, t]` steps its code **down by one** (not below
     0).
   - A node above `t` steps **up by one** (not above 15).
   - A node inside the region keeps its code.

   The worst-case node is held at code 15. All new codes, plus the DVFS
   bit from `dvfs_mode`, go to the PMU in a single register write.

The loop has three properties worth noting:

- **One step per iteration.** A node with a big slack takes many
  iterations to settle. N2 and N8 of the OFDM case need about 15. Each
  step is small, so the loop cannot overshoot far past the region.
- **It settles against a moving target.** The worst-case count includes
  network traffic. When other nodes slow down, their transfers change
  too, so the target may move slightly from one iteration to the next.
  Re-reading it every iteration absorbs that.
- **Some nodes never reach the region.** A node that is still faster than
  the region at 35 MHz stays at code 0 outside the region. That is the
  expected result for a very light stage. In the OFDM test, N0 settles at
  about iteration 8. N2 and N8 end at 35 MHz, still below the region.

With `fcs_enable` low the FCS writes nothing, and the PMU keeps whatever
was last written.

`fcs_worst`, `fcs_target`, `fcs_iterations` and `fcs_in_region` report its
state.

## Network switch (`noc_router`)

The switch has five ports: local, east, west, north and south.

- **Routing.** Packets move west–east first, then north–south. A node on
  row 2 (only N8 is populated there) first goes north, because its only
  link is to N5. The only turn from Y to X is on packets leaving N8, so
  routing cannot deadlock.
- **Output registers.** Each output has one register, refilled only when
  it is empty. An output therefore carries at most one packet every two
  system cycles, and `ready` never depends combinationally on the next
  switch.
- **Arbitration.** Round-robin among the inputs that want the same output.

An assertion checks the rule of every port: an offered packet stays
unchanged until it is taken.

## Using the RTL

Files:

- `rtl/harp_pkg.sv`: types, packet format, routing function, frequency
  and voltage tables. Compile it first.
- `rtl/harp_ofdm_top.sv`: the platform. Its parameters are:
  - memory depth `DEPTH` (512) and data memory depth `DMEM_DEPTH` (1024);
  - `NCTX` (4);
  - clock rates `BASE_MHZ` (200) and `SYS_MHZ` (100);
  - the frequency table `F_MIN_MHZ` (35) and `F_STEP_MHZ` (11);
  - `MARGIN_SHIFT` (3);
  - settle times `F_SETTLE` (16) and `V_SETTLE` (64).

  The CGRA sizes per node are localparams in the top.
- One file per block, and `tb/tb_<block>.sv` for each.

To simulate one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/harp_pkg.sv rtl/*.sv tb/tb_harp_ofdm_top.sv --top-module tb_harp_ofdm_top
./obj_dir/Vtb_harp_ofdm_top
```

Every testbench prints `TB_RESULT checks=N failures=M` and has a
watchdog.

`tb_harp_ofdm_top` is the system test. It runs with default parameters
and takes the platform through the following steps:

1. The testbench plays the three RISC cores. N3 feeds N0, N4 feeds N1,
   and N5 feeds N2 and N8.
2. Each iteration is one pass of the receiver pipeline. N3 loads 32
   sample pairs into N0, and N0's result goes to N4's data memory. N4
   forwards it to N1, N1 sends its result to N5, and N5 passes it through
   N2 and N8. N8 returns the final result to N3, which checks it against
   `((a + b) * 3 << 1) - 5`.
3. Every job ends with an acknowledgment that writes the job's cycle
   count into the next consumer's data memory. The consumer polls for it.
4. Jobs have 20, 40, 4 and 3 context runs on N0, N1, N2 and N8. This
   makes N1 the worst-case node, as in the published receiver
   measurements (about 10k, 18k, 1.9k and 1.7k cycles). N0 is close enough
   to N1 to be equalized; N2 and N8 are too light to be.
5. It runs 20 iterations with the FCS on, switching to DVFS at
   iteration 10. Then it retargets with a new mix of run counts.
6. It finally writes the PMU over the network while N0 is running.

It counts each mechanism and fails if one never occurred:

- back-pressure
- a DMA stall
- clock gating
- a PMU write while a transition is still in progress
- frequency steps
- voltage changes
- worst-case selection
- equalization
- retargeting
- a PMU write over the network

It compiles and runs in about a minute with Verilator.

The block testbenches override sizes where that keeps them short. For
example, `tb_cgra_core` uses a 3×4 array with two contexts and runs the
CGRA enable at one clock in three against a system enable of one in two.
This exercises the clock-crossing handshake.

## Where this design departs from its source

- **The FCS is hardware.** The published platform runs the feedback loop
  as software on the RISC cores. Here it is a small block with the same
  rules.
- **Clock enables, not clocks.** Each tunable clock generator is a
  phase-accumulator enable from one 200 MHz clock. Real DFS would switch
  PLL outputs. The PMU's gating and settle times model the time such a
  switch takes.
- **The frequency table** is assumed evenly spaced (35 + 11·code MHz).
  Only the endpoints 35 and 200 MHz and the count of 16 are given.
- **The equalization region's width** (`t/8` below the target) is a
  choice. The source leaves it to the user.
- **The CGRA execution model** (streaming with a fixed latency), the
  context count and slot layout, the packet format, the DMA commands,
  routing, memory depths and settle times are all this design's own.
- **Floating point** covers single-precision add and multiply only.
  Subnormals are flushed to zero, results are truncated rather than
  rounded, and no NaN is produced. Integer operations are exact.
- **All PE units are always built.** In the source platform, optional
  units are added per application.
- **Not included**: the RISC cores, the analog supply regulator, the I/O
  peripherals and the configuration GUI. The RISC ports are brought out.
  The OFDM kernels themselves are not reproduced either: the testbench
  uses simple arithmetic contexts with the same job-time ratios.
- **Frequency limits.** The ASIC operating points above 200 MHz (up to
  500 MHz) cannot be selected with the default clock-generator width and
  base clock. `vsel` is still computed for the full table.

## Trust and limits

The block testbenches compare against values computed separately in the
testbench:

- every PE operation, with FP results checked on exact cases;
- every buffer select;
- RAM contents;
- the enable rate of the clock generator;
- the PMU gate lengths;
- the FCS step rules against a plant model;
- every operand source of the PE array, with random configurations,
  row-valid bits and enable gaps, checked against a cycle model;
- routing of thousands of random packets under random back-pressure;
- CGRA results and cycle counts;
- DMA transfers.

Synthesis of the full top is large. It has four arrays of 32–80 PEs,
each PE with a 32×32 multiplier and FP units, and 4 × 2 × 32 memory banks.
The memories are plain arrays and should be mapped to block RAM by the
synthesis flow. A generic yosys synthesis of the whole top runs out of
16 GB of memory. A single 4×16 `cgra_core` takes more than ten minutes.
The smaller blocks synthesize in seconds.
