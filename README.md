# MAHA: computing inside NAND Flash

Data-intensive kernels (search, filtering, counting, map-reduce) spend most of
their energy moving data from storage to the processor, not computing on it.
MAHA ("malleable hardware accelerator") moves the computation to the data:
the blocks of a NAND Flash chip are grouped into **Memory Logic Blocks
(MLBs)**. Each MLB gets a small amount of static CMOS logic beside its Flash
blocks and becomes a micro-coded processor that computes on the data held in
its own blocks. The MLBs talk over a hierarchical, time-multiplexed crossbar
network, and only the (usually small) results travel to the host.

This repository holds a synthesizable SystemVerilog model of that accelerator
in its main configuration: a 1 GB Flash of 4096 blocks, split into 16 MLBs of
256 blocks each, arranged as 8 banks × 1 sub-bank × 1 mat × 2 MLBs.

```
 host ── mode bit, start, base address, resume, config bus, result FIFO
   │
 maha_ce (control engine) ── run / slot / start / error-clear to every MLB
   │ (results)
 maha_interconnect: crossbar tree, fan-out 8 · 1 · 1 · 2  (25 maha_xbar nodes)
   │
 16 × maha_mlb
       ├─ maha_schedule_table   micro-code (256 × 33-bit flip-flop array)
       ├─ maha_regfile          16 × 32, two asynchronous read ports
       ├─ maha_datapath         adder, multiplier, shifter
       ├─ maha_function_table   Flash block 0: lookup tables, 64-bit segments
       ├─ maha_flash_array      Flash blocks 1..255, 4096-bit narrow reads
       └─ maha_ecc_enc / maha_ecc_dec   SECDED on every read
```

## How an MLB works

An MLB executes one micro-code word per *run cycle* from its schedule table.
Nothing is decided at run time that the mapping software did not already
decide: there is no cache, no arbitration and no network handshake. The
operations are:

| opcode | effect |
|---|---|
| `MOVI rd, imm` | rd = zero-extended imm |
| `ADD/SUB rd, rs1, rs2`, `ADDI rd, rs1, imm` | adder |
| `MUL rd, rs1, rs2` | multiplier, low 32 bits |
| `SHL/SHR rd, rs1, rs2` | shifter (logical, amount rs2[4:0]) |
| `NRD rs1, imm` | narrow read: Flash segment `rs1+imm` → 4096-bit data buffer |
| `LDB rd, rs1, imm` | rd = data-buffer word `(rs1+imm) mod 128` |
| `LUT rd, rs1, imm` | rd = function-table word `rs1+imm` (two words per 64-bit segment) |
| `SEND rs1` | put rs1 on the MLB's outgoing channel in the next run cycle |
| `RECV rd` | rd = word on the incoming channel (0 if the channel is empty) |
| `BNE rs1, rs2, imm` / `JMP imm` | branch to schedule-table address imm |
| `HALT` / `NOP` | |

A micro-code word is `{op[4:0], rd[3:0], rs1[3:0], rs2[3:0], imm[15:0]}`
(`maha_pkg::ucode_t`).

**Narrow read.** A normal NAND read senses a whole 2 KB page. An MLB
instead reads a 4096-bit segment (a quarter page), the unit at which the
Flash also keeps its error-correcting code. Segment address =
`(block·128 + page)·4 + quarter`, over the 255 data blocks, 130 560 segments
per MLB. The sensed segment is checked and corrected, then written to the
data buffer, from which `LDB` picks 32-bit words.

**Function table.** Flash block 0 of each MLB stores lookup tables in 64-bit
segments. This lets a mapped task replace a computation by a table lookup.

**Error correction.** Every stored unit carries an extended Hamming code:
13 check bits plus one parity bit per 4096-bit segment, and 7 + 1 per 64-bit
table segment. Data bit *i* sits at the *i*-th code-word position that is not
a power of two. The syndrome is the XOR of the positions of the one-bits.
On a read:

- A single flipped bit is corrected and flagged.
- Two flipped bits are flagged as uncorrectable.

In both cases the whole array stops. The control engine reports the lowest
flagging MLB to the host, which plays the Flash-management layer and decides
whether to resume (`resume_i`) or abort (leave compute mode).

**Configuration.** Flash has limited write endurance, so the array is written
only while it is being configured, in storage mode (`mode_i = 0`). The
configuration bus (`maha_pkg::cfg_t`: `we`, `target`, `unit`, `addr`,
`wdata[63:0]`) has five targets:

| target | `unit` | `addr` | `wdata` |
|---|---|---|---|
| `CFG_SCHED` | MLB | entry | micro-code word |
| `CFG_LUT` | MLB | segment | 64 bits; the check bits are added here |
| `CFG_WBUF` | MLB | index 0..63 | 64 bits of the write buffer |
| `CFG_PROG` | MLB | segment | programs the write buffer and its check bits |
| `CFG_XBAR` | crossbar node | `{output[15:8], slot[7:0]}` | select |

In compute mode the bus is ignored.

## Lock-step execution and stalls (the part to understand first)

Communication between MLBs is fixed at mapping time. MLB *A* sends in run
cycle *t* and MLB *B* receives in run cycle *t+1*. The crossbars switch by
time slot. For this to work, all MLBs must stay aligned in *run cycles*, even
when some operations take several clocks. The control engine does this with
one global signal, `run`:

```
run = running & compute_mode & !any MLB busy & !any ECC flag & !result FIFO full
```

- An MLB that issues `NRD` is busy for `RD_LAT + 1` clocks; one that issues
  `LUT` is busy for one clock. Meanwhile `run` is low for **every** MLB.
- Program counters, register writes, the channel registers, the slot counter
  and the run-cycle counter change only when `run` is high. So a stall
  stretches the schedule in time without reordering it.
- The slot counter is the run-cycle number modulo `SLOTS` (64). It restarts
  at 0 on `start`. In straight-line code, the micro-code word at address *a*
  executes in run cycle *a*. A `SEND` at address *a* therefore uses crossbar
  slot *a + 1*.
- `cycles_o` counts run cycles and `stalls_o` counts stalled clocks. A
  program whose `HALT` is at address *h*, with no loops, takes exactly *h + 1*
  run cycles.

The interconnect has no flow control. If the schedule and the crossbar
tables disagree, words are silently lost or read as zero. Correctness is the
job of the mapping step, as in the original scheme.

## The interconnect

The tree mirrors the organisation of a memory array: bank, sub-bank, mat,
sub-array. There is a crossbar at every node, with fan-outs 8, 1, 1, 2
(parameters `FAN0..FAN3`). Every tree edge carries one 33-bit channel in each
direction (`chan_t`: valid and a 32-bit word).

Each crossbar output is a multiplexer over the node's inputs. Its select
comes from a per-slot table, so the same wires carry different signals in
different cycles. Select encoding:

- 0 gives an empty channel.
- *k* selects input *k − 1*, where inputs 0..FAN−1 are the children and
  input FAN is the parent.

Outputs are numbered the same way: 0..FAN−1 go down to the children and FAN
goes up to the parent. A channel is never sent back to where it came from,
so no table can close a combinational loop.

Routing is combinational, so a word can climb to the lowest common crossbar
and come down to its target in the same clock. Node numbers for `CFG_XBAR`:

| level | node numbers |
|---|---|
| root (banks) | 0 |
| sub-bank | 1–8 |
| mat | 9–16 |
| sub-array | 17–24 |

The root's upward output leaves the array. It feeds the result FIFO and
`ext_ch_o`. The root's parent input is `ext_ch_i`, for linking further
hierarchy levels.

Example from the end-to-end testbench: the total of the MLB pair *k*,
computed in MLB 2k, goes to the host in slot *s*. The writes are:

- node 17+k, output 2, select 1
- node 9+k, output 1, select 1
- node 1+k, output 1, select 1
- node 0, output 8, select k+1

To send MLB 2k+1's word to MLB 2k: node 17+k, output 0, select 2.

## Parameters

| parameter | default | origin |
|---|---|---|
| `FAN0..FAN3` | 8, 1, 1, 2 | source design (16 MLBs) |
| `BLOCKS` | 255 data blocks (+1 table block) | source design (256 blocks per MLB) |
| `PAGES`, `PAGE_BYTES` | 128, 2048 | 2 KB pages; 128 pages makes 4096 blocks = 1 GB |
| `SEG_BITS` | 4096 | narrow-read size and ECC unit, source design |
| `RD_LAT` | 4 clocks | own choice (no sensing time given) |
| `SCHED_DEPTH` | 256 | own choice |
| `SLOTS` | 64 | own choice |
| `FIFO_DEPTH` | 16 | own choice |
| `DATA_W`, `NREG` (package) | 32, 16 | own choice |

At the defaults the model stores the full 1 GB. A verilator simulation of
the whole top allocates about 1.1 GB and runs the end-to-end test in seconds.

## Where this model departs from, or goes beyond, the source design

Taken from the source design:

- the MLB structure: function-table block, data blocks, schedule table in
  flip-flops, dual-ported asynchronous-read register file, adder, multiplier
  and shifter, address generator, data buffer;
- the 4096-bit narrow read;
- SECDED per 512 bytes, with a stall on any detected error;
- four crossbar levels in an 8,1,1,2 hierarchy;
- a time-multiplexed, statically scheduled interconnect;
- a control engine with a mode bit and a base address;
- writes only during configuration.

Chosen here, because the source is silent:

- the instruction set, micro-code format, word width and register count;
- all latencies;
- the global-`run` stall mechanism;
- the per-slot crossbar tables and the configuration bus;
- the result FIFO and the error/resume protocol;
- the exact SECDED code;
- ECC on the function table.

Known differences:

- The figure of the MLB labels data-block segments "1024b SEG", while the
  text gives 4096-bit narrow reads. This model uses 4096.
- The operand multiplexer is described as pass-gate multiplexers with weak
  keepers. Here it is an ordinary multiplexer.
- Wordline segmentation, sense amplifiers, page buffers and the other analog
  Flash circuits are represented only by the storage behaviour of
  `maha_flash_array`.
- The normal storage-mode path of the Flash (translation layer, command and
  status registers) is not modelled. Host access in this model is the
  configuration bus plus the result FIFO.
- No mapping software is included. Programs are written as micro-code by
  hand; the testbenches show how.
- The source evaluates ten kernels (AES, SHA-1, 2D-DCT, Census, …) without
  giving their data sizes or mappings. None of them is reproduced at the
  source's sizes. Two are run at sizes chosen here: a small map-reduce kernel
  (`tb_maha_top`) and a 4-tap FIR filter on all 16 MLBs (`tb_maha_fir`).

## Simulating

Every testbench is self-checking. Each prints `TB_RESULT checks=N failures=M`
and has a watchdog. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
  rtl/maha_pkg.sv tb/tb_maha_top.sv --top-module tb_maha_top -Mdir obj
obj/Vtb_maha_top
```

| testbench | what it covers |
|---|---|
| `tb_maha_top` | The whole array at default size. Map-reduce over 16 MLBs: narrow reads, table lookups, pair reduction over the lowest crossbars, 24 results time-multiplexed to the top. Also: FIFO back-pressure, a planted single-bit error (stop, report, resume, corrected result), a configuration write refused in compute mode, and the exact run-cycle count. Counts each mechanism. |
| `tb_maha_fir` | The whole array at default size. A 4-tap FIR filter on every MLB, with taps from the function table and samples from one narrow read. The 16 MLBs take turns on all 64 slots of the channel to the top. Checks 192 outputs in order, FIFO-full stalls and the exact run-cycle count. |
| `tb_maha_mlb` | One MLB on a reduced Flash: loop, ALU, lookup, send/receive, stall lengths, single and double errors. |
| `tb_maha_interconnect` | Random routes through the full tree, computed independently, plus links to and from the root. |
| `tb_maha_xbar`, `tb_maha_ce` | Crossbar select table and routing rules; control-engine run/stall, FIFO, errors, done, abort. |
| `tb_maha_ecc_enc`, `tb_maha_ecc_dec` | Against an explicit reference code, with 0, 1 and 2 flipped bits, at 64 and 4096 bits. |
| `tb_maha_flash_array`, `tb_maha_function_table`, `tb_maha_schedule_table`, `tb_maha_regfile`, `tb_maha_datapath` | The leaf blocks. |

`tb_maha_top` reaches into the hierarchy in two places:

- It flips bits in `g_mlb[5].u_mlb.u_flash.mem` to plant an error.
- It observes internal stall causes to count the mechanisms.

Renaming those instances requires updating the testbench.
