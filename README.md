# BioThreads: a VLIW chip multiprocessor with hardware threads

BioThreads is a chip multiprocessor for biomedical image processing. Its job is
to run a per-pixel signal-processing kernel over a stack of camera frames in
close to real time. It is built from identical LE1 VLIW cores and uses three
kinds of parallelism:

- **Instruction-level:** each core issues up to `ISSUE_WIDTH` operations per
  cycle, scheduled by the compiler.
- **Data-level:** loops are unrolled and pipelined by the compiler.
- **Thread-level:** the cores share one data memory, and software threads are
  started on idle cores by hardware.

There is no operating system. A running thread executes a *create* syllable.
The thread controller then picks an idle ("uncommitted") core, starts the new
thread there and returns the thread's number. A later *join* waits in hardware
until that thread has exited. Programs written against a PThreads-style API
therefore spread their work over the cores directly.

This repository holds synthesizable SystemVerilog for the whole multiprocessor:

- the cores: fetch engine, instruction RAM, branch predictor, integer
  cluster, pipeline controller and load/store unit;
- the banked, crossbar-connected shared data memory;
- the hardware thread controller.

It also holds self-checking testbenches for every block. The top-level
testbench computes a perfusion map on eight cores: the power of one frequency
bin per pixel, over 64 frames.

## Block structure

```
                 host port (program load, data in/out, start, done)
                    |                |                     |
        +-----------+-----+          |              +------+-------+
        | IRAM writes     |          |              | thread_ctrl  |  create / join / exit
        v                 v          |              +--+--------+--+
  +-----------+     +-----------+    |                 |  starts |
  | le1_cpu 0 | ... | le1_cpu N |<---+-----------------+---------+
  |  ife      |     |           |    |
  |   iram    |     |           |    |
  |   smith_bp|     |           |    |
  |  score    |     |           |    |
  |  lsu      |     |           |    |
  |  pipe_ctrl|     |           |    |
  +-----+-----+     +-----+-----+    |
        | 1 channel       |          | (last client)
        v                 v          v
  +------------------------------------------+
  | strmem: crossbar, round-robin per bank   |
  |  bank 0 | bank 1 | ...  | bank NBANKS-1  |
  +------------------------------------------+
```

| File | Role |
|---|---|
| `rtl/bt_pkg.sv` | Shared types: syllable fields, opcodes, memory and thread operation kinds, performance counter struct, small assembler functions |
| `rtl/biothreads_top.sv` | The multiprocessor: `NCORES` cores, `strmem`, `thread_ctrl`, host port |
| `rtl/le1_cpu.sv` | One core: fetch, execute stage register, cluster, LSU, pipeline controller |
| `rtl/ife.sv` | Instruction fetch engine: bundle assembly, line-crossing stall, next-address prediction |
| `rtl/iram.sv` | Private instruction RAM, one `ISSUE_WIDTH`-syllable line per read |
| `rtl/smith_bp.sv` | Branch predictor: 2-bit saturating counters |
| `rtl/score.sv` | Integer cluster: 64 x 32-bit registers, 8 branch registers, `ISSUE_WIDTH` ALUs, one multiplier |
| `rtl/lsu.sv` | Load/store unit, one channel, byte/half/word |
| `rtl/pipe_ctrl.sv` | Stall, flush and redirect decisions; run state; performance counters |
| `rtl/strmem.sv` | Shared data memory: banks behind a crossbar |
| `rtl/mem_bank.sv` | One single-port bank with byte enables |
| `rtl/rr_arbiter.sv` | Round-robin arbiter (per bank, and for thread creates) |
| `rtl/thread_ctrl.sv` | Hardware thread primitives |

## Bundles and the fetch engine

This part is the least obvious, and the rest of the core depends on it.

### Bundle encoding

A program is a stream of 32-bit *syllables*, one operation each. A *bundle*
(long instruction word) is a run of syllables ending with one whose stop bit
(bit 31) is set. A bundle holds at most `ISSUE_WIDTH` syllables. The position
of a syllable in its bundle is the issue slot that executes it.

Bundles are stored back to back, with no padding to the line width. The IRAM
is organised in lines of `ISSUE_WIDTH` syllables, so a bundle may start
anywhere in a line and can run into the next one.

Addresses used for fetching and branching are *syllable* addresses, not byte
addresses.

### How `ife` delivers bundles

`ife` delivers one bundle per cycle to the execute stage as follows:

1. The IRAM is read synchronously, so the line holding the bundle at `pc_a` is
   on the RAM output in the *align* cycle.
2. In that cycle the engine finds the first stop bit at or after the bundle's
   offset. If there is one, the bundle is complete.
3. If the bundle runs off the end of its line, the engine keeps the syllables
   it has, reads the next line, and completes the bundle one cycle later. That
   cycle is a bubble, reported as `span_stall`.
4. A line read from offset 0 with no stop bit counts as a full-width bundle.
5. In the same align cycle, the engine computes the next fetch address and
   addresses the IRAM with it, so the following bundle is aligned in the next
   cycle.

The next fetch address is chosen like this:

- `GOTO` and `CALL`: the target in the syllable (always taken).
- `BR` and `BRF`: the target if the Smith predictor's counter for this bundle
  address is 2 or 3, otherwise the sequential address.
- `RET`: not predicted; the sequential address is used.
- Everything else: the sequential address, `pc + length`.

Sequential code and correctly predicted taken branches therefore run without
bubbles.

The execute stage compares the real next address with the predicted one.
When they differ, `pipe_ctrl` redirects fetch and the bundle being aligned is
squashed. A misprediction costs one cycle. The same redirect path starts a
thread.

## Execute stage and instruction set

The pipeline has three stages:

1. IRAM read.
2. Align.
3. Execute.

In the execute stage, all syllables of the bundle read the register file,
compute, and write back together at the end of the cycle. Nothing is written
back later, so no forwarding is needed. Every syllable sees the register values
from before the bundle (VEX semantics). If two slots write the same register,
the higher slot wins.

A bundle with a memory syllable stays in execute until the LSU reports
`done`. A bundle with a create or join syllable stays until the thread
controller acknowledges. Fetch is held meanwhile.

Slot rules:

- Any slot can hold ALU, compare and select syllables.
- Only slot 1 has the multiplier. `MUL` or `MULH` in another slot writes
  nothing.
- Memory, control and thread syllables must be in slot 0.

Syllable fields (see `bt_pkg.sv`):

| Bits | Field |
|---|---|
| 31 | stop bit |
| 30:25 | opcode |
| 24:19 | `dst`: destination register; branch register in 21:19; store data register |
| 18:13 | `src1` |
| 12:0 | 13-bit immediate. Sign-extended for `ADDI` and compares; zero-extended for logic ops and shift amounts. |
| 5:0 | `src2`, for register forms |
| 8:6 | branch register of `SLCT` |
| 18:0 | branch target (syllable address), or the upper 19 bits for `MOVHI` |

Operations:

- **ALU:** `ADD SUB AND OR XOR SHL SHR SRA MIN MAX`, and the immediate forms
  `ADDI ANDI ORI XORI SHLI SHRI SRAI`.
- **Constants:** `MOVHI`, followed by `ORI`, builds a 32-bit constant.
- **Compares into general registers:** `CMPEQ CMPLT CMPLTU`.
- **Compares into branch registers:** `BCMPEQ BCMPNE BCMPLT BCMPLTU BCMPLTI
  BCMPNEI`.
- **Select:** `SLCT`, `dst = b ? src1 : src2`. This is the partial
  predication the core uses.
- **Multiply:** `MUL` and `MULH`, the low and high halves of the signed
  product.
- **Memory:** `LDW LDHU LDBU STW STH STB`, at address `src1 + imm`.
- **Control:** `GOTO CALL RET BR BRF`. `CALL` and `RET` use `$r63`.
- **Threads:** `TCREATE TJOIN TEXIT TSELF`.

Register `$r0` reads as zero. A newly started thread finds its argument in
`$r3`.

## Shared data memory (`strmem`)

Every core has exactly one memory channel. The host port is one more client of
the same crossbar.

Words are interleaved over the banks: the bank is the word address modulo
`NBANKS`. Each bank has one port and a round-robin arbiter:

- In each cycle, a bank serves at most one client.
- A client that loses keeps its request up and its core stalls.
- A client that keeps asking is served within `NCLIENTS` cycles.

The handshake for each client:

- `req`, with `we`, `be`, `addr` and `wdata`, stays up until `gnt`. The access
  happens in the grant cycle.
- For a read, the word comes back with `rvalid` one cycle after the grant.

`conflict_cycles` counts the client-cycles lost to bank conflicts.

These conflicts are why performance depends on the bank count. Eight cores
that keep hitting one bank are serialised, and adding banks brings the speed-up
back towards linear.

## Hardware threads (`thread_ctrl`)

| Syllable | Operands | Effect |
|---|---|---|
| `TCREATE d, a, b` | `a` = start address, `b` = argument | Starts the lowest-numbered uncommitted core at `a` with `$r3 = b`, and writes the core number to `d`. If no core is free, writes -1 at once. The caller can then run the work itself. |
| `TJOIN a` | `a` = thread id | Stalls until core `a` is uncommitted. Completes at once for an invalid id or the caller's own id. |
| `TEXIT` | | The core stops fetching and becomes uncommitted. |
| `TSELF d` | | Writes the core number to `d`. |

The thread controller serves one create per cycle, chosen round robin among
the cores asking. It serves any number of joins in the same cycle.

The host starts the main thread on core 0 with `host_start`. `host_done`
pulses when core 0 executes `TEXIT`.

A refused create returns -1 at once instead of waiting for a free core. With
this choice, a program can create more threads than there are cores without
deadlocking.

## Host port and running a program

The host port works as follows:

1. Write the program with `host_iram_we`, one syllable per cycle, at syllable
   address `host_iram_addr`. `host_iram_mask` selects which cores' IRAMs are
   written; usually all cores run the same binary.
2. Put the data in through `host_m_*`. This port has the same
   request/grant/rvalid handshake as a core's memory port.
3. Pulse `host_start` with `host_pc` and `host_arg`.
4. Wait for `host_done`, then read the results back through `host_m_*`.

`perf[i]` exposes each core's counters:

- cycles running;
- bundles committed;
- memory stall cycles;
- thread-wait cycles;
- line-crossing stalls;
- mispredictions.

`threads_created`, `threads_refused` and `conflict_cycles` are system-wide.

`tb/tb_asm_pkg.sv` has a small bundle assembler, and `tb/tb_ippg_host.sv` is a
host model with a complete program that uses it: it loads the program and the
data, starts core 0, waits for `host_done` and reads the results back.

## Parameters

| Parameter (top) | Default | Meaning |
|---|---|---|
| `ISSUE_WIDTH` | 4 | Syllables per bundle; also ALUs per core. Must be a power of two, at least 2. |
| `NCORES` | 8 | Cores |
| `NBANKS` | 8 | Data memory banks |
| `IRAM_BYTES` | 131072 | IRAM per core |
| `DMEM_BYTES` | 262144 | Shared data memory |
| `BP_ENTRIES` | 256 | Predictor counters per core |

The defaults are the largest configuration of the original performance study:

- 4-wide issue;
- 8 cores;
- 8 banks;
- memory sizes from the FPGA prototype: 128 KB IRAM per core, 256 KB shared.

The standard-cell study used different settings: a 64 KB IRAM per core and
one 128 KB bank shared by up to eight 2-wide or 4-wide cores
(`IRAM_BYTES=65536`, `NBANKS=1`, `DMEM_BYTES=131072`).

The study extrapolated that real time needs about 19 cores and 19 banks. That
is a parameter setting here and has not been simulated.

## What departs from the original design

| Topic | Original design | This implementation | Why |
|---|---|---|---|
| Core pipeline | 8 stages | 3 stages | The original stages are not described. Cycle counts are therefore not comparable with the original's. |
| Instruction set | VEX-programmed; exact subset unknown | A compact VEX-like encoding of this design's own | Binaries from the original toolchain do not run here. |
| Register counts and slot rules | Not specified | 64 general registers, 8 branch registers, multiplier in slot 1, memory/control/thread syllables in slot 0 | Own choice |
| Single-cycle multiply | Not specified | The multiply completes in one cycle | Own choice |
| Predictor | 2-bit saturating counters (Smith) | Same scheme; 256 untagged entries per core | Size and indexing are own choices. |
| Memory interleaving, arbitration, handshake | Not specified | Word interleaving, round robin per bank, request/grant | Own choice |
| Thread primitives | Named only | The create/join/exit/self behaviour described above | Own choice |
| Floating-point datapath | Optional per cluster | Not built | Absent from every evaluated configuration; its operations are not described. |
| Instruction cache | Alternative to the IRAM | Not built | Not used by the evaluated systems. |
| Multiple clusters per core | Supported | Not built; one cluster | |
| Host debug handshake of the pipeline controller | Present | Not built | |
| Load/store channels | Up to `ISSUE_WIDTH` memory operations per bundle; the evaluated systems have one channel | One channel, slot 0 only | Follows the evaluated systems. |
| Test workload | 64-point FFT of every pixel over 2 s of frames; power of the bin at the pulse frequency | The testbenches compute only that bin, as a direct DFT sum with a Q12 table, on a 64-pixel, 64-frame image | Only the one bin enters the perfusion map; the program is software and does not change the hardware. |
| Host side (soft processor, system bus, DDR3 controller, camera interface) | Present | Replaced by the plain host port | |

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_smith_bp` | Counters against a model under random updates; saturation |
| `tb_iram` | Random line reads against written syllables; output hold |
| `tb_ife` | 300 random-length packed bundles under random back-pressure: addresses, masks, syllables. Exactly one bubble per line-crossing bundle. Zero-bubble `GOTO`. Redirect squash. `BR` before and after training. `halt`. |
| `tb_score` | 3000 random bundles over all ALU, compare, select and multiply operations, every register against a model. Branch resolution, `CALL`/`RET`, loads, `TSELF`, `TCREATE` result, thread argument. |
| `tb_lsu` | Random loads and stores of every size against a delayed-grant memory: lanes, enables, zero extension, `done` timing |
| `tb_strmem` | 5 clients on 4 banks, random traffic with hot spots, 20000 cycles. All read data against a model. One grant per bank per cycle. No starvation. Read latency. Conflict counter. |
| `tb_thread_ctrl` | Host start; creates filling cores in order; refusal; join waiting for exit; invalid and self joins; simultaneous creates; counters |
| `tb_pipe_ctrl` | Stall, commit, redirect and exit sequencing; every counter |
| `tb_le1_cpu` | One core running a dot-product loop, `CALL`/`RET`, select, byte access and create, with random memory delays. Memory results checked. Exactly 95 bundles and exactly 3 mispredictions (first loop iteration, loop exit, `RET`). |
| `tb_biothreads_top` | The full multiprocessor at default parameters, running the perfusion-map kernel described below |
| `tb_biothreads_cfg` | The same kernel on four smaller systems side by side (see below) |

The `tb_biothreads_top` run:

- **Image and kernel:** 64 pixels, 64 frames, frequency bin 3, Q12 cosine and
  sine table.
- **Threads:** 10 work partitions on 8 cores. This forces one refused create,
  core reuse and join waits.
- **Result check:** every pixel of the power map is compared with a map the
  testbench computes itself.
- **Mechanism check:** the testbench fails if any of these never happened:
  bank conflicts, memory stalls, line-crossing stalls, mispredictions, join
  waits, a refused create.
- **Typical figures:** about 7500 cycles, about 2800 conflict cycles, and
  9 threads created with 1 refused. Exact numbers depend on the random data.

The `tb_biothreads_cfg` run uses four configurations, each with one partition
more than it has cores:

| Config | Width | Cores | Banks | IRAM per core | Data memory | Typical cycles | Conflict cycles |
|---|---|---|---|---|---|---|---|
| 0 | 2 | 2 | 1 | 64 KB | 128 KB | 35600 | 4 |
| 1 | 4 | 2 | 2 | 128 KB | 256 KB | 24800 | 22 |
| 2 | 4 | 4 | 1 | 128 KB | 256 KB | 17200 | 9800 |
| 3 | 4 | 4 | 4 | 128 KB | 256 KB | 15100 | 1300 |

Config 0 has the memory sizes of a standard-cell build. Its program is the
same one, cut into bundles of at most two syllables. The testbench checks
every power map, and it checks three trends:

- more cores run faster (1 against 3);
- more banks run faster and have fewer conflicts (2 against 3);
- 4-wide cores run faster than 2-wide ones (0 against 1).

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/bt_pkg.sv tb/tb_asm_pkg.sv tb/tb_biothreads_top.sv \
    --top-module tb_biothreads_top
./obj_dir/Vtb_biothreads_top
```

The same command works for the other testbenches. Name the testbench and its
top module instead. Verilator finds the RTL modules in `rtl/` by name.

The top-level run takes about 15 seconds, including the Verilator build.

## Known limits

- **Slot rules:** the syllable slot rules (multiplier in slot 1;
  memory/control/thread syllables in slot 0) are not checked by hardware. A
  misplaced syllable is silently ignored.
- **Alignment:** misaligned word and half-word accesses ignore the low address
  bits.
- **Create arguments:** `TCREATE` passes only one argument.
- **Stacks:** threads share the data memory with no per-thread stack set-up.
  Software places its own data.
- **Register file:** the register file has a reset and is built from
  flip-flops, which suits simulation and FPGA synthesis. A standard-cell
  implementation would use a multi-ported register file macro instead.
