# AoC: an array of small stream processors for real-time analytics

The design is an analytics accelerator built for an FPGA next to an embedded
host CPU. It does not hard-wire each algorithm into gates. Instead it lays
down many copies of a tiny programmable processor, the **Nanocore**, and
deals an incoming data stream out over them. A Nanocore has no caches and no
interrupts. Its only connections to the outside are:

- a blocking input FIFO;
- a blocking output FIFO;
- a memory-mapped control port through which the host loads its program,
  starts, pauses, resets and inspects it.

A core stalls by itself when its input is empty or its output is full, so the
host never schedules individual cores. It programs them, sets up how the
stream is split, and pushes data through. Because the cores are programs,
the same bitstream can serve a new analytics kernel after a few hundred
control-port writes.

The RTL here contains:

- the Nanocore and each of its parts;
- the scatter and gather units that split and join the stream;
- the AXI4-Lite bridge to the host;
- a start-up controller that loads a binomial option-pricing kernel into
  every core.

The top is `aoc_top`. It is SystemVerilog 2017 and synthesizable. Its
default size is 8 cores with 64-bit data ("AoC-8").

## 1. The Nanocore

```
             sys_clk side                 |            clk side
 control bus -> nc_ctrl_regs (run/reset) -+-> sync -> sequencer (pc, cnt)
             -> nc_imem port A            |            nc_imem port B -> decode
             -> nc_scratch port A         |            nc_scratch port B <-> MEMR/MEMW
 stream in  -> nc_fifo (input)  ----------+----------> RI write port of nc_regfile
 stream out <- nc_fifo (output) <---------+----------- RO read port of nc_regfile
                                          |            nc_regfile RA/RB -> nc_alu -> RD
```

### 1.1 One word, up to four operations

An instruction is one 32-bit word. A word may carry these operations side by
side:

- an input read (a FIFO word goes into register RI);
- an output write (register RO goes to the output FIFO);
- **either** a constant load / jump **or** one register operation.

```
format A  [31:28] class  [27] in_en [26] out_en [25:12] const14 [11:8] dest [7:4] RO [3:0] RI
format B  [31:28] 0000   [27] in_en [26] out_en [25:20] op [19:16] RD [15:12] RB [11:8] RA [7:4] RO [3:0] RI
```

| format A class | meaning |
|---|---|
| `F` LDC | R[dest] = sign-extended const14 |
| `E` JMP | pc = const14 |
| `D` JEQ | pc = const14 if R[dest] == 0 |
| `C` JNE | pc = const14 if R[dest] != 0 |

Format B operations (`op`):

| op | name | op | name | op | name |
|---|---|---|---|---|---|
| 0 | NOP | 6 | CMPGT (unsigned) | 12 | AND |
| 1 | MEMW scratch[RA] = RB | 7 | CMPLT (unsigned) | 13 | XOR |
| 2 | MEMR RD = scratch[RA] | 8 | SCMPGT (signed) | 14 | ADD |
| 3 | SHL RD = RA << RB | 9 | SCMPLT (signed) | 15 | SUB |
| 4 | SHR (logical) | 10 | INV | 16 | MUL (low half, signed) |
| 5 | SRA (arithmetic) | 11 | OR | 17 | MULH (high half, signed) |

Compares write 1 or 0. The encoder and decoder functions (`enc_a`, `enc_b`,
`decode`) are in `rtl/nc_pkg.sv`. Programs in the testbenches and the
pricing kernel are written with them.

### 1.2 Timing: every word takes a fixed number of cycles

The core is not pipelined across words. A word holds the core for a fixed
number of `clk` cycles:

| part of the word | cycles |
|---|---|
| NOP, JMP, LDC | 1 |
| input read | 4 |
| output write | 2 |
| MEMW / MEMR | 6 / 3 |
| JEQ / JNE | 3 |
| shift, compare, logic, ADD, SUB | 5 |
| MUL | 8 |
| MULH | 9 |

A word with several parts takes the **largest** of their delays, because the
parts run side by side.

Within a word:

- Operands are read at the start of the word.
- All results land on the word's last cycle. These are the registers, the
  scratch write, the FIFO push and pop, and the program counter.
- The next word is fetched on that same edge, so there is no fetch bubble.

It follows that every operation in a word sees the register values from
before the word. For example, `IN R1 ; OUT R1` sends out the *old* R1.

Blocking happens only in the first cycle of a word. If the word reads the
input and the input FIFO is empty, or writes the output and the output FIFO
is full, the cycle counter does not start. The core waits, and the status
register shows which FIFO it is waiting on.

The ALU (`nc_alu`) is purely combinational. The multi-cycle delays come from
the sequencer's counter, not from pipeline registers inside the DSP
multipliers. A synthesis flow should be told that ALU paths are multicycle,
or the ALU should be retimed. See section 6.

### 1.3 Storage

- **Register file** (`nc_regfile`): 16 registers of `DATA_W` bits. It has
  three read ports (RA, RB, RO) and two write ports: the input read and the
  operation result. If both write the same register, the operation wins.
  R0 is an ordinary register.
- **Instruction memory** (`nc_imem`): 1024 words of 32 bits. It is true
  dual-port with two clocks. The host writes it on `sys_clk` and the core
  fetches on `clk`. It resets to all NOPs.
- **Scratch memory** (`nc_scratch`): 512 words of `DATA_W`, true dual-port
  with two clocks. The core uses it through MEMR and MEMW, and the host can
  read or write it at any time. Both ports write the same array from
  different clocks, which is how a dual-clock block RAM works. Lint tools
  therefore report the array as driven from two processes.
- **FIFOs** (`nc_fifo`): one input and one output FIFO, each 512 words deep.
  They are asynchronous FIFOs with Gray-coded pointers. The read side is
  show-ahead and exports a word count, which the core uses to block.
  `ready = !full` on the write side.

### 1.4 The two clocks

The cores run on `clk`. Everything the host and the streams see runs on
`sys_clk`. The domains meet in exactly three kinds of place:

- the dual-clock memories;
- the FIFOs;
- the two-flop synchronisers of the control registers.

The cores can therefore run faster than the data streams. The testbenches
use 250 MHz for `clk` and 100 MHz for `sys_clk`. Assert both resets together.

### 1.5 Control registers of a core

Each core decodes a 12-bit word address on its control bus:

| addr[11:10] | region |
|---|---|
| 0 | instruction memory (word index in [9:0]) |
| 1 | scratch memory (word index in [8:0]) |
| 2 | control registers: 0 CTRL, 1 STATUS, 2 WORDS |

- **CTRL**: bit 0 is `run`. Clearing it freezes the core in place, even in
  the middle of a word, and setting it again resumes. Bit 1 is `reset`:
  while it is set, the core holds at pc 0 with all registers cleared.
- **STATUS** (read-only): bit 0 running, bit 1 blocked on empty input, bit 2
  blocked on full output, bits [31:16] pc.
- **WORDS** (read-only): the number of words retired since reset.

Multi-bit status crosses domains through simple synchronisers. It is exact
only when the core is stopped.

To reprogram a running core:

1. Write CTRL = 2 (reset).
2. Write the instruction memory.
3. Write CTRL = 1 (run).

The FIFOs are not cleared by a core reset. Only the hard reset clears them.

## 2. The array: splitting and joining the stream

`nc_scatter` deals the input stream out in **bursts**: `in_burst` words to
core 0, the next `in_burst` to core 1, and so on round-robin over the first
`ncores` cores. If the stream's last word (`tlast`) arrives part-way through
a round, the unit goes on sending the **pad word** until every active core
has had a full burst. A kernel therefore always sees whole work items.

`nc_gather` collects `out_burst` words from each core in the same
round-robin order. It forwards the first `total` words of the batch and
raises `tlast` on the last of them. Any further words in that round come
from pad inputs, so it takes them from the cores and throws them away.
At the end of the round it pulses `batch_done` internally.

With the **replicate** bit set, the scatter unit instead copies every input
word to all active cores. This suits kernels that each need the whole
stream, such as several different analyses of the same data. Each core takes
its copy as soon as it is ready. A per-core record of who already has the
word stops a core from taking it twice. The input word is accepted once
every active core holds it. Bursts and padding play no part in this mode.
The gather unit still joins the results round-robin.

Two rules follow for a kernel that uses padding:

- A pad burst made entirely of copies of the pad word must be a valid input
  item.
- It must produce exactly `out_burst` results, like any other item.

The pricing kernel meets both rules when the pad word equals the step
count n.

## 3. The control port and the fabric registers

The host sees one AXI4-Lite slave with 64-bit data. AXI4-Lite may present a
read and a write in the same cycle, but the fabric has one control bus.
`axil_ctrl_bridge` therefore serialises them:

- While one transfer is in flight, the other channel is not accepted.
- On a same-cycle collision, the write goes first.

Responses are always OKAY and write strobes are ignored.

Word address = AXI byte address / 8. The word address has
`TAW = 13 + log2(N_CORES)` bits; with 8 cores it is 16 bits, bits [15:0].

| word address | meaning |
|---|---|
| `0 | core<<12 | a` | core `core`, local address `a` (section 1.5) |
| `1<<(TAW-1) | 0` | number of active cores (1..N_CORES) |
| `… | 1` | input words per core per round (`in_burst`) |
| `… | 2` | output words per core per round (`out_burst`) |
| `… | 3` | result words in the batch (`total`) |
| `… | 4` | pad word |
| `… | 5` | write bit 0 = GO; read `{done, state[1:0]}` |
| `… | 6` | bit 0 = replicate the input stream to all active cores |

With the defaults, core 3's STATUS is at byte address
`((3<<12)|(2<<10)|1) << 3` = `0x1_C008`. The GO register is at
`((1<<15)|5) << 3` = `0x4_0028`.

## 4. Start-up controller and the option-pricing kernel

`bop_ctrl` is a four-state machine on `sys_clk`:

- **INIT**: after reset, the controller owns the control bus. It writes the
  27-word kernel from `bop_pkg` into every core, one word per cycle, and
  then sets each core's run bit. The cores wait, blocked on their empty
  input FIFOs.
- **IDLE**: waits for GO. The input stream is held back (`tready = 0`).
- **SEND**: lets the input stream through to the scatter unit until the word
  marked `tlast` has been taken.
- **WALK**: waits until the gather unit has sent the batch's last result,
  then raises `done` and returns to IDLE.

The bridge does not accept host transfers during INIT. After that, the host
owns the bus and can rewrite any core.

**The kernel** prices one European option per work item with the backward
walk of a binomial tree in signed fixed point. Option values are Q33.31
(31 fractional bits). The two weights are Q1.63, which works because both
are below 1. Its input item is:

- `n`, the step count;
- `a = e^(-r·dt)·p_d`;
- `b = e^(-r·dt)·p_u`;
- the `n+1` option values at the leaves.

Computing these is the host's job. The core stores the leaves in scratch and
applies `S[j] = a·S[j] + b·S[j+1]` for each level. It then outputs `S[0]`:
one result per item.

With these formats, one MULH gives `a·S` with 30 fractional bits. A node
therefore takes two MULH, one ADD and a left shift by one. The inner loop is
11 words:

- two memory reads;
- two MULH;
- ADD and SHL;
- a memory write;
- two index increments;
- a compare and the loop jump.

Setup per batch:

- `in_burst = n + 4`
- `out_burst = 1`
- `pad = n`
- `total` = number of options

The kernel costs **58 core cycles per tree node**. The limit is
`n ≤ 511`, because the n+1 leaves must fit in the 512-word scratch.

## 5. Simulating

Any Verilator 5 works. Packages are listed first, and the rest is found
through `-Irtl`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
    rtl/nc_pkg.sv rtl/bop_pkg.sv tb/tb_aoc_top.sv --top-module tb_aoc_top
./obj_dir/Vtb_aoc_top
```

Swap in any other testbench name in the same way. `tb_bop_workload` also
needs `-Itb`, so that its helper `tb/bop_bench.sv` is found.

`-Wno-fatal` is needed for two reasons:

- The testbenches have width warnings.
- The scratch memory's two write ports are reported as MULTIDRIVEN.

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog counts a failure if it hangs.

| testbench | what it checks |
|---|---|
| `tb_nanocore` | every operation against a software model, the exact cycle count of every word kind, blocking on empty input and full output, pause/resume, reset |
| `tb_nc_alu` | random and corner operands against a reference for every operation, at 64 and 32 bits |
| `tb_nc_regfile`, `tb_nc_imem`, `tb_nc_scratch` | random traffic against models, including both clocks |
| `tb_nc_fifo` | random pushes and pops on unrelated clocks; order, full/empty and count |
| `tb_nc_ctrl_regs` | run/reset/status crossing |
| `tb_nc_scatter`, `tb_nc_gather` | burst order, padding, replication, pad-result drop, `tlast`, `batch_done` |
| `tb_axil_ctrl_bridge` | random overlapping reads and writes; write priority, no lost transfers |
| `tb_bop_ctrl` | INIT load contents, the state sequence, the gating |
| `tb_aoc_top` | the whole fabric at its default size, described below |
| `tb_bop_workload` | AoC-8 with 8 options of 511 steps (the largest tree that fits), and AoC-32 with 32 options of 127 steps |

`tb_aoc_top` drives the whole fabric at its default size. It:

- boots the fabric;
- prices 17 options of 24 steps, which forces padding and dropping;
- makes a read and a write collide on the control port;
- reprograms core 0 as an echo and makes it block on a full output FIFO;
- loads a copy program into two cores and replicates a stream to both.

It counts that each of these mechanisms happened. Prices are compared
bit-exactly with a fixed-point model and within 1e-6 of floating point. It
runs in under a second.

`tb_bop_workload` takes under two minutes. It uses the helper `bop_bench`,
a complete pricing run at any fabric size, and runs two instances side by
side. At 511 steps it reports about 7.6 M core cycles per option, which is
58 cycles per tree node. The floating-point tolerance there is 5e-6, because
truncation builds up over 511 levels.

To write a new kernel, build the words with `nc_pkg::enc_a` and
`nc_pkg::enc_b`, load them through the control port, and set the fabric
registers.

## 6. Where this design departs from the published architecture

The architecture this RTL implements was published as a research prototype.
The following points differ from it, or fill gaps it leaves open.

**Instruction set and encoding**

- The published instruction set has 26 instructions, but only 24 are named.
  Those 24 are built. Opcodes 18–63 are unused.
- The bit positions, field widths and opcode values are this design's own.
  Only the order of the fields follows the published word layout.
- A jump and a constant load share the constant field here, so they cannot
  sit in the same word.
- The conditional jumps test a register for zero or non-zero.
- The delays are the published ones for the 32-bit configuration. The same
  delays are used for 64-bit data.

**Pipeline and multiplier**

- The execute units are combinational, with the delays counted by the
  sequencer. The published core maps them onto pipelined DSP slices, and
  this RTL does not model those pipelines.

**Stream routing**

- The scatter and gather flow units are built, and stream replication is a
  mode of the scatter unit. The published design also names a unit for
  routing data between cores. Its form is not specified, and it is not
  built.

**Performance and capacity**

- The published pricing kernel is not available. The one here is this
  design's, and it is slower. Published AoC-8 figures imply about 18 core
  cycles per node, against 58 here.
- Because the leaves are kept in one core's scratch, trees are limited to
  511 steps. The published evaluation ran 4000–7000 steps.

**Resets**

- A core reset does not clear that core's FIFOs.

**Scaling**

- A 32-core build (AoC-32) is `aoc_top #(.N_CORES(32))`. The core-select
  field then has 5 bits, and the fabric registers move to word address bit
  17. This build is simulated by `tb_bop_workload`.

**Not part of the RTL**

The host CPU, the DMA/memory controller, DRAM, Ethernet, the host-side
messaging stack and the compiler are not part of the RTL. Their connections
appear as the AXI4-Lite and AXI-Stream-style ports of `aoc_top`.

## 7. How far to trust it

- Every block has its own self-checking testbench. For each one, a version
  with a deliberately planted bug was shown to fail that testbench.
- The full fabric is checked end to end at its default size.
- Cycle counts per word are checked exactly against the delay table.
- Clock-domain crossings are checked only in simulation with unrelated clock
  ratios. No formal CDC analysis has been done.
- The 32-bit configuration is `DATA_W = 32`. The ALU is tested at both
  widths, and the core passes lint at 32 bits, but only the 64-bit core is
  simulated end to end.
- The design has not been run on an FPGA or timed by a synthesis tool.
