# Rapid: a coarse-grained reconfigurable array in SystemVerilog

Rapid is a way to get close to ASIC efficiency for streaming, highly parallel
kernels (filters, sums of differences, transforms) while staying
programmable. Instead of a processor that decodes a wide instruction for every
operation, Rapid lays out a row of word-wide function units (ALUs,
multipliers, shifters, registers, small RAMs) along a set of segmented buses.
Most of what the datapath does is fixed by *configuration*. Only a small
number of *soft* control signals change from cycle to cycle, and those come
from a narrow instruction through a configurable decode. A small sequencer
with its own scalar RISC datapath runs the loops and the scalar code.
Decoupled stream ports move data between memory and the array.

This repository holds a complete, synthesizable instance of that
architecture. It has one controller and a datapath of ten unit outputs over
nine bus segments. It also has self-checking testbenches for every block and
for the whole array.

## The array at a glance

```
            +-----------------------------------------------------------+
 prog_* --> | sequencer (PC, instr. memory, loop stack, packet repeat)   |
            |   risc_datapath (16 x 16-bit regs, ALU, Z/N/C)             |
            +----+--------------+--------------+------------+-----------+
                 | 24 instr bits| R15 write    | R15 read   | status branch
                 v              v              ^            ^
            ctrl_network     r2d FIFO       d2r FIFO     status FIFO (1 bit)
            (decode, LUTs,      |              |            |
             offsets)           |              |            |
                 | 25 soft      v              |            |
                 v  controls                   |            |
  in0 stream -> +---------------------------------------------+ -> out0 stream
  in1 stream -> | rapid_datapath: RAM ALU0 REG0 MULT ALU1 SHIFT REG1 |
                |   9 bus segments / 4 tracks / 2 bus connectors    |
                +---------------------------------------------+
  cfg_regs (60 used words) drives the hard controls, bus/input selects and the decode.
```

| Module | Role |
|---|---|
| `rapid_top` | The whole array. It also holds the RISC address decode and the stall logic. |
| `sequencer` | Fetches instructions, issues packets, loop stack, branches, loads and stores. |
| `risc_datapath` | Register file, ALU and condition codes of the scalar RISC. |
| `ctrl_network` | Configurable decode from instruction bits and status to soft controls. |
| `cfg_regs` | Configuration memory. The RISC reads and writes it. |
| `rapid_datapath` | The unit row and its bus network. |
| `data_network` | Generic segmented-bus multiplexer network with bus connectors. |
| `fu_alu`, `fu_mult`, `fu_shift` | Function units. Each output register is optional. |
| `dp_reg`, `dp_ram` | Register, and RAM / variable-length shift register. |
| `stream_in`, `stream_out` | Memory stream ports, decoupled or coupled. |
| `addr_gen` | Nested-loop address program that emits address packets. |
| `packet_unroll` | Expands a packet (start, stride, count) into single addresses. |
| `sync_fifo` | The FIFO used for the RISC links, the status FIFO and the stream buffers. |
| `rapid_pkg` | Widths, encodings, configuration layout, and instruction-builder functions. |

Data words are 16 bits and instructions are 32 bits. Everything runs on one
clock with an active-low reset.

## Hard control, soft control and the decode

Every control input in the datapath is one of two kinds:

* **Hard**: a bit of `cfg_regs`, changed only by reconfiguration. This covers
  every bus and input multiplexer select, whether each function unit has an
  output register, the RAM mode and length, which flag feeds the status
  FIFO, and whether each stream port is coupled.
* **Soft**: may change every cycle. There are 25 soft signals (`C_*` in
  `rapid_pkg`): stream reads and writes, FIFO reads and writes, status push,
  ALU operations, write enables, multiplier half select, shift direction and
  mode, RAM write and read, and the address pushes of coupled input
  streams.

Soft signals are not wired to fixed instruction bits. `ctrl_network` builds a
set of *decode lines*:

- line 0 is constant 0;
- lines 1..24 are the 24 instruction bits;
- the next 6 lines are the ALU status flags;
- the next 4 lines are the registered LUT outputs;
- the last 4 lines are the combinational LUT outputs.

Each soft signal has a configuration word (`ctrl_cfg_t`) that picks one line
with `sel`. Several signals can therefore share one instruction bit. In the
end-to-end test, a single bit drives both stream reads and the subtractor's
write enable.

Each signal has three further options:

* **Offset** (`dly`, 0–3 cycles). The chosen value passes through a short
  delay line, so it acts that many datapath cycles after the instruction.
  This is how a pipelined computation uses one instruction bit at several
  stages. The delay lines only advance when the datapath does, so offsets
  stay aligned across stalls.
* **Constant** (`cst`, `cval`). The signal is tied to a value and uses no
  instruction bit at all. This is the "soft-configured" case: a soft signal
  that happens not to change in this program.
* **LUTs**. There are four 3-input LUTs (`lut_cfg_t`, two configuration words
  each). Each LUT picks its inputs from ground, instruction, status and
  registered-LUT lines. The registered output of a LUT can feed back as its
  own input, which makes small FSMs (toggle flags, parity). The
  combinational output lets status steer control in the same cycle. The
  end-to-end test uses this to turn "subtract" into "absolute difference":
  the accumulator adds or subtracts depending on the sign of the difference.
  LUTs may not read combinational LUT outputs, so the decode has no loops.

## Instructions and the sequencer

An instruction word is either:

```
Rapid:  [31]=1  [30:24] repeat count   [23:0] datapath instruction bits
RISC:   [31]=0  [30:26] opcode  [25:22] rd/cond  [21:18] rs  [17:14] rt  [15:0] imm
```

RISC opcodes (`risc_op_e`):

- ALU: ADD, SUB, AND, OR, XOR, SLL, SRL and ADDI.
- Memory: LD and ST, addressed `rs + imm`.
- Branch: BR with condition Z/NZ/N/NN/C/NC, or ST/NST, which pops the status
  FIFO.
- Loops: LOOP (count in `rs`) and LOOPI (10-bit count in [25:16]). Both take
  the last instruction of the body in `imm`.
- Calls: CALL and RET.
- HALT.

The functions `i_rapid`, `i_r`, `i_i`, `i_br`, `i_loopi`, `i_loop`, `i_call`,
`i_ret` and `i_halt` in `rapid_pkg` assemble these words.

**Packets and overlap.** A Rapid instruction with repeat count *r* holds its
24 bits on the decode for *r*+1 datapath cycles. The sequencer does not wait
for the packet to finish. It moves straight on, so the RISC instructions that
follow (loop bookkeeping, a store of the last result) run while the datapath
repeats. A further Rapid instruction waits until the running packet is in its
last cycle. That gives back-to-back packets with no gap. Cycles with no packet
drive all-zero bits, which are a NOP for any sensible decode configuration.

**Loop stack.** LOOP/LOOPI push a frame holding the count, the first pc and
the last pc of the body. The hardware then handles the end of the loop: after
the instruction at the last pc it counts down and jumps back, with no branch
instruction. When the count runs out, the frame is popped. An enclosing loop
that ends on the same pc is checked on the next cycle. CALL pushes the return
address on the same stack and RET pops it. Registers are not saved, so a call
behaves like shared inline code. The stack is 8 deep. Overflow and underflow
are assertion errors.

**FIFO register.** Register 15 is not storage:

- Writing R15 pushes into the RISC→datapath FIFO (`r2d`), which the datapath
  reads as a unit output.
- Reading R15 pops the datapath→RISC FIFO (`d2r`).
- The sequencer waits while the FIFO it needs is full or empty.

A status branch likewise waits until the status FIFO has a bit. The RISC
therefore never needs to know the datapath's pipeline latency.

**Loads and stores** go out one at a time, uncached. The 16-bit RISC address
space is:

| Address | Target |
|---|---|
| `0x0000–0x7FFF` | external memory (`mem_*` port of the top) |
| `0x8000–0x81FF` | instruction memory, 16-bit halves (odd address = upper half), write only |
| `0x9000 + i` | configuration word *i* (read/write) |
| `0xA000 + 64·g + k` | word *k* of address generator *g* (0 = in0, 1 = in1, 2 = out0); reads return `{out0,in1,in0}` idle flags |

The array configures itself and can load new programs: a RISC program copies
configuration words from memory with LD/ST pairs.

## Configuration layout

| Words | Contents |
|---|---|
| 0–24 | `ctrl_cfg_t` of soft control 0..24 |
| 25–32 | LUT 0..3, low word then high word of `lut_cfg_t` |
| 33–41 | driver of bus 0..8: 0 = undriven (zero), 1..10 = unit output 0..9, 11+j = bus j |
| 42–58 | bus read by unit input 0..16: 0 = zero, j+1 = bus j |
| 59 | misc: `[3:0]` output register on for alu0, alu1, mult, shift; `[4]` RAM shift-register mode; `[9:5]` RAM shift length−1; `[12:10]` flag pushed to the status FIFO; `[15:13]` coupled mode for out0, in1, in0 |

Unit outputs (sources) are, in order: in0, in1, r2d, ram, alu0, reg0, mult,
alu1, shift, reg1.

Unit inputs are, in order: ram_a, ram_b, alu0_a, alu0_b, reg0_d, mult_a,
mult_b, alu1_a, alu1_b, shift_a, shift_b, reg1_d, out0, d2r, and the
coupled-mode addresses in0_addr, in1_addr and out0_addr.

A connection is only legal if the bus segment spans the unit. The network
forces illegal selects to zero. The bus layout is drawn in the header of
`rtl/rapid_datapath.sv`. Tracks 1 and 3 are split in two, with a bus connector
that lets the right half be driven from the left half.

**Configuration hazard.** A function unit whose output register is off is
combinational. If such a unit is routed back to its own input, through a bus
or a chain of other combinational units, the result is a combinational loop.
Any single legal configuration avoids this. A program that rewrites words one
by one can still pass through such a state on the way. The rule is to write
the misc word (output registers) first, and then the bus and input selects.
The datapath header explains why lint tools report a circular path here.

## Stalls

The datapath has one advance signal, `en`. It is low, and the datapath
stalls, whenever any soft control that is active this cycle would do one of
these:

- read an empty source: stream in0/in1 or r2d;
- write a full sink: stream out0, d2r or the status FIFO;
- push an address into the full address queue of a coupled input stream.

A stall freezes every datapath register, the decode delay lines and LUT
state, and the packet repeat count. Nothing needs to be replayed. The RISC
keeps running during a datapath stall until it needs the datapath itself (a
further Rapid instruction, a FIFO access or a status branch). This is the
"turn off all register writes" form of stall, not clock gating.

## Streams and address generators

Each stream port has an **address generator**. It is a small program of up to
16 instructions and runs on its own, with no help from the sequencer:

| Op | Encoding | Effect |
|---|---|---|
| PKT | `[29:20]` count, `[19:12]` signed stride, `[11:0]` signed offset | emit one packet starting at base + offset |
| LOOP | `[29:20]` count, `[5:4]` triangular mode, `[3:0]` last pc | repeat pc+1..last, with a hardware loop end; a 4-deep stack |
| ADDB | `[15:0]` signed delta | add to the base address |
| END | — | stop |

The RISC writes the program in 16-bit halves (words 0–31), sets the base
(word 32) and starts it by writing word 33. It can stop and reload the
program at any time. `packet_unroll` turns each packet into one address per
cycle.

A **triangular loop** (mode 1 or 2) takes its count from the enclosing loop
instead of from the instruction. Mode 1 uses the enclosing loop's iteration
number, so the inner loop runs 1, 2, …, N times. Mode 2 uses the enclosing
loop's remaining count, so it runs N, N−1, …, 1 times. These are the shapes
that walk the lower or upper triangle of a matrix. With no enclosing loop,
the instruction's own count is used.

**Input streams** read ahead. The port counts words buffered plus words
requested, and issues a memory read only while that stays within the buffer
depth (4). Reads therefore never overrun the buffer, and memory latency is
hidden up to that depth. The datapath's read control pops the buffer head.
`empty` is the status that stalls it.

**Output streams** write behind. A write control pushes into a buffer. A
memory write goes out whenever a data word and an address are both present.
`full` stalls the datapath.

**Coupled mode** (misc bits 15:13) bypasses the address generator and lets
the datapath compute the addresses itself:

* For an input stream, the datapath drives the port's address input from a
  bus. A soft control (`C_IN0_AW`/`C_IN1_AW`) pushes that address into a
  two-entry queue, and its full flag stalls the array. The word comes back
  into the same buffer some cycles later and is read with the usual read
  control. The program must place the read far enough after the address. If
  it reads too early, the empty stall simply waits.
* For the output stream, each write control also stores the address on the
  port's address input, next to the data.

The end-to-end test gathers three words this way.

The memory ports are plain valid/ready requests. Read data returns in order,
one or more cycles later. The memory is not part of this design.

## Function units

* `fu_alu`: add, subtract, reverse subtract, AND, OR, XOR, and pass a or b.
  N/Z/C flags are registered on every write and form the datapath status.
  The optional output register is loaded on `we`. With the register off, the
  result is combinational.
* `fu_mult`: signed 16×16 product. The `hi` control selects the upper or
  lower 16 bits.
* `fu_shift`: left, logical right, and arithmetic right shift, by b[3:0].
* `dp_reg`: a register with a write enable. Feeding it back through an ALU
  makes an accumulator.
* `dp_ram`: 32 words. Mode 0 is an addressed memory: a is the address, b the
  data, and reads take one cycle. Mode 1 is a shift register of `len`+1 words,
  built as a circular buffer. Each shift returns the word written `len`+1
  shifts earlier.

## How far to trust it, and departures

What follows the architecture closely:

- soft and hard control with soft constants;
- the decode by selectable instruction bits, LUTs with state, and
  per-signal offsets;
- packets with a repeat count that overlap RISC code;
- hardware loop ends on a loop stack shared with calls;
- the R15 FIFO register, and branches on RISC flags or the status FIFO;
- configuration and instruction memory in the RISC address space;
- segmented buses with bus connectors, and buses driven by buses;
- decoupled stream ports with stack-based address generators that emit
  strided packets, including triangular loops;
- a coupled mode for the memory ports;
- stalls on empty inputs and full outputs.

Everything numeric is this design's own choice, because the architecture
fixes none of it:

- word and instruction field widths;
- the instruction encodings;
- the depths of the instruction memory, the stacks and the FIFOs;
- the number of LUTs and the offset range;
- the unit mix;
- the bus layout.

The unit row is shorter than a full Rapid row: one RAM, two ALUs, one
multiplier, one shifter and two registers.

Not built:

* the 2-D array generalization with vertical bypass buses between rows;
* special RAM addressing for Viterbi or FFT;
* several cooperating controllers for threaded programs;
* multiple configuration contexts;
* a separate port type for direct streaming interfaces (sensors, another
  array). Every port speaks the memory request protocol. A streaming device
  can sit behind it and ignore the addresses;
* a boot ROM. The instruction memory is loaded through `prog_wr/prog_addr/prog_data`
  before `start`, or by the program itself with stores.

Stalls are implemented as frozen register writes, not clock gating.

Every block has a randomized or directed self-checking testbench against an
independent model. The whole array runs one complete application at its
default sizes (below). That is the extent of the verification. No formal
proof and no silicon.

## Simulating

All testbenches are in `tb/`. They print
`TB_RESULT checks=<n> failures=<m>` and finish, and each has a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -Irtl -y rtl -y tb rtl/rapid_pkg.sv tb/tb_rapid_top.sv --top-module tb_rapid_top
./obj_dir/Vtb_rapid_top +verilator+rand+reset+2
```

Replace `tb_rapid_top` with any `tb_<module>` to test one block.
`tb/mem_model.sv` is a behavioural multi-port memory used by the stream and
top-level tests. It has a fixed read latency and random back-pressure.

`tb_rapid_top` runs the array with default parameters. A RISC program:

1. configures the decode, LUT, buses and address generators through stores;
2. computes the sum of absolute differences of 6 blocks of 16 pairs streamed
   from memory, using packets, a status-driven LUT, an offset control and an
   accumulator;
3. reads each block total through the FIFO register and branches on the
   status FIFO;
4. reconfigures two bus segments, passes data from the RISC through the
   datapath and back;
5. switches input stream 0 to coupled mode and gathers three words at
   addresses the RISC passes through the datapath;
6. waits for the output stream to drain, and halts.

The output port is held back for a while so the datapath stalls on a full
output. The test counts each mechanism and fails if any of them never
happened. The mechanisms are input and output stalls, LUT-selected
subtraction, RISC/packet overlap, FIFO waits, both outcomes of the status
branch, packet repeats, bus-connector traffic and coupled-mode address
pushes. The run takes about 650 cycles.

To change the design:

- Sizes are parameters of `rapid_top`.
- Encodings and the configuration layout are in `rapid_pkg`.
- The unit row and bus tracks are localparams at the top of
  `rapid_datapath`. Each bus segment lists its leftmost and rightmost
  position.
