# EMMY emulation laboratory in SystemVerilog

EMMY is a microprogrammed "universal host": a small, fast, neutral machine
meant to imitate other computers (an IBM System/360, an Intel 8080, a
language-directed machine) by running an emulator written in microcode. It
has no fixed instruction set of its own for programs to use. Instead, every
32-bit word of its 4096-word writable microstore can be a microinstruction
or a data word, and the microprogram decides what a target instruction
means. Around the CPU sits a laboratory of units on one shared 32-bit host
bus:
- a 64K-byte main memory that reformats bytes for the target machine;
- a block access controller that pages data between memories;
- external units such as the control processor and console.

This RTL builds the following:
- the CPU with its four internal machines;
- the microstore;
- the host bus with arbitration;
- the main memory;
- the block access controller.

The bus connections of the units that are not built here are brought out
as ports of the top module.

## The microinstruction: two halves, four machines

A microinstruction is split into a 14-bit **TCF** (bits 31..18) and an
18-bit **ACF** (bits 17..0). Each half drives its own machine, so one word
can compute and move data at the same time:

| machine | driven by | does |
|---|---|---|
| T-machine (`emmy_tmachine`) | TCF | logical, arithmetic, shift/rotate, extended-arithmetic steps, field insert/extract; registers only |
| A-machine (`emmy_amachine`) | ACF | register ↔ microstore moves, load immediate, indirect microstore and host bus access, pointer arithmetic with loop test |
| I-machine (`emmy_imachine`) | either half | sequencing: conditional execution, branch, loop, jump |
| host bus machine (`emmy_hbus_machine`) | A-machine, other bus units | overlapped bus accesses for the CPU, slave accesses to the CPU, interrupts |

The halves can be used in several ways:
- **The TCF as a condition.** TCF class 6 is a condition test instead of a
  T operation. Its 8-bit MASK selects condition or indicator bits. Its
  3-bit SPEC chooses three things: "any" or "all" masked bits set, true or
  inverted sense, and condition codes or indicator codes. If the test fails,
  the ACF is skipped. This is how a conditional jump, memory access or bus
  operation is written.
- **The ACF as an operand.** When a T operation sets its I bit, the ACF is
  no instruction at all. It becomes an 18-bit sign-extended immediate
  operand.
- **The ACF as a mask.** Insert and extract always use the ACF as their
  mask descriptor. ACF[9:5] gives the lowest bit and ACF[4:0] gives the
  width minus one.

### TCF formats (`emmy_pkg`)

```
ALU classes 0-3 : cls[13:11] imm[10] opc[9:6] op2[5:3] op1[2:0]
extract/insert  : cls[13:11] pos[10:6]        op2[5:3] op1[2:0]   (cls 4 / 5)
conditional     : cls[13:11] mask[10:3] spec[2:0]                  (cls 6)
no T operation  : cls = 7
```

The T classes work as follows:
- **Logical.** The 4-bit opcode is the truth table of the function:
  `res[i] = opc[{a[i], b[i]}]`. That gives all 16 Boolean functions.
- **Arithmetic.** ADD, ADDC, SUB, SUBC, RSUB, NEG, CMP (codes only) and MOV.
- **Shift.** SLL, SRL, SRA, ROL and ROR, by `b[4:0]` places.
- **Extended steps.** These work on the even/odd register pair
  `(op1 & ~1, op1 | 1)`:
  - MULS: one shift-and-add multiply step;
  - DIVS: one restoring divide step;
  - DECB: one decimal-to-binary step, `hi = hi*10 + next digit of lo`.

Extract and insert rotate `b` left by POS and merge it into `a` under the
ACF mask. Extract clears `a` first.

### ACF formats

```
direct   : cls[17:15] op1[14:12] adr[11:0]                     LOADR 0, STORER 1, LOADI 2, JUMP 7
register : cls[17:15] op1[14:12] op2[11:9] sub[8:6] value[5:0] INDIR 3, PTR 4
branch   : cls[17:15] mask[14:7] spec[6:4] value[3:0]          BRANCH 5
nop      : cls = 6
```

The INDIR sub-codes are:
- MSRD/MSWR: move between `R[op1]` and microstore `M[R[op2]+value]`.
- BUSRD/BUSWR: move between `R[op1]` and the host bus address
  `R[op2]+value`. These are overlapped.
- WAIT: wait until the outstanding bus access has finished.

PTR with sub-code 0 computes `R[op1] = R[op2] + value`. Sub-codes 1..7
decrement instead, `R[op1] = R[op2] - 1`, and test the result. The tests
are ≠0, =0, <0, ≥0, >0, ≤0 and always. If the test passes, `value` is added
to the MAR.

That is how a loop is built in a single word. For example, this word
repeats the multiply step 32 times:

```
T: MULS R2        A: PTR R4 = R4 - 1, if != 0 then MAR += -1
```

JUMP loads MAR from `adr` and, if `op1 ≠ 0`, saves the return address in
`R[op1]`. A return is an insert of that register into the MAR field of
R0.

## Register 0: the state word

There are eight 32-bit registers. Register 0 is the whole machine state:

```
 31      24 23      16 15  12 11           0
+----------+----------+------+--------------+
|    CC    |   IND    |STATE |     MAR      |
+----------+----------+------+--------------+
```

- **CC.** Bits 0 to 5 are set by the T-machine:
  - 0: zero
  - 1: negative
  - 2: carry
  - 3: overflow
  - 4: result bit 0
  - 5: last bit shifted out (link)

  Bits 6 and 7 are live inputs:
  - 6: a bus access is outstanding
  - 7: the last bus access timed out
- **IND.** The indicator bits are set only by the microprogram. Hardware
  conditions never change them.
- **STATE.** Bit 0 is RUN. Bit 1 is interrupt enable.
- **MAR.** The address of the next microinstruction.

Sequencing is therefore just register traffic. Any T or A write to R0 can:
- jump, by changing MAR;
- halt, by clearing RUN;
- set condition bits.

## How one microinstruction runs (`emmy_cpu`)

```
IDLE -> FETCH -> T -> A -> IDLE
```

- **FETCH.** Reads `M[MAR]` and increments MAR. It honours the microstore
  timing: access 2 clocks, cycle 6 clocks. Those are 60 ns and 180 ns at a
  35 ns clock.
- **T.** Runs the TCF. It takes one clock, except that a shift by *n*
  places takes *n* clocks: the shifter moves one bit per clock.
- **A.** Runs the ACF, on the registers as the T step left them.
  - A microstore data access uses a full store cycle, so it delays the next
    fetch.
  - A bus access is handed to the host bus machine, and the microprogram
    continues. Only a second bus access, or WAIT, stalls until the first
    access has finished. A read's data is written into its destination
    register when it arrives.
- **IDLE.** Between microinstructions the CPU does two checks:
  - If an interrupt is pending and interrupts are enabled, it stores R0 at
    microstore address *a* and loads R0 from *a* xor 1. The old state is
    saved and the new one starts at once.
  - Otherwise it fetches, but only if RUN is set.

The machine comes out of reset halted, with R0 = 0. Another bus unit starts
it by writing R0 over the bus.

The CPU register file has these write ports, in priority order (the lowest
number wins):
1. bus slave writes;
2. A-machine data;
3. T result;
4. T result low half (extended steps) or the state update from the
   sequencer;
5. returning bus read data.

## The host bus

The bus carries a 32-bit address word and 32 bits of data.

```
address word : cmd[31:24] unit[23:16] internal address[15:0]
cmd          : rsvd[7] shaped[6] left[5] sext[4] size[3:2] (bytes-1) op[1:0] (READ 0, WRITE 1, INTR 2)
units        : CPU 1, main memory 2, block access controller 3
```

Each master uses the bus in this order:
1. It requests the bus from `emmy_bus_arbiter`. Arbitration is
   round-robin, and a master keeps the bus while it holds its request.
2. It raises `msyn` with the address word and write data.
3. The addressed slave does the access and raises `ssyn` with its read
   data.
4. The master drops `msyn`, then the slave drops `ssyn`.

Slave replies are ORed, like open-collector lines. An assertion in the
arbiter checks that only the master holding the bus drives `msyn`.

The CPU is a bus slave too:
- Internal address bit 12 = 0 selects a microstore word.
- Bit 12 = 1 selects register `addr[2:0]`.

This is how microcode is loaded and the machine is started and inspected.
Slave accesses take the microstore ahead of the CPU's own fetches.

An **interrupt** is a bus transfer with `op = INTR`. Its internal address is
a microstore location. One interrupt can be held at a time; a second one is
not acknowledged until the first has been taken.

## Main memory (`emmy_main_memory`)

The main memory is 64K bytes. An access can be 1, 2, 3 or 4 bytes long and
start at any byte address. Bytes are in big-endian order, and addresses
wrap at 64K.

Reads can be arranged in three ways:
- right-justified;
- right-justified and sign-extended;
- left-justified.

Writes store the low or the high `size` bytes of the data word.

A shaped access (command bit 6) gives the address as an element number.
The memory multiplies it by the access size, so an array of halfwords is
stepped through one element at a time and the microcode never computes a
byte address. Byte, halfword and fullword arrays then need the same
pointer arithmetic.

The memory is four byte-wide banks, interleaved on the address bits 1..0.
The slave answers 20 clocks after `msyn`: a 650 ns cycle rounded up to 19
clocks, plus the clock that registers the data.

## Block access controller (`emmy_block_access_ctl`)

The block access controller is a bus slave with six registers:

| # | register | use |
|---|---|---|
| 0 | SRC | source address word |
| 1 | DST | destination address word |
| 2 | COUNT | number of words |
| 3 | CTRL | write bit 0 to start; read {error, done, busy} |
| 4 | SSTEP | source address increment |
| 5 | DSTEP | destination address increment |

Once it is started, it becomes a bus master and repeats these steps until
COUNT is 0:
1. seize the bus;
2. read one word;
3. write that word;
4. release the bus;
5. step both addresses.

It releases the bus after every word, so the CPU and the other units are
only delayed by one transfer at a time. It stops with its error bit set if
no unit answers within 255 clocks.

## Top level (`emmy_lab_top`)

The top level holds the arbiter, the CPU, the main memory and the block
access controller.

The arbiter's masters are:
- 0: the CPU;
- 1: the block access controller;
- 2 and 3: the external ports `ext_req/ext_gnt/ext_m`. These are meant for
  the control processor interface and the console.

An external slave, such as a translator to a peripheral bus, answers on
`ext_s_rsp`. The shared lines are `host_bus` and `host_rsp`.

These observation outputs show what is happening:
- `cpu_state`
- `cpu_retire`
- `cpu_bus_stall`
- `cpu_shift_step`
- `cpu_int_taken`
- `bac_busy`
- `bac_done`

The default parameters are the full-size machine:
- 4096-word microstore with 2/6-clock timing;
- 64K-byte main memory with 19-clock access;
- two external masters.

## Where this design departs from, or fills in, the original

The original machine provides the following, and this design keeps them:
- the 14/18-bit split of the microinstruction;
- the four machines and their duties;
- the 8/8/4/12 fields of the state word, with RUN and interrupt-enable
  state bits;
- the 4096 × 32 microstore (60 ns access, 180 ns cycle);
- 35 ns per internal clock, with one shift step per clock;
- overlapped CPU bus accesses;
- slave access to the microstore and registers;
- interrupt save/load through an even/odd microstore pair;
- the host bus address split into command, unit and internal address;
- a 64K-byte main memory with 1–4 byte access, justification and sign
  extension, and a 650 ns cycle;
- a block access controller between any two units.

Everything else is this design's own, and a user emulating real EMMY
microcode would have to check it:
- every opcode value and sub-code;
- the bit layout inside each half, beyond the class and register fields;
- the meaning of each condition-code bit;
- the SPEC encoding;
- the exact arithmetic of the extended steps;
- the insert/extract mask encoding;
- the JUMP class;
- the order of the T step before the A step;
- the bus command byte and the unit numbers;
- the handshake, which is modelled synchronously, with time-outs;
- the arbitration rule;
- the block controller's register map.

One timing point was unclear: one passage gives a 50 ns internal clock for
the prototype. This design uses 35 ns throughout, and every latency is
expressed in clocks.

The following are not built:
- the control processor (a bought-in terminal computer) and its interface;
- the maintenance console;
- the PDP-11 bus translator;
- the peripherals on those buses.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`.

These helper files are used by the testbenches:
- `tb_bus_master`: bus transfers as tasks;
- `tb_bus_slave`: a 256-word slave;
- `tb_emmy_asm_pkg`: a tiny microassembler of functions that build TCF and
  ACF fields.

Build a testbench with:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
  rtl/emmy_pkg.sv tb/tb_emmy_lab_top.sv --top-module tb_emmy_lab_top
./obj_dir/Vtb_emmy_lab_top
```

`tb_emmy_lab_top` runs the full-size top end to end and checks every
result. Its steps are:
1. A control processor model writes a microprogram and data into main
   memory.
2. The block access controller pages the microprogram into the
   microstore.
3. The CPU is started with interrupts enabled. The microprogram does the
   following:
   - sums an array from main memory with overlapped reads and a PTR loop;
   - writes the sum to memory and to an external slave;
   - reads the slave back, with a stall;
   - spins in a delay loop and halts.
4. While the CPU runs, three other things happen:
   - it is interrupted; its handler returns by reloading the saved state;
   - a second block transfer copies data into the upper microstore;
   - a console model competes for the bus.

The testbench checks that the count of executed microinstructions is
exactly the hand count (348). It also counts each mechanism, and a
mechanism that never happened counts as a failure:
- retire;
- bus stall;
- shift step (exactly 32 for two 16-place shifts);
- interrupt;
- block transfer;
- arbitration wait;
- external slave access.

`tb_emmy_i8080_workload` runs a small 8080 emulator on the full-size top.
It shows how an emulator is meant to be written for this machine:
1. A one-byte main memory read fetches the opcode while the program
   counter is incremented in parallel.
2. The opcode is inserted into the MAR field of R0. That selects one of
   256 jump-table words, which is a one-out-of-256 decode.
3. The jump-table word jumps to a short handler.

The emulator covers seven opcodes:
- MVI A,n
- MVI B,n
- ADD B
- DCR B
- JNZ
- STA
- HLT

The test program is a counting loop. The shortest fetch-and-decode is 44
clocks, which is 1.54 µs at 35 ns. The original machine's figure is
1.5 µs; the difference comes mostly from rounding the 180 ns microstore
cycle up to 6 clocks. A decode that follows an operand read waits for that
read, and takes up to 59 clocks.

`tb_emmy_deltran_workload` runs a stack-evaluation kernel on the full-size
top, laid out like a FORTRAN-like language machine:
- program data sits in the upper half of the 64K-byte main memory;
- a 64-word evaluation stack sits at the bottom, with COMMON data above it;
- 24 signed halfwords are read with shaped, two-byte, sign-extended bus
  reads (the pointer steps by one element) and pushed on the stack;
- the stack is reduced by pairwise adds;
- the low halfword of the result is stored into COMMON with a two-byte write.

The microcode never handles a byte address or a sign bit; the main memory
does the shaping. The test checks the sum, the stack contents and depth,
the untouched neighbour halfword in COMMON, and the exact microinstruction
count.

`tb_emmy_cpu` covers the following:
- a 32-step multiply loop;
- conditional skip, branch, and call/return;
- indirect microstore moves;
- overlapped bus accesses;
- an interrupt from the halted state.

The block testbenches compare against reference models written in the
testbench, and check the latencies in clocks:
- the microstore access and cycle;
- the memory access;
- a shift taking one clock per bit.
