# Gator uProcessor: a microprogrammed 68HC11-compatible CPU

This is a small CPU that runs Motorola 68HC11 object code. Inside it has a 16-bit
datapath, and outside it has a plain 8-bit asynchronous-SRAM-style bus. The main idea is
that control is split into two levels:

* **The bus sequencer** (`memory_controller`) runs one memory function per
  micro-operation. It decides how many clocks that micro-operation takes, and it
  raises `sync` on the clock that commits it.
* **The microprogrammed controller** (`microsequencer` plus a 256 x 56 microcode
  ROM) decides *what* each micro-operation does. It never needs to count clocks.

With this split, an instruction costs only the bus cycles it actually needs. There is
no fixed E-clock as on the Motorola parts. The bus could also be changed (wait
states, a 16-bit bus) by editing only the bus sequencer, and the microcode would stay
as it is.

The RTL is SystemVerilog-2017 and synthesizable. It follows the block partition,
encodings and microcode of the original Gator uProcessor, a teaching CPU from the
University of Florida built for a Cyclone II FPGA board. The places where it differs
from that design are listed in
[Departures from the original design](#departures-from-the-original-design).

## Block diagram

```
                 +------------------+  opcode   +--------+ map0..5
 rd_data_bus --->| memory_controller|---------->| mapper |----------+
 addr_bus   <----|  (bus sequencer) |           +--------+          v
 wr_data_bus<----|                  |  sync  +----------------+   +---------------+
 rd_en/wr_en<----|                  |------->| microsequencer |-->| microprogram  |
                 +------------------+        +----------------+   | memory 256x56 |
                   ^ addr    ^ data    ^ rd data      ^ cond      +-------+-------+
                   |         |         |              |                   | uword_t
             +-----------+ +--------+ +----------------+  flags  +-----+   | (control
             |address_alu| |data_alu|<| register_array |<------->| ccr |   |  fields to
             +-----------+ +--------+ |EA PC SP Y X A B|         +-----+   |  every block)
                   ^ write-back ^     +----------------+
```

Every state element except the ROM address register and the strobes commits on a
rising clock edge while `sync` is high. So from the point of view of the
registers, one micro-operation is one "cycle", however many clocks it lasts.

## The two control levels and their timing

### Bus sequencer (`memory_controller`)

Each microword names one memory function. The bus sequencer runs through states C0
to C5 for that function and raises `sync` in the last clock:

| Function      | Clocks | Bus activity                                    |
|---------------|:------:|-------------------------------------------------|
| `IDLE`        | 1      | none                                            |
| `WRITE_BYTE`  | 2      | one write strobe                                |
| `READ_BYTE`   | 3      | one read strobe, byte into the read-data register |
| `READ_OPCODE` | 3      | as `READ_BYTE`, but into the opcode register    |
| `WRITE_WORD`  | 4      | high byte at A, then low byte at A+1            |
| `READ_WORD`   | 6      | high byte from A, then low byte from A+1        |

Timing of the bus sequencer:

* **Address.** The address register loads from the address ALU at the end of C0. For
  the second byte of a word it increments.
* **Strobes.** `sync`, `rd_en` and `wr_en` are registered on the *falling* edge. Each
  pulse therefore runs from the middle of one clock to the middle of the next.
* **Read data.** Read data is sampled on the rising edge at the end of C2, and also at
  the end of C5 for the second byte of a word.
* **Writes.** A memory that writes on a rising edge while `wr_en` is high sees exactly
  one write per byte.
* **`wr_data_oe`.** It marks the clocks in which the CPU drives write data.

Words are big-endian, as on the 68xx.

### Microsequencer and microcode ROM

The ROM registers its address, like an FPGA block ROM. The microsequencer handles
this by presenting the *next* address while `sync` is high and the *current* address
otherwise. As a result, the ROM output always holds the word of the micro-operation in
progress, even through a six-clock word read. Its one clock of read latency is hidden
in the clock that commits the previous word.

Next-address rule: the microsequencer first checks whether the condition that
`usq_cond_sel` picks from the CCR equals the `true_false` bit.

* If they match, `micro_op` chooses the next address: `CONTINUE` (+1), `JUMP`
  (`branch_addr`), or `JUMP_MAPn` (vector *n* of the mapper).
* If they do not match, the sequencer continues to +1.

An unconditional jump uses the constant-1 condition with `true_false = 1`.

### The microword

The microword is the packed struct `gup_pkg::uword_t`, bit 55 down to 0:

| Bits  | Field           | Drives                                                      |
|-------|-----------------|-------------------------------------------------------------|
| 55:53 | `micro_op`      | microsequencer: continue / jump / jump through map 0..5     |
| 52    | `true_false`    | microsequencer: condition polarity                          |
| 51:44 | `branch_addr`   | microsequencer: jump target                                 |
| 43:39 | `ccr_op`        | ccr: which flags change and how (codes 0..14 used)          |
| 38:37 | `alu_cond_sel`  | ccr: carry / shift-in for the data ALU (0, 1, C, sign of A) |
| 36:33 | `usq_cond_sel`  | ccr: branch condition (0, 1, C, V, Z, N, LE, LT, LS)        |
| 32:29 | `addr_sel`      | register on the address ALU, also its write-back target     |
| 28:25 | `data_a_sel`    | data ALU operand A                                          |
| 24:21 | `data_b_sel`    | data ALU operand B                                          |
| 20:17 | `data_wr_sel`   | data ALU write-back target (0 = none)                       |
| 16:13 | `addr_alu_op`   | pass, pre/post increment/decrement by 1 or 2                |
| 12:10 | `data_alu_op`   | A+B, A+~B, AND, OR, XOR, shift left, shift right (code 7 = right) |
| 9     | `data_alu_mode` | 8- or 16-bit operation                                      |
| 8:6   | `mem_func_sel`  | bus sequencer function                                      |
| 5:0   | spare           | always 0                                                    |

A register selector can name more than the registers:

* the constant 0;
* the read data of the bus sequencer, in three forms: 16 bits, byte zero-extended
  (`MEM_U8`), or byte sign-extended (`MEM_S8`, used for branch offsets);
* the CCR.

Because of this, one micro-operation can do all of the following at once:

* a data ALU operation between any two of these sources;
* an address ALU step on a third register (for example `SP--` for a push, or `PC++`
  for an operand fetch);
* a memory access at the address that step produces;
* a condition code update;
* a conditional branch.

### How an instruction runs

1. `FETCH` reads the opcode with `PC++`. Most routines instead fetch the next opcode in
   their own last micro-operation, so fetch overlaps execution.
2. `DECODE` jumps through **map 0**. For most instructions this is the
   addressing-mode routine: immediate, direct, extended, indexed, relative, and the
   store variants. For an inherent instruction it is the whole instruction.
3. The addressing-mode routine leaves the operand in the read-data register, or the
   effective address in `EA`. It then jumps through **map 1** to the operation
   routine: `LDAA`, `SUBA`, `ASL`, `JSR`, and so on.
4. The operation routine writes its result, updates the CCR, fetches the next opcode
   and jumps to `DECODE`.

Example instruction costs:

* `NOP` costs 4 clocks: an opcode read and `DECODE`.
* `LDAA #imm` costs 7 clocks: an operand read, then the load overlapped with the next
  opcode read, then `DECODE`.

Branches are two words each:

* the first word reads the offset and tests the condition;
* the second word adds the sign-extended offset to PC.

The mapper table and the label addresses in `gup_pkg` come from laying the routines
out in order from address 0. The trap loop sits at `$FF`.

## Datapath blocks

* **`register_array`** holds EA, PC, SP, Y, X, A and B, with D = A:B. It has three
  combinational read multiplexers and two write paths.
  * Both writes commit on `sync`.
  * The data ALU write has priority over the address ALU write-back.
  * A and B take the low byte of a 16-bit result. D splits it.
  * There is no reset. The reset microinstruction clears PC, and the program sets the
    rest, as on a 68xx.
* **`address_alu`** adds 0, ±1 or ±2 to the selected register.
  * The sum always goes back to the register.
  * The memory address is the sum for pre-modify operations, and the unmodified
    register for post-modify operations.
* **`data_alu`** is 16 bits wide and combinational.
  * One adder serves both `A + B + cin` and `A + ~B + cin`. Subtraction is the second
    form with `cin = 1`.
  * It also does AND, OR, XOR and one-bit shifts. The shift-in bit is `alu_cond`.
  * In 8-bit mode, flags are taken at bit 7.
  * Flags are `{sign of A, H, N, Z, V, C}`. After a subtraction, C is a borrow.
* **`ccr`** holds the status register S X H I N Z V C.
  * Each operation code is a mask: a bit keeps its value, is set, is cleared, or is
    copied from the ALU flags.
  * The whole register can also be loaded from the ALU result (`TAP`). X can then only
    be cleared.
  * The CCR also produces the ALU carry-in and the branch condition, including the
    compound tests Z|(N^V), N^V and C|Z.

## Instruction coverage

The microcode implements the page-0 68HC11 instructions, in every addressing mode
(immediate, direct, extended, indexed with X, relative, inherent):

* loads, stores and transfers;
* add and subtract with and without carry;
* compares and logic;
* memory and accumulator read-modify-write operations;
* shifts and rotates;
* `ABA`, `ABX`, `SBA`, `CBA`;
* 16-bit `ADDD` and `SUBD`, `LDD`, `STD`, `LDX`, `STX`, `LDS`, `STS`, `CPX`;
* `INX`, `DEX`, `INS`, `DES`, `TSX`, `TXS`, `XGDX`;
* all conditional branches, `BRA`, `BRN`, `BSR`, `JSR`, `JMP`, `RTS`;
* pushes and pulls;
* flag set and clear, `TAP`, `TPA`.

These opcodes go to a trap loop at microaddress `$FF`, which stops the CPU:

* `MUL`, `IDIV`, `FDIV`, `DAA`;
* `RTI`, `SWI`, `WAI`, `STOP`, `TEST`;
* the bit instructions (`BSET`, `BCLR`, `BRSET`, `BRCLR`);
* the prefix bytes `$18`, `$1A` and `$CD`, so nothing that uses Y or the extra pages
  runs.

The mapper has outputs map2 to map5 reserved for those pages. They carry `$FF`.

There are no interrupts.

### Behaviour that differs from a Motorola 68HC11

All of these are kept on purpose from the original microcode:

* V is cleared by shifts and rotates (the 68HC11 sets V = N xor C).
* `SBCA`/`SBCB` compute A - M - 1 + C. This is the add-with-inverted-operand form, not
  A - M - C.
* `ADDA`/`ADDB`/`ADCA`/`ADCB` leave H unchanged. `ABA` does set it.
* `TST` on memory writes the operand back to memory.
* Reset starts at address `$0000` with PC = 0. There is no reset vector. Reset sets
  only the X mask. The other registers are undefined until the program sets them.

## Departures from the original design

* **`SUBD` and `ADDD`.** The original microcode subtracts or adds only the
  zero-extended low byte of the 16-bit operand. Here they use the full 16-bit operand.
* **Memory `COM`.** In the original, the second micro-operation of memory `COM`
  stores the ALU result without keeping the complement operation, so it stores zero.
  Here the complement is stored.
* **SUBB opcodes `$D0`, `$E0`, `$F0`.** The generated decoder table of the original
  gives these no entry, although its microcode assigns them to `SUBB`. Here they run
  `SUBB`.
* **CCR reset.** The CCR resets on any clock with `nrst` low. The original resets it
  only on a clock with `sync` high.
* **Bus sequencer reset.** The bus sequencer also resets its address, write-data,
  read-data and opcode registers. This makes simulation start from known values.
* **Microword splitting.** The original's separate "vector split" block only cuts the
  microword into fields. Here that is the `uword_t` struct.
* **`ccr_op` width.** `ccr_op` is 5 bits wide, as in the microword. The original CCR
  port is 4 bits. The codes in use fit in 4 bits.
* **Microcode ROM contents.** The ROM contents are computed at elaboration by
  `gup_ucode_pkg::ucode_word()`. Its builder functions mirror the original
  micro-assembler macros, so no memory-initialisation file is needed.

## Files

| File                           | Contents                                              |
|--------------------------------|-------------------------------------------------------|
| `rtl/gup_pkg.sv`               | encodings, microword struct, microprogram labels      |
| `rtl/gup_ucode_pkg.sv`         | the microprogram, as functions                        |
| `rtl/gator_uprocessor.sv`      | top level                                             |
| `rtl/memory_controller.sv`     | bus sequencer                                         |
| `rtl/microsequencer.sv`        | next-address logic                                    |
| `rtl/microprogram_memory.sv`   | 256 x 56 ROM, registered address                      |
| `rtl/mapper.sv`                | opcode decoder (map 0 and map 1)                      |
| `rtl/register_array.sv`, `rtl/address_alu.sv`, `rtl/data_alu.sv`, `rtl/ccr.sv` | datapath |
| `tb/tb_<block>.sv`             | one self-checking testbench per block                 |
| `tb/tb_s19_bootloader.sv`     | workload: S-record loader over a UART, then the loaded program |
| `tb/mapper_expected.hex`       | expected decoder table (map 0, map 1 per opcode)      |

## Simulating

Compile the two packages first. Let `-y rtl` find the modules. Run from the
repository root, because `tb_mapper` reads `tb/mapper_expected.hex` by a relative path.

```
verilator --binary --timing -y rtl rtl/gup_pkg.sv rtl/gup_ucode_pkg.sv \
          tb/tb_gator_uprocessor.sv --top-module tb_gator_uprocessor
./obj_dir/Vtb_gator_uprocessor
```

Replace the testbench name to run any other. Each testbench prints
`TB_RESULT checks=N failures=M` and stops. Each one also has a watchdog.

### What the testbenches check

* **`tb_gator_uprocessor`** runs a program of about 500 instructions with the
  default parameters. The program is built inside the testbench. It covers every
  addressing mode, the arithmetic, logic, shift, stack, subroutine and branch
  instructions, and ends in the trap.
  * An instruction-level 68HC11 model runs in lockstep. At every `DECODE` it is compared
    with A, B, X, SP, PC and the CCR.
  * Every bus write is compared with the model's write list. The whole memory is
    compared at the end.
  * The clock count of every micro-operation is checked against the table above.
    Whole instructions are checked too: `NOP` takes 4 clocks and `LDAA #` takes 7.
  * Counters confirm that each mechanism occurred: every memory function, map 0 and
    map 1 dispatches, taken and untaken branches, CCR loads and the trap.
* **`tb_s19_bootloader`** runs a realistic workload on the board's memory map:
  UART data and status at `$8000`/`$8001`, LEDs at `$FFFF`, stack at `$0FFF`.
  * A boot program at `$0000` (assembled inside the testbench) prints a banner and reads
    S1 records from the UART model, storing their data and verifying checksums.
  * On S9 it shows the loaded byte count on the LEDs and jumps to `$0100`.
  * The downloaded program sums a downloaded table, shows the sum on the LEDs and
    prints `!`.
  * One record carries a wrong checksum on purpose and must be counted as an error.
  * The whole run (34 bytes) takes about 23,400 clocks.
* **Block testbenches.** Each compares its block with an independent reference model,
  using random and directed stimulus. The memory controller test checks strobes, clock
  counts and byte order. The mapper test checks all 256 opcodes against the table file.
  The microprogram memory test checks the one-clock latency and every word against the
  microcode functions.

## Changing the microcode

1. Edit the `case` in `gup_ucode_pkg::ucode_word()`.
2. If a routine moves, update its label in `gup_pkg`.
3. If an opcode changes routine, update `mapper.sv` and `tb/mapper_expected.hex`. The
   hex file holds one line per opcode, `MMNN`, where MM is the map 0 address and NN is
   the map 1 address.

The field helpers chain: `cc(mem(ad(wr(d8_add(w, R_A, R_MEM_U8), R_A), AOP_POST_INC,
R_PC), MEM_READ_OPCODE), CCR_HNZVC)` describes one complete micro-operation.
