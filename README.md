# Tethered Forth target for FPGAs

Testing and debugging logic in an FPGA often needs procedures that are hard
to write as fixed state machines. A CPU that you can program interactively,
in the FPGA and next to the logic under test, solves this. Forth suits the
job: it can be extended interactively and it runs on a very small CPU.

A full interactive Forth needs a lot of memory. The compiling words and the
names in the dictionary take up most of it. This design follows the
*tethered* Forth model to avoid that cost. The work is split between two
parts:

- **Host.** This is a PC or smartphone. It runs the interpreter and the
  compiler and keeps the full dictionary with the names of the words. It is
  software and is not part of this RTL.
- **Target.** This is the RTL in this repository. It keeps only the compiled
  code and the variables in block RAM. It executes words on a small 16-bit
  CPU. It can do only a few things on request: read a word of memory, write
  a word of memory, and start execution at an address.

A UART link connects the two. All the state lives in the target's RAM, so
the terminal can be unplugged and plugged in again at any time. A word that
is running goes on running. When the host reconnects, it reads the target
dictionary back and compares it with its own copy. If they match, the
session goes on.

```
             +------------------------------ forth_target -----------------------------+
 rxd ------->| uart_rx -> link_rx --cmd-->  forth_monitor  <--start/done/emit/hcall--> forth_cpu --> led
 txd <-------| uart_tx <- link_tx <--msg--    |  (bus owner for its accesses)             |
             |                                +-------------> forth_ram <-----------------+
             +--------------------------------------------------------------------------+
```

## The CPU (`forth_cpu`)

This is a minimal-instruction-set machine with no pipeline. Each instruction
runs through three phases:

- **FETCH** reads the opcode word at PC.
- **DECODE** latches the opcode.
- **EXECUTE** takes one or more cycles. Each extra memory access adds a
  cycle, and taking read data adds one more.

### Registers

Three registers are visible to programs:

| register | role |
|---|---|
| GX  | accumulator: first ALU operand and result, data for `STORE`, the value `PUSHD` pushes |
| FX  | second ALU operand, the value `POPD` pops into |
| ADX | address register for `LOAD`/`STORE`, the value `PUSHR` pushes and `POPR` pops into |

PC, SP and RP are internal. SP is the address of the top data-stack item.
RP is the address of the top return-stack item. The data stack also keeps a
second pointer, SPN = SP + 1. With it, a push writes to SPN and a pop reads
from SP, and neither needs an adder in its address path.

### Memory layout

There is one RAM of 8192 × 16 bits. That is the size of the eight RAMB16
blocks used by the reference FPGA build.

| addresses | use |
|---|---|
| 0x0000–0x0FFF | dictionary: compiled words and variables, loaded by the host |
| 0x1000 upwards | data stack (`DSTACK_BASE`); the first push goes to 0x1000 |
| 0x1FFF downwards | return stack; RP = 0x2000 means the return stack is empty |

The two stacks grow towards each other in the upper half. Nothing checks for
stack overflow or underflow.

### Instruction set

An instruction word holds its opcode in bits [7:0]. Operand words follow it.

| opcode | mnemonic | words | effect | cycles* |
|---|---|---|---|---|
| 0x01 | PUSHD   | 1 | push GX onto the data stack | 3 |
| 0x02 | PUSHR   | 1 | push ADX onto the return stack | 3 |
| 0x03 | POPD    | 1 | pop the data stack into FX | 4 |
| 0x04 | POPR    | 1 | pop the return stack into ADX | 4 |
| 0x05 | CALL a  | 2 | ADX ← a, push the return address, PC ← a | 5 |
| 0x06 | RET     | 1 | pop PC from the return stack; if the return stack is empty, end the word | 4 (3 at the end) |
| 0x07 | LOADI v | 2 | GX ← v | 4 |
| 0x08 | MOV s d | 3 | register d ← register s (word 2 bits [1:0] = source, word 3 bits [1:0] = destination; 0 = GX, 1 = FX, 2 = ADX) | 6 |
| 0x09 | ADD     | 1 | GX ← GX + FX | 3 |
| 0x0A | SUB     | 1 | GX ← GX − FX | 3 |
| 0x0B | MUL     | 1 | GX ← low 16 bits of GX × FX | 3 |
| 0x0C | EQ      | 1 | GX ← (GX == 0) ? −1 : 0 | 3 |
| 0x0D | STORE   | 1 | mem[ADX] ← GX | 3 |
| 0x0E | LOAD    | 1 | GX ← mem[ADX] | 4 |
| 0x0F | OVER    | 1 | push a copy of the second data-stack item | 5 |
| 0x10 | JMP0 a  | 2 | if GX == 0 then PC ← a | 4 |
| 0x11 | EMIT    | 1 | send GX[7:0] to the host as a character | 3 + wait |
| 0x12 | EXEC_PC | 1 | ask the host to run host word number GX, then wait until the host resumes the CPU | 3 + wait |
| 0x13 | GT      | 1 | GX ← (signed GX > signed FX) ? −1 : 0 | 3 |
| 0x14 | LEDIO   | 1 | led ← GX[LED_W−1:0] | 3 |

\*Cycle counts assume the memory bus is free. Any other opcode stops the
word and reports status 1.

In assembler, MOV is written destination first, for example
`MOV GX_REG, FX_REG` copies FX into GX. The basic Forth stack words are
built from these instructions. For example, DUP is
`POPD; MOV GX,FX; PUSHD; PUSHD; RET`. SWAP pops into FX, moves FX to GX,
pops again and pushes twice, with another move in between. ROT uses the
return stack as scratch space. The end-to-end testbench contains all three.

### How a word starts and ends

The monitor starts the CPU at an address with a one-cycle `start` pulse. The
word runs until a `RET` finds the return stack empty. That outermost `RET`
goes back to the monitor, not to a caller. The CPU then raises
`done_valid` with a status (0 = normal, 1 = undefined opcode) and goes idle
once the monitor has taken it.

`EMIT` and `EXEC_PC` use valid/ready requests to the monitor. `EXEC_PC` is
the instruction that makes the model "tethered": compiled code can call a
word that exists only on the host. The CPU stays in `EXEC_PC` until the host
sends RESUME.

## The monitor (`forth_monitor`)

The monitor serves one host command at a time:

- **READ / WRITE** use the RAM's single port directly. In the access cycle
  the monitor owns the bus and the CPU's request waits (`mem_gnt` low). This
  means memory can be inspected and changed while a word is running, at the
  cost of one stalled CPU cycle per access.
- **EXEC** starts the CPU if it is idle and answers ACK. If the CPU is busy,
  it answers BUSY and starts nothing.
- **RESUME** releases a CPU that is waiting in `EXEC_PC`. It has no answer.

When no command is pending, the monitor forwards CPU events to the host in
this priority order: end of word (DONE + status), EMIT character, host call
(HOST + id). Host commands always come before CPU events.

## Link records (`link_rx`, `link_tx`, `uart_rx`, `uart_tx`)

The UART runs at 8N1, 115200 baud by default (`CLK_HZ / BAUD` clocks per
bit). Every record starts with one code byte. Multi-byte fields are sent
high byte first.

| host → target | bytes | answer |
|---|---|---|
| READ   | `01 ah al`       | `81 dh dl` (DATA) |
| WRITE  | `02 ah al dh dl` | `82` (ACK) |
| EXEC   | `03 ah al`       | `82` (ACK) or `83` (BUSY) |
| RESUME | `04`             | none |

| target → host, unsolicited | bytes |
|---|---|
| DONE | `84 status` |
| EMIT | `85 char` |
| HOST | `86 idh idl` |

A host must be ready for DONE, EMIT and HOST records to arrive at any time,
including between a command and its answer.

### Disconnect and reconnect

Several measures keep a broken connection from disturbing the target:

- A frame whose stop bit is low is dropped. This is what a line held low
  looks like while the cable is out. The receiver then waits for the line to
  go high before it looks for a new start bit.
- If a record stops partway and no byte follows for `GAP_CYCLES` (1 ms), the
  partial record is thrown away.
- The CPU keeps running throughout, and the RAM is never cleared, not even
  by reset.
- `link_err` pulses every time one of these discards happens.

## Where this RTL interprets the original description

The original description gives these things: the opcode values, the
mnemonics, how many words each instruction takes, which registers each
instruction uses, the directions the stacks grow, the two data-stack
pointers, the FETCH/DECODE/EXECUTE cycle, the monitor's duties, the UART
link, the 50 MHz clock and the RAM budget.

Everything else is this design's own choice:

- the opcode position in the word and how operand words are used;
- the MOV operand encoding;
- the SUB operand order;
- the flag values (−1/0) and the signed compare in GT;
- the rule that a word ends with the outermost RET;
- taking the EXEC_PC host word number from GX;
- the command and record format, the RESUME/BUSY/DONE records, the baud
  rate and the gap timeout;
- the memory split between dictionary and stacks;
- the monitor's priority on the bus;
- the LED count.

Two entries in the original instruction table contradict their own
mnemonics. This RTL follows the mnemonics:

- **POPR** is described as popping the *data* stack into ADX. This RTL pops
  the *return* stack, which mirrors PUSHR.
- **OVER** is described as swapping the two top items. This RTL does a Forth
  OVER, which pushes a copy of the second item. The original word list builds
  SWAP out of other instructions, so a hardware swap is not needed.

The original describes CALL as "call the address in ADX" but also lists it
as a two-word instruction. This RTL reconciles the two: the operand word is
the address, and it is loaded into ADX as part of the call.

The UART is an independent, simple counter-based design. It is not the UART
core the original build used.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| forth_target | CLK_HZ | 50 000 000 | clock frequency |
| forth_target | BAUD | 115 200 | UART bit rate |
| forth_target | MEM_WORDS | 8192 | RAM words; the return stack starts at the top |
| forth_target | DSTACK_BASE | 4096 | first data-stack address; the dictionary lies below it |
| forth_target | GAP_CYCLES | 50 000 | byte gap that discards a partial record |
| forth_target | LED_W | 8 | LED outputs |

`MEM_WORDS` should be a power of two, because addresses wrap modulo the RAM
size.

## Files

- `rtl/forth_pkg.sv`: opcodes, register selectors, command and message
  codes, the memory-request struct.
- `rtl/forth_target.sv`: top level.
- `rtl/forth_cpu.sv`, `rtl/forth_monitor.sv`, `rtl/forth_ram.sv`: CPU,
  monitor and RAM.
- `rtl/link_rx.sv`, `rtl/link_tx.sv`, `rtl/uart_rx.sv`, `rtl/uart_tx.sv`:
  the link.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.

## Simulating

Each testbench needs the package, the module it tests and the modules below
that module. The simplest way is to compile all of `rtl/` together:

```
verilator --binary --timing --assert -Irtl rtl/forth_pkg.sv rtl/*.sv \
          tb/tb_forth_target.sv --top-module tb_forth_target -o sim
./obj_dir/sim
```

Replace `tb_forth_target` with `tb_forth_cpu`, `tb_forth_monitor`,
`tb_forth_ram`, `tb_link_rx`, `tb_link_tx`, `tb_uart_rx` or `tb_uart_tx` to
test a single module.

### What the testbenches cover

- **`tb_forth_target`** runs at the default parameters (50 MHz, 115200 baud)
  and finishes in a few seconds. It acts as a host:
  - loads a dictionary through WRITE records and reads it back;
  - runs DUP, SWAP and ROT;
  - answers an EXEC_PC host call;
  - checks EMIT output and the LEDs;
  - starts a 60 000-iteration loop, gets BUSY for a second EXEC, and reads
    the loop variable while the CPU runs;
  - holds the line low, sends a broken record and goes silent;
  - reconnects, checks that the dictionary is unchanged, and checks the
    final count;
  - runs a word with an undefined opcode.

  The testbench counts every mechanism it exercises and fails if one never
  happens: bus stall, BUSY, host call, EMIT, framing error, dropped record,
  bad opcode, LED write.
- **`tb_forth_cpu`** compares 40 random straight-line programs with an
  instruction-level reference model: registers, stack pointers, LEDs and all
  of memory. With the bus always granted it also checks the cycle count
  against the table above. With random grants it checks that stalls change
  nothing but timing.

A few handshake rules are written as assertions and checked with `--assert`:
a message, command or CPU request is held unchanged until it is taken.
