# An 8-bit accumulator computer

A small stored-program computer of the kind built in an introductory digital
design course. One 8-bit accumulator (ACCA), a carry flag C and a zero flag Z,
a 256-byte memory that holds both program and data, and an instruction set of
18 instructions: loads and stores, add, subtract, AND, OR, compare, complement,
increment, three shifts, and an unconditional and three conditional jumps.
The memory ships with a running-light program whose accumulator drives eight
LEDs: a single dark LED walks from bit 0 to bit 7 and starts again.

## Blocks

| module            | role |
|-------------------|------|
| `computer`        | top level; wires the blocks below into the datapath |
| `ccu`             | control unit: the state machine that sequences each instruction |
| `alu`             | combinational ALU with carry and zero outputs |
| `addr_mux`        | chooses the memory address: PC or the operand address register |
| `program_counter` | PC with reset value, increment and jump load |
| `register_en`     | load-enable register, used for IR, MAR, ACCA, C and Z |
| `mem_block`       | single-port synchronous RAM, 256 x 8, preloaded with a program |
| `computer_pkg`    | widths, opcodes, ALU operations, control word, controller states |
| `mem_init_pkg`    | the running-light program image |

## Datapath

```
            +-----------+   q    +-----> IR  ----> ccu
   PC ----->|           |--------+-----> MAR ----+
   MAR ---->| addr_mux  |-> mem  +-----> PC (jump target)
            +-----------+ block  +-----> ALU b
                           ^              ALU a <---- ACCA
                           |  data        ALU y ----> ACCA, carry -> C, zero -> Z
                           +---------------------------- ACCA
```

Everything that comes out of memory goes through the single read port `q`:
the opcode into IR, the operand byte into MAR (for memory operands) or the PC
(for jumps) or ACCA (immediates, through the ALU's pass-B operation), and data
bytes into the ALU's B input. ACCA is the ALU's A input and the only source of
write data. The control unit alone decides which register loads in which
cycle.

## Instruction set and encoding

Every instruction starts with a one-byte opcode. Instructions with an `addr`
or `#num` operand are two bytes long, the operand in the byte after the
opcode. Addresses are absolute.

| op | mnemonic      | effect                                | C        | Z       | bytes | cycles |
|----|---------------|---------------------------------------|----------|---------|-------|--------|
| 00 | NOP           | -                                     | -        | -       | 1 | 3 |
| 01 | LDAA addr     | ACCA = M[addr]                        | -        | set     | 2 | 5 |
| 02 | LDAA_IMM #n   | ACCA = n                              | -        | set     | 2 | 3 |
| 03 | STAA addr     | M[addr] = ACCA                        | -        | ACCA==0 | 2 | 4 |
| 04 | ADDA addr     | ACCA = ACCA + M[addr]                 | carry    | set     | 2 | 5 |
| 05 | SUBA addr     | ACCA = ACCA - M[addr]                 | borrow   | set     | 2 | 5 |
| 06 | ANDA addr     | ACCA = ACCA & M[addr]                 | -        | set     | 2 | 5 |
| 07 | ORAA addr     | ACCA = ACCA \| M[addr]                | -        | set     | 2 | 5 |
| 08 | CMPA addr     | ACCA - M[addr], result discarded      | borrow   | set     | 2 | 5 |
| 09 | COMA          | ACCA = ~ACCA                          | 1        | set     | 1 | 3 |
| 0A | INCA          | ACCA = ACCA + 1                       | -        | set     | 1 | 3 |
| 0B | LSLA          | shift left, 0 in                      | old b7   | set     | 1 | 3 |
| 0C | LSRA          | shift right, 0 in                     | old b0   | set     | 1 | 3 |
| 0D | ASRA          | shift right, b7 kept                  | old b0   | set     | 1 | 3 |
| 0E | JMP addr      | PC = addr                             | -        | -       | 2 | 3 |
| 0F | JCS addr      | PC = addr if C = 1                    | -        | -       | 2 | 3 |
| 10 | JCC addr      | PC = addr if C = 0                    | -        | -       | 2 | 3 |
| 11 | JEQ addr      | PC = addr if Z = 1                    | -        | -       | 2 | 3 |

"-" means unchanged; "set" means Z = (new ACCA == 0). Opcodes 0x12 to 0xFF
behave as NOP. Which flags each instruction touches, including that STAA
updates Z and COMA sets C, is part of the instruction set definition. The
meaning of C after a subtraction (a borrow: 1 when the memory operand is larger,
unsigned) and after a shift (the bit shifted out) is a choice of this design.

## How an instruction runs (the control unit)

The memory reads synchronously: an address applied in one cycle gives its byte
on `q` in the next. The control unit is built around that one-cycle delay.

| state    | address | what happens                                                   |
|----------|---------|----------------------------------------------------------------|
| FETCH    | PC      | PC += 1                                                        |
| DECODE   | PC      | opcode is on `q`; IR loads it                                  |
| EXECUTE  | PC      | operand byte (if any) is on `q`. One-byte instructions do their ALU operation into ACCA and flags. LDAA_IMM loads ACCA and steps the PC. Jumps load the PC or step past the operand. Memory-operand instructions load MAR and step the PC, then go to MEM_ADDR |
| MEM_ADDR | MAR     | STAA writes ACCA and updates Z, and is done; the others wait for the data |
| MEM_EXEC | -       | data byte is on `q`; ALU operation into ACCA (not CMPA) and flags |

Every instruction except the memory-operand ones returns to FETCH from
EXECUTE. DECODE already addresses the byte after the opcode, so the operand is
ready in EXECUTE without an extra cycle. For one-byte instructions that read
is simply ignored, and since the PC was not stepped again the next FETCH
addresses the correct opcode. The `fetch` output is high in FETCH, the first
cycle of every instruction. Two assertions in `ccu` check that the PC is
never loaded and incremented in the same cycle, and that memory is written
only through MAR.

## The running-light program

`mem_init_pkg::running_lights()` is the default content of the memory:

```
00: 02 01   LDAA_IMM #01
02: 08 20   CMPA 20        ; Z = (ACCA == 80)
04: 11 00   JEQ  00        ; one has reached bit 7: start again
06: 0B      LSLA
07: 0E 02   JMP  02
20: 80      constant
```

ACCA, and with it the LEDs, steps 01, 02, 04, ... 80, 01, ... A 1 bit is the
dark LED. The comparison before the shift keeps the accumulator from ever
reading zero, so no LED pattern shows all LEDs lit. Each pattern lasts 14
clock cycles, except 01, which lasts 11. To see the light on a board, clock the
computer at a few hertz or add a clock enable; no clock divider is part of
this RTL.

To run a different program, pass a 256-byte image as the `INIT` parameter of
`computer` (type `computer_pkg::mem_image_t`, byte `i` at `[i]`), or change
`mem_init_pkg`.

## Interface and timing of `computer`

| port   | dir | width | meaning |
|--------|-----|-------|---------|
| clk    | in  | 1 | the only clock; everything is rising-edge |
| rst    | in  | 1 | synchronous, active high: PC = PC_RESET, IR, MAR, ACCA, C, Z = 0; memory keeps its contents |
| leds   | out | 8 | ACCA |
| acca   | out | 8 | accumulator |
| pc     | out | 8 | program counter |
| c_flag | out | 1 | carry flag |
| z_flag | out | 1 | zero flag |
| fetch  | out | 1 | first cycle of an instruction |

Parameters: `PC_RESET` (default 0x00), `INIT` (default the running-light
image). Widths are set in `computer_pkg` (`DATA_W = 8`, `ADDR_W = 8`); the
opcode encoding assumes 8-bit words.

## What is given and what is chosen

Taken from the machine's definition: the block list (address multiplexer,
ALU, control unit, registers, a memory preloaded with the program, a reset
constant), the 8-bit word, the instruction set with its opcode numbers and
flag behaviour, the operand-follows-opcode format, and the running-light task
(start at 0000_0001, shift left, jump back at the end, a 1 being a dark LED).

Chosen here, because the definition leaves it open: the 8-bit address and
256-byte memory; the synchronous one-cycle memory read; how the blocks are
wired; the controller's states and so the cycle counts; synchronous
active-high reset and reset to address 0x00; carry meaning for subtract and
shifts; unused opcodes as NOP; LEDs driven straight from ACCA; the exact code
of the running-light program.

The reset constant is not a separate module: it is the `PC_RESET` parameter,
which becomes the program counter's reset value.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and stops with a watchdog if it hangs.

* `alu_tb`: every operation on all 65,536 operand pairs against an
  integer-arithmetic reference.
* `addr_mux_tb`, `register_en_tb`, `program_counter_tb`: random stimulus
  against a cycle model.
* `mem_block_tb`: the preloaded image byte by byte, then random reads and
  writes against a model, including the one-cycle read latency.
* `ccu_tb`: every opcode (and two unused ones) under all four flag
  combinations. Checks the cycle count, PC steps, jump loads, register and
  flag loads, memory writes and ALU operation of each.
* `computer_tb`: sixteen computers run side by side, one on a directed
  program and fifteen on pseudo-random memory images, each next to an
  instruction-level model. PC, ACCA, C, Z and the instruction's cycle count
  are compared at every instruction boundary, 1,500 instructions each. It
  also counts that every opcode ran, every conditional jump was both taken and
  not taken, and that ADDA carried, SUBA borrowed and a stored byte was
  loaded back.
* `computer_full_tb`: the computer at its default parameters running the
  running-light program for three rounds, checking each LED pattern and how
  long it lasts.

To run one with Verilator (from the directory that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert -y rtl -Irtl \
    rtl/computer_pkg.sv rtl/mem_init_pkg.sv tb/computer_tb.sv \
    --top-module computer_tb
./obj_dir/Vcomputer_tb
```

## Limits

* The memory is an array with initial contents, which FPGA tools map to block
  RAM. An ASIC would need a RAM macro and a way to load the program.
* Nothing is memory-mapped: the LEDs show ACCA directly, so they also show
  intermediate accumulator values of any program that computes with ACCA.
* No interrupts, no stack and no halt instruction. A program runs until reset.
