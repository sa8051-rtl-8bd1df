# SA8051: an 8051 core that talks to memory only by handshake

SA8051 is an 8051-compatible microcontroller core designed for low power. It
was originally built as an asynchronous (self-timed) circuit. The core has no
free-running clock. Its program and data memories are ordinary synchronous
block RAMs. The only place a clock is needed is the small bridge between the
core and each memory. The core touches a memory only through a four-phase
request/acknowledge handshake, and it makes only the accesses an instruction
really needs. An idle core therefore leaves the memories disabled, and a
one-byte register instruction costs exactly one program-memory read.

This repository gives that system as synthesizable SystemVerilog. The
memories, the handshake bridges and the handshake cells are as the design
describes them. The core keeps the design's structure: its registers, its
regular/irregular decoder, its ALU, its bit-address logic, its bypasses and
its handshake discipline. However, it is written as a clocked state machine,
not as self-timed logic. The section "Departures" below says exactly where
this RTL differs.

## System

```
            activate ──► nc2p hold ──► ┌──────────────┐
            reset ───────────────────► │  sa8051_cpu  │ ◄── p0_in..p3_in
                                       │              │ ──► p0_out..p3_out
   rom_addr_req ─┐                     └──────────────┘
   rom_data_req ─┴► C-element ─► rom_en ─► sa8051_rom (4 KB) ─► rfd ─► ack FF ─► rom_ack
   ram_rd_req ───┐
   ram_wr_req ───┴► OR ───────► ram_en ─► sa8051_ram (256 B) ─► rfd ─► ack FF ─► ram_ack
```

`sa8051_top` holds the following:

- the core;
- a 4 KB program memory (`sa8051_rom`) and a 256-byte data memory (`sa8051_ram`);
- a handshake bridge for each memory (`sa8051_rom_if`, `sa8051_ram_if`);
- four 8-bit input ports and four 8-bit output ports.

`activate` starts the core. When `activate` is low the core sits idle at an
instruction boundary and makes no memory requests. `reset` is asynchronous and
active high. It clears the PC and the SFRs and sets the port latches to FFh.

The program memory is written through `rom_load_we/addr/data` while the core
is held in reset or idle. In an FPGA this port would be replaced by block-RAM
initial contents.

## The memory handshake (the part that sets the speed)

Each memory access is a full four-phase cycle:

1. The core raises a request and holds the address (and the write data) steady.
2. The bridge enables the memory. The memory latches the access at the next
   clock edge and raises its ready flag `rfd`.
3. At the following edge the bridge's acknowledge flip-flop sets, and the core
   takes the data.
4. The core drops the request. This disables the memory.
5. `rfd` clears at once, without waiting for a clock, and it clears the
   acknowledge flip-flop asynchronously.
6. The core waits for the acknowledge to fall before it starts the next
   access.

So a request is acknowledged two clock edges after it is raised. This
two-clock worst case is the bottleneck of the whole design. At low memory
clock rates the core outruns a conventional clocked 8051. At high rates the
clocked 8051 wins.

The two bridges differ only in how they combine requests:

- **Program memory.** The core has two channels, an address channel and a
  data channel, and raises both requests for every fetch. A Muller C-element
  (`c_element`) joins them. The memory is enabled only when both are up, and
  stays enabled until both are down.
- **Data memory.** The core has separate read and write requests, and they are
  ORed. `ram_rnw` (1 = read) selects the operation. Assertions in
  `sa8051_ram_if` check that the two requests never overlap, and that the
  acknowledge is high only while a request is.

## The core

### Sequencing

The core repeats one loop: check reset, fetch the opcode at PC into IR
(PAR := PC, then a ROM handshake), increment PC, then execute. Execution is a
short sequence of steps, counted by a 4-bit step counter. Each step either does
register work in one clock or starts one memory handshake and waits for it.
The core has four states: `S_FETCH`, `S_EXEC`, `S_ROM` (waiting on a
program-memory handshake) and `S_RAM`.

A fetched operand byte goes straight into the register that uses it:

- RAR, for a direct address;
- T1 or T2, for data;
- OP1 or OP2, for branch offsets and 16-bit constants.

A two-byte instruction therefore reads the program memory exactly twice. A
clocked 8051 reads the program memory twice in every machine cycle, whether or
not it needs the byte.

The registers are:

- PC, and PAR, the program address register;
- IR;
- T1, T2 and T3, which feed the ALU;
- RAR, the data-memory address register;
- ACC, B, PSW, SP and DPTR;
- the four port latches.

ACC, B, PSW, SP, DPL, DPH and the port latches live in the core. A direct
access to any of them completes without a memory handshake. Every other
direct address, including the rest of the SFR space 80h–FFh, goes to the data
memory. Reading a port address returns the input pins `pN_in`. Writing a port
address sets the output latch `pN_out`.

### Decoding: regular and irregular

The 8051 opcode map is regular in its lower rows. In low nibbles 5–F, each
column is one operation, such as ADD A,x. The low nibble then only picks the
operand x: #data, direct, @R0/@R1 or R0–R7. `sa8051_judge_regular` classifies
an opcode with a small case table on the two nibbles. It finds 178 regular
opcodes.

Regular opcodes share one generic sequence:

1. Form the operand address from the low nibble.
2. Read the operand into T1 or T2.
3. Run the ALU operation for the column.
4. Write the result back.

Irregular opcodes (jumps, calls, accumulator operations, bit instructions,
MOVC, PUSH/POP and so on) each have their own sequence.

Fetching is common to every instruction. After the fetch, a de-multiplexer
cell (`balsa_demux`) steers the execute activation to either the regular or
the irregular sequences. This is the "common part first, then the case"
arrangement that keeps the control small.

### Bypasses

- **Bus bypass.** Registers are copied directly instead of through a shared
  bus. The copies are PC→PAR, T1→RAR, T1→T2 and T2→RAR. PAR has a 16-bit
  multiplexer (`balsa_mux`) in front of it. The multiplexer selects PC for
  fetches, or the ALU's 16-bit result for `MOVC A,@A+DPTR` and `MOVC A,@A+PC`.
- **ALU bypass.** MOV-class instructions never pass through the ALU, and they
  leave the ALU's operation register unchanged.

### ALU

`sa8051_alu` is combinational. It has three byte inputs (`src_1..src_3`, fed by
T1–T3), two byte outputs (`result_1`, `result_2`) and the flags CY, AC and OV.
A single adder, split after bit 3 to produce AC, serves ADD, ADDC, SUBB and
compare:

- **SUBB** adds `src_1 + ~src_2 + ~cy` and inverts the carry and the auxiliary
  carry afterwards.
- **OV** is the carry into bit 7 XOR the carry out of bit 7.

The 16-bit operations use `src_3` as the high byte and return
`{result_2, result_1}`. There are two of them:

- ADD16 forms the MOVC address.
- REL16 forms the target of a relative branch. It adds the sign-extended
  offset.

The other operations are INC, DEC, ANL, ORL, XRL, the rotates, SWAP, DA, CPL,
CLR, XCHD and PASS. The 5-bit operation codes are in `sa8051_pkg`.

### Bit instructions

`sa8051_bit_addr` maps a bit address to a byte address and a bit index:

| Bit address | Byte address | Bit index |
|---|---|---|
| 00h–7Fh | 20h + bit[6:3] | bit[2:0] |
| 80h–FFh | bit[7:3] followed by 000 (an SFR) | bit[2:0] |

The core executes a bit instruction in three steps:

1. Read that byte into T1, using the SFR shortcut where it applies.
2. Test or modify the selected bit in T1.
3. Write the byte back, if the bit was modified.

## Handshake cells

The cells are written as behaviour, not as gate netlists.

- **`c_element`**: the output follows the inputs when they agree and holds
  otherwise.
- **`nc2p`**: an asymmetric inverting C-element. `i0 = 0` forces the output
  to 1, `i0 = i1 = 1` forces it to 0, and otherwise it holds. In the top it
  keeps the core's activate high until the current instruction ends.
- **`balsa_mux`** and **`balsa_demux`**: a 2:1 multiplexer and a 1:2
  de-multiplexer.

`c_element` and `nc2p` are latches by design, and synthesis reports them as
latches.

## Departures and limits

- **Clocked core.** The original core is self-timed. Here the core advances
  one step per clock, and memory waits are set by the handshakes. The
  interface protocol, and the set and number of memory accesses per
  instruction, are kept. The timing inside the core is not.
- **Not implemented:** MUL AB, DIV AB and MOVX. They execute as one-byte
  no-ops, as in the original. Opcode A5 is also a no-op.
- **No peripherals:** there are no interrupts, timers or UART. RETI behaves as
  RET.
- **PSW flag positions.** CY is PSW.7 and AC is PSW.6, as in the standard 8051.
  A description of the ALU ports puts them the other way round.
- **nc2p behaviour.** The cell follows its truth table, which one prose
  description contradicts.
- **rNw polarity.** `ram_rnw` is 1 for a read, as its name says. One
  description of the memory model gives the opposite polarity.
- **Port addresses.** The output ports sit at the standard SFR addresses 80h,
  90h, A0h and B0h. Port reads return the pins, also for read-modify-write
  instructions.
- **Choices of this RTL.** The following are not part of the original design:
  - the reset values (SP = 07h, port latches FFh);
  - the ALU operation encoding;
  - the step schedule;
  - the clocked form of the `rfd` flags;
  - the program-memory load port;
  - the use of an `nc2p` on `activate`.
- **Not built.** The S-element and the Balsa handshake components (Fetch,
  Sequence, Concurrent, Variable) belong to the original's self-timed
  implementation. A clocked core does not use them, so they are absent. The
  board's clock divider is also absent: `clk` is the already-divided memory
  clock.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb rtl/sa8051_pkg.sv \
    tb/tb_sa8051_top.sv --top-module tb_sa8051_top -o sim
./obj_dir/sim
```

`tb_sa8051_top` runs the full system at its default sizes (4 KB and 256 B). It
runs six small programs, hand-assembled in the testbench:

| Program | What it does | Result checked |
|---|---|---|
| sort | bubble-sorts 8 bytes copied from a program-memory table by MOVC | RAM and P0/P1 |
| GCD | Euclid's algorithm on the P1 and P2 inputs | P3 |
| Fibonacci | F0–F12 | RAM 40h–4Ch |
| int2bin | converts a byte to 8 ASCII digits | RAM 50h–57h |
| negcnt | counts negative bytes in a table, using JNB ACC.7 | P2 |
| cast | sign-extends P1 and adds 0123h | P2:P3 |

Expected results are computed in the testbench from random inputs. During the
sort the core is parked with `activate`. GCD is reset part-way and rerun.

The testbench also checks the following:

- every memory acknowledge arrives within two clock edges;
- MOV-class instructions do not use the ALU;
- SFR operands cause no data-memory handshake;
- each mechanism occurs at least once: both handshakes, regular and irregular
  decode, bit instruction, SFR bypass, ALU bypass, PAR loaded from the ALU,
  taken branch, idle and reset.

`tb_sa8051_cpu` drives the core alone, with random handshake delays. It checks
the number of program- and data-memory accesses for each instruction.
