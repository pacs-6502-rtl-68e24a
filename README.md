# PACS 6502: a 6502 core behind a host-controlled memory port

This is a 6502 processor, in the flavour of the NES's 2A03 (a 6502 with
the decimal mode removed). It is built as a memory-mapped peripheral for a
system-on-chip FPGA. The host processor on the same chip writes a compiled
6502 program into the core's 64 KiB memory, starting at address `0000`. It
then starts the core, pauses it, and reads the memory back. Nothing protects
the memory: the host can read and write every byte of the 6502's address
space. That makes the peripheral both a faithful model of the machine and a
debugger for 6502 programs.

The RTL follows the PACS 6502 project report: its system structure, its
host command codes, its opcode tables and its CPU, ALU and memory split. It
completes what that project left unfinished, and it fixes the points where
its listings do not match the 6502. Those points are listed under
[Departures](#departures).

## System structure

```
             host port (Avalon-MM slave, 16-bit words)
   address, writedata, byteenable, write, read      readdata, readdatavalid
        |                                                 ^
        v                                                 |
  +-----------+  mode                                     |
  | command   |---------+--------------------+            |
  | decoder   |         | rst / ready        |            |
  +-----------+         v                    |            |
                 +-------------+   addr,     v            |
                 |  pacs_cpu   |---d_out,-->[mux]--> pacs_memory --+--> d_in
                 |  (6502)     |   write      ^        64K x 8     |
                 +-------------+              |                    |
                        ^        host address, data, write         |
                        +------------------------------------------+
```

`pacs_nes_ctrl` is the top. It holds one single-port memory (`pacs_memory`)
shared by two masters. A multiplexer gives the memory port to the CPU while
the CPU runs, and to the host otherwise. The memory's read data goes to the
CPU's data input and to the host's `readdata` alike.

`mode` says who owns the memory:

| mode          | CPU                     | memory port |
|---------------|-------------------------|-------------|
| `MODE_HOST`   | held in reset (PC=0000) | host        |
| `MODE_RUN`    | runs                    | CPU         |
| `MODE_PAUSED` | frozen (`ready` low)    | host        |

## Host protocol

One 16-bit word per memory byte. The word address is the byte address.
Host software that writes program byte `x` at byte offset `2x` of the
bridge window, and commands at byte offset `1`, therefore maps straight onto
this interface.

| access                      | effect |
|-----------------------------|--------|
| write, `byteenable[1]`      | `writedata[15:8]` is a command (table below) |
| write, `byteenable[0]`      | `writedata[7:0]` is written to `memory[address]` if the host owns the memory; ignored while running |
| read                        | one cycle later: `readdatavalid`=1, `readdata = {6'b0, mode, byte}` |

| command            | code | effect |
|--------------------|------|--------|
| `RESET_CPU`        | 0    | hold the CPU in reset, host owns memory |
| `START_CPU`        | 1    | run; from reset at `0000`, from a pause where it stopped |
| `PAUSE_CPU`        | 2    | freeze a running CPU, host owns memory |
| `WRITE_MEM`        | 3    | same as `RESET_CPU` (used before loading) |

While paused, the byte returned is `memory[address]`. While running, it is
the byte on the CPU's bus. To inspect a running program, pause it, read,
and then start it again. `write_pulse` is high for one cycle after each host
write. On the board it drove an LED as an activity cue.

A typical session: `WRITE_MEM`, then byte writes of the program, then
`START_CPU`. Later, `PAUSE_CPU`, reads, and `START_CPU` or `RESET_CPU`.

## The CPU

### Instruction set

Instructions that reference memory are encoded `aaabbbcc`. `cc` selects one
of three groups, `aaa` the operation and `bbb` the addressing mode.
`pacs_decode` implements exactly these three tables:

| cc | aaa = 000 … 111                          | bbb (modes)                                              |
|----|------------------------------------------|----------------------------------------------------------|
| 01 | ORA AND EOR ADC STA LDA CMP SBC          | (zp,X) zp # abs (zp),Y zp,X abs,Y abs,X                  |
| 10 | ASL ROL LSR ROR STX LDX DEC INC          | # zp A abs – zp,X – abs,X (zp,Y / abs,Y for LDX, STX)    |
| 00 | – BIT JMP JMP(abs) STY LDY CPY CPX       | # zp – abs – zp,X – abs,X                                |

Only the combinations that exist on the 6502 are decoded, 117 opcodes in
all. STA has no immediate form, BIT takes zp and abs only, and CPX and CPY
take #, zp and abs. Every other opcode runs as a one-byte, two-cycle
no-operation. That covers the single-byte instructions (transfers, flag
set/clear, INX …), the branches, the stack instructions, BRK and RTI. There
are no interrupts and no stack pointer. A program ends by jumping to itself
(`JMP *`).

Flags: N and Z follow every load and every ALU result. C is set by ADC,
SBC, the compares and the shifts. V is set by ADC and SBC. BIT copies
memory bits 7 and 6 into N and V and sets Z from `A & M`. Arithmetic is
binary only. P resets to `8'h20`; D and I never change.

### Bus timing and the overlapped fetch

This is the part to understand before changing the sequencer. The memory is
synchronous. The byte at the address the CPU drives in cycle *n* arrives on
`d_in` in cycle *n+1*. The address is combinational and may depend on
`d_in` in the same cycle. For example, the cycle in which the high byte of
an absolute address arrives already drives `{d_in, ADL}`. This is what
makes the 6502's own cycle counts possible with a synchronous RAM.

As on the 6502, the last cycle of an instruction is the opcode fetch of the
next one (`sync` high). A read instruction's operand arrives during that
fetch cycle. The ALU result and the flags are written at the end of it, and
the decoded fields of the old instruction are kept until the decode cycle
replaces them.

```
LDA #n :  SYNC(fetch op) DECODE(fetch n)  SYNC(next op; A <= n)
LDA zp :  SYNC  DECODE(fetch zp)  ZP(read {00,zp})  SYNC(A <= data)
STA abs:  SYNC  DECODE(fetch lo)  ABS1(fetch hi)  ABS2(write {hi,lo})  SYNC
```

Cycle counts (all checked against a reference model):

| mode        | read | store | read-modify-write |
|-------------|------|-------|-------------------|
| # / A       | 2    | –     | 2 (A)             |
| zp          | 3    | 3     | 5                 |
| zp,X / zp,Y | 4    | 4     | 6                 |
| abs         | 4    | 4     | 6                 |
| abs,X / abs,Y | 4, +1 on page crossing | 5 | 7       |
| (zp,X)      | 6    | 6     | –                 |
| (zp),Y      | 5, +1 on page crossing | 6 | –         |
| JMP abs / JMP (abs) | 3 / 5 |   |                  |

Indexed modes add the index to the low byte first, with the carry kept in
`carry_q`. If there is no carry and the instruction only reads, the access
goes out at once. Otherwise a fix-up cycle (`S_FIX`) adds the carry to the
high byte, and the first access is a dummy read. Zero-page indexing wraps
within page zero, and so does the pointer of both indirect modes.
Read-modify-write instructions write the unmodified byte back, then the
result, like the NMOS 6502. `JMP (abs)` reads the target's high byte from
the same page as its low byte, which reproduces the NMOS page-wrap bug.

### Datapath

The registers are A, X, Y, P, PC and the instruction register. There are
also the address latches ADL and ADH, the base latch BAL (zero-page and
pointer addresses), the effective-address register (for read-modify-write
and JMP indirect) and a modify buffer. One `pacs_alu` is shared. In the
addressing cycles it forms addresses (index + base, pointer + 1, high byte
+ carry). In the fetch cycle and the modify cycle it executes the
instruction. Left shifts are `a + a`. INC and DEC add or subtract with the
carry input. Compares subtract with the carry input set.

### Freeze and resume

`ready` low is a clock enable for the whole core, and it forces `write`
low. The byte that arrives in the first frozen cycle is the reply to the
last real address. The core latches it and uses it in place of `d_in` until
it runs again. While paused, the host may therefore read and write memory
at will, and the core still resumes exactly where it stopped. Only a host
write to the very byte the core has just read would go unseen.

## ALU

`pacs_alu` has the 6502's function units: adder, OR, XOR, AND and shift
right. The operation code enables one of them. It computes carry-out,
signed overflow, zero and sign. Subtraction is `a + ~b + carry_in` (carry
set means no borrow). Shift right moves `carry_in` into bit 7 and bit 0 out
to the carry, which gives both LSR and ROR. It is purely combinational. The
register that the CPU writes the result into serves as its output register.

## Departures

From the 6502 / 2A03:
- Execution starts at `0000` after reset. The reset vector is not read.
- No interrupts, no stack, no single-byte instructions or branches. These
  opcodes execute as 2-cycle NOPs.

From the original project's RTL (its behaviour, not its code, was taken):
- Commands are decoded only on a host write. Its controller looked at the
  command byte in every cycle.
- `byteenable` separates command writes from data writes. Without it, its
  host software's command write would also have overwritten memory byte 0.
- `PAUSE_CPU` is implemented. It was defined but had no effect.
- `readdata[9:8]` carries the mode, and `readdatavalid` is added.
- The ALU's overflow is the 6502's V (signed overflow), not the carry into
  bit 7. Zero looks at the 8-bit result.
- LDX and STX index with Y, as on the real part, where the opcode table
  prints X for that column.
- The stack pointer register S appears in the datapath drawing, but no
  implemented instruction uses it, so it is not built.

The board-level parts are not included. That means the vendor HPS system
and its bus bridge, the DDR3 interface, and the key debouncer and LED
blinker from the board tutorial. `pacs_nes_ctrl`'s host port is where the
bus bridge connects.

## Verification

Every module has a self-checking testbench that prints
`TB_RESULT checks=N failures=M`:

- `tb_pacs_alu`: all operations, all operand pairs, both carries, against
  integer arithmetic.
- `tb_pacs_decode`: all 256 opcodes, against a table written by opcode
  value.
- `tb_pacs_memory`: writes the full 64 KiB, reads it back in a strided
  order, and checks the read latency and the hold during a write.
- `tb_pacs_cpu`: 25 episodes of 2000 instructions of random code (biased
  to implemented opcodes, self-modifying, jumping), with random `ready`
  stalls during which the memory returns garbage. At each fetch it checks
  the fetch address and the cycle count. It then checks A, X, Y and P, and
  at the end the whole memory. All 117 opcodes, page crossings,
  read-modify-writes and stalls must occur.
- `tb_pacs_nes_ctrl` (full size, default parameters): loads the full
  64 KiB image through the host port. It runs the sample test programs
  (loads, ADC/SBC chains, logic ops, compares, absolute/indexed/indirect
  loads, stores to `$0200`–`$0202`, `$07AA`, `$0506`). It pauses in
  mid-program, accesses memory while paused, and resumes. It tries a write
  while running, which must be ignored. It pauses exactly after the last
  instruction and checks the cycle count, the registers and all 64 KiB read
  back through the port. Then come three random programs from reset, each
  resumed after a full read-back.

`tb/pacs_ref_pkg.sv` is an instruction-level model used by the CPU and
system testbenches. It decodes by opcode value and shares no code with the
RTL.

Run a testbench with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/pacs_pkg.sv tb/pacs_ref_pkg.sv rtl/pacs_alu.sv rtl/pacs_decode.sv \
  rtl/pacs_cpu.sv rtl/pacs_memory.sv rtl/pacs_nes_ctrl.sv \
  tb/tb_pacs_nes_ctrl.sv --top-module tb_pacs_nes_ctrl
./obj_dir/Vtb_pacs_nes_ctrl
```

Each run takes seconds. Lint with `verilator --lint-only -Wall`.

## Files

| file | contents |
|------|----------|
| `rtl/pacs_pkg.sv` | enums for ALU operations, instruction operations, addressing modes, host commands and modes; decoded-instruction struct |
| `rtl/pacs_alu.sv` | ALU |
| `rtl/pacs_decode.sv` | opcode decoder |
| `rtl/pacs_cpu.sv` | sequencer, registers, shared ALU |
| `rtl/pacs_memory.sv` | 64 KiB synchronous RAM (`ADDR_W` = 16) |
| `rtl/pacs_nes_ctrl.sv` | top: host port, command decoder, memory multiplexer |
| `tb/*.sv` | testbenches and the reference model |

To change the memory size, set `ADDR_W` on `pacs_nes_ctrl`. The CPU
always drives 16 address bits, and the upper bits are dropped.
