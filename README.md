# TRM cell network: two tiny processors talking through FIFO channels

This RTL builds a small "cell network": a set of independent processors,
each with its own private memories, that communicate only through
point-to-point FIFO channels. Every cell is a TRM (Tiny Register Machine), a
32-bit single-cycle processor with 18-bit instructions. A cell reaches its
channels and peripherals through the top 64 words of its data address space.
No bus and no shared memory are involved. The top level, `game_top`, connects
two cells:

```
          LEDs   buttons
            ^      |
            |      v
        +-----------------+
        |     IO cell     |
        |      (TRM)      |
        +-----------------+
     ch1 |           ^ ch0
         v           |
        +-----------------+
        | Controller cell |
        |      (TRM)      |
        +-----------------+
```

The Controller cell has no peripherals. It talks to the outside world only
through the IO cell.

## The TRM processor (`trm`)

### Architectural state

- The PC counts 18-bit instructions.
- Eight 32-bit registers `r0`..`r7`. `r7` is the link register.
- Condition flags N, Z, C and V.
- The high-word register H holds the upper half of the last product.
- The instruction memory is `IMB` blocks of 512 x 36 bits. Each word holds
  two instructions: the even one in bits [17:0], the odd one in [35:18].
- The data memory is `DMB` blocks of 512 x 32 bits, addressed by word.

With the defaults (`IMB=1`, `DMB=4`) a cell holds 1024 instructions and
2048 data words. The top 64 of those words are I/O space.

### Instruction format

| bits    | field  | use |
|---------|--------|-----|
| [17:14] | op     | operation |
| [13:11] | rd     | destination, and operand B |
| [10]    | isReg  | 1: operand A = register rs; 0: A = zero-extended imm |
| [9:0]   | imm    | 10-bit immediate |
| [9:3]   | offset | 7-bit load/store offset |
| [2:0]   | rs     | source register, or load/store base |

| op | mnemonic | effect |
|----|----------|--------|
| 0  | MOV  | B := A. The register form with bit 3 set is LDH: B := H |
| 1  | NOT  | B := ~A |
| 2  | ADD  | B := B + A |
| 3  | SUB  | B := B - A |
| 4  | AND  | B := B & A |
| 5  | BIC  | B := B & ~A |
| 6  | OR   | B := B \| A |
| 7  | XOR  | B := B ^ A |
| 8  | MUL  | B := low word of B * A (signed), H := high word; 2 cycles |
| 10 | ROR  | B := B rotated right by A[4:0] |
| 11 | BR / BLR | bits [10:9] = 10: PC := A. Bits = 11: also rd := PC+1 |
| 12 | LD   | rd := mem[rs + offset]; 2 cycles |
| 13 | ST   | mem[rs + offset] := rd |
| 14 | Bc   | if cond [13:10] holds, PC := PC+1 + signed [9:0] |
| 15 | BL   | r7 := PC+1; PC := PC+1 + signed [13:0] |

Two addressing rules:

- A load or store whose base register is `r7` ignores the register and uses
  the offset as an absolute address. Branches do not use the data memory, so
  `r7` holds a code address that would make no sense as a data address.
- Every register write also updates the flags from the ALU output. N and Z
  come from the 32-bit result. C is the carry out, or the bit rotated out by
  ROR. V is set only by ADD and SUB.

One consequence is easy to miss: after MUL, LD or ROR, the flags come from
the ALU's default function of the operands, not from the value written. Do
not test the flags right after those instructions.

Condition codes use the ARM numbering:

| code | 0  | 1  | 2  | 3  | 4  | 5  | 6  | 7  | 8  | 9  | 10 | 11 | 12 | 13 | 14 | 15 |
|------|----|----|----|----|----|----|----|----|----|----|----|----|----|----|----|----|
| name | EQ | NE | CS | CC | MI | PL | VS | VC | HI | LS | GE | LT | GT | LE | AL | NV |

### Timing: one cycle per instruction, two for loads and multiplies

The core has no pipeline. Each instruction reads its registers, computes
and writes back in one cycle. The exception is the data memory: its read is
clocked, like an FPGA block RAM, so a loaded word arrives one cycle late.
LD therefore takes two cycles:

1. **Stall cycle.** The address goes to the memory. The PC holds its value
   and the register write is suppressed. The instruction memory reads the
   same PC again, so the same instruction is decoded in the next cycle.
2. **Write cycle.** The memory output (or the registered I/O input) is
   written to `rd` and the PC moves on.

MUL uses the same two-cycle pattern. The product of B and A is registered
at the end of the stall cycle. Its low word is written in the second cycle,
and its high word goes to H at the end of that cycle. Stores never stall.

The instruction memory is clocked too, but it costs no cycle. It is
addressed with the *next* PC (`pcmux`), so the word for the current PC is
ready when that PC becomes current. While reset is held, the core executes
a NOP (`MOV r0, r0`).

Next-PC selection, in priority order:

1. reset: 0
2. stall: PC
3. BL: PC+1+offset14
4. taken Bc: PC+1+offset10
5. BR or BLR: operand A
6. otherwise: PC+1

### I/O space

A load or store whose word address has all bits from 6 up set goes to I/O,
not to memory. With `DMB=4` these are addresses 0x7C0 to 0x7FF. For such an
access, the core drives:

- `ioadr`: the address bits [5:0].
- `outbus`: the value of `rd`, on stores.
- `iowr`: high for the one cycle of an I/O store.
- `iord`: high for both cycles of an I/O load.

`inbus` is registered at the end of the load's first cycle. That registered
value is what the load writes to `rd`.

The quickest way to get an I/O base into a register is `NOT r6, #63`, which
gives 0xFFFFFFC0. The low 11 bits of that are 0x7C0. A later
`LD rX, [r6 + 33]` then reads I/O address 33.

## Channels and how a cell uses them

Each channel (`par_channel`) is a 16 x 32-bit first-word-fall-through FIFO.
It has a write request, a read request, the front word and a status word.
Status bit 0 means data is available; bit 1 means full. A write to a full
channel is dropped, and a read of an empty one does nothing.

Each cell uses the same I/O map for its ports:

| I/O address | read | write |
|-------------|------|-------|
| 32 | front word of the input channel; the load removes it | - |
| 33 | status of the input channel | - |
| 34 | - | append to the output channel |
| 7 (IO cell only) | buttons | LEDs (low byte of the stored word) |

Programs synchronise by polling. A receiver reads 33 until bit 0 is set,
then loads from 32. A sender that must not lose data checks bit 1 first, on
the receiving side or through a handshake of its own.

Both sides of a channel have one cycle of glue logic each.

**Writer side (`chan_out_port`).** `iowr`, `ioadr` and `outbus` are
registered. The channel's write request is decoded from the registered
copies, so a word enters the channel one cycle after the store.

**Reader side (`chan_in_port`).** A combinational mux puts the channel's
front word (address 32) or status (address 33) on the reading cell's
`inbus`. The read request is a register. It is set in the second cycle of a
load from 32 and cleared again in the cycle after. The core captures the
front word at the end of the load's first cycle, and the FIFO then removes
exactly that word at the end of the second.

Without the `~rdreq` term in that register, the two-cycle `iord` would
remove two words per load.

The IO cell's input mux gives the channel first, then the Button word at
address 7, then zero. The LED register decodes address 7 on its own, from
the IO cell's unregistered `iowr` and `ioadr`.

## Files

| file | contents |
|------|----------|
| `rtl/trm_pkg.sv` | opcodes, condition codes, control struct, flag struct, NOP |
| `rtl/trm_decoder.sv` | instruction decode (control path) |
| `rtl/trm_alu.sv` | ALU and rotator |
| `rtl/trm_regfile.sv` | 8 x 32 registers, one write and two asynchronous read ports |
| `rtl/trm_imem.sv`, `rtl/trm_dmem.sv` | instruction and data memories (clocked reads) |
| `rtl/trm_flags.sv` | N Z C V |
| `rtl/trm_mul.sv` | registered multiplier and H |
| `rtl/trm.sv` | the processor |
| `rtl/par_channel.sv` | FIFO channel |
| `rtl/chan_out_port.sv`, `rtl/chan_in_port.sv` | writer and reader glue of a cell port |
| `rtl/led.sv`, `rtl/button.sv` | peripherals of the IO cell |
| `rtl/game_top.sv` | the two-cell network |
| `tb/trm_asm_pkg.sv` | instruction encoders for writing test programs |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Loading programs

`trm` has a load port: `pm_we`, `pm_wadr`, `pm_wdat`. Each write stores one
36-bit word, which is two instructions. `game_top` shares the address and
data lines between the two cells and has one write enable per cell. Load
while `rst` is low.

Alternatively, the `CODE_FILE` parameter of `trm` (`CTRL_CODE` and
`IO_CODE` on `game_top`) names a `$readmemh` file of 36-bit words. That
file is read at time zero.

`tb/trm_asm_pkg.sv` has one function per instruction form. For example,
`op_i(OP_ADD, 1, 5)` encodes `ADD r1, #5`, `ld(3, 6, 32)` encodes
`LD r3, [r6+32]`, and `bc(C_NE, -3)` encodes a conditional branch. `tb/tb_game_top.sv` holds a complete pair of programs.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
plain Verilator, from the directory above `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_game_top \
  -y rtl -y tb +libext+.sv rtl/trm_pkg.sv tb/trm_asm_pkg.sv tb/tb_game_top.sv
./obj_dir/Vtb_game_top
```

Replace `tb_game_top` with any other testbench name to run it.

`tb_game_top` runs the whole network at its default sizes:

1. The IO cell copies the buttons to the LEDs.
2. The IO cell sends 1..16 in one burst. The channel fills up, because the
   Controller is still in a delay loop.
3. The Controller polls, receives each number, squares it in a subroutine
   (BL, MUL, BR) and sends it back.
4. The IO cell shows each square on the LEDs, then the sum (1496).

The run takes about 630 cycles. The testbench checks every LED value, the
stored sum, the channel traffic and the count of calls and multiply stalls.
It also requires at least one load stall, one empty poll, one full channel,
one taken branch and one button read.

`tb_trm` runs a single core on a program that covers every instruction
class. It compares each register write with a hand-worked trace and checks
the exact cycle count: 38 instructions plus 5 stall cycles.

`tb_trm_cond` tests all 16 branch conditions on the core. It sets the
flags 8 different ways, covering zero, negative, carry and signed overflow
in both directions. Each branch outcome is compared with truth values
computed in the testbench.

## How far this follows the source design, and where it departs

Taken directly from the source design:

- the datapath and control equations: decode, regwr, regmux, pcmux, the
  flag rules, the stall rule and the I/O decode;
- the instruction fields;
- the memory sizes `IMB=1`, `DMB=4`;
- the I/O addresses 32, 33, 34 and 7;
- the registered writer-side glue and the self-clearing read request.

This design's own choices:

- **Memory block size.** A block is read as 512 words. That makes `IMB=1`
  give 1024 instructions and `DMB=4` give 2K x 32.
- **NOP.** Its encoding (`MOV r0, r0`).
- **Conditional branches.** The condition field position [13:10] and the
  ARM-style codes.
- **ROR.** B rotated by A[4:0].
- **Multiplier.** Signed, registered, with H loaded on the write cycle.
- **Channels.** A depth of 16, the status bits, and dropping writes when
  full.
- **LED address.** 7, the same number as the button read.
- **Button.** 4 pins and a two-flip-flop synchroniser.
- **Reset.** Registers and the read-request register are cleared by reset.
- **Program loading.** The load port and `CODE_FILE`. On an FPGA, code is
  patched into the bitstream instead.
- **Unmapped inputs.** An unmapped I/O read returns 0.

Not built:

- **Vector instructions.** Their opcode pattern is only decoded to suppress
  the register write.
- **Interrupts.**
- **The 7-segment "Digits" cell** of the larger lab network. A simplified
  TRM for it is available as `trm #(.MUL_EN(0))`.
- **Board-level items:** FPGA pins and constraints.

Odd encodings do what the datapath equations give, with no special meaning:
op 9, op 11 with bit 10 clear, and LD/ST with bit 10 set. Op 9 and op 11
with bit 10 clear write `~A` to `rd`. LD/ST with bit 10 set write nothing.

Lint notes: the flags use an asynchronous reset while the PC and the other
registers use a synchronous one, so Verilator reports `rst` as used both
ways. The decoder ignores instruction bits [6:4], which no instruction
field covers.
