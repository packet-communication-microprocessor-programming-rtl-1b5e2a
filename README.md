# MP: an 8 bit packet communication microprocessor in SystemVerilog

The MP is a small, fast, microprogrammed 8 bit computer. It was built to
simulate devices that talk to each other by sending packets one byte at a time.
A host computer loads a program into it, starts it and reads its results. While it
runs, the MP moves bytes between two byte-serial ports. Each port carries 8 data
bits and a "last byte of packet" bit. Between those transfers the MP computes on
the bytes with a rich 8 bit ALU.

Internally it is a classic bit-slice design:

- a 2903-style ALU with a 16 register scratchpad, a Q register and multiply,
  divide and normalize steps;
- a 2910-style sequencer with a 12 bit PC, a 5 deep call stack and a 12 bit
  loop counter.

Each 40 bit instruction drives both at once. One instruction can therefore
compute, shift, move a byte to or from memory or an IO port, and branch or
count a loop in the same step.

This RTL implements the whole machine as the MP programming manual describes
it, including its instruction set and op-codes. It executes one instruction per
clock cycle.

## Machine state

| state | size | role |
|---|---|---|
| program memory | 4096 x 40 | the program; written by the host only |
| data memory | 65536 x 8 | read/write by the program at the address register; by the host while idle |
| address register | 16 bits | data memory address; each half loadable from an ALU result |
| scratchpad | 16 x 8 | general registers, SRC and DST operands |
| Q | 8 bits | second operand on request, low half of double-length shifts, multiplier / quotient |
| condition code | N Z V C | set by ALU instructions, or directly by class III |
| sign compare | 1 bit | carries the add/subtract decision between divide steps |
| PC | 12 bits | program counter |
| call stack | 5 x 12 | return and loop-restart addresses; a sixth push loses the oldest |
| address/count | 12 bits | loop counter or alternative jump address |
| offset | 8 bits | computed jump addresses (dispatch tables) |
| port select | 2 bits | bit 1 picks the input port, bit 0 the output port |

C follows the "carry, not borrow" convention. `X - Y` is computed as
`X + ~Y + 1`, so C = 1 means no borrow, that is X >= Y unsigned.

## The instruction word

Bits 39-38 choose one of four classes:

- **Class I (arithmetic and shift)**: an ALU operation with a shift and a
  shift link, or one of the special step operations.
- **Class II (arithmetic, IO and memory)**: an ALU operation whose first operand
  may be an 8 bit immediate. Its second operand may be replaced by memory, IO
  data, the IO status byte or the condition code. Its result may also go to
  memory, an output port, either half of the address register, the offset
  register or port select.
- **Class III (CC operations)**: set, clear, invert or load any of N, Z, V, C,
  or swap C and V.
- **Class IV (program control)**: the 16 sequencer operations on one of 16
  conditions.

Classes I-III may also end a subroutine (RTN, unconditional) or count a loop
(LPCT) in the same instruction.

The op-code values and the bit positions of these fields come from the
manual's op-code tables:

| bits | field |
|---|---|
| 29-28 | carry-in |
| 27-24 | ALU function / CC operation / condition |
| 23-20 | shift-destination / special operation |
| 19-16 | PC control |
| 14-12 | IO code |
| 11-8 | shift link / CC mask |

The manual does not give the other positions. This design chooses them:

| bits | field |
|---|---|
| 37 | Q modifier |
| 36 | immediate |
| 35 | memory read (MR) |
| 34 | memory write (WM) |
| 33 | bits 14-12 are an IO *source* |
| 32 | condition enable (0 = always true) |
| 31 | REG option |
| 7-4 | SRC register |
| 3-0 | DST register |
| 11-4 | class II immediate |
| 11-0 | class IV operand |

`rtl/mp_pkg.sv` holds the layout as a packed struct with enums for every code.
`tb/mp_asm_pkg.sv` is a small assembler (one function per class) that builds
words from them.

A consequence of the op-code tables: ALU function 0 means "all ones" (XFF) when
the Q modifier bit is set. With the Q modifier clear it means "special
operation", and bits 23-20 then name the special operation.

## ALU, shifter and shift linker

This is the hardest part of the MP. It lives in `mp_arith_unit`,
`mp_alu` and `mp_shift_linker`.

**ALU.** Sixteen functions on R (the SRC register or the immediate) and S (the
DST register, or Q with the Q modifier):

- eight logical functions;
- ZERO and XFF;
- seven add/subtract forms: `S-R-1+c`, `R-S-1+c`, `R+S+c`, `S+c`, `~S+c`,
  `R+c`, `~R+c`.

The carry-in is 0, 1, the old C, or "Z". The Z carry-in, used only by the special
operations, adds the value the Z flag is about to take. Arithmetic functions set
V and C from the adder. Logical ones clear both.

**Shift / destination.** The 16 codes (bits 23-20) divide into 8 "right" codes
and 8 "left" codes:

- RS and LS shift the ALU result 8 bits.
- RA and LA shift 7 bits and keep the sign.
- The codes ending in RQ or LQ also shift Q by 8 bits.
- NQ and Q copy the result into Q.
- LXT replaces the result with 8 copies of the bit the linker supplies.
- Codes containing N do not write the DST register.

N always reflects the ALU result *before* the shift. Z reflects the *final*
result.

**Shift linker.** The link code (bits 11-8) decides what enters the vacated
end of the ALU result and of Q, and whether C captures a bit. It has one set of
16 meanings for right codes and another set for left codes. The letters in the
link names combine:

| letter | meaning |
|---|---|
| R | rotate |
| O | shift in ones |
| D | treat ALU:Q as one 16 bit register |
| C | C sits at the left end of the chain |
| U | C sits at the right end |
| BC | copy the bit passing the left end into C without putting C in the chain |
| N | shift in the new N |

A link that loads C overrides the adder carry.

Codes that do not shift still talk to the linker:

- Right codes (<null>, Q, NQ, NRQ) hand it the parity of the result and the
  shift-in bit. So `<null>` with link UN puts the result's parity into C.
- Left codes (N, NLQ, Y17) hand it bit 7. So `N` with link C copies the sign
  into C.

`tb/tb_mp_shift_linker.sv` lists all 32 links as a readable table.

**Special step operations** (class I only). Each one is a single step of a
longer algorithm:

- **UMPY, MPY, LMPY** are multiply steps. If Q0 is 1, SRC is added to DST
  (LMPY subtracts it instead). The sum is then shifted right together with Q.
  UMPY shifts in the carry; MPY and LMPY shift in V xor N, which is the
  correct sign.
  - `LSETUP 7; UMPY D LPCT X,Y` multiplies unsigned in 8 steps.
  - `LSETUP 6; MPY D LPCT X,Y; LMPYZ D X,Y` multiplies two's complement in
    8 steps.
- **DNORM, DIV, LDIV** are divide steps. These are non-restoring division
  steps, and the sign compare flip-flop chooses add or subtract for the next
  step. `DNORM RD; LSETUP 6; DIVZ RD LPCT; LDIVZ O` divides a 16 bit dividend
  (Y:Q) by X. It leaves the quotient in Q and the remainder in Y, with
  `-|X| <= Y < |X|`.
- **NORM** shifts Q left and reports its top bits in the flags, for
  normalization.
- **INC** adds 1, or 2 with carry-in 1.
- **SMCVTZ** converts between sign-magnitude and two's complement.

## Memory, IO and special registers (class II)

Memory is addressed by the address register:

- MR substitutes the byte at that address for the second operand.
- WM also writes the result there.

IO sources substitute the selected input byte (RIODAT, which also acknowledges
it), the status byte (RIOSTAT) or the condition code as `0000NZVC` (RCC).

IO destinations send the result to the selected output port (WIODAT, or
WIOLAST with the last bit set), or load:

- the high half (WARL) or low half (WARR) of the address register;
- port select (WPSEL);
- the offset register (WOFF).

The status byte is:

| 7 | 6 | 5 | 4 | 3 | 2 | 1 | 0 |
|---|---|---|---|---|---|---|---|
| 0 | ORS | OR1 | OR0 | LBS | IRS | IR1 | IR0 |

- IRn / ORn: input port n has a byte / output port n can take one.
- IRS / ORS: the same for the selected port.
- LBS: the selected input's byte is the last of its packet.

The manual names these bits but not their positions. The positions here are
this design's choice.

Programs poll the status byte before they read or write. For example,
`ANDI 4 N RIOSTAT` followed by `JMP EQ back` waits for input. Assertions in
`mp_io_mux` flag a read of an empty port or a write to a busy one.

## Sequencer (class IV)

The effective address is one of:

- the 12 bit operand;
- with REG, operand bits 11-8 followed by the offset register;
- for VJMP, operand bits 11-4 followed by offset bits 3-0 (16-way dispatch);
- for JCB, operand bits 11-4 followed by the position of the leftmost 0 in
  the offset register (8 if none).

The operations are:

- JMP, JSR, RTN, EXIT, LOOP, JMPR and JSRR depend on the condition.
- VJMP, LDCT, COUNT, LPCT and RESET ignore it.
- LSETUP pushes the restart address and loads the counter if the condition
  holds.
- TWB is a three-way branch: leave the loop, repeat it, or exit to the
  effective address when the count runs out.

"Push the PC" pushes the address of the *next* instruction. A loop that
LSETUP opens therefore restarts just after it, and a loaded count of n runs
the body n+1 times.

The stack keeps five entries. A sixth push silently drops the oldest. An empty
stack reads as address 0 (the manual leaves this open).

The 16 conditions are the usual signed (GT GE LT LE), unsigned (HI HIS LO LOS),
single-flag (EQ NE MI PL VS VC), and C-or-Z (CZ, NCZ) tests.

## Timing and the host interface

Each instruction takes one clock cycle:

1. The program memory is read synchronously using the sequencer's *next* PC,
   so the instruction for the current PC is ready at the start of the cycle.
2. During the cycle, operands are read, the result is computed, and every
   destination is written on the clock edge.
3. The data memory is likewise read with the address register's next value, so
   MR sees the current address without a wait state.

A write followed by a read of the same address returns the new byte.

The manual says only that the host loads the program, may clear the PC, and may
access data memory while the MP is idle. The ports that implement this are this
design's choice:

- `run = 1` executes instructions. `run = 0` holds the MP idle.
- While idle, the host can:
  - write program words (`pm_we`, `pm_addr`, `pm_wdata`);
  - clear the PC (`pc_clear`);
  - read and write data memory (`dm_*`; `dm_rdata` follows `dm_addr` by one
    cycle).
- After loading a program or clearing the PC, wait one cycle before raising
  `run`.
- Reset clears every register but not the memories.

The MP has no halt instruction. A program ends by jumping to itself, and the
host then drops `run`.

IO ports use pulses:

- Input: `in_ack[i]` rises for the cycle in which RIODAT reads port i; the byte
  transfers on that edge.
- Output: `out_valid[i]` rises for the cycle in which WIODAT/WIOLAST writes
  port i. Once a port says ready it must stay ready until it is written, as
  the status-polling protocol requires.

## Where this design fills gaps in the manual

The manual is a programmer's manual. The choices below are this design's own;
each is also noted in the comment at the top of its module.

- Instruction bits outside the published op-code fields.
- The one-cycle timing and the host handshake.
- The bit positions in the IO status byte.
- The reading of the WOFF destination: the offset register takes the final
  result.
- A special instruction with an undefined code (1, 3, 7, 9, B, D, F) changes
  nothing.
- Unused CC operation codes do nothing.
- A class I-III instruction with a PC code other than RTN or LPCT does
  nothing extra.
- "N" in the UN and DN links means the N bit this instruction sets.
- The links R and RBC, in the no-shift codes that use parity and in LXT, feed
  the output bit back to the input. That loop is broken by evaluating the
  shift-in with a 0 leaving the ALU.
- An instruction that names both an IO source and MR takes the IO source.

## Files

`rtl/`:

| file | content |
|---|---|
| mp_pkg.sv | instruction struct and op-code enums |
| mp_top.sv | the MP: decode, Q, CC, sign compare, address/offset/port select registers, wiring |
| mp_arith_unit.sv | class I/II execution: operand choice, special steps, shifts, flags |
| mp_alu.sv | 16-function ALU |
| mp_shift_linker.sv | the 32 shift links |
| mp_cc_ops.sv | class III CC operations |
| mp_cond_select.sv | the 16 branch conditions |
| mp_sequencer.sv | PC, address/count register, effective address, control operations |
| mp_call_stack.sv | 5 x 12 stack |
| mp_scratchpad.sv | 16 x 8 register file |
| mp_prog_mem.sv | 4096 x 40 program memory |
| mp_data_mem.sv | 65536 x 8 data memory |
| mp_io_mux.sv | port selection, status byte, handshakes |

`tb/`:

- One self-checking testbench per module (`tb_<module>.sv`).
- `mp_asm_pkg.sv`, the assembler.
- `tb_mp_top.sv`, the end-to-end test at full size.
- `tb_mp_workloads.sv`, the arithmetic routines on many operand sets.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example,
with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/mp_pkg.sv tb/mp_asm_pkg.sv tb/tb_mp_top.sv --top-module tb_mp_top
obj_dir/Vtb_mp_top
```

For a unit test, replace the testbench and top-module names. Unit tests need
only `rtl/mp_pkg.sv` and the module files they use.

`tb_mp_top` runs at the full default sizes. It acts as the host: it loads a
program, starts the MP and reads the results back from data memory. The
program exercises:

- the unsigned and signed multiply loops and the divide sequence;
- a memory-read add;
- a subroutine call;
- every loop form and both exits of TWB;
- VJMP and JCB dispatch, and JMPR / JSRR;
- all CC operations, read back through RCC;
- LXT and a 16 bit rotate;
- a call stack overflow;
- RESET and a second pass;
- a six-byte packet echoed from input port 1 to output port 0, with random
  input gaps and output stalls.

It checks every result against values computed independently. It also checks
that the multiply and divide steps run exactly 8, 7 and 7 times, and that each
mechanism (stall, overflow, every IO code, every control operation) happens at
least once. The whole program takes about 390 cycles.

`tb_mp_workloads` also runs at full size. It runs the arithmetic routines on
96 operand records:

- unsigned and signed multiply;
- division followed by the usual remainder repair sequence;
- 24 bit addition and subtraction through the carry.

The records include edge cases: -128 x -128, quotients of -128 and 127, and
divisor -128. It checks each product, each Euclidean quotient and remainder,
and each sum and difference. The division sequence followed by the repair
gives the exact quotient and a remainder in `0 <= r < |divisor|` for every
dividend whose quotient fits in 8 bits. The 96 records take about 9500
cycles.

## How far to trust it

Every module has been checked as follows:

- Verilator lint and a second front end accept it.
- Its testbench passes.
- A deliberately broken copy of the module fails that testbench.

The testbenches check behaviour against the manual's definitions: flag rules,
link diagrams, operation descriptions and its worked programs (multiply,
divide, loops, dispatch). They cannot check the choices listed above against
original hardware. Cycle timing, the status byte layout and the handshake
signals are where a program written for the original machine could behave
differently.
