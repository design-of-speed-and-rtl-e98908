# A 16-bit five-stage pipelined RISC with Harvard memories

This is a small 16-bit load/store processor. It fetches instructions from one
memory and reads and writes data in another (Harvard architecture), so an
instruction fetch and a data access never compete for a port. It runs a
five-stage pipeline and, in the steady state, finishes one instruction per
clock. Three features keep the pipeline busy around the things that usually
stall or cost time in a small RISC:

* **feed-forward paths.** A result is passed straight from the later pipeline
  stages back into execute, so a dependent instruction need not wait for
  write-back;
* **an 8-bit LIFO return stack.** Calls and interrupts keep their return
  address here, not in memory;
* **register shadowing.** An interrupt handler runs in a second register bank,
  so the interrupted program's registers need no saving.

The architecture follows a published Spartan-3E FPGA design: five phases, the
block split into PC, decoder, register array, ALU, address ALU and state
controller, feed-forward, the 8-bit LIFO stack, register shadowing, 16-bit
words and the switch-in/display-out board setup. That design published no
instruction encoding, memory sizes, interrupt rules or hazard logic. Everything
of that kind here is this design's own and is marked as such below and in each
file's header.

## Pipeline

| stage | name | work | register after it |
|---|---|---|---|
| 1 | IF  | read program memory at the PC | IF/Reg: instruction, its address |
| 2 | Reg | decode; read two registers | Reg/EX: control word, operands, bank |
| 3 | EX  | ALU; address ALU; resolve branches, calls, returns; push/pop return stack | EX/DA: result, address, store data |
| 4 | DA  | data memory read or write | DA/WB: result or load data |
| 5 | WB  | write register file | – |

Everything runs on one clock. The controller (`state_ctrl`) does not divide
the clock into fetch, load, execute and write-back clocks. It drives enables
and flushes on the pipeline registers instead: `pc_en`, `ifid_load`,
`ifid_flush`, `idex_bubble`. The EX/DA and DA/WB registers advance every
cycle.

### Hazards and what they cost

This is the hard part of the design.

**Data dependences between ALU instructions cost nothing.** Each of the two
EX operands goes through a `fwd_unit`. It takes the value from EX/DA if the
instruction one ahead writes that register. Failing that, it takes the value
from DA/WB if the instruction two ahead writes it. Otherwise it uses the value
read in Reg. The instruction three ahead writes the register file in the same
cycle that Reg reads it, and `reg_array` passes the value being written
straight to its read ports (write-through). So every distance is covered. For
example:

```
cycle      1    2    3    4    5    6
ADD R1,R2,R3  IF   Reg  EX   DA   WB
SUB R4,R1,R5       IF   Reg  EX   DA   WB     R1 forwarded from EX/DA in cycle 4
```

**A load followed at once by a user of its result costs one cycle.** A load's
data exists only at the end of DA. While that load is in EX, the controller
detects that the instruction in Reg reads its destination (`load_use`). It
holds the PC and IF/Reg and sends a bubble into EX. One cycle later the data
is forwarded from DA/WB.

**A taken control transfer costs two cycles.** JMP, CALL, a taken BZ/BNZ, RET,
RETI and interrupt entry are resolved in EX. The two younger instructions in IF
and Reg are flushed, and the PC loads the target. An untaken branch costs
nothing.

**HALT** flushes the younger instructions and lets the older ones finish. One
cycle later `halted` rises, and it stays high until reset.

Measured cycle costs (end-to-end testbench): independent instructions, 1 cycle
each; dependent ALU chains, 1 cycle each; a load plus its immediate user,
3 cycles for the pair; taken jumps, 3 cycles each. After `rst_n` rises there is
one reset cycle, then the instruction at address 0 is fetched.

## Calls, interrupts and the shadow bank

`lifo_stack` is 8 bits wide, the width of a program address, and by default 8
entries deep. CALL pushes the address after the call, and RET pops it into the
PC. A push when full or a pop when empty is ignored and sets the sticky
`stack_err` output.

Interrupts are level sensitive. If `irq` is high, interrupts are enabled and
the pipeline is not stalled, flushing or holding a control instruction in EX,
then the controller swaps the instruction in Reg for an interrupt pseudo
instruction. That instruction travels to EX and there:

* pushes the address of the instruction it replaced, which therefore runs after
  RETI;
* jumps to `INT_VECTOR` (default address 2);
* switches reads and writes of later instructions to register bank 1;
* pulses `irq_ack`.

Interrupts are disabled from entry until RETI, which also returns to bank 0.
The handler must remove the request before RETI. Instructions already past
decode finish in the bank they were issued in, because each carries its bank
bit down the pipeline. Only one level of shadowing exists. A handler that
executes EI and is interrupted again stays in bank 1.

Shadowing applies to interrupts only. A CALL saves its return address on the
stack but keeps the register bank, so subroutines can pass results in
registers.

Reset clears the interrupt enable. EI and DI set and clear it.

## Instruction set (this design's own, MIPS-like)

Every instruction is 16 bits. R0 always reads 0. Immediates are sign-extended.
Branch and jump targets are absolute 8-bit program addresses.

| op `[15:12]` | mnemonic | fields | effect |
|---|---|---|---|
| 1–8 | ADD SUB AND OR XOR MUL SHL SHR | rd `[11:8]`, rs `[7:4]`, rt `[3:0]` | rd = rs op rt (MUL: low 16 bits; shifts by rt[3:0], logical) |
| 9 | ADDI | rd, rs, imm4 | rd = rs + imm4 |
| A | LW | rd, rs, imm4 | rd = mem[rs + imm4] |
| B | SW | rt `[11:8]`, rs, imm4 | mem[rs + imm4] = rt |
| C | LI | rd, imm8 `[7:0]` | rd = imm8 |
| D | BZ | rs `[11:8]`, target | if rs == 0 jump |
| F | BNZ | rs `[11:8]`, target | if rs != 0 jump |
| E | JMP / CALL | `[8]` link, target | CALL pushes return address |
| 0 | NOP RET RETI HALT EI DI | fn `[3:0]` = 0 1 2 3 4 5 | |

`risc_pkg` holds the encoding and helper functions `enc_r`, `enc_i8` and
`enc_sys`.

## Memories and board I/O

* **Program memory.** 256 × 16 bits, read combinationally at the PC. A clocked
  load port (`ld_we`, `ld_adr`, `ld_data` on `risc_top`) fills it while
  `rst_n` is low.
* **Data memory.** 256 × 16 bits, read combinationally, written on the clock
  edge.
* **I/O address.** The top data address, `IO_ADDR` = 0xFF, is not memory:
  * a load reads the board switches through a two-flop synchroniser;
  * a store sets `lcd_data` and pulses `lcd_stb` for one cycle.

  No display controller is included. `lcd_data`/`lcd_stb` are where one would
  attach.

Neither memory is reset.

## Modules

| file | role |
|---|---|
| `risc_top` | core + program memory + data memory + board I/O; memory-mapped I/O decode |
| `risc_core` | the five stages and their pipeline registers |
| `state_ctrl` | RESET/RUN/DRAIN/HALT state machine; stall, flush, interrupt injection; interrupt-enable and bank state |
| `pc` | program counter (reset, hold, increment, load) |
| `decoder` | instruction → `ctrl_t` control word |
| `reg_array` | 2 banks × 16 × 16 bits; two read ports, one write port, write-through |
| `alu` | 16-bit ALU with multiplier |
| `aalu` | address ALU, base + offset |
| `fwd_unit` | operand forwarding selection |
| `lifo_stack` | return-address stack |
| `prog_mem`, `data_mem` | the two memories |
| `board_io` | switch synchroniser and display register |

Every module has a testbench `tb/tb_<module>.sv` that checks it against values
computed independently in the testbench. `tb_risc_top` is the system test at
default parameters:

* 25 random programs are compared word for word (registers, all data memory,
  display output) with an instruction-level model in the testbench;
* an interrupt program checks that the shadow bank protects the main program's
  registers;
* 25 more random programs take interrupts at random cycles. Their results must
  still match the model, and the handler's count must equal the number of
  interrupt entries;
* rate checks cover the cycle costs listed above;
* a stack overflow check sets `stack_err`.

`tb_risc_top` also counts each mechanism and fails if any never occurred: both
forwarding paths, load-use stall, flush, call, return, interrupt, bank switch,
I/O read and write, halt, and each instruction class.

`tb_fir_demo` runs a 4-tap FIR filter over 16 samples, a small
signal-processing kernel. It checks the outputs and the exact cycle count:
13 outputs take 358 cycles.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/risc_pkg.sv tb/tb_risc_top.sv \
          --top-module tb_risc_top -Mdir obj_top -o sim
./obj_top/sim
```

Every testbench ends with `TB_RESULT checks=N failures=M`. Replace `risc_top`
with any module name to run that block's test. To run your own program,
change a test in `tb_risc_top`: fill `prog[]` using the encodings above, then
call `run()`.

## How far to trust it, and where it departs from the original

* **Checked.** Every module passes its own test. The whole processor matches
  the reference model on random programs. These tests do not prove the design
  correct. The reference model and the pipeline were both written from the
  same instruction-set definition, so a misreading of that definition would
  show up in both.
* **This design's own choices.** The following were chosen here, not taken
  from the original:
  * the instruction set and encoding;
  * 16 registers per bank;
  * 256-word memories;
  * resolving branches in EX;
  * the one-cycle load-use stall;
  * the interrupt rules and vector;
  * the bank-switching form of register shadowing;
  * the memory-mapped I/O address.
* **Clocking.** The original controller generated separate fetch, load,
  execute and write-back clocks from a main clock. Here there is one clock with
  stage enables. This is how a pipeline that overlaps the phases of
  consecutive instructions is normally built, and it is safe to synthesize.
* **Size.** The original FPGA implementation is reported at 85 slice
  flip-flops, 545 LUTs, one 18×18 multiplier and about 170 MHz. This RTL has
  about 241 flip-flop bits outside the memories, mostly pipeline registers. It
  makes no attempt to reach those figures, and its clock rate has not been
  measured.
* **Not included.** The board's LCD controller, and any FPGA-specific clock
  buffering.
