# Asynchronous pipelined PIC18

This is an 8-bit microcontroller core that executes the PIC18 instruction set without a clock.
Every signal between stages travels as a dual-rail code: each bit is carried on two wires, *true*
and *false*. Both wires low means "no data yet" (null). Exactly one wire high is a valid 0 or 1.
A receiver can therefore see by itself when a word has fully arrived. No timing margin or global
clock is needed to know that.

The core is a four-stage pipeline:

- instruction fetch (IF)
- decode (ID)
- operand fetch (OF)
- execute/write-back (EX/WB)

The stages are separated by Muller pipeline latches. A 4-phase return-to-zero handshake paces
them: data, acknowledge, null, acknowledge released. An instruction moves forward as soon as the
stage after it has accepted the previous one and returned to null. The architectural registers
(PC, WREG, STATUS, BSR, PRODL/PRODH, the return stack with its pointer, and a Stall flag) are
dual-rail registers. Stages reach them over point-to-point paths, not a shared bus. Program and
data memory are ordinary single-rail memories behind converters and a matched delay.

The delay model is quasi-delay-insensitive (QDI). Every transfer is confirmed by completion
detection. The only timing assumption is the matched delay that covers the memory access time.

## Dual-rail signalling and the basic elements

| Module | What it is |
|---|---|
| `c_element` | Muller C-element with reset. The output rises when all inputs are 1, falls when all are 0, and holds otherwise. |
| `dr_gate` | Dual-rail AND/OR gate. One C-element per input minterm; the minterms are ORed onto the true or false output rail. The output is valid only after all inputs are valid, and null only after all are null. |
| `dr_mux2` | Dual-rail 2:1 multiplexer, built from three `dr_gate`s. |
| `completion_detector` | One OR per bit (the bit has arrived), joined by a C-element. Its output rises when the whole word is valid and falls when the whole word is null. |
| `dr_latch` | One Muller pipeline stage: a C-element per rail, gated by the inverted acknowledge from the next stage, plus a completion detector that produces the acknowledge to the previous stage. In a chain, at most every other latch holds data; nulls separate the data words. |
| `dr_register` | Dual-rail register. The writer sends a codeword of {write-enable, data}. The register stores the data if write-enable is true. It acknowledges once the codeword is complete, and drops the acknowledge when the writer returns to null. Each read port is a read strobe: while it is high the stored value appears dual-rail; while it is low the port is null. |
| `dr_eval` | Helper for word-level stage logic, written in single-rail form inside. Its output becomes the dual-rail encoding of the result once every input is valid, and holds until every input is null. This is the same rule a network of `dr_gate`s obeys. |

### How the model represents time

A real QDI circuit is built from state-holding gates and has no clock. Here every state-holding
element is a flip-flop on the input `clk`: C-elements, register cells and delay lines. One period
of `clk` stands for one gate delay.

- Every feedback loop therefore passes through a flip-flop. The RTL simulates in an ordinary
  two-state simulator and synthesises as plain logic.
- `clk` carries no handshake meaning. Instructions are not aligned to it, and a handshake takes as
  many periods as the chain of gates it passes through.
- Performance numbers from simulation are in gate delays of this model, not in nanoseconds.

## The pipeline and why it needs no forwarding

```
        +---------PC (dual-rail register)<--------+
        v                                         |
  IF --L1--> ID --L2--> OF --L3--> EX/WB          |
  ROM      |  Stall,    |  RAM read,  | WREG STATUS BSR PROD
  read     |  stack,    |  register   | RAM write
           +-- PC ------+  reads      +--> acknowledge to L3
```

**IF.** The stage drives its *Read* signal while `run` is high and L1 is not acknowledging. Read
strobes the PC register. The PC goes through the program memory interface, and
{pc, word at pc, word at pc+2} is sent into L1. When L1 acknowledges, Read falls and the stage
returns to null. Fetching the following word as well lets two-word instructions (GOTO, CALL,
MOVFF) decode in a single pass.

**ID.** Once L1 holds an instruction, the stage reads STATUS, Stall and the stack (pointer and top
of stack) and evaluates:

- Instruction Decode, which builds the control bundle for OF and EX/WB.
- Branch Control, built from dual-rail gates, which selects the STATUS flag named by the condition
  code and applies its polarity.
- Stall Control.
- NPC Control, which computes the next PC and the stack operation.

ID then writes the PC, Stall and the stack. The control bundle is released into L2 only after all
three writes are acknowledged. Because IF can fetch again only after the PC write, IF and ID form
a ring through the PC register. The core always fetches the correct next instruction and never
fetches speculatively.

**OF.** The stage prepares the two operands and the destination.

- **Bank Select Control** forms the 12-bit data address. If the instruction's `a` bit is 1, BSR is
  prepended to the 8-bit field. If `a` is 0, the access bank is used: 0x00–0x7F map to bank 0 and
  0x80–0xFF map to 0xF80–0xFFF.
- **Register Address Mapping** detects the addresses of the registers that are held as real
  registers, and reads those instead of the memory:

  | Register | Address |
  |---|---|
  | WREG | 0xFE8 |
  | STATUS | 0xFD8 |
  | BSR | 0xFE0 |
  | PRODL | 0xFF3 |
  | PRODH | 0xFF4 |

- **RAM Control** sends an enable rail to the data memory interface. When the operand is a mapped
  register or a literal, memory is not accessed.
- **Bit-Op Control** turns the 3-bit bit number into a mask.

The outputs are:

- source 1: a file register or a literal.
- source 2: WREG or the bit mask.
- the whole STATUS, so EX/WB has the carry and the flags it must keep.
- the destination, including the data address.

**EX/WB.** The ALU (`pic18_alu`, PIC18 flag rules, 8×8 multiplier) computes the result. The stage
then writes every destination channel at once: WREG, STATUS, BSR, PRODL, PRODH and data memory.
Each write carries its own dual-rail write enable, so a register that is not a destination still
completes a handshake with enable = 0. A C-element joins the six write acknowledges, and the join
is the stage's acknowledge to L3.

**Ordering.** L2 can accept the next instruction only after L3 has returned to null. L3 returns
to null only after EX/WB has acknowledged, that is, after all its writes are done. So when OF reads
a register or memory, the instruction ahead of it has always finished writing. Read-after-write
hazards on data are resolved by the handshake itself, and there is no forwarding network. The
price is that OF and EX/WB do not overlap. IF, ID and the EX/WB of an older instruction do
overlap.

### Conditional branches and the Stall register

ID reads STATUS to resolve BC/BNC/BZ/BNZ/BOV/BNOV/BN/BNN. When ID sees such a branch, the
instruction before it may still be in OF or EX/WB, and its STATUS write may not have happened yet.
The branch therefore passes through ID twice:

1. With Stall = 0, ID writes Stall = 1 and PC = the branch's own address, and sends a NOP down
   the pipeline.
2. The branch is fetched again. The NOP can enter L2 only after the older instruction has left
   EX/WB, so the STATUS now read is final. With Stall = 1, ID decides the branch, writes the
   target or the fall-through address, and clears Stall.

Unconditional flow (BRA, GOTO, CALL, RCALL, RETURN, PUSH, POP) does not read STATUS and is
resolved in ID in a single pass. The stack is written by ID directly.

## Memories behind a single-rail interface

`mem_read_if` connects a dual-rail request to a conventional memory:

1. `dr_to_sr` takes the address from the true rails.
2. The completion detector over the address raises a strobe.
3. `matched_delay` delays the strobe by `MEM_DELAY` periods, which must exceed the memory's access
   time.
4. The delayed strobe enables `sr_to_dr`, which drives the read data dual-rail.

The read data is captured while the address is valid, so the output cannot change while the
address returns to null. The output goes null one delay after the address does. A request with
the enable rail false answers with null data at once.

`mem_write_if` is the same scheme for writes. The memory's write enable is the completed request
with write-enable true. The acknowledge rises after the matched delay.

`program_rom` is a 16-bit word memory with two read ports (the word and its successor) and a load
port for filling it. `data_ram` is 4 KB, organised as 16 banks of 256 bytes, with an asynchronous
read port, a write port and a debug read port. Both are written as arrays.

## Instruction set

These instructions are implemented with PIC18 encodings and PIC18 flag behaviour:

- **Byte-oriented:** ADDWF, ADDWFC, ANDWF, CLRF, COMF, DECF, INCF, IORWF, MOVF, MOVWF, MULWF,
  NEGF, RLCF, RLNCF, RRCF, RRNCF, SETF, SUBFWB, SUBWF, SUBWFB, XORWF, MOVFF.
- **Bit-oriented:** BCF, BSF, BTG.
- **Literal:** ADDLW, SUBLW, MULLW, MOVLB, MOVLW, IORLW, ANDLW, XORLW.
- **Control:** BC, BNC, BN, BNN, BOV, BNOV, BZ, BNZ, BRA, GOTO, CALL, RETURN, PUSH, POP, RCALL,
  NOP.

All other opcodes behave as NOP. This includes the skip instructions (CPFSxx, DECFSZ, INCFSZ,
BTFSx, TSTFSZ), SWAPF, RETLW, DAW, TBLRD/TBLWT, SLEEP, CLRWDT, RESET and RETFIE. LFSR is skipped
as a two-word NOP. There are no interrupts, peripherals or I/O ports.

## Departures and design choices to be aware of

- **Unit-delay model.** See above. A transistor-level C-element is modelled as a flip-flop, and
  every C-element has the reset line, not only those in pipeline latches.
- **Two-word fetch.** Each fetch reads two consecutive ROM words, and ID adds 4 to the PC for
  two-word instructions.
- **Bank select.** The `a` bit follows the PIC18 definition (1 = BSR bank, 0 = access bank).
- **Stack.** The stack has 32 levels, with STKPTR = 0 meaning empty, so STKPTR is 6 bits wide. A
  push onto a full stack and a pop from an empty one are ignored. The fast-return `s` bit of
  CALL/RETURN is ignored.
- **PRODL/PRODH** are dual-rail registers, because MULWF and MULLW write them.
- **Registers not file-addressable.** PC, STKPTR and Stall cannot be accessed as file registers.
  Writing STATUS as a file register stores the written value, except that flag bits the
  instruction itself sets take precedence.
- **Stalls.** Only conditional branches stall. Everything else is ordered by the handshakes.
- **Reset.** Reset clears all latches and C-elements to null, and sets PC, WREG, STATUS, BSR, PROD,
  STKPTR and Stall to 0. Execution starts at address 0 when `run` is raised.

## Parameters of the top (`async_pic18`)

| Parameter | Default | Meaning |
|---|---|---|
| `ROM_WORDS` | 1024 | program memory words (PIC18 allows up to 2 MB; 1024 is this design's choice) |
| `RAM_BYTES` | 4096 | data memory, 16 banks × 256 |
| `STACK_DEPTH` | 32 | return stack levels |
| `MEM_DELAY` | 4 | matched delay of both memory interfaces, in time-base periods |

### Ports of the top

| Port | Meaning |
|---|---|
| `clk` | time base |
| `rst` | reset, active high |
| `run` | enables fetching |
| `ld_we`, `ld_addr`, `ld_data` | load the program ROM while `run` is low |
| `dbg_pc`, `dbg_wreg`, `dbg_status`, `dbg_bsr`, `dbg_prod`, `dbg_stkptr`, `dbg_stall` | the architectural state, single-rail |
| `dbg_addr` → `dbg_data` | read any data memory byte |
| `retire` | the EX/WB acknowledge, which pulses once per completed instruction pass |

## Source files

- `rtl/pic18_pkg.sv`: shared constants, the control-bundle structs and the bank/register mapping
  functions.
- Dual-rail primitives: `c_element`, `completion_detector`, `dr_gate`, `dr_mux2`, `dr_latch`,
  `dr_register`, `dr_eval`.
- Memory interface: `dr_to_sr`, `sr_to_dr`, `matched_delay`, `mem_read_if`, `mem_write_if`,
  `program_rom`, `data_ram`.
- Stages: `if_stage`, `id_stage` (with `branch_control`), `of_stage`, `exwb_stage` (with
  `pic18_alu`), `return_stack`.
- Top: `async_pic18`.

Each file opens with a description of its function, handshake and timing.

## Verification

Every module except the ALU (tested inside `tb_exwb_stage`) has a self-checking testbench `tb/tb_<module>.sv` that computes its expected values
independently. Each one prints `TB_RESULT checks=N failures=M` at the end and has a watchdog.

The end-to-end test `tb/tb_async_pic18.sv` runs the top at its default parameters. It compares
the core with the instruction-level model `tb/pic18_iss.sv`. It runs four kinds of program:

- **Counting loop.** MOVLW 1; MOVWF 0; ADDWF 0,W; GOTO 4. WREG must step 1, 2, 3, … for 20
  iterations.
- **Control-flow program.** Exercises CALL, nested RCALL, RETURN, PUSH/POP, BRA, GOTO and MOVFF
  through mapped registers.
- **Recursion.** A subroutine that calls itself until a counter reaches zero. It nests all 32
  return addresses, and every frame leaves a mark on its way out.
- **Random programs.** Twelve programs of 150 instructions, covering all implemented instructions,
  banked and access-bank addressing, mapped registers, conditional branches right after
  flag-setting instructions, subroutine calls and PUSH/POP pairs. After each program the full register state and all 4 KB of data
  memory must match the model.

The test also counts how often each mechanism happened and fails if one never did. The counted
mechanisms are: branch stall and refetch, taken and untaken branches, stack push and pop, data
memory read, skipped memory access for registers and literals, memory write, and IF/ID working
while EX/WB is busy. In a typical run, the counting loop takes about 41 periods per iteration, and
the random programs average about 25 periods per instruction.

To simulate with Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_async_pic18 \
    rtl/pic18_pkg.sv tb/pic18_iss.sv rtl/*.sv tb/tb_async_pic18.sv
./obj_dir/Vtb_async_pic18
```

For a unit test, replace the top module and the last file with `tb_<module>`. The package file
must come first, and `tb/pic18_iss.sv` is needed only by the end-to-end test.
