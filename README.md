# C-RISC: an 8-bit RISC with banked registers and no central decoder

C-RISC is a very small 8-bit processor whose instruction set was chosen by
looking at which C statements programs execute most often: assignments of
constants and scalars, additions, unconditional and conditional branches, and
procedure calls. Those statements map onto 15 one-byte instructions. The
encoding is designed so that decoding costs almost nothing. One bit says how
many cycles an instruction takes, another says where its result goes. Every
block reads the instruction register itself, so no central controller is
needed beyond a two-state sequencer. Register banking gives a procedure its
own four registers without any save/restore code.

This repository holds a synthesizable SystemVerilog model of the core, a
testbench for each block, and an end-to-end testbench that runs the core in
lockstep with an instruction-level reference model.

## Instruction format

Each instruction is one byte, `i7 i6 i5 | i4 i3 | i2 i1 i0`:

| field      | bits     | meaning |
|------------|----------|---------|
| opcode     | i7 i6 i5 | i7 = 0: one-cycle ALU instruction, sets the condition code; i7 = 1: two-cycle instruction. i6 gives the destination: 0 means operand 2, 1 means operand 1 |
| operand 1  | i4 i3    | `r1 r0`, a register inside the current bank (register `{B, r1, r0}`), or a sub-opcode `s1 s0` |
| operand 2  | i2 i1 i0 | `R`, an absolute register number 0-7, or a constant `n` |

`[x]` below means "contents of register x", `B` is the bank bit, and `Brr` is
register `{B, r1, r0}`.

| instr | encoding       | effect                              | cycles |
|-------|----------------|-------------------------------------|--------|
| TEST  | `000 00 R`     | set C_N C_Z from [R]                | 1 |
| INCR  | `000 01 R`     | [R] = [R] + 1                       | 1 |
| NOT   | `000 10 R`     | [R] = ~[R]                          | 1 |
| COMP  | `000 11 R`     | [R] = -[R]                          | 1 |
| MOV   | `001 rr R`     | [R] = [Brr]                         | 1 |
| MOVI  | `010 rr n`     | [Brr] = n, zero-extended (n = 0 is CLEAR) | 1 |
| ADD   | `011 rr R`     | [Brr] = [Brr] + [R]                 | 1 |
| RET   | `100 00 000`   | PC = [B00]; B = !B                  | 2 |
| STORE | `101 rr R`     | M[[R]] = [Brr]                      | 2 |
| BR    | `110 00 R`     | PC = [R]                            | 2 |
| BREQ  | `110 01 R`     | if C_N C_Z = 01 then PC = [R]       | 2 |
| BRLT  | `110 10 R`     | if C_N C_Z = 10 then PC = [R]       | 2 |
| CALL  | `110 11 R`     | B = !B; [B00] = PC; PC = [R]        | 2 |
| LOAD  | `111 rr R`     | [Brr] = M[[R]]                      | 2 |

The four unary instructions are one circuit. The ALU XORs [R] with `i4` and
adds `i3`. That gives the operand unchanged (TEST), plus one (INCR), inverted
(NOT) or inverted plus one (COMP, two's-complement negation). All seven
one-cycle instructions share a single 8-bit adder. C_N is bit 7 of its result
and C_Z says the result is zero. There is no carry flag: an ADD carry is lost.

Branch targets, load/store addresses and call targets always come from a
register. MOVI only gives 0-7, so larger constants have to be built with ADD
(doubling) and COMP. BREQ and BRLT branch when `{C_N, C_Z}` equals `{i4, i3}`.
BR and CALL, whose `i4 i3` are 00 and 11, are always taken. There is no
branch-if-not-zero. A loop counts a negative number up to zero with INCR and
repeats with BRLT.

After reset the instruction register holds `0000_0000`, TEST R0, and the PC
holds 0. The first cycle only sets the condition code and fetches address 0.

## Register banks and procedure calls

The eight registers form two banks: 0-3 (B = 0) and 4-7 (B = 1). Operand 1
(`rr`) always names a register in the current bank. Operand 2 (`R`) names any
of the eight. Because ADD, MOVI and LOAD write operand 1, the current bank is
the procedure's working set. MOV writes operand 2, so it is how results move
into the other bank.

CALL flips B and then stores the return address, the address after the CALL,
in register 00 of the new bank (R4 when called from bank 0). It then jumps to
[R]. RET jumps to [B00] of the current bank and flips B back. A call from
bank 0 therefore gives the callee R4-R7, with R4 holding the return address.
The caller's R0-R3 stay untouched, and the callee can still read them as
operand 2. Only one level of call is protected this way. A call made from bank
1 flips back into bank 0 and overwrites R0 with its return address, so deeper
nesting needs software that saves a bank to memory first. The end-to-end test
does calls from both banks.

## Cycle structure

One clock cycle of this model corresponds to one phi1/phi2 pair of the
original two-phase clock. The controller has two states:

* **State one** ends every instruction. The address of the next instruction is
  put on the address bus. Memory answers within the cycle, and the word is
  loaded into the IR at the rising edge (the prefetch). A one-cycle
  instruction reads its operands, computes and writes its result and the
  condition code in this same cycle. That is why ALU instructions take one
  cycle.
* **State two** comes first for i7 = 1 instructions:

| instr          | state two                                    | state one |
|----------------|----------------------------------------------|-----------|
| BR, BREQ, BRLT | PC = [R] if the condition holds              | fetch at PC |
| CALL           | B = !B, [B00] = PC (return address)          | fetch at [R], PC = [R] + 1 |
| STORE          | address [R], data [Brr], write strobe        | fetch at PC |
| LOAD           | address [R], read, data into the MDR         | [Brr] = MDR, fetch at PC |
| RET            | idle                                         | fetch at [B00], PC = [B00] + 1, B = !B |

The controller enters state two when bit 7 of the word being prefetched is
set. State two always lasts exactly one cycle. The PC always holds the address
of the next instruction to fetch, so the value CALL saves in state two is
already the return address.

## Blocks

There is no central decoder. Each block takes the instruction and the state
and decodes what concerns it. The helper functions in `crisc_pkg` keep the
decoding consistent across blocks.

| file | block |
|------|-------|
| `rtl/crisc_pkg.sv`     | widths, opcode and state enums, the `instr_t` struct, decode helpers |
| `rtl/crisc_ir.sv`      | instruction register: loads in state one, resets to TEST R0 |
| `rtl/crisc_state.sv`   | two-state controller |
| `rtl/crisc_regfile.sv` | 8 x 8 registers: read port A `[Brr]` (or `[B00]` for RET), read port B `[R]`, one write port; picks its own write address and data (ALU, MDR or PC) |
| `rtl/crisc_alu.sv`     | operand selection plus the single adder; C_N / C_Z from its result |
| `rtl/crisc_cc.sv`      | C_N C_Z register, updated by i7 = 0 instructions; branch condition |
| `rtl/crisc_pc.sv`      | PC, incrementer, fetch-address choice (PC, [R] for CALL, [B00] for RET) |
| `rtl/crisc_bank.sv`    | bank bit, flipped by CALL (state two) and RET (state one) |
| `rtl/crisc_mdr.sv`     | memory data register for LOAD |
| `rtl/crisc_busif.sv`   | address-bus multiplexer and memory strobes |
| `rtl/crisc.sv`         | the core: the blocks above wired together, with bus assertions |

Synthesized without memories, the core is about 110 word-level cells and
92 flip-flop bits. 64 of those bits are the register file.

## Memory interface

One 256-byte address space holds both instructions and data. `crisc` has
separate read data, write data and strobes in place of a bidirectional data
bus:

* `mem_addr_o` is valid all cycle.
* `mem_re_o` is high for every state-one prefetch and for the state-two cycle
  of LOAD. The memory must drive `mem_rdata_i` combinationally in the same
  cycle.
* `mem_we_o` / `mem_wdata_o` are high/valid in the state-two cycle of STORE.
  The memory writes at the rising edge that ends that cycle.

Assertions in `crisc` check that read and write are never both high, that
every state-one cycle reads, and that state two never lasts two cycles.
`pc_o`, `ir_o`, `state_o`, `bank_o`, `cn_o` and `cz_o` bring the
architectural state out for observation.

## Interpretations and departures

* **Clocking.** The original uses two non-overlapping clock phases, with
  operands read and addresses driven in phi1 and results stored in phi2. Here
  it is one rising-edge clock, and no phase generator is included.
* **Branch condition.** BREQ and BRLT are implemented as the instruction table
  defines them: BREQ takes the branch on C_N C_Z = 01 (zero) and BRLT on 10
  (negative). A prose statement pairing i3 with C_N and i4 with C_Z would swap
  these two. It was not followed, because it would make BREQ a
  branch-if-negative.
* **Register numbers.** The banks are 0-3 and 4-7. LOAD and STORE address
  memory through the *contents* of R.
* **MOVI** zero-extends its 3-bit constant to 8 bits.
* **RET** ignores its low five bits. Only `1000_0000` is a defined encoding;
  the other `100xxxxx` codes behave as RET here.
* **TEST** writes its operand back unchanged, which keeps the
  "i6 = 0 means operand 2 is the destination" rule free of exceptions.
* **CALL / RET placement.** CALL's jump and RET's whole action happen in state
  one, where the next instruction is fetched from [R] or [B00] directly. Only
  the jumps BR/BREQ/BRLT load the PC in state two.
* **Entry to state two** is decided from bit 7 of the prefetched word. How the
  original controller did it is not known.
* **Reset** clears every register, including the register file, the MDR and
  the condition code. The original only defines the IR's reset value.
* **Not modelled:** the clock generator and the external memory. A
  behavioural memory, `tb/crisc_mem_model.sv`, is provided for simulation.

## Simulation

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5, run for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/crisc_pkg.sv tb/tb_crisc.sv --top-module tb_crisc
./obj_dir/Vtb_crisc
```

Replace `tb_crisc` with `tb_crisc_alu`, `tb_crisc_regfile` and so on for the
unit tests.

`tb/tb_crisc.sv` is the system test. An instruction-level model of the
instruction set runs in lockstep with the core. After every instruction the
test compares all eight registers, B, C_N C_Z and the PC, checks the fetched
instruction, and checks the cycle count (1 or 2). It first runs a 29-byte
program: a loop loads five array elements, and a subroutine running in bank 1
adds each one to a running sum, which is finally stored (expected 150 at
address 0x25). It then runs 60 rounds of random code filling the whole memory,
including self-modifying stores, and compares the whole memory after each.
The test fails if any instruction kind, either outcome of BREQ or BRLT, a call
from either bank or a return into either bank never happened. It runs in well
under a second.

The unit tests drive each block with random instructions and states and
compare against a small model of that block's own rule: which write the
register file makes, when the PC loads, when B flips, and so on.
