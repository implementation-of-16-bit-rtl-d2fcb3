# A 16-bit teaching processor on one internal bus

This is a small 16-bit processor built for teaching, where the whole machine
can be seen working. Every unit sits on one shared 16-bit internal data bus:
eight general registers, an operand register, an ALU with its output register,
a shifter with its own register, a comparator, the program counter, the
instruction register and the address register. A finite-state machine (FSM)
in the control unit carries out each instruction as a short series of bus
transfers, one per clock cycle. In each cycle at most one unit drives the bus
and one or more units load from it. The machine has no pipeline and no hidden
paths. Its PC, instruction register, status word, OpReg, OutReg, Shftreg and
the bus itself are brought out as ports, so a waveform viewer shows
everything that happens.

The processor talks to one external memory through a simple handshake. It
drives an address and raises VMA (valid memory address), with R/W = 0 for a
read or 1 for a write. It then waits until the memory raises READY.

```
            +--------------------- internal data bus (16) ---------------------+
            |        |          |          |         |          |        |     |
        +-------+ +-----+    +-----+   +-------+ +-------+ +--------+ +----+ +------+
        | R0-R7 | |OpReg|    |Instr|   |OutReg | |Shftreg| |  PC    | |Addr| | imm  |
        +-------+ +-----+    | Reg |   +-------+ +-------+ +--------+ |Reg | | (CU) |
                    |  \     +-----+      ^         ^                 +----+ +------+
                    |   \       |         |         |                   |
                    v    v      v         |         |                   v
                  +-----+ +----------+    |     +-------+            addr(15:0)
         bus ---->| ALU |-|comparator|    |     |shifter|<-- bus
                  +-----+ +----------+    |     +-------+
                     |        |  y        |
                     +--------|-----------+
                              v
                       control unit (FSM, PSW) --- vma, rw, ready, data
```

## Units

| Unit | Module | Role |
|---|---|---|
| Register file R0..R7 | `regarray` | 8 x 16 bits, one port addressed by `sel`. Writes from the bus, reads onto the bus. |
| OpReg | `biregister` | Holds the first ALU/comparator operand, loaded from the bus. |
| InstrReg | `biregister` | Holds the current instruction. |
| AddrReg | `biregister` | Drives the external address lines. |
| OutReg | `triregister` | Captures the ALU result and later drives it onto the bus. |
| Shftreg | `triregister` | Captures the shifter result and later drives it onto the bus. |
| Program counter | `triregister` | Loaded from the bus; drives the bus when it is read. |
| ALU | `alu` | One adder plus a logic block. Operand `a` = OpReg, operand `b` = bus. |
| Shifter | `shifter` | Shifts or rotates the bus value by one place. |
| Comparator | `comparator` | Compares OpReg with the bus, unsigned, and gives one result bit. |
| Control unit | `control_unit` | The FSM. It also holds the program status word (PSW). |
| Top | `cpu` | Wires the units together. |

`cpu_pkg` holds the shared types: opcodes, the ALU, shifter and comparator
operation codes, the PSW struct `psw_t`, the instruction-word struct
`instr_t` and the control word `ctrl_t`.

### The bus

The original design uses a tri-state bus. This RTL is written for two-state
simulators and for synthesis without internal tri-states. Each driver
therefore outputs 0 when it is not enabled, and the bus is the OR of all
drivers. This behaves like a tri-state bus as long as at most one driver is
on. An assertion in `control_unit` checks that rule every cycle. There are
six bus sources:

- the register file
- OutReg
- Shftreg
- the PC
- the instruction's constant, driven by the control unit
- the memory read data

## Instruction set

Every instruction is one 16-bit word:

```
 15     11 10   8 7    5 4   3 2   0
+---------+------+------+-----+-----+
| opcode  |  Rd  |  Rs  |  -  | cc  |   register form
+---------+------+------+-----+-----+
| opcode  |  Rd  |     K / A (8)    |   constant / address form
+---------+------+------------------+
```

The original design fixes the field positions and the mnemonics. The opcode
numbers below are this implementation's own.

| Code | Mnemonic | Effect | Flags | Execute cycles |
|---|---|---|---|---|
| 0 | NOP | — | — | 0 |
| 1 | HLT | stop until reset (the STOP instruction) | — | — |
| 2 | MOV Rd,Rs | Rd ← Rs | — | 2 |
| 3 | ADD Rd,Rs | Rd ← Rd + Rs | all | 3 |
| 4 | ADC Rd,Rs | Rd ← Rd + Rs + C | all | 3 |
| 5 | SUB Rd,Rs | Rd ← Rd − Rs | all | 3 |
| 6 | SBC Rd,Rs | Rd ← Rd − Rs − (1−C) | all | 3 |
| 7 | ADDI Rd,k | Rd ← Rd + k | all | 3 |
| 8 | SUBI Rd,k | Rd ← Rd − k | all | 3 |
| 9/10/11 | AND/OR/XOR Rd,Rs | bitwise | S,Z; C,O,H ← 0 | 3 |
| 12 | NOT Rd | Rd ← ~Rd | S,Z; C,O,H ← 0 | 2 |
| 13 | NEG Rd | Rd ← −Rd | all | 2 |
| 14/15 | SHL/SHR Rd | shift by one, 0 shifted in | — | 2 |
| 16/17 | ROL/ROR Rd | rotate by one | — | 2 |
| 18 | JMP k | PC ← k | — | 1 |
| 19 | JMR Rd | PC ← Rd | — | 1 |
| 20/21/22 | BRC/BRZ/BRH k | if C / Z / H: PC ← PC + sext(k) | — | 3 taken, 0 not |
| 23 | LDI Rd,k | Rd ← k | — | 1 |
| 24 | LDD Rd,[A] | Rd ← mem[A] | — | 2 + wait |
| 25 | LDX Rd,[Rs] | Rd ← mem[Rs] | — | 2 + wait |
| 26 | STD [A],Rd | mem[A] ← Rd | — | 2 + wait |
| 27 | STX [Rd],Rs | mem[Rd] ← Rs | — | 2 + wait |
| 28 | LDP Rd | Rd ← PC (address of the next instruction) | — | 1 |
| 29 | CMP Rd,Rs,cc | Z ← (Rd cc Rs), unsigned | Z | 2 |
| 30/31 | SET/CLR f | PSW flag f ← 1 / 0 | f | 1 |

Constants and direct addresses (`k`, `A`) are zero-extended, so JMP, LDD and
STD reach addresses 0–255, and LDI loads 0–255. Branch offsets are
sign-extended and are added to the PC after it has moved past the branch:
an offset of 0 falls through, and −1 branches to the branch itself. The CMP
conditions `cc` are 0 EQ, 1 NEQ, 2 GT, 3 GTE, 4 LT and 5 LTE; 6 and 7 give 0.
The flag numbers for SET and CLR are 0 C, 1 Z, 2 S, 3 O and 4 H.

Every instruction also takes 3 fetch cycles, plus the memory's wait states on
the fetch. For example, `ADD` with a zero-wait memory takes 6 cycles.

## How an instruction runs: the FSM

This is the heart of the design. The control unit's state decides, for each
cycle, who drives the bus and who loads from it. "X → bus → Y" below means X
drives the bus and Y loads it at the end of the cycle.

**Fetch** (every instruction):

| State | Transfer |
|---|---|
| FETCH0 | PC → bus → AddrReg. In the same cycle the ALU computes bus + 1 (INC) and OutReg loads it. |
| FETCH1 | VMA = 1, R/W = 0. The FSM stays here until READY = 1. In that cycle, memory data → bus → InstrReg. |
| FETCH2 | OutReg → bus → PC. The opcode in InstrReg picks the next state. |

The PC is advanced with the ALU, not with a separate incrementer. The adder
adds 0 + PC with a carry-in of 1. This uses the constant-1 input of the
ALU's carry multiplexer.

**Execute:**

| Class | Sequence |
|---|---|
| ADD, ADC, SUB, SBC, AND, OR, XOR, ADDI, SUBI | RD0: Rd → bus → OpReg. ALU: Rs (or k) → bus; OutReg ← ALU(OpReg, bus); PSW ← flags. WB: OutReg → bus → Rd. |
| MOV, NOT, NEG | ALU: Rs (MOV) or Rd → bus; OutReg ← ALU(bus). WB: OutReg → bus → Rd. |
| SHL, SHR, ROL, ROR | SH: Rd → bus; Shftreg ← shifter(bus). SHWB: Shftreg → bus → Rd. |
| LDI, LDP | k or PC → bus → Rd |
| JMP, JMR | k or Rd → bus → PC |
| BRC, BRZ, BRH (taken) | BR0: PC → bus → OpReg. BR1: sext(k) → bus; OutReg ← OpReg + bus. BR2: OutReg → bus → PC. |
| LDD, LDX | ADDR: A or Rs → bus → AddrReg. MRD: VMA, R/W = 0; wait for READY; memory → bus → Rd. |
| STD, STX | ADDR: A or Rd → bus → AddrReg. MWR: Rd or Rs → bus → data_out; VMA, R/W = 1; wait for READY. |
| CMP | RD0: Rd → bus → OpReg. CMP: Rs → bus; Z ← comparator(OpReg, bus, cc). |
| SET, CLR | FLAG: one PSW bit changes; no bus transfer. |
| HLT | HALT: stays there until reset; `halted` = 1. |

The register file has a single port. So a two-register operation needs one
cycle to read Rd into OpReg and a later cycle to write the result back. This
is why two-operand ALU instructions take three execute cycles.

## The ALU

The ALU uses a single adder. Multiplexers in front of it choose what it adds:

- dst input: `a` (OpReg), or 0 for the one-operand operations
- src input: `b` or `~b`
- carry-in: 0, C, 1 or ~C

This gives ADD = a+b, ADC = a+b+C, SUB = a+~b+1, SBC = a+~b+~C, NEG = 0+~b+1,
INC = 0+b+1 and PASS = 0+b. A separate logic block gives AND, OR, XOR and NOT.
An output multiplexer then picks the adder result or the logic result.

After a subtraction, C = 1 means "no borrow", the usual convention for a
carry-chain subtractor. SBC follows the same convention.

The flags are:

- O: two's-complement overflow
- S: sign
- Z: zero
- C: carry out
- H: half carry, the carry out of bit 3. H is computed without a second
  adder, as `dst[4] ^ src[4] ^ sum[4]`.

`WIDTH` is a parameter with default 16. The ALU also works at 4 bits, the
width meant for bench experiments with the ALU alone; at that width H equals
C.

## Memory interface and timing

| Port | Meaning |
|---|---|
| `addr[15:0]` | AddrReg contents. Valid while `vma` = 1. |
| `vma` | An access is requested. |
| `rw` | 0 = read, 1 = write. Stable for the whole access. |
| `ready` | From memory. The access completes in the cycle where `vma && ready`. |
| `data_in[15:0]` | Read data. Sampled in the cycle where `ready` = 1. |
| `data_out[15:0]`, `data_oe` | Write data and its enable. `data_oe` = `vma && rw`. |

The external bus is bidirectional in the original design. Here it is split
into `data_in`, `data_out` and `data_oe`; a pad or a top-level tri-state
buffer joins them again. A memory that holds `ready` high all the time gives
zero wait states. Every cycle of `ready` = 0 during an access adds one clock.
Reset (`rst`) is synchronous and active high. It clears every register and
the PSW, and execution starts at address 0.

## What is this implementation's own

The original description gives:

- the units and the bus
- the ALU's one-adder structure
- the handshake signals
- the instruction fields and mnemonics
- the fetch–decode–execute order with OpReg and OutReg

Everything below was chosen here:

- **Opcode numbers**, the ROL/ROR, ADD/ADC/SUB/SBC and CMP encodings, and the
  flag numbering of SET and CLR.
- **The cycle-by-cycle state sequence**, including incrementing the PC
  through the ALU.
- **Register write enables.** The units use a single clock with load and
  write enables, rather than control signals used as clock strobes.
- **The two-state bus.** Zero-when-idle drivers are ORed together.
- **Zero-extended constants and signed branch offsets.**
- **The half-carry flag H**, needed by BRH. It sits next to O, S, Z and C.
- **Flags after logic operations.** C, O and H are cleared. Moves, shifts,
  loads, stores and jumps do not touch the PSW.
- **The comparator's relations**: unsigned. CMP writes its result into Z, so
  BRZ acts as "branch if the condition held". Note that BRZ after CMP with
  NEQ branches when the operands differ.
- **All eight registers are 16 bits.** The original also mentions 8-bit
  registers without describing how they are used.

## Not included

- **Multiply and divide** (a 32-bit product; quotient and remainder). They
  are named as an instruction class, but no encoding or datapath is given for
  them, and the ALU has a single adder.
- **PUSH, CALL and RET, and a hardware stack.** No stack pointer is
  described. Subroutines still work with the existing instructions, as in
  `tb/fib_tb.sv`:

  ```
  LDP  R7          ; R7 = address of the next instruction
  ADDI R7, 4       ; R7 = return address
  STX  [R6], R7    ; push (R6 = stack pointer)
  SUBI R6, 1
  JMP  sub
  ...
  sub: ...
  ADDI R6, 1       ; pop
  LDX  R7, [R6]
  JMR  R7          ; return
  ```

- **Interrupts, I/O controllers and pipelining.** The original mentions them
  only as future extensions.

## Verification

| Testbench | What it checks |
|---|---|
| `alu_tb` | Every operation on corner and random operands, checked against integer arithmetic, including all flags. Also an exhaustive test of the 4-bit configuration. |
| `shifter_tb`, `comparator_tb` | Every select code, against bitwise and integer references. |
| `regarray_tb`, `biregister_tb`, `triregister_tb` | Random loads and enables against a shadow model, reset, and output gating. |
| `control_unit_tb` | Records each cycle's bus transfer as text. For every opcode, with random fields, PSW contents and wait states, it compares the cycles with the transfer lists above. Also checks the PSW updates and HLT. |
| `cpu_tb` | End to end. Runs a directed program with a backward loop, plus 300 random forward-branching programs. Compares all registers, the PSW, the PC, the data memory and the exact cycle count with an instruction-level model (`tb/tb_isa_pkg.sv`). Memory wait states vary from 0 to 3. It also counts each mechanism and fails if one never occurred: wait states, reads, writes, taken, not-taken and backward branches, carry, overflow and half carry, every bus driver, every opcode. |
| `fib_tb` | Computes F(0)..F(24) (46368 is the largest Fibonacci number below 2^16). Uses a memory stack and subroutine calls, with one memory wait state. Runs in 2751 cycles. |

`tb/mem_model.sv` is a behavioural 64K × 16 memory with a programmable number
of wait states. It exists only for the testbenches.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/cpu_pkg.sv tb/tb_isa_pkg.sv tb/cpu_tb.sv --top-module cpu_tb
./obj_dir/Vcpu_tb
```

Replace `cpu_tb` with any other testbench name. Each testbench prints
`TB_RESULT checks=N failures=M` at the end. `-y rtl -y tb` lets Verilator find
each module in the file of the same name.

## Changing the design

- **Adding an instruction.** Add the opcode to `opcode_e` in `cpu_pkg`. Add
  its first state to `first_state` in `control_unit`, then give each of its
  states a control word in the `always_comb` block that builds `ctrl`. Also
  add it to the model in `tb/tb_isa_pkg.sv` and to the expected transfers in
  `tb/control_unit_tb.sv`. All 32 opcode values are in use, so a new
  instruction must replace one, or use the spare bits 4:3 of the register
  form.
- **Widths.** `alu`, `shifter`, `comparator`, `regarray`, `biregister` and
  `triregister` all take a `WIDTH` parameter. The CPU itself is fixed at 16
  bits by its instruction format.
