# FLIS processor with a hard-wired control unit

This is an 8-bit teaching processor, the FLIS processor. Its control unit is built from gates, and every machine instruction is
a fixed *sequence of control words*. The control unit has a state counter that steps through
states Q0, Q1, Q2, … and a decoder that turns the opcode in the instruction register into one
line per opcode. Each control signal is then an OR of AND terms such as "opcode 05 and state
Q4". Adding an instruction means adding terms of that kind. This RTL builds the processor with
the instructions whose sequences are specified:

* `CLRA` (05): clear register A and set the flags from the result.
* `LDY` in its five addressing modes: immediate (91), absolute (A1), and indexed
  from SP, X or Y (B1, D1, C1). Each one loads an operand from memory into Y and sets
  N and Z from it, clears V and keeps C.

It also includes the reset, fetch and decode steps, plus a NOP, that every instruction needs.

## Datapath

A single 8-bit data bus connects everything:

| Unit | Loads from | Drives the bus with | Module |
|---|---|---|---|
| A | bus (`ld_a`) | `oe_a` | `flisp_reg` |
| R (ALU result) | ALU output U (`ld_r`) | `oe_r` | `flisp_reg` |
| X, Y | bus (`ld_x`, `ld_y`) | `oe_x`, `oe_y` | `flisp_reg` |
| SP | bus, +1, −1 (`ld_sp`, `inc_sp`, `dec_sp`) | `oe_sp` | `flisp_reg` |
| PC | bus, +1 (`ld_pc`, `inc_pc`) | `oe_pc` | `flisp_reg` |
| TA (address register) | bus (`ld_ta`) | — (address unit only) | `flisp_reg` |
| T (offset register) | bus, clear (`ld_t`, `clr_t`) | — (address unit only) | `flisp_reg` |
| I (instruction register) | bus (`ld_i`) | — (decoder only) | `flisp_reg` |
| CC (N Z V C) | ALU flags / bus bits (`ld_cc`, g9..g2) | `oe_cc` | `flisp_cc` |
| Memory, 256 × 8 | bus (`mw`) | `mr` | `flisp_mem` |

The bus (`flisp_bus`) is the OR of the enabled sources. This matches a tri-state bus as long as
at most one driver is on. The top asserts that two are never on at once.

**ALU (`flisp_alu`).** Operand D is the data bus. The function select f3..f0 offers two
functions:

* `0000`: U = 0. CLRA uses it.
* `1010` (f3 and f1): U = D + Cin. With Cin = 0 the operand passes through unchanged, so the
  flags describe the loaded value.

Every other code gives 0. The instruction set here needs nothing else, and the remaining
functions are not specified. The carry input comes from g1,g0:

* 00: 0
* 01: 1
* 1x: CC(C)

**Flag selection (`flisp_cc`).** On `ld_cc`, each flag is loaded from a source chosen by its own
pair of g signals. The codes are:

* 00: the ALU flag
* 01: a bus bit
* 10: 0
* 11: the old value

The pairs are C = g3,g2 (bus bit 0), V = g5,g4 (bit 1), Z = g7,g6 (bit 2) and
N = g9,g8 (bit 3). An LDY raises g5, g3 and g2. That gives "N and Z from the ALU, 0 → V,
C unchanged".

**Address calculation (`flisp_addr_unit`).** The memory address comes from a 4-to-1 multiplexer,
an adder and a 2-to-1 multiplexer:

| g14 g13 g12 | address |
|---|---|
| 000 | PC + T |
| 001 | SP + T |
| 010 | Y + T |
| 011 | X + T |
| 1xx | TA |

T is cleared at the start of every fetch. So 000 is simply "M(PC)" outside indexed
instructions. An indexed instruction loads its offset byte n into T, and in the next state
reads from base + n. The sum wraps modulo 256.

## Control unit

`flisp_control_unit` joins three parts:

* `flisp_seq`: a 4-bit state counter with one-hot state lines Q0..Q15.
* `flisp_idec`: an 8-to-256 opcode decoder.
* `flisp_ctrl_logic`: the sum-of-products network.

The counter advances one state per clock. When the current control word has **NF**
("next fetch") raised, the counter returns to Q1 instead. NF is the last step of every
instruction.

The complete sequences follow. One row is one clock. "flags" stands for
`f3 f1 g5 g3 g2 ld_cc`, which means U = D + 0, N and Z from the ALU, V = 0 and C kept.

| State | Opcode | Transfer | Control signals |
|---|---|---|---|
| Q0 | – (after reset) | M(TA) → PC, with TA = FF after reset | `mr g14 ld_pc` |
| Q1 | all | 0 → T | `clr_t` |
| Q2 | all | M(PC) → I; PC+1 → PC | `mr ld_i inc_pc` |
| Q3 | all | decode | – |
| Q4 | CLRA 05 | 0 → R | `ld_r` (f = 0000) |
| Q5 | CLRA 05 | R → A; ALU flags → CC | `oe_r ld_a ld_cc nf` |
| Q4 | LDY #n 91 | M(PC) → Y; PC+1 → PC | `mr ld_y inc_pc` flags `nf` |
| Q4 | LDY adr A1 | M(PC) → TA; PC+1 → PC | `mr ld_ta inc_pc` |
| Q5 | LDY adr A1 | M(TA) → Y | `mr g14 ld_y` flags `nf` |
| Q4 | LDY n,SP/n,Y/n,X B1/D1/C1 | M(PC) → T; PC+1 → PC | `mr ld_t inc_pc` |
| Q5 | LDY n,SP B1 | M(SP+T) → Y | `mr g12 ld_y` flags `nf` |
| Q5 | LDY n,Y D1 | M(Y+T) → Y | `mr g13 ld_y` flags `nf` |
| Q5 | LDY n,X C1 | M(X+T) → Y | `mr g13 g12 ld_y` flags `nf` |
| Q4 | any other (NOP = 00) | – | `nf` |

Timing, counted from Q1 to the next Q1:

| Instruction | Clocks | Memory reads |
|---|---|---|
| NOP | 4 | 1 |
| LDY #n | 4 | 2 |
| CLRA | 5 | 1 |
| LDY adr, n,SP, n,Y, n,X | 5 | 3 |

The LDY read counts (2 and 3) match the cycle counts listed for the instruction set. PC is
incremented in fetch, so when execution begins PC already points at the operand byte.

Here is an example, LDY 4,X with X = 42 and the program `C1 04` at address 20:

1. Fetch reads C1 into I and moves PC to 21.
2. Q4 reads 04 into T and moves PC to 22.
3. Q5 reads M(42 + 04) = M(46) into Y and updates the flags.
4. NF sends the counter back to Q1.

## Manual mode and memory loading

`flisp_top` has two operating modes, chosen by the `manual` input:

* **Automatic** (`manual = 0`): the control unit drives the datapath.
* **Manual** (`manual = 1`): the state counter holds, and the control word comes from the
  `manual_ctrl` input (type `flisp_pkg::ctrl_t`). This works like setting control switches
  by hand. It is how registers are given starting values, for example `mr ld_x inc_pc`
  loads X from M(PC).

A separate load port (`load_we`, `load_addr`, `load_data`) writes memory directly, to place a
program before running it.

## Reset

Reset is synchronous and acts on `rst`:

* All registers clear, except TA, which becomes FF.
* The state counter goes to Q0.

Q0 then loads PC from memory address FF, which acts as a reset vector.

## What is specified and what is chosen here

These parts follow the processor's specification:

* the register set and its control inputs
* the address unit and its g14..g12 table
* the carry-select encoding, and g5 for clearing V
* the ALU codes 0000 and D + Cin
* the CLRA and LDY control sequences, their opcodes and their use of Q4/Q5

Where the specification leaves a point open, these are this design's own choices:

* **Opcode 1010 for D + Cin.** One signal listing raises f3,f0 for D + Cin instead of f3,f1.
  This design follows the tables, which say f3,f1.
* **LDY #n and LDY adr sequences.** For these two, the specification gives the transfer
  signals. The flag signals, and MR in the last state of LDY adr, are added to match LDY n,X.
* **Reset, fetch and decode.** Their split over Q0..Q3 and the reset vector at FF are this
  design's own. Execution starting in Q4 is specified.
* **NOP.** Opcode 00, and every other opcode without a sequence acting as NOP.
* **N and Z selection and CC bus bits.** The g9..g6 encodings for N and Z, and the bus bit
  positions of V, Z and N.
* **Carry input.** The g1,g0 carry-in selection.
* **Sizes.** 16 states and 256 memory words.
* **Memory behaviour.** Memory reads are combinational and finish within one clock. A bus
  with no driver reads 0.
* **Manual mode and load port.** The manual control-word input and the memory load port.

These are not built:

* The remaining ALU functions and the ALU's second operand. They are not specified.
* The other instructions of the instruction set.

Because no sequence uses them, `oe_a`, `oe_x`, `oe_y`, `oe_sp`, `oe_pc`, `oe_cc`, `ld_x`,
`ld_sp`, `inc_sp`, `dec_sp` and `mw` are only ever raised in manual mode. The top testbench
exercises some of them there.

## Files

* `rtl/flisp_pkg.sv`: widths, opcodes, ALU codes, flag and address-select enums, and the
  control word `ctrl_t`.
* `rtl/flisp_reg.sv`, `flisp_alu.sv`, `flisp_cc.sv`, `flisp_addr_unit.sv`, `flisp_mem.sv`,
  `flisp_bus.sv`: the datapath.
* `rtl/flisp_seq.sv`, `flisp_idec.sv`, `flisp_ctrl_logic.sv`, `flisp_control_unit.sv`: the
  control unit.
* `rtl/flisp_top.sv`: the processor.
* `tb/tb_<module>.sv`: one self-checking testbench per module.
* `tb/tb_flisp_ldy_tests.sv`: the two LDY test programs (absolute, and 4,X), each run from
  reset.

`tb_flisp_top` runs the whole processor at its default size. It covers every addressing mode,
CLRA, NOP, the flag rules and manual mode. It also checks each instruction's clock and
memory-read counts.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/flisp_pkg.sv tb/tb_flisp_top.sv --top-module tb_flisp_top -Mdir obj -o sim
obj/sim
```

Every other testbench builds the same way. Replace `tb_flisp_top` with its name.

To add an instruction:

1. Add its opcode to `flisp_pkg`.
2. Add its terms (opcode line AND state line) to the signal assignments in
   `flisp_ctrl_logic`. End its last step with `nf`.
3. Extend the expected-word function in `tb_flisp_ctrl_logic`.
