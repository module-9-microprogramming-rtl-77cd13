# Microprogrammed control units in SystemVerilog

A CPU's control unit turns each machine instruction into a sequence of
control-line settings, one per clock. A *microprogrammed* control unit does
this with a tiny computer of its own instead of a hand-built state machine.
A micro-program counter (uPC) addresses a control store. Each word of the
store is one *micro-instruction*, and its bits are the control lines for one
clock. Each machine instruction is carried out by a short *micro-routine* in
the store. A shared fetch routine loads the instruction. Its last word tells
the sequencer to *decode*: jump to the routine that belongs to the opcode.
The last word of that routine returns to fetch. To change or add an
instruction, you rewrite words of the store. The logic stays the same.

This repository has two such units. They sit side by side in the top module
`microprogramming_top`:

* **Unit A, `hypo_micro_cu`: the worked example.** It has a 12-bit
  micro-instruction, a fixed 256-word microprogram ROM and ten control lines
  for a small single-bus datapath (PC, MAR, RAM, IR, ACC, TEMP, ALU). It
  supports two opcodes: LOAD_ACC and JUMP_IF_ZERO. The jump is resolved by
  the decode step, which looks at the zero flag.
* **Unit B, `general_micro_cu`: the general textbook organisation.** Each
  micro-instruction has three fields: a branch condition, a branch address
  and a control field. A multiplexer over the status flags decides whether
  the control memory address register (CMAR) loads the branch address or
  counts up. A special code loads an address derived from the IR opcode. The
  control field is a *hybrid*: 16 bits go straight to the control lines
  ("horizontal"), and a 3-bit encoded ALU field is decoded into 8 one-hot
  lines ("vertical"). The control memory can be written, so unit B runs
  whatever microprogram you load into it.

Neither unit contains a datapath. The control lines leave as ports, and the
opcode and the flags come in as ports.

## How a micro-instruction reaches the control lines (both units)

This is the part that is easiest to get wrong, so here it is in detail.

```
            +-----------------------------+
            |   next-address logic        |<-- opcode, flags
            |  (+1 / decode / branch /    |<-- sequencing field of uIR
            |   fetch / hold / reset)     |
            +--------------+--------------+
                           | next address
              +------------+-------------+
              v                          v
        +-----------+             +-------------+
        | uPC/CMAR  |             | control     |  read combinationally
        | register  |             | store       |  at the next address
        +-----------+             +------+------+
        address of the                   v
        word in the uIR            +-----------+
                                   |    uIR    |--> control lines
                                   +-----------+
```

On each rising edge, two registers load at once. The uPC (CMAR in unit B)
loads the next address. The micro-instruction register (uIR) loads the
store word *at that same next address*. So during any cycle:

* the uIR holds the word at address `upc`;
* the control lines are that word's control field, straight from flip-flops;
* the next-address logic works only from the uIR's sequencing or condition
  field, the current `upc`, and the opcode and flags inputs.

A branch therefore takes effect on the very next cycle. There is no branch
delay slot and no idle cycle. The outputs, cycle by cycle, are exactly those
of a uPC register followed by a combinationally read ROM, which is how the
example unit is usually drawn. The difference is that here the control lines
come from a register and carry no glitches from the ROM.

**Reset** is synchronous and active high. While `rst` is 1, the next address
is forced to 0. Each clock then loads the uPC with 0 and the uIR with word 0.
After reset is released, the unit runs the fetch routine from address 0.
Hold reset for at least one clock edge: before that edge, the uIR holds
nothing defined.

## Unit A: the example unit

### Micro-instruction format (12 bits)

| bits  | field | meaning |
|-------|-------|---------|
| 11:10 | seq   | `00` NEXT (uPC+1), `01` DECODE (jump to mapped routine), `10` FETCH (go to 0), `11` HLT (stay) |
| 9     | PC_OUT  | PC onto the bus |
| 8     | PC_INC  | increment PC |
| 7     | MAR_IN  | load MAR |
| 6     | RAM_OUT | RAM[MAR] onto the bus |
| 5     | RAM_IN  | write RAM[MAR] |
| 4     | IR_IN   | load IR |
| 3     | ACC_IN  | load ACC |
| 2     | ACC_OUT | ACC onto the bus |
| 1     | TEMP_IN | load TEMP |
| 0     | ALU_OUT | ALU result onto the bus |

The types are in `rtl/hmcu_pkg.sv`: `seq_e`, `ctrl_t` and `uinstr_t`.

### Microprogram (`hmcu_pkg::cs_word`)

| address | control lines        | seq    | role |
|---------|----------------------|--------|------|
| 0       | PC_OUT, MAR_IN       | NEXT   | fetch 1 |
| 1       | RAM_OUT, IR_IN       | DECODE | fetch 2 + decode |
| 16      | PC_INC               | FETCH  | NOP routine |
| 20      | MAR_IN               | NEXT   | LOAD_ACC 1: MAR gets the address from the IR |
| 21      | PC_INC, RAM_OUT, ACC_IN | FETCH | LOAD_ACC 2 |
| 30      | none                 | FETCH  | JUMP routine |
| others  | none                 | NEXT   | unused (all zeros) |

### Decode mapping (`opcode_map`)

| opcode | Z | routine |
|--------|---|---------|
| `0001` LOAD_ACC     | x | 20 |
| `1010` JUMP_IF_ZERO | 1 | 30 (JUMP) |
| `1010` JUMP_IF_ZERO | 0 | 16 (NOP, which just steps the PC) |
| anything else       | x | 16 (NOP) |

The conditional jump is not a micro-instruction that tests a flag. The flag
is an input to the decode mapping, so the decode step picks between two
routines.

### Timing

| instruction | micro-addresses | clocks |
|-------------|-----------------|--------|
| LOAD_ACC          | 0, 1, 20, 21 | 4 |
| JUMP_IF_ZERO, Z=1 | 0, 1, 30     | 3 |
| JUMP_IF_ZERO, Z=0 | 0, 1, 16     | 3 |
| other opcodes     | 0, 1, 16     | 3 |

**Requirement on the datapath.** Decode happens in the cycle of address 1.
That is the same cycle that asserts IR_IN, so the IR is not yet loaded when
the decision is made. The datapath must therefore present the opcode of the
instruction *being loaded* on `opcode_in` during that cycle. One way is to
forward the bus while IR_IN is 1; the testbench's datapath model does this.
If the IR output is fed straight in instead, the unit decodes the previous
instruction.

### What the example microprogram leaves open

* The JUMP routine drives no control line, because none of the ten lines can
  move the IR address field into the PC. A real datapath needs an extra
  "IR address out / PC in" path, and a word that drives it, for the jump to
  take effect. With the ten lines as they are, a taken jump leaves the PC
  unchanged.
* LOAD_ACC's first word asserts only MAR_IN. The datapath must route the
  IR's address field to the MAR when no bus source is enabled (or through a
  path of its own).
* HLT is implemented in the sequencer, but no word of the microprogram uses
  it.
* Only the fetch, NOP, LOAD_ACC and JUMP routines exist. There are no
  routines for ADD, STA and so on.

## Unit B: the general unit

### Micro-instruction format (30 bits, `gmcu_pkg::g_uinstr_t`)

| bits  | field | width |
|-------|-------|-------|
| 29:27 | branch condition | 3 |
| 26:19 | branch address   | 8 |
| 18:3  | horizontal control lines, out on `ctrl[15:0]` | 16 |
| 2:0   | encoded ALU field, decoded to `alu_op[7:0]` (one-hot) | 3 |

### Branch conditions (`cond_mux`)

The condition field is the select input of a multiplexer. Its inputs are
constant 0, constant 1, the flags, and the inverted flags. Flag 0 is Z and
flag 1 is C.

| code | name | next address |
|------|------|--------------|
| 0 | NEVER  | CMAR + 1 |
| 1 | ALWAYS | branch address |
| 2 | Z      | branch address if Z, else +1 |
| 3 | C      | branch address if C, else +1 |
| 4 | NZ     | branch address if !Z, else +1 |
| 5 | NC     | branch address if !C, else +1 |
| 6 | reserved | +1 |
| 7 | MAP    | `{1, opcode[3:0], 000}`: start of that opcode's 8-word slot (128, 136, ..., 248) |

The lower half of the control memory (0-127) is free for the fetch routine
and for shared code. A routine longer than 8 words branches out of its slot.

Unlike unit A, unit B tests the flags in any micro-instruction, not only at
decode. A JUMP_IF_ZERO written for unit B decodes to its slot and then uses
a Z-conditional branch, which costs one more clock than in unit A.

### Loading firmware

Write the words through `cm_we`, `cm_waddr` and `cm_wdata`, one per clock,
while `rst` is held. Release reset one clock after the write of word 0, so
that the uIR captures the new word 0. The contents are not reset; an
unloaded word is whatever the memory powered up with. A read of the address
written in the same cycle returns the old word.

## Module hierarchy

```
microprogramming_top
|-- hypo_micro_cu            unit A
|   |-- opcode_map           opcode + Z -> routine start address
|   |-- micro_sequencer      uPC and next-address logic
|   |-- control_store        256 x 12 ROM (contents from hmcu_pkg::cs_word)
|   `-- micro_ir             uIR (12 bits)
`-- general_micro_cu         unit B
    |-- cond_mux             branch-condition multiplexer
    |-- cmar                 CMAR with +1 incrementer
    |-- control_memory       256 x 30, writable
    |-- micro_ir             uIR (30 bits)
    `-- field_decoder        3-to-8 ALU field decoder
```

Packages: `hmcu_pkg` (unit A types, addresses, microprogram) and `gmcu_pkg`
(unit B field widths, condition codes, micro-instruction struct).

## Following the reference design, and departing from it

Taken from the reference:

* Unit A's structure.
* Unit A's field widths (2 + 10 bits, 8-bit uPC, 256 words).
* Unit A's sequencing codes, routine addresses, microprogram, decode table
  and bit order of the control lines.
* Unit B's block set and connections: IR, condition MUX, CMAR with +1,
  control memory, and the three micro-instruction fields.
* The idea of a hybrid control field with a 3-bit encoded ALU field.

This design's own choices:

* **Unit A: uIR as a real register.** The reference reads the ROM
  combinationally from the uPC. Here the uIR is a real register, loaded from
  the store at the next address. The cycle behaviour is the same (see
  above).
* **Unit A: LOAD_ACC at address 20.** A walk-through elsewhere in the
  reference places the LOAD routine at 16-17. This design follows the
  complete example, which puts LOAD_ACC at 20-21 and NOP at 16.
* **Unit B: sizes and encodings.** All of unit B's widths are this design's
  choice: an 8-bit address, a 16-bit horizontal field, two flags and a 3-bit
  condition field. So are the condition encoding, the IR-to-address formula
  and the priority in the CMAR (reset, then map, then branch, then +1).
* **Unit B: writable control memory.** Unit B's control memory can be
  written, so that the general unit can run any microprogram. Unit A keeps a
  ROM.
* **Reset.** Reset is synchronous and active high in both units.

Not included:

* The datapath, for which the reference gives only the names of its control
  lines.
* A hardwired (state-machine) control unit, which the reference discusses
  only as the alternative.

## Simulating

Every testbench in `tb/` checks itself. It prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. A watchdog stops it
and counts a failure if it hangs. With Verilator 5:

```sh
verilator --binary --timing --assert --top-module tb_microprogramming_top \
  -Irtl -Itb -y rtl -y tb +libext+.sv rtl/hmcu_pkg.sv rtl/gmcu_pkg.sv \
  tb/tb_microprogramming_top.sv
./obj_dir/Vtb_microprogramming_top
```

To run another test, replace `tb_microprogramming_top` with its name. Every
test finishes in well under a second.

| testbench | what it checks |
|-----------|----------------|
| `tb_control_store` | all 256 words against the microprogram table |
| `tb_opcode_map` | all 16 opcodes with Z = 0 and 1 |
| `tb_micro_sequencer` | 2000 random steps against a reference model, including the wrap at 255 and all four codes |
| `tb_micro_ir` | one-clock delay and hold |
| `tb_hypo_micro_cu` | 400 random instructions: micro-address and all ten lines every cycle; instruction lengths 4/3; reset in mid-routine |
| `tb_cond_mux` | all 8 codes x 4 flag values |
| `tb_cmar` | 3000 random steps against a model: priority, wrap |
| `tb_control_memory` | fill, read back, random writes with reads, read-during-write |
| `tb_field_decoder` | every code, 3-bit and 2-bit instances |
| `tb_general_micro_cu` | 20000 cycles of a random microprogram against a sequencing model, plus a directed fetch/decode/loop program |
| `tb_microprogramming_top` | end to end at default sizes (see below) |

`tb_microprogramming_top` connects each unit to its own copy of a
behavioural datapath model (`tb/hypo_datapath_model.sv`). Both copies run
the same five-instruction program:

* a LOAD of a non-zero value;
* a JUMP_IF_ZERO that is not taken;
* an undefined opcode;
* a LOAD of zero;
* a JUMP_IF_ZERO that is taken.

Unit B is first loaded with unit A's routines, rewritten in unit B's format.
The test checks:

* unit A's micro-address trace and length for each instruction;
* PC and ACC after each instruction, on both units;
* that both units end in the same state;
* that every mechanism happened at least once. For unit A: NEXT, DECODE,
  FETCH, jump taken, jump not taken, undefined opcode. For unit B: firmware
  load, map, unconditional branch, Z taken and not taken, increment, all
  eight ALU lines.

In the model, the bus carries the IR address field when no source drives
it, the opcode is forwarded during IR_IN, and the ALU adds. These are
properties of the test model only.

## Changing it

* **New instruction on unit A.** Add its words to `cs_word` in
  `rtl/hmcu_pkg.sv`. Add its opcode-to-address entry to `rtl/opcode_map.sv`.
  End the routine with `SEQ_FETCH`. Then extend the expected tables in
  `tb_control_store` and `tb_opcode_map`.
* **More control lines on unit A.** Widen `ctrl_t` and `CTRL_W` together.
  `UCODE_W` follows from them.
* **Unit B widths.** Change them in `gmcu_pkg`. `G_COND_W` must leave room
  for `2 + 2*G_NFLAGS` multiplexer inputs plus the all-ones MAP code; an
  elaboration-time assertion in `cond_mux` checks this. The IR mapping needs
  `G_ADDR_W > G_OPCODE_W + 1`.
