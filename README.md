# Two teaching MIPS CPUs: a five-stage pipeline and a multiple-cycle machine

This RTL implements two small 32-bit MIPS-subset processors. They are built for a
single-stepped FPGA board: a push button is the clock, and a 2 x 16 character LCD shows what
every part of the machine holds after each step.

- **`pl_cpu`, the main design:** a classic five-stage pipeline (IF, ID, EX, MEM, WB). It has
  separate instruction and data memories. It has no hazard detection and no forwarding.
  Branches and jumps are resolved in the MEM stage, and fetch fills the gap with three
  `NONE` bubbles.
- **`mc_cpu`, its predecessor:** a multiple-cycle CPU with one shared memory, driven by a
  Moore state machine. It takes 2 to 5 steps per instruction.

Both CPUs run the same instruction set:

| group | instructions |
|---|---|
| R-type | `add sub and or nor sll srl sra` |
| immediate | `addi andi ori` |
| memory | `lw sw` |
| control | `beq bne j` |

The encodings are standard MIPS. `andi`/`ori` zero-extend their immediate; the other
immediates are sign-extended.

`top` puts the two CPUs side by side. Each has its own buttons, switches and display lines.

## Addressing: everything counts words

Both CPUs address memory in 32-bit **words**, not bytes:

- the PC steps by 1;
- `lw r1, 20(r0)` reads word 20;
- a branch goes to `PC + 1 + offset`, with the offset not shifted;
- `j` goes to `{(PC+1)[31:26], index}`.

The demonstration programs in `rtl/*.hex` are written for this: `beq r2, r1, -8` at address 9
loops back to address 2.

Code assembled for byte-addressed MIPS (PC+4, offsets shifted left by 2) will not run without
changing the offsets. Standard MIPS uses byte addresses; this is the main place where this RTL
deliberately differs from it.

## The pipeline (`pl_cpu`)

```
        +------+  IF/ID  +------+  ID/EX  +------+  EX/MEM  +-------+  MEM/WB  +------+
  PC -->|  IF  |-------->|  ID  |-------->|  EX  |--------->|  MEM  |--------->|  WB  |--> regfile
        +------+         +------+         +------+          +-------+          +------+
           ^                                                               |
           +------------- taken, target (from the MEM/WB register) --------+
```

Each stage module (`pl_if_stage` ... `pl_wb_stage`) holds the pipeline register at its
output. Pipeline registers are typed structs, defined in `pl_pkg`. Every stage carries a
*tag* along with its instruction: a 4-bit type code and the instruction's word address. The
display uses the tags to show which instruction is in which stage.

### Clock edges

| part | edge | behaviour |
|---|---|---|
| pipeline registers, PC | rising | advance |
| instruction memory (`pl_imem`) | falling | read |
| data memory (`pl_dmem`) | falling | read-first |
| register file | falling | write; reads are combinational |

Because the register file writes on the falling edge, a value written back in WB is
readable by the instruction in ID in the same step.

### Fetch, reset and the PC

The instruction memory is addressed with the *next* PC:

```
npc = taken ? target : pc + 1
```

It latches the word on the falling edge. On the rising edge, the PC takes `npc` and IF/ID
takes the word.

The PC resets to `FFFF_FFFF`. The first falling edge after reset reads address 0, so the
first rising edge loads `PC = 0` together with instruction 0.

Reset is asynchronous and active high. It must be held across a falling edge, which a held
button always is.

### Control transfers and the three bubbles

This is the part that most needs explaining.

**Where the decision is made.** `beq`, `bne` and `j` are decided in MEM:

- EX computes the target and the comparison (a subtract, using the ALU's zero flag);
- MEM forms `taken = j | (branch & (zero ^ bne))`;
- `taken` and the target travel through the MEM/WB register back to IF.

**How fetch waits.** While a control transfer sits in ID, EX or MEM:

- IF holds the PC;
- IF writes an all-zero word (`NONE`, tag type 0) into IF/ID.

**The result.** A control transfer is always followed by exactly three bubbles. The fourth
fetch comes from the target when `taken` is set, and from the fall-through address when it
is not. The testbenches check this pattern cycle by cycle.

**What is not built.** There is no other hazard logic: no stall for data hazards and no
forwarding. Software must place a consumer at least three instructions after its producer.
The falling-edge register write makes three enough; with two, the consumer would read the
old value.

### Decode (`pl_ctrl`)

`pl_ctrl` is a pure combinational decoder. Its outputs are:

- `cu_branch`, `cu_bne`, `cu_jump`;
- `cu_shift`: ALU A takes the shift amount;
- `cu_wmem`, `cu_mem2reg`, `cu_sext`;
- `cu_aluc`: an ALU operation from `cpu_pkg::alu_op_e`;
- `cu_aluimm`: ALU B takes the immediate;
- `cu_wreg`;
- `cu_regrt`: destination is rt, not rd.

An unknown opcode decodes as a no-op.

### Pipeline instruction types (display)

| code | meaning | source |
|---|---|---|
| 0 | NONE | |
| 1 | add | follows the original board code |
| 2 | sub | follows the original board code |
| 3 | and | follows the original board code |
| 4 | or | this design's choice |
| 5 | nor | follows the original board code |
| 6 | lw | follows the original board code |
| 7 | sw | this design's choice |
| 8 | beq | follows the original board code |
| 9 | bne | this design's choice |
| A | j | this design's choice |
| B | sll | this design's choice |
| C | srl | this design's choice |
| D | sra | this design's choice |
| E | addi | this design's choice |
| F | andi/ori | this design's choice |

## The multiple-cycle CPU (`mc_cpu`)

**Datapath.** One 512-word dual-port memory (`mc_mem`) holds program and data:

- port A is read-only;
- port B reads and writes, read-after-write.

Around it are the registers PC, IR, DR (memory data), A and B (register operands) and C (ALU
result).

**Submodules:**

- `mc_pcm`: the PC with its three-way source mux (ALU, C, jump);
- `mc_alu_wrapper`: the ALU operand muxes, plus a 2-bit ALU controller (00 add, 01 sub,
  10 from `func`, 11 `andi`/`ori`);
- `mc_reg_wrapper`: the register file with its destination and write-data muxes.

### State machine (`mc_ctrl`)

| state | code | does |
|---|---|---|
| IF | 0 | IR <- mem[PC], PC <- PC+1 |
| ID | 1 | A, B <- registers; C <- PC + imm (branch target); `j` writes PC and returns to IF |
| EX_R | 2 | C <- A op B (shifts use IR[10:6]) |
| EX_LD | 3 | C <- A + imm |
| EX_ST | 4 | C <- A + imm |
| EX_BR | 6 | A - B; PC <- C if the condition holds |
| MEM_RD | 5 | DR <- mem[C] |
| MEM_ST | 7 | mem[C] <- B |
| WB_R | 8 | rd <- C |
| WB_LS | 9 | rt <- DR |
| EX_I | A | C <- A op imm |
| WB_I | B | rt <- C |

Sequences (steps per instruction in brackets):

| instruction | states | steps |
|---|---|---|
| lw | 0,1,3,5,9 | 5 |
| R-type | 0,1,2,8 | 4 |
| sw | 0,1,4,7 | 4 |
| j | 0,1 | 2 |
| beq/bne | 0,1,6 | 3 |
| addi/andi/ori | 0,1,A,B | 4 |

The first four rows and states 0-5 and 7-9 follow the original design. States 6, A and B
were added here to cover the rest of the instruction set.

**Memory address mux.** The memory address mux (`IorD`) selects PC when 0 and C when 1.

**Memory clock.** The memory is a rising-edge block RAM clocked by the *inverted* CPU clock:
it reads and writes in the middle of each state. This lets IF load IR in one step, and lets
MEM_RD leave DR valid for WB. Reset must span a falling edge, so that address 0 is read
before the first IF completes.

**Display codes.** The controller also produces display codes:

- type: 1 R, 2 J, 3 I;
- code:
  - 1 LD, 2 ST, 3 AD, 4 SU, 5 AN, 6 NO, 7 JP, as on the original board;
  - 8 OR, 9 SLL, A SRL, B SRA, C ADDI, D ANDI, E ORI, F BEQ/BNE, added here;
- stage: 1-5.

## Board top and display (`top`, `anti_jitter`, `*_lcd_text`)

**Clock and reset.** `top` clocks each CPU from a debounced push button and resets it from
another. `anti_jitter` is a two-flop synchroniser followed by a counter; it accepts a new
level after `CYCLES` stable board clocks. The default is 500 000, which is 10 ms at 50 MHz.

**Register select.** Four slide switches pick a register (r0-r15) to show.

**Display lines.** The two 16-character lines are brought out as ASCII vectors. Character
`i` is bits `[127-8i -: 8]`.

| | line 1 | line 2 |
|---|---|---|
| pipeline | ID instruction (8 hex), space, clock count (2 hex), space, register (4 hex) | for IF, ID, EX, MEM, WB in turn: stage letter `f d e m w`, instruction number (low hex digit of its address), type |
| multiple-cycle | IR (8 hex), space, read address (2 hex), space, write address (2 hex) | state, type, code and stage at columns 0/2/4/6; PC (2 hex) at 8-9; register (4 hex) at 11-14 |

**Not included.** The controller that would drive a physical character LCD is not part of
this RTL.

**Timing of the display.** With the step button held down, the pipeline's IF display still
shows the previous fetch. The instruction memory latches on the falling clock edge, which is
the button's release. This is the one-step display lag the board shows.

## Files

| file | contents |
|---|---|
| `cpu_pkg` | opcodes, ALU operations, display types, shared decode functions |
| `pl_pkg` | the pipeline register structs |
| `alu`, `regfile` | shared by both CPUs |
| `pl_*` | the pipeline and its memories |
| `mc_*` | the multiple-cycle CPU |
| `anti_jitter`, `top` | board level |
| `rtl/pl_prog.hex`, `rtl/pl_data.hex` | pipeline program and data |
| `rtl/mc_prog.hex` | multiple-cycle program and data (words 20, 21) |

**Memory sizes.** Memories are 512 words deep by default (parameters `IM_DEPTH`, `DM_DEPTH`,
`MEM_DEPTH`).

**Pipeline data words.** Data words 20 and 21 of the pipeline hold `beef0000` and
`0000beef`. The original pipeline program does not give its data, so the multiple-cycle
program's values are reused.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

**The reference model.** `tb/isa_model.sv` holds a small instruction-set model. The CPU
testbenches use it to check the registers and the stored words after each of
two programs:

- the demonstration program, with its state sequence (multiple-cycle) and its bubble
  pattern (pipeline);
- an all-instruction program.

**The end-to-end testbench.** `top_tb` runs the whole board at its default parameters:

- it presses bouncing buttons to step both CPUs through their programs;
- it reads the display lines back;
- it counts the mechanisms that occurred: bounces, bubbles, taken and untaken branches,
  loads, stores, write-backs and jumps.

**How to run.** Run from the repository root; the `.hex` files are opened by relative path.

```
verilator --binary --timing -Wno-fatal --top-module top_tb -Irtl -Itb \
    -y rtl -y tb rtl/cpu_pkg.sv rtl/pl_pkg.sv tb/isa_model.sv tb/top_tb.sv \
    --Mdir obj_top -o sim
./obj_top/sim
```

Replace `top_tb` with any other testbench name to run that block. `top_tb` takes about half
a minute; the others take seconds.

## Departures and limits

- **Word addressing.** The original instruction table and datapath drawings use byte
  addresses (PC+4, offset shifted left by 2). Its demonstration programs only work with word
  addresses, and those were followed.
- **Added instructions and states.** `nor` is implemented because both demonstration
  programs use it. The multiple-cycle controller gained states for branches and
  immediate-ALU instructions.
- **No hazard handling.** The pipeline does not stall or forward.
- **Display numbers.** Display type and code values beyond those of the original board are
  this design's own.
- **Memory depths.** The pipeline's 512-word memory depth is a choice.
- **Debounce time.** The debounce time is a choice.
- **No overflow checks.** No instruction checks for arithmetic overflow.
- **No LCD controller.** No LCD panel controller is included.
