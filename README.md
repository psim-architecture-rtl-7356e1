# PSIM: an 8-bit accumulator processor

PSIM is a minimal teaching processor. It has one accumulator, a 256-byte
memory that holds both program and data, and sixteen instructions. Each
instruction runs as a short sequence of register transfers, one per clock,
counted off by a 3-bit timing counter. Almost every transfer goes through a
single 8-bit data register (DR). DR is the machine's internal bus: memory
data, the accumulator and the input port all enter DR, and the program
counter, instruction register, address register, output port, memory and ALU
all take their data from it.

This RTL implements the whole machine in synthesizable SystemVerilog, from
its datapath and ALU down to the control decoder. Its behaviour matches the
published gate-level control equations in every state that an instruction
reaches.

## Datapath

```
            +------+   +------+
            |  PC  |   |  AR  |            IN (external byte)
            +--+---+   +--+---+              |
               |0         |1                 |
             [    MUX1    ]<- M1S_AR         |
                   | MA                      |
               +---v---+                     |
               |  MEM  |  256 x 8            |
               +---+---+                     |
                   | MEM[MA]        AC       |
                   |0               |1       |2
                 [            MUX2           ]<- M2S_AC, M2S_IN
                                 |
                             +---v---+
                             |  DR   |----> PC (jump), IR, AR, OR, MEM write data
                             +---+---+
                                 |
                      AC --->[  ALU  ]<--- C, AC_C2-0
                               |    |
                              AC    C   (loaded every clock)
```

| Register | Width | Loaded by | From |
|---|---|---|---|
| PC, program counter | 8 | `LD_PC` (load) / `INC_PC` (+1) | DR |
| AR, address register | 8 | `LD_AR` | DR |
| DR, data register | 8 | `LD_DR` | MUX2 |
| IR, instruction register | 8 | `LD_IR` | DR |
| OR, output register | 8 | `LD_OR` | DR |
| IN, input register | 8 | `in_ld` (external) | `in_data` port |
| AC, accumulator | 8 | every clock | ALU |
| C, carry | 1 | every clock | ALU |
| TC, timing counter | 3 | `RST_TC` (clear) / `INC_TC` (+1) | - |

**MUX1** (`psim_mux1`) addresses memory from PC (`M1S_AR`=0) or AR
(`M1S_AR`=1). **MUX2** (`psim_mux2`) feeds DR with memory data when neither
select is high, with AC when `M2S_AC` is high, and with IN when `M2S_IN` is
high. Both are written bit by bit as AND-OR sums of products.

Memory (`psim_mem`) reads combinationally: DR captures `MEM[MA]` at the end
of the same clock in which the address is presented. It writes DR into
`MEM[MA]` on the clock edge when `WR_MEM` is high.

## The ALU and the carry

AC and C have no load enable. They take the ALU result on every clock, and
operation `000` simply returns their old values. The 3-bit code `AC_C2-0`
selects:

| AC_C | AC gets | C gets |
|---|---|---|
| 000 | AC (hold) | C |
| 001 | DR (load) | 0 |
| 010 | ~AC | ~C |
| 011 | AC + 1 | carry out |
| 100 | AC + DR | carry out |
| 101 | AC & DR | NAND of the eight bits of AC |
| 110 | ~(AC \| DR) | NOR of the eight bits of AC |
| 111 | AC ^ DR | OR of the eight bits of AC |

Increment and add share one adder. Its second operand is `DR & ~AC_C1` and
its carry-in is `AC_C1`, so code 011 adds 0 + 1 and code 100 adds DR + 0.

The NAND/NOR/OR results for C are reduced over the accumulator as it is
*before* the operation. So after AND, NOR or XOR, C describes the old AC, not
the result. For example, C = 0 after an XOR means the accumulator was zero
before it. This is the reading of the circuit drawing this design follows
(see "Departures and open points").

## Instruction set

An instruction is one byte, plus one operand byte for the last eleven
instructions below. Only bits 3..0 of the instruction byte are decoded;
bits 7..4 are ignored.

| Code | Name | Bytes | Clocks | Effect |
|---|---|---|---|---|
| 0 | HLT | 1 | - | stop; only reset restarts |
| 1 | NOP | 1 | 3 | none |
| 2 | INA | 1 | 3 | AC <- AC+1, C <- carry |
| 3 | CMA | 1 | 3 | AC <- ~AC, C <- ~C |
| 4 | ISZ | 1 | 4 | if C = 0, PC <- PC+2 (skip the next two-byte instruction) |
| 5 | LDI n | 2 | 4 | AC <- n, C <- 0 |
| 6 | ADI n | 2 | 4 | AC <- AC+n, C <- carry |
| 7 | BUN a | 2 | 4 | PC <- a |
| 8 | STA a | 2 | 7 | MEM[a] <- AC |
| 9 | STI a | 2 | 7 | MEM[a] <- IN |
| A | LDA a | 2 | 6 | AC <- MEM[a], C <- 0 |
| B | LDO a | 2 | 6 | OR <- MEM[a] |
| C | ADA a | 2 | 6 | AC <- AC+MEM[a], C <- carry |
| D | AND a | 2 | 6 | AC <- AC & MEM[a] |
| E | NOR a | 2 | 6 | AC <- ~(AC \| MEM[a]) |
| F | XOR a | 2 | 6 | AC <- AC ^ MEM[a] |

The mnemonics and clock counts come from the original design. Their meanings
(for example, that ISZ skips two bytes) were worked out from its control
equations.

## Micro-operation sequences

This part is the heart of the machine and the least obvious.

The control logic (`psim_control`) is purely combinational. From IR3-0, TC
and C it raises a set of control signals for the current clock. On the next
rising edge, every register named by those signals updates at once. TC then
either steps (`INC_TC`) or returns to 0 (`RST_TC`), and the step with
`RST_TC` is the last step of the instruction.

| TC | Instructions | Transfers |
|---|---|---|
| 0 | all | DR <- MEM[PC] |
| 1 | all | IR <- DR, PC <- PC+1 |
| 2 | HLT | nothing, and TC does not advance: the machine stays here |
| 2 | NOP | end |
| 2 | INA, CMA | AC op, end |
| 2 | ISZ | PC <- PC+1 if C = 0 |
| 2 | LDI, ADI, BUN, codes 8-F | DR <- MEM[PC] (operand byte) |
| 3 | ISZ | PC <- PC+1 if C = 0, end |
| 3 | LDI / ADI | AC <- DR / AC <- AC+DR, PC <- PC+1, end |
| 3 | BUN | PC <- DR, end |
| 3 | codes 8-F | AR <- DR, PC <- PC+1 |
| 4 | codes 8-F | DR <- MEM[AR]; STA takes AC instead, STI takes IN |
| 5 | STA, STI | MEM[AR] <- DR |
| 5 | LDA, LDO | AC <- DR / OR <- DR, end |
| 5 | ADA, AND, NOR, XOR | AC <- AC op DR, end |
| 6 | STA, STI | end (no transfer) |

Three details in this table are easy to get wrong:

* The operand byte is fetched through DR in step 2. In step 3 it is already
  in DR when it is used (LDI, ADI, BUN) or moved to AR (codes 8-F).
* ISZ tests C in two consecutive steps and increments PC in each. With no
  ALU operation in between, C cannot change, so PC moves by 0 or by 2.
* MUX1 selects AR in every step with TC >= 4. STA and STI keep their MUX2
  select high through steps 4 to 6, though it only matters in step 4. This
  matches the original gate-level control signal for signal.

The original control logic is a minimised two-level gate network of about
43 gates. It treats every (IR, TC) pair that no instruction reaches as a
don't-care. This design writes the decoder as the step table above instead.
In the unreached pairs it raises only `RST_TC`, so an impossible state
returns to a fetch. Both forms produce the same outputs in all 156 reachable
(IR, TC, C) combinations, which the control testbench checks one by one.

## Top level and interface (`psim_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst` | in | 1 | synchronous, active high; clears every register, not the memory |
| `in_ld`, `in_data` | in | 1, 8 | load the IN register |
| `prog_we`, `prog_addr`, `prog_data` | in | 1, 8, 8 | write a memory byte; use while `rst` is high |
| `out_data` | out | 8 | the OR register |
| `halted` | out | 1 | high while a HLT is being executed |
| `dbg` | out | struct | PC, AR, DR, IR, AC, C, TC, IN (`psim_state_t`) |

After reset, execution starts with a fetch from address 0. The top carries
assertions for rules that the control sequence must never break:

* MUX2 is never asked for both AC and IN.
* PC never gets a load and an increment in the same clock.
* TC never gets a reset and an increment in the same clock.

Example: a counting loop, the first program of the end-to-end test.

```
00: 05 FD   LDI 0xFD
02: 02      INA            ; C = carry out
03: 04      ISZ            ; C = 0: skip the BUN below
04: 07 08   BUN 0x08       ; reached once AC wraps to 0
06: 07 02   BUN 0x02
08: 08 90   STA 0x90
0A: 1B 91   LDO 0x91       ; upper nibble ignored
0C: 00      HLT
```

## Files

| File | Contents |
|---|---|
| `rtl/psim_pkg.sv` | opcode and ALU enums, control-word struct `ctrl_t`, state struct |
| `rtl/psim_top.sv` | the processor |
| `rtl/psim_control.sv` | control decoder |
| `rtl/psim_alu.sv` | ALU |
| `rtl/psim_mux1.sv`, `rtl/psim_mux2.sv` | address and data-register multiplexers |
| `rtl/psim_mem.sv` | 256 x 8 memory |
| `rtl/psim_reg.sv` | load-enable register (AR, DR, IR, OR, IN, AC, C) |
| `rtl/psim_counter.sv` | counter with clear/load/increment (PC, TC) |
| `tb/tb_*.sv` | one self-checking testbench per module |

Each width parameter defaults to PSIM's size: 8 bits of data, 8 bits of
address and a 3-bit TC. The instruction encoding fixes the machine at 8
bits, so `psim_top` has no parameters.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and finishes. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/psim_pkg.sv tb/tb_psim_top.sv \
          --top-module tb_psim_top
./obj_dir/Vtb_psim_top
```

Replace `top` with `control`, `alu`, `mux1`, `mux2`, `mem`, `reg` or
`counter` to run the other testbenches.

`tb_psim_top` runs the counting loop, then 399 random memory images with
HLT made rare. Random images mix code and data, so they also cover
self-modifying code. An instruction-level model inside the testbench runs
the same image. At every instruction boundary, the testbench compares PC, AC,
C, OR and all 256 memory bytes with the model, and checks the clock count of
the finished instruction against the table above. It also counts each
opcode, ISZ skipping and not skipping, carry outs, IN loads and halts, and
fails if any of them never happened. The whole run takes under a second.

`tb_psim_control` compares the decoder with a table of the original
equations' outputs, one entry per reachable input. It also checks the step
at which each instruction ends.

## Departures and open points

* **Control logic form.** It is written as a step table, not as the
  original minimised gate network, so its gate count differs. In unreached
  states it raises only `RST_TC`; the original leaves those states as
  don't-cares.
* **C after AND/NOR/XOR.** C is reduced over the accumulator before the
  operation, as the circuit drawing wires it. If the result was meant
  instead, change the three reductions in `psim_alu.sv` to use the new AC.
* **MUX2 with both selects high.** This is a don't-care in the original;
  here the sum of products gives AC | IN. The control logic never asks for
  it.
* **This design's own additions**, none of which the original defines:
  * the reset, which clears every register;
  * the program-load port into the memory;
  * the `in_ld` strobe for the IN register;
  * the `halted` and `dbg` outputs.
* **Opcode meanings.** Only the mnemonics are given originally. The effects
  listed above were worked out from the control equations, and the
  end-to-end testbench's model encodes that reading.
