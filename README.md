# An 8-bit RISC processor with a co-operative 16-bit ALU and an 8x8 multiplier

An 8-bit microcontroller core of the 16F84 class is good at control and I/O but slow at
arithmetic wider than a byte: adding two 16-bit numbers takes six instructions (two byte
adds plus carry handling). This design keeps the 8-bit core as it is and attaches two
units to it:

* a **co-operative 16-bit ALU (CALU)**. Its operand registers A and B and its result
  register S appear to the core as ordinary file registers. Firmware loads A and B with
  byte moves and then issues one instruction, which computes S in a single instruction
  cycle. There are eleven 16-bit operations: add, subtract, increment, decrement, rotate
  left, rotate right, swap, and, or, xor and complement.
* an **8x8 shift-and-add multiplier** with a 16-bit product register, started by a
  new multiply instruction.

The instruction word grows from 14 to 15 bits. The new top bit selects the class: 0
means a standard 16F84 instruction in bits 13:0, executed by the 8-bit ALU; 1 means an
extended instruction, executed by the CALU or the multiplier. Only one unit works at a
time. The other units stay idle.

## Instruction format

| bits 14 | 13:8 | 7 | 6:0 | meaning |
|---|---|---|---|---|
| 0 | 16F84 opcode | d | f | byte operation on file register f; d=1 writes f, d=0 writes W |
| 0 | `01` + op(2) + b(3) | | f | bit clear / set / test-and-skip on bit b of f |
| 0 | `10` + k(11) | | | CALL (`100`) / GOTO (`101`) |
| 0 | `11` + op(4) | k(8) | | literal operation on W |
| 1 | CALU op | 0 | 0 | 16-bit operation S = op(A, B) |
| 1 | `110000` | 0 | f | MULWF f: PROD = W * f |

Base instructions use the standard 16F84 encodings. The core decodes bcf, bsf, clrw,
clrf, movlw, movwf, movf, swapf, incf, decf, comf, andlw, andwf, iorlw, iorwf, xorlw,
xorwf, addlw, addwf, sublw, subwf, rlf, rrf, btfsc, btfss, decfsz, incfsz, plus nop,
goto, call and return. Other 16F84 words (retlw, retfie, sleep, clrwdt, option, tris)
run as a nop.

A CALU operation reuses the 16F84 opcode of the matching byte operation in bits 13:8:

| op | code | S = | STATUS |
|---|---|---|---|
| add | `000111` | A + B | C = carry out of bit 15, Z |
| sub | `000010` | A - B | C = no borrow (A >= B), Z |
| inc | `001010` | A + 1 | Z |
| dec | `000011` | A - 1 | Z |
| rotate left | `001101` | {A[14:0], C} | C = A[15], Z |
| rotate right | `001100` | {C, A[15:1]} | C = A[0], Z |
| swap | `001110` | {A[7:0], A[15:8]} | Z |
| and / or / xor | `000101` / `000100` / `000110` | A op B | Z |
| complement | `001001` | ~A | Z |

## File-register map

The file address is `{RP1, RP0, f}` for direct addressing and `{IRP, FSR}` when f = 0
(INDF). Both banks see the same registers. Only bits 6:0 select a register.

| address | register |
|---|---|
| 0x00 | INDF (indirect through FSR) |
| 0x02 | PCL; a write jumps to {PCLATH, value} |
| 0x03 | STATUS (C, DC, Z, RP0, RP1, IRP; resets to 0x18) |
| 0x04 | FSR |
| 0x0A | PCLATH |
| 0x0C–0x4F | 68 bytes of general-purpose RAM (`data_ram`) |
| 0x50, 0x51 | CALU A low, high |
| 0x52, 0x53 | CALU B low, high |
| 0x54, 0x55 | CALU S low, high (read-only) |
| 0x56, 0x57 | multiplier product PRODL, PRODH (read-only) |

Other addresses read as 0 and ignore writes.

A 16-bit add, as firmware writes it:

```
movf  AL,w   ; movwf 0x50      ; A = operand 1 (two bytes)
movf  AH,w   ; movwf 0x51
movf  BL,w   ; movwf 0x52      ; B = operand 2
movf  BH,w   ; movwf 0x53
<CALU add>                      ; one instruction cycle
movf  0x54,w ...                ; read S
```

The operands usually stay in A and B across several operations, so the loads are paid
once. The gain is in the operation itself: one cycle against six for the base
instruction sequence
`movf AL,w / addwf BL,f / movf AH,w / btfsc STATUS,C / addlw 1 / addwf BH,f`.

## Instruction timing

This part needs the most care when you change the core (`risc_core`).

Each instruction cycle is four clocks, T1 to T4:

| state | what happens |
|---|---|
| T1 | the decoder works on the instruction register; the file address goes on the RAM bus with `readram` |
| T2 | the RAM returns the byte (its read is registered). Operand a (the file register, an SFR or the literal) and operand b (W) are latched into `aluinp1`/`aluinp2` |
| T3 | execute. The 8-bit ALU result and flags are latched. Or the CALU loads S and its flags are latched. Or the multiplier runs (below) |
| T4 | write-back to W or to the file register (`writeram`) and STATUS update. The instruction register loads the next word and the PC advances |

**Fetch overlaps execution.** During the whole cycle the program memory is read at the
PC, which already points past the executing instruction. At T4 the fetched word goes
into the instruction register. A GOTO, CALL, RETURN, a write to PCL or a taken skip
(btfsc, btfss, decfsz, incfsz) loads a NOP instead. Such an instruction therefore costs
two cycles, as on the 16F84. This is why the six-instruction 16-bit add above always
takes six cycles. When btfsc skips, the skipped addlw becomes the bubble.

**STATUS writes.** If an instruction writes STATUS and also sets flags, the flags win
over the written value for C, DC and Z.

**The multiply stalls the core.** MULWF f reads f in T2 like any byte operation. In
T3 it pulses `start` to the multiplier and holds the state machine in T3 until the
multiplier's `done`. The multiplier needs one clock per add/shift step, so it takes 8
extra clocks. The instruction lasts 12 clocks, which is three instruction cycles. The
product stays in the multiplier's 16-bit register. Firmware reads it as PRODL/PRODH.
MULWF changes neither W nor STATUS. An assertion in the core checks that the multiplier
is only busy while the core is held in T3 on a MULWF.

**CALU timing.** A CALU instruction executes entirely in T3 of one cycle: S and
STATUS.C/Z are updated, and nothing is written back in T4. A write to A or B happens at
T4 of the movwf that writes it, so the next instruction already sees the new value.

## The multiplier

`mult8x8` uses the classic shift-and-add structure:

* an 8-bit multiplier register that shifts right;
* a multiplicand register that shifts left, 16 bits wide;
* a 16-bit adder;
* a 16-bit result register.

In each of 8 steps the control logic looks at the multiplier's low bit. It adds either
the shifted multiplicand or zero into the result, then shifts both registers. The handshake is start / busy / done. `done` is high during
the eighth step, and `prod` is valid from the following edge until the next start.

## Modules

| file | role |
|---|---|
| `rtl/risc_pkg.sv` | widths, SFR addresses, ALU/CALU operation enums, decoded control word |
| `rtl/risc_enh_top.sv` | top: core + program memory + RAM |
| `rtl/risc_core.sv` | T1..T4 control unit, W/STATUS/FSR/PCLATH/PC, SFR decode, dispatch, stall |
| `rtl/instr_decoder.sv` | 15-bit word to control word |
| `rtl/alu8.sv` | 8-bit ALU (combinational) |
| `rtl/calu16.sv` | 16-bit co-operative ALU with A, B, S registers |
| `rtl/mult8x8.sv` | shift-and-add multiplier |
| `rtl/call_stack.sv` | 8-level return-address stack; wraps around like the 16F84's |
| `rtl/prog_mem.sv` | 1K x 15 program memory, synchronous read, load port |
| `rtl/data_ram.sv` | 68-byte file-register RAM, synchronous read |

Top-level parameters are `PROG_DEPTH` (1024) and `RAM_SIZE` (68). The program is
written through `prog_we_i/prog_addr_i/prog_data_i` while `pon_rst_n_i` holds the core
in reset. All other top-level outputs are for observation:

* the fetch address and word;
* the RAM bus;
* W, STATUS, the instruction register and the T-state;
* the strobes for the end of an instruction cycle, a flush, a multiplier stall, a CALU
  execution and a multiplier start.

## Simulating

Every testbench checks its own results. It prints `TB_RESULT checks=N failures=M`
and calls `$finish`. A watchdog ends a run that hangs. The testbench assembler,
`tb/tb_asm_pkg.sv`, builds instruction words and holds a reference model of the CALU
operations. To run the end-to-end test with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/risc_pkg.sv tb/tb_asm_pkg.sv \
    rtl/*.sv tb/tb_risc_enh_top.sv --top-module tb_risc_enh_top -Mdir obj
./obj/Vtb_risc_enh_top
```

Replace the testbench and top-module names to run another test. Every unit test uses
the same command.

What each testbench covers:

* `tb_risc_enh_top` runs the full design at its default sizes, six times with different
  operands. Each run measures the 16-bit addition: 6 instruction cycles on the 8-bit
  path and 1 with the CALU. It checks all 11 CALU results, the product and its 12-clock
  MULWF, CALL/RETURN, a decfsz/goto loop, indirect addressing and a computed jump
  through PCL. It counts every mechanism: skips, flushes, calls, returns, stall clocks,
  CALU executions and multiplies.
* `tb_calu_vs_base` computes each of the 11 16-bit operations twice: once with a
  base-instruction sequence and once with the CALU. It checks both results and counts
  instruction cycles. The base sequences take 42 cycles in all and the CALU takes 11.
  The original work quotes 46 against 11, but does not give its sequences.
* `tb_risc_core` runs a random program that applies every base instruction to random
  operands. It compares each write on the file bus, in order, with a model of the
  16F84 semantics. It also checks that every instruction cycle is four clocks.
* `tb_alu8`, `tb_calu16`, `tb_mult8x8`, `tb_call_stack`, `tb_prog_mem`, `tb_data_ram`
  and `tb_instr_decoder` test the units on their own. `tb_mult8x8` checks the 8-clock
  latency. `tb_calu16` checks that each operation needs a single execute clock.

## What is specified and what is chosen here

These points follow the published architecture:

* the 15-bit word whose top bit selects 8-bit or 16-bit operation;
* the 16F84 base instruction set and its file/destination fields;
* the T1..T4 states, with execution in T3;
* CALU registers A, B and S mapped as special function registers;
* eleven single-cycle 16-bit operations, with their list;
* a shift-and-add 8x8 multiplier with a 16-bit result register and its own instruction;
* one unit active at a time.

These are this design's own choices, because the architecture leaves them open:

* the encoding of the extended instructions;
* the SFR addresses of A, B, S and the product;
* the operand sources of the multiply (W and f);
* the multiply stall and the start/busy/done handshake;
* the flags set by the CALU;
* the byte order of the 16-bit swap; single-operand CALU operations act on A;
* the memory sizes, taken from the 16F84;
* the synchronous memories;
* the program load port.

Left out:

* the 16F84 peripherals: timer, I/O ports, data EEPROM, watchdog, sleep and interrupts;
* the option and tris registers;
* retlw.

The architecture does not describe these parts. A real part would need them, and they
would attach to the file-register map above.

The original work reports the processor only as FPGA results: simulation times and
Spartan/Xilinx resource counts. Those depend on that tool flow and clock, so nothing
here reproduces them. The cycle claims do hold in this RTL and are checked in simulation:

* 16-bit addition: 6 cycles on the base instructions, 1 with the CALU;
* every CALU operation takes one cycle;
* the eleven operations take 11 cycles on the CALU against 42 for this design's
  base-instruction sequences; the original work quotes 46.
