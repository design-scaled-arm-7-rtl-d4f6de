# A scaled ARM7 soft core with UART and SPI

This is a small 32-bit ARM processor for FPGAs. It runs a subset of the ARMv4
instruction set, and nearly every instruction finishes in one clock cycle. Two
serial peripherals, a UART and an SPI master, sit at fixed bus addresses.
Programs reach them with ordinary `LDR`/`STR` instructions.

The core has three parts:

- a **controller**: a combinational instruction decoder;
- a **datapath** built from multiplexers. Each operand and each result travels
  through a named mux, and the controller sets every mux select directly.
  Muxes map well onto FPGA lookup tables;
- an **instruction ROM**.

The architecture follows the paper "Design Scaled ARM7 Soft Core Processor with
Communication Techniques with FPGA". That paper gives block diagrams, signal
names and the structure of the datapath. It does not give encodings, timing
details, register maps or the peripherals' insides. Everything those gaps
required is this design's own choice, and each choice is marked below and in
each file's header comment.

```
             +-------------+   ctrl_t    +-------------------------------------+
  ROM  ----> | controller  | ----------> |  datapath                           |
 (inst)      | (decode +   |             |  regfile  MUL  barrel shifter  ALU  |
   ^         |  phase FF)  | <-- NZCV -- |  Temp_reg  CPSR  PC(+4 / branch)   |
   |         +-------------+             +-------------------------------------+
   +----------------- PC ----------------------|  addr_buf / data_buf / data_in
                                               v
                                  word bus --+--> UART  (0x0000_1000)
                                             +--> SPI   (0x0000_2000)
```

## The datapath and its muxes

This section matters most for reading or changing the RTL. The datapath
(`rtl/datapath.sv`) has no sequencing of its own. Each cycle, the controller's
control word `ctrl_t` (defined in `rtl/arm7_pkg.sv`) chooses one path through
these muxes:

| mux | inputs | feeds |
|---|---|---|
| Op2 | `Rm`, zero-extended `inst[7:0]`, sign-extended `inst[23:0]`×4, zero-extended `inst[11:0]` | multiplier, Op3 |
| Op3 | Op2, `MUL_L`, `MUL_H` | `B_bus`, the shifter input |
| Shift_size_type | A = `2*inst[11:8]` (immediate rotate), B = `inst[11:7]`, C = `Rs[4:0]` | shift amount |
| Ulta | `Rn`, `Rn2` | `A_bus` |
| Op4 | `A_bus`, `Temp_reg`, constant `K` (= 0) | `Alu_in1` |
| Op5 | `Alu_out`, `MUL_L`, bus read data, PC+4 | Rd write port |
| Op6 | `MUL_H`, `Rn2`, Op5 output | Rdh write port |
| Load_store | `A_bus`, `Alu_out` | `Temp_reg` |
| Addr_buf_sel | PC, `Temp_reg` | bus address |
| Swap | `Rn2`, `Rm` | bus write data |
| Pc_inc | PC+4, `Alu_out` (branch target) | next PC |
| S | old CPSR, `{NZCV, Q, CPSR[26:0]}` | CPSR |

The register file (`rtl/regfile.sv`) has 16 registers of 32 bits. It has four
read ports (`Rn2`, `Rn`, `Rs`, `Rm`) and two write ports (`Rd`, `Rdh`), each
with a 4-bit address. R15 is the PC:

- it loads through its own `pc_in`/`pc_en` port;
- a read of R15 returns PC+8, which is the value ARM code expects;
- writes to R15 through the data ports are ignored.

There are no banked registers and no processor modes.

How the instruction classes use the muxes:

- **Data processing.** The second operand passes Op2 → Op3 → shifter. It can be
  a rotated 8-bit immediate (shift size A, ROR), a register shifted by an
  immediate (B), or a register shifted by `Rs` (C). `Alu_in1` is `Rn` (Ulta = 0,
  Op4 = `A_bus`). `Alu_fun` is the ARM opcode itself. If the destination is R15,
  Pc_inc takes the ALU result, which makes the instruction a jump
  (`MOV PC, LR` returns from a subroutine).
- **MUL / MLA.** The product `Rs × Rm` goes out as `MUL_L`, through Op3 and a
  bypassed shifter, into the ALU. There it is added to the accumulator `Rn2`
  (Ulta = 1, because MLA keeps its accumulator in bits 15:12) or to `K` = 0.
- **UMULL / SMULL.** The low word takes the same path to the Rd port, and
  `MUL_H` goes to the Rdh port through Op6. Both halves are written in the
  same cycle.
- **B / BL.** `Rn` is R15 (PC+8), and the word offset comes from Op2. The ALU
  adds them, and Pc_inc selects the sum. For BL, Op5 writes PC+4 into R14.
- **LDR / STR / SWP** take two cycles:
  - *Cycle 1.* The ALU forms `Rn ± offset`. Load_store stores in `Temp_reg`
    either that sum (pre-indexed) or `Rn` itself (post-indexed). The base
    register is written back when the instruction asks for it. The PC is held.
  - *Cycle 2.* Addr_buf_sel drives `Temp_reg` onto the bus, and the bus strobes
    are active. A load writes the bus data into Rd through Op5. A store sends
    Rd out through the Rn2 port (Swap = 0). SWP does both at once: it reads into
    Rd and writes `Rm` (Swap = 1).

Flags follow the ARM definitions:

- C is the carry out, or NOT borrow for subtraction, for arithmetic functions;
  it is the shifter carry for logical functions;
- V changes only for arithmetic functions;
- Q is never produced (ARMv4 has no saturating arithmetic);
- the S mux writes the flags only when the instruction's S bit is set.

## Controller and timing

`rtl/controller.sv` decodes in pure combinational logic. Its only state is one
*phase* flip-flop, which marks the second cycle of a load, store or swap. Each
instruction first passes the ARM condition check (all 16 condition codes). An
instruction whose condition fails only advances the PC.

| instruction class | cycles |
|---|---|
| data processing (16 opcodes, all operand-2 forms, S bit) | 1 |
| MUL, MLA, UMULL, SMULL | 1 |
| B, BL | 1 |
| LDR, STR (word; immediate or shifted-register offset; pre/post-indexed, write-back) | 2 |
| SWP (word) | 2 |
| anything else | 1, executed as a no-op |

The unsupported forms run as no-ops:

- byte and halfword transfers;
- UMLAL and SMLAL (the datapath has no 64-bit accumulate path);
- LDM and STM, SWI, coprocessor instructions, MRS and MSR;
- loads into R15;
- Thumb state.

The multiplier is a single combinational 32×32 product, so multiplies are the
longest path.

The register file, `Temp_reg`, the CPSR and the PC all update on the rising
edge. The ROM and the peripheral read data are combinational, so an instruction
is fetched and executed in the same cycle.

After reset:

- the PC is 0;
- R0 to R14 are 0;
- the CPSR is `0x000000D3` (the ARM reset value; the mode bits have no effect
  here).

## Peripherals and memory map

The bus carries 32-bit words. Address bits 15:12 select the peripheral, and
bits 3:2 select the register. Any other address reads as 0, and writes to it are
ignored. There is no data RAM. Both register maps are this design's choice.

**UART** (`rtl/uart.sv`, base `0x0000_1000`) is built from a bus controller, a
baud generator (`uart_baud_gen`), a transmitter (`uart_tx`) and a receiver
(`uart_rx`). It oversamples 16×, and baud = f_clk / (16·(divisor+1)).

| offset | register | meaning |
|---|---|---|
| 0x0 | DATA | write: send `wdata[7:0]` (dropped while busy); read: last received byte, clears `rx_full` |
| 0x4 | STATUS | `[0]` tx_busy, `[1]` rx_full, `[2]` overrun, `[3]` parity error, `[4]` framing error; writing clears bits 2-4 |
| 0x8 | CTRL | `[1:0]` data bits − 5 (5 to 8 bits), `[2]` parity enable, `[3]` odd parity, `[4]` two stop bits; reset value 8N1 |
| 0xC | BAUD | `[15:0]` divisor; reset value `UART_DIV` = 26 (115200 baud at 50 MHz) |

The receiver begins a frame only on a falling edge of the line. It re-checks the
start bit at mid-bit and ignores a glitch. It samples each bit at mid-bit and
checks only the first stop bit. The receive buffer holds a single byte: a byte
that arrives before the previous one was read sets the overrun flag.

**SPI master** (`rtl/spi_master.sv`, base `0x0000_2000`) works in mode 0: SCLK
idles low, MOSI changes on the falling edge, and MISO is sampled on the rising
edge. It sends MSB first, 8 bits per transfer. SCLK = f_clk / (2·(divider+1)).

| offset | register | meaning |
|---|---|---|
| 0x0 | DATA | write: start a transfer (dropped while busy); read: last received word |
| 0x4 | STATUS | `[0]` busy, `[1]` done (cleared by reading DATA) |
| 0x8 | CTRL | `[0]` ss_n (reset 1), `[15:8]` clock divider (reset `SPI_DIV` = 3) |

## The program in the ROM

`rtl/rom.sv` reads `rtl/arm7_program.hex` when the design is elaborated. The
path is relative to the project root, so run tools from there. The file has one
32-bit instruction per line, in hex, with word 0 at address 0. Unused words read
as `MOV R0, R0` (`E1A00000`).

The default program has 73 words. It exercises every mechanism in the core:

| address | what it does |
|---|---|
| 0x000-0x040 | MOV/MVN immediates (R0=2, R1=1, R2=0x15, R3=0xFFFFFFFB, R5=0x3B); ADD/SUB/RSB/AND/ORR/EOR/BIC with LSL, ASR, ROR by register, LSR #1 with S, RRX |
| 0x044-0x070 | ADDS/ADC/SUBS/SBC carry chains; CMP, CMN, TEQ and TST, each followed by conditional instructions, some taken and some skipped |
| 0x074-0x080 | MUL, MLA, UMULL, SMULL |
| 0x084-0x0A0 | loop: BL to a subroutine that adds the counter into R4 and returns with `MOV PC, LR`, then SUBS and BNE; it sums 5+4+3+2+1 |
| 0x0A4-0x0D4 | UART: set divisor 1 and 8E1 format, send 0xA5, poll STATUS, read the byte back |
| 0x0D8-0x100 | SPI: select the slave, send 0x3C, poll busy, read the received word, deselect |
| 0x104-0x11C | post-indexed LDR, pre-indexed LDR with write-back, SWP into the UART baud register, LDR with negative offset |
| 0x120 | `B .` (halt) |

To run your own program, replace the hex file. You can also point the top's
`ROM_FILE` parameter at another file in `rtl/` or `tb/`. Encode the instructions
with any ARM assembler, and keep to the subset listed above.

## Simulating

Each testbench in `tb/` checks its own results. It prints
`TB_RESULT checks=N failures=M`, and its watchdog ends a run that hangs. Run
from the project root, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/arm7_pkg.sv rtl/uart_pkg.sv \
    tb/tb_arm7_top.sv --top-module tb_arm7_top -Mdir obj_top
./obj_top/Vtb_arm7_top
```

The same command runs the other testbenches with their names substituted:
`tb_regfile`, `tb_barrel_shifter`, `tb_alu`, `tb_multiplier`, `tb_datapath`,
`tb_controller`, `tb_rom`, `tb_uart_baud_gen`, `tb_uart_tx`, `tb_uart_rx`,
`tb_uart` and `tb_spi_master`.

`tb_arm7_top` runs the default program with every parameter at its default. It
loops the UART and the SPI back on themselves, and it reaches the halt loop after about 490
cycles. It checks:

- register values at 11 checkpoints, 39 in all, worked out by hand from the
  ARM instruction definitions;
- that every mechanism happened at least once: a skipped conditional, a taken
  branch, BL, a jump through R15, a flag update, a register-specified shift,
  32- and 64-bit multiplies, a load, a store, a swap, a base write-back, a UART
  frame sent and received, and an SPI transfer;
- the cycle count: one cycle per instruction, plus exactly one extra cycle for
  each load, store or swap.

`tb_fig31_sequence` loads `tb/fig31_program.hex`, an 11-instruction
sequence (MOV/MVN immediates, `MOV R5,#0x3B`, `ADD R4,R5,R6`, `MOV R11,R4`). Its
register results match those shown in the original design's published
top-level waveform (R0=2, R1=1, R2=0x15, R3=0xFFFFFFFB, R4=0x3C, R5=0x3B, R6=1,
R7=4, R11=0x3C). The test checks all registers after every instruction. It also
checks that the next PC is always PC+4 and that each instruction takes one
cycle.

The unit testbenches compare against independent reference models:

- the shifter against a bit-by-bit loop;
- the ALU and the multiplier against 64-bit integer arithmetic;
- the UART and the SPI against a line decoder and a slave model in the
  testbench.

## How far to trust it, and where it departs from ARM7TDMI

Every testbench passes. Each one was also checked against a deliberately broken
copy of its module, and each caught the fault. The design has not been run on
an FPGA. These points differ from a real ARM7TDMI, or are guesses where the
source is silent:

- **No pipeline.** The core is single-cycle. R15 reads as PC+8 only so that
  ARM code keeps working. `STR PC` stores PC+8, where ARM7TDMI stores PC+12.
- **Register-specified shifts use `Rs[4:0]`**, as the source's datapath
  diagram prints it. A shift by 32 or more through a register therefore does
  not behave as on ARM.
- **Long-multiply flags.** UMULL/SMULL with S set Z from the low word only.
  MULS clears C and V (the ALU adds the constant K = 0), where ARM leaves V
  unchanged.
- **Register file reads** are combinational. The source reads on the falling
  clock edge and writes on the rising edge. The single-cycle result is the same.
- **The controller** has one phase flip-flop for two-cycle instructions. The
  source calls its controller pure combinational logic and also routes
  "Temp_reg data for two cycle instruction". Both hold here.
- **No interrupts.** The source's datapath diagram has an `ISR_addr` input on
  the Rd mux, but nothing else describes interrupts. Here that mux input
  carries PC+4 for BL instead.
- **No banked registers, modes, SPSRs, Thumb or LDM/STM.** The source leaves
  out shadow registers explicitly.
- **Own choices:**
  - memory map and register layouts;
  - UART frame handling, the receiver's single-byte buffer and the reset baud
    divisor;
  - SPI mode, word size and clock divider;
  - ROM depth (256 words) and the asynchronous ROM read;
  - reset values;
  - the order of inputs on each mux.

## Files

- `rtl/arm7_pkg.sv`: ALU and shift encodings, mux select types, the control
  word `ctrl_t`, the bus struct and the memory map.
- `rtl/uart_pkg.sv`: the UART frame-format struct.
- `rtl/arm7_top.sv`: the top level (ROM, controller, datapath, UART, SPI and the
  bus decode).
- `rtl/controller.sv`, `rtl/datapath.sv`, `rtl/regfile.sv`, `rtl/alu.sv`,
  `rtl/barrel_shifter.sv`, `rtl/multiplier.sv`, `rtl/rom.sv`: the core.
- `rtl/uart.sv`, `rtl/uart_baud_gen.sv`, `rtl/uart_tx.sv`, `rtl/uart_rx.sv`,
  `rtl/spi_master.sv`: the peripherals.
- `rtl/arm7_program.hex`: the default program; `tb/fig31_program.hex`: the
  short sequence used by `tb_fig31_sequence`.
- `tb/tb_*.sv`: one self-checking testbench per module.
