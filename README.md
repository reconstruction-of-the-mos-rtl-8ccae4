# A single-clock MOS 6502 and a bouncing-ball demo system

This is a register-transfer rebuild of the NMOS 6502 processor. It keeps the
internal organisation of the original chip and makes it fit an FPGA:

- the same four internal buses;
- the same ALU input registers AI/BI and the same named transfer paths (DL/DB, SB/AC, ADD/SB, PCL/ADL, ...);
- the same split between a predecoder, a timing generator and a block of "random" control logic.

Where the original used two non-overlapping clock phases, transparent latches and precharged buses, this design uses one rising-edge clock, flip-flops and multiplexers. One clock is one 6502 machine cycle. Every documented instruction takes the number of cycles it takes on the NMOS part.

Around the core sits a small board system for a DE2-class FPGA board:

- a 256-byte memory that reset fills with a bouncing-ball program;
- six seven-segment digits showing A, X and Y;
- eight LEDs showing the flags;
- a slow mode that runs the processor at about twenty cycles per second, so the registers can be watched changing.

## Block structure

```
            data_in ───────────────┐
                                   v
 ┌────────────┐ Inst., cycle# ┌─────────┐ opcode, inst ┌──────────────────────┐ ctl ┌──────────┐
 │ predecoder │──────────────>│   IR    │─────────────>│ random_control_logic │────>│ datapath │──> addr, data_out, rw
 └────────────┘               └─────────┘              └──────────────────────┘     │ (regs,   │
       │ cycle#, kind              ^ SYNC                       ^ T-state           │  ALU, P) │
       v                           │                            │                   └──────────┘
 ┌──────────────────┐──────────────┘────────────────────────────┘                        │
 │ timing_generator │<──────────────── BRC, ACR, page cross ──────────────────────────────┘
 └──────────────────┘
```

| File | Role |
|---|---|
| `cpu_pkg.sv` | Shared types: decoded instruction, T-state, control word, bus selects. It also holds the opcode decoder function. |
| `predecoder.sv` | Decodes the byte on the data bus during the opcode fetch. It produces the addressing mode, the operation, the cycle count and the timing class. |
| `instruction_register.sv` | Latches the opcode and its decoded form at the end of the fetch cycle (SYNC). |
| `timing_generator.sv` | Mealy state machine that steps the T-states. |
| `random_control_logic.sv` | Combinational map from (instruction, T-state) to the control word. |
| `datapath.sv` | Buses, program counter, AI/BI, address and data latches. It contains `alu6502`, `register_file` and `status_register`. |
| `cpu6502.sv` | The core: the five blocks above wired together. |
| `ball_memory.sv`, `ball_program_pkg.sv` | Reloadable program/data memory and the ball program image. |
| `hex7seg.sv`, `clock_divider.sv` | Display decoder and slow-mode enable. |
| `de2_ball_top.sv` | The board system (top level). |

## How an instruction flows: T-states and overlap

The cycle in which an opcode is fetched is called **T1**, and the core raises `sync` during it. The following cycles are counted T2, T3, … up to the instruction's cycle count. The timing generator also produces a combinational **last** flag, high in the final cycle. The cycle after "last" is the next T1.

The datapath does not finish an instruction in its last cycle. As on the original chip, the result of an ALU instruction is still inside the ALU at that point. The core writes it to A, X, Y or the flags during the next instruction's T1, while that opcode is being fetched. Likewise the predecoder sees the new opcode on the data bus during T1, and the IR takes it at the end of T1, so T2 already runs under the new instruction.

The timing generator knows four timing classes:

- **Normal.** "Last" comes at the instruction's cycle count.
- **Read-modify-write** (ASL/LSR/ROL/ROR/INC/DEC on memory). The last two cycles are flagged SD1 and SD2. In SD1 the unmodified operand is written back while the ALU works. In SD2 the result is written. This matches the double write of the NMOS 6502.
- **Indexed read** (abs,X / abs,Y / (zp),Y). The cycle count assumes a page crossing. If the low-address add produced no carry (ACR = 0), the instruction ends one cycle early.
- **Branch.** The class works like this:
  - T2 reads the offset and tests the condition (BRC). If BRC is false, that cycle is the last one: 2 cycles.
  - If BRC is true, T3 adds the offset to PCL. If the target stays in the page, T3 is the last cycle: 3 cycles.
  - If the target is in another page, a T4 adds or subtracts one from PCH: 4 cycles.
  - The page-crossing test is `ACR xor offset[7]`. It reaches the timing generator as a third status input next to BRC and ACR. The offset sign (DL bit 7) also goes to the control logic, which picks +1 or −1 for PCH.

## The datapath: buses as multiplexers

The four internal buses are:

- **DB**, the internal data bus;
- **SB**, the special bus;
- **ADL** and **ADH**, the address low and high buses.

Each bus is a multiplexer, and the control word picks at most one source. A bus with no source reads FFh. This stands in for the original precharge, and some transfers rely on it. For example, S − 1 is computed as ADL + SB with SB idle, and a branch uses FFh as the PCH decrement operand.

Timing inside one clock:

- **Address bus.** The external address is combinational within its cycle. When the address registers ABL/ABH are loaded, they pass the ADL/ADH bus straight to the pins and keep it for later cycles. Memory is read asynchronously, and the data latch DL captures the read data at the end of every read cycle.
- **ALU.** AI, BI, the ALU operation and its carry-in are registered together. The ALU output (called ADD) is therefore valid throughout the following cycle. The operation is tied to the operands it was registered with, so a sum cannot leak into a later cycle.
- **Program counter.** Each cycle the PC loads `{PCH or ADH, PCL or ADL} + increment`. This is how jumps, branches and returns load it.

The original moves data in two phases per cycle. Two paths beyond the original's are added so the same transfers fit one edge:

- DB can take the data input directly. A byte being read can then reach the ALU or a register in the same cycle.
- ADH can take the ALU output directly. An indexed address can then fix its high byte while SB is busy.

## ALU and flags

The ALU adds (with carry-in), does AND, OR and EOR, and shifts right. Left shifts are computed as `A + A`.

Subtraction feeds BI the inverted operand. Decimal mode corrects each nibble of the sum:

- addition adds 6 to a nibble above 9, and carries into the next nibble;
- subtraction takes away 6 when a nibble borrowed, and 60h when the byte borrowed.

N and Z come from the corrected value. V comes from the binary sum, as on the NMOS part.

The status register loads each flag from its own source:

- C from ACR, from bit 0 of DB, or from IR5 (SEC/CLC);
- Z and N from the value being written;
- V from AVR, from DB bit 6, or cleared;
- I and D from IR5.

A push of P sets bits 5 and 4. The branch condition BRC compares the flag selected by opcode bits 7:6 (N, V, C, Z) with bit 5.

## The board system and the ball program

`de2_ball_top` connects the core to `ball_memory` and the displays.

The program keeps the ball position in X and Y and the two directions in memory. Each pass:

1. It steps X by one in its direction and reverses the direction when X reaches 0 or sizeX.
2. It does the same for Y with sizeY.

It runs from address 0000h:

| Address | Block |
|---|---|
| 0000h–0017h | Initialisation: X = Y = 0; sizeX = FFh at 0070h; sizeY = DFh at 0071h; dirX = dirY = 1 at 0072h/0073h |
| 0018h | Test dirX |
| 0021h | Test dirY |
| 002Ah / 0032h | X up / down |
| 0039h / 0041h | Y up / down |
| 0048h–005Fh | Store a reversed direction |
| 0068h / 006Bh | Jump back |

The program image in `ball_program_pkg.sv` differs in four bytes from the listing it was taken from. That listing disagreed with its own assembly source:

- At 002Ah, 002Bh and 0033h the bytes are E8h (INX), ECh (CPX abs) and E0h (CPX #), as the source says.
- The BNE at 003Fh has offset 27h, so it reaches the jump-back block at 0068h. An offset of 23h would land in the middle of an instruction.

The sizes FFh and DFh are taken from the byte listing. The source text gives different immediates.

The variables live inside the program's address range, so the memory is writable. Reset reloads all of it from the image, which makes the program restartable.

Slow mode: with `slow` high, `rdy` is the one-cycle tick of `clock_divider`. This makes the whole core advance once per `SLOW_DIV` clocks. The default is 2 500 000, which gives 20 Hz from 50 MHz.

Top-level ports:

| Port | Meaning |
|---|---|
| `clk`, `rst_n` | Clock and active-low reset button (synchronised inside) |
| `slow` | Slow-mode select |
| `hex[5:4]`, `hex[3:2]`, `hex[1:0]` | A, X, Y; active-low segments, bit 0 = segment a |
| `ledr` | Flags N V 1 B D I Z C |
| `ball_x`, `ball_y` | Ball position, for a display unit outside this design |
| `pc` | Program counter |

## Departures from the 6502 and limits

- **No IRQ or NMI.** Reset does not read the vector at FFFCh. Instead the core starts fetching at the `RESET_PC` parameter, with S = FFh and I = 1. BRK and RTI work, and BRK uses the vector at FFFEh.
- **RDY** freezes the whole core in any cycle, including writes. The NMOS part only stops in read cycles.
- **Undocumented opcodes** all execute as 1-byte, 2-cycle NOPs.
- **JMP (ind)** behaves as on the NMOS part: the pointer's low byte is incremented without carry, so a pointer at xxFFh takes its high byte from xx00h.
- **Bus signals** are separate `data_in`, `data_out` and `rw`, with no tristate bus. The memory must answer combinationally within the cycle.
- **Ball display.** How the ball is shown on a screen is not part of this design. Its position is available on `ball_x`/`ball_y`.

## Simulating

Each testbench is a top-level module in `tb/`. For example, with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_cpu6502 \
    -y rtl -y tb +libext+.sv rtl/cpu_pkg.sv rtl/ball_program_pkg.sv tb/tb_cpu6502.sv
./obj_dir/Vtb_cpu6502
```

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. All of them pass with zero failures.

| Testbench | What it checks |
|---|---|
| `tb_cpu6502` | The core against an instruction-level reference model in the testbench. It runs 6 seeds × 4000 random instructions from a random 64 KiB memory, covering all 151 documented opcodes and decimal mode. After every instruction it compares A, X, Y, S, P, PC and the cycle count, and at the end it compares the whole memory. |
| `tb_alu6502` | Every operation, including decimal add/subtract, against arithmetic worked out in the testbench. |
| `tb_predecoder` | All 256 opcodes against a cycle-count table written out in the testbench. |
| `tb_timing_generator` | T-state sequences of each class: branch with 2, 3 and 4 cycles, RMW, and the short indexed read. |
| `tb_instruction_register`, `tb_register_file`, `tb_status_register` | Loads, enables, flag sources and the branch condition. |
| `tb_ball_memory` | The image after reset, reads and writes, and reload on a second reset. |
| `tb_hex7seg`, `tb_clock_divider` | Segment patterns and the tick period. |
| `tb_de2_ball_top` | The whole system at its default parameters. It checks every step of the ball against a model, across full bounces of both axes. It then patches the loop to run an INC (read-modify-write) on a counter, checks slow mode stall by stall, and resets again. It counts branches taken and not taken, RMW cycles, stalls, writes, reversals at both ends and reload, and fails if any of them never happened. It takes about 7 s. |
