# A 16-bit single-cycle processor and an even-parity UART, with self-checking regressions

This repository holds two small, independent designs that are meant to be
verified by comparing their visible state, clock by clock, with a software
reference model:

* **`simple_cpu`**: a 16-bit RISC-style processor. It has four 16-bit
  registers, an 8-bit program counter and five working instructions, each
  with a signed 8-bit immediate. It has no instruction memory. The
  verification environment feeds it one instruction word per clock and reads
  back the four registers after every instruction. Any wrong result is
  therefore seen at the instruction that caused it.
* **`uart_tx` / `uart_rx`**: a UART transmitter and receiver. A frame is one
  start bit, eight data bits (LSB first), an even-parity bit and one stop
  bit. Each bit lasts `BAUD_DIV` clocks (default 10). They are tested in
  loopback, with the transmitter output wired to the receiver input.

`configdrivenv_top` places the two designs side by side. They share only the
clock and the reset. All code is synthesizable SystemVerilog-2017. Each
module has a self-checking testbench, and two regressions replay fixed test
sets.

## Files

| file | contents |
|---|---|
| `rtl/cpu_pkg.sv` | processor widths, `opcode_t`, the `instr_t` instruction struct, `sext_imm()`, `encode()` |
| `rtl/simple_cpu.sv` | the processor |
| `rtl/uart_pkg.sv` | frame length, `even_parity()`, `make_frame()` |
| `rtl/uart_tx.sv`, `rtl/uart_rx.sv` | the UART halves |
| `rtl/configdrivenv_top.sv` | top level: both designs side by side |
| `tb/cpu_if.sv` | interface bundling the processor's clk, rst, instr, pc, halt and r0..r3 |
| `tb/tb_*.sv` | testbenches (see below) |
| `tb/instr.hex`, `tb/checkpoints.mem`, `tb/golden.mem` | a 100-instruction program with its expected register states |

## The processor

### Instruction word

```
 15    12 11 10  9  8  7            0
+--------+-----+-----+--------------+
| opcode |  -  | rd  |     imm      |
+--------+-----+-----+--------------+
```

`imm` is a two's-complement value in [-128, +127]. It is sign-extended to
16 bits before use, so ADD, SUB, MOV and XOR all see the same 16-bit
operand `simm`.

| opcode | mnemonic | effect | PC |
|---|---|---|---|
| 0x0 | NOP  | none | +1 |
| 0x1 | ADD  | `rd <- rd + simm` | +1 |
| 0x2 | SUB  | `rd <- rd - simm` | +1 |
| 0x3 | MOV  | `rd <- simm` | +1 |
| 0x4 | XOR  | `rd <- rd ^ simm` | +1 |
| 0xF | HALT | `halt <- 1`, then ignore everything until reset | held |
| 0x5-0xE | (unassigned) | treated as NOP | +1 |

All arithmetic wraps modulo 2^16. For example, `0x12A2` is ADD r2, -94.
Starting from r2 = 0, it leaves r2 = 0xFFA2. A version of the adder that
subtracts by mistake would give 0x005E instead. The value has the same
magnitude and the opposite sign, which makes it a good test of whether a
testbench looks at full register values.

### Timing

The processor executes whatever word is on `instr` at each rising edge of
`clk`. The result is visible on `r0..r3` and `pc` right after that edge.
This means:

* The throughput is one instruction per clock.
* An instruction held on `instr` for two clocks runs twice. An environment
  that wants to pace instructions more slowly must present NOPs in between,
  and the PC counts those NOPs.
* `rst` is active high and synchronous. It clears the registers, the PC and
  `halt`. The testbenches hold it for five clocks.
* `pc` is the number of non-HALT instructions executed since reset, modulo
  256. Each checkpoint line in `tb/checkpoints.mem` holds the address of the
  instruction just executed. After that instruction, `pc` therefore reads
  that address plus one.

Inside the module, a two-state control (RUN, HALTED) sits in front of a
purely combinational datapath. The datapath reads `rd` and computes the
result, which the register file writes back at the clock edge. An assertion
checks that no state changes once the processor has halted.

## The UART

```
 idle  start d0 d1 d2 d3 d4 d5 d6 d7 par stop  idle
 ----+      +--+--+--+--+--+--+--+--+---+----+-----
     |______|  ...  data, LSB first  ...
       each bit BAUD_DIV clocks; par = d0^...^d7 (even parity)
```

**Transmitter.** When `tx_start` is sampled high while `tx_busy` is low, the
transmitter does two things. It loads the 11-bit frame into a shift
register, and it drives the start bit on `tx` at that same edge. A
down-counter then shifts out one bit every `BAUD_DIV` clocks. `tx_busy`
stays high for exactly `11 * BAUD_DIV` clocks. A `tx_start` during that time
is ignored. When frames are sent back to back, one idle clock separates
them.

**Receiver.** `rx` first passes through a two-flop synchronizer. When the
line goes low, the receiver waits half a bit time and checks that the line
is still low. If the line has gone high again, the receiver treats the low
pulse as a glitch and returns to idle. From that mid-bit point it samples
every `BAUD_DIV` clocks. The eight data bits go into `shift_reg`, and the
parity bit and the stop bit are sampled after them. In the STOP state there
are two cases:

* **Stop bit high.** `data_out <= shift_reg`, and `data_valid` is high for
  one clock. `parity_err` is updated at the same time. It is high when the
  data bits and the parity bit together hold an odd number of ones. The
  byte is delivered either way.
* **Stop bit low.** The byte is dropped and `frame_err` pulses for one
  clock.

`data_valid` rises 10.5 bit times plus about three clocks after the
transmitter sees `tx_start`. The 10.5 bit times take the line to the middle
of the stop bit, and the extra clocks are the synchronizer and the output
register. Assertions check that `data_valid` is
a single-clock pulse and that it never coincides with `frame_err`.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each also has a watchdog that ends the run as a failure.

| testbench | what it does |
|---|---|
| `tb_simple_cpu` | Uses a reference model written in the testbench. Drives a 5-clock reset with random words on `instr`, the ADD r2,-94 example, and wrap-around corner cases. Then drives 1000 random instructions, uniform over NOP/ADD/SUB/MOV/XOR, followed by HALT and 20 ignored words. It compares all registers, PC and halt after every clock. |
| `tb_cpu_checkpoints` | Replays `tb/instr.hex` (100 instructions) and compares the registers after each one with `tb/checkpoints.mem`, and the final state with `tb/golden.mem`. Prints `PASS=/FAIL=` per instruction. |
| `tb_uart_tx` | Samples the line in every clock of every frame for 20 boundary bytes plus 40 random bytes. This checks each bit's value and its exact length of `BAUD_DIV` clocks. It also checks that `tx_busy` lasts 11 bit times and that a `tx_start` during a frame is ignored. |
| `tb_uart_rx` | Builds frames in the testbench. Sends the boundary bytes, random bytes, bad-parity frames, frames with a low stop bit, and a glitch shorter than half a bit. Checks `data_out`, the one-clock `data_valid`, `parity_err`, `frame_err`, and when `data_valid` arrives. |
| `tb_uart_loopback` | Connects `uart_tx` to `uart_rx` and sends the 20 boundary bytes, then prints the `PASS=/FAIL=` tally. |
| `tb_configdrivenv_top` | End-to-end test of the top level at its default parameters. Runs 1000 random processor instructions in parallel with 50 UART loopback frames, some back to back. Then it opens the loop to inject a parity error and a framing error. It counts each mechanism (each opcode, HALT, instructions ignored after HALT, 16-bit wrap, reset, looped-back frames, back-to-back frames, ignored `tx_start`, parity error, framing error). Any mechanism that never occurred counts as a failure. |

The 20 UART boundary bytes are 0x00, 0xFF, 0xA5, 0x5A, 0x55, 0xAA, 0x01, 0x80,
0x0F, 0xF0, and 0x12 + 12k for k = 0..9 (0x12 ... 0x7E).

The checkpoint files were made by a reference model in software. It does the
following:

1. Draws an opcode uniformly from {NOP, ADD, SUB, MOV, XOR}.
2. Draws `rd` uniformly from 0..3 and `imm` uniformly from -128..127.
3. Applies the instruction to a four-entry register array, masking each
   result with 0xFFFF.
4. Writes one line per instruction: `addr r0 r1 r2 r3` in hex.

To make a longer regression, regenerate the three files with the same
recipe, keeping each file below a few thousand lines. Then set `NUM_INSTR`
in `tb_cpu_checkpoints` to match.

### Sensitivity to bugs

Two injected bugs show that the checks bite:

* **ADD computes `rd - simm`.** This fails 99 of the 100 checkpoint
  instructions. The one that passes is the first instruction, which comes
  before any ADD has touched the registers. Once a wrong value is in a
  register, every later checkpoint differs. `tb_simple_cpu` reports about
  1,850 failing checks.
* **The receiver stores `shift_reg + 1` in its STOP state.** This fails all
  20 loopback vectors.

An odd-parity transmitter is caught by `tb_uart_tx`.

### Running a testbench with Verilator

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
    rtl/cpu_pkg.sv rtl/uart_pkg.sv tb/tb_configdrivenv_top.sv \
    --top-module tb_configdrivenv_top -Mdir obj
./obj/Vtb_configdrivenv_top
```

Replace the testbench name to run another one. Run the commands from the
repository root, because `tb_cpu_checkpoints` opens `tb/*.hex` and
`tb/*.mem` by relative path. Every testbench finishes in well under a
second of simulated time.

## Parameters and sizes

| name | default | where |
|---|---|---|
| `XLEN`, `NREGS`, `PC_W`, `IMM_W` | 16, 4, 8, 8 | `cpu_pkg` |
| `BAUD_DIV` | 10 clocks per bit | `uart_tx`, `uart_rx`, `configdrivenv_top` |

After coarse synthesis, the processor is about 30 word-level cells, 9
flip-flop bits and a 64-bit register array. The two UART halves together are
about 90 cells and 53 flip-flop bits.

## Where this RTL makes its own choices

The processor's instruction set, field layout, widths and 16-bit wrap-around
come from the design being reproduced. The same holds for the UART frame,
the LSB-first order, the even parity, `BAUD_DIV = 10`, the receiver's STOP
state and the one-clock `data_valid` pulse. The following points were left
open there and are decisions of this implementation:

* **Processor rate.** The processor runs one instruction per clock, and the
  word on `instr` is executed at every edge. The original description also
  mentions a two-clock fetch/execute rhythm in its testbench. It gives no
  instruction-valid signal that would make that rhythm safe, so this
  implementation does not support it.
* **Processor control.** HALT freezes the processor until reset, and the PC
  does not advance on HALT. Opcodes 0x5-0xE act as NOP, and bits [11:10] are
  ignored. The immediate is sign-extended for MOV and XOR as well as for ADD
  and SUB.
* **Reset.** Reset is synchronous and active high for every block.
* **UART ports and handshake.** The transmitter's `tx_start`/`tx_busy`
  handshake and its port names are this implementation's own.
* **UART receiver details.** The receiver's synchronizer, glitch rejection,
  mid-bit sampling, `parity_err` and `frame_err` are additions. The original
  receiver specifies no error outputs.
* **Top level.** The UART loopback is left to the environment. The top
  level brings out `uart_tx` and `uart_rx` as separate pins.
* **Not included.** The description's verification environment is not part
  of this RTL. That environment is UVM components and a Python stimulus and
  reference generator. Plain SystemVerilog testbenches take its place.
