# PicoBlaze fan-control SoC

A small FPGA system-on-chip for embedded control. It follows a
hardware/software split: the control decisions run as software on a tiny 8-bit
soft processor (the Xilinx PicoBlaze, KCPSM6), and the timing-critical work is
done by dedicated logic on the processor's port bus. The demonstration
application is a DC fan. A user at a PC terminal types a duty cycle. The SoC
receives it over a serial line, the program passes it on, and a PWM generator
drives the fan at that duty cycle.

This repository holds the RTL of everything around the processor:

- the serial port,
- the program memory,
- the two port registers that form the processor's I/O,
- the PWM generator,
- and the top level that wires them together.

The processor core itself is not included. It is vendor IP with a
published instruction set. The top level brings its pins out as ports, so the
core can be attached next to it. A behavioural stand-in that runs the
demonstration program is in `tb/kcpsm6_model.sv`.

## How a command travels through the SoC

```
 PC ──rx1──► uart ──led[7:0]──► fde (in_port reg) ──in_port──► ┐
      ◄─tx── (echo)                 CE = read_strobe            │   KCPSM6
                                                                │ (external)
                 program_rom ◄──address, bram_enable────────────┤
                 (4K x 18)   ───instruction────────────────────►│
                                                                │
 fan ◄─oLed0── pwm_unit ◄─dutycycle── fde (duty reg) ◄─out_port─┘
                                       CE = write_strobe
```

1. The `uart` receiver frames the serial byte and keeps the last good byte on
   its `led[7:0]` output. It also sends every byte back on `tx`, so the
   terminal shows what the SoC received.
2. The program executes `INPUT s0, 00`. During that instruction the processor
   raises `read_strobe`, and the in_port register (`fde`) loads the UART
   byte at the same clock edge where the processor samples `in_port`.
3. The program executes `OUTPUT s0, 00`. `write_strobe` loads `out_port` into
   the duty register (the second `fde`).
4. `pwm_unit` takes the duty register at the start of its next period.
5. `JUMP 000` repeats the loop. A pass takes three instructions, which is six
   clock cycles on the real core.

### The one-read lag on in_port

The register in front of `in_port` is clocked by `read_strobe`. So the
processor samples its *old* contents, and the register picks up the current
UART byte at the same edge. Each `INPUT` therefore returns the byte that was
present at the previous `INPUT`. Because the program polls in a loop, a new
duty cycle arrives one loop pass (six cycles) later than it would with a
direct connection. That is harmless for a fan. A program that reads the port
only once per event must read it twice.

### No port decoding

`port_id` is not decoded. Every `OUTPUT`, to any port, writes the duty
register, and every `INPUT` reads the UART byte. To add peripherals, decode
`port_id` into the `ce` of each register and put a multiplexer on `in_port`.

## Blocks

| File | Block | What it does |
|---|---|---|
| `rtl/soc_pkg.sv` | package | Bus widths: 18-bit instruction, 12-bit program address, 8-bit data |
| `rtl/picoblaze_toggle.sv` | top | Wiring above, reset inverter, strobe assertion |
| `rtl/uart.sv` | serial port | `uart_rx` + echo path with one-byte holding register + `uart_tx` |
| `rtl/uart_rx.sv`, `rtl/uart_tx.sv` | helpers | 8N1 receiver (mid-bit sampling, framing check) and transmitter |
| `rtl/program_rom.sv` | program memory ("LED" block) | 4096 x 18 synchronous-read block RAM, loaded from a hex file |
| `rtl/firmware.hex` | program | The three-instruction loop above |
| `rtl/fde.sv` | port register | Register with clock enable, power-up value zero |
| `rtl/pwm_unit.sv` | PWM ("d" block) | 8-bit PWM with prescaler and period-aligned duty update |

### pwm_unit

An 8-bit counter advances once every `PRESCALE` clocks. The output is high
while the counter is below the duty value. So:

- one period is `256 * PRESCALE` clocks;
- the high time is `dutycycle * PRESCALE` clocks;
- 0 gives a steady low, 128 gives a square wave at 50 %, and 255 is high for
  255 of 256 steps.

A shadow register takes the duty value only when a period starts. A write in
the middle of a period therefore never shortens or stretches the pulse that is
running. `period_start` is high in the last clock of each period. With the
defaults (50 MHz, `PRESCALE` = 8) the PWM runs at about 24.4 kHz. That is
above the audible range, as usual for fan PWM.

### uart

The receiver is fixed at 8 data bits, no parity, one stop bit. It works as
follows:

- `rx` passes through a two-flop synchroniser.
- After a falling edge, the receiver waits half a bit and checks that the line
  is still low. A shorter pulse is treated as noise.
- It then samples each bit at its centre.
- If the stop bit is low, the byte is dropped and `frame_err` pulses.
- A good byte updates `led` and pulses `rx_valid` at the middle of the stop
  bit, about 9.5 bit times after the start edge.

The UART has no data input from the processor, so the transmitter echoes what
is received. A one-byte holding register makes sure that frames arriving back
to back are all echoed.

### program_rom

The read is synchronous: address and `enable` in one cycle, the word on
`instruction` after the clock edge. This is the timing that the KCPSM6 fetch
expects. The default image `rtl/firmware.hex` contains:

| Address | Word | Instruction |
|---|---|---|
| 000 | 09000 | INPUT s0, 00 |
| 001 | 2D000 | OUTPUT s0, 00 |
| 002 | 22000 | JUMP 000 |

All other words are zero. Use the `INIT_FILE` / `ROM_FILE` parameter to load
a different program. The path is relative to the directory the simulator or
synthesis tool runs in.

## Resets and board pins

| Pin | Direction | Meaning |
|---|---|---|
| `iClk` | in | The single clock of the design |
| `key` | in | Active-low asynchronous reset of the UART and the PWM |
| `Reset` | in | Active-low processor reset. It is inverted to `kcpsm6_reset`, which is active high like the core's `reset` pin |
| `rx1`, `tx` | in / out | Serial line to the PC |
| `oLed0` | out | PWM output to the fan driver |

The port registers have no reset. They power up at zero, which is the FPGA
configuration value, and hold their contents through `key` and `Reset`.

The processor-side ports are `instruction`, `in_port` and `kcpsm6_reset`
(outputs), plus `address`, `bram_enable`, `out_port`, `write_strobe` and
`read_strobe` (inputs). The core's `interrupt` and `sleep` inputs should be
tied low. Its `port_id`, `k_write_strobe` and `interrupt_ack` outputs are not
used.

The observation outputs `dutycycle`, `rx_valid`, `frame_err` and
`pwm_period_start` are there for testing and may be left open.

## Parameters of the top

| Parameter | Default | Meaning |
|---|---|---|
| `CLK_HZ` | 50,000,000 | Clock frequency, used only for the baud divider |
| `BAUD` | 9600 | Serial rate. The divider is rounded: 5208 clocks per bit by default |
| `PWM_PRESCALE` | 8 | Clocks per PWM step |
| `ROM_DEPTH` | 4096 | Program words. The core addresses 4K |
| `ROM_FILE` | `"rtl/firmware.hex"` | Program image |

The 18-bit instruction, the 4K program space and the 8-bit ports come from the
processor. The clock, the baud rate, the frame format, the PWM resolution and
frequency, and the reset polarities are choices of this design.

## How closely this follows the original system

These parts follow the original system's block structure and RTL schematic:

- the block names (`LED` program memory, two `fde` registers, PWM block `d`);
- the pin names of the blocks and of the board;
- the reset inverter in front of the processor;
- the data paths shown in the diagram above.

Two connections come from reading wires in that schematic and are the least
certain part of the design. The first is the enable of the in_port register,
taken as `read_strobe`. The second is `key` driving the resets of both the
UART and the PWM. If your board differs, change them in
`picoblaze_toggle.sv`.

Everything inside `uart`, `pwm_unit` and `program_rom` is this design's own.
The original system gives only what each block is for. The same holds for the
echo transmitter and the demonstration program.

## What is not here

- **The KCPSM6 processor.** Attach the vendor's core to the processor ports.
  `tb/kcpsm6_model.sv` is not a processor. It executes only LOAD, INPUT,
  OUTPUT and JUMP, at two cycles per instruction, which is enough for the
  demonstration program.
- **The temperature ADC.** In the full system, an external microcontroller
  (PIC16F877A, 8-channel 10-bit ADC) reads a temperature sensor. The user then
  chooses the fan's duty cycle from that reading. The link between that board
  and the FPGA is not specified, so there is no ADC interface here.
- **A transmit path from the processor.** The UART transmitter only echoes.

For scale: the complete system with the processor core takes about
157 slice registers, 198 LUTs, 57 slices and 6 I/O pins of a Spartan-6 device
(1-3 % of it). The RTL here, without the core, has about 130 flip-flops plus
the program block RAM.

## Simulation

Each block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`. Run, for example, the end-to-end test at full
size like this:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
    -y rtl -y tb +libext+.sv rtl/soc_pkg.sv tb/picoblaze_toggle_tb.sv \
    --top-module picoblaze_toggle_tb -Mdir obj
./obj/Vpicoblaze_toggle_tb
```

Run it from the repository root, so that `rtl/firmware.hex` is found.

| Testbench | What it checks |
|---|---|
| `picoblaze_toggle_tb` | Full default parameters, with the processor model. Sends duty bytes 128, 64, 0, 255 and 200 at 9600 baud. Checks the duty register, the measured high time (duty x 8 of 2048 clocks), the period and the echo. Counts received bytes, port reads and writes, duty changes, PWM periods and echoes, and fails if any of them never occurs. Runs in well under a second. |
| `uart_tb` | Isolated and back-to-back frames, `rx_valid` timing, echo content and framing, a bad stop bit, a glitch on `rx`. Runs at 16 clocks per bit. |
| `pwm_unit_tb` | Period and high time for duty 0, 1, 64, 128, 200, 254 and 255; a mid-period duty change; reset. |
| `program_rom_tb` | Program words, zero fill, one-cycle latency, hold while disabled. |
| `fde_tb` | Enable behaviour against a reference model, power-up value. |

Lint shows a `PROCASSINIT` warning on `fde.sv` because of the register's
declaration initialiser. The initialiser is intended: it is the power-up value
of a register that has no reset.
