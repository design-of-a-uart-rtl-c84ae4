# UART-to-Bell 202 converter

This converter turns characters typed on a PC terminal into Bell 202 audio-band
FSK. The PC sends a line of text over an ordinary UART at 115200 baud. The
converter echoes the line back, stores it, and sends it one character at a time
onto a voice-band line at 1200 baud. A `1` is sent as a 1200 Hz tone (mark) and a
`0` as a 2200 Hz tone (space). The tones are square waves from counters on the
50 MHz board clock. The modulator only switches between two free-running
oscillators, so the phase is **not** continuous at bit changes. Each character
goes out as an 8-bit packet, MSB first, inside an `enable` window 8 bit periods
long (6.67 ms). Outside the window the line is held low.

It is written for a Cyclone V board with a 50 MHz clock, but nothing in the RTL
is vendor-specific. It is plain synthesizable SystemVerilog with one clock domain.

## Signal path

```
            115200 baud                        8-bit bus + load pulse
  rx  ──► uart_rx ──► line_buffer ──► data_logger FSM ─────────────────┐
  tx  ◄── uart_tx ◄── (echo)                                           │
                                                                       ▼
                        ┌──────────────── bell202_transmitter ───────────────────┐
                        │ clk_divider K=41667 ──► clk_piso (1200 Hz bit clock)   │
                        │        │ rise = bit-clock edge                         │
                        │        ▼                                               │
  data, data_load ──►   │ load request + hold ──► piso_register ──► out_piso     │
                        │                              │ serial bit, MSB first   │
                        │                              ▼                         │
                        │ fsk_modulator: mark osc K=41667 ─┐                     │
                        │                space osc K=22727 ┴─► mux ──► fsk       │
                        │                                                 │      │
                        │ buffer_out: sr_latch (window) + timer_8 + AND ◄─┘      │
                        └──────────────► out_fsk_data, enable, mark, space ──────┘
```

`uart_bell202_top` holds two parts. `data_logger` is the host side: UART
receiver, echo transmitter, line buffer and the state machine that hands bytes
over. `bell202_transmitter` is the modem side. They are joined by an 8-bit data
bus and a one-clock `data_load` pulse, which is the whole interface between them.

## How a packet is timed

Packet timing is the least obvious part of the design, because the bit clock
runs freely and is not started by the data.

* The bit clock `clk_piso` is a divide-by-41667 counter that never stops.
  Every flip-flop runs on the 50 MHz clock. The divider also gives `rise`, a
  one-clock pulse in the first clock of each high phase. The PISO register and
  the window timer use `rise` as their clock enable. They act "on the bit-clock
  edge" without being clocked by a divided net.
* A `data_load` pulse copies `data` into a holding register and raises a load
  request. Nothing else happens until the next bit-clock edge.
* On that edge (the *loading edge*):
  - the PISO register takes the held byte, and its MSB appears on `out_piso`;
  - the window flip-flop (`sr_latch`) is set, and `enable` goes high;
  - the load request is cleared.

  All three change one 50 MHz clock after `clk_piso` rises.
* The next seven edges shift out bits 6 down to 0. `timer_8` counts edges while
  the window is open. On the eighth edge it pulses `last`, which clears the
  window. So `enable` is high for exactly 8 × 41667 = 333336 clocks
  (6.667 ms, a 150 Hz packet rate).
* The latency from `data_load` to the window is 2 to 41668 clocks, which is up
  to one bit period. It depends on where the pulse falls relative to the free
  bit clock.

```
 clk_piso  _|‾‾|__|‾‾|__|‾‾|__|‾‾| ... _|‾‾|__|‾‾|__
 data_load __|_______________________ ... __________   (any time between edges)
 enable    ______|‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾ ... ‾‾‾‾‾|_____
 out_piso  ______< b7  >< b6  >< b5 ... >< b0  >____
 out_fsk   ______ mark or space tone per bit  _______   (low outside enable)
```

Load rules that follow from this:

* **Keep `data_load` shorter than one bit period (833 µs).** The request is
  raised on every clock where `data_load` is high. A longer pulse is served
  again on the following edge, and the byte is sent twice. The data logger
  drives a one-clock pulse.
* **A load during a packet waits.** The request is held until the edge that
  closes the current window. That edge then loads the next byte, and the window
  stays open (the set input of the window flip-flop wins over its reset). Two
  packets then follow each other with no gap, and `enable` stays high for
  16 bit periods.
* `data` only has to be valid in the clock of the `data_load` pulse. The
  holding register keeps the byte after that.

When the window is closed, the PISO register keeps shifting zeros and the
modulator keeps producing the space tone. The AND gate in `buffer_out` keeps
all of that off the line.

## Tones and divide ratios

Every frequency comes from `K = f_clk / f_out`, rounded to the nearest integer
(`bell202_pkg::div_k`):

| signal        | target      | K     | actual (50 MHz / K) | high / low clocks |
|---------------|-------------|-------|---------------------|-------------------|
| bit clock     | 1200 baud   | 41667 | 1199.99 Hz          | 20834 / 20833     |
| mark (`1`)    | 1200 Hz     | 41667 | 1199.99 Hz          | 20834 / 20833     |
| space (`0`)   | 2200 Hz     | 22727 | 2200.03 Hz          | 11364 / 11363     |
| host UART bit | 115200 baud | 434   | 115207 baud         | –                 |

Each divider counts 0 … K−1. Its output is low for the first ⌊K/2⌋ counts and
high for the rest, so the period is exactly K clocks and the duty cycle is 50 %
to within one clock.

The mark oscillator and the bit clock have the same K, but they are separate
counters and are never re-aligned. One bit of mark is therefore one full
1200 Hz cycle at some arbitrary phase. One bit of space is about 1.83 cycles of
2200 Hz. Because neither oscillator restarts at a bit boundary, the line jumps
to whatever level the newly selected tone has at that moment. This is FSK
*without* phase continuity. A receiver filter sees a small glitch at some bit
changes, which Bell 202 demodulators tolerate at 1200 baud. To change the tones
or the bit rate, set `K_MARK`, `K_SPACE` and `K_BAUD` on the top.

## Host side: the data logger

`data_logger` behaves like the small program a microcontroller would run for
this job:

1. Each character received on `rx` (8N1, 115200 baud) is echoed on `tx` and
   appended to a 64-entry line buffer.
2. A carriage return or a line feed ends the line. If the buffer is empty, as
   for a bare Enter or the LF of a CR-LF pair, the terminator is ignored.
   Otherwise the logger starts sending.
3. Sending: the head character goes on `data` with a one-clock `data_load`
   pulse, and the next pulse follows `PACKET_WAIT` clocks later, until the
   buffer is empty. `sending` is high during this phase.
   `PACKET_WAIT` defaults to 10 bit periods (416670 clocks). Each packet starts
   exactly 10 bit periods after the previous one, and `enable` drops for 2 bit
   periods between packets.
4. Characters that arrive while a line is being sent are dropped, without
   echo. Characters beyond the 64th of a line are dropped but still echoed.
   The terminator is not sent.

Typing `BCDE` followed by Enter produces four packets: 0x42, 0x43, 0x44, 0x45.
On `out_piso` each one reads MSB first (`0 1 0 0 0 0 1 0` for "B").

The echo has a one-character holding register in front of `uart_tx`. At equal
baud rates the echo of one character ends at about the time the next one is
received, so the holding register absorbs the few clocks of overlap.

## Top-level ports (`uart_bell202_top`)

| port           | dir | meaning                                                    |
|----------------|-----|------------------------------------------------------------|
| `clk_50mhz`    | in  | 50 MHz system clock                                        |
| `reset`        | in  | synchronous reset, active high (the logger gets it inverted) |
| `rx`           | in  | UART from the PC (e.g. through a USB-to-TTL adapter)       |
| `tx`           | out | UART echo to the PC                                        |
| `out_fsk_data` | out | modulated Bell 202 line signal, low outside packets        |
| `enable`       | out | 8-bit packet window; also a sync output for other equipment |
| `mark`, `space`| out | the two oscillators, for measurement                       |
| `out_piso`     | out | serial data bit                                            |
| `clk_piso`     | out | 1200 Hz bit clock                                          |
| `sending`      | out | the logger is sending a line                               |

Parameters of the top, all defaulting to the full-rate design: `K_HOST` (434),
`K_BAUD` (41667), `K_MARK` (41667), `K_SPACE` (22727), `PACKET_WAIT` (416670)
and `DEPTH` (64, a power of two).

`bell202_transmitter` can be used on its own. Its ports are `clk_50mhz`,
`reset`, `data[7:0]`, `data_load` and the six line/monitor outputs, with the
names `out_fsk`, `enable`, `mark_monitor`, `space_monitor`, `out_piso_monitor`
and `clk_piso_monitor`.

## Modules

| file                      | what it is                                                         |
|---------------------------|--------------------------------------------------------------------|
| `bell202_pkg.sv`          | clock and rate constants, the `div_k` rounding function            |
| `clk_divider.sv`          | divide-by-K square wave plus rising-edge enable                    |
| `piso_register.sv`        | 8-bit parallel-in serial-out register, a mux in front of each flop |
| `fsk_modulator.sv`        | mark and space oscillators and the bit-controlled switch           |
| `sr_latch.sv`             | clocked set/reset bit holding the window, set dominant             |
| `timer_8.sv`              | counts 8 bit-clock edges while enabled, pulses on the eighth       |
| `buffer_out.sv`           | window flip-flop, timer and the AND gate onto the line             |
| `bell202_transmitter.sv`  | load request, bit clock, PISO, modulator, buffer                   |
| `uart_rx.sv`, `uart_tx.sv`| 8N1 UART, mid-bit sampling with a 2-flop synchroniser on rx        |
| `line_buffer.sv`          | FIFO for one line of text                                          |
| `data_logger.sv`          | echo, line collection and paced byte hand-over                     |
| `uart_bell202_top.sv`     | the converter                                                      |

## Design choices and departures

This implementation follows a reference design built from a soft processor and
a schematic of small Verilog blocks. It differs in the following places:

* **The host side is logic, not a processor.** The reference used a soft CPU
  with a UART, parallel output ports and a C program that prompts for a string,
  prints it back and writes the characters to the ports one by one.
  `data_logger` does the same job in a state machine. It has no prompt text,
  and it echoes characters as they arrive. The line terminator, the pacing
  between characters, the buffer depth and the dropping rules are this
  design's choices.
* **One clock domain.** The reference clocks the shift register and the timer
  from divided clocks. Here they run on the 50 MHz clock with the divided
  clock's rising edge as an enable, which makes the timing above exact and
  easy to constrain.
* **Captured load.** The holding register and load request, which make the
  transmitter independent of where `data_load` falls within a bit period, are
  additions.
* **Window flip-flop.** The set/reset element is a clocked flip-flop with set
  priority, not a level-sensitive latch. The window timer clears its count
  whenever the window is closed, so every packet is counted from zero.
* **Eight data inputs** (`data[7:0]`). The packet is 8 bits, MSB first.
* **Mark divide ratio 41667**, from 50 MHz / 1200 Hz.
* **Reset** is a conventional synchronous active-high reset throughout. The
  logger's active-low reset is driven from it.

Not implemented:

* the 384 Hz call tone of the Bell 202 band, which is not part of data
  transmission;
* the full-duplex variant of Bell 202;
* a PLL for higher rates;
* the USB-to-TTL adapter, which is off-chip.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. All of them except the
full-rate one scale the divide ratios down (keeping their ratios) so they run
in well under a second.

| testbench                   | what it establishes                                                           |
|-----------------------------|-------------------------------------------------------------------------------|
| `tb_clk_divider`            | period K, high/low split, single `rise` per period, even and odd K            |
| `tb_piso_register`          | MSB-first output, hold between edges, zero fill, reload mid-byte              |
| `tb_sr_latch`               | random set/reset against a set-dominant model                                 |
| `tb_timer_8`                | `done` on every 8th edge only, count cleared when disabled                    |
| `tb_buffer_out`             | 8-bit window, gating, back-to-back 16-bit window                              |
| `tb_fsk_modulator`          | tone selection, constant oscillator periods across bit changes, phase jumps   |
| `tb_bell202_transmitter`    | bytes rebuilt from the pins, window length, load latency, back-to-back loads  |
| `tb_uart_rx`, `tb_uart_tx`  | framing, ±3 % baud tolerance, framing error, glitch rejection, busy time      |
| `tb_line_buffer`            | random push/pop against a queue model, full and empty                         |
| `tb_data_logger`            | echo, load order and spacing, empty line, drops while busy and when full      |
| `tb_uart_bell202_top`       | whole converter, scaled; counts each mechanism (echo, empty line, window, mark, space, phase jump, drop while busy, drop when full) and fails if one never happens |
| `tb_uart_bell202_top_full`  | whole converter at default parameters: types "B" and "BCDE", checks 0x42 then 0x42 0x43 0x44 0x45 on the line, 333336-clock windows, exact tone periods, the echo; about 2.2 M clocks, a few seconds |

`tb/bell202_line_monitor.sv` is the pin-level checker that both top-level
testbenches share. It looks only at the output pins.

Run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb rtl/bell202_pkg.sv tb/tb_uart_bell202_top_full.sv \
  --top-module tb_uart_bell202_top_full
./obj_dir/Vtb_uart_bell202_top_full
```

Replace the testbench name to run another one. Lint the design with
`verilator --lint-only -Wall -y rtl rtl/bell202_pkg.sv rtl/uart_bell202_top.sv`.
The remaining warnings are unused package constants, unused monitor outputs
that are deliberately left open, and the unused `full` flag of the line buffer
inside the logger.

What the tests do not cover: they check the square-wave tones at the pins, not
how a real Bell 202 demodulator receives them. The design has not been run on
hardware in this form.
