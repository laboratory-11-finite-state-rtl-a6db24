# Sending a processor's result to a PC over a serial line

A small FPGA design that lets a 16-bit soft processor print its result in a
PC terminal. The final value is caught in a register when the processor
reaches a known instruction address. It is then sent as four ASCII
hexadecimal characters, for example `1A2F`, over an asynchronous serial
line at 9600 baud, 8 data bits, no parity, 1 stop bit (8N1). The line goes
through a USB-to-serial bridge module to the PC.

The heart of the design is a four-state transmit state machine that is
clocked by the system clock but moves only on a baud-rate enable pulse. Around it sit:

- a baud generator;
- a flip-flop that turns one-cycle requests into a held enable;
- a sequencer that splits a word into characters.

Alongside it the top level carries three smaller pieces:

- a board test of the transmitter (switches and buttons);
- a 16x oversampling receiver;
- a textbook four-state example machine.

All RTL is synthesizable SystemVerilog. The clock is 50 MHz by default.

## The serial frame

The line idles high. A character is one start bit (0), eight data bits with
the least significant bit first, and one stop bit (1). Each bit lasts one
bit time, 1/9600 s. `A` (41h) goes out as

    idle 1 | 0 | 1 0 0 0 0 0 1 0 | 1 | idle 1
           start   D0 ......  D7   stop

A frame is 10 bit times, so the line could carry 960 characters per
second. This transmitter reaches 872 per second (see the next section).

## Transmit state machine (`tx_fsm`)

| state | TX | TX_RDY | leaves when (on a `baud_en` cycle) |
|-------|----|--------|------------------------------------|
| idle  | 1  | 1      | `tx_en = 1` -> start |
| start | 0  | 0      | always -> bit |
| bit   | `tx_data[bit_cnt]` | 0 | `bit_cnt = 7` -> stop, else stays and `bit_cnt` increments |
| stop  | 1  | 0      | always -> idle |

The state register and the 3-bit `bit_cnt` are written only in clock cycles
where `baud_en` is 1. Every level on the line therefore lasts exactly one
baud period. `bit_cnt` counts in the bit state and is cleared in all others.
Outputs are decoded from the state (Moore style).

Consequences a user must know:

- **Start latency.** A request is seen only at the next `baud_en`. The
  start bit begins between 1 and `DIVISOR` clocks after `tx_en` rises.
- **`tx_en` is sampled, not latched.** A one-cycle pulse on `tx_en` is
  almost always missed. That is why `tx_start_ff` exists (below).
- **`tx_data` is not copied.** The FSM reads `tx_data[bit_cnt]` live, so
  the driver must hold `tx_data` from the request until `tx_rdy` returns
  to 1. The sequencer does this, and so do switches.
- `rst` is synchronous and active high. It returns the line to idle at
  once, even in the middle of a frame.
- **One idle bit between frames.** stop always returns to idle, and idle
  is left only on the next `baud_en`. Even with `tx_en` held high, start
  bits are therefore 11 bit times apart. That is 872 characters per second
  at 9600 baud, not the 960 of a gap-free line. A stop -> start arc taken
  when `tx_en` is 1 would close the gap, but this design keeps the
  four-state machine as specified.

## Baud generator (`baud_gen`)

A counter runs from 0 to `DIVISOR-1`. `baud_en` is 1 while the counter
holds `DIVISOR-1`. `DIVISOR` is the integer part of clock / baud:

| clock   | DIVISOR | actual rate |
|---------|---------|-------------|
| 25 MHz  | 2604    | 9600.6 |
| 50 MHz  | 5208 (default) | 9600.6 |
| 100 MHz | 10416   | 9600.6 |

The counter width follows `DIVISOR`. `uart_pkg` holds `CLK_HZ` and `BAUD`
and derives the default divisor from them.

## Requesting exactly one frame (`tx_start_ff`)

A button pulse or a sequencer strobe lasts one clock. The FSM looks at
`tx_en` only once per bit time. A set/reset flip-flop bridges the two:

- `set` stores a 1;
- `clr`, wired to `not tx_rdy`, stores a 0;
- clear wins over set.

The flag rises on the request and stays up until the FSM has left idle.
Then `tx_rdy` falls and the flag drops. One request gives exactly one
frame, however long the wait for `baud_en`. A request that arrives while a
frame is being sent is dropped.

## From processor result to four characters (`mips_uart_tx`)

    pc, wdata --> result_reg --start--> tx_sequencer --digit--> hex_ascii --tx_data--> tx_fsm --> tx
                                             |  ^                                        ^   |
                                        tx_go|  +------------- tx_rdy -------------------+---+
                                             v                                           |
                                        tx_start_ff --------------- tx_en ---------------+
                                                              baud_gen -- baud_en --> tx_fsm

- **`result_reg`** loads `wdata` while `pc == CAPTURE_PC` (default
  0x0020). `wdata` is meant to be wired to the register-file read port or
  to the ALU result. The program ends with a harmless marker instruction
  at that address, such as `addi R7, R7, 0`, which puts the result register
  on those buses. One clock after the first matching cycle, `result_reg`
  pulses `start`. A processor that halts on the marker therefore sends its
  word once. The register keeps reloading while the PC stays there.
- **`tx_sequencer`** copies the word on `start`. It then sends the four
  digits most significant first. For each digit it does this:
  1. pulse `tx_go`;
  2. wait for `tx_rdy = 0` (the frame has begun);
  3. wait for `tx_rdy = 1` (the stop bit is done).

  After the fourth digit it pulses `done`. The current digit stays on
  `digit` for the whole frame. A `start` while busy is ignored. A new value
  in `result_reg` does not disturb the word in flight.
- **`hex_ascii`** maps 0-9 to 30h-39h and 10-15 to 41h-46h (upper case).

A word takes 43 to 44 bit times, about 4.5-4.6 ms at 9600 baud. That is
up to one bit time of wait for the first start bit, then one 10-bit frame,
then three frames of 11 bit times (the idle bit between frames).

## Board test of the transmitter (`uart_switch_test`)

The eight switches give the character. `btn_send` goes through a mono
pulse generator (`mpg`) into `tx_start_ff`. `btn_rst` goes through a second
`mpg` and resets the baud generator, the flag and the FSM. It is ORed with
the global `rst`. One press sends one frame.

`mpg` is a simple debouncer:

- it samples the button every 2^`CNT_WIDTH` clocks (default 16 bits, about
  1.3 ms at 50 MHz);
- it delays the sample through two flip-flops;
- it outputs a one-clock pulse on the rising edge.

## Receiver (`uart_rx`)

The receiver runs on a tick of 16 times the baud rate. The tick is a
`baud_gen` with `TICK_DIV` = 325 at 50 MHz, so one bit is 5200 clocks. It
works like this:

1. The line passes a two-flip-flop synchronizer.
2. A low level starts a count of 8 ticks to the middle of the start bit.
   If the line is high again by then, the event is dropped as a glitch.
3. Each data bit is sampled 16 ticks later, in its middle, and shifted in
   LSB first.
4. The stop bit is sampled after 16 more ticks. `rx_valid` pulses with
   `rx_data`. `rx_ferr` is raised in the same cycle if the stop bit read 0.

The receiver's 5200-clock bit is 0.15 % off the transmitter's 5208. Mid-bit
sampling tolerates a few percent. The testbench checks ±3 %.

## Example state machine (`fsm_example`)

This is a teaching example of a state machine split into three parts: a
state register, a next-state function and an output function.

- Transitions: s1 goes to s2 when `x1 = 1` and to s3 when `x1 = 0`. s2 and
  s3 both go to s4, and s4 goes back to s1.
- Output: `outp` is 1 in s1 and s2 and 0 in s3 and s4.
- Reset: `reset` is asynchronous and active high and forces s1.

The machine is not connected to the serial logic.

## Top level (`lab11_top`)

The top places the four parts side by side on one clock:

- `mips_uart_tx`: ports `pc`, `wdata`, `tx`, `tx_rdy`, `tx_busy`,
  `tx_done`, `result`;
- `uart_switch_test`: ports `btn_send`, `btn_rst`, `sw`, `sw_tx`,
  `sw_tx_rdy`;
- `uart_rx`: ports `rx`, `rx_data`, `rx_valid`, `rx_ferr`;
- `fsm_example`: ports `fsm_reset`, `fsm_x1`, `fsm_outp`.

The processor is not part of this RTL. Connect its PC and its RD1/ALU-result
bus to `pc` and `wdata`. `tx` goes to the bridge's RX pin and `rx` comes
from its TX pin. The two transmitters are separate pins. On a board with
one serial port, use only one of them.

Top parameters: `DIVISOR` (5208), `RX_TICK_DIV` (325), `MPG_CNT_WIDTH`
(16), `CAPTURE_PC` (16'h0020). For another clock, change `CLK_HZ` in
`uart_pkg` or override the two divisors.

## Where this design makes its own choices

The following are not fixed by the laboratory description the design
follows. They were chosen here:

- synchronous active-high reset for all serial logic;
- the set/reset flag is cleared by `not tx_rdy`, and clear has priority;
- `tx_data` is held by the driver, not copied in `tx_fsm`;
- digits are sent most significant first, in upper case;
- `result_reg` pulses `start` only on arrival at the capture address;
- the whole receiver, apart from its 16x rate and mid-bit sampling;
- the MPG structure and counter width;
- the 50 MHz default clock (25 and 100 MHz are supported by parameter).

Not built:

- parity (even, odd, mark, space);
- 5-, 6- or 7-bit characters;
- 1.5 or 2 stop bits.

These exist in serial links generally, but the configuration used here is
fixed at 8N1.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.
`tb/uart_line_monitor.sv` is a testbench-only observer. It decodes an 8N1
line and flags any bit whose length is not exactly the expected number of
clocks.

| testbench | what it checks |
|-----------|----------------|
| `tb_baud_gen` | pulse period (7 and the default 5208), one-cycle width, restart on reset |
| `tb_tx_fsm` | all 10 bit levels of several bytes incl. 41h, frame = 10 bit times, back-to-back spacing = 11 bit times, idle behaviour, reset mid-frame |
| `tb_tx_start_ff` | full set/clear/reset truth table, hold |
| `tb_mpg` | one pulse per bouncing press, none on release, one-cycle width |
| `tb_hex_ascii` | all 16 codes |
| `tb_result_reg` | loads only at the capture PC, one start per arrival |
| `tb_tx_sequencer` | 4 requests per word, MSB first, pacing by `tx_rdy`, `done`, start ignored when busy |
| `tb_uart_rx` | random bytes at nominal and ±3 % bit times, back-to-back, framing error, glitch |
| `tb_fsm_example` | against a reference model, with asynchronous resets between edges |
| `tb_uart_switch_test` | one exact frame per press, reset button mid-frame |
| `tb_mips_uart_tx` | four ASCII digits per result, exact bit timing, 43-44 bit times per word |
| `tb_lab11_top` | whole design at default parameters (5208-clock bits, 16-bit MPG counters) |

`tb_lab11_top` runs all parts together. The `tx` line is looped back
into the receiver. The test requires each mechanism to occur at least
once:

- capture at the PC;
- a start ignored while busy;
- all eight transfers;
- `tx_en` held while waiting for a baud edge;
- letter digits;
- a switch frame;
- a reset mid-frame;
- received bytes;
- a framing error;
- a rejected glitch;
- both branches of the example machine.

It runs in about a second.

To simulate one testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb rtl/uart_pkg.sv \
        tb/tb_lab11_top.sv --top-module tb_lab11_top -Mdir obj -o sim && ./obj/sim

Replace the testbench name for the others. The smaller testbenches set
`DIVISOR`, `TICK_DIV` and `CNT_WIDTH` to small values so that they run
fast.

Limits: the processor is represented by a PC/data stand-in, and nothing here
was run on hardware.
