# Remote alert unit: serial ID decoder

An item finder has two parts. A base unit with a keypad and a character
display lets the user pick an item, such as keys or a phone. It then sends
that item's ID byte over a 433 MHz radio link. Each item carries a small
remote unit. The remote's receiver turns the radio signal back into a logic
level. A small decoder in programmable logic watches that level for its own
ID. When the ID arrives, it latches an alert and drives a speaker with a
square wave. The alert stays on until the base unit sends an "off" code.

This repository holds that decoder, written in synthesizable SystemVerilog.
The base unit is an existing 8051-family microcontroller board running
software, so it has no RTL here. The testbench contains a behavioural model
of its transmitter.

## What the base unit sends

The base unit's serial channel sends standard asynchronous frames. Each
frame is:

- one start bit (low)
- 8 data bits, least significant bit first
- no parity bit
- one stop bit (high)

The bit rate is 1800 bit/s. One alert writes the selected ID byte into the
transmitter 20 times, as fast as the transmitter takes it. The 20 frames
therefore follow each other with no idle time between them.

The decoder's defaults follow the original design:

| What | Value | Meaning |
|------|-------|---------|
| ID code | `000000001` | byte 0x00 followed by its stop bit |
| off code | `100000001` | byte 0x01 followed by its stop bit (this design's choice, see below) |

## Structure

```
            +--------------+  slow_tick (1 per 16 clk)
 clk ------>| slow_clk_gen |---------------+-------------------+
            +--------------+               |                   |
                                           v                   v
 rin --+-->[start_bit_latch]--start_bit_n-->[uart_ctrl]   [id_shift_reg]--q--+
       |          ^                          |    |              ^           |
       |          +----------clr_n-----------+    |check_compare |           v
       +------------------------------------------|--------------+    [id_compare_latch]
       +------------------------------------------+  (enable)              |
                                                                      alert
                                                                        v
                                                               [ttl_tone_gen]--> ttl_out
```

| Module | Job |
|--------|-----|
| `remote_pkg` | Shared widths, counter presets and the default codes. |
| `slow_clk_gen` | A 4-bit counter. It gives the divided clock level and a one-cycle `slow_tick` once per bit time. |
| `start_bit_latch` | A flag that goes low when `rin` goes low. `uart_ctrl` releases it. |
| `uart_ctrl` | Checks the start bit, times nine bit periods, reads the stop bit and opens the compare window. |
| `id_shift_reg` | A 9-bit register that shifts `rin` in on every slow tick while `enable` is high. |
| `id_compare_latch` | Sets the alert on the ID code and clears it on the off code, but only inside the compare window. |
| `ttl_tone_gen` | A 2-bit counter that runs while the alert is set. Its bits drive the speaker. |
| `remote_decoder` | The top level. |

`clk` must run at 16 times the bit rate. For the base unit's 1800 bit/s,
that is 28.8 kHz.

## How a frame is recognised

This is the least obvious part of the design. The data bits are **not**
sampled by the frame timer. Two independent mechanisms run side by side, and
a frame is recognised only where they meet.

**1. The frame timer (`start_bit_latch` and `uart_ctrl`)** works on the fast
clock. Let S be the first clock edge that sees the line low.

- The start-bit latch drops on edge S.
- `test_start` then counts from 8 to 15. This takes half a bit time.
- At the end of the count, `uart_ctrl` reads the line again:
  - If the line is still low, the start bit is accepted. This happens on edge
    S+8, or S+9 for the first frame after reset.
  - If the line is high again, the start is rejected. `clr_n` pulses,
    `start_reject` pulses, and the latch is released.
- After acceptance, `sampler` counts clock cycles.
- Every 16 cycles, `bit_counter` advances. It starts at 6, so it reaches 15
  nine bit times later. That point is the middle of the stop bit.
- At that point the line is read once more:
  - If it is high, `check_compare` goes high and `frame_good` pulses.
  - If it is low, `frame_error` pulses.
- Either way, `clr_n` releases the start-bit latch one edge later. This is
  seven clocks before the next frame's start edge can arrive, so frames sent
  with no gap are all timed.

**2. The shift register (`id_shift_reg`)** shifts `rin` in once per bit
time, on the slow tick. It runs freely and is not aligned to frames. A tick
falls somewhere inside every bit. On the tick that samples a stop bit, the
register ends up holding the 8 data bits in the order they were sent, then
the stop bit.

**3. The compare (`id_compare_latch`)** also acts on the slow tick. It sees
the register as it was before that tick's shift. So it sees
`{data bits, stop bit}` on the tick *after* the stop bit was shifted in.
That tick lies between 8 and 23 clocks after the middle of the stop bit.

`check_compare` rises at the middle of the stop bit, before that tick. This
is what makes recognition work for every alignment of the frame to the slow
tick.

**The window closes late and unevenly.** `check_compare` does not fall at the
end of the frame. It falls only when the *next* frame's `sampler` reaches 4,
four edges after that frame's start bit is accepted. If the next frame
follows immediately, this can happen before the compare tick. In simulation
this happens for 4 of the 16 possible alignments. That frame is then
ignored.

The base unit sends the same ID 20 times in a row. The last frame of a burst
has no follower, so its window always stays open and the burst always takes
effect. The end-to-end testbench sweeps all 16 alignments and shows both
outcomes.

**Aliasing.** One tick earlier, while the window may already be open, the
register holds the start bit followed by the 8 data bits. With the default
ID code, this matches the byte 0x80 for some alignments. Do not give 0x80 to
a second unit in a system that uses 0x00.

Once the alert latch is set, `ttl_tone_gen` counts on every clock.
`ttl_out[1]` is a square wave at clk/4, and `ttl_out[0]` is one at clk/2.
When the alert clears, the counter stops where it is.

## Ports of `remote_decoder`

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | 16 x bit rate |
| `rst_n` | in | 1 | asynchronous, active low |
| `rin` | in | 1 | receiver data, idle high |
| `enable` | in | 1 | shift register enable |
| `ttl_out` | out | 2 | speaker drive |
| `q` | out | 9 | shift register contents |
| `alert` | out | 1 | alert latch |
| `start_reject`, `frame_good`, `frame_error` | out | 1 | one-cycle status pulses |
| `sampling` | out | 1 | high while a frame is timed |

Parameters are `ON_CODE` and `OFF_CODE`, both 9 bits. The rest of the timing
is fixed by the 4-bit counters (16x oversampling) and by `remote_pkg`.

## Where this RTL departs from the original design, and why

- **One clock domain.** The original clocks the shift register and compare
  latch from the counter's top bit. Here they run on the fast clock and are
  enabled by `slow_tick`. `slow_tick` is high in the cycle at whose end the
  divided clock would rise. Inputs are therefore sampled up to one fast clock
  earlier than with a derived clock.
- **Off code.** The off-code value `100000001` is this design's own choice.
  No well-formed frame can produce it at a tick where the ID code could also
  match.
- **Bit counter preset.** The original code presets the bit counter to 6,
  but a comment beside it says 5. The RTL uses 6. With 6, the stop bit is
  read at its middle for 8-data-bit frames; with 5 it would be read a bit
  late.
- **Clock rate.** The original decoder's clock is labelled 2 kHz. With 16
  clocks per bit, that is 125 bit/s, but the base unit sends at 1800 bit/s.
  This RTL makes no assumption about frequency. Run `clk` at 16x the link
  rate.
- **Status outputs.** `start_reject`, `frame_good`, `frame_error` and
  `sampling` were added for observation. The original has only the tone
  output and the register.
- **Second reset removed.** A second, user reset input was already removed
  from the original. It is not present here.
- **No input synchroniser.** Like the original, there is none on `rin`. In a
  real part, put two flip-flops in front of `rin` if the receiver output is
  not synchronous to `clk`. Doing so delays all event times by two cycles.

## Parts of the system that are not RTL

These parts have no RTL here:

- the microcontroller board and its software (menu, keypad scan, display
  driver)
- the dual UART
- the character display
- the keypad
- the 433 MHz transceiver
- the programmable-logic device that holds the decoder
- the speaker

They are bought-in parts or software. `tb/duart_tx_model.sv` models what the
decoder sees from them: 8N1 frames at 16 clocks per bit, sent in bursts with
no gaps.

## Verification

Every module has a self-checking testbench, `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog.

- **`tb_uart_ctrl`** drives frames and checks the exact edge of each event:
  - acceptance at S+8 (S+9 after reset)
  - stop-bit read 144 edges later
  - window close four edges after the next acceptance
  - glitch rejection
  - framing error
- **`tb_remote_decoder`** runs the whole decoder at its default parameters.
  It predicts the alert state from the timing rules above, not from the RTL,
  and covers:
  - isolated ID and off frames
  - a glitch and a framing error
  - the 16-alignment sweep
  - shift enable held low
  - 150 random frames with random gaps
  - two 20-frame bursts from the transmitter model

  It fails unless every mechanism (good frame, rejected start, framing
  error, alert set and clear, lost window, tone, enable hold, burst) has
  happened at least once.

- **`tb_eight_remotes`** puts eight decoders on one link. That is the
  number of remotes the system is specified for. Each decoder has its own
  ID, and all share the off code. The test checks that every 20-frame burst
  raises only the addressed unit's alert, and that the off burst silences
  all of them.

**Choosing IDs for several units.** Give every unit an ID byte whose least
significant bit is 1 and whose most significant bit is 0. The test uses
0x03, 0x05, ... 0x11. The first bit of such an ID is sent right after the
start bit, and that bit is 1. Its last data bit, just before the stop bit,
is 0. So neither the start bit plus a frame's data nor a frame's tail plus
idle line can look like another unit's code at any tick alignment.

Building and running with Verilator, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_remote_decoder \
    rtl/remote_pkg.sv rtl/*.sv tb/duart_tx_model.sv tb/tb_remote_decoder.sv
./obj_dir/Vtb_remote_decoder
```

For a single block, list `rtl/remote_pkg.sv`, the block's file and its
testbench. Lint with `verilator --lint-only -Wall -Irtl rtl/remote_pkg.sv
rtl/remote_decoder.sv`.

The concurrent assertions in `uart_ctrl` use `disable iff (!rst_n)`. Because
of that, Verilator reports that `rst_n` is used both synchronously and
asynchronously. The flip-flops themselves all use the asynchronous reset.
