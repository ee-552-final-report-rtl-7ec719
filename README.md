# Driver's Ed: RC-car telemetry over a one-way radio link

A remote-controlled car carries four kinds of sensor: a two-axis accelerometer with PWM
outputs, an optical wheel encoder, four proximity detectors and a four-line Hall-effect
compass. A small programmable-logic device on the car samples them, packs one reading of each
into a 58-bit serial packet and sends it through an FSK radio module, one packet after
another with no gaps. At the base station a second device finds each packet in the received
bit stream and checks its security byte. It then unpacks the three data bytes, turns them into
acceleration, distance, velocity, heading and proximity warnings, and draws them as text on a
640 x 480 VGA monitor. A third, small device scans a 4 x 4 keypad and shows the last key on
the monitor and on a 7-segment pattern.

This repository holds synthesizable SystemVerilog for all three devices. Each block has a
self-checking testbench, and one testbench runs the whole system end to end at its real clock
rates. The radio modules, sensors, keypad switches and power parts are analog or bought-in
parts. They are not modelled as logic: their signals are ports of the top module.

## The packet

```
bit  0..15   preamble        1010 1010 1010 1010
    16..17   padding         11
    18..25   security byte   1000 1000
    26..27   padding         11
    28..35   acceleration    {axis (1 = y), 7-bit pulse count}
    36..37   padding         11
    38..45   encoder count   pulses since the last clear, 0..254
    46..47   padding         11
    48..55   sensors         {proximity F,L,R,B ; compass N,E,S,W}, both active low
    56..57   padding         11
```

- Bits go out MSB first.
- Each bit lasts 64 µs, which is 64 clocks of the car's 1 MHz oscillator. A packet therefore
  takes 3.712 ms.
- The base station makes its bit period by dividing 25.175 MHz by 1611, which gives 63.99 µs.
  The two ends differ by about 2 Hz, or 8 ns per bit. This drift is why the receiver
  re-aligns on every packet.
- A data byte of all ones (`0xFF`) means "no valid reading". Every consumer ignores it.
- The padding pairs keep the line from staying at one level for long, as the radio requires.
  They also give each side two bit times between bytes.

The layout is held in `driversed_pkg` (`PREAMBLE`, `SECURITY_CODE`, `PAD_BITS`,
`PACKET_BITS`, `ERROR_BYTE`), which both ends use.

## Car side (`rc_car_top`, 1 MHz)

Everything runs on the 1 MHz clock. The slower rates are clock enables made by
`car_clock_div`, a 6-bit counter:

- `bit_en` fires once every 64 clocks;
- `cnt_en` fires every second clock, giving 500 kHz.

**`accel_pwm_counter`** measures the high time of one accelerometer output at a time. A
two-way multiplexer chooses x or y, and the choice flips after every completed pulse. The
high time is counted at 500 kHz through a 5-bit prescaler, so the 7-bit result is the high
time divided by 32. At rest (a 50 % duty cycle on a 10 ms period) the result is about 78.
The count stops at 126, because 127 would look like an error to the base station. The result
byte `{axis, count}` is loaded into an output register, and `writing` is high during that
one clock.

**`encoder_counter`** counts rising encoder edges in 8 bits and stops at 254. Every read by
the data path advances a 4-bit read counter. On the 16th read the pulse counter restarts.
As a result, every 16th packet carries the pulses of a 16-packet (59.4 ms) window, and the
base station uses only that packet.

**`sensor_regs`** passes the proximity and compass lines through two register stages. This
removes glitches and synchronises them.

**`packet_encoder`** is a Moore machine with one state per packet field. A bit counter, an
8-bit shift register and a field multiplexer produce the serial line.

- On entering the padding pair before each data byte, it sends a one-clock request
  (`req_accel`, `req_enc`, `req_prox`) to the data path controller.
- The byte arrives well within the two padding bits. It is loaded into the shift register
  when its field starts.

**`datapath_ctrl`** is the four-way byte multiplexer between sensors and encoder. Its
inputs are the acceleration byte, the encoder count, the sensor nibbles and constant all-ones.

- Each request selects and registers one input.
- If the accelerometer is requested while its result register is being written, the
  controller enters its error state instead and sends `0xFF`.

The PWM measurement is not synchronised to the packet rate, so this collision does happen.
The end-to-end testbench provokes it on purpose.

**`led_flasher`** alternates the two halves of an 8-LED bank about every 0.26 s, which is
4096 bit periods. The original design only mentions an LED controller, so the pattern is
this design's own.

## Base side: finding and unpacking a packet (`base_station_top`, 25.175 MHz)

The receive path is a chain of small state machines. All of them advance on the bit enable
of `rx_bit_clock`.

1. **`rx_bit_clock`** synchronises `rf_rx` and divides by 1611. While the preamble detector
   is hunting, each data edge restarts the divider at half a bit. The sample point
   (`bit_en`, `rx_bit`) therefore sits in the middle of a bit. Once a packet is found the
   divider runs free. The drift over one packet is then about 460 ns, which is well inside
   the 32 µs margin.
2. **`preamble_fsm`** compares the last 14 received bits with `10101010101010`. The whole
   16-bit preamble is not needed, because hunting must have settled the sample point during
   its first bits. On a match it pulses `pkt_start` and stops searching. It resumes the
   search when the security check fails or the packet is complete.
3. **`security_check`** skips the 2 remaining preamble bits and the padding, then compares
   8 bits with `10001000`.
   - On a match it starts the decoder.
   - On a mismatch it sets `corrupted` and sends the preamble detector back to hunting.
   - `corrupted` stays high until the next preamble is found.

   A packet from another transmitter, or a damaged one, is therefore dropped as a whole.
4. **`data_decoder`** skips 2 padding bits and shifts in 8 data bits, three times, then skips
   the final padding and reports `done`. `shifting` is high while a byte is coming in.
5. **`demux_top`** watches `shifting`. Each time it falls, the byte in the shift register is
   complete. The byte stays there for only the two padding bits before the next one starts
   to shift in. `demux_top` copies it into the acceleration, distance or
   direction-proximity register, stepping through the states START, SECURITY, ACCEL,
   READ_ACCEL, TEMP1, DIS, READ_DIS, TEMP2, DIRPROX, READ_DIRPROX and TEMP3. One clock after
   each copy it pulses that register's write strobe.

## Base side: the arithmetic

| Unit | Input | Rule | Output |
|---|---|---|---|
| `accel_calc` | every x-axis byte | on every 15th valid x sample: a = 5·(T1 − 74) tenths of m/s² | sign, ones, tenths; saturates at 9.9 |
| `distance_calc` | every encoder byte | on every 16th byte: total += byte; cm = total / 8 | 3 BCD digits of cm, saturating at 999 |
| `velocity_calc` | the byte `distance_calc` used | v = 2·count cm/s | cm/s and m/s ones/tenths digits |
| `direction_calc` | every sensor byte | compass lines → N, NE, … NW; proximity bits inverted | heading enum, 4 warning bits |

- **Acceleration.** The accelerometer gives 50 % duty at rest in theory. The unit in the
  original build read 4.6 ms of high time at rest, which is a count of 74, so zero sits at 74.
  One count is 32 × 2 µs = 64 µs of a 10 ms period, which is 0.64 % duty. At 12.5 % duty per
  g, one count is 0.05 g, or about 0.5 m/s². Y samples and the value 127 are ignored.
- **Distance.** The encoder gives 128 pulses per turn of a 16 cm wheel, so 8 pulses are 1 cm.
  Keeping the running total in pulses means no fraction is lost.
- **Velocity.** The pulses in a window of 16 packets × 3.72 ms give
  (count / 8 cm) / 0.0595 s ≈ 2.1·count cm/s. This is rounded to 2·count.
- **Direction.** The compass pulls one line low for N, E, S or W, and two adjacent lines low
  for the diagonals. Any other pattern keeps the previous heading.

Every unit ignores `0xFF` and pulses an `updated` output when its result changes.

## Display (`vga_count_xy`, `vga_syncgen`, `vga_display`, `char_rom`)

- **`vga_count_xy`** steps through 800 × 525 pixel clocks. `vga_syncgen` makes the standard
  640 × 480 / 60 Hz syncs and the visible-area flag from these counts.
- **`vga_display`** divides the screen into 40 × 30 cells of 16 × 16 pixels. A glyph is
  8 × 8 pixels, each drawn 2 × 2.
  - The screen background is blue.
  - Static text comes from a constant table indexed by character row.
  - At fixed cells, the table entry is replaced by a digit, the heading name or the key.
  - Colours: text white, values yellow, an active proximity warning red.
  - The output is registered, and the syncs are delayed by the same one clock.
- **`char_rom`** holds 64 glyphs, for ASCII `0x20`–`0x5F`. Each glyph is 8 rows of 8 bits,
  the pixels of a 5 × 7 font in bits 6..2 of each row. The ROM is loaded from
  `rtl/char_set.hex` with `$readmemh`, which takes the path relative to the directory the
  simulator is started from.

Screen layout:

```
     DRIVER'S ED
ACCEL     -7.3 M/S2
VELOCITY   2.1 M/S
DISTANCE   4.08 M
HEADING   NE
PROXIMITY F L R B
KEY       A
```

## Keypad (`keypad_decoder`, `seg7_decoder`)

`keypad_decoder` is a Moore machine on a 1 ms scan tick (`SCAN_DIV` = 25175 clocks).

1. With all columns driven low, it waits for any row to go low.
2. It waits `DEBOUNCE_TICKS` (10) ticks, and gives up if the key has gone.
3. It drives one column low at a time until a row answers. The key is column × 4 + row.
4. It latches the key, pulses `key_valid` for one clock, and waits for all rows to return
   high.

The rows are pulled high by resistors outside. With `col_n[0]` wired to the column holding
keys 3, 2, 1, 0 (top to bottom) and `row_n[0]` to the bottom row, the codes match the legend
of a standard 0-F hex keypad laid out as F B 7 3 / E A 6 2 / D 9 5 1 / C 8 4 0.
`seg7_decoder` maps the 4-bit key to segments {g,f,e,d,c,b,a}, active high, with A–F
included.

## Top level

`driversed_top` holds `rc_car_top`, `base_station_top`, `keypad_decoder` and
`seg7_decoder`.

- The car and base sides have independent clocks and resets, as the real boards do.
- `rf_tx` and `rf_rx` are separate ports. Connect them outside, through a wire, a delay or a
  noisy channel.
- Besides the sensor, VGA and keypad pins, the top brings out the received raw bytes, their
  strobes, the numeric results and the update pulses, so the whole system can be observed.

## How far to trust it, and where it departs from the original

The original work describes an RC car, a base station and a keypad device. Block by block,
this RTL follows it in:

- the packet format;
- the clock ratios;
- the names and order of the demultiplexer states;
- the 14-bit preamble match;
- the security code;
- the 16-packet encoder window;
- the 15-sample acceleration counter;
- the unit conversions.

The following points are this design's own reading or choice:

- **Bit period.** The description gives both a 64 µs bit with a 3.712 ms packet and a
  7.8 kbit/s rate with a receive clock "at twice the data rate". Here one bit lasts 64 µs
  and is sampled once, in its middle.
- **Acceleration zero and update rate.** The printed formula and the text disagree on the
  zero point (78 versus 74). 74 is used. The update comes every 15 x samples, which is
  about 30 packets when the PWM period is near 10 ms. The result uses only that 15th
  sample, not an average.
- **Encoder saturation.** At the stated top speed of 20 km/h the encoder would give
  264 pulses per window. The 8-bit count saturates at 254, so distance and velocity read low
  above about 19 km/h. At the usual operating speed of 13 km/h (about 178 pulses) there is
  room.
- **Window alignment.** The car clears its encoder counter every 16 reads. The base station
  uses every 16th packet it accepts. Nothing in the packet marks the window, so the two stay
  in step only if the base station receives every packet from the car's first one on. To
  make that possible, the car holds `rf_tx` low during reset. A base station that is already
  running then sees an edge at the start of the first preamble bit. A base station started
  after the car, or one that rejects a packet, is out of step from then on. Its 16th packet
  then carries only the pulses since the car's last clear, so distance and velocity read
  low. For example, when the base station starts one packet late, the readings are 1/16 of
  the true values.
- **Error bytes.** A reading of `0xFF` is dropped. The previous acceleration, heading and
  warnings stay on screen.
- **Single clock per side.** The original used several derived clocks. Here each side has
  one clock and enables, and a two-flip-flop synchroniser on every asynchronous input.
- **Invented details.** The LED pattern, the screen layout, the font, the debounce numbers,
  the key code numbering and the saturation limits are this design's own choices.
- **Not built.** The feature list also names telemetry storage and a return link for
  movement instructions. Neither is described, and neither is built.

## Simulating

Every testbench is self-checking. It ends by printing
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. Run from the repository root, so
that `rtl/char_set.hex` is found:

```
verilator --binary --timing --assert -y rtl -y tb --timescale 1ns/1ps \
    rtl/driversed_pkg.sv tb/tb_<module>.sv --top-module tb_<module> -o sim
./obj_dir/sim
```

Block testbenches shorten slow dividers through parameters, for example `rx_bit_clock` with
`DIV` = 40 and `keypad_decoder` with a short scan tick. Each compares its block against
values worked out independently.

`tb_driversed_top` runs the complete system at its real clock rates and default parameters
for 280 ms of simulated time, which takes a few seconds. It sets up:

- the car at 1 MHz and the base at 25.175 MHz, with separate resets;
- an accelerometer model whose falling edge is swept across the packet encoder's read, so
  that collisions occur;
- an encoder, compass and proximity pattern that changes over the run;
- three key presses on a modelled keypad;
- a link that corrupts the security byte of every ninth packet.

It decodes each packet on `rf_tx` and checks it against the sensor inputs. Each packet the
base station accepts must match one that was sent. Acceleration, velocity, heading, warnings
and keys are checked against the received bytes. At the end it counts each mechanism:

- packets sent and accepted;
- security rejections;
- car error bytes;
- encoder clears;
- distance, velocity, acceleration and heading updates;
- proximity warnings;
- key presses;
- VGA frames;
- LED changes.

Any mechanism that never happened counts as a failure.

`tb_driversed_workloads` drives the same full-size system with sensor rates worked out from
physical quantities. It starts the base station first, so that the 16-packet windows line
up. It runs three cases and takes about 2.5 s of simulated time:

1. **Straight run.** 2 m at 1 m/s, which is 800 encoder pulses/s. The displayed distance
   must reach 2.00 m, give or take one window, and the velocity must be within 7 cm/s of
   100 cm/s.
2. **Tilt.** An accelerometer at rest (count 74), then tilted by 1 g (count 93). The display
   must show 0.0 m/s², then 9.5 m/s².
3. **Top speed.** The car's stated top speed of 20 km/h. Here the 8-bit encoder count
   saturates, and the velocity reads 5.0 m/s instead of 5.6 m/s.
