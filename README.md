# Binary keyboard: five switches, one chord per character

A one-handed keyboard with one switch under each finger. A character is
typed as a *chord*: the switches pressed together form a five-bit binary
number, thumb as the most significant bit and little finger as the least.
The character is taken when every switch has been released again. The
all-released state is therefore the "end of character" marker, and the other
31 codes carry the 26 upper-case letters and five commands. The logic shows
each character on a VGA monitor, under a title line. It also sends the
character to a host over PS/2, exactly as an ordinary keyboard would.

The design is written in synthesizable SystemVerilog for a single 25 MHz
clock. It follows a student FPGA design (an EE 552 project by a group
calling itself DATAD). Where that design was silent, the choices made here
are listed under "Own choices and departures" below.

## The binary alphabet

| code (T I M R L) | character | ASCII | PS/2 make code |
|---|---|---|---|
| 00000 | end of character | – | – |
| 00001 … 11010 (1–26) | A … Z | 41h … 5Ah (40h + code) | set-2 code of the letter |
| 11011 | space | 20h | 29h |
| 11100 | backspace | 08h | 66h |
| 11101 | `.` | 2Eh | 49h |
| 11110 | `,` | 2Ch | 41h |
| 11111 | carriage return | 0Dh | 5Ah (Enter) |

T = thumb, I = index, M = middle, R = ring, L = little finger.

## Taking a chord: the data handling stage

`data_control` is the hard part of the design. It must turn five switches
into one clean code, although the switches bounce and the fingers never
press or release them all at the same moment. It does this by collecting
keys in a set-only flip-flop and acting only on the "all keys released"
edge.

```
 key_n[4:0] ─► debouncer ×5 ─► invert ─► pressed[4:0] ──────────┐
                                   │                            ▼
                                   └─► NOR ─► debouncer ─► nor_db   SR flip-flop (set = pressed)
                                                 │                  │      ▲ clr
                         ┌───────────────────────┼──────────────────┼──────┘
                         │                       │                  ▼
                   delay D2 (50)         load control (25) ──► 5-bit register ─► code
                                                 │                  │
                                              +1 clk ─► ASCII decoder ─► ascii
                                                 │
                                              +1 clk ─► vga_en
                     delay 2 ─► load control (3000) ─► ps2_en
```

* **Debouncers.** Each switch line and the NOR output pass through a D
  flip-flop that takes a new sample only once per millisecond (25,000
  clocks). Bounce shorter than that is never seen twice.
* **NOR gate.** Its output is high while no key is down. It drops as soon
  as any key is pressed. It rises again only after the *last* key is
  released, however the fingers are staggered.
* **SR flip-flop.** Each pressed line sets its bit, and the bit stays set
  after the key is let go. So the flip-flop ends up holding every key that
  was down at any time during the chord.
* **Load control.** The rising NOR edge becomes a pulse of fixed length,
  formed as `in XOR (in AND delayed(in))`. This pulse loads the flip-flop
  into the five-bit register.
* **Delay D2.** The rising NOR edge also clears the SR flip-flop, through a
  delay of D2 clocks. D2 is longer than the load pulse, so the register
  already holds the code when the flip-flop is cleared for the next chord.
  The register keeps the code until the next chord is loaded.
* **Enables.** The ASCII decoder is enabled one clock after the load pulse
  and keeps its output until the next enable. The VGA enable comes one
  clock after that. The PS/2 enable is a second load-control pulse,
  3000 clocks long (three periods of 25 kHz). It is taken from the NOR
  output delayed by two clocks, so it rises only after the register holds
  the new code.

Timeline for one chord, with the default parameters, counted from the moment
the last key settles in the released position:

| when | what |
|---|---|
| ≤ 1 ms | switch debouncer sees the release; NOR output rises |
| ≤ 2 ms | NOR debouncer passes it: `reg_load` high for 25 clocks |
| +1 clock | register holds the code; decoder enabled |
| +2 clocks | ASCII valid; `vga_en` rises; `ps2_en` rises for 3000 clocks |
| +50 clocks | D2 clears the SR flip-flop (the load pulse ended at +25) |

At power-up the NOR output is already high, so one load of the empty code 0
happens. Both output paths ignore it.

## PS/2 output

`ps2_transmitter` joins four parts:

* `ps2_make_decoder` looks up the make code of the register's code.
* `scan_code_gen` waits for a rising edge of `ps2_en` and then offers three
  bytes in turn: make code, `F0`, make code. This is a key press followed
  by its release. The generator ignores its input at any other time.
* `ps2_tx_controller` makes the PS/2 clock: 1000 system clocks high, then
  1000 low, which gives 12.5 kHz.
* `ps2_shift_register` holds the 11-bit frame: start 0, eight data bits
  (LSB first), odd parity, stop 1. Each bit goes on the data line while the
  clock is high, and the host samples it on the falling edge.

After each frame the clock rests high for two periods. One byte takes
26,000 clocks (1.04 ms), so one character takes about 3.1 ms. The lines are
driven outputs only: host-to-device commands are not supported, and neither
is the host holding the clock low to inhibit the keyboard.

## VGA output

`char_display` drives a 640×480, 60 Hz picture from the 25 MHz clock.
`vga_sync` makes the standard 800×525 timing with active-low syncs. The
screen is a grid of 8×8-pixel character cells:

* Row 2, from column 2: the title "DATAD BINARY KEYBOARD" (`title_rom`),
  drawn in yellow.
* Rows 5–8: a text buffer of 4 × 80 characters, drawn in white.

A character is written only on the *rising edge* of the enable, so a long
enable pulse still writes once. Letters, space, `.` and `,` are stored at
the cursor, and the cursor advances. Backspace moves the cursor back and
blanks that cell. Carriage return moves the cursor to the start of the next
line. The cursor wraps from the last cell to the first. After reset the
buffer is cleared to spaces, one cell per clock (320 clocks).

The drawing pipeline has three stages, and the syncs are delayed by the same
three clocks:

1. choose the character under the beam (title ROM or text buffer);
2. read its pixel row from `char_rom`, a synchronous ROM of 128 × 8 rows
   addressed by `{ASCII, row}`;
3. select the pixel and register the colours.

Glyphs are 5×7 patterns in columns 1–5 and rows 0–6 of their cells. They
are written in `char_rom.sv` as a case table: one 56-bit constant per
character, holding seven row bytes with the top row first and bit 7 of each
byte as the leftmost pixel. Because the ROM is a constant function of its
address, it synthesises without an initialisation file. Glyphs exist for
A–Z, `.` and `,`. Every other code is blank. The testbenches check the
picture against a separate copy of the same font, `tb/font8x8.hex`, in
which line `8·code + row` holds one pixel row.

## Parameters of the top (`binary_keyboard`)

| parameter | default | meaning |
|---|---|---|
| `DEBOUNCE_CYCLES` | 25000 | sample period of every debouncer (1 ms) |
| `LOAD_CYCLES` | 25 | register-load and VGA-enable pulse length |
| `D2_CYCLES` | 50 | delay from NOR rise to the SR flip-flop clear; must exceed `LOAD_CYCLES` (checked by an assertion) |
| `PS2_EN_CYCLES` | 3000 | PS/2 enable pulse length |
| `PS2_HALF_CYCLES` | 1000 | half period of the PS/2 clock |
| `PS2_GAP_HALVES` | 4 | idle half periods after each PS/2 frame |

The text-area size and placement are parameters of `char_display`. The VGA
timing is a set of parameters of `vga_sync`.

Ports: `clk`, `reset_n` (active low); `thumb_n`, `index_n`, `middle_n`,
`ring_n` and `little_n` (active low, one per switch: the switch closes to
ground against a pull-up); `vga_red`, `vga_green`, `vga_blue`, `vga_h_sync`
and `vga_v_sync`; `ps2_clk` and `ps2_data`.

## Own choices and departures

These points follow the source design:

* the binary alphabet;
* the 1 ms sampling debouncer;
* the NOR / SR flip-flop / register / delay-D2 structure;
* the AND-XOR load control;
* the roughly 3 × 40 µs PS/2 enable;
* the make, F0, make sequence and the 11-bit odd-parity frame;
* a title shown above the typed text;
* one VGA write per enable event.

These are choices made here:

* **Sizes and delays.** The load pulse (25 clocks) and D2 (50 clocks) are
  assumed: the source only says D2 takes "microseconds".
* **Load-control delay.** The delay element inside load control is a
  saturating counter, not a chain of flip-flops.
* **Synchroniser.** A two-flop synchroniser sits in front of each
  debouncer.
* **Scan codes.** The make codes other than `A = 1Ch` are the standard
  scan code set 2.
* **PS/2 timing.** The clock timing and the gap between frames are assumed.
  So is the rule that an enable arriving while a character is still being
  sent is ignored. A character takes about 3.1 ms to send, and the
  debouncers already hold each chord back by up to 2 ms. So only a chord
  completed within about 3 ms of the previous one is dropped.
* **VGA.** The VGA mode, screen layout, colours, font, title text, buffer
  size and cursor rules (carriage return, wrap) are all assumed.
* **Carriage return is built.** The source lists carriage return in its
  alphabet but left it out of its prototype. Here it works on both outputs.
* **Not built:**
  * the caps-lock toggle switch (not connected in the source either);
  * the separate "alphabet" ROM of the source's VGA driver, whose role the
    character ROM and the backspace rule fill here;
  * PS/2 host-to-device traffic.

## Simulating

Every module has a self-checking testbench `tb/<module>_tb.sv`, which ends
by printing `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/bk_pkg.sv \
    tb/binary_keyboard_tb.sv --top-module binary_keyboard_tb -o sim
./obj_dir/sim
```

Run from the folder that holds `rtl/` and `tb/`: the VGA testbenches read
`tb/font8x8.hex` by that relative path. Add `-Wno-fatal` if your
verilator stops on lint warnings.

* `binary_keyboard_tb` runs the whole keyboard with short debounce and PS/2
  periods. It types about 60 characters on the switches, among them all
  31 codes of the alphabet, backspace and carriage return included. They
  are played as chords with staggered key presses and releases and with
  contact bounce. A PS/2 host model (`tb/ps2_host_model.sv`) checks every
  byte and frame. A VGA model (`tb/vga_capture.sv`) rebuilds the picture
  from the sync and colour lines, and every title and text cell is compared
  with the font. The testbench also counts register loads, latch clears,
  VGA writes, PS/2 frames, filtered bounces, multi-key chords, backspaces
  and carriage returns, and fails if any of them never happened.
* `binary_keyboard_full_tb` does the same with every parameter at its
  default (25 MHz, 1 ms debounce, 12.5 kHz PS/2) for five characters. It
  takes about 10 s.
* Both share `tb/kb_tb_body.svh`.

## Files

* `rtl/bk_pkg.sv`: shared types and the PS/2 frame and parity functions.
* Data handling: `debouncer`, `key_nor`, `key_latch`, `delay_line`,
  `load_control`, `data_register`, `ascii_decoder`, `data_control`.
* PS/2: `ps2_make_decoder`, `scan_code_gen`, `ps2_shift_register`,
  `ps2_tx_controller`, `ps2_transmitter`.
* VGA: `vga_sync`, `char_rom`, `title_rom`,
  `char_display`.
* Top: `binary_keyboard`.
