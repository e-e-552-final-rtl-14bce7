# Text message centre

A small store-and-replay message terminal for an FPGA. Text typed on a PC
keyboard is compressed from 8 bits to 5 or 10 bits per character and kept in
one on-chip RAM of 1024 five-bit words. Up to eight messages of up to 50
characters each can be stored. Any stored message can be called up again: it
is decompressed and written to a two-line character LCD. Messages cannot be
deleted; once eight are stored, new ones are discarded until reset.

The design is a chain of five blocks on one system clock:

```
PS/2 keyboard ─► keypush ─► compression ─► msgcounter ─► tmc_ram
                 (key,        (encoder +     (message and
                  keyascii)    function       address
                               decoder)       counters)
                                                 │
LCD pins ◄─ lcd ◄──────────── decompression ◄────┘
           (counter_lcd,
            lcd_driver)
```

## Operating it

| Key / input        | Effect                                                            |
|--------------------|-------------------------------------------------------------------|
| `a`-`z`, `0`-`9`, space, `,`, `.` | appended to the message being typed (at most 50; the rest is dropped) |
| Enter              | closes the message and stores it in the next free slot (an empty message is ignored) |
| Shift, or the Select button | arms a read; the next key chooses what to show      |
| then `0`-`7`       | clears the LCD and shows message 0-7 (if that slot is not used yet, `rd_miss` pulses) |
| then any other key | cancels the read; the key is not stored                           |
| any other key      | ignored                                                           |

A key counts when it is released, so holding a key down (typematic repeat)
still gives one character.

## The 5-bit code

Every stored word is 5 bits. Bit 4 tells the two groups apart:

* **Compressed group, `1iiii`.** The 16 characters of a fixed table are sent
  as one word, `iiii` being the table index. The table (in `tmc_pkg`):

  | index | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 | 14 | 15 |
  |-------|---|---|---|---|---|---|---|---|---|---|----|----|----|----|----|----|
  | char  | a | e | i | o | u | r | s | t | n | l | h  | d  | c  | m  | space | . |

  Only `a` = 0 and `r` = 5 are fixed by the original design's worked examples
  (`a` → `10000`, `10101` → `r`). The other entries are this design's
  choice of frequent English characters. Edit both functions in `tmc_pkg`
  to change the table.
* **Normal group, `0hhhh 0llll`.** Any other character is sent as two words:
  high nibble first, then low nibble. Example: `0x23` → `00010`, `00011`;
  and `01111`, `00001` → `0xF1`.

So a character costs 5 or 10 bits against 8. On ordinary lower-case English
the ratio is about 67-74 % with this table. The original design reported
72.9-89.6 % for its own (unpublished) table. A message of 50 characters takes
at most 100 words.

## Message memory

`tmc_ram` is a single-port 1024 × 5 RAM. Address, data and write enable are
registered, and the read data comes one clock later. `msgcounter` splits it
into eight slots of 128 addresses. Message *m* occupies addresses
`m·128 … m·128 + length − 1`, and at most 100 of them are used. Inside
`msgcounter`:

* a **message counter** (`msg_count`, 0-8) names the slot being filled;
* an **address counter** counts words written into that slot;
* a **length table** (8 entries of 7 bits) records each closed message's
  word count, so a replay knows where to stop.

Enter copies the address counter into the length table and advances the
message counter. After eight messages `full` is set. From then on words and
Enters are still accepted (so nothing upstream stalls) but thrown away.

## Hand-shakes: keyboard speed against logic speed

This is the least obvious part of the design. The keyboard and the LCD work on
millisecond time scales, the logic on nanoseconds. The blocks are joined by
hand-shakes that let either side wait as long as it needs.

**Keyboard → compression.** `keypush` gives each key stroke as a long pulse
(`key_valid` high for `KEY_HOLD` = 1024 clocks), as a keyboard-clocked
circuit would. `compression` latches the character while the pulse is high
and does nothing with it until the pulse has **ended**. This way one long
pulse is never taken as several characters.

**Compression → memory (memory is master).** `msgcounter` drives `wr_ready`
high only when idle. `compression` puts a word on `dout` with `dout_valid`
and holds it. The word moves on the first clock where `wr_ready` is also high.
The memory then spends one clock writing (ready low), so the second word of a
normal-group character always waits one clock. Enter and read commands
(`end_msg`, `rd_req`) are one-clock pulses, issued only while `wr_ready` is
high, so they never overtake a word.

**Memory → decompression.** On a read, `msgcounter` pulses `rd_start`.
It then offers the slot's words one by one (`rd_valid`, `rd_last` on the final
one), each moving on a clock where the engine's `word_ready` is high.
Each word costs two clocks because of the RAM's read latency.

**Decompression → LCD (hold until taken).** `decompression` first sends a
clear request, then each character. It holds `lcd_valid` until the display
drops `ready`, which means the display has taken the byte. It then waits for
`ready` to come back before it asks for the next word. After the last
character it pulses `done` (`msg_shown` at the top).

## LCD controller

`lcd_driver` drives an HD44780-compatible display over an 8-bit bus. It
steps on a tick from `counter_lcd`, one tick every `LCD_DIV` clocks. The
default of 1510 clocks gives about 60 µs per tick at a 25.175 MHz clock.
Set `LCD_DIV` to 60 µs × your clock frequency. Start-up, in ticks:

| phase          | bus   | ticks |
|----------------|-------|-------|
| power-up wait  | 0x38 (function set: 8-bit, 2 lines), enable pulse at the end | 400 (≈ 24 ms) |
| entry mode     | 0x06  | 2     |
| display on     | 0x0E  | 2     |
| clear          | 0x01  | 30    |
| address set    | 0x80  | 2     |

The tick counts are the ones measured on the original controller. After
start-up `ready` rises. A character takes 2 ticks (RS = 1). The controller
counts the cursor on a 16 × 2 screen (`LCD_COLS`):

* after 16 characters it sets the address to 0xC0 (line two);
* after 32 it clears the screen and homes the cursor.

A clear request runs clear plus address set. Offers are taken only on a tick,
so the enable pulse always lasts a full tick. RW is tied low.

## Top-level ports (`tmc`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst` | in | system clock; synchronous active-high reset |
| `ps2_clk`, `ps2_data` | in | keyboard clock and data (synchronised inside) |
| `select_btn` | in | read button; one read command per rising edge, no debouncing |
| `lcd_data[7:0]`, `lcd_en`, `lcd_rs`, `lcd_rw` | out | LCD bus |
| `msg_count`, `full` | out | messages stored; all slots used |
| `key_code` | out | scancode of the last key stroke |
| `read_armed` | out | a read is waiting for its digit |
| `rd_miss`, `msg_shown` | out | pulses: requested slot empty; message displayed |

Parameters (defaults): `KEY_HOLD` 1024, `KEY_TIMEOUT` 25000 (PS/2 receiver
drops a half frame after this many idle clocks), `MAX_CHARS` 50, `MSGS` 8,
`DEPTH` 1024, `LCD_DIV` 1510, `LCD_COLS` 16. `MSGS` and `DEPTH` should be
powers of two, with `DEPTH / MSGS ≥ 2 · MAX_CHARS`.

## Files

`rtl/` holds one unit per file:

* `tmc_pkg` — the code table and function codes;
* `lcd_pkg` — LCD command bytes and tick counts;
* `key` — PS/2 frame receiver, checks start, parity and stop;
* `keyascii` — set-2 scancode → ASCII;
* `keypush` — release (F0) decoding and the long key pulse;
* `compression`, `decompression`, `msgcounter`, `tmc_ram`, `counter_lcd`,
  `lcd_driver`, `lcd`, `tmc`.

`tb/` holds a self-checking testbench `tb_<module>` for every module. It also has
`lcd_model`, a behavioural LCD used by the display tests, and two workload
tests:

* `tb_tmc_capacity` fills all eight slots with worst-case 50-character
  messages (800 words) and reads them all back.
* `tb_compression_ratio` measures the compression ratio on sample sentences.

`tb_codec_chain` tests the store-and-replay core without keyboard and display:
compression, `msgcounter`, RAM and decompression, fed with ASCII directly.

`tb_tmc` runs the whole design at default parameters. It stores nine
messages, reads four, and checks that every mechanism above occurs at least
once. Each testbench prints `TB_RESULT checks=N failures=M`.

Simulating, for example the end-to-end test:

```
verilator --binary --timing -Wno-fatal --top-module tb_tmc \
    -y rtl -y tb +libext+.sv rtl/tmc_pkg.sv rtl/lcd_pkg.sv tb/tb_tmc.sv
./obj_dir/Vtb_tmc
```

Every test runs in seconds.

## How far this follows the original design

Taken from the original design:

* the block split;
* the 5-bit code with its flag bit and high-nibble-first split, with `a`
  and `r` at indices 0 and 5;
* 8 messages × 50 characters in 1024 five-bit words;
* release-code key handling;
* the memory-led input hand-shake, with compression starting only after the
  key pulse ends;
* hold-until-ready-low output to the LCD, with a clear at the start of each
  read;
* the LCD command bytes and tick counts.

This design's own choices:

* 14 of the 16 table entries;
* Enter as CR and Shift as code 0x0E, and the digit `0`-`7` message numbers
  with the cancel rule;
* the Select button arming a read rather than reading on its own;
* the length table, the discard-when-full rule and ignoring empty messages;
* PS/2 parity check and idle time-out;
* one clock domain with clock enables instead of separate slow clocks;
* the RAM's one-clock read latency;
* the enable-pulse placement and the line-two step on the LCD;
* the key pulse length, the 25.175 MHz clock behind `LCD_DIV`, and the extra
  status ports.

Not built:

* the radio link that was to carry messages from a remote keyboard (the
  keyboard connects directly);
* message deletion, which the original design also lacked.

The original implementation met 16.4 MHz on its FPGA. This RTL has not been
timed on a device.
