# AES-128 encrypted video player: decryption core, SD card reader and VGA frame buffer

A stream of grayscale pictures is stored on an SD card, encrypted with
AES-128. A small soft processor pulls the encrypted bytes off the card,
pushes them 128 bits at a time through a hardware AES decryption core, and
writes the plaintext into an external SRAM. A VGA raster shows that SRAM as a
320x240 picture in the top-left quarter of a 640x480 screen. The processor
only moves data. The three pieces of hardware it talks to are in this
repository:

* an **iterative AES-128 decryption core** that does one round per clock,
  with its key expansion and key table,
* an **SD card reader** that speaks the card's SPI mode and buffers one
  512-byte block,
* a **VGA / SRAM controller** that shares the single-port SRAM between the
  raster and the processor.

The main idea is that the hardware is kept simple and the timing decisions
are left to the processor. The SRAM has one port, so the raster owns it by
default. The processor asks the raster whether the beam is outside the
picture (`safe`), takes the SRAM for a short burst of writes, and hands it
back. While the processor holds the SRAM, the raster keeps showing the last
word it fetched.

All RTL is synthesizable SystemVerilog in `rtl/`, one module or package per
file. Self-checking testbenches and simulation models are in `tb/`.

## The processor bus (`aes_video_top`)

`aes_video_top` puts the three peripherals on one Avalon-MM style slave
port. The port uses word addresses, 32-bit data and registered read data
(one clock of read latency). Address bits [22:21] select the peripheral:

| bits 22:21 | peripheral | local address | data |
|---|---|---|---|
| 00 | VGA / SRAM (`vga_sram_controller`) | [20:0] | [15:0], `byteenable[1:0]` |
| 01 | SD reader (`spi_sd_controller`) | [7:0] | 32 bits |
| 10 | AES core (`aes_avalon`) | [2:0] | 32 bits |
| 11 | none, reads 0 | | |

The processor itself, its system bus, SDRAM, keyboard and LCD are not part
of this RTL. Two top-level outputs have no logic behind them:
`sram_dq_o` passes the bus write data straight through, and `vga_sync_n` is
tied low. The top also brings out the AES `eoc` flag.

## AES decryption core

### Data layout

A 128-bit block is held **row-major**: bits [127:96] are row 0, and byte
(r,c) of the AES state is `state[127-8*(4r+c) -: 8]`. This is the order in
which the processor writes the state, one 32-bit row per bus word. The FIPS
key `2b7e1516 28aed2a6 abf71588 09cf4f3c` is therefore written as the rows
`2b28ab09 7eaef7cf 15d2154f 16a6883c`. `aes_pkg` has `fips_to_rows` and
`rows_to_fips` for the conversion. The player keeps its encrypted files in
this row order: the first four bytes of a 16-byte block are row 0. That way
each 32-bit word read from the card buffer can go straight into the core as
a row, with no byte shuffling in software. A file encrypted by a standard
AES tool, which uses FIPS column order, would need each block transposed.

### Key expansion (`key_controller`, `generate_roundkey`, `write_controller`, `key_table`)

The key must be loaded before any ciphertext. A start with the key selected
runs 11 clocks:

* The start clock writes the user key into the key table and into the key
  register.
* Each of the next 10 clocks, `generate_roundkey` turns the register's key
  into the next round key. This is combinational: RotWord, SubWord, Rcon,
  then the XOR chain across the columns. The result is written to the table
  and loaded back into the register.
* `eoc` then rises and stays high.

The table is written **back to front**. `write_controller` counts down from
address 10, so round key *i* lands at address 10-i. Decryption needs the
last round key first, so iteration *n* of the decryption just reads address
*n*. The table has 11 entries of 128 bits, with a synchronous write and an
asynchronous read.

### Round datapath (`aes_decrypto`, `aes_dec_controller`)

```
 ciphertext --+
              MUX --> InvAddRoundKey --+--> InvMixColumns --+
 feedback ----+          ^             |                   MUX --> REGISTER --> InvShiftRows/InvSubBytes --> feedback
                      key table        +-------------------+
                                       +--> output buffer (plaintext)
```

* **Start clock.** The ciphertext passes through InvAddRoundKey with the
  last round key (address 0), and the result is registered.
* **Clocks 1..9.** The register goes through InvShiftRows/InvSubBytes, then
  InvAddRoundKey with key *n*, then InvMixColumns, and back into the
  register.
* **Clock 10.** The same, but InvMixColumns is bypassed, and the
  InvAddRoundKey output is loaded into the plaintext register.

The controller then enters DONE with `eoc` high. That is 11 clocks from the
start clock to `eoc`. A mux picks which controller drives `eoc`: the key
side or the decryption side, chosen by the same select as the input demux.
The unselected demux output is driven to zero.

How each step is built:

* InvShiftRows costs nothing; it is the wiring into the 16 inverse S-boxes
  (`inv_shiftrow_subbytes`).
* The S-box tables are computed while the design is elaborated: the GF(2^8)
  inverse by square-and-multiply, then the affine map. No table is typed
  in. Synthesis turns them into 256-entry ROMs.
* InvMixColumns uses no multipliers. The products by 09, 0b, 0d and 0e are
  XORs of a three-step `xtime` chain (2a, 4a, 8a).

### Bus wrapper (`aes_avalon`)

* Words 0-3 are key rows and words 4-7 are ciphertext rows. They go into a
  128-bit input buffer.
* Writing row 3 starts the core on the next clock: key expansion for
  addresses 0-3, decryption for 4-7.
* Writing rows 0-2 pulses `clear`, which drops `eoc`.
* A read returns the plaintext row once `eoc` is high, and the input buffer
  before that.

From the last bus write to `eoc` is **12 clocks**.

## SD card reader (`spi_sd_controller`)

SCLK runs at half the system clock, 25 MHz from 50 MHz, and only while the
reader is busy. MOSI changes as SCLK falls, and MISO is sampled as SCLK
rises. Commands are 6-byte frames. Each is preceded by idle clocks with
MOSI high: 8 clocks between initialisation commands, and 16 clocks before a
block read.

After reset the reader initialises the card by itself:

1. 80 clocks with chip select high,
2. chip select low and 16 extra clocks,
3. CMD0 (CRC 95h), sent again if no answer comes within 64 clocks,
4. CMD1 until the card answers 00h,
5. CMD16 to set 512-byte blocks.

Then it sets `eor` (end of read) and waits.

A block read (CMD17) works like this:

* It waits for the data token, reading whole bytes aligned to the R1
  response.
* FEh starts the data. It stores 512 bytes in a 128 x 32-bit buffer, skips
  the 16-bit CRC, and sets `eor`.
* Any other byte except FFh is a data error token. The read ends with `eor`
  and the `err` status bit set.

| word | access | meaning |
|---|---|---|
| 1 | write | bit 0 = 1 starts a block read (clears `eor`) |
| 2 | write | card byte address of the block |
| 16 | read | bit 0 = `eor`, bit 1 = `err` |
| 64 | write | buffer byte address (multiple of 4) |
| 128 | read | four buffer bytes, the first in bits 31:24 |

A block read takes about 512 x 8 x 2 = 8192 clocks, plus the command and
the card's access time.

## Frame buffer and VGA (`vga_sram_controller`, `vga_raster`, `sram_arbiter`)

### Raster

Standard 640x480 timing:

* Horizontal: sync 96, back porch 48, active 640, front porch 16.
* Vertical: sync 2, back porch 33, active 480, front porch 10.

The raster counts on a pixel enable that is high every second clock. That
enable also goes out as `vga_clk`.

Each 16-bit SRAM word holds two neighbouring pixels, the left one in the
high byte. Pixel (x,y) of the picture is word `y*160 + x/2 + 539`. The 539
words skip the 1078-byte bitmap header, which is stored ahead of the pixels.
A word is fetched at even x: its high byte is shown at once, and its low
byte is kept in a register for the odd pixel. The picture is gray:
R = G = B = pixel << 2. Everything outside the 320x240 rectangle is black.
Outputs are registered, one pixel behind the counters.

### `safe`

`safe` is high when the beam is below the picture (this includes vertical
blanking), or in the 256 pixels to the right of it on a picture line. A
burst begun while `safe` is high has at least 224 pixel times (448 clocks)
before the beam comes back to column 0. That is far more than a burst of a
few writes needs.

### SRAM ownership

| word address | access | meaning |
|---|---|---|
| bit 20 set | read | bit 0 = `safe` |
| bit 19 set | write | bit 0 = `go`: 1 = raster owns the SRAM (reset value), 0 = processor owns it |
| otherwise | read/write | SRAM word [17:0], with byte enables, while `go` = 0 |

With `go` = 0 the processor's bus drives the SRAM pins directly. The raster
is then fed the last word it read, held in a register. The SRAM data pins
are split into `sram_dq_o`, `sram_dq_oe` and `sram_dq_i`; the board-level
wrapper joins them into the bidirectional bus.

## The processor's side

The end-to-end testbench `tb_aes_video_top` contains the program that drives
this hardware. It follows these steps:

1. Write the key rows to AES words 0-3 and wait for `eoc`.
2. Wait for the card's `eor`. Then, for each 512-byte block, write the card
   address and start, poll `eor`, and read the 128 buffer words.
3. For each 16 bytes of the file:
   * write the 4 buffer words to AES words 4-7 as they are, polling `safe`
     until it is high before the first and the third,
   * wait for `eoc`.
4. For each of the 4 plaintext rows:
   * read the row,
   * write `go` = 0,
   * write its high half, then its low half, as two SRAM words,
   * write `go` = 1.

A frame is 77888 bytes: 320x240 pixels, the 1078-byte header and 10 bytes
of padding. That is 4868 AES blocks, and 152 whole card blocks plus 64
bytes. The 153rd block read therefore already holds 448 bytes of the next
frame. The program must keep those bytes rather than read them again. The
offset moves by 64 bytes per frame and comes back to zero after 8 frames.

## How far it can be trusted

Every module has a testbench that checks it against an independent model.
`tb/aes_ref_pkg.sv` is an AES-128 encryptor and key schedule written apart
from the RTL, with its own S-box from exp/log tables. Every testbench counts
its checks and prints `TB_RESULT checks=N failures=M`.

* **AES core.** The FIPS-197 examples, random keys and blocks, and exact
  cycle counts for the key expansion, the decryption and `eoc`.
* **SD reader.** `tb/sd_card_model.sv` is a behavioural card. It ignores the
  first CMD0, stays busy for 3 CMD1s, answers with the data, and returns an
  error token for a read past its end. The test checks the whole power-up
  sequence, the frame format, every buffered byte, one bit per two clocks,
  at least 16 idle clocks before each CMD17, and the error flag.
* **VGA / SRAM.** `tb/sram_model.sv` is an asynchronous SRAM. The tests
  cover sync and blank timing for a whole frame, the address of every pixel
  fetch, every displayed pixel, the `safe` window, and the held word while
  the processor owns the SRAM.
* **Whole system.** `tb_aes_video_top` runs at full size. It reads an
  encrypted frame plus the spill (153 blocks), decrypts 4896 blocks, and
  writes the frame with `safe` polling. It checks that no SRAM write falls
  inside the visible picture, then compares all 76800 displayed pixels. It
  ends with a read past the end of the card.

What has not been checked:

* No timing analysis was done. The original AES core was reported at
  88 MHz; this one has only been simulated at 50 MHz.
* The card model is not a real card. Real cards vary in how long they stay
  busy and how long they take to send data.
* No FPGA build was made.

## Differences from the original system

* The system-bus fabric is outside this design, so the three slaves sit
  behind one decoded port. The region bits are this design's choice.
* The VGA/SRAM slave is 16 bits wide with byte enables. The original
  program wrote the SRAM in 32-bit chunks through a bus adapter.
* The original let the SRAM data bus float while the processor owned the
  SRAM, and the raster held the last value. Here an explicit register holds
  that word.
* The 25 MHz pixel clock is a clock enable, not a divided clock.
* The original program read the plaintext right after the fourth write,
  without waiting for `eoc`. It relied on the processor taking longer than
  the core's 11 clocks. Here a read before `eoc` returns the input buffer.
  A program must therefore poll `eoc` or wait 12 clocks after the last
  write.
* The key table has 11 entries, which is what AES-128 needs.
* These values are not given by the original, so they are this design's own
  choices:
  * the SCLK rate,
  * the response time-out,
  * the number of extra wake-up clocks,
  * the 16-clock gap before a block read,
  * the SD bus addresses,
  * the `err` status bit,
  * the `safe` margin,
  * the VGA porch widths.
* The card is addressed in bytes, which suits standard-capacity cards.
* Reset is synchronous and active high throughout.

## Simulating

Verilator 5 is enough. From the repository root:

```
verilator --binary --timing --timescale 1ns/1ps -y rtl -y tb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_video_top.sv \
    --top-module tb_aes_video_top -o sim
./obj_dir/sim
```

The full-size run takes a few seconds. Any other testbench runs the same
way, with its own name in place of `tb_aes_video_top`. Leave out
`tb/aes_ref_pkg.sv` for testbenches that do not import it. Each testbench
has a watchdog and prints one `TB_RESULT` line.

## Files

| file | content |
|---|---|
| `rtl/aes_pkg.sv` | state types, byte access, GF(2^8) helpers, S-box tables, Rcon |
| `rtl/generate_roundkey.sv` | one key-schedule step |
| `rtl/key_controller.sv`, `rtl/write_controller.sv`, `rtl/key_table.sv` | key expansion control, table address, table |
| `rtl/inv_add_round_key.sv`, `rtl/inv_mix_columns.sv`, `rtl/inv_shiftrow_subbytes.sv` | round steps |
| `rtl/aes_dec_controller.sv`, `rtl/aes_decrypto.sv` | decryption control and the core datapath |
| `rtl/aes_avalon.sv` | bus wrapper of the AES core |
| `rtl/spi_sd_controller.sv` | SD card reader |
| `rtl/vga_raster.sv`, `rtl/sram_arbiter.sv`, `rtl/vga_sram_controller.sv` | VGA timing and fetch, SRAM sharing, VGA/SRAM bus slave |
| `rtl/aes_video_top.sv` | the three peripherals on one bus port |
| `tb/tb_*.sv` | one testbench per module, plus `tb_aes_video_top` for the whole system |
| `tb/aes_ref_pkg.sv`, `tb/sd_card_model.sv`, `tb/sram_model.sv` | reference model and behavioural models |
