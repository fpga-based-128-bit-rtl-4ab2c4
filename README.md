# AES-128 encrypted image viewer

An FPGA system that reads an AES-128-encrypted grayscale picture from an SD
card, decrypts it in hardware and shows it on a VGA monitor. The picture is
320x240 pixels with 8 bits per pixel. It is stored on the card as raw bytes,
with no file system. A small soft processor moves the data between three
custom peripherals on a 32-bit Avalon-style bus:

```
            +-------------------- 32-bit bus --------------------+
            |                     |                              |
  SD card <-> sd_controller    aes_decrypto          vga_sram_controller <-> SRAM 256K x 16
   (SPI)    (wake-up, CMD17,  (one-round AES-128     (frame buffer, 640x480
             bit alignment)    inverse cipher)        VGA raster, 2x2 pixels) -> DAC / monitor
```

For every 16 bytes, the processor does four steps:
1. It pops four words from the card reader.
2. It writes them to the decryptor.
3. It reads four plaintext words back.
4. It writes those words to the frame buffer.

When the whole picture is in place, it switches the display on. The processor
itself is not part of this RTL. The top module `aes_image_system` brings its
bus master port out as `m_req`/`m_rsp`. The system testbench plays the
processor's software.

### Picture format on the card

The card holds the encrypted picture from byte address 0. Before encryption,
it is 76,800 bytes: one gray byte per pixel, row after row from the top-left
corner. There is no bitmap file header. If a header is present, software must
skip it by starting its reads at a later address.

The picture is encrypted with AES-128 in ECB mode, 16 bytes at a time, using
the byte order described below. The whole picture is 150 card blocks of
512 bytes, which is 4,800 AES blocks.

## The decryptor (`aes_decrypto`)

The hardware of one round is reused for all rounds. No part of it is pipelined,
because each round needs the result of the one before it. The state is a 4x4
byte matrix `state_t [row][column]`:

| cycle after `start` | operation | round key |
|---|---|---|
| 0 | state = cipher XOR K10 (shift/sub and mix bypassed) | K10 |
| 1 .. 9 | state = InvMixColumns(InvSubBytes(InvShiftRows(state)) XOR Kr) | K9 .. K1 |
| 10 | result = InvSubBytes(InvShiftRows(state)) XOR K0, loaded into the output buffer | K0 |
| 11 | `eoc` is high | |

Three simplifications keep the datapath small:

- **No key schedule hardware.** `aes_round_key_rom` computes all eleven round
  keys from the `KEY` parameter when the design is elaborated. They become a
  constant table indexed by the round number. To change the key, change the
  parameter and rebuild.
- **InvShiftRows is only wiring.** `aes_inv_shift_sub` routes row *r*, rotated
  right by *r* bytes, into 16 inverse S-boxes. It has no logic of its own.
- **One round instance.** The InvMixColumns output is bypassed in the last
  round, and both shift/sub and mix are bypassed in the first step.

The S-box (`aes_inv_sbox`) is not a table typed into the source. It is computed
from the definition of AES: for each byte, apply the inverse affine transform,
then take the multiplicative inverse in GF(2^8) modulo x^8+x^4+x^3+x+1.
`aes_pkg` holds these functions. Synthesis still sees a 256-entry constant
lookup.

### Bus protocol and timing

The decryptor has two registers:
- Word 0 is the data register. Writes fill the 4-word input buffer
  (`aes_input_buffer`). Reads drain the 4-word output buffer
  (`aes_output_buffer`).
- Word 1 is the status register: `{30'b0, busy, eoc}`.

The timing of one block:
- `start` is a registered pulse in the cycle after the fourth word is written.
- `eoc` rises 11 cycles after `start`.
- The first word written (bits [127:96]) is the first word read back.

`waitrequest` is raised in three cases:
- A data read while no result is ready. It waits for `eoc`.
- A write while a block is being decrypted.
- A write while a result is still unread.

So software can simply write four words and then read four words.

### Byte order

A 32-bit bus word carries four bytes, and its first byte is bits [31:24].
The 16 bytes of a block go into the state matrix in one of two ways, chosen by
the `ORDER` parameter:

- `ROW_MAJOR` (default): bytes 0..3 are row 0, bytes 4..7 are row 1, and so on.
  Each bus word is one row of the matrix. This matches the original project's
  C encryption program, which filled its matrix row by row.
- `COLUMN_MAJOR`: bytes 0..3 are column 0, as in FIPS-197.
  With this setting, the core decrypts standard AES-128 ECB data.

With `ROW_MAJOR`, the cipher equals standard AES-128 applied to the transposed
block. The testbenches use this fact to build their expected values.

## The card reader (`sd_controller`, `spi_master`)

The card runs in SPI mode. `spi_master` exchanges one byte at a time:
- SPI mode 0, MSB first.
- The half period is set at run time, so the card can be woken slowly and then
  read fast. The defaults are 390 kHz and 12.5 MHz.

`sd_controller` sequences everything in hardware.

**Wake-up** starts by itself after reset, in this order:
1. 80 clocks with nCS high.
2. nCS goes low. CMD0 is sent as `40 00 00 00 00 95`. This is the only frame
   whose CRC matters, because the card is still in its native mode.
3. 8 clocks, then poll until a response arrives, then 8 clocks.
4. CMD1 is sent. It is sent again for as long as the response still has the
   idle bit set.
5. CMD16 sets the block length to `BLOCK_BYTES` (512).

Then `ready` rises and SCLK switches to the fast rate.
If CMD0 gets no answer after `NO_CARD_POLLS` polls, a no-card bit is set in
the status register. Polling continues.

**Block read.** A bus write of a byte address to word 0 sends CMD17. The
controller then:
- expects R1 = 00;
- waits for the data token `FE`;
- packs the 512 data bytes into words, first byte in bits [31:24];
- discards the two CRC bytes.

Each word waits until the bus reads it, and SCLK stops meanwhile, so the
controller needs no block buffer. A data error token
(`0000 out_of_range ecc_failed cc_error error`) or a nonzero R1 ends the read.
The error bit and the token are then left in the status register.

**Bit alignment.** A card may start its response at any bit, not only on a byte
boundary. While polling, the first byte that is not `FF` shows where the start
bit falls: its number of leading ones is the bit offset. After that, every byte
is taken from the last two received bytes, shifted by that offset. This applies
to responses, tokens and data alike. The only cost is one extra byte after each
response.

Status register (word 1):

| bits | meaning |
|---|---|
| [0] | ready |
| [1] | read busy |
| [2] | word valid |
| [3] | error |
| [4] | no answer to CMD0 yet |
| [15:8] | last R1 or error token |

## The frame buffer and display (`vga_sram_controller`, `vga_timing`)

The SRAM has a single port, so this block owns it completely. Both the display
scan and the bus writes go through it.

**Screen and timing**
- The screen is 640x480 with standard 60 Hz timing: 800x525 pixel clocks,
  negative syncs.
- The 25 MHz pixel rate is a clock enable on every second 50 MHz cycle. The
  design stays in one clock domain, and `vga_clk` is output for the DAC.
- Each picture pixel is drawn as a 2x2 block. Its gray value drives R, G and B
  equally.

**Memory layout.**
- SRAM word *a* holds picture pixels 2*a* (high byte) and 2*a*+1 (low byte).
- Pixels are stored row after row from address 0. A picture row takes 160
  words, and the whole picture 38,400 words.
- On the bus, picture word *w* carries pixels 4*w* .. 4*w*+3, first pixel in
  bits [31:24].

**Port schedule.** Four screen pixels (eight system clocks) show one SRAM word.
- **Reads:** in the cycle where the raster enters the second pixel of a group,
  the controller reads the word for the next group. At the end of a line it
  reads group 0 of the next line instead. The word is latched and becomes
  current when the raster reaches that group.
- **Writes:** a bus write is held in a one-word buffer and written as two
  SRAM writes in free cycles. Two write cycles are never back to back, so
  `we_n` always returns high in between.
- **Waits:** a second bus write waits (`waitrequest`) until the buffer is empty.

In the worst case a write waits a few cycles. The display never misses a fetch.

**Display enable.** The control register sits at bus word addresses with bit
15 set, and bit 0 of it enables the display. While it is 0, the screen is black
but the syncs keep running. Software sets it once the picture is complete.

## Bus map

The bus uses word addresses, 18 bits wide. Bits [17:16] select the slave:

| [17:16] | slave | registers |
|---|---|---|
| 0 | decryptor | 0 data, 1 status |
| 1 | card reader | 0 data (write: start read at byte address; read: next word), 1 status |
| 2 | frame buffer | 0..19199 picture words, 0x8000 display enable |
| 3 | none | reads 0, never waits |

`avalon_pkg` defines the request and response structs:
- `avm_req_t`: address, read, write, writedata.
- `avm_rsp_t`: readdata, waitrequest.

Read data is valid in the same cycle that `waitrequest` is low. This is a
simplified Avalon-MM slave with no read latency.

## Where this design departs from or adds to the original

- **The key.** The original hard-wires an unstated key. Here it is the `KEY`
  parameter, with the FIPS-197 example key `000102..0f` as default.
- **Cycle count.** The original describes its decryption timing as 1 + 9 cycles
  before the result is stored, plus 1 cycle for `eoc`. Its algorithm, however,
  also has a last round without InvMixColumns. This design gives that last
  round its own cycle and sets `eoc` in the same cycle as the store. So `eoc`
  still rises 11 cycles after `start`.
- **CMD1 retries.** The original wake-up list says to repeat from the delay
  step until the card is ready. This design sends CMD1 again while the card
  reports idle, which is what cards expect.
- **CMD16.** This design adds CMD16 after wake-up, so CMD17 reads 512-byte
  blocks.
- **Alignment in hardware.** The original left bit alignment of card responses
  to software. Here it is done in hardware.
- **Own register maps, pixel packing and bus address map.** The original used
  vendor cores whose formats it did not spell out.
- **Character buffer.** The vendor VGA core's character buffer is not
  reproduced. Only the 8-bit grayscale pixel path exists.
- **Not included:** the soft processor and its software, the SD card, the SRAM
  chip, the video DAC and the monitor. They sit outside the top-level ports.
  The testbenches contain behavioural models of the card (`sd_card_model`) and
  the SRAM (`sram_model`).

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.
Expected values always come from an independent model, never from the RTL
package:

- **AES reference.** `tb_aes_ref` holds a separate word-oriented AES-128
  encryptor. It builds its S-box from log/antilog tables.
- **Decryptor.** The checks cover the FIPS-197 test vector, 40 random blocks
  in each byte order, and `eoc` exactly 11 cycles after `start`. They also
  cover every `waitrequest` rule and the status register.
- **Card reader.** It runs against a card model that can:
  - answer late;
  - stay busy for several CMD1s;
  - delay the data token;
  - start responses at bit offsets 0 to 7;
  - refuse reads past its capacity.
- **Frame buffer.** It is checked word by word in the SRAM model, and by
  capturing a whole frame at the DAC pins.

`tb_aes_image_system` runs the whole system with all parameters at their
defaults:
1. It encrypts a generated 320x240 picture onto the model card: 150 blocks,
   4,800 AES blocks.
2. It lets the hardware wake the card.
3. It tries one out-of-range read.
4. It moves the whole picture through the decryptor into the frame buffer.
5. It checks every pixel of a captured 640x480 frame.

The testbench counts each mechanism and fails if any of them never happened:
- CMD0 polls without answer;
- CMD1 repeats;
- off-boundary responses;
- token waits;
- the error token;
- the slow-to-fast SCLK switch;
- one final (no InvMixColumns) round per block;
- result reads waiting for `eoc`;
- card words waiting;
- frame-buffer writes waiting;
- a black screen before enable.

It simulates about 83 ms of hardware time (4.2 M cycles) in a few seconds.

## Simulating

The sources need the packages first:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  --top-module tb_aes_image_system -y rtl -y tb +libext+.sv \
  rtl/aes_pkg.sv rtl/avalon_pkg.sv tb/tb_aes_ref.sv tb/tb_aes_image_system.sv
./obj_dir/Vtb_aes_image_system
```

Any other testbench runs the same way with its own `--top-module` and file.
`tb_aes_ref.sv` is needed only by the AES testbenches.

The block-level card-reader testbench shortens the SPI clock dividers through
parameters. The other testbenches run at the default sizes.

## Files

| module | role |
|---|---|
| `aes_pkg` | state types, GF(2^8) arithmetic, S-box, key expansion, byte-order conversion |
| `avalon_pkg` | bus structs and the address map |
| `aes_decrypto` | decryptor: buffers, controller, round datapath, bus slave |
| `aes_input_buffer`, `aes_output_buffer` | 4-word block buffers, `start` and `eoc` |
| `aes_round_key_rom` | the eleven round keys as constants |
| `aes_inv_shift_sub`, `aes_inv_sbox`, `aes_inv_mix_columns` | round functions |
| `spi_master` | byte-wide SPI master |
| `sd_controller` | card wake-up, block read, bit alignment, bus slave |
| `vga_timing` | 640x480 raster and 25 MHz pixel enable |
| `vga_sram_controller` | SRAM frame buffer, port schedule, video output, bus slave |
| `avalon_interconnect` | address decoder between the processor port and the three slaves |
| `aes_image_system` | top level |
