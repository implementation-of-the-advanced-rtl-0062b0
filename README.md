# AES-128 encrypted image link over a UART

Two FPGA boards exchange a colour picture over a slow serial radio link, and
nobody listening to the radio should be able to see the picture. The
transmitting board holds the image in block RAM and shows it on a VGA
monitor. On request it cuts the image into 16-byte blocks, encrypts each
block with AES-128 and sends the cipher bytes out of its UART. The radio
modules (IEEE 802.15.4 / ZigBee, configured for 9600 baud) carry the bytes
to the second board. That board decrypts every 16 bytes it receives, writes
the plain bytes into its own frame buffer, and shows the rebuilt image on its
own monitor. The baud rate can be switched at run time between 9600 and
115200, and both screens can be switched to a colour-bar test pattern.

This RTL follows the architecture of the article "Implementation of the
advanced encryption standard algorithm on an FPGA for image processing
through the universal asynchronous receiver-transmitter protocol" (two
Basys 3 boards, AES-128 with a key generator, UART, VGA at 640x480 with
16 colours). That article gives the flow and the AES example values, not the
micro-architecture. Everything below the block level is this design's own.
Each file's opening comment says which parts follow the article and which
are choices made here.

```
 transmitting board (image_tx_system)                 receiving board (image_rx_system)
 ┌──────────────────────────────────────────┐          ┌──────────────────────────────────────────┐
 │ img_wr_* ─► frame_buffer ─► vga_controller │          │ uart_rx ─► 16-byte    ─► aes_decrypt      │
 │              │ port A                     │  serial  │            assembly        │              │
 │              ▼                            │  (radio) │                            ▼              │
 │ controller: read 16 B ─► aes_encrypt ─► uart_tx ─────────►        frame_buffer ─► vga_controller │
 │ aes_key_expand ─┘                          │          │ aes_key_expand ─┘                        │
 │ uart_baud_gen, activity_led                │          │ uart_baud_gen, activity_led              │
 └──────────────────────────────────────────┘          └──────────────────────────────────────────┘
```

`aes_uart_image_top` puts both boards side by side. The radio is not logic,
so the serial pins are top-level ports: `uart_txd` leaves the transmitter
and `uart_rxd` enters the receiver. Tie them together for a wired link.

## Byte order: from pixels to AES blocks to the line

This is the part to get right when connecting the design to other software.

* **Pixels.** The image is 640x480 pixels with 4 bits per pixel, so 16
  colours. It is stored as 153,600 bytes in raster order. Pixel `i` is in
  byte `i/2`: an even pixel in the low nibble, an odd pixel in the high
  nibble.
* **Blocks.** Bytes `16k … 16k+15` form AES block `k`. Byte `16k` is the
  *first* AES input byte (bits [127:120] of the 128-bit block, FIPS-197
  order). Blocks go out in address order, 9,600 of them per image. The image
  size must be a whole number of blocks, and an elaboration assertion checks
  this.
* **Line.** The 16 cipher bytes of a block are sent first byte first. Each
  byte is one UART frame: a low start bit, eight data bits least significant
  first, and a high stop bit (8N1, no parity).
* **Receiver.** It shifts the bytes in, so the first byte again lands in
  bits [127:120]. It writes the decrypted block to 16 consecutive addresses.
  The write address starts at 0 after reset and wraps at the image size, so
  a second image overwrites the first. To restart mid-image, reset the
  receiver.

AES here is plain ECB: every block is encrypted on its own with the same
key. This keeps the two boards in step without any extra protocol, but equal
blocks (for example areas of one flat colour) give equal cipher blocks.
Outlines of large flat regions can therefore still be seen in the cipher
stream. The original design does the same; change it only with both ends.

## AES-128 datapath

`aes_pkg` holds the shared types (`block_t`, `round_keys_t`) and the
transformations as functions: ShiftRows, MixColumns and their inverses,
`xtime` and GF(2^8) multiply, and the round constant.

* **S-boxes** (`aes_sbox`): each S-box is a 256x8 constant table. No table
  is written out in the source. The table is computed during elaboration
  from the S-box definition: the inverse in GF(2^8) (as a^254), then the
  affine map. The inverse table is the inverse permutation of the forward
  one. Synthesis sees a ROM.
* **Rounds** (`aes_round`, `aes_inv_round`): each round is one combinational
  stage.
  * An encryption round uses 16 forward S-boxes, then ShiftRows, then
    MixColumns, then AddRoundKey. MixColumns is bypassed when `final_round`
    is set.
  * A decryption round is the straightforward inverse cipher: InvShiftRows,
    InvSubBytes, AddRoundKey, then InvMixColumns. InvMixColumns is bypassed
    in the last round.
* **Key generator** (`aes_key_expand`): a `start` pulse stores the key as
  round key 0. Each clock after that makes one more round key from the last
  column of the previous one: RotWord, then SubWord through four S-boxes,
  then the Rcon XOR, then the running XOR with the previous key's columns.
  `ready` rises 11 cycles after `start`. All eleven round keys (1,408
  flip-flops) stay in registers, so the decryptor can use them in reverse
  order without a second schedule. Each board re-runs the expansion by
  itself after reset and whenever its `key` input changes.
* **Cipher cores** (`aes_encrypt`, `aes_decrypt`): one round per clock.
  * `start` loads `block_in ^ rk[0]` for encryption, or `^ rk[10]` for
    decryption.
  * Ten clocks later `done` pulses, and `block_out` holds the result until
    the next `start`. That makes 11 cycles per block.
  * `start` is ignored while `busy`.
  * The state register is `block_out`. The cycle after `start` it therefore
    shows the state after the initial AddRoundKey. For the standard example
    this is `193de3bea0f4e22b9ac68d2ae9f84808`.

At 100 MHz a block takes 110 ns. The serial line needs 1.39 ms per block at
115200 baud, so the cipher is idle almost all the time. The design favours a
small, plain datapath over throughput.

Only 128-bit keys are built. The original design mentions that AES also
allows 192- and 256-bit keys, but uses and reports only AES-128.

## Serial link

* **Baud generator** (`uart_baud_gen`): makes a tick at 16 times the baud
  rate.
  * The divisor is rounded from `CLK_HZ` during elaboration: 651 clocks at
    9600 baud and 54 clocks at 115200 baud, at 100 MHz. The rate errors are
    0.16% and 0.47%.
  * `baud_sel` chooses the rate while running. A change restarts the
    divider.
  * Both boards must use the same setting. Switching in the middle of a
    byte corrupts that byte.
* **Transmitter** (`uart_tx`): a valid/ready handshake. The byte is accepted
  when `valid && ready`. The start bit can be up to 1/16 bit short, because
  the frame starts at once instead of waiting for the next tick. All other
  bits last exactly 16 ticks.
* **Receiver** (`uart_rx`):
  * The line goes through a two-flop synchroniser.
  * A low level starts a frame, and the start bit is checked again half a
    bit later. A glitch shorter than that is ignored.
  * Data and stop bits are sampled at their centres.
  * A low stop bit gives `frame_err`, not `valid`, and the byte is dropped.
    The receiving board counts these in `frame_errors`, which saturates at
    65,535.
* **No flow control is needed.** The receiver decrypts and stores a block in
  about 30 clocks, far less than one byte time. The transmitter reads and
  encrypts the next block (about 30 clocks) while the last byte of the
  previous block is still on the line.
* **Activity LED** (`activity_led`): while bytes are moving, each board's
  LED blinks at about 5 Hz. It goes dark 0.2 s after the last byte.

A full 640x480 image is 1,536,000 bits on the line. That takes 160 s at
9600 baud and 13.3 s at 115200 baud.

The radio modules run in API mode in the original set-up. This RTL sends
raw bytes with no radio framing, so the radios must be configured as a
transparent serial pipe. If API mode is needed, add a framing stage between
`uart_tx`/`uart_rx` and the block logic.

## Image memory and display

* **Frame buffer** (`frame_buffer`): a two-port byte RAM with synchronous
  reads (one cycle of latency) that maps onto block RAM. One frame is
  1.2 Mbit, about 34 of the 50 block RAMs of an XC7A35T.
  * Port A is the datapath port. On the transmitter it carries the image
    load and the read-out for encryption. On the receiver it writes the
    decrypted bytes.
  * Port B feeds the display.
  * `img_wr_*` is accepted only while no transfer runs. This port is where
    an image reader (an SD-card controller, not part of this RTL) connects.
* **VGA** (`vga_controller`, constants in `vga_pkg`):
  * Standard 640x480 at 60 Hz: 800x525 total, negative syncs, 25 MHz pixel
    rate made as a 1-in-`CLK_DIV` clock enable of the 100 MHz clock.
  * For the pixel at the current counters, the controller puts the byte
    address out. At the next pixel enable it registers the colour and both
    syncs together. The outputs are therefore aligned with each other and
    one pixel behind the counters.
  * The 4-bit pixel goes through the classic 16-colour text-mode palette to
    12-bit RGB (4 bits per colour, as on the Basys 3 resistor DAC).
  * An image smaller than the screen is shown at the top left, with black
    around it.
  * `colour_bars` replaces the picture with eight vertical bars: white,
    yellow, cyan, green, magenta, red, blue and black.

## Top-level interface (`aes_uart_image_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 100 MHz clock, synchronous active-low reset (both boards) |
| `tx_key`, `rx_key` | in | 128 | AES key of each board. They must match for a readable picture |
| `baud_sel` | in | 1 | 0 = `BAUD_A` (9600), 1 = `BAUD_B` (115200) |
| `colour_bars` | in | 1 | test pattern on both screens |
| `img_wr_en/addr/data` | in | 1/18/8 | image load into the transmitter (ignored during a transfer) |
| `tx_start` | in | 1 | pulse: send the stored image |
| `tx_busy`, `tx_done` | out | 1 | transfer running; one-cycle pulse after the last stop bit |
| `uart_txd` | out | 1 | serial out of the transmitting board |
| `uart_rxd` | in | 1 | serial in of the receiving board |
| `rx_bytes` | out | 19 | bytes decrypted and stored (wraps with the image) |
| `rx_frame_errors` | out | 16 | frames dropped for a bad stop bit |
| `tx_vga_*`, `rx_vga_*` | out | 12+1+1 | RGB 4:4:4, hsync, vsync of each board |
| `tx_led`, `rx_led` | out | 1 | activity LEDs |

Parameters (defaults): `CLK_HZ` 100,000,000; `BAUD_A` 9600; `BAUD_B`
115200; `IMG_W` 640; `IMG_H` 480; `CLK_DIV` 4 (100 MHz / 25 MHz);
`LED_HALF_CYCLES` 10,000,000. `IMG_W x IMG_H / 2` must be a multiple of 16.
On real hardware the two subsystems `image_tx_system` and `image_rx_system`
are the tops of the two boards.

## Where this departs from the original, and what is missing

* **The serial rate "11200".** The article quotes run-time rates of "11200"
  and 9600 baud. 11200 is not a standard rate, so it is taken as 115200.
  Change `BAUD_B` if another rate is wanted.
* **Not included:** the radio modules, the SD card and its reader, the
  VGA connector and DAC, the board, and the PC software that turns the
  received picture into a text file. They carry no logic that the article
  describes. Their signals are the top-level ports.
* **Resource and power figures.** The article reports 141 LUTs and 0.291 W
  on a Basys 3. That LUT count cannot be matched by any AES-128 with table
  S-boxes. This design uses 20 S-box ROMs per board, which is several
  hundred LUTs, plus about 1,600 flip-flops for keys and state. It fits the
  XC7A35T easily, but it was not placed and routed for that device here.
* **Design choices not given by the article:** the palette, the colour-bar
  layout, the ECB byte order, 16x oversampling, one round per clock, and
  the blink rate.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The AES checks use `tb_aes_ref_pkg`. This
is an independent reference model written differently from the RTL: its
S-box comes from log/antilog tables and the bitwise affine formula, and its
state is a 4x4 matrix.

| testbench | what it shows |
|---|---|
| `tb_aes_sbox` | all 256 forward and inverse values, plus published values |
| `tb_aes_round`, `tb_aes_inv_round` | FIPS-197 round examples; 200 random rounds each |
| `tb_aes_key_expand` | FIPS-197 A.1 round keys 1–10; RotWord `cf4f3c09`; 11-cycle latency; random keys; restart |
| `tb_aes_encrypt`, `tb_aes_decrypt` | FIPS-197 B and C.1; the state after the initial AddRoundKey; 11-cycle latency; random blocks; start while busy |
| `tb_uart_baud_gen` | tick periods 651 and 54; run-time switch |
| `tb_uart_tx`, `tb_uart_rx` | frame format and length; ±3% bit-time error; bad stop bit; glitch |
| `tb_frame_buffer` | both ports against a model, including read-before-write |
| `tb_vga_controller` | every pixel of a frame, at 640x480 and with a 64x32 image; sync widths and periods; colour bars |
| `tb_activity_led` | dark when idle, blinks while active, dark after the hold time |
| `tb_image_tx_system` | line bytes equal the reference encryption of the image; transfer time; key change; start ignored while busy |
| `tb_image_rx_system` | stored image equals the plaintext; store latency ≤ 40 clocks; frame error; VGA pixels |
| `tb_aes_uart_image_top` | end to end with a 32x4 image and looped-back pins. It counts each mechanism: a 115200 and a 9600 transfer, colour bars, a broken frame, a wrong receiver key (picture must equal the reference mis-decryption), key re-expansion, LED blinking, VGA frames |
| `tb_image_link_workload` | the whole link with a 128x96 image (384 blocks) at 115200 baud; the first block is the standard example message, so the first 16 line bytes must be `3925841d…0b32`; every line byte, the rebuilt image and the transfer time are checked |
| `tb_aes_uart_image_full` | the top at its default parameters. It loads a full 640x480 image and checks a whole VGA frame of the transmitter. It then sends the complete image (9,600 blocks) at 115200 baud, checks the transfer time, the receiver's memory and a whole frame of the receiver's screen |

A complete 640x480 transfer is about 1.33·10⁹ clocks. In Verilator that
takes roughly seven minutes, so `tb_aes_uart_image_full` is by far the
slowest testbench. At 9600 baud a full image would be twelve times longer,
so that rate is only simulated with the small images.

To run one testbench with Verilator 5 (from the folder that holds `rtl/` and
`tb/`):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -y rtl -y tb +libext+.sv rtl/aes_pkg.sv rtl/vga_pkg.sv tb/tb_aes_ref_pkg.sv \
  tb/tb_aes_uart_image_top.sv --top-module tb_aes_uart_image_top -o sim
./obj_dir/sim
```

Pass `+verilator+rand+reset+2` to the simulation to start every register
that reset does not touch at a random value. The testbenches pass that way.
