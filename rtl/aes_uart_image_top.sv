// aes_uart_image_top: an encrypted image link between two FPGA boards, both
// boards in one top level.
//
// The transmitting board (image_tx_system) holds a 640x480 16-colour image,
// displays it, and sends it block by block as AES-128 ciphertext over its
// UART. The receiving board (image_rx_system) decrypts what its UART
// receives, rebuilds the image in its own frame buffer and displays it. On
// the real hardware the two serial lines meet through a pair of low-rate
// radio modules, which are not logic; here uart_txd (transmitter out) and
// uart_rxd (receiver in) are top-level pins, and tying them together gives
// a wired link. Both boards share the clock, reset, baud select and
// colour-bar switch; each has its own key input, so a wrong receiver key
// shows as a scrambled picture. At 9600 baud a full image (153,600 bytes)
// takes about 160 s, at 115200 baud about 13 s. The overall flow (image
// memory, AES-128, UART at run-time selectable 9600/115200 baud, VGA on
// both ends) follows the design; sharing one top is this design's choice.
module aes_uart_image_top
  import aes_pkg::*;
#(
  parameter int unsigned CLK_HZ  = 100_000_000,
  parameter int unsigned BAUD_A  = 9600,
  parameter int unsigned BAUD_B  = 115200,
  parameter int unsigned IMG_W   = 640,
  parameter int unsigned IMG_H   = 480,
  parameter int unsigned CLK_DIV = 4,
  parameter int unsigned LED_HALF_CYCLES = 10_000_000,
  localparam int unsigned IMG_BYTES = IMG_W * IMG_H / 2,
  localparam int unsigned AW        = $clog2(IMG_BYTES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  block_t        tx_key,
  input  block_t        rx_key,
  input  logic          baud_sel,
  input  logic          colour_bars,
  // image load port of the transmitting board
  input  logic          img_wr_en,
  input  logic [AW-1:0] img_wr_addr,
  input  logic [7:0]    img_wr_data,
  input  logic          tx_start,
  output logic          tx_busy,
  output logic          tx_done,
  // serial link
  output logic          uart_txd,
  input  logic          uart_rxd,
  // receiving board status
  output logic [AW:0]   rx_bytes,
  output logic [15:0]   rx_frame_errors,
  // displays and indicators
  output logic [11:0]   tx_vga_rgb,
  output logic          tx_vga_hsync,
  output logic          tx_vga_vsync,
  output logic [11:0]   rx_vga_rgb,
  output logic          rx_vga_hsync,
  output logic          rx_vga_vsync,
  output logic          tx_led,
  output logic          rx_led
);

  image_tx_system #(
    .CLK_HZ(CLK_HZ), .BAUD_A(BAUD_A), .BAUD_B(BAUD_B), .IMG_W(IMG_W), .IMG_H(IMG_H),
    .CLK_DIV(CLK_DIV), .LED_HALF_CYCLES(LED_HALF_CYCLES)
  ) u_tx_board (
    .clk, .rst_n, .key(tx_key), .baud_sel, .colour_bars,
    .img_wr_en, .img_wr_addr, .img_wr_data,
    .start(tx_start), .busy(tx_busy), .done(tx_done), .uart_txd,
    .vga_rgb(tx_vga_rgb), .vga_hsync(tx_vga_hsync), .vga_vsync(tx_vga_vsync), .led(tx_led)
  );

  image_rx_system #(
    .CLK_HZ(CLK_HZ), .BAUD_A(BAUD_A), .BAUD_B(BAUD_B), .IMG_W(IMG_W), .IMG_H(IMG_H),
    .CLK_DIV(CLK_DIV), .LED_HALF_CYCLES(LED_HALF_CYCLES)
  ) u_rx_board (
    .clk, .rst_n, .key(rx_key), .baud_sel, .colour_bars, .uart_rxd,
    .bytes_rx(rx_bytes), .frame_errors(rx_frame_errors),
    .vga_rgb(rx_vga_rgb), .vga_hsync(rx_vga_hsync), .vga_vsync(rx_vga_vsync), .led(rx_led)
  );

endmodule
