// image_rx_system: the receiving board. It takes AES-128 cipher bytes from
// the UART, decrypts each group of 16, stores the plain image in its frame
// buffer and shows it on VGA.
//
// Received bytes shift into a 128-bit register, the first byte ending up as
// the most significant. When 16 have arrived and the round keys are ready
// (the key generator re-expands whenever key changes), the block is
// decrypted (11 cycles) and the 16 plain bytes are written to consecutive
// frame-buffer addresses, one per clock, starting at 0 after reset and
// wrapping at the image size. All of this ends long before the next serial
// byte, so no flow control is needed. bytes_rx counts the bytes written
// (wrapping with the address), frame_errors counts frames dropped for a bad
// stop bit. led blinks while bytes arrive. The VGA scan-out reads port B of
// the frame buffer at all times. Decrypting the received image with AES-128
// and displaying it follow the design; the byte order, restart at reset and
// the counters are this design's choices.
module image_rx_system
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
  input  block_t        key,
  input  logic          baud_sel,
  input  logic          colour_bars,
  input  logic          uart_rxd,
  output logic [AW:0]   bytes_rx,
  output logic [15:0]   frame_errors,
  output logic [11:0]   vga_rgb,
  output logic          vga_hsync,
  output logic          vga_vsync,
  output logic          led
);

  initial begin
    assert (IMG_BYTES % 16 == 0) else $error("image size must be a whole number of AES blocks");
  end

  // key generator
  block_t      key_q;
  logic        key_seen, kx_start, kx_ready;
  round_keys_t round_keys;

  assign kx_start = !key_seen || (key != key_q);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      key_seen <= 1'b0;
      key_q    <= '0;
    end else if (kx_start) begin
      key_seen <= 1'b1;
      key_q    <= key;
    end
  end

  aes_key_expand u_kx (
    .clk, .rst_n, .start(kx_start), .key, .ready(kx_ready), .round_keys
  );

  // UART
  logic       tick, rx_valid, rx_err;
  logic [7:0] rx_data;

  uart_baud_gen #(.CLK_HZ(CLK_HZ), .BAUD_A(BAUD_A), .BAUD_B(BAUD_B)) u_baud (
    .clk, .rst_n, .baud_sel, .tick
  );

  uart_rx u_rx (
    .clk, .rst_n, .tick, .rxd(uart_rxd), .valid(rx_valid), .data(rx_data), .frame_err(rx_err)
  );

  activity_led #(.BLINK_HALF_CYCLES(LED_HALF_CYCLES)) u_led (
    .clk, .rst_n, .activity(rx_valid), .led
  );

  // block assembly and inverse cipher
  block_t     cipher, plain;
  logic [4:0] in_cnt;        // bytes collected for the next block
  logic       dec_start, dec_busy, dec_done;
  logic       writing;
  logic [3:0] wr_cnt;
  logic [AW-1:0] wr_addr;

  assign dec_start = (in_cnt == 5'd16) && kx_ready && !kx_start && !dec_busy && !writing;

  aes_decrypt u_dec (
    .clk, .rst_n, .start(dec_start), .block_in(cipher), .round_keys,
    .busy(dec_busy), .done(dec_done), .block_out(plain)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cipher       <= '0;
      in_cnt       <= '0;
      writing      <= 1'b0;
      wr_cnt       <= '0;
      wr_addr      <= '0;
      bytes_rx     <= '0;
      frame_errors <= '0;
    end else begin
      if (rx_err && frame_errors != '1) frame_errors <= frame_errors + 1'b1;
      if (dec_start) in_cnt <= '0;
      if (rx_valid) begin
        cipher <= {cipher[119:0], rx_data};
        // a byte that arrives while a full block still waits for the key
        // replaces the oldest one instead of overrunning the count
        in_cnt <= dec_start ? 5'd1 : (in_cnt == 5'd16) ? 5'd16 : in_cnt + 1'b1;
      end
      if (dec_done) begin
        writing <= 1'b1;
        wr_cnt  <= '0;
      end else if (writing) begin
        wr_cnt   <= wr_cnt + 1'b1;
        wr_addr  <= (wr_addr == AW'(IMG_BYTES - 1)) ? '0 : wr_addr + 1'b1;
        bytes_rx <= (bytes_rx == (AW+1)'(IMG_BYTES)) ? (AW+1)'(1) : bytes_rx + 1'b1;
        if (wr_cnt == 4'd15) writing <= 1'b0;
      end
    end
  end

  // frame buffer and display
  logic [AW-1:0] b_addr;
  logic [7:0]    b_rdata;

  frame_buffer #(.DEPTH(IMG_BYTES), .AW(AW)) u_mem (
    .clk, .a_we(writing), .a_addr(wr_addr), .a_wdata(plain[127 - 8*wr_cnt -: 8]), .a_rdata(),
    .b_addr, .b_rdata
  );

  vga_controller #(.IMG_W(IMG_W), .IMG_H(IMG_H), .CLK_DIV(CLK_DIV), .AW(AW)) u_vga (
    .clk, .rst_n, .colour_bars, .fb_addr(b_addr), .fb_data(b_rdata),
    .rgb(vga_rgb), .hsync(vga_hsync), .vsync(vga_vsync)
  );

endmodule
