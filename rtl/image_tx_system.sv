// image_tx_system: the transmitting board. It stores a 16-colour image,
// shows it on VGA, and on request sends it over the UART encrypted with
// AES-128.
//
// The image enters through a byte write port (img_wr_*, fed by the image
// reader of the storage card) while no transfer runs. A start pulse begins a
// transfer: the key generator expands key if it has changed, then the
// controller repeats, for each 16-byte block of the image in address order:
// read 16 bytes from port A of the frame buffer (byte 0 becomes the most
// significant byte of the AES input), encrypt them (11 cycles), and hand the
// 16 cipher bytes, most significant first, to the UART transmitter. busy is
// high during the transfer and done pulses once when the last stop bit has
// been sent. At 115200 baud one block takes 16 x 10 bit times (about
// 1.4 ms); reading and encrypting add 30 cycles. The VGA scan-out reads the
// same frame buffer through port B at all times. led blinks while bytes are
// being sent. Encrypting the image with AES-128 before the UART, and showing
// it on VGA, follow the design; block order, byte order and the controller
// are this design's choices.
module image_tx_system
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
  input  logic          img_wr_en,
  input  logic [AW-1:0] img_wr_addr,
  input  logic [7:0]    img_wr_data,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic          uart_txd,
  output logic [11:0]   vga_rgb,
  output logic          vga_hsync,
  output logic          vga_vsync,
  output logic          led
);

  initial begin
    assert (IMG_BYTES % 16 == 0) else $error("image size must be a whole number of AES blocks");
  end

  typedef enum logic [2:0] {S_IDLE, S_KEY, S_READ, S_ENC, S_SEND, S_DONE} state_t;

  state_t        state;
  logic [AW-1:0] base;          // first byte of the current block
  logic [4:0]    rd_cnt;        // addresses issued in this block
  logic          rd_pend;       // a read answer arrives this cycle
  logic [4:0]    tx_cnt;        // bytes handed to the UART
  block_t        plain, cipher;

  // key generator
  block_t        key_q;
  logic          key_seen, kx_start, kx_ready;
  round_keys_t   round_keys;

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

  // cipher
  logic enc_start, enc_busy, enc_done;

  aes_encrypt u_enc (
    .clk, .rst_n, .start(enc_start), .block_in(plain), .round_keys,
    .busy(enc_busy), .done(enc_done), .block_out(cipher)
  );

  // UART
  logic tick, tx_valid, tx_ready;

  uart_baud_gen #(.CLK_HZ(CLK_HZ), .BAUD_A(BAUD_A), .BAUD_B(BAUD_B)) u_baud (
    .clk, .rst_n, .baud_sel, .tick
  );

  uart_tx u_tx (
    .clk, .rst_n, .tick, .valid(tx_valid), .data(cipher[127 - 8*tx_cnt[3:0] -: 8]),
    .ready(tx_ready), .txd(uart_txd)
  );

  assign tx_valid = (state == S_SEND) && (tx_cnt < 5'd16);

  activity_led #(.BLINK_HALF_CYCLES(LED_HALF_CYCLES)) u_led (
    .clk, .rst_n, .activity(tx_valid && tx_ready), .led
  );

  // image memory
  logic          a_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [7:0]    a_rdata, b_rdata;

  assign a_we   = (state == S_IDLE) && img_wr_en;
  assign a_addr = (state == S_IDLE) ? img_wr_addr : base + AW'(rd_cnt[3:0]);

  frame_buffer #(.DEPTH(IMG_BYTES), .AW(AW)) u_mem (
    .clk, .a_we, .a_addr, .a_wdata(img_wr_data), .a_rdata, .b_addr, .b_rdata
  );

  vga_controller #(.IMG_W(IMG_W), .IMG_H(IMG_H), .CLK_DIV(CLK_DIV), .AW(AW)) u_vga (
    .clk, .rst_n, .colour_bars, .fb_addr(b_addr), .fb_data(b_rdata),
    .rgb(vga_rgb), .hsync(vga_hsync), .vsync(vga_vsync)
  );

  // transfer controller
  assign enc_start = (state == S_ENC) && !enc_busy && !enc_done && !rd_pend;
  assign busy      = (state != S_IDLE) && (state != S_DONE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      base    <= '0;
      rd_cnt  <= '0;
      rd_pend <= 1'b0;
      tx_cnt  <= '0;
      plain   <= '0;
      done    <= 1'b0;
    end else begin
      done    <= 1'b0;
      rd_pend <= 1'b0;
      if (rd_pend) plain <= {plain[119:0], a_rdata};
      unique case (state)
        S_IDLE:
          if (start) begin
            base  <= '0;
            state <= S_KEY;
          end
        S_KEY:
          if (kx_ready && !kx_start) begin
            rd_cnt <= '0;
            state  <= S_READ;
          end
        S_READ: begin
          rd_pend <= 1'b1;
          if (rd_cnt == 5'd15) state <= S_ENC;
          else rd_cnt <= rd_cnt + 1'b1;
        end
        S_ENC:
          if (enc_done) begin
            tx_cnt <= '0;
            state  <= S_SEND;
          end
        S_SEND:
          if (tx_cnt == 5'd16) begin
            if (base == AW'(IMG_BYTES - 16)) begin
              state <= S_DONE;
            end else begin
              base   <= base + AW'(16);
              rd_cnt <= '0;
              state  <= S_KEY;
            end
          end else if (tx_ready) begin
            tx_cnt <= tx_cnt + 1'b1;
          end
        S_DONE: begin
          // wait for the last frame to leave the line
          if (tx_ready) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
