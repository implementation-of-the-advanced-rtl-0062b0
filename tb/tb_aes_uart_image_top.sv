// tb_aes_uart_image_top: end-to-end test of the encrypted image link with a
// 32x4 image (64 bytes, four AES blocks), the serial pins looped back
// (through a switch that lets the testbench inject a broken frame).
//
//  1. load an image, send it at 115200 baud: the receiving frame buffer must
//     hold the image and both VGA outputs must show its first pixels;
//  2. colour-bar mode on both displays, then back;
//  3. a new image sent at 9600 baud (run-time baud switch);
//  4. a broken serial frame: counted, dropped, link still in step;
//  5. a different receiver key: the stored picture must be the reference
//     decryption of the cipher bytes under the wrong key, i.e. scrambled;
//     the key change also makes the receiver re-expand its key.
// Each mechanism's occurrences are counted and a zero count is a failure.
module tb_aes_uart_image_top;
  import tb_aes_ref_pkg::*;
  int checks = 0, failures = 0;
  localparam int W = 32, H = 4, NB = W * H / 2, AW = $clog2(NB);
  localparam logic [127:0] KEY = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  localparam logic [11:0] PAL [16] = '{12'h000, 12'h00a, 12'h0a0, 12'h0aa, 12'ha00, 12'ha0a, 12'ha50, 12'haaa,
                                      12'h555, 12'h55f, 12'h5f5, 12'h5ff, 12'hf55, 12'hf5f, 12'hff5, 12'hfff};

  logic clk = 0, rst_n = 0, baud_sel = 1, bars = 0, start = 0;
  logic [127:0] tx_key = KEY, rx_key = KEY;
  logic img_we = 0;
  logic [AW-1:0] img_addr = 0;
  logic [7:0] img_data = 0;
  logic tx_busy, tx_done, txd, rxd, inject = 0, inj_line = 1;
  logic [AW:0] rx_bytes;
  logic [15:0] rx_ferr;
  logic [11:0] t_rgb, r_rgb;
  logic t_hs, t_vs, r_hs, r_vs, t_led, r_led;
  logic [7:0] image [NB];

  assign rxd = inject ? inj_line : txd;

  aes_uart_image_top #(.IMG_W(W), .IMG_H(H), .LED_HALF_CYCLES(2000)) dut (
    .clk, .rst_n, .tx_key, .rx_key, .baud_sel, .colour_bars(bars),
    .img_wr_en(img_we), .img_wr_addr(img_addr), .img_wr_data(img_data),
    .tx_start(start), .tx_busy, .tx_done, .uart_txd(txd), .uart_rxd(rxd),
    .rx_bytes, .rx_frame_errors(rx_ferr),
    .tx_vga_rgb(t_rgb), .tx_vga_hsync(t_hs), .tx_vga_vsync(t_vs),
    .rx_vga_rgb(r_rgb), .rx_vga_hsync(r_hs), .rx_vga_vsync(r_vs), .tx_led(t_led), .rx_led(r_led));

  always #5 clk = ~clk;

  // mechanism counters
  int n_fast = 0, n_slow = 0, n_bars = 0, n_ferr = 0, n_wrongkey = 0, n_kx = 0, n_frames = 0;
  int n_tled = 0, n_rled = 0;
  logic kx_q = 0, tl_q = 0, rl_q = 0, vs_q = 1;
  always @(posedge clk) if (rst_n) begin
    kx_q <= dut.u_rx_board.kx_ready; tl_q <= t_led; rl_q <= r_led; vs_q <= r_vs;
    if (dut.u_rx_board.kx_ready && !kx_q) n_kx++;
    if (t_led && !tl_q) n_tled++;
    if (r_led && !rl_q) n_rled++;
    if (!r_vs && vs_q) n_frames++;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic load_image();
    for (int i = 0; i < NB; i++) begin
      @(negedge clk); img_we = 1; img_addr = AW'(i); img_data = 8'($urandom); image[i] = img_data;
    end
    @(negedge clk); img_we = 0;
  endtask

  task automatic send_image();
    longint c = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!tx_done && c < 20_000_000) begin @(negedge clk); c++; end
    chk(tx_done, "transfer finished");
    repeat (2000) @(negedge clk);
  endtask

  // expected picture in the receiver given the keys in use
  function automatic logic [7:0] expected_byte(input int i);
    logic [127:0] pt, ct;
    int blk = i / 16;
    for (int k = 0; k < 16; k++) pt[127 - 8*k -: 8] = image[16*blk + k];
    ct = decrypt(encrypt(pt, tx_key), rx_key);
    return ct[127 - 8*(i % 16) -: 8];
  endfunction

  task automatic check_received(input string what);
    int bad = 0;
    for (int i = 0; i < NB; i++) if (dut.u_rx_board.u_mem.mem[i] != expected_byte(i)) bad++;
    chk(bad == 0, $sformatf("%s: %0d of %0d bytes wrong", what, bad, NB));
  endtask

  // sample pixels 0..7 of line 0 (or bar centres) on both displays
  task automatic check_screens(input bit cb);
    @(negedge r_vs);
    repeat (35 * 800 * 4 + 1) @(posedge clk);
    for (int x = 0; x < 640; x++) begin
      #1;
      if (!cb && x < 8) begin
        automatic logic [11:0] e = PAL[(x % 2 != 0) ? image[x / 2][7:4] : image[x / 2][3:0]];
        chk(r_rgb == e, $sformatf("receiver pixel %0d", x));
        chk(t_rgb == e, $sformatf("transmitter pixel %0d", x));
      end
      if (cb && x % 80 == 40) begin
        automatic logic [11:0] e = (x < 80) ? 12'hfff : (x < 160) ? 12'hff0 : (x < 240) ? 12'h0ff :
                                   (x < 320) ? 12'h0f0 : (x < 400) ? 12'hf0f : (x < 480) ? 12'hf00 :
                                   (x < 560) ? 12'h00f : 12'h000;
        chk(r_rgb == e && t_rgb == e, $sformatf("colour bar at %0d", x));
      end
      repeat (4) @(posedge clk);
    end
  endtask

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1. fast transfer
    load_image();
    baud_sel = 1;
    send_image(); n_fast++;
    check_received("115200 baud transfer");
    chk(int'(rx_bytes) == NB, "receiver byte count");
    check_screens(1'b0);
    // 2. colour bars
    bars = 1; n_bars++;
    check_screens(1'b1);
    bars = 0;
    // 3. slow transfer of a new image
    load_image();
    baud_sel = 0;
    repeat (1000) @(negedge clk);
    send_image(); n_slow++;
    check_received("9600 baud transfer");
    check_screens(1'b0);
    // 4. broken frame on the line (at 9600 baud, 10417 clocks per bit)
    inject = 1;
    inj_line = 0; repeat (9 * 10417) @(negedge clk);
    inj_line = 0; repeat (10417) @(negedge clk);   // stop bit low
    inj_line = 1; repeat (3 * 10417) @(negedge clk);
    inject = 0;
    chk(rx_ferr == 16'd1, $sformatf("%0d frame errors, expected 1", rx_ferr));
    if (rx_ferr != 0) n_ferr++;
    // 5. wrong receiver key, fast again
    rx_key = rand128();
    baud_sel = 1;
    repeat (1000) @(negedge clk);
    send_image(); n_wrongkey++;
    check_received("wrong-key transfer");
    begin
      automatic int same = 0;
      for (int i = 0; i < NB; i++) if (dut.u_rx_board.u_mem.mem[i] == image[i]) same++;
      chk(same < NB / 4, $sformatf("wrong key still gives %0d correct bytes", same));
    end
    $display("mechanisms: fast=%0d slow=%0d bars=%0d frame_err=%0d wrong_key=%0d key_expansions=%0d tx_led=%0d rx_led=%0d vga_frames=%0d",
             n_fast, n_slow, n_bars, n_ferr, n_wrongkey, n_kx, n_tled, n_rled, n_frames);
    chk(n_fast > 0 && n_slow > 0 && n_bars > 0 && n_ferr > 0 && n_wrongkey > 0, "every mode exercised");
    chk(n_kx >= 2, "key generator ran at reset and on key change");
    chk(n_tled > 0 && n_rled > 0, "activity LEDs blinked");
    chk(n_frames >= 3, "VGA frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
