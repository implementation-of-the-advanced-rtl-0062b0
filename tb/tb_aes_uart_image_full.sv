// tb_aes_uart_image_full: the link at its full size (640x480 16-colour
// image, 153,600 bytes, 100 MHz clock), serial pins looped back.
//
// It loads a complete image into the transmitting board and checks one
// whole VGA frame of the transmitter's display against it, pixel by pixel.
// It then sends the whole image at 115200 baud (9,600 AES blocks, about
// 1.33e9 clocks or 13.3 s of real time): the transfer time must be 153,600
// frames of 10 bit times plus a small overhead, the receiver's frame buffer
// must hold the image exactly, and one whole frame of the receiver's display
// must show it. This is a long simulation (several minutes).
module tb_aes_uart_image_full;
  int checks = 0, failures = 0;
  localparam int NB = 640 * 480 / 2, AW = 18;
  localparam int BIT = 16 * 54;
  localparam logic [11:0] PAL [16] = '{12'h000, 12'h00a, 12'h0a0, 12'h0aa, 12'ha00, 12'ha0a, 12'ha50, 12'haaa,
                                      12'h555, 12'h55f, 12'h5f5, 12'h5ff, 12'hf55, 12'hf5f, 12'hff5, 12'hfff};

  logic clk = 0, rst_n = 0, start = 0;
  logic [127:0] key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  logic img_we = 0;
  logic [AW-1:0] img_addr = 0;
  logic [7:0] img_data = 0;
  logic tx_busy, tx_done, line;
  logic [AW:0] rx_bytes;
  logic [15:0] rx_ferr;
  logic [11:0] t_rgb, r_rgb;
  logic t_hs, t_vs, r_hs, r_vs, t_led, r_led;
  logic [7:0] image [NB];

  aes_uart_image_top dut (
    .clk, .rst_n, .tx_key(key), .rx_key(key), .baud_sel(1'b1), .colour_bars(1'b0),
    .img_wr_en(img_we), .img_wr_addr(img_addr), .img_wr_data(img_data),
    .tx_start(start), .tx_busy, .tx_done, .uart_txd(line), .uart_rxd(line),
    .rx_bytes, .rx_frame_errors(rx_ferr),
    .tx_vga_rgb(t_rgb), .tx_vga_hsync(t_hs), .tx_vga_vsync(t_vs),
    .rx_vga_rgb(r_rgb), .rx_vga_hsync(r_hs), .rx_vga_vsync(r_vs), .tx_led(t_led), .rx_led(r_led));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic logic [11:0] pix(input int idx);
    return PAL[(idx % 2 != 0) ? image[idx / 2][7:4] : image[idx / 2][3:0]];
  endfunction

  initial begin
    repeat (1_400_000_000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int bad;
    time t0;
    longint cyc;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NB; i++) begin
      @(negedge clk); img_we = 1; img_addr = AW'(i); img_data = 8'($urandom); image[i] = img_data;
    end
    @(negedge clk); img_we = 0;
    // one full frame of the transmitter's display
    @(negedge t_vs);
    repeat (35 * 800 * 4 + 1) @(posedge clk);
    bad = 0;
    for (int y = 0; y < 480; y++) begin
      for (int x = 0; x < 800; x++) begin
        #1;
        if (x < 640 && t_rgb != pix(y * 640 + x)) bad++;
        if (x >= 640 && t_rgb != 12'h000) bad++;
        repeat (4) @(posedge clk);
      end
    end
    chk(bad == 0, $sformatf("transmitter frame: %0d wrong pixels", bad));
    // transfer the whole image
    @(negedge clk); start = 1;
    t0 = $time;
    @(negedge clk); start = 0;
    @(posedge tx_done);
    cyc = longint'(($time - t0) / 10);
    chk(cyc >= longint'(NB) * (10 * BIT - 54) && cyc <= longint'(NB) * (10 * BIT + 20),
        $sformatf("transfer took %0d clocks for %0d bytes", cyc, NB));
    repeat (100) @(negedge clk);
    chk(int'(rx_bytes) == NB && rx_ferr == 0, "receiver counters");
    bad = 0;
    for (int i = 0; i < NB; i++) if (dut.u_rx_board.u_mem.mem[i] != image[i]) bad++;
    chk(bad == 0, $sformatf("receiver: %0d of %0d bytes wrong", bad, NB));
    // one full frame of the receiver's display
    @(negedge r_vs);
    repeat (35 * 800 * 4 + 1) @(posedge clk);
    bad = 0;
    for (int y = 0; y < 480; y++) begin
      for (int x = 0; x < 800; x++) begin
        #1;
        if (x < 640 && r_rgb != pix(y * 640 + x)) bad++;
        if (x >= 640 && r_rgb != 12'h000) bad++;
        repeat (4) @(posedge clk);
      end
    end
    chk(bad == 0, $sformatf("receiver frame: %0d wrong pixels", bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
