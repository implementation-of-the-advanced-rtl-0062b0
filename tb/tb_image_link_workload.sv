// tb_image_link_workload: the link carrying a 128x96 16-colour image
// (6,144 bytes, 384 AES blocks) at 115200 baud, pins looped back, with the
// key 2b7e151628aed2a6abf7158809cf4f3c. The image's first 16 bytes are the
// AES example message 3243f6a8885a308d313198a2e0370734, so the first 16
// bytes on the line must be the example ciphertext
// 3925841d02dc09fbdc118597196a0b32. The rest of the line must match the
// reference encryption, the receiver must rebuild the whole image, and the
// transfer must take 6,144 frames of 10 bit times (plus a small overhead).
module tb_image_link_workload;
  import tb_aes_ref_pkg::*;
  int checks = 0, failures = 0;
  localparam int W = 128, H = 96, NB = W * H / 2, AW = $clog2(NB);
  localparam int BIT = 16 * 54;
  localparam logic [127:0] KEY = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  localparam logic [127:0] MSG = 128'h3243f6a8885a308d313198a2e0370734;
  localparam logic [127:0] CT  = 128'h3925841d02dc09fbdc118597196a0b32;

  logic clk = 0, rst_n = 0, start = 0;
  logic img_we = 0;
  logic [AW-1:0] img_addr = 0;
  logic [7:0] img_data = 0;
  logic tx_busy, tx_done, line;
  logic [AW:0] rx_bytes;
  logic [15:0] rx_ferr;
  logic [11:0] t_rgb, r_rgb;
  logic t_hs, t_vs, r_hs, r_vs, t_led, r_led;
  logic [7:0] image [NB];
  logic [7:0] seen [$];

  aes_uart_image_top #(.IMG_W(W), .IMG_H(H)) dut (
    .clk, .rst_n, .tx_key(KEY), .rx_key(KEY), .baud_sel(1'b1), .colour_bars(1'b0),
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

  // line decoder
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge line);
      if (!rst_n) continue;
      repeat (BIT / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (BIT) @(posedge clk); b[i] = line; end
      repeat (BIT) @(posedge clk);
      seen.push_back(b);
    end
  end

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint cyc;
    int bad;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NB; i++) image[i] = (i < 16) ? MSG[127 - 8*i -: 8] : 8'($urandom);
    for (int i = 0; i < NB; i++) begin
      @(negedge clk); img_we = 1; img_addr = AW'(i); img_data = image[i];
    end
    @(negedge clk); img_we = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!tx_done) begin @(negedge clk); cyc++; end
    repeat (BIT) @(negedge clk);
    chk(cyc >= longint'(NB) * (10 * BIT - 54) && cyc <= longint'(NB) * (10 * BIT + 20),
        $sformatf("transfer took %0d clocks for %0d bytes", cyc, NB));
    chk(seen.size() == NB, $sformatf("%0d bytes on the line", seen.size()));
    bad = 0;
    for (int i = 0; i < 16; i++) if (i >= seen.size() || seen[i] != CT[127 - 8*i -: 8]) bad++;
    chk(bad == 0, "first block on the line is the example ciphertext");
    bad = 0;
    for (int blk = 0; blk < NB / 16; blk++) begin
      logic [127:0] pt, ct;
      for (int i = 0; i < 16; i++) pt[127 - 8*i -: 8] = image[16*blk + i];
      ct = encrypt(pt, KEY);
      for (int i = 0; i < 16; i++) if (16*blk + i >= seen.size() || seen[16*blk + i] != ct[127 - 8*i -: 8]) bad++;
    end
    chk(bad == 0, $sformatf("%0d cipher bytes differ from the reference", bad));
    bad = 0;
    for (int i = 0; i < NB; i++) if (dut.u_rx_board.u_mem.mem[i] != image[i]) bad++;
    chk(bad == 0, $sformatf("receiver: %0d of %0d bytes wrong", bad, NB));
    chk(int'(rx_bytes) == NB && rx_ferr == 0, "receiver counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
