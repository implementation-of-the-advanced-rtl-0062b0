// tb_image_tx_system: loads a 32x4 16-colour image (64 bytes, four AES
// blocks) into the transmitting board, starts a transfer at 115200 baud and
// decodes the serial line independently. Every received byte must equal the
// reference AES-128 encryption of the image blocks; the transfer must take
// 64 frames of 10 bit times plus a small overhead; busy/done and the
// activity LED must behave. A second transfer after a key change must use
// the new key, and a start pulse during a transfer must be ignored.
module tb_image_tx_system;
  import tb_aes_ref_pkg::*;
  int checks = 0, failures = 0;
  localparam int W = 32, H = 4, NB = W * H / 2, AW = $clog2(NB);
  localparam int BIT = 16 * 54;    // clocks per bit at 115200 baud, 100 MHz

  logic clk = 0, rst_n = 0, start = 0, busy, done, txd, hs, vs, led;
  logic [127:0] key;
  logic img_we = 0;
  logic [AW-1:0] img_addr = 0;
  logic [7:0] img_data = 0;
  logic [11:0] rgb;
  logic [7:0] image [NB];
  logic [7:0] rx_q [$];
  int led_toggles = 0, done_pulses = 0;
  logic led_q = 0;

  image_tx_system #(.IMG_W(W), .IMG_H(H), .LED_HALF_CYCLES(2000)) dut (
    .clk, .rst_n, .key, .baud_sel(1'b1), .colour_bars(1'b0),
    .img_wr_en(img_we), .img_wr_addr(img_addr), .img_wr_data(img_data),
    .start, .busy, .done, .uart_txd(txd), .vga_rgb(rgb), .vga_hsync(hs), .vga_vsync(vs), .led);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    led_q <= led;
    if (rst_n && led != led_q) led_toggles++;
    if (rst_n && done) done_pulses++;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // serial decoder
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge txd);
      if (!rst_n) continue;
      repeat (BIT / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (BIT) @(posedge clk); b[i] = txd; end
      repeat (BIT) @(posedge clk);
      chk(txd, "stop bit");
      rx_q.push_back(b);
    end
  end

  task automatic transfer(input logic [127:0] k, output longint cycles);
    key = k;
    rx_q.delete();
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    chk(busy, "busy after start");
    repeat (5000) @(negedge clk);
    start = 1; @(negedge clk); start = 0;   // ignored: a transfer is running
    cycles += 5001;
    while (!done && cycles < 2_000_000) begin @(negedge clk); cycles++; end
    repeat (BIT) @(negedge clk);
    chk(rx_q.size() == NB, $sformatf("%0d bytes on the line, expected %0d", rx_q.size(), NB));
    for (int blk = 0; blk < NB / 16; blk++) begin
      logic [127:0] pt, ct;
      for (int i = 0; i < 16; i++) pt[127 - 8*i -: 8] = image[16*blk + i];
      ct = encrypt(pt, k);
      for (int i = 0; i < 16; i++)
        chk(16*blk + i < rx_q.size() && rx_q[16*blk + i] == ct[127 - 8*i -: 8], $sformatf("block %0d byte %0d", blk, i));
    end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint cyc;
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NB; i++) begin
      @(negedge clk); img_we = 1; img_addr = AW'(i); img_data = 8'($urandom); image[i] = img_data;
    end
    @(negedge clk); img_we = 0;
    chk(!busy && !led, "idle");
    transfer(128'h2b7e151628aed2a6abf7158809cf4f3c, cyc);
    chk(cyc >= longint'(NB) * (10 * BIT - 54) && cyc <= longint'(NB) * (10 * BIT + 100),
        $sformatf("transfer took %0d clocks", cyc));
    chk(done_pulses == 1, "one done pulse");
    chk(led_toggles > 10, $sformatf("LED blinked %0d times", led_toggles));
    transfer(rand128(), cyc);
    chk(done_pulses == 2, "second done pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
