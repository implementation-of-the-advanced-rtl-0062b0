// tb_image_rx_system: sends the reference AES-128 encryption of a random
// 32x4 16-colour image (64 bytes, four blocks) to the receiving board as
// 115200-baud serial frames and checks that its frame buffer then holds the
// plain image, that each block is stored within 40 clocks of its last stop
// bit, that a frame with a bad stop bit is counted and dropped, and that
// the VGA output shows the image's first pixels in the palette colours.
module tb_image_rx_system;
  import tb_aes_ref_pkg::*;
  int checks = 0, failures = 0;
  localparam int W = 32, H = 4, NB = W * H / 2, AW = $clog2(NB);
  localparam int BIT = 16 * 54;

  logic clk = 0, rst_n = 0, rxd = 1, hs, vs, led;
  logic [127:0] key = 128'h000102030405060708090a0b0c0d0e0f;
  logic [AW:0] nbytes;
  logic [15:0] ferr;
  logic [11:0] rgb;
  logic [7:0] image [NB];

  image_rx_system #(.IMG_W(W), .IMG_H(H), .LED_HALF_CYCLES(2000)) dut (
    .clk, .rst_n, .key, .baud_sel(1'b1), .colour_bars(1'b0), .uart_rxd(rxd),
    .bytes_rx(nbytes), .frame_errors(ferr), .vga_rgb(rgb), .vga_hsync(hs), .vga_vsync(vs), .led);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic send(input logic [7:0] b, input logic stop);
    rxd = 0; repeat (BIT) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (BIT) @(negedge clk); end
    rxd = stop; repeat (BIT) @(negedge clk);
    rxd = 1;
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  localparam logic [11:0] PAL [16] = '{12'h000, 12'h00a, 12'h0a0, 12'h0aa, 12'ha00, 12'ha0a, 12'ha50, 12'haaa,
                                      12'h555, 12'h55f, 12'h5f5, 12'h5ff, 12'hf55, 12'hf5f, 12'hff5, 12'hfff};

  initial begin
    int wait_c;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NB; i++) image[i] = 8'($urandom);
    for (int blk = 0; blk < NB / 16; blk++) begin
      logic [127:0] pt, ct;
      for (int i = 0; i < 16; i++) pt[127 - 8*i -: 8] = image[16*blk + i];
      ct = encrypt(pt, key);
      for (int i = 0; i < 16; i++) send(ct[127 - 8*i -: 8], 1'b1);
      wait_c = 0;
      while (int'(nbytes) != 16 * (blk + 1) && wait_c < 1000) begin @(negedge clk); wait_c++; end
      chk(wait_c <= 40, $sformatf("block %0d stored %0d clocks after its last stop bit", blk, wait_c));
      if (blk == 1) begin
        send(8'h77, 1'b0);   // broken frame between blocks
        chk(ferr == 16'd1, "frame error counted");
      end
    end
    for (int i = 0; i < NB; i++) chk(dut.u_mem.mem[i] == image[i], $sformatf("image byte %0d", i));
    chk(int'(nbytes) == NB, "byte count");
    // first visible line: pixels 0..7 of the image
    @(negedge vs);
    repeat (35 * 800 * 4 + 1) @(posedge clk);
    for (int x = 0; x < 8; x++) begin
      #1;
      chk(rgb == PAL[(x % 2 != 0) ? image[x / 2][7:4] : image[x / 2][3:0]], $sformatf("VGA pixel %0d", x));
      repeat (4) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
