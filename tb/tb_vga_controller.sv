// tb_vga_controller: runs the scan-out against a frame-buffer model whose
// byte at address a is a fixed hash of a. From the sync edges alone it
// works out which pixel each output belongs to and checks every visible
// pixel's colour (palette of the stored nibble, black outside the image and
// in blanking), the 800x525 timing and sync widths, and the colour-bar mode.
// A second instance shows a 64x32 image in the corner of a black screen.
module tb_vga_controller;
  import vga_pkg::rgb_t;
  int checks = 0, failures = 0;
  localparam int DIV = 4;
  localparam int LINE = 800 * DIV, FRAME = 525 * LINE;

  logic clk = 0, rst_n = 0, bars = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic logic [7:0] fbval(input int unsigned a);
    return 8'((a * 37) ^ (a >> 3) ^ 8'h5a);
  endfunction

  localparam rgb_t PAL [16] = '{12'h000, 12'h00a, 12'h0a0, 12'h0aa, 12'ha00, 12'ha0a, 12'ha50, 12'haaa,
                               12'h555, 12'h55f, 12'h5f5, 12'h5ff, 12'hf55, 12'hf5f, 12'hff5, 12'hfff};
  localparam rgb_t BARS [8] = '{12'hfff, 12'hff0, 12'h0ff, 12'h0f0, 12'hf0f, 12'hf00, 12'h00f, 12'h000};

  // full-screen instance
  logic [17:0] fa; logic [7:0] fd; rgb_t rgb; logic hs, vs;
  vga_controller dut (.clk, .rst_n, .colour_bars(bars), .fb_addr(fa), .fb_data(fd), .rgb, .hsync(hs), .vsync(vs));
  // small-image instance
  logic [9:0] sa; logic [7:0] sd; rgb_t srgb; logic shs, svs;
  vga_controller #(.IMG_W(64), .IMG_H(32)) dut_s (.clk, .rst_n, .colour_bars(1'b0), .fb_addr(sa), .fb_data(sd), .rgb(srgb), .hsync(shs), .vsync(svs));

  always #5 clk = ~clk;
  always @(posedge clk) begin fd <= fbval(32'(fa)); sd <= fbval(32'(sa)); end

  function automatic rgb_t expect_px(input int x, input int y, input int w, input int h, input bit cb);
    int idx;
    logic [7:0] b;
    if (x < 0 || x >= 640 || y < 0 || y >= 480) return 12'h000;
    if (cb) return BARS[x / 80];
    if (x >= w || y >= h) return 12'h000;
    idx = y * w + x;
    b = fbval(idx / 2);
    return PAL[(idx % 2 != 0) ? b[7:4] : b[3:0]];
  endfunction

  // check one frame of both instances, starting at a vsync falling edge
  task automatic check_frame(input bit cb);
    longint rel;
    int x, y, hs_low, vs_low, hs_period, last_hs;
    @(negedge vs);
    hs_low = 0; vs_low = 0; last_hs = -1; hs_period = 0;
    for (rel = 0; rel < longint'(FRAME); rel++) begin
      @(posedge clk); #1;
      y = int'(rel / longint'(LINE)) - 35;
      x = int'(rel % longint'(LINE)) / DIV;
      if (rel % longint'(DIV) == 1) begin
        chk(rgb == expect_px(x, y, 640, 480, cb), $sformatf("pixel %0d,%0d: %h", x, y, rgb));
        chk(srgb == expect_px(x, y, 64, 32, 1'b0), $sformatf("small pixel %0d,%0d: %h", x, y, srgb));
      end
      if (!hs) hs_low++;
      if (!vs) vs_low++;
      chk(hs == shs && vs == svs, "instances in step");
    end
    chk(hs_low == 525 * 96 * DIV, $sformatf("hsync low %0d clocks per frame", hs_low));
    chk(vs_low == 2 * LINE, $sformatf("vsync low %0d clocks", vs_low));
    chk(!vs, "next vsync falls exactly one frame later");
  endtask

  initial begin
    repeat (4 * FRAME) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    check_frame(1'b0);
    bars = 1;
    check_frame(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
