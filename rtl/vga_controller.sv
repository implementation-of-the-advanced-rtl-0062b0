// vga_controller: 640x480 60 Hz VGA scan-out of a 16-colour image.
//
// A pixel enable every CLK_DIV clocks (25 MHz from 100 MHz) advances the
// horizontal (0..799) and vertical (0..524) counters of vga_pkg. The byte
// holding the pixel at the current counters is addressed on fb_addr
// (pixel index y*IMG_W+x, two pixels per byte, even pixel in the low
// nibble); the synchronous frame buffer answers within the CLK_DIV clocks
// of that pixel, and at the next pixel enable the pixel's colour and the
// syncs are registered together, so rgb, hsync and vsync stay aligned and
// lag the counters by one pixel. Pixels outside the IMG_W x IMG_H image
// (placed at the top left) and the blanking intervals are black. With
// colour_bars high the screen shows eight vertical test bars instead of
// the image. 640x480, 60 Hz, 16 colours and the colour-bar screen are the
// design's; the timing standard, palette and layout are chosen here.
module vga_controller
  import vga_pkg::*;
#(
  parameter int unsigned IMG_W   = 640,
  parameter int unsigned IMG_H   = 480,
  parameter int unsigned CLK_DIV = 4,
  parameter int unsigned AW      = $clog2(IMG_W * IMG_H / 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          colour_bars,
  output logic [AW-1:0] fb_addr,
  input  logic [7:0]    fb_data,
  output rgb_t          rgb,
  output logic          hsync,
  output logic          vsync
);

  localparam int unsigned DW = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;

  initial begin
    assert (CLK_DIV >= 2) else $error("CLK_DIV must leave a clock for the frame-buffer read");
    assert (IMG_W <= H_ACTIVE && IMG_H <= V_ACTIVE && IMG_W % 2 == 0) else $error("image does not fit the screen");
  end

  logic [DW-1:0] div;
  logic          pix_en;
  logic [9:0]    hcnt, vcnt;
  logic [AW:0]   pix_idx;
  logic          in_image, visible;
  rgb_t          colour;

  assign pix_en = (div == DW'(CLK_DIV - 1));

  always_comb begin
    visible  = (hcnt < 10'(H_ACTIVE)) && (vcnt < 10'(V_ACTIVE));
    in_image = (hcnt < 10'(IMG_W)) && (vcnt < 10'(IMG_H));
    pix_idx  = (AW+1)'(vcnt) * (AW+1)'(IMG_W) + (AW+1)'(hcnt);
    fb_addr  = in_image ? pix_idx[AW:1] : '0;
    if (!visible)         colour = '0;
    else if (colour_bars) colour = colour_bar(int'(hcnt) / (H_ACTIVE / 8));
    else if (in_image)    colour = palette(pix_idx[0] ? fb_data[7:4] : fb_data[3:0]);
    else                  colour = '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      div   <= '0;
      hcnt  <= '0;
      vcnt  <= '0;
      rgb   <= '0;
      hsync <= 1'b1;
      vsync <= 1'b1;
    end else begin
      div <= pix_en ? '0 : div + 1'b1;
      if (pix_en) begin
        rgb   <= colour;
        hsync <= !((hcnt >= 10'(H_ACTIVE + H_FP)) && (hcnt < 10'(H_ACTIVE + H_FP + H_SYNC)));
        vsync <= !((vcnt >= 10'(V_ACTIVE + V_FP)) && (vcnt < 10'(V_ACTIVE + V_FP + V_SYNC)));
        if (hcnt == 10'(H_TOTAL - 1)) begin
          hcnt <= '0;
          vcnt <= (vcnt == 10'(V_TOTAL - 1)) ? '0 : vcnt + 1'b1;
        end else begin
          hcnt <= hcnt + 1'b1;
        end
      end
    end
  end

endmodule
