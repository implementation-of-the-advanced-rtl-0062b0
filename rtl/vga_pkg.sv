// vga_pkg: timing constants of the 640x480, 60 Hz VGA mode and the
// 16-colour palette used to turn a 4-bit pixel into 12-bit RGB (4 bits per
// colour, the width of a 4:4:4 resistor DAC).
//
// Timing (in pixel clocks of 25 MHz, nominally 25.175 MHz): 640 visible +
// 16 front porch + 96 sync + 48 back porch = 800 per line; 480 visible + 10
// + 2 + 33 = 525 lines per frame; both syncs active low. The palette is the
// classic 16-colour text-mode palette. Resolution, refresh rate and the
// 16 colours are the design's; the exact porches and palette are the
// standard ones, chosen here.
package vga_pkg;

  localparam int unsigned H_ACTIVE = 640;
  localparam int unsigned H_FP     = 16;
  localparam int unsigned H_SYNC   = 96;
  localparam int unsigned H_BP     = 48;
  localparam int unsigned H_TOTAL  = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_ACTIVE = 480;
  localparam int unsigned V_FP     = 10;
  localparam int unsigned V_SYNC   = 2;
  localparam int unsigned V_BP     = 33;
  localparam int unsigned V_TOTAL  = V_ACTIVE + V_FP + V_SYNC + V_BP;

  typedef logic [11:0] rgb_t;   // {red[3:0], green[3:0], blue[3:0]}

  function automatic rgb_t palette(input logic [3:0] idx);
    unique case (idx)
      4'd0:  return 12'h000;  // black
      4'd1:  return 12'h00a;  // blue
      4'd2:  return 12'h0a0;  // green
      4'd3:  return 12'h0aa;  // cyan
      4'd4:  return 12'ha00;  // red
      4'd5:  return 12'ha0a;  // magenta
      4'd6:  return 12'ha50;  // brown
      4'd7:  return 12'haaa;  // light grey
      4'd8:  return 12'h555;  // dark grey
      4'd9:  return 12'h55f;  // light blue
      4'd10: return 12'h5f5;  // light green
      4'd11: return 12'h5ff;  // light cyan
      4'd12: return 12'hf55;  // light red
      4'd13: return 12'hf5f;  // light magenta
      4'd14: return 12'hff5;  // yellow
      default: return 12'hfff; // white
    endcase
  endfunction

  // Eight vertical test bars, each H_ACTIVE/8 wide
  function automatic rgb_t colour_bar(input int unsigned bar);
    unique case (bar)
      0: return 12'hfff;  // white
      1: return 12'hff0;  // yellow
      2: return 12'h0ff;  // cyan
      3: return 12'h0f0;  // green
      4: return 12'hf0f;  // magenta
      5: return 12'hf00;  // red
      6: return 12'h00f;  // blue
      default: return 12'h000; // black
    endcase
  endfunction

endpackage
