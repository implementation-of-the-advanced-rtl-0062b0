// uart_baud_gen: run-time selectable baud-rate generator.
//
// Produces a one-cycle tick at OVERSAMPLE times the selected baud rate,
// which both the UART transmitter and receiver count: the transmitter holds
// each bit for OVERSAMPLE ticks and the receiver samples the line on them.
// baud_sel picks BAUD_A (0) or BAUD_B (1); the divisors are rounded from
// CLK_HZ at elaboration, and a change of baud_sel restarts the divider so the
// new rate takes effect within one tick period. The two rates, 9600 and
// 115200 baud, and switching between them while running come from the
// design's requirements; the 16x oversampling is this design's choice.
module uart_baud_gen #(
  parameter int unsigned CLK_HZ     = 100_000_000,
  parameter int unsigned BAUD_A     = 9600,
  parameter int unsigned BAUD_B     = 115200,
  parameter int unsigned OVERSAMPLE = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic baud_sel,
  output logic tick
);

  localparam int unsigned DIV_A = (CLK_HZ + BAUD_A * OVERSAMPLE / 2) / (BAUD_A * OVERSAMPLE);
  localparam int unsigned DIV_B = (CLK_HZ + BAUD_B * OVERSAMPLE / 2) / (BAUD_B * OVERSAMPLE);
  localparam int unsigned CW    = $clog2((DIV_A > DIV_B ? DIV_A : DIV_B) + 1);

  initial begin
    assert (DIV_A >= 2 && DIV_B >= 2) else $error("baud rate too high for CLK_HZ");
  end

  logic [CW-1:0] count, limit;
  logic          sel_q;

  assign limit = baud_sel ? CW'(DIV_B - 1) : CW'(DIV_A - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count <= '0;
      tick  <= 1'b0;
      sel_q <= 1'b0;
    end else begin
      sel_q <= baud_sel;
      if (sel_q != baud_sel || count >= limit) begin
        count <= '0;
        tick  <= (sel_q == baud_sel);
      end else begin
        count <= count + 1'b1;
        tick  <= 1'b0;
      end
    end
  end

endmodule
