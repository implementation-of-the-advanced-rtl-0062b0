// activity_led: makes serial activity visible as a blinking LED.
//
// Every activity pulse (a byte sent or received) restarts a hold timer of
// 2 * BLINK_HALF_CYCLES. While the timer runs, the LED toggles every
// BLINK_HALF_CYCLES, so a continuous transfer blinks the LED steadily, and
// it goes dark one hold time after the last byte. The blinking during a
// transfer is the design's; the rate (about 5 Hz at 100 MHz) is this
// design's choice.
module activity_led #(
  parameter int unsigned BLINK_HALF_CYCLES = 10_000_000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic activity,
  output logic led
);

  localparam int unsigned CW = $clog2(2 * BLINK_HALF_CYCLES + 1);

  logic [CW-1:0] hold;
  logic [CW-1:0] phase;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hold  <= '0;
      phase <= '0;
      led   <= 1'b0;
    end else begin
      if (activity) hold <= CW'(2 * BLINK_HALF_CYCLES);
      else if (hold != '0) hold <= hold - 1'b1;

      if (hold == '0 && !activity) begin
        phase <= '0;
        led   <= 1'b0;
      end else if (phase == CW'(BLINK_HALF_CYCLES - 1)) begin
        phase <= '0;
        led   <= ~led;
      end else begin
        phase <= phase + 1'b1;
        if (hold == '0) led <= 1'b1;   // first activity: light at once
      end
    end
  end

endmodule
