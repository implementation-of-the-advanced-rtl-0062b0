// uart_rx: UART serial receiver, 8 data bits, no parity, one stop bit.
//
// The line passes a two-flop synchroniser. In idle, a low level seen on a
// tick starts a frame; half a bit later the start bit is checked again (a
// glitch returns to idle), and from then on the line is sampled every
// OVERSAMPLE ticks, i.e. at the centre of each bit: eight data bits, least
// significant first, then the stop bit. A high stop bit gives a one-cycle
// valid pulse with the byte on data; a low one gives a frame_err pulse
// instead and the byte is dropped. The frame format follows the design's
// serial link (start bit, LSB first, stop bit); centre sampling with 16x
// oversampling and the error handling are this design's choices.
module uart_rx #(
  parameter int unsigned OVERSAMPLE = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,
  input  logic       rxd,
  output logic       valid,
  output logic [7:0] data,
  output logic       frame_err
);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_t;

  localparam int unsigned TW = $clog2(OVERSAMPLE);

  state_t        state;
  logic [TW-1:0] ticks;
  logic [2:0]    bit_idx;
  logic [7:0]    shreg;
  logic          rx_meta, rx_s;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_meta   <= 1'b1;
      rx_s      <= 1'b1;
      state     <= IDLE;
      ticks     <= '0;
      bit_idx   <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      rx_meta   <= rxd;
      rx_s      <= rx_meta;
      valid     <= 1'b0;
      frame_err <= 1'b0;
      if (tick) begin
        unique case (state)
          IDLE:
            if (!rx_s) begin
              state <= START;
              ticks <= '0;
            end
          START:
            if (ticks == TW'(OVERSAMPLE / 2 - 1)) begin
              ticks   <= '0;
              bit_idx <= '0;
              state   <= rx_s ? IDLE : DATA;
            end else ticks <= ticks + 1'b1;
          DATA:
            if (ticks == TW'(OVERSAMPLE - 1)) begin
              ticks <= '0;
              shreg <= {rx_s, shreg[7:1]};
              if (bit_idx == 3'd7) state <= STOP;
              else bit_idx <= bit_idx + 1'b1;
            end else ticks <= ticks + 1'b1;
          STOP:
            if (ticks == TW'(OVERSAMPLE - 1)) begin
              ticks <= '0;
              state <= IDLE;
              if (rx_s) begin
                valid <= 1'b1;
                data  <= shreg;
              end else begin
                frame_err <= 1'b1;
              end
            end else ticks <= ticks + 1'b1;
          default: state <= IDLE;
        endcase
      end
    end
  end

endmodule
