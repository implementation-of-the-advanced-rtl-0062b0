// uart_tx: UART serial transmitter, 8 data bits, no parity, one stop bit.
//
// A byte is accepted when valid and ready are both high. The line then
// carries a low start bit, the eight data bits least significant first and
// a high stop bit, each held for OVERSAMPLE ticks of the baud generator; the
// line idles high. The start bit goes out in the cycle after the byte is
// accepted and ends on the OVERSAMPLE-th tick after that, so it may be up to
// one tick (1/16 bit) short; all other bits are exactly OVERSAMPLE ticks.
// ready is high only while idle, so a frame takes just under
// 10 * OVERSAMPLE tick periods. The frame with
// start and stop bits, sent LSB first, is as the design specifies; the
// valid/ready handshake and the 8N1 format are this design's choices.
module uart_tx #(
  parameter int unsigned OVERSAMPLE = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,
  input  logic       valid,
  input  logic [7:0] data,
  output logic       ready,
  output logic       txd
);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_t;

  localparam int unsigned TW = $clog2(OVERSAMPLE);

  state_t        state;
  logic [TW-1:0] ticks;
  logic [2:0]    bit_idx;
  logic [7:0]    shreg;

  assign ready = (state == IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= IDLE;
      ticks   <= '0;
      bit_idx <= '0;
      shreg   <= '0;
      txd     <= 1'b1;
    end else begin
      unique case (state)
        IDLE: begin
          txd <= 1'b1;
          if (valid) begin
            shreg <= data;
            state <= START;
            ticks <= '0;
          end
        end
        START: begin
          txd <= 1'b0;
          if (tick) begin
            if (ticks == TW'(OVERSAMPLE - 1)) begin
              ticks   <= '0;
              bit_idx <= '0;
              state   <= DATA;
              txd     <= shreg[0];
            end else ticks <= ticks + 1'b1;
          end
        end
        DATA: begin
          txd <= shreg[0];
          if (tick) begin
            if (ticks == TW'(OVERSAMPLE - 1)) begin
              ticks <= '0;
              shreg <= {1'b0, shreg[7:1]};
              if (bit_idx == 3'd7) begin
                state <= STOP;
                txd   <= 1'b1;
              end else begin
                bit_idx <= bit_idx + 1'b1;
                txd     <= shreg[1];
              end
            end else ticks <= ticks + 1'b1;
          end
        end
        STOP: begin
          txd <= 1'b1;
          if (tick) begin
            if (ticks == TW'(OVERSAMPLE - 1)) begin
              ticks <= '0;
              state <= IDLE;
            end else ticks <= ticks + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
