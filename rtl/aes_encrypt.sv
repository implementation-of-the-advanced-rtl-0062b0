// aes_encrypt: iterative AES-128 cipher, one round per clock.
//
// A start pulse loads block_in XOR round key 0 (the initial AddRoundKey)
// into the state register. Each following clock applies one aes_round with
// round key 1..10, the tenth without MixColumns. done pulses for one cycle
// with block_out holding the ciphertext 11 cycles after start; block_out
// stays valid until the next start. start is ignored while busy. round_keys
// must be stable (the key generator ready) for the whole operation. The
// round operations are those of AES-128; the one-round-per-clock loop and
// its timing are this design's choice.
module aes_encrypt
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  block_t      block_in,
  input  round_keys_t round_keys,
  output logic        busy,
  output logic        done,
  output block_t      block_out
);

  block_t     state, round_out;
  logic [3:0] round;

  aes_round u_round (
    .state_in   (state),
    .round_key  (round_keys[round]),
    .final_round(round == 4'(NR)),
    .state_out  (round_out)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= '0;
      round <= 4'd1;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          state <= block_in ^ round_keys[0];
          round <= 4'd1;
          busy  <= 1'b1;
        end
      end else begin
        state <= round_out;
        if (round == 4'(NR)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          round <= round + 4'd1;
        end
      end
    end
  end

  assign block_out = state;

endmodule
