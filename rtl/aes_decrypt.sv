// aes_decrypt: iterative AES-128 inverse cipher, one round per clock.
//
// A start pulse loads block_in XOR round key 10 into the state register.
// Each following clock applies one aes_inv_round with round keys 9 down to
// 0; the last of them leaves out InvMixColumns. done pulses for one cycle
// with the plaintext on block_out 11 cycles after start; block_out stays
// valid until the next start. start is ignored while busy. The inverse
// operations and key order are those of the AES standard; the loop and its
// timing are this design's choice, mirroring aes_encrypt.
module aes_decrypt
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
  logic [3:0] key_idx;     // round key used by the current inverse round

  aes_inv_round u_round (
    .state_in   (state),
    .round_key  (round_keys[key_idx]),
    .final_round(key_idx == 4'd0),
    .state_out  (round_out)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= '0;
      key_idx <= 4'(NR - 1);
      busy    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          state   <= block_in ^ round_keys[NR];
          key_idx <= 4'(NR - 1);
          busy    <= 1'b1;
        end
      end else begin
        state <= round_out;
        if (key_idx == 4'd0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          key_idx <= key_idx - 4'd1;
        end
      end
    end
  end

  assign block_out = state;

endmodule
