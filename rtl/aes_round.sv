// aes_round: one AES encryption round, combinational.
//
// state_out = AddRoundKey(MixColumns(ShiftRows(SubBytes(state_in))), round_key),
// with MixColumns left out when final_round is set (round 10 of AES-128).
// Sixteen forward S-boxes do the byte substitution; ShiftRows is wiring and
// MixColumns is XOR logic from aes_pkg. The four operations and their order
// are those of the AES standard the design implements; making one round a
// single combinational stage is this design's choice.
module aes_round
  import aes_pkg::*;
(
  input  block_t state_in,
  input  block_t round_key,
  input  logic   final_round,
  output block_t state_out
);

  block_t sub, shifted, mixed;

  for (genvar k = 0; k < 16; k++) begin : g_sbox
    aes_sbox #(.INVERSE(1'b0)) u_sbox (
      .in_byte (state_in[127 - 8*k -: 8]),
      .out_byte(sub[127 - 8*k -: 8])
    );
  end

  always_comb begin
    shifted   = shift_rows(sub);
    mixed     = final_round ? shifted : mix_columns(shifted);
    state_out = mixed ^ round_key;
  end

endmodule
