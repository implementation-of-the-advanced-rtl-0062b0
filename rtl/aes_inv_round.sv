// aes_inv_round: one AES decryption round, combinational.
//
// Follows the straightforward inverse cipher of the AES standard:
// state_out = InvMixColumns(AddRoundKey(InvSubBytes(InvShiftRows(state_in)), round_key)),
// with InvMixColumns left out when final_round is set (the last of the ten
// inverse rounds). Sixteen inverse S-boxes do the byte substitution. One
// round per combinational stage is this design's choice.
module aes_inv_round
  import aes_pkg::*;
(
  input  block_t state_in,
  input  block_t round_key,
  input  logic   final_round,
  output block_t state_out
);

  block_t shifted, sub, keyed;

  assign shifted = inv_shift_rows(state_in);

  for (genvar k = 0; k < 16; k++) begin : g_sbox
    aes_sbox #(.INVERSE(1'b1)) u_sbox (
      .in_byte (shifted[127 - 8*k -: 8]),
      .out_byte(sub[127 - 8*k -: 8])
    );
  end

  always_comb begin
    keyed     = sub ^ round_key;
    state_out = final_round ? keyed : inv_mix_columns(keyed);
  end

endmodule
