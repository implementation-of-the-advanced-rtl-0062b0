// aes_sbox: the AES byte substitution, forward (SubBytes) or inverse
// (InvSubBytes) chosen by the INVERSE parameter.
//
// The 256-entry table is a constant computed at elaboration by aes_pkg from
// the S-box definition (GF(2^8) inverse, then the affine map), so it becomes
// a 256x8 ROM / LUT function. Purely combinational: out_byte follows in_byte
// in the same cycle. The byte substitution is a named AES operation in the
// design; building it as one table per byte is this design's choice.
module aes_sbox
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  logic [7:0] in_byte,
  output logic [7:0] out_byte
);

  localparam byte_table_t TABLE = INVERSE ? make_inv_sbox() : make_sbox();

  assign out_byte = TABLE[in_byte];

endmodule
