// aes_pkg: shared types, constants and functions of the AES-128 datapath.
//
// A 128-bit block is held as in FIPS-197: the first byte of the input is
// bits [127:120], and bytes fill the 4x4 state column by column, so byte k
// (k = 0..15, counted from the most significant end) is row k%4, column k/4.
// The S-box tables are not written out: they are computed at elaboration
// from their definition, the multiplicative inverse in GF(2^8) modulo
// x^8+x^4+x^3+x+1 followed by the affine map b ^ rotl(b,1..4) ^ 0x63.
// ShiftRows and MixColumns are pure functions on a block. AES-128 (ten rounds,
// one 128-bit key) is the cipher the design uses throughout.
package aes_pkg;

  localparam int unsigned NR = 10;          // rounds of AES-128

  typedef logic [127:0] block_t;
  typedef logic [31:0]  word_t;
  typedef logic [255:0][7:0] byte_table_t;
  typedef block_t [NR:0] round_keys_t;      // round key r at index r

  // Multiply by x in GF(2^8)
  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) product, shift-and-add
  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 (0 maps to 0)
  function automatic logic [7:0] ginv(input logic [7:0] a);
    logic [7:0] r, sq;
    r  = 8'h01;
    sq = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gmul(r, sq);   // exponent 254 = 0b11111110
      sq = gmul(sq, sq);
    end
    return r;
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] b, input int n);
    return (b << n) | (b >> (8 - n));
  endfunction

  function automatic logic [7:0] affine(input logic [7:0] b);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  function automatic byte_table_t make_sbox();
    byte_table_t t;
    for (int i = 0; i < 256; i++) t[i] = affine(ginv(8'(i)));
    return t;
  endfunction

  function automatic byte_table_t make_inv_sbox();
    byte_table_t f, t;
    f = make_sbox();
    for (int i = 0; i < 256; i++) t[f[i]] = 8'(i);
    return t;
  endfunction

  // Byte k of a block, k = 0 is the most significant
  function automatic logic [7:0] get_byte(input block_t s, input int k);
    return s[127 - 8*k -: 8];
  endfunction

  // ShiftRows: row r rotates left by r columns
  function automatic block_t shift_rows(input block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*c + r) -: 8] = get_byte(s, 4*((c + r) % 4) + r);
    return o;
  endfunction

  // InvShiftRows: row r rotates right by r columns
  function automatic block_t inv_shift_rows(input block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*((c + r) % 4) + r) -: 8] = get_byte(s, 4*c + r);
    return o;
  endfunction

  function automatic word_t mix_column(input word_t w);
    logic [7:0] a0, a1, a2, a3;
    {a0, a1, a2, a3} = w;
    return {xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
            a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
            a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
            xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
  endfunction

  function automatic word_t inv_mix_column(input word_t w);
    logic [7:0] a0, a1, a2, a3;
    {a0, a1, a2, a3} = w;
    return {gmul(a0, 8'h0e) ^ gmul(a1, 8'h0b) ^ gmul(a2, 8'h0d) ^ gmul(a3, 8'h09),
            gmul(a0, 8'h09) ^ gmul(a1, 8'h0e) ^ gmul(a2, 8'h0b) ^ gmul(a3, 8'h0d),
            gmul(a0, 8'h0d) ^ gmul(a1, 8'h09) ^ gmul(a2, 8'h0e) ^ gmul(a3, 8'h0b),
            gmul(a0, 8'h0b) ^ gmul(a1, 8'h0d) ^ gmul(a2, 8'h09) ^ gmul(a3, 8'h0e)};
  endfunction

  function automatic block_t mix_columns(input block_t s);
    block_t o;
    for (int c = 0; c < 4; c++) o[127 - 32*c -: 32] = mix_column(s[127 - 32*c -: 32]);
    return o;
  endfunction

  function automatic block_t inv_mix_columns(input block_t s);
    block_t o;
    for (int c = 0; c < 4; c++) o[127 - 32*c -: 32] = inv_mix_column(s[127 - 32*c -: 32]);
    return o;
  endfunction

  // Round constant of key-expansion step i (i = 1..10)
  function automatic logic [7:0] rcon(input int i);
    logic [7:0] r;
    r = 8'h01;
    for (int k = 1; k < i; k++) r = xtime(r);
    return r;
  endfunction

endpackage
