// tb_aes_ref_pkg: an independent AES-128 reference model for the testbenches.
//
// It is written differently from the RTL on purpose: the S-box comes from
// log/antilog tables of the generator 3 and the bitwise form of the affine
// map, the state is a 4x4 byte matrix, and the key schedule works on
// 44 words. Blocks use the FIPS-197 byte order (first byte most significant).
package tb_aes_ref_pkg;

  localparam logic [7:0] C63 = 8'h63;   // affine-map constant

  function automatic logic [7:0] mul3(input logic [7:0] a);
    return a ^ {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] sbox_of(input logic [7:0] x, input bit inverse);
    logic [7:0] alog [256];
    int         lg   [256];
    logic [7:0] inv, b, s;
    logic [7:0] v;
    v = 8'h01;
    for (int i = 0; i < 255; i++) begin
      alog[i] = v;
      lg[v]   = i;
      v       = mul3(v);
    end
    if (!inverse) begin
      inv = (x == 0) ? 8'h00 : alog[(255 - lg[x]) % 255];
      b   = inv;
      for (int i = 0; i < 8; i++)
        s[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8] ^ C63[i];
      return s;
    end else begin
      for (int y = 0; y < 256; y++)
        if (sbox_of(8'(y), 1'b0) == x) return 8'(y);
      return 8'h00;
    end
  endfunction

  function automatic logic [7:0] gm(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p = 0;
    logic [7:0] x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = {x[6:0], 1'b0} ^ (x[7] ? 8'h1b : 8'h00);
    end
    return p;
  endfunction

  // all 44 key words
  function automatic void expand(input logic [127:0] key, output logic [31:0] w [44]);
    logic [7:0] rc = 8'h01;
    logic [31:0] t;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox_of(t[31:24],0), sbox_of(t[23:16],0), sbox_of(t[15:8],0), sbox_of(t[7:0],0)};
        t[31:24] ^= rc;
        rc = gm(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
  endfunction

  function automatic logic [127:0] round_key(input logic [127:0] key, input int r);
    logic [31:0] w [44];
    expand(key, w);
    return {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  // state as s[row][col]
  typedef logic [7:0] st_t [4][4];

  function automatic st_t to_st(input logic [127:0] b);
    st_t s;
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) s[r][c] = b[127 - 8*(4*c + r) -: 8];
    return s;
  endfunction

  function automatic logic [127:0] from_st(input st_t s);
    logic [127:0] b;
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) b[127 - 8*(4*c + r) -: 8] = s[r][c];
    return b;
  endfunction

  function automatic logic [127:0] enc_round(input logic [127:0] in, input logic [127:0] rk, input bit last);
    st_t s = to_st(in), t;
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) t[r][c] = sbox_of(s[r][(c + r) % 4], 0);
    if (!last)
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++)
          s[r][c] = gm(t[r][c], 2) ^ gm(t[(r+1)%4][c], 3) ^ t[(r+2)%4][c] ^ t[(r+3)%4][c];
    else s = t;
    return from_st(s) ^ rk;
  endfunction

  function automatic logic [127:0] dec_round(input logic [127:0] in, input logic [127:0] rk, input bit last);
    st_t s = to_st(in), t;
    logic [127:0] k;
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) t[r][(c + r) % 4] = sbox_of(s[r][c], 1);
    k = from_st(t) ^ rk;
    if (last) return k;
    t = to_st(k);
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        s[r][c] = gm(t[r][c], 8'h0e) ^ gm(t[(r+1)%4][c], 8'h0b) ^ gm(t[(r+2)%4][c], 8'h0d) ^ gm(t[(r+3)%4][c], 8'h09);
    return from_st(s);
  endfunction

  function automatic logic [127:0] encrypt(input logic [127:0] pt, input logic [127:0] key);
    logic [127:0] s = pt ^ round_key(key, 0);
    for (int r = 1; r <= 10; r++) s = enc_round(s, round_key(key, r), r == 10);
    return s;
  endfunction

  function automatic logic [127:0] decrypt(input logic [127:0] ct, input logic [127:0] key);
    logic [127:0] s = ct ^ round_key(key, 10);
    for (int r = 9; r >= 0; r--) s = dec_round(s, round_key(key, r), r == 0);
    return s;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
