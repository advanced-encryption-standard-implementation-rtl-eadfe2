// aes_pkg: types and constant functions shared by the AES-128 encryption core.
//
// The 128-bit state is carried as one vector. Byte S(r,c) of the 4x4 state
// matrix (row r, column c) is byte number 4*c+r counted from the most
// significant end, so the first input byte S(0,0) sits in bits 127:120 and
// each 32-bit column is a contiguous slice. This is the usual AES byte order
// and is the order in which the plain text is laid out in the state matrix.
//
// The functions below work in the polynomial basis of GF(2^8) with the field
// polynomial x^8 + x^4 + x^3 + x + 1 (0x11b). xtime is also used as logic in
// mix columns; the others only fill the look-up-table S-box at elaboration.
package aes_pkg;

  typedef logic [127:0] state_t;
  typedef logic [7:0]   u8_t;
  typedef logic [3:0]   key_addr_t;   // key ROM address

  // Byte S(r,c) of a state vector.
  function automatic u8_t state_byte(state_t s, int unsigned r, int unsigned c);
    return s[127 - 8*(4*c + r) -: 8];
  endfunction

  // Multiplication by x (the constant 02) in GF(2^8): shift left, then reduce.
  function automatic u8_t xtime(u8_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // AES affine transformation: e_i = d_i + d_(i+4) + d_(i+5) + d_(i+6) + d_(i+7) + c_i
  // (indices mod 8, bit 0 the least significant), c = 0x63.
  function automatic u8_t affine(u8_t d);
    u8_t e;
    for (int i = 0; i < 8; i++)
      e[i] = d[i] ^ d[(i+4)%8] ^ d[(i+5)%8] ^ d[(i+6)%8] ^ d[(i+7)%8];
    return e ^ 8'h63;
  endfunction

  typedef u8_t sbox_table_t [256];

  // The complete S-box, S(a) = affine(a^-1), for filling look-up tables at
  // elaboration. Inverses come from exponent and logarithm tables of the
  // generator 03 (powers 03^i, i = 0..254, each one 02*p ^ p from the last):
  // a^-1 = 03^(255 - log a). 0 has no inverse and maps to affine(0) = 0x63.
  function automatic sbox_table_t sbox_table();
    sbox_table_t t;
    u8_t         expt [255];
    int          logt [256];
    u8_t         p = 8'h01;
    for (int i = 0; i < 255; i++) begin
      expt[i] = p;
      logt[p] = i;
      p = xtime(p) ^ p;
    end
    t[0] = affine(8'h00);
    for (int a = 1; a < 256; a++) t[a] = affine(expt[(255 - logt[a]) % 255]);
    return t;
  endfunction

endpackage
