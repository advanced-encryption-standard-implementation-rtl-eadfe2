// aes_ref_pkg: reference models for the AES testbenches.
//
// Everything here is written independently of the RTL: GF(2^8) arithmetic
// by shift-and-add in the polynomial basis, the S-box read from the
// published AES table (tb/aes_sbox.hex), the FIPS-197 key expansion and a
// straightforward byte-array AES-128 encryption. The small tower-field
// models (GF(2^2), GF(2^4) and GF(2^8) in normal bases) are built from
// logarithms in GF(2^2) rather than from gate equations.
package aes_ref_pkg;

  typedef logic [7:0]   u8_t;
  typedef logic [127:0] blk_t;

  u8_t sbox_tab [256];

  task automatic load_sbox();
    $readmemh("tb/aes_sbox.hex", sbox_tab);
  endtask

  // ---------------- GF(2^8), polynomial basis, P = 0x11b ----------------
  function automatic u8_t pmul(u8_t a, u8_t b);
    logic [15:0] p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11b << (i - 8);
    return p[7:0];
  endfunction

  function automatic u8_t pinv(u8_t a);
    if (a == 0) return 0;
    for (int b = 1; b < 256; b++) if (pmul(a, u8_t'(b)) == 8'h01) return u8_t'(b);
    return 0;
  endfunction

  // ---------------- tower field in normal bases ----------------
  // GF(2^2): bit1 = coefficient of w^2, bit0 = coefficient of w, so
  // 2'b11 = 1, 2'b01 = w, 2'b10 = w^2. Multiply through logarithms.
  function automatic int g4log(logic [1:0] a);
    case (a)
      2'b11:   return 0;
      2'b01:   return 1;
      default: return 2;
    endcase
  endfunction
  function automatic logic [1:0] g4exp(int e);
    case (e % 3)
      0:       return 2'b11;
      1:       return 2'b01;
      default: return 2'b10;
    endcase
  endfunction
  function automatic logic [1:0] g4mul(logic [1:0] a, logic [1:0] b);
    if (a == 0 || b == 0) return 2'b00;
    return g4exp(g4log(a) + g4log(b));
  endfunction
  localparam logic [1:0] N4 = 2'b10;   // w^2, constant of GF(2^4) over GF(2^2)

  // GF(2^4) over GF(2^2), normal basis {Z^4, Z}: {hi, lo}
  function automatic logic [3:0] g16mul(logic [3:0] a, logic [3:0] b);
    logic [1:0] t;
    t = g4mul(g4mul(a[3:2] ^ a[1:0], b[3:2] ^ b[1:0]), N4);
    return {g4mul(a[3:2], b[3:2]) ^ t, g4mul(a[1:0], b[1:0]) ^ t};
  endfunction
  localparam logic [3:0] V16 = 4'b0001; // constant of GF(2^8) over GF(2^4)

  // GF(2^8) over GF(2^4), normal basis: {hi, lo}
  function automatic u8_t g256mul(u8_t a, u8_t b);
    logic [3:0] t;
    t = g16mul(g16mul(a[7:4] ^ a[3:0], b[7:4] ^ b[3:0]), V16);
    return {g16mul(a[7:4], b[7:4]) ^ t, g16mul(a[3:0], b[3:0]) ^ t};
  endfunction

  // ---------------- AES-128 ----------------
  function automatic u8_t getb(blk_t s, int i);   // byte i from the MSB end
    return s[127 - 8*i -: 8];
  endfunction

  function automatic blk_t ref_sub_bytes(blk_t s);
    blk_t y;
    for (int i = 0; i < 16; i++) y[127 - 8*i -: 8] = sbox_tab[getb(s, i)];
    return y;
  endfunction

  function automatic blk_t ref_shift_rows(blk_t s);
    u8_t m [4][4];
    blk_t y;
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) m[r][c] = getb(s, 4*c + r);
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++)
      y[127 - 8*(4*c + r) -: 8] = m[r][(c + r) % 4];
    return y;
  endfunction

  function automatic logic [31:0] ref_mix_column(logic [31:0] col);
    u8_t s [4];
    u8_t b [4];
    u8_t k [4] = '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int i = 0; i < 4; i++) s[i] = col[31 - 8*i -: 8];
    for (int r = 0; r < 4; r++) begin
      b[r] = 0;
      for (int j = 0; j < 4; j++) b[r] ^= pmul(k[(j - r + 4) % 4], s[j]);
    end
    return {b[0], b[1], b[2], b[3]};
  endfunction

  function automatic blk_t ref_mix_columns(blk_t s);
    blk_t y;
    for (int c = 0; c < 4; c++) y[127 - 32*c -: 32] = ref_mix_column(s[127 - 32*c -: 32]);
    return y;
  endfunction

  // FIPS-197 key expansion: round key r (0..10) of a 128-bit cipher key.
  function automatic blk_t ref_round_key(blk_t key, int round);
    logic [31:0] w [44];
    logic [31:0] t;
    u8_t rcon = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox_tab[t[31:24]], sbox_tab[t[23:16]], sbox_tab[t[15:8]], sbox_tab[t[7:0]]};
        t[31:24] ^= rcon;
        rcon = pmul(rcon, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    return {w[4*round], w[4*round+1], w[4*round+2], w[4*round+3]};
  endfunction

  function automatic blk_t ref_encrypt(blk_t pt, blk_t key);
    blk_t s = pt ^ ref_round_key(key, 0);
    for (int r = 1; r <= 10; r++) begin
      s = ref_shift_rows(ref_sub_bytes(s));
      if (r != 10) s = ref_mix_columns(s);
      s ^= ref_round_key(key, r);
    end
    return s;
  endfunction

  localparam blk_t FIPS_KEY = 128'h000102030405060708090a0b0c0d0e0f;
  localparam blk_t FIPS_PT  = 128'h00112233445566778899aabbccddeeff;
  localparam blk_t FIPS_CT  = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;

endpackage
