// mix_column: AES mix columns on one 32-bit column.
//
// The column (s0, s1, s2, s3), s0 in bits 31:24, is multiplied over GF(2^8)
// by the circulant matrix with first row 02 03 01 01. Multiplying by 02 is a
// left shift with conditional reduction by 0x1b; 03*s is 02*s ^ s; the four
// products of each row are XORed. Purely combinational.
module mix_column (
  input  logic [31:0] s,
  output logic [31:0] b
);
  import aes_pkg::*;

  u8_t s0, s1, s2, s3;
  u8_t d0, d1, d2, d3;   // 02 * s_i

  always_comb begin
    {s0, s1, s2, s3} = s;
    d0 = xtime(s0);
    d1 = xtime(s1);
    d2 = xtime(s2);
    d3 = xtime(s3);
    b[31:24] = d0 ^ (d1 ^ s1) ^ s2 ^ s3;
    b[23:16] = s0 ^ d1 ^ (d2 ^ s2) ^ s3;
    b[15:8]  = s0 ^ s1 ^ d2 ^ (d3 ^ s3);
    b[7:0]   = (d0 ^ s0) ^ s1 ^ s2 ^ d3;
  end
endmodule
