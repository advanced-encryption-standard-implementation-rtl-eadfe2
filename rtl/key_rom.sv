// key_rom: 16 x 128-bit read-only memory of pre-computed round keys.
//
// The core has no key expansion logic: the eleven AES-128 round keys of one
// fixed cipher key (000102030405060708090a0b0c0d0e0f) are stored here and
// selected by a 4-bit address from the control unit. Address map:
//   0000..0111  round keys 2..9 (the round counter drives these)
//   1000        round key 10 (final round)
//   1110        round key 1
//   1111        round key 0 (initial add round key)
//   1001..1101  unused, read as zero
// The address map and contents are those of the reference design. The
// asynchronous read (the key follows the address in the same cycle) is this
// design's choice, since no register sits between the ROM and the round
// XORs. To use another cipher key, replace the eleven words with its
// FIPS-197 key expansion.
module key_rom (
  input  aes_pkg::key_addr_t addr,
  output aes_pkg::state_t    key
);
  always_comb begin
    unique case (addr)
      4'b0000: key = 128'hb692cf0b643dbdf1be9bc5006830b3fe;  // round 2
      4'b0001: key = 128'hb6ff744ed2c2c9bf6c590cbf0469bf41;  // round 3
      4'b0010: key = 128'h47f7f7bc95353e03f96c32bcfd058dfd;  // round 4
      4'b0011: key = 128'h3caaa3e8a99f9deb50f3af57adf622aa;  // round 5
      4'b0100: key = 128'h5e390f7df7a69296a7553dc10aa31f6b;  // round 6
      4'b0101: key = 128'h14f9701ae35fe28c440adf4d4ea9c026;  // round 7
      4'b0110: key = 128'h47438735a41c65b9e016baf4aebf7ad2;  // round 8
      4'b0111: key = 128'h549932d1f08557681093ed9cbe2c974e;  // round 9
      4'b1000: key = 128'h13111d7fe3944a17f307a78b4d2b30c5;  // round 10
      4'b1110: key = 128'hd6aa74fdd2af72fadaa678f1d6ab76fe;  // round 1
      4'b1111: key = 128'h000102030405060708090a0b0c0d0e0f;  // round 0
      default: key = '0;                                       // not used
    endcase
  end
endmodule
