// affine_transform: the AES affine transformation applied after inversion.
//
// e_i = d_i ^ d_(i+4) ^ d_(i+5) ^ d_(i+6) ^ d_(i+7) ^ c_i with indices mod 8,
// bit 0 the least significant bit, and the constant c = 0x63. Each output
// bit is a 5-input XOR (inverted where c_i is 1). Purely combinational.
module affine_transform (
  input  logic [7:0] d,
  output logic [7:0] e
);
  localparam logic [7:0] C = 8'h63;

  always_comb
    for (int i = 0; i < 8; i++)
      e[i] = d[i] ^ d[(i+4)%8] ^ d[(i+5)%8] ^ d[(i+6)%8] ^ d[(i+7)%8] ^ C[i];
endmodule
