// gf256_to_composite: change of basis from GF(2^8) (AES polynomial basis) to
// the tower field GF(((2^2)^2)^2) used by gf256_inv.
//
// An 8x8 matrix over GF(2), i.e. a fixed XOR network. The matrix is written
// with element 0 of its vectors (A0, B0) being the most significant bit of
// the byte, so the equations below work on bit-reversed copies of the ports.
// Output bits b[7:4] are the high GF(2^4) half and b[3:0] the low half.
// The matrix is the one published with this tower-field construction.
// Purely combinational.
module gf256_to_composite (
  input  logic [7:0] a,
  output logic [7:0] b
);
  // av[j] is matrix element Aj, i.e. bit 7-j of the port.
  logic [7:0] av, bv;

  assign av = {<<{a}};
  always_comb begin
    bv[0] = av[0] ^ av[1] ^ av[2] ^ av[5] ^ av[6] ^ av[7];
    bv[1] = av[1] ^ av[2] ^ av[3] ^ av[7];
    bv[2] = av[1] ^ av[2] ^ av[6] ^ av[7];
    bv[3] = av[0] ^ av[1] ^ av[2] ^ av[7];
    bv[4] = av[0] ^ av[3] ^ av[4] ^ av[6] ^ av[7];
    bv[5] = av[7];
    bv[6] = av[1] ^ av[2] ^ av[7];
    bv[7] = av[1] ^ av[4] ^ av[5] ^ av[6] ^ av[7];
  end
  assign b = {<<{bv}};
endmodule
