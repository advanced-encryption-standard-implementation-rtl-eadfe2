// composite_to_gf256: change of basis from GF(((2^2)^2)^2) back to the AES
// polynomial basis of GF(2^8); the inverse of gf256_to_composite.
//
// An 8x8 XOR network, indexed like gf256_to_composite (matrix bit 0 = most
// significant bit of the byte). The matrix is the exact inverse over GF(2)
// of the forward matrix, so the pair maps every byte back to itself. Purely
// combinational.
module composite_to_gf256 (
  input  logic [7:0] c,
  output logic [7:0] d
);
  // cv[j] is matrix element Cj, i.e. bit 7-j of the port.
  logic [7:0] cv, dv;

  assign cv = {<<{c}};
  always_comb begin
    dv[0] = cv[3] ^ cv[6];
    dv[1] = cv[0] ^ cv[1] ^ cv[2] ^ cv[4] ^ cv[6] ^ cv[7];
    dv[2] = cv[0] ^ cv[1] ^ cv[2] ^ cv[4] ^ cv[5] ^ cv[7];
    dv[3] = cv[1] ^ cv[6];
    dv[4] = cv[1] ^ cv[2] ^ cv[3] ^ cv[4] ^ cv[5] ^ cv[6];
    dv[5] = cv[0] ^ cv[2] ^ cv[3] ^ cv[6];
    dv[6] = cv[2] ^ cv[6];
    dv[7] = cv[5];
  end
  assign d = {<<{dv}};
endmodule
