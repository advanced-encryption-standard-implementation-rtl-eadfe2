// sbox_logic: the 8-bit AES S-box built only from AND and XOR gates.
//
// Four stages in series: basis change into the tower field
// GF(((2^2)^2)^2), inversion there (gf256_inv, which reduces to GF(2^2)
// operations), basis change back to GF(2^8), and the affine transformation.
// No memory is used. Purely combinational; it is the long path of the round
// logic.
module sbox_logic (
  input  logic [7:0] a,
  output logic [7:0] e
);
  logic [7:0] b, c, d;

  gf256_to_composite u_map  (.a(a), .b(b));
  gf256_inv          u_inv  (.x(b), .y(c));
  composite_to_gf256 u_imap (.c(c), .d(d));
  affine_transform   u_aff  (.d(d), .e(e));
endmodule
