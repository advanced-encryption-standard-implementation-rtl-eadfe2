// gf256_inv: multiplicative inverse in GF(((2^2)^2)^2) (0 maps to 0).
//
// Same structure one level up as gf16_inv. For x = {hi, lo} (two 4-bit
// halves) the norm d = v*(hi^lo)^2 ^ hi*lo comes from a GF(2^4)
// squarer-and-scaler, a GF(2^4) multiplier and an XOR. d is inverted by the
// GF(2^4) inverter, and two more GF(2^4) multipliers give the crossed-over
// result y = {d^-1*lo, d^-1*hi}. In all: three GF(2^4) multipliers, one
// squarer-scaler, two 4-bit adders and one GF(2^4) inverter, all AND and XOR
// gates. The structure follows the reference design's inverter diagram;
// the normal-basis encoding of the halves is documented in gf4_mul.
// Purely combinational.
module gf256_inv (
  input  logic [7:0] x,
  output logic [7:0] y
);
  logic [3:0] sq, prod, norm, norm_inv, y_hi, y_lo;

  gf16_sq_scl u_sqs (.x(x[7:4] ^ x[3:0]), .y(sq));
  gf16_mul    u_nrm (.x(x[7:4]), .w(x[3:0]), .y(prod));
  assign norm = sq ^ prod;
  gf16_inv    u_inv (.x(norm), .y(norm_inv));
  gf16_mul    u_hi  (.x(norm_inv), .w(x[3:0]), .y(y_hi));
  gf16_mul    u_lo  (.x(norm_inv), .w(x[7:4]), .y(y_lo));

  assign y = {y_hi, y_lo};
endmodule
