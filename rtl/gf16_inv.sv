// gf16_inv: multiplicative inverse in GF((2^2)^2) (0 maps to 0).
//
// For x = {hi, lo} the norm d = N*(hi^lo)^2 ^ hi*lo is formed with a GF(2^2)
// squarer-and-scaler, a GF(2^2) multiplier and an XOR. d is inverted in
// GF(2^2), which is a swap of its two bits and needs no gates. Two further
// GF(2^2) multipliers give d^-1*hi and d^-1*lo, and the halves cross over:
// y = {d^-1*lo, d^-1*hi}. Purely combinational.
module gf16_inv (
  input  logic [3:0] x,
  output logic [3:0] y
);
  logic [1:0] sq, prod, norm, norm_inv, y_hi, y_lo;

  gf4_sq_scl u_sqs (.x(x[3:2] ^ x[1:0]), .y(sq));
  gf4_mul    u_nrm (.x(x[3:2]), .y(x[1:0]), .z(prod));
  assign norm     = sq ^ prod;
  assign norm_inv = {norm[0], norm[1]};       // GF(2^2) inversion: swap
  gf4_mul    u_hi  (.x(norm_inv), .y(x[1:0]), .z(y_hi));
  gf4_mul    u_lo  (.x(norm_inv), .y(x[3:2]), .z(y_lo));

  assign y = {y_hi, y_lo};
endmodule
