// gf4_scl: scaler in GF(2^2), multiplication by the constant N of the
// GF((2^2)^2) field polynomial.
//
// One XOR gate and a crossing: y[1] = x[0], y[0] = x[1] ^ x[0]. Purely
// combinational.
module gf4_scl (
  input  logic [1:0] x,
  output logic [1:0] y
);
  assign y = {x[0], x[1] ^ x[0]};
endmodule
