// gf4_sq_scl: squarer and scaler in GF(2^2), y = N * x^2.
//
// Squaring in this normal basis swaps the two bits; combined with the scaler
// it leaves one XOR gate: y[1] = x[1], y[0] = x[1] ^ x[0]. Used to form the
// norm inside the GF(2^4) inverter. Purely combinational.
module gf4_sq_scl (
  input  logic [1:0] x,
  output logic [1:0] y
);
  assign y = {x[1], x[1] ^ x[0]};
endmodule
