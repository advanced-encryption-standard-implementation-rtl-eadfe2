// gf16_sq_scl: squarer and scaler in GF((2^2)^2), y = v * x^2 where v is the
// constant of the GF(((2^2)^2)^2) field polynomial.
//
// With x = {hi, lo}: the high output is the GF(2^2) square of hi ^ lo, the low
// output is the GF(2^2) square of the scaled low half. A GF(2^2) square is a
// swap of the two bits, so the only gates are two XOR pairs (the adder and
// the one inside gf4_scl). Purely combinational.
module gf16_sq_scl (
  input  logic [3:0] x,
  output logic [3:0] y
);
  logic [1:0] sum, scaled;

  assign sum = x[3:2] ^ x[1:0];
  gf4_scl u_scl (.x(x[1:0]), .y(scaled));

  // GF(2^2) squarer: swap the two bits.
  assign y = {sum[0], sum[1], scaled[0], scaled[1]};
endmodule
