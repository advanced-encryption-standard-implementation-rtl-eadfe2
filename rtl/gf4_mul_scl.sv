// gf4_mul_scl: GF(2^2) multiplier followed by the GF(2^2) scaler.
//
// Same three AND gates as gf4_mul; the scaling is folded into the output XORs:
// z[1] = mid ^ lo and z[0] = hi ^ lo. The result equals gf4_scl(gf4_mul(x, y)).
// This is the "multiplier and scaler" used in the middle of the GF(2^4)
// multiplier. Purely combinational.
module gf4_mul_scl (
  input  logic [1:0] x,
  input  logic [1:0] y,
  output logic [1:0] z
);
  logic p_hi, p_mid, p_lo;

  always_comb begin
    p_hi  = x[1] & y[1];
    p_mid = (x[1] ^ x[0]) & (y[1] ^ y[0]);
    p_lo  = x[0] & y[0];
    z     = {p_mid ^ p_lo, p_hi ^ p_lo};
  end
endmodule
