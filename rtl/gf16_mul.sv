// gf16_mul: multiplier in GF((2^2)^2).
//
// A 4-bit element is a pair of GF(2^2) elements {hi, lo} = {x[3:2], x[1:0]}
// in a normal basis over GF(2^2). The product uses three GF(2^2) operators:
// hi*hi and lo*lo in two gf4_mul instances, and (x_hi^x_lo)*(w_hi^w_lo)
// scaled by N in one gf4_mul_scl. That middle term is XORed into each of the
// outer products: y = {hh ^ m, m ^ ll}. Purely combinational.
module gf16_mul (
  input  logic [3:0] x,
  input  logic [3:0] w,
  output logic [3:0] y
);
  logic [1:0] p_hh, p_ll, p_m;

  gf4_mul     u_hh (.x(x[3:2]),          .y(w[3:2]),          .z(p_hh));
  gf4_mul_scl u_m  (.x(x[3:2] ^ x[1:0]), .y(w[3:2] ^ w[1:0]), .z(p_m));
  gf4_mul     u_ll (.x(x[1:0]),          .y(w[1:0]),          .z(p_ll));

  assign y = {p_hh ^ p_m, p_m ^ p_ll};
endmodule
