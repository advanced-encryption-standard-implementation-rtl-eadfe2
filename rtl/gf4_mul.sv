// gf4_mul: multiplier in GF(2^2).
//
// Elements of GF(2^2) are two bits in the normal basis {w^2, w}: x[1] is the
// coefficient of w^2 and x[0] that of w, so 2'b11 = 1, 2'b01 = w and
// 2'b10 = w^2. Wider tower-field elements are pairs {hi, lo} of the next
// smaller field, in the same kind of normal basis. Three AND
// gates form x1&y1, (x1^x0)&(y1^y0) and x0&y0; the middle product is XORed
// into each of the outer ones to give the two result bits. This is the
// three-AND, XOR-only structure of the GF(2^2) multiplier in the design's
// gate-level S-box. Purely combinational.
module gf4_mul (
  input  logic [1:0] x,
  input  logic [1:0] y,
  output logic [1:0] z
);
  logic p_hi, p_mid, p_lo;

  always_comb begin
    p_hi  = x[1] & y[1];
    p_mid = (x[1] ^ x[0]) & (y[1] ^ y[0]);
    p_lo  = x[0] & y[0];
    z     = {p_hi ^ p_mid, p_mid ^ p_lo};
  end
endmodule
