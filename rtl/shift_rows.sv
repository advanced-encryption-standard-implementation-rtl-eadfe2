// shift_rows: AES shift rows on a 128-bit state.
//
// Row r of the 4x4 state is rotated left by r bytes: y(r,c) = x(r,(c+r) mod 4).
// Row 0 is unchanged. Pure wiring with no gates, part of the round logic.
module shift_rows (
  input  aes_pkg::state_t x,
  output aes_pkg::state_t y
);
  always_comb
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        y[127 - 8*(4*c + r) -: 8] = x[127 - 8*(4*((c + r) % 4) + r) -: 8];
endmodule
