// mix_columns: AES mix columns on the 128-bit state.
//
// Four mix_column units in parallel, one per 32-bit column of the state
// (column 0 in bits 127:96). Purely combinational.
module mix_columns (
  input  aes_pkg::state_t x,
  output aes_pkg::state_t y
);
  for (genvar c = 0; c < 4; c++) begin : g_col
    mix_column u_col (.s(x[127 - 32*c -: 32]), .b(y[127 - 32*c -: 32]));
  end
endmodule
