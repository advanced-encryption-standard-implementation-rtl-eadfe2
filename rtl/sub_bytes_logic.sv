// sub_bytes_logic: 128-bit sub bytes from 16 gate-level S-boxes.
//
// Every byte of the state goes through its own sbox_logic instance, all 16
// in parallel; byte i of the input (counted from the most significant end)
// gives byte i of the output. Purely combinational.
module sub_bytes_logic (
  input  aes_pkg::state_t x,
  output aes_pkg::state_t y
);
  for (genvar i = 0; i < 16; i++) begin : g_sbox
    sbox_logic u_sbox (.a(x[8*i +: 8]), .e(y[8*i +: 8]));
  end
endmodule
