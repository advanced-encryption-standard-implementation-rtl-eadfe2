// sub_bytes_lut: 128-bit sub bytes from 16 parallel 256x8 look-up tables.
//
// This is the faster, memory-based alternative to sub_bytes_logic. The
// table is a constant array filled at elaboration (aes_pkg::sbox_table) from
// S(a) = affine(a^-1) in GF(2^8) with polynomial 0x11b, 0 mapping to 0x63,
// which gives the standard AES S-box. Each byte of the state indexes its own
// copy. Read asynchronously and purely combinational, so it maps to ROM or
// LUT logic.
module sub_bytes_lut (
  input  aes_pkg::state_t x,
  output aes_pkg::state_t y
);
  import aes_pkg::*;

  localparam sbox_table_t SBOX = sbox_table();

  for (genvar i = 0; i < 16; i++) begin : g_lut
    assign y[8*i +: 8] = SBOX[x[8*i +: 8]];
  end
endmodule
