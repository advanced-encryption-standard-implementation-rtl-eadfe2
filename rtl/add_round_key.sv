// add_round_key: XOR of the 128-bit state with a 128-bit round key.
//
// Addition in GF(2^8) per byte is a bitwise XOR, so this is 128 XOR gates;
// it is its own inverse. Purely combinational.
module add_round_key (
  input  aes_pkg::state_t s,
  input  aes_pkg::state_t k,
  output aes_pkg::state_t y
);
  assign y = s ^ k;
endmodule
