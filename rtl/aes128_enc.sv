// aes128_enc: iterative AES-128 encryption core with a gate-level S-box.
//
// One AES round per clock. The control unit (aes_control) steps through
// four states: initial add round key into Register 1, round 1, eight middle
// rounds counted by a 3-bit counter, and the final round without mix
// columns. It addresses the key ROM (key_rom) of pre-computed round keys and
// steers the registers and multiplexers of the datapath (aes_datapath).
//
// Interface: hold plain_text and raise start for one cycle (or longer) while
// the core is idle. The rising edge that samples start is the initial round
// (S0); busy is then high for the 10 round cycles, and done is high for one
// cycle after the 10th following edge, when cipher_text is valid. One
// encryption thus takes 11 clock cycles; with start held high a new one
// begins in the done cycle.
// cipher_text holds its value until the next encryption's first round.
// rst_n is a synchronous active-low reset of the control state only.
//
// The cipher key is fixed by the contents of the key ROM. SBOX_LOGIC selects
// the S-box implementation: 1 (default) composite-field logic, 0 look-up
// tables; both give the same results.
module aes128_enc #(
  parameter bit SBOX_LOGIC = 1'b1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  aes_pkg::state_t plain_text,
  output aes_pkg::state_t cipher_text,
  output logic            done,
  output logic            busy
);
  import aes_pkg::*;

  logic      en_reg1, en_reg2, sel_mux1, sel_mux2;
  key_addr_t key_addr;
  state_t    round_key;

  aes_control u_ctrl (
    .clk, .rst_n, .start,
    .en_reg1, .en_reg2, .sel_mux1, .sel_mux2,
    .key_addr, .done, .busy
  );

  key_rom u_rom (.addr(key_addr), .key(round_key));

  aes_datapath #(.SBOX_LOGIC(SBOX_LOGIC)) u_dp (
    .clk, .plain_text, .round_key,
    .en_reg1, .en_reg2, .sel_mux1, .sel_mux2,
    .state_out(cipher_text)
  );
endmodule
