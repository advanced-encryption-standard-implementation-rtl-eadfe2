// aes_datapath: round datapath of the iterative AES-128 core.
//
// Register 1 takes plain text ^ round key (the initial add round key). MUX 1
// feeds either Register 1 (round 1) or Register 2 (rounds 2..10) into one
// combinational round: sub bytes, shift rows, mix columns. MUX 2 selects the
// mix columns output, or the shift rows output in the final round, and the
// second add round key XORs in the round key before Register 2 captures the
// result. The same key ROM word feeds both XORs; only one register is
// enabled in any cycle. Register 2 is the cipher text output.
//
// SBOX_LOGIC = 1 builds sub bytes from the gate-level composite-field
// S-boxes (the design's main configuration); 0 uses 256x8 look-up tables.
// The register, multiplexer and adder arrangement is that of the reference
// design; leaving the two registers without reset is this design's choice
// (nothing reads them before they are written). Timing: each enabled register updates on the rising clock edge;
// the critical path runs from Register 1/2 through MUX 1, sub bytes, shift
// rows, mix columns, MUX 2 and the XOR into Register 2.
module aes_datapath #(
  parameter bit SBOX_LOGIC = 1'b1
) (
  input  logic            clk,
  input  aes_pkg::state_t plain_text,
  input  aes_pkg::state_t round_key,
  input  logic            en_reg1,
  input  logic            en_reg2,
  input  logic            sel_mux1,
  input  logic            sel_mux2,
  output aes_pkg::state_t state_out
);
  import aes_pkg::*;

  state_t reg1, reg2;
  state_t ark0, mux1, sb, sr, mc, mux2, ark1;

  add_round_key u_ark0 (.s(plain_text), .k(round_key), .y(ark0));

  assign mux1 = sel_mux1 ? reg2 : reg1;

  if (SBOX_LOGIC) begin : g_sb_logic
    sub_bytes_logic u_sb (.x(mux1), .y(sb));
  end else begin : g_sb_lut
    sub_bytes_lut   u_sb (.x(mux1), .y(sb));
  end

  shift_rows    u_sr   (.x(sb), .y(sr));
  mix_columns   u_mc   (.x(sr), .y(mc));

  assign mux2 = sel_mux2 ? sr : mc;

  add_round_key u_ark1 (.s(mux2), .k(round_key), .y(ark1));

  always_ff @(posedge clk) begin
    if (en_reg1) reg1 <= ark0;
    if (en_reg2) reg2 <= ark1;
  end

  assign state_out = reg2;
endmodule
