// aes_control: control unit of the iterative AES-128 core.
//
// A four-state Moore machine with a 3-bit round counter, one AES round per
// clock:
//   S0  initial round: Register 1 <= plain text ^ key 0      (key addr 1111)
//   S1  round 1:       Register 2 <= round(Register 1) ^ key 1 (addr 1110)
//   S2  rounds 2..9:   Register 2 <= round(Register 2) ^ key n, eight
//                      cycles; the counter (0..7) is the key address
//   S3  round 10:      Register 2 <= final round(Register 2) ^ key 10
//                      (mix columns bypassed through MUX 2, addr 1000)
// then back to S0. The outputs in each state are those of the state table:
// en_reg1 only in S0, en_reg2 in S1..S3, sel_mux1 (feedback from Register 2)
// in S2 and S3, sel_mux2 (skip mix columns) only in S3. The counter runs only
// in S2 and is held at zero otherwise.
//
// Own choices: S0 waits there until start is high (Register 1 keeps loading
// while it waits, so the plain text sampled with start is the one encrypted);
// done is a registered one-cycle pulse in the cycle after S3, when Register 2
// holds the cipher text; busy is high in S1..S3. An encryption takes 11
// cycles, the S0 cycle in which start is sampled included; done is high in
// the cycle after the last of them.
module aes_control (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  output logic               en_reg1,
  output logic               en_reg2,
  output logic               sel_mux1,
  output logic               sel_mux2,
  output aes_pkg::key_addr_t key_addr,
  output logic               done,
  output logic               busy
);
  import aes_pkg::*;

  typedef enum logic [1:0] {S0, S1, S2, S3} state_e;

  // Key ROM addresses; rounds 2..9 use 0000..0111, the counter itself.
  localparam key_addr_t KEY_ADDR_ROUND0  = 4'b1111;
  localparam key_addr_t KEY_ADDR_ROUND1  = 4'b1110;
  localparam key_addr_t KEY_ADDR_ROUND10 = 4'b1000;

  state_e     state, state_nxt;
  logic [2:0] count;

  always_comb begin
    unique case (state)
      S0:      state_nxt = start ? S1 : S0;
      S1:      state_nxt = S2;
      S2:      state_nxt = (count == 3'd7) ? S3 : S2;
      S3:      state_nxt = S0;
      default: state_nxt = S0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S0;
      count <= '0;
      done  <= 1'b0;
    end else begin
      state <= state_nxt;
      count <= (state == S2) ? count + 3'd1 : 3'd0;
      done  <= (state == S3);
    end
  end

  always_comb begin
    en_reg1  = (state == S0);
    en_reg2  = (state != S0);
    sel_mux1 = (state == S2) || (state == S3);
    sel_mux2 = (state == S3);
    busy     = (state != S0);
    unique case (state)
      S0:      key_addr = KEY_ADDR_ROUND0;
      S1:      key_addr = KEY_ADDR_ROUND1;
      S2:      key_addr = {1'b0, count};
      default: key_addr = KEY_ADDR_ROUND10;
    endcase
  end

`ifndef SYNTHESIS
  // The counter is off (zero) outside S2, and S2 lasts exactly eight cycles.
  a_count_off: assert property (@(posedge clk) disable iff (!rst_n)
                                state != S2 |-> count == 3'd0);
  a_s2_to_s3:  assert property (@(posedge clk) disable iff (!rst_n)
                                state == S2 && count == 3'd7 |=> state == S3);
  a_done_after_s3: assert property (@(posedge clk) disable iff (!rst_n)
                                 done |-> $past(state) == S3);
`endif
endmodule
