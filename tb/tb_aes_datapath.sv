// tb_aes_datapath: drives the datapath controls by hand in the order of the
// state table (S0, S1, eight S2 cycles, S3) with round keys from the
// reference key expansion, for both S-box implementations side by side.
// After every round Register 2 is compared with the reference round result;
// the FIPS-197 example is also checked against the printed values after
// rounds 1 and 2 and the final cipher text. Random plain texts under random
// keys follow. Also checks that Register 2 holds while its enable is low.
module tb_aes_datapath;
  import aes_ref_pkg::*;
  logic clk = 0;
  blk_t plain_text, round_key, out_logic, out_lut;
  logic en_reg1, en_reg2, sel_mux1, sel_mux2;
  int checks = 0, failures = 0;

  aes_datapath #(.SBOX_LOGIC(1'b1)) dut_logic (.clk, .plain_text, .round_key,
    .en_reg1, .en_reg2, .sel_mux1, .sel_mux2, .state_out(out_logic));
  aes_datapath #(.SBOX_LOGIC(1'b0)) dut_lut   (.clk, .plain_text, .round_key,
    .en_reg1, .en_reg2, .sel_mux1, .sel_mux2, .state_out(out_lut));

  always #5 clk = ~clk;

  task automatic check(blk_t expv, string what);
    checks++;
    if (out_logic !== expv || out_lut !== expv) begin
      failures++;
      $display("FAIL %s: logic %h lut %h exp %h", what, out_logic, out_lut, expv);
    end
  endtask

  task automatic cycle(logic e1, logic e2, logic m1, logic m2, blk_t k);
    {en_reg1, en_reg2, sel_mux1, sel_mux2} = {e1, e2, m1, m2};
    round_key = k;
    @(posedge clk);
    #1;
  endtask

  task automatic encrypt(blk_t pt, blk_t key, bit fips);
    blk_t s;
    plain_text = pt;
    cycle(1, 0, 0, 0, ref_round_key(key, 0));                      // S0
    s = pt ^ ref_round_key(key, 0);
    cycle(0, 1, 0, 0, ref_round_key(key, 1));                      // S1
    s = ref_mix_columns(ref_shift_rows(ref_sub_bytes(s))) ^ ref_round_key(key, 1);
    check(s, "round 1");
    if (fips) check(128'h89d810e8855ace682d1843d8cb128fe4, "printed round 1");
    for (int r = 2; r <= 9; r++) begin                             // S2
      cycle(0, 1, 1, 0, ref_round_key(key, r));
      s = ref_mix_columns(ref_shift_rows(ref_sub_bytes(s))) ^ ref_round_key(key, r);
      check(s, $sformatf("round %0d", r));
      if (fips && r == 2) check(128'h4915598f55e5d7a0daca94fa1f0a63f7, "printed round 2");
    end
    cycle(0, 1, 1, 1, ref_round_key(key, 10));                     // S3
    s = ref_shift_rows(ref_sub_bytes(s)) ^ ref_round_key(key, 10);
    check(s, "round 10");
    check(ref_encrypt(pt, key), "cipher text");
    if (fips) check(FIPS_CT, "printed cipher text");
    // Register 2 must hold while only Register 1 is enabled.
    plain_text = ~pt;
    cycle(1, 0, 0, 0, '1);
    check(s, "hold");
  endtask

  initial begin
    load_sbox();
    encrypt(FIPS_PT, FIPS_KEY, 1);
    repeat (10)
      encrypt({$urandom, $urandom, $urandom, $urandom},
              {$urandom, $urandom, $urandom, $urandom}, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
