// tb_aes128_enc_rounds: round-by-round trace of the FIPS-197 example on the
// default core. After the initial round Register 1 must hold plain text XOR
// key 0; after each of rounds 1..10 Register 2 (the cipher_text port) must
// hold the state printed below, the published intermediate values of this
// example. It also checks in which control state each round ran: round 1 in
// S1 (MUX 1 on Register 1), rounds 2..9 in S2, round 10 in S3 (MixColumns
// bypassed), and that the whole block takes 11 cycles.
module tb_aes128_enc_rounds;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  blk_t plain_text, cipher_text;
  logic done, busy;
  int checks = 0, failures = 0;

  aes128_enc dut (.clk, .rst_n, .start, .plain_text, .cipher_text, .done, .busy);

  always #5 clk = ~clk;

  localparam blk_t AFTER_ROUND [1:10] = '{
    128'h89d810e8855ace682d1843d8cb128fe4,
    128'h4915598f55e5d7a0daca94fa1f0a63f7,
    128'hfa636a2825b339c940668a3157244d17,
    128'h247240236966b3fa6ed2753288425b6c,
    128'hc81677bc9b7ac93b25027992b0261996,
    128'hc62fe109f75eedc3cc79395d84f9cf5d,
    128'hd1876c0f79c4300ab45594add66ff41f,
    128'hfde3bad205e5d0d73547964ef1fe37f1,
    128'hbd6e7c3df2b5779e0b61216e8b10b689,
    128'h69c4e0d86a7b0430d8cdb78070b4c55a};

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    plain_text = FIPS_PT;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    start = 1;
    @(posedge clk);                                  // S0: initial round
    #1 start = 0;
    check(dut.u_dp.reg1 === 128'h00102030405060708090a0b0c0d0e0f0, "Register 1 after initial round");
    for (int r = 1; r <= 10; r++) begin
      // control state of the round about to run
      logic m1, m2;
      m1 = dut.u_ctrl.sel_mux1;
      m2 = dut.u_ctrl.sel_mux2;
      if (r == 1)       check(!m1 && !m2, "round 1 not in S1");
      else if (r < 10)  check(m1 && !m2, $sformatf("round %0d not in S2", r));
      else              check(m1 && m2, "round 10 not in S3");
      @(posedge clk);
      #1;
      check(cipher_text === AFTER_ROUND[r],
            $sformatf("after round %0d: %h, expected %h", r, cipher_text, AFTER_ROUND[r]));
      check(done == (r == 10), $sformatf("done wrong after round %0d", r));
    end
    check(cipher_text === FIPS_CT, "cipher text");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
