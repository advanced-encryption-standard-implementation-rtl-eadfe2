// tb_aes128_enc_lut: the end-to-end test of tb_aes128_enc run on the
// look-up-table configuration of the core (SBOX_LOGIC = 0).
//
// 1. The FIPS-197 example: plain text 00112233..ff must give
//    69c4e0d86a7b0430d8cdb78070b4c55a. done must rise at the 10th rising
//    edge after the edge that samples start (11 cycles with the S0 cycle),
//    with busy high for the 10 round cycles.
// 2. Random plain texts, started singly after idle gaps, and back to back
//    with start held high; every result against the reference AES model.
// 3. The plain text input is scrambled while the core is busy; the result
//    must not change, since Register 1 loads only in S0.
// Counted mechanisms (each must occur): idle cycles in S0, round-1 cycles,
// middle-round iterations of the S2 counter loop, final rounds with mix
// columns bypassed, back-to-back starts, and inputs changed while busy.
module tb_aes128_enc_lut;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  blk_t plain_text, cipher_text;
  logic done, busy;
  int checks = 0, failures = 0;

  aes128_enc #(.SBOX_LOGIC(1'b0)) dut (.clk, .rst_n, .start, .plain_text, .cipher_text, .done, .busy);

  always #5 clk = ~clk;

  int n_idle = 0, n_round1 = 0, n_mid = 0, n_final = 0, n_b2b = 0, n_scrambled = 0;

  always @(posedge clk) if (rst_n) begin
    if (!busy && !start)                                       n_idle++;
    if (dut.u_ctrl.en_reg2 && !dut.u_ctrl.sel_mux1)            n_round1++;
    if (dut.u_ctrl.sel_mux1 && !dut.u_ctrl.sel_mux2)           n_mid++;
    if (dut.u_ctrl.sel_mux2)                                   n_final++;
  end

  // Start one encryption, check latency and result. The start cycle is the
  // rising edge at which start is sampled high in S0.
  task automatic run(blk_t pt, bit hold_start, bit scramble);
    blk_t expv = ref_encrypt(pt, FIPS_KEY);
    int lat = 0;
    plain_text = pt;
    start = 1;
    @(posedge clk);                       // start cycle (S0 -> S1)
    #1;
    if (!hold_start) start = 0;
    if (scramble) begin plain_text = ~pt; n_scrambled++; end
    while (!done) begin
      checks++;
      if (!busy && lat < 10) begin failures++; $display("FAIL busy low at round %0d", lat + 1); end
      @(posedge clk);
      #1;
      lat++;
      if (lat > 20) break;
    end
    checks++;
    if (lat != 10) begin failures++; $display("FAIL latency %0d, expected 10", lat); end
    checks++;
    if (cipher_text !== expv) begin
      failures++; $display("FAIL pt=%h got %h exp %h", pt, cipher_text, expv);
    end
  endtask

  initial begin
    load_sbox();
    plain_text = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (3) @(posedge clk);
    #1;
    run(FIPS_PT, 0, 0);
    checks++;
    if (cipher_text !== FIPS_CT) begin failures++; $display("FAIL FIPS-197 example"); end
    // cipher text holds while idle
    repeat (5) @(posedge clk);
    #1;
    checks++;
    if (cipher_text !== FIPS_CT || done) begin failures++; $display("FAIL hold after done"); end
    for (int i = 0; i < 8; i++) begin
      run({$urandom, $urandom, $urandom, $urandom}, 0, i[0]);
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1;
    end
    // back to back: start stays high, the next run begins in the done cycle
    for (int i = 0; i < 6; i++) begin
      if (i > 0) n_b2b++;
      run({$urandom, $urandom, $urandom, $urandom}, 1, 0);
    end
    start = 0;
    repeat (3) @(posedge clk);
    checks += 6;
    if (n_idle == 0)      begin failures++; $display("FAIL never idle"); end
    if (n_round1 == 0)    begin failures++; $display("FAIL round 1 never ran"); end
    if (n_mid == 0 || n_mid % 8 != 0) begin failures++; $display("FAIL middle rounds %0d", n_mid); end
    if (n_final == 0)     begin failures++; $display("FAIL final round never ran"); end
    if (n_b2b == 0)       begin failures++; $display("FAIL no back-to-back run"); end
    if (n_scrambled == 0) begin failures++; $display("FAIL input never changed while busy"); end
    $display("mechanisms: idle=%0d round1=%0d middle=%0d final=%0d back_to_back=%0d scrambled=%0d",
             n_idle, n_round1, n_mid, n_final, n_b2b, n_scrambled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
