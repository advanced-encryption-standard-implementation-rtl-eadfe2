// tb_add_round_key: the initial round of the example (plain text XOR
// key 0) and random state/key pairs.
module tb_add_round_key;
  import aes_ref_pkg::*;
  blk_t s, k, y;
  int checks = 0, failures = 0;

  add_round_key dut (.s, .k, .y);

  initial begin
    s = FIPS_PT; k = FIPS_KEY;
    #1;
    checks++;
    if (y !== 128'h00102030405060708090a0b0c0d0e0f0) begin
      failures++; $display("FAIL example got %h", y);
    end
    repeat (500) begin
      s = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      #1;
      checks++;
      if (y !== (s ^ k)) begin failures++; $display("FAIL"); end
    end
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
