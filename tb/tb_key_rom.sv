// tb_key_rom: reads all 16 addresses. Each round key must equal the
// FIPS-197 key expansion of cipher key 000102..0f computed by the
// reference model; the unused addresses must read zero.
module tb_key_rom;
  import aes_ref_pkg::*;
  logic [3:0] addr;
  blk_t key;
  int checks = 0, failures = 0;

  key_rom dut (.addr, .key);

  function automatic int round_of(int a);
    if (a <= 7)  return a + 2;
    if (a == 8)  return 10;
    if (a == 14) return 1;
    if (a == 15) return 0;
    return -1;
  endfunction

  initial begin
    load_sbox();
    for (int a = 0; a < 16; a++) begin
      blk_t expv;
      addr = 4'(a);
      #1;
      expv = (round_of(a) < 0) ? '0 : ref_round_key(FIPS_KEY, round_of(a));
      checks++;
      if (key !== expv) begin
        failures++; $display("FAIL addr=%b got %h exp %h", addr, key, expv);
      end
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
