// tb_sub_bytes_logic: 128-bit sub bytes check. Every one of the 16 byte lanes
// is driven through all 256 values (each lane with a different offset so
// lanes see different bytes at once), then random states; each output byte
// must equal the published S-box entry of its input byte. The first state
// is the round-1 input of the FIPS-197 example.
module tb_sub_bytes_logic;
  import aes_ref_pkg::*;
  blk_t x, y;
  int checks = 0, failures = 0;

  sub_bytes_logic dut (.x, .y);

  task automatic check_state();
    #1;
    checks++;
    if (y !== ref_sub_bytes(x)) begin
      failures++;
      $display("FAIL x=%h got %h exp %h", x, y, ref_sub_bytes(x));
    end
  endtask

  initial begin
    load_sbox();
    x = 128'h00102030405060708090a0b0c0d0e0f0;
    check_state();
    checks++;
    if (y !== 128'h63cab7040953d051cd60e0e7ba70e18c) begin
      failures++; $display("FAIL round-1 example");
    end
    for (int v = 0; v < 256; v++) begin
      for (int i = 0; i < 16; i++) x[8*i +: 8] = 8'(v + 17*i);
      check_state();
    end
    repeat (200) begin
      x = {$urandom, $urandom, $urandom, $urandom};
      check_state();
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
