// tb_mix_columns: 128-bit mix columns on the round-1 example
// (after shift rows -> after mix columns) and on random states.
module tb_mix_columns;
  import aes_ref_pkg::*;
  blk_t x, y;
  int checks = 0, failures = 0;

  mix_columns dut (.x, .y);

  initial begin
    x = 128'h6353e08c0960e104cd70b751bacad0e7;
    #1;
    checks++;
    if (y !== 128'h5f72641557f5bc92f7be3b291db9f91a) begin
      failures++; $display("FAIL example got %h", y);
    end
    repeat (500) begin
      x = {$urandom, $urandom, $urandom, $urandom};
      #1;
      checks++;
      if (y !== ref_mix_columns(x)) begin
        failures++; $display("FAIL x=%h got %h", x, y);
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
