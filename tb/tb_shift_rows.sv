// tb_shift_rows: shift rows against the reference model for random states
// and against the round-1 example (after sub bytes -> after shift rows).
module tb_shift_rows;
  import aes_ref_pkg::*;
  blk_t x, y;
  int checks = 0, failures = 0;

  shift_rows dut (.x, .y);

  initial begin
    x = 128'h63cab7040953d051cd60e0e7ba70e18c;
    #1;
    checks++;
    if (y !== 128'h6353e08c0960e104cd70b751bacad0e7) begin
      failures++; $display("FAIL example got %h", y);
    end
    repeat (500) begin
      x = {$urandom, $urandom, $urandom, $urandom};
      #1;
      checks++;
      if (y !== ref_shift_rows(x)) begin
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
