// tb_mix_column: one-column mix columns against the worked example
// (d4 25 5d 30 gives b1 in the first row), the FIPS-197 column
// d4bf5d30 -> 046681e5, and random columns against the shift-and-add model.
module tb_mix_column;
  import aes_ref_pkg::*;
  logic [31:0] s, b;
  int checks = 0, failures = 0;

  mix_column dut (.s, .b);

  task automatic expect_col(logic [31:0] expv);
    #1;
    checks++;
    if (b !== expv) begin
      failures++; $display("FAIL s=%h got %h exp %h", s, b, expv);
    end
  endtask

  initial begin
    s = 32'hd4255d30;
    #1;
    checks++;
    if (b[31:24] !== 8'hb1) begin failures++; $display("FAIL B00 = %h", b[31:24]); end
    s = 32'hd4bf5d30; expect_col(32'h046681e5);
    repeat (2000) begin
      s = $urandom;
      expect_col(ref_mix_column(s));
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
