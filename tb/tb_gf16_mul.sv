// tb_gf16_mul: exhaustive check of the GF((2^2)^2) multiplier against the
// normal-basis model of aes_ref_pkg, plus field properties (1 = 4'b1111 is
// the identity, no zero divisors, associativity on all triples).
module tb_gf16_mul;
  import aes_ref_pkg::*;
  logic [3:0] x, w, y;
  int checks = 0, failures = 0;
  logic [3:0] prod [16][16];

  gf16_mul dut (.x, .w, .y);

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        x = 4'(i); w = 4'(j);
        #1;
        prod[i][j] = y;
        check(y === g16mul(x, w), $sformatf("x=%h w=%h got %h exp %h", x, w, y, g16mul(x, w)));
        if (i != 0 && j != 0) check(y != 0, "zero divisor");
      end
    for (int i = 0; i < 16; i++) check(prod[i][15] == 4'(i), "identity");
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        for (int k = 0; k < 16; k++)
          check(prod[prod[i][j]][k] == prod[i][prod[j][k]], "associativity");
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
