// tb_gf16_sq_scl: exhaustive check of the GF((2^2)^2) squarer-and-scaler,
// y = v * x^2 with v = 4'b0001, against the normal-basis model.
module tb_gf16_sq_scl;
  import aes_ref_pkg::*;
  logic [3:0] x, y;
  int checks = 0, failures = 0;

  gf16_sq_scl dut (.x, .y);

  initial begin
    for (int i = 0; i < 16; i++) begin
      logic [3:0] expv;
      x = 4'(i);
      #1;
      expv = g16mul(g16mul(x, x), V16);
      checks++;
      if (y !== expv) begin
        failures++;
        $display("FAIL x=%h got %h exp %h", x, y, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
