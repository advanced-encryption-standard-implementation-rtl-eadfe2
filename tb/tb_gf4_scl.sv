// tb_gf4_scl: exhaustive self-check of gf4_scl against a GF(2^2) model built from
// logarithms (2'b11 = 1, 2'b01 = w, 2'b10 = w^2; the scaler constant is w^2).
module tb_gf4_scl;
  import aes_ref_pkg::*;
  logic [1:0] a, b, y;
  int checks = 0, failures = 0;

  gf4_scl dut (.x(a), .y(y));

  initial begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        logic [1:0] expv;
        a = 2'(i); b = 2'(j);
        #1;
        expv = g4mul(a, N4);
        checks++;
        if (y !== expv) begin
          failures++;
          $display("FAIL gf4_scl a=%b b=%b got %b exp %b", a, b, y, expv);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
