// tb_gf16_inv: exhaustive check of the GF((2^2)^2) inverter: x * y = 1
// (4'b1111) for every nonzero x under the reference multiplication, and
// 0 maps to 0.
module tb_gf16_inv;
  import aes_ref_pkg::*;
  logic [3:0] x, y;
  int checks = 0, failures = 0;

  gf16_inv dut (.x, .y);

  initial begin
    for (int i = 0; i < 16; i++) begin
      x = 4'(i);
      #1;
      checks++;
      if ((i == 0) ? (y !== 4'h0) : (g16mul(x, y) !== 4'hf)) begin
        failures++;
        $display("FAIL x=%h inv=%h", x, y);
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
