// tb_gf256_inv: exhaustive check of the GF(((2^2)^2)^2) inverter: x * y = 1
// (8'hff in this basis) for every nonzero x under the reference tower-field
// multiplication, 0 maps to 0, and inverting twice gives x back.
module tb_gf256_inv;
  import aes_ref_pkg::*;
  logic [7:0] x, y;
  int checks = 0, failures = 0;
  logic [7:0] inv_tab [256];

  gf256_inv dut (.x, .y);

  initial begin
    for (int i = 0; i < 256; i++) begin
      x = 8'(i);
      #1;
      inv_tab[i] = y;
      checks++;
      if ((i == 0) ? (y !== 8'h00) : (g256mul(x, y) !== 8'hff)) begin
        failures++;
        $display("FAIL x=%h inv=%h", x, y);
      end
    end
    for (int i = 0; i < 256; i++) begin
      checks++;
      if (inv_tab[inv_tab[i]] != 8'(i)) begin
        failures++;
        $display("FAIL involution at %h", i);
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
