// tb_affine_transform: exhaustive check of the affine transformation. The
// expected value for input d is the published AES S-box entry of d^-1
// (inverse taken in the polynomial basis), since S(a) = affine(a^-1).
module tb_affine_transform;
  import aes_ref_pkg::*;
  logic [7:0] d, e;
  int checks = 0, failures = 0;

  affine_transform dut (.d, .e);

  initial begin
    load_sbox();
    for (int i = 0; i < 256; i++) begin
      d = pinv(8'(i));
      #1;
      checks++;
      if (e !== sbox_tab[i]) begin
        failures++;
        $display("FAIL d=%h got %h exp %h", d, e, sbox_tab[i]);
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
