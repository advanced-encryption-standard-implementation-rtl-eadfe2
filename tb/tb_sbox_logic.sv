// tb_sbox_logic: exhaustive check of the gate-level S-box against the
// published AES S-box table, including the worked example 3d -> 27.
module tb_sbox_logic;
  import aes_ref_pkg::*;
  logic [7:0] a, e;
  int checks = 0, failures = 0;

  sbox_logic dut (.a, .e);

  initial begin
    load_sbox();
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1;
      checks++;
      if (e !== sbox_tab[i]) begin
        failures++;
        $display("FAIL a=%h got %h exp %h", a, e, sbox_tab[i]);
      end
    end
    a = 8'h3d;
    #1;
    checks++;
    if (e !== 8'h27) begin failures++; $display("FAIL 3d -> %h", e); end
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
