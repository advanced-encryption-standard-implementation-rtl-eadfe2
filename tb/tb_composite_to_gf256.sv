// tb_composite_to_gf256: checks that the basis change is a field
// isomorphism from the tower field onto GF(2^8) with polynomial 0x11b:
// it is one-to-one, maps the tower-field one (8'hff) to 1, and maps every
// tower-field product to the polynomial-basis product of the images.
module tb_composite_to_gf256;
  import aes_ref_pkg::*;
  logic [7:0] a, b;
  int checks = 0, failures = 0;
  logic [7:0] img [256];
  bit seen [256];

  composite_to_gf256 dut (.c(a), .d(b));

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1;
      img[i] = b;
      checks++;
      if (seen[b]) begin failures++; $display("FAIL not one-to-one at %h", i); end
      seen[b] = 1;
    end
    checks++;
    if (img[255] != 8'h01) begin failures++; $display("FAIL image of ff = %h", img[255]); end
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        checks++;
        if (img[g256mul(8'(i), 8'(j))] != pmul(img[i], img[j])) begin
          failures++;
          if (failures < 10) $display("FAIL product %h*%h", i, j);
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
