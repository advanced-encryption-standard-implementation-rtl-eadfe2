// tb_gf256_to_composite: checks that the basis change is a field
// isomorphism from GF(2^8) with polynomial 0x11b onto the tower field:
// it is one-to-one, maps 1 to the tower-field one (8'hff), and maps every
// product a*b to the tower-field product of the images (all 65536 pairs).
module tb_gf256_to_composite;
  import aes_ref_pkg::*;
  logic [7:0] a, b;
  int checks = 0, failures = 0;
  logic [7:0] img [256];
  bit seen [256];

  gf256_to_composite dut (.a, .b);

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
    if (img[1] != 8'hff) begin failures++; $display("FAIL image of 1 = %h", img[1]); end
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        checks++;
        if (img[pmul(8'(i), 8'(j))] != g256mul(img[i], img[j])) begin
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
