// tb_gf16_to_gf256: checks that the back-converter is a field isomorphism
// from the composite field to GF(2^8): a bijection with psi(1) = 1,
// psi(x + y) = psi(x) + psi(y) and psi(x * y) = psi(x) * psi(y) for all
// pairs, and the worked example's a + a^11 beta -> alpha^253.
module tb_gf16_to_gf256;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] z, b;
  logic [7:0] psi[256];
  bit seen[256];

  gf16_to_gf256 dut (.z(z), .b(b));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      z = 8'(i);
      #1;
      psi[i] = b;
      checks++;
      if (seen[b]) begin
        failures++;
        $display("FAIL not one-to-one at %h", z);
      end
      seen[b] = 1'b1;
    end
    checks++;
    if (psi[1] !== 8'h01) failures++;
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        checks++;
        if (psi[i ^ j] !== (psi[i] ^ psi[j]) ||
            psi[ref_mul16x2(8'(i), 8'(j))] !== ref_mul256(psi[i], psi[j])) begin
          failures++;
          if (failures < 10) $display("FAIL homomorphism at %h, %h", i, j);
        end
      end
    checks++;
    if (psi[{ref_pow16(11), ref_pow16(1)}] !== ref_pow256(253)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
