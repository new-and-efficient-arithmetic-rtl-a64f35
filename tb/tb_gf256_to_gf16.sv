// tb_gf256_to_gf16: checks that the converter is a field isomorphism.
// The image of every element is recorded; the test then requires a
// bijection, phi(1) = 1, phi(a + b) = phi(a) + phi(b) and
// phi(a * b) = phi(a) * phi(b) for all pairs (GF(2^8) product from the
// reference, composite product from its definition), and the worked
// example's values alpha^5 -> a^12 + a^6 beta, alpha^3 -> a^8 + a^11 beta.
module tb_gf256_to_gf16;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] b, z;
  logic [7:0] phi[256];
  bit seen[256];

  gf256_to_gf16 dut (.b(b), .z(z));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      b = 8'(i);
      #1;
      phi[i] = z;
      checks++;
      if (seen[z]) begin
        failures++;
        $display("FAIL not one-to-one at %h", b);
      end
      seen[z] = 1'b1;
    end
    checks++;
    if (phi[1] !== 8'h01) failures++;
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        checks++;
        if (phi[i ^ j] !== (phi[i] ^ phi[j]) ||
            phi[ref_mul256(8'(i), 8'(j))] !== ref_mul16x2(phi[i], phi[j])) begin
          failures++;
          if (failures < 10) $display("FAIL homomorphism at %h, %h", i, j);
        end
      end
    checks++;
    if (phi[ref_pow256(5)] !== {ref_pow16(6), ref_pow16(12)}) failures++;
    checks++;
    if (phi[ref_pow256(3)] !== {ref_pow16(11), ref_pow16(8)}) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
