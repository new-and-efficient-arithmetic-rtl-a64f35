// tb_gf16_gamma_mul: all 16 inputs of the gamma multiplier against a
// reference product with gamma = 4'b0010, and gamma^4 = gamma^3 + 1.
module tb_gf16_gamma_mul;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] z, p;

  gf16_gamma_mul dut (.z(z), .p(p));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      z = 4'(i);
      #1;
      checks++;
      if (p !== ref_mul16(z, 4'h2)) begin
        failures++;
        $display("FAIL gamma * %h = %h, expected %h", z, p, ref_mul16(z, 4'h2));
      end
    end
    z = 4'b1000;  // gamma^3
    #1;
    checks++;
    if (p !== 4'b1001) failures++;  // gamma^4 = 1 + gamma^3
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
