// tb_gf16x2_mul: exhaustive test of the composite-field multiplier against
// the product expanded from its definition (beta^2 = beta + gamma).
// Includes the worked division example: (a^8 + a^11 beta)(a^9 + a beta)
// = a + a^11 beta, with a the generator of GF(2^4).
module tb_gf16x2_mul;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] a, b, c;

  gf16x2_mul dut (.a(a), .b(b), .c(c));

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        if (c !== ref_mul16x2(a, b)) begin
          failures++;
          if (failures < 10) $display("FAIL %h * %h = %h, expected %h", a, b, c, ref_mul16x2(a, b));
        end
      end
    a = {ref_pow16(11), ref_pow16(8)};
    b = {ref_pow16(1), ref_pow16(9)};
    #1;
    checks++;
    if (c !== {ref_pow16(11), ref_pow16(1)}) begin
      failures++;
      $display("FAIL worked example: %h", c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
