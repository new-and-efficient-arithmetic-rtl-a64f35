// tb_gf16_mul: exhaustive test of the GF(2^4) multiplier against the
// long-division reference, plus the known values gamma^a * gamma^b.
module tb_gf16_mul;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] a, b, p;

  gf16_mul dut (.a(a), .b(b), .p(p));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        #1;
        checks++;
        if (p !== ref_mul16(a, b)) begin
          failures++;
          $display("FAIL %h * %h = %h, expected %h", a, b, p, ref_mul16(a, b));
        end
      end
    // gamma^i * gamma^j = gamma^(i+j), gamma^15 = 1
    for (int i = 0; i < 15; i++)
      for (int j = 0; j < 15; j++) begin
        a = ref_pow16(i); b = ref_pow16(j);
        #1;
        checks++;
        if (p !== ref_pow16(i + j)) failures++;
      end
    checks++;
    if (ref_pow16(15) !== 4'h1 || ref_pow16(5) == 4'h1 || ref_pow16(3) == 4'h1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
