// tb_gf16x2_inv: checks X * X^-1 = 1 in the composite field for all 255
// non-zero X, that the inverse is unique (a permutation), that 0 maps to
// 0, and the worked example (a^12 + a^6 beta)^-1 = a^9 + a beta.
module tb_gf16x2_inv;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] x, y;
  bit seen[256];

  gf16x2_inv dut (.x(x), .y(y));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      x = 8'(i);
      #1;
      checks++;
      if (i == 0 ? (y !== 8'h00) : (ref_mul16x2(x, y) !== 8'h01 || seen[y])) begin
        failures++;
        if (failures < 10) $display("FAIL inv(%h) = %h", x, y);
      end
      seen[y] = 1'b1;
    end
    x = {ref_pow16(6), ref_pow16(12)};
    #1;
    checks++;
    if (y !== {ref_pow16(1), ref_pow16(9)}) begin
      failures++;
      $display("FAIL worked example: %h", y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
