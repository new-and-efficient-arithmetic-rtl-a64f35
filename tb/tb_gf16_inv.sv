// tb_gf16_inv: checks x * x^-1 = 1 for every non-zero x in GF(2^4), and
// that 0 maps to 0.
module tb_gf16_inv;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] x, y;

  gf16_inv dut (.x(x), .y(y));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      x = 4'(i);
      #1;
      checks++;
      if (y !== ref_inv16(x) || (i != 0 && ref_mul16(x, y) !== 4'h1)) begin
        failures++;
        $display("FAIL inv(%h) = %h, expected %h", x, y, ref_inv16(x));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
