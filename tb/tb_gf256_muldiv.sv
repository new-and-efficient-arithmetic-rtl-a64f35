// tb_gf256_muldiv: exhaustive test of the subfield multiplier/divider.
// For every pair (a, b): with sel_b = 1 the output must equal the GF(2^8)
// reference product; with sel_b = 0 it must equal a * b^-1 (reference
// inverse by search), and 0 for b = 0.  Includes alpha^3 / alpha^5 =
// alpha^253.
module tb_gf256_muldiv;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] a, b, y;
  logic       sel_b;
  logic [7:0] inv_tab[256];

  gf256_muldiv dut (.a(a), .b(b), .sel_b(sel_b), .y(y));

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp_y;
    for (int i = 0; i < 256; i++) inv_tab[i] = ref_inv256(8'(i));
    for (int m = 0; m < 2; m++)
      for (int i = 0; i < 256; i++)
        for (int j = 0; j < 256; j++) begin
          a = 8'(i); b = 8'(j); sel_b = 1'(m);
          #1;
          exp_y = sel_b ? ref_mul256(a, b) : ref_mul256(a, inv_tab[j]);
          checks++;
          if (y !== exp_y) begin
            failures++;
            if (failures < 10) $display("FAIL a=%h b=%h sel_b=%b y=%h expected %h", a, b, sel_b, y, exp_y);
          end
        end
    a = ref_pow256(3); b = ref_pow256(5); sel_b = 1'b0;
    #1;
    checks++;
    if (y !== ref_pow256(253)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
