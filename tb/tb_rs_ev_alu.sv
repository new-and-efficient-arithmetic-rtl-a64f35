// tb_rs_ev_alu: end-to-end test of the error-value ALU at its default size.
// Every opcode is applied to every operand pair (4 x 65536 cases) and the
// output compared with reference GF(2^8) arithmetic: 00 a/b, 01 a*b,
// 10 and 11 a+b.  The flag must be set exactly for 00 with b = 0.  The
// worked example alpha^3 / alpha^5 = alpha^253 is applied by itself.
// Each mechanism is counted (divide, multiply, add via 10, add via 11,
// division by zero raising the flag); one that never happened is a failure.
module tb_rs_ev_alu;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] a, b, y;
  logic [1:0] op;
  logic       flag;
  logic [7:0] inv_tab[256];
  int n_div = 0, n_mul = 0, n_add10 = 0, n_add11 = 0, n_flag = 0;

  rs_ev_alu dut (.a(a), .b(b), .op(op), .y(y), .flag(flag));

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp_y;
    logic       exp_f;
    for (int i = 0; i < 256; i++) inv_tab[i] = ref_inv256(8'(i));
    for (int o = 0; o < 4; o++)
      for (int i = 0; i < 256; i++)
        for (int j = 0; j < 256; j++) begin
          a = 8'(i); b = 8'(j); op = 2'(o);
          #1;
          unique case (op)
            2'b00: begin exp_y = ref_mul256(a, inv_tab[j]); n_div++; end
            2'b01: begin exp_y = ref_mul256(a, b);          n_mul++; end
            2'b10: begin exp_y = a ^ b;                     n_add10++; end
            2'b11: begin exp_y = a ^ b;                     n_add11++; end
          endcase
          exp_f = (op == 2'b00) && (b == 8'h00);
          if (flag) n_flag++;
          checks++;
          if (y !== exp_y || flag !== exp_f) begin
            failures++;
            if (failures < 10) $display("FAIL op=%b a=%h b=%h y=%h flag=%b expected %h %b",
                                        op, a, b, y, flag, exp_y, exp_f);
          end
        end
    a = ref_pow256(3); b = ref_pow256(5); op = 2'b00;
    #1;
    checks++;
    if (y !== ref_pow256(253) || flag) failures++;

    $display("mechanisms: divide=%0d multiply=%0d add(10)=%0d add(11)=%0d divide-by-zero flag=%0d",
             n_div, n_mul, n_add10, n_add11, n_flag);
    checks++;
    if (n_div == 0 || n_mul == 0 || n_add10 == 0 || n_add11 == 0 || n_flag == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
