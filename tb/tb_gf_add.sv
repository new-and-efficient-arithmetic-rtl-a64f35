// tb_gf_add: exhaustive test of the GF(2^8) adder (and a 4-bit instance).
// The expected sum is built bit by bit as the parity of the integer sum
// a[i] + b[i].  A watchdog ends the run if it hangs.
module tb_gf_add;
  int checks = 0, failures = 0;
  logic [7:0] a, b, s;
  logic [3:0] a4, b4, s4;

  gf_add #(.WIDTH(8)) dut  (.a(a),  .b(b),  .s(s));
  gf_add #(.WIDTH(4)) dut4 (.a(a4), .b(b4), .s(s4));

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp8;
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j); a4 = 4'(i); b4 = 4'(j);
        #1;
        for (int k = 0; k < 8; k++) exp8[k] = 1'((int'(a[k]) + int'(b[k])) % 2);
        checks++;
        if (s !== exp8) begin
          failures++;
          if (failures < 10) $display("FAIL %h + %h = %h, expected %h", a, b, s, exp8);
        end
        checks++;
        if (s4 !== exp8[3:0]) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
