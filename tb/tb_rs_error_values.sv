// tb_rs_error_values: error-value evaluation for the RS(32,28) code over
// GF(2^8) (t = 2), carried out one operation at a time on rs_ev_alu, as a
// controller would sequence it.
//
// Each trial picks one or two distinct error positions j in 0..31 with
// random non-zero values E, forms the syndromes S_i = sum E * alpha^(i*j),
// i = 0..3, with reference arithmetic, and then solves the Vandermonde
// system S0 = E1 + E2, S1 = E1*X1 + E2*X2 (X = alpha^j) on the ALU:
//     p   = X1 * S0          (01)
//     num = S1 + p           (10)
//     den = X1 + X2          (11)
//     E2  = num / den        (00)
//     E1  = S0 + E2          (10)
// A single error is solved as E = S1 / X1 (00), which must also equal S0.
// The recovered values must equal the injected ones.
module tb_rs_error_values;
  import gf_ref_pkg::*;
  localparam int N = 32;        // code length of RS(32,28)
  localparam int TRIALS2 = 2000;
  localparam int TRIALS1 = 500;

  int checks = 0, failures = 0, alu_ops = 0;
  logic [7:0] a, b, y;
  logic [1:0] op;
  logic       flag;

  rs_ev_alu dut (.a(a), .b(b), .op(op), .y(y), .flag(flag));

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic alu(input logic [1:0] o, input logic [7:0] x, input logic [7:0] z,
                     output logic [7:0] r);
    op = o; a = x; b = z;
    #1;
    r = y;
    alu_ops++;
    if (flag) begin
      failures++;
      $display("FAIL unexpected flag: op=%b a=%h b=%h", o, x, z);
    end
  endtask

  initial begin
    logic [7:0] s[4];
    logic [7:0] e1, e2, x1, x2, p, num, den, r1, r2;
    int j1, j2;
    void'($urandom(32'd28));
    for (int t = 0; t < TRIALS2 + TRIALS1; t++) begin
      j1 = $urandom_range(N - 1);
      do j2 = $urandom_range(N - 1); while (j2 == j1);
      e1 = 8'($urandom_range(255, 1));
      e2 = (t < TRIALS2) ? 8'($urandom_range(255, 1)) : 8'h00;
      for (int i = 0; i < 4; i++)
        s[i] = ref_mul256(e1, ref_pow256(i * j1)) ^ ref_mul256(e2, ref_pow256(i * j2));
      x1 = ref_pow256(j1);
      x2 = ref_pow256(j2);
      if (t < TRIALS2) begin
        alu(2'b01, x1, s[0], p);
        alu(2'b10, s[1], p, num);
        alu(2'b11, x1, x2, den);
        alu(2'b00, num, den, r2);
        alu(2'b10, s[0], r2, r1);
        checks++;
        if (r1 !== e1 || r2 !== e2) begin
          failures++;
          if (failures < 10)
            $display("FAIL positions %0d,%0d: got %h,%h expected %h,%h", j1, j2, r1, r2, e1, e2);
        end
      end else begin
        alu(2'b00, s[1], x1, r1);
        checks++;
        if (r1 !== e1 || s[0] !== e1) begin
          failures++;
          if (failures < 10) $display("FAIL position %0d: got %h expected %h", j1, r1, e1);
        end
      end
    end
    $display("%0d two-error and %0d one-error words solved with %0d ALU operations",
             TRIALS2, TRIALS1, alu_ops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
