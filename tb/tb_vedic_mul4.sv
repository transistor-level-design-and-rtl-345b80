// tb_vedic_mul4: exhaustive check of the 4x4 Vedic multiplier: all 256 operand pairs,
// r compared with the integer product a * b, for the 12T (default) and 22T XOR styles.
// Prints TB_RESULT and finishes.
module tb_vedic_mul4;
  import mac_pkg::*;

  logic [3:0] a, b;
  logic [7:0] r12, r22;
  int checks = 0, failures = 0;

  vedic_mul4                        dut12 (.a(a), .b(b), .r(r12));
  vedic_mul4 #(.XOR_STYLE(XOR_22T)) dut22 (.a(a), .b(b), .r(r22));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 4'(i);
        b = 4'(j);
        #1;
        checks += 2;
        if (r12 != 8'(i * j)) begin failures++; $display("12T %0d*%0d -> %0d", i, j, r12); end
        if (r22 != 8'(i * j)) begin failures++; $display("22T %0d*%0d -> %0d", i, j, r22); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
