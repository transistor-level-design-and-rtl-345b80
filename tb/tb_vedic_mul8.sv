// tb_vedic_mul8: exhaustive check of the 8x8 Vedic multiplier with the default (12T)
// XOR style, all 65536 operand pairs against the integer product, and 5000 random
// pairs through a 22T-style instance. Prints TB_RESULT and finishes.
module tb_vedic_mul8;
  import mac_pkg::*;

  logic [7:0]  a, b;
  logic [15:0] r12, r22;
  int checks = 0, failures = 0;

  vedic_mul8                        dut12 (.a(a), .b(b), .r(r12));
  vedic_mul8 #(.XOR_STYLE(XOR_22T)) dut22 (.a(a), .b(b), .r(r22));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i);
        b = 8'(j);
        #1;
        checks++;
        if (r12 != 16'(i * j)) begin
          failures++;
          if (failures < 20) $display("12T %0d*%0d -> %0d", i, j, r12);
        end
      end
    for (int n = 0; n < 5000; n++) begin
      a = 8'($urandom);
      b = 8'($urandom);
      #1;
      checks++;
      if (r22 != 16'(int'(a) * int'(b))) begin
        failures++;
        if (failures < 20) $display("22T %0d*%0d -> %0d", a, b, r22);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
