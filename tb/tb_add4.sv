// tb_add4: exhaustive check of the four-input adder: for all 16 input patterns the
// outputs, read as 4*c1 + 2*c0 + s, must equal the number of ones in {a, b, c, d}.
// Both the 22T and the 12T XOR styles are checked. Prints TB_RESULT and finishes.
module tb_add4;
  import mac_pkg::*;

  logic a, b, c, d;
  logic s0, c00, c10, s1, c01, c11;
  int checks = 0, failures = 0;

  add4 #(.XOR_STYLE(XOR_22T)) dut0 (.a(a), .b(b), .c(c), .d(d), .s(s0), .c0(c00), .c1(c10));
  add4                        dut1 (.a(a), .b(b), .c(c), .d(d), .s(s1), .c0(c01), .c1(c11));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int ones;
      {a, b, c, d} = 4'(v);
      ones = int'(a) + int'(b) + int'(c) + int'(d);
      #1;
      checks += 2;
      if ({c10, c00, s0} != 3'(ones)) begin
        failures++; $display("22T abcd=%b -> c1=%b c0=%b s=%b", 4'(v), c10, c00, s0);
      end
      if ({c11, c01, s1} != 3'(ones)) begin
        failures++; $display("12T abcd=%b -> c1=%b c0=%b s=%b", 4'(v), c11, c01, s1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
