// tb_half_adder: exhaustive check of the half adder, {c, s} == a + b, for the 22T and
// 12T XOR styles. Self-checking; prints TB_RESULT and finishes.
module tb_half_adder;
  import mac_pkg::*;

  logic a, b;
  logic s0, c0, s1, c1;
  int checks = 0, failures = 0;

  half_adder #(.XOR_STYLE(XOR_22T)) dut0 (.a(a), .b(b), .s(s0), .c(c0));
  half_adder                        dut1 (.a(a), .b(b), .s(s1), .c(c1));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      int exp_sum;
      {a, b} = 2'(v);
      exp_sum = int'(a) + int'(b);
      #1;
      checks += 2;
      if ({c0, s0} != 2'(exp_sum)) begin failures++; $display("22T a=%b b=%b -> %b%b", a, b, c0, s0); end
      if ({c1, s1} != 2'(exp_sum)) begin failures++; $display("12T a=%b b=%b -> %b%b", a, b, c1, s1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
