// tb_full_adder: exhaustive check of the full adder, {co, s} == a + b + ci, for the 22T
// and 12T XOR styles. Self-checking; prints TB_RESULT and finishes.
module tb_full_adder;
  import mac_pkg::*;

  logic a, b, ci;
  logic s0, co0, s1, co1;
  int checks = 0, failures = 0;

  full_adder #(.XOR_STYLE(XOR_22T)) dut0 (.a(a), .b(b), .ci(ci), .s(s0), .co(co0));
  full_adder                        dut1 (.a(a), .b(b), .ci(ci), .s(s1), .co(co1));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int exp_sum;
      {a, b, ci} = 3'(v);
      exp_sum = int'(a) + int'(b) + int'(ci);
      #1;
      checks += 2;
      if ({co0, s0} != 2'(exp_sum)) begin failures++; $display("22T %b%b%b -> %b%b", a, b, ci, co0, s0); end
      if ({co1, s1} != 2'(exp_sum)) begin failures++; $display("12T %b%b%b -> %b%b", a, b, ci, co1, s1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
