// tb_xor2: checks the XOR cell in all three circuit styles against the XOR truth table
// (00->0, 01->1, 10->1, 11->0). Self-checking; prints TB_RESULT and finishes.
module tb_xor2;
  import mac_pkg::*;

  logic a, b;
  logic y22, y12, y6;
  int checks = 0, failures = 0;

  xor2 #(.STYLE(XOR_22T)) dut22 (.a(a), .b(b), .y(y22));
  xor2 #(.STYLE(XOR_12T)) dut12 (.a(a), .b(b), .y(y12));
  xor2 #(.STYLE(XOR_6T))  dut6  (.a(a), .b(b), .y(y6));

  // truth table as printed for the cell, indexed by {a, b}
  localparam logic [3:0] TRUTH = 4'b0110;

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks += 3;
      if (y22 !== TRUTH[v]) begin failures++; $display("22T a=%b b=%b y=%b", a, b, y22); end
      if (y12 !== TRUTH[v]) begin failures++; $display("12T a=%b b=%b y=%b", a, b, y12); end
      if (y6  !== TRUTH[v]) begin failures++; $display("6T a=%b b=%b y=%b",  a, b, y6);  end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
