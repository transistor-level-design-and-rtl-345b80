// tb_rca: checks the ripple carry adder at the three widths the datapath uses.
// 8 bits: all 2**17 combinations of a, b and ci. 12 and 30 bits: corner cases (all
// ones, carry rippling through every bit) and 20000 random operand pairs each.
// {co, s} is compared with the integer sum. Prints TB_RESULT and finishes.
module tb_rca;
  logic [7:0]  a8, b8, s8;
  logic [11:0] a12, b12, s12;
  logic [29:0] a30, b30, s30;
  logic        ci, co8, co12, co30;
  int checks = 0, failures = 0;

  rca #(.W(8))  dut8  (.a(a8),  .b(b8),  .ci(ci), .s(s8),  .co(co8));
  rca #(.W(12)) dut12 (.a(a12), .b(b12), .ci(ci), .s(s12), .co(co12));
  rca #(.W(30)) dut30 (.a(a30), .b(b30), .ci(ci), .s(s30), .co(co30));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_wide(input logic [29:0] x, input logic [29:0] y, input logic c);
    longint exp12, exp30;
    a12 = x[11:0]; b12 = y[11:0]; a30 = x; b30 = y; ci = c;
    exp12 = longint'(x[11:0]) + longint'(y[11:0]) + longint'(c);
    exp30 = longint'(x) + longint'(y) + longint'(c);
    #1;
    checks += 2;
    if ({co12, s12} != 13'(exp12)) begin failures++; $display("12b %h+%h+%b -> %h", x[11:0], y[11:0], c, {co12, s12}); end
    if ({co30, s30} != 31'(exp30)) begin failures++; $display("30b %h+%h+%b -> %h", x, y, c, {co30, s30}); end
  endtask

  initial begin
    for (int v = 0; v < (1 << 17); v++) begin
      {ci, a8, b8} = 17'(v);
      a12 = '0; b12 = '0; a30 = '0; b30 = '0;
      #1;
      checks++;
      if ({co8, s8} != 9'(int'(a8) + int'(b8) + int'(ci))) begin
        failures++; $display("8b %0d+%0d+%0d -> %0d", a8, b8, ci, {co8, s8});
      end
    end
    check_wide('1, '0, 1'b1);
    check_wide('1, 30'd1, 1'b0);
    check_wide('1, '1, 1'b1);
    check_wide('0, '0, 1'b0);
    for (int n = 0; n < 20000; n++)
      check_wide(30'($urandom), 30'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
