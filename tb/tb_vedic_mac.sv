// tb_vedic_mac: end-to-end test of the 8-bit Vedic MAC at its default parameters.
//
// A reference model keeps acc_model <= acc_model + a*b (mod 2**30) and is compared
// with the register after every rising edge, which also checks the one-cycle latency:
// the product of the operands applied before edge n must be in acc right after edge n,
// and acc must not move between edges. The run covers:
//   - clear:      clr raised at the start and twice mid-run (asynchronously, between
//                 edges), after which the total restarts from 0;
//   - accumulate: random operand streams, including runs of 0 and 255 operands;
//   - dot product: a 16-element dot product computed in full and compared with the
//                 integer result;
//   - wrap:       about 16,500 cycles of 255*255 drive the total past 2**30 - 1; the
//                 adder's carry_out must be 1 in exactly the wrapping cycle.
// Each of these mechanisms is counted; one that never happened counts as a failure.
// Prints TB_RESULT and finishes.
module tb_vedic_mac;
  import mac_pkg::*;

  logic              clk = 1'b0;
  logic              clr;
  logic [OP_W-1:0]   a, b;
  logic [ACC_W-1:0]  acc;
  logic              carry_out;

  logic [ACC_W-1:0]  acc_model;
  int checks = 0, failures = 0;
  int n_clear = 0, n_accumulate = 0, n_wrap = 0, n_dot = 0;

  vedic_mac dut (.clk(clk), .clr(clr), .a(a), .b(b), .acc(acc), .carry_out(carry_out));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one operand pair, check carry_out before the edge and acc after it.
  task automatic step(input logic [7:0] x, input logic [7:0] y);
    logic [ACC_W:0] wide;
    a = x;
    b = y;
    #1;
    wide = {1'b0, acc_model} + (ACC_W + 1)'(int'(x) * int'(y));
    checks++;
    if (carry_out !== wide[ACC_W]) begin
      failures++;
      $display("carry_out=%b want %b (acc=%h, %0d*%0d)", carry_out, wide[ACC_W], acc_model, x, y);
    end
    if (wide[ACC_W]) n_wrap++;
    if (x != 0 && y != 0) n_accumulate++;
    @(posedge clk);
    acc_model = wide[ACC_W-1:0];
    #1;
    checks++;
    if (acc !== acc_model) begin
      failures++;
      if (failures < 20) $display("acc=%h want %h after %0d*%0d at %0t", acc, acc_model, x, y, $time);
    end
    // the register must hold between edges even though the operands change
    a = ~x;
    b = ~y;
    #2;
    checks++;
    if (acc !== acc_model) begin failures++; $display("acc moved between edges at %0t", $time); end
  endtask

  task automatic clear();
    #2;
    clr = 1'b1;
    #1;
    checks++;
    if (acc !== '0) begin failures++; $display("clear did not empty acc at %0t", $time); end
    @(posedge clk);
    #1;
    clr = 1'b0;
    acc_model = '0;
    checks++;
    if (acc !== '0) begin failures++; $display("acc not 0 after clear at %0t", $time); end
    n_clear++;
  endtask

  initial begin
    clr = 1'b0;
    a = '0;
    b = '0;
    acc_model = '0;
    #3;
    clear();

    // random accumulation, with boundary operands mixed in
    for (int n = 0; n < 300; n++) begin
      case (n % 10)
        3:       step(8'd0,   8'($urandom));
        7:       step(8'd255, 8'd255);
        default: step(8'($urandom), 8'($urandom));
      endcase
    end

    // a 16-element dot product from zero
    clear();
    begin
      logic [7:0] xs[16], ys[16];
      longint dot;
      dot = 0;
      for (int k = 0; k < 16; k++) begin
        xs[k] = 8'($urandom);
        ys[k] = 8'($urandom);
        dot += longint'(xs[k]) * longint'(ys[k]);
      end
      for (int k = 0; k < 16; k++) step(xs[k], ys[k]);
      checks++;
      if (longint'(acc) != dot) begin failures++; $display("dot product %0d want %0d", acc, dot); end
      else n_dot++;
    end

    // drive the total past 2**30 - 1 and a little beyond
    clear();
    for (int n = 0; n < ((1 << ACC_W) / (255 * 255)) + 20; n++) step(8'd255, 8'd255);
    for (int n = 0; n < 50; n++) step(8'($urandom), 8'($urandom));

    $display("mechanisms: clear=%0d accumulate=%0d dot=%0d wrap=%0d",
             n_clear, n_accumulate, n_dot, n_wrap);
    if (n_clear == 0)      begin failures++; $display("clear never happened"); end
    if (n_accumulate == 0) begin failures++; $display("accumulate never happened"); end
    if (n_dot == 0)        begin failures++; $display("dot product never completed"); end
    if (n_wrap == 0)       begin failures++; $display("wrap never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
