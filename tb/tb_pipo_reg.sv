// tb_pipo_reg: checks the 30-bit PIPO register: q takes d at each rising edge and not
// between edges, clr forces q to 0 at once (without a clock edge) and holds it there
// while high, and loading resumes on the first edge after clr falls.
// Prints TB_RESULT and finishes.
module tb_pipo_reg;
  logic        clk = 1'b0;
  logic        clr;
  logic [29:0] d, q, expected;
  int checks = 0, failures = 0;

  pipo_reg dut (.clk(clk), .clr(clr), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [29:0] want, input string what);
    checks++;
    if (q !== want) begin failures++; $display("%s: q=%h want %h at %0t", what, q, want, $time); end
  endtask

  initial begin
    clr = 1'b0;
    d   = 30'h2aaa_aaaa;
    @(posedge clk); #1;
    // asynchronous clear, mid-cycle
    clr = 1'b1; #1;
    check('0, "async clear");
    @(posedge clk); #1;
    check('0, "held in clear");
    clr = 1'b0;
    check('0, "clear released, no edge yet");
    for (int n = 0; n < 500; n++) begin
      d = 30'($urandom);
      expected = d;
      @(posedge clk); #1;
      check(expected, "load");
      d = ~d;           // change between edges: q must not follow
      #2;
      check(expected, "hold between edges");
      if (n % 97 == 50) begin
        clr = 1'b1; #1;
        check('0, "async clear");
        clr = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
