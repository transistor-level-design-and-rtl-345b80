// pipo_reg: W-bit parallel-in parallel-out register of D flip-flops with a clear line.
//
// On every rising clk edge q takes d. While clr is 1 the flip-flops are held at 0,
// at once and without waiting for a clock edge (an asynchronous, active-high clear),
// which is how the accumulator is started from zero. In the MAC, q feeds back to the
// accumulator adder as its second operand for the next cycle.
//
// Interface: clk, clr, d[W-1:0] in; q[W-1:0] out. One clock of latency from d to q.
// W = 30 is the design's register width; the clear polarity and its being
// asynchronous are this design's reading of the "CLR line of the D flip-flop".
module pipo_reg #(
  parameter int unsigned W = mac_pkg::ACC_W
) (
  input  logic         clk,
  input  logic         clr,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or posedge clr) begin
    if (clr) q <= '0;
    else     q <= d;
  end

endmodule
