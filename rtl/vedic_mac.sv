// vedic_mac: 8-bit multiply-accumulate unit built around the Vedic multiplier.
//
// Every clock cycle the unit adds a * b to a running total:
//   acc <= acc + a * b     (modulo 2**ACC_W)
// The 8x8 Urdhva Tiryagbhyam multiplier (vedic_mul8) forms the 16-bit product, a
// 30-bit ripple carry adder adds it, zero-extended, to the register's present value,
// and the 30-bit PIPO register (pipo_reg) stores the sum on the rising clock edge and
// feeds it back to the adder for the next cycle. Raising clr empties the register, so
// an accumulation starts from 0. The multiplier and adder are combinational, so a and
// b must be stable for one clock period, through the multiplier-plus-adder delay,
// before the edge that takes them in.
//
// Interface:
//   clk          rising-edge clock
//   clr          active-high asynchronous clear of the accumulator
//   a, b [7:0]   unsigned operands, sampled at each rising clk edge
//   acc  [29:0]  accumulated total (the register output)
//   carry_out    carry out of the 30-bit adder: 1 in the cycle whose add wraps past
//                2**30 - 1; it is the adder's own carry, not registered
// Timing: acc shows the sum one clock edge after a and b are applied, i.e. one product
// per cycle with a latency of one cycle.
//
// The structure (8x8 Vedic multiplier, 30-bit ripple carry adder, 30-bit PIPO register
// with CLR) is the design's; the clear polarity, the wrap-around at 2**30 and the
// carry_out port are this design's own choices.
module vedic_mac
  import mac_pkg::*;
#(
  parameter xor_style_e  XOR_STYLE = XOR_12T,
  parameter int unsigned ACC_WIDTH   = ACC_W
) (
  input  logic                clk,
  input  logic                clr,
  input  logic [OP_W-1:0]     a,
  input  logic [OP_W-1:0]     b,
  output logic [ACC_WIDTH-1:0]  acc,
  output logic                carry_out
);

  logic [PROD_W-1:0]  prod;
  logic [ACC_WIDTH-1:0] sum;

  vedic_mul8 #(.XOR_STYLE(XOR_STYLE)) u_mul (.a(a), .b(b), .r(prod));

  rca #(.W(ACC_WIDTH), .XOR_STYLE(XOR_STYLE)) u_add (
    .a({{(ACC_WIDTH - PROD_W){1'b0}}, prod}),
    .b(acc),
    .ci(1'b0),
    .s(sum),
    .co(carry_out)
  );

  pipo_reg #(.W(ACC_WIDTH)) u_reg (.clk(clk), .clr(clr), .d(sum), .q(acc));

endmodule
