// vedic_mul8: 8x8 unsigned multiplier from four 4x4 Vedic multipliers and three
// ripple carry adders.
//
// With a = {aH, aL} and b = {bH, bL} (4-bit halves), the four 4x4 multipliers form
//   D = aH*bH   C = aL*bH   B = aH*bL   A = aL*bL      (8 bits each)
// and the product is D*256 + (C + B)*16 + A. The sum is arranged as in the design's
// block diagram:
//   12-bit RCA:  {D, 4'b0000} + {4'b0000, C}
//    8-bit RCA:  B + {4'b0000, A[7:4]}
//   12-bit RCA:  the two sums above            -> r[15:4]
//   r[3:0] = A[3:0] directly.
// No adder can overflow: the two 12-bit sums are at most 3825 and 239, and their total
// at most 4064.
//
// Interface: a[7:0], b[7:0] in; r[15:0] = a * b out. Combinational.
module vedic_mul8
  import mac_pkg::*;
#(
  parameter xor_style_e XOR_STYLE = XOR_12T
) (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] r
);

  logic [7:0]  pd, pc, pb, pa;
  logic [11:0] sum_dc, sum_total;
  logic [7:0]  sum_ba;
  logic        co_dc, co_ba, co_total;

  vedic_mul4 #(.XOR_STYLE(XOR_STYLE)) u_m_hh (.a(a[7:4]), .b(b[7:4]), .r(pd));
  vedic_mul4 #(.XOR_STYLE(XOR_STYLE)) u_m_lh (.a(a[3:0]), .b(b[7:4]), .r(pc));
  vedic_mul4 #(.XOR_STYLE(XOR_STYLE)) u_m_hl (.a(a[7:4]), .b(b[3:0]), .r(pb));
  vedic_mul4 #(.XOR_STYLE(XOR_STYLE)) u_m_ll (.a(a[3:0]), .b(b[3:0]), .r(pa));

  rca #(.W(12), .XOR_STYLE(XOR_STYLE)) u_add_dc (
    .a({pd, 4'b0000}), .b({4'b0000, pc}), .ci(1'b0), .s(sum_dc), .co(co_dc));

  rca #(.W(8), .XOR_STYLE(XOR_STYLE)) u_add_ba (
    .a(pb), .b({4'b0000, pa[7:4]}), .ci(1'b0), .s(sum_ba), .co(co_ba));

  rca #(.W(12), .XOR_STYLE(XOR_STYLE)) u_add_total (
    .a(sum_dc), .b({4'b0000, sum_ba}), .ci(1'b0), .s(sum_total), .co(co_total));

  assign r = {sum_total, pa[3:0]};

  // The three carries out are part of the adders but can never be 1 (see above), so
  // they are left unconnected past this point.
  logic unused_co;
  assign unused_co = co_dc ^ co_ba ^ co_total;

endmodule
