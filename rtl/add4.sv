// add4: the "4-bit adder" of the 4x4 Vedic multiplier, a counter of four one-bit
// inputs of equal weight.
//
// It returns the number of ones among a, b, c, d as {c1, c0, s} (weights 4, 2, 1),
// using the XOR-optimised equations of the design:
//   s  = a ^ b ^ c ^ d
//   c0 = b(a ^ c) + d(a ^ b) + c(a ^ d)
//   c1 = a b c d
// c0 is 1 exactly when two or three inputs are 1, and c1 only when all four are.
// All XORs are xor2 cells, so the XOR circuit choice (XOR_STYLE) applies.
//
// Interface: a, b, c, d in; s, c0, c1 out. Combinational.
module add4
  import mac_pkg::*;
#(
  parameter xor_style_e XOR_STYLE = XOR_12T
) (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic s,
  output logic c0,
  output logic c1
);

  logic x_ab, x_ac, x_ad, x_cd;

  xor2 #(.STYLE(XOR_STYLE)) u_ab  (.a(a),    .b(b),    .y(x_ab));
  xor2 #(.STYLE(XOR_STYLE)) u_ac  (.a(a),    .b(c),    .y(x_ac));
  xor2 #(.STYLE(XOR_STYLE)) u_ad  (.a(a),    .b(d),    .y(x_ad));
  xor2 #(.STYLE(XOR_STYLE)) u_cd  (.a(c),    .b(d),    .y(x_cd));
  xor2 #(.STYLE(XOR_STYLE)) u_sum (.a(x_ab), .b(x_cd), .y(s));

  always_comb begin
    c0 = (b & x_ac) | (d & x_ab) | (c & x_ad);
    c1 = a & b & c & d;
  end

endmodule
