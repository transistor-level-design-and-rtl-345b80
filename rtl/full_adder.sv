// full_adder: one-bit full adder built from two XOR cells.
//
// p = a XOR b, s = p XOR ci, co = (a AND b) OR (p AND ci): the conventional
// propagate/generate form, with both XORs taken from xor2 so the XOR circuit choice
// (XOR_STYLE) applies here too.
//
// Interface: a, b, ci in; s (weight 1), co (weight 2) out. Combinational.
module full_adder
  import mac_pkg::*;
#(
  parameter xor_style_e XOR_STYLE = XOR_12T
) (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  logic p;

  xor2 #(.STYLE(XOR_STYLE)) u_x0 (.a(a),  .b(b),  .y(p));
  xor2 #(.STYLE(XOR_STYLE)) u_x1 (.a(p),  .b(ci), .y(s));

  always_comb co = (a & b) | (p & ci);

endmodule
