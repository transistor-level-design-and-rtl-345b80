// half_adder: one-bit half adder, sum from the XOR cell, carry from an AND gate.
//
// s = a XOR b, c = a AND b. The XOR is an xor2 instance so that the whole datapath
// shares one XOR circuit choice (XOR_STYLE).
//
// Interface: a, b in; s (weight 1), c (weight 2) out. Combinational.
module half_adder
  import mac_pkg::*;
#(
  parameter xor_style_e XOR_STYLE = XOR_12T
) (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);

  xor2 #(.STYLE(XOR_STYLE)) u_x (.a(a), .b(b), .y(s));

  always_comb c = a & b;

endmodule
