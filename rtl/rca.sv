// rca: W-bit ripple carry adder, a chain of full_adder cells.
//
// s = a + b + ci; co is the carry out of the most significant bit. The carry ripples
// from bit 0 to bit W-1 through one full adder per bit, so the delay grows linearly
// with W. The datapath uses it at 8, 12 and 30 bits; W = 8 is the default only
// because every parameter needs one.
//
// Interface: a[W-1:0], b[W-1:0], ci in; s[W-1:0], co out. Combinational.
module rca
  import mac_pkg::*;
#(
  parameter int unsigned W         = 8,
  parameter xor_style_e  XOR_STYLE = XOR_12T
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);

  logic [W:0] c;

  assign c[0] = ci;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder #(.XOR_STYLE(XOR_STYLE)) u_fa (
      .a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
  end

  assign co = c[W];

endmodule
