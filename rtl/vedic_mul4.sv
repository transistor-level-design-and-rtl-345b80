// vedic_mul4: 4x4 unsigned multiplier after the Urdhva Tiryagbhyam ("vertically and
// crosswise") method.
//
// Sixteen AND gates form the partial products p[i][j] = b[i] & a[j]. Column k of the
// product gathers the cross products with i + j = k (1, 2, 3, 4, 3, 2, 1 of them, the
// seven "steps" of the vertical-and-crosswise pattern) and reduces them with one-bit
// adders, one column at a time from the least significant end:
//   col 0  r[0] = p00
//   col 1  half adder of the two cross products               -> r[1]
//   col 2  add4 of three cross products and the col-1 carry   -> r[2]
//   col 3  add4 of the four cross products; its sum and the
//          col-2 c0 carry go through a half adder             -> r[3]
//   col 4  the three carries arriving here (col-2 c1, col-3 c0, col-3 half-adder
//          carry) are merged by a full adder ("carry to add and propagate");
//          add4 of three cross products and that sum          -> r[4]
//   col 5  carry merge of col-3 c1, col-4 merge carry, col-4 c0; full adder of two
//          cross products and that sum                        -> r[5]
//   col 6  carry merge of col-4 c1, col-5 merge carry, col-5 full-adder carry; half
//          adder of p33 and that sum                           -> r[6]
//   col 7  r[7] = XOR of the two carries left over (they are never both 1, as the
//          product is at most 225).
// The adder kinds per column (half adder, 4-input adder, full adder, carry merge)
// follow the design's block diagram; which carry goes into which merge is this
// design's own wiring, chosen so that every carry is counted exactly once.
//
// Interface: a[3:0], b[3:0] in; r[7:0] = a * b out. Combinational.
module vedic_mul4
  import mac_pkg::*;
#(
  parameter xor_style_e XOR_STYLE = XOR_12T
) (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] r
);

  logic [3:0][3:0] p;   // p[i][j] = b[i] & a[j], weight i + j

  always_comb
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        p[i][j] = b[i] & a[j];

  // column 0
  assign r[0] = p[0][0];

  // column 1
  logic h1c;
  half_adder #(.XOR_STYLE(XOR_STYLE)) u_h1 (.a(p[0][1]), .b(p[1][0]), .s(r[1]), .c(h1c));

  // column 2
  logic a2c0, a2c1;
  add4 #(.XOR_STYLE(XOR_STYLE)) u_a2 (
    .a(p[0][2]), .b(p[1][1]), .c(p[2][0]), .d(h1c), .s(r[2]), .c0(a2c0), .c1(a2c1));

  // column 3
  logic s3, a3c0, a3c1, h3c;
  add4 #(.XOR_STYLE(XOR_STYLE)) u_a3 (
    .a(p[0][3]), .b(p[1][2]), .c(p[2][1]), .d(p[3][0]), .s(s3), .c0(a3c0), .c1(a3c1));
  half_adder #(.XOR_STYLE(XOR_STYLE)) u_h3 (.a(s3), .b(a2c0), .s(r[3]), .c(h3c));

  // column 4
  logic m4s, m4c, a4c0, a4c1;
  full_adder #(.XOR_STYLE(XOR_STYLE)) u_m4 (.a(a2c1), .b(a3c0), .ci(h3c), .s(m4s), .co(m4c));
  add4 #(.XOR_STYLE(XOR_STYLE)) u_a4 (
    .a(p[1][3]), .b(p[2][2]), .c(p[3][1]), .d(m4s), .s(r[4]), .c0(a4c0), .c1(a4c1));

  // column 5
  logic m5s, m5c, f5c;
  full_adder #(.XOR_STYLE(XOR_STYLE)) u_m5 (.a(a3c1), .b(m4c), .ci(a4c0), .s(m5s), .co(m5c));
  full_adder #(.XOR_STYLE(XOR_STYLE)) u_f5 (.a(p[2][3]), .b(p[3][2]), .ci(m5s), .s(r[5]), .co(f5c));

  // column 6
  logic m6s, m6c, h6c;
  full_adder #(.XOR_STYLE(XOR_STYLE)) u_m6 (.a(a4c1), .b(m5c), .ci(f5c), .s(m6s), .co(m6c));
  half_adder #(.XOR_STYLE(XOR_STYLE)) u_h6 (.a(p[3][3]), .b(m6s), .s(r[6]), .c(h6c));

  // column 7
  xor2 #(.STYLE(XOR_STYLE)) u_x7 (.a(h6c), .b(m6c), .y(r[7]));

endmodule
