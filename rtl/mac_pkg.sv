// mac_pkg: sizes and cell choices shared by the Vedic multiply-accumulate datapath.
//
// The MAC multiplies two 8-bit operands with an Urdhva Tiryagbhyam ("vertically and
// crosswise") multiplier built from four 4x4 multipliers, and accumulates the 16-bit
// products in a 30-bit register. OP_W (8) and ACC_W (30) are the design's published
// sizes; PROD_W follows from OP_W.
//
// xor_style_e names the three XOR circuits the datapath can be built with. At the
// logic level they are the same exclusive-OR; the style only selects which gate-level
// form the XOR cell takes (see xor2.sv). XOR_12T, the lowest-power circuit of the
// three, is the default.
package mac_pkg;

  localparam int unsigned OP_W   = 8;           // multiplier operand width
  localparam int unsigned PROD_W = 2 * OP_W;    // product width
  localparam int unsigned ACC_W  = 30;          // accumulator adder and register width

  typedef enum logic [1:0] {
    XOR_22T = 2'd0,   // conventional: two inverters, two AND gates, one OR gate
    XOR_12T = 2'd1,   // 12-transistor cell
    XOR_6T  = 2'd2    // 6-transistor pass/transmission-gate cell
  } xor_style_e;

endpackage
