// xor2: two-input exclusive-OR cell, the basic sum element of every adder in the MAC.
//
// Function: y = a XOR b (truth table 00->0, 01->1, 10->1, 11->0).
//
// The datapath can be built with three XOR circuits: a conventional 22-transistor
// form, a 12-transistor cell and a 6-transistor transmission-gate cell. Their
// difference is in transistor count and power, not in logic, so the RTL has one
// module with a STYLE parameter:
//   XOR_22T  written as the conventional gate network, two inverters feeding two
//            AND gates whose outputs are ORed: y = (a & ~b) | (~a & b).
//   XOR_12T,
//   XOR_6T   transistor-level circuits with no gate-level decomposition; they are
//            written as the exclusive-OR they compute.
// The 12T default follows the design's preferred cell; the choice has no effect on
// function or timing in simulation.
//
// Interface: a, b in; y out. Purely combinational, no clock.
module xor2
  import mac_pkg::*;
#(
  parameter xor_style_e STYLE = XOR_12T
) (
  input  logic a,
  input  logic b,
  output logic y
);

  logic a_n, b_n, t0, t1;

  always_comb begin
    a_n = ~a;
    b_n = ~b;
    t0  = a & b_n;
    t1  = a_n & b;
    if (STYLE == XOR_22T) y = t0 | t1;   // AND-OR with inverters
    else                  y = a ^ b;     // 12T / 6T cell function
  end

endmodule
