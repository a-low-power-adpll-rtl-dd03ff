// full_adder: one-bit full adder cell of the ripple adder/subtractor.
//
// Combinational: s = a ^ b ^ ci, co = majority(a, b, ci). The design builds
// this cell at transistor level with inverted outputs to shorten the carry
// chain; at the logic level used here the polarity trick is not visible and
// the cell is a plain full adder.
`timescale 1ps / 1fs
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (ci & (a ^ b));

endmodule
