// addsub: ripple-carry adder/subtractor of the control unit.
//
// Updates the DCO control word by the selected gain: y = a + b when sub is
// low, y = a - b when sub is high. Subtraction is done as a + ~b + 1, the
// operand b being inverted bit by bit and the carry-in set, so one chain of
// W full adders serves both operations (the design combines its adder and
// subtracter this way to save a circuit). cout is the carry out of the top
// cell: for an addition 1 means overflow, for a subtraction 0 means a borrow.
// A ripple chain is used because the control unit has about half a
// reference period (10 ns) to settle. Purely combinational.
`timescale 1ps / 1fs
module addsub #(
  parameter int unsigned W = 11
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] y,
  output logic         cout
);

  logic [W:0] c;

  assign c[0] = sub;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a (a[i]),
      .b (b[i] ^ sub),
      .ci(c[i]),
      .s (y[i]),
      .co(c[i+1])
    );
  end

  assign cout = c[W];

endmodule
