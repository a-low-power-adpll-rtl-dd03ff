// dcde: digitally controlled delay element (behavioural model).
//
// Behavioural model, not synthesizable. It stands for the current-mirror
// delay cell: seven binary-weighted pMOS devices (code[6:0]) and one extra
// smallest device (extra) add to the current of an always-on device, the
// current is mirrored into a current-starved inverter, and a larger current
// gives a shorter delay. Because only the (dis)charging current depends on
// the code, the delay falls monotonically with it. The cell inverts, and both
// edges are delayed equally (transport delay). The delay law and its constants
// are this model's own fit, see dco_model_pkg.
//
// Ports: in -> out (inverted, delayed); code and extra set the delay and are
// expected to be stable while edges travel through the cell. INIT gives the
// output at time zero so that a ring of cells starts in its rest state.
`timescale 1ps / 1fs
module dcde
  import dco_model_pkg::*;
#(
  parameter bit INIT = 1'b0  // output level at time zero (ring at rest)
) (
  input  logic       in,
  input  logic [6:0] code,
  input  logic       extra,
  output logic       out
);

  initial out = INIT;

  // The delay is evaluated at each input edge, so a change of code or of
  // the corner factor applies from the next edge on.
  always @(in) out <= #(cell_delay(int'(code) + int'(extra))) ~in;

endmodule
