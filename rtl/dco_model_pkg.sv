// dco_model_pkg: delay figures of the behavioural oscillator models.
//
// Behavioural model only (not synthesizable): it gives the delay of one
// digitally controlled delay element (DCDE) as a function of its code and
// the fixed delay of the enabling NAND, path multiplexer and balance
// inverters. The form of the DCDE delay follows the current-mirror cell: the
// charging current is that of an always-on device plus a binary-weighted bank,
// so the delay is t0 + A / (B + code) and falls monotonically with the code.
// The constants are this implementation's own fit to the oscillator's quoted
// ranges at 25 C, 1.2 V: 260-635 MHz with eight cells, 500-1150 MHz with four.
// delay_scale multiplies every delay and stands for the supply and
// temperature corner: about 1.08 reproduces the 75 C ranges and 1.10 the
// 1.1 V ranges of the oscillator. A testbench may change it at any time to
// model drift; the cells pick the new value up at their next edge.
`timescale 1ps / 1fs
package dco_model_pkg;

  real delay_scale = 1.0;  // 1.0 = 25 C, 1.2 V

  localparam realtime T_INTRINSIC = 40.0;    // ps, delay at infinite current
  localparam real     K_CURRENT   = 8441.0;  // ps x (unit currents)
  localparam real     I_ALWAYS_ON = 44.25;   // always-on device, in LSB units
  localparam realtime T_FIXED     = 77.0;    // ps, NAND + mux + balance inverters

  // Delay of one DCDE for code 0..128 (ps).
  function automatic realtime cell_delay(input int unsigned code);
    return delay_scale * (T_INTRINSIC + K_CURRENT / (I_ALWAYS_ON + real'(code)));
  endfunction

  // Half period of the ring for an 11-bit control word (ps): the fixed gate
  // delay plus the delays of the active cells. Cell i gets code word[9:3]
  // plus its extra device: word[2] in cells 0, 2, 4, 6, word[1] in cells
  // 1, 5 and word[0] in cell 3 (see dco).
  function automatic realtime half_period(input logic [10:0] word);
    realtime t;
    int unsigned ncell;
    logic [7:0] extra;
    extra = {word[1], word[2], word[1], word[2], word[0], word[2], word[1], word[2]};
    ncell = word[10] ? 4 : 8;
    t = delay_scale * T_FIXED;
    for (int unsigned i = 0; i < ncell; i++)
      t += cell_delay(int'(word[9:3]) + int'(extra[i]));
    return t;
  endfunction

endpackage
