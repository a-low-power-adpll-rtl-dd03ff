// adpll_synth: ADPLL-based integer-N frequency synthesizer.
//
// From a 50 MHz reference the loop generates 300, 400, 500, 600, 850 or
// 1000 MHz, chosen by a one-hot select (S300M, S400M, S500M, S600M, S850M,
// S1G in bits 0 to 5). Loop: at every rising reference edge the enable
// generator stops the DCO for half a DCO period while the control unit loads
// a new word, then restarts it in phase with the (matched-delay) reference;
// the PFD counts DCO edges with an adjustable-length counter and, at the
// middle of the reference cycle, reports FAST and Lock; the control unit runs
// a binary search until Lock, then tracks with the phase-gain strategy. One
// comparison and one word update happen per reference cycle.
//
// The DCO, its delay cells and the enable generator are behavioural models
// (they are delay-based circuits); the PFD logic and the control unit are
// synthesizable. Ports: ref_clk, rst_n (asynchronous, active low), freq_sel;
// clk_out (DCO output), lock (Lock flag of the latest comparison), locked
// (control unit in maintenance mode), dco_word (control word), fast (FAST
// flag of the latest comparison); for observation, dco_en (DCO enable),
// ref_m (matched-delay reference) and gain (step the control unit applies at
// the next rising reference edge: frequency gain in acquisition, phase gain
// in maintenance).
`timescale 1ps / 1fs
module adpll_synth
  import adpll_pkg::*;
(
  input  logic                ref_clk,
  input  logic                rst_n,
  input  logic [NUM_FREQ-1:0] freq_sel,
  output logic                clk_out,
  output logic                lock,
  output logic                locked,
  output logic                fast,
  output logic [CW-1:0]       dco_word,
  output logic                dco_en,
  output logic                ref_m,
  output logic [CW-1:0]       gain
);

  logic     dco_clk, cmp_valid;
  cu_mode_e mode;

  dco_enable_gen u_en (
    .ref_clk(ref_clk),
    .word   (dco_word),
    .dco_en (dco_en),
    .ref_m  (ref_m)
  );

  dco u_dco (
    .en     (dco_en),
    .word   (dco_word),
    .clk_out(dco_clk)
  );

  pfd u_pfd (
    .dco_clk (dco_clk),
    .dco_en  (dco_en),
    .ref_m   (ref_m),
    .rst_n   (rst_n),
    .freq_sel(freq_sel),
    .fast    (fast),
    .lock    (lock),
    .valid   (cmp_valid)
  );

  control_unit u_cu (
    .clk      (ref_clk),
    .rst_n    (rst_n),
    .cmp_valid(cmp_valid),
    .fast     (fast),
    .lock     (lock),
    .dco_word (dco_word),
    .mode     (mode),
    .gain_used(gain)
  );

  assign clk_out = dco_clk;
  assign locked  = (mode == MODE_MAINT);

endmodule
