// dco_enable_gen: DCO enable pulse generator and matched-delay reference
// (behavioural model).
//
// Behavioural model, not synthesizable: it contains a delay element. As in
// the design it is a pulse generator made of a delay element and a NAND
// gate. The delay element, a replica of the DCO driven by the same word,
// delays the reference by half a DCO period to give ref_m, the matched-delay
// reference that clocks the PFD synchronizers. The NAND of the reference and
// the inverted ref_m is the DCO enable: it is low from each rising reference
// edge until ref_m follows, so the ring is stopped while the control unit
// loads a new word and restarts at the ref_m edge. Relative to ref_m, the DCO
// is therefore an oscillator started exactly at the reference edge.
//
// The replica delay used here is the longer of the half periods before and
// after the word update (plus T_SETTLE), so that the ring is certainly at
// rest when enabled; that margin is this model's own choice.
//
// Ports: ref_clk in, word (control word) in, dco_en out (high = run),
// ref_m out (ref_clk delayed by the replica delay).
`timescale 1ps / 1fs
module dco_enable_gen
  import adpll_pkg::*;
#(
  parameter realtime T_SETTLE = 1.0  // ps, lets a new word reach the replica
) (
  input  logic          ref_clk,
  input  logic [CW-1:0] word,
  output logic          dco_en,
  output logic          ref_m
);

  realtime rep_old, rep_new, rep;

  initial begin
    ref_m = 1'b0;
    rep   = 0.0;
  end

  // Replica delay element: both reference edges, delayed by the same amount.
  always @(posedge ref_clk) begin
    rep_old = dco_model_pkg::half_period(word);
    #(T_SETTLE);
    rep_new = dco_model_pkg::half_period(word);
    rep     = (rep_new > rep_old) ? rep_new : rep_old;
    #(rep);
    ref_m = 1'b1;
  end

  always @(negedge ref_clk) ref_m <= #(T_SETTLE + rep) 1'b0;

  // Pulse-forming NAND.
  assign dco_en = ~(ref_clk & ~ref_m);

endmodule
