// control_unit: loop filter of the ADPLL.
//
// Holds the CW-bit DCO control register and moves it once per reference
// cycle according to the detector's FAST and Lock flags. Word bit CW-1 is the
// oscillator path (coarse tune), the lower bits the fine-tune code.
//  - path selection: after reset the word is the top of the low-frequency
//    path. The first comparison decides the path for good: if the DCO is slow
//    even there, the high-frequency path is taken. The fine code then starts
//    at mid-range (INIT_FINE).
//  - acquisition mode: modified binary search. If FAST changed polarity
//    since the previous comparison the frequency gain is first halved; then
//    the gain is subtracted from the word when FAST is high (DCO too fast)
//    and added when it is low.
//  - on the first comparison with Lock high the unit enters maintenance
//    mode, which it keeps until reset.
//  - maintenance mode: the same add/subtract step but by the phase gain,
//    whose value follows the phase-gain strategy (see phase_gain_reg).
// One CW-bit adder/subtractor serves both gains. The two modes, the gain
// rules, the shared adder and a path chosen by the first comparison follow
// the design. The start word, the start frequency gain (INIT_FGAIN),
// clamping the fine code at its ends inside the chosen path instead of
// wrapping, and ignoring a reference cycle that has no comparison yet
// (cmp_valid low) are this implementation's choices.
//
// Timing: everything is registered on the rising reference edge; fast, lock
// and cmp_valid are sampled there, half a reference cycle after the detector
// produced them. Asynchronous active-low reset.
`timescale 1ps / 1fs
module control_unit
  import adpll_pkg::*;
#(
  parameter int unsigned  W          = CW,
  parameter int unsigned  PGW        = 4,
  parameter int unsigned  RUN_LEN    = 8,
  parameter logic [W-1:0] INIT_FINE  = W'(1) << (W - 2),
  parameter logic [W-1:0] INIT_FGAIN = W'(1) << (W - 3)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cmp_valid,
  input  logic         fast,
  input  logic         lock,
  output logic [W-1:0] dco_word,
  output cu_mode_e     mode,
  output logic [W-1:0] gain_used
);

  localparam logic [W-1:0] FINE_MAX = (W'(1) << (W - 1)) - W'(1);

  logic           prev_fast, have_prev, path_done;
  logic           path_step;
  logic           changed, acq_step, enter_maint;
  logic [W-1:0]   fgain, fgain_nxt;
  logic [PGW-1:0] pgain, pgain_nxt;
  logic [W-1:0]   sum;
  logic           cout;
  logic [W-1:0]   word_nxt;

  assign changed     = have_prev && (fast != prev_fast);
  assign enter_maint = cmp_valid && (mode == MODE_ACQ) && lock;
  assign path_step   = cmp_valid && (mode == MODE_ACQ) && !lock && !path_done;
  assign acq_step    = cmp_valid && (mode == MODE_ACQ) && !lock && path_done;

  freq_gain_reg #(.W(W), .INIT(INIT_FGAIN)) u_fgain (
    .clk     (clk),
    .rst_n   (rst_n),
    .reload  (1'b0),
    .shift   (acq_step && changed),
    .gain    (fgain),
    .gain_nxt(fgain_nxt)
  );

  phase_gain_reg #(.PGW(PGW), .RUN_LEN(RUN_LEN)) u_pgain (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (enter_maint),
    .step    (cmp_valid && (mode == MODE_MAINT)),
    .changed (changed),
    .gain    (pgain),
    .gain_nxt(pgain_nxt)
  );

  assign gain_used = (mode == MODE_ACQ && !lock) ? fgain_nxt : W'(pgain_nxt);

  addsub #(.W(W)) u_addsub (
    .a   (dco_word),
    .b   (gain_used),
    .sub (fast),
    .y   (sum),
    .cout(cout)
  );

  // The path bit is kept; a fine code that would leave its range (carry
  // into the path bit, overflow or borrow) is clamped to the range end.
  always_comb begin
    word_nxt = sum;
    if (path_step)
      word_nxt = {~fast, INIT_FINE[W-2:0]};
    else if (sum[W-1] != dco_word[W-1] || cout != fast)
      word_nxt = {dco_word[W-1], fast ? '0 : FINE_MAX[W-2:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dco_word  <= FINE_MAX;
      mode      <= MODE_ACQ;
      path_done <= 1'b0;
      prev_fast <= 1'b0;
      have_prev <= 1'b0;
    end else if (cmp_valid) begin
      dco_word  <= word_nxt;
      prev_fast <= fast;
      have_prev <= 1'b1;
      path_done <= 1'b1;
      if (enter_maint) mode <= MODE_MAINT;
    end
  end

endmodule
