// dco_counter: adjustable-length DCO counter of the phase/frequency detector.
//
// It plays the part of the feedback divider. The counter is a chain of
// STAGES flip-flops clocked by the DCO: while the DCO is disabled the chain is
// cleared, and every counted DCO edge shifts a 1 in, so stage k is high once
// k edges have arrived. The frequency select picks which stage is compared
// with the middle of the reference cycle: for an output of N times the
// reference, N/2 DCO periods must fit in half a reference period, so stage
// N/2 is used. For odd N (850 MHz from 50 MHz, N = 17) the DCO is counted
// through an inverting path, so the 9th falling edge, 8.5 periods after
// enable, is the one compared. The chain of flip-flops with a selectable tap
// and the inverting path follow the design; the stage table is in adpll_pkg.
//
// Outputs: hit is the selected stage; late is hit delayed by half a DCO
// period (captured on the opposite DCO edge), used by the lock window.
// freq_sel must be stable while the DCO runs; clearing is asynchronous on
// dco_en low. The counting clock is derived from the DCO output by an XOR
// with the odd-mode bit, which only changes with freq_sel.
`timescale 1ps / 1fs
module dco_counter
  import adpll_pkg::*;
#(
  parameter int unsigned STAGES = CNT_STAGES
) (
  input  logic                dco_clk,
  input  logic                dco_en,
  input  logic [NUM_FREQ-1:0] freq_sel,
  output logic                hit,
  output logic                late
);

  cnt_cfg_t          cfg;
  logic              cnt_clk;
  logic [STAGES-1:0] chain;

  assign cfg     = cnt_cfg(freq_sel);
  assign cnt_clk = dco_clk ^ cfg.odd;   // inverting path for odd factors

  always_ff @(posedge cnt_clk or negedge dco_en) begin
    if (!dco_en) chain <= '0;
    else         chain <= {chain[STAGES-2:0], 1'b1};
  end

  assign hit = chain[cfg.stage - 4'd1];

  always_ff @(negedge cnt_clk or negedge dco_en) begin
    if (!dco_en) late <= 1'b0;
    else         late <= hit;
  end

endmodule
