// pfd_sync: synchronizers of the one-cycle phase/frequency detector.
//
// Two flip-flops clocked by the falling edge of the matched-delay reference
// (the middle of the reference cycle) capture the DCO counter: one captures
// the selected stage (hit), the other the inversion of that stage delayed by
// half a DCO period (late). FAST is the first: the DCO reached its count
// before the reference mid-point, so it runs fast. Lock is asserted only when
// both synchronizers read high, i.e. the counted DCO edge fell inside the
// half DCO period just before the mid-point. Sampling at the falling edge and
// the two-synchronizer lock follow the design; the half-period window is this
// implementation's reading of "the output and the inversion of DCO counter".
// valid marks that at least one comparison has been captured since reset.
//
// Timing: fast, lock and valid change at the falling edge of ref_m and are
// consumed by the control unit at the next rising reference edge.
`timescale 1ps / 1fs
module pfd_sync (
  input  logic ref_m,
  input  logic rst_n,
  input  logic hit,
  input  logic late,
  output logic fast,
  output logic lock,
  output logic valid
);

  logic s_hit, s_nlate;

  always_ff @(negedge ref_m or negedge rst_n) begin
    if (!rst_n) begin
      s_hit   <= 1'b0;
      s_nlate <= 1'b0;
      valid   <= 1'b0;
    end else begin
      s_hit   <= hit;
      s_nlate <= ~late;
      valid   <= 1'b1;
    end
  end

  assign fast = s_hit;
  assign lock = s_hit & s_nlate;

endmodule
