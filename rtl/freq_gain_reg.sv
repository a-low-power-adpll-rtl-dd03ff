// freq_gain_reg: frequency-gain register of the control unit.
//
// A W-bit unidirectional shift register holding a binary-weighted gain, used
// in the acquisition mode (modified binary search). Each shift moves it one
// place to the right, halving the step by which the DCO control word moves.
// The value never drops below 1, so the search keeps moving by one LSB once
// the gain is exhausted; that floor, and the reset value INIT (half the fine-code
// range, a one-hot bit), are this implementation's choices.
//
// gain_nxt is the value after the current cycle's shift (shift high) and is
// what the adder uses in the same cycle; gain is the registered value.
// Asynchronous active-low reset to INIT; reload (synchronous) also returns it
// to INIT.
`timescale 1ps / 1fs
module freq_gain_reg #(
  parameter int unsigned W    = 11,
  parameter logic [W-1:0] INIT = W'(1) << (W - 3)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         reload,
  input  logic         shift,
  output logic [W-1:0] gain,
  output logic [W-1:0] gain_nxt
);

  always_comb begin
    gain_nxt = gain;
    if (reload)                      gain_nxt = INIT;
    else if (shift && gain > W'(1))  gain_nxt = gain >> 1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) gain <= INIT;
    else        gain <= gain_nxt;
  end

endmodule
