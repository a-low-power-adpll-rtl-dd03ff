// phase_gain_reg: phase-gain register and its gain strategy.
//
// Used in the frequency/phase maintenance mode. The gain is a PGW-bit one-hot
// word (0001, 0010, 0100, 1000 for PGW = 4), loaded with 1 when maintenance
// starts. On each comparison (step): if the FAST polarity changed, the gain is
// shifted right (halved, not below 1); if FAST has kept the same polarity for
// RUN_LEN successive reference cycles, the gain is shifted left (doubled, not
// above the top bit) and the count restarts. The 4-bit word, the start value
// and the shift rules with eight cycles follow the design; counting the
// cycle that starts a run as its first is this implementation's reading.
//
// gain_nxt is the gain that applies to the current comparison (the adder uses
// it in the same cycle); gain is the registered value. Asynchronous reset.
`timescale 1ps / 1fs
module phase_gain_reg #(
  parameter int unsigned PGW     = 4,
  parameter int unsigned RUN_LEN = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           step,
  input  logic           changed,
  output logic [PGW-1:0] gain,
  output logic [PGW-1:0] gain_nxt
);

  localparam int unsigned RW = $clog2(RUN_LEN + 1);

  logic [RW-1:0] run, run_nxt;

  always_comb begin
    gain_nxt = gain;
    run_nxt  = run;
    if (start) begin
      gain_nxt = PGW'(1);
      run_nxt  = RW'(1);
    end else if (step) begin
      if (changed) begin
        if (!gain[0]) gain_nxt = gain >> 1;
        run_nxt = RW'(1);
      end else if (run + RW'(1) >= RW'(RUN_LEN)) begin
        if (!gain[PGW-1]) gain_nxt = gain << 1;
        run_nxt = '0;
      end else begin
        run_nxt = run + RW'(1);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gain <= PGW'(1);
      run  <= '0;
    end else begin
      gain <= gain_nxt;
      run  <= run_nxt;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot(gain))
    else $error("phase gain is not one-hot");

endmodule
