// pfd: dual-mode one-cycle phase/frequency detector.
//
// The reference rising edge starts the DCO (through the enable generator);
// the adjustable-length DCO counter counts its edges, and at the falling edge
// of the matched-delay reference the synchronizers decide FAST (the DCO
// reached its count before the mid-point) and Lock (it reached it within the
// last half DCO period). Because the DCO restarts in phase with the reference
// every cycle, one comparison measures frequency and phase together and takes
// one reference cycle, as the design intends. Structure: dco_counter feeding
// pfd_sync.
//
// Ports: dco_clk and dco_en from the DCO and enable generator; ref_m, the
// matched-delay reference; freq_sel one-hot frequency select; fast, lock and
// valid to the control unit (updated at the falling edge of ref_m).
`timescale 1ps / 1fs
module pfd
  import adpll_pkg::*;
(
  input  logic                dco_clk,
  input  logic                dco_en,
  input  logic                ref_m,
  input  logic                rst_n,
  input  logic [NUM_FREQ-1:0] freq_sel,
  output logic                fast,
  output logic                lock,
  output logic                valid
);

  logic hit, late;

  dco_counter u_cnt (
    .dco_clk (dco_clk),
    .dco_en  (dco_en),
    .freq_sel(freq_sel),
    .hit     (hit),
    .late    (late)
  );

  pfd_sync u_sync (
    .ref_m(ref_m),
    .rst_n(rst_n),
    .hit  (hit),
    .late (late),
    .fast (fast),
    .lock (lock),
    .valid(valid)
  );

endmodule
