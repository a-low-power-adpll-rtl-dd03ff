// adpll_pkg: types and constants shared by the ADPLL frequency synthesizer.
//
// The loop is controlled by an 11-bit binary-weighted DCO control word: bit 10
// selects the oscillator path (1 = four-cell high-frequency ring, 0 = eight-cell
// low-frequency ring) and bits 9:0 are the fine-tune code spread over the eight
// delay elements. The output frequency is chosen by a one-hot select of six
// multiplication factors of the 50 MHz reference (6, 8, 10, 12, 17 and 20).
// The word width, the six frequencies and the 4-bit phase gain follow the
// design; the enum encodings are this implementation's own.
`timescale 1ps / 1fs
package adpll_pkg;

  localparam int unsigned CW        = 11;  // DCO control word width
  localparam int unsigned NUM_CELLS = 8;   // DCDEs in the ring
  localparam int unsigned NUM_FREQ  = 6;   // selectable output frequencies
  localparam int unsigned CNT_STAGES = 10; // longest DCO counter (1 GHz)

  // Bit positions of the one-hot frequency select.
  typedef enum logic [2:0] {
    SEL_300M = 3'd0,
    SEL_400M = 3'd1,
    SEL_500M = 3'd2,
    SEL_600M = 3'd3,
    SEL_850M = 3'd4,
    SEL_1G   = 3'd5
  } freq_idx_e;

  // Control unit operating modes.
  typedef enum logic {
    MODE_ACQ   = 1'b0,  // frequency/phase acquisition (binary search)
    MODE_MAINT = 1'b1   // frequency/phase maintenance (phase gain)
  } cu_mode_e;

  // Counter configuration for one output frequency: the comparison is made
  // at the middle of the reference cycle, so the counter must see
  // N/2 DCO periods; odd N counts falling edges (the inverting path).
  typedef struct packed {
    logic [3:0] stage;  // 1-based counter stage that is compared
    logic       odd;    // count falling DCO edges instead of rising
  } cnt_cfg_t;

  function automatic cnt_cfg_t cnt_cfg(input logic [NUM_FREQ-1:0] sel);
    cnt_cfg_t c;
    c = '{stage: 4'd10, odd: 1'b0};            // default: 1 GHz
    if      (sel[SEL_300M]) c = '{stage: 4'd3,  odd: 1'b0};  // N = 6
    else if (sel[SEL_400M]) c = '{stage: 4'd4,  odd: 1'b0};  // N = 8
    else if (sel[SEL_500M]) c = '{stage: 4'd5,  odd: 1'b0};  // N = 10
    else if (sel[SEL_600M]) c = '{stage: 4'd6,  odd: 1'b0};  // N = 12
    else if (sel[SEL_850M]) c = '{stage: 4'd9,  odd: 1'b1};  // N = 17
    return c;
  endfunction

endpackage
