// dco: digitally controlled ring oscillator (behavioural model).
//
// Behavioural model, not synthesizable. The ring is one enabling NAND gate
// followed by eight DCDEs; a path-select bit (word[10], the coarse tune)
// closes the ring after four cells (high-frequency mode, 1) or after all
// eight (low-frequency mode, 0). The 10-bit fine word is spread over the
// cells as the design does: bits 9:3 drive the 7-bit bank of all eight
// cells, and the extra smallest device of cells 0, 2, 4, 6 is driven by
// bit 2, of cells 1, 5 by bit 1 and of cell 3 by bit 0, so in eight-cell
// mode the whole fine word acts as one binary-weighted number. The
// assignment of extra devices to particular cells is this model's choice.
//
// Timing: while en is low the NAND holds the ring and clk_out stays high.
// After en rises, clk_out falls half a period later and then toggles every
// half period, so its k-th rising edge comes k periods after enable. The
// word must only change while en is low.
`timescale 1ps / 1fs
module dco
  import adpll_pkg::*;
(
  input  logic          en,
  input  logic [CW-1:0] word,
  output logic          clk_out
);

  logic                 nand_out;
  logic [NUM_CELLS-1:0] cell_out;
  logic [NUM_CELLS-1:0] extra;
  logic                 fb;

  assign extra = {word[1], word[2], word[1], word[2], word[0], word[2], word[1], word[2]};

  // Enabling NAND; its delay carries the fixed part of the half period.
  initial nand_out = 1'b1;
  always @(en or fb) nand_out <= #(dco_model_pkg::delay_scale * dco_model_pkg::T_FIXED) ~(en & fb);

  for (genvar i = 0; i < NUM_CELLS; i++) begin : g_cell
    dcde #(.INIT(i % 2 == 1)) u_cell (
      .in   (i == 0 ? nand_out : cell_out[i-1]),
      .code (word[9:3]),
      .extra(extra[i]),
      .out  (cell_out[i])
    );
  end

  // Path selector (coarse tune).
  assign fb      = word[CW-1] ? cell_out[3] : cell_out[NUM_CELLS-1];
  assign clk_out = fb;

endmodule
