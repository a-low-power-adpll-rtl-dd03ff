// tb_adpll_synth: end-to-end test of the ADPLL frequency synthesizer.
//
// For each of the six output frequencies (300, 400, 500, 600, 850 and
// 1000 MHz from a 50 MHz reference) the loop is reset and run:
//  - Lock must be reached within 16 reference cycles;
//  - after settling, the DCO period measured from the edges inside one
//    reference cycle must be within 1 % of reference period / N;
//  - while locked, the counted DCO edge must sit within one DCO period of
//    the middle of the reference cycle (phase alignment).
// Then, without a reset, the select is moved from 500 to 600 MHz so the loop
// has to track a large step in maintenance mode: it must settle again, and the
// phase gain must have been raised and lowered. Every mechanism is counted
// (frequency-gain halving, mode switch, phase gain up and down, both DCO
// paths, the odd inverting counter path) and a mechanism that never occurred
// counts as a failure. Runs with all parameters at their defaults.
`timescale 1ps / 1fs
module tb_adpll_synth;
  import adpll_pkg::*;

  localparam realtime T_REF = 20000.0;  // 50 MHz

  logic                ref_clk = 1'b0;
  logic                rst_n   = 1'b1;
  logic [NUM_FREQ-1:0] freq_sel = 6'b000001;
  logic                clk_out, lock, locked, fast;
  logic [CW-1:0]       dco_word, gain;
  logic                dco_en, ref_m;

  int checks = 0, failures = 0;
  int n_fhalve = 0, n_maint = 0, n_pg_up = 0, n_pg_dn = 0, n_hi_path = 0, n_lo_path = 0, n_odd = 0;

  adpll_synth dut (
    .ref_clk (ref_clk),
    .rst_n   (rst_n),
    .freq_sel(freq_sel),
    .clk_out (clk_out),
    .lock    (lock),
    .locked  (locked),
    .fast    (fast),
    .dco_word(dco_word),
    .dco_en  (dco_en),
    .ref_m   (ref_m),
    .gain    (gain)
  );

  always #(T_REF / 2) ref_clk = ~ref_clk;

  // Mechanism counters, sampled where the control unit registers: gain is
  // the step about to be applied, so a smaller value in acquisition is a
  // halving and a change in maintenance is a phase-gain move.
  logic [CW-1:0] g_q = '0;
  logic          locked_q = 1'b0;
  always @(posedge ref_clk) begin
    g_q      <= gain;
    locked_q <= locked;
    if (rst_n && !locked && !locked_q && g_q != 0 && gain < g_q) n_fhalve++;
    if (rst_n && locked && locked_q && gain > g_q) n_pg_up++;
    if (rst_n && locked && locked_q && gain < g_q) n_pg_dn++;
    if (rst_n && locked && !locked_q) n_maint++;
    if (dco_en == 1'b0 && rst_n) begin
      if (dco_word[CW-1]) n_hi_path++; else n_lo_path++;
    end
    if (rst_n && freq_sel == 6'b010000) n_odd++;
  end

  // Edge times of the DCO inside the current reference cycle.
  realtime t_en, t_edges[$];
  always @(posedge dco_en) begin
    t_en = $realtime;
    t_edges.delete();
  end
  always @(posedge clk_out) if (dco_en) t_edges.push_back($realtime);

  function automatic int n_of(input int idx);
    case (idx)
      0: return 6;  1: return 8;  2: return 10;
      3: return 12; 4: return 17; default: return 20;
    endcase
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Measure the DCO period from the edges of the cycle just before the
  // reference falling edge, and the phase error of the N/2-th edge.
  task automatic measure(input int n, output real period, output real phase_err);
    @(negedge ref_m);
    if (t_edges.size() >= 2)
      period = (t_edges[$] - t_edges[0]) / real'(t_edges.size() - 1);
    else
      period = 0.0;
    // the (N/2)-th counted edge is expected at t_en + (N/2) * T
    phase_err = ($realtime - t_en) - real'(n) / 2.0 * period;
  endtask

  int  lock_cycle;
  real per, perr, target;

  initial begin
    for (int idx = 0; idx < NUM_FREQ; idx++) begin
      rst_n    = 1'b0;
      freq_sel = NUM_FREQ'(1) << idx;
      repeat (3) @(posedge ref_clk);
      #1000 rst_n = 1'b1;
      lock_cycle = -1;
      for (int c = 1; c <= 40; c++) begin
        @(posedge ref_clk);
        #1;
        if (lock_cycle < 0 && locked) lock_cycle = c;
      end
      $display("N=%0d: locked after %0d reference cycles, word=%0d", n_of(idx), lock_cycle, dco_word);
      check(lock_cycle > 0 && lock_cycle <= 16, $sformatf("N=%0d lock within 16 cycles (got %0d)", n_of(idx), lock_cycle));
      target = T_REF / real'(n_of(idx));
      measure(n_of(idx), per, perr);
      $display("N=%0d: period %.2f ps (target %.2f), phase error %.1f ps", n_of(idx), per, target, perr);
      check(per > 0.99 * target && per < 1.01 * target, $sformatf("N=%0d period %.2f vs %.2f", n_of(idx), per, target));
      check(perr > -per && perr < per, $sformatf("N=%0d phase error %.1f ps", n_of(idx), perr));
      check(locked, "still in maintenance mode");
    end

    // Tracking in maintenance mode: step the select from 500 to 600 MHz.
    rst_n    = 1'b0;
    freq_sel = 6'b000100;
    repeat (3) @(posedge ref_clk);
    #1000 rst_n = 1'b1;
    repeat (30) @(posedge ref_clk);
    check(locked, "500 MHz locked before the step");
    freq_sel = 6'b001000;
    repeat (80) @(posedge ref_clk);
    target = T_REF / 12.0;
    measure(12, per, perr);
    $display("after step: period %.2f ps (target %.2f)", per, target);
    check(per > 0.99 * target && per < 1.01 * target, "tracked the 600 MHz step");

    $display("mechanisms: fgain halvings=%0d mode switches=%0d pgain up=%0d pgain down=%0d high-path cycles=%0d low-path cycles=%0d odd-path cycles=%0d",
             n_fhalve, n_maint, n_pg_up, n_pg_dn, n_hi_path, n_lo_path, n_odd);
    check(n_fhalve > 0, "frequency gain halved");
    check(n_maint >= 7, "mode switch to maintenance");
    check(n_pg_up > 0, "phase gain raised");
    check(n_pg_dn > 0, "phase gain lowered");
    check(n_hi_path > 0, "high-frequency DCO path used");
    check(n_lo_path > 0, "low-frequency DCO path used");
    check(n_odd > 0, "odd inverting counter path used");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T_REF * 600);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
