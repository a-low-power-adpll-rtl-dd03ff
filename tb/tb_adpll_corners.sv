// tb_adpll_corners: the synthesizer across oscillator corners and under
// drift, at default parameters.
//  1. For delay corners 1.00 (25 C, 1.2 V), 1.08 (about 75 C) and 1.10
//     (about 1.1 V) every one of the six output frequencies must lock within
//     16 reference cycles and settle within 1 % of its target period. The
//     slower corners force 600 MHz onto the four-cell path, so the path
//     choice is exercised with a different outcome.
//  2. Drift: locked at 1 GHz, then 850 MHz, the oscillator delays are
//     ramped from 1.00 to 1.08 and back over a few hundred reference cycles.
//     Maintenance mode must stay on, the period must stay within 1 % at the
//     end of each ramp, and the phase gain must have been raised by the
//     eight-cycle rule at least once while tracking.
`timescale 1ps / 1fs
module tb_adpll_corners;
  import adpll_pkg::*;

  localparam realtime T_REF = 20000.0;

  logic                ref_clk = 1'b0;
  logic                rst_n   = 1'b1;
  logic [NUM_FREQ-1:0] freq_sel = 6'b000001;
  logic                clk_out, lock, locked, fast;
  logic [CW-1:0]       dco_word, gain;
  logic                dco_en, ref_m;

  int checks = 0, failures = 0, n_pg_up = 0, n_hi_600 = 0;

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

  // Phase-gain increases: gain is the step about to be applied.
  logic [CW-1:0] g_q = '0;
  logic          locked_q = 1'b0;
  always @(posedge ref_clk) begin
    g_q      <= gain;
    locked_q <= locked;
    if (rst_n && locked && locked_q && gain > g_q) n_pg_up++;
  end

  realtime t_edges[$];
  always @(posedge dco_en) t_edges.delete();
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

  task automatic check_period(input int n, input string what);
    real per, target;
    @(negedge ref_m);
    per = (t_edges.size() >= 2) ? (t_edges[$] - t_edges[0]) / real'(t_edges.size() - 1) : 0.0;
    target = T_REF / real'(n);
    check(per > 0.99 * target && per < 1.01 * target,
          $sformatf("%s: period %.2f ps, target %.2f ps", what, per, target));
  endtask

  task automatic start(input int idx);
    rst_n    = 1'b0;
    freq_sel = NUM_FREQ'(1) << idx;
    repeat (2) @(posedge ref_clk);
    #1000 rst_n = 1'b1;
  endtask

  real scales[3] = '{1.00, 1.08, 1.10};
  int  lock_cycle;

  initial begin
    #1 rst_n = 1'b0;
    foreach (scales[s]) begin
      dco_model_pkg::delay_scale = scales[s];
      for (int idx = 0; idx < NUM_FREQ; idx++) begin
        start(idx);
        lock_cycle = -1;
        for (int c = 1; c <= 40; c++) begin
          @(posedge ref_clk);
          #1;
          if (lock_cycle < 0 && locked) lock_cycle = c;
        end
        if (idx == 3 && dco_word[CW-1]) n_hi_600++;
        $display("corner %.2f N=%0d: lock after %0d cycles, path %0d", scales[s], n_of(idx), lock_cycle, dco_word[CW-1]);
        check(lock_cycle > 0 && lock_cycle <= 16, $sformatf("corner %.2f N=%0d lock in 16 cycles", scales[s], n_of(idx)));
        check_period(n_of(idx), $sformatf("corner %.2f N=%0d", scales[s], n_of(idx)));
      end
    end
    check(n_hi_600 > 0, "600 MHz moved to the four-cell path at a slow corner");

    // drift tracking
    for (int k = 0; k < 2; k++) begin
      dco_model_pkg::delay_scale = 1.0;
      start(k == 0 ? 5 : 4);
      repeat (30) @(posedge ref_clk);
      check(locked, "locked before drift");
      for (int i = 1; i <= 160; i++) begin
        @(posedge ref_clk);
        dco_model_pkg::delay_scale = 1.0 + 0.08 * real'(i) / 160.0;
      end
      repeat (20) @(posedge ref_clk);
      check(locked, "still in maintenance after drift up");
      check_period(k == 0 ? 20 : 17, "after drift to 1.08");
      for (int i = 159; i >= 0; i--) begin
        @(posedge ref_clk);
        dco_model_pkg::delay_scale = 1.0 + 0.08 * real'(i) / 160.0;
      end
      repeat (20) @(posedge ref_clk);
      check_period(k == 0 ? 20 : 17, "after drift back to 1.00");
    end
    $display("phase gain raised %0d times while tracking", n_pg_up);
    check(n_pg_up > 0, "phase gain raised by the eight-cycle rule");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T_REF * 2500);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
