// tb_control_unit: checks the control unit in a closed loop with an ideal
// oscillator/detector model written in the testbench. The model's frequency
// rises with the fine code inside each path (low path 260-635 MHz, high path
// 500-1150 MHz); FAST is "model frequency above target" and Lock is "above
// target by less than a small window". A separate reference model of the
// control rules (path choice on the first comparison, binary search with
// halving on polarity change, switch to maintenance on Lock, phase gain
// 1/2/4/8 with the eight-cycle rule, clamping inside the path) predicts the
// control word every reference cycle, and the word must match it. Lock must
// come within 16 comparisons. Cycles without a comparison (cmp_valid low)
// must leave the word alone.
`timescale 1ps / 1fs
module tb_control_unit;
  import adpll_pkg::*;

  logic clk = 0, rst_n = 1, cmp_valid = 0, fast = 0, lock = 0;
  logic [CW-1:0] dco_word, gain_used;
  cu_mode_e mode;
  int checks = 0, failures = 0;

  control_unit dut (.clk(clk), .rst_n(rst_n), .cmp_valid(cmp_valid), .fast(fast), .lock(lock),
                    .dco_word(dco_word), .mode(mode), .gain_used(gain_used));

  always #10000 clk = ~clk;

  function automatic real freq_of(input logic [CW-1:0] w);
    return w[CW-1] ? 500.0 + 0.635 * real'(w[CW-2:0]) : 260.0 + 0.366 * real'(w[CW-2:0]);
  endfunction

  // reference model state
  int  m_word, m_fg, m_pg, m_run;
  bit  m_maint, m_path_done, m_have_prev, m_prev;

  task automatic model_step(input bit f, input bit l);
    bit ch;
    int g, p, fine;
    ch = m_have_prev && (f != m_prev);
    p = m_word / 1024; fine = m_word % 1024;
    if (!m_maint && l) begin
      m_maint = 1; m_pg = 1; m_run = 1; g = 1;
      fine = f ? fine - g : fine + g;
    end else if (!m_maint && !m_path_done) begin
      p = f ? 0 : 1; fine = 512;
    end else if (!m_maint) begin
      if (ch && m_fg > 1) m_fg = m_fg / 2;
      fine = f ? fine - m_fg : fine + m_fg;
    end else begin
      if (ch) begin if (m_pg > 1) m_pg = m_pg / 2; m_run = 1; end
      else if (m_run + 1 >= 8) begin if (m_pg < 8) m_pg = m_pg * 2; m_run = 0; end
      else m_run++;
      fine = f ? fine - m_pg : fine + m_pg;
    end
    if (fine < 0) fine = 0;
    if (fine > 1023) fine = 1023;
    m_word = p * 1024 + fine;
    m_path_done = 1; m_have_prev = 1; m_prev = f;
  endtask

  int lock_at;
  real ft, fw;
  bit seen_hi, seen_lo, seen_clamp;

  initial begin
    for (int run = 0; run < 40; run++) begin
      // targets across the whole range, plus two beyond it (clamping)
      ft = (run == 0) ? 1200.0 : (run == 1) ? 250.0 : 280.0 + real'($urandom % 850);
      rst_n = 0; cmp_valid = 0;
      @(negedge clk); #1;
      checks++;
      if (dco_word != 11'd1023 || mode != MODE_ACQ) begin failures++; $display("FAIL: reset state"); end
      rst_n = 1;
      m_word = 1023; m_fg = 256; m_pg = 1; m_run = 0;
      m_maint = 0; m_path_done = 0; m_have_prev = 0; m_prev = 0;
      lock_at = -1;
      for (int c = 1; c <= 60; c++) begin
        @(negedge clk);
        cmp_valid = (c % 7) != 3;   // now and then no comparison
        fw   = freq_of(dco_word);
        fast = fw > ft;
        lock = fast && (fw - ft) < 2.0;
        if (cmp_valid) model_step(fast, lock);
        if (lock && lock_at < 0) lock_at = c;
        @(posedge clk); #1;
        checks++;
        if (dco_word !== CW'(m_word) || (mode == MODE_MAINT) != m_maint) begin
          failures++;
          $display("FAIL: target %.1f cycle %0d word %0d expected %0d", ft, c, dco_word, m_word);
        end
        if (dco_word[CW-1]) seen_hi = 1; else seen_lo = 1;
        if (dco_word[CW-2:0] == '0 || dco_word[CW-2:0] == '1) seen_clamp = 1;
      end
      if (run >= 2) begin
        checks++;
        // 16 reference cycles at most, here counted in comparisons
        if (lock_at < 0 || lock_at > 16 + 16 / 7 + 1) begin
          failures++;
          $display("FAIL: target %.1f MHz no lock in 16 comparisons (%0d)", ft, lock_at);
        end
      end
    end
    checks++;
    if (!(seen_hi && seen_lo && seen_clamp)) begin failures++; $display("FAIL: coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
