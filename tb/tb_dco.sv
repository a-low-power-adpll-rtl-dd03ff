// tb_dco: checks the ring-oscillator model. While disabled the output must
// stay high. For a sweep of fine codes in both paths the period is measured
// after enable; the first falling edge must come half a period after enable
// and the k-th rising edge k periods after it. The frequency must not fall
// as the fine code rises, and the ranges must be about 260-635 MHz for the
// eight-cell path and 500-1150 MHz for the four-cell path. The band ends
// are then measured at two slower delay corners and compared, within 4 %,
// with the oscillator's ranges at 1.1 V (465-1040 and 240-578 MHz) and at
// 75 C (454-1060 and 233-588 MHz).
`timescale 1ps / 1fs
module tb_dco;
  logic en = 0, clk_out;
  logic [10:0] word = 0;
  int checks = 0, failures = 0;

  dco dut (.en(en), .word(word), .clk_out(clk_out));

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  realtime t0, t_fall, t_r[$], per, fprev;
  real f;
  initial begin
    for (int p = 0; p < 2; p++) begin
      fprev = 0.0;
      for (int fine = 0; fine <= 1024; fine += 31) begin
        en = 0;
        word = {1'(p), 10'((fine > 1023) ? 1023 : fine)};
        #5000;
        chk(clk_out == 1, "held high while disabled");
        t_r.delete();
        en = 1; t0 = $realtime;
        @(negedge clk_out); t_fall = $realtime - t0;
        repeat (6) begin @(posedge clk_out); t_r.push_back($realtime - t0); end
        per = t_r[5] - t_r[4];
        f = 1.0e6 / per;  // MHz
        chk(t_fall > per / 2 - 0.01 && t_fall < per / 2 + 0.01, "first falling edge at half a period");
        chk(t_r[2] > 3 * per - 0.01 && t_r[2] < 3 * per + 0.01, "third rising edge at three periods");
        chk(f >= fprev, $sformatf("monotonic: path %0d fine %0d %.1f MHz after %.1f", p, fine, f, fprev));
        if (fine == 0)    chk(p ? (f > 490 && f < 510) : (f > 255 && f < 265), $sformatf("path %0d low end %.1f MHz", p, f));
        if (fine >= 1023) chk(p ? (f > 1130 && f < 1170) : (f > 625 && f < 645), $sformatf("path %0d high end %.1f MHz", p, f));
        fprev = f;
      end
    end
    // Band ends at the corners: {scale, high lo, high hi, low lo, low hi}.
    for (int c = 0; c < 2; c++) begin
      real scale, ref_f[4], meas[4];
      scale = c ? 1.08 : 1.10;
      ref_f = c ? '{454.0, 1060.0, 233.0, 588.0} : '{465.0, 1040.0, 240.0, 578.0};
      dco_model_pkg::delay_scale = scale;
      for (int k = 0; k < 4; k++) begin
        en = 0;
        word = {1'(k < 2), (k % 2) ? 10'd1023 : 10'd0};
        #5000;
        en = 1;
        repeat (3) @(posedge clk_out);
        t0 = $realtime;
        @(posedge clk_out);
        meas[k] = 1.0e6 / ($realtime - t0);
        chk(meas[k] > 0.96 * ref_f[k] && meas[k] < 1.04 * ref_f[k],
            $sformatf("corner %.2f band end %0d: %.1f MHz, expected about %.0f", scale, k, meas[k], ref_f[k]));
      end
    end
    dco_model_pkg::delay_scale = 1.0;
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
