// tb_dco_enable_gen: checks the enable pulse and the matched reference. A
// DCO instance driven by the same word gives the half period to expect (its
// period measured from its edges). At every reference rising edge the enable
// must fall at once and rise again one half DCO period later (the longer one
// when the word changes at that edge, plus 1 ps); ref_m must rise with the
// enable and fall the same delay after the reference falls.
`timescale 1ps / 1fs
module tb_dco_enable_gen;
  localparam realtime T_REF = 20000.0;
  logic ref_clk = 0, dco_en, ref_m, clk_out;
  logic [10:0] word = 11'h400;
  int checks = 0, failures = 0;

  dco_enable_gen dut (.ref_clk(ref_clk), .word(word), .dco_en(dco_en), .ref_m(ref_m));
  dco u_dco (.en(dco_en), .word(word), .clk_out(clk_out));

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  realtime t_rise, t_en, t_fall, t_m, half_old, half_new, exp_d;
  realtime t1, t2;
  logic [10:0] next_word;
  initial begin
    half_old = 0.0;
    for (int i = 0; i < 12; i++) begin
      next_word = (i % 3 == 0) ? 11'($urandom) : word;
      #(T_REF / 2) ref_clk = 1; t_rise = $realtime;
      word <= next_word;
      #0.5;
      chk(dco_en == 0, "enable falls at the reference edge");
      @(posedge dco_en); t_en = $realtime - t_rise;
      chk(ref_m == 1, "ref_m rises with the enable");
      // measure this word's period from the running DCO
      @(posedge clk_out); t1 = $realtime;
      @(posedge clk_out); t2 = $realtime;
      half_new = (t2 - t1) / 2;
      if (i > 0) begin
        exp_d = ((half_new > half_old) ? half_new : half_old) + 1.0;
        chk(t_en > exp_d - 0.05 && t_en < exp_d + 0.05,
            $sformatf("enable low for %.2f ps, expected %.2f", t_en, exp_d));
      end
      #(T_REF / 2 - ($realtime - t_rise)) ref_clk = 0; t_fall = $realtime;
      @(negedge ref_m); t_m = $realtime - t_fall;
      chk(t_m > t_en - 0.05 && t_m < t_en + 0.05, "ref_m falls after the same delay");
      half_old = half_new;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
