// tb_dcde: checks the delay-cell model. For every code (7-bit bank plus the
// extra device) an edge is sent through the cell and its delay is measured.
// The output must be the inverted input, both edges must have the same
// delay, the delay must fall monotonically with the effective code, and the
// end points must match the oscillator ranges (about 231 ps at code 0 and
// 89 ps at code 128, which give 260-635 MHz and 500-1150 MHz rings).
`timescale 1ps / 1fs
module tb_dcde;
  logic in = 0, extra = 0, out;
  logic [6:0] code = 0;
  int checks = 0, failures = 0;

  dcde dut (.in(in), .code(code), .extra(extra), .out(out));

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  realtime t0, d_rise, d_fall, prev;
  initial begin
    // bring the cell to a consistent state (out = ~in)
    #1000 in = 1;
    #1000 in = 0;
    #1000;
    prev = 1.0e9;
    for (int c = 0; c <= 128; c++) begin
      code  = (c == 128) ? 7'd127 : 7'(c);
      extra = (c == 128);
      #1000;
      t0 = $realtime; in = 1;
      @(out); d_fall = $realtime - t0;
      chk(out == 0, "inverting on rising input");
      #1000;
      t0 = $realtime; in = 0;
      @(out); d_rise = $realtime - t0;
      chk(out == 1, "inverting on falling input");
      chk(d_rise > d_fall - 0.01 && d_rise < d_fall + 0.01, "equal edge delays");
      chk(d_fall < prev, $sformatf("monotonic at code %0d (%.3f ps after %.3f ps)", c, d_fall, prev));
      if (c == 0)   chk(d_fall > 225.0 && d_fall < 236.0, $sformatf("delay at code 0: %.2f", d_fall));
      if (c == 128) chk(d_fall > 86.0 && d_fall < 92.0, $sformatf("delay at code 128: %.2f", d_fall));
      prev = d_fall;
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
