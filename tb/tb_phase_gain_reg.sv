// tb_phase_gain_reg: checks the phase-gain strategy. A model in the
// testbench keeps the gain (1, 2, 4, 8) and the run length: start loads 1;
// a polarity change halves the gain (not below 1); eight successive
// comparisons of equal polarity double it (not above 8). Directed runs of
// equal polarity are followed by random traffic.
`timescale 1ps / 1fs
module tb_phase_gain_reg;
  logic clk = 0, rst_n = 1, start = 0, step = 0, changed = 0;
  logic [3:0] gain, gain_nxt;
  int g, run;
  int checks = 0, failures = 0, ups = 0, downs = 0;

  phase_gain_reg dut (.clk(clk), .rst_n(rst_n), .start(start), .step(step), .changed(changed),
                      .gain(gain), .gain_nxt(gain_nxt));

  always #5 clk = ~clk;

  task automatic cycle(input bit s, input bit st, input bit ch);
    @(negedge clk);
    start = s; step = st; changed = ch;
    if (s) begin g = 1; run = 1; end
    else if (st) begin
      if (ch) begin if (g > 1) begin g = g / 2; downs++; end run = 1; end
      else if (run + 1 >= 8) begin if (g < 8) begin g = g * 2; ups++; end run = 0; end
      else run++;
    end
    #1;
    checks++;
    if (gain_nxt !== 4'(g)) begin failures++; $display("FAIL: gain_nxt=%b expected %0d", gain_nxt, g); end
    @(posedge clk); #1;
    checks++;
    if (gain !== 4'(g)) begin failures++; $display("FAIL: gain=%b expected %0d", gain, g); end
  endtask

  initial begin
    #1 rst_n = 0;
    #11 rst_n = 1;
    cycle(1, 0, 0);
    // the start cycle counts as the first of a run: 7 more same -> gain 2
    repeat (7) cycle(0, 1, 0);
    checks++; if (gain != 4'b0010) begin failures++; $display("FAIL: not doubled after 8"); end
    repeat (8) cycle(0, 1, 0);
    repeat (8) cycle(0, 1, 0);
    repeat (8) cycle(0, 1, 0);
    checks++; if (gain != 4'b1000) begin failures++; $display("FAIL: not saturated at 8"); end
    cycle(0, 1, 1);
    checks++; if (gain != 4'b0100) begin failures++; $display("FAIL: not halved"); end
    cycle(0, 0, 1);  // no step: hold
    for (int i = 0; i < 400; i++) cycle(($urandom % 50) == 0, 1'($urandom), ($urandom % 6) == 0);
    checks++; if (ups == 0 || downs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
