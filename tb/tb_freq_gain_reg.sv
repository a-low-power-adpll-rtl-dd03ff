// tb_freq_gain_reg: checks the frequency-gain shift register: reset value,
// halving on shift, hold without shift, floor at 1 and reload. The expected
// gain is tracked by a separate model in the testbench.
`timescale 1ps / 1fs
module tb_freq_gain_reg;
  localparam int W = 11;
  logic clk = 0, rst_n = 1, reload = 0, shift = 0;
  logic [W-1:0] gain, gain_nxt;
  int unsigned model;
  int checks = 0, failures = 0;

  freq_gain_reg #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .reload(reload), .shift(shift),
                              .gain(gain), .gain_nxt(gain_nxt));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (gain=%0d model=%0d)", s, gain, model); end
  endtask

  initial begin
    #1 rst_n = 0;
    #11 rst_n = 1;
    model = 256;
    chk(gain == W'(model), "reset value 256");
    for (int i = 0; i < 60; i++) begin
      @(negedge clk);
      shift  = 1'($urandom);
      reload = ($urandom % 16) == 0;
      #1;
      if (reload) model = 256;
      else if (shift && model > 1) model = model / 2;
      chk(gain_nxt == W'(model), "gain_nxt");
      @(posedge clk); #1;
      chk(gain == W'(model), "registered gain");
    end
    // run down to the floor
    reload = 0; shift = 1;
    repeat (12) @(posedge clk);
    #1 chk(gain == 1, "floor at 1");
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
