// tb_dco_counter: checks the adjustable-length DCO counter. A clock shaped
// like the DCO's (high while disabled, first falling edge half a period after
// enable) is applied for each of the six selects. hit must be low just before
// and high just after the expected counted edge (stage 3, 4, 5, 6, 10 on
// rising edges; stage 9 on falling edges for 850 MHz), late must follow half
// a period later, and both must clear when the enable drops.
`timescale 1ps / 1fs
module tb_dco_counter;
  import adpll_pkg::*;

  localparam realtime P = 1000.0;
  logic dco_clk = 1, dco_en = 1, hit, late;
  logic [NUM_FREQ-1:0] freq_sel;
  int checks = 0, failures = 0;

  dco_counter dut (.dco_clk(dco_clk), .dco_en(dco_en), .freq_sel(freq_sel), .hit(hit), .late(late));

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // expected time of the compared edge after enable, in periods
  function automatic real edge_at(input int idx);
    case (idx)
      0: return 3.0;  1: return 4.0;  2: return 5.0;
      3: return 6.0;  4: return 8.5;  default: return 10.0;
    endcase
  endfunction

  realtime t0;
  initial begin
    for (int rep = 0; rep < 3; rep++)
    for (int idx = 0; idx < NUM_FREQ; idx++) begin
      freq_sel = NUM_FREQ'(1) << idx;
      dco_en = 0; dco_clk = 1;
      #(P);
      chk(!hit && !late, "cleared while disabled");
      dco_en = 1; t0 = $realtime;
      fork
        begin
          for (int h = 0; h < 26; h++) begin
            #(P / 2) dco_clk = ~dco_clk;
          end
        end
        begin
          #(edge_at(idx) * P - 10);
          chk(!hit, $sformatf("sel %0d hit early", idx));
          #20;
          chk(hit && !late, $sformatf("sel %0d hit on time", idx));
          #(P / 2 - 20);
          chk(!late, $sformatf("sel %0d late early", idx));
          #20;
          chk(late, $sformatf("sel %0d late half a period after", idx));
        end
      join
      dco_en = 0;
      #1;
      chk(!hit && !late, "clear on disable");
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
