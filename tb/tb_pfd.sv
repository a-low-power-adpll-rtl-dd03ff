// tb_pfd: checks the phase/frequency detector with an ideal oscillator in
// the testbench. Each reference cycle the oscillator is disabled, then
// restarted in phase with the matched reference with a chosen period. For
// every select and a sweep of periods around reference/N, FAST must say
// whether the N/2-th edge came before the reference mid-point, and Lock
// whether it came within the last half period before it.
`timescale 1ps / 1fs
module tb_pfd;
  import adpll_pkg::*;

  localparam realtime T_REF = 20000.0;
  logic dco_clk = 1, dco_en = 0, ref_m = 0, rst_n = 1, fast, lock, valid;
  logic [NUM_FREQ-1:0] freq_sel;
  int checks = 0, failures = 0, n_lock = 0, n_fast = 0, n_slow = 0;

  pfd dut (.dco_clk(dco_clk), .dco_en(dco_en), .ref_m(ref_m), .rst_n(rst_n), .freq_sel(freq_sel),
           .fast(fast), .lock(lock), .valid(valid));

  function automatic int n_of(input int idx);
    case (idx)
      0: return 6;  1: return 8;  2: return 10;
      3: return 12; 4: return 17; default: return 20;
    endcase
  endfunction

  realtime per, t_edge;
  bit exp_fast, exp_lock;
  initial begin
    #1 rst_n = 0;
    #100 rst_n = 1;
    for (int idx = 0; idx < NUM_FREQ; idx++) begin
      freq_sel = NUM_FREQ'(1) << idx;
      for (int k = -12; k <= 12; k++) begin
        per = T_REF / real'(n_of(idx)) * (1.0 + real'(k) * 0.0071 + 0.0003);
        dco_en = 0; dco_clk = 1;
        #(1000);
        dco_en = 1; ref_m = 1;
        fork
          begin
            while (dco_en) begin
              #(per / 2);
              if (dco_en) dco_clk = ~dco_clk;
            end
          end
          begin
            #(T_REF / 2) ref_m = 0;
            #(T_REF / 2 - 1000) dco_en = 0;
          end
        join
        t_edge   = real'(n_of(idx)) / 2.0 * per;
        exp_fast = t_edge < T_REF / 2;
        exp_lock = exp_fast && t_edge > T_REF / 2 - per / 2;
        checks++;
        if (!valid || fast != exp_fast || lock != exp_lock) begin
          failures++;
          $display("FAIL: N=%0d period %.1f fast=%0b lock=%0b expected %0b %0b", n_of(idx), per, fast, lock, exp_fast, exp_lock);
        end
        if (lock) n_lock++;
        if (fast) n_fast++; else n_slow++;
      end
    end
    checks++;
    if (n_lock == 0 || n_fast == 0 || n_slow == 0) failures++;
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
