// tb_pfd_sync: checks the synchronizers. hit and late are set to every
// combination before a falling edge of the matched reference; afterwards
// fast must equal hit and lock must be hit and not late. Nothing may change
// on a rising edge, and reset clears the flags and valid.
`timescale 1ps / 1fs
module tb_pfd_sync;
  logic ref_m = 1, rst_n = 1, hit = 0, late = 0, fast, lock, valid;
  int checks = 0, failures = 0;

  pfd_sync dut (.ref_m(ref_m), .rst_n(rst_n), .hit(hit), .late(late), .fast(fast), .lock(lock), .valid(valid));

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  bit h, l;
  initial begin
    #1 rst_n = 0;
    #10;
    chk(!fast && !lock && !valid, "reset");
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      h = 1'($urandom); l = 1'($urandom);
      hit = h; late = l;
      #100 ref_m = 0;
      #1;
      chk(valid && fast == h && lock == (h && !l), $sformatf("hit=%0b late=%0b -> fast=%0b lock=%0b", h, l, fast, lock));
      hit = ~h; late = ~l;
      #100 ref_m = 1;
      #1;
      chk(fast == h && lock == (h && !l), "held over the rising edge");
    end
    rst_n = 0; #1;
    chk(!fast && !lock && !valid, "reset again");
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
