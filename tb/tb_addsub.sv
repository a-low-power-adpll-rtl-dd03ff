// tb_addsub: checks the ripple adder/subtractor against integer arithmetic.
// Corner operands plus random ones, both operations; y and cout are compared
// with a + b and a + ~b + 1 computed in a wider integer.
`timescale 1ps / 1fs
module tb_addsub;
  localparam int W = 11;
  logic [W-1:0] a, b, y;
  logic         sub, cout;
  int checks = 0, failures = 0;

  addsub #(.W(W)) dut (.a(a), .b(b), .sub(sub), .y(y), .cout(cout));

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic ts);
    int unsigned r;
    a = ta; b = tb_; sub = ts;
    #1;
    r = ts ? (int'(ta) + ((~int'(tb_)) & ((1 << W) - 1)) + 1) : (int'(ta) + int'(tb_));
    checks++;
    if ({cout, y} !== (W+1)'(r)) begin
      failures++;
      $display("FAIL: a=%0d b=%0d sub=%0b got %0d/%0b expected %0d", ta, tb_, ts, y, cout, r);
    end
  endtask

  initial begin
    apply('0, '0, 0); apply('1, 1, 0); apply('1, '1, 0); apply(0, 1, 1);
    apply(1024, 512, 1); apply(1023, 1, 0); apply(5, 5, 1); apply(0, 0, 1);
    for (int i = 0; i < 4000; i++) apply(W'($urandom), W'($urandom), 1'($urandom));
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
