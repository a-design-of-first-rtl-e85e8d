// Testbench of ripple_adder: random and corner operands against the integer sum.
module tb_ripple_adder;
  timeunit 1ps;
  timeprecision 1ps;
  localparam int W = 8;
  logic [W-1:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0;

  ripple_adder #(.W(W)) dut (.a, .b, .cin, .sum, .cout);

  task automatic try(input int x, input int y, input int c);
    int expv;
    a = W'(x); b = W'(y); cin = 1'(c);
    #1;
    expv = x + y + c;
    checks++;
    if ({cout, sum} !== (W+1)'(expv)) begin
      failures++;
      $display("FAIL %0d+%0d+%0d: got %0d", x, y, c, {cout, sum});
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(0, 0, 0); try(255, 1, 0); try(255, 255, 1); try(128, 128, 0); try(85, 170, 1);
    repeat (500) try(int'($urandom_range(255)), int'($urandom_range(255)), int'($urandom_range(1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
