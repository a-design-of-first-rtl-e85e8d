// Testbench of dco: taps from the delay line model, loop-filter steps driven
// directly (constant runs of +-2 taps, fractions of a tap and random values).
// Checks, on every output cycle: D-FF 1 adds the step at the falling edge; the
// output rises exactly on the tap held by D-FF 2; D-FF 2 holds the tap bits of
// D-FF 1 by then; no output pulse is shorter than 6 taps (no glitch); and the
// output period is one reference period plus the tap change.
module tb_dco;
  import dpll_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;
  localparam longint TD = 1042;
  localparam longint P  = N_TAPS * TD;
  logic  ref_clk = 1'b0, rst_n = 1'b1;
  taps_t phi;
  step_t step;
  logic  clk_out;
  acc_t  q1;
  tap_t  q2;
  int checks = 0, failures = 0;
  longint t_rise = -1, t_fall = -1;
  int     last_tap = -1;
  int     n_up = 0, n_down = 0;
  bit     armed = 0;            // set once reset has been released

  delay_line #(.TAP_DELAY_PS(32'(TD))) u_dl (.ref_clk, .phi);
  dco dut (.rst_n, .phi, .step, .clk_out, .q1, .q2);

  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts

  initial forever #(P/2) ref_clk = ~ref_clk;

  task automatic expect_true(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(negedge clk_out) if (armed) begin
    acc_t q_old;
    step_t s;
    q_old = q1;
    s = step;
    if (t_rise >= 0) expect_true(longint'($time) - t_rise >= 6 * TD, "high pulse too short");
    t_fall = $time;
    #1;
    expect_true(q1 == acc_t'(q_old + s), "integrator update");
  end

  always @(posedge clk_out) if (armed) begin
    int d;
    expect_true(((longint'($time) - P/2 - (longint'(q2) + 1) * TD) % P) == 0, "output not on tap q2");
    expect_true(q2 == q1[7:4], "D-FF 2 does not hold the tap of D-FF 1");
    if (t_fall >= 0) expect_true(longint'($time) - t_fall >= 6 * TD, "low pulse too short");
    if (t_rise >= 0 && last_tap >= 0) begin
      d = (int'(q2) - last_tap + 24) % 16 - 8;
      expect_true(longint'($time) - t_rise == P + d * TD, $sformatf("output period %0d d=%0d q2=%0d last=%0d", longint'($time) - t_rise, d, q2, last_tap));
      if (d > 0) n_up++;
      if (d < 0) n_down++;
    end
    t_rise = $time;
    last_tap = int'(q2);
  end

  task automatic run(input int s, input int cycles);
    step = step_t'(s);
    repeat (cycles) @(posedge clk_out);
    #1;
  endtask

  initial begin
    #(5000 * P);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    step = '0;
    #(3 * P + 100);
    expect_true(q1 == 0 && q2 == 0, "reset");
    rst_n = 1'b1;
    armed = 1;
    run(0, 10);
    run(16, 40);     // one tap later every cycle
    run(-16, 40);    // one tap earlier
    run(32, 20);     // two taps
    run(-32, 20);
    run(5, 60);      // fractions of a tap
    run(-11, 60);
    run(28, 20);
    repeat (100) run($urandom_range(60) - 32, 1);
    expect_true(n_up > 30 && n_down > 30, "taps moved both ways");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
