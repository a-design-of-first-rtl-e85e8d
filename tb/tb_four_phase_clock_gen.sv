// Testbench of four_phase_clock_gen: phi_a..phi_d must rise at tap 8, tap 0,
// tap 8, tap 0 of successive half-cycles (phi_b 8 taps after phi_a, phi_c one
// reference period after phi_a, phi_d 8 taps after phi_c), each pulse 8 taps
// wide and every 2 periods, with sel_odd pointing at the group just completed.
module tb_four_phase_clock_gen;
  import dpll_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;
  localparam longint TD = 1042;
  localparam longint P  = N_TAPS * TD;
  logic  ref_clk = 1'b0, rst_n = 1'b1;
  taps_t phi;
  logic  phi_a, phi_b, phi_c, phi_d, sel_odd;
  int checks = 0, failures = 0;
  longint t_a = -1, t_b = -1, t_c = -1, t_d = -1;
  int n_a = 0, n_b = 0, n_c = 0, n_d = 0;
  bit armed = 0;   // set once reset has been released

  delay_line #(.TAP_DELAY_PS(32'(TD))) u_dl (.ref_clk, .phi);
  four_phase_clock_gen dut (.rst_n, .phi, .phi_a, .phi_b, .phi_c, .phi_d, .sel_odd);

  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts

  initial forever #(P/2) ref_clk = ~ref_clk;

  task automatic expect_true(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // tap k of a cycle rises at P/2 + (k+1)*TD modulo P
  function automatic bit at_tap(longint t, longint k);
    return ((t - P/2 - (k + 1) * TD) % P) == 0;
  endfunction

  always @(posedge phi_a) if (armed) begin
    expect_true(at_tap($time, 8), "phi_a not at tap 8");
    if (t_a >= 0) expect_true(longint'($time) - t_a == 2 * P, "phi_a period");
    if (t_d >= 0) expect_true(longint'($time) - t_d == P - 8 * TD, "phi_a after phi_d");
    t_a = $time; n_a++;
  end
  always @(posedge phi_b) if (armed && t_a >= 0) begin
    expect_true(longint'($time) - t_a == 8 * TD, "phi_b 8 taps after phi_a");
    t_b = $time; n_b++;
    #1 expect_true(sel_odd == 1'b1, "odd group selected after phi_b");
  end
  always @(posedge phi_c) if (armed && t_a >= 0) begin
    expect_true(longint'($time) - t_a == P, "phi_c one period after phi_a");
    t_c = $time; n_c++;
  end
  always @(posedge phi_d) if (armed && t_c >= 0) begin
    expect_true(longint'($time) - t_c == 8 * TD, "phi_d 8 taps after phi_c");
    t_d = $time; n_d++;
    #1 expect_true(sel_odd == 1'b0, "even group selected after phi_d");
  end
  always @(negedge phi_a) if (t_a >= 0) expect_true(longint'($time) - t_a == 8 * TD, "phi_a width");
  always @(negedge phi_b) if (t_b >= 0) expect_true(longint'($time) - t_b == 8 * TD, "phi_b width");
  always @(negedge phi_c) if (t_c >= 0) expect_true(longint'($time) - t_c == 8 * TD, "phi_c width");
  always @(negedge phi_d) if (t_d >= 0) expect_true(longint'($time) - t_d == 8 * TD, "phi_d width");

  initial begin
    #(1000 * P);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2 * P + 333) rst_n = 1'b1;
    armed = 1;
    #(40 * P);
    expect_true(n_a >= 19 && n_b >= 19 && n_c >= 19 && n_d >= 19, "pulse counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
