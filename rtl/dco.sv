// Hazard-eliminated digitally controlled oscillator (DCO).
// The DCO integrates the loop-filter output and uses the integrated phase to
// pick one of the 16 delay-line taps as its output clock.
//  - Integrator: a carry-ripple adder adds step to q1; D-FF 1 loads the sum on
//    every falling edge of the output (clock phi_out - pi), so the loop runs
//    once per output cycle. q1[7:4] is the tap, q1[3:0] a fraction of a tap.
//  - Code change and SELECTOR 1: tap q1[7:4] - 4, i.e. a clock leading the
//    output by pi/2.
//  - D-FF 2: loads the tap number on the rising edge of that lead clock, a
//    quarter period before the output it governs rises; SELECTOR 2 uses it.
// SELECTOR 2 therefore switches only while both the old and the new tap are
// low, and SELECTOR 1 switches (at the output's falling edge) while its old
// and new taps are low too, as long as a step moves the tap by no more than
// +-3. This arrangement is the original design's; the reset and the bound on
// the step (guaranteed by the default loop gain) are this design's.
module dco
  import dpll_pkg::*;
(
  input  logic  rst_n,
  input  taps_t phi,
  input  step_t step,
  output logic  clk_out,
  output acc_t  q1,
  output tap_t  q2
);
  timeunit 1ps;
  timeprecision 1ps;

  acc_t sum;
  tap_t lead_tap;
  logic clk_lead;
  logic clk_out_n;

  // The carry out is left open: the integrated phase wraps modulo 16 taps.
  ripple_adder #(.W(ACC_W)) u_adder (
    .a(q1), .b(step), .cin(1'b0), .sum(sum), .cout()
  );

  // phi -> phi - pi/2
  assign lead_tap = q1[ACC_W-1 -: TAP_W] - tap_t'(N_TAPS / 4);

  tap_selector u_sel1 (.phi(phi), .sel(lead_tap), .clk_sel(clk_lead));
  tap_selector u_sel2 (.phi(phi), .sel(q2),       .clk_sel(clk_out));

  assign clk_out_n = ~clk_out;

  // D-FF 1: integrator register, clocked by phi_out - pi
  always_ff @(posedge clk_out_n or negedge rst_n) begin
    if (!rst_n) q1 <= '0;
    else        q1 <= sum;
  end

  // D-FF 2: selection register of SELECTOR 2, clocked by phi_out - pi/2
  always_ff @(posedge clk_lead or negedge rst_n) begin
    if (!rst_n) q2 <= '0;
    else        q2 <= q1[ACC_W-1 -: TAP_W];
  end
endmodule
