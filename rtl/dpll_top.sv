// First-order delay-line DPLL for clock regeneration.
// A 16-tap delay line splits the reference clock into 16 phases. The phase
// comparator finds in which tap slot the input data rose and subtracts the
// tap the DCO currently outputs; the loop filter scales that error by K; the
// DCO integrates it and selects the tap nearest the input's edges as the
// output clock. Because the DCO only picks among phases of the reference
// clock, moving one tap further every few cycles makes an output whose
// frequency differs from the reference: the regenerated clock follows input
// data whose rate is a few per cent off. Being first order, the loop keeps a
// steady phase error proportional to that frequency difference.
// Timing: the PC presents one measurement per reference cycle (at tap 0); the
// DCO takes one per output cycle, at the output's falling edge. dco_select is
// the integrator, whose bits 7..4 are the tap being moved to; out_tap is the
// tap on clk_out right now; edge_pos/edge_valid are the last measurement.
// The architecture is the original design's; the reset, the loop gain K = 1/4 and the cell delay are
// this design's choices.
module dpll_top
  import dpll_pkg::*;
#(
  parameter int unsigned K_SHIFT      = 2,
  parameter int unsigned TAP_DELAY_PS = 1042
) (
  input  logic  ref_clk,
  input  logic  rst_n,
  input  logic  din,
  output logic  clk_out,
  output acc_t  dco_select,
  output tap_t  out_tap,
  output perr_t phase_err,
  output tap_t  edge_pos,
  output logic  edge_valid
);
  timeunit 1ps;
  timeprecision 1ps;

  taps_t phi;
  step_t step;

  delay_line #(.N_TAPS(N_TAPS), .TAP_DELAY_PS(TAP_DELAY_PS)) u_delay (.ref_clk, .phi);

  phase_comparator u_pc (
    .rst_n, .phi, .din,
    .dco_tap(dco_select[ACC_W-1 -: TAP_W]),
    .dphi(phase_err), .pos(edge_pos), .valid(edge_valid)
  );

  loop_filter #(.K_SHIFT(K_SHIFT)) u_lpf (.dphi(phase_err), .step);

  dco u_dco (.rst_n, .phi, .step, .clk_out, .q1(dco_select), .q2(out_tap));
endmodule
