// Loop filter (LPF) of the first-order DPLL: a pure gain K = 2^-K_SHIFT.
// The 4-bit phase error is widened to the 8-bit internal word by appending
// four zero bits on the LSB side, which makes it a count of 1/16 taps, and is
// then shifted arithmetically K_SHIFT places to the lower side. Widening and
// shifting follow the original design; the value K_SHIFT = 2 (K = 1/4) is this
// design's choice, since none is given. K_SHIFT ranges 0..4; at 0 a step can
// reach 8 taps, which the DCO cannot switch to without glitches. Combinational.
module loop_filter
  import dpll_pkg::*;
#(
  parameter int unsigned K_SHIFT = 2
) (
  input  perr_t dphi,
  output step_t step
);
  timeunit 1ps;
  timeprecision 1ps;

  step_t wide;
  assign wide = {dphi, {FRAC_W{1'b0}}};
  assign step = wide >>> K_SHIFT;

  initial assert (K_SHIFT <= FRAC_W) else $error("K_SHIFT must be 0..%0d", FRAC_W);
endmodule
