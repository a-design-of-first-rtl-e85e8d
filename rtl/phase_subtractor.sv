// Subtraction stage of the phase comparator.
// The phase difference is the input edge position minus the tap the DCO
// currently selects, in 4-bit two's complement: the modulo-16 wrap of the
// subtraction is the wrap of phase, so the result is the shorter way round,
// -8..+7 taps. When no rising edge was found in the measured cycle the
// difference is 0 and the DCO keeps its phase; that rule is this design's
// choice. Combinational.
module phase_subtractor
  import dpll_pkg::*;
(
  input  tap_t  pos,
  input  logic  valid,
  input  tap_t  dco_tap,
  output perr_t dphi
);
  timeunit 1ps;
  timeprecision 1ps;

  assign dphi = valid ? perr_t'(pos - dco_tap) : '0;
endmodule
