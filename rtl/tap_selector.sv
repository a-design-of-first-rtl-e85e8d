// Clock selector of the DCO: passes delay-line tap phi[sel] to clk_sel.
// A 16-to-1 multiplexer; the DCO uses two of them (SELECTOR 1 for the lead
// clock and SELECTOR 2 for the output), as in the original design.
// Combinational; whether a change of sel glitches the output depends on when
// it changes, which the DCO controls.
module tap_selector
  import dpll_pkg::*;
(
  input  taps_t phi,
  input  tap_t  sel,
  output logic  clk_sel
);
  timeunit 1ps;
  timeprecision 1ps;

  assign clk_sel = phi[sel];
endmodule
