// Odd/even selector of the parallel phase comparator.
// Rebuilds the 16 samples of the latest complete reference cycle from the odd
// groups (A, B) when sel_odd is 1 and from the even groups (C, D) otherwise.
// It also passes on the tap-15 sample of the cycle before, taken from the other
// pair of groups, so that an input edge falling between tap 15 and the next
// tap 0 is still seen; that boundary sample is this design's addition.
// Purely combinational.
module odd_even_selector
  import dpll_pkg::*;
(
  input  logic          sel_odd,
  input  latch_groups_t lat,
  output taps_t         word,
  output logic          prev
);
  timeunit 1ps;
  timeprecision 1ps;

  always_comb begin
    if (sel_odd) begin
      word = {lat.b, lat.a};
      prev = lat.d[HALF-1];
    end else begin
      word = {lat.d, lat.c};
      prev = lat.b[HALF-1];
    end
  end
endmodule
