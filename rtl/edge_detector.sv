// Edge detector of the phase comparator.
// An EX-OR of each pair of neighbouring samples marks the slot where the input
// changed; ANDing it with the later sample keeps only rising edges. Slot 0
// compares with prev, the last sample of the preceding cycle. edges[i] = 1
// means the input rose between taps i-1 and i. The EX-OR detection follows
// the original design; restricting it to rising edges follows its statement
// that the rising position is detected. Combinational.
module edge_detector
  import dpll_pkg::*;
(
  input  taps_t word,
  input  logic  prev,
  output taps_t edges
);
  timeunit 1ps;
  timeprecision 1ps;

  taps_t earlier;   // sample taken one tap earlier
  assign earlier = {word[N_TAPS-2:0], prev};
  assign edges  = (word ^ earlier) & word;
endmodule
