// 16-to-4 bit encoder of the phase comparator.
// Turns the edge marks into the binary tap position of the input's rising
// edge. The lowest marked slot is isolated first (x & -x), and a gate matrix
// then ORs together, for each output bit, the slots whose number has that bit
// set. valid is 0 when no slot is marked. The choice of the lowest slot when
// several are marked is this design's. Combinational.
module position_encoder
  import dpll_pkg::*;
(
  input  taps_t edges,
  output tap_t  pos,
  output logic  valid
);
  timeunit 1ps;
  timeprecision 1ps;

  taps_t first;   // one-hot: lowest marked slot
  assign first = edges & (~edges + 1'b1);
  assign valid = |edges;

  always_comb begin
    pos = '0;
    for (int b = 0; b < TAP_W; b++)
      for (int i = 0; i < N_TAPS; i++)
        if (((i >> b) & 1) == 1) pos[b] = pos[b] | first[i];
  end
endmodule
