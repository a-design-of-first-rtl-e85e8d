// Parallel-architecture phase comparator (PC).
// Three stages: multi-phase sampling (16 D-FFs on the 16 taps, then four
// interleaved arrays of eight latches clocked by phi_a..phi_d), encoding (the
// odd/even selector rebuilds the latest complete cycle, an EX-OR edge detector
// finds the slot where the input rose and a gate matrix encodes it to 4 bits),
// and subtraction of the DCO's tap number. pos/valid describe the cycle that
// ended at the last rising edge of tap 0 and change only at that edge; dphi
// also follows dco_tap combinationally. The structure is the original
// design's; see the sub-blocks for the choices made here.
module phase_comparator
  import dpll_pkg::*;
(
  input  logic  rst_n,
  input  taps_t phi,
  input  logic  din,
  input  tap_t  dco_tap,
  output perr_t dphi,
  output tap_t  pos,
  output logic  valid
);
  timeunit 1ps;
  timeprecision 1ps;

  taps_t         samp;
  logic          phi_a, phi_b, phi_c, phi_d, sel_odd;
  latch_groups_t lat;
  taps_t         word;
  logic          prev;
  taps_t         edges;

  multiphase_sampler u_sampler (.rst_n, .phi, .din, .samp);

  four_phase_clock_gen u_clkgen (.rst_n, .phi, .phi_a, .phi_b, .phi_c, .phi_d, .sel_odd);

  interleaved_latches u_latches (.rst_n, .phi_a, .phi_b, .phi_c, .phi_d, .samp, .lat);

  odd_even_selector u_select (.sel_odd, .lat, .word, .prev);

  edge_detector u_edge (.word, .prev, .edges);

  position_encoder u_enc (.edges, .pos, .valid);

  phase_subtractor u_sub (.pos, .valid, .dco_tap, .dphi);
endmodule
