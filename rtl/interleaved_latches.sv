// Interleaved latch stage of the parallel phase comparator.
// Four arrays of eight D flip-flops: group A (clocked by phi_a) takes samples
// 0-7 and group B (phi_b) samples 8-15 of an odd reference cycle; groups C
// (phi_c) and D (phi_d) do the same for an even cycle. Each array is clocked
// once every two reference cycles, so a complete cycle of samples stays
// available for a cycle and a half while the sampler moves on. The grouping
// follows the original design; the reset is this design's addition.
module interleaved_latches
  import dpll_pkg::*;
(
  input  logic          rst_n,
  input  logic          phi_a,
  input  logic          phi_b,
  input  logic          phi_c,
  input  logic          phi_d,
  input  taps_t         samp,
  output latch_groups_t lat
);
  timeunit 1ps;
  timeprecision 1ps;

  half_t grp_a, grp_b, grp_c, grp_d;

  always_ff @(posedge phi_a or negedge rst_n)
    if (!rst_n) grp_a <= '0; else grp_a <= samp[HALF-1:0];
  always_ff @(posedge phi_b or negedge rst_n)
    if (!rst_n) grp_b <= '0; else grp_b <= samp[N_TAPS-1:HALF];
  always_ff @(posedge phi_c or negedge rst_n)
    if (!rst_n) grp_c <= '0; else grp_c <= samp[HALF-1:0];
  always_ff @(posedge phi_d or negedge rst_n)
    if (!rst_n) grp_d <= '0; else grp_d <= samp[N_TAPS-1:HALF];

  assign lat = '{a: grp_a, b: grp_b, c: grp_c, d: grp_d};
endmodule
