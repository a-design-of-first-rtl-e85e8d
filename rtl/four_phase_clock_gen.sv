// Four-phase latch clocks of the parallel phase comparator.
// Reference cycles are numbered odd and even alternately. phi_a rises at tap 8
// of an odd cycle, once taps 0-7 have been sampled; phi_b rises 8 taps later,
// at tap 0 of the next cycle, once taps 8-15 have been sampled; phi_c and phi_d
// do the same for the even cycle. Each clock pulses once every two reference
// cycles. The phase relations (phi_b 8 taps after phi_a, phi_d 8 taps after
// phi_c, odd/even alternation) follow the original design; how they are made
// is this design's choice: a parity flop toggled on tap 4 gates tap 8, and a
// copy of it taken on tap 12 gates tap 0, so every gate input changes only
// while the tap it gates is low and no gated clock can glitch.
// sel_odd, updated on tap 0, is 1 while the odd-cycle latches hold the latest
// complete cycle and 0 while the even-cycle ones do.
module four_phase_clock_gen
  import dpll_pkg::*;
(
  input  logic  rst_n,
  input  taps_t phi,
  output logic  phi_a,
  output logic  phi_b,
  output logic  phi_c,
  output logic  phi_d,
  output logic  sel_odd
);
  timeunit 1ps;
  timeprecision 1ps;

  logic par_a;   // 1 from tap 4 of an odd cycle to tap 4 of the next cycle
  logic par_b;   // par_a delayed to tap 12

  always_ff @(posedge phi[HALF/2] or negedge rst_n) begin
    if (!rst_n) par_a <= 1'b0;
    else        par_a <= ~par_a;
  end

  always_ff @(posedge phi[HALF + HALF/2] or negedge rst_n) begin
    if (!rst_n) par_b <= 1'b0;
    else        par_b <= par_a;
  end

  always_ff @(posedge phi[0] or negedge rst_n) begin
    if (!rst_n) sel_odd <= 1'b0;
    else        sel_odd <= par_b;
  end

  assign phi_a = phi[HALF] &  par_a;
  assign phi_c = phi[HALF] & ~par_a;
  assign phi_b = phi[0]    &  par_b;
  assign phi_d = phi[0]    & ~par_b;
endmodule
