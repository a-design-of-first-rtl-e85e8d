// Behavioural model (not synthesizable): the 16-stage delay line.
// A chain of N_TAPS buffers, each delaying by TAP_DELAY_PS, turns the reference
// clock into N_TAPS clock phases: phi[i] is ref_clk delayed by (i+1) cell
// delays. The loop assumes that the taps span one reference period, i.e. that
// the reference period is N_TAPS * TAP_DELAY_PS; no delay locking is part of
// the design, so this is up to whoever drives ref_clk. The 16 taps are the
// original design's; the cell delay of 1042 ps is chosen here so that 16 cells
// make one period at about 60 MHz.
module delay_line #(
  parameter int unsigned N_TAPS       = 16,
  parameter int unsigned TAP_DELAY_PS = 1042
) (
  input  logic              ref_clk,
  output logic [N_TAPS-1:0] phi
);
  timeunit 1ps;
  timeprecision 1ps;

  assign #(TAP_DELAY_PS) phi[0] = ref_clk;
  for (genvar i = 1; i < N_TAPS; i++) begin : g_cell
    assign #(TAP_DELAY_PS) phi[i] = phi[i-1];
  end
endmodule
