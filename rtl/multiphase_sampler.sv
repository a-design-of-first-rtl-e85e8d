// Multi-phase sampling stage of the parallel phase comparator.
// Sixteen D flip-flops sample the input data, flip-flop i on the rising edge of
// delay-line tap phi[i]; one reference cycle thus yields 16 samples spaced one
// cell delay apart, taken one after the other. samp[i] holds until phi[i] rises
// again one reference period later, which is why the next stage copies the
// samples into interleaved latches. The asynchronous active-low reset is an
// addition of this design.
module multiphase_sampler
  import dpll_pkg::*;
(
  input  logic  rst_n,
  input  taps_t phi,
  input  logic  din,
  output taps_t samp
);
  timeunit 1ps;
  timeprecision 1ps;

  for (genvar i = 0; i < N_TAPS; i++) begin : g_ff
    logic q;
    always_ff @(posedge phi[i] or negedge rst_n) begin
      if (!rst_n) q <= 1'b0;
      else        q <= din;
    end
    assign samp[i] = q;
  end
endmodule
