// Testbench of phase_subtractor: every position and DCO tap, with and without
// a valid edge; the reference is the shorter signed distance round 16 taps.
module tb_phase_subtractor;
  import dpll_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;
  tap_t  pos, dco_tap;
  logic  valid;
  perr_t dphi;
  int checks = 0, failures = 0;

  phase_subtractor dut (.pos, .valid, .dco_tap, .dphi);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d;
    for (int v = 0; v < 2; v++)
      for (int p = 0; p < 16; p++)
        for (int t = 0; t < 16; t++) begin
          pos = tap_t'(p); dco_tap = tap_t'(t); valid = 1'(v);
          #1;
          d = (p - t + 16) % 16;
          if (d >= 8) d -= 16;
          if (!valid) d = 0;
          checks++;
          if (int'(dphi) != d) begin
            failures++;
            $display("FAIL pos=%0d tap=%0d valid=%b dphi=%0d exp=%0d", p, t, v, dphi, d);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
