// Testbench of loop_filter at its default gain K = 1/4: every 4-bit error
// gives error * 16 / 4 (1/16-tap units), i.e. error * 4.
module tb_loop_filter;
  import dpll_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;
  perr_t dphi;
  step_t step;
  int checks = 0, failures = 0;

  loop_filter dut (.dphi, .step);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = -8; e < 8; e++) begin
      dphi = perr_t'(e);
      #1;
      checks++;
      if (int'(step) != e * 16 / 4) begin
        failures++;
        $display("FAIL dphi=%0d step=%0d exp=%0d", e, step, e * 4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
