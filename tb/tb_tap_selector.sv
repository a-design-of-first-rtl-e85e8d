// Testbench of tap_selector: every select value with random and one-hot tap words.
module tb_tap_selector;
  import dpll_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;
  taps_t phi;
  tap_t  sel;
  logic  clk_sel;
  int checks = 0, failures = 0;

  tap_selector dut (.phi, .sel, .clk_sel);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 40; r++) begin
      for (int s = 0; s < N_TAPS; s++) begin
        phi = (r < 16) ? taps_t'(1) << r : taps_t'($urandom);
        sel = tap_t'(s);
        #1;
        checks++;
        if (clk_sel !== 1'((phi >> s) & taps_t'(1))) begin
          failures++;
          $display("FAIL phi=%h sel=%0d out=%b", phi, s, clk_sel);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
