// Testbench of odd_even_selector: random latch contents, both selections.
module tb_odd_even_selector;
  import dpll_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;
  logic          sel_odd;
  latch_groups_t lat;
  taps_t         word;
  logic          prev;
  int checks = 0, failures = 0;

  odd_even_selector dut (.sel_odd, .lat, .word, .prev);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    taps_t exp_word;
    logic  exp_prev;
    repeat (400) begin
      lat = latch_groups_t'($urandom);
      sel_odd = 1'($urandom_range(1));
      #1;
      // odd: taps 0-7 from A, 8-15 from B, previous cycle's tap 15 from D
      exp_word = sel_odd ? (taps_t'(lat.b) << 8) | taps_t'(lat.a) : (taps_t'(lat.d) << 8) | taps_t'(lat.c);
      exp_prev = sel_odd ? lat.d[7] : lat.b[7];
      checks++;
      if (word !== exp_word || prev !== exp_prev) begin
        failures++;
        $display("FAIL sel_odd=%b lat=%h word=%h prev=%b", sel_odd, lat, word, prev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
