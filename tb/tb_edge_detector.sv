// Testbench of edge_detector: single rising edges at every slot, falling-only
// words, and random words, against a bit-by-bit reference.
module tb_edge_detector;
  import dpll_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;
  taps_t word, edges;
  logic  prev;
  int checks = 0, failures = 0;

  edge_detector dut (.word, .prev, .edges);

  task automatic check();
    taps_t exp_e;
    logic  left;
    #1;
    for (int i = 0; i < N_TAPS; i++) begin
      left = (i == 0) ? prev : word[i-1];
      exp_e[i] = !left && word[i];
    end
    checks++;
    if (edges !== exp_e) begin
      failures++;
      $display("FAIL word=%h prev=%b edges=%h exp=%h", word, prev, edges, exp_e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < N_TAPS; p++) begin
      word = ~taps_t'(0) << p; prev = 1'b0; check();       // rises at slot p
      word = ~(~taps_t'(0) << p); prev = 1'b1; check();    // falls at slot p
    end
    repeat (400) begin
      word = taps_t'($urandom); prev = 1'($urandom_range(1)); check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
