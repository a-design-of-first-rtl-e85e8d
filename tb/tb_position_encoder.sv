// Testbench of position_encoder: every one-hot input, no edge, and random
// multi-edge words (the lowest slot must win).
module tb_position_encoder;
  import dpll_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;
  taps_t edges;
  tap_t  pos;
  logic  valid;
  int checks = 0, failures = 0;

  position_encoder dut (.edges, .pos, .valid);

  task automatic check();
    int expp;
    #1;
    expp = 0;
    for (int i = N_TAPS - 1; i >= 0; i--) if (edges[i]) expp = i;
    checks++;
    if (valid !== (edges != 0) || (edges != 0 && pos !== tap_t'(expp))) begin
      failures++;
      $display("FAIL edges=%h pos=%0d valid=%b exp=%0d", edges, pos, valid, expp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    edges = '0; check();
    for (int p = 0; p < N_TAPS; p++) begin
      edges = taps_t'(1) << p; check();
    end
    repeat (400) begin
      edges = taps_t'($urandom); check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
