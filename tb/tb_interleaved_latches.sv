// Testbench of interleaved_latches: random sample words and one latch clock at
// a time; only the clocked group may change, and it must take its half.
module tb_interleaved_latches;
  import dpll_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;
  logic rst_n = 1'b1, phi_a = 0, phi_b = 0, phi_c = 0, phi_d = 0;
  taps_t samp;
  latch_groups_t lat;
  int checks = 0, failures = 0;

  interleaved_latches dut (.rst_n, .phi_a, .phi_b, .phi_c, .phi_d, .samp, .lat);

  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    latch_groups_t m;
    int g;
    samp = '0;
    #10;
    checks++;
    if (lat !== '0) begin failures++; $display("FAIL reset"); end
    m = '0;
    rst_n = 1'b1;
    repeat (400) begin
      samp = taps_t'($urandom);
      g = $urandom_range(3);
      #5;
      case (g)
        0: begin phi_a = 1; m.a = samp[7:0];  end
        1: begin phi_b = 1; m.b = samp[15:8]; end
        2: begin phi_c = 1; m.c = samp[7:0];  end
        default: begin phi_d = 1; m.d = samp[15:8]; end
      endcase
      #5;
      {phi_a, phi_b, phi_c, phi_d} = '0;
      samp = taps_t'($urandom);   // changes after the edge must not leak in
      #5;
      checks++;
      if (lat !== m) begin
        failures++;
        $display("FAIL group %0d: lat=%h exp=%h", g, lat, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
