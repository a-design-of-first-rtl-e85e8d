// Testbench of delay_line: every tap must rise (i+1) cell delays after each
// rising edge of the reference clock and stay high for half a period.
module tb_delay_line;
  import dpll_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;
  localparam longint TD = 1042;
  localparam longint P  = N_TAPS * TD;
  logic  ref_clk = 1'b0;
  taps_t phi;
  int checks = 0, failures = 0;
  int seen [N_TAPS];

  delay_line #(.N_TAPS(N_TAPS), .TAP_DELAY_PS(32'(TD))) dut (.ref_clk, .phi);

  // reference rises at P/2 + k*P
  initial forever #(P/2) ref_clk = ~ref_clk;

  for (genvar i = 0; i < N_TAPS; i++) begin : g_mon
    always @(posedge phi[i]) if ($time > 2 * P) begin
      longint t;
      t = longint'($time) - P/2 - (i + 1) * TD;
      checks++;
      seen[i]++;
      if (t < 0 || t % P != 0) begin
        failures++;
        $display("FAIL tap %0d rose at %0t", i, $time);
      end
    end
    always @(negedge phi[i]) if ($time > 2 * P) begin
      checks++;
      if ((longint'($time) - (i + 1) * TD) % P != 0) begin
        failures++;
        $display("FAIL tap %0d fell at %0t", i, $time);
      end
    end
  end

  initial begin
    #(1000 * P);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[i]) seen[i] = 0;
    #(20 * P);
    foreach (seen[i]) begin
      checks++;
      if (seen[i] < 17) begin
        failures++;
        $display("FAIL tap %0d rose only %0d times", i, seen[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
