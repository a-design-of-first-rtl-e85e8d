// Testbench of phase_comparator: taps from the delay line model; the input
// rises once in chosen reference cycles at a chosen tap slot (between two tap
// edges) and falls in the cycle after. One cycle later the comparator must
// report that slot (valid) and slot minus the DCO tap as a signed 4-bit
// error; for cycles without a rising edge it must report no edge and 0.
module tb_phase_comparator;
  import dpll_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;
  localparam longint TD = 1042;
  localparam longint P  = N_TAPS * TD;
  localparam longint T0 = P / 2;        // first reference rising edge
  logic  ref_clk = 1'b0, rst_n = 1'b1, din = 1'b0;
  taps_t phi;
  tap_t  dco_tap, pos;
  perr_t dphi;
  logic  valid;
  int checks = 0, failures = 0;
  int n_edge = 0, n_none = 0;

  delay_line #(.TAP_DELAY_PS(32'(TD))) u_dl (.ref_clk, .phi);
  phase_comparator dut (.rst_n, .phi, .din, .dco_tap, .dphi, .pos, .valid);

  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts

  initial forever #(P/2) ref_clk = ~ref_clk;

  // cycle k spans the tap edges T0 + k*P + (i+1)*TD, i = 0..15
  task automatic wait_until(longint t);
    if (t > longint'($time)) #(t - longint'($time));
  endtask

  task automatic check_cycle(input longint k, input bit has_edge, input int slot);
    int d;
    wait_until(T0 + (k + 1) * P + 6 * TD + 200);
    dco_tap = tap_t'($urandom_range(15));
    #1;
    d = (slot - int'(dco_tap) + 24) % 16 - 8;
    checks++;
    if (has_edge) begin
      n_edge++;
      if (!valid || pos != tap_t'(slot) || int'(dphi) != d) begin
        failures++;
        $display("FAIL cycle %0d: slot %0d, got valid=%b pos=%0d dphi=%0d (tap %0d)",
                 k, slot, valid, pos, dphi, dco_tap);
      end
    end else begin
      n_none++;
      if (valid || dphi != 0) begin
        failures++;
        $display("FAIL cycle %0d: no edge, got valid=%b pos=%0d dphi=%0d", k, valid, pos, dphi);
      end
    end
  endtask

  initial begin
    #(1000 * P);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint k;
    int slot, fall;
    dco_tap = '0;
    #(2 * P + 300) rst_n = 1'b1;
    k = 4;
    for (int n = 0; n < 60; n++) begin
      // the first runs hit the cycle boundary: slot 0 and slot 15
      slot = (n < 4) ? (n % 2) * 15 : int'($urandom_range(15));
      fall = $urandom_range(15);
      // rise between tap slot-1 and tap slot of cycle k
      fork
        begin
          wait_until(T0 + k * P + slot * TD + 500);
          din = 1'b1;
          wait_until(T0 + (k + 1) * P + fall * TD + 300);
          din = 1'b0;
        end
        check_cycle(k, 1'b1, slot);
      join
      check_cycle(k + 1, 1'b0, 0);   // only a falling edge in cycle k+1
      k += 3 + longint'($urandom_range(1));
    end
    checks++;
    if (n_edge < 60 || n_none < 60) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
