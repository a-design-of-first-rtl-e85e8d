// Testbench of multiphase_sampler: taps from the delay line model, input data
// switching at known times off the tap grid; each sample must equal the data
// value, worked out from those times, at the moment its tap rose.
module tb_multiphase_sampler;
  import dpll_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;
  localparam int TD = 1042;
  localparam int P  = N_TAPS * TD;
  localparam int TB = 5317;           // data bit period, unrelated to the taps
  localparam int NB = 400;
  logic  ref_clk = 1'b0, rst_n = 1'b1, din;
  taps_t phi, samp;
  logic  bits [NB];
  int checks = 0, failures = 0;

  delay_line #(.TAP_DELAY_PS(32'(TD))) u_dl (.ref_clk, .phi);
  multiphase_sampler dut (.rst_n, .phi, .din, .samp);

  function automatic logic din_at(int t);
    return bits[(t / TB) % NB];
  endfunction

  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts

  initial forever #(P/2) ref_clk = ~ref_clk;
  initial begin
    foreach (bits[i]) bits[i] = 1'($urandom_range(1));
    forever begin
      din = din_at(int'($time));
      #(TB - int'($time) % TB);
    end
  end

  for (genvar i = 0; i < N_TAPS; i++) begin : g_mon
    always @(posedge phi[i]) if (rst_n) begin
      logic e;
      int   t;
      t = int'($time);
      e = din_at(t);
      #1;
      checks++;
      if (samp[i] !== e) begin
        failures++;
        $display("FAIL tap %0d at %0t: samp=%b exp=%b", i, t, samp[i], e);
      end
    end
  end

  initial begin
    #(2000 * P);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100;
    checks++;
    if (samp !== '0) begin failures++; $display("FAIL reset"); end
    #(2 * P) rst_n = 1'b1;
    #(60 * P);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
