// End-to-end testbench of dpll_top at its default parameters (16 taps, 8-bit
// loop word, K = 1/4, 1042 ps cells, i.e. a 16.67 ns / 60 MHz reference).
// Input data runs at the reference rate offset by a chosen amount, either the
// regular "10" pattern or a 2^13-1 PRBS. For each run the testbench checks:
//  - every phase measurement against the tap slot it computes itself from
//    the times at which it made the input rise;
//  - every loop update: phase error = slot - tap (wrapped), and the integrator
//    grows by error * 16 / 4 at each falling output edge;
//  - no output pulse shorter than 6 taps (glitch-free tap switching);
//  - after pull-in, the output makes as many cycles as there are data bits
//    (it follows the data rate, not the reference) and the phase error at
//    every measured edge stays within the bound given for the run.
// It also counts the mechanisms of the design and fails if one never occurs:
// edge found / no edge (hold), odd and even latch groups, tap steps up and
// down, tap wrap-around both ways.
module tb_dpll_top;
  import dpll_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;
  localparam longint TD = 1042;
  localparam longint P  = N_TAPS * TD;
  localparam longint T0 = P / 2;          // first reference rising edge

  logic  ref_clk = 1'b0, rst_n = 1'b1, din = 1'b0;
  logic  clk_out, edge_valid;
  acc_t  dco_select;
  tap_t  out_tap, edge_pos;
  perr_t phase_err;

  int checks = 0, failures = 0;

  dpll_top dut (.ref_clk, .rst_n, .din, .clk_out, .dco_select, .out_tap,
                .phase_err, .edge_pos, .edge_valid);

  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts

  initial forever #(P/2) ref_clk = ~ref_clk;

  task automatic expect_true(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------------------------------------------------------- stimulus
  int  exp_slot [longint];     // reference cycle -> slot of the input's rise
  bit  running = 0;            // a run is in progress
  bit  locked_window = 0;      // pull-in is over
  int  n_bits_win = 0, n_out_win = 0;
  int  max_err = 0, n_meas_win = 0;
  logic [12:0] lfsr;

  function automatic logic prbs_next();   // x^13 + x^4 + x^3 + x + 1
    logic fb;
    fb = lfsr[12] ^ lfsr[3] ^ lfsr[2] ^ lfsr[0];
    lfsr = {lfsr[11:0], fb};
    return fb;
  endfunction

  task automatic run(input string name, input bit prbs, input int offset_permille,
                     input int bits, input int settle, input int err_bound);
    longint tb_ps, t_next, u, k;
    logic b, last;
    int n_bad;
    tb_ps = P * (1000 + longint'(offset_permille)) / 1000;
    rst_n = 1'b0;
    exp_slot.delete();
    locked_window = 0;
    n_bits_win = 0; n_out_win = 0; max_err = 0; n_meas_win = 0;
    din = 1'b0; last = 1'b0;
    lfsr = 13'h1;
    #(3 * P);
    rst_n = 1'b1;
    running = 1;
    t_next = longint'($time) + 4 * P + longint'($urandom_range(int'(P)));
    for (int n = 0; n < bits; n++) begin
      #(t_next - longint'($time));
      b = prbs ? prbs_next() : ~last;
      if (b && !last) begin
        u = (longint'($time) - T0) % P;
        k = (longint'($time) - T0) / P;
        exp_slot[k] = (u % TD != 0) ? int'(u / TD) : -1;   // -1: exactly on a tap edge
        if (u == 0) exp_slot[k - 1] = -1;   // on tap 15 of the cycle before
      end
      din = b;
      last = b;
      if (n == settle) locked_window = 1;
      if (locked_window) n_bits_win++;
      t_next += tb_ps;
    end
    #(t_next - longint'($time));
    running = 0;
    locked_window = 0;
    n_bad = n_out_win - n_bits_win;
    $display("run %-10s offset %0d/1000: bits %0d, output cycles %0d, max |error| after pull-in %0d taps",
             name, offset_permille, n_bits_win, n_out_win, max_err);
    expect_true(n_bad >= -1 && n_bad <= 1, {name, ": output does not follow the data rate"});
    expect_true(max_err <= err_bound, {name, ": phase error above bound"});
    expect_true(n_meas_win > 0, {name, ": no measurement after pull-in"});
  endtask

  // ------------------------------------------- independent phase measurement
  // The measurement of cycle k is shown from tap 0 of cycle k+1 on.
  initial begin
    longint k;
    k = 0;
    forever begin
      #(T0 + (k + 1) * P + 6 * TD + 200 - longint'($time));
      if (running && rst_n && k > 2) begin
        if (exp_slot.exists(k) && exp_slot[k] < 0) begin
          // the input rose at the very instant of a tap edge: either slot is right
        end else if (exp_slot.exists(k)) begin
          expect_true(edge_valid && int'(edge_pos) == exp_slot[k],
                      $sformatf("cycle %0d: slot %0d measured as %0d (valid %b)", k, exp_slot[k], edge_pos, edge_valid));
        end else begin
          expect_true(!edge_valid, $sformatf("cycle %0d: edge reported where none was", k));
        end
      end
      k++;
    end
  end

  // ------------------------------------------------- loop update, mechanisms
  int n_edge = 0, n_hold = 0, n_odd = 0, n_even = 0;
  int n_up = 0, n_down = 0, n_wrap_up = 0, n_wrap_down = 0;
  longint t_rise = -1, t_fall = -1;
  int last_tap = -1;

  always @(negedge clk_out) if (rst_n && running) begin
    acc_t  q_old;
    perr_t e;
    int    e_ref;
    q_old = dco_select;
    e = phase_err;
    e_ref = edge_valid ? (int'(edge_pos) - int'(q_old[7:4]) + 24) % 16 - 8 : 0;
    expect_true(int'(e) == e_ref, "phase error is not slot minus tap");
    if (edge_valid) n_edge++; else n_hold++;
    if (dut.u_pc.u_clkgen.sel_odd) n_odd++; else n_even++;
    if (locked_window && edge_valid) begin
      n_meas_win++;
      if ((e < 0 ? -int'(e) : int'(e)) > max_err) max_err = e < 0 ? -int'(e) : int'(e);
    end
    if (t_rise >= 0) expect_true(longint'($time) - t_rise >= 6 * TD, "output high pulse too short");
    t_fall = $time;
    #1;
    expect_true(dco_select == acc_t'(int'(q_old) + int'(e) * 16 / 4), "integrator update");
  end

  always @(posedge clk_out) if (rst_n && running) begin
    int d;
    if (t_fall >= 0) expect_true(longint'($time) - t_fall >= 6 * TD, "output low pulse too short");
    if (last_tap >= 0) begin
      d = (int'(out_tap) - last_tap + 24) % 16 - 8;
      if (d > 0) n_up++;
      if (d < 0) n_down++;
      if (last_tap == 15 && out_tap == 0) n_wrap_up++;
      if (last_tap == 0 && out_tap == 15) n_wrap_down++;
    end
    last_tap = int'(out_tap);
    t_rise = $time;
    if (locked_window) n_out_win++;
  end

  // ----------------------------------------------------------------- control
  initial begin
    #(64'd2_000_000_000);     // 2 ms of simulated time
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [12:0] s0;
    int period;
    // the PRBS generator must be maximal: period 2^13 - 1
    lfsr = 13'h1;
    period = 0;
    do begin void'(prbs_next()); period++; end while (lfsr != 13'h1 && period < 9000);
    expect_true(period == 8191, "PRBS period");

    run("10",      0,   0, 600, 200, 1);
    run("10",      0,  10, 900, 300, 3);
    run("10",      0, -10, 900, 300, 3);
    run("10",      0,  30, 900, 300, 5);
    run("10",      0, -30, 900, 300, 5);
    run("10",      0,  50, 900, 300, 7);
    run("10",      0, -50, 900, 300, 7);
    run("PRBS13",  1,   0, 1500, 300, 2);
    run("PRBS13",  1,  10, 2000, 300, 7);
    run("PRBS13",  1, -10, 2000, 300, 7);

    $display("mechanisms: edge %0d, no-edge hold %0d, odd group %0d, even group %0d, tap up %0d, down %0d, wrap up %0d, wrap down %0d",
             n_edge, n_hold, n_odd, n_even, n_up, n_down, n_wrap_up, n_wrap_down);
    expect_true(n_edge > 0, "no edge ever measured");
    expect_true(n_hold > 0, "no-edge hold never happened");
    expect_true(n_odd > 0 && n_even > 0, "both latch groups used");
    expect_true(n_up > 0 && n_down > 0, "tap steps both ways");
    expect_true(n_wrap_up > 0 && n_wrap_down > 0, "tap wrap-around both ways");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
