// Lock-in testbench of dpll_top at its default parameters (60 MHz reference,
// 16 taps, K = 1/4). Two measurements:
//  - Lock-in time: with the data rate 1% off the reference, the time from
//    reset release until the phase error at every later measured edge stays
//    within +-3 taps ("10") or +-6 taps (PRBS, whose long runs without edges
//    let the phase wander further); it must be under 5 us, a few microseconds.
//  - Lock-in range: the data-rate offset is swept; a run counts as locked
//    when, over its last 400 bits, the output makes as many cycles as there
//    are bits (+-1). The regular "10" pattern must lock over -5%..+5%; the
//    2^13-1 PRBS must lock at +-1%. The widest PRBS range found is printed:
//    a first-order loop has no frequency memory, so during the PRBS's long
//    runs without edges the phase drifts by the full offset.
module tb_lock_in;
  import dpll_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;
  localparam longint TD = 1042;
  localparam longint P  = N_TAPS * TD;

  logic  ref_clk = 1'b0, rst_n = 1'b1, din = 1'b0;
  logic  clk_out, edge_valid;
  acc_t  dco_select;
  tap_t  out_tap, edge_pos;
  perr_t phase_err;
  int checks = 0, failures = 0;

  dpll_top dut (.ref_clk, .rst_n, .din, .clk_out, .dco_select, .out_tap,
                .phase_err, .edge_pos, .edge_valid);

  initial forever #(P/2) ref_clk = ~ref_clk;

  task automatic expect_true(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  bit     counting = 0, running = 0;
  int     n_out = 0;
  longint t_release = 0, t_last_bad = 0;
  int     err_bound = 3;

  always @(posedge clk_out) if (counting) n_out++;

  always @(negedge clk_out) if (running && edge_valid) begin
    if (int'(phase_err) > err_bound || int'(phase_err) < -err_bound) t_last_bad = $time;
  end

  logic [12:0] lfsr;
  function automatic logic prbs_next();   // x^13 + x^4 + x^3 + x + 1
    logic fb;
    fb = lfsr[12] ^ lfsr[3] ^ lfsr[2] ^ lfsr[0];
    lfsr = {lfsr[11:0], fb};
    return fb;
  endfunction

  // one run; returns 1 when the output followed the data rate at the end
  task automatic run(input bit prbs, input int offset_permille, input int bits,
                     output bit locked, output longint lock_time);
    longint tb_ps, t_next;
    logic last;
    int n_bits;
    tb_ps = P * (1000 + longint'(offset_permille)) / 1000;
    rst_n = 1'b0; din = 1'b0; last = 1'b0; lfsr = 13'h1;
    void'(prbs_next());          // the PRBS then starts with a 1
    #(3 * P + 77);
    rst_n = 1'b1;
    t_release = $time;
    t_last_bad = $time;
    running = 1;
    n_out = 0; n_bits = 0;
    // first rising edge half a period away from the DCO's reset tap 0: the
    // largest phase step the loop can be asked to pull in
    t_next = P / 2 + (longint'($time) / P + 2) * P + 8 * TD + 521;
    for (int n = 0; n < bits; n++) begin
      #(t_next - longint'($time));
      din = prbs ? prbs_next() : ~last;
      last = din;
      if (n == bits - 400) counting = 1;
      if (counting) n_bits++;
      t_next += tb_ps;
    end
    #(t_next - longint'($time));
    counting = 0;
    running = 0;
    locked = (n_out - n_bits >= -1) && (n_out - n_bits <= 1);
    lock_time = t_last_bad - t_release;
  endtask

  initial begin
    #(64'd3_000_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit locked;
    longint lt;
    int prbs_lo, prbs_hi;
    #1 rst_n = 1'b0;

    // lock-in time at 1% offset, both signs, both patterns
    for (int pat = 0; pat < 2; pat++)
      for (int sgn = -1; sgn <= 1; sgn += 2) begin
        err_bound = pat ? 6 : 3;
        run(pat[0], 10 * sgn, 700, locked, lt);
        $display("lock-in time, %s, offset %0d/1000: %0d ns", pat ? "PRBS13" : "\"10\"", 10 * sgn, lt / 1000);
        expect_true(locked, "not locked at 1% offset");
        expect_true(lt < 5_000_000, "lock-in took 5 us or more");
      end

    // lock-in range, regular "10" pattern
    for (int off = -50; off <= 50; off += 10) begin
      run(1'b0, off, 900, locked, lt);
      $display("\"10\"   offset %0d/1000: %s", off, locked ? "locked" : "not locked");
      expect_true(locked, $sformatf("\"10\" pattern not locked at offset %0d/1000", off));
    end

    // lock-in range, PRBS
    prbs_lo = 0; prbs_hi = 0;
    for (int off = 10; off <= 50; off += 10) begin
      run(1'b1, off, 1500, locked, lt);
      $display("PRBS13 offset %0d/1000: %s", off, locked ? "locked" : "not locked");
      if (locked && prbs_hi == off - 10) prbs_hi = off;
      run(1'b1, -off, 1500, locked, lt);
      $display("PRBS13 offset %0d/1000: %s", -off, locked ? "locked" : "not locked");
      if (locked && prbs_lo == -(off - 10)) prbs_lo = -off;
    end
    $display("PRBS13 lock-in range: %0d/1000 .. %0d/1000", prbs_lo, prbs_hi);
    expect_true(prbs_lo <= -10 && prbs_hi >= 10, "PRBS not locked at +-1%");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
