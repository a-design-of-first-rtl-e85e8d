// Shared sizes and types of the first-order delay-line DPLL.
// The delay line has 16 taps, so a phase position is a 4-bit number; the loop
// filter and the integrator work on 8-bit words whose upper four bits are the
// tap number and whose lower four bits are a fraction of a tap. These sizes are
// the ones of the original design; everything in this package follows them.
package dpll_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N_TAPS = 16;               // delay-line taps
  localparam int unsigned TAP_W  = 4;                // bits of a tap number
  localparam int unsigned ACC_W  = 8;                // LPF / integrator word
  localparam int unsigned FRAC_W = ACC_W - TAP_W;    // fraction bits below the tap
  localparam int unsigned HALF   = N_TAPS / 2;       // taps in a latch group

  typedef logic [N_TAPS-1:0]       taps_t;   // one bit per tap
  typedef logic [HALF-1:0]         half_t;   // one latch group
  typedef logic [TAP_W-1:0]        tap_t;    // tap number 0..15
  typedef logic signed [TAP_W-1:0] perr_t;   // phase error, -8..+7 taps
  typedef logic [ACC_W-1:0]        acc_t;    // integrator contents
  typedef logic signed [ACC_W-1:0] step_t;   // integrator increment

  // Latch groups of the interleaved sampling stage: A/B hold taps 0-7/8-15 of
  // an odd cycle, C/D the same of an even cycle.
  typedef struct packed {
    half_t a;
    half_t b;
    half_t c;
    half_t d;
  } latch_groups_t;
endpackage
