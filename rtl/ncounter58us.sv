// ncounter58us: fixed count values for the PWM leg of module 2.
//
// Module 2 does not follow the case number: for apl <= 0.5 its switching
// angles are fixed at 180 and 360 degrees (its output stays at zero), and for
// apl > 0.5 it runs the pattern belonging to a module amplitude of 1. The
// one-bit input xalpha selects between these two sets of eight 9-bit counts
// NCOUNTER1..8. Port names, widths and the two fixed cases follow the
// original design; its set for xalpha = 1 is not published, so the one here
// is this design's example.
//
// Each count is a switching instant, in 58 us samples from the start of the
// fundamental period (0..343). gensig58us drives module 2 to a non-zero level
// from NCOUNTER1 to NCOUNTER2, NCOUNTER3 to NCOUNTER4, NCOUNTER5 to NCOUNTER6
// and NCOUNTER7 to NCOUNTER8 (the first two intervals positive, the last two
// negative).
//   xalpha = 0: {172,172,172,172,344,344,344,344}: instants at 180 and 360
//               degrees only, every interval empty, module 2 output zero.
//   xalpha = 1: quarter-wave symmetric pattern with a1 = 10 and a2 = 76
//               samples (about 10 and 80 degrees):
//               {a1, a2, H-a2, H-a1, H+a1, H+a2, 2H-a2, 2H-a1}, H = 172.
//
// Timing: purely combinational.
module ncounter58us
  import msmi_pkg::*;
#(
  // First switching instant of the apl > 0.5 pattern, in samples.
  parameter int unsigned A1 = 10,
  // Second switching instant of the apl > 0.5 pattern, in samples.
  parameter int unsigned A2 = 76
) (
  input  logic        xalpha,    // 0: apl <= 0.5, 1: apl > 0.5
  output ncount_set_t ncounter   // ncounter[0] = NCOUNTER1 ... ncounter[7] = NCOUNTER8
);

  localparam int unsigned H = HALF_SAMPLES;

  localparam ncount_set_t IDLE_SET = {
    ncount_t'(2*H), ncount_t'(2*H), ncount_t'(2*H), ncount_t'(2*H),
    ncount_t'(H),   ncount_t'(H),   ncount_t'(H),   ncount_t'(H)};

  localparam ncount_set_t FULL_SET = {
    ncount_t'(2*H - A1), ncount_t'(2*H - A2), ncount_t'(H + A2), ncount_t'(H + A1),
    ncount_t'(H - A1),   ncount_t'(H - A2),   ncount_t'(A2),     ncount_t'(A1)};

  always_comb ncounter = xalpha ? FULL_SET : IDLE_SET;

endmodule
