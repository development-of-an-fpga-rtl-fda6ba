// msmi_pkg: constants and types shared by the gate signal generator of a
// two-module (5-level) modular structured multilevel inverter (MSMI).
//
// Timing base: everything is counted in samples of 58 us. One half period of
// the 50 Hz fundamental is 10 ms / 58 us = 172.4, rounded down to 172 samples,
// so one full period is 344 samples and one sample is about 1.04 degrees.
// A count value for a switching angle alpha (degrees) is therefore
//   count = 0.01 * alpha / (180 * 58e-6)
// The 58 us sample time, the 50 Hz fundamental, the count formula, the 25 case
// numbers, the eight count values per ROM and their widths (5 and 9 bits) and
// the eight gate signals come from the original design; the rounding to
// 172 samples and the bit order of the gate vector are choices of this design.
package msmi_pkg;

  // Number of count values each ROM delivers (COUNTER1..8 / NCOUNTER1..8).
  localparam int unsigned NUM_COUNTS   = 8;
  // Width of a case-dependent count value (COUNTER[4..0]).
  localparam int unsigned COUNT_W      = 5;
  // Width of a fixed count value (NCOUNTER[8..0]).
  localparam int unsigned NCOUNT_W     = 9;
  // Width of the case number from the DSP (alpha[4..0]).
  localparam int unsigned CASE_W       = 5;
  // Number of valid case numbers (1..25).
  localparam int unsigned NUM_CASES    = 25;
  // Samples of 58 us in one half period of the 50 Hz fundamental.
  localparam int unsigned HALF_SAMPLES = 172;
  // Samples in one full fundamental period.
  localparam int unsigned PERIOD_SAMPLES = 2 * HALF_SAMPLES;
  // Width of the sample counter that runs over one period.
  localparam int unsigned PHASE_W      = $clog2(PERIOD_SAMPLES);

  typedef logic [CASE_W-1:0]   case_num_t;
  typedef logic [COUNT_W-1:0]  count_t;
  typedef logic [NCOUNT_W-1:0] ncount_t;
  typedef logic [PHASE_W-1:0]  phase_t;

  // The eight count values of one ROM, index 0 = COUNTER1 / NCOUNTER1.
  typedef count_t  [NUM_COUNTS-1:0] count_set_t;
  typedef ncount_t [NUM_COUNTS-1:0] ncount_set_t;

  // The eight gate signals, GENSIG[7..0]. grm drives device Sgr of module m;
  // g3m is the complement of g1m and g4m the complement of g2m.
  typedef struct packed {
    logic g11;  // [7] module 1, left leg upper device  (fundamental leg)
    logic g31;  // [6] module 1, left leg lower device
    logic g21;  // [5] module 1, right leg upper device (PWM leg)
    logic g41;  // [4] module 1, right leg lower device
    logic g12;  // [3] module 2, left leg upper device  (fundamental leg)
    logic g32;  // [2] module 2, left leg lower device
    logic g22;  // [1] module 2, right leg upper device (PWM leg)
    logic g42;  // [0] module 2, right leg lower device
  } gate_t;

  // Start sample of PWM slot i of module 1 within a half period: the half
  // period is cut into NUM_COUNTS slots of 21 or 22 samples.
  function automatic int unsigned slot_start(int unsigned i);
    return (i * HALF_SAMPLES) / NUM_COUNTS;
  endfunction

endpackage
