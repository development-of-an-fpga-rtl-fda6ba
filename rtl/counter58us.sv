// counter58us: case-number ROM for the PWM leg of module 1.
//
// The DSP groups its on-line optimal PWM switching angles into 25 case
// numbers and sends only the case number (alpha[4:0]) to the FPGA. This ROM
// turns a case number into eight pre-calculated count values COUNTER1..8
// (5 bits each, in 58 us samples) that time the high-frequency pulses of
// module 1. Port names, widths, the 25 cases and the idea of storing
// pre-calculated counts per case follow the original design.
//
// The original design's stored counts are not published. This ROM therefore holds
// an example table built from a formula: case c (1..25) stands for a module
// amplitude m = c/25, and count i (i = 0..7, i.e. COUNTER1..8) is the width of
// the pulse in slot i of a half period,
//   w(c,i) = round(21 * m * S_i / 256),  S_i = round(256 * sin((2i+1)*pi/16))
// i.e. S = {50,142,213,251,251,213,142,50} - a sampled sine of 8 pulses per
// half period, 21 samples being the shortest slot length. For every entry
// this equals round(21 * m * sin((2i+1)*pi/16)). Cases 0 and 26..31 give
// all-zero counts (no pulses). Replace case_count() to load other
// tables; gensig58us clamps any width to its slot.
//
// Timing: purely combinational (asynchronous ROM); the gate signal generator
// samples its outputs once per fundamental period.
module counter58us
  import msmi_pkg::*;
#(
  // Width, in samples, of a full-amplitude pulse at the peak of the sine.
  parameter int unsigned FULL_WIDTH = 21
) (
  input  case_num_t  alpha,    // case number from the DSP
  output count_set_t counter   // counter[0] = COUNTER1 ... counter[7] = COUNTER8
);

  localparam int unsigned SIN_Q [NUM_COUNTS] = '{50, 142, 213, 251, 251, 213, 142, 50};
  localparam int unsigned DEN = NUM_CASES * 256;

  function automatic count_t case_count(int unsigned c, logic [2:0] i);
    int unsigned w;
    if (c < 1 || c > NUM_CASES) return '0;
    w = (FULL_WIDTH * c * SIN_Q[i] + DEN / 2) / DEN;
    if (w > (2 ** COUNT_W) - 1) w = (2 ** COUNT_W) - 1;
    return count_t'(w);
  endfunction

  // The whole table, 32 case numbers by 8 counts, as a constant: entry
  // (c, i) sits at bits [(c*8+i)*5 +: 5].
  localparam int unsigned ROM_BITS = (2 ** CASE_W) * NUM_COUNTS * COUNT_W;

  function automatic logic [ROM_BITS-1:0] build_rom();
    logic [ROM_BITS-1:0] r;
    r = '0;
    for (int unsigned c = 0; c < 2 ** CASE_W; c++)
      for (int unsigned i = 0; i < NUM_COUNTS; i++)
        r[(c * NUM_COUNTS + i) * COUNT_W +: COUNT_W] = case_count(c, 3'(i));
    return r;
  endfunction

  localparam logic [ROM_BITS-1:0] ROM = build_rom();

  always_comb counter = ROM[int'(alpha) * NUM_COUNTS * COUNT_W +: NUM_COUNTS * COUNT_W];

endmodule
