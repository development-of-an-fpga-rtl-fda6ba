// gate_signal_generator: FPGA gate signal generator of a two-module (5-level)
// modular structured multilevel inverter.
//
// A DSP computes the optimal PWM switching angles for the requested amplitude
// apl and sends only a 5-bit case number (alpha), a bit selecting module 2's
// fixed pattern (xalpha) and a bit telling whether apl > 0.5 (apl). Inside:
//   counter58us  - case number -> eight 5-bit pulse counts for module 1
//   ncounter58us - xalpha      -> eight 9-bit switching instants for module 2
//   gensig58us   - 58 us sample counter and gate logic -> GENSIG[7..0]
// This structure and the port names follow the original design's top-level
// schematic; the gate vector layout is given by msmi_pkg::gate_t
// ({g11,g31,g21,g41,g12,g32,g22,g42}, g11 in bit 7).
//
// Timing: clk divided by CLKS_PER_SAMPLE is the 58 us sample rate (default:
// clk is the sample clock, 17.24 kHz). reset_bar is synchronous, active low,
// and holds every gate at 0. New inputs take effect at the next fundamental
// period start (every 344 samples); gate_signal is registered.
module gate_signal_generator
  import msmi_pkg::*;
#(
  parameter int unsigned CLKS_PER_SAMPLE = 1
) (
  input  logic       clk,
  input  logic       reset_bar,
  input  logic       apl,
  input  case_num_t  alpha,
  input  logic       xalpha,
  output gate_t      gate_signal
);

  count_set_t  counter;
  ncount_set_t ncounter;

  counter58us u_counter58us (
    .alpha   (alpha),
    .counter (counter)
  );

  ncounter58us u_ncounter58us (
    .xalpha   (xalpha),
    .ncounter (ncounter)
  );

  gensig58us #(
    .CLKS_PER_SAMPLE (CLKS_PER_SAMPLE)
  ) u_gensig58us (
    .clk       (clk),
    .reset_bar (reset_bar),
    .apl       (apl),
    .counter   (counter),
    .ncounter  (ncounter),
    .gensig    (gate_signal)
  );

endmodule
