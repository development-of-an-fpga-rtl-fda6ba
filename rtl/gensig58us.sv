// gensig58us: gate signal generator of the two-module 5-level MSMI.
//
// A sample counter (phase) runs over one 50 Hz fundamental period of
// PERIOD_SAMPLES = 344 samples of 58 us. From it and from the count values of
// the two ROMs the module builds the eight gate signals GENSIG[7..0]:
//   * Fundamental legs: g11 and g12 are high in the first half period and low
//     in the second (50 Hz square wave); g31 and g32 are their complements.
//   * Module 1 PWM leg: the half period is cut into 8 slots (21 or 22
//     samples). Slot i holds one pulse of counter[i] samples (COUNTER1..8),
//     centred in the slot and clamped to the slot length. During a pulse the
//     module is at +/-VDC, so g21 = g11 XOR pulse, g41 = NOT g21.
//   * Module 2 PWM leg: with apl = 1 the module is at +/-VDC while phase lies
//     in [ncounter[0],ncounter[1]), [ncounter[2],ncounter[3]),
//     [ncounter[4],ncounter[5]) or [ncounter[6],ncounter[7]); with apl = 0 it
//     is held at zero (g22 = g12). g42 = NOT g22.
// The original design gives the block's name, its ports and widths (clk,
// reset_bar, apl, COUNTER1..8[4..0], NCOUNTER1..8[8..0], GENSIG[7..0]), the
// 58 us sample time, the 50 Hz fundamental, which device pairs switch at the
// fundamental and which at the higher frequency, and that g3r/g4r are the
// complements of g1r/g2r. How the counts are turned into edges (slots,
// centring, intervals), the bit order of GENSIG and the reset behaviour are
// this design's choices.
//
// Timing: clk is divided by CLKS_PER_SAMPLE to give the 58 us sample strobe
// (default 1: clk itself is the 58 us sample clock). The inputs counter,
// ncounter and apl are captured while reset_bar is low and then on the last
// sample of every period, so a new case number takes effect at the next
// period start and never cuts a pulse. gensig is registered: it shows the
// state of the current phase one clock after phase changes. Reset is
// synchronous and active low; while it is low all eight gates are 0 (every
// device off) and phase restarts at 0.
module gensig58us
  import msmi_pkg::*;
#(
  // Clock cycles per 58 us sample.
  parameter int unsigned CLKS_PER_SAMPLE = 1
) (
  input  logic        clk,
  input  logic        reset_bar,   // synchronous, active low
  input  logic        apl,         // 0: apl <= 0.5 (module 2 idle), 1: apl > 0.5
  input  count_set_t  counter,     // COUNTER1..8 from counter58us
  input  ncount_set_t ncounter,    // NCOUNTER1..8 from ncounter58us
  output gate_t       gensig       // GENSIG[7..0]
);

  localparam int unsigned DIV_W = (CLKS_PER_SAMPLE > 1) ? $clog2(CLKS_PER_SAMPLE) : 1;

  logic [DIV_W-1:0] div_cnt;
  logic             sample_en;
  phase_t           phase;
  logic             period_end;

  count_set_t  counter_q;
  ncount_set_t ncounter_q;
  logic        apl_q;

  // Sample strobe.
  always_ff @(posedge clk) begin
    if (!reset_bar || sample_en) div_cnt <= '0;
    else                         div_cnt <= div_cnt + 1'b1;
  end
  assign sample_en  = (div_cnt == DIV_W'(CLKS_PER_SAMPLE - 1));
  assign period_end = sample_en && (phase == phase_t'(PERIOD_SAMPLES - 1));

  // Sample counter over one fundamental period.
  always_ff @(posedge clk) begin
    if (!reset_bar)     phase <= '0;
    else if (period_end) phase <= '0;
    else if (sample_en)  phase <= phase + 1'b1;
  end

  // Count values and mode are taken over only at the period boundary.
  always_ff @(posedge clk) begin
    if (!reset_bar || period_end) begin
      counter_q  <= counter;
      ncounter_q <= ncounter;
      apl_q      <= apl;
    end
  end

  // Position inside the current half period.
  logic   second_half;
  phase_t hpos;
  always_comb begin
    second_half = (phase >= phase_t'(HALF_SAMPLES));
    hpos        = second_half ? phase_t'(phase - phase_t'(HALF_SAMPLES)) : phase;
  end

  // Module 1: one centred pulse per slot.
  logic m1_on;
  always_comb begin
    m1_on = 1'b0;
    for (int unsigned i = 0; i < NUM_COUNTS; i++) begin
      int unsigned st, len, w, lo;
      st  = slot_start(i);
      len = slot_start(i + 1) - st;
      w   = (int'(counter_q[i]) > len) ? len : int'(counter_q[i]);
      lo  = st + (len - w) / 2;
      if (int'(hpos) >= lo && int'(hpos) < lo + w) m1_on = 1'b1;
    end
  end

  // Module 2: four on-intervals between pairs of switching instants.
  logic m2_on;
  always_comb begin
    m2_on = 1'b0;
    for (int unsigned j = 0; j < NUM_COUNTS / 2; j++) begin
      if (NCOUNT_W'(phase) >= ncounter_q[2*j] && NCOUNT_W'(phase) < ncounter_q[2*j+1])
        m2_on = 1'b1;
    end
    m2_on = m2_on & apl_q;
  end

  gate_t gate_d;
  always_comb begin
    logic fund;
    fund       = !second_half;
    gate_d.g11 = fund;
    gate_d.g31 = !fund;
    gate_d.g21 = fund ^ m1_on;
    gate_d.g41 = !(fund ^ m1_on);
    gate_d.g12 = fund;
    gate_d.g32 = !fund;
    gate_d.g22 = fund ^ m2_on;
    gate_d.g42 = !(fund ^ m2_on);
  end

  always_ff @(posedge clk) begin
    if (!reset_bar) gensig <= '0;
    else            gensig <= gate_d;
  end

  // Each leg's two devices are never on together once out of reset.
  always_ff @(posedge clk) begin
    if (reset_bar) begin
      assert (gate_d.g11 != gate_d.g31 && gate_d.g21 != gate_d.g41 &&
              gate_d.g12 != gate_d.g32 && gate_d.g22 != gate_d.g42)
        else $error("gensig58us: complementary gate pair violated");
    end
  end

endmodule
