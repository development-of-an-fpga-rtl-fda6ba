// tb_gensig58us: self-checking testbench of the gate signal generator.
//
// Runs with 3 clocks per sample. A reference model in the testbench keeps its
// own sample and period count from the release of reset, captures the count
// inputs at reset and at the last sample of each period, and works out every
// gate bit from the module levels it expects (module 1: centred pulse in each
// of 8 slots, module 2: four on-intervals). The outputs are compared after
// every clock. Inputs are changed at random points inside a period to show
// that they only take effect at the next period start. Also checked: all
// gates 0 during reset, the 344-sample period, and that pulses wider than
// their slot are clamped.
module tb_gensig58us;
  import msmi_pkg::*;

  localparam int C = 3;          // clocks per sample in this test
  localparam int P = 344;        // samples per period
  localparam int H = 172;

  logic        clk = 1'b0;
  logic        reset_bar;
  logic        apl;
  count_set_t  counter;
  ncount_set_t ncounter;
  gate_t       gensig;

  gensig58us #(.CLKS_PER_SAMPLE(C)) dut (
    .clk(clk), .reset_bar(reset_bar), .apl(apl),
    .counter(counter), .ncounter(ncounter), .gensig(gensig));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_m1_pulse = 0, n_m2_pulse = 0, n_clamp = 0, n_deferred = 0;

  // Reference state.
  int          k;            // clocks since reset release
  int          cw  [8];      // captured widths
  int          ct  [8];      // captured instants
  bit          capl;
  bit          pend_change;  // inputs differ from captured values

  function automatic int slot_lo(int i);
    return (i * H) / 8;
  endfunction

  // Expected level of module 1 at sample position s of a half period.
  function automatic bit ref_m1(int s);
    int lo, len, w, a;
    for (int i = 0; i < 8; i++) begin
      lo  = slot_lo(i);
      len = slot_lo(i + 1) - lo;
      w   = (cw[i] > len) ? len : cw[i];
      a   = lo + (len - w) / 2;
      if (s >= a && s < a + w) return 1'b1;
    end
    return 1'b0;
  endfunction

  function automatic bit ref_m2(int ph);
    if (!capl) return 1'b0;
    for (int j = 0; j < 4; j++)
      if (ph >= ct[2*j] && ph < ct[2*j+1]) return 1'b1;
    return 1'b0;
  endfunction

  function automatic gate_t ref_gate(int ph);
    gate_t g;
    bit pos, m1, m2;
    pos = (ph < H);
    m1  = ref_m1(ph % H);
    m2  = ref_m2(ph);
    g.g11 = pos;  g.g31 = !pos;
    g.g12 = pos;  g.g32 = !pos;
    // Module at +VDC: S1 and S4 on; at -VDC: S3 and S2 on; else zero.
    g.g21 = m1 ? !pos : pos;  g.g41 = !g.g21;
    g.g22 = m2 ? !pos : pos;  g.g42 = !g.g22;
    return g;
  endfunction

  task automatic capture();
    for (int i = 0; i < 8; i++) begin
      cw[i] = int'(counter[i]);
      ct[i] = int'(ncounter[i]);
    end
    capl = apl;
    for (int i = 0; i < 8; i++)
      if (cw[i] > slot_lo(i + 1) - slot_lo(i)) begin
        n_clamp++;
        break;
      end
  endtask

  task automatic randomize_inputs(bit wide);
    int t [8];
    for (int i = 0; i < 8; i++) counter[i] = count_t'(wide ? $urandom_range(31, 15) : $urandom_range(21, 0));
    // Sorted instants inside one period, some possibly beyond it.
    for (int i = 0; i < 8; i++) t[i] = $urandom_range(350, 0);
    t.sort();
    for (int i = 0; i < 8; i++) ncounter[i] = ncount_t'(t[i]);
    apl = 1'($urandom_range(1, 0));
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  gate_t prev;
  int    last_rise, n_rise;

  initial begin
    reset_bar = 1'b0;
    randomize_inputs(1'b0);
    repeat (4) @(posedge clk);
    #1;
    checks++;
    if (gensig !== gate_t'(0)) begin
      failures++;
      $display("FAIL gates not all off during reset: %b", gensig);
    end
    capture();
    @(negedge clk);
    reset_bar = 1'b1;
    k = 0;
    n_rise = 0;
    last_rise = -1;
    prev = '0;
    for (int cyc = 0; cyc < 12 * P * C; cyc++) begin
      int sample, ph;
      @(posedge clk);
      // Value of the DUT's phase before this edge.
      sample = k / C;
      ph     = sample % P;
      k++;
      #1;
      begin
        gate_t exp;
        exp = ref_gate(ph);
        checks++;
        if (gensig !== exp) begin
          failures++;
          if (failures < 10)
            $display("FAIL clk %0d phase %0d: gensig %b expected %b", k, ph, gensig, exp);
        end
        if (exp.g21 != exp.g11 && !(prev.g21 != prev.g11)) n_m1_pulse++;
        if (exp.g22 != exp.g12 && !(prev.g22 != prev.g12)) n_m2_pulse++;
        if (gensig.g11 && !prev.g11) begin
          if (last_rise >= 0) begin
            checks++;
            if (k - last_rise != P * C) begin
              failures++;
              $display("FAIL period %0d clocks, expected %0d", k - last_rise, P * C);
            end
          end
          last_rise = k;
          n_rise++;
        end
        prev = gensig;
      end
      // The DUT captures on the last clock of the last sample of a period.
      if ((k - 1) % C == C - 1 && ph == P - 1) begin
        if (pend_change) n_deferred++;
        capture();
        pend_change = 1'b0;
      end
      // Change the inputs now and then, at a random point in the period.
      @(negedge clk);
      if ($urandom_range(700, 0) == 0) begin
        bit wide;
        wide = ($urandom_range(3, 0) == 0);
        randomize_inputs(wide);
        pend_change = 1'b1;
      end
    end
    // Mid-run reset: gates must go to 0 at once.
    reset_bar = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (gensig !== gate_t'(0)) begin
      failures++;
      $display("FAIL gates not off after reset");
    end
    $display("m1 pulses %0d, m2 pulses %0d, clamped sets %0d, deferred updates %0d, periods %0d",
             n_m1_pulse, n_m2_pulse, n_clamp, n_deferred, n_rise);
    checks++;
    if (n_m1_pulse == 0 || n_m2_pulse == 0 || n_clamp == 0 || n_deferred == 0 || n_rise < 10) begin
      failures++;
      $display("FAIL a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
