// tb_gate_signal_generator: end-to-end test of the gate signal generator at
// its default parameters (clk = 58 us sample clock, 344 samples per 50 Hz
// period).
//
// The testbench plays the part of the DSP board: it sends a case number,
// xalpha and apl, and checks the eight gate signals every clock against a
// reference of the inverter it drives. The reference works out the phase
// voltage level Vo = Vm1 + Vm2 (in units of VDC, -2..+2) independently:
//   module 1 at +/-1 during a pulse of round(21*(c/25)*sin((2i+1)pi/16))
//   samples centred in slot i of each half period (cases 1..25);
//   module 2 at +/-1 on the four fixed intervals when apl > 0.5;
//   + in the first half period, - in the second.
// The level produced by the DUT's gates is decoded per H-bridge (S1,S4 on:
// +1; S3,S2 on: -1; S1,S2 or S3,S4 on: 0) and compared. Also checked: the
// complementary pairs, all gates off in reset, the 344-clock period, and
// that a new case number only takes effect at the next period start.
// Sequence: the apl = 0.4 example (case 20, module 2 idle), the apl = 0.7
// example (case 11, module 2 switching), then every case number 0..31.
// Mechanisms counted: reset hold, deferred update, mode switch between
// apl <= 0.5 and apl > 0.5, each of the five output levels, invalid case.
module tb_gate_signal_generator;
  import msmi_pkg::*;

  localparam int P = 344;
  localparam int H = 172;
  localparam int A1 = 10, A2 = 76;

  logic      clk = 1'b0;
  logic      reset_bar;
  logic      apl;
  case_num_t alpha;
  logic      xalpha;
  gate_t     gate_signal;

  gate_signal_generator dut (
    .clk(clk), .reset_bar(reset_bar), .apl(apl),
    .alpha(alpha), .xalpha(xalpha), .gate_signal(gate_signal));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_reset = 0, n_deferred = 0, n_mode_switch = 0, n_invalid = 0;
  int n_level [5];

  // Configuration the reference believes is in force.
  int  cur_case;
  bit  cur_apl;
  bit  pend;

  function automatic int width_of(int c, int i);
    if (c < 1 || c > 25) return 0;
    return int'($floor(21.0 * (real'(c) / 25.0) *
                       $sin((2.0 * i + 1.0) * 3.14159265358979 / 16.0) + 0.5));
  endfunction

  function automatic bit m1_on(int c, int s);
    int lo, len, w, a;
    for (int i = 0; i < 8; i++) begin
      lo  = (i * H) / 8;
      len = ((i + 1) * H) / 8 - lo;
      w   = width_of(c, i);
      a   = lo + (len - w) / 2;
      if (s >= a && s < a + w) return 1'b1;
    end
    return 1'b0;
  endfunction

  function automatic bit m2_on(bit on, int ph);
    int s;
    if (!on) return 1'b0;
    s = ph % H;
    return (s >= A1 && s < A2) || (s >= H - A2 && s < H - A1);
  endfunction

  function automatic int ref_level(int ph);
    int sgn;
    sgn = (ph < H) ? 1 : -1;
    return sgn * (int'(m1_on(cur_case, ph % H)) + int'(m2_on(cur_apl, ph)));
  endfunction

  function automatic int bridge_level(logic s1, logic s2, logic s3, logic s4);
    if (s1 && s4 && !s2 && !s3) return 1;
    if (s3 && s2 && !s1 && !s4) return -1;
    if ((s1 && s2 && !s3 && !s4) || (s3 && s4 && !s1 && !s2)) return 0;
    return 99;  // shoot-through or all off
  endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int k;            // clocks since reset release
  int last_rise;
  logic prev_g11;

  // Run n clocks, checking each; at clock change_at (if >= 0) apply a new
  // configuration that must wait for the next period start.
  task automatic run(int n, int change_at, int new_case, bit new_apl);
    int ph, lvl, got;
    for (int j = 0; j < n; j++) begin
      @(posedge clk);
      ph = k % P;
      k++;
      #1;
      lvl = ref_level(ph);
      got = bridge_level(gate_signal.g11, gate_signal.g21, gate_signal.g31, gate_signal.g41) +
            bridge_level(gate_signal.g12, gate_signal.g22, gate_signal.g32, gate_signal.g42);
      check(got == lvl, $sformatf("clk %0d phase %0d case %0d apl %0d: level %0d expected %0d",
                                  k, ph, cur_case, cur_apl, got, lvl));
      if (got == lvl) n_level[lvl + 2]++;
      if (gate_signal.g11 && !prev_g11) begin
        if (last_rise >= 0)
          check(k - last_rise == P, $sformatf("period %0d clocks", k - last_rise));
        last_rise = k;
      end
      prev_g11 = gate_signal.g11;
      // The last sample of a period: pending inputs are taken over.
      if (ph == P - 1 && pend) begin
        if (cur_apl != apl) n_mode_switch++;
        cur_case = int'(alpha);
        cur_apl  = apl;
        if (cur_case < 1 || cur_case > 25) n_invalid++;
        n_deferred++;
        pend = 1'b0;
      end
      if (j == change_at) begin
        @(negedge clk);
        alpha  = case_num_t'(new_case);
        apl    = new_apl;
        xalpha = new_apl;
        pend   = 1'b1;
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 5; i++) n_level[i] = 0;
    // apl = 0.4 example: case 20, module 2 idle.
    reset_bar = 1'b0;
    alpha = 5'd20; apl = 1'b0; xalpha = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    check(gate_signal == gate_t'(0), "gates not all off in reset");
    n_reset++;
    cur_case = 20; cur_apl = 1'b0; pend = 1'b0;
    @(negedge clk);
    reset_bar = 1'b1;
    k = 0; last_rise = -1; prev_g11 = 1'b0;
    // Two periods of apl = 0.4, switch to the apl = 0.7 example (case 11)
    // in the middle of the third period, run it for three periods.
    run(2 * P + 100, 2 * P + 50, 11, 1'b1);
    run(3 * P, -1, 0, 1'b0);
    // Every case number, alternating the mode, each changed mid-period.
    for (int c = 0; c < 32; c++)
      run(2 * P, $urandom_range(P - 2, 0), c, 1'(c % 2));
    run(2 * P, -1, 0, 1'b0);
    // Reset again in the middle of a period.
    reset_bar = 1'b0;
    @(posedge clk); #1;
    check(gate_signal == gate_t'(0), "gates not all off after second reset");
    n_reset++;

    $display("reset %0d, deferred updates %0d, mode switches %0d, invalid cases %0d",
             n_reset, n_deferred, n_mode_switch, n_invalid);
    $display("levels -2:%0d -1:%0d 0:%0d +1:%0d +2:%0d",
             n_level[0], n_level[1], n_level[2], n_level[3], n_level[4]);
    check(n_reset == 2 && n_deferred >= 30 && n_mode_switch >= 10 && n_invalid > 0,
          "a control mechanism was not exercised");
    for (int i = 0; i < 5; i++)
      check(n_level[i] > 0, $sformatf("level %0d never produced", i - 2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
