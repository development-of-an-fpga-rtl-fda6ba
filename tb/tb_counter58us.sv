// tb_counter58us: checks the case-number ROM for all 32 case numbers.
// Reference: round(21 * (c/25) * sin((2i+1)*pi/16)) computed with real
// arithmetic for cases 1..25, zero otherwise, plus a few hand-worked entries.
module tb_counter58us;
  import msmi_pkg::*;

  case_num_t  alpha;
  count_set_t counter;
  int checks = 0, failures = 0;

  counter58us dut (.alpha(alpha), .counter(counter));

  function automatic int ref_width(int c, int i);
    real m, w;
    if (c < 1 || c > 25) return 0;
    m = real'(c) / 25.0;
    w = 21.0 * m * $sin((2.0 * i + 1.0) * 3.14159265358979 / 16.0);
    return int'($floor(w + 0.5));
  endfunction

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 32; c++) begin
      alpha = case_num_t'(c);
      #1;
      for (int i = 0; i < 8; i++)
        check(int'(counter[i]), ref_width(c, i), $sformatf("case %0d COUNTER%0d", c, i + 1));
    end
    // Hand-worked entries: case 20 (apl = 0.4 example) and case 25 (full).
    alpha = 5'd20; #1;
    check(int'(counter[0]), 3,  "case 20 COUNTER1");
    check(int'(counter[3]), 16, "case 20 COUNTER4");
    check(int'(counter[7]), 3,  "case 20 COUNTER8");
    alpha = 5'd25; #1;
    check(int'(counter[3]), 21, "case 25 COUNTER4");
    check(int'(counter[1]), 12, "case 25 COUNTER2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
