// tb_ncounter58us: checks both fixed count sets against hand-written values.
module tb_ncounter58us;
  import msmi_pkg::*;

  logic        xalpha;
  ncount_set_t ncounter;
  int checks = 0, failures = 0;

  ncounter58us dut (.xalpha(xalpha), .ncounter(ncounter));

  int exp0 [8] = '{172, 172, 172, 172, 344, 344, 344, 344};
  int exp1 [8] = '{10, 76, 96, 162, 182, 248, 268, 334};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 2; rep++) begin
      xalpha = 1'b0; #1;
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (int'(ncounter[i]) != exp0[i]) begin
          failures++;
          $display("FAIL xalpha=0 NCOUNTER%0d = %0d, expected %0d", i + 1, ncounter[i], exp0[i]);
        end
      end
      xalpha = 1'b1; #1;
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (int'(ncounter[i]) != exp1[i]) begin
          failures++;
          $display("FAIL xalpha=1 NCOUNTER%0d = %0d, expected %0d", i + 1, ncounter[i], exp1[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
