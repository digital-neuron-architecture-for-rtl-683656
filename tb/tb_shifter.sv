// tb_shifter: checks the PLAN slope term, floor(|z| * slope), for every
// magnitude and every segment code (slopes 1/4, 1/8, 1/32 and 0).
module tb_shifter;
  import neuron_pkg::*;
  int checks = 0, failures = 0;
  fix_t az, sh;
  seg_e cond;

  shifter dut (.az(az), .cond(cond), .sh(sh));

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int div [4];
    int e;
    div = '{4, 8, 32, 0};
    for (int v = 0; v < 32768; v += 3) begin
      for (int c = 0; c < 4; c++) begin
        az = 16'(v);
        cond = seg_e'(c);
        #1;
        e = (div[c] == 0) ? 0 : v / div[c];
        checks++;
        if (int'(sh) != e) begin
          failures++;
          if (failures < 10) $display("FAIL az=%0d c=%0d sh=%0d exp=%0d", v, c, int'(sh), e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
