// tb_conditionDetector: checks the PLAN segment for every non-negative 3.12
// magnitude, including the exact segment limits.
module tb_conditionDetector;
  import tb_ref_pkg::*;
  import neuron_pkg::*;
  int checks = 0, failures = 0;
  fix_t az;
  seg_e cond;

  conditionDetector dut (.az(az), .cond(cond));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32768; v++) begin
      az = 16'(v);
      #1;
      checks++;
      if (int'(cond) != ref_seg(v)) begin
        failures++;
        if (failures < 10) $display("FAIL az=%0d cond=%0d exp=%0d", v, cond, ref_seg(v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
