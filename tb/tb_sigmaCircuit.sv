// tb_sigmaCircuit: sweeps every 16-bit net input z and compares the PLAN
// sigmoid and the segment code with the golden model. It also bounds the
// deviation from the exact sigmoid 1/(1+exp(-z)) by 0.02 over the whole range
// (the PLAN method's known maximum error is about 0.019) and checks
// hand-worked points.
module tb_sigmaCircuit;
  import tb_ref_pkg::*;
  import neuron_pkg::*;
  int checks = 0, failures = 0;
  fix_t z, sigma;
  seg_e cond;

  sigmaCircuit dut (.z(z), .sigma(sigma), .cond(cond));

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic hand(input int zv, input int ev);
    z = 16'(zv);
    #1;
    checks++;
    if (int'(sigma) != ev) begin
      failures++;
      $display("FAIL hand z=%0d sigma=%0d exp=%0d", zv, int'(sigma), ev);
    end
  endtask

  initial begin
    real err, max_err;
    max_err = 0.0;
    hand(0, 2048);          // sigma(0) = 0.5
    hand(4096, 3072);       // 0.125*1 + 0.625 = 0.75
    hand(-4096, 1023);      // 1 - 0.75 (unit 0x0FFF)
    hand(8192, 3584);       // 0.125*2 + 0.625 = 0.875
    hand(12288, 3840);      // 0.03125*3 + 0.84375 = 0.9375
    hand(20480, 4095);      // flat
    hand(-32768, 0);        // -8.0
    for (int v = -32768; v < 32768; v++) begin
      z = 16'(v);
      #1;
      checks++;
      if (int'(sigma) != ref_sigma(v) || int'(cond) != ref_seg(v)) begin
        failures++;
        if (failures < 10)
          $display("FAIL z=%0d sigma=%0d exp=%0d cond=%0d exp=%0d",
                   v, int'(sigma), ref_sigma(v), cond, ref_seg(v));
      end
      err = fabs(to_real(int'(sigma)) - ideal_sigma(to_real(v)));
      if (err > max_err) max_err = err;
    end
    checks++;
    if (max_err > 0.02) begin
      failures++;
      $display("FAIL max deviation from exact sigmoid %f", max_err);
    end
    $display("max |sigma - exact| = %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
