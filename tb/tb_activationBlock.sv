// tb_activationBlock: sweeps every net input z for both neuron types and
// compares y and yD with the golden model. It also bounds the deviation from
// the exact functions over [-8, 8): sigmoid y and yD within 0.02 of
// 1/(1+exp(-z)) and its derivative; in tanh mode (y = 2*sigma(z) - 1 =
// tanh(z/2), yD = 2*sigmaD) within 0.04 of the exact tanh(z/2) and its
// derivative 0.5*(1 - tanh(z/2)^2).
module tb_activationBlock;
  import tb_ref_pkg::*;
  import neuron_pkg::*;
  int checks = 0, failures = 0;
  fix_t z, y, yD;
  neuron_type_e nt;
  seg_e cond;

  activationBlock dut (.z(z), .neuronType(nt), .y(y), .yD(yD), .cond(cond));

  initial begin
    #4000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ey, eyd, max_y [2], max_yd [2], zr, th;
    int s, sd, ey_i, eyd_i;
    max_y = '{0.0, 0.0};
    max_yd = '{0.0, 0.0};
    for (int t = 0; t < 2; t++) begin
      nt = neuron_type_e'(t);
      for (int v = -32768; v < 32768; v++) begin
        z = 16'(v);
        #1;
        s  = ref_sigma(v);
        sd = ref_sigmaD(s);
        ey_i  = (t == 0) ? s  : ref_tanh(s);
        eyd_i = (t == 0) ? sd : ref_tanhD(sd);
        checks++;
        if (int'(y) != ey_i || int'(yD) != eyd_i) begin
          failures++;
          if (failures < 10)
            $display("FAIL t=%0d z=%0d y=%0d exp=%0d yD=%0d exp=%0d",
                     t, v, int'(y), ey_i, int'(yD), eyd_i);
        end
        zr = to_real(v);
        if (t == 0) begin
          ey  = fabs(to_real(int'(y))  - ideal_sigma(zr));
          eyd = fabs(to_real(int'(yD)) - ideal_sigmaD(zr));
        end else begin
          th  = 2.0 * ideal_sigma(zr) - 1.0;
          ey  = fabs(to_real(int'(y))  - th);
          eyd = fabs(to_real(int'(yD)) - 0.5 * (1.0 - th * th));
        end
        if (ey  > max_y[t])  max_y[t]  = ey;
        if (eyd > max_yd[t]) max_yd[t] = eyd;
      end
    end
    checks++;
    if (max_y[0] > 0.02 || max_yd[0] > 0.02 || max_y[1] > 0.04 || max_yd[1] > 0.04) begin
      failures++;
      $display("FAIL deviation from exact functions too large");
    end
    $display("sigmoid: max |y-exact| = %f  max |yD-exact| = %f", max_y[0], max_yd[0]);
    $display("tanh:    max |y-exact| = %f  max |yD-exact| = %f", max_y[1], max_yd[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
