// tb_sigmaDCircuit: checks sigmaD = sigma*(1-sigma) for every sigma in the
// sigmoid's output range [0, 0x0FFF] against the golden truncating multiply,
// plus hand-worked points.
module tb_sigmaDCircuit;
  import tb_ref_pkg::*;
  import neuron_pkg::*;
  int checks = 0, failures = 0;
  fix_t sigma, sigmaD;

  sigmaDCircuit dut (.sigma(sigma), .sigmaD(sigmaD));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int s, input int e);
    sigma = 16'(s);
    #1;
    checks++;
    if (int'(sigmaD) != e) begin
      failures++;
      if (failures < 10) $display("FAIL sigma=%0d sigmaD=%0d exp=%0d", s, int'(sigmaD), e);
    end
  endtask

  initial begin
    one(2048, 1023);   // 0.5 * 0.49976 = 0.24988 -> floor(1023.5)
    one(0, 0);
    one(4095, 0);
    one(1024, 767);    // 0.25 * 0.74976 -> floor(767.75)
    for (int s = 0; s <= 4095; s++) one(s, ref_sigmaD(s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
