// tb_tanhCircuit: checks tanh = 2*sigma - 1 (unit 0x0FFF) for every sigma in
// [0, 0x0FFF], plus hand-worked points.
module tb_tanhCircuit;
  import neuron_pkg::*;
  int checks = 0, failures = 0;
  fix_t sigma, tanh_o;

  tanhCircuit dut (.sigma(sigma), .tanh_o(tanh_o));

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
    if (int'(tanh_o) != e) begin
      failures++;
      if (failures < 10) $display("FAIL sigma=%0d tanh=%0d exp=%0d", s, int'(tanh_o), e);
    end
  endtask

  initial begin
    one(2048, 1);
    one(0, -4095);
    one(4095, 4095);
    one(3072, 2049);
    for (int s = 0; s <= 4095; s++) one(s, s + s - 4095);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
