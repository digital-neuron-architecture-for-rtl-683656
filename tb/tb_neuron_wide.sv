// tb_neuron_wide: the neuron scaled to 32 inputs (N_INPUTS = 32).
//
// The selection block then has two mux4 levels and a 4-bit sel, of which
// groups 0..7 exist. Each evaluation clears z, accumulates the eight groups
// (8 clocks) and compares z after every edge, and y, yD at the end, with the
// golden model, for random inputs and weights in [-0.5, 0.5) in both modes.
module tb_neuron_wide;
  import tb_ref_pkg::*;
  import neuron_pkg::*;

  localparam int N  = 32;
  localparam int NG = N / 4;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic [3:0] sel = '0;
  neuron_type_e nt = NT_SIGMOID;
  fix_t [N-1:0] x, w;
  fix_t z, y, yD;
  logic sat;
  seg_e cond;

  neuron #(.N_INPUTS(N)) dut (
    .clk(clk), .rst(rst), .en(en), .sel(sel), .neuronType(nt),
    .x(x), .w(w), .z(z), .y(y), .yD(yD), .sat(sat), .cond(cond)
  );

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int acc, p01, p23, s, e;
    repeat (2) @(posedge clk);
    for (int n = 0; n < 40; n++) begin
      for (int i = 0; i < N; i++) begin
        x[i] = fix_t'(int'($urandom_range(0, 4095)) - 2048);
        w[i] = fix_t'(int'($urandom_range(0, 4095)) - 2048);
      end
      @(negedge clk);
      nt = neuron_type_e'(n % 2);
      rst = 1'b1; en = 1'b0;
      @(posedge clk);
      acc = 0;
      for (int g = 0; g < NG; g++) begin
        @(negedge clk);
        rst = 1'b0; en = 1'b1; sel = 4'(g);
        p01 = ref_add(ref_mul(int'(x[4*g]),   int'(w[4*g])),   ref_mul(int'(x[4*g+1]), int'(w[4*g+1])));
        p23 = ref_add(ref_mul(int'(x[4*g+2]), int'(w[4*g+2])), ref_mul(int'(x[4*g+3]), int'(w[4*g+3])));
        acc = ref_add(acc, ref_add(p01, p23));
        @(posedge clk); #1;
        expect_eq($sformatf("z after group %0d", g), int'(z), acc);
      end
      @(negedge clk);
      en = 1'b0;
      #1;
      s = ref_sigma(acc);
      e = (nt == NT_SIGMOID) ? s : ref_tanh(s);
      expect_eq("y", int'(y), e);
      e = (nt == NT_SIGMOID) ? ref_sigmaD(s) : ref_tanhD(ref_sigmaD(s));
      expect_eq("yD", int'(yD), e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
