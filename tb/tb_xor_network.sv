// tb_xor_network: the neuron as the processing element of a 2-2-1 XOR network.
//
// One neuron instance (default configuration) is time-shared: for each of the
// four input patterns (a, b) it evaluates the two hidden neurons and then the
// output neuron, each using three of its sixteen inputs (bias on x0 with
// w0 = +1, two data inputs), the rest held at zero. The weights are fixed,
// hand-chosen values (hidden: an OR-like and an AND-like unit; output: their
// difference), not trained ones: the learning circuitry that would produce
// them is outside this design. The run is repeated with sigmoid neurons
// (threshold 0.5) and with tanh neurons (threshold 0). Every neuron output is
// compared bit-exactly with the golden model and the network output must
// equal a XOR b.
module tb_xor_network;
  import tb_ref_pkg::*;
  import neuron_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic [1:0] sel = '0;
  neuron_type_e nt = NT_SIGMOID;
  fix_t [15:0] x, w;
  fix_t z, y, yD;
  logic sat;
  seg_e cond;

  neuron dut (
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

  localparam int ONE_W = 4096;  // +1.0

  // Evaluate one neuron: y = f(b + wa*a + wb*b), values in 3.12.
  task automatic neuron_eval(input neuron_type_e t, input int bias, input int a, input int wa,
                             input int bb, input int wb, output int yo);
    int zz, s;
    x = '0; w = '0;
    x[0] = fix_t'(bias); w[0] = fix_t'(ONE_W);
    x[1] = fix_t'(a);    w[1] = fix_t'(wa);
    x[2] = fix_t'(bb);   w[2] = fix_t'(wb);
    @(negedge clk);
    nt = t; rst = 1'b1; en = 1'b0;
    for (int g = 0; g < 4; g++) begin
      @(negedge clk);
      rst = 1'b0; en = 1'b1; sel = 2'(g);
    end
    @(negedge clk);
    en = 1'b0;
    zz = ref_add(ref_add(ref_add(ref_mul(bias, ONE_W), ref_mul(a, wa)), ref_mul(bb, wb)), 0);
    s  = ref_sigma(zz);
    checks++;
    if (int'(y) != ((t == NT_SIGMOID) ? s : ref_tanh(s))) begin
      failures++;
      $display("FAIL neuron output %0d, golden %0d", int'(y), (t == NT_SIGMOID) ? s : ref_tanh(s));
    end
    yo = int'(y);
  endtask

  initial begin
    int h1, h2, o, k, bo, bh1, bh2, thr;
    repeat (2) @(posedge clk);
    for (int t = 0; t < 2; t++) begin
      // weights in units of 1.0: hidden 1 = f(4a + 4b - 2), hidden 2 = f(4a + 4b - 6),
      // output = f(k*h1 - k*h2 + bo)
      bh1 = -2 * 4096;
      bh2 = -6 * 4096;
      k   = (t == 0) ? 6 * 4096 : 4 * 4096;
      bo  = (t == 0) ? -3 * 4096 : -4 * 4096;
      thr = (t == 0) ? 2048 : 0;
      for (int p = 0; p < 4; p++) begin
        int a, b;
        a = (p & 1) * 4096;
        b = (p >> 1) * 4096;
        neuron_eval(neuron_type_e'(t), bh1, a, 4 * 4096, b, 4 * 4096, h1);
        neuron_eval(neuron_type_e'(t), bh2, a, 4 * 4096, b, 4 * 4096, h2);
        neuron_eval(neuron_type_e'(t), bo, h1, k, h2, -k, o);
        $display("%s a=%0d b=%0d -> h1=%f h2=%f out=%f", (t != 0) ? "tanh   " : "sigmoid",
                 p & 1, p >> 1, to_real(h1), to_real(h2), to_real(o));
        checks++;
        if ((o > thr) != (((p & 1) ^ (p >> 1)) == 1)) begin
          failures++;
          $display("FAIL xor(%0d,%0d) wrong", p & 1, p >> 1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
