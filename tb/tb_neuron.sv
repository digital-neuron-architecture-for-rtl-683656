// tb_neuron: end-to-end test of the 16-input neuron at its default configuration.
//
// Each evaluation drives the neuron as its controller would: one clock with
// rst high, then four clocks with en high and sel = 0..3 while all sixteen
// inputs x and weights w are held. After every edge z is compared with a
// golden model of the truncating multipliers and saturating adders, which
// also checks that one group of four pairs enters per clock; the final z,
// y and yD are compared bit-exactly, and y, yD are compared with the exact
// functions of the exact net input (sigmoid within 0.02, tanh mode within
// 0.04). Workload: 50 random input/weight sets per activation type, inputs
// and weights uniform in [-1, 1), x0 = bias with w0 = +1, followed by
// directed sets that reach every PLAN segment, both saturation directions,
// multiplier wrap-around and both signs of z. Every mechanism is counted and
// one that never happened is a failure.
module tb_neuron;
  import tb_ref_pkg::*;
  import neuron_pkg::*;

  localparam int PIPE = 0;   // extra register stages in the device under test

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic [1:0] sel = '0;
  neuron_type_e nt = NT_SIGMOID;
  fix_t [15:0] x, w;
  fix_t z, y, yD;
  logic sat;
  seg_e cond;

  // mechanism counters
  int n_sat_pos, n_sat_neg, n_sat_flag, n_wrap, n_zneg, n_zpos, n_hold, n_eval [2];
  int n_seg [4];
  real max_ey [2], max_eyd [2];
  // bias values of the directed sets: +-0.5, +-1.5, +-3, +-6, 0, 2.375
  int dir_b [10] = '{2048, -2048, 6144, -6144, 12288, -12288, 24576, -24576, 0, 9728};

  neuron dut (
    .clk(clk), .rst(rst), .en(en), .sel(sel), .neuronType(nt),
    .x(x), .w(w), .z(z), .y(y), .yD(yD), .sat(sat), .cond(cond)
  );

  always #5 clk = ~clk;

  always @(posedge clk) if (sat) n_sat_flag++;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
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

  // One complete neuron evaluation with the current x, w.
  task automatic evaluate(input neuron_type_e t);
    int part [5];
    int pr [4];
    int p01, p23, ps, acc, edges, s, sd, ey_i, eyd_i, k;
    real zr, ideal_y, ideal_yd, th;
    // golden net input, group by group
    part[0] = 0;
    acc = 0;
    zr = 0.0;
    for (int g = 0; g < 4; g++) begin
      for (int j = 0; j < 4; j++) begin
        k = 4 * g + j;
        pr[j] = ref_mul(int'(x[k]), int'(w[k]));
        if (pr[j] != (int'(x[k]) * int'(w[k])) >>> 12) n_wrap++;
        zr += to_real(int'(x[k])) * to_real(int'(w[k]));
      end
      p01 = pr[0] + pr[1];
      p23 = pr[2] + pr[3];
      if (p01 > 32767 || p23 > 32767) n_sat_pos++;
      if (p01 < -32768 || p23 < -32768) n_sat_neg++;
      p01 = ref_add(pr[0], pr[1]);
      p23 = ref_add(pr[2], pr[3]);
      ps = p01 + p23;
      if (ps > 32767) n_sat_pos++;
      if (ps < -32768) n_sat_neg++;
      ps = ref_add(p01, p23);
      if (acc + ps > 32767) n_sat_pos++;
      if (acc + ps < -32768) n_sat_neg++;
      acc = ref_add(acc, ps);
      part[g+1] = acc;
    end

    // clear
    @(negedge clk);
    nt = t;
    rst = 1'b1; en = 1'b0;
    @(posedge clk);
    edges = 0;
    // four groups
    for (int g = 0; g < 4; g++) begin
      @(negedge clk);
      rst = 1'b0; en = 1'b1; sel = 2'(g);
      @(posedge clk); #1;
      edges++;
      expect_eq($sformatf("z after group %0d", g), int'(z), (g + 1 - PIPE >= 0) ? part[g + 1 - PIPE] : 0);
    end
    @(negedge clk);
    en = 1'b0; sel = '0;
    for (int i = 0; i < PIPE; i++) begin
      @(posedge clk); #1;
      edges++;
    end
    expect_eq("final z", int'(z), part[4]);
    for (int i = 0; i < PIPE; i++) begin
      @(posedge clk); #1;
      edges++;
    end
    expect_eq("cycles from clear to valid y", edges, 4 + 2 * PIPE);
    s  = ref_sigma(part[4]);
    sd = ref_sigmaD(s);
    ey_i  = (t == NT_SIGMOID) ? s  : ref_tanh(s);
    eyd_i = (t == NT_SIGMOID) ? sd : ref_tanhD(sd);
    expect_eq("y", int'(y), ey_i);
    expect_eq("yD", int'(yD), eyd_i);
    expect_eq("cond", int'(cond), ref_seg(part[4]));
    n_seg[ref_seg(part[4])]++;
    if (part[4] < 0) n_zneg++; else n_zpos++;
    n_eval[int'(t)]++;

    // comparison with the exact neuron where the exact net input is in range
    if (zr > -7.9 && zr < 7.9) begin
      if (t == NT_SIGMOID) begin
        ideal_y  = ideal_sigma(zr);
        ideal_yd = ideal_sigmaD(zr);
      end else begin
        th = 2.0 * ideal_sigma(zr) - 1.0;
        ideal_y  = th;
        ideal_yd = 0.5 * (1.0 - th * th);
      end
      if (fabs(to_real(int'(y))  - ideal_y)  > max_ey[int'(t)])  max_ey[int'(t)]  = fabs(to_real(int'(y))  - ideal_y);
      if (fabs(to_real(int'(yD)) - ideal_yd) > max_eyd[int'(t)]) max_eyd[int'(t)] = fabs(to_real(int'(yD)) - ideal_yd);
    end

    // hold: with en low the result must not move, whatever the inputs do
    @(negedge clk);
    for (int i = 0; i < 16; i++) begin x[i] = fix_t'($urandom); w[i] = fix_t'($urandom); end
    sel = 2'($urandom);
    @(posedge clk); #1;
    expect_eq("z held", int'(z), part[4]);
    expect_eq("y held", int'(y), ey_i);
    n_hold++;
  endtask

  function automatic fix_t rnd_unit();
    return fix_t'(int'($urandom_range(0, 8191)) - 4096);
  endfunction

  task automatic random_set();
    for (int i = 0; i < 16; i++) begin
      x[i] = rnd_unit();
      w[i] = rnd_unit();
    end
    w[0] = 16'sh1000;  // bias weight +1
  endtask

  // only the bias input active: z = b exactly
  task automatic bias_only(input int b);
    x = '0; w = '0;
    x[0] = fix_t'(b);
    w[0] = 16'sh1000;
  endtask

  initial begin
    n_sat_pos = 0; n_sat_neg = 0; n_sat_flag = 0; n_wrap = 0; n_zneg = 0; n_zpos = 0;
    n_hold = 0; n_eval = '{0, 0}; n_seg = '{0, 0, 0, 0};
    max_ey = '{0.0, 0.0}; max_eyd = '{0.0, 0.0};
    x = '0; w = '0;
    repeat (2) @(posedge clk);

    for (int t = 0; t < 2; t++) begin
      // workload: 50 random input-weight sets
      for (int n = 0; n < 50; n++) begin
        random_set();
        evaluate(neuron_type_e'(t));
      end
      // directed: every PLAN segment, both signs
      foreach (dir_b[i]) begin
        bias_only(dir_b[i]);
        evaluate(neuron_type_e'(t));
      end
      // positive and negative saturation of the accumulation
      for (int i = 0; i < 16; i++) begin x[i] = 16'sh2000; w[i] = 16'sh2000; end
      evaluate(neuron_type_e'(t));
      for (int i = 0; i < 16; i++) begin x[i] = 16'sh2000; w[i] = -16'sh2000; end
      evaluate(neuron_type_e'(t));
      // multiplier wrap-around: 3.0 * 3.0 keeps only the low integer bits
      x = '0; w = '0;
      x[5] = 16'sh3000; w[5] = 16'sh3000;
      evaluate(neuron_type_e'(t));
    end

    $display("sigmoid neuron: max |y-exact| = %f  max |yD-exact| = %f", max_ey[0], max_eyd[0]);
    $display("tanh neuron:    max |y-exact| = %f  max |yD-exact| = %f", max_ey[1], max_eyd[1]);
    checks++;
    if (max_ey[0] > 0.02 || max_eyd[0] > 0.02 || max_ey[1] > 0.04 || max_eyd[1] > 0.04) begin
      failures++;
      $display("FAIL deviation from the exact neuron too large");
    end

    $display("mechanisms: sat+ %0d sat- %0d sat flag %0d wrap %0d z<0 %0d z>=0 %0d hold %0d",
             n_sat_pos, n_sat_neg, n_sat_flag, n_wrap, n_zneg, n_zpos, n_hold);
    $display("segments: %0d %0d %0d %0d  evaluations: sigmoid %0d tanh %0d",
             n_seg[0], n_seg[1], n_seg[2], n_seg[3], n_eval[0], n_eval[1]);
    checks++;
    if (n_sat_pos == 0 || n_sat_neg == 0 || n_sat_flag == 0 || n_wrap == 0 || n_zneg == 0 ||
        n_zpos == 0 || n_hold == 0 || n_eval[0] == 0 || n_eval[1] == 0 ||
        n_seg[0] == 0 || n_seg[1] == 0 || n_seg[2] == 0 || n_seg[3] == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
