// tb_netInputBlock: drives the net-input block like the neuron controller
// (one clear cycle, then four accumulate cycles) with random groups and
// compares z after every edge with the golden multiply / saturating-add model.
// Also checks that z holds while en is low, that the sat flag matches the
// model, and that both saturation directions are reached.
module tb_netInputBlock;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0, n_sat = 0;
  logic clk = 1'b0, rst, en;
  logic [3:0][15:0] xs, ws;
  logic signed [15:0] z;
  logic sat;

  netInputBlock dut (.clk(clk), .rst(rst), .en(en), .xs(xs), .ws(ws), .z(z), .sat(sat));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int model, p01, p23, ps, acc;
    logic big;
    logic exp_sat;
    int pr [4];
    rst = 1'b1; en = 1'b0; xs = '0; ws = '0;
    @(posedge clk);
    for (int n = 0; n < 400; n++) begin
      big = (n % 4 == 3);  // every fourth run uses large operands to saturate
      @(negedge clk);
      rst = 1'b1; en = 1'b0;
      @(posedge clk); #1;
      model = 0;
      checks++;
      if (z !== 16'sd0) begin failures++; $display("FAIL clear"); end
      for (int g = 0; g < 4; g++) begin
        @(negedge clk);
        rst = 1'b0; en = 1'b1;
        for (int k = 0; k < 4; k++) begin
          xs[k] = big ? 16'(int'($urandom_range(0, 65535))) : 16'(int'($urandom_range(0, 8191)) - 4096);
          ws[k] = big ? 16'(int'($urandom_range(0, 65535))) : 16'(int'($urandom_range(0, 8191)) - 4096);
          pr[k] = ref_mul(to_s16(int'(xs[k])), to_s16(int'(ws[k])));
        end
        p01 = pr[0] + pr[1];
        p23 = pr[2] + pr[3];
        exp_sat = (p01 > 32767 || p01 < -32768 || p23 > 32767 || p23 < -32768);
        p01 = ref_add(pr[0], pr[1]);
        p23 = ref_add(pr[2], pr[3]);
        ps  = p01 + p23;
        exp_sat |= (ps > 32767 || ps < -32768);
        ps  = ref_add(p01, p23);
        acc = model + ps;
        exp_sat |= (acc > 32767 || acc < -32768);
        model = ref_add(model, ps);
        #1;
        checks++;
        if (sat !== exp_sat) begin failures++; $display("FAIL sat n=%0d g=%0d", n, g); end
        if (exp_sat) n_sat++;
        @(posedge clk); #1;
        checks++;
        if (int'(z) != model) begin
          failures++;
          $display("FAIL n=%0d g=%0d z=%0d exp=%0d", n, g, int'(z), model);
        end
      end
      // hold
      @(negedge clk);
      en = 1'b0;
      xs = '1; ws = '1;
      @(posedge clk); #1;
      checks++;
      if (int'(z) != model) begin failures++; $display("FAIL hold"); end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL saturation never happened"); end
    $display("saturating cycles: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
