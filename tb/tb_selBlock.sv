// tb_selBlock: checks that lane k of the selection block carries x[4*sel+k]
// and w[4*sel+k] for every group, for the 16-input neuron (one mux4 row) and
// for a 64-input neuron (two mux4 levels, 4-bit sel).
module tb_selBlock;
  int checks = 0, failures = 0;
  logic signed [15:0] x16 [16], w16 [16], x64 [64], w64 [64];
  logic signed [15:0] xs16 [4], ws16 [4], xs64 [4], ws64 [4];
  logic [15:0][15:0] x16p, w16p;
  logic [63:0][15:0] x64p, w64p;
  logic [3:0][15:0]  xs16p, ws16p, xs64p, ws64p;
  logic [1:0] sel16;
  logic [3:0] sel64;

  selBlock #(.N_INPUTS(16)) dut16 (.x(x16p), .w(w16p), .sel(sel16), .xs(xs16p), .ws(ws16p));
  selBlock #(.N_INPUTS(64)) dut64 (.x(x64p), .w(w64p), .sel(sel64), .xs(xs64p), .ws(ws64p));

  always_comb begin
    for (int i = 0; i < 16; i++) begin x16p[i] = x16[i]; w16p[i] = w16[i]; end
    for (int i = 0; i < 64; i++) begin x64p[i] = x64[i]; w64p[i] = w64[i]; end
    for (int k = 0; k < 4; k++) begin
      xs16[k] = xs16p[k]; ws16[k] = ws16p[k];
      xs64[k] = xs64p[k]; ws64[k] = ws64p[k];
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 50; t++) begin
      foreach (x16[i]) begin x16[i] = 16'($urandom); w16[i] = 16'($urandom); end
      foreach (x64[i]) begin x64[i] = 16'($urandom); w64[i] = 16'($urandom); end
      for (int g = 0; g < 4; g++) begin
        sel16 = 2'(g);
        #1;
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (xs16[k] !== x16[4*g+k] || ws16[k] !== w16[4*g+k]) begin
            failures++;
            $display("FAIL n16 g=%0d k=%0d", g, k);
          end
        end
      end
      for (int g = 0; g < 16; g++) begin
        sel64 = 4'(g);
        #1;
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (xs64[k] !== x64[4*g+k] || ws64[k] !== w64[4*g+k]) begin
            failures++;
            $display("FAIL n64 g=%0d k=%0d", g, k);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
