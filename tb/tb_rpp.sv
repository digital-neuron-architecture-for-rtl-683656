// tb_rpp: checks the accumulator register: synchronous clear, load when
// enabled, hold when not, and clear taking priority over load.
module tb_rpp;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst, en;
  logic signed [15:0] d, q;
  logic signed [15:0] model;

  rpp dut (.clk(clk), .rst(rst), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; en = 1'b0; d = '0;
    @(posedge clk);
    model = '0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      rst = ($urandom_range(0, 9) == 0);
      en  = $urandom_range(0, 1) == 1;
      d   = 16'($urandom);
      if (rst)     model = '0;
      else if (en) model = d;
      @(posedge clk);
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL t=%0d rst=%b en=%b q=%h exp=%h", t, rst, en, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
