// tb_mux4: checks that the four-input multiplexer returns the selected word
// for every select value over random data words.
module tb_mux4;
  int checks = 0, failures = 0;
  logic [3:0][15:0] d;
  logic [1:0]       s;
  logic [15:0]      y;

  mux4 #(.W(16)) dut (.d(d), .s(s), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int k = 0; k < 4; k++) d[k] = 16'($urandom);
      for (int k = 0; k < 4; k++) begin
        s = 2'(k);
        #1;
        checks++;
        if (y !== d[k]) begin
          failures++;
          $display("FAIL s=%0d y=%h exp=%h", k, y, d[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
