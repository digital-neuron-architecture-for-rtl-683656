// tb_multiplier: compares the 3.12 multiplier with the golden truncation rule
// on corner operands (0, +-1, +-8, extremes) and on random operand pairs,
// and checks a few hand-worked products.
module tb_multiplier;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic signed [15:0] a, b, p;

  multiplier dut (.a(a), .b(b), .p(p));

  task automatic check(input int av, input int bv);
    int e;
    a = 16'(av); b = 16'(bv);
    #1;
    e = ref_mul(av, bv);
    checks++;
    if (int'(p) != e) begin
      failures++;
      $display("FAIL a=%0d b=%0d p=%0d exp=%0d", av, bv, int'(p), e);
    end
  endtask

  task automatic check_val(input int av, input int bv, input int ev);
    a = 16'(av); b = 16'(bv);
    #1;
    checks++;
    if (int'(p) != ev) begin
      failures++;
      $display("FAIL a=%0d b=%0d p=%0d hand=%0d", av, bv, int'(p), ev);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int corner [9];
    corner = '{0, 1, -1, 4096, -4096, 32767, -32768, 2048, -2048};
    // hand-worked: 1.5*2.0 = 3.0, -1.5*2.0 = -3.0, 0.5*0.5 = 0.25
    check_val(6144, 8192, 12288);
    check_val(-6144, 8192, -12288);
    check_val(2048, 2048, 1024);
    // 4.0*4.0 = 16: integer field wraps to 0
    check_val(16384, 16384, 0);
    foreach (corner[i]) foreach (corner[j]) check(corner[i], corner[j]);
    for (int t = 0; t < 5000; t++) check(to_s16($urandom), to_s16($urandom));
    for (int t = 0; t < 5000; t++)
      check(int'($urandom_range(0, 16383)) - 8192, int'($urandom_range(0, 16383)) - 8192);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
