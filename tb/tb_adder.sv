// tb_adder: checks the saturating 3.12 adder against clamped integer addition
// on random and overflow-provoking operands, including the sat flag, and
// requires both saturation directions to occur.
module tb_adder;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0, n_pos = 0, n_neg = 0;
  logic signed [15:0] a, b, s;
  logic sat;

  adder dut (.a(a), .b(b), .s(s), .sat(sat));

  task automatic check(input int av, input int bv);
    int e;
    logic es;
    a = 16'(av); b = 16'(bv);
    #1;
    e  = ref_add(av, bv);
    es = (av + bv > 32767) || (av + bv < -32768);
    if (av + bv > 32767)  n_pos++;
    if (av + bv < -32768) n_neg++;
    checks++;
    if (int'(s) != e || sat != es) begin
      failures++;
      $display("FAIL a=%0d b=%0d s=%0d sat=%b exp=%0d %b", av, bv, int'(s), sat, e, es);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32767, 1);
    check(-32768, -1);
    check(32767, -32768);
    check(16384, 16384);
    check(-16384, -16384);
    check(-16384, -16385);
    for (int t = 0; t < 10000; t++) check(to_s16($urandom), to_s16($urandom));
    checks++;
    if (n_pos == 0 || n_neg == 0) begin
      failures++;
      $display("FAIL saturation not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
