// conditionDetector: finds the PLAN segment that |z| falls in.
//
// Compares the magnitude az = |z| (3.12, non-negative) with the segment limits
// 1, 2.375 and 5 of the piecewise-linear sigmoid approximation and returns
//   SEG_LT1   for 0 <= |z| < 1,      SEG_LT2_4 for 1 <= |z| < 2.375,
//   SEG_LT5   for 2.375 <= |z| < 5,  SEG_SAT   for |z| >= 5.
// The encoding is this design's; it drives both the shifter and the offset
// multiplexer of the sigmoid circuit. Purely combinational.
module conditionDetector
  import neuron_pkg::*;
(
  input  fix_t az,
  output seg_e cond
);

  always_comb begin
    if (az >= LIM_5)          cond = SEG_SAT;
    else if (az >= LIM_2_375) cond = SEG_LT5;
    else if (az >= LIM_1)     cond = SEG_LT2_4;
    else                      cond = SEG_LT1;
  end

endmodule
