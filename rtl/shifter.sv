// shifter: slope term of the PLAN sigmoid approximation.
//
// The PLAN slopes are powers of two, so the product slope*|z| is a right
// shift of the non-negative magnitude az: by 2 (x0.25) in SEG_LT1, by 3
// (x0.125) in SEG_LT2_4, by 5 (x0.03125) in SEG_LT5, and the output is zero in
// SEG_SAT, where the sigmoid is flat. Shifted-out fraction bits are dropped.
// Purely combinational.
module shifter
  import neuron_pkg::*;
(
  input  fix_t az,
  input  seg_e cond,
  output fix_t sh
);

  always_comb begin
    unique case (cond)
      SEG_LT1:   sh = az >>> 2;
      SEG_LT2_4: sh = az >>> 3;
      SEG_LT5:   sh = az >>> 5;
      default:   sh = '0;
    endcase
  end

endmodule
