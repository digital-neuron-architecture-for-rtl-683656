// sigmaCircuit: sigmoid of the net input by PLAN approximation.
//
// For the magnitude az = |z| the positive-side sigmoid is
//   sigma+ = 1                      if |z| >= 5
//            0.03125*|z| + 0.84375  if 2.375 <= |z| < 5
//            0.125  *|z| + 0.625    if 1 <= |z| < 2.375
//            0.25   *|z| + 0.5      if |z| < 1
// conditionDetector picks the segment, shifter forms the slope term, a mux4
// picks the offset and a saturating adder sums them. A subtractor forms
// sigma- = 1 - sigma+ and a mux2 on the sign of z returns sigma+ for z >= 0
// and sigma- for z < 0. "1" is the datapath unit 0x0FFF. |z| of -8.0, which
// has no positive 3.12 counterpart, is taken as +7.999755859375 (any value
// past 5 gives the same result). Purely combinational; the result lies in
// [0, 0x0FFF].
module sigmaCircuit
  import neuron_pkg::*;
(
  input  fix_t z,
  output fix_t sigma,
  output seg_e cond
);

  fix_t az, sh, ofs, sig_pos, sig_neg;
  logic unused_sat;

  assign az = (z == FIX_MIN) ? FIX_MAX : (z[W-1] ? -z : z);

  conditionDetector u_cond (.az(az), .cond(cond));
  shifter           u_shift (.az(az), .cond(cond), .sh(sh));

  mux4 #(.W(W)) u_ofs (
    .d ({ONE, OFS_0_84375, OFS_0_625, OFS_0_5}),
    .s (cond),
    .y (ofs)
  );

  adder      u_add (.a(sh), .b(ofs), .s(sig_pos), .sat(unused_sat));
  subtractor u_sub (.a(ONE), .b(sig_pos), .d(sig_neg));
  mux2 #(.W(W)) u_sign (.d0(sig_pos), .d1(sig_neg), .s(z[W-1]), .y(sigma));

endmodule
