// sigmaDCircuit: derivative of the sigmoid, sigmaD = sigma * (1 - sigma).
//
// A subtractor forms 1 - sigma (1 being the unit 0x0FFF) and a 3.12
// multiplier, the same truncating multiplier as in the net-input block,
// forms the product. For sigma in [0, 0x0FFF] the result lies in [0, 0.25].
// Purely combinational.
module sigmaDCircuit
  import neuron_pkg::*;
(
  input  fix_t sigma,
  output fix_t sigmaD
);

  fix_t one_minus;

  subtractor u_sub (.a(ONE), .b(sigma), .d(one_minus));
  multiplier u_mul (.a(sigma), .b(one_minus), .p(sigmaD));

endmodule
