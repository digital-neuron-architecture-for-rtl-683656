// tanhCircuit: hyperbolic tangent from the sigmoid, tanh = 2*sigma - 1.
//
// sigma is doubled by a one-bit left shift (a wire) and the unit 0x0FFF is
// subtracted. For sigma in [0, 0x0FFF] the result lies in [-0x0FFF, 0x0FFF],
// so nothing overflows. The sigmoid is evaluated at z itself, as in the
// architecture, so the output is 2*sigma(z) - 1 = tanh(z/2): a tanh-shaped
// function with output range (-1, 1) and slope 0.5 at the origin, whose exact
// derivative is 2*sigmaD (the activation block's tanhD). Purely
// combinational.
module tanhCircuit
  import neuron_pkg::*;
(
  input  fix_t sigma,
  output fix_t tanh_o
);

  fix_t twice;

  assign twice = sigma <<< 1;

  subtractor u_sub (.a(twice), .b(ONE), .d(tanh_o));

endmodule
