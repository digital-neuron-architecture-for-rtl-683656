// subtractor: 16-bit two's-complement subtractor, d = a - b.
//
// Used where the operands keep the result in range by construction: 1 - sigma+
// at the output of the sigmoid circuit, 1 - sigma in the derivative circuit
// and 2*sigma - 1 in the tanh circuit. No saturation. Purely combinational.
module subtractor
  import neuron_pkg::*;
(
  input  fix_t a,
  input  fix_t b,
  output fix_t d
);

  assign d = a - b;

endmodule
