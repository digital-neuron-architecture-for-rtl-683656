// adder: 16-bit signed 3.12 adder with saturation.
//
// Adds a and b; if the two's-complement sum overflows (both operands of one
// sign, result of the other) the output is clamped to +7.999755859375 (0x7FFF)
// or -8.0 (0x8000), the bounds the architecture gives for every adder. The sat
// output flags a clamped result; it is an observation aid of this design and
// need not be connected. Purely combinational.
module adder
  import neuron_pkg::*;
(
  input  fix_t a,
  input  fix_t b,
  output fix_t s,
  output logic sat
);

  fix_t raw;
  logic pos_ovf, neg_ovf;

  always_comb begin
    raw     = a + b;
    pos_ovf = !a[W-1] && !b[W-1] &&  raw[W-1];
    neg_ovf =  a[W-1] &&  b[W-1] && !raw[W-1];
    if (pos_ovf)      s = FIX_MAX;
    else if (neg_ovf) s = FIX_MIN;
    else              s = raw;
    sat = pos_ovf || neg_ovf;
  end

endmodule
