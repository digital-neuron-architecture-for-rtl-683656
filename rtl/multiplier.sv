// multiplier: signed 3.12 x 3.12 fixed-point multiplier with 16-bit result.
//
// The full 32-bit signed product is in 6.24 format. The result keeps the sign
// bit (bit 31), the three integer bits 26:24 and the twelve fraction bits
// 23:12, exactly as the architecture specifies; bits 30:27 and 11:0 are
// dropped. There is no saturation here: a product whose magnitude reaches 8.0
// wraps in the integer field, and fraction bits are truncated (rounding toward
// minus infinity). Keeping overflow-free operands is the user's concern; the
// adders after the multipliers saturate. Purely combinational.
module multiplier
  import neuron_pkg::*;
(
  input  fix_t a,
  input  fix_t b,
  output fix_t p
);

  logic signed [2*W-1:0] full;

  assign full = a * b;
  assign p    = {full[2*W-1], full[FRAC +: W-1]};  // {p[31], p[26:12]}

endmodule
