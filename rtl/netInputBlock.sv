// netInputBlock: net input z of the neuron, accumulated four pairs at a time.
//
// Each cycle the four selected input-weight pairs are multiplied by four
// 3.12 multipliers and summed by a two-level tree of saturating adders:
//   p = (xs0*ws0 + xs1*ws1) + (xs2*ws2 + xs3*ws3).
// A fourth saturating adder and the register rpp form the accumulator: while
// en is high, rpp <= sat(rpp + p) on every rising edge; rst clears rpp. With
// 16 inputs a controller clears rpp, then raises en for four cycles with
// sel = 0,1,2,3; after the fourth edge z holds the complete net input.
// Because every adder saturates, a sum beyond the 3.12 range sticks at
// +7.999755859375 or -8.0 instead of wrapping. sat is high in a cycle in
// which any of the four adders clamps its result (an observation output of
// this design). z is the register output, so it is stable for a whole cycle.
module netInputBlock
  import neuron_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  fix_t [3:0] xs,
  input  fix_t [3:0] ws,
  output fix_t       z,
  output logic       sat
);

  fix_t [3:0] prod;
  fix_t       sum01, sum23, psum, acc_next;
  logic [3:0] sat_v;

  for (genvar k = 0; k < 4; k++) begin : g_mul
    multiplier u_mul (.a(xs[k]), .b(ws[k]), .p(prod[k]));
  end

  adder u_add01 (.a(prod[0]), .b(prod[1]), .s(sum01),    .sat(sat_v[0]));
  adder u_add23 (.a(prod[2]), .b(prod[3]), .s(sum23),    .sat(sat_v[1]));
  adder u_add_p (.a(sum01),   .b(sum23),   .s(psum),     .sat(sat_v[2]));
  adder u_add_a (.a(z),       .b(psum),    .s(acc_next), .sat(sat_v[3]));

  rpp u_rpp (.clk(clk), .rst(rst), .en(en), .d(acc_next), .q(z));

  assign sat = en && (|sat_v);

endmodule
