// rpp: 16-bit parallel data register closing the net-input accumulator.
//
// On a rising clock edge: rst (synchronous, active high) clears the register
// to 0.0, otherwise en loads d. The architecture names the register and says
// it has clock and reset inputs; the load enable and the synchronous reset are
// this design's choices. The reset doubles as the "start a new net input"
// clear, so a controller asserts it for one cycle before each neuron
// evaluation.
module rpp
  import neuron_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  fix_t d,
  output fix_t q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (en) q <= d;
  end

endmodule
