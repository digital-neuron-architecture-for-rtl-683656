// mux2: two-data-input word multiplexer, y = s ? d1 : d0.
//
// Used by the sigmoid circuit to choose between sigma+ and sigma- on the sign
// of z, and by the activation block to choose the sigmoid or tanh outputs on
// neuronType. Purely combinational.
module mux2 #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  input  logic         s,
  output logic [W-1:0] y
);

  assign y = s ? d1 : d0;

endmodule
