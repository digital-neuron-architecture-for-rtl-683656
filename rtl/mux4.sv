// mux4: four-data-input word multiplexer.
//
// Passes d[s] to y. It is the elementary selector of the architecture: the
// selection block is a row of these (one per selected input and weight) and
// the sigmoid circuit uses one to pick the PLAN offset of the active segment.
// Purely combinational. The word width W defaults to the 16-bit datapath.
module mux4 #(
  parameter int unsigned W = 16
) (
  input  logic [3:0][W-1:0] d,
  input  logic [1:0]        s,
  output logic [W-1:0]      y
);

  always_comb begin
    unique case (s)
      2'd0: y = d[0];
      2'd1: y = d[1];
      2'd2: y = d[2];
      default: y = d[3];
    endcase
  end

endmodule
