// activationBlock: activation function y and its derivative yD of the neuron.
//
// One sigmaCircuit evaluates the PLAN sigmoid of z. From it sigmaDCircuit
// forms sigmaD = sigma*(1-sigma) and tanhCircuit forms tanh = 2*sigma - 1; a
// 16-bit adder forms tanhD = sigmaD + sigmaD. Two mux2 deliver
//   neuronType = NT_SIGMOID (0): y = sigma, yD = sigmaD
//   neuronType = NT_TANH    (1): y = tanh,  yD = tanhD.
// Everything is combinational, so y and yD follow z within the same cycle.
// cond reports the PLAN segment of |z| (an observation output).
module activationBlock
  import neuron_pkg::*;
(
  input  fix_t         z,
  input  neuron_type_e neuronType,
  output fix_t         y,
  output fix_t         yD,
  output seg_e         cond
);

  fix_t sigma, sigmaD, tanh_v, tanhD;
  logic unused_sat;

  sigmaCircuit  u_sigma  (.z(z), .sigma(sigma), .cond(cond));
  sigmaDCircuit u_sigmaD (.sigma(sigma), .sigmaD(sigmaD));
  tanhCircuit   u_tanh   (.sigma(sigma), .tanh_o(tanh_v));
  adder         u_add    (.a(sigmaD), .b(sigmaD), .s(tanhD), .sat(unused_sat));

  mux2 #(.W(W)) u_sel_y  (.d0(sigma),  .d1(tanh_v), .s(neuronType), .y(y));
  mux2 #(.W(W)) u_sel_yD (.d0(sigmaD), .d1(tanhD),  .s(neuronType), .y(yD));

endmodule
