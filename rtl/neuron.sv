// neuron: serial-parallel digital neuron with selectable sigmoid or tanh
// activation and derivative output for back-propagation learning.
//
// The neuron computes y = f(sum_i w_i*x_i) over N_INPUTS inputs (x_0 carries
// the bias b with w_0 = +1) and the derivative yD = f'(z) used by the backward
// pass. Values are 3.12 fixed point (see neuron_pkg). Three blocks form the
// chain: selBlock picks group sel of four input-weight pairs, netInputBlock
// multiplies and sums the four pairs in parallel and accumulates the groups
// serially in its register rpp, and activationBlock turns the net input z into
// y and yD with the PLAN sigmoid, or with tanh = 2*sigma - 1 when
// neuronType = NT_TANH.
//
// Operation (PIPELINE = 0, the main configuration): hold rst high for one
// clock to clear z; then hold en high for N_INPUTS/4 clocks while sel steps
// through 0, 1, ..., N_INPUTS/4-1, keeping each group's x and w valid during
// its cycle. After the last of these edges z is the net input and y, yD are
// valid combinationally from it; they stay valid while en and rst are low.
// For 16 inputs one evaluation takes 1 + 4 clocks. The only flip-flops are the
// 16 bits of rpp. sat flags a cycle in which an adder of the accumulator
// saturated; cond is the PLAN segment of |z|.
//
// PIPELINE = 1 adds the optional register layers at the outputs of the
// selection block and of the activation block (plain pipeline registers, no
// reset). rst and en are delayed by one stage inside, so the driving sequence
// is unchanged; z appears one clock and y, yD two clocks later than with
// PIPELINE = 0, and sat one clock later. The delayed control and the exact
// placement of the stages are this design's choices.
module neuron
  import neuron_pkg::*;
#(
  parameter int unsigned N_INPUTS = 16,
  parameter bit          PIPELINE = 1'b0,
  localparam int unsigned NG    = N_INPUTS / 4,
  localparam int unsigned LEV   = ($clog2(NG) + 1) / 2,
  localparam int unsigned SEL_W = (LEV == 0) ? 1 : 2 * LEV
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic [SEL_W-1:0]    sel,
  input  neuron_type_e        neuronType,
  input  fix_t [N_INPUTS-1:0] x,
  input  fix_t [N_INPUTS-1:0] w,
  output fix_t                z,
  output fix_t                y,
  output fix_t                yD,
  output logic                sat,
  output seg_e                cond
);

  fix_t [3:0] xs, ws, xs_q, ws_q;
  logic       rst_q, en_q;
  fix_t       y_c, yD_c;

  selBlock #(.N_INPUTS(N_INPUTS)) u_sel (
    .x(x), .w(w), .sel(sel), .xs(xs), .ws(ws)
  );

  if (PIPELINE) begin : g_pipe_in
    always_ff @(posedge clk) begin
      xs_q  <= xs;
      ws_q  <= ws;
      rst_q <= rst;
      en_q  <= en && !rst;
    end
  end else begin : g_comb_in
    assign xs_q  = xs;
    assign ws_q  = ws;
    assign rst_q = rst;
    assign en_q  = en;
  end

  netInputBlock u_net (
    .clk(clk), .rst(rst_q), .en(en_q), .xs(xs_q), .ws(ws_q), .z(z), .sat(sat)
  );

  activationBlock u_act (
    .z(z), .neuronType(neuronType), .y(y_c), .yD(yD_c), .cond(cond)
  );

  // Only existing groups may be accumulated: with an N_INPUTS that is not
  // 4 * 4^k the top selector level has unused (zero) leaves.
  a_sel_in_range: assert property (@(posedge clk) disable iff (rst) en |-> (int'(sel) < int'(NG)))
    else $error("neuron: sel %0d selects no group of %0d inputs", sel, N_INPUTS);

  if (PIPELINE) begin : g_pipe_out
    always_ff @(posedge clk) begin
      y  <= y_c;
      yD <= yD_c;
    end
  end else begin : g_comb_out
    assign y  = y_c;
    assign yD = yD_c;
  end

endmodule
