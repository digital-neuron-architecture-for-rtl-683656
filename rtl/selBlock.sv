// selBlock: selection of one group of four input-weight pairs.
//
// The N_INPUTS inputs x and weights w are split into groups of four
// consecutive pairs; the group number sel puts x[4*sel+k] and w[4*sel+k] on
// lane k (k = 0..3) of xs and ws. Each of the eight lane outputs is a tree of
// four-input multiplexers (mux4): for the 16-input neuron of the architecture
// this is a single row of eight mux4 driven by a 2-bit sel. Larger neurons add
// mux4 levels, two sel bits per level (the low bits drive the first level);
// groups beyond N_INPUTS/4 in the last, partly used mux4 read zero. Purely
// combinational.
module selBlock
  import neuron_pkg::*;
#(
  parameter int unsigned N_INPUTS = 16,
  localparam int unsigned NG    = N_INPUTS / 4,          // groups
  localparam int unsigned LEV   = ($clog2(NG) + 1) / 2,  // mux4 levels
  localparam int unsigned SEL_W = (LEV == 0) ? 1 : 2 * LEV
) (
  input  fix_t [N_INPUTS-1:0] x,
  input  fix_t [N_INPUTS-1:0] w,
  input  logic [SEL_W-1:0]    sel,
  output fix_t [3:0]          xs,
  output fix_t [3:0]          ws
);

  localparam int unsigned NPAD = 4 ** LEV;  // groups rounded up to a power of 4

  for (genvar k = 0; k < 4; k++) begin : g_lane
    // Leaves of the tree: lane k of every group, zero-padded to NPAD.
    fix_t lx [NPAD];
    fix_t lw [NPAD];

    for (genvar g = 0; g < NPAD; g++) begin : g_leaf
      if (g < NG) begin : g_used
        assign lx[g] = x[4*g+k];
        assign lw[g] = w[4*g+k];
      end else begin : g_pad
        assign lx[g] = '0;
        assign lw[g] = '0;
      end
    end

    if (LEV == 0) begin : g_flat
      assign xs[k] = lx[0];
      assign ws[k] = lw[0];
    end else begin : g_tree
      for (genvar l = 0; l < LEV; l++) begin : g_level
        localparam int unsigned NODES = NPAD / (4 ** (l + 1));
        fix_t ix [4*NODES];  // inputs of this level
        fix_t iw [4*NODES];
        fix_t ox [NODES];    // outputs of this level
        fix_t ow [NODES];

        for (genvar i = 0; i < 4 * NODES; i++) begin : g_in
          if (l == 0) begin : g_from_leaf
            assign ix[i] = lx[i];
            assign iw[i] = lw[i];
          end else begin : g_from_level
            assign ix[i] = g_level[l-1].ox[i];
            assign iw[i] = g_level[l-1].ow[i];
          end
        end

        for (genvar j = 0; j < NODES; j++) begin : g_node
          mux4 #(.W(W)) u_mux_x (
            .d ({ix[4*j+3], ix[4*j+2], ix[4*j+1], ix[4*j]}),
            .s (sel[2*l +: 2]),
            .y (ox[j])
          );
          mux4 #(.W(W)) u_mux_w (
            .d ({iw[4*j+3], iw[4*j+2], iw[4*j+1], iw[4*j]}),
            .s (sel[2*l +: 2]),
            .y (ow[j])
          );
        end
      end

      assign xs[k] = g_level[LEV-1].ox[0];
      assign ws[k] = g_level[LEV-1].ow[0];
    end
  end

endmodule
