// adder_tree: multi-operand adder (ten operands in the default network).
//
// Adds N_OPS signed operands in one combinational step, as a balanced binary
// tree: the operands are padded with zeros to the next power of two, and each
// level adds neighbouring pairs of the level below. Used to sum the partial
// products delta2[k] * w2[k][j] of all output neurons into the error of
// hidden neuron j in a single cycle. The result is clog2(N_OPS) bits wider
// than an operand, so it cannot overflow.
//
// That a single multi-operand adder forms the hidden error in one cycle
// follows the design; the tree shape is this implementation's choice.
module adder_tree
  import ann_pkg::*;
#(
  parameter int N_OPS = 10,
  parameter int IN_W  = ACC_W,
  parameter int OUT_W = IN_W + ((N_OPS > 1) ? $clog2(N_OPS) : 0)
) (
  input  logic signed [IN_W-1:0]  ops [N_OPS],
  output logic signed [OUT_W-1:0] sum
);

  localparam int LEVELS = (N_OPS > 1) ? $clog2(N_OPS) : 0;
  localparam int P2     = 1 << LEVELS;

  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    logic signed [OUT_W-1:0] v [P2 >> l];
    if (l == 0) begin : g_leaves
      for (genvar i = 0; i < P2; i++) begin : g_i
        if (i < N_OPS) begin : g_op
          assign v[i] = OUT_W'(ops[i]);
        end else begin : g_pad
          assign v[i] = '0;
        end
      end
    end else begin : g_sums
      for (genvar i = 0; i < (P2 >> l); i++) begin : g_i
        assign v[i] = g_lvl[l-1].v[2*i] + g_lvl[l-1].v[2*i+1];
      end
    end
  end

  assign sum = g_lvl[LEVELS].v[0];

endmodule
