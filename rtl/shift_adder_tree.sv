// shift_adder_tree -- one bit-serial step of the PE's vector product.
//
// The activations enter one bit-plane at a time, most significant plane
// first. For plane m the step computes
//     sum_out = sum_k ( plane[k] AND w_k ) + (psum_in << 1)
// The AND gates are the multipliers (a single activation bit times a weight
// either passes the weight or gives 0); a balanced adder tree sums the
// ELEMS gated weights, and the previous partial sum is doubled and added.
// After ELEM_W planes the partial sum equals the exact dot product.
// Activations are unsigned (they come from ReLU); weights are two's
// complement. Signedness is this design's choice.
//
// When zero_out is 1 (the PE skipped the vector) the output is forced to
// 0 by AND gating, whatever the inputs hold.
//
// Purely combinational.
module shift_adder_tree
  import tsnmc_pkg::*;
#(
  parameter int unsigned ELEMS = VEC_LEN,
  parameter int unsigned W_W   = DATA_W,
  parameter int unsigned OUT_W = PSUM_W
) (
  input  logic [ELEMS-1:0]         plane,
  input  logic [ELEMS*W_W-1:0]     weights,   // w_k in bits [W_W*k +: W_W]
  input  logic signed [OUT_W-1:0]  psum_in,
  input  logic                     zero_out,
  output logic signed [OUT_W-1:0]  sum_out
);

  localparam int unsigned LEVELS = (ELEMS > 1) ? $clog2(ELEMS) : 0;
  localparam int unsigned LEAVES = 1 << LEVELS;

  // Level 0 holds the gated weights; each g_lvl[l] block adds pairs of the
  // level below. Every level is its own signal.
  logic signed [OUT_W-1:0] leaf [LEAVES];

  for (genvar k = 0; k < LEAVES; k++) begin : g_leaf
    if (k < ELEMS) begin : g_w
      assign leaf[k] = plane[k] ? OUT_W'(signed'(weights[W_W*k +: W_W])) : '0;
    end else begin : g_pad
      assign leaf[k] = '0;
    end
  end

  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    localparam int unsigned NODES = LEAVES >> l;
    logic signed [OUT_W-1:0] node [NODES];
    for (genvar i = 0; i < NODES; i++) begin : g_node
      if (l == 0) begin : g_in
        assign node[i] = leaf[i];
      end else begin : g_add
        assign node[i] = g_lvl[l-1].node[2*i] + g_lvl[l-1].node[2*i+1];
      end
    end
  end

  logic signed [OUT_W-1:0] total;
  assign total   = g_lvl[LEVELS].node[0] + (psum_in <<< 1);
  assign sum_out = zero_out ? '0 : total;

endmodule
