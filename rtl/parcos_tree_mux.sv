// parcos_tree_mux: one output multiplexer of the PARCOS communication
// matrix, a 1-of-N selector built as a binary tree.
//
// Every level of the tree halves the number of candidates and is steered by
// one bit of the output's selector: level 0 (next to the inputs) by sel[0],
// the last level by sel[LEVELS-1], so out = in[sel].  With N = 32 the tree
// has five levels and needs the five control bits per output the chip
// stores.  Purely combinational; in the chip the path from one input to all
// outputs settles within one bit time of the serial links.
// The tree form and one control bit per level follow the original chip;
// padding unused leaves with 0 when N is not a power of two is this
// design's choice.
module parcos_tree_mux #(
  parameter int unsigned N      = 32,
  localparam int unsigned LEVELS = $clog2(N)
) (
  input  logic [N-1:0]      in,
  input  logic [LEVELS-1:0] sel,
  output logic              out
);

  // stage[l] holds the N >> l candidates entering level l
  logic [N-1:0] stage [LEVELS+1];

  assign stage[0] = in;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    for (genvar i = 0; i < (N >> (l + 1)); i++) begin : g_node
      assign stage[l+1][i] = sel[l] ? stage[l][2*i+1] : stage[l][2*i];
    end
    if ((N >> (l + 1)) < N) begin : g_pad
      assign stage[l+1][N-1:(N >> (l + 1))] = '0;
    end
  end

  assign out = stage[LEVELS][0];

endmodule
