// adder_tree: balanced tree of two-input adders that sums NIN operands of
// W bits each.
// Level 0 holds the operands; each level adds neighbouring pairs, and an
// operand left without a partner moves up one level unchanged. The depth is
// ceil(log2(NIN)) adders and the result is exact (W + ceil(log2(NIN)) bits).
// Interface: in[k] is operand k (packed array), sum is the total.
// Combinational. The balanced pairwise structure follows the method's
// adder-tree stage; the pass-through of an odd operand is this design's
// choice.
module adder_tree #(
  parameter int unsigned NIN = 9,
  parameter int unsigned W   = 8,
  localparam int unsigned L  = $clog2(NIN),
  localparam int unsigned OW = W + L
) (
  input  logic [NIN-1:0][W-1:0] in,
  output logic [OW-1:0]         sum
);
  // number of nodes on level l
  function automatic int unsigned count(input int unsigned l);
    return (NIN + (2 ** l) - 1) / (2 ** l);
  endfunction

  // one signal per tree node, g_level[l].g_node[k].v
  for (genvar l = 0; l <= L; l++) begin : g_level
    for (genvar k = 0; k < count(l); k++) begin : g_node
      logic [OW-1:0] v;
      if (l == 0) begin : g_leaf
        assign v = OW'(in[k]);
      end else if (2*k + 1 < count(l - 1)) begin : g_add
        assign v = g_level[l-1].g_node[2*k].v + g_level[l-1].g_node[2*k + 1].v;
      end else begin : g_pass
        assign v = g_level[l-1].g_node[2*k].v;
      end
    end
  end

  assign sum = g_level[L].g_node[0].v;
endmodule
