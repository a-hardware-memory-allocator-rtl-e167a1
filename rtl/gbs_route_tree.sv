// gbs_route_tree: greedy routing, producing the temporary bit-map.
//
// One routing node sits on every internal node of the and-or-gate tree. The
// root is always activated. A node is activated when its parent authorises it
// (S for a left child, D for a right child) or, for a right child, when the
// node just right of its parent activates it as its "immediate left nephew"
// (N). Each routing node follows the published truth table, with R the node's
// mode line (1 = or-gate layer), B the and-or output of its left child and ax
// its own and-or output:
//   not activated            : N=0 S=0 D=0
//   R=0 (and layer),   B=0   : S=1            (guide to the left child)
//   R=0 (and layer),   B=1   : D=1            (guide to the right child)
//   R=1 (or layer),   ax=0   : S=1 N=1        (free subtree: spread left)
//   R=1 (or layer),   ax=1   : nothing
// The and layer thus walks the leftmost path of 0 outputs down to the leftmost
// free buddy; from there the or layer keeps extending the activation leftwards
// through whole free subtrees, halving the step at every level. Each leaf emits
// its bit-map bit if it is activated and 1 otherwise, so the leftmost 0 of the
// temporary bit-map is the first block of the free run that ends in the buddy:
// the final expanded starting address. The D output in the or layer is left
// open in the table; here it is 0, which keeps the right halves of the buddy
// out of the temporary bit-map (they cannot hold its leftmost 0).
//
// Inputs are the heap-ordered node outputs of gbs_and_or_tree and its mode
// lines. Purely combinational, depth about 2n gates.
module gbs_route_tree #(
  parameter int unsigned LOG2_BLOCKS = 4
) (
  input  logic [2*2**LOG2_BLOCKS-1:0] node,
  input  logic [LOG2_BLOCKS:0]        m,
  output logic [2**LOG2_BLOCKS-1:0]   temp
);
  import gbs_pkg::*;

  localparam int unsigned NB = 2 ** LOG2_BLOCKS;

  // Per-node routing outputs, heap-ordered; index 0 unused.
  logic [NB-1:0] s_out, d_out, n_out;
  logic [2*NB-1:0] act;

  assign act[0] = 1'b0;
  assign act[1] = 1'b1;

  for (genvar h = 2; h < 2 * NB; h++) begin : g_act
    // Right child that is not the rightmost node of its level has an uncle.
    localparam bit HAS_UNCLE = (h % 2 == 1) && (((h + 1) & h) != 0);
    logic from_parent, from_uncle;
    if (h % 2 == 0) begin : g_left
      assign from_parent = s_out[h/2];
    end else begin : g_right
      assign from_parent = d_out[h/2];
    end
    if (HAS_UNCLE) begin : g_uncle
      assign from_uncle = n_out[(h+1)/2];
    end else begin : g_no_uncle
      assign from_uncle = 1'b0;
    end
    assign act[h] = from_parent | from_uncle;
  end

  assign s_out[0] = 1'b0;
  assign d_out[0] = 1'b0;
  assign n_out[0] = 1'b0;

  for (genvar u = 1; u < NB; u++) begin : g_route
    localparam int unsigned LVL = heap_level(u, LOG2_BLOCKS);
    logic r, b, ax, pu;
    assign r  = m[LVL];
    assign b  = node[2*u];
    assign ax = node[u];
    assign pu = act[u];
    assign n_out[u] = pu & r & ~ax;
    assign s_out[u] = pu & (r ? ~ax : ~b);
    assign d_out[u] = pu & ~r & b;
  end

  for (genvar a = 0; a < NB; a++) begin : g_leaf
    assign temp[a] = act[NB+a] ? node[NB+a] : 1'b1;
  end

endmodule
