// gbs_and_or_tree: the combined and-or-gate tree that searches for a free buddy.
//
// A full binary tree over the storage bit-map (1 = allocated). Every internal
// node computes c = a.b.~d + (a+b).d from its children a, b and its level's mode
// line d = m[level]: an OR gate in the lower "or-gate tree layer" (a 0 there
// means the node's whole subtree is free) and an AND gate in the upper
// "and-gate tree layer" (a 0 there means some free buddy lies below). The root
// output is CHECK1: 0 when a free, aligned buddy of the size selected by the
// mode lines exists. The node equation is the one given for the original design.
//
// All node outputs are brought out, heap-ordered (see gbs_pkg), for the routing
// tree: node[1] is the root, node[2^n + a] is bit a of the bit-map, node[0] is
// unused and 0. Purely combinational, depth n gates.
module gbs_and_or_tree #(
  parameter int unsigned LOG2_BLOCKS = 4
) (
  input  logic [2**LOG2_BLOCKS-1:0]   bitmap,
  input  logic [LOG2_BLOCKS:0]        m,
  output logic [2*2**LOG2_BLOCKS-1:0] node,
  output logic                        check1
);
  import gbs_pkg::*;

  localparam int unsigned NB = 2 ** LOG2_BLOCKS;

  assign node[0] = 1'b0;

  for (genvar a = 0; a < NB; a++) begin : g_leaf
    assign node[NB+a] = bitmap[a];
  end

  for (genvar h = 1; h < NB; h++) begin : g_node
    localparam int unsigned LVL = heap_level(h, LOG2_BLOCKS);
    logic l, r, d;
    assign l = node[2*h];
    assign r = node[2*h+1];
    assign d = m[LVL];
    assign node[h] = (l & r & ~d) | ((l | r) & d);
  end

  assign check1 = node[1];

endmodule
