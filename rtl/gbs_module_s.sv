// gbs_module_s: module S, a bit-map whose first N bits are 1 and the rest 0.
//
// Built as a decision tree in the style of the bit-flipper tree: each node
// receives one of three indications from its parent, "none", "all" or
// "partial", and one size bit as its control line. A node marked "all" passes
// "all" to both children, "none" passes "none". A "partial" node whose size bit
// is 1 passes "all" to its left child and "partial" to its right child; with a
// size bit of 0 it passes "partial" to the left and "none" to the right. This is
// the decision table of the bit-flipper tree with every address control 0,
// which is what a map starting at address 0 needs. The root level uses size bit
// n-1 and the root itself is "all" when size bit n is set (N = 2^n, or more).
// A leaf marked "all" yields 1. The indications are coded with two wires, all
// and part. The gate-level layout of the design's module S is not followed;
// only its function is.
//
// map[i] = (i < n) for n <= 2^LOG2_BLOCKS; larger n gives all ones.
// Purely combinational, depth n.
module gbs_module_s #(
  parameter int unsigned LOG2_BLOCKS = 4
) (
  input  logic [LOG2_BLOCKS:0]      n,
  output logic [2**LOG2_BLOCKS-1:0] map
);
  import gbs_pkg::*;

  localparam int unsigned NB = 2 ** LOG2_BLOCKS;

  logic [2*NB-1:0] all_q, part_q;

  assign all_q[0]  = 1'b0;
  assign part_q[0] = 1'b0;
  assign all_q[1]  = n[LOG2_BLOCKS];
  assign part_q[1] = ~n[LOG2_BLOCKS];

  for (genvar h = 2; h < 2 * NB; h++) begin : g_node
    // Size bit used by the parent, which sits at level heap_level(h) + 1.
    localparam int unsigned CTL = heap_level(h, LOG2_BLOCKS);
    logic pa, pp, sz;
    assign pa = all_q[h/2];
    assign pp = part_q[h/2];
    assign sz = n[CTL];
    if (h % 2 == 0) begin : g_left
      assign all_q[h]  = pa | (pp & sz);
      assign part_q[h] = pp & ~sz;
    end else begin : g_right
      assign all_q[h]  = pa;
      assign part_q[h] = pp & sz;
    end
  end

  for (genvar a = 0; a < NB; a++) begin : g_leaf
    assign map[a] = all_q[NB+a];
  end

endmodule
