// gbs_module_f: module F, the address of the leftmost 0 of a bit-map.
//
// An and-gate tree over the bit-map (a node is 1 when its whole subtree is 1)
// plus one multiplexer per level. The most significant address bit is the
// output of the root's left child: 1 means the left half holds no 0, so the 0
// is on the right. Each further bit is the output of the left child of the node
// chosen by the bits already found, picked by a multiplexer with 2^d inputs at
// depth d. This is the "first fit" address finder of the and-gate tree; the
// design reuses it as module F behind the routing tree.
//
// With no 0 in the map the address is all ones. Purely combinational.
module gbs_module_f #(
  parameter int unsigned LOG2_BLOCKS = 4
) (
  input  logic [2**LOG2_BLOCKS-1:0] temp,
  output logic [LOG2_BLOCKS-1:0]    addr
);
  localparam int unsigned NB = 2 ** LOG2_BLOCKS;

  // Heap-ordered and-gate tree, leaves at NB + address.
  logic [2*NB-1:0] t;

  assign t[0] = 1'b1;
  for (genvar a = 0; a < NB; a++) begin : g_leaf
    assign t[NB+a] = temp[a];
  end
  for (genvar h = 1; h < NB; h++) begin : g_node
    assign t[h] = t[2*h] & t[2*h+1];
  end

  // Multiplexer chain: at depth d the node on the path is 2^d + addr[n-1:n-d],
  // and its left child 2^(d+1) + 2*addr[n-1:n-d] decides the next bit.
  always_comb begin
    int unsigned h;
    h = 1;
    for (int d = 0; d < LOG2_BLOCKS; d++) begin
      addr[LOG2_BLOCKS-1-d] = t[2*h];
      h = 2 * h + {31'd0, t[2*h]};
    end
  end

endmodule
