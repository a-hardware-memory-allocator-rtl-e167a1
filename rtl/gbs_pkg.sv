// gbs_pkg: shared types and helpers of the greedy buddy system allocator.
//
// The bit-map trees (and-or-gate tree, routing tree, module S) are all stored
// heap-ordered in flat vectors: node 1 is the root, node h has children 2h and
// 2h+1, and the leaves of a 2^n-block map are nodes 2^n .. 2^(n+1)-1, so that
// leaf 2^n + a stands for block a (block 0 is the lowest address, the left end
// of the bit-map). A node at heap index h sits at tree level
// n - floor(log2 h): leaves are level 0, the root level n, and a level-l node
// covers 2^l blocks.
package gbs_pkg;

  // Depth of heap node h (root = 0).
  function automatic int unsigned heap_depth(int unsigned h);
    return $clog2(h + 1) - 1;
  endfunction

  // Tree level of heap node h in a tree of 2^log2_blocks leaves.
  function automatic int unsigned heap_level(int unsigned h, int unsigned log2_blocks);
    return log2_blocks - heap_depth(h);
  endfunction

  // Sequencer states: one state per machine cycle of an operation.
  typedef enum logic [1:0] {
    ST_IDLE   = 2'd0,  // waiting for a request
    ST_SEARCH = 2'd1,  // cycle 1: search with the searching size, second-chance latch clocked
    ST_ROUTE  = 2'd2,  // cycle 2: final search, greedy routing, HEAD register loaded
    ST_UPDATE = 2'd3   // cycle 3: overflow/overlap checks, bit-map written
  } gbs_state_e;

endpackage
