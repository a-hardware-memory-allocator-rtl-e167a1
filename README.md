# Greedy buddy system: a hardware memory allocator

A hardware buddy allocator keeps one bit per storage block. That bit-map lets
it find free space in constant time with a tree of gates. The classic
bit-map buddy allocator has a weakness. It only looks for a free *aligned*
run of blocks whose size is the request rounded up to a power of two (the
*searching size*). So a 5-block request fails on the map below, even though
blocks 3..7 are free:

```
block   0 1 2 3 4 5 6 7 8 9 A B C D E F
map     1 1 1 0 0 0 0 0 1 1 1 1 1 0 0 0      (1 = allocated)
```

No aligned 8-block run is free, so the search fails. The *greedy buddy
system* in this RTL adds two mechanisms to the bit-map buddy allocator:

* **Second chance.** When the search at the searching size fails, the same
  tree searches again at half that size (the *inferior buddy*). Here that
  finds the free 4-block buddy at block 4.
* **Greedy routing.** From the buddy it found, a second tree moves the start
  address to the left over the free blocks just before the buddy. Here the
  start moves from 4 to 3, and blocks 3..7 are granted.

The area granted is exactly the request size. It does not have to be
aligned, and it sits as far left as the free run allows. Compared with a
plain bit-map buddy allocator, this leaves fewer small free fragments and
grants more large requests. Allocation still takes a constant three clock
cycles, whatever the size of the request or of the storage.

## Data path of one allocation

`gbs_allocator` (the top) connects these parts. The storage has
`2^n` blocks, with `n = LOG2_BLOCKS`.

1. **Mode lines (`gbs_mux_arrays`).** The search tree has one control line
   `m[l]` per level `l`. With `m[l] = 1`, the nodes of level `l` are OR
   gates; with `m[l] = 0` they are AND gates. For a searching size `2^k`,
   levels `1..k` are OR and the levels above are AND. The multiplexer arrays
   build this pattern from the size:
   * `e[i] = s[n] | ... | s[i]`
   * `P select = OR_i s[i] & e[i+1]`, which is 1 when the size is not a power
     of two
   * `p[i] = P select ? e[i] : e[i+1]`
   * `m[l] = M select ? p[l] : p[l-1]`

   `M select` is the output of the second-chance latch. When it is 1, the
   whole pattern moves down one level, which halves the searching size.
2. **And-or-gate tree (`gbs_and_or_tree`).** Each node computes
   `c = a·b·~d + (a+b)·d`. In the OR part of the tree, a node is 0 exactly
   when its whole subtree is free. In the AND part, a node is 0 when at least
   one free buddy lies below it. The root output is **CHECK1**: 0 means a
   free buddy of the selected size exists.
3. **Second-chance latch.** The first cycle of an allocation runs the tree
   with `M select = 0`. The latch has CHECK1 as both its data and its enable,
   so at the clock edge it becomes 1 only if the search failed. In the second
   cycle the tree runs again, at the inferior size if the latch is set.
4. **Routing tree (`gbs_route_tree`).** This is the hardest part of the
   design. One routing node sits on each internal tree node, and the root is
   always active. In the AND part, an active node passes activation to its
   left child if that child's tree output is 0, and to its right child
   otherwise. This walks down to the leftmost free buddy. In the OR part, an
   active node whose own output is 0 (its whole subtree is free) activates
   two nodes:
   * its left child
   * its *immediate left nephew*: the node one level down that sits just left
     of its left child

   Each free subtree therefore extends the activation leftwards by half its
   own width, so the steps shrink level by level like a binary search. They
   stop where a block is allocated. The truth table per node (R = the node's
   mode line, B = output of the left child, ax = the node's own output;
   S/D/N = activate the left child / right child / left nephew):

   | R | active | B | ax | N | S | D |
   |---|--------|---|----|---|---|---|
   | x | 0      | x | x  | 0 | 0 | 0 |
   | 0 | 1      | 0 | x  | 0 | 1 | 0 |
   | 0 | 1      | 1 | x  | 0 | 0 | 1 |
   | 1 | 1      | x | 0  | 1 | 1 | 0 |
   | 1 | 1      | x | 1  | 0 | 0 | 0 |

   An active leaf passes its bit-map bit on, and every other leaf gives 1.
   The leftmost 0 of this *temporary bit-map* is the first block of the free
   run that ends at the buddy. On the example map with a 4-block search, the
   temporary bit-map is `1110011111111111`.
5. **Module F (`gbs_module_f`).** Module F finds the address of the leftmost
   0. It is an AND tree plus one multiplexer per level. Each address bit
   picks the left child of the node chosen by the higher address bits. The
   result is loaded into the HEAD register: the *final expanded starting
   address*.
6. **Overflow check (`gbs_overflow_check`).** `TAIL = HEAD + SIZE` (n+1
   bits). **CHECK2** is `t[n] & |t[n-1:0]`, which is 1 when the area would run
   past block `2^n - 1`.
7. **Pseudo allocation and update (`gbs_bitmap_update`).** Module S
   (`gbs_module_s`) turns a number N into a map whose first N bits are 1. So
   `S(HEAD) ^ S(TAIL)` marks exactly blocks `HEAD .. TAIL-1`. ANDing that map
   with the bit-map and OR-reducing the result gives **CHECK3**: the area
   overlaps an allocated block. The result bit is `CHECK1 | CHECK2 | CHECK3`
   (0 = success). If it is 0, the bit-map takes `bitmap | pseudo`. A failed
   allocation leaves the bit-map unchanged.

A **release** uses the same pseudo-allocation map. The address and size come
with the request, and the bit-map takes `bitmap & ~pseudo`.

Greedy routing does not guarantee that the request fits. The expanded start
only moves left, so an area that passes the search can still overflow the
storage (CHECK2) or run into an allocated block on its right (CHECK3). Those
requests fail. For example, a 6-block request on the example map is
expanded to start at block 3 and then collides with block 8.

## Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset (bit-map all free) |
| `req_valid` / `req_ready` | in / out | 1 | request handshake; `req_ready` is high only when the allocator is idle |
| `req_alloc` | in | 1 | 1 = allocate, 0 = release |
| `req_size` | in | n+1 | size in blocks, 1..2^n |
| `req_addr` | in | n | start of the area to release |
| `resp_valid` | out | 1 | one-cycle pulse; the bit-map is written at the end of that cycle |
| `resp_fail` | out | 1 | result bit (always 0 for a release) |
| `resp_addr` | out | n | granted start address (or the released address) |
| `resp_second_chance` | out | 1 | the inferior size was searched |
| `resp_check` | out | 3 | {CHECK3, CHECK2, CHECK1} |
| `bitmap` | out | 2^n | current bit-map, bit i = block i, 1 = allocated |

```
cycle     0         1          2           3
          IDLE      SEARCH     ROUTE       UPDATE
          req taken tree @size tree @final routing->F result, resp_valid
                    latch<=C1  HEAD<=F     bit-map written at end of cycle
```

An allocation takes three cycles after the request is taken. A release goes
straight from IDLE to UPDATE, so it takes one cycle. There is no
back-pressure on the response. A request size of 0 or above `2^n` is
undefined, and an assertion reports it.

## Size and cost

`LOG2_BLOCKS` defaults to 4 (16 blocks), the size at which the allocator's
gate-level structure was originally drawn. Every tree is generated from the
parameter. The trees hold about `2^(n+1)` nodes each, and the critical path
goes through about `2n` levels of routing logic plus module F. The random
evaluation this allocator was designed for used 2^20 blocks. That is
`LOG2_BLOCKS = 20`: a million-bit register and a few million gates, and it has
not been built or simulated here. The largest size simulated is 2^10 blocks
(`tb_gbs_workload`). The heap-ordered generate loops run `2^(n+1)` times.
Verilator's default unroll limit of 16384 therefore stops it at
`LOG2_BLOCKS = 14`, and a `-Wall` lint at 12 already takes about a quarter of
an hour.

## What comes from the original design and what was chosen here

These parts follow the original design:

* the node equation and mode lines of the and-or-gate tree
* the multiplexer-array recurrences
* the second-chance latch
* the routing truth table
* module F as an AND tree with multiplexers
* `TAIL = HEAD + SIZE` and the CHECK2 equation
* the XOR-of-two-module-S pseudo allocation
* the CHECK1/2/3 result bit
* the allocate/release multiplexer in front of the bit-map

These are choices made here:

* **Routing nodes in the OR layer** never activate their right child. The
  original table leaves that output open, and the right half of a free
  buddy can never hold the leftmost 0.
* **Multiplexer wiring.** It is set so that `M select = 0` gives the
  searching size and `M select = 1` gives half of it. For a one-block request
  both settings search single blocks.
* **Module S** is built as a three-valued decision tree ("none / all /
  partial"), the same kind of tree used for bit flipping in earlier bit-map
  allocators. It is not copied gate for gate. Inputs above `2^n` give all
  ones.
* **Cycle split.** What happens in each of the three cycles, the handshake,
  the one-cycle release, the reset, and how the release address enters HEAD
  are this implementation's own.
* **Release** does not check that the area was allocated, and it always
  reports success.

## Verification

Every module has a self-checking testbench in `tb/`. The top-level tests
compare the allocator, response by response, with a plain loop model of the
policy in `tb/gbs_ref_pkg.sv`:

* `tb_gbs_allocator` runs at the default size. It covers the example above
  (second chance, start moved from 4 to 3), the 6-block overlap, a 14-block
  overflow, a full-storage search failure, and gap-free packing of a 1-block
  request followed by 3-block requests. It then runs 3000 random
  allocations and releases. It checks the three-cycle and one-cycle
  latencies and counts each mechanism.
* `tb_gbs_workload` runs random request/release streams on 1024 blocks. It
  covers all 152 settings of LAMDA = 5..95 and DN = 0..7, with 1000 requests
  each. LAMDA is the percentage of events that are
  requests. Sizes are uniform in `1..TMS/2^DN`, where TMS is the storage size
  in blocks. For each configuration it prints:
  * ARatio: blocks granted / blocks requested
  * TNFR: number of failed requests
  * failures due to too few free blocks in total
  * failures although a long enough free run existed
  * the average number of free fragments
  * the average density of the allocated area
* The unit testbenches check each tree against direct loop computations,
  exhaustively where the input space is small.

To run one with plain Verilator from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/gbs_pkg.sv tb/gbs_ref_pkg.sv tb/tb_gbs_allocator.sv --top-module tb_gbs_allocator
./obj_dir/Vtb_gbs_allocator
```

Each testbench ends with `TB_RESULT checks=N failures=M`. Replace the
testbench name to run another; `tb_gbs_workload` takes about a minute to
build.

## Files

`rtl/gbs_pkg.sv` (heap-index helpers, sequencer states), `gbs_mux_arrays`,
`gbs_and_or_tree`, `gbs_route_tree`, `gbs_module_f`, `gbs_overflow_check`,
`gbs_module_s`, `gbs_bitmap_update`, `gbs_allocator` (top). All trees use
heap order: node 1 is the root, node h has children 2h and 2h+1, and block
a is leaf `2^n + a`.
