// gbs_bitmap_update: pseudo allocation, second-stage check and the BIT-MAP.
//
// The pseudo allocation marks blocks HEAD .. TAIL-1 as the XOR of two module S
// maps, S(HEAD) ^ S(TAIL). The second-stage check ANDs it with the current
// bit-map and reduces the result with an or-gate tree: CHECK3 = 1 when the area
// overlaps an allocated block. The result bit is CHECK1 | CHECK2 | CHECK3
// (0 = success).
//
// The bit-map register takes, through a multiplexer steered by the function
// command, bitmap | pseudo for an allocation or bitmap & ~pseudo for a
// release. Its enable is the update strobe gated by NOT(result & alloc): a
// failed allocation leaves the bit-map alone, a release is always written. This
// is the datapath of the bit-map updating mechanism; the update strobe and the
// synchronous, all-available reset are this design's own.
//
// Timing: everything but the bit-map is combinational from the inputs; the
// bit-map changes on the rising clock edge where we is high.
module gbs_bitmap_update #(
  parameter int unsigned LOG2_BLOCKS = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      we,
  input  logic                      alloc,
  input  logic [LOG2_BLOCKS-1:0]    head,
  input  logic [LOG2_BLOCKS:0]      tail,
  input  logic                      check1,
  input  logic                      check2,
  output logic                      check3,
  output logic                      result,
  output logic [2**LOG2_BLOCKS-1:0] pseudo,
  output logic [2**LOG2_BLOCKS-1:0] bitmap
);
  localparam int unsigned NB = 2 ** LOG2_BLOCKS;

  logic [NB-1:0] s_head, s_tail, next_map;
  logic          enable;

  gbs_module_s #(.LOG2_BLOCKS(LOG2_BLOCKS)) u_s_head (
    .n   ({1'b0, head}),
    .map (s_head)
  );

  gbs_module_s #(.LOG2_BLOCKS(LOG2_BLOCKS)) u_s_tail (
    .n   (tail),
    .map (s_tail)
  );

  assign pseudo   = s_head ^ s_tail;
  assign check3   = |(bitmap & pseudo);
  assign result   = check1 | check2 | check3;
  assign next_map = alloc ? (bitmap | pseudo) : (bitmap & ~pseudo);
  assign enable   = we & ~(result & alloc);

  always_ff @(posedge clk) begin
    if (!rst_n)      bitmap <= '0;
    else if (enable) bitmap <= next_map;
  end

endmodule
