// gbs_allocator: greedy buddy system memory allocator (top level).
//
// Storage of 2^LOG2_BLOCKS blocks is tracked by a bit-map (1 = allocated). An
// allocation of S blocks first looks for a free aligned buddy of the searching
// size (S rounded up to a power of two) with the and-or-gate tree. If there is
// none it gets a "second chance": the second-chance latch switches the mode
// lines to the inferior size, half the searching size. Greedy routing then
// moves the start of the found buddy left over the free blocks just before it,
// module F turns that into the final expanded starting address (HEAD), the
// overflow check and the overlap check decide, and the bit-map is updated. A
// release marks HEAD .. HEAD+S-1 free again.
//
// Machine cycles (one state each, after the request is taken in IDLE):
//   SEARCH : tree runs with M select = 0; at the clock edge the second-chance
//            latch (enable = input = CHECK1) is set if the search failed.
//   ROUTE  : tree runs with the final size; CHECK1 and the module F address
//            are stored (HEAD register).
//   UPDATE : CHECK2 and CHECK3 are formed, resp_valid is high with the result
//            bit and address, and the bit-map is written at the end of the
//            cycle (only on success).
// An allocation thus takes three machine cycles after acceptance; a release
// loads HEAD from req_addr and goes straight to UPDATE (one cycle). req_ready
// is high in IDLE only; resp_valid is a one-cycle pulse with no back-pressure.
// The three-cycle allocation and the latch behaviour follow the design; the
// request/response handshake, the release path timing and the reset are this
// implementation's own. Request sizes must be 1..2^LOG2_BLOCKS.
module gbs_allocator #(
  parameter int unsigned LOG2_BLOCKS = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      req_valid,
  output logic                      req_ready,
  input  logic                      req_alloc,
  input  logic [LOG2_BLOCKS:0]      req_size,
  input  logic [LOG2_BLOCKS-1:0]    req_addr,
  output logic                      resp_valid,
  output logic                      resp_fail,
  output logic [LOG2_BLOCKS-1:0]    resp_addr,
  output logic                      resp_second_chance,
  output logic [2:0]                resp_check,
  output logic [2**LOG2_BLOCKS-1:0] bitmap
);
  import gbs_pkg::*;

  localparam int unsigned N  = LOG2_BLOCKS;
  localparam int unsigned NB = 2 ** LOG2_BLOCKS;

  gbs_state_e     state;
  logic           alloc_q;     // function command register
  logic [N:0]     size_q;      // SIZE register
  logic [N-1:0]   head_q;      // HEAD register
  logic           m_sel_q;     // second-chance latch
  logic           check1_q;    // search result of the final search

  logic [N:0]        m;
  logic              p_sel;
  logic [2*NB-1:0]   node;
  logic              check1;
  logic [NB-1:0]     temp;
  logic [N-1:0]      f_addr;
  logic [N:0]        tail;
  logic              check2, check3, result;
  logic [NB-1:0]     pseudo;

  gbs_mux_arrays #(.LOG2_BLOCKS(N)) u_mux (
    .size (size_q), .m_sel (m_sel_q), .m (m), .p_sel (p_sel)
  );

  gbs_and_or_tree #(.LOG2_BLOCKS(N)) u_tree (
    .bitmap (bitmap), .m (m), .node (node), .check1 (check1)
  );

  gbs_route_tree #(.LOG2_BLOCKS(N)) u_route (
    .node (node), .m (m), .temp (temp)
  );

  gbs_module_f #(.LOG2_BLOCKS(N)) u_f (
    .temp (temp), .addr (f_addr)
  );

  gbs_overflow_check #(.LOG2_BLOCKS(N)) u_ovf (
    .head (head_q), .size (size_q), .tail (tail), .check2 (check2)
  );

  gbs_bitmap_update #(.LOG2_BLOCKS(N)) u_upd (
    .clk    (clk),
    .rst_n  (rst_n),
    .we     (state == ST_UPDATE),
    .alloc  (alloc_q),
    .head   (head_q),
    .tail   (tail),
    .check1 (alloc_q & check1_q),
    .check2 (check2),
    .check3 (check3),
    .result (result),
    .pseudo (pseudo),
    .bitmap (bitmap)
  );

  assign req_ready          = (state == ST_IDLE);
  assign resp_valid         = (state == ST_UPDATE);
  assign resp_fail          = alloc_q & result;
  assign resp_addr          = head_q;
  assign resp_second_chance = m_sel_q;
  assign resp_check         = {check3, check2, alloc_q & check1_q};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= ST_IDLE;
      alloc_q  <= 1'b0;
      size_q   <= '0;
      head_q   <= '0;
      m_sel_q  <= 1'b0;
      check1_q <= 1'b0;
    end else begin
      unique case (state)
        ST_IDLE: if (req_valid) begin
          alloc_q  <= req_alloc;
          size_q   <= req_size;
          m_sel_q  <= 1'b0;              // latch initialised for every operation
          check1_q <= 1'b0;
          if (req_alloc) begin
            state <= ST_SEARCH;
          end else begin
            head_q <= req_addr;
            state  <= ST_UPDATE;
          end
        end
        ST_SEARCH: begin
          if (check1) m_sel_q <= check1; // enable and input both CHECK1
          state <= ST_ROUTE;
        end
        ST_ROUTE: begin
          check1_q <= check1;
          head_q   <= f_addr;
          state    <= ST_UPDATE;
        end
        ST_UPDATE: state <= ST_IDLE;
        default:   state <= ST_IDLE;
      endcase
    end
  end

  // Request sizes outside 1..2^n are not defined for the allocator.
  always_ff @(posedge clk) begin
    if (rst_n && req_valid && req_ready)
      assert (req_size != '0 && req_size <= (N+1)'(NB))
        else $error("gbs_allocator: request size %0d out of range", req_size);
  end

endmodule
