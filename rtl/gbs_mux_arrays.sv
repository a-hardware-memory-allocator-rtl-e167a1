// gbs_mux_arrays: the multiplexer arrays that set the searching size.
//
// The and-or-gate tree needs one mode line per level: m[l] = 1 makes every node
// of level l an OR gate, m[l] = 0 an AND gate. To search for a free buddy of
// 2^k blocks, levels 1..k must be OR and levels above k AND, where 2^k is the
// request size rounded up to a power of two (the searching size).
//
// Following the multiplexer arrays of the design:
//   e[i]  = s[n] | ... | s[i]              (thermometer of the size's top bit)
//   P sel = OR over i of s[i] & e[i+1]     (size is not a power of two)
//   p[i]  = P sel ? e[i] : e[i+1]          (p[i] = 1 for i < k, e[n+1] = 0)
//   m[l]  = M sel ? p[l] : p[l-1]          (l = 1..n)
// With M sel = 0 the pattern selects the searching size 2^k; with M sel = 1 (the
// second-chance latch is set) it selects the inferior size 2^(k-1). For a
// one-block request both patterns make every level AND. The recurrences for e
// and P select are those of the original design; which mux input each line uses
// follows from the searching sizes the design must produce.
//
// Purely combinational. m[0] has no level to control and is tied to 0.
module gbs_mux_arrays #(
  parameter int unsigned LOG2_BLOCKS = 4
) (
  input  logic [LOG2_BLOCKS:0] size,
  input  logic                 m_sel,
  output logic [LOG2_BLOCKS:0] m,
  output logic                 p_sel
);
  localparam int unsigned N = LOG2_BLOCKS;

  logic [N+1:0] e;
  logic [N:0]   p;

  always_comb begin
    e[N+1] = 1'b0;
    for (int i = N; i >= 0; i--) e[i] = e[i+1] | size[i];

    p_sel = 1'b0;
    for (int i = 0; i < N; i++) p_sel = p_sel | (size[i] & e[i+1]);

    for (int i = 0; i <= N; i++) p[i] = p_sel ? e[i] : e[i+1];

    m[0] = 1'b0;
    for (int l = 1; l <= N; l++) m[l] = m_sel ? p[l] : p[l-1];
  end

endmodule
