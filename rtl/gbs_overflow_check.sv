// gbs_overflow_check: the first-stage check, storage overflow (CHECK2).
//
// The tail address is the address just after the last block the request would
// take: TAIL = HEAD + SIZE, one bit wider than an address. Storage of 2^n blocks
// overflows when TAIL > 2^n, i.e. CHECK2 = t[n] & (t[n-1] | ... | t[0]), the
// equation of the original check. CHECK2 = 1 means overflow. Combinational.
module gbs_overflow_check #(
  parameter int unsigned LOG2_BLOCKS = 4
) (
  input  logic [LOG2_BLOCKS-1:0] head,
  input  logic [LOG2_BLOCKS:0]   size,
  output logic [LOG2_BLOCKS:0]   tail,
  output logic                   check2
);
  assign tail   = {1'b0, head} + size;
  assign check2 = tail[LOG2_BLOCKS] & (|tail[LOG2_BLOCKS-1:0]);
endmodule
