// csla_top: the two 64-bit carry select adders side by side.
//
// Both adders remove the second ripple carry adder of a classic carry select
// adder. csla64_bec derives the carry-in-1 result from the carry-in-0 result
// with a binary to excess-1 converter; csla64_memo reads both results from a
// table of stored sums. They are alternatives, so each keeps its own operand
// and result ports (prefix bec_ and memo_). Each computes sum = a + b + cin
// over 64 bits and brings out the carries between its 16-bit slices.
// Combinational, no clock or reset.
module csla_top
  import csla_pkg::*;
(
  input  logic [WORD_W-1:0] bec_a,
  input  logic [WORD_W-1:0] bec_b,
  input  logic              bec_cin,
  output logic [WORD_W-1:0] bec_sum,
  output logic              bec_cout,
  output logic              bec_c1,
  output logic              bec_c2,
  output logic              bec_c3,

  input  logic [WORD_W-1:0] memo_a,
  input  logic [WORD_W-1:0] memo_b,
  input  logic              memo_cin,
  output logic [WORD_W-1:0] memo_sum,
  output logic              memo_cout,
  output logic              memo_c1,
  output logic              memo_c2,
  output logic              memo_c3
);
  csla64_bec u_bec (
    .a(bec_a), .b(bec_b), .cin(bec_cin),
    .sum(bec_sum), .cout(bec_cout), .c1(bec_c1), .c2(bec_c2), .c3(bec_c3)
  );

  csla64_memo u_memo (
    .a(memo_a), .b(memo_b), .cin(memo_cin),
    .sum(memo_sum), .cout(memo_cout), .c1(memo_c1), .c2(memo_c2), .c3(memo_c3)
  );
endmodule
