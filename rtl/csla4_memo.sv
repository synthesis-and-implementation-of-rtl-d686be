// csla4_memo: W-bit carry select slice built on a memo table.
//
// The memo table returns, for the operands {a, b}, the stored {carry, sum}
// for carry in 0 and for carry in 1. A 2:1 mux selected by cin picks one.
// Only the mux lies on the carry path through the slice. The structure
// (two stored results, mux on cin) follows the source design.
// Interface: a, b (W bits), cin -> sum (W bits), cout. Combinational.
module csla4_memo #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] r0, r1;

  memo_table #(.W(W)) u_table (.a(a), .b(b), .res0(r0), .res1(r1));

  assign {cout, sum} = cin ? r1 : r0;
endmodule
