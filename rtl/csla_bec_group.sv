// csla_bec_group: one carry select group with a binary to excess-1 converter.
//
// A W-bit RCA with carry in 0 forms r0 = {carry, sum} of a + b. A (W+1)-bit
// BEC forms r1 = r0 + 1, which is {carry, sum} of a + b + 1. A 2:1 mux,
// selected by the group's carry in, picks r1 when cin = 1 and r0 otherwise.
// The RCA does not wait for cin, so only the mux lies on the carry path.
// Interface: a, b (W bits), cin -> sum (W bits), cout. Combinational.
// The structure (RCA with cin = 0, (W+1)-bit BEC, mux on cin) follows the
// source design; W = 4 is its drawn example and the 16-bit slice uses W = 2..5.
module csla_bec_group #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] r0;  // {carry, sum} for carry in 0
  logic [W:0] r1;  // {carry, sum} for carry in 1

  rca #(.W(W)) u_rca (.a(a), .b(b), .cin(1'b0), .sum(r0[W-1:0]), .cout(r0[W]));
  bec #(.W(W+1)) u_bec (.b(r0), .x(r1));

  assign {cout, sum} = cin ? r1 : r0;
endmodule
