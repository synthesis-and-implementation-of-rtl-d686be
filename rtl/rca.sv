// rca: W-bit ripple carry adder.
//
// A chain of W full adders; the carry ripples from bit 0 to bit W-1, so the
// delay grows linearly with W. In the carry select adders every group below
// the lowest one uses an RCA with its carry in tied to 0.
// Interface: a, b (W bits), cin -> sum (W bits), cout. Combinational.
// The chain of full adders is the usual form of an RCA; the source names the
// RCAs and their widths but does not draw their cells.
module rca #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
  end
  assign cout = c[W];
endmodule
