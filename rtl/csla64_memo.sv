// csla64_memo: 64-bit carry select adder from memo-table slices.
//
// Four 16-bit csla16_memo slices are cascaded: slice k adds bits
// 16k+15:16k and its carry out is the carry in of slice k+1. The carries
// between slices come out as c1, c2, c3, as on the BEC adder; cout is the
// carry out of bit 63. The four-slice cascade follows the source design.
// Interface: a, b (64 bits), cin -> sum (64 bits), cout, c1, c2, c3.
// Combinational: sum = a + b + cin.
module csla64_memo
  import csla_pkg::*;
(
  input  logic [WORD_W-1:0] a,
  input  logic [WORD_W-1:0] b,
  input  logic              cin,
  output logic [WORD_W-1:0] sum,
  output logic              cout,
  output logic              c1,
  output logic              c2,
  output logic              c3
);
  logic [SLICES:0] c;  // c[k] is the carry into slice k
  assign c[0] = cin;

  for (genvar k = 0; k < SLICES; k++) begin : g_slice
    csla16_memo u_slice (
      .a   (a[k*SLICE_W +: SLICE_W]),
      .b   (b[k*SLICE_W +: SLICE_W]),
      .cin (c[k]),
      .sum (sum[k*SLICE_W +: SLICE_W]),
      .cout(c[k+1])
    );
  end

  assign c1   = c[1];
  assign c2   = c[2];
  assign c3   = c[3];
  assign cout = c[SLICES];
endmodule
