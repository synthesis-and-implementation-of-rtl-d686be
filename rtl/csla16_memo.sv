// csla16_memo: 16-bit carry select adder from memo-table slices.
//
// Four csla4_memo slices cover bits 3:0, 7:4, 11:8 and 15:12. Each slice
// looks up both possible results at once, and the carry out of one slice
// selects the result of the next, so the carry passes only through muxes.
// Building the 16-bit adder from 4-bit memo-table slices follows the source
// design; chaining them by their carries is this design's reading of it.
// Interface: a, b (16 bits), cin -> sum (16 bits), cout. Combinational.
module csla16_memo
  import csla_pkg::*;
(
  input  logic [SLICE_W-1:0] a,
  input  logic [SLICE_W-1:0] b,
  input  logic               cin,
  output logic [SLICE_W-1:0] sum,
  output logic               cout
);
  logic [MEMO_SLICES:0] c;  // c[k] is the carry into 4-bit slice k
  assign c[0] = cin;

  for (genvar k = 0; k < MEMO_SLICES; k++) begin : g_slice
    csla4_memo #(.W(MEMO_W)) u_slice (
      .a   (a[k*MEMO_W +: MEMO_W]),
      .b   (b[k*MEMO_W +: MEMO_W]),
      .cin (c[k]),
      .sum (sum[k*MEMO_W +: MEMO_W]),
      .cout(c[k+1])
    );
  end

  assign cout = c[MEMO_SLICES];
endmodule
