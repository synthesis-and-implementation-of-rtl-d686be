// csla_pkg: sizes shared by the carry select adders.
//
// The 64-bit adders are four 16-bit slices chained by their carries; the
// memo-table 16-bit slice is itself four 4-bit slices. The BEC slice splits
// its 16 bits into groups of 2, 2, 3, 4 and 5 bits (bits 1:0, 3:2, 6:4, 10:7,
// 15:11). These numbers follow the source design; nothing here is clocked.
package csla_pkg;
  localparam int unsigned WORD_W    = 64;  // full adder width
  localparam int unsigned SLICE_W   = 16;  // width of one cascaded slice
  localparam int unsigned SLICES    = WORD_W / SLICE_W;
  localparam int unsigned MEMO_W    = 4;   // width of one memo-table slice
  localparam int unsigned MEMO_SLICES = SLICE_W / MEMO_W;
endpackage
