// csla16_bec: 16-bit carry select adder with binary to excess-1 converters.
//
// The 16 bits are split into five groups of growing width so that each
// group's RCA finishes about when the carry reaches it through the muxes:
//   bits  1:0  - 2-bit RCA fed by cin
//   bits  3:2  - 2-bit RCA (cin 0) + 3-bit BEC + mux, select = carry of 1:0
//   bits  6:4  - 3-bit RCA (cin 0) + 4-bit BEC + mux, select = carry of 3:2
//   bits 10:7  - 4-bit RCA (cin 0) + 5-bit BEC + mux, select = carry of 6:4
//   bits 15:11 - 5-bit RCA (cin 0) + 6-bit BEC + mux, select = carry of 10:7
// The carry of the last group is cout. The critical path is the 2-bit RCA
// followed by four muxes. Group boundaries and widths follow the source
// design. Interface: a, b (16 bits), cin -> sum (16 bits), cout.
// Combinational.
module csla16_bec (
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        cin,
  output logic [15:0] sum,
  output logic        cout
);
  // carry out of each group: c[0] of bits 1:0, ..., c[4] of bits 15:11
  logic [4:0] c;

  rca #(.W(2)) u_g0 (.a(a[1:0]), .b(b[1:0]), .cin(cin), .sum(sum[1:0]), .cout(c[0]));
  csla_bec_group #(.W(2)) u_g1 (.a(a[3:2]),   .b(b[3:2]),   .cin(c[0]), .sum(sum[3:2]),   .cout(c[1]));
  csla_bec_group #(.W(3)) u_g2 (.a(a[6:4]),   .b(b[6:4]),   .cin(c[1]), .sum(sum[6:4]),   .cout(c[2]));
  csla_bec_group #(.W(4)) u_g3 (.a(a[10:7]),  .b(b[10:7]),  .cin(c[2]), .sum(sum[10:7]),  .cout(c[3]));
  csla_bec_group #(.W(5)) u_g4 (.a(a[15:11]), .b(b[15:11]), .cin(c[3]), .sum(sum[15:11]), .cout(c[4]));

  assign cout = c[4];
endmodule
