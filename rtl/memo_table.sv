// memo_table: table of stored addition results for one W-bit slice.
//
// Every pair of W-bit operands {a, b} addresses one entry, which holds two
// (W+1)-bit results: res0 = {carry, sum} of a + b and res1 = {carry, sum} of
// a + b + 1. The adder reads the stored outcome instead of computing it, so
// no carry chain sits inside the slice. The table is complete and read-only:
// it is filled at elaboration by the function below (entry[{a,b}] =
// {a + b + 1, a + b}, each W+1 bits), 2^(2W) entries of 2(W+1) bits (256 x 10
// bits for W = 4). Storing results in a table in place of the RCA follows the
// source design; filling it completely at elaboration is this design's choice.
// Interface: a, b (W bits) -> res0, res1 (W+1 bits). Combinational read.
module memo_table #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W:0]   res0,
  output logic [W:0]   res1
);
  localparam int unsigned ENTRIES = 1 << (2 * W);
  typedef logic [2*W+1:0] entry_t;  // {res1, res0}

  function automatic entry_t fill_entry(int unsigned key);
    logic [W:0] x, y, s0, s1;
    x  = (W+1)'(key >> W);
    y  = (W+1)'(key & ((1 << W) - 1));
    s0 = x + y;
    s1 = x + y + 1'b1;
    return {s1, s0};
  endfunction

  entry_t table_q [ENTRIES];
  initial begin
    for (int unsigned k = 0; k < ENTRIES; k++) table_q[k] = fill_entry(k);
  end

  entry_t entry;
  assign entry = table_q[{a, b}];
  assign res0  = entry[W:0];
  assign res1  = entry[2*W+1:W+1];
endmodule
