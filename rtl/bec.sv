// bec: W-bit binary to excess-1 converter (BEC).
//
// Adds one to its input modulo 2^W without a full adder chain:
//   x[0] = ~b[0],  x[i] = b[i] ^ (b[0] & b[1] & ... & b[i-1]).
// In a carry select group it turns the {carry,sum} of the RCA with carry in 0
// into the result for carry in 1, replacing the second RCA of a classic carry
// select adder. The converter and its role follow the source design; the
// gate form above is the standard one, chosen here.
// Interface: b (W bits) -> x (W bits). Combinational.
module bec #(
  parameter int unsigned W = 5
) (
  input  logic [W-1:0] b,
  output logic [W-1:0] x
);
  logic [W-1:0] all_ones_below;  // bit i: AND of b[i-1:0]
  assign all_ones_below[0] = 1'b1;
  for (genvar i = 1; i < W; i++) begin : g_and
    assign all_ones_below[i] = all_ones_below[i-1] & b[i-1];
  end
  assign x = b ^ all_ones_below;
endmodule
