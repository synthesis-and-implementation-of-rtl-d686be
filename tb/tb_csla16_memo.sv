// tb_csla16_memo: self-check of the 16-bit carry select adder (csla16_memo).
// Applies corner cases and 200,000 random operand pairs with both carry in
// values; {cout, sum} must equal a + b + cin computed in the testbench. For
// the 4-bit slices starting at bits 4, 8 and 12 it counts how often the incoming carry was 1 (the mux picks the
// carry-in-1 result) and 0, and fails if either never happened.
module tb_csla16_memo;
  localparam int NB = 3;
  localparam int BOUND [NB] = '{4, 8, 12};
  int checks = 0, failures = 0;
  int n_one [NB];
  int n_zero [NB];
  logic [15:0] a, b, s; logic c, co;

  csla16_memo dut (.a(a), .b(b), .cin(c), .sum(s), .cout(co));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [15:0] x, input logic [15:0] y, input logic k);
    logic [16:0] ref_sum;
    a = x; b = y; c = k;
    #1;
    ref_sum = {1'b0, x} + {1'b0, y} + 17'(k);
    checks++;
    if ({co, s} != ref_sum) begin
      failures++;
      if (failures < 10) $display("FAIL %h+%h+%0d -> %h expected %h", x, y, k, {co, s}, ref_sum);
    end
    for (int i = 0; i < NB; i++) begin
      // carry into bit BOUND[i]
      if (((32'(x) % (1 << BOUND[i])) + (32'(y) % (1 << BOUND[i])) + 32'(k)) >> BOUND[i] != 0)
        n_one[i]++;
      else
        n_zero[i]++;
    end
  endtask

  initial begin
    foreach (n_one[i]) begin n_one[i] = 0; n_zero[i] = 0; end
    for (int k = 0; k < 2; k++) begin
      apply(16'h0000, 16'h0000, 1'(k));
      apply(16'hffff, 16'h0000, 1'(k));
      apply(16'hffff, 16'hffff, 1'(k));
      apply(16'h8000, 16'h8000, 1'(k));
      apply(16'h7fff, 16'h0001, 1'(k));
      apply(16'h5555, 16'haaaa, 1'(k));
    end
    for (int n = 0; n < 200000; n++)
      apply(16'($urandom), 16'($urandom), 1'($urandom));
    for (int i = 0; i < NB; i++) begin
      $display("carry into bit %0d: one %0d times, zero %0d times", BOUND[i], n_one[i], n_zero[i]);
      if (n_one[i] == 0 || n_zero[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
