// tb_csla64_memo: self-check of the 64-bit carry select adder (csla64_memo).
// Applies the reference vector a = 4f367da48432890a, b = 1f2e4f367da48432,
// cin = 1 (expected c1 = 1, c2 = 1, c3 = 0, cout = 0), corner cases that
// carry through all 64 bits, and 100,000 random pairs. sum, cout and the
// slice carries c1..c3 are compared with 65-bit arithmetic in the testbench.
// Fails if a slice carry was never 1 or never 0.
module tb_csla64_memo;
  int checks = 0, failures = 0;
  int n_one [4];
  int n_zero [4];
  logic [63:0] a, b, s; logic c, co, c1, c2, c3;

  csla64_memo dut (.a(a), .b(b), .cin(c), .sum(s), .cout(co), .c1(c1), .c2(c2), .c3(c3));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic carry_into(input logic [63:0] x, input logic [63:0] y,
                                      input logic k, input int bitpos);
    logic [64:0] lx, ly, t;
    lx = {1'b0, x} & ((65'd1 << bitpos) - 65'd1);
    ly = {1'b0, y} & ((65'd1 << bitpos) - 65'd1);
    t  = lx + ly + 65'(k);
    return t[bitpos];
  endfunction

  task automatic apply(input logic [63:0] x, input logic [63:0] y, input logic k);
    logic [64:0] ref_sum;
    logic [3:0] ref_c;
    a = x; b = y; c = k;
    #1;
    ref_sum = {1'b0, x} + {1'b0, y} + 65'(k);
    for (int i = 1; i < 4; i++) ref_c[i] = carry_into(x, y, k, 16 * i);
    ref_c[0] = ref_sum[64];
    checks++;
    if ({co, s} != ref_sum) begin
      failures++;
      if (failures < 10) $display("FAIL %h+%h+%0d -> %h expected %h", x, y, k, {co, s}, ref_sum);
    end
    checks++;
    if ({c3, c2, c1} != ref_c[3:1]) begin
      failures++;
      if (failures < 10) $display("FAIL slice carries %b expected %b", {c3, c2, c1}, ref_c[3:1]);
    end
    for (int i = 0; i < 4; i++) if (ref_c[i]) n_one[i]++; else n_zero[i]++;
  endtask

  initial begin
    foreach (n_one[i]) begin n_one[i] = 0; n_zero[i] = 0; end
    apply(64'h4f367da48432890a, 64'h1f2e4f367da48432, 1'b1);
    checks++;
    if (s != 64'h6e64ccdb01d70d3d || co != 1'b0 || {c1, c2, c3} != 3'b110) begin
      failures++;
      $display("FAIL reference vector: sum %h cout %b c1 %b c2 %b c3 %b", s, co, c1, c2, c3);
    end
    for (int k = 0; k < 2; k++) begin
      apply(64'h0, 64'h0, 1'(k));
      apply('1, 64'h0, 1'(k));
      apply('1, '1, 1'(k));
      apply(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000, 1'(k));
      apply(64'h0000_ffff_0000_ffff, 64'h0000_0000_ffff_0001, 1'(k));
      apply(64'h5555_5555_5555_5555, 64'haaaa_aaaa_aaaa_aaaa, 1'(k));
    end
    for (int n = 0; n < 100000; n++)
      apply({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    for (int i = 0; i < 4; i++) begin
      $display("carry %0d: one %0d times, zero %0d times", i, n_one[i], n_zero[i]);
      if (n_one[i] == 0 || n_zero[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
