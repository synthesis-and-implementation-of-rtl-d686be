// tb_csla_top: end-to-end self-check of the top level at its default sizes.
//
// Both 64-bit adders are driven with the reference vector
// (4f367da48432890a + 1f2e4f367da48432 + 1), corner cases and 50,000 random
// operand pairs; the memo-table adder gets different random operands than
// the BEC adder on every other vector, so the two port sets are checked to
// be independent. Sums, carry outs and slice carries are compared with 65-bit
// arithmetic done here.
//
// Mechanisms counted (each must happen at least once, with both outcomes):
//   bec_group  - carry into a BEC group (bits 16k + 2, 4, 7, 11) is 1, so its
//                mux takes the converter's result; and is 0, so it takes the
//                RCA's result
//   memo_slice - carry into a 4-bit memo slice (bits 4j, j > 0, and cin) is 1,
//                so its mux takes the stored carry-in-1 entry; and is 0
//   slice      - carry between 16-bit slices (c1..c3) is 1 and 0
//   overflow   - carry out of bit 63 is 1 and 0
// The carry into bit i of the reference sum is a[i] ^ b[i] ^ sum[i].
module tb_csla_top;
  int checks = 0, failures = 0;

  typedef enum logic [2:0] { M_BEC_GROUP, M_MEMO_SLICE, M_SLICE, M_OVERFLOW, M_COUNT } mech_e;
  int n_one  [M_COUNT];
  int n_zero [M_COUNT];

  logic [63:0] bec_a, bec_b, bec_sum, memo_a, memo_b, memo_sum;
  logic bec_cin, bec_cout, bec_c1, bec_c2, bec_c3;
  logic memo_cin, memo_cout, memo_c1, memo_c2, memo_c3;

  csla_top dut (
    .bec_a, .bec_b, .bec_cin, .bec_sum, .bec_cout, .bec_c1, .bec_c2, .bec_c3,
    .memo_a, .memo_b, .memo_cin, .memo_sum, .memo_cout, .memo_c1, .memo_c2, .memo_c3
  );

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void count(mech_e m, logic v);
    if (v) n_one[m]++; else n_zero[m]++;
  endfunction

  // Compare one adder's outputs with the reference; returns the carry into
  // every bit position (bit 64 is the carry out).
  function automatic logic [64:0] check_one(string tag, logic [63:0] x, logic [63:0] y,
                                            logic k, logic [63:0] s, logic co,
                                            logic c1, logic c2, logic c3);
    logic [64:0] ref_sum, carries;
    ref_sum = {1'b0, x} + {1'b0, y} + 65'(k);
    carries = {ref_sum[64], x ^ y ^ ref_sum[63:0]};
    checks++;
    if ({co, s} != ref_sum) begin
      failures++;
      if (failures < 10) $display("FAIL %s %h+%h+%0d -> %h expected %h", tag, x, y, k, {co, s}, ref_sum);
    end
    checks++;
    if ({c3, c2, c1} != {carries[48], carries[32], carries[16]}) begin
      failures++;
      if (failures < 10) $display("FAIL %s slice carries %b", tag, {c3, c2, c1});
    end
    return carries;
  endfunction

  task automatic apply(logic [63:0] xa, logic [63:0] xb, logic xc,
                       logic [63:0] ya, logic [63:0] yb, logic yc);
    logic [64:0] cb, cm;
    bec_a = xa; bec_b = xb; bec_cin = xc;
    memo_a = ya; memo_b = yb; memo_cin = yc;
    #1;
    cb = check_one("bec", xa, xb, xc, bec_sum, bec_cout, bec_c1, bec_c2, bec_c3);
    cm = check_one("memo", ya, yb, yc, memo_sum, memo_cout, memo_c1, memo_c2, memo_c3);
    for (int k = 0; k < 4; k++) begin
      count(M_BEC_GROUP, cb[16*k + 2]);
      count(M_BEC_GROUP, cb[16*k + 4]);
      count(M_BEC_GROUP, cb[16*k + 7]);
      count(M_BEC_GROUP, cb[16*k + 11]);
    end
    for (int j = 0; j < 16; j++) count(M_MEMO_SLICE, cm[4*j]);
    for (int k = 1; k < 4; k++) begin
      count(M_SLICE, cb[16*k]);
      count(M_SLICE, cm[16*k]);
    end
    count(M_OVERFLOW, cb[64]);
    count(M_OVERFLOW, cm[64]);
  endtask

  initial begin
    logic [63:0] ra, rb;
    logic rc;
    for (int m = 0; m < M_COUNT; m++) begin n_one[m] = 0; n_zero[m] = 0; end

    // reference vector on both adders
    apply(64'h4f367da48432890a, 64'h1f2e4f367da48432, 1'b1,
          64'h4f367da48432890a, 64'h1f2e4f367da48432, 1'b1);
    checks++;
    if (bec_sum != 64'h6e64ccdb01d70d3d || memo_sum != bec_sum ||
        {bec_cout, bec_c1, bec_c2, bec_c3} != 4'b0110 ||
        {memo_cout, memo_c1, memo_c2, memo_c3} != 4'b0110) begin
      failures++;
      $display("FAIL reference vector: bec %h memo %h", bec_sum, memo_sum);
    end

    // corners: full carry propagation, overflow, alternating patterns
    for (int k = 0; k < 2; k++) begin
      apply('1, 64'h0, 1'(k), 64'h0, '1, 1'(k));
      apply('1, '1, 1'(k), 64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000, 1'(k));
      apply(64'h5555_5555_5555_5555, 64'haaaa_aaaa_aaaa_aaaa, 1'(k),
            64'haaaa_aaaa_aaaa_aaaa, 64'h5555_5555_5555_5555, 1'(k == 0));
    end

    for (int n = 0; n < 50000; n++) begin
      ra = {$urandom, $urandom}; rb = {$urandom, $urandom}; rc = 1'($urandom);
      if (n % 2 == 0) apply(ra, rb, rc, ra, rb, rc);
      else apply(ra, rb, rc, {$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
      checks++;
      if (n % 2 == 0 && (memo_sum != bec_sum || memo_cout != bec_cout)) begin
        failures++;
        if (failures < 10) $display("FAIL adders disagree on %h+%h+%0d", ra, rb, rc);
      end
    end

    for (int m = 0; m < M_COUNT; m++) begin
      $display("%-12s carry one %0d times, zero %0d times", mech_e'(m), n_one[m], n_zero[m]);
      if (n_one[m] == 0 || n_zero[m] == 0) begin
        failures++;
        $display("FAIL mechanism %s not exercised both ways", mech_e'(m));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
