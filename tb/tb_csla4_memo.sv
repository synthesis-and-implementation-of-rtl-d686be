// tb_csla4_memo: exhaustive self-check of the 4-bit memo-table slice.
// Every a, b and cin is applied; {cout, sum} must equal a + b + cin. Counts
// how often the mux chose the carry-in-1 entry and the carry-in-0 entry.
module tb_csla4_memo;
  int checks = 0, failures = 0, n_sel1 = 0, n_sel0 = 0;
  logic [3:0] a, b, s; logic c, co;

  csla4_memo #(.W(4)) dut (.a(a), .b(b), .cin(c), .sum(s), .cout(co));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++)
        for (int k = 0; k < 2; k++) begin
          a = 4'(x); b = 4'(y); c = 1'(k);
          #1;
          if (k == 1) n_sel1++; else n_sel0++;
          checks++;
          if ({co, s} != 5'(x + y + k)) begin
            failures++;
            $display("FAIL %0d+%0d+%0d -> %0d", x, y, k, {co, s});
          end
        end
    if (n_sel1 == 0 || n_sel0 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
