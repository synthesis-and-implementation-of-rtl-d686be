// tb_memo_table: reads every entry of the 4-bit memo table and compares both
// stored results with a + b and a + b + 1 (each 5 bits, carry on top).
module tb_memo_table;
  int checks = 0, failures = 0;
  logic [3:0] a, b;
  logic [4:0] r0, r1;

  memo_table #(.W(4)) dut (.a(a), .b(b), .res0(r0), .res1(r1));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        a = 4'(x); b = 4'(y);
        #1;
        checks += 2;
        if (r0 != 5'(x + y)) begin
          failures++;
          $display("FAIL res0 %0d+%0d -> %0d", x, y, r0);
        end
        if (r1 != 5'(x + y + 1)) begin
          failures++;
          $display("FAIL res1 %0d+%0d+1 -> %0d", x, y, r1);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
