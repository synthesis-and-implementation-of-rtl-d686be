// tb_rca: exhaustive self-check of the ripple carry adder.
// Every a, b and cin of a 4-bit and a 2-bit instance is applied; sum and cout
// are compared with a + b + cin computed in the testbench.
module tb_rca;
  int checks = 0, failures = 0;
  logic [3:0] a4, b4, s4; logic c4, co4;
  logic [1:0] a2, b2, s2; logic c2, co2;

  rca #(.W(4)) dut4 (.a(a4), .b(b4), .cin(c4), .sum(s4), .cout(co4));
  rca #(.W(2)) dut2 (.a(a2), .b(b2), .cin(c2), .sum(s2), .cout(co2));

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
        for (int c = 0; c < 2; c++) begin
          a4 = 4'(x); b4 = 4'(y); c4 = 1'(c);
          a2 = 2'(x); b2 = 2'(y); c2 = 1'(c);
          #1;
          checks++;
          if ({co4, s4} != 5'(x + y + c)) begin
            failures++;
            $display("FAIL W=4 %0d+%0d+%0d -> %0d", x, y, c, {co4, s4});
          end
          checks++;
          if ({co2, s2} != 3'((x % 4) + (y % 4) + c)) begin
            failures++;
            $display("FAIL W=2 %0d+%0d+%0d -> %0d", x % 4, y % 4, c, {co2, s2});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
