// tb_csla_bec_group: exhaustive self-check of one carry select group with BEC.
// The 4-bit group and a 5-bit group (the widest in the 16-bit slice) get every
// a, b and cin; {cout, sum} must equal a + b + cin. It also counts how often
// the mux took the converter's result (cin = 1) and the RCA's (cin = 0).
module tb_csla_bec_group;
  int checks = 0, failures = 0, n_bec = 0, n_rca = 0;
  logic [3:0] a4, b4, s4; logic c4, co4;
  logic [4:0] a5, b5, s5; logic c5, co5;

  csla_bec_group #(.W(4)) dut4 (.a(a4), .b(b4), .cin(c4), .sum(s4), .cout(co4));
  csla_bec_group #(.W(5)) dut5 (.a(a5), .b(b5), .cin(c5), .sum(s5), .cout(co5));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 32; x++)
      for (int y = 0; y < 32; y++)
        for (int c = 0; c < 2; c++) begin
          a4 = 4'(x); b4 = 4'(y); c4 = 1'(c);
          a5 = 5'(x); b5 = 5'(y); c5 = 1'(c);
          #1;
          if (c == 1) n_bec++; else n_rca++;
          checks++;
          if ({co5, s5} != 6'(x + y + c)) begin
            failures++;
            $display("FAIL W=5 %0d+%0d+%0d -> %0d", x, y, c, {co5, s5});
          end
          if (x < 16 && y < 16) begin
            checks++;
            if ({co4, s4} != 5'(x + y + c)) begin
              failures++;
              $display("FAIL W=4 %0d+%0d+%0d -> %0d", x, y, c, {co4, s4});
            end
          end
        end
    if (n_bec == 0 || n_rca == 0) failures++;
    $display("mux chose BEC %0d times, RCA %0d times", n_bec, n_rca);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
