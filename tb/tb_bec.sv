// tb_bec: exhaustive self-check of the binary to excess-1 converter.
// Every input of a 5-bit and a 3-bit converter is applied; the output must be
// the input plus one, wrapping from all ones to zero.
module tb_bec;
  int checks = 0, failures = 0;
  logic [4:0] b5, x5;
  logic [2:0] b3, x3;

  bec #(.W(5)) dut5 (.b(b5), .x(x5));
  bec #(.W(3)) dut3 (.b(b3), .x(x3));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      b5 = 5'(v); b3 = 3'(v);
      #1;
      checks++;
      if (x5 != 5'((v + 1) % 32)) begin
        failures++;
        $display("FAIL W=5 %0d -> %0d", v, x5);
      end
      checks++;
      if (x3 != 3'(((v % 8) + 1) % 8)) begin
        failures++;
        $display("FAIL W=3 %0d -> %0d", v % 8, x3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
