// tb_maj3: exhaustive check of the three-input majority gate against a
// count of ones (y = 1 when two or more inputs are 1), plus the AND and OR
// configurations the arbiter uses (third input tied to 0 or 1).
module tb_maj3;
  logic a, b, c, y;
  int checks = 0, failures = 0;

  maj3 dut (.a(a), .b(b), .c(c), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int ones;
      {a, b, c} = 3'(v);
      #1;
      ones = int'(a) + int'(b) + int'(c);
      checks++;
      if (y !== (ones >= 2)) begin
        failures++;
        $display("FAIL maj(%b,%b,%b) = %b", a, b, c, y);
      end
      // c = 0 makes an AND gate, c = 1 an OR gate
      checks++;
      if (c == 1'b0 && y !== (a & b)) failures++;
      else if (c == 1'b1 && y !== (a | b)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
