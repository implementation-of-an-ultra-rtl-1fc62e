// tb_maj3: exhaustive test of the three-input majority gate, and of its use as
// AND (third input 0) and OR (third input 1). Expected values come from
// counting the ones among the inputs.
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
      ones = int'(a) + int'(b) + int'(c);
      #1;
      checks++;
      if (y !== (ones >= 2)) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b y=%0b", a, b, c, y);
      end
      // Fixed-polarity uses: c = 0 gives AND, c = 1 gives OR.
      checks++;
      if (c == 1'b0 && y !== (a & b)) failures++;
      if (c == 1'b1 && y !== (a | b)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
