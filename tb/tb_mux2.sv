// tb_mux2: exhaustive test of the 2x1 multiplexer over all eight input
// combinations, then the input sequence of the source design's mux simulation
// (I0, I1, S0 as slow, medium and fast square waves). Expected: Y = I0 when
// S0 = 0, Y = I1 when S0 = 1.
module tb_mux2;
  logic i0, i1, s0, y;
  int checks = 0, failures = 0;

  mux2 dut (.i0(i0), .i1(i1), .s0(s0), .y(y));

  task automatic check();
    logic exp;
    exp = (s0 == 1'b0) ? i0 : i1;
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL i0=%0b i1=%0b s0=%0b y=%0b exp=%0b", i0, i1, s0, y, exp);
    end
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {i0, i1, s0} = 3'(v);
      check();
    end
    // Square waves: S0 toggles every step, I1 every 3 steps, I0 every 6.
    for (int t = 0; t < 24; t++) begin
      s0 = t[0];
      i1 = ((t / 3) % 2) == 1;
      i0 = ((t / 6) % 2) == 1;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
