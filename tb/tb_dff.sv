// tb_dff: checks the D flip-flop against Q(n+1) = D. D changes on the falling
// edge and also in the middle of the high phase (which must not reach Q);
// after every rising edge Q must equal the D sampled at that edge, one cycle
// of latency, and q_n its complement. Synchronous reset is exercised at
// random. Finally the D/CLK pattern of the source design's flip-flop
// simulation is replayed: D toggling at a third of the clock rate.
module tb_dff;
  logic clk = 1'b0, reset, d, q, q_n;
  logic exp_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dff dut (.clk(clk), .reset(reset), .d(d), .q(q), .q_n(q_n));

  task automatic check(string what);
    checks++;
    if (q !== exp_q || q_n !== ~exp_q) begin
      failures++;
      $display("FAIL %s q=%0b q_n=%0b exp=%0b", what, q, q_n, exp_q);
    end
  endtask

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; d = 1'b1;
    @(posedge clk); #1;
    exp_q = 1'b0;
    check("reset");
    for (int n = 0; n < 1000; n++) begin
      logic sampled;
      @(negedge clk);
      exp_q = q;
      reset = ($urandom_range(0, 31) == 0);
      d = $urandom_range(0, 1) == 1;
      sampled = d;
      // Q must not follow D before the edge.
      #1;
      check("before edge");
      @(posedge clk);
      exp_q = reset ? 1'b0 : sampled;
      #2;
      check("edge");
      // D changes while the clock is high: no effect on Q.
      d = ~d;
      #1;
      check("high-phase change");
    end
    // One capture per edge: D that toggles every three clocks.
    @(negedge clk);
    reset = 1'b0;
    for (int t = 0; t < 30; t++) begin
      d = ((t / 3) % 2) == 1;
      @(posedge clk); #1;
      exp_q = ((t / 3) % 2) == 1;
      check("pattern");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
